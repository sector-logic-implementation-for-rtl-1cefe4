// Final selector: picks the two highest-pT tracks of the sector.
//
// Input: the two tracks of each of the N_PT pre-selectors (index 0 = pT level
// 1). The candidates are ranked by pT level, highest first; inside one level
// the pre-selector's 1st track (lower eta) comes before its 2nd. The first
// two valid candidates in that order become trk_o[0] (1st track) and
// trk_o[1] (2nd track), each with its pT level. One registered pipeline
// stage. Selecting the two highest-pT tracks out of up to 12 follows the
// design description; the order among equal pT is this design's choice.
module sl_final_selector
  import sl_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  pre_out_t [N_PT-1:0][1:0]   pre_i,
  output track_t   [1:0]             trk_o
);

  track_t [1:0] nxt;

  always_comb begin
    nxt = '0;
    for (int p = N_PT - 1; p >= 0; p--)
      for (int k = 0; k < 2; k++)
        if (pre_i[p][k].valid) begin
          if (!nxt[0].valid)
            nxt[0] = '{valid: 1'b1, pt: PT_W'(p + 1), roi: pre_i[p][k].roi,
                       charge: pre_i[p][k].charge};
          else if (!nxt[1].valid)
            nxt[1] = '{valid: 1'b1, pt: PT_W'(p + 1), roi: pre_i[p][k].roi,
                       charge: pre_i[p][k].charge};
        end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) trk_o <= '0;
    else        trk_o <= nxt;
  end

  // the 2nd track only exists with a 1st one, and never has a higher pT
  a_order: assert property (@(posedge clk) disable iff (!rst_n)
                            trk_o[1].valid |-> trk_o[0].valid && trk_o[0].pt >= trk_o[1].pt);

endmodule
