// Pre-selector for one pT level.
//
// Gets one candidate slot per SSC (all of the same pT level) and keeps the
// two with the lowest eta, i.e. the two lowest SSC indices, as a two-deep
// priority encoder. Each kept candidate is given its RoI number,
// RoI = 8 * SSC index + sub-sector, and its charge. trk_o[0] is the 1st
// (lowest eta) track, trk_o[1] the 2nd. One registered pipeline stage.
// Choosing two lowest-eta tracks per pre-selector follows the design
// description; SSC index 0 being the lowest-eta SSC is this design's
// numbering.
module sl_preselector
  import sl_pkg::*;
#(
  parameter int unsigned N_SSC = 19
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  pre_in_t  [N_SSC-1:0]    cand_i,
  output pre_out_t [1:0]          trk_o
);

  pre_out_t [1:0] nxt;

  always_comb begin
    nxt = '0;
    for (int s = 0; s < N_SSC; s++) begin
      if (cand_i[s].valid) begin
        if (!nxt[0].valid) begin
          nxt[0] = '{valid: 1'b1, roi: ROI_W'({s[SSC_IDX_W-1:0], cand_i[s].sub}),
                     charge: cand_i[s].charge};
        end else if (!nxt[1].valid) begin
          nxt[1] = '{valid: 1'b1, roi: ROI_W'({s[SSC_IDX_W-1:0], cand_i[s].sub}),
                     charge: cand_i[s].charge};
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) trk_o <= '0;
    else        trk_o <= nxt;
  end

endmodule
