// De-multiplexer: routes each SSC candidate to the pre-selector of its pT
// level.
//
// Input: one candidate per SSC ({pT, charge, sub-sector}, pT 0 = none).
// Output: for every pT level 1..N_PT an array with one slot per SSC; slot s
// of level p is valid when SSC s found a candidate of level p. One
// registered pipeline stage (output = input + 1 clock). The routing by pT
// level into six pre-selectors follows the design's block diagram; the
// slot-per-SSC layout keeps the SSC position (and thus eta order) for the
// pre-selectors.
module sl_demux
  import sl_pkg::*;
#(
  parameter int unsigned N_SSC = 19
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  ssc_out_t [N_SSC-1:0]             ssc_i,
  output pre_in_t  [N_PT-1:0][N_SSC-1:0]   lvl_o
);

  pre_in_t [N_PT-1:0][N_SSC-1:0] nxt;

  always_comb begin
    for (int p = 0; p < N_PT; p++)
      for (int s = 0; s < N_SSC; s++) begin
        nxt[p][s].valid  = (ssc_i[s].pt == PT_W'(p + 1));
        nxt[p][s].charge = ssc_i[s].charge;
        nxt[p][s].sub    = ssc_i[s].sub;
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) lvl_o <= '0;
    else        lvl_o <= nxt;
  end

endmodule
