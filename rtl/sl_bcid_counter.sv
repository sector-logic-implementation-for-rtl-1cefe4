// Bunch-crossing counter.
//
// Counts clocks (bunch crossings) from 0 to BC_PER_ORBIT-1 (3564 crossings
// per LHC orbit) and wraps. A bunch-counter reset (bcr_i) or the module
// reset loads 0 on the next clock. The count numbers the crossing whose
// data is at the Sector Logic inputs in the same clock; the encoder stamps
// the low bits of this number, delayed to match the pipeline, into the
// trigger word. The orbit length is standard LHC timing, not a choice of
// this design.
module sl_bcid_counter
  import sl_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bcr_i,
  output logic [BCID_W-1:0] bcid_o
);

  always_ff @(posedge clk) begin
    if (!rst_n || bcr_i)                       bcid_o <= '0;
    else if (bcid_o == BCID_W'(BC_PER_ORBIT - 1)) bcid_o <= '0;
    else                                       bcid_o <= bcid_o + 1'b1;
  end

endmodule
