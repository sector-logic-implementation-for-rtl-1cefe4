// Encoder: builds the 32-bit trigger word for the MUCTPI.
//
// Adds the bunch-crossing number and an overlap flag per track to the two
// selected tracks. The overlap flag marks a track whose RoI lies in the
// barrel/endcap overlap region, so the MUCTPI can avoid counting a muon
// twice; the overlap RoIs are given by the configuration mask ovl_mask_i.
// In test mode the word is replaced by the contents of a test pattern
// register (test_pattern_i), for checking the link to the MUCTPI.
//
// Word layout (this design's own; an absent track has pT 0 and RoI 0):
//   [7:0]   RoI of 1st track      [15:8]  RoI of 2nd track
//   [18:16] pT of 1st track       [21:19] pT of 2nd track
//   [22]    charge of 1st track   [23]    charge of 2nd track
//   [24]    overlap, 1st track    [25]    overlap, 2nd track
//   [31:26] BCID[5:0]   (the upper BCID bits do not fit and are unused)
// One registered pipeline stage: word_o = inputs + 1 clock. Adding BCID and
// overlap flags, the 32-bit width and the test-pattern mode follow the
// design description; the bit layout and the mask are this design's.
module sl_encoder
  import sl_pkg::*;
#(
  parameter int unsigned N_ROI = 148
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  track_t [1:0]         trk_i,
  input  logic   [BCID_W-1:0]  bcid_i,
  input  logic   [N_ROI-1:0]   ovl_mask_i,
  input  logic                 test_mode_i,
  input  logic   [31:0]        test_pattern_i,
  output logic   [31:0]        word_o
);

  logic [1:0] ovl;
  logic [31:0] nxt;

  always_comb begin
    for (int k = 0; k < 2; k++)
      ovl[k] = trk_i[k].valid && (int'(trk_i[k].roi) < N_ROI) && ovl_mask_i[trk_i[k].roi];
    nxt = '0;
    if (trk_i[0].valid) begin
      nxt[7:0]   = trk_i[0].roi;
      nxt[18:16] = trk_i[0].pt;
      nxt[22]    = trk_i[0].charge;
      nxt[24]    = ovl[0];
    end
    if (trk_i[1].valid) begin
      nxt[15:8]  = trk_i[1].roi;
      nxt[21:19] = trk_i[1].pt;
      nxt[23]    = trk_i[1].charge;
      nxt[25]    = ovl[1];
    end
    nxt[31:26] = bcid_i[5:0];
    if (test_mode_i) nxt = test_pattern_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) word_o <= '0;
    else        word_o <= nxt;
  end

endmodule
