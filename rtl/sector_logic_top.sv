// Sector Logic of one endcap trigger sector of the muon level-1 trigger.
//
// Pipeline (one clock per block, 7 clocks from input to trigger word):
//   decoder (1) -> N_SSC Sub-Sector Cluster R-phi coincidences with pT LUTs
//   (2) -> de-multiplexer by pT level (1) -> six pre-selectors, two
//   lowest-eta tracks each (1) -> final selector, two highest-pT tracks (1)
//   -> encoder, 32-bit MUCTPI word with BCID and overlap flags (1).
// Inputs of crossing n (records and EI/FI flags present before clock edge n)
// give muctpi_o after edge n+6, i.e. it is sampled downstream at edge n+7.
// A bunch-crossing counter numbers the crossings (bcr_i clears it); its value
// is delayed six clocks so the encoder stamps the crossing of the inputs.
// The readout buffer keeps the input records and the trigger word of every
// crossing for the level-1 latency and queues accepted crossings (l1a_i) for
// the Star Switch (ro_*).
//
// Configuration is brought out as ports: LUT loading (lut_we_i with
// lut_ssc_i selecting one SSC, or lut_bcast_i writing all SSCs), the per-SSC
// EI/FI requirement mask, the overlap RoI mask and the test-pattern mode.
// N_SSC = 19 is the endcap sector (148 RoIs); 8 gives a forward sector
// (64 RoIs). The block structure, the 19 SSCs, six pT levels, two tracks and
// the 7-clock latency follow the design description; the record formats,
// configuration ports and readout details are this design's choices.
module sector_logic_top
  import sl_pkg::*;
#(
  parameter int unsigned N_SSC  = 19,
  parameter int unsigned N_RHIT = 6,
  parameter int unsigned N_PHIT = 6,
  parameter int unsigned N_ROI  = (N_SSC == 19) ? 148 : 8 * N_SSC,
  parameter int unsigned HIT_W  = N_RHIT * R_HIT_W + N_PHIT * PHI_HIT_W + N_SSC
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // de-serialized trigger inputs
  input  r_hit_t   [N_RHIT-1:0]     r_hits_i,
  input  phi_hit_t [N_PHIT-1:0]     phi_hits_i,
  input  logic     [N_SSC-1:0]      inner_hit_i,
  input  logic                      bcr_i,
  // configuration
  input  logic                      lut_we_i,
  input  logic                      lut_bcast_i,
  input  logic [SSC_IDX_W-1:0]      lut_ssc_i,
  input  logic [LUT_AW-1:0]         lut_waddr_i,
  input  logic [LUT_DW-1:0]         lut_wdata_i,
  input  logic [N_SSC-1:0]          inner_req_i,
  input  logic [N_ROI-1:0]          ovl_mask_i,
  input  logic                      test_mode_i,
  input  logic [31:0]               test_pattern_i,
  // trigger output to the MUCTPI
  output logic [31:0]               muctpi_o,
  // readout to the Star Switch
  input  logic                      l1a_i,
  output logic                      ro_valid_o,
  input  logic                      ro_ready_i,
  output logic [BCID_W+HIT_W+31:0]  ro_data_o,
  output logic                      ro_overflow_o
);

  ssc_in_t  [N_SSC-1:0]           ssc_in;
  ssc_out_t [N_SSC-1:0]           ssc_out;
  pre_in_t  [N_PT-1:0][N_SSC-1:0] lvl;
  pre_out_t [N_PT-1:0][1:0]       pre;
  track_t   [1:0]                 trk;
  logic     [BCID_W-1:0]          bcid;
  logic     [BCID_W-1:0]          bcid_d [6];

  sl_decoder #(.N_SSC(N_SSC), .N_RHIT(N_RHIT), .N_PHIT(N_PHIT)) u_decoder (
    .clk, .rst_n, .r_hits_i, .phi_hits_i, .inner_hit_i, .ssc_o(ssc_in)
  );

  for (genvar s = 0; s < N_SSC; s++) begin : g_ssc
    sl_ssc u_ssc (
      .clk, .rst_n,
      .in_i        (ssc_in[s]),
      .inner_req_i (inner_req_i[s]),
      .lut_we_i    (lut_we_i && (lut_bcast_i || lut_ssc_i == SSC_IDX_W'(s))),
      .lut_waddr_i,
      .lut_wdata_i,
      .out_o       (ssc_out[s])
    );
  end

  sl_demux #(.N_SSC(N_SSC)) u_demux (.clk, .rst_n, .ssc_i(ssc_out), .lvl_o(lvl));

  for (genvar p = 0; p < N_PT; p++) begin : g_pre
    sl_preselector #(.N_SSC(N_SSC)) u_pre (
      .clk, .rst_n, .cand_i(lvl[p]), .trk_o(pre[p])
    );
  end

  sl_final_selector u_final (.clk, .rst_n, .pre_i(pre), .trk_o(trk));

  sl_bcid_counter u_bcid (.clk, .rst_n, .bcr_i, .bcid_o(bcid));

  // align the BCID with the data reaching the encoder
  always_ff @(posedge clk) begin
    bcid_d[0] <= bcid;
    for (int i = 1; i < 6; i++) bcid_d[i] <= bcid_d[i-1];
  end

  sl_encoder #(.N_ROI(N_ROI)) u_encoder (
    .clk, .rst_n, .trk_i(trk), .bcid_i(bcid_d[5]), .ovl_mask_i, .test_mode_i,
    .test_pattern_i, .word_o(muctpi_o)
  );

  sl_readout_buffer #(.HIT_W(HIT_W), .OUT_LAT(7)) u_readout (
    .clk, .rst_n,
    .hits_i     ({r_hits_i, phi_hits_i, inner_hit_i}),
    .word_i     (muctpi_o),
    .bcid_i     (bcid),
    .l1a_i,
    .ro_valid_o,
    .ro_ready_i,
    .ro_data_o,
    .overflow_o (ro_overflow_o)
  );

endmodule
