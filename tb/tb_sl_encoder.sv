// Self-checking testbench for sl_encoder.
// Random track pairs, BCIDs and overlap masks; the 32-bit word one clock
// later is compared field by field with the documented layout. Test-pattern
// mode is exercised as well.
module tb_sl_encoder;
  import sl_pkg::*;

  localparam int unsigned N_ROI = 148;
  logic clk = 1'b0, rst_n = 1'b0;
  track_t [1:0] trk;
  logic [BCID_W-1:0] bcid;
  logic [N_ROI-1:0] mask;
  logic tmode;
  logic [31:0] pattern, word, e;
  int checks = 0, failures = 0, n_ovl = 0, n_test = 0;

  sl_encoder #(.N_ROI(N_ROI)) dut (.clk, .rst_n, .trk_i(trk), .bcid_i(bcid), .ovl_mask_i(mask),
                                   .test_mode_i(tmode), .test_pattern_i(pattern), .word_o(word));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trk = '0; bcid = '0; mask = '0; tmode = 0; pattern = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        trk[k] = track_t'($urandom);
        trk[k].roi = 8'($urandom_range(0, 147));
      end
      bcid = BCID_W'($urandom);
      for (int i = 0; i < N_ROI; i++) mask[i] = ($urandom_range(0, 3) == 0);
      tmode = ($urandom_range(0, 9) == 0);
      pattern = $urandom;
      e = '0;
      if (trk[0].valid) begin
        e = e | 32'(trk[0].roi) | (32'(trk[0].pt) << 16) | (32'(trk[0].charge) << 22)
              | (32'(mask[trk[0].roi]) << 24);
        if (mask[trk[0].roi]) n_ovl++;
      end
      if (trk[1].valid)
        e = e | (32'(trk[1].roi) << 8) | (32'(trk[1].pt) << 19) | (32'(trk[1].charge) << 23)
              | (32'(mask[trk[1].roi]) << 25);
      e = e | (32'(bcid % 64) << 26);
      if (tmode) begin e = pattern; n_test++; end
      @(posedge clk); #1;
      checks++;
      if (word !== e) begin
        failures++;
        if (failures < 5) $display("mismatch %0d: got %h exp %h", n, word, e);
      end
    end
    if (n_ovl == 0 || n_test == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
