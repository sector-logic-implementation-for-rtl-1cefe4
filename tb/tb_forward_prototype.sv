// Workload testbench: forward trigger sector, as in the prototype test.
//
// The Sector Logic is built for a forward sector (8 SSCs, 64 RoIs). All SSC
// LUTs get a simplified table in which the pT level depends only on |dR|
// (and the charge only on the sign of dR) whenever R and phi hits are both
// present: |dR| 0-1 -> level 6, 2-3 -> 5, 4-5 -> 4, 6-7 -> 3, 8-10 -> 2,
// 11-13 -> 1, 14-15 -> no track. Each event has up to six muons in distinct
// SSCs. Expected output: the muons ordered by pT level (highest first) and,
// at equal level, by SSC (lowest eta first); the first two must appear in
// the 32-bit word 7 clocks after the event, with the running BCID.
module tb_forward_prototype;
  import sl_pkg::*;

  localparam int unsigned N_SSC = 8, N_ROI = 64, N_EV = 20000, LAT = 7;
  localparam int unsigned LUT_N = 2**LUT_AW;
  localparam int unsigned HIT_W = 6 * R_HIT_W + 6 * PHI_HIT_W + N_SSC;

  logic clk = 1'b0, rst_n = 1'b0;
  r_hit_t   [5:0] r_hits;
  phi_hit_t [5:0] phi_hits;
  logic lut_we;
  logic [LUT_AW-1:0] lut_waddr;
  logic [LUT_DW-1:0] lut_wdata;
  logic [N_ROI-1:0] ovl_mask;
  logic [31:0] muctpi;
  logic ro_valid, ro_ovf;
  logic [BCID_W+HIT_W+31:0] ro_data;
  logic [31:0] exp_w [N_EV + LAT + 1];
  int checks = 0, failures = 0, n_six = 0, n_two_out = 0;

  sector_logic_top #(.N_SSC(N_SSC)) dut (
    .clk, .rst_n, .r_hits_i(r_hits), .phi_hits_i(phi_hits), .inner_hit_i('0), .bcr_i(1'b0),
    .lut_we_i(lut_we), .lut_bcast_i(1'b1), .lut_ssc_i('0), .lut_waddr_i(lut_waddr),
    .lut_wdata_i(lut_wdata), .inner_req_i('0), .ovl_mask_i(ovl_mask), .test_mode_i(1'b0),
    .test_pattern_i('0), .muctpi_o(muctpi), .l1a_i(1'b0), .ro_valid_o(ro_valid),
    .ro_ready_i(1'b1), .ro_data_o(ro_data), .ro_overflow_o(ro_ovf));

  always #5 clk = ~clk;

  initial begin
    repeat (LUT_N + N_EV + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int level_of(int adr);
    if (adr <= 1)  return 6;
    if (adr <= 3)  return 5;
    if (adr <= 5)  return 4;
    if (adr <= 7)  return 3;
    if (adr <= 10) return 2;
    if (adr <= 13) return 1;
    return 0;
  endfunction

  initial begin
    int cyc;
    r_hits = '0; phi_hits = '0; lut_we = 0; lut_waddr = '0; lut_wdata = '0;
    for (int i = 0; i < N_ROI; i++) ovl_mask[i] = ($urandom_range(0, 3) == 0);
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    cyc = 0;                                   // clocks since reset = BCID
    // load: R sign and |dR| sit at LUT address bits 9 and 8:5
    for (int a = 0; a < LUT_N; a++) begin
      lut_we = 1; lut_waddr = LUT_AW'(a);
      lut_wdata = {a[9], 3'(level_of(int'(a[8:5])))};
      @(negedge clk); cyc++;
    end
    lut_we = 0;
    for (int n = 0; n < N_EV + LAT; n++) begin
      int nmu, ord [$], used [N_SSC], lv [N_SSC], ch [N_SSC], sb [N_SSC];
      logic [31:0] w;
      r_hits = '0; phi_hits = '0;
      if (n < N_EV) begin
        nmu = $urandom_range(0, 6);
        if (nmu == 6) n_six++;
        for (int s = 0; s < N_SSC; s++) begin used[s] = 0; lv[s] = 0; end
        for (int m = 0; m < nmu; m++) begin
          int s;
          do s = $urandom_range(0, N_SSC - 1); while (used[s]);
          used[s] = 1;
          r_hits[m] = r_hit_t'($urandom); r_hits[m].valid = 1; r_hits[m].ssc = 5'(s);
          phi_hits[m] = phi_hit_t'($urandom); phi_hits[m].valid = 1; phi_hits[m].ssc = 5'(s);
          lv[s] = level_of(int'(r_hits[m].w.dr));
          ch[s] = r_hits[m].w.sign;
          sb[s] = {r_hits[m].w.pos, phi_hits[m].sel, phi_hits[m].w.phip};
        end
        // order: level high to low, SSC low to high
        ord.delete();
        for (int l = 6; l >= 1; l--)
          for (int s = 0; s < N_SSC; s++) if (used[s] && lv[s] == l) ord.push_back(s);
        w = 32'(cyc % BC_PER_ORBIT % 64) << 26;
        for (int k = 0; k < 2 && k < ord.size(); k++) begin
          int s, roi;
          s = ord[k];
          roi = 8 * s + sb[s];
          w |= (32'(roi) << (8 * k)) | (32'(lv[s]) << (16 + 3 * k)) | (32'(ch[s]) << (22 + k)) |
               (32'(ovl_mask[roi]) << (24 + k));
        end
        if (ord.size() >= 2) n_two_out++;
        exp_w[n] = w;
      end
      #1;
      if (n >= LAT) begin
        checks++;
        if (muctpi !== exp_w[n - LAT]) begin
          failures++;
          if (failures < 6) $display("event %0d: word %h expected %h", n - LAT, muctpi, exp_w[n - LAT]);
        end
      end
      @(negedge clk); cyc++;
    end
    if (n_six == 0 || n_two_out == 0) failures++;
    $display("events %0d, with six muons %0d, with two tracks out %0d", N_EV, n_six, n_two_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
