// End-to-end testbench for sector_logic_top at its default (endcap sector)
// parameters: 19 SSCs, 148 RoIs, 16K-entry LUT per SSC.
//
// 1. Loads every SSC LUT with the same random table by broadcast writes,
//    then clears the Pos=1 half of SSC 18 (rows that do not exist in a
//    37-row sector) with per-SSC writes.
// 2. Sends random crossings with up to six muons (R and phi records of the
//    same SSC), extra phi records that give two candidates in one SSC,
//    conflicting records and noise, EI/FI flags, a bunch-counter reset and
//    a window of test-pattern mode.
// 3. Checks every trigger word exactly 7 clocks after its inputs against a
//    reference model of the whole chain written here.
// 4. Sends sparse level-1 accepts with the Star Switch always ready and
//    checks each readout entry, then a burst with ready low that must set
//    the overflow flag.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_sector_logic_top;
  import sl_pkg::*;

  localparam int unsigned N_SSC = 19, N_RHIT = 6, N_PHIT = 6, N_ROI = 148;
  localparam int unsigned HIT_W = N_RHIT * R_HIT_W + N_PHIT * PHI_HIT_W + N_SSC;
  localparam int unsigned LUT_N = 2**LUT_AW;
  localparam int unsigned N_EV = 4000;
  localparam int unsigned NCYC = LUT_N + LUT_N / 2 + N_EV + 400;
  localparam int unsigned LAT = 7, L1_LAT = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  r_hit_t   [N_RHIT-1:0] r_hits;
  phi_hit_t [N_PHIT-1:0] phi_hits;
  logic [N_SSC-1:0] inner_hit, inner_req;
  logic bcr, lut_we, lut_bcast, tmode, l1a, ready, valid, ovf;
  logic [SSC_IDX_W-1:0] lut_ssc;
  logic [LUT_AW-1:0] lut_waddr;
  logic [LUT_DW-1:0] lut_wdata;
  logic [N_ROI-1:0] ovl_mask;
  logic [31:0] pattern, muctpi;
  logic [BCID_W+HIT_W+31:0] ro_data;

  sector_logic_top dut (
    .clk, .rst_n, .r_hits_i(r_hits), .phi_hits_i(phi_hits), .inner_hit_i(inner_hit), .bcr_i(bcr),
    .lut_we_i(lut_we), .lut_bcast_i(lut_bcast), .lut_ssc_i(lut_ssc), .lut_waddr_i(lut_waddr),
    .lut_wdata_i(lut_wdata), .inner_req_i(inner_req), .ovl_mask_i(ovl_mask), .test_mode_i(tmode),
    .test_pattern_i(pattern), .muctpi_o(muctpi), .l1a_i(l1a), .ro_valid_o(valid),
    .ro_ready_i(ready), .ro_data_o(ro_data), .ro_overflow_o(ovf));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_trk = 0, n_two = 0, n_veto = 0, n_pre_drop = 0, n_fin_drop = 0, n_ovl = 0, n_test = 0,
      n_bcr = 0, n_wrap = 0, n_conflict = 0, n_ro = 0, n_both = 0;

  logic [LUT_DW-1:0]       shadow [LUT_N];
  logic [31:0]             exp_w  [NCYC];
  logic [BCID_W-1:0]       B      [NCYC];
  logic [HIT_W-1:0]        HR     [NCYC];
  bit                      TM     [NCYC];
  logic [31:0]             PAT    [NCYC];
  int                      acc_q  [$];
  logic [BCID_W-1:0]       m_bcid;

  initial begin
    repeat (NCYC + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // LUT value seen by SSC s at address a
  function automatic logic [3:0] lut_of(int s, logic [LUT_AW-1:0] a);
    if (s == 18 && a[LUT_AW-1]) return 4'h0;
    return shadow[a];
  endfunction

  // trigger word of the current inputs (without test mode)
  function automatic logic [31:0] model_word(logic [BCID_W-1:0] bc);
    ssc_out_t o [N_SSC];
    track_t t [$];
    logic [31:0] w;
    for (int s = 0; s < N_SSC; s++) begin
      bit rv = 0; r_word_t r; bit [1:0] pv = 0; phi_word_t p [2];
      int nc = 0;
      o[s] = '0;
      for (int h = 0; h < N_RHIT; h++)
        if (r_hits[h].valid && r_hits[h].ssc == s) begin
          if (rv) n_conflict++; else begin rv = 1; r = r_hits[h].w; end
        end
      for (int h = 0; h < N_PHIT; h++)
        if (phi_hits[h].valid && phi_hits[h].ssc == s && !pv[phi_hits[h].sel]) begin
          pv[phi_hits[h].sel] = 1; p[phi_hits[h].sel] = phi_hits[h].w;
        end
      for (int k = 0; k < 2; k++)
        if (rv && pv[k]) begin
          logic [3:0] d = lut_of(s, {r.pos, k[0], p[k].phip, r.hl, r.sign, r.dr,
                                     p[k].hl, p[k].sign, p[k].dphi});
          if (d[2:0] != 0 && d[2:0] != 7) nc++;
          if (d[2:0] > o[s].pt) o[s] = '{pt: d[2:0], charge: d[3], sub: {r.pos, k[0], p[k].phip}};
        end
      if (nc == 2) n_two++;
      if (o[s].pt == 7) o[s] = '0;
      if (o[s].pt != 0 && inner_req[s] && !inner_hit[s]) begin o[s] = '0; n_veto++; end
    end
    // two lowest-eta per level, then highest level first
    for (int lvl = 6; lvl >= 1; lvl--) begin
      int taken = 0;
      for (int s = 0; s < N_SSC; s++)
        if (o[s].pt == lvl) begin
          if (taken < 2) t.push_back('{valid: 1, pt: 3'(lvl), roi: 8'(8 * s + o[s].sub),
                                       charge: o[s].charge});
          else n_pre_drop++;
          taken++;
        end
    end
    if (t.size() > 2) n_fin_drop++;
    n_trk += t.size();
    w = 32'(bc % 64) << 26;
    for (int k = 0; k < 2 && k < t.size(); k++) begin
      bit ov = (t[k].roi < N_ROI) && ovl_mask[t[k].roi];
      w |= (32'(t[k].roi) << (8 * k)) | (32'(t[k].pt) << (16 + 3 * k)) |
           (32'(t[k].charge) << (22 + k)) | (32'(ov) << (24 + k));
    end
    return w;
  endfunction

  task automatic random_event(int n);
    int nmu;
    nmu = $urandom_range(0, 6);
    r_hits = '0; phi_hits = '0;
    for (int m = 0; m < nmu; m++) begin
      int s = $urandom_range(0, N_SSC - 1);
      r_hits[m] = r_hit_t'($urandom);
      r_hits[m].valid = 1; r_hits[m].ssc = 5'(s);
      phi_hits[m] = phi_hit_t'($urandom);
      phi_hits[m].valid = 1; phi_hits[m].ssc = 5'(s);
    end
    // the unused records: noise, second phi inputs, out-of-range SSCs
    for (int h = nmu; h < N_RHIT; h++) begin
      r_hits[h] = r_hit_t'($urandom);
      r_hits[h].valid = ($urandom_range(0, 3) == 0);
      r_hits[h].ssc = 5'($urandom_range(0, 23));
    end
    for (int h = nmu; h < N_PHIT; h++) begin
      phi_hits[h] = phi_hit_t'($urandom);
      phi_hits[h].valid = ($urandom_range(0, 1) == 0);
      phi_hits[h].ssc = (h > 0 && $urandom_range(0, 1) == 0) ? phi_hits[h-1].ssc
                                                              : 5'($urandom_range(0, 20));
      if (h > 0) phi_hits[h].sel = ~phi_hits[h-1].sel;
    end
    inner_hit = N_SSC'({$urandom, $urandom}) | N_SSC'({$urandom, $urandom});
  endtask

  initial begin
    int g = 0;                // crossing number since reset release
    int ro_next = 0;
    r_hits = '0; phi_hits = '0; inner_hit = '0; inner_req = '0; bcr = 0; lut_we = 0;
    lut_bcast = 0; lut_ssc = '0; lut_waddr = '0; lut_wdata = '0; ovl_mask = '0; tmode = 0;
    pattern = '0; l1a = 0; ready = 1; m_bcid = '0;
    for (int i = 0; i < N_ROI; i++) ovl_mask[i] = ($urandom_range(0, 4) == 0);
    inner_req = N_SSC'($urandom) & N_SSC'($urandom);
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (g = 0; g < NCYC; g++) begin
      // ---- drive crossing g
      lut_we = 0; bcr = 0; tmode = 0; l1a = 0; ready = 1;
      r_hits = '0; phi_hits = '0; inner_hit = '0;
      if (g < LUT_N) begin
        lut_we = 1; lut_bcast = 1; lut_waddr = LUT_AW'(g); lut_wdata = LUT_DW'($urandom);
        shadow[g] = lut_wdata;
      end else if (g < LUT_N + LUT_N / 2) begin
        lut_we = 1; lut_bcast = 0; lut_ssc = 5'd18; lut_waddr = LUT_AW'(g - LUT_N / 2);  // Pos=1 half
        lut_wdata = '0;
      end else if (g < NCYC - 300) begin
        int e;
        e = g - (LUT_N + LUT_N / 2);
        random_event(e);
        if (e == 2000) begin bcr = 1; n_bcr++; end
        if (e >= 1000 && e < 1020) begin tmode = 1; pattern = $urandom; end
        l1a = (e > L1_LAT + 20) && ($urandom_range(0, 19) == 0);
      end else begin
        ready = 0;                       // Star Switch stalled to the end
        l1a = (g < NCYC - 250);          // burst of accepts
      end
      TM[g] = tmode; PAT[g] = pattern;
      B[g] = m_bcid;
      HR[g] = {r_hits, phi_hits, inner_hit};
      exp_w[g] = model_word(m_bcid);
      if (l1a && ready) acc_q.push_back(g - L1_LAT);
      #1;
      // ---- trigger word of crossing g-LAT
      if (g >= LAT) begin
        logic [31:0] e;
        e = TM[g - 1] ? PAT[g - 1] : exp_w[g - LAT];
        checks++;
        if (muctpi !== e) begin
          failures++;
          if (failures < 6) $display("crossing %0d: word %h expected %h", g - LAT, muctpi, e);
        end
        if (TM[g - 1]) n_test++;
        else if (muctpi[25:24] != 0) n_ovl++;
        if (TM[g - 1] != TM[g - LAT]) n_both++;
      end
      // ---- readout entry presented now
      if (valid && ready) begin
        int c;
        logic [31:0] ew;
        checks++;
        if (acc_q.size() == 0) begin failures++; $display("unexpected readout at %0d", g); end
        else begin
          c = acc_q.pop_front();
          ew = TM[c + LAT - 1] ? PAT[c + LAT - 1] : exp_w[c];
          if (ro_data !== {B[c], HR[c], ew}) begin
            failures++;
            if (failures < 6) $display("readout of crossing %0d wrong", c);
          end
          n_ro++;
        end
      end
      @(posedge clk);
      // ---- BCID reference
      if (bcr) m_bcid = '0;
      else if (m_bcid == BCID_W'(BC_PER_ORBIT - 1)) begin m_bcid = '0; n_wrap++; end
      else m_bcid = m_bcid + 1'b1;
      @(negedge clk);
    end
    checks++;
    if (!ovf) begin failures++; $display("readout overflow never flagged"); end
    $display("tracks %0d, two-candidate SSCs %0d, EI/FI vetoes %0d, pre-selector drops %0d,",
             n_trk, n_two, n_veto, n_pre_drop);
    $display("final-selector drops %0d, overlap words %0d, test words %0d, BCR %0d, BCID wraps %0d,",
             n_fin_drop, n_ovl, n_test, n_bcr, n_wrap);
    $display("decoder conflicts %0d, readout entries %0d", n_conflict, n_ro);
    if (n_trk == 0 || n_two == 0 || n_veto == 0 || n_pre_drop == 0 || n_fin_drop == 0 ||
        n_ovl == 0 || n_test == 0 || n_bcr == 0 || n_wrap == 0 || n_conflict == 0 || n_ro == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
