// Self-checking testbench for sl_ssc.
// Loads the whole LUT with random entries (kept in a shadow array), then
// drives random R/phi combinations and EI/FI settings and checks the SSC
// output two clocks later against a reference computed from the shadow
// array: LUT address per candidate, higher pT kept (phi input 0 on a tie),
// levels 0 and 7 mean no track, EI/FI requirement drops candidates.
module tb_sl_ssc;
  import sl_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  ssc_in_t in;
  logic inner_req, we;
  logic [LUT_AW-1:0] waddr;
  logic [LUT_DW-1:0] wdata;
  ssc_out_t out;
  logic [LUT_DW-1:0] shadow [2**LUT_AW];
  int checks = 0, failures = 0, n_two = 0, n_veto = 0, n_trk = 0;

  sl_ssc dut (.clk, .rst_n, .in_i(in), .inner_req_i(inner_req), .lut_we_i(we),
              .lut_waddr_i(waddr), .lut_wdata_i(wdata), .out_o(out));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ssc_out_t model(ssc_in_t i, logic req);
    ssc_out_t best = '0;
    int cands = 0;
    for (int k = 0; k < 2; k++) begin
      if (i.r_valid && i.phi_valid[k]) begin
        // address written out field by field
        logic [LUT_AW-1:0] a = {i.r.pos, k[0], i.phi[k].phip, i.r.hl, i.r.sign, i.r.dr,
                                i.phi[k].hl, i.phi[k].sign, i.phi[k].dphi};
        logic [3:0] d = shadow[a];
        cands++;
        if (d[2:0] > best.pt) best = '{pt: d[2:0], charge: d[3], sub: {i.r.pos, k[0], i.phi[k].phip}};
      end
    end
    if (cands == 2) n_two++;
    if (best.pt == 3'd7) best = '0;
    if (req && !i.inner && best.pt != 0) begin best = '0; n_veto++; end
    if (best.pt != 0) n_trk++;
    return best;
  endfunction

  ssc_out_t exp_q [$];

  initial begin
    in = '0; inner_req = 0; we = 0; waddr = '0; wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 2**LUT_AW; a++) begin
      @(negedge clk);
      we = 1; waddr = LUT_AW'(a); wdata = LUT_DW'($urandom); shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 4000; n++) begin
      in = ssc_in_t'({$urandom, $urandom});
      if (n % 4 != 0) begin in.r_valid = 1; in.phi_valid = 2'($urandom_range(1, 3)); end
      inner_req = ($urandom_range(0, 3) == 0);
      exp_q.push_back(model(in, inner_req));
      @(posedge clk); #1;
      if (n >= 1) begin
        // output of the vector two clocks back is now visible
        if (exp_q.size() > 2) void'(exp_q.pop_front());
        checks++;
        if (out !== exp_q[0]) begin
          failures++;
          if (failures < 5) $display("mismatch at %0d: got %p exp %p", n, out, exp_q[0]);
        end
      end
      @(negedge clk);
    end
    if (n_two == 0 || n_veto == 0 || n_trk == 0) begin
      failures++; $display("missing case: two=%0d veto=%0d trk=%0d", n_two, n_veto, n_trk);
    end
    $display("two-candidate clusters %0d, EI/FI vetoes %0d, tracks %0d", n_two, n_veto, n_trk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
