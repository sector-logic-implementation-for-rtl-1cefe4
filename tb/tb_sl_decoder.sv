// Self-checking testbench for sl_decoder.
// Drives random R and phi hit records (often several aimed at the same SSC,
// some at SSC numbers beyond the sector) and EI/FI flags, and compares the
// per-SSC outputs one clock later with a reference dispatch computed here.
module tb_sl_decoder;
  import sl_pkg::*;

  localparam int unsigned N_SSC = 19, N_RHIT = 6, N_PHIT = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  r_hit_t   [N_RHIT-1:0] r_hits;
  phi_hit_t [N_PHIT-1:0] phi_hits;
  logic     [N_SSC-1:0]  inner;
  ssc_in_t  [N_SSC-1:0]  dut_o, exp_o;
  int checks = 0, failures = 0, conflicts = 0;

  sl_decoder #(.N_SSC(N_SSC), .N_RHIT(N_RHIT), .N_PHIT(N_PHIT)) dut (
    .clk, .rst_n, .r_hits_i(r_hits), .phi_hits_i(phi_hits), .inner_hit_i(inner), .ssc_o(dut_o)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ssc_in_t [N_SSC-1:0] model();
    ssc_in_t [N_SSC-1:0] e = '0;
    bit [N_SSC-1:0] rdone = '0;
    bit [N_SSC-1:0][1:0] pdone = '0;
    for (int s = 0; s < N_SSC; s++) e[s].inner = inner[s];
    for (int h = 0; h < N_RHIT; h++)
      if (r_hits[h].valid && r_hits[h].ssc < N_SSC) begin
        if (rdone[r_hits[h].ssc]) conflicts++;
        else begin
          rdone[r_hits[h].ssc] = 1;
          e[r_hits[h].ssc].r_valid = 1;
          e[r_hits[h].ssc].r = r_hits[h].w;
        end
      end
    for (int h = 0; h < N_PHIT; h++)
      if (phi_hits[h].valid && phi_hits[h].ssc < N_SSC && !pdone[phi_hits[h].ssc][phi_hits[h].sel]) begin
        pdone[phi_hits[h].ssc][phi_hits[h].sel] = 1;
        e[phi_hits[h].ssc].phi_valid[phi_hits[h].sel] = 1;
        e[phi_hits[h].ssc].phi[phi_hits[h].sel] = phi_hits[h].w;
      end
    return e;
  endfunction

  initial begin
    r_hits = '0; phi_hits = '0; inner = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int h = 0; h < N_RHIT; h++) begin
        r_hits[h] = r_hit_t'($urandom);
        r_hits[h].ssc = SSC_IDX_W'($urandom_range(0, (n % 3 == 0) ? 4 : 22));
      end
      for (int h = 0; h < N_PHIT; h++) begin
        phi_hits[h] = phi_hit_t'($urandom);
        phi_hits[h].ssc = SSC_IDX_W'($urandom_range(0, (n % 3 == 0) ? 4 : 22));
      end
      inner = N_SSC'($urandom);
      exp_o = model();
      @(posedge clk); #1;
      checks++;
      if (dut_o !== exp_o) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: got %h exp %h", n, dut_o, exp_o);
      end
    end
    if (conflicts == 0) begin failures++; $display("no conflicting records were driven"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
