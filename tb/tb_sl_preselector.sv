// Self-checking testbench for sl_preselector.
// Random sparse candidate patterns; one clock later the two lowest-index
// valid SSCs must come out with RoI = 8 * SSC + sub-sector and their charge.
module tb_sl_preselector;
  import sl_pkg::*;

  localparam int unsigned N_SSC = 19;
  logic clk = 1'b0, rst_n = 1'b0;
  pre_in_t  [N_SSC-1:0] cand;
  pre_out_t [1:0] trk, e;
  int checks = 0, failures = 0, n_more = 0;

  sl_preselector #(.N_SSC(N_SSC)) dut (.clk, .rst_n, .cand_i(cand), .trk_o(trk));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cand = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int found;
      @(negedge clk);
      for (int s = 0; s < N_SSC; s++) begin
        cand[s] = pre_in_t'($urandom);
        cand[s].valid = ($urandom_range(0, 9) < (n % 4));
      end
      e = '0; found = 0;
      for (int s = 0; s < N_SSC; s++)
        if (cand[s].valid) begin
          if (found < 2) e[found] = '{valid: 1, roi: 8'(s * 8 + cand[s].sub), charge: cand[s].charge};
          found++;
        end
      if (found > 2) n_more++;
      @(posedge clk); #1;
      checks++;
      if (trk !== e) begin
        failures++;
        if (failures < 5) $display("mismatch %0d: got %p exp %p", n, trk, e);
      end
    end
    if (n_more == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
