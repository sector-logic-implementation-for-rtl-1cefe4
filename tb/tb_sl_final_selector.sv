// Self-checking testbench for sl_final_selector.
// Random pre-selector outputs; the reference sorts all valid candidates by
// pT level (descending, stable in 1st/2nd order) and takes the first two.
module tb_sl_final_selector;
  import sl_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  pre_out_t [N_PT-1:0][1:0] pre;
  track_t [1:0] trk, e;
  int checks = 0, failures = 0;

  sl_final_selector dut (.clk, .rst_n, .pre_i(pre), .trk_o(trk));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pre = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      track_t list [$];
      @(negedge clk);
      for (int p = 0; p < N_PT; p++)
        for (int k = 0; k < 2; k++) begin
          pre[p][k] = pre_out_t'($urandom);
          pre[p][k].valid = ($urandom_range(0, 11) < (n % 5));
        end
      list.delete();
      for (int lvl = 6; lvl >= 1; lvl--)
        for (int k = 0; k < 2; k++)
          if (pre[lvl-1][k].valid)
            list.push_back('{valid: 1, pt: 3'(lvl), roi: pre[lvl-1][k].roi, charge: pre[lvl-1][k].charge});
      e = '0;
      if (list.size() > 0) e[0] = list[0];
      if (list.size() > 1) e[1] = list[1];
      @(posedge clk); #1;
      checks++;
      if (trk !== e) begin
        failures++;
        if (failures < 5) $display("mismatch %0d: got %p exp %p", n, trk, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
