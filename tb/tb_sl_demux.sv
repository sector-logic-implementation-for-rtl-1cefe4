// Self-checking testbench for sl_demux.
// Random SSC outputs (pT 0..7) are applied; one clock later every pT-level
// slot must hold exactly the SSCs whose pT equals that level.
module tb_sl_demux;
  import sl_pkg::*;

  localparam int unsigned N_SSC = 19;
  logic clk = 1'b0, rst_n = 1'b0;
  ssc_out_t [N_SSC-1:0] ssc;
  pre_in_t  [N_PT-1:0][N_SSC-1:0] lvl;
  int checks = 0, failures = 0;

  sl_demux #(.N_SSC(N_SSC)) dut (.clk, .rst_n, .ssc_i(ssc), .lvl_o(lvl));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ssc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int s = 0; s < N_SSC; s++) ssc[s] = ssc_out_t'($urandom);
      @(posedge clk); #1;
      for (int p = 1; p <= 6; p++)
        for (int s = 0; s < N_SSC; s++) begin
          checks++;
          if (lvl[p-1][s].valid !== (int'(ssc[s].pt) == p) ||
              (lvl[p-1][s].valid && (lvl[p-1][s].charge !== ssc[s].charge ||
                                     lvl[p-1][s].sub !== ssc[s].sub))) begin
            failures++;
            if (failures < 5) $display("mismatch level %0d ssc %0d", p, s);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
