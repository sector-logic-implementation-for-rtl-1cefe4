// Self-checking testbench for sl_readout_buffer (small sizes).
// Every crossing gets random input records; its trigger word is driven
// OUT_LAT clocks later. Level-1 accepts and Star Switch ready are random,
// with bursts of accepts while ready is low to overflow the FIFO. A
// clock-by-clock reference queue predicts what the Star Switch must see:
// {BCID, records, word} of the crossing L1_LAT clocks before each accept,
// in order, minus accepts that found the queue full.
module tb_sl_readout_buffer;
  import sl_pkg::*;

  localparam int unsigned HIT_W = 16, DEPTH = 16, L1_LAT = 10, OUT_LAT = 3, FIFO_DEPTH = 4;
  localparam int unsigned EW = BCID_W + HIT_W + 32;
  localparam int unsigned NCYC = 6000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [HIT_W-1:0] hits;
  logic [31:0] word;
  logic [BCID_W-1:0] bcid;
  logic l1a, ready, valid, ovf;
  logic [EW-1:0] data;
  logic [HIT_W-1:0] H [NCYC];
  logic [31:0] W [NCYC];
  logic [EW-1:0] q [$];
  bit pend = 0, m_ovf = 0;
  int pend_c, cyc = 0;
  int checks = 0, failures = 0, n_acc = 0, n_drop = 0, n_pop = 0;

  sl_readout_buffer #(.HIT_W(HIT_W), .DEPTH(DEPTH), .L1_LAT(L1_LAT), .OUT_LAT(OUT_LAT),
                      .FIFO_DEPTH(FIFO_DEPTH)) dut (
    .clk, .rst_n, .hits_i(hits), .word_i(word), .bcid_i(bcid), .l1a_i(l1a),
    .ro_valid_o(valid), .ro_ready_i(ready), .ro_data_o(data), .overflow_o(ovf));

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NCYC; i++) begin H[i] = HIT_W'($urandom); W[i] = $urandom; end
    hits = '0; word = '0; bcid = '0; l1a = 0; ready = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (cyc = 0; cyc < NCYC - 10; cyc++) begin
      bit pop;
      // drive crossing cyc
      hits = H[cyc];
      bcid = BCID_W'(cyc % 4096);
      word = (cyc >= OUT_LAT) ? W[cyc - OUT_LAT] : '0;
      l1a  = (cyc >= L1_LAT) && ((cyc / 500) % 2 == 1 ? $urandom_range(0, 1) == 1
                                                       : $urandom_range(0, 5) == 0);
      ready = ((cyc / 500) % 2 == 1) ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 1) == 1);
      #1;
      checks++;
      if (valid !== (q.size() > 0) || (valid && data !== q[0]) || ovf !== m_ovf) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: v=%b data=%h exp %0d entries %h ovf=%b/%b",
                                   cyc, valid, data, q.size(), (q.size() > 0) ? q[0] : '0, ovf, m_ovf);
      end
      @(posedge clk);
      // reference update for this edge
      pop = (q.size() > 0) && ready;
      if (pop) begin void'(q.pop_front()); n_pop++; end
      if (pend) begin
        if (q.size() < FIFO_DEPTH)
          q.push_back({BCID_W'(pend_c % 4096), H[pend_c], W[pend_c]});
        else begin m_ovf = 1; n_drop++; end
      end
      pend = l1a;
      if (l1a) begin pend_c = cyc - L1_LAT; n_acc++; end
      @(negedge clk);
    end
    if (n_drop == 0 || n_pop == 0) begin failures++; $display("no overflow or no readout"); end
    $display("accepts %0d, read out %0d, dropped %0d", n_acc, n_pop, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
