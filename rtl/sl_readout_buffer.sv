// Readout buffer: level-1 latency memory and derandomizing queue towards
// the Star Switch (the readout data concentrator).
//
// Every clock the input records of the current crossing (hits_i) and its
// BCID are written into a circular memory of DEPTH entries; the trigger
// word of a crossing arrives OUT_LAT clocks later (the Sector Logic
// latency) and is written into a second circular memory at the slot that
// was current then. A level-1 accept (l1a_i) refers to the crossing whose
// inputs were written L1_LAT clocks before: one clock after the accept both
// memories are read and one clock later the entry {BCID, hits, trigger
// word} is queued in a FIFO of FIFO_DEPTH entries. The Star Switch side
// reads it with a valid/ready handshake (ro_valid_o, ro_ready_i,
// ro_data_o). An accept that finds the FIFO full is lost and sets the
// sticky overflow_o flag (cleared by reset).
//
// The buffer forwarding both the high-pT inputs and the Sector Logic output
// follows the design description; the latency-memory structure, the FIFO,
// the handshake and all sizes are this design's choices
// (L1_LAT = 100 crossings = 2.5 us at 40.08 MHz).
module sl_readout_buffer
  import sl_pkg::*;
#(
  parameter int unsigned HIT_W      = 175,
  parameter int unsigned DEPTH      = 128,
  parameter int unsigned L1_LAT     = 100,
  parameter int unsigned OUT_LAT    = 7,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [HIT_W-1:0]              hits_i,
  input  logic [31:0]                   word_i,
  input  logic [BCID_W-1:0]             bcid_i,
  input  logic                          l1a_i,
  output logic                          ro_valid_o,
  input  logic                          ro_ready_i,
  output logic [BCID_W+HIT_W+32-1:0]    ro_data_o,
  output logic                          overflow_o
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned FW = $clog2(FIFO_DEPTH);
  localparam int unsigned EW = BCID_W + HIT_W + 32;

  initial begin
    assert (L1_LAT > OUT_LAT && L1_LAT < DEPTH && DEPTH == 2**AW && FIFO_DEPTH == 2**FW)
      else $error("sl_readout_buffer: bad parameters");
  end

  logic [BCID_W+HIT_W-1:0] hit_mem  [DEPTH];
  logic [31:0]             word_mem [DEPTH];
  logic [AW-1:0]           wptr;

  always_ff @(posedge clk) begin
    hit_mem[wptr]  <= {bcid_i, hits_i};
    // word_i belongs to the crossing written OUT_LAT clocks ago
    word_mem[wptr - AW'(OUT_LAT)] <= word_i;
    if (!rst_n) wptr <= '0;
    else        wptr <= wptr + 1'b1;
  end

  // read the accepted crossing
  logic                    rd_q;
  logic [BCID_W+HIT_W-1:0] rd_hit_q;
  logic [31:0]             rd_word_q;

  always_ff @(posedge clk) begin
    rd_hit_q  <= hit_mem[wptr - AW'(L1_LAT)];
    rd_word_q <= word_mem[wptr - AW'(L1_LAT)];
    if (!rst_n) rd_q <= 1'b0;
    else        rd_q <= l1a_i;
  end

  // derandomizing FIFO
  logic [EW-1:0] fifo [FIFO_DEPTH];
  logic [FW-1:0] f_wp, f_rp;
  logic [FW:0]   f_cnt;
  logic          push, pop;

  assign pop  = ro_valid_o && ro_ready_i;
  assign push = rd_q && (f_cnt < (FW+1)'(FIFO_DEPTH) || pop);

  always_ff @(posedge clk) begin
    if (push) fifo[f_wp] <= {rd_hit_q, rd_word_q};
    if (!rst_n) begin
      f_wp       <= '0;
      f_rp       <= '0;
      f_cnt      <= '0;
      overflow_o <= 1'b0;
    end else begin
      if (push) f_wp <= f_wp + 1'b1;
      if (pop)  f_rp <= f_rp + 1'b1;
      f_cnt <= f_cnt + (FW+1)'(push) - (FW+1)'(pop);
      if (rd_q && !push) overflow_o <= 1'b1;
    end
  end

  assign ro_valid_o = (f_cnt != '0);
  assign ro_data_o  = fifo[f_rp];

  // handshake rules: the queue never exceeds its depth, and an offered
  // entry stays offered, unchanged, until the Star Switch takes it
  a_depth: assert property (@(posedge clk) disable iff (!rst_n) f_cnt <= (FW+1)'(FIFO_DEPTH));
  a_hold:  assert property (@(posedge clk) disable iff (!rst_n)
                            ro_valid_o && !ro_ready_i |=> ro_valid_o && $stable(ro_data_o));

endmodule
