// Decoder: first pipeline stage of the Sector Logic.
//
// Takes the de-serialized high-pT coincidence results of one bunch crossing,
// given as N_RHIT R hit records and N_PHIT phi hit records, plus one EI/FI
// (inner station) flag per SSC, and dispatches them to the inputs of the
// N_SSC Sub-Sector Clusters: one R word and two phi words per SSC. Each
// record carries its destination SSC (and, for phi, which of the SSC's two
// phi inputs it feeds). If several records aim at the same SSC input the one
// with the lowest record index is taken; records for an SSC index >= N_SSC
// are ignored. The dispatch is a combinational scan registered once, so the
// SSC inputs appear one clock after the records.
//
// The dispatching role and the single pipeline stage follow the design's
// block diagram; the record format and the conflict rule are this design's
// choices. Reset (synchronous, active low) clears all valid flags.
module sl_decoder
  import sl_pkg::*;
#(
  parameter int unsigned N_SSC  = 19,
  parameter int unsigned N_RHIT = 6,
  parameter int unsigned N_PHIT = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  r_hit_t   [N_RHIT-1:0] r_hits_i,
  input  phi_hit_t [N_PHIT-1:0] phi_hits_i,
  input  logic     [N_SSC-1:0]  inner_hit_i,
  output ssc_in_t  [N_SSC-1:0]  ssc_o
);

  ssc_in_t [N_SSC-1:0] nxt;

  always_comb begin
    for (int s = 0; s < N_SSC; s++) begin
      nxt[s]       = '0;
      nxt[s].inner = inner_hit_i[s];
      // scan from the highest index down so the lowest index wins
      for (int h = N_RHIT - 1; h >= 0; h--) begin
        if (r_hits_i[h].valid && r_hits_i[h].ssc == SSC_IDX_W'(s)) begin
          nxt[s].r_valid = 1'b1;
          nxt[s].r       = r_hits_i[h].w;
        end
      end
      for (int h = N_PHIT - 1; h >= 0; h--) begin
        if (phi_hits_i[h].valid && phi_hits_i[h].ssc == SSC_IDX_W'(s)) begin
          nxt[s].phi_valid[phi_hits_i[h].sel] = 1'b1;
          nxt[s].phi[phi_hits_i[h].sel]       = phi_hits_i[h].w;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ssc_o <= '0;
    else        ssc_o <= nxt;
  end

endmodule
