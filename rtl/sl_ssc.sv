// Sub-Sector Cluster (SSC) R-phi coincidence with pT look-up table.
//
// One SSC covers 2 eta rows x 4 phi columns (8 sub-sectors). It gets at most
// one R word and two phi words (one per phi pair) per bunch crossing, so up
// to two R-phi candidates can form. For each phi input that is present
// together with the R word, the LUT is read at
//   {Pos, phi input, phi', R H/L, R sign, dR, phi H/L, phi sign, dphi}
// and returns {charge, pT level}; pT level 0 means "no track" so the LUT can
// reject combinations. Only one of two simultaneous candidates can be real
// (there is one R input), so the higher-pT one is kept; on a tie phi input 0
// wins. Finally the EI/FI check: when inner_req_i is set for this SSC a
// candidate without an inner-station hit is dropped.
//
// Timing: two pipeline stages. Stage 1 reads the LUT synchronously (both read
// ports) and registers the side information; stage 2 selects, applies the
// EI/FI check and registers out_o. Output = input + 2 clocks.
//
// The LUT is a 2^LUT_AW x 4 memory with two read ports and one write port
// (lut_we_i/lut_waddr_i/lut_wdata_i) used to load it; its contents are not
// reset. Using the LUT per 8-sub-sector cluster, the higher-pT rule and the
// 1+3-bit output follow the design description; the address layout, the
// tie rule, the EI/FI rule and the load port are this design's choices.
module sl_ssc
  import sl_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  ssc_in_t           in_i,
  input  logic              inner_req_i,
  input  logic              lut_we_i,
  input  logic [LUT_AW-1:0] lut_waddr_i,
  input  logic [LUT_DW-1:0] lut_wdata_i,
  output ssc_out_t          out_o
);

  logic [LUT_DW-1:0] lut [2**LUT_AW];

  logic [LUT_AW-1:0] raddr [2];
  logic [LUT_DW-1:0] rdata_q [2];
  logic [1:0]        cand_q;     // candidate k formed (R and phi k present)
  logic [2:0]        sub_q [2];
  logic              inner_q, inner_req_q;

  always_comb begin
    for (int k = 0; k < 2; k++)
      raddr[k] = lut_addr(k[0], in_i.r, in_i.phi[k]);
  end

  always_ff @(posedge clk) begin
    if (lut_we_i) lut[lut_waddr_i] <= lut_wdata_i;
  end

  // stage 1: LUT read
  always_ff @(posedge clk) begin
    for (int k = 0; k < 2; k++) begin
      rdata_q[k] <= lut[raddr[k]];
      sub_q[k]   <= {in_i.r.pos, k[0], in_i.phi[k].phip};
    end
    if (!rst_n) begin
      cand_q      <= '0;
      inner_q     <= 1'b0;
      inner_req_q <= 1'b0;
    end else begin
      cand_q      <= {2{in_i.r_valid}} & in_i.phi_valid;
      inner_q     <= in_i.inner;
      inner_req_q <= inner_req_i;
    end
  end

  // stage 2: pick the higher-pT candidate, EI/FI check
  logic [PT_W-1:0] pt [2];
  ssc_out_t        sel;

  always_comb begin
    for (int k = 0; k < 2; k++)
      pt[k] = cand_q[k] ? rdata_q[k][PT_W-1:0] : '0;
    if (pt[1] > pt[0]) sel = '{pt: pt[1], charge: rdata_q[1][PT_W], sub: sub_q[1]};
    else               sel = '{pt: pt[0], charge: rdata_q[0][PT_W], sub: sub_q[0]};
    // levels above N_PT are not valid pT levels
    if (sel.pt > PT_W'(N_PT)) sel = '0;
    if (inner_req_q && !inner_q) sel = '0;
    if (sel.pt == '0) sel = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_o <= '0;
    else        out_o <= sel;
  end

  // only pT levels 1..N_PT leave the SSC, and "no track" is all zero
  a_level: assert property (@(posedge clk) disable iff (!rst_n)
                            out_o.pt <= PT_W'(N_PT) && (out_o.pt != '0 || out_o == '0));

endmodule
