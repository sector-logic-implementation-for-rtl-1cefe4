// Shared types and constants of the endcap muon Sector Logic.
//
// The Sector Logic combines the R-Z and phi-Z high-pT coincidence results of
// one trigger sector into three-dimensional muon candidates with six pT
// levels and forwards the two highest-pT candidates to the muon central
// trigger processor interface (MUCTPI). The sector is tiled into Sub-Sector
// Clusters (SSCs) of 2 eta rows x 4 phi columns = 8 sub-sectors.
//
// Word formats:
//   R word   (7 bits) = {Pos, H/L, sign, dR[3:0]}      Pos selects the eta row
//   phi word (6 bits) = {phi', H/L, sign, dphi[2:0]}  phi' selects the column
//                                                      inside a phi pair
// One R and two phi words per SSC make 19 input bits per SSC. The field order
// and the 19-bit total follow the SSC description; the split of the deviation
// widths (4 + sign for dR, 3 + sign for dphi) is this design's reading.
// A sub-sector number inside an SSC is {Pos, phi input, phi'}; the RoI
// (sub-sector number in the sector) is 8 * SSC + sub-sector, so with 19 SSCs
// the 148 sub-sectors of an endcap sector are RoI 0..147.
// The hit-record formats (which carry an explicit SSC address) are this
// design's own choice of link format.
package sl_pkg;

  localparam int unsigned SSC_IDX_W = 5;   // enough for 19 SSCs
  localparam int unsigned ROI_W     = 8;   // 8 * SSC + sub-sector
  localparam int unsigned PT_W      = 3;   // 0 = no track, 1..6 = pT level
  localparam int unsigned N_PT      = 6;   // six pT levels
  localparam int unsigned BCID_W    = 12;
  localparam int unsigned BC_PER_ORBIT = 3564;
  localparam int unsigned LUT_AW    = 14;  // {sub-sector, R word w/o Pos, phi word w/o phi'}
  localparam int unsigned LUT_DW    = 4;   // {charge, pT}

  typedef struct packed {
    logic       pos;    // eta row inside the SSC
    logic       hl;     // high-pT (1) or low-pT (0) result
    logic       sign;   // sign of dR
    logic [3:0] dr;     // |dR|
  } r_word_t;

  typedef struct packed {
    logic       phip;   // column inside the phi pair
    logic       hl;
    logic       sign;
    logic [2:0] dphi;
  } phi_word_t;

  // R hit record as delivered by the de-serializer
  typedef struct packed {
    logic                 valid;
    logic [SSC_IDX_W-1:0] ssc;
    r_word_t              w;
  } r_hit_t;

  // phi hit record: sel chooses the SSC's phi input (phi pair 0 or 1)
  typedef struct packed {
    logic                 valid;
    logic [SSC_IDX_W-1:0] ssc;
    logic                 sel;
    phi_word_t            w;
  } phi_hit_t;

  // decoded inputs of one SSC
  typedef struct packed {
    logic            r_valid;
    r_word_t         r;
    logic [1:0]      phi_valid;
    phi_word_t [1:0] phi;
    logic            inner;     // EI/FI hit seen for this SSC
  } ssc_in_t;

  // output of one SSC (pt == 0: no candidate)
  typedef struct packed {
    logic [PT_W-1:0] pt;
    logic            charge;
    logic [2:0]      sub;
  } ssc_out_t;

  // one SSC's candidate routed to the pre-selector of its pT level
  typedef struct packed {
    logic       valid;
    logic       charge;
    logic [2:0] sub;
  } pre_in_t;

  // pre-selector result (pT level is implied by the pre-selector)
  typedef struct packed {
    logic             valid;
    logic [ROI_W-1:0] roi;
    logic             charge;
  } pre_out_t;

  // final track
  typedef struct packed {
    logic             valid;
    logic [PT_W-1:0]  pt;
    logic [ROI_W-1:0] roi;
    logic             charge;
  } track_t;

  localparam int unsigned R_HIT_W   = $bits(r_hit_t);
  localparam int unsigned PHI_HIT_W = $bits(phi_hit_t);

  // LUT address of one candidate: sub-sector, then R word and phi word
  // without their position bits.
  function automatic logic [LUT_AW-1:0] lut_addr(input logic sel, input r_word_t r,
                                                 input phi_word_t p);
    return {r.pos, sel, p.phip, r.hl, r.sign, r.dr, p.hl, p.sign, p.dphi};
  endfunction

endpackage
