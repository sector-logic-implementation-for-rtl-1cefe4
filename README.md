# Endcap Muon Sector Logic (ATLAS level-1 trigger) in SystemVerilog

The level-1 muon trigger in the ATLAS endcaps finds muons with Thin Gap
Chambers (TGCs). Earlier boards look for coincidences separately in two
projections: the R-Z plane (the bending plane of the toroid field, giving a
radial deviation dR) and the phi-Z plane (giving a deviation dphi). The
**Sector Logic** is the last stage for one trigger sector. Every 25 ns bunch
crossing it:

1. pairs R and phi hits that fall in the same small region of the sector,
2. turns each (dR, dphi, position) combination into a charge and one of six
   transverse-momentum (pT) levels by a look-up table (LUT), so thresholds
   are set by loading tables rather than by changing logic,
3. keeps the two highest-pT muon candidates of the sector, and
4. sends them as one 32-bit word (RoI, pT, charge, overlap flag, BCID) to
   the muon central trigger processor interface (MUCTPI).

The logic is a fixed pipeline with no dead time. It accepts one crossing per
clock at 40.08 MHz, and every crossing's word comes out **7 clocks** after
its inputs.

## Geometry: sub-sectors, SSCs and RoIs

An endcap trigger sector is 37 rows in eta by 4 columns in phi, which makes
148 **sub-sectors**. A forward sector is 16 x 4 = 64. A high-pT board sends
at most one hit for two neighbouring sub-sectors. So the pT LUT works on a
**Sub-Sector Cluster (SSC)** of 2 eta rows x 4 phi columns. An endcap
sector has 19 SSCs and a forward sector 8.

Inside an SSC:

```
             phi input 0        phi input 1
           phi'=0   phi'=1    phi'=0   phi'=1
 Pos = 0  | sub 0  | sub 1  | sub 2  | sub 3 |   <- R word, Pos = 0
 Pos = 1  | sub 4  | sub 5  | sub 6  | sub 7 |   <- R word, Pos = 1
```

The sub-sector number is `{Pos, phi input, phi'}`. The Region of Interest
(RoI) sent out is `8 * SSC + sub-sector`. Row `2*SSC + Pos` and column
`2*phi input + phi'` then give RoI = 4*row + column. SSC 0 is the lowest-eta
cluster. In a 37-row sector the second row of SSC 18 does not exist. Load
zeros into the `Pos = 1` half of that SSC's LUT, and RoIs stay within
0..147.

Input words per SSC (19 bits), defined in `rtl/sl_pkg.sv`:

| word | bits | fields |
|------|------|--------|
| R    | 7 | `Pos`, `H/L` (high-pT or low-pT result), sign, `|dR|`[3:0] |
| phi  | 6 | `phi'`, `H/L`, sign, `|dphi|`[2:0] |

## Pipeline

| stage | module | work | clocks |
|-------|--------|------|--------|
| 1 | `sl_decoder` | dispatches hit records to each SSC's R / phi0 / phi1 inputs; EI/FI flags | 1 |
| 2-3 | `sl_ssc` (x N_SSC) | LUT read for both phi inputs; keep the higher pT; EI/FI check | 2 |
| 4 | `sl_demux` | routes each SSC candidate to the pre-selector of its pT level | 1 |
| 5 | `sl_preselector` (x 6) | per pT level: the two lowest-eta candidates, with RoI | 1 |
| 6 | `sl_final_selector` | the two highest-pT of the 12 | 1 |
| 7 | `sl_encoder` | 32-bit word with BCID and overlap flags, or a test pattern | 1 |

Inputs sampled at clock edge n give `muctpi_o` after edge n+6. The next
stage downstream samples it at edge n+7. `sl_bcid_counter` numbers the
crossings. The top delays its count by six clocks, so each word carries the
number of the crossing it was built from. `sl_readout_buffer` runs beside
the pipeline.

## The R-phi coincidence and its LUT (`sl_ssc`)

This is where the physics is. An SSC has one R input and two phi inputs.
With all three present there are two R-phi candidates. Only one R hit
exists, so at most one of them is a real muon. The SSC keeps the candidate
with the higher pT and gives the other up.

For each phi input k that is present together with the R word, the LUT is
read at the 14-bit address

```
{ R.Pos, k, phi[k].phi', R.H/L, R.sign, R.|dR|, phi[k].H/L, phi[k].sign, phi[k].|dphi| }
```

It returns `{charge, pT[2:0]}`:

- Level 0 means "no track". A table can therefore reject a combination, for
  example one where the field is too weak to measure pT.
- Level 7 is not a valid level and is treated as 0.
- If both candidates have the same level, phi input 0 wins.

Each SSC has its own 16K x 4-bit memory with two read ports and one write
port. The contents are not reset and must be loaded before use.

The inner stations (EI/FI) suppress fakes and low-momentum background. Each
SSC gets one EI/FI hit flag per crossing. If the configuration bit
`inner_req_i[s]` is set, a candidate of SSC s with no EI/FI hit is dropped.

## Track selection

A priority encoder over all 148 sub-sectors would be slow. Selection is
split in two:

- **De-multiplexer and pre-selectors.** Each pT level has a pre-selector
  with one slot per SSC. It takes the first two valid slots counting up from
  SSC 0, i.e. the two lowest-eta candidates of that level. It adds the RoI
  and the charge. A third candidate of the same level is lost here.
- **Final selector.** It ranks the 12 pre-selected candidates by level
  (6 first). At equal level, the pre-selector's 1st comes before its 2nd.
  It outputs the first two.

## The MUCTPI word (`sl_encoder`)

| bits | field |
|------|-------|
| 7:0 / 15:8 | RoI of 1st / 2nd track |
| 18:16 / 21:19 | pT level of 1st / 2nd track (0 = no track) |
| 22 / 23 | charge of 1st / 2nd track |
| 24 / 25 | overlap flag of 1st / 2nd track |
| 31:26 | BCID[5:0] |

The overlap flag marks RoIs that lie in the barrel/endcap overlap, so the
MUCTPI can avoid counting a muon twice. The `ovl_mask_i` configuration (one
bit per RoI) says which RoIs those are. `test_mode_i` replaces the word with
`test_pattern_i`, for checking the link to the MUCTPI. **This bit layout
belongs to this RTL only.** The real system uses a standard format defined
elsewhere, so remap the fields before connecting a real MUCTPI.

## Readout path (`sl_readout_buffer`)

Every crossing, the input records and the EI/FI flags are written into a
circular latency memory (128 deep), together with the BCID. The crossing's
trigger word arrives 7 clocks later and goes into the same slot of a second
memory.

A level-1 accept on `l1a_i` refers to the crossing 100 clocks back
(2.5 us). Two clocks after the accept, that crossing's
`{BCID, records, word}` is in an 8-entry FIFO. The Star Switch reads the
FIFO with `ro_valid_o` / `ro_ready_i`. An accept that finds the FIFO full is
lost and sets the sticky flag `ro_overflow_o`.

## Top level and configuration (`sector_logic_top`)

| parameter | default | meaning |
|-----------|---------|---------|
| `N_SSC` | 19 | SSCs per sector (19 endcap, 8 forward) |
| `N_RHIT`, `N_PHIT` | 6, 6 | R and phi hit records per crossing |
| `N_ROI` | 148 (8*N_SSC otherwise) | RoIs covered by the overlap mask |

Inputs arrive as de-serialized hit records:

- `r_hit_t`: valid, SSC, R word.
- `phi_hit_t`: valid, SSC, phi input, phi word.

If two records target the same SSC input, the lower-numbered record is used.
Records addressed to an SSC that does not exist are ignored.

Configuration comes in on plain ports:

- LUT writes: `lut_we_i` plus either `lut_bcast_i` (all SSCs) or
  `lut_ssc_i` (one SSC), with `lut_waddr_i` and `lut_wdata_i`.
- `inner_req_i`, `ovl_mask_i`, `test_mode_i` and `test_pattern_i`.

Reset is synchronous and active low. It clears all valid flags and the
pipeline but not the LUTs.

## What follows the original design, and what is this RTL's own

From the original design:

- the block structure and one pipeline stage per block, with 7 clocks in
  total;
- 19 or 8 SSCs of 2 x 4 sub-sectors;
- 19 input bits per SSC, in the field order shown above;
- the LUT-based charge and six pT levels, and the higher-pT rule inside an
  SSC;
- six pre-selectors that keep the two lowest-eta candidates, and a final
  selector that keeps the two highest-pT;
- BCID and overlap flag in a 32-bit word, and the test-pattern mode;
- a readout buffer that forwards both the inputs and the result.

Choices made here, where the original gives no detail:

- the hit-record link format with explicit SSC addresses, and six records
  of each kind;
- the widths of the deviation fields (4 bits for dR, 3 for dphi, each with
  a sign);
- the LUT address layout, the tie rule, and the meaning of level 7;
- the EI/FI rule: one flag per SSC and a per-SSC "require" bit;
- the RoI numbering and the SSC-index-as-eta order;
- the 32-bit word layout, and the overlap mask as the source of the flags;
- the BCID counter (12 bits, 3564 crossings per orbit, cleared by `bcr_i`);
- everything about the readout buffer: depths, the 100-crossing latency,
  the handshake and the overflow policy;
- the configuration ports.

Not included:

- the optical receivers and G-Link de-serializers (the RTL starts at their
  parallel output);
- the VME / JTAG / EEPROM configuration logic;
- the LVDS drivers;
- the low-pT and high-pT coincidence boards that feed the Sector Logic.

## Simulation

Concurrent assertions check a few invariants while any testbench runs (build
with `--assert`):

- `sl_ssc` emits only levels 1..6, or all zeros;
- the final selector's 2nd track never outranks its 1st;
- the readout FIFO never exceeds its depth, and an offered entry stays
  unchanged until it is taken.

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each has a watchdog. Example with Verilator
5:

```
verilator --binary --timing --assert -Irtl rtl/sl_pkg.sv rtl/sl_*.sv \
    rtl/sector_logic_top.sv tb/tb_sector_logic_top.sv \
    --top-module tb_sector_logic_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_sl_decoder` | dispatch, conflict rule, ignored SSC numbers |
| `tb_sl_ssc` | full LUT load; LUT address, higher-pT pick, EI/FI veto, 2-clock latency |
| `tb_sl_demux`, `tb_sl_preselector`, `tb_sl_final_selector` | routing and selection against reference sorts |
| `tb_sl_encoder` | word layout, overlap flags, test mode |
| `tb_sl_readout_buffer` | accepted crossings read out in order; overflow (small sizes) |
| `tb_sector_logic_top` | whole endcap sector at default sizes, see below |
| `tb_forward_prototype` | forward sector, see below |

`tb_sector_logic_top` works in three steps:

1. It loads 19 x 16K LUT entries by broadcast, then clears half of SSC 18's
   LUT with per-SSC writes.
2. It sends 4000 random crossings. It checks every word, exactly 7 clocks
   after its inputs, against a reference model of the whole chain.
3. It checks the readout entries, then stalls the Star Switch until the
   FIFO overflows.

It counts each mechanism and fails if one never happened:

- two candidates in one SSC, and EI/FI vetoes;
- candidates lost in a pre-selector, and tracks lost in the final selector;
- overlap flags and test-pattern words;
- the bunch-counter reset and the BCID wrap;
- decoder conflicts, readout entries and readout overflow.

`tb_forward_prototype` repeats the kind of test used on the hardware
prototype: a forward sector (`N_SSC = 8`), a table in which pT depends only
on |dR|, and 20,000 events with up to six muons each.

Timing on a real FPGA (40 MHz, and the margin measured above it) cannot be
judged from these simulations. Sizing the LUT for a given device is also left
open: one SSC's LUT is 64 Kbit in this layout.
