# Texture-based CU/PU pre-selection for a hardware HEVC intra encoder

An HEVC intra encoder that tries every coding-unit (CU) and prediction-unit (PU)
size with full rate-distortion optimisation (RDO) needs far more RDO hardware than
a real-time 1080p encoder can afford. This design removes most of that search
before RDO starts. It looks only at the *source* pixels of each 64x64 coding tree
unit (CTU) and keeps **one** candidate per engine:

* 64x64 CUs are never tried;
* for each 32x32 block, **either** the 32x32 CU **or** the four 16x16 CUs are tried;
* every 8x8 CU is tried, but with **either** one 8x8 PU **or** four 4x4 PUs.

Two RDO engines can then work side by side on a 32x32 block: a large-block engine
for the one 32x32/16x16 candidate and a small-block engine for the 8x8 CUs with their
chosen PU size. They share one reconfigurable intra predictor. The choices
come from a cheap model that estimates the RD cost of a block from its edges. The
model is linear, and its coefficients are learned off line for each block size and
texture class.

The RTL here contains the whole pre-selection stage (the *pre-mode filter*), the
shared predictor with its arbiter, the SATD rough mode decision of 4x4 PUs that sits
behind the predictor in the small-block engine, and the two-stage top that connects
them. The rest of the two RDO engines and the reconstruction datapath are not
included: their interfaces are brought out as ports of the top (see
[What is not here](#what-is-not-here)).

## Block map

```
intra_encoder_top                 two-CTU pipeline
├── stage 1: CTU buffer (64x64) + sequencer over the four 32x32 CBs
│   └── pre_mode_filter           one 32x32 CB -> cu_split, pu_split[16]
│       ├── edge_unit             Sobel gradient, strength, direction (33 cells)
│       ├── hist_classifier x4    class of each 4x4 / 8x8 / 16x16 / 32x32 block
│       ├── qs2_lut               Qs^2 from QP
│       ├── model_coef_mem x4     model coefficients a, b_k per block size
│       ├── rd_cost_est x4        per-pixel R + D estimate per block size
│       └── split_decision x2     whole vs. four quarters (32/16 CU, 8/4 PU)
├── directive register            stage 1 -> stage 2 hand-off
└── stage 2
    ├── pred_arbiter              shares the predictor between the two RDO engines
    ├── intra_predictor           L modes x N samples of one row per cycle, L*N = 128
    └── satd_rmd                  4x4 Hadamard SATD of 32 modes, best of 35 per 4x4 PU
```

`pmf_pkg` holds the shared constants, the class type and the rate-weight table.

## The cost model

This is the core of the design. Everything below is computed for every pixel of a
32x32 coding block (CB), at each of the four block sizes N = 4, 8, 16, 32.

**1. Edges.** A 3x3 Sobel operator gives the horizontal and vertical gradients
`eh`, `ev`. The edge strength is `ES = eh² + ev²`. The edge runs perpendicular to the
gradient. Its direction is rounded to the nearest of the 33 HEVC angular modes
(2..34). "Nearest" is measured in the mode's displacement per row or column
(32, 26, 21, ... -32), the quantity HEVC itself uses. Pixels with `ES < 16` have no
direction.

**2. Block classes.** Each N x N block collects a 33-cell histogram of its pixels'
directions, plus its largest edge strength. Three properties together pick one of
2 x 4 x 7 = 56 classes:

| property | rule |
|---|---|
| direction category | mode of the largest cell: D0 = 7..13 (horizontal-like), D1 = 23..29 (vertical-like), D2 = 14..22 (-45°-like), D3 = the rest |
| homogeneity | σ = main cell + two cells on each side, Σ = all cells; homogeneous if σ/Σ > 1 - 0.1·log2 N |
| strength group M0..M6 | the number of thresholds 256, 1024, 4096, 16384, 65536, 262144 that the largest ES reaches |

`model = homog*28 + dir*7 + strength`.

**3. Prediction-error estimate.** For pixel k (raster position inside its N x N
block) of a block of class c:

```
PE_k = a(N,c) * Qs²  +  b_k(N,c) * ES_k
Qs²  = 4^(QP div 6) * Q[QP mod 6]²,   Q = {0.625, 0.7031, 0.7969, 0.8906, 1, 1.125}
```

The first term models the quantization noise that reaches the prediction through
reconstructed neighbours. The second term models how badly an edge is predicted,
which gets worse with distance from the block's top and left borders.

**4. Rate and distortion.**

```
R_k = 7 * w_r * PE_k / 64           w_r from the table below
D_k = PE_k  if PE_k > Qs²/16, else 0
RD_N = sum over the block of (R_k + D_k)
```

Rate weight `w_r` by block size and by the band of PE/Qs²:

| PE/Qs² | N=4 | N=8 | N=16 | N=32 |
|---|---|---|---|---|
| [0, 1/8) | 0 | 0 | 0 | 0 |
| [1/8, 1/4) | 1/8 | 1/2 | 1/8 | 0 |
| [1/4, 1/2) | 1/4 | 1 | 1/4 | 1/2 |
| [1/2, 1) | 1/2 | 4 | 1/2 | 2 |
| [1, 2) | 1 \* | 16 | 1 | 8 |
| [2, 4) | 1 | 32 \* | 2 | 32 |
| [4, 8) | 1 | 32 | 4 | 64 |
| [8, ∞) | 1 \* | 32 \* | 16 | 128 |

Cells marked \* are this design's values; they repeat the nearest neighbour in their
column. The table is stored in eighths (`pmf_pkg::omega_r8`).

**5. Decision.** A block of size N is split when

```
RD_N  >  RD_{N/2}(0) + RD_{N/2}(1) + RD_{N/2}(2) + RD_{N/2}(3) + 3 * 7/64 * (4 + 1)
```

The last term is the side information of three more blocks: 4 mode bits and one
coded-block flag each. On a tie the block stays whole. The filter applies this rule
twice: to the 32x32 block against its four 16x16 blocks (`cu_split`), and to each
8x8 CU against its four 4x4 blocks (`pu_split`).

**Fixed point** (this design's choice). Qs², PE and all costs are unsigned with 8
fraction bits. `a` and `b_k` are unsigned 16-bit values with 12 fraction bits.
Products are truncated back to 8 fraction bits, and costs are summed in 64 bits.
Band edges are compared exactly: `PE*8 >= Qs²`, not `PE >= Qs²>>3`.

## Model coefficients

The coefficients come from an off-line weighted least-squares fit over training
video. No trained values come with this RTL, so the memories must be loaded before
encoding. Write them through the `coef_*` port while the filter is idle (an
assertion checks this).

| `coef_level` | N | b table depth (`coef_sel_a = 0`) | a table (`coef_sel_a = 1`) |
|---|---|---|---|
| 0 | 4 | 56·16 = 896 | 56 |
| 1 | 8 | 56·64 = 3584 | 56 |
| 2 | 16 | 56·256 = 14336 | 56 |
| 3 | 32 | 56·1024 = 57344 | 56 |

A b address is `model * N² + row * N + column`, and an a address is `model`. In
total the memories hold 76,384 16-bit words, about 1.2 Mbit. The testbenches load
synthetic coefficients (`pmf_ref_pkg::ref_coef_a/b`). These exercise every path, but
they are not a trained model, so the decisions they produce mean nothing for
compression.

## Schedule of the pre-mode filter

`pre_mode_filter` handles one 32x32 CB. It uses one pixel per cycle and visits the
pixels in z-order (Morton order). In that order, every 4x4, 8x8 and 16x16 block
ends on a fixed pixel index (`index mod 16 = 15`, etc.). The per-size accumulators
can therefore close and hand on their sums without any buffering.

1. **Load**: 32 cycles, one CB row per cycle.
2. **Analysis pass**: 1024 cycles. The histogram of the current 4x4 block is
   updated every cycle. When a block ends, it is classified and its histogram is
   added into the enclosing 8x8 block, and so on upwards. The classes of all 85
   blocks (64 + 16 + 4 + 1) are stored.
3. **Estimation pass**: 1024 + 1 cycles. The edge strength is recomputed. Each
   size's memory is read at `{model of the enclosing block, position}`. The read is
   synchronous, so costs are added one cycle later. `split_decision` is evaluated
   as each 8x8 block and the 32x32 block ends.

Result: `out_valid` rises 2049 cycles after the last row, and the result holds
until `out_ready`. At CTU level the top feeds the four CBs one after another, which
gives 64 + 4 x 2082 + 1 = 8393 cycles per CTU.

Border pixels use a 3x3 window clamped to the CB, so no pixel outside the CB is
read.

### Throughput

At 357 MHz, real-time 1080p at 44 frames/s allows 357e6 / (44 x 510 CTUs) = 15,909
cycles per CTU. Stage 1 needs 8393, so it runs 1080p at about 83 frames/s. The
other test-sequence formats follow from their CTU counts: 2560x1600 needs 1000 CTUs
(42.5 frames/s), 1280x720 needs 240, 832x480 needs 104 and 416x240 needs 28. The
frame size has no effect on the hardware, because frames are streamed CTU by CTU.

## Stage 2: the shared predictor

`intra_predictor` produces, in each cycle, one row of N samples for L consecutive
modes, with L·N = 128. That is 32 modes of a 4x4 block, 16 of an 8x8, 8 of a 16x16
or 4 of a 32x32. Slot `s = lane*N + x` of `pred` holds mode `mode_base + lane`,
column `x`. Lanes past mode 34 are flagged off in `lane_valid`. The prediction is
standard HEVC luma intra prediction:

* planar, DC and the 33 angular modes;
* inverse-angle projection for negative angles;
* [1 2 1] reference smoothing by the size/mode rule;
* the DC, horizontal and vertical edge filters for N < 32.

Strong (bilinear) smoothing of 32x32 references is not implemented. Results appear
one cycle after the request, and a new request can be taken every cycle.

`pred_arbiter` lets the two RDO engines take turns on the predictor. When both
request in the same cycle, the grant alternates. A lone request is granted
immediately. The granted request is tagged (0 = large-block engine, 1 = small-block
engine), so the returning rows can be steered back to the right engine.

## Stage 2: rough mode decision of 4x4 PUs

Before an RDO engine runs its expensive transform, quantisation and rate steps, it
ranks the 35 modes by a cheap cost and keeps only the best. `satd_rmd` does this
for the small-block engine's 4x4 PUs. It watches the predictor's rows that go back
to the small engine at size 4x4. Each such row carries 32 modes, so a PU takes two
passes of four rows: modes 0..31 (`mode_base` = 0), then modes 32..34.

* Each row is subtracted from the PU's source row. The engine supplies that source
  row on `rmd_src` together with its request, and the top keeps it for the
  predictor's answer.
* Rows 0..2 of the 32 residual blocks are stored, indexed by the row number, so rows
  may come in any order as long as row 3 comes last.
* On row 3, all 32 residual blocks go through a 4x4 Hadamard transform (two passes
  of butterflies). SATD = (Σ|coefficient| + 1) >> 1 for each mode.
* The lowest SATD of the pass is compared with the best of the PU's earlier passes.
  A pass with `mode_base` = 0 starts a new PU. The pass that reaches mode 34 reports
  the PU's best mode. Ties keep the lower mode number.

The results come out one cycle after the predictor's row 3, which is two cycles
after the request. The cost has no mode-bit term, and only one candidate is kept. The
per-mode SATDs are output as well, so that a caller can keep more candidates. Larger
blocks are not covered.

## Top-level interface (`intra_encoder_top`)

| port group | meaning |
|---|---|
| `ctu_row_valid/ready`, `ctu_row[64]`, `qp` | 64 source rows of a CTU; `qp` is sampled with the first row |
| `coef_we/level/sel_a/addr/data` | model coefficient write port |
| `dir_valid/ready`, `dir_cu_split[4]`, `dir_pu_split[4][16]`, `dir_qp` | per-CTU directive to the RDO stage; CB and 8x8 CU indices in z-order; 1 means "split" |
| `pred_req/gnt[2]`, `pred_log2n/mode_base/row`, `pred_ref_*` | prediction requests of the two RDO engines |
| `pred_out_valid/tag`, `pred_out[128]`, `pred_lane_valid` | prediction rows |
| `rmd_src[4]` | source row of the small engine's 4x4 PU, given with its request |
| `rmd_satd_valid`, `rmd_satd[32]`, `rmd_best_valid/mode/satd` | SATD of each mode of a 4x4 pass; best rough mode of the PU |

The stage boundary is a directive register. Stage 1 goes on with the next CTU
while stage 2 still holds the previous directive. It stalls only when it has a new
directive ready before the old one was taken.

## What is not here

* **The two RDO engines** (32x32/16x16 CU and 8x8/4x4 PU), apart from the 4x4
  rough mode decision. Their steps are known: prediction, Hadamard/SATD rough mode
  decision, transform, quantization and a fast rate model. The rate model, however,
  is a classifier plus linear regression with unpublished features and
  coefficients, so the engines cannot be written faithfully. The rough decision of
  8x8 and larger blocks, and the number of candidates it keeps, are also open.
* **The reconstruction datapath** (the unified variable-size DCT/IDCT). Its
  reconstructed samples would drive the predictor's reference ports.
* **Forwarding of source pixels to stage 2.** The CTU buffer is single-buffered and
  is not exported.
* **Trained coefficients** (see above).

## Design choices the method leaves open

The method fixes the following: the classes, the linear model, the cost formulas,
Qs², the split rule, the 64x64 exclusion, the one-candidate-per-engine structure and
the predictor throughput.

This implementation chose the rest:

* the Sobel operator and the nearest-angle direction rule;
* the edge-vote threshold of 16;
* the strength thresholds of M0..M6;
* treating an empty histogram as non-homogeneous;
* clipping the homogeneity neighbourhood at modes 2 and 34, with ties of the main
  cell going to the lower mode;
* the four rate-weight cells marked \* in the table;
* the fixed-point formats;
* the z-order two-pass schedule;
* clamping at CB borders;
* the valid/ready handshakes;
* round-robin arbitration;
* the synchronous model memories.

The given rate weights for N = 8 are larger than those for N = 16. This
contradicts the method's remark that weights of the smaller size are always
smaller. The table values were kept.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_qs2_lut` | all QPs 0..51 against real-valued Qs² |
| `tb_edge_unit` | random and ramp windows against integer Sobel and real-valued slope rounding; all 33 direction cells hit |
| `tb_hist_classifier` | random histograms at all four sizes against the written class rules; every category, both homogeneity outcomes, all strength groups |
| `tb_model_coef_mem` | full write and read-back, read latency, output hold |
| `tb_rd_cost_est` | PE and R + D at all sizes against real arithmetic with the rate table; every band hit |
| `tb_split_decision` | random and tie cases |
| `tb_pre_mode_filter` | 14 CBs of varied texture and QP. Bit-exact 32x32 costs and all 17 decisions against a raster-order reference model (`tb/pmf_ref_pkg.sv`). Latency exactly 2049 cycles. Both outcomes of each decision |
| `tb_intra_predictor` | every sample, mode group, row and size against HEVC prediction written the way the standard states it |
| `tb_pred_arbiter` | lone and contested grants, alternation, field forwarding |
| `tb_satd_rmd` | 400 random PUs, some close to the source and one worst case: every SATD against an explicit H·D·Hᵀ, the best mode of 35, rows out of order, valid timing |
| `tb_intra_encoder_top` | full-size end-to-end run of four CTUs. Directives checked against the reference model. CTU latency 8329 cycles. A forced directive stall. Both engines using the predictor concurrently. Rough decisions of the small engine's 4x4 requests checked |

The reference model reproduces the same fixed-point rounding as the RTL, so the
CU and PU decisions are compared exactly. Two limits apply:

* The model and the RTL rest on the same reading of the method. A misreading shared
  by both would not be caught.
* The compression effect of the decisions is not measured, because no trained
  coefficients exist.

### Running a test with Verilator

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/pmf_pkg.sv tb/pmf_ref_pkg.sv tb/tb_pre_mode_filter.sv \
    --top-module tb_pre_mode_filter -Mdir obj_pmf
./obj_pmf/Vtb_pre_mode_filter
```

Replace the testbench name to run any of the others. `tb_intra_encoder_top` runs
the full design at its default sizes. It takes about two minutes to build and a few
seconds to run.
