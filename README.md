# Motion estimation for the enhancement layer of a scalable H.264 encoder

This is the motion-estimation (ME) engine of an H.264/AVC scalable (SVC)
encoder. It works on the luma of one 16x16 macroblock (MB) of an enhancement
layer at a time. For each MB it finds the cheapest combination of three
things:

* **a prediction mode:** ordinary inter prediction, or one of the
  inter-layer modes that reuse information from the base layer;
* **a partitioning:** 16x16, 16x8, 8x16, or "submode" (8x8 pieces, each
  split further into 8x4, 4x8 or 4x4);
* **quarter-pel motion vectors**, one per partition.

"Cheapest" means the lowest rate-distortion cost:
distortion + lambda × (bits of the vector differences).

The hard part is doing this cheaply. Inter-layer prediction multiplies the
modes to search, so the design rests on four ideas:

1. **Parallel multi-resolution search.** Three integer searches run at the
   same time, each over its own window:
   * level 0: full resolution, small range;
   * level 1: 2:1 subsampled in each direction, medium range;
   * level 2: 4:1 subsampled in each direction, ±128 pixels.

   The small level-0 window is centred on the motion-vector predictor. The
   two coarse levels catch large motion.
2. **One reference fetch for all level-0 modes.** The inter modes and the
   inter-layer modes read the same reference pixels. The engine computes
   two SADs (sums of absolute differences) side by side:
   * against the current block;
   * against the current block minus the up-sampled base-layer residual.

   Each of the four level-0 modes then only needs its own rate term.
3. **Mode filtering.** A pre-selection step compares the inter-layer modes
   with their plain counterparts and clears the losers. After that, only
   three candidates go on to fractional refinement. Two always come from
   level 0; the third is the best of level 0's next, level 1 and level 2.
4. **Single-pass fractional search (SPFME).** Each candidate is refined in
   one pass over ten quarter-pel positions:
   * the integer position and its four diagonal quarter-pel neighbours;
   * the position pointed to by the predictor's fractional part, and its
     four neighbours.

   There is no half-pel-then-quarter-pel iteration.

The top level has two identical engines. Two MBs, from different frames,
are processed at once; this is how the target throughput is reached
(CIF + 480p + 1080p at 60 frames/s at 135 MHz).

## Prediction modes

| mode | reference | current block | rate predictor | searched |
|------|-----------|---------------|----------------|----------|
| INTER | level-0 window | MB | MVP_INTER | yes, [-8,7] around MVP_INTER |
| ILR (inter-layer residual) | level-0 window | MB − up-sampled base residual | MVP_INTER | yes, same positions |
| ILM (inter-layer motion) | level-0 window | MB | 16 base-layer vectors MVP_ILM (one per 4x4) | yes, same positions |
| ILMR | level-0 window | MB − residual | MVP_ILM | yes, same positions |
| IBL | level-0 window | MB | none | no: uses the base-layer vectors as they are |
| IBLR | level-0 window | MB − residual | none | no |
| level 1 | level-1 window (2:1 subsampled) | subsampled MB | MVP_INTER | [-32,30], step 2 |
| level 2 | level-2 window (4:1 subsampled) | subsampled MB | MVP_INTER | [-128,124], step 4 |

ILM, ILMR, IBL and IBLR are only allowed when every base-layer vector
falls inside the level-0 window: its integer part must lie in [-8,7]
around the integer part of MVP_INTER. Their reference data are then already
on chip. Otherwise these modes get the saturated cost (`COST_MAX`) and are
reported as not valid (`ilm_ok`, `ibl_ok`).

## Processing of one macroblock

```
start ─► IME (147 cycles) ─► IBL/IBLR (74, or 2 if out of range) ─► mode filter (2)
      ─► [mode-2 window load, if a level-1/2 candidate survived] ─► FME (74 per candidate) ─► done
```

* **IME.** The three levels start together. Each reads its SRAM with the
  A/B row-package schedule described below. Its SADs feed tree modules that
  keep, for every block shape, the best cost and vector:
  * level 0: four trees (INTER, ILR, ILM, ILMR), each giving 16x16, 16x8,
    8x16 and submode costs;
  * level 1: one tree giving the best partitioning;
  * level 2: 16x16 only.
* **IBL.** The base-layer vectors are applied directly. Each 4x4 block is
  interpolated to quarter pel from the level-0 SRAM. Its SATD is taken with
  and without the residual, and the two sums give the IBL and IBLR costs.
* **Mode filter** (details below). It outputs three candidates, their skip
  flags, and the mode flags it cleared (`elim`).
* **Mode-2 window.** The FME of a level-1/2 candidate needs a full-resolution
  window around that candidate's vector. The engine raises `m2_req` with
  `m2_center`. The surrounding system writes 37 rows into the engine's
  mode-2 SRAM and pulses `m2_ready`. Level-0 candidates never need this.
* **FME.** Each non-skipped candidate is refined (SPFME). IBL/IBLR
  candidates keep their cost from the IBL step. The cheapest result is
  output in `best`: mode, partition, sub-partitions, sixteen quarter-pel
  vectors and their predictors, and the cost.

In `tb_me_top` the longest MB took 447 cycles, not counting the mode-2
window load. Two engines have a budget of
135 MHz / (9906 MB / 2 × 60 frames/s) = 454 cycles per MB.

## The integer search: A/B row packages

This is the least obvious part, in `level_me.sv`. Each level is one instance
of it with different parameters:

| level | block `BW` | positions per cycle `NPOS` | `V` (rows per group) | `G` (column groups) | read cycles |
|-------|-----------|------------|-----|-----|-----|
| 0 | 16x16 | 2  | 16 | 8 | 143 |
| 1 | 8x8 (subsampled) | 8 | 32 | 4 | 135 |
| 2 | 4x4 (subsampled) | 32 | 64 | 2 | 131 |

The search window has `V + BW − 1` rows. The positions are covered column
group by column group; one group is `NPOS` horizontally adjacent positions.
A reference row package holds `NPOS + BW − 1` pixels, which is enough for
one row of all `NPOS` positions.

For one group, current row k must meet reference rows k … k+V−1. The window
rows are split into two memory parts:
* part A: rows 0 … V−1;
* part B: rows V … V+BW−2.

At cycle t, let q = t mod V and j = t div V. Part A delivers row q for
group j, and part B delivers row q+V for group j−1. Current row k uses:
* the A package when k ≤ q, and is then working on position row q−k of
  group j;
* the B package when k > q, finishing position row q+V−k of group j−1.

So every current row is busy every cycle, and a new group starts without a
bubble. The whole search takes G·V + BW − 1 read cycles. The last position
row of the last group is finished by the extra BW−1 cycles.

**Inside a position.** The MB is split into 4x4 blocks. Each block has a
`sad_primitive`, which takes one 4-pixel row per cycle and adds it to a
partial sum. The partial sum is passed down to the next row's primitive
one cycle later. The primitive of a block's bottom row therefore emits that
block's complete SAD. Block rows finish 4 cycles apart, so each block row's
results are delayed by 4 × (rows below it), and all sixteen 4x4 SADs of a
position come out in the same cycle. `level_me` labels them with the group
and the position row.

At level 0 every primitive also accumulates the SAD of the
residual-compensated block (`cur − upbr`) against the same reference pixels.
This is how ILR and ILMR cost no extra memory traffic.

The level-0 window is 37x37:
* 16 positions in [-8,7] + 16 pixels of block = 31 rows and columns;
* plus a 3-pixel margin on every side for the 6-tap interpolation, so the
  same memory serves FME.

Level 1 and level 2 windows have no margin.

## Level-0 tree: costs of all block shapes

`l0_tree.sv` receives sixteen 4x4 SADs for each of two positions per cycle.
From them it forms the SADs of all 41 blocks of an MB:
* 1 of 16x16, 2 of 16x8, 2 of 8x16;
* 4 of 8x8, 8 of 8x4, 8 of 4x8, 16 of 4x4.

To each it adds lambda·R. R is the signed Exp-Golomb length of the
quarter-pel vector difference to the block's predictor: MVP_INTER, or the
MVP_ILM of the block's top-left 4x4. The tree keeps the best cost and vector
per block. After the search it reports four partition costs:
* 16x16;
* 16x8 (sum of two);
* 8x16 (sum of two);
* submode: per 8x8, the cheapest of 8x8, 2×8x4, 2×4x8 and 4×4x4, summed.

Four instances run in parallel (INTER, ILR, ILM, ILMR).

Level 1 (`l1_tree.sv`) and level 2 (`l2_compare.sv`) do the same on the
subsampled block. Their SADs are multiplied by the subsampling ratio (4 and
16) so that their costs compare with level-0 costs. Each reports a single
candidate: the best partitioning for level 1, 16x16 for level 2.

## Mode filtering

Pre-selection (`mode_filter.sv`) works on two pairs of modes:
* Type 1 compares INTER with ILM;
* Type 2 compares ILR with ILMR.

For each pair and each partition kind j:

* The margin ω is chosen by partition kind:
  * 16x16, 16x8 and 8x16: ω = ⌊(|a16x16 − b16x16| + |a16x8 − b16x8| + |a8x16 − b8x16|) / 3⌋;
  * submode: ω = 0.
* If cost_a[j] + ω ≤ cost_b[j], mode b is cleared for partition j.
  Otherwise, if cost_b[j] + ω ≤ cost_a[j], mode a is cleared.
* A disabled mode (cost `COST_MAX`) takes no part.

The remaining candidates are the level-0 ones plus IBL and IBLR, at most 18.
The three cheapest are taken; ties go to the earlier mode, in the order of
the table above. The third is then replaced by the level-1 or level-2
candidate if either is cheaper. IBL/IBLR candidates are flagged *skip*:
their vectors are already quarter-pel and their cost final, so FME does not
refine them.

## Fractional refinement (SPFME)

`fme_luma.sv` refines each candidate one 4x4 block at a time, in raster
order, one block every 4 cycles. Each block goes through
`frac_block_pipe.sv`:

1. Three reads of four rows fetch the 10x10 window around the block from
   the SRAM. The window starts 3 pixels up and left of the block's integer
   position; the SRAM's four banks let any four consecutive rows be read in
   one cycle.
2. `interp_unit.sv` builds the half-pel plane from that window. Horizontal
   and vertical 6-tap filters produce b and h. The centre sample j is
   filtered from the unrounded horizontal results. Quarter samples are the
   rounded averages of two neighbours, as in the H.264 luma rules. The unit
   then produces the 4x4 prediction for each of the ten offsets.
3. Ten `satd_pu.sv` units take one row per cycle. Each applies a 1-D
   Hadamard transform per row, holds three transformed rows, and finishes
   the column transform with the fourth. The SATD is (Σ|coef| + 1) >> 1.
   Modes that use the residual (ILR, ILMR, IBLR) subtract it before the
   transform.

The block SATDs are accumulated per partition and per position. lambda·R of
the refined vector is added once per partition. The predictor used for R is
the one stored in the candidate: MVP_ILM for ILM/ILMR, MVP_INTER otherwise.
Each partition keeps its cheapest position. A final compare (the SB buffer)
picks the best of the refined candidates and the skipped IBL ones.

The ten positions, in quarter pel relative to the integer vector, with
pf = ((mvp − mv + 2) mod 4) − 2 per axis:
`(0,0) (−1,−1) (1,−1) (−1,1) (1,1) pf pf+(0,−1) pf+(0,1) pf+(−1,0) pf+(1,0)`.
Offsets therefore stay within ±3 quarter pel. That is why the window margin
is 3 pixels.

`ibl_unit.sv` reuses the same pipeline with two PUs: IBL without residual,
IBLR with it. It applies the base-layer vector of each 4x4 block directly.

## Memories

| memory | size | organisation | reads |
|--------|------|--------------|-------|
| `ref_sram_l0` (level 0 + FME + IBL) | 37x37 pixels | part A rows 0-18, part B rows 19-36; 4 banks each by row index (row mod 4); row 19 also stored in A | one A row + one B row (IME), or any 4 consecutive rows (FME) |
| `ref_sram_lx` level 1 | 39x40 | five column banks of 8 pixels, rows split A 0-31 / B 32-38 | one A row + one B row |
| `ref_sram_lx` level 2 | 67x68 | seventeen column banks of 4 pixels, A 0-63 / B 64-66 | one A row + one B row |
| mode-2 SRAM (a second `ref_sram_l0`) | 37x37 | as level 0 | 4 rows (FME of level-1/2 candidates) |

The level-1/2 banks are one MB wide (in subsampled pixels), so moving to the
next MB replaces one bank. All reads are synchronous, with data one cycle
after the address. Each engine has its own set.

### Window coordinates (how to load the SRAMs)

For an MB at frame position (X, Y), the pixel that each SRAM location must
hold is:

| SRAM | location | frame pixel |
|------|----------|-------------|
| level 0 | row r, column c | (X + (mvp_inter.x >>> 2) − 11 + c, Y + (mvp_inter.y >>> 2) − 11 + r) |
| level 1 | row r, bank b, slot i | (X + 2·(8b + i − 16), Y + 2·(r − 16)), i.e. the top-left pixel of each 2x2 group |
| level 2 | row r, bank b, slot i | (X + 4·(4b + i − 32), Y + 4·(r − 32)) |
| mode-2 | row r, column c | as level 0, centred on `m2_center` instead of MVP_INTER |

The engine subsamples the current MB the same way (top-left sample of each
group).

## Interfaces

All vectors are quarter pel, signed, 14 bits (`mv_t {x, y}`). Costs are
20-bit unsigned and saturate at `COST_MAX` (all ones), which also marks a
disabled mode. Pixels are 8 bits. The up-sampled residual is signed 9-bit
(`res_t`). Everything is in `me_pkg.sv`, including the mode descriptor
`mode_t`: `valid`, `pred`, `part`, `sub[4]`, `mv[16]`, `mvp[16]`, `cost`.
Its vectors are given per 4x4 block in raster order.

`me_top` (parameter `NCORE = 2`) has one copy of each of the following per
engine, as arrays indexed by engine.

| signal | dir | meaning |
|--------|-----|---------|
| `start` | in | one-cycle pulse; samples `lambda`, `mvp_inter`, `mvp_ilm`, `cur`, `upbr`. These must stay stable until `done`. |
| `lambda` | in | 8-bit Lagrange multiplier |
| `mvp_inter`, `mvp_ilm[16]` | in | predictors |
| `cur[16][16]`, `upbr[16][16]` | in | current MB and up-sampled base-layer residual |
| `l0_we/l0_waddr/l0_wdata[37]` | in | write one level-0 row per cycle |
| `l1_we/l1_waddr/l1_wbank/l1_wdata[8]` | in | write one level-1 bank slice per cycle |
| `l2_we/l2_waddr/l2_wbank/l2_wdata[4]` | in | write one level-2 bank slice per cycle |
| `m2_req`, `m2_center` | out | a level-1/2 candidate needs its 37x37 window around `m2_center` |
| `m2_we/m2_waddr/m2_wdata`, `m2_ready` | in | load that window, then pulse `m2_ready` |
| `busy`, `done` | out | `done` pulses when `best` is valid |
| `best` | out | final mode with refined vectors and cost |
| `ime_modes[3]`, `ime_skip[3]`, `elim[16]` | out | mode-filter result: candidates, skip flags, cleared mode flags (index = mode × 4 + partition kind) |
| `ilm_ok`, `ibl_ok` | out | base-layer vectors inside the level-0 window |
| `fme_nproc` | out | number of candidates refined (0-3) |

`rst_n` is an asynchronous, active-low reset. Every control register is
reset; the SRAM contents and datapath pipeline registers are not. Assert
the reset before the first clock edge.

The SRAMs must not be written while the engine reads them. In practice,
load them between `done` and the next `start`.

## Where this design departs from the source architecture

* **No pipelining across MBs inside an engine.** The source architecture
  runs IME and FME as separate 450-cycle stages on consecutive MBs. It
  rotates three level-0 SRAMs through load, IME and FME. Here each engine
  finishes one MB before taking the next, and has one level-0 SRAM. The
  compute fits the budget (447 ≤ 454 cycles). Loading the next window (37
  row writes) cannot overlap, so the full throughput target needs that
  rotation added.
* **IBL runs after IME** on the same SRAM, and uses one interpolation
  pipeline for the sixteen blocks in turn. The source uses four
  interpolation units side by side. The results are the same; it takes
  about 74 cycles.
* **Read schedule length.** The level-0 search reads for 143 cycles and
  reports 147 cycles after start. The source quotes 142 cycles for all three
  levels.
* **Choices of this design where the source is silent:**
  * the rate model (signed Exp-Golomb lengths in quarter pel);
  * scaling of subsampled SADs by the subsampling ratio;
  * SATD normalisation (Σ+1)>>1;
  * subsampling by taking the top-left pixel;
  * tie rules;
  * the mode-2 load handshake;
  * integer division in ω.
* **Not included:** generation of the subsampled frames, external memory,
  chroma, and the rest of the encoder (transform, intra prediction,
  deblocking, entropy coding, the base-layer encoder that supplies MVP_ILM
  and the residual).

## Files

| file | content |
|------|---------|
| `rtl/me_pkg.sv` | types, constants, rate, saturating add, partition index, window test |
| `rtl/me_top.sv` | `NCORE` engines side by side |
| `rtl/me_core.sv` | one engine: SRAMs, three search levels, trees, IBL, mode filter, FME, control |
| `rtl/level_me.sv`, `rtl/sad_primitive.sv` | integer search with the A/B schedule |
| `rtl/l0_tree.sv`, `rtl/l1_tree.sv`, `rtl/l2_compare.sv` | block costs and best positions |
| `rtl/ref_sram_l0.sv`, `rtl/ref_sram_lx.sv` | window memories |
| `rtl/ibl_unit.sv` | IBL / IBLR costs |
| `rtl/mode_filter.sv` | pre-selection and choice of three candidates |
| `rtl/fme_luma.sv`, `rtl/frac_block_pipe.sv`, `rtl/interp_unit.sv`, `rtl/satd_pu.sv` | fractional refinement |
| `tb/tb_<module>.sv` | one self-checking testbench per module; `tb_me_top` is end to end |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog. For example:

```
verilator --binary --timing -Irtl rtl/me_pkg.sv rtl/satd_pu.sv tb/tb_satd_pu.sv --top-module tb_satd_pu
./obj_dir/Vtb_satd_pu
```

`tb_me_top` needs all of `rtl/`:

```
verilator --binary --timing -Irtl rtl/me_pkg.sv $(ls rtl/*.sv | grep -v me_pkg) tb/tb_me_top.sv --top-module tb_me_top
```

It builds and runs in about three minutes.

What the testbenches compare against:

* **Independent models.** The H.264 interpolation equations written
  sample by sample (G, a … s), a direct 4x4 Hadamard SATD, Exp-Golomb code
  lengths counted bit by bit, and brute-force SADs. `tb_interp_unit`,
  `tb_ibl_unit`, `tb_fme_luma` and `tb_me_top` use these to predict exact
  costs and vectors.
* **`tb_me_top`.** It runs at full size and default parameters. It uses a
  synthetic frame and five kinds of MB: near motion, motion only level 1
  reaches, motion only level 2 reaches, half-pel motion matched by the base
  layer, and blocks explained by the residual. It checks:
  * every candidate cost and the final cost against the models;
  * the final vector against the true motion;
  * the window rule for ILM/IBL;
  * the 454-cycle budget.

  It also counts each mechanism and fails if one never occurs:
  pre-selection eliminations, level-1 and level-2 third candidates,
  mode-2 loads, IBL skips, fewer than three FME candidates, ILM disabled,
  IBL out of range, and both engines busy at once.
* **Cycle counts.** The IME schedule (147 cycles), the interpolation load
  (3 cycles), IBL (≤ 75 cycles) and FME (≤ 80 cycles per candidate) are
  checked in their testbenches.
