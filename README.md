# HEVC intra accelerator with software-steered complexity reduction

An HEVC intra encoder that tries every PU size and all 35 intra modes
spends most of its time on rate-distortion search. This design avoids most
of that search by splitting the work. Cheap hardware extracts two features
of the picture:

* a **variance map** of the 64x64 LCU, from which software picks one PU
  size per region (flat regions get large PUs, detailed regions small
  ones);
* a **gradient histogram** per PU, from which software picks the few
  angular modes that point along the dominant edges.

Hardware then evaluates only those candidate modes. The prediction is
**row-parallel**: eight identical prediction blocks each own eight columns
of the LCU, so a whole PU row of up to 64 pixels is predicted per cycle.
Software **gates the clock** of every block that the current PU does not
cover.

The RTL covers the custom hardware only. The processor software (PU-size
estimation, sorting of the histogram, clock-mask programming), the DDR3
memory and the transform/entropy stage are outside it. They connect through
the top-level ports.

## Block map

```
              ci_* (custom instructions)                     ref_* (reconstruction path)
                     |                                               |
                 csr_regs ---- ctrl/stat ----+                reference_register
                     |                       |                       | top/left samples
 avm_* <-> read_master -> lcu_buffer --row--> variance_computer (8x8 mean/variance RAM)
                            |    |
                            |    +--row--> sobel_histogram (33-bin mode histogram)
                            |
                            +--row--> intra_pred_unit
                                        |- clock_enabler (8 x clock_gate)
                                        |- intra_pred_block x 8 (HW_0..HW_7, 8 lanes each)
                                        +- mode_selection ---> tx_* (residue rows)
```

Top module: `hevc_intra_accel`. Shared constants, types and the arithmetic
helpers are in `hevc_intra_pkg`. `sdp_ram` and `clock_gate` are small
helper modules.

## Processing one LCU

Software issues custom instructions (see the register map below).

1. Write `CI_LCU_ADDR` (byte address of the LCU's top-left pixel) and
   `CI_STRIDE` (bytes per frame line), then `CI_CMD` bit 0. `read_master`
   waits for `ddr_calibrated`, then reads 64 rows x 8 beats of 64 bits
   into `lcu_buffer`. When the last beat has arrived, `variance_computer`
   starts by itself. It takes 514 cycles.
2. Poll `CI_STATUS` until `var_done`. Read the 64 entries with
   `CI_VAR_RD`. Software derives the PU map from them.
3. For each PU:
   * Write its reference samples through the `ref_*` port: corner, 2N above,
     2N left.
   * Write `CI_PU` (x, y, log2 size), then `CI_CMD` bit 1. When `edge_done`
     is set, read the bins with `CI_HIST_RD` (and the peak with
     `CI_HIST_PEAK`), sort them and choose the candidates.
   * Write the candidates with `CI_CAND` and `CI_NUM_CAND`, and the clock
     mask with `CI_CLK_MASK`.
   * Write `CI_CMD` bit 2. The residue rows of the winning mode come out on
     `tx_*`. When `pred_done` is set, `CI_BEST` holds the mode and its SAD.

## Row-parallel prediction and clock gating

This is the part of the design that needs the most care.

**Column ownership.** Prediction block *b* (`intra_pred_block`,
`BLK_IDX = b`) always handles LCU columns `8b .. 8b+7`, whatever the PU is.
For a PU at column `pu_x` of size N, lane *l* of block *b* works on
PU-relative column `x = 8b + l - pu_x`. The lane is valid when
`0 <= x < N`. PUs of 8x8 and larger are aligned to 8 columns, so they use
whole blocks. A 4x4 PU uses four lanes of one block.

**Per-lane arithmetic.** Every lane evaluates the HEVC formulas directly:

* planar: `((N-1-x)·L[y] + (x+1)·T[N] + (N-1-y)·T[x] + (y+1)·L[N] + N) >> (log2 N + 1)`
* DC: the value `(ΣT + ΣL + N) >> (log2 N + 1)`, computed once per run by
  the unit and broadcast
* angular: for vertical modes (18..34), `pos = (y+1)·angle`,
  `k = x + (pos >> 5) + 1`, `f = pos & 31` and
  `pred = ((32-f)·r[k] + f·r[k+1] + 16) >> 5`. Here `r[k]` is the top row
  for `k >= 0`, and for `k < 0` it is the left column projected with
  `invAngle`: `left[(k·invAngle + 128) >> 8]`. Horizontal modes (2..17) swap
  the roles of x/y and of the two reference arrays.

Each lane therefore has its own reference index. There is no shared
projected reference buffer to build per mode, which is why any mode can
follow any other mode on consecutive cycles.

**Sequencing (`intra_pred_unit`).** A run has four phases:

1. DC value: 1 cycle.
2. Each candidate: N cycles, one PU row each.
3. Drain: 3 cycles.
4. Replay of the best mode: N cycles, with its residues forwarded.

The pipeline has four stages:

* A: row address to the LCU buffer.
* B: row data and request to the blocks.
* C: block outputs, registered on the gated clock.
* D: the registered outputs of `mode_selection`.

A run takes **K·N + N + 8 cycles**, counting the start and done cycles,
with K candidates. The count is reported in `CI_CYCLES`. For example, five
candidates on a 32x32 PU take 200 cycles, and on a 64x64 PU 392 cycles.

**Clock gating.** `clock_enabler` gives each block its own latch-based
clock gate. The enable is `mask[b] & busy`. Software computes the mask from
the PU geometry:

    mask[b] = (8b + 8 > pu_x) && (8b < pu_x + N)

A 16x16 PU at column 48, for example, enables blocks 6 and 7 only. A block
whose clock is off keeps its last outputs. `mode_selection` therefore
counts only blocks that overlap the PU *and* are enabled. If software
clears a needed bit, that block's columns drop out of the cost and out of
the residue (lane-valid low). The hardware does not override the mask.

**Mode choice.** The cost is the SAD over the PU. The first candidate is
always taken, and a later candidate replaces it only when strictly
cheaper. Candidate lists may include planar (0) and DC (1).

## Gradient histogram

`sobel_histogram` processes one PU pixel per cycle. For each PU row it
first loads the three LCU rows around it, which takes 4 cycles. A PU of
size N therefore takes about N(N+4) cycles.

* **Gradients.** `gx` (right column minus left column) and `gy` (lower row
  minus upper row) use 1-2-1 weights. Neighbours outside the LCU repeat
  the edge pixel.
* **Mode of a pixel.** The edge runs perpendicular to the gradient:
  * If `|gx| > |gy|`, the edge is closer to vertical. The slope of the
    prediction direction is `angle/32 = gy/gx`, and the mode is 26 ± k.
  * Otherwise the mode is 10 ∓ k, with `angle/32 = gx/gy`.
  * The magnitude index k (0..8, angles 0, 2, 5, 9, 13, 17, 21, 26, 32)
    counts how many doubled midpoints `{2, 7, 14, 22, 30, 38, 47, 58}` are
    below `64·|num|/|den|`. The comparison is done by multiplying, so no
    divider is needed.
  * Opposite signs of gx and gy select negative angles.
* **Bins.** The bin of that mode is increased by `|gx| + |gy|`.
* **Result.** At the end the largest bin is latched as the peak mode; ties
  go to the lower mode number. The descending sort into a candidate list
  is left to software.

## Variance map

After each LCU load, `variance_computer` writes 64 entries, one per 8x8
block, at address `8·block_row + block_col`. Each entry is
`{mean[7:0], variance[15:0]}` with

    mean = Σp / 64,   variance = (64·Σp² − (Σp)²) / 4096   (both truncated)

The mean is kept so software can merge four blocks into a 16x16 (or
larger) partition:

    var = avg(var_i) + avg(mean_i²) − mean²

## Register map (custom instructions)

Every instruction takes two cycles: `ci_start` for one cycle, then
`ci_done` with `ci_result` on the second cycle after it. Operand `ci_datab`
is the index for the indexed reads and writes.

| `ci_n` | name | access | content |
|---|---|---|---|
| 0x00 | CI_CMD | W | bit0 load LCU (and variance), bit1 histogram, bit2 prediction |
| 0x01 | CI_LCU_ADDR | W | byte address of the LCU top-left pixel |
| 0x02 | CI_STRIDE | W | frame line stride in bytes |
| 0x03 | CI_PU | W | [5:0] x, [13:8] y (LCU-relative), [18:16] log2 size (2..6) |
| 0x04 | CI_CLK_MASK | W | one clock-enable bit per prediction block |
| 0x05 | CI_CAND | W | candidate[datab] = dataa[5:0] |
| 0x06 | CI_NUM_CAND | W | number of candidates, 1..8 |
| 0x10 | CI_STATUS | R | [3:0] busy: pred, edge, var, load; [7:4] done: pred, edge, var, load (sticky until the next command) |
| 0x11 | CI_VAR_RD | R | variance entry datab: {mean, variance} |
| 0x12 | CI_HIST_RD | R | histogram bin of angular mode datab (2..34) |
| 0x13 | CI_BEST | R | [31:8] SAD, [5:0] mode of the last prediction run |
| 0x14 | CI_HIST_PEAK | R | mode of the largest histogram bin |
| 0x15 | CI_CYCLES | R | cycles of the last prediction run |
| 0x16 | CI_GATE_STAT | R | clock enables currently applied |
| 0x17 | CI_LAST_COST | R | SAD of the last candidate evaluated |

## Other ports

* **Frame memory (`avm_*`, `ddr_calibrated`).**
  * Pipelined read master: `avm_read` is held while `avm_waitrequest` is
    high, and data return in order with `avm_readdatavalid`.
  * Up to 8 reads can be outstanding.
  * Each beat carries 8 pixels; the lowest byte is the leftmost pixel.
* **References (`ref_we`, `ref_sel_left`, `ref_idx`, `ref_data`).**
  * Index 0 writes the corner sample into both arrays.
  * Index i (1..128) writes `p[i-1][-1]` (top array) or `p[-1][i-1]` (left
    array).
  * After reset every sample is 128. Substituting partly unavailable
    neighbours is up to the writer.
* **Transform (`tx_*`).**
  * One row per `tx_valid`: `tx_y` is the PU row, `tx_mode` the mode.
  * The residues `orig − pred` are 9-bit two's complement, one per LCU
    column.
  * `tx_lane_valid` marks the PU columns.

## What is taken from the method and what is not

Taken from the method:

* The block structure.
* The 64x64 LCU of 8-bit pixels.
* Eight 8-pixel prediction blocks per LCU row, producing a row per cycle.
* The variance map in a RAM that software reads.
* Sobel-gradient histograms over the angular modes.
* Software-controlled per-block clock gating.
* The custom-instruction connection to the processor.

Choices of this implementation, because the method leaves them open:

* the 8x8 granularity of the variance map, and storing the mean with it;
* `|gx|+|gy|` as the gradient norm, and the exact direction-to-mode
  mapping;
* clamping at the LCU border in the edge detector;
* SAD as the mode cost;
* up to 8 candidates;
* replaying the best mode to produce its residues;
* the register map, bus protocol and reset values.

Known departures and omissions:

* No HEVC reference smoothing and no DC/horizontal/vertical boundary
  filters. The predictions are the unfiltered HEVC formulas, so an HEVC
  decoder would reconstruct differently for the PU sizes and modes where
  the standard filters.
* PU size 64 is predicted as one 64x64 block. The standard limits intra
  prediction to 32x32 transform blocks.
* A single LCU buffer. The next LCU is not prefetched while the current one
  is processed.
* The memory bill is 32,768 bits for the LCU plus 1,536 bits for the
  variance map. The original implementation reported about 43 kbit. What
  the rest held is not known.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The shared models are:

* `tb/tb_ref_pkg.sv`: HEVC prediction built from the standard's reference
  array construction, and the nearest-mode search by direct distance
  minimisation;
* `tb/ddr_model.sv`: memory with random wait states.

With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/hevc_intra_pkg.sv tb/tb_ref_pkg.sv \
        tb/tb_hevc_intra_accel.sv --top-module tb_hevc_intra_accel
    ./obj_dir/Vtb_hevc_intra_accel

`-y` lets Verilator find every other module by its file name. To run
another block's testbench, replace the testbench file and the top name.
Building the top's testbench takes under a minute.

The end-to-end test `tb_hevc_intra_accel` runs the top at its full size:

* a 256x192 frame in the memory model;
* one LCU with stripes in four orientations, flat and noisy regions;
* the variance map checked;
* PUs of 4, 8, 16, 32 and 64 pixels, each with histogram, candidate choice,
  clock mask, prediction and residue rows checked against the models.

It also counts that each of these happened at least once:

* calibration wait
* memory stalls
* gated blocks
* 4x4 PUs
* negative-angle modes
* residue replays

It runs in well under a second once built.

`tb_frame_workload` encodes whole synthetic pictures at the three common
test-sequence sizes, 416x240, 832x480 and 1920x1080:

* 7 x 4, 13 x 8 and 30 x 17 LCUs;
* memory is padded to whole LCUs: the pattern continues to the right of
  the picture, and the lines below it repeat its last line;
* the testbench plays the software side, choosing PU sizes as a quad tree
  from the variance map and candidates from the histogram (the three
  largest bins plus planar and DC);
* every PU's best mode, SAD and residue rows are checked, as is every
  LCU's variance map.

With the thresholds it uses, the three pictures yield about 2000, 7400 and
35500 PUs from 4x4 to 64x64. For each picture the testbench prints the PU
mix, the chosen-mode mix, the total prediction cycles and the number of
block-cycles gated off. The whole run simulates in about a minute.
