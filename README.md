# HEVC and FVC video coding hardware

This RTL holds three video-encoder accelerators. They are independent and sit
side by side in one top module:

* **SPME**: HEVC sub-pixel motion estimation that never touches a pixel. It
  estimates the SAD (sum of absolute differences) of the 48 half- and
  quarter-pixel search positions around the best integer motion vector. It
  does so by running the HEVC interpolation filters over the 9x9 grid of
  integer-position SADs. It then finds the best fractional position with the
  two-step search of the HEVC reference encoder. One prediction unit (PU) is
  finished every 6 cycles.
* **FIHW**: HEVC luma fractional interpolation for 8x8 PUs. It has no
  multipliers. The constant products 5A, -11A, 17A and 29A of every 8-bit
  pixel value are stored in small ROMs that the pixel addresses. A
  common-subexpression (CSE) stage adds the +/-1 and +/-4 taps. One 8x8 PU
  takes 50 cycles from its first input row to its last output.
* **FVC 2D transform**: forward 2D transforms for the Future Video Coding
  candidate transform set (DCT-II, DCT-V, DCT-VIII, DST-I, DST-VII). The
  vertical and horizontal types are chosen independently. It handles one
  8x8 TU or two 4x4 TUs at a time and produces 8 coefficients per cycle. It
  comes in three interchangeable datapath architectures:
  * **baseline**: a separate datapath per transform type.
  * **reconfigurable**: one shift-add datapath for all types.
  * **DSP**: an 8x8 multiplier array.

All of the RTL is synthesizable SystemVerilog-2017 and has no vendor
primitives. The memories are plain arrays, and synthesis maps them to RAM or
ROM.

## 1. Sub-pixel motion estimation by SAD interpolation

### Idea

A full sub-pixel search needs the reference block interpolated at 48
fractional positions, followed by a SAD at each one. This design instead
treats the SAD surface as a smooth image. The SADs of the 9x9 integer
positions around the best integer vector (offsets -4..4) are filtered with
the same three 8-tap filters that HEVC uses for pixels:

| filter | taps | position |
|---|---|---|
| A | -1, 4, -10, 58, 17, -5, 1 | 1/4 |
| B | -1, 4, -11, 40, 40, -11, 4, -1 | 1/2 |
| C | 1, -5, 17, 58, -10, 4, -1 | 3/4 |

A horizontal pass gives the SADs at fractional x. A vertical pass over those
gives the remaining positions. Each sum is rounded, divided by 64 (the filter
gain) and clamped to 0..2^20-1, so every interpolated SAD is again a 20-bit
SAD.

### Search

`spme_cmp` compares the integer position with its eight half-pixel
neighbours. It then compares the winner with the eight quarter-pixel
positions around that winner. It has three 20-bit comparators:
1. running best against candidate 0;
2. candidate 1 against candidate 2;
3. the winner of comparator 1 against the winner of comparator 2.

Each cycle it retires three candidates, so both stages together take 6
cycles. On equal SADs it keeps the earlier candidate, and candidates are
visited in raster order. Offsets come out in quarter pixels, with `qx, qy`
in -3..3.

### Schedule

`spme` accepts a 9x9 block into its integer SAD buffer. Three `spme_interp`
units then work through six steps. Each unit turns nine SADs into six
fractional SADs per cycle: a, b and c on both sides of the centre.

| step | interpolator inputs | results |
|---|---|---|
| 0-2 | integer rows (three per step) | horizontal a/b/c, kept in transpose memories A, B, C |
| 3 | centre integer column | vertical d/h/n |
| 4 | columns of transpose memory A and B | quarter SADs e, i, p / f, j, q |
| 5 | columns of transpose memory B and C | quarter SADs f, j, q / g, k, r |

The 7x7 grid of candidate SADs is complete after step 5, and the comparator
takes over. While it searches, the next block is already being interpolated.

### Timing

| what | value |
|---|---|
| `in_ready` | high when idle or in step 5 |
| result | 13 cycles after the block is accepted (12 after the buffer holds it) |
| steady rate | one result every 6 cycles |

The multiplier blocks inside `spme_interp` share terms across the filters as
shift-add networks:
* M1 forms 5, 10 and 11 times S[+/-2].
* M2 forms 5, 10, 11, 17, 40 and 58 times S[+/-1].
* M3 forms 17, 40 and 58 times S[0].
* C1 forms the shared end terms 4*S[-3] - S[-4] and 4*S[3] - S[4].

## 2. Fractional interpolation with product memories

### Data flow

One datapath (`fihw_datapath`) filters a line of 15 pixels, W[0..14], at
offsets -3..11. From it, one cycle yields eight A, eight B and eight C
filter results.

`fihw` feeds that datapath from a three-way multiplexer:

| cycles | line source | results |
|---|---|---|
| 0..14 | integer rows -3..11, straight from the input port | a, b, c; all 15 rows kept in transpose memories A, B, C (15x8 each) |
| 15..22 | integer columns 0..7, from an internal integer buffer | d, h, n |
| 23..46 | columns 0..7 of memory A, then B, then C | e/i/p, f/j/q, g/k/r |

That makes 47 issue cycles. Three register stages follow each issue: the
input register, the memory/CSE register and the adder-tree register. So the
last result of a PU leaves at cycle 50. The next PU's rows are accepted from
cycle 47, so back-to-back PUs arrive every 47 cycles. Its first row result
overwrites transpose-memory row 0 at cycle 50, after the last read of the
old contents at cycle 46.

### Product memories

The constant multiples that the filters need are 5, 10, 11, 17, 29, 40 and
58. Of these:
* 10 = 5<<1;
* 40 = 5<<3;
* 58 = 29<<1.

So only 5A, -11A, 17A and 29A are stored. Low-order bits that are copies of
A's own bits, or of another stored product, are dropped. The dropped bits are
rebuilt from the address when the word is read:

| memory | size | word | rebuild |
|---|---|---|---|
| MEM1 | 256 x 18 | `{-11A[12:4], 5A[10:2]}` | `5A = {d[8:0], A[1:0]}`, `-11A = {d[17:9], d[1:0], A[1:0]}` |
| MEM2 | 256 x 37 | `{29A[12:3], 17A[12:4], -11A[12:4], 5A[10:2]}` | as MEM1, plus `17A = {d[26:18], A[3:0]}`, `29A = {d[36:27], d[0], A[1:0]}` |

These rebuilds work because:
* 5A ends in A[1:0];
* -11A shares bits 3:2 with 5A;
* 29A shares bit 2 with 5A.

Pixels W[2] and W[12] need only 5A and -11A, so they use MEM1. W[3..11] use
MEM2. The ROM contents are computed at elaboration by a constant function.

The CSE stage forms two sets of terms:
* 4W[m] - W[m-1], for m = 1..8: the first two taps of A and B.
* 4W[m] - W[m+1], for m = 6..13: the last two taps of B and C.

Eight adder trees then combine the products.

### Rounding

Every filter output is rounded, divided by 64 and clipped to 8 bits. Half
pixels must stay 8-bit because the quarter-pixel pass uses them as memory
addresses. This is simpler than the HEVC standard's two-stage precision,
which keeps 16-bit intermediates. So e, f, g, i, j, k, p, q and r can differ
from a bit-exact HEVC decoder by rounding. a, b, c, d, h and n equal
the HEVC values rounded to 8 bits.

### Ports

* `in_row[15]`: one integer row, columns -3..11, with `in_valid` and
  `in_ready`. `in_ready` is high during cycles 0..14, and a missing row
  stalls the schedule.
* `out_kind`: which group of eight pixels an output carries (`FK_ROW`,
  `FK_COL`, `FK_QA`, `FK_QB`, `FK_QC`).
* `out_idx`: the row or column.
* `out_pix[filter][k]`: the filter results, filter 0..2 being 1/4, 1/2 and
  3/4.

## 3. FVC 2D forward transform

### Coefficients

Every matrix is `round(256 * sqrt(N) * T(i,j))`, rounded half away from
zero, over these basis functions:

| type | T(i,j) |
|---|---|
| DCT-II | w0 * sqrt(2/N) * cos(pi*i*(2j+1)/(2N)) |
| DCT-V | w0 * w1 * sqrt(4/(2N-1)) * cos(2*pi*i*j/(2N-1)) |
| DCT-VIII | sqrt(4/(2N+1)) * cos(pi*(2i+1)*(2j+1)/(4N+2)) |
| DST-I | sqrt(2/(N+1)) * sin(pi*(i+1)*(j+1)/(N+1)) |
| DST-VII | sqrt(4/(2N+1)) * sin(pi*(2i+1)*(j+1)/(2N+1)) |

Here w0 = sqrt(1/2) for i = 0 and w1 = sqrt(1/2) for j = 0; both are 1
otherwise. This gives 10-bit signed coefficients, the largest being 374. For
example, the 4-point DCT-II rows are (256, 256, 256, 256) and
(334, 139, -139, -334). The tables live in `fvc_pkg`. The function
`fvc_pkg::coef(type, size, i, j)` is what all three architectures use.

### 2D pipeline

`fvc_2d` takes one column per cycle:
* 8x8 TU: all 8 rows of one column, 8 beats.
* Two 4x4 TUs: lanes 0..3 carry a column of the first TU and lanes 4..7 the
  same column of the second, 4 beats.

The stages are:
1. 1D column transform.
2. Column clip: arithmetic right shift by 3 (4x4) or 4 (8x8), saturated to
   16 bits.
3. Transpose memory.
4. 1D row transform.
5. Row clip: shift by 10 or 11, saturated to 16 bits.

Out come the coefficient rows, one per cycle, with `out_row` counting.

### Transpose memory

`fvc_tmem` has eight banks of 32-bit words. Element (i, j) goes to bank
(i+j) mod 8 at address {buffer, j}. A column write and a row read therefore
each touch every bank exactly once. A small rotation network on each side
restores the lane order. Two 4x4 TUs share a word ({TU1, TU0}) in banks 0..3.

There are three buffers, so that column writes of TU n+1 overlap row reads
of TU n:
* Streams of equal-size TUs never stall.
* When an 8x8 TU is followed by 4x4 TUs, `in_ready` drops for a few cycles,
  because the shorter TUs would otherwise need a fourth buffer.

### Architectures

Pick one with the `ARCH` parameter. All three produce the same numbers.

* **`ARCH_BASELINE`** (`fvc_dp_baseline`): five separate datapaths.
  * DCT-II and DST-I are even/odd symmetric, so they use a butterfly
    (x[k] +/- x[7-k]) feeding two 4x4 constant-multiplier datapaths. The
    8-point butterfly is bypassed for 4x4 TUs.
  * Inside each 4x4 datapath, a second, 4-point butterfly (u[k] +/- u[3-k])
    serves every symmetric or antisymmetric matrix row with two products
    instead of four. That covers every row of the 4-point DCT-II and DST-I
    and the even rows of the 8-point DCT-II. Other rows use all four
    products. Which form a row uses is fixed when the design is elaborated.
  * DCT-V, DCT-VIII and DST-VII each use a full 8x8 constant datapath.
  * Only the selected datapath loads its input register (data gating).
  * Latency 2.
* **`ARCH_RECONFIG`** (`fvc_dp_reconfig`, `fvc_rmult`): one datapath for
  all types.
  * Each input feeds a multiplier block. Its common part forms 3x, 5x and 7x
    once; its reconfigurable part builds every product from the radix-8
    digits of |c|, as (m[d2]<<6) + (m[d1]<<3) + m[d0], and negates it when
    needed.
  * The coefficient is picked by type and size.
  * Latency 2.
* **`ARCH_DSP`** (`fvc_dp_dsp`): 64 multipliers.
  * Each multiplier has a coefficient multiplexer and input registers. For
    two 4x4 TUs the 32 multipliers that are not needed keep their old inputs
    (data gating).
  * Product registers and adder-tree registers follow.
  * Latency 3.

### Timing

| | baseline | reconfigurable | DSP |
|---|---|---|---|
| first row out, after the first input column | 14 cycles | 14 cycles | 16 cycles |
| steady throughput | 8 coefficients per cycle | 8 coefficients per cycle | 8 coefficients per cycle |

At 8 samples per cycle, an 8K frame (7680x4320 luma) takes 4.15M cycles:
about 40 frames/s at 167 MHz or 54 frames/s at 222 MHz.

### Widths

* Inputs (residuals): 9-bit signed.
* Column accumulators: 23 bits.
* Row accumulators: 30 bits.
* Intermediate and output coefficients: 16 bits.

## 4. Top level

`hevc_fvc_top` instantiates:
* `spme` (ports `spme_*`);
* `fihw` (ports `fihw_*`);
* `fvc_2d` three times, one per architecture. Ports `fvc_*[a]` are arrays
  indexed by `a`: 0 baseline, 1 reconfigurable, 2 DSP.

The designs share only `clk` and `rst_n`. The reset is asynchronous and
active low, and all valid flags clear on reset. Datapath registers are not
reset.

## 5. Where this RTL departs from the original design

* **SPME normalisation.** Interpolated SADs are normalised by
  `(sum+32)>>6` and clamped to 20 bits. The original only says the outputs
  are 20-bit SADs.
* **SPME latency.** The SPME result arrives 13 cycles after acceptance. This
  design reads the original's start-up of 12 cycles as counted from the
  loaded buffer.
* **FIHW half pixels.** They are rounded to 8 bits before the quarter pass
  (see section 2).
* **FIHW inputs and outputs.** Input arrives row by row, and an integer
  buffer supplies the columns. Outputs are grouped by `out_kind`. PUs
  overlap, giving a 47-cycle interval. The original quotes 50 cycles per PU
  without overlap.
* **FIHW PU size.** Only 8x8 PUs are handled. Larger PUs would be tiled by
  the caller.
* **FVC baseline constant multipliers.** They are written as plain constant
  multiplications and left to synthesis. The original ran the Hcub
  multiple-constant-multiplication algorithm to get minimal adder networks.
* **FVC reconfigurable multiplier block.** It uses a regular radix-8 digit
  network instead of the original hand-tuned network, which used the
  multiples 1, 3, 5, 7, 11 and 21.
* **FVC DSP pipeline.** Its extra register stage (input register, product
  register, adder-tree register) is one reading of how the two extra cycles
  of the original arise.
* **FVC clips.** They truncate and saturate. The rounding and overflow
  behaviour are not specified in the original.
* **FVC transpose buffers.** The number of buffers (3) and the stall rule
  at size changes are this design's choices.
* **Board integration.** The MicroBlaze, UART and DDR system used to run the
  transform on an FPGA board is not included.

## 6. Verification

Each block has a self-checking testbench in `tb/`. Each compares against an
independent model written in the testbench, checks the latency and rate that
apply, has a watchdog, and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_spme_interp` | 20,000 rows against direct filtering, including clamping at both ends |
| `tb_spme_cmp` | random, bowl-shaped and tie-heavy grids against a reference search; 7-edge start-to-done; 6-cycle restart |
| `tb_spme` | 200 blocks against filter-plus-search; latency 13, interval 6 |
| `tb_fihw_mem1`, `tb_fihw_mem2` | every address; all rebuilt products exact; 1-cycle read |
| `tb_fihw_datapath` | 5000 lines (random, extreme and smooth) against direct 8-tap filtering; latency 2; tag |
| `tb_fihw` | 40 PUs, back to back and with row gaps; all 40 output groups per PU; latency 50; interval 47 |
| `tb_fvc_clip`, `tb_fvc_rmult`, `tb_fvc_tmem` | shift/saturate; every product of every type and size; transpose with overlapping write and read |
| `tb_fvc_dp_baseline`, `tb_fvc_dp_reconfig`, `tb_fvc_dp_dsp` | 3000 vectors of all types and sizes against the matrix product; latency 2/2/3 |
| `tb_fvc_2d` | all three architectures on 60 TUs against a floating-point basis-function model; latency 14/14/16; no stalls within equal-size runs; spot checks of the 4x4 matrices |
| `tb_hevc_fvc_top` | everything at default parameters, at once |

`tb_hevc_fvc_top` counts each mechanism and fails if one never happens:
* SPME: back-to-back blocks and idle gaps.
* FIHW: back-to-back PUs, stalled rows, every output kind.
* FVC: input stalls, 4x4 and 8x8 TUs, every transform type in both
  directions, and clip saturation.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl \
    rtl/spme_pkg.sv rtl/fihw_pkg.sv rtl/fvc_pkg.sv \
    tb/tb_hevc_fvc_top.sv --top-module tb_hevc_fvc_top -Mdir obj
./obj/Vtb_hevc_fvc_top
```

Replace the testbench name to run another one. Every module also lints
cleanly with `verilator --lint-only -Wall`, apart from two kinds of warning:
* Unused-bit warnings: bits deliberately dropped.
* A note that `rst_n` is both the asynchronous reset and the `disable iff`
  condition of the assertions. This is explained in the module headers.

## 7. Files

| file | contents |
|---|---|
| `rtl/spme_pkg.sv`, `rtl/spme_interp.sv`, `rtl/spme_cmp.sv`, `rtl/spme.sv` | sub-pixel motion estimation |
| `rtl/fihw_pkg.sv`, `rtl/fihw_mem1.sv`, `rtl/fihw_mem2.sv`, `rtl/fihw_datapath.sv`, `rtl/fihw.sv` | fractional interpolation |
| `rtl/fvc_pkg.sv` | transform types and coefficient tables |
| `rtl/fvc_clip.sv`, `rtl/fvc_tmem.sv` | clip and transpose memory |
| `rtl/fvc_bl_4x4.sv`, `rtl/fvc_bl_bfly.sv`, `rtl/fvc_bl_8x8.sv`, `rtl/fvc_dp_baseline.sv` | baseline datapaths |
| `rtl/fvc_rmult.sv`, `rtl/fvc_dp_reconfig.sv` | reconfigurable datapath |
| `rtl/fvc_dp_dsp.sv` | multiplier-array datapath |
| `rtl/fvc_2d.sv` | the 2D transform |
| `rtl/hevc_fvc_top.sv` | top level |
| `tb/tb_*.sv` | one testbench per module listed above, plus the top |
