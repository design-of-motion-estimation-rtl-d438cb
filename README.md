# Motion estimation engines for MPEG-4 and H.264

Motion estimation takes up most of a video encoder's work. For each 16x16
block of the current frame it searches a window of the previous frame for the
best-matching block. This library holds three hardware engines. Each one cuts
that cost in a different way:

| engine | prefix | what it searches | how it saves work |
|---|---|---|---|
| binary (shape) ME | `bme_` | MPEG-4 binary alpha blocks, ±16 | candidates are first grouped into classes by their number of one pixels; a SAD is computed only when the class matches the current block's |
| variable block size ME | `vbs_` | H.264 luma, 16x16 positions, all 41 sub-blocks | one line per clock; a candidate is dropped as soon as its partial SAD crosses an adaptive threshold |
| vertical reuse ME | `vr_` | four vertically adjacent macroblocks, ±16 each | the four overlapping search ranges are stored once; each memory module is read at one address per clock, and a small swap network in every PE handles rows that lie in the next module |

`me_top` places the three engines side by side. Each engine keeps its own
ports, prefixed `bme_`, `vbs_` and `vr_`. They share no logic, only the
package `me_pkg`, which holds the motion-vector and result types, the
sub-block numbering and two helper functions. Each engine follows the same
protocol:

1. While the engine is idle, write its buffers through simple write ports.
2. Pulse `start`.
3. Wait for the one-clock `done`. The results then stay stable until the next `start`.

A `start` while the engine is busy is ignored. Assertions in each controller flag it in simulation.

## Binary motion estimation: class skipping

A binary alpha block (BAB) is a 16x16 bit mask. Its SAD against a candidate is
the number of differing bits. The key observation is this: two masks with very
different numbers of ones cannot match well. Counting the ones of a candidate
is much cheaper than computing its SAD, because the count slides.

**Data path (`bme_top`).**

- `bit_row_buffer` holds the 16x16 current BAB and the 48x48 search window (range −16..+15).
- There are 16 PEs (`bme_pe`). Each PE has three parts:
  - XOR gates;
  - a 16-input popcount tree;
  - one add/subtract accumulator, which writes either `count_reg` or `sad_reg`.
- The window is scanned in two passes of 16 horizontal offsets.
  - In pass *p*, the 48-bit search row is cut to the 31 bits at columns 16p..16p+30.
  - PE *i* is wired to columns 16p+i..16p+i+15.
  - So one row read feeds 16 horizontally adjacent candidates.
- Column 47 is never needed, because the last offset starts at column 31.
- A 2:1 multiplexer feeds either the current row or zero into the XOR.
  - With zero, the PE counts the ones of the search row. This is how the candidate counts are built.
  - With the current row, the PE computes the SAD.
- The current BAB's own count is built the same way in PE 0, with the search input forced to zero.

**Schedule (`bme_ctrl`).** For each pass:

1. Count the first 16 rows (16 clocks).
2. For each of the 32 vertical positions:
   - `bme_class_match` compares the 16 candidate classes with the current class in the same clock.
   - On no match, the counts slide: add row *v*+16, then subtract row *v*. This takes 2 clocks.
   - On a match, every matching PE computes its SAD in the same 16 clocks. `bme_cas` keeps the smallest SAD.

Several matches in one slot cost no more than one. One search takes

    175 + 16 * SP clocks      (SP = slots with at least one match)

This breaks down as 16 clocks for the current count, then per pass 16 + 2·31 + 1 clocks, then 16 per matched slot, plus the `done` clock.

**Classes.**

- The class of a count *n* is ceil(n / 2^`class_shift`).
  - `class_shift = 4` gives 16 classes of 16 ones: class 1 is 1..16 ones, class 2 is 17..32, and so on.
  - `class_shift = 0` gives one class per count.
- A candidate matches when its class lies within `overlap` classes of the current one.
- The architecture is rated with one class per count and 32, 16 or 0 classes of overlap. On 198 synthetic boundary blocks, a CIF frame's worth, these settings average 847, 763 and 251 clocks per block.
- `overlap` ≥ 256 turns the engine into a full search. It then takes 1199 clocks.
- The count registers are 9 bits wide, so that an all-ones block (256) fits.

**Result.**

- The result is `best_sad` and `best_mv`, with x and y in −16..+15.
- If no candidate matched, `found` is 0.
- On a tie in SAD, the first candidate found wins. The scan goes pass by pass, top to bottom, and PE 0 first.

## Variable block size estimation: one line per clock, 41 results

The current macroblock is compared with every position of a 16x16 window,
using a 31x31-pixel reference area. The comparison runs one 16-pixel line per
clock.

**Line sums (`sad_line16`, `vbs_me_unit`).**

- `sad_line16` forms 16 absolute differences and sums them in three levels:
  - four 4-pixel group sums *g0..g3*;
  - two 8-pixel half sums;
  - the full line sum.
- Each H.264 sub-block is a rectangle of these columns over 4, 8 or 16 lines. It has its own accumulator register, which restarts at its row boundary:

| registers | block | columns fed | restart every | width |
|---|---|---|---|---|
| R70–R73 | 4x4 (mode 7) | g0..g3 | 4 lines | 12 |
| R60–R63 | 4x8 (mode 6) | g0..g3 | 8 lines | 13 |
| R50, R51 | 8x4 (mode 5) | halves | 4 lines | 13 |
| R40, R41 | 8x8 (mode 4) | halves | 8 lines | 14 |
| R30, R31 | 8x16 (mode 3) | halves | 16 lines | 15 |
| R20 | 16x8 (mode 2) | line | 8 lines | 15 |
| R10 | 16x16 (mode 1) | line | 16 lines | 16 |

- After line 4r+3, the 4x4 and 8x4 registers of row *r* are finished. The unit signals this with `sub4` and `row4`, one clock later. `sub8`/`row8` and `sub16` work the same way.
- The compare-and-select unit (`vbs_cs`) then compares each finished register with the stored best for that sub-block. It replaces the stored value only when the new SAD is strictly smaller.
- Results are stored in the order f0, e0–e1, d0–d1, c0–c3, b0–b7, a0–a7, 00–15 (see `me_pkg`):
  - Mode 6 is numbered a0–a3 in the top half and a4–a7 in the bottom half.
  - Other blocks are in raster order.
- With `h264 = 0` (MPEG-4), only the 16x16 result is kept.

**Early termination (`vbs_cs`, `vbs_ctrl`).**

This is the subtle part. The threshold after *k* lines (k = 1..16) is

    base     = min(sad_pred, best 16x16 SAD so far)
    min_cost = base / 16
    TH(k)    = error + k * (min_cost - dec)          (error = 64, dec = 4)

- Each line adds one sixteenth of the best SAD to the threshold.
- The error margin shrinks by `dec` per line. With the default values it is used up at line 16, where TH ≈ base.
- A candidate whose running 16x16 SAD (R10 plus the current line) reaches TH(k) is dropped in that same clock. `skip` goes high, and the next clock already works on line 0 of the next position.
- The test is not made:
  - on line 16, where the candidate is complete;
  - after `term_lines` lines.

  A small `term_lines` lets most candidates finish, so the smaller sub-blocks get exact results. This trades speed for accuracy in the 4x4 to 8x8 modes. A dropped candidate's partly finished sub-blocks have already been compared, and correctly so: a sub-block that finished before the drop holds its true SAD.
- `sad_pred` lets a predicted SAD set the first threshold. All ones disables it.
- A 16x16 result finished in the previous clock is bypassed into `base`. The first line of the next candidate therefore already sees it.

Positions are visited in raster order, x fastest. One search takes (lines processed) + 2 clocks:

- 4098 clocks with no early drop;
- about 800 clocks on average in the synthetic test scenes with the default margins, measured over the 1350 macroblocks of a 720x480 frame.

## Vertical data reuse: one address for every module

Four vertically adjacent macroblocks, each searched over ±16 (32x32
positions), have search ranges that overlap by two thirds. Their union is a
strip of 96 rows by 48 columns. This strip is stored once, in six modules
M0..M5 of 16x48 pixels. Block *k*'s range is M(k), M(k+1) and M(k+2). PE *k*
(`vr_pe`) is wired to exactly these three modules, so neighbouring PEs share
modules.

**Scan (`vr_ctrl`).**

The loops run in this order: horizontal offset *hx* (32 values), then slot
*t* (16 values), then line *l* (16 values).

- In slot *t*, each PE evaluates two candidates at once:
  - the top candidate at vertical offset *t*;
  - the bottom candidate at *t*+16.
- Every module is read at the same row, (t + l) mod 16, and the same column *hx*. Each module therefore needs only one read port.
- Line *l* of the top candidate lies in M(k) while t + l < 16, and in M(k+1) after that.
- The bottom candidate moves in the same way, from M(k+1) to M(k+2).

**Exchange (`vr_pe`).**

- PE_a reads M(k) before the wrap point. After it, it reads M(k+2), through its 128-bit input multiplexer.
- PE_b always reads M(k+1).
- After the wrap point, PE_b therefore holds the top candidate's line and PE_a the bottom one's. MUX_a and MUX_b swap the two line sums, so that `reg_a` keeps accumulating the top candidate and `reg_b` the bottom one.
- `vr_cs` takes the smaller of the two after 16 lines and keeps the running best per block.

Ties are resolved as follows:

- between the two candidates of a slot: the top one wins;
- over time: the first one found wins.

A search of four blocks takes 16·16·32 + 2 = 8194 clocks, which is 2048 per
macroblock. For a CIF frame of 99 groups, that is 811,206 clocks.

**Loading.**

- Module *m* holds strip rows 16m..16m+15. It is loaded through a 32-bit word port.
- Current block buffer *k* is loaded through its own 32-bit word port.
- Sliding the strip to the next column of macroblocks is left to the loader.

## Where this design departs from its source description

- **Binary ME.**
  - Count registers are 9 bits, not 8, because a block can hold 256 ones.
  - The class width and overlap are run-time inputs.
  - A count of zero is a class of its own.
  - A search takes 15 clocks more than the source's 16 + 16 + 128 + 16·SP. Pass 1 counts its first window afresh (+16), each pass ends with one clock (+2), and `done` adds one (+1). The last position of each pass needs no slide (−4).
- **Variable block size ME.**
  - The accumulated threshold formula is this design's reading of the error / dec / min_cost rule for the 16x16 block. Only R10 is tested.
  - The per-mode threshold parameters of the smaller blocks are not used.
  - Scan order is raster, not spiral.
  - The sub-block registers have their own adders instead of a set of shared accumulators. The results are identical.
  - The search buffer can deliver any unaligned 16-pixel line in one clock.
- **Vertical reuse ME.**
  - The search range is ±16, which costs 2048 clocks per macroblock, not 512. The 512 figure corresponds to a 16x16-position range. At 2048 clocks per macroblock, 1280x1024 at 30 frames/s would need a clock of about 315 MHz.
  - Only the 16x16 SAD is produced.
- **All engines.**
  - Buffers are plain register arrays with combinational reads.
  - Buffers are loaded only while the engine is idle. There is no double buffering, so loading time adds to search time.
  - Resets are asynchronous and active low.
  - The frame memory that feeds the buffers is not part of the RTL. Its connections are the buffer write ports on `me_top`.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and stops itself. With Verilator 5:

    verilator --binary --timing rtl/me_pkg.sv tb/tb_me_top.sv -y rtl --top-module tb_me_top
    ./obj_dir/Vtb_me_top

| testbench | covers |
|---|---|
| `tb_me_top` | all three engines at their default sizes, running in parallel; results and clock counts against reference models; counts binary slots skipped and multi-match slots, block-size early drops and full candidates, vertical-reuse exchanges |
| `tb_bme_top` | binary engine, six scenes × five class rules (16 classes, one class per count with overlap, full search, …) |
| `tb_vbs_top` | block-size engine: full search, H.264 and MPEG-4 with termination, predicted threshold, `term_lines` |
| `tb_vr_top` | vertical-reuse engine: 99 searches of four blocks (one CIF frame), exchange clock count, clocks per frame |
| `tb_bme_frame` | binary engine over 198 boundary blocks (one CIF frame) with 32, 16 and 0 classes of overlap; average clocks |
| `tb_vbs_frame` | block-size engine over the 1350 macroblocks of a 720x480 frame, with and without termination; clocks per frame |
| `tb_vbs_me_unit`, `tb_vr_pe`, `tb_sad_line16`, `tb_pixel_buffer`, `tb_bit_row_buffer` | the building blocks |

The reference models in the testbenches are written directly from each
engine's rule: brute force over every candidate, the same class rule and the
same threshold formula. They do not reuse any RTL. All testbenches finish
within about 15 seconds.
