# Low-power bi-directional motion estimator

Motion estimation (ME) is the most expensive part of a video encoder. For
B frames it must search two reference frames: one forward, one backward.
This design keeps that cost low in two ways.

- **Integer-pel search on 1-bit images.** The search runs on binary images
  instead of 8-bit pixels. The cost of a candidate position is then a count of
  differing bits, a *sum of differences* (SOD) made of XOR gates and an adder
  tree.
- **Two searches in one pass.** The forward and backward searches run together
  on two shared SOD processing elements (PEs). For a P frame, the single search
  is split between the same two PEs, which makes it about twice as fast.

The integer result then goes to a second engine on 8-bit data. It decides
between intra and inter coding and refines the motion vector to half-pel
precision. Both jobs share one set of three SAD units and one pass over the
data.

The three parts form a macroblock (MB) pipeline:

| stage | block | works on |
|---|---|---|
| 1 | `ime` (integer ME) | MB *n* |
| 2 | `sw_fetch` (transmission of 8-bit reference windows) | MB *n-1* |
| 3 | `md_sme` (mode decision + sub-pel ME) | MB *n-2* |

Default configuration:
- MB size 16x16.
- Search range ±16 (parameter `SR`; ±32 is also supported).
- Half-pel refinement of ±1 half pel.
- 32-bit external data bus.

## 1. Binary pyramid (`mbppu`, `ppu_level`, `ppu_pe`, `row_rotator`)

Each MB is read as an 18x18 block: the MB plus a one-pixel border. From it,
three binary levels are built.

- **Binarisation.**
  - Each pixel A is compared with the mean of its four neighbours:
    `TH = floor((B+C+D+E)/4)`, `bit = A >= TH`.
  - The 18x18 block gives the 16x16 **LV3** bitplane.
- **Down-sampling.**
  - 2x2 groups are averaged with rounding, giving 9x9.
  - The result is padded by mirroring: row -1 copies row 1, column -1 copies
    column 1. This gives 10x10.
  - Binarising that gives the 8x8 **LV2** block.
  - Repeating the same steps (5x5 → 6x6 → binarise) gives the 4x4 **LV1**
    block.
- **Hardware.**
  - Each level is a three-row register file written cyclically. A small
    rotator (`row_rotator`) presents its rows in image order.
  - Under it sits a row of `ppu_pe`s: a comparator and a 4-input mean each.
  - The 8-bit block waits in a ping-pong memory (`pingpong_mem`), so the next
    MB can be loaded while the current one is processed.
  - LV3 takes two cycles per row: it reads 9 pixels per cycle.
  - `mbppu` takes **56 cycles** from start to done.
  - It also returns the inner 16x16 8-bit MB for the later stages.

## 2. Three-level binary search (`ime`, `lv1_search`, `lv2_search`, `lv3_search`, `sod_pe`)

Two `sod_pe`s are shared by all three levels. Each one XORs two 16x16 bit
blocks. An adder tree then gives, in the same cycle:
- sixteen 4x4 SODs,
- four 8x8 SODs,
- one 16x16 SOD.

The three levels:

- **LV1: full search over ±(SR/4-1)** (±3 for SR=16).
  - The sixteen 4x4 slots of a PE hold as many whole search rows as fit
    (2 rows of 7 positions at ±3).
  - Forward search (window 1) walks top-down on PE0. Backward search
    (window 2) walks bottom-up on PE1.
  - For a P frame, both PEs work on one window, from opposite ends, and the
    two minima are merged.
  - Latency: 6 cycles (B), 4 cycles (P).
- **LV2: candidate refinement.**
  - Candidates are:
    - the LV1 vector (×2),
    - the upper-right, upper and left neighbour vectors (halved to LV2
      units),
    - zero.
  - Each candidate is tested with a cross of four points: the centre, up,
    down and right. The left point is left out. The four points fill the four
    8x8 slots of one PE in one cycle.
  - All candidates are checked in sequence, so there is no branching.
  - B frames use one PE per direction, 5 cycles. P frames split the
    candidates over both PEs, 3 cycles.
  - Latency: 7 (B) / 5 (P) cycles.
- **LV3: ±2 full search at full resolution around the LV2 result (×2).**
  - A 20x20 bit register is filled from the window: two rows per cycle,
    10 cycles.
  - It is then circularly shifted in a snake order (right along a row, one up,
    left along the next row, and so on). The PE therefore always reads a fixed
    16x16 corner and no wide multiplexer is needed.
  - The forward PE reads the top-left corner. The backward PE reads the
    bottom-right corner, so walking the same snake in reverse covers its
    positions.
  - For a P frame the 25 positions are split: 13 go to each PE.
  - The 16x16 minimum and the four 8x8 minima are tracked together.
  - Latency: 37 (B) / 25 (P) cycles.

`ime` sequences the four phases and multiplexes the two SOD PEs between
them. In total it takes **110 cycles for a B MB and 94 for a P MB**.

Its outputs:
- the 16x16 and 8x8 integer motion vectors per direction,
- the LV3 search centre, which sets where the 8-bit window is fetched.

**Binary reference windows.** The binary windows of the reference frames are
written by the host through a row port (`sw_*`) while `ime_idle` is high.
- Window sizes: LV1 (4+2·(SR/4-1))², LV2 (8+SR)², LV3 (16+2·(SR+2))².
- For a P frame, `sw_mirror` writes one window into both direction memories.
  This lets both PEs search it.

## 3. Transmission (`sw_fetch`)

Half-pel refinement of ±1 around a ±2 integer neighbourhood needs a 22x22
8-bit window.
- Window pixel (3,3) is the LV3 search centre.
- The window origin is `MB position + centre - 3`.
- `sw_fetch` sends one request per direction and takes 121 32-bit beats
  (4 pixels per word, raster order). It writes them into the MD-SME window
  memory.
- A B-frame MB needs two windows, so it takes 242 beats.

## 4. Merged mode decision and half-pel search (`md_sme`, `sad_pe`, `avg_pe`, `interp_pe`, `mode_determiner`, `mv_determiner`)

Three `sad_pe`s each hold sixteen absolute-difference units and an
accumulator. The work runs in two phases.

- **MD pass, 16 cycles, one MB row per cycle.**
  - PE0 computes the line-based intra cost: for every row, the sum of
    |pixel − mean of that row| (`avg_pe` gives the row mean).
  - PE1 computes the forward 16x16 SAD at the integer vector.
  - PE2 computes:
    - P frame: the four 8x8 SADs at their own vectors.
    - B frame: the backward 16x16 SAD.
  - `mode_determiner` chooses inter if either inter cost is below the intra
    cost.
  - An intra MB goes straight to the residue step after these 18 cycles.
- **Half-pel pass, inter MBs only.**
  - The three PEs test the three horizontal half-pel offsets (-½, 0, +½) of
    one vertical offset at once.
  - Three passes cover the 3x3 neighbourhood.
  - `interp_pe` builds the reference rows on the fly by bilinear
    interpolation: `(a+b+1)>>1` or `(a+b+c+d+2)>>2`.
  - Blocks processed:
    - P frame: the 16x16 block (3 × 16 cycles), then the four 8x8 blocks
      (3 × 4 cycles each).
    - B frame: the 16x16 block forward, then backward.
  - `mv_determiner` keeps the minimum for each block.
  - For P frames, the 8x8 mode is chosen when the four 8x8 minima together
    beat the 16x16 minimum.
- **Residue.** After the decision, the block streams the MB's residue: one
  row of 16 signed 9-bit values per cycle, over 16 cycles.
  - Inter: pixel minus the half-pel prediction of the chosen partition.
    - P frame: the 16x16 block, or the four 8x8 blocks in 8x8 mode.
    - B frame: the direction with the lower half-pel SAD, forward on a tie.
  - Intra: the pixels themselves.
- An inter MB takes **132 cycles** in total; an intra MB takes 34.

The window memory is double-buffered. Stage 2 fills one bank while stage 3
reads the other.

## 5. Pipeline control and interface (`me_top`)

The pipeline moves forward one step when three conditions hold:
- all three stages are idle,
- a new MB is offered (`mb_valid`), or `flush` asks it to drain,
- no stage was started in the previous cycle.

On a step:
- the stage registers shift,
- both ping-pong memories swap,
- `mb_ready` marks the MB taken.

The stages start in the next cycle.

Host sequence for each MB:
1. Write the 18x18 block into the PPU memory (`cur_*`, 36 writes of 9
   pixels, rows 0..17 in two halves). This may happen at any time before
   the MB is offered.
2. While `ime_idle` is high, write that MB's binary windows (`sw_*`; for a
   P frame, set `sw_mirror`).
3. Offer the MB with `mb_valid` and its parameters: `mb_bframe`, `mb_x`,
   `mb_y`, and the neighbour predictors `pred_ur`, `pred_u`, `pred_l` in
   full-pel units.
4. After the last MB, hold `flush` high.

External memory port:
- `req_valid`/`req_ready`, with `req_dir`, `req_x`, `req_y` giving the window
  origin in pixels.
- Then 121 words arrive on `bus_valid`/`bus_data`. `bus_valid` may have gaps.

The MB's residue comes first, on `rsd_valid`/`rsd_row`/`rsd_data`: 16 rows
of 16 signed 9-bit values. `res_x`/`res_y` already name the MB.

Results then arrive with `res_valid`:
- MB position and frame type,
- `res_inter` and `res_mode8`,
- half-pel vectors `res_hmv16[dir]` and `res_hmv8[blk]`, in half-pel units,
  absolute,
- integer vectors `res_imv16`,
- the three costs used by the mode decision.

## 6. Timing against the original design

| | this RTL | original design |
|---|---|---|
| PPU | 56 | 48 |
| IME, B / P, ±16 | 110 / 94 | 96 / 76 |
| MD pass | 18 | 18 |
| MD-SME, inter, P / B (incl. residue) | 132 / 132 | 131 / 119 |
| transmission, P | 121 beats + 2 handshake | 121 |
| transmission, B | 242 beats + 4 | not stated separately |

The slowest stage sets the throughput:
- **P MBs** need about 134 cycles per MB. CIF at 30 fps (11,880 MB/s) then
  needs about 1.6 MHz, within the 1.73 MHz budget of the original design.
- **B MBs** are limited by fetching two windows over one 32-bit bus, about
  246 cycles. CIF 30 fps with B frames needs about 2.9 MHz, or a 64-bit bus.

## 7. Where this RTL departs from the original design

- **LV2 window access.** The original stores the LV2 window in nine
  partitioned register files, so that a small 16x16→10x10 selector suffices.
  The region boundaries are not specified. Here a direct 2-D selector picks
  the 8x8 blocks out of the 24x24 window. The function is the same; the area
  is larger.
- **Cycle counts** differ as listed above. Causes:
  - the PPU spends extra cycles on its down-sampled levels,
  - LV3 spends 10 cycles filling its shift register,
  - a hand-over cycle is added between phases.
- **Binary reference windows** and **neighbour predictors** are inputs. How the
  binary reference frames are stored is not part of this RTL.
- The integer-ME window memories are single-buffered. The host must write them
  while the IME is idle.
- **Residue of B MBs** uses one direction, the one with the lower half-pel
  SAD. The original does not say how a B-frame residue is formed.
- The step rule, the external bus protocol and the host protocol are this
  design's own.
- The ARM host, the on-chip bus and the frame memory of the original
  evaluation platform are not part of the RTL. The top-level testbench models
  them.

## 8. Files and simulation

- `rtl/bbme_pkg.sv`: the motion-vector type `mv_t` (signed 8-bit x, y) and
  the window size.
- `rtl/<block>.sv`: one module each, as named above.
- `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/bbme_ref_pkg.sv`: software models of the binary pyramid and the SOD,
  used by the search testbenches.
- `tb/tb_me_top.sv`: runs 16 MBs end to end through the full-size design
  (default parameters).
  - Its host and memory models feed a synthetic textured frame with planted
    motion.
  - It checks every result against a model: vectors, costs, mode, residue
    rows, and
    half-pel minima.
  - It checks the stage latencies.
  - It counts B/P MBs, inter/intra/8x8 decisions, cycles with all three
    stages busy, backward fetches and pipeline steps. It fails if any of these
    never happens.

Simulating a block with Verilator 5:

```
cd tb
verilator --binary --timing -Wno-WIDTHEXPAND -Wno-WIDTHTRUNC \
    -y ../rtl ../rtl/bbme_pkg.sv bbme_ref_pkg.sv \
    tb_me_top.sv --top-module tb_me_top -Mdir obj_me_top
./obj_me_top/Vtb_me_top
```

Notes:
- `bbme_ref_pkg.sv` is needed only by testbenches that import it.
- The package must come first on the command line.
- The testbenches mix 8-bit fields with `int` arithmetic and rely on the
  language's implicit widening. Verilator flags this as width warnings, hence
  the two `-Wno-WIDTH*` options; the RTL itself does not need them.
- The end-to-end run takes well under a minute.
