# Stereo video prediction core

A stereo (two-camera) video encoder has to search twice. For each 16x16
macroblock of the left view it finds a motion vector (MV) in the previous left
frame. For the right view it finds both a motion vector in the previous right
frame and a disparity vector (DV) in the current left frame. It then picks the
better of the two or mixes them. A full search over a D1 (720x480) window of
[-64,+63] x [-32,+31] costs thousands of 256-pixel SADs per macroblock.

This core does all three searches on one 128-PE SAD engine. It uses three
ideas:

* **Hierarchical search.** The block is first matched over the whole range at
  a quarter of the resolution. The three best vectors are then refined at half
  and at full resolution.
* **Window reuse.** When the three best vectors lie close together, their
  refinement windows are loaded once, as their union.
* **Joint blocks.** The right-view block may also be predicted by one of eight
  weighted mixes of the best motion block and the best disparity block.

Alongside the core sit three small units that cut the work before a search
starts:

* a pre-decision that skips disparity search for still background blocks;
* a global-disparity histogram;
* a predictor that takes the right-view MV from the left view.

## Hierarchical block matching

| level | block | pixels | candidates per cycle | range searched |
|---|---|---|---|---|
| 2 | 4x4 | the macroblock averaged 4:1 in each direction | 8 | whole window (e.g. 32 x 16 positions for [-64,+63] x [-32,+31]) |
| 1 | 8x8 | averaged 2:1 | 2 | small range around each of the 3 level-2 winners |
| 0 | 16x16 | full resolution | 1/2 | small range around each of the 3 level-1 winners |

The averaging uses rounded means (`downsample.sv`). It is done once per
macroblock, one cycle after the host has written the current block's rows
into the current register set (`crs.sv`). The reference windows come from
the host already at the matching resolution.

Every level uses the same 128 absolute-difference PEs (`sad_tree.sv`). The
tree has fixed partial sums:

* eight 16-input sums, one per level-2 candidate;
* two 64-input sums, one per level-1 candidate;
* one 128-input sum, half of a level-0 candidate.

The comparison tree (`comparison_tree.sv`) takes up to eight SADs per cycle.
It keeps a sorted list of the three best (SAD, vector) pairs, and ties keep
the earlier candidate.

## The reference shift register network and the snake scan

This is the part that needs the most care.

The search window (SW) sits in a single-port RAM whose words are SW
*columns*, top row first. Each cycle one column is read and pushed into the
RSRN (`rsrn.sv`). The RSRN is a register array 8 columns wide and 16 rows
tall, with 8 more prefetch rows below it. The window visible to the PEs is
the first `W` columns (W = 4 at level 2, 8 at levels 1 and 0) by 16 rows.

The RSRN has three moves:

* **RIGHT:** the new column enters at the right edge and everything moves one
  place left. The candidate window slides one column right.
* **LEFT:** the mirror image. The new column enters at the left edge.
* **DOWN:** all rows move up by the level's vertical step, in one cycle
  (8 at level 2, 2 at level 1, 1 at level 0). The rows that come in are
  already in the prefetch rows, because each pushed column carries 24 pixels
  (16 visible plus 8 below).

The controller (`bmp_ctrl.sv`) walks the candidates in a snake:

1. Fill `W` columns.
2. Sweep right one column per cycle.
3. Step down.
4. Sweep left.
5. Step down, and so on.

Each step produces a full set of SADs, so after the fill there is no idle
cycle, even when the scan turns around. With `nx` by `ny` positions, a level-2
or level-1 search takes `W + ceil(ny/V)*nx + 3` cycles from the start command
to the done pulse (V = vertical step). That is the start cycle, `W-1` fill
cycles, one cycle per window position, and 3 cycles of pipeline. For example,
a level-1 refinement of +-2 takes 26 cycles.

The pipeline stages are:

* RAM read;
* RSRN update, one cycle later;
* adder-tree register;
* comparison.

The controller delays its own signals to match:

* the RSRN operation and the first row, by 1 cycle;
* the CMN half-select, by 2;
* the candidate vectors and valid flags, by 3.

`cmn.sv` (the current MUX network) lays the current block out so that PE `k`
always sees the current pixel that matches RSRN output `k`:

* level 2: eight copies of the 4x4 block;
* level 1: two copies of the 8x8 block;
* level 0: the left or right 16x8 half of the full block.

Level-2 note: the controller needs `nx >= 5`. With fewer positions, a sweep
does not re-fetch the columns whose prefetch rows the next DOWN step uses.

### Level 0: half a candidate per cycle

A 16x16 candidate needs 256 PEs, twice what exists. At level 0 each RSRN
window position is therefore held for two cycles:

* first cycle: the 16x8 window is matched against the **left** half of the
  current block, which is the left half of candidate `x = p`;
* second cycle: the same window is matched against the **right** half, which
  is the right half of candidate `x = p - 8`.

The top level keeps a small buffer of half-SADs indexed by candidate x. When
the second half of a candidate arrives, the two are added and the whole SAD
goes to the comparison tree. The cost is 8 extra window positions per sweep
(a sweep has `nx + 8` positions). A level-0 search therefore takes
`8 + ny*2*(nx+8) + 3` cycles from start to done. For a [-2,+2] refinement that is 141 cycles
for 25 candidates. The 8 extra positions are pure overhead, and they weigh
most for small ranges.

### Four-vector (AP) mode for free

The tree's two 64-input sums are the upper and lower 8x8 quarters of each
16x8 half SAD. During a level-0 search, `ap_select.sv` keeps the smallest SAD
of each 8x8 quarter and its vector. After the search, `ap_*` therefore holds
the four vectors of MPEG-4's advanced-prediction mode, taken from the same
candidates as the 16x16 vector and at no cost in cycles.

## Near-overlapped candidate reuse (NOCRC)

After a level-2 or level-1 search the three best vectors go to `nocrc.sv`.
For each pair it tests `|dx| < 4 and |dy| < 2`:

* **All three pairs are near:** a single window, the union of the three, is
  enough.
* **Not all pairs are near:** the first near pair in the order (1,2), (1,3),
  (2,3) is merged, and the third vector keeps its own window.
* **No pair is near:** three windows.

For each window the unit gives:

* its pose, the smallest x and y of the merged vectors;
* its extent, the spread max - min, which is added to the normal window size;
* a count of windows, 1 to 3.

The result is registered one cycle after `bmp_done`.

The core does not load windows itself. The host reads this result, loads the
needed windows into the two refinement RAMs (used ping-pong: fill one while
searching the other), and starts the refinement searches. The search origin
of each is the pose, and the range is widened by the extent.

## Joint blocks

After the right-view motion search, the host copies the best motion block
from a refinement RAM into RAM_MC (`mc_start`, 17 cycles). After the
disparity search, `jbg_start` streams the current block, the RAM_MC block and
the best disparity block through the JBG one column per cycle. The JBG
(`jbg.sv`) has 16 units (`jbg_unit.sv`), one per row.

Each unit forms, for n = 0..7, the joint pixel
`J_n = (n*DC + (8-n)*MC) / 8`. It builds this from the terms `x>>1`, `x>>2`
and `x>>3` of the two pixels: only adders, no multipliers. Each term is
truncated. Each unit also accumulates `|cur - J_n|`.

After 16 columns the eight joint SADs pass through the shared comparison
tree, which gives `jbg_mode` (the best n) and its SAD. While this runs, the
tree's best-three list is frozen, so the search results stay readable.

Mode n = 0 is the pure motion block. The pure disparity block is the ordinary
DE result.

## Half-pel refinement

The interpolation unit (`interp_unit.sv`) takes one window column per cycle.
It keeps the previous column, and from each pair of adjacent columns it makes:

* the horizontal half-pel samples between the two columns;
* the vertical samples between the rows of the new column;
* the diagonal samples, at the centres of the pixel squares.

All three use rounded bilinear averages.

After the level-0 search, `hp_start` streams the 18x18 window around the best
integer block through the IU, from a refinement RAM. The window covers one
extra pixel on each side. `hpel_refine.sv` keeps the IU's previous output as
well as its current one. With the outputs for column pairs (j, j+1) and
(j+1, j+2) in hand, it has every sample that column j of the eight half-pel
neighbours needs, at (+-1/2, 0), (0, +-1/2) and the four diagonals. Each
cycle it adds 8 x 16 absolute differences into eight accumulators.

Once the 16 block columns are done (21 cycles after the command), the
comparison tree picks the best of the eight. Its best-three list is frozen
during this step, as it is for the JBG. The host compares that result with
the integer SAD.

## Skip, background and global disparity

* **`mode_predecision.sv`** forms F_diff, the SAD between the current block
  and the co-located block of the previous right frame, one row per cycle.
  From it:
  * `skip` = `F_diff < th_skip_fdiff` and `SAD_ME < th_skip_sad`. The
    disparity search of this block can then be left out. 600 and 1200 are
    typical thresholds.
  * `background` = the block's MV is zero, or `F_diff < th_bg`.
* **`gd_estimator.sv`** counts the horizontal DVs of background blocks in a
  128-bin histogram (-64..+63). A 128-cycle scan then returns the most
  frequent DV as the global disparity `gd`. Ties go to the more negative DV.
* **`mv_predictor.sv`** stores every left-view MV of a 45x30-macroblock
  frame. For a right-view block in column `bx` it returns the MV stored for
  column `bx + round(gd/16)`, clamped to the frame. A small search around
  that vector then replaces the full right-view motion search.

In the top these units take the comparison tree's best result as SAD_ME and
as the MV or DV.

## Memories

| RAM | words x pixels | contents |
|---|---|---|
| RAM_L2 | 70 x 19 | two level-2 windows of 35 x 19 (enough for [-64,+63] x [-32,+31] at 1/4 resolution) |
| RAM_L01_1, RAM_L01_2 | 28 x 28 | one refinement window each, up to 28 x 28 pixels |
| RAM_MC | 16 x 16 | best motion block |

All four are single-port with a synchronous read (`sw_ram.sv`). Together they
hold 25232 bits.

The split between the RAMs is this design's own. It comes to about 20%
more than the 20.75 Kbit a tighter layout can reach, for example one with
level-C reuse in RAM_L2 and exact-size level-1 windows.

Throughput at 100 MHz for D1 at 30 fps in both views: there are 40500
macroblock positions per second, so each has a budget of 2469 cycles. Work per
position:

* left ME, right ME and DE: 572 + 572 + 540 = 1684 cycles of search;
* RAM_MC copy, joint-block decision and three half-pel refinements: 98 cycles;
* worst-case loading, one port cycle per column or row and every refinement
  window loaded on its own: 511 cycles.

The total is 2293 cycles, 93% of the budget. `tb_workload_d1` runs this whole
schedule on one macroblock and measures it.

## Interface and use

`prediction_core` is command driven. The host:

1. writes SW columns with `wr_en/wr_sel/wr_addr/wr_data` (one 28-pixel column
   per cycle), and the 16 current rows into the CRS;
2. starts a search with `bmp_start`, level, `nx`, `ny`, the vector of the
   top-left candidate (`bmp_origin`), the RAM, and the column where the
   window starts;
3. waits for `bmp_done` and reads `best_sad/best_mv/best_ok`, and one cycle
   later `nocrc_*`;
4. repeats for the refinement levels, reads `ap_*` after level 0, then uses
   `hp_*` (half-pel), `mc_*`, `jbg_*`, `mpd_*`, `gd_*` and `mvp_*` as needed.

Only one of search, copy, JBG and half-pel step may run at a time, and a RAM
must not be written while it is searched. An assertion in the top checks
the first rule; the second is the host's responsibility.

## Where this departs from the published architecture

* The published control unit sequences levels and window loads by itself,
  but its policy is not given. Here a host issues every step, and the
  off-chip bus and frame buffer are outside the core.
* The published frame scheduling, which shares the left DE window with the
  next left ME window, is left to the host. RAM_L2 has room for two windows.
* The four AP vectors are searched only over the level-0 candidates of the
  16x16 vector, not with their own refinement.
* The half-pel step only checks the eight neighbours of one integer vector.
  The sample filter is plain bilinear with rounding, chosen here.
* The RSRN orientation, its prefetch rows and the level-0 two-cycle pairing
  are this design's own ways of meeting the published rates: 8 / 2 / 1/2
  candidates per cycle and no bubbles.
* The JBG keeps each weighted term truncated. The DE-skip and
  background thresholds are inputs. The histogram range, the MV-store size
  and the whole-block rounding of gd are assumed. When to refresh gd (every
  M frames) is up to the host.
* RAM sizes differ, as described above.

## Simulating

Each module `rtl/X.sv` has a self-checking testbench `tb/tb_X.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_nocrc \
    -Irtl -y rtl -y tb +libext+.sv rtl/pc_pkg.sv tb/tb_nocrc.sv
./obj_dir/Vtb_nocrc
```

`tb_prediction_core` runs the whole core at its default sizes:

1. It writes a smooth synthetic frame displaced by (13, -6).
2. It runs the level-2 search over the full ME range, then NOCRC, then level 1
   and level 0 around the winners, and checks that (13, -6) is found.
3. It checks the AP quarter vectors. It then exercises the half-pel
   refinement, the copy, the JBG, the IU, the pre-decision, the histogram
   and the predictor.
4. It checks each result against a model computed in the testbench, and
   counts the mechanisms it hit: DOWN steps, LEFT sweeps, NOCRC one-window
   and multi-window cases, the half-pel step, the copy, the JBG and the IU.

It takes well under a minute.

`tb_workload_d1` plays the host through the full per-macroblock schedule,
described under Memories. It runs once with the D1 search ranges and once
with the smaller ranges used for 320x240 frames (2133 cycles, against 11111
at 30 fps). It checks every search, the half-pel step and the joint-block
decision, and checks the cycle total against the frame-rate budget.

To change a size, edit the parameters of `prediction_core`:

* `L2_H` and `L2_DEPTH`, the RAM_L2 geometry;
* `L01_H` and `L01_DEPTH`, the refinement RAM geometry;
* `CNT_W`, the counter width.

The shared constants are in `rtl/pc_pkg.sv`, including the number of PEs and
the RSRN shape. Those are tied to the 128-PE layouts and should not be
changed on their own.
