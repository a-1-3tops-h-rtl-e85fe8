# H.264/AVC baseline encoder core with four-stage macroblock pipelining

This is a SystemVerilog model of the prediction core of an H.264/AVC
baseline-profile encoder. The target is HDTV 720p (1280x720 at 30 frames/s)
with one reference frame, or SDTV D1 with four reference frames. The main
idea is a split of the encoder into four macroblock (MB) stages:

1. integer motion estimation (IME)
2. fractional motion estimation (FME)
3. intra prediction and the intra/inter decision (IP)
4. entropy coding and deblocking (EC/DB)

Each stage works on a different MB at the same time, so four MBs are in
flight. All stages start together. The pipeline advances when the slowest
stage has finished. An MB's data then move to the next stage through local
registers instead of a shared bus.

The core here builds stages 1 to 3 and the pipeline controller. Stage 4
(CAVLC entropy coding and the deblocking filter) sits outside and is reached
through the `ecdb_*` ports. The search-window memory is also outside, reached
through `ld_*`/`sw_*`/`cur_*` for loading and `fme_rd_*` for FME reads.

## Integer motion estimation: eight candidates per cycle

The IME is a full search. The range for reference 0 is horizontal [-64,63]
and vertical [-32,31]. References 1 to 3 use [-32,31] x [-16,15]. The search
compares the current 16x16 MB against every candidate position. It produces
the costs of all 41 blocks of the seven H.264 partition sizes at once:

- 16 blocks of 4x4
- 8 of 8x4 and 8 of 4x8
- 4 of 8x8
- 2 of 16x8 and 2 of 8x16
- 1 of 16x16

Three parts make this work.

* **PE-array SAD tree** (`ime_pe_sad_tree`). Each tree compares the MB with
  one candidate. To save logic, only a checkerboard half of the pels is used
  (128 absolute differences), and each pel loses its two low bits first.
  Sixteen 4x4 adder trees feed a tree that combines their sums into the
  larger block sizes. Eight copies work side by side on eight horizontally
  adjacent candidates. That gives 8 x 41 SADs per cycle.
* **Reference pel array** (`ime_ref_pels_array`). This is a 16 x 23 register
  array, since eight 16-pel-wide candidates that each step one pel to the
  right span 23 columns. It can shift one row up, one row down, or eight
  columns left. The search visits candidates in a snake order: down one
  column of 8-candidate groups, eight columns to the right, then back up.
  Each step therefore needs only one new row (or one new 8-column strip),
  and every other pel is reused from the registers.
* **Comparator trees** (`ime_comparator_tree`). There are 41 of them, one per
  block. Each adds the rate term from `ime_mv_cost_gen` to the eight SADs:
  lambda times the Exp-Golomb length of the MV difference. It keeps the
  cheapest candidate in the integer MV buffer. On a tie, the lower candidate
  index and the earlier best win.

`ime_engine` ties these together. It loads the current MB, runs the snake
scan, and keeps one MV buffer per reference frame. A search takes 16 cycles
of array fill, then one cycle per group of eight candidates, then 3 cycles
to drain. That is 1043 cycles for reference 0 and 275 for each smaller
reference.

## Fractional motion estimation: one interpolator, nine PUs

The FME refines the best integer MV to half-pel and then quarter-pel
precision. At each level it tests the 3x3 positions around the current best.
The cost is the SATD (Hadamard-transformed residual) plus the MV rate term.

* **Interpolator** (`fme_interp`). It takes one row of 10 integer pels per
  cycle. Five horizontal six-tap filters make the half-pels between those
  pels. Eleven vertical six-tap filters work on a column history to make
  the vertical and centre half-pels. After ten rows it holds an 11x11 grid
  of integer and half-pel samples around a 4x4 block. That grid covers all
  nine candidate positions.
* **4x4 processing units** (`fme_pu`). Each PU takes one row of residuals
  per cycle. It runs two 1-D Hadamard transforms with a ping-pong transpose
  register between them, and returns `(sum|coef| + 1) >> 1`. It accepts a
  new 4x4 block every four cycles.
* **`fme_engine`**. It folds the 16x16 partition into its sixteen 4x4 blocks,
  which all share one interpolator. Nine PUs score the nine candidates of
  each block in parallel. The engine runs a half-pel pass, then a quarter-pel
  pass around the half-pel winner, then a last pass that writes out the
  motion-compensated MB. Quarter-pel samples are rounded averages of grid
  samples, as the standard specifies. A full refinement takes 734 cycles.

## Intra prediction with early termination

`intra4x4_pred_gen` forms all nine intra 4x4 predictors from one line of 13
neighbour pels: L, K, J, I, M, A..H. It first computes the two-tap and
three-tap filtered values of that line. Every directional mode then just
picks its entries, so the arithmetic is shared by all modes. The unit also
reports whether a mode is allowed, given which neighbours are available.

`ip_engine` walks the 16 blocks in the standard zig-zag block order and tries
one mode per cycle, with SAD as the cost. It keeps a running sum of the best
cost of each block. After each block it compares that partial intra cost
with the best inter cost from the FME. Once the partial sum is higher,
intra cannot win, and the engine stops early with `pde_stop`. Intra is
chosen only when its full cost is strictly lower.

## Pipeline control and the top

`mb_pipeline_ctrl` walks the frame in raster order. It starts each valid
stage and waits until all of them are done. Then it shifts the MB positions
one stage on, filling from the front and draining at the end of the frame.
A slot lasts as long as the slowest stage plus three cycles of overhead.

`h264_encoder_top` adds the stage-1 sequencer and the hand-over registers.
For each reference frame, the sequencer requests a window load and then runs
the IME. The reference with the lowest 16x16 cost goes to the FME. For the
IP stage, the top keeps buffers for the bottom pel row and MVs of the MB
row above, plus the left column and top-left pel of the previous MB.

## Where this departs from the encoder it models

* There is no transform, quantisation or reconstruction loop. Intra
  predictors are made from original pels, not reconstructed ones.
* The FME refines only the 16x16 partition, in one reference frame. The
  original chose among all partitions and frames. The reuse of interpolated
  pels between vertically adjacent 4x4 blocks is also left out.
* The MV predictor is the MV of the MB above, not the H.264 median of three
  neighbours.
* The search window is loaded in full, 8 pels per cycle, before each search,
  and the load does not overlap the scan. The following are left out:
  - the reuse of the overlapping window between horizontally adjacent MBs
  - on-chip padding
  - the adaptive moving window
* Entropy coding, deblocking, the bus interfaces, the control processor and
  all SRAM macros are outside the core.
* Subsampling pattern, truncation depth and all handshakes are this design's
  own choices.

**Throughput.** Real time needs about 1000 cycles per MB at 108 MHz for 720p,
and 2000 at 81 MHz for D1 with four references. The compute cycles fit:
IME 1043 (720p) or 1868 (D1), FME 734, IP at most 145. The window loads that
this model does not hide add about 1400 to 2800 cycles. As built, the core
is therefore about 2.3 to 2.5 times short of real time at those clocks.

## Files

`rtl/h264enc_pkg.sv` holds the shared types: pel, SAD, cost and MV types, the
shift commands, and the 41-block geometry table with its order. The order
is:

- 0-15: 4x4 blocks in raster order
- 16-23: 8x4
- 24-31: 4x8
- 32-35: 8x8
- 36-37: 16x8
- 38-39: 8x16
- 40: 16x16

Each other file in `rtl/` is one block named as above. Every block has a
self-checking testbench `tb/tb_<block>.sv`, which compares it with a model
written independently in the testbench. `tb/tb_h264_model_pkg.sv` holds the
shared models:

- a synthetic test picture
- standard luma interpolation
- the 4x4 SATD
- the nine intra 4x4 predictors

`tb/h264_top_bench.sv` is the end-to-end bench. It plays the window loader,
the reference memory and stage 4. For every MB it checks:

- the MB order
- the pels handed to stage 4
- the motion-compensated MB against the standard interpolation
- the cost
- the expected decisions on regions built to favour reference 1, true
  motion, or intra

It also counts each pipeline mechanism and fails if one never happens:

- stalls
- a full pipeline
- searches of references above 0
- early intra termination
- intra and inter MBs
- both kinds of reference choice
- single- and multi-reference frames

There are two end-to-end testbenches. `tb/tb_h264_encoder_top.sv` runs a
smaller search range on a 4x3-MB frame. `tb/tb_h264_encoder_top_full.sv`
runs the top with every parameter at its default on a 2x2-MB frame.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends it if it hangs. With Verilator 5:

    verilator --binary --timing --assert -j 4 --top-module tb_fme_engine \
        -y rtl -y tb +libext+.sv -Irtl -Itb rtl/h264enc_pkg.sv tb/tb_fme_engine.sv
    obj_dir/Vtb_fme_engine +verilator+rand+reset+2

Swap the top-module name to run another testbench. Building the full-size
top takes about a minute, because the 41-output SAD trees are wide. The
simulation itself takes well under a second.
