# Conditional motion estimation with a 2D-logarithmic block search

Motion estimation takes most of the work in a video encoder. Most of a typical
frame has not moved at all, so it pays to decide first, cheaply, whether a
block needs a search. Only the blocks that changed are searched. This design
does that for 4x4 blocks of 8-bit grey-level frames:

1. The current block is compared with the block at the same place in the
   reference frame (its *co-located* block). The comparison is a sum of
   absolute differences (SAD).
2. If that SAD is not above a threshold, the block is taken as still. It gets
   the motion vector (0, 0) after two clock cycles.
3. Otherwise a 2D-logarithmic search looks for the best-matching block within
   ±16 pixels. It uses five parallel SAD units for its diamond steps and nine
   for its final square step.
4. The motion vector then drives motion compensation. This copies the matching
   reference block into a motion-compensated frame store.

Next to the SAD test, the block also goes through the pixel/block activity test
of conditional motion estimation. A pixel is active when its frame difference is
above T_g. The block is active when more than T_p of its pixels are active. That
result is an output (`blk_active`); it does not gate the search.

The architecture follows the FPGA design in A. Kakarala, *Hardware
Implementation of Conditional Motion Estimation in Video Coding* (MS thesis,
University of North Texas, 2011). That work specifies the block structure, the
search rules and the sizes. The timing, the handshakes, the memory organisation
and the motion-compensation unit were not specified there and are choices made
here. The section "What is specified and what is chosen" lists them.

## Data flow

```
            wr_addr/wr_data                        wr_addr/wr_data
                  |                                      |
           +-------------+  co-located block     +---------------+
           | current     |-------+-------------->| reference     |  16 block
           | frame_ram   |       |   +-----------| frame_ram     |  read ports
           +-------------+       |   |           +---------------+
                 | cur_blk       v   v                ^ 14 candidate
                 |          +---------+              | positions
                 |          | sad4x4  |--> sad_threshold_cmp --SAD_TH--+
                 |          +---------+                                 |
                 |          active_block_classifier --> blk_active      |
                 v                                                      v
   +---------------------------------------------------------------------------+
   | motion_estimation                                                         |
   |  search_range --> X_low..Y_high                                           |
   |  diamond_generate --5 pos--> 5 x sad4x4 --> sad5_comparator --+           |
   |        ^  new centre / new step  <----------------------------+           |
   |  square_generate  --9 pos--> 9 x sad4x4 --> sad9_comparator --> MV, SAD   |
   |  FSM: IDLE -> DEVAL -> DCMP -> (DEVAL ... | SEVAL -> SCMP) -> IDLE        |
   +---------------------------------------------------------------------------+
                 | done, mv_x, mv_y
                 v
        motion_compensation --(fetch ref block at cur+MV)--> compensated frame
```

## The search, step by step

This is the part that takes the most care. `motion_estimation` runs it and keeps
three registers: the current position `cur_pos`, the search centre `center` and
the step size `step`.

**Search area.** Candidate positions (top-left pixels) may lie from 16 pixels
left of and above the current block to 16 pixels right of and below it. The
area is clipped so that a candidate never leaves the frame (`search_range`).
The result is four inclusive bounds `x_low`, `x_high`, `y_low`, `y_high`.

**Diamond step** (two cycles: DEVAL, then DCMP).
- `diamond_generate` places five candidates: the centre, then the points
  `step` pixels to the left, right, up and down, in that order.
- A candidate outside the bounds is flagged invalid and takes no part.
- In DEVAL the reference store returns the five blocks and five `sad4x4`
  units load their accumulators.
- In DCMP `sad5_comparator` picks the smallest valid SAD. A tie goes to the
  earlier candidate, so the centre wins any tie.
- The winner becomes the new centre.
- The step is halved (`step >> 1`) in two cases: the centre won, or the
  winner lies on the border of the search area (one of the four bounds).
  Otherwise the step is kept.
- If the new step is 1 or less, the square step follows. Otherwise another
  diamond step runs.

**Square step** (two cycles: SEVAL, then SCMP). `square_generate` places the
centre and its eight neighbours at distance one. Nine `sad4x4` units evaluate
them in one cycle. `sad9_comparator` picks the smallest, with the centre
winning ties. The motion vector is the winning position minus the current
position, signed. The best SAD goes with it.

**Skip.** The first DCMP also looks at `sad_th`. If the co-located SAD did not
exceed the threshold, the search ends there: the vector is zero and the best
SAD is the co-located SAD.

**Why it always ends.** The centre only moves to a strictly better SAD, so it
cannot cycle. Once the centre wins, the step halves, and the step only ever
shrinks.

**Latency.** Count from the clock edge that takes `start` to the edge after
which `mv_out` is high:

- a still block: **2 cycles**;
- a searched block: **2·D + 2 cycles**, where D is the number of diamond steps.

The number of diamond steps depends on the picture, so the latency is not fixed.
With step 4 and no movement of the centre, D = 2 (step 4, then step 2), so the
latency is 6 cycles. `done` pulses for one cycle with the result. `mv_out`
stays high until the next `start`. A `start` while `busy` is high is ignored.

A step size of 0 is treated as 1. A search that starts with step 1 runs one
diamond step at step 1 and then the square step.

## The SAD unit

`sad4x4` holds 16 subtractors, 16 absolute-value units, one adder over the 16
magnitudes and an accumulator register, all working in parallel. With `en` high,
the register loads the block sum, or with `acc` high adds it to what it holds.
That lets bigger blocks be matched as several 4x4 pieces. The estimator only
loads. The result is registered, with one cycle of latency and one block per
cycle. A 4x4 SAD is at most 16·255 = 4080, so it fits the 12-bit `sad_t`.

The top level has 15 SAD units in all: one for the co-located test and 5 + 9
in the estimator.

## Frame stores

`frame_ram` holds one 64x64 frame in raster order (address `y*64 + x`). It is
written one pixel per clock. Its read ports are asynchronous block ports: give
a position and get the 4x4 block there in the same cycle. The reference store
has 16 ports:

- 0: the co-located block;
- 1–5: the diamond candidates;
- 6–14: the square candidates;
- 15: the motion-compensation fetch.

The current store has one port. Having this many ports is what lets all
diamond or square SADs run in one cycle. It is also the costliest part of the
design: each port is sixteen 4096-to-1 byte multiplexers. If area matters more
than speed, this is the place to change. For example, copy the ±16 search
window into a register array, or evaluate candidates over several cycles
through fewer ports. The estimator's interface (`ref_pos[14]` out,
`ref_blk[14]` in) already separates the search from the storage.

## Activity test

`active_block_classifier` is combinational. It takes the same co-located pair
of blocks, counts the pixels whose absolute difference is above `t_g`, and
raises `active` when that count is above `t_p`. Equality counts as inactive at
both levels. With 4x4 blocks the count runs from 0 to 16, so T_p is meaningful
from 0 to 15. In the conditional scheme T_g is chosen adaptively, by a Bayesian
rule. That rule is not part of this RTL: T_g is an input.

## Motion compensation

When `done` pulses, `motion_compensation` fetches the reference block at
`cur_pos + (mv_x, mv_y)` through port 15. In the same clock it writes the block
into its own 64x64 store at `cur_pos`. `mc_done` follows one cycle later. The
encoder runs every block of a frame through `cme_top`. The store then holds the
motion-compensated prediction of the current frame, and `mc_rd_addr` /
`mc_rd_data` read it back one pixel at a time (combinational read). A still
block gets a copy of its co-located reference block.

## Top-level interface (`cme_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `cur_we`, `ref_we` | in | 1 | write `wr_data` into the current / reference store |
| `wr_addr`, `wr_data` | in | 12, 8 | raster pixel address `y*64+x` and pixel |
| `start` | in | 1 | take a request (when `busy` is low) |
| `currblk_x`, `currblk_y` | in | 7 | top-left pixel of the current block |
| `step_size` | in | 5 | initial step of the search (4 in the reference configuration) |
| `threshold` | in | 12 | SAD threshold for the still/moved decision |
| `t_g`, `t_p` | in | 8, 5 | pixel and block thresholds of the activity test |
| `busy` | out | 1 | a request is in progress |
| `sad_th` | out | 1 | co-located SAD is above `threshold` |
| `mv_out` | out | 1 | result valid; held until the next `start` |
| `mv_x`, `mv_y` | out | 8 signed | motion vector (best position − current position) |
| `best_sad` | out | 12 | SAD of the chosen block |
| `blk_active` | out | 1 | activity test result; valid from the cycle after `start` |
| `mc_done` | out | 1 | compensated block written (one-cycle pulse) |
| `mc_rd_addr`, `mc_rd_data` | in, out | 12, 8 | read port of the compensated frame |

Before sending requests, load both frames. The request inputs are sampled with
`start`; the position is held inside, so the inputs may change afterwards.
`threshold`, `t_g` and `t_p` are read while the request runs, so hold them
until `mv_out` rises.

Parameters: `IMG_W = 64`, `IMG_H = 64`, `SEARCH_RANGE = 32`. Widths
(`me_pkg`) are fixed:

- 8-bit pixels;
- 7-bit coordinates, so frames up to 128 pixels wide;
- 5-bit step, up to 31;
- 12-bit SAD;
- 8-bit signed vectors.

Larger frames need `COORD_W`/`MV_W` widened in `me_pkg`.

## What fits

The reference configuration is one 64x64 frame pair, 4x4 blocks, a 32x32
search area, step 4 and threshold 100. It fits the defaults exactly: each store
holds 64·64 = 4096 pixels, and the search reaches ±16.

The rate-distortion experiments this scheme was designed around used the
"tennis", "football" and "flower garden" test sequences, 19 frames each. Those
sequences are normally distributed at SIF size, 352x240 = 84,480 pixels per
frame. That is 20 times what a store holds, and beyond the 7-bit coordinates, so
they do not fit without widening `me_pkg` and raising `IMG_W`/`IMG_H`.

## What is specified and what is chosen

Taken from the reference design:

- the split into SAD, comparator and motion-estimation blocks;
- the sub-units of the estimator: search range, diamond generate, square
  generate, five and nine parallel SAD units, SAD5 and SAD9 comparators, a
  single FSM;
- the 16-lane SAD datapath with its accumulator;
- the search rules: five-point diamond; halve at the centre or the border;
  nine points at step 1; MV = best − current;
- the skip rule: SAD above the threshold means moved;
- two frame RAMs;
- the sizes: 4x4 blocks, 8-bit pixels, 64x64 frames, a 32x32 search area,
  step 4, threshold 100;
- the port names `start`, `mv_out`, `mv_x`, `mv_y`, best SAD, `SAD_TH`.

Chosen here:

- **Search area.** 32x32 is read as displacements of up to ±16, clipped to the
  frame. The clipped edge counts as the border for the halving rule.
- **Invalid candidates.** Candidates outside the area are excluded rather than
  clamped.
- **Candidate order and ties.** The centre comes first and wins ties.
- **Step size.** It is an input, as in the reference test configuration. One
  description of the algorithm instead sets it to half the search range; here
  the caller passes that value if wanted.
- **End of the diamond steps.** The square step starts when the new step is
  ≤ 1, not only when it is exactly 1.
- **Equality.** A SAD equal to the threshold counts as still.
- **Result when skipped.** A skipped block reports the co-located SAD as its
  best SAD.
- **Timing.** Two cycles per step; `start`/`busy`/`done`; `mv_out` held; reset.
- **Memories.** The frame stores have asynchronous multi-port block reads and a
  pixel write port.
- **Motion compensation.** Only its purpose was given: the block copy, its
  store and its read port are this design's own.
- **Activity test.** It classifies the co-located 4x4 block with T_g and T_p as
  inputs. It is reported, and it does not control the search.

The reference design reports one result of its own: block (8,4), step 4,
threshold 100 gave vector (12, 6) and best SAD 103. That run used its own test
frames, which are not available, so it cannot be reproduced here. The tests run
the same request on generated frames.

Not built: the adaptive (Bayesian) choice of T_g, and the rest of an encoder
(residual quantisation, entropy coding).

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with the line
`TB_RESULT checks=N failures=M` and stops itself if it hangs.

- `tb_me_model` is a package, not a test. It holds a plain procedural model of
  the whole conditional search (co-located SAD, diamond steps, border rule,
  square step). The model also gives the expected cycle count. The package also
  builds smooth test scenes, with blobs on a gradient plus noise; the current
  frame is the reference shifted by a known (dx, dy).
- `tb_motion_estimation` runs the estimator alone over six frame pairs, with
  the testbench playing the frame stores. It checks vector, SAD and exact
  latency against the model, and that every search rule occurred.
- `tb_cme_top` is the end-to-end test, with the top at its default parameters.
  For three frame pairs it loads both frames, estimates all 256 blocks of the
  frame and checks each result, latency and activity decision. It then reads
  back and checks the whole compensated frame. It counts, from the design's own
  signals:
  - skips, diamond moves, and halvings at the centre and at the border;
  - excluded candidates, square steps, and searches started at step 1;
  - compensated blocks, and active and inactive blocks.

  A mechanism that never occurs is a failure. It runs in about 15 seconds.
- The unit testbenches (`tb_sad4x4`, `tb_frame_ram`, `tb_search_range`,
  `tb_diamond_generate`, `tb_square_generate`, `tb_sad5_comparator`,
  `tb_sad9_comparator`, `tb_sad_threshold_cmp`, `tb_motion_compensation`,
  `tb_active_block_classifier`) each compare against values computed in the
  testbench, with random and edge-case inputs.

Run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/me_pkg.sv tb/tb_me_model.sv tb/tb_cme_top.sv --top-module tb_cme_top
./obj_dir/Vtb_cme_top
```

For a unit test, name its file and `--top-module`. Leave out `tb/tb_me_model.sv`
unless the test imports it (only `tb_cme_top` and `tb_motion_estimation` do).
The testbenches use only `$urandom`, so they need no constraint solver. Every
register that is read is reset or loaded first, so they also run on two-state
simulators.

Lint with `verilator --lint-only -Wall -y rtl +libext+.sv rtl/me_pkg.sv rtl/<module>.sv`.
It reports unused signals in `motion_estimation`: the diamond comparator's best
SAD and its halving flags, and the square comparator's best position. These are
comparator outputs that the controller does not need; the end-to-end test reads
the halving flags hierarchically to count halvings. In `cme_top` the
classifier's pixel count `active_cnt` is likewise unused. It also
reports `SYNCASYNCNET` for `rst_n`, because the assertions use it
synchronously while the registers use it asynchronously. Neither warning points
to a fault.

## Files

| file | contents |
|---|---|
| `rtl/me_pkg.sv` | widths, pixel/block/position/range types, `in_range` |
| `rtl/cme_top.sv` | top level: stores, co-located SAD, threshold, activity test, estimator, compensation |
| `rtl/frame_ram.sv` | frame store, pixel write, multi-port 4x4 block read |
| `rtl/sad4x4.sv` | 16-lane SAD with accumulator |
| `rtl/sad_threshold_cmp.sv` | SAD > threshold |
| `rtl/active_block_classifier.sv` | T_g / T_p activity test |
| `rtl/motion_estimation.sv` | 2D-logarithmic search: FSM, 14 SAD units, generators, comparators |
| `rtl/search_range.sv` | search-area bounds |
| `rtl/diamond_generate.sv`, `rtl/square_generate.sv` | candidate positions |
| `rtl/sad5_comparator.sv`, `rtl/sad9_comparator.sv` | diamond decision; final choice and vector |
| `rtl/motion_compensation.sv` | block copy into the compensated frame |
| `tb/tb_*.sv` | testbenches and the reference model package |
