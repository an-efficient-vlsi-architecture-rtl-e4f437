# Line-based 2-D 9/7 lifting DWT with two-row parallel scanning

This is synthesizable SystemVerilog for a one-level, two-dimensional discrete
wavelet transform (DWT) that uses the CDF 9/7 filter pair, the irreversible
wavelet of JPEG 2000. It implements the filters with the lifting scheme. It
follows the architecture described in "An Efficient VLSI Architecture for
Lifting-Based Flipping Discrete Wavelet Transform".

The design has three main ideas:

- **Two rows at a time.** Each clock cycle it reads one column of a *pair* of
  image rows, x(2r, j) and x(2r+1, j). Two row filters transform the two
  rows side by side, so every vertical pair that the column transform needs
  is already on chip.
- **Three registers between the passes.** Because both rows of a vertical
  pair are ready, the "transposing buffer" between the row and column
  transforms is just three registers and two multiplexers. Raster-order
  designs need a line of storage here.
- **No frame memory.** The column transform never goes back to earlier rows.
  For each column it keeps a few lifting intermediates in a small memory,
  the temporal buffer, which is a few words per column.

The result is two pixels per clock cycle at a small cost: about two
multipliers' worth of logic per lifting step and a buffer that grows linearly
with the image width.

## The arithmetic

A 1-D 9/7 lifting transform splits a signal x into even samples e(m) = x(2m)
and odd samples o(m) = x(2m+1). It then runs two predict/update steps:

```
step 1:  d1(m) = o(m)  + alpha * (e(m)  + e(m+1))
         s1(m) = e(m)  + beta  * (d1(m-1) + d1(m))
step 2:  H(m)  = d1(m) + gamma * (s1(m) + s1(m+1))
         L(m)  = s1(m) + delta * (H(m-1) + H(m))
```

The lifting factors are alpha = -1.586134342, beta = -0.052980119,
gamma = 0.882911076 and delta = 0.443506852. L is the low-pass (approximation)
output and H the high-pass (detail) output. No final scaling by K is applied,
so the subbands are the raw lifting outputs. To normalise them, multiply LL
by K^2 and HH by 1/K^2 (K = 1.149604398); LH and HL keep unit gain.

Each equation is evaluated by one **computing unit** (`lift_unit`):
y = i2 + k * (i1 + i3). The two neighbours are added *before* the single
multiplication. That removes a multiplier from the path and halves the
multiplier count compared with multiplying each neighbour. The unit has three
register stages (pre-add, multiply, add), and its result appears three cycles
after its operands.

**Number format.** Samples are 20-bit two's-complement integers everywhere.
Pixels are fed in as 20-bit values; the tests use 8-bit pixels. Coefficients
are 18-bit fixed point with 14 fractional bits (`dwt_pkg`: ALPHA = -25987,
BETA = -868, GAMMA = 14466, DELTA = 7266, each round(c * 2^14)). A product is
rounded to the nearest integer, with halves going up: floor((k*x + 2^13) / 2^14).
Over 256 x 256 random 8-bit images, the largest difference from a
floating-point 9/7 transform was 3.5.

**Edges.** Both directions use whole-sample symmetric extension, so
x(-1) = x(1) and x(N) = x(N-2). In lifting terms this takes two rules: at the
right or bottom end the missing e(R) is replaced by e(R-1), and at the left
or top end the missing d(-1) is replaced by d(0). Each rule is a multiplexer
in the lifting step.

## The lifting step and its event protocol

`lifting_step` is the building block of both filters, and it is the least
obvious part of the design. It performs one predict/update pair, like step 1
or step 2 above, on a stream of (even, odd) pairs.

**Pipeline.** The step is two computing units in a row: the predict unit,
then the update unit. Each unit is cut into three register stages (pre-add,
multiply, add), so no stage holds more than one multiplier. Pair m can only
be completed when pair m+1 arrives, because the predict needs e(m+1).
Therefore an *event* for pair m+1 produces the output pair (s(m), d(m)) six
cycles later.

**State.** Between events the step keeps the last even sample, the last odd
sample, a tag and a "that pair was pair 0" flag, read and written in the event
cycle. The last predict output is kept in a second memory, read and written
when the predict unit delivers the next one. Both are `temporal_buffer`s
indexed by a **slot**. Many independent
sequences can therefore share one step, interleaved at one event per cycle:

- A row filter uses one slot, so the buffer is plain registers.
- The column filter uses N slots, one per subband column.

**Events.** Each cycle carries at most one event:

- `in_valid`: a new pair for `in_slot`. `in_first` marks pair 0. That event
  produces nothing; it only loads the state, and the left-edge rule is
  applied when pair 1 arrives.
- `in_flush`: no new data. It completes the last pair of the slot's sequence
  using the right-edge rule, and its output carries `out_last`.

Each output returns the tag that entered with *its* pair. The row filters use
the tag to carry the row number and coefficient index. The column filter uses
it to carry the output row.

**Cascading.** A 9/7 filter is two steps in cascade. Step 2 needs its own
flush after step 1's flush output has reached it. The flushes therefore have
to be scheduled so that they never fall in a cycle where the step receives
data.

## The recombined step of the column filter

The column filter keeps state for every column, so the number of words kept
per slot sets the size of its memory. `lifting_step_rc` computes the same
predict/update step as `lifting_step`, but it regroups the sums so that only
two words per slot survive between visits.

When pair t arrives, each product is formed once and used twice:

```
P = A*e(t)          d(t-1) = p + P          p <= o(t) + P
Q = B*d(t-1)        s(t-1) = q + Q          q <= e(t) + Q
```

- **p** is a predict that is still waiting for its right neighbour's
  product.
- **q** is an update that is still waiting for its right neighbour's
  product.

Edge handling changes with this form:

- **Right edge.** There is no next even sample to wait for, so the mirror is
  applied when the last pair arrives (`in_last`): p <= o + 2P. The closing
  flush then only reads p.
- **Left edge.** Pair 0 stores q = e(0), and the first update adds Q twice.

The step has four register stages, each with one multiplier or at most two
adders:

1. P = A*e(t).
2. Read p, form d = p + P, write p back.
3. Q = B*d.
4. Read q (with its tag and flag), form s = q + Q, write q back.

An output leaves four cycles after its event. Each state word lives in its
own small memory and is read and written within one stage, so events for any
slots may follow each other every cycle. With two steps and two words for each of N slots, the column
filter's line memory is 4N words. The plain form would need 6N.

Because each product is rounded separately, a result can differ by one LSB
from the pre-add form. The testbench model has a matching variant.

## Dataflow through a frame

```
 in_top ──► row filter (rows 2r)   ──┐ L,H of both rows     ┌──────────────┐
                                     ├────────────────────► │ transposing  │ one vertical pair
 in_bot ──► row filter (rows 2r+1) ──┘ every other cycle    │ buffer       │ per cycle
                                                            └──────┬───────┘
                       controller (counts, flushes, in_ready)      ▼
                                                            column filter ──► out_low / out_high
                                                            (2 lifting steps, N-slot temporal buffers)
```

1. **Row filters** (`dwt_row_filter`, two instances). Each one takes one
   pixel per cycle. A `splitter` pairs each odd pixel with the even pixel it
   holds. Two lifting steps (alpha/beta, then gamma/delta) then produce L(k)
   and H(k) once per pair, so every other cycle. Both instances get the same
   control signals and run in lockstep; an assertion in the top checks this.
2. **Transposing buffer** (`transpose_buffer`). When the row filters deliver
   L and H of rows 2r and 2r+1:
   - In the same cycle, it forwards the low-pass vertical pair
     (L_top, L_bot) as column slot 2k.
   - It parks the high-pass pair (H_top, H_bot) in two registers and sends it
     in the next cycle as slot 2k+1.
   - A third register holds the pending flag and the tags.
   - Two multiplexers choose between the direct pair and the parked pair.

   The column filter therefore gets exactly one vertical pair per cycle while
   the row filters run at full rate.
3. **Column filter** (`dwt_col_filter`). This is two recombined lifting
   steps (alpha/beta, then gamma/delta), with N slots each: slot 2k is column k of the L band and slot 2k+1 is
   column k of the H band. The vertical sequence of a slot advances once per
   row pair. Row pair 0 is flagged as the first.
   - An L slot outputs LL (vertical low) and LH (vertical high).
   - An H slot outputs HL and HH.
4. **Controller** (`dwt2d_ctrl`). Counts columns and row pairs, and
   schedules every flush:
   - after each row pair, `in_ready` goes low for 2 cycles;
   - `row_flush1` comes 2 cycles, and `row_flush2` 10 cycles, after the last
     column of the row pair (the second is the row step latency plus 4);
   - after the last row pair, it waits 17 cycles for the row filters and the
     transposing buffer to empty;
   - then it runs column flush pass 1 over all N slots, waits 4 cycles (the
     column step latency), runs pass 2 over all N slots, and raises
     `frame_done` four cycles later.

   These spacings are computed in `dwt2d_ctrl` from the step latencies in
   `dwt_pkg`, so they follow any change to the pipelines.
   - `in_ready` stays low from the last column of a frame until `frame_done`.

   With these spacings, a step never receives data and a flush in the same
   cycle. The row filters also never deliver results in two consecutive
   cycles, which the transposing buffer relies on. It asserts both.

## Top-level interface (`dwt2d_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | the column is accepted when both are high |
| `in_top`, `in_bot` | in | 20 | x(2r, j) and x(2r+1, j), with j = 0..N-1 for each row pair r = 0..N/2-1 |
| `out_valid` | out | 1 | one coefficient pair is present for one cycle |
| `out_hband` | out | 1 | 0: `out_low` = LL, `out_high` = LH; 1: `out_low` = HL, `out_high` = HH |
| `out_row`, `out_col` | out | log2(N/2) | position inside the N/2 x N/2 subband |
| `out_low`, `out_high` | out | 20 | the two coefficients |
| `frame_done` | out | 1 | pulse after the last coefficient of a frame |

Band names give the horizontal band first and the vertical band second.

**Output order.** Outputs do not come in raster order of any subband. They
appear as soon as they are complete: row r of the subbands leaves while row
pair r+2 is being read. The last two subband rows leave during the
two column flush passes.

The only parameter is `N`, the image width and height (default 256). It must
be even and at least 8. The coefficients, the 20-bit word and the 14-bit
coefficient fraction are set in `dwt_pkg`.

## Timing and cost

- Inside a row pair, one column (two pixels) is accepted every cycle.
- Each row pair costs N + 2 cycles.
- At full input rate, `frame_done` comes N^2/2 + 3N + 24 cycles after the
  first accepted column. For N = 256 that is 33,560 cycles, against an ideal
  N^2/2 = 32,768.
- Latency: the row filter delivers L(k), H(k) 12 cycles after the odd pixel
  of pair k+2. The column filter adds 8 cycles after the event that
  completes a vertical pair.
- Critical path: one multiplier (Tm), or two adders where a stage adds a
  stored partial sum and writes the next one back. The widest such stage, in
  the row steps, also holds the state read and the left-edge multiplexer.
- Size at N = 256, after generic synthesis:
  - 2,276 flip-flop bits, most of them pipeline registers;
  - 24,876 memory bits, almost all of it the column filter's four 256-entry
    state memories (p: 20 bits; q with tag and flag: 28 bits);
  - 12 constant-coefficient multipliers: two per lifting step, with two
    steps in each row filter and two in the column filter.

## Where this design departs from the architecture it follows

- **Temporal buffer.** The column filter meets the 4N words the source
  gives. In this design the 4N words come from the p/q regrouping above; the
  source derives its regrouping from substituted lifting equations written
  with inverse coefficients. The row filters use the plain step, with three
  words in registers.
- **Pipelining.** The source describes three pipeline stages per lifting
  step with one multiplier on the critical path. Here the row steps have six
  stages and the column steps four. This reaches a critical path of one
  multiplier, or two adders, without flipped units, at the cost of more
  registers.
- **No flipped units.** The "flipping" technique, which multiplies the centre
  sample by the inverse coefficient so that the neighbours reach the adder
  without a multiplier, is not used. The source presents that form as the
  earlier structure it improves on. The units here are in the pre-add form
  of the source's lifting-step drawing.
- **Hardware counts.** The source reports 7 registers per lifting step and
  fewer multipliers for its whole 2-D design. Here each of the six lifting
  steps has its own two multipliers (12 in all), and the register count
  follows from the deeper pipeline and the slot state.
- **No K normalisation**, as in the source's lifting equations.
- **Row and frame overhead.** Closing a row in the cascaded steps costs 2
  input cycles per row pair, and the end of a frame costs 2N + 27 cycles for
  the column flush passes. The source quotes a flat N^2/2 cycles.
- **Output naming.** The source's lifting-step drawing labels the predict
  path "low pass" and the update path "high pass". This design follows the
  lifting equations instead: predict = high pass (H), update = low pass (L).
- **Word width and coefficients.** The 20-bit registers come from the
  source. The coefficient values, fixed-point format, rounding, edge
  handling, handshake and control are this design's own, because the source
  does not specify them.

## Files

`rtl/` holds one module or package per file:

- `dwt_pkg`: word format, coefficients and the rounded fixed-point multiply.
- `lift_unit`: the computing unit.
- `splitter`: pairs up pixels.
- `temporal_buffer`: slot state memory.
- `lifting_step`: one predict/update step (row filters).
- `lifting_step_rc`: the recombined predict/update step (column filter).
- `dwt_row_filter`: a 1-D row filter.
- `transpose_buffer`: the transposing buffer.
- `dwt_col_filter`: the column filter.
- `dwt2d_ctrl`: the controller.
- `dwt2d_top`: the top level.

`tb/` holds a self-checking testbench per module (`tb_<module>.sv`) and
`dwt_ref_pkg.sv`. That package is an independent integer model of the 9/7
lifting on plain arrays (no slots, flushes or pipelines), with a
floating-point twin.

- `tb_dwt2d_top` runs two 256 x 256 frames at the default size. The first
  frame has a randomly idle source, the second runs at full rate. It checks
  every coefficient against the model, the floating-point error (at most 6),
  that each coefficient arrives exactly once, the row-pair and frame cycle
  counts, and that stalls, back-pressure, row flushes, column flushes and all
  four edges occurred.
- `tb_dwt2d_top_small` runs the same test at N = 8.
- The unit testbenches check value, flags and exact cycle timing of each
  block.

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt2d_top.sv --top-module tb_dwt2d_top
./obj_dir/Vtb_dwt2d_top
```

The full-size run finishes in about a second. For the
other blocks, replace `tb_dwt2d_top` with `tb_<module>`.

## Changing it

- **Image size:** set `N` on `dwt2d_top`. The column filter's memory grows
  by N entries of 20 + (20 + log2(N/2) + 1) bits for each of its two
  lifting steps. Non-square images need `H` on `dwt_col_filter` and a
  matching row-pair count in the controller.
- **Other lifting filters** with two predict/update steps and symmetric
  extension: change the coefficients in `dwt_pkg`. The testbench model in
  `dwt_ref_pkg` has its own copy of the coefficients, so update it as well.
- **Pipeline depth:** if a stage is added to or removed from `lift_unit` or
  `lifting_step_rc`, update `UNIT_LAT` or `COL_STEP_LAT` in `dwt_pkg`. The
  controller's schedule and the testbenches' timing checks are derived from
  them.
- **Wider data:** change `DATA_W`. The multiply keeps the full product before
  rounding.
