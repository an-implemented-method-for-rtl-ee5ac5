# Systolic band matrix multipliers from step and place functions

This RTL gives three systolic arrays that multiply two n x n band matrices,
C = A * B. All three come from the same program: a set of *inner product
steps* `(i:j:k)`, each doing `c(i,j) := c(i,j) + a(i,k) * b(k,j)`. They differ
only in two functions:

* **step**: the clock cycle in which `(i:j:k)` runs;
* **place**: the processor it runs on.

Step and place fix two more things. A matrix element used by two steps has
to move from the first place to the second in the time between them, so it
moves at a constant velocity, its **flow**. Run each element's path backwards
to any chosen moment and you get where it has to be at that moment, its
**layout**. In hardware, the flow sets which neighbour every channel feeds.
The layout sets the step in which each element must enter the array at the
boundary. Nothing else needs to be designed: every array here is the literal
realisation of its four functions.

A band matrix has non-zero elements only near the diagonal. `p` is the
largest distance of a non-zero element above the diagonal, and `q` the
largest below it. A is (PA, QA) and B is (PB, QB), so C is (PA+PB, QA+QB).
An inner product step whose `a` or `b` lies outside its band adds zero. Such
a step is never scheduled: its elements are simply never injected. The
defaults are the worked example, 4 x 4 tridiagonal matrices (all band
widths 1).

| design | step      | place       | a flow | b flow | c flow     | processors                 | steps with operations      |
|--------|-----------|-------------|--------|--------|------------|----------------------------|----------------------------|
| d1     | i + j + k | (i, j)      | (0,1)  | (1,0)  | stationary | one per element of C's band (14 at n=4) | 3n - 2 (10)   |
| d2     | i + j + k | (i-k, j-k)  | (0,1)  | (1,0)  | (-1,-1)    | (PA+QA+1)(PB+QB+1) (9)     | 3n - 2 (10)                |
| d3     | i + j - k | (i-k, j-k)  | (0,1)  | (1,0)  | (1,1)      | (PA+QA+1)(PB+QB+1) (9)     | n + min(PA,QB) + min(QA,PB) (6) |

* **d1** is the obvious array: one processor per result element, with C
  accumulating in place. Its size grows with n.
* **d2** places a step by its distances from the diagonal. The array then
  depends only on the band widths. The result is the classic hexagonally
  connected band multiplier: A, B and C all move, C against A and B.
* **d3** keeps the d2 array but runs each inner product backwards, from its
  last term to its first (`k` counts down). C then moves *with* A and B.
  Channels are busy every step instead of every third, and for large n the
  product finishes about three times sooner.

## Where the elements are

At step `t`, with coordinates `(x, y)` on the processor grid:

| design | a(i,k)          | b(k,j)          | c(i,j)              |
|--------|-----------------|-----------------|---------------------|
| d1     | (i, t-i-k)      | (t-j-k, j)      | (i, j)              |
| d2     | (i-k, t-i-2k)   | (t-j-2k, j-k)   | (2i+j-t, i+2j-t)    |
| d3     | (i-k, t-i)      | (t-j, j-k)      | (t-j, t-i)          |

These formulas are the whole design. They show that a(i,k) and b(k',j) can
only meet on a processor when k = k'. At that meeting the c passing through
is exactly c(i,j), and the step and processor are the ones the step and
place functions give. So processors need no control logic. A processor
executes the inner product step whenever an `a` token and a `b` token arrive
together. Otherwise it forwards whatever it holds.

The feeders solve the same formulas the other way round. For each boundary
channel and the current step, they ask which element's position is this
processor, and inject that element if it lies in the band. Examples:

* d2 column x: `k = (t + QB - x) / 3` when the division is exact, `i = k + x`.
* d3 row y: `j = t + PA`, `k = j - y`.

c elements enter as zero-valued tokens where their diagonal `x - y = i - j`
begins. In d2 and d3 the collector writes each c into the result matrix as
it leaves the far end of its diagonal. It takes `(i, j)` from the exit
processor and the step number. Tokens carry no indices.

## Soaking and draining

Data usually have to travel some steps before the first operation
("soaking"), and results some steps after the last one ("draining"). Each
array computes its run window from the formulas above at elaboration time
(`first_entry()` and `last_exit()` in d2 and d3). The window runs from the
earliest boundary entry of any element to one step after the last c leaves.

| design | run (n=4, tridiagonal) | operations  | notes |
|--------|------------------------|-------------|-------|
| d1     | steps 0..9, 10 cycles  | steps 0..9  | widths 1,3,3,3,3,3,3,3,3,1; C read in place |
| d2     | steps -1..11, 13 cycles | steps 0..9 | 1 soaking step; c(3,3) leaves in step 10, stored in 11 |
| d3     | steps -1..5, 7 cycles  | steps -1..4 | widths 1,4,8,8,4,1; first and last operation on boundary processors |

The "width" of a step is the number of inner product steps executed in it.
It is available on the `ops` output.

## Modules

| file | role |
|------|------|
| `rtl/systolic_pkg.sv` | element types (`data_t` 16-bit, `acc_t` 34-bit signed), token structs `dtok_t`/`ctok_t` (value + valid), sequencer state enum, `in_band()` |
| `rtl/ips_pe.sv` | inner product step processor for moving c (d2, d3): registered a, b, c outputs; adds `a*b` to c when a and b are both valid |
| `rtl/ips_pe_stat.sv` | processor with stationary c (d1): accumulator cleared on `clr` |
| `rtl/step_sequencer.sv` | start/load/run/done control and the signed step counter |
| `rtl/band_matmul_d1.sv`, `_d2.sv`, `_d3.sv` | the three arrays with their feeders, input latches and result collection |
| `rtl/mm_systolic_top.sv` | the three multipliers side by side, each with its own ports |

Parameters of the arrays and the top are `N` (default 4) and `PA`, `QA`, `PB`,
`QB` (default 1). All are free; the testbenches also run n = 7 with
A = (2,1) and B = (0,2).

### Interface of each multiplier

* `start`: a one-cycle pulse. It latches `a_mat` and `b_mat`, clears every
  channel (and the d1 accumulators), and starts the run. It is ignored
  while `busy`.
* `busy`: high during the run, one systolic step per clock cycle.
* `done`: rises after the last step and stays high until the next `start`.
  `c_mat` is valid while `done` is high.
* `step`: the current step number, signed (d2 and d3 start at negative
  steps).
* `ops`: how many processors execute an inner product step this cycle.
* `fwds`: how many processors hold data but only forward it.
* Elements of `a_mat`/`b_mat` outside their bands are ignored. Elements of
  `c_mat` outside C's band read zero.
* Reset `rst_n` is asynchronous, active low.

## Choices not fixed by the method

* One systolic step is one clock cycle. Every processor output is
  registered.
* Channels carry a valid bit. "Assigned an operation" means both a and b
  tokens are present. `ips_pe` asserts that c is present too.
* Widths: 16-bit signed a and b. c is 34 bits, enough for four full-scale
  products. With wider bands, raise `ACC_W` in the package.
* Loading and unloading. The matrices are latched on `start`, and results
  are collected into a register matrix. d1 brings its accumulators out in
  parallel; the method says only that C stays in place there.
* d1 builds processors only at the places in the band of C. Its rows and columns
  start at the first band position.
* The tools report some constant output bits. These are the elements of
  `c_mat` outside the band of C, plus the upper bits of the `ops`/`fwds`
  counters.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`.

* `tb/tb_ips_pe.sv` and `tb/tb_ips_pe_stat.sv`: random tokens and clear
  pulses, compared cycle by cycle with a model.
* `tb/tb_band_matmul_d1.sv`, `_d2.sv`, `_d3.sv` use `tb/tb_mm_harness.sv`.
  Each runs the default size and n = 7 with unequal bands, four random
  products each, with junk outside the bands. The checks are:
  * every element of C against a triple loop;
  * the number of operations in every step against an enumeration of the
    trace under the step function;
  * the processor of every operation against the place function;
  * the first step, the number of steps with operations (3n-2, or
    n+min(PA,QB)+min(QA,PB)), and the widths listed above.
* `tb/tb_mm_systolic_top.sv`: the three multipliers at default size, six
  rounds with random, overlapping start times. One start pulse arrives
  while a run is busy. It checks every product and the run lengths 10, 13
  and 7 cycles. It also requires that operations, forwarding, soaking and
  draining (d2), off-band inputs, restarts and ignored starts all happened.
* `tb/tb_mm_scaling.sv`: all three designs at n = 16, tridiagonal. It
  shows the speed difference: 46 steps with operations for d1 and d2
  against 18 for d3, and 46, 49 and 19 cycles per run.

Simulating with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/systolic_pkg.sv \
    tb/tb_mm_systolic_top.sv --top-module tb_mm_systolic_top
./obj_dir/Vtb_mm_systolic_top
```

Replace the testbench name for the others. Lint with
`verilator --lint-only -Wall -Irtl rtl/systolic_pkg.sv rtl/mm_systolic_top.sv`.
The remaining `SYNCASYNCNET` warning comes from the assertions' `disable iff`
on the asynchronous reset.

## Changing the design

* Another schedule for the same array: change the feeder formulas and the
  `first_entry()`/`last_exit()` functions of d2 or d3. Both come directly
  from the position table above.
* Other band widths: set the parameters. The processor grid, feeders and
  run window follow.
* Stretching a step over several cycles, or adding back-pressure, is not
  supported. The arrays rely on every token moving exactly one processor
  per cycle.
