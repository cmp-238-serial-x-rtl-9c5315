# Serial, parallel and pipelined datapaths: one computation, many circuits

The same arithmetic can be built as very different hardware. Give every
operation its own operator and the result comes out in one long clock; share
one operator across several clocks and the circuit shrinks but needs a
controller to sequence it; cut long paths with registers and the clock gets
faster while each result takes more clocks to emerge. This repository holds
a set of small, complete SystemVerilog designs that each sit at a different
point of that trade-off. They come from a course on register-transfer
design, where every circuit is split into a *control part* (a state machine
that produces load, select and operation signals) and an *operative part*
(registers, multiplexers and arithmetic).

| Example | Computation | Versions here |
|---|---|---|
| 1 | `S = A·X² + B·X + C` | serial FSM + shared operator, fully parallel, counter-sequenced |
| 2 | `F(x) = (A·x² + B)/4 + C` | maximum performance, minimum area |
| pipelined adder | 32-bit `A + B` | ripple-carry chain cut in the middle by a register bank |
| blend | `Y = sat(A·F + B·(1−F))` | three-stage pipeline with aligned data and control |
| diffeq | loop of a differential-equation solver | combinational body, 4-state and 6-state control/operative, 4-stage pipeline |
| array multiplier | 4×4 unsigned product | array of AND-gate rows, register after every row |

All modules are synthesizable, use an asynchronous active-high reset `rst`
and a rising-edge clock `clk`, and have a self-checking testbench in `tb/`.
`cmp238_top` places every example side by side.

## Example 1: the polynomial, three ways

The polynomial is first rewritten in Horner form, `S = X·(A·X + B) + C`:
multiply, add, multiply, add. The factoring removes a multiplier and makes
the computation a chain that an accumulator can follow.

### Serial version: `poly_serial` = `poly_serial_ctrl` + `poly_serial_dp`

The operative part (`poly_serial_dp`) has

* register **X**, loaded from `dado` when `lx` = 1;
* mux **M1** choosing X, A, B or C (`m1` = 00, 01, 10, 11);
* mux **M2** choosing X (`m2` = 0) or the result register S (`m2` = 1);
* one operator that adds (`h` = 0) or multiplies (`h` = 1) the two mux outputs;
* register **S**, loaded from the operator when `ls` = 1. S is the output and
  feeds back into M2, so the datapath accumulates.

Inputs are 8 bits wide and are zero-extended to 16; all arithmetic wraps
modulo 2¹⁶, so large operands overflow (255·255² + … does not fit 16 bits).

The control part (`poly_serial_ctrl`) is a one-hot state machine with seven
states:

| state | lx | ls | m1 | m2 | h | p | effect |
|---|---|---|---|---|---|---|---|
| idle | 0 | 0 | – | – | – | 0 | wait for `start` |
| S0 | 1 | 0 | – | – | – | 0 | X ← dado |
| S1 | 0 | 1 | 01 | 0 | 1 | 0 | S ← A · X |
| S2 | 0 | 1 | 10 | 1 | 0 | 0 | S ← B + S |
| S3 | 0 | 1 | 00 | 1 | 1 | 0 | S ← X · S |
| S4 | 0 | 1 | 11 | 1 | 0 | 0 | S ← C + S |
| S5 | 0 | 0 | – | – | – | 1 | done (`p`) |

Dashes are don't-cares; the RTL drives them to 0. Keeping `ls` low in idle,
S0 and S5 means the previous result stays on `s` until S1 of the next run
overwrites it.

Timing, counted in rising clock edges:

```
edge:     0        1      2       3       4       5
state: idle->S0  S0->S1 S1->S2  S2->S3  S3->S4  S4->S5
start sampled ^                                   done=1, s valid
```

`done` rises at edge 5, five edges after the one that sampled `start`, and
stays high for one clock. The critical path is one mux plus the multiplier.

### Fully parallel version: `poly_comb`

Two registers with the whole expression between them:
`S ← ((A·X) + B)·X + C` on every clock while `start` is low, and X is loaded
while `start` is high. The result is ready one clock after `start` falls.
The path is two multipliers and two adders long, so the clock is slower, but
one clock is enough. The module has no `done`.

### Counter-sequenced version: `poly_count`

X is loaded and a 2-bit counter is cleared while `start` is high. Once `start`
falls the counter runs freely and its value picks the operation:
01 → `A·X`, 10 → `+B`, 11 → `·X`, 00 → `+C`. The first clock after `start`
(count 00) adds C to a stale S and is discarded. The next four clocks
form a pass, so S holds the result after the fifth clock. The same value is
then rebuilt every four clocks. The code looks serial, but each count value
has its own operator, so synthesis produces two multipliers and two adders:
the work is serial but the hardware is parallel. `done` is this design's
addition: a one-clock flag that is high whenever S holds a complete pass.

### Sizes

After synthesis the serial version has 7 state flip-flops and 24 datapath
flip-flops (the top 8 bits of X are constant zero). The parallel version also
has 24 flip-flops. The serial version needs one multiplier and takes 6 clocks
at a short period. The parallel version needs two multipliers and takes 1 clock
at a long period.

## Example 2: `F(x) = (A·x² + B)/4 + C`

Only the formula and two goals are specified: maximum performance at the
cost of area, and minimum area at the cost of performance. Both circuits
follow the Example 1 style, and their internals are this design's own.

* `f2_parallel` computes the whole expression combinationally into a result
  register, one clock after `start` falls. `done` rises then and stays high
  until the next `start`.
* `f2_serial` adds a third operation, a shift right by 2, to the shared
  operator. An 8-state FSM runs load X, `A·X`, `·X`, `+B`, `>>2`, `+C`, done.
  `done` is high in the seventh clock after `start` is sampled, and a `start`
  seen in the done state begins the next run at once.

Widths are copied from Example 1 (8-bit inputs, 16-bit result). The division
truncates, and it acts on the wrapped 16-bit value of `A·x² + B`. Bit 15 of
`f` is therefore always zero.

## Pipelining

The period is set by the slowest register-to-register path. A register
placed in the middle of that path halves it, at the price of one more clock
of latency. A pipelined unit still accepts a new input every clock.

### `pipe_adder32`: cutting a carry chain

A 32-bit ripple-carry adder made of four 8-bit slices (`adder8`, a chain of
full adders with carry in and carry out). Its longest path is the carry
running from byte 0 to byte 3. A register bank between byte 1 and byte 2
splits it into two equal halves:

```
a,b ─► [in reg] ─► bytes 0,1 add ─► [low sum, carry, high a/b] ─► bytes 2,3 add ─► [out reg] ─► sum
                                      \_____ low sum delayed _____________________/
```

Everything that crosses the cut is registered. That includes the carry, the
high operand halves (they must wait for the carry), and the low sum (it must
wait for the high sum). `sum` shows `a+b` three clocks after the operands
are applied: input register, cut, output register. Counted from the first
register, that is a latency of 2. The carry out of bit 31 is dropped.

### `blend_pipe`: keeping data and control aligned

`Y = sat(A·F + B·(1−F))` mixes two 8-bit pixels with a factor F. The number
format is this design's choice. F is unsigned with one integer bit and 8
fraction bits (`f` is 9 bits, 0 … 256 meaning 0 … 1.0). Products are scaled
back by dropping 8 fraction bits.

The multipliers are only 8×8 bits: they see the fraction bits of F and of
`1−F`. The single value a fraction cannot hold is 1.0. A 2:1 mux therefore
takes A itself when the MSB of F is set (F = 1.0), and B itself when the
MSB of `1−F` is set (F = 0). A saturating adder clips the sum at 255. With F in
range and truncated products the sum never exceeds 255, so in practice the
clip never acts.

Pipeline, one new pixel pair per clock, result 3 clocks later:

1. input registers for A, B, F; `1−F` is formed from the registered F;
2. a register after each multiplier. A and B, and **also the two mux
   controls** (MSB of F, MSB of 1−F), pass through registers of the same
   stage. Without that, the muxes would choose using the F of the next pixel.
3. muxes, saturating adder, output register.

Stage 2 is the part of this design that is easiest to get wrong. Every
signal that meets the multiplier outputs, data or control, must have
the same number of registers on its way. An assertion checks `F ≤ 1.0`.

### `array_mult4`: a pipelined array multiplier

Row *i* ANDs multiplier bit `a[i]` with all of `b` and adds the result to the
4-bit partial sum coming down from the row above, using a 4-bit ripple
adder. The low bit of each row's sum is product bit P*i*. The upper bits
continue down, and after row 3 they are P7…P4. With `PIPELINED = 1` (the
default) a register bank follows every row. It holds the partial sum, the
product bits finished so far, and the operand bits still needed, which travel
down with their data. A product is accepted every clock and appears 4 clocks
later, and the longest path is one row. With `PIPELINED = 0` the same array
is purely combinational.

## The diffeq loop

The loop solves `y'' + 3xy' + 3y = 0` by forward Euler. While `x < a`, each
pass computes the next values from the current ones: x grows by dx, y grows by
u·dx, and u loses both 3·x·u·dx and 3·y·dx. All three updates use the old
x, y and u. When the loop ends, y is the result.

All four versions use 32-bit two's-complement values. They wrap on overflow
and compare `x < a` as signed numbers. Their operator graph has nodes n1…n11:
n1 = 3·x, n2 = u·dx, n4 = 3·y, n6 = n1·n2, n8 = n4·dx, n10 = u − n6,
n11 = n10 − n8 (→ u1), n7 = y + n2 (→ y1), n5 = x + dx (→ x1), n9 = x < a.
The product u·dx is computed once and shared by the u and y updates, which
leaves five multipliers.

The combinational and the two sequential units share one interface. A `start`
pulse loads `x_in … a_in`. `done` goes high when the test fails and stays
high with `y_out` valid until the next `start`. `iters` counts the
iterations.

### `diffeq_comb`: one iteration per clock

The whole body is combinational. Each clock tests `x < a` and, if true, writes
x, y and u. The critical path is two multipliers and two subtractors. A run
of *k* iterations sets `done` *k*+1 clocks after the start clock.

### `diffeq_seq`: four states, two multipliers

The operative part has two multipliers, one adder, one subtractor, one
comparator, the loop registers, and the temporaries m1, m2, m3, s1 and s2,
all behind operand muxes. The control part repeats four states per
iteration. The operators are placed as late as possible: two multiplies in
each of the first two states, then one multiply, one subtract and one add,
then the last subtract, the x update and the loop test. That allocation is
the original's; which operation goes to which operator within it is this
design's own:

| state | multiplier 0 | multiplier 1 | adder | subtractor | compare |
|---|---|---|---|---|---|
| E1 | m1 ← 3·x | m2 ← u·dx | – | – | – |
| E2 | m1 ← m1·m2 | m3 ← 3·y | – | – | – |
| E3 | m3 ← m3·dx | – | s2 ← y + m2 | s1 ← u − m1 | – |
| E4 | – | – | x ← x + dx | u ← s1 − m3 | x < a |

All registers are written at the end of a state. Nothing of the loop state
(x, y, u) changes before E4, so the body is computed speculatively. The
comparison in E4 decides whether x, u and y ← s2 are committed (and the
machine goes back to E1) or discarded (and it stops). The critical path is
one multiplier and its mux. A run of *k* iterations takes 4*k* + 5 clocks
from the start clock to `done`: *k* kept passes, one discarded pass, and the
start clock.

### `diffeq_seq1`: one multiplier

With a single multiplier, adder, subtractor and comparator, the five products
of the body must pass through the multiplier one at a time. A final
subtraction has to follow the last product, which makes six states per
iteration:

| state | multiplier | adder | subtractor | compare |
|---|---|---|---|---|
| T1 | m1 ← 3·x | – | – | – |
| T2 | m2 ← u·dx | – | – | – |
| T3 | m1 ← m1·m2 | s2 ← y + m2 | – | – |
| T4 | m3 ← 3·y | – | s1 ← u − m1 | – |
| T5 | m3 ← m3·dx | – | – | – |
| T6 | – | x ← x + dx | u ← s1 − m3 | x < a |

The clock period is the same as for `diffeq_seq`: one multiplier and its mux.
The test and the commit work as in `diffeq_seq`. A run of *k* iterations
takes 6*k* + 7 clocks from the start clock to `done`.

### `diffeq_pipe`: the body as a four-stage pipeline

The stages follow the levels of the graph, so each stage has at most one
multiplier on its path:

| stage | work |
|---|---|
| 1 | 3·x, u·dx, 3·y, x + dx, x < a |
| 2 | (3x)·(u dx), (3y)·dx, y + u·dx |
| 3 | u − 3x·u·dx |
| 4 | u1 = (u − 3x·u·dx) − 3y·dx |

The unit takes one `(x, y, u, dx, a)` set per clock with `in_valid`. It
returns `x1, y1, u1, teste` (= x < a) and the unchanged `dx_o`, `a_o` four
clocks later with `out_valid`. It has no loop control of its own. Each
iteration needs the x, y, u of the previous one, so one loop can only issue
every fourth clock. Four independent loops interleaved keep the pipeline full:
the caller feeds every result back in while `teste` is true. When `teste`
comes back false, the result of that loop is the y it last fed in. Both
testbenches that use this unit drive it that way.

Summary of the four versions:

| | combinational | 4 states | 6 states | pipeline |
|---|---|---|---|---|
| multipliers / adders / subtractors / comparators | 5 / 2 / 2 / 1 | 2 / 1 / 1 / 1 | 1 / 1 / 1 / 1 | 5 / 2 / 2 / 1 |
| clocks per iteration of one loop | 1 | 4 (+4 for the final test) | 6 (+6 for the final test) | 4 (latency), 1 issue slot per clock |
| critical path | 2 mult + 2 sub | 1 mult | 1 mult | 1 mult |

## The top: `cmp238_top`

The examples do not connect to each other. The top only gives them a shared
`clk` and `rst` and brings out each one's ports under a prefix:
`e1s_` (serial), `e1c_` (parallel), `e1v_` (counter), `e2p_`, `e2s_`, `add_`, `bl_`,
`dc_`, `ds_`, `ds1_`, `dp_`, `mu_`. Each example keeps its module's default
parameters.

## Simulating

Every testbench is self-checking. It compares against arithmetic done in the
testbench, checks latencies in clocks, has a watchdog, and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv --top-module tb_poly_serial tb/tb_poly_serial.sv
./obj_dir/Vtb_poly_serial
```

Replace `tb_poly_serial` with any file in `tb/`. `tb_cmp238_top` runs every
example at once at full size and counts how often each mechanism happened.
Each count must be non-zero. The mechanisms include a carry across the adder
cut, both blend bypasses, counter repeats, zero-iteration loops and
interleaved pipeline loops. Simulation takes seconds.

Parameters to change: `IN_W`/`OUT_W` (Examples 1 and 2), `W`/`SLICE`
(adder; the cut is always at `W/2`), `PIX_W`/`FRAC_W` (blend), `W`
(diffeq), `N`/`PIPELINED` (multiplier). The testbenches assume the defaults,
except `tb_array_mult4`, which also builds the unpipelined multiplier.

## How far this follows the original examples

Taken from the original material: the structure and control table of the
Example 1 serial unit, its one-hot coding and 8/16-bit widths; the parallel
and counter versions of Example 1; the Example 2 formula and goals; the
adder's slice width and cut position; the blend block diagram and the rule
that data and control must be delayed alike; the diffeq algorithm, operator
graph, operator budgets, four clocks per iteration and pipeline depth of 4;
the row structure of the array multiplier.

Choices made here where the original says nothing, or only sketches:

* **Example 1.** Don't-care control outputs are driven to 0. The counter
  version clears its counter synchronously on `start` (the original clears it
  asynchronously) and gains a `done` flag.
* **Example 2.** Both circuits, their widths and truncating division are
  this design's own.
* **Adder.** Reset, and dropping the carry out of bit 31.
* **Blend.** The fixed-point format, the widths, the register after the full
  product (rather than inside the multiplier), and truncation.
* **Diffeq widths and schedules.** 32-bit width, which operation takes which
  operator in the 4-state unit, the whole six-state schedule of the
  one-multiplier unit, the speculative body with the test in the last state,
  the temporary m3, and the pipeline stage split.
* **Diffeq pipeline interface.** The valid bits and the dx/a pass-through.
  Interleaving loops is left to the caller.
* **Diffeq subtractors.** The original's operator count lists three
  subtractors for the combinational and pipelined versions, but its graph
  has two. Two are built.
* **Multiplier.** The register placement.

Not built: gate-level timing. The original compares clock periods and LUT
counts on a particular FPGA, and simulation here is cycle-based only.
