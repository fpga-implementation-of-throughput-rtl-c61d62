# Radix-2 binary dividers for 12-bit signed integers: restoring, non-restoring, parallel and pipelined

Division is the slowest basic arithmetic operation to build in hardware. This
RTL builds two classic radix-2 dividers, each producing one quotient bit per
step, and applies two standard throughput techniques to them:

* a **sequential restoring divider**: one subtract-and-maybe-restore step per
  clock cycle, 12 steps plus a load cycle per division;
* a **non-restoring array divider**: all 12 steps unrolled into a chain of
  adders, one division per clock cycle, with a long combinational path;
* **two-way parallelism**: two copies fed in turn, for both algorithms;
* **pipelining** of the array divider into 2 or 4 stages.

All of them divide a 12-bit two's-complement dividend `x` by a 12-bit divisor
`y` (range -2048..2047) and return

* `qt = x / y` rounded toward zero, and
* `rem` with the sign of `x`, so that `x = y*qt + rem` and `|rem| < |y|`.

These are the same results as `/` and `%` on signed integers in C or
SystemVerilog. Two corner cases behave as follows:

* -2048 / -1 gives +2048, which does not fit 12 bits. It wraps to -2048 with remainder 0.
* Division by zero gives no meaningful result. The design does not flag it.

The top level, `div_top`, places the six configurations side by side, each with its own ports.

| configuration | module | divisions accepted per cycle | latency (cycles, request to result) | what limits the clock |
|---|---|---|---|---|
| `nr_ref`   | `nr_divider`, `PIPE_STAGES=1` | 1     | 2  | whole array: input negator, 12 row adders, correction adder, sign negator in series |
| `nr_par2`  | `nr_parallel2`                | 1     | 3  | whole array, but it has 2 cycles to settle |
| `nr_pipe2` | `nr_divider`, `PIPE_STAGES=2` | 1     | 3  | about half the array |
| `nr_pipe4` | `nr_divider`, `PIPE_STAGES=4` | 1     | 5  | about a quarter of the array |
| `rs_ref`   | `rs_divider`                  | 1/13  | 13 | one 13-bit adder plus a multiplexer |
| `rs_par2`  | `rs_parallel2`                | 2/13  | 13 | one 13-bit adder plus a multiplexer |

For the non-restoring versions, "per cycle" hides the real difference: the
clock each one can run at. The reference array must settle in one period. The
parallel version lets each of its two arrays settle over two periods. The
pipelined versions cut the path itself. In the FPGA study this design
follows, pipelining raised the maximum clock about 2x (2 stages) and 4x
(4 stages) at almost no extra logic. Parallelism roughly doubled both speed
and size. Those numbers belong to that study's own implementation; this RTL
has not been through an FPGA flow.

## Sign handling common to all versions

Both algorithms work on magnitudes. A controlled inverter (`ctrl_inv`) passes
its input or negates it in two's complement, depending on a control bit. It
is used four ways:

1. `|X|`, controlled by the sign bit of `x`. This is 12 bits unsigned, so
   |-2048| = 2048 still fits.
2. `|Y|` and `-|Y|`, 13 bits wide. Controlled by the sign bit of `y` and by
   its inverse.
3. The quotient magnitude is negated when the signs of `x` and `y` differ
   (xor).
4. The remainder magnitude is negated when `x` is negative.

## The non-restoring array (`nr_cell`, `nr_comb`, `nr_divider`)

This is the most involved part. The array has one row per quotient bit,
`M = 12` rows, most significant bit first. Every row is an `nr_cell`: a
multiplexer and a 13-bit adder. Row `i` works on quotient bit `j = M-1-i`:

```
shifted = { r_prev[N-1:0], |X|[j] }          // shift left, bring down next dividend bit
r       = shifted + (r_prev < 0 ? |Y| : -|Y|)
q[j]    = (r >= 0)
```

The first row starts from `r_prev = 0`, so it always subtracts.

Unlike the restoring method, a negative partial remainder is never repaired
on the spot. The next row adds the divisor instead of subtracting it. This
reaches the same remainder the restoring method would have after its
restore-and-subtract, so the quotient bits, read as "was the row's result
non-negative", are the ordinary binary quotient. They need no conversion.

Only the last partial remainder may need repair. One more adder adds `|Y|` to
it if it is negative and 0 otherwise. This gives `|rem|`.

**Widths.** Every partial remainder lies in `[-|Y|, |Y|)`. With `|Y| <= 2048`
that is a 12-bit signed value, so dropping its top bit in the shift loses
nothing. The shifted value and the sum need 13 bits (`N+1`). The final
remainder is below `|Y|` and fits 12 bits.

**Worked example** (4 bits for brevity): -7 / 2, so `|X| = 0111` and `|Y| = 2`.

| row | bit brought down | shifted | operation | r  | q bit |
|-----|------------------|---------|-----------|----|-------|
| 0   | 0                | 0       | -2        | -2 | 0     |
| 1   | 1                | -3      | +2        | -1 | 0     |
| 2   | 1                | -1      | +2        | 1  | 1     |
| 3   | 1                | 3       | -2        | 1  | 1     |

The quotient magnitude is `0011` = 3. The last `r` is not negative, so there
is no correction and the remainder magnitude is 1. The signs differ, so
`qt = -3`. `x` is negative, so `rem = -1`.

`nr_comb` is this array as pure combinational logic: absolute values, 12
rows, correction adder and sign inverters.

`nr_divider` wraps the same structure in registers. An input register holds
`x`, `y` and a valid bit. An output register holds `qt`, `rem` and the valid
bit. `PIPE_STAGES-1` pipeline registers cut the chain of rows at even
intervals:

* 2 stages: after row 6;
* 4 stages: after rows 3, 6 and 9.

Each pipeline register carries what the remaining rows still need:

* the partial remainder;
* the quotient bits found so far;
* `|X|`, `|Y|` and `-|Y|`;
* the two operand signs;
* the valid bit.

It has no backpressure. A request may come every cycle, and its result
appears exactly `PIPE_STAGES + 1` cycles later.

## Two-way parallel array (`nr_parallel2`)

There are two `nr_comb` copies, each behind its own input register. A turn
bit sends accepted requests to the copies alternately. Each input register
therefore loads at most every second cycle, so each copy runs at half rate.

A valid bit and a copy tag travel two cycles behind each request. An output
multiplexer then picks the right copy's result into the output register,
3 cycles after the request.

**Timing constraint.** The path from a copy's input register through the
array to the output register is a **two-cycle path**. A static timing
constraint must say so, or the tool will time it as a single cycle and nothing
is gained. The design guarantees the two cycles: a copy's input register can
reload only on the same clock edge that captures its previous result.

## Sequential restoring divider (`rs_counter`, `rs_divider`)

Register `P` (partial remainder, 12 bits) and register `A` (12 bits) shift
left together as one pair. A third register holds `-|Y|`.

On a taken request (`ld`):

* `A` takes `|X|`;
* `P` is cleared;
* the divisor and the operand signs are stored.

Then, for 12 cycles:

```
shifted = {P, A[11]}                 // 13 bits
sum     = shifted + (-|Y|)
if sum >= 0:  P = sum,     shift 1 into A
else:         P = shifted, shift 0 into A     // the "restore"
```

After 12 steps `A` holds `|Q|` and `P` holds `|rem|`. The sign inverters
give `qt` and `rem` from them.

`rs_counter` sequences the work:

* `ld = start & rdy`;
* `stp` is high for exactly 12 cycles;
* `done` pulses once as the unit becomes ready again.

**Handshake.** A request is taken when `in_valid && in_ready`. `out_valid`
pulses 13 cycles later. `qt`/`rem` stay valid until the next request is
taken. A new request can be taken in the very cycle `out_valid` is high, so
back-to-back divisions take 13 cycles each.

## Two-way parallel restoring divider (`rs_parallel2`)

There are two `rs_divider` copies and a turn bit. `in_ready` is the ready
signal of the copy whose turn it is.

The two copies start in different cycles and take equally long. They
therefore finish in different cycles and in request order. The output
multiplexer passes whichever copy reports done. Two divisions are in flight
at once, which doubles the rate to 2 per 13 cycles.

## Where this RTL departs from the original circuit descriptions

* **Restoring step on one clock edge.** The original shifts on the rising
  edge. It catches the adder result in a backup register on the falling edge,
  and copies it into `P` under a level-sensitive enable. An RS flip-flop holds
  the adder's sign for `A`'s lsb.

  Here the whole step happens on one rising edge:
  `P <= (sum >= 0) ? sum : shifted`. This removes the backup register, the
  gated enable and the flip-flop. Each clock still does exactly one step.
* **Restore condition.** The prose says the sum is kept when it is "greater
  than zero". The circuit drawing derives the enable from the sum's sign bit.
  This RTL keeps a sum that is exactly zero, as the sign-bit version does,
  and as exact divisions require.
* **Adder width of the restoring divider.** The drawing shows 12-bit buses
  throughout. `P` does fit 12 bits, but the shifted `P` can reach 4095 and
  `-|Y|` can be -2048. The adder and the stored `-|Y|` are therefore 13 bits.
  With 12 bits, divisors above 1024 in magnitude would fail.
* **Output enables.** The restoring drawing gates its sign inverters with
  `rdy`. Here they are not gated; `out_valid` marks the result instead.
  Operand signs are captured at load, so `x`/`y` need not be held during the
  division.
* **First row of the array.** One drawing of the array starts with dividend
  bit M-1. The pipelined drawing starts with bit M-2 and fixes the top
  quotient bit at 0, which would mis-divide -2048.

  This RTL uses M rows starting at bit M-1. That covers the full operand
  range at the cost of one more row.
* **No early exit.** The algorithm as written stops when a partial remainder
  becomes zero. The array has a fixed number of rows, so it does not, and the
  results are the same.
* **Register placement.** The cut after row 6 for two stages follows the
  original drawing. The drawing also marks registers around the input
  inverters. Here the input register sits before the inverters, with no
  separate stage after them. The 4-stage spacing (every 3 rows) is this
  design's, as are the valid bits, the turn pointers, the output register of
  the parallel array and all handshakes.
* **Not included.** The vendor divider cores that the original study used as
  a comparison are not part of this design.

## Files

| file | contents |
|---|---|
| `rtl/div_pkg.sv` | sizes (`DIV_M = DIV_N = 12`) and the request/response structs used on `div_top`'s ports |
| `rtl/ctrl_inv.sv` | controlled two's-complement negator |
| `rtl/nr_cell.sv` | one non-restoring row |
| `rtl/nr_comb.sv` | complete combinational non-restoring divider |
| `rtl/nr_divider.sv` | registered non-restoring divider, `PIPE_STAGES` = 1, 2, 4 |
| `rtl/nr_parallel2.sv` | two-way parallel non-restoring divider |
| `rtl/rs_counter.sv` | step counter and control of the restoring divider |
| `rtl/rs_divider.sv` | sequential restoring divider |
| `rtl/rs_parallel2.sv` | two-way parallel restoring divider |
| `rtl/div_top.sv` | the six configurations side by side |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_div_throughput.sv` | saturating-load test of requests per cycle for all six configurations |
| `tb/tb_rs_exhaustive.sv` | all operand pairs through the two-way parallel restoring divider |

The widths are parameters: `M` is the dividend/quotient width and `N` the
divisor/remainder width, 12 by default; `PIPE_STAGES` applies to
`nr_divider`. `div_top` takes its widths from `div_pkg`.

## Simulating

Every testbench checks itself. It prints `TB_RESULT checks=<n> failures=<n>`
and ends. For example:

```
verilator --binary --timing -Irtl -Itb rtl/div_pkg.sv tb/tb_div_top.sv --top-module tb_div_top -Mdir obj_top
./obj_top/Vtb_div_top
```

Replace `tb_div_top` with any other testbench name. All expected values come
from integer `/` and `%` in the testbench, not from the RTL.

What each testbench covers:

* `tb_ctrl_inv`: all 4096 inputs, negated and not.
* `tb_nr_cell`: 20000 random rows and the boundary remainders.
* `tb_nr_comb`: all 16.7 million operand pairs with a non-zero divisor. This
  takes about 6 s.
* `tb_nr_divider`: 1, 2 and 4 stages on one random stream with gaps. It checks
  values and exact latency, and that divisions overlap in the pipelines.
* `tb_nr_parallel2`: values, 3-cycle latency, use of both copies and overlap.
* `tb_rs_counter`: cycle-by-cycle `rdy`/`ld`/`stp`/`done` against a
  run-length model.
* `tb_rs_divider` and `tb_rs_parallel2`: random and corner operands,
  13-cycle latency, stalls on `in_ready`, back-to-back requests, and two
  divisions in flight for the parallel version.
* `tb_div_top`: all six configurations end to end at full size. It counts
  each of these and fails if any never happens:
  * a restoring step that actually restores (a zero quotient bit);
  * a final remainder correction;
  * a negative quotient;
  * a negative remainder;
  * a stall;
  * the -2048 / -1 wrap;
  * overlapping divisions.
* `tb_div_throughput`: all six configurations under full load for 1300
  cycles. Each non-restoring configuration must take 1300 requests, `rs_ref`
  100 and `rs_par2` 200.

* `tb_rs_exhaustive`: all 16.7 million operand pairs with a non-zero
  divisor, through `rs_parallel2` at full rate. It checks values, order and
  the 13-cycle latency. This takes about 80 s.

Division by zero is never checked.
