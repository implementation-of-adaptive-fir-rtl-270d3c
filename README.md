# DA/OBC LMS adaptive FIR filter

An LMS adaptive FIR filter whose inner product is computed without
multipliers. It uses distributed arithmetic (DA): the weights are read one bit
slice per clock cycle, and each slice addresses a small table of precomputed
sums of the input samples. The tables use offset binary coding (OBC), so a
4-tap block needs only 8 table registers instead of 15 or 16. The
shift-accumulation is carry-save, so there is no carry propagation in the
L-cycle loop. The weight update also has no multiplier: the error is rounded
to a power of two, each delayed input is shifted by a barrel shifter, and the
result is added to or subtracted from its weight.

Default configuration: N = 4 taps, B = 8-bit inputs, L = 8-bit weights,
step size mu = 1/N. N may be any multiple of 4. Lengths 8, 16 and 32 are
tested.

## Number formats

| signal | format |
|---|---|
| `x_in`, `d_in` | B-bit two's complement; read as Q1.(B-1) or as integers ("x units") |
| weights `w_k` | L-bit two's complement, Q1.(L-1): w = -b_{L-1} + sum_{j<L-1} b_j 2^(j-L+1) |
| `y_out`, `e_out` | integers in x units, B+log2(N)+1 and B+log2(N)+2 bits |

The filter output is

    y(n) = sum over 4-tap blocks b of floor( sum_{k in b} x(n-k) * w_k / 2^(L-1) )

so each block is truncated on its own before the blocks are added.

## Offset-binary DA in one 4-tap block (`inner_product_block`)

This is the least obvious part of the design. Write an integer weight as
w = ((w - ~w) - 1) / 2. Bit j of (w - ~w) is then c_j = 2 b_j - 1, which is
+1 or -1. For four taps and weight bit slice j with address
a = {w_3[j], w_2[j], w_1[j], w_0[j]}:

    2 * sum_k x_k w_k = sum_j s_j 2^j D(a_j) + D(0000)
    D(a) = sum_k (2 a_k - 1) x_k,     s_j = -1 for the sign slice j = L-1, else +1

Because D(~a) = -D(a), only the 8 addresses with a_3 = 0 are stored
(`obc_da_table`): T[m] = sum_{k<3} (+/-x_k) - x_3, with the sign taken from
bit k of m. The table is refilled by an adder network each time a sample is
accepted. When reading slice j:

- if a_3 = 1, the low three address bits are complemented and the entry
  is negated;
- in the sign slice the entry is negated once more.

The two negations combine into one sign-control bit, which XORs every bit of
the entry (one's complement). Each XORed entry is therefore 1 short at
weight 2^j. The missing ones add up to
K = {~w_3[L-1], w_3[L-2:0]}, which is the offset-binary code of w_3. So the
accumulator starts with **sum word = T[0]** (the OBC offset term D(0000))
and **carry word = K**. No carry-in is needed anywhere else.

`csa_accumulator` adds one partial sum per cycle with a row of full adders.
It stores s>>>1 as the new sum word and the majority vector as the new carry
word. For W-bit signed vectors, a+b+p = s + 2c holds exactly, so each step
drops one bit that is exact. After L steps,
sum + carry = floor(2 * sum x_k w_k / 2^L). That is the block result above.
Both words are W = max(B+3, L+1) + 2 bits wide, which is 13 for the
defaults. The table entries are B+3 bits wide, because an entry reaches
+2^(B+1) when every x is -2^(B-1).

## Higher orders (`data_computing_block`, `output_adder`)

A filter of length N has N/4 blocks. Each block has its own table,
accumulator and weight-increment cell, and all blocks share the slice
counter and the update command (error sign and t). Up to four blocks form a
`data_computing_block`, a 16-tap unit. Inside it, one binary adder tree adds
the blocks' sum words and a second adds their carry words, so the unit
delivers one sum word and one carry word.

- N = 4, 8, 12 or 16: the filter has one such unit, with N/4 blocks.
- N = 32, 48, ...: the filter has N/16 units.

`output_adder` adds the units' sum words and carry words in two more trees,
then adds the two totals in a final adder. For N <= 16 this reduces to one
adder that adds the single sum word to the single carry word. The sum and
carry words of a block have the same weight here, so no carry-in bits are
needed.

## Timing and the adaptation delay

A sample takes L cycles; back-to-back samples are accepted every L cycles.

| cycle (after the accept edge) | activity |
|---|---|
| 0 .. L-1 | slice j = cycle, LSB first; the tables hold the new input vector |
| L | final adder; `error_unit` registers y(n) and e(n) = d(n) - y(n) |
| L+1 | `y_valid` is high. The sign-magnitude separator and control word generator turn e(n) into (sign, t), which is registered |
| last slice of sample n+1 | every weight is updated with e(n) and x(n-k) from the delay line's taps 1..N |

Weights change only at the end of a last slice, so they stay constant while
they are read bit by bit. As a result the update runs one sample behind
(adaptation delay m = 1):

    w(n+1) = w(n) + sign(e(n-1)) * (x(n-1-k) >>> t(e(n-1)))

`y_valid` comes L+2 clock edges after the accept edge. The next sample may
be accepted in the last slice (`in_ready` is high then). If no sample is
offered, the filter idles and the pending update waits for the next sample.

## Weight update (`control_word_gen`, `barrel_shifter`, `weight_increment`)

The error is rounded down to a power of two: with p = floor(log2 |e|),

    t = TOFF - p,   TOFF = log2(N) + MU_I + 2(B-1) - (L-1)

This makes x_k >>> t approximate mu * e * x_k in weight units, with
mu = 2^-MU_I / N. A t below 0 is clamped to 0. If t > B-1, or e = 0, the
update is skipped. This dead zone matters: an arithmetic shift of a
negative x by that much gives -1 while a positive x gives 0, and that bias
made the weights of the 16- and 32-tap filters wander. Each weight has a
logarithmic barrel shifter and an adder/subtractor. It adds when the error
is positive and subtracts when it is negative. Weights wrap on overflow and
reset to zero.

### Weight resolution limits adaptation

The smallest increment is one weight LSB, 2^-(L-1). An error changes the
weights only when |e| >= 2^(TOFF-B+1). With B = L = 8 and mu = 1/N that
threshold is:

| N | 4 | 8 | 16 | 32 |
|---|---|---|---|---|
| threshold | 4 | 8 | 16 | 32 |

(in x LSBs)

Once the error is inside this dead zone, adaptation stops. At N = 32 with
8-bit weights, that is a quarter of full scale. The 32-tap test with L = 12
shows the same structure converging to an error of a few LSBs. If a long
filter must track small errors, widen L (or B) through the parameters.

## Ports of `da_lms_filter`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid` / `in_ready` | in/out | 1 | the sample on `x_in`/`d_in` is taken when both are high |
| `x_in`, `d_in` | in | B | input x(n) and desired response d(n) |
| `y_valid` | out | 1 | one-cycle pulse: `y_out`/`e_out` are new |
| `y_out` | out | B+log2(N)+1 | filter output y(n) |
| `e_out` | out | B+log2(N)+2 | error e(n) |
| `w_out` | out | N x L | current weights |

Parameters: `N` (multiple of 4, default 4), `B` (default 8), `L` (default
8, at least 3), `MU_I` (default 0).

## Files

- `rtl/da_lms_pkg.sv`: width rules and the update-command struct.
- `rtl/da_lms_filter.sv`: the top level.
- `rtl/da_lms_controller.sv`: slice counter and handshake.
- `rtl/tap_delay_line.sv`: input delay line.
- `rtl/obc_da_table.sv`, `rtl/csa_accumulator.sv`, `rtl/inner_product_block.sv`: the DA inner product.
- `rtl/data_computing_block.sv`: the 16-tap unit.
- `rtl/adder_tree.sv`, `rtl/output_adder.sv`: block combining and final adder.
- `rtl/error_unit.sv`, `rtl/sign_mag_separator.sv`, `rtl/control_word_gen.sv`: error path.
- `rtl/barrel_shifter.sv`, `rtl/weight_increment.sv`: weight update.

Every RTL module has a self-checking testbench `tb/tb_<module>.sv`, except the helper `adder_tree`, which is
tested through `tb/tb_output_adder.sv` and `tb/tb_data_computing_block.sv`. Each
testbench compares against values computed independently, prints
`TB_RESULT checks=.. failures=..` and has a watchdog.

- `tb/lms_checker.sv` holds a bit-exact reference model of the whole filter.
  It drives a system-identification run against a sparse FIR plant with
  noise, using random idle gaps and occasional zero-error samples.
- `tb/tb_da_lms_filter.sv` runs it on the default top (N = 4, 3000 samples).
- `tb/tb_da_lms_orders.sv` runs it on five configurations, 4000 samples each:
  N = 8, 16 and 32; N = 8 with mu = 1/(2N); and N = 32 with L = 12.

Both check every y(n), e(n) and weight vector, plus the latency and the
spacing between accepts. They also check that the error falls. The mean |e| of the last 32 samples
must be below half that of the first 32, or inside the dead zone. They count
back-to-back and after-gap samples, add and subtract updates, zero errors,
dead-zone skips, folded table reads and sign-slice negations. Any count that
stays at zero is a failure.

Simulating with Verilator, for example the top:

    verilator --binary --timing --assert --top-module tb_da_lms_filter \
        rtl/da_lms_pkg.sv $(ls rtl/*.sv | grep -v da_lms_pkg) tb/lms_checker.sv \
        tb/tb_da_lms_filter.sv -o sim && obj_dir/sim

## What is this design's own choice

The following follow the source design: the 8-register OBC tables, the
address multiplexers, the XOR sign control, the carry-save accumulation over
L cycles, the adder trees, the error circuit, the sign-magnitude separator,
the control word generator, the barrel shifters, the adder/subtractor cells
and mu = 1/N.

These were chosen here:

- the input width B = 8;
- the adaptation delay of 1;
- the valid/ready handshake and the idle behaviour;
- reset values;
- the folding rule and the offset-binary carry preload that make the
  8-entry table exact;
- equal weighting of sum and carry words, so the trees need no carry-ins;
- accumulator widths somewhat larger than L+2, needed for the OBC entries
  and the preload;
- the exact rule for the control word, including clamping and the dead zone;
- weight wrap-around;
- per-block truncation before the blocks are added.

The logic of the original control-word circuit for L = 8 is not reproduced;
the rule above stands in for it. Synthesis figures (slices, LUTs,
flip-flops on an FPGA) are not reproduced either.
