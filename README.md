# Binary to multi-digit MDLNS conversion with range addressable look-up tables

This RTL converts signed binary integers into the two-dimensional
multi-dimensional logarithmic number system (MDLNS). An n-digit MDLNS number is

    x ≈ s_1·2^a_1·D^b_1 + s_2·2^a_2·D^b_2 + … + s_n·2^a_n·D^b_n,   s_i ∈ {−1, 0, +1}

It has two bases: 2 and a second base D (3 by default). The exponents a_i and
b_i are integers, and b_i is limited to R bits, b ∈ [−2^(R−1), 2^(R−1)−1].
Unlike the ordinary logarithmic number system, no formula maps a binary value
to its best MDLNS digits, so the conversion is a search. The simplest search is
a table indexed by every possible input, but that table grows exponentially with
the input width. This design avoids it with two ideas:

1. **Search only over b.** Every digit 2^a·D^b can be normalized into [1, 2)
   by choosing a. So there are only 2^R distinct normalized *kernels*, one per
   b. To convert a value, normalize it into [1, 2) as well, find the kernels
   just below and just above it, and put the normalization shift back into a.
   The table has 2^R rows, whatever the input width.
2. **Find the neighbours with a range-addressed table (RALUT).** A RALUT's
   address decoder matches an address *range* instead of one exact address. It
   returns both neighbouring kernels in a single look-up.

Digits beyond the first are found greedily, each on the error the earlier digits
leave. Both neighbours are kept at every level except the last: the lower one
undershoots and the higher one overshoots, and the overshoot flips the sign of
the remaining error. So an n-digit conversion compares 2^(n−1) candidate
approximations and keeps the most accurate.

The configuration built by default has R = 4, D = 3, two digits and 16-bit
inputs.

## The kernel table

For each b, a = ceil(−b·log2 D) is the exponent that puts x = 2^a·D^b into
[1, 2). The 2^R rows are sorted by x. For R = 4, D = 3:

| x        | a   | b  |   | x        | a  | b  |
|----------|-----|----|---|----------|----|----|
| 1.000000 | 0   | 0  |   | 1.423828 | −9 | 6  |
| 1.053498 | 8   | −5 |   | 1.500000 | −1 | 1  |
| 1.067871 | −11 | 7  |   | 1.580247 | 7  | −4 |
| 1.125000 | −3  | 2  |   | 1.687500 | −4 | 3  |
| 1.185185 | 5   | −3 |   | 1.777778 | 4  | −2 |
| 1.248590 | 13  | −8 |   | 1.872885 | 12 | −7 |
| 1.265625 | −6  | 4  |   | 1.898437 | −7 | 5  |
| 1.333333 | 2   | −1 |   | (2.000000 | 1 | 0) |
| 1.404664 | 10  | −6 |   |          |    |    |

The row after the last is 2.0 = 2^1·D^0. It is needed because a value just
below 2 has no higher neighbour in the table.

`ralut` computes this table during elaboration from the parameters R and D.
There is no data file. Each kernel is built by multiplying (b > 0) or dividing
(b < 0) a 56-fraction-bit accumulator by D, |b| times. After each step the
accumulator is renormalized into [1, 2) by shifting, and a is counted down or
up with each shift. The kernels are then rounded to `X_FRAC` (16) fraction bits
and bubble-sorted. D must therefore be an odd integer, and below 128 so that the
64-bit accumulator cannot overflow. The method itself would
allow any real D that is not a power of two.

## The range addressable look-up table (`ralut`)

Row k of the table holds a comparator `mant >= x_k`. The rows are sorted, so the
comparator outputs form a thermometer code: ones up to the row just below the
input, zeros after it. Each row's word line is the XOR of its own comparator and
the one of the next row. The last row XORs with a constant 0. Exactly one word
line is active: the row with x_k ≤ mant < x_(k+1). It drives that row's data
word, which holds two entries: the row's own (x_k, a_k, b_k) and the next row's
(x_(k+1), a_(k+1), b_(k+1)).

A conventional RALUT would compare each row against both of its bounds. The XOR
form needs only one "≥" comparator per row. An immediate assertion checks that
at most one word line is active. The read-out is an AND-OR over the word lines,
so a zero mantissa (the zero input) gives all-zero outputs.

## One conversion step: the NRS block (`nrs`)

The converters keep every value as an unsigned magnitude plus a separate sign.
A magnitude is fixed point: `VW = DATA_W + FRAC_W` bits, of which `FRAC_W` (8)
are fraction bits. An input x enters as |x|·2^FRAC_W. The fraction bits hold
the part of later errors that falls below the input's LSB.

NRS stands for Normalizer, RALUT and Subtraction:

* `normalizer` finds the leading one at bit position p and shifts the value
  into a 1.X_FRAC mantissa. Lower bits are truncated. Truncation keeps the
  RALUT comparison exact, because the kernels also have X_FRAC fraction bits.
  The binary exponent is e = p − FRAC_W.
* `ralut` returns x_lo ≤ mant < x_hi, with their exponents.
* `subtraction` scales the two kernels back by (x << p) >> X_FRAC and forms two
  errors, both non-negative:
  * err_lo = v − x_lo·2^e
  * err_hi = x_hi·2^e − v

  It also forms the digit exponents a + e.

The NRS block outputs two candidate digits with their residuals:

| candidate | digit           | residual          | residual sign |
|-----------|-----------------|-------------------|---------------|
| lower     | s·2^(a_lo+e)·D^b_lo | v − x_lo·2^e  | s             |
| higher    | s·2^(a_hi+e)·D^b_hi | x_hi·2^e − v  | −s            |

A zero residual gives zero digits (s = 0) and zero residuals, so an input of
zero, or an input that is represented exactly in fewer than n digits, comes out
with trailing zero digits. A digit on a port is `{nz, neg, a, b}`:
s = nz ? (neg ? −1 : +1) : 0, and a and b are two's complement.

## Multi-digit search

Each of the first n−1 levels branches into its lower and higher candidate. On
the last level, `mdlns_comparator` keeps the better of the two candidates. The
2^(n−1) leaves are then compared and the one with the smallest final error
wins. On equal errors, the lower candidate and the earlier leaf win. The
earlier leaf is the one with more lower choices, counted from the most
significant digit.

A worked example (R = 4, D = 3, two digits, which needs `DATA_W` ≥ 21):

* 845937 = 1.613497·2^19. The nearest kernels are 1.580247 (a=7, b=−4) and
  1.687500 (a=−4, b=3).
* Lower path: 2^26·3^−4 = 828504.5 leaves +17432.5. That is best matched by
  2^3·3^7 = 17496, for a final error of about −63.5.
* Higher path: 2^15·3^3 = 884736 overshoots by 38799. That is best matched by
  −2^20·3^−3 = −38836.1, for a final error of about +37.1.
* The higher path wins. The result is 845937 ≈ 2^15·3^3 − 2^20·3^−3.

The testbenches check this result on every multi-digit converter.

## Three circuits for the same conversion

All three multi-digit circuits return identical digits and errors for the same
input. `mdlns_converter_top` instantiates all of them side by side. Each has
its own ports; they share only the clock and reset.

### Feed-forward (`mdlns_ff_single`, `mdlns_ff_multi`)

* The single-digit converter is a sign separator, one NRS block and one
  comparator.
* The n-digit converter unrolls the search tree. Level k holds 2^k NRS blocks,
  2^n − 1 in all. Block j of level k works on the residual of candidate j%2 of
  block j/2 of level k−1. A comparator chain then runs over the leaves.
* Both circuits are combinational up to a single output register. The result
  appears with `out_valid` one clock after `in_valid`, and a new input can be
  accepted every clock.
* Setting `PIPELINE = 1` on `mdlns_ff_multi` (`FF_PIPELINE` on the top) adds a
  register stage after every tree level but the last. The candidates of the
  earlier levels travel through delay registers so that they reach the path
  selection together with the last level. Latency becomes `N_DIGITS` clocks,
  and throughput stays one conversion per clock.

### Scalable feed-back (`mdlns_fb_scalable`)

This circuit has a single NRS block, a state machine, a stack register file, a
mirrored "best" stack and the Error/Best Error registers (`mdlns_stack`,
`mdlns_best_stack`, `mdlns_error_regs`). The state machine walks the tree depth
first, lower candidates first:

| state | action |
|-------|--------|
| IDLE  | On `start`, load \|x\| and its sign as the current residual. |
| EVAL  | Run the NRS block on the current residual and write both candidates of this level to stack entries 2k (lower) and 2k+1 (higher). Above the last level, descend into the lower candidate. On the last level, load the better candidate's error into Error and go to LEAF. |
| LEAF  | If Error < Best Error, or this is the first leaf, copy the whole stack into the best stack in one cycle and record the path. |
| BACK  | Find the deepest level still on its lower candidate. Switch it to the higher candidate, read that residual back from the stack and go to EVAL. If there is no such level, go to OUT. |
| OUT   | Read the chosen entry of every level out of the best stack. Pulse `done`. |

The stack has 2^n entries, of which the search uses 2n. One conversion takes
2^n − 1 EVAL, 2^(n−1) LEAF and 2^(n−1) BACK cycles, plus IDLE and OUT, so
`done` rises 2^(n+1) clocks after the start edge: 8 clocks for two digits and 16
for three. `start` is accepted while `busy` is low, and the outputs hold until
the next `done`.

### Simplified two-digit feed-back (`mdlns_fb_two_digit`)

With two digits the tree has one root and two leaves, so the stack is never
deeper than one level. This circuit drops the stack and uses the single NRS
block three times: on the root, on the lower child's residual and on the higher
child's residual. It keeps the first leaf's result in a register and compares
it with the second. `done` rises 4 clocks after the start edge.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `R`        | 4  | bits of b; table has 2^R rows |
| `D`        | 3  | second base (odd integer below 128 here) |
| `N_DIGITS` | 2  | digits of the multi-digit converters (the simplified one is always 2) |
| `DATA_W`   | 16 | signed input width |
| `FRAC_W`   | 8  | fraction bits kept on residual errors (own choice) |
| `X_FRAC`   | 16 | fraction bits of the kernels (own choice) |
| `A_W`      | 8  | width of the output exponent a (own choice) |
| `PIPELINE` / `FF_PIPELINE` | 0 | register stage per tree level in the feed-forward multi-digit converter (own choice of placement) |

`A_W` must hold |a_table| + DATA_W. With R = 4 and D = 3, |a_table| ≤ 13.
The table exponent width inside the RALUT is derived from R and D
(`mdlns_pkg::table_a_width`).

Accuracy: each kernel is rounded to 2^−(X_FRAC+1) relative precision. Scaled
by 2^e, this moves a digit's value by up to 2^(e−X_FRAC−1). For 16-bit inputs
that is below a quarter of an input LSB. The errors reported on `err`, and used
to choose between paths, are those of the rounded kernels. They are exact in
the fixed-point frame, truncated at 2^−FRAC_W.

## Departures from the published design and what is not built

* **Cycle counts.** The published scalable feed-back converter (n=2, R=4, D=3)
  takes 24 clocks per conversion, and the simplified one 19. Their internal
  schedules are not published. The state machines here take one clock per NRS
  evaluation and need 8 and 4 clocks. Area and the 15 ns critical path of the
  published 0.18 µm implementation are not reproduced.
* **Second base.** D is restricted to odd integers because the table is
  generated with integer arithmetic.
* **Own choices.**
  * the fixed-point widths (`FRAC_W`, `X_FRAC`, `A_W`)
  * the tie rules
  * synchronous active-low reset
  * the valid/start/done handshakes
  * the pairwise stack layout
  * the parallel read-out of the best stack
  * the comparator chain (rather than a tree) over the leaves
* **Large R.** The published method splits one large RALUT (for example 65536
  rows for R = 16) into two or three smaller chained RALUTs. How the split
  tables are generated and combined is not published, so it is not
  implemented. The single-RALUT design elaborates its table in a loop of about
  2^R·2^(R−1) steps, which is practical up to roughly R = 10.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line. The shared reference model
`tb/mdlns_ref_pkg.sv` is written independently of the RTL: it builds the table
with real arithmetic (`$ln`, `$pow`, rounding) and finds the neighbouring
kernels by linear search.

* `ralut_tb` checks every row of the R=4, D=3 table above to 6 decimals, and
  checks random mantissas against the linear search.
* `mdlns_ff_single_tb`, `mdlns_ff_multi_tb`, `mdlns_fb_scalable_tb` and
  `mdlns_fb_two_digit_tb` run the 845937 examples at 24-bit width, plus
  random, zero and extreme inputs. The multi-digit testbenches cover both two
  and three digits. They check the latencies: 1, 8, 16 and 4 clocks, and 3
  clocks for a pipelined three-digit feed-forward converter.
* `mdlns_converter_top_tb` runs the top at its default parameters. It feeds
  3000 inputs to all four converters, compares them with the model and with
  each other, and checks the cycle counts. It also counts how often each
  mechanism occurred and fails if one never did:
  * zero input
  * negative input
  * lower and higher single-digit choice
  * the 2.0 top row
  * the overshooting path winning
  * an exactly represented residual

To run a testbench with Verilator (from the directory holding `rtl/` and
`tb/`):

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/mdlns_pkg.sv tb/mdlns_ref_pkg.sv rtl/*.sv tb/mdlns_converter_top_tb.sv \
        --top-module mdlns_converter_top_tb -Mdir obj && ./obj/Vmdlns_converter_top_tb

Replace the testbench file and top-module name to run another testbench. Each
one finishes in well under a second.

## Files

| file | contents |
|------|----------|
| `rtl/mdlns_pkg.sv` | default sizes, table exponent width |
| `rtl/sign_separator.sv` | two's complement → sign, magnitude, zero flag |
| `rtl/normalizer.sv` | leading-one detection and mantissa shift |
| `rtl/ralut.sv` | kernel table generation and range-addressed look-up |
| `rtl/subtraction.sv` | candidate errors and digit exponents |
| `rtl/nrs.sv` | normalizer + RALUT + subtraction |
| `rtl/mdlns_comparator.sv` | smaller-error select |
| `rtl/mdlns_ff_single.sv` | feed-forward single-digit converter |
| `rtl/mdlns_ff_multi.sv` | feed-forward n-digit converter (NRS tree) |
| `rtl/mdlns_stack.sv`, `rtl/mdlns_best_stack.sv`, `rtl/mdlns_error_regs.sv` | storage of the feed-back search |
| `rtl/mdlns_fb_scalable.sv` | scalable feed-back n-digit converter |
| `rtl/mdlns_fb_two_digit.sv` | simplified two-digit feed-back converter |
| `rtl/mdlns_converter_top.sv` | all converters side by side |
| `tb/*_tb.sv` | one testbench per module |
| `tb/mdlns_ref_pkg.sv`, `tb/tb_check.svh` | reference model and check helpers |
