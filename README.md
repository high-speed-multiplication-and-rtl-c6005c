# Byte-partitioned 2's-complement multiplier with a single (p,2) counter row

This is a fast fixed-point multiplier for 2's-complement fractions (a sign bit
plus N-1 fraction bits, N = 25 by default, which is the significand of a
single-precision float). It has three steps:

1. **Summand generation.** Both operands are cut into `l` bytes, and all `l²`
   byte products are formed at the same time by small `m × m` multipliers.
2. **Summand summation.** One row of column counters reduces the byte
   products, each shifted to its place, to just two numbers: a partial sum
   PS and a partial carry PC. There is one counter per column.
3. **Carry-propagate addition.** A carry look-ahead adder adds PS and PC.

What makes it fast is that the reduction takes only a single counter row.
It is not a tree of many adder stages. A `(p,2)` counter reduces a column of
`p` bits to two output bits. The carries it passes to the next column enter
that column's counter late, so they never ripple along the row. The row
settles after a fixed, small number of full-adder delays, however wide the
product is.

With the default `m = 13`, a 25-bit operand splits into a 13-bit top byte
and a 12-bit low byte. That takes four 13 × 13 multipliers and a row of plain
full adders. Splitting it into 12-bit pieces instead would need nine
multipliers.

## Cutting the operands into bytes

An N-bit operand X is cut from the least significant end into `l` bytes:

* bytes `X_0 … X_{l-2}` are `m-1` bits each, read as **unsigned** numbers;
* the top byte `X_{l-1}` is the rest, `b = N-(m-1)(l-1)` bits (`b ≤ m`). It
  includes the sign and is read as a **signed** number.

Here `l = ceil((N-1)/(m-1))`. The value is then
`X = X_{l-1}·2^{(m-1)(l-1)} + Σ X_k·2^{(m-1)k}`, and the same holds for Y.
Each `m × m` multiplier is a 2's-complement multiplier. A low byte enters it
with its sign input tied to 0, so any product of two low bytes is never
negative. Where the top byte meets a low byte, the top byte is sign-extended
to `m` bits. The top × top product has its own `b × b` multiplier.

| configuration (N, M) | bytes (top first) | multipliers | summands | tallest column | counters used | adder width |
|---|---|---|---|---|---|---|
| 25, 13 (default) | 13, 12 | 4 × (13×13) | 4 | 3 | (3,2) in bits 12–48 | 37 (bits 0–11 bypass) |
| 25, 9 | 9, 8, 8 | 9 × (9×9) | 9 | 5 | (3,2) in 8–15, (5,2) in 16–48 | 41 (bits 0–7 bypass) |
| 57, 17 | 9, 16, 16, 16 | 15 × (17×17) + 1 × (9×9) | 16 | 7 | (3,2) in 16–31, (5,2) in 32–47, (7,2) in 48–112 | 97 |

The product of `X_i` and `Y_j` has weight `2^{(m-1)(i+j)}`. Its width and
sign depend on which bytes it comes from:

* low × low: `2(m-1)` bits, unsigned. These summands just end at their top
  bit.
* top × low: `b+m-1` bits, signed.
* top × top: `2b-1` bits, signed.

The signed summands are sign-extended up to the top of the product. In any
column, at most `1 + 2(l-1)` summands are present. This counts the top × top
summand and the top × low summands, all of which reach the top, plus the one
low × low summand still alive there. So `l = 2, 3, 4` needs counters with at
most 3, 5 or 7 inputs. The first `m-1` columns hold only bits of `X_0·Y_0`.
They are final product bits as they stand and go around the adder.

The result has `2N-1` bits: a sign plus `2(N-1)` fraction bits. One product
does not fit in that width: (-1.0) × (-1.0) = +1.0, which wraps to -1.0.
Nothing flags it.

## The (p,2) counters and the carries between columns

Every counter is built from full adders. It takes `p` bits of weight `2^n`
and carry-ins of weight `2^n` from the column below. It produces three
things:

* PS, of weight `2^n`;
* PC, of weight `2^{n+1}`;
* carry-outs, of weight `2^{n+1}`, for the column above.

**(3,2)**: one full adder. It has no carry-ins and no carry-outs. A row made
only of these has no carries between columns at all.

**(5,2)** (`counter_5_2`): three full adders, two carry-ins and two
carry-outs.

```
FA1: in0 in1 in2           -> s1, cout0
FA2: in3 in4 s1            -> s2, cout1
FA3: s2  cin0 cin1         -> PS, PC
```

Both carry-outs depend only on the column's own inputs. The carry-ins enter
only the last adder.

**(7,2)** (`counter_7_2`): five full adders, four carry-ins and four
carry-outs.

```
FA1: in1 in2 in3           -> s1, cout0      (1 FA delay)
FA2: in4 in5 in6           -> s2, cout1      (1)
FA3: in0 s1  s2            -> s3, cout2      (2)
FA4: s3  cin0 cin1         -> s4, cout3      (3)
FA5: s4  cin2 cin3         -> PS, PC
```

Here `cout3` depends on `cin0` and `cin1`. The row therefore wires column
`c`'s `cout[k]` to column `c+1`'s `cin[k]`. This sends `cout3` into the last
adder of the next column, where it stops. No carry crosses more than one
column boundary. For each counter, this pairing hands every carry-in over by
the time the adder that takes it has its other inputs ready. The pairing is
this design's choice. Any pairing gives the same sum, but pairing `cout3`
with `cin0` or `cin1` would let a carry ripple along the whole row.

`counter_row` gives each column the smallest counter that holds its height.
The counter type never decreases from one column to the next, so every
carry-out always finds a carry-in. In the three configurations above, this
rule changes nothing. Carries out of the top column and the top column's PC
have weight `2^{2N-1}`. They lie outside the product and are dropped.

In every column, the counter keeps the total:
`Σ inputs + Σ carry-ins = PS + 2·PC + 2·Σ carry-outs`. Adding this up over
the whole row gives `PS + PC = X·Y (mod 2^{2N-1})`, with PC already shifted
to the weight it carries.

## Byte multipliers

`booth_mult` is a `W × W` 2's-complement multiplier that uses radix-4
modified Booth recoding. The multiplier operand is recoded into `(W+1)/2`
digits (`W/2` for even W) in {-2, -1, 0, +1, +2}. Each digit selects 0, ±a
or ±2a. The selected multiples are shifted by two bits per digit and added
up with a plain adder chain. This multiplier is written only as a function.
How a real multiplier chip arranges its internal array is outside this
design.

## Final adder

`cla_adder` is a Kogge-Stone parallel-prefix adder. It combines the generate
and propagate bits in `ceil(log2(WIDTH+1))` levels, and the carry-in enters
as an extra generate bit below bit 0. In the top module it adds PS and PC
over columns `m-1 … 2N-2`.

## Pipeline and interface

`hs_mult` has three sections. When `PIPELINE = 1` (the default), registers
sit at the outputs of the byte multipliers and of the counter row. The adder
output is not registered. The timing is:

* one operand pair is accepted every clock;
* its product appears two clocks later;
* `out_valid` follows `in_valid` by two clocks.

When `PIPELINE = 0`, the path is purely combinational and
`out_valid = in_valid`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock of the staging registers |
| `rst_n` | in | 1 | asynchronous active-low reset of the valid pipeline |
| `in_valid` | in | 1 | `x` and `y` hold an operand pair |
| `x`, `y` | in | N | multiplicand and multiplier, 2's complement |
| `out_valid` | out | 1 | `product` is the result for the pair applied two clocks earlier |
| `product` | out | 2N-1 | `x*y`, sign plus 2(N-1) bits |

There is no stall input. Data registers are not reset, and only the valid bit
is. An assertion checks that no partial carry ever shows up below the adder's
lowest column.

Parameters of `hs_mult`:

* `N`: operand width, sign included. Default 25.
* `M`: size of the byte multipliers. Default 13. Sensible values are 9, 13,
  17 and 21. The top byte length follows from `N` and `M`. Elaboration stops
  with an error if `N ≤ M` or if a column would need more than seven inputs
  (`l > 4`).
* `PIPELINE`: 1 or 0, as described above.

## Files

| file | contents |
|---|---|
| `rtl/hsm_pkg.sv` | elaboration-time geometry: byte count, top byte length, summand offsets and widths, column heights, counter type per column |
| `rtl/hs_mult.sv` | top: the three sections and the valid pipeline |
| `rtl/summand_gen.sv` | byte partition and the `l²` byte multipliers, optional output register |
| `rtl/booth_mult.sv` | radix-4 Booth `W × W` multiplier |
| `rtl/counter_row.sv` | alignment and sign extension of summands, one counter per column, inter-column carries, optional output register |
| `rtl/full_adder.sv`, `rtl/counter_5_2.sv`, `rtl/counter_7_2.sv` | the (3,2), (5,2) and (7,2) counters |
| `rtl/cla_adder.sv` | parallel-prefix carry look-ahead adder |
| `tb/tb_*.sv` | self-checking testbenches; `tb_ref_pkg`, `tb_gen_case`, `tb_row_case` and `tb_mult_case` are helpers |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes. For
example, this builds and runs the end-to-end test at the default parameters:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hsm_pkg.sv tb/tb_ref_pkg.sv tb/tb_hs_mult.sv --top-module tb_hs_mult -o sim
./obj_dir/sim
```

For another testbench, replace `tb_hs_mult` with its name. Each one checks
against products worked out in the testbench itself, with plain wide
multiplication of byte fields it slices on its own:

* `tb_hs_mult`, at the default parameters. About 4000 operand pairs stream
  through at one per clock, with random idle cycles. A reset comes halfway
  through, with work still in flight. Every product is checked, and so is
  its exact two-clock latency. The test fails unless all of these happened
  at least once: back-to-back operands, idle cycles, a negative x, a
  negative y, both negative, an operand of -1.0, and the reset.
* `tb_hs_mult_configs` runs three other configurations: 25-bit operands with
  9 × 9 multipliers, 57-bit operands with 17 × 17 and 9 × 9 multipliers, and
  the default configuration with `PIPELINE = 0`. Inter-column carries must
  occur in the (5,2) and (7,2) rows, and never in the (3,2) row.
* `tb_counter_row` and `tb_summand_gen` test these two sections on their own,
  in all three configurations. This includes the one-clock register
  behaviour.
* `tb_counter_5_2` and `tb_counter_7_2` are exhaustive. They check that each
  counter keeps the total and that PS is the parity of its inputs. They also
  check the carry property: `cout0..2` do not depend on any carry-in, and
  `cout3` does not depend on `cin2` or `cin3`.
* `tb_full_adder`, `tb_booth_mult` (widths 8, 9, 13 and 17) and
  `tb_cla_adder` (exhaustive at width 5, random at width 37) test the
  smaller blocks.

## Where the choices are this design's own

The following come from the method itself:

* the byte partition, with a forced-positive sign on the low bytes and a
  signed top byte;
* the `l²` parallel multipliers, sign-extended summands, and one counter row
  built from (3,2), (5,2) and (7,2) counters;
* the structure of the (5,2) and (7,2) counters;
* the bypass of the low `m-1` bits around the adder;
* the two staging registers.

These details are this design's own:

* which carry-out goes to which carry-in between columns (see above);
* the rule that the counter type never decreases from one column to the next;
* summing the Booth multiples with an adder chain;
* the Kogge-Stone structure of the adder;
* the valid bit and its reset;
* dropping carries above the top column;
* letting the (-1.0) × (-1.0) product wrap.

The method aims for one multiplication every 10–20 ns in ECL packaging. That
is a figure for a circuit technology, and it is not modelled here. No
floating-point exponent, rounding or normalisation logic is part of this
design. It multiplies the significands only.
