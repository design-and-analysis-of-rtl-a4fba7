# FIR filter with XOR-MUX adders and a 5:2-compressor approximate multiplier

This is an 8-tap direct-form FIR filter that trades a small, one-sided
arithmetic error for less multiplier logic. Each tap multiplies a 16-bit
sample by a 16-bit coefficient in an *approximate* 16x16 multiplier. The
multiplier reduces its partial products with 5:2 compressors, and how exact
each compressor is depends on the weight of its column: exact at the top,
cheaper and less exact further down. Every adder in the design, inside the
compressors, in the multiplier's final adder and in the tap sums, is built
from one cell: a full adder made of two XOR gates and a 2:1 multiplexer.

## The XOR-MUX full adder (`xor_mux_fa`)

    p    = a ^ b
    sum  = p ^ cin
    cout = p ? cin : a

When `a` and `b` agree the carry is their common value. When they differ
the carry is `cin`. So the carry is a multiplexer steered by the propagate
signal, and no AND-OR carry gate is needed.

## The approximate multiplier (`approx_multiplier`)

Unsigned `a` and `b` (N = 16) give a 2N-bit product in four combinational
steps:

1. **Partial products.** `a[i] & b[j]` goes into column `i+j`. Column
   heights are 1, 2, ..., 16, ..., 2, 1.
2. **5:2 stages.** Each column is cut into groups of five bits, and each
   group feeds one 5:2 compressor. Its kind depends on the column:

   | columns | compressor | what it does |
   |---|---|---|
   | 0-7 (`LOW_COLS`) | `compressor_5_2_or` | `sum = (x1^x2)\|(x3^x4)\|x5`, `carry = (x1&x2)\|(x3&x4)` |
   | 8-15 (`MID_COLS`) | `compressor_5_2_approx` | a full adder on x1..x3, a second one on that sum with x4 and x5, the two carries ORed |
   | 16-31 | `compressor_5_2` | exact: three full adders, two carry-ins from the column below and two carry-outs to the column above |

   Stages repeat until no column holds more than four bits. For N = 16 that
   takes two stages: the tallest column goes 16 → 7 → 4.
3. **4:2 row.** One exact `compressor_4_2` per column leaves two bits per
   column.
4. **Carry-propagate adder.** A 32-bit `rca_adder` adds the two rows.

The bookkeeping is the hard part, and it is all done at elaboration time.
The constant function `calc_tab` computes the height and the group count of
every column at every stage, and the generate loops wire bits by those
tables. In the next stage, column *c* holds these bits, in this order:

- the sums of column *c*'s compressors;
- column *c*'s bits that did not fill a group of five (approximate columns
  only);
- the carries from column *c−1*.

An exact column pads its last group with zeros. It also has at least as many
compressors as the exact column below it, so every carry-out pair from below
has a compressor to enter. Carries never cross from an exact column into an
approximate one, so the approximate columns behave the same whatever the
exact columns are built from.

**Error behaviour.** Every approximate compressor gives a result no larger
than the number of ones at its inputs. Two consequences follow:

- The product never exceeds `a*b`, so carries leaving column 31 are zero in
  value.
- A power-of-two operand gives the exact product, because each column then
  holds at most one set bit.

The error comes only from columns 0-15, so it is below 2^20. Over 20,000
random operand pairs the mean relative error is about 6e-5, and about 74 %
of the products differ from `a*b`. Set `LOW_COLS = MID_COLS = 0` for an
exact multiplier. Moving the borders trades accuracy for logic.

## The filter (`fir_filter`)

    Y <= sum over k = 0..TAPS-1 of  approx(COEF[k] * x[n-k])

- `X` enters tap 0 directly. A register chain holds x[n−1] .. x[n−7].
- Each tap has its own multiplier. The products are summed by a chain of
  35-bit `rca_adder`s, one per tap after the first.
- `Y` is registered: it is valid on the clock edge that samples x[n]. One
  sample goes in and one result comes out every clock, with one clock of
  latency.
- `Y` is 2N + clog2(TAPS) = 35 bits wide, so the sum cannot overflow.
- `rst` is synchronous and active high. It clears the delay line and `Y`.
- The default `COEF` is a symmetric low-pass set,
  {1311, 3932, 7209, 9830, 9830, 7209, 3932, 1311}. It has exactly eight
  entries, so override `COEF` whenever you change `TAPS`.

There is no pipelining between the multipliers and the adder chain. The
critical path is one multiplier plus seven 35-bit ripple adders.

## Where this implementation makes its own choices

The following are specified by the design: the XOR-MUX adder equations, the
use of exact, two-stage approximate and OR-tree 5:2 compressors for high,
medium and low weights, reduction to two bits per column followed by a
carry-propagate adder, the 16-bit operands and 32-bit product, and the
filter's ports and per-tap structure (delay, multiplier, adder).

These are choices made here:

- the gates of the two approximate compressors;
- the region borders (8 + 8 columns);
- the grouping rules and the extra exact 4:2 row (two 5:2 stages cannot
  reach two bits per column from 16 rows);
- ripple-carry adders;
- unsigned arithmetic;
- the tap count and the coefficients;
- the output register and the reset style.

Each source file's header comment says the same for its own module.

## Files

| `rtl/` | |
|---|---|
| `approx_pkg.sv` | compressor-kind enum and the column → region function |
| `xor_mux_fa.sv` | XOR-MUX full adder |
| `compressor_4_2.sv`, `compressor_5_2.sv` | exact compressors |
| `compressor_5_2_approx.sv`, `compressor_5_2_or.sv` | approximate compressors |
| `rca_adder.sv` | ripple-carry adder, parameter `W` |
| `approx_multiplier.sv` | the multiplier, parameters `N`, `LOW_COLS`, `MID_COLS` |
| `fir_filter.sv` | the top: parameters `N`, `TAPS`, `LOW_COLS`, `MID_COLS`, `COEF` |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. The
compressor and adder testbenches are exhaustive or random, checked against
plain integer arithmetic. `approx_ref_pkg.sv` is an arithmetic model of the
multiplier's approximation. It replays the approximate columns bit by bit
and subtracts what each approximate compressor loses from `a*b`.
`tb_approx_multiplier` checks the RTL against that model and checks an exact
instance against `a*b`. `tb_fir_filter` runs the filter at its default size
against the model, tap by tap. It covers an impulse response, a random
stream, full-scale input and a reset in mid-stream. Each testbench prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/approx_pkg.sv tb/approx_ref_pkg.sv tb/tb_fir_filter.sv \
        --top-module tb_fir_filter -o sim
    ./obj_dir/sim

Replace `tb_fir_filter` with any other testbench name. Only the multiplier
and filter testbenches need `tb/approx_ref_pkg.sv`. Each run takes a few
seconds.
