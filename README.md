# A 16-bit arithmetic unit built on Vedic mathematics

This is a combinational arithmetic unit for unsigned 16-bit operands. It adds,
subtracts, multiplies and divides. Each operation is built on one of the
"sutras" (short rules) of Vedic mental arithmetic:

- *Vilokanam* ("by observation") for addition and subtraction.
- *Urdhva-Tiryakbhyam* ("vertically and crosswise") for multiplication.
- *Paravartya Yojayet* ("transpose and apply") for division.

These rules were written for decimal arithmetic by hand. This design reads
each one as a hardware structure: every column of digits is worked out at the
same time, and no long dependency chain is built where the rule avoids one.

```
             data1 ──┬──────────────┬───────────────────┐
             data2 ──┼──────────────┼───────────────────┼──┐
                     v              v                   v  v
            ┌──────────────┐ ┌─────────────────┐ ┌────────────────────┐
            │ vedic_addsub │ │urdhva_multiplier│ │ paravartya_divider │
            │  └ vilokanam │ │   32-bit product│ │ quotient, remainder│
            │    _adder    │ └────────┬────────┘ └──────┬──────┬──────┘
            └──────┬───────┘          │ low 16          │      │
                   v                  v                 v      v
  control ───────> 4-way select by control ───────> alu_out   rem_out
```

## Interface

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `data1`   | in  | 16    | first operand: augend, minuend, multiplicand, dividend |
| `data2`   | in  | 16    | second operand: addend, subtrahend, multiplier, divisor |
| `control` | in  | 2     | operation, type `vedic_alu_pkg::alu_op_e` |
| `alu_out` | out | 16    | result |
| `rem_out` | out | 16    | remainder of a division, 0 for the other operations |

| `control` | name     | `alu_out` |
|-----------|----------|-----------|
| `00`      | `OP_ADD` | `data1 + data2` mod 2^16 |
| `01`      | `OP_SUB` | `data1 - data2` mod 2^16 (two's complement) |
| `10`      | `OP_MUL` | low 16 bits of `data1 * data2` |
| `11`      | `OP_DIV` | `data1 / data2` (floor); `rem_out = data1 % data2` |

Example: with `data1 = 12` and `data2 = 8`, the four codes give 20, 4, 96 and
1 (remainder 4).

There is no clock and no register. The three units always work in parallel on
the same operands. The control code only picks which result reaches the
output, so the result is valid one combinational delay after the inputs
change. The width is the parameter `W` of `vedic_alu`. Its default is
`vedic_alu_pkg::ALU_WIDTH = 16`, and any width from 2 upward elaborates.

Things the unit does not do:

- It has no flags. The adder's carry out and the upper half of the product
  are computed but not brought out.
- Operands are unsigned only.
- There are no logic operations (AND, OR and so on). The 2-bit control code
  has room for the four arithmetic operations only.
- Operand storage (accumulator, register file, memory interface) belongs to
  the processor around the unit, not to this design.

## Addition and subtraction: Vilokanam

By hand, the Vilokanam rule for 24 + 7 works like this. Add each column and
keep only its end (units) digit. Then look at the column to the right: if its
sum reached the base (here 7 + 4 = 11), add one to this column. The point is
that you see whether a carry arrives by inspecting the operands. You do not
wait for it to travel from column to column.

`vilokanam_adder` does the same in binary:

- For each column it forms the end digit `p = a ^ b` and the carry condition
  `g = a & b` (the column sum reaches the base).
- A carry arrives at column *i* if some column *j* < *i* generates one and
  every column between them passes it on. The adder finds this for all
  columns at once, with a Kogge-Stone parallel-prefix network. Level *l*
  merges groups 2^l columns apart.
- The carry-in is treated as an extra column 0. The network therefore spans
  N+1 positions and needs ceil(log2(N+1)) levels (5 for 16 bits).
- The sum is `p ^ carry`.

The depth is logarithmic in N, with no rippling carry. This is how "carry
independent" is read here. Reading the rule as a prefix lookahead is this
design's own interpretation of a decimal hand method.

`vedic_addsub` puts this adder in the usual adder/subtractor arrangement.
The control bit `sub` XORs every bit of `b` and also serves as the carry-in.
With `sub = 1` the adder computes `a + ~b + 1 = a - b`. For subtraction,
`cout = 1` means no borrow (`a >= b`).

## Multiplication: Urdhva-Tiryakbhyam

For two 2-digit numbers the hand method has three steps:

1. Multiply the units digits (vertical). This is the units column.
2. Add the two crosswise products (units × tens, tens × units). This is the
   tens column.
3. Multiply the tens digits (vertical). This is the hundreds column.

Each column keeps one digit and carries the rest to the left.

`urdhva_multiplier` applies this to N binary digits:

- Column *k*, for *k* = 0 … 2N-2, collects every product `a[i] & b[k-i]`. All
  columns are summed in parallel, and no column depends on another. A column
  sum is at most N.
- One placement pass then goes from right to left. It adds each column sum to
  the carry from its right-hand neighbour, keeps bit 0 as the product bit, and
  passes the rest on. The carry into a column never exceeds N-1, so every
  column total fits in `CW = clog2(2N+1)` bits (6 bits for N = 16).
- The carry out of the last column is product bit 2N-1. An assertion checks
  that this carry never needs more than one bit.

The vertical-and-crosswise column structure follows the method. Generalising
it to N bits and placing the columns in a single carry pass are choices made
for this design. Synthesis turns the column sums into small adders. A
tool-specific multiplier (Booth coding, a compressor tree) is deliberately not
used.

## Division: Paravartya Yojayet

This is the least obvious unit.

### The decimal method

Take 1345 ÷ 112:

1. Set aside the leading digit of the divisor (1). Transpose the rest, that
   is, negate each digit: 1 2 becomes -1 -2.
2. Work from the left of the dividend. The leading column gives the next
   quotient digit. Multiply that digit by the transposed digits and add the
   result to the next columns to the right.
3. Repeat while quotient columns remain. Their number is the number of
   dividend digits minus the number of divisor digits, plus one: here 2.

For 1345 ÷ 112:

- Digit 1: add 1 × (-1, -2) to the next two columns. They become 3-1 = 2 and
  4-2 = 2.
- Digit 2: add 2 × (-1, -2) to the following two columns. They become
  2-2 = 0 and 5-4 = 1.

The quotient is 12 and the remainder is 01.

### Why the binary unit does not copy it digit for digit

In binary the leading divisor digit is always 1. The transposed digits are
the negated remaining bits of the divisor. Column values can then go negative
or grow above 1, and the final "remainder" can lie far outside `[0, divisor)`.

Tried on random 16-bit operands, this direct form needed up to about thirty
add-back or subtract steps at the end. Repeating the whole procedure on the
remainder often did not converge at all. A combinational unit cannot afford
either.

### What the unit does

`paravartya_divider` keeps the idea of transposing and applying, but takes one
binary quotient digit per stage. It also keeps the running remainder as an
exact signed number, so that nothing grows without bound:

- Stage *s* (N stages, MSB first) brings down the next dividend bit:
  `rem = 2·rem + bit`.
- If the running remainder was non-negative, the stage applies the
  transposed divisor by adding `-divisor`. If it was negative, the stage
  applies the divisor by adding `+divisor`. A negative remainder is never
  restored; the next stage makes up for it.
- The quotient bit of the stage is 1 when the new remainder is non-negative.
- After the last stage, a single correction adds the divisor back to a
  negative remainder. The quotient bits need no correction.

The running remainder always stays within `(-divisor, divisor)`, so N+2 bits
are enough. The unit is N add/subtract stages of N+2 bits plus one correction
adder. An assertion checks `remainder < divisor` whenever the divisor is
non-zero.

In binary this is exactly the classical non-restoring division scheme. Treat
the unit as that, with the Vedic method as its motivation. In particular, it
is not a structure that is faster than a textbook non-restoring divider.

Division by zero returns an all-ones quotient and the dividend as remainder.
The method itself does not cover that case, so this is this design's own
convention.

## Timing and size

Every path is combinational. The longest path is the divider: 16 chained
18-bit add/subtract stages, each of which must know the sign of the one
before it. The multiplier comes next (parallel column sums, then a 31-column
carry pass). The adder is shallowest: 5 prefix levels.

Coarse synthesis (word-level cells, before technology mapping) of each
16-bit unit on its own:

| unit               | cells |
|--------------------|-------|
| divider            | ~150  |
| adder/subtractor   | ~150  |
| multiplier         | ~290  |

The complete unit comes to about 440 cells. That is less than the sum,
because the product bits that never reach the output are removed.

## Files

| file | contents |
|------|----------|
| `rtl/vedic_alu_pkg.sv` | `ALU_WIDTH`, the `alu_op_e` control code |
| `rtl/vedic_alu.sv` | top: the three units and the result select |
| `rtl/vedic_addsub.sv` | adder/subtractor |
| `rtl/vilokanam_adder.sv` | prefix adder |
| `rtl/urdhva_multiplier.sv` | column multiplier |
| `rtl/paravartya_divider.sv` | divider |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench compares the unit with the simulator's own `+`, `-`, `*`, `/`
and `%`. Each prints `TB_RESULT checks=N failures=M` and has a time-out that
counts as a failure.

- `tb_vilokanam_adder`: 16 bits (corner cases and 20,000 random sums), plus
  6 bits exhaustive, with all carry-ins.
- `tb_vedic_addsub`: both modes, the worked example 54 - 22 = 32, negative
  results and 20,000 random cases.
- `tb_urdhva_multiplier`: 16 bits (all-ones, single bits, 20,000 random),
  plus 5 × 5 exhaustive.
- `tb_paravartya_divider`: 16 bits (the 1345 ÷ 112 example, division by zero,
  20,000 random cases, half of them with small divisors), plus 6 bits
  exhaustive including division by zero.
- `tb_vedic_alu`: the full unit at its default width. It runs the 12 / 8
  example for all four codes, then 40,000 random operations. It counts every
  behaviour of the unit and fails if one never occurred: each of the four
  operations, a wrapping sum, a negative difference, a truncated product,
  division by zero and a non-zero remainder.

All five testbenches pass. Each one was also shown to fail against a
deliberately broken copy of its module:

- a missing prefix level in the adder;
- the subtractor's carry-in tied to 0;
- multiplier carries cut to one bit;
- the divider's final correction removed;
- the subtract control decoded from the wrong code.

Checking timing against any FPGA or cell library is outside this
verification.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  --top-module tb_vedic_alu rtl/vedic_alu_pkg.sv tb/tb_vedic_alu.sv
./obj_dir/Vtb_vedic_alu
```

Substitute any of the other `tb_*` names. To lint a module:
`verilator --lint-only -Wall -y rtl rtl/vedic_alu_pkg.sv rtl/<module>.sv`.

## Where the design departs from the method, or adds to it

- **Adder.** The carry lookahead is a Kogge-Stone prefix network, which is
  this design's reading of "observing" the carries.
- **Divider.**
  - It is realised as non-restoring division, for the reasons above.
  - Division by zero returns all ones and the dividend.
- **`rem_out`.** The extra remainder port is this design's own addition.
  The method produces a remainder, and dropping it would lose information.
- **Width of the result.** Products are truncated to 16 bits, matching the
  single 16-bit result output.
- **Operands.** Operands are unsigned. Signed arithmetic is not covered.

## Changing the design

- **Width.** Change `ALU_WIDTH` in the package, or override `W` on
  `vedic_alu`. Every unit takes `N` from it. The testbenches of the units
  instantiate fixed sizes. The end-to-end testbench follows `ALU_WIDTH`.
- **More operations.** Widen `alu_op_e` and add a branch to the select in
  `vedic_alu`. For example, a logic unit beside the three arithmetic ones.
- **Pipelining.** The divider is the natural place to split. Each stage
  depends on the one before only through the running remainder, so registers
  can go between any two stages. The dividend bits still to be brought down
  and the quotient bits already produced would have to be delayed to match.
