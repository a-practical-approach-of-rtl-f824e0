# Partitioned parallel decimal multipliers (16 x 16 BCD digits)

Decimal multiplication is slow and power-hungry in hardware: digits are
held in binary-coded decimal (BCD), partial products cannot be formed by
simple AND gates, and every addition needs decimal carry handling. This
design multiplies two 16-digit BCD numbers in one combinational pass and
cuts the work into **multiplier cells**, small decimal multipliers that each
see only one slice of the multiplicand and one slice of the multiplier. A
change in one operand slice then switches only the cells that read it, which
keeps switching activity, and so dynamic power, local. The cell size is the
design knob: large cells give few cells and a shallow merging adder, small
cells give fine-grained locality at the cost of a deeper adder.

Four partitionings are provided, all producing the same 32-digit product:

| scheme      | cells                                   | module                    | max. cell results per column |
|-------------|-----------------------------------------|---------------------------|------------------------------|
| mult16-8    | 4 cells of 8x8 digits                   | `dec_mult_sym #(.C(8))`   | 3  |
| mult16-4    | 16 cells of 4x4                         | `dec_mult_sym #(.C(4))`   | 7  |
| mult16-2    | 64 cells of 2x2                         | `dec_mult_sym #(.C(2))`   | 15 |
| mult16-8-4  | 1 of 8x8, 2 of 8x4, 2 of 4x8, 4 of 4x4  | `dec_mult_asym`           | 5  |

The top level, `dec_mult16_top`, instantiates all four side by side on the
same operands, each with its own product output, so they can be compared
or one of them kept on its own.

## The partitioning identity

Split each n-digit operand into a high and a low half:

    X = XH * 10^(n/2) + XL        Y = YH * 10^(n/2) + YL
    X * Y = 10^n XH*YH + 10^(n/2) (XH*YL + XL*YH) + XL*YL

This needs four half-size multiplications and some additions (unlike
Karatsuba's method, no subtraction and only three products; the four-product
form is used here because every product then depends on exactly one slice
of each operand). Applying the identity again to each half-size product
gives cells of a quarter, an eighth, and so on. With slices of C digits and
K = 16/C slices per operand, cell (i, j) multiplies slice i of X by slice j
of Y and its result carries the weight 10^(C*(i+j)).

## Merging the cell results

Each cell returns an ordinary BCD number of 2C digits. After placing every
result at its weight, the 32 product digits fall into three regions:

1. **Low digits 0..C-1** are covered by cell (0,0) alone and are its low C
   digits, with no logic at all.
2. **Middle digits C..31-C** are covered by several cells. One multi-operand
   decimal adder (`bcd_mop_adder`) sums them. The most results overlapping in
   one column is 2K-1 (3, 7 or 15), which is what sets the adder's depth.
3. **Top digits 32-C..31** are covered by cell (K-1,K-1) alone. They need no
   adder, only an increment by the carry that leaves the middle adder
   (`bcd_incrementer`). That carry is a small binary number (up to K*K-1),
   not a single bit.

The asymmetric scheme uses the same three regions with its own boundaries:
digits 0..3 from the XLL*YLL 4x4 cell, digits 4..23 from the adder, digits
24..31 from the 8x8 cell plus the carry.

### Placement of the asymmetric cells

With XH/YH the high 8 digits and XLH, XLL, YLH, YLL the 4-digit quarters of
the low halves:

| cell      | size | weight (digit offset) |
|-----------|------|-----------------------|
| XH * YH   | 8x8  | 16 |
| XH * YLL  | 8x4  | 8  |
| XH * YLH  | 8x4  | 12 |
| XLL * YH  | 4x8  | 8  |
| XLH * YH  | 4x8  | 12 |
| XLL * YLL | 4x4  | 0  |
| XLL * YLH | 4x4  | 4  |
| XLH * YLL | 4x4  | 4  |
| XLH * YLH | 4x4  | 8  |

The cell counts and sizes define mult16-8-4. Putting the big cell on the
high halves and the 4x4 cells on the low halves is this implementation's
choice: it is the arrangement obtained by applying the identity to the full
operands once, then once more to the low halves only.

## Inside a multiplier cell

`bcd_cell_mult #(NX, NY)` forms every digit product x[i]*y[j] with a
one-digit multiplier (`bcd_digit_mult`, a 10x10 multiplication table with a
two-digit BCD result). The units digit goes to column i+j and the tens digit
to column i+j+1. For each multiplier digit the units digits form one row and
the tens digits another, and a `bcd_mop_adder` sums the 2*NY rows into the
NX+NY-digit BCD product. Cells therefore hand non-redundant BCD to the merge
adder. The cell's internal method is this implementation's simple choice.
Designs that precompute multiples of the multiplicand would fit behind the
same ports.

## The decimal adder

`bcd_mop_adder` sums a digit column in binary, including the carry from the
column below. The units digit is that sum modulo 10 and the carry up is the
sum divided by 10. The carry stays below the number of operands, so no
decimal correction steps are needed. Constant-zero operand positions, where
a cell does not reach, are removed by synthesis. Each column's logic
therefore grows with the number of cells that actually overlap there. The
carry ripples through the columns, which is correct but not the fastest
structure. A tree of carry-save decimal adders could replace it behind the
same ports.

## Files

| file | content |
|------|---------|
| `rtl/bcd_pkg.sv`          | digit type, operand size (16), radix |
| `rtl/bcd_digit_mult.sv`   | 1x1-digit multiplier |
| `rtl/bcd_mop_adder.sv`    | multi-operand BCD adder |
| `rtl/bcd_incrementer.sv`  | BCD increment by a small binary carry |
| `rtl/bcd_cell_mult.sv`    | NX x NY multiplier cell |
| `rtl/dec_mult_sym.sv`     | symmetric schemes (parameter C = 8, 4, 2) |
| `rtl/dec_mult_asym.sv`    | asymmetric scheme mult16-8-4 |
| `rtl/dec_mult16_top.sv`   | all four schemes side by side |
| `tb/tb_*.sv`              | one self-checking testbench per module, `tb_bcd_ref_pkg.sv` with the reference arithmetic |

## Interface and timing

All modules are purely combinational: no clock, no reset, no handshake.
Operands and products are packed arrays of 4-bit BCD digits,
`logic [N-1:0][3:0]`, with digit 0 the least significant. `dec_mult16_top`
has inputs `x`, `y` (16 digits) and outputs `p_16_8`, `p_16_4`, `p_16_2` and
`p_16_8_4` (32 digits each). Input digits above 9 are not legal and give an
unspecified product. Pipeline registers, if a clocked multiplier is wanted,
go around the instance of the chosen scheme. A natural cut for deeper
pipelining is between the cells and the merge adder.

`N` (operand digits) is a parameter. The symmetric module needs N to be a
multiple of C with C < N. The asymmetric module needs N to be a multiple of 4.

## Verification

Each testbench computes the expected result independently: BCD vectors are
converted to 128-bit binary, added or multiplied there, and converted back.
Operand mixes are uniform random digits, all nines (which gives the largest
product and the longest carries), mostly nines with zeros, and sparse digits.

- `tb_bcd_digit_mult`: all 100 digit pairs.
- `tb_bcd_mop_adder`, `tb_bcd_incrementer`: a few thousand random and
  carry-heavy cases each.
- `tb_bcd_cell_mult`: 2x2, 4x4, 8x4, 4x8 and 8x8 cells.
- `tb_dec_mult_sym`: all three symmetric schemes at 16 digits, including
  6 x 3 = 18. It also requires that the middle adder sends a non-zero carry
  into the incrementer at least once.
- `tb_dec_mult_asym`: the same for mult16-8-4.
- `tb_dec_mult16_top`: end to end at default size, all four schemes on
  about 3300 operand pairs. It counts three events per scheme:
  - a carry into the top-digit incrementer;
  - that increment rippling past the lowest top digit;
  - locality: when only the low half of x changes, every 8x8 and 8x4 cell
    that reads the high half of x keeps its result.

  It fails if any of these never happens.

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog. Example run with plain Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/bcd_pkg.sv tb/tb_bcd_ref_pkg.sv tb/tb_dec_mult16_top.sv \
        --top-module tb_dec_mult16_top -o sim
    ./obj_dir/sim

Verilator finds the other modules from the `-Irtl` path. Every testbench
runs in well under a second.

## What is given and what is chosen

Fixed by the partitioning technique:

- the 16-digit operand size;
- the four partitionings with their cell counts and sizes;
- the three-region merge: low digits passed straight through, middle digits
  added by a multi-operand adder, top digits incremented by its carry;
- BCD results from the cells.

Choices of this implementation:

- how a cell is built inside (digit-product table plus column adder);
- the column-sum structure of the multi-operand adder;
- where the asymmetric cells sit;
- that the design is combinational, with no registers;
- placing all four schemes in one top level for comparison.

Area, delay and power depend on the target technology and the synthesis
tool, so no figures are claimed here. The relative cost of the schemes
should be measured on the intended target.
