# BCD-digit multipliers and the decimal multipliers built on them

A decimal multiplier that works on binary-coded decimal (BCD) numbers needs, for
every pair of digits X_i and Y_j, the two-digit decimal product X_i * Y_j. This
design builds that product with one small combinational cell, the **BCD-digit
multiplier**. The cell takes two 4-bit BCD digits and returns two BCD digits, B
(tens) and C (units), with X * Y = 10B + C. The cell works in two steps:

1. A 4x4 binary multiplier, specialised to BCD inputs, forms the 7-bit binary
   product p6..p0 (at most 81).
2. A converter that only has to handle values 0..81 turns it into B and C.

The specialisation rests on one observation. A BCD digit never exceeds 9, so
its bits obey x3&x2 = 0 and x3&x1 = 0. Many bit products in a column of the
multiplier array can therefore never be 1 together. Such products are merged
with an OR instead of being added, which leaves a much smaller adder tree.

The cell comes in two variants with the same function:

- **delay-optimised:** uses carry look-ahead in the middle columns.
- **area-optimised:** uses a short ripple array of half and full adders.

The cell is the only partial-product building block of four complete
multipliers included here:

- two sequential multipliers, one per cell variant, each taking one multiplier
  digit per clock;
- a semi-parallel multiplier taking two multiplier digits per clock;
- a fully parallel combinational multiplier.

## The BCD-digit multiplier cell

### Binary product with the BCD constraint

Write X = x3x2x1x0 and Y = y3y2y1y0. The ordinary 4x4 array has sixteen bit
products x_i*y_j. Under the BCD constraint the columns reduce to the following
(`|` is OR):

| column (weight) | terms |
|---|---|
| p6 (64) | x3y3 |
| p5 (32) | x3y2 \| x2y3 |
| p4 (16) | x3y1 \| x2y2 \| x1y3 |
| p3 (8)  | x3y0 \| x2y1 ,  x1y2 \| x0y3 |
| p2 (4)  | x2y0 , x0y2 , x1y1 , x1y1x0y0 |
| p1 (2)  | x1y0 xor x0y1 |
| p0 (1)  | x0y0 |

The term x1y1x0y0 in column p2 is the carry out of column p1, since
x1y0 & x0y1 = x1y1x0y0.

**Delay-optimised variant (`bin_prod_delay`).** The four terms of column p2 are
counted. Bit 0 of the count is p2. Bit 1 is a carry c into column p3. Bit 2 is
set only when all four terms are 1, which is the term x2y2x1y1x0y0; it is a carry
straight into column p4. Columns p3, p4 and p5 are then added with carry
look-ahead: the carries into p4 and p5 are both formed directly from the column
generate and propagate terms and c. For BCD inputs no carry ever leaves column
p5, so p6 is simply x3y3.

The original circuit gives p2 and c as closed-form expressions. This design
instead takes both from the count of the four terms. That keeps the function
exact for all 100 digit pairs, but the gate structure differs from the original
(see "How far to trust it").

**Area-optimised variant (`bin_prod_area`).** The same OR terms are fed to two
rows of adders. The first row is a half adder, two full adders and two half
adders, running from column p1 to p5. The second row is four half adders that
absorb x1y1 and ripple a carry from p2 to p5. p6 is x3y3 ORed with the two
carries out of column p5. Those three terms can never be 1 at the same time,
because the product never exceeds 81. `rtl/bin_prod_area.sv` lists each adder's
inputs. The second-row ripple is the long path of this variant.

### Binary to two BCD digits (`bin2bcd_conv`)

A general binary-to-BCD converter is not needed, because the input is at most
81. The weights 16, 32 and 64 are split into decimal parts:
16 = 10+4+2, 32 = 20+10+2 and 64 = 40+20+4. That places every bit in a
BCD-shaped row:

```
weight   80 40 20 10 |  8  4  2  1
row 1     0 p6 p5 p4 |  0 p2 p1 p0
row 2     0  0 p6 p5 |  0 p4 p4  0
row 3                |  0 p6 p5  0
row 4                | p3  0  0  0
```

p3 gets its own row so that no row of the units digit exceeds 9. The four units
rows are added as follows:

- c0 is p0.
- The weight-2 column is a full adder on p1, p4 and p5. Its sum is c1.
- The remaining bits are summed and compared against 10 and 20. This gives C
  and a decimal carry of 0, 1 or 2.
- The carry is added to the two tens rows to give B.
- b3 is p6&p4, because only 80 and 81 have a tens digit of 8.

Two facts keep every sum small: p6&p5 = 0 and p6&p4&(p3|p2|p1) = 0 for every
value up to 81.

### The cell (`bcd_digit_mul`)

The cell chains one binary-product circuit into the converter. The parameter
`CELL` selects the circuit: `CELL_DELAY` or `CELL_AREA`. The default is
`CELL_AREA`, the variant meant for iterative multipliers, whose clock period
leaves room for its longer path. The output `p_bin` exposes the intermediate
binary product.

## Multipliers built from the cell

### Partial products two deep (`bcd_pp_gen`)

Multiplying an N-digit X by one digit Y_k gives one tens digit and one units
digit per multiplicand digit. These are kept as two separate digit vectors: the
units vector at digit offset k and the tens vector at offset k+1. They are not
added together, so the partial product of one multiplier digit is two operands
deep. `bcd_pp_gen` produces these 2K operands for K multiplier digits, each
N+K digits wide.

### Multi-operand BCD addition (`bcd_multi_add`)

This block adds M BCD numbers digit column by digit column:

- Each column's binary sum, plus the incoming decimal carry, is split into a
  digit (sum mod 10) and a carry (sum div 10).
- With M operands the carry is always below M.
- The sequential multiplier uses M = 3: the accumulated result plus a two-deep
  partial product.
- The semi-parallel multiplier uses M = 5, and the fully parallel one uses
  M = 2N.

This simple ripple adder is a choice of this design. Faster decimal
carry-save or compressor trees would slot in behind the same ports.

### Iterative multiplier (`bcd_iter_mul`)

The product register has a high half (N digits, the running sum) and a low half
(N digits, finished product digits). One iteration does three things:

1. Multiply all of X by the K lowest remaining digits of Y in the cell array.
2. Add the 2K partial-product operands to the high half in one (2K+1)-operand
   BCD addition (N+K digits; it cannot overflow).
3. Shift right by K digits: the lowest K sum digits enter the top of the low
   half, the rest becomes the new high half, and Y shifts down by K digits.

`K = 1` is the sequential multiplier (N iterations). `K = 2` is the
semi-parallel one (N/2 iterations, five-operand addition). N must be a multiple
of K.

**Pipelining (`PIPE`, default 1).** The cell array depends only on X and on
multiplier digits that are already known, not on the running sum. It can
therefore work one iteration ahead of the adder. With `PIPE = 1`, a register
sits between the cell array and the adder, which makes partial product
generation a pipeline stage of its own:

- In each cycle the cells form the partial product for the next K digits while
  the adder accumulates the previous one.
- The clock period is set by the slower of the two stages, not by their sum.
- This costs one extra cycle per multiplication.

With `PIPE = 0` the cells and the adder share one cycle.

The handshake is this design's own:

```
clk     _/‾\_/‾\_/‾\_ ... _/‾\_/‾\_
start   _/‾‾‾\_____________________     sampled while busy = 0
busy    _____/‾‾‾‾‾‾‾ ... ‾‾‾\______     high for N/K + PIPE cycles
done    _____________ ... ___/‾‾‾\__     one cycle, N/K + PIPE edges after the start edge
product                      valid from done until the next start
```

- `rst_n` is an asynchronous, active-low reset that clears all state.
- A `start` while busy is ignored.
- Assertions check that operand digits are valid BCD when a multiplication
  starts, and that the accumulator never overflows.

### Fully parallel multiplier (`bcd_par_mul`)

This unit forms all N*N digit products at once. The result is 2N rows: units
and tens rows for each multiplier digit, at their digit offsets. One 2N-operand
BCD addition sums the rows into the 2N-digit product. The unit is purely
combinational. The summing is the plain paper-and-pencil scheme, not an
optimised reduction tree.

### Top level (`bcd_mul_top`)

The top has one parameter, N = 16 digits. All four multipliers share one set of
inputs: `clk`, `rst_n`, `start`, `x[N]` and `y[N]`.

| unit | cells | digits per iteration | ports |
|---|---|---|---|
| `u_seq_delay` | delay-optimised | 1 (17 cycles, pipelined) | `busy_seq_delay`, `done_seq_delay`, `product_seq_delay` |
| `u_seq_area`  | area-optimised  | 1 (17 cycles, pipelined) | `busy_seq_area`, `done_seq_area`, `product_seq_area` |
| `u_semi`      | area-optimised  | 2 (9 cycles, pipelined) | `busy_semi`, `done_semi`, `product_semi` |
| `u_par`       | area-optimised  | all, combinational | `product_par` |

All digit vectors are packed arrays of `bcd_t` (4 bits), with digit 0 the least
significant. Each product is 2N digits: the high half followed by the low half.

## How far to trust it

**What is tested:**

- Both cell variants, both binary-product circuits and the converter are tested
  exhaustively (all 100 digit pairs, all values 0..81).
- The partial-product generator and the 3- and 5-operand adders are tested with
  random and all-nines operands against integer references.
- The iterative multiplier is tested at N = 8 in four configurations, covering
  K = 1 and 2, both cells, and pipelined and single-stage forms. The tests
  check the product, the exact latency and a start that arrives while busy.
- The fully parallel multiplier is tested at N = 4 (every multiplicand
  0..9999) and at N = 16.
- The top-level testbench runs at the default N = 16. It checks all four
  products digit by digit against a schoolbook reference. It covers all-nines
  operands, 3-digit operands, a start while busy, and cycles where the cells
  and the adder work on different digits at once. It fails if any of these
  never happened.

**Where the RTL departs from, or goes beyond, the original design:**

- **Gate structure.** The original converter and delay-optimised circuit are
  published as gate netlists with stated depths: ten logic levels for the
  delay-optimised cell and thirteen for the area-optimised cell. This RTL
  matches their function, column layout and adder organisation, but not gate
  for gate. The converter is written as a small column sum, and p2 and c come
  from a count. The logic depth therefore depends on synthesis, and the RTL
  does not reproduce the published depths.
- **Areas.** The original work reports area savings against an easy-multiples
  partial-product generator in a 0.25 um process. Neither that design nor a
  cell library is part of this RTL, so those figures are not reproduced.
- **Own choices:** the operand width (16 digits); a two-stage pipeline (cells,
  then adder) rather than any deeper one; the handshake and reset; the ripple multi-operand adder;
  the area-optimised cells in the semi-parallel and fully parallel units.
- Behaviour for non-BCD input codes (1010..1111) is unspecified. The cells rely
  on those codes never occurring.

## Simulating and changing it

Every module, package and testbench is one file: `rtl/NAME.sv` or `tb/NAME.sv`.
The testbenches print `TB_RESULT checks=N failures=M` and stop themselves.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bcd_pkg.sv tb/tb_bcd_util_pkg.sv tb/tb_bcd_mul_top.sv \
    --top-module tb_bcd_mul_top -Mdir obj_top
./obj_top/Vtb_bcd_mul_top
```

Replace `tb_bcd_mul_top` with any other `tb_*` name to run that block's test.
The available tests are `tb_bin2bcd_conv`, `tb_bin_prod_delay`,
`tb_bin_prod_area`, `tb_bcd_digit_mul`, `tb_bcd_pp_gen`, `tb_bcd_multi_add`,
`tb_bcd_iter_mul` and `tb_bcd_par_mul`. `tb/tb_bcd_util_pkg.sv` holds the
digit-array reference arithmetic they share.

How to make common changes:

- **Width:** change `N` on `bcd_mul_top`, or on `bcd_iter_mul` / `bcd_par_mul`
  directly.
- **Cell variant:** set `CELL` on any unit.
- **Digits per iteration:** set `K` on `bcd_iter_mul`. Any K that divides N
  works; the adder grows to 2K+1 operands.
- **Pipeline register:** set `PIPE` on `bcd_iter_mul`.
