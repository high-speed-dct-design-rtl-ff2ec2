# 8-point DCT built on Urdhva-Tiryak ("vertically and crosswise") multipliers

This is a combinational 8-point one-dimensional discrete cosine transform
(DCT) for 8-bit samples. It computes all 64 coefficient products with
multipliers that use the Urdhva-Tiryak method from Vedic mathematics.
That method writes each digit of a product as the sum of the "vertical" and
"crosswise" digit products that share its weight. In hardware this becomes
a column-by-column partial-product array, which is reduced by a tree of
adder cells. The cells are wired so that late-arriving signals drive the
adders' fast inputs.

The design has no clock and no registers. A new input vector can be applied
at any time, and the outputs settle after the combinational delay.

## Structure

```
dct8_vedic                      8-point DCT, Y = M * X
 └─ vedic_mult_signed  x 64     one per matrix entry, coefficient constant
     └─ vedic_mult              unsigned W x W Urdhva-Tiryak multiplier
         ├─ compressor42        5 bits -> sum + 2 carries (two chained adders)
         └─ fa_fast             full adder with a fast input
dct_pkg                         sizes, types, coefficient table, matrix rule
```

## The multiplier: vertical and crosswise columns

For operands `a` and `b` of `W` bits, column `c` of the product collects
every bit product `a[i] & b[j]` with `i + j = c`. With `W = 4` these columns
are:

| column | terms |
|---|---|
| P0 | a0b0 |
| P1 | a1b0 + a0b1 |
| P2 | a2b0 + a1b1 + a0b2 |
| P3 | a3b0 + a2b1 + a1b2 + a0b3 |
| P4 | a3b1 + a2b2 + a1b3 |
| P5 | a3b2 + a2b3 |
| P6 | a3b3 |

Done by hand, each column sum is resolved in turn and its multi-bit carry is
passed to the next column. `vedic_mult` instead compresses all columns at
once in a carry-save tree. At each level:

* a column with five or more bits feeds groups of five into `compressor42`
  cells; each cell keeps one sum bit in the column and sends two carries to
  the next column;
* three or four leftover bits feed one `fa_fast` cell;
* at most two bits pass down unchanged.

Levels repeat until no column holds more than two bits. A ripple chain of
`fa_fast` cells then adds the last two rows, with each carry on the fast
input. The tree's shape is computed at elaboration from `W` by constant
functions (`build_htab`), so any `W >= 1` works. The default is `W = 8`.

Two wiring rules come from a simple delay model of the full adder. From `a`
or `b` to `sum` takes two XOR delays; from `cin` to `sum` takes one. The
carry takes one level from any input. So `cin` is the fast input and the
carry is the fast output.

* **Vertical:** inside `compressor42`, the first adder's sum drives the
  second adder's fast input. The other two bits, `d` and `e`, start through
  the second adder's slow XOR in parallel. Every path through the cell is
  then about three XOR delays.
* **Horizontal:** carries that column `n` produces are stacked on top of
  column `n+1` at the next level. Cells take their fast input from the top
  of the column, so those carries are the first to reach fast inputs.
  Routing a carry to a slow input instead would add one XOR delay to the
  critical path.

For `W = 8` the column heights start at 1, 2, ..., 8, ..., 2, 1. The tree
uses 9 compressors and 24 full adders over 7 levels, then a 16-bit ripple
adder. In the last four levels each level reduces just one column of three,
which passes a carry one column up. A Dadda-style schedule with half
adders would be shallower. It is not used because the reduction here uses
only the two cells above.

Carries out of the top column are dropped. This is safe because a
`W`-bit by `W`-bit product always fits in `2W` bits. For the same reason the
ninth product bit of a 4-bit multiplication is always zero, and `p` is
`2W` bits wide.

`vedic_mult_signed` adapts the unsigned core to two's complement. It takes
each operand's magnitude as a `W`-bit unsigned number, so `-128` becomes
`128` exactly. It multiplies the magnitudes and negates the result when the
operand signs differ. This sign handling is a choice of this design.

## The transform

`Y(k) = sum_i M[k][i] * X(i)`, for `k, i = 0..7`, with

* `M[0][i] = C4`;
* `M[k][i] = cos((2i+1) k pi / 16) / 2` for `k > 0`. Folding the angle
  `m = (2i+1)k mod 32` into `0..8` turns each entry into `+C_m` or `-C_m`.

This gives the usual matrix. Row 1 is `C1 C3 C5 C7 -C7 -C5 -C3 -C1`, row 2
is `C2 C6 -C6 -C2 -C2 -C6 C6 C2`, and row 4 is `C4 -C4 -C4 C4 C4 -C4 -C4 C4`.

The coefficients are `C_m = cos(m pi/16)/2`. Each is stored as 8-bit two's
complement with 7 fraction bits (Q1.7) and rounded toward zero:

| m | C_m | Q1.7 | binary | -C_m binary |
|---|---|---|---|---|
| 1 | 0.4904 | 62 | 00111110 | 11000010 |
| 2 | 0.4619 | 59 | 00111011 | 11000101 |
| 3 | 0.4157 | 53 | 00110101 | 11001011 |
| 4 | 0.3536 | 45 | 00101101 | 11010011 |
| 5 | 0.2778 | 35 | 00100011 | 11011101 |
| 6 | 0.1913 | 24 | 00011000 | 11101000 |
| 7 | 0.0975 | 12 | 00001100 | 11110100 |

Every one of the 64 matrix entries has its own `vedic_mult_signed`, with
the coefficient as a constant operand. After synthesis each one becomes a
constant-coefficient multiplier. The eight 16-bit products of a row are
summed exactly in 19 bits by an ordinary adder expression.

### Number formats

| signal | format | range |
|---|---|---|
| `x[i]` | signed 8-bit integer (for pixels, `p - 128`) | -128 .. 127 |
| coefficient | signed Q1.7 | -62 .. 62 (/128) |
| product | signed 16-bit, 7 fraction bits | |
| row sum | signed 19-bit, 7 fraction bits | abs <= 128 * 360 = 46080 |
| `y[k]` | signed 16-bit, 6 fraction bits: `y = floor(sum / 2)` | abs <= 23040 |

The exact row sum needs 17 bits. The outputs are 16 bits, so the sum is
shifted right by one bit, which rounds toward minus infinity. It never
saturates. To get the transform value, divide `y[k]` by 64. With the
rounding toward zero in the coefficient table, the error against the exact
DCT is at most `sum|X(i)|/128 + 1/64`.

Because each AC row's coefficients cancel in pairs, a constant input gives
exactly zero on `y[1..7]`.

## Interfaces

| module | ports | parameters |
|---|---|---|
| `dct8_vedic` | `input sample_t x[8]`, `output coefout_t y[8]` | none; sizes in `dct_pkg` (`N=8`, `XW=8`, `CW=8`, `YW=16`) |
| `vedic_mult_signed` | `x`, `y` signed `[W-1:0]`; `p` signed `[2W-1:0]` | `W = 8` |
| `vedic_mult` | `a`, `b` `[W-1:0]`; `p` `[2W-1:0]` | `W = 8` |
| `compressor42` | `a, b, cin, d, e` -> `sum1, sum, cout1, cout2` | none |
| `fa_fast` | `a, b, cin` -> `sum, cout` | none |

All modules are purely combinational. The top's 8 x 8 input bits plus
8 x 16 output bits make 192 pins.

## What is this design's own choice

These choices are not fixed by the method the design follows:

* The exact tree schedule: groups of five bits, then three, up to two passed
  down.
* The ripple carry final adder.
* The sign-magnitude treatment of signed operands.
* Signed 8-bit input samples.
* The 16-bit output with 6 fraction bits, made by a one-bit floor shift.
* The plain adder that sums each row.
* Fully parallel multipliers (64 of them), with no resource sharing and no
  pipelining.

The coefficient format was picked so that common subexpression elimination
could be applied. That optimisation is not implemented here: every product
is formed by a Vedic multiplier. For a small, fast implementation,
sharing shifted coefficient terms across rows would be a natural next step.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

| testbench | what it checks |
|---|---|
| `tb_fa_fast` | all 8 input combinations |
| `tb_compressor42` | all 32 combinations: the weighted sum identity, plus the first stage alone |
| `tb_vedic_mult` | `W=8`: all 65536 pairs; `W=4`: all 256 pairs and 12 x 13 = 156; `W=11`: 20000 random pairs |
| `tb_vedic_mult_signed` | all 65536 signed 8-bit pairs, -128 included |
| `tb_dct8_vedic` | bit-exact outputs against a model whose coefficients come from `$cos`; error bound against the real-valued DCT; constant, impulse, worst-case sign-pattern and 5000 random vectors. It counts inputs of -128, exact-zero AC outputs for constant inputs, outputs at the extreme value 23040, and negative and positive outputs, and fails if any of these never happens. |

`tb_dct8_vedic` runs the top at its default sizes.

Simulating with Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dct_pkg.sv \
    tb/tb_dct8_vedic.sv --top-module tb_dct8_vedic -Mdir obj_dct
./obj_dct/Vtb_dct8_vedic
```

Swap in another testbench name to run the others. Building the DCT
testbench takes about a minute and a half, because it elaborates 64
multipliers. Running it takes under a second. Lint with
`verilator --lint-only -Wall -Irtl rtl/dct_pkg.sv rtl/dct8_vedic.sv`.
The warnings left are unused bits: the carry out of the last ripple stage,
the carries out of the top column, and the internal `sum1` nodes.

## Changing it

* **Multiplier width:** set `W` on `vedic_mult` or `vedic_mult_signed`; the
  tree rebuilds itself.
* **Coefficient table:** edit `C_TAB` in `dct_pkg`. `dct_coef(k, i)` maps it
  onto the matrix.
* **Output scaling:** the `>>> 1` in `dct8_vedic` and `YW` in `dct_pkg`. A
  17-bit output with no shift keeps every bit of the row sum.
