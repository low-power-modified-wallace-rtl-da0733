# Booth-encoded Wallace tree multiplier

A signed N x N multiplier (N = 4 by default) that spends almost all of its
adders in a carry-free reduction tree and carries through only once, at the
very end. Three ideas make it up:

* **Radix-4 Booth recoding** of the multiplier `y` turns N partial products
  into ceil(N/2). Each is 0, ±x or ±2x, so it can be made from x with a
  multiplexer and an inverter.
* **Wallace reduction.** The bits of the partial-product matrix are added
  column by column in parallel layers of counters. Full adders (3:2),
  half adders (2:2) and four-input cells used as 4:2 compressors take the
  bits in groups, until every column holds at most two bits. No carry runs
  along a row inside the tree, so each layer costs one cell delay whatever N is.
* **One carry-propagate addition** of the two remaining rows, in an adder
  built from the same four-input cell.

```
 y[N-1:0] --> booth_encoder --digit--> pp_generator <-- x[N-1:0]
                                            |
                                  (D+1) x 2N bit matrix
                                            v
                                       wallace_tree
                                            |
                                    row_a, row_b (2N bits)
                                            v
                                       nbit_adder --> p[2N-1:0]
```

The circuit is purely combinational: no clock, no reset, no registers. `p`
is valid one propagation delay after `x` and `y` settle.

## Interface

| module | parameter | ports |
|---|---|---|
| `wallace_multiplier` (top) | `N` = 4 | `x[N-1:0]`, `y[N-1:0]` in, two's complement; `p[2N-1:0]` out, the full signed product |

Any `N >= 2` works, even or odd. The product is exact: for signed N-bit
operands it always fits in 2N bits.

## Booth digits and the matrix

`booth_encoder` extends `y` with an implicit 0 below bit 0. For odd N it also
repeats the sign bit on top. It then reads the overlapping triplets
`(y[2i+1], y[2i], y[2i-1])` as digits `d_i = -2*y[2i+1] + y[2i] + y[2i-1]`, with
`y = sum d_i * 4^i`. A digit travels as three select lines
(`mult_pkg::booth_digit_t`):

| triplet | digit | neg | two | one |
|---|---|---|---|---|
| 000 | 0  | 0 | 0 | 0 |
| 001, 010 | +1 | 0 | 0 | 1 |
| 011 | +2 | 0 | 1 | 0 |
| 100 | -2 | 1 | 1 | 0 |
| 101, 110 | -1 | 1 | 0 | 1 |
| 111 | 0 ("-0") | 1 | 0 | 0 |

`pp_generator` forms one row per digit. Row i holds the (N+1)-bit multiple
(`x` sign-extended by one bit, or `x<<1`, or 0), inverted bit by bit when
`neg` is set. The row is sign-extended up to product bit 2N-1 and shifted
left by 2i. Adding +1 completes the two's complement of a negative multiple.
That +1 is the "hot one": it goes into one extra row, at column 2i.
For the `-0` digit this gives an all-ones row plus a hot one, i.e. zero.
Summed modulo 2^(2N), the rows give exactly `x*y`.

So the matrix has D+1 rows, with D = ceil(N/2), and a known shape.
`mult_pkg::booth_row_mask()` records that shape, and the tree uses it so that
it never spends an adder on a bit that is always zero. For N = 4 the column
heights, from column 0 up, are

```
column : 0 1 2 3 4 5 6 7
height : 2 1 3 2 2 2 2 2
```

## The reduction tree

`wallace_tree` is the one module that needs careful reading. It takes a matrix
`pp[ROWS][W]` and a parameter `MASK` of the same shape, and only the bits set
in `MASK` exist. It works as follows.

1. **Stacking.** The existing bits of each column are numbered from 0 upwards.
2. **One layer.** Each column's stack is cut from the bottom into groups:
   * every group of four goes into a 4:2 compressor (`nbit_adder_cell`);
   * three bits left over go into a full adder;
   * two left over go into a half adder;
   * one left over passes through unchanged.

   A sum stays in its column. A carry moves to the next column up, in the
   next layer. The compressors have a second carry, `cout`, which never
   depends on their own `cin`. Compressor j of column c feeds its `cout` to
   the `cin` of compressor j of column c+1 in the same layer. That link is
   one gate deep and does not ripple. A `cout` with no compressor above it to
   take it goes to column c+1 of the next layer as a plain bit. A compressor
   with no `cout` below it gets `cin = 0`.
3. **Stopping.** A new layer is added as long as some column holds three or
   more bits. The two bits left in each column then form `row_a` and `row_b`.
4. **Top column.** Carries out of column W-1 are dropped. That is the
   modulo 2^W, which is exact here.

Every layer's column heights, the number of layers (`NUM_LAYERS`) and the
stack position of each cell's outputs are worked out at elaboration time,
by the constant functions `col_height`, `count_layers` and `stack_pos`. The
generate loops then place exactly the cells the matrix needs. In the next
layer's stack of column c, outputs are placed in this order: compressor sums,
full-adder sum, half-adder sum, the passed bit, then from column c-1 the
compressor carries, the unabsorbed couts, the full-adder carry and the
half-adder carry. The nets are `g_layer[l].g_col[c].ib` (the bits entering
a column), `g_layer[l].nb[c]` (the bits leaving it) and
`g_layer[l].g_col[c].co` (its couts).

The layer counts for the Booth matrix:

| N | rows into the tree | tallest column | layers | 4:2 compressors used |
|---|---|---|---|---|
| 4  | 3  | 3  | 1 | no |
| 8  | 5  | 5  | 2 | yes |
| 16 | 9  | 9  | 3 | yes |
| 32 | 17 | 17 | 4 | yes |

At the default size the tree is a single layer of full and half adders. The
compressor path only comes into play from N = 5 up. The testbenches cover it
at N = 5, 8, 16 and 32, and on a full 8 x 16 matrix.

## The four-input adder cell and the final adder

`nbit_adder_cell` has data inputs a, b, c, d, a carry in and three outputs.
They satisfy `a+b+c+d+cin = sum + 2*(carry+cout)`, where `cout` is set
whenever at least two of a..d are set:

| ones among a..d | cout | {carry,sum} |
|---|---|---|
| 0 | 0 | cin |
| 1 | 0 | 1 + cin |
| 2 | 1 | cin |
| 3 | 1 | 1 + cin |
| 4 | 1 | 2 + cin |

As gates: `sum = p ^ cin` and `carry = q | (p & cin)`, with p the parity of
a..d and q = a&b&c&d. `cout` is the "two or more of four" function.

`nbit_adder` chains 2N of these cells into a carry-propagate adder. Cell i
takes `x[i]`, `y[i]`, the `cout` of cell i-1 on input c and the `carry` of
cell i-1 on `cin`. Input d is tied low. Both incoming carries have weight
2^i, so the cell's range covers the column exactly. The adder ripples
through its 2N cells. This is the longest path of the multiplier.

## What follows the source design, and what is chosen here

The source design gives the overall structure: a Booth encoder with
sign-bit extension, a partial product generator, an adder array that
reduces the partial products by the Wallace rules above to two rows, and a
final n-bit adder that makes the 2n-bit product. It also gives the size
(4 x 4) and the truth table of the four-input adder cell. It uses [n:2]
compressors, and its adders are full adders with pins A, B, C, carry and sum.

Chosen here, where the source says nothing or too little:

* **Booth radix.** Radix-4, with the digit coding shown above. The source
  names a Booth encoder but gives neither its radix nor its coding.
* **Signed arithmetic.** Operands are two's complement. Since Booth recoding
  is a signed scheme, this seemed the natural reading. There is no unsigned
  mode.
* **Sign extension.** Every partial product is fully sign-extended to 2N
  bits, rather than using the usual constant-row trick. This is simple and
  obviously correct, at the cost of some extra full adders in the high
  columns.
* **Where the 4:2 compressors sit.** They are used in the tree for groups of
  four bits, and they also serve as the bit cells of the final adder. How the
  cell with the given truth table is used is not described, so this role is a
  choice.
* **Final adder.** A plain ripple of four-input cells. The source says only
  that its modified adder beats a carry-select adder, so a faster
  carry-propagate structure could replace `nbit_adder` without touching the
  rest.
* **Timing.** Combinational, with no pipeline registers.

Not represented: the transistor-level realisation of the adders (a
low-leakage, current-comparison domino circuit in a 180 nm process) and
everything measured on it (power, area, transient and DC behaviour). The RTL
models the logic function only. A figure of the source design also shows a
4 x 4 carry-save *array* of AND products, which conflicts with the
Booth-encoded Wallace tree of its text. This design follows the text.

## Files

| file | contents |
|---|---|
| `rtl/mult_pkg.sv` | `booth_digit_t`, `booth_digits()`, `booth_row_mask()` |
| `rtl/booth_encoder.sv` | radix-4 recoding |
| `rtl/pp_generator.sv` | multiples, sign extension, hot ones |
| `rtl/wallace_tree.sv` | generic masked reduction tree |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | 3:2 and 2:2 counters |
| `rtl/nbit_adder_cell.sv` | four-input adder cell / 4:2 compressor |
| `rtl/nbit_adder.sv` | final carry-propagate adder |
| `rtl/wallace_multiplier.sv` | top |

## Verification

Every module has a self-checking testbench in `tb/`. It computes the
expected values with plain integer arithmetic and ends by printing
`TB_RESULT checks=<n> failures=<m>`.

| testbench | what it covers |
|---|---|
| `tb_full_adder`, `tb_nbit_adder_cell` | all input combinations, against arithmetic and the truth table |
| `tb_nbit_adder` | 8-bit exhaustive (with carry in); 32-bit carry-chain corners and random |
| `tb_booth_encoder` | N = 4, 5, 8 exhaustive; each digit against its triplet and the digit sum against y |
| `tb_pp_generator` | N = 4, 5, 8 exhaustive; every row, the hot-one row and the row sum |
| `tb_wallace_tree` | Booth 4x4 and 8x8 shapes, a full 8x16 matrix, a 6x6 AND-array triangle; random bits, including outside the mask |
| `tb_wallace_multiplier` | end to end: N = 4, 5, 8 exhaustive; N = 16 and 32 random plus corner operands; fails if any Booth digit kind (0, ±1, ±2, -0) never occurred |
| `tb_wallace_multiplier_full` | the top at its default parameters, all 256 operand pairs |

`pp_check`, `tree_check` and `mult_check` in `tb/` are the harnesses that
those testbenches instantiate once per size.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mult_pkg.sv tb/tb_wallace_multiplier.sv --top-module tb_wallace_multiplier
./obj_dir/Vtb_wallace_multiplier
```

All the testbenches pass, and each finishes in a few seconds. Each one was
also run against a copy of its module with a deliberate bug in it, and
caught it.

## Changing it

* **Size.** Set `N` on `wallace_multiplier`. The tree re-derives its shape
  and layer count.
* **Another final adder.** Replace `nbit_adder`, keeping its ports (`x`,
  `y`, `cin`, `sum`, `cout_o`).
* **Another partial-product scheme.** For example, sign-extension
  constants, or an unsigned variant. Change `pp_generator` and
  `booth_row_mask()` together: the mask must mark every bit the generator
  can set.
* **Pipelining.** Registers can go between `g_layer` stages of the tree or
  around the final adder. None are present now.
