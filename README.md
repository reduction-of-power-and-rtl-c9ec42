# 8x8 approximate multiplier with propagate/generate partial products

This is an unsigned 8x8 multiplier that gives up exactness to save area and power. It is meant for
error-tolerant work such as media processing. Most of a multiplier's cost is in the tree that
reduces the partial products, so all of the approximation is placed there.

The key idea is that a partial product `a(m,n) = alpha[m] & beta[n]` is 1 only a quarter of the
time. The design makes this sparsity larger and then uses it:

* Every symmetric pair `a(m,n)`, `a(n,m)` is rewritten as a **propagate** term
  `p = a(m,n) | a(n,m)` and a **generate** term `g = a(m,n) & a(n,m)`. The sum `p + g` is still
  `a(m,n) + a(n,m)`, so nothing is lost at this step. With random operands, though, `g` is 1 only
  once in 16.
* The generate terms of a column are so rarely 1 together that a plain **OR gate** nearly always
  gives their count. No adders are needed for them.
* The propagate terms and the remaining partial products go through **approximate** half adders,
  full adders and 4-2 compressors. Each cell is cheaper than an exact one and is wrong on a few
  input patterns, always by exactly one unit of its column weight.
* The two rows that are left are added **exactly** by a ripple-carry adder.

The result is a purely combinational multiplier: `alpha` and `beta` go in and the 16-bit `product`
comes out. There is no clock, no reset and no register.

## The altered partial-product matrix (`altered_pp_gen`)

Partial products are numbered `a(m,n)`, with weight `2^(m+n)`; column `c` holds the terms with
`m+n = c`. The alteration is applied only to columns 3 to 11, which are the columns with more than
three terms. In these columns each pair with `m > n` becomes `p(m,n)` and `g(m,n)`. Diagonal terms
`a(m,m)` stay as they are. Columns 0–2 and 12–14 are not altered.

| column | terms after alteration |
|---|---|
| 14 | a7,7 |
| 13 | a7,6 a6,7 |
| 12 | a7,5 a5,7 a6,6 |
| 11 | p7,4 p6,5 · g7,4 g6,5 |
| 10 | p7,3 p6,4 a5,5 · g7,3 g6,4 |
| 9 | p7,2 p6,3 p5,4 · g7,2 g6,3 g5,4 |
| 8 | p7,1 p6,2 p5,3 a4,4 · g7,1 g6,2 g5,3 |
| 7 | p7,0 p6,1 p5,2 p4,3 · g7,0 g6,1 g5,2 g4,3 |
| 6 | p6,0 p5,1 p4,2 a3,3 · g6,0 g5,1 g4,2 |
| 5 | p5,0 p4,1 p3,2 · g5,0 g4,1 g3,2 |
| 4 | p4,0 p3,1 a2,2 · g4,0 g3,1 |
| 3 | p3,0 p2,1 · g3,0 g2,1 |
| 2 | a2,0 a0,2 a1,1 |
| 1 | a1,0 a0,1 |
| 0 | a0,0 |

With uniformly random operands, `a` is 1 with probability 1/4, `p` with 7/16 and `g` with 1/16.
The module outputs the whole `a` matrix. `p` and `g` are valid at `[m][n]` for `m > n` inside
columns 3..11, and are 0 everywhere else.

## Generate columns: OR instead of add (`gen_or_reduce`)

Column `c` gets one bit, `G_c`, which is the OR of the column's generate terms. The OR is wrong
only when two or more of those terms are 1, and then the result is too low. Taken over all 65536
operand pairs, that happens with these probabilities:

| generate terms in the column | columns | probability that the OR is wrong |
|---|---|---|
| 2 | 3, 4, 10, 11 | 0.00391 |
| 3 | 5, 6, 8, 9 | 0.01123 |
| 4 | 7 | 0.02153 |

The error grows with the number of terms. The design therefore limits an OR gate to four inputs:
a column with `m` generate terms would need `ceil(m/4)` gates. At 8 bits no column holds more than
four generate terms, so each column needs one gate. That gives four 2-input, four 3-input and one
4-input OR gate.

## The approximate cells

Each cell is wrong on a few input patterns, by at most one. Where the sum bit is wrong, the carry
may be changed too, so that the error stays at one.

| cell | equations | wrong inputs (exact → given) |
|---|---|---|
| `approx_ha` | S = x1 \| x2, C = x1 & x2 | 11: 2 → 3 |
| `approx_fa` | W = x1 \| x2, S = W ^ x3, C = W & x3 | 110: 2 → 1, 111: 3 → 2 |
| `approx_comp42` | W1 = x1&x2, W2 = x3&x4, S = (x1^x2) \| (x3^x4) \| (W1&W2), C = W1 \| W2 | 0101, 0110, 1001, 1010: 2 → 1; 1111: 4 → 3 |

The full adder is not symmetric in its inputs. `x1` and `x2` are merged by the OR, and `x3` is the
input that is added properly. The compressor pairs its inputs as (x1, x2) and (x3, x4). It has no
carry-in or carry-out chain. It drops the third output bit that an exact 4-input count needs only
for 1111. Unlike some earlier approximate compressors, it gives 0 when all inputs are 0.

## The reduction map (`approx_reduce_tree`)

This part is the hardest to follow, and it fixes the multiplier's accuracy. There are two stages.
`S_c`/`C_c` are the sum and carry of the cell placed in column `c`. `C_c` has the weight of column
`c+1`.

**Stage 1** reduces the propagate terms and the plain partial products. The `G` bits wait for
stage 2.

| column | cell | inputs (x1, x2, x3, x4) | passes unchanged |
|---|---|---|---|
| 12 | HA | a7,5 a5,7 | a6,6 |
| 11 | HA | p7,4 p6,5 | |
| 10 | FA | p7,3 p6,4 a5,5 | |
| 9 | FA | p7,2 p6,3 p5,4 | |
| 8 | 4-2 | p7,1 p6,2 p5,3 a4,4 | |
| 7 | 4-2 | p7,0 p6,1 p5,2 p4,3 | |
| 6 | 4-2 | p6,0 p5,1 p4,2 a3,3 | |
| 5 | FA | p5,0 p4,1 p3,2 | |
| 4 | HA | p4,0 p3,1 | a2,2 |

**Stage 2** leaves at most two bits in each column. It uses eleven full adders and one half adder:

| column | cell | inputs (x1, x2, x3) |
|---|---|---|
| 13 | FA | a7,6 a6,7 C12 |
| 12 | FA | S12 C11 a6,6 |
| 11 … 5 | FA | S_c G_c C_(c−1) |
| 4 | FA | S4 a2,2 G4 |
| 3 | FA | p3,0 p2,1 G3 |
| 2 | HA | a2,0 a0,2 (a1,1 passes) |

The two output rows are built as follows. In column `c`, `x[c]` holds the stage-2 sum, or the only
bit of the column. `y[c]` holds the stage-2 carry from column `c−1`, or the second bit. `x[0]` is
a0,0 and `y[0]` is 0; `x[1]`/`y[1]` are a1,0/a0,1; `y[2]` is a1,1; `x[14]` is a7,7.

The cell counts and which terms share a cell are part of the design. Some details are this
implementation's reading of the reduction map:

* Inside each cell, the inputs are taken in the top-to-bottom order of the map. This matters only
  for the full adder, where it decides which bit becomes `x3`.
* The column-2 half adder takes a2,0 and a0,2, and a1,1 passes through.

## Final adder (`rca`) and top (`approx_mult8`)

`rca` is a plain 15-bit ripple-carry adder built from exact full-adder bits. Its carry out is
`product[15]`. `approx_mult8` chains the four parts:
`altered_pp_gen → gen_or_reduce → approx_reduce_tree → rca`.

Shared sizes and types are in `approx_mult_pkg`:

* `N = 8`.
* The altered column range `ALT_LO = 3` to `ALT_HI = 2N−5 = 11`.
* `pp_mat_t` for the `[m][n]` matrices, `row_t` for 15-bit rows, `gcol_t` for `G[11:3]`.

## Accuracy

These figures were measured over all 65536 operand pairs by the end-to-end testbench:

| metric | value |
|---|---|
| exact products | 11937 |
| products too high / too low | 4884 / 48715 |
| mean relative error distance (MRED) | 7.86 × 10⁻² |
| normalized error distance (mean ED / 255²) | 2.58 × 10⁻² |
| largest error distance | 17948 (255 × 255 gives 49157) |

A product is always exact when either operand is zero or a power of two, because no cell then sees
more than one 1. The error grows when both operands are dense: at 255 × 255 almost every cell hits
one of its wrong patterns. Most errors make the product too low.

For comparison, the same approximation scheme applied at 16 bits is reported with an MRED of
7.63 × 10⁻² and an NED of 1.78 × 10⁻². The 16-bit version is not included here; see below.

## What is not included, and how far to trust it

* **Width.** Only the 8x8 multiplier exists. The reduction map is a fixed wiring for 8 bits, and
  `approx_reduce_tree` stops elaboration with an error for any other `N`. A 16- or 32-bit version
  would need its own map, which is not defined here.
* **Second variant.** A second, more accurate variant exists (about 2.4 × 10⁻⁴ MRED at 16 bits).
  It approximates only part of the columns. Its structure is not defined, so it is not built.
* **Signed operands.** Operands are unsigned. The scheme could be applied to signed (e.g. Booth)
  multipliers, leaving the sign-extension bits exact, but that is not built.
* **Compressor equation.** The compressor's sum is implemented from its truth table, as
  `(x1^x2) | (x3^x4) | (x1&x2&x3&x4)`. This is the form in which one of the three XORs of an exact
  compressor becomes an OR.
* **Timing.** There is no pipelining. Register the inputs or the product outside if needed.
* **Testing.** Every module has a self-checking testbench. The cell testbenches check the
  published truth tables exhaustively. The matrix, OR and tree testbenches run all 65536 operand
  pairs. The end-to-end testbench compares every product with a separately written, table-driven
  model, and checks that model against the identity
  `product = alpha*beta + Σ (errors of the cells that fired)`.

## Files

| file | contents |
|---|---|
| `rtl/approx_mult_pkg.sv` | sizes and types |
| `rtl/approx_ha.sv`, `rtl/approx_fa.sv`, `rtl/approx_comp42.sv` | approximate cells |
| `rtl/altered_pp_gen.sv` | partial products and propagate/generate alteration |
| `rtl/gen_or_reduce.sv` | OR of the generate terms per column |
| `rtl/approx_reduce_tree.sv` | two-stage approximate reduction |
| `rtl/rca.sv` | ripple-carry adder |
| `rtl/approx_mult8.sv` | top |
| `tb/tb_ref_pkg.sv` | reference model used by the tree and top testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. For example, the
end-to-end run is:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_approx_mult8 \
  rtl/approx_mult_pkg.sv tb/tb_ref_pkg.sv rtl/approx_ha.sv rtl/approx_fa.sv \
  rtl/approx_comp42.sv rtl/altered_pp_gen.sv rtl/gen_or_reduce.sv \
  rtl/approx_reduce_tree.sv rtl/rca.sv rtl/approx_mult8.sv tb/tb_approx_mult8.sv
./obj_dir/Vtb_approx_mult8
```

Every testbench finishes in well under a second. For a single module, list the package, the
module, the modules it instantiates, `tb/tb_ref_pkg.sv` when the testbench imports it, and the
testbench.

## Changing it

* To move the approximation boundary or try other cells, edit `approx_reduce_tree`. Then update
  the cell list in `tb_ref_pkg::ref_mult`, which holds the same map as data.
* The end-to-end testbench prints the error metrics and how often each kind of cell erred. These
  figures let you compare variants directly.
