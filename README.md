# Baugh-Wooley multiplier with a triangular HPM reduction tree

A combinational N x N-bit multiplier (N = 8 by default) that multiplies
two's-complement or unsigned operands and returns the full 2N-bit product.
It has two parts:

* a **Baugh-Wooley partial-product generator**. It rewrites the signed
  partial-product matrix so that every bit in it has positive weight. After
  that, signed numbers need no sign extension or subtraction;
* an **HPM reduction tree** (HPM = "high-performance multiplier" layout). It
  is a triangle of half and full adders that adds the bits of that matrix
  column by column. Its bottom row gives the product directly, so no
  separate final adder is needed.

The same adder array serves both number formats. Only the generator changes
between them: a few AND gates become NAND gates and two constant ones are
added.

## Interface and timing

`hpm_bw_mult #(parameter int unsigned N = 8)`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`  | in  | N     | multiplicand |
| `b`  | in  | N     | multiplier |
| `tc` | in  | 1     | 1: `a`, `b` are two's complement; 0: unsigned |
| `p`  | out | 2N    | product (`a*b`, exact in both modes) |

There is no clock, reset or handshake. `p` is a pure function of `a`, `b`
and `tc`, and is valid once the adder array has settled. To put it in a
clocked design, add registers around it. The array has no pipeline stages
of its own.

## The Baugh-Wooley partial products (`bw_ppg`)

For unsigned operands the matrix is the usual one: `pp[j][i] = a[i] & b[j]`,
with weight 2^(i+j). Rows `j = 0..N-1` are shifted one place left each.

For two's-complement operands the sign bits `a[N-1]` and `b[N-1]` have
negative weight. So every product of one sign bit with one ordinary bit is
negative. Baugh-Wooley uses `-x = (1-x) - 1` for a single bit `x`. Each
negative bit becomes its complement, and the constants `-1` that this
leaves are collected. Modulo 2^(2N) they add up to a `+1` at weight 2^N
and a `+1` at weight 2^(2N-1). The generator therefore:

* complements `a[N-1] & b[j]` and `a[i] & b[N-1]` for `i, j < N-1`;
* keeps `a[N-1] & b[N-1]` as it is (it is positive, as the product of two
  negative weights);
* outputs `k_mid = 1` (weight 2^N) and `k_msb = 1` (weight 2^(2N-1)).

In unsigned mode none of this applies: no complements, and both constants
are 0. One XOR per sign-related bit, controlled by `tc`, does the switch.

## The HPM triangle (`hpm_tree`)

This is the part that takes some study. The 2N-1 columns of the matrix hold
1, 2, ..., N, ..., 2, 1 bits. They are reduced by N-1 rows of cells. Rows
are numbered 1 at the apex down to N-1 at the bottom. Row `r` has:

* a half adder at column `N-r`;
* full adders at columns `N-r+1 .. N-1+r`.

So there are N-1 half adders and (N-1)^2 full adders in total: 7 and 49
for N = 8. For N = 4 the cells sit like this, with column 0 having no cell:

```
column:   6    5    4    3    2    1    0
row 1:                 FA   HA
row 2:            FA   FA   FA   HA
row 3:       FA   FA   FA   FA   FA   HA
                                          p0 = a0 b0
```

Wiring rules:

1. **Sums go down.** The sum of a cell feeds the cell below it in the same
   column. The bottom row's sums are product bits 1 .. 2N-2.
2. **Carries go left inside a row.** Each cell's carry feeds the next cell
   to its left in the same row. Every row is therefore a ripple chain that
   starts at its half adder, which has no carry input.
3. **Row-end carries go down-left.** The carry out of a row's leftmost cell
   (column N-1+r) becomes one of the two upper inputs of the next row's
   leftmost cell (column N+r). The carry out of the bottom row's leftmost
   cell is product bit 2N-1.
4. **Partial products enter from above.** The top cell of a column takes
   two matrix bits. For columns above N it takes one matrix bit instead,
   because the row-end carry of rule 3 uses the other input. Each lower
   cell in the column takes one more matrix bit.

If you count the inputs, every column has exactly as many as it has bits.
The one exception is column N, which has one spare input. That spare input
carries `k_mid`, the Baugh-Wooley constant of weight 2^N, and costs no extra
adder. The other constant, `k_msb`, has weight 2^(2N-1), and no cell is left
for it. It is XORed onto the top product bit; the carry beyond bit 2N-1 has
no place in the product anyway.

Inside a column, matrix bits are fed in order of rising `a` index: the top
cell takes the first ones, and the spare input of column N is the lowest.
Any order gives the same sum. The order only changes which paths are
longest.

**Why this shape.** Each cell only talks to its neighbour below and its
neighbour to the left. Row-end carries step one place down-left. This keeps
the wiring short and regular. Compared with the usual Baugh-Wooley array, the
triangle starts adding in the middle columns, where the matrix is tallest.
The delay still grows linearly with N, because the bottom row is a ripple
chain.

Because the tree is only an adder of weighted bits, it is correct for any
input matrix, not only for real products:
`p = (sum of pp[j][i]*2^(i+j) + k_mid*2^N + k_msb*2^(2N-1)) mod 2^(2N)`.
The testbench uses exactly this property.

## Cells (`hpm_ha`, `hpm_fa`)

Think of each cell as working on a bundle of the wires in its column. It
takes two of them (plus a carry-in, for the full adder), returns one sum
wire to the bundle and passes one carry to the next column. In logic,
these are the textbook half adder (`s = a^b`, `co = a&b`) and full adder
(`s = a^b^ci`, `co` = majority).

## Files

| file | content |
|------|---------|
| `rtl/hpm_pkg.sv` | geometry functions of the triangle (top row of a column, input count, first `a` index) |
| `rtl/hpm_ha.sv`, `rtl/hpm_fa.sv` | adder cells |
| `rtl/bw_ppg.sv` | Baugh-Wooley partial-product generator |
| `rtl/hpm_tree.sv` | the triangular reduction tree, built by `generate` from the rules above |
| `rtl/hpm_bw_mult.sv` | top level |
| `tb/tb_hpm_ha.sv`, `tb/tb_hpm_fa.sv` | exhaustive cell tests |
| `tb/tb_bw_ppg.sv` | every matrix bit against its formula, plus the weighted sum against `a*b`, for random operands in both modes |
| `tb/tb_hpm_tree.sv` | random and single-bit matrices at N = 8, 4, 2 against the weighted sum |
| `tb/tb_hpm_bw_mult.sv` | all 65,536 operand pairs of the default 8-bit multiplier, in both modes, against the simulator's own multiply |
| `tb/tb_hpm_bw_mult4.sv` | all operand pairs of the 4-bit multiplier, in both modes |

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
The end-to-end test also counts how often each case occurred, and fails if
one never did: both modes, a change of mode, negative signed results, the
most negative operand, and unsigned results that reach the top bit.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          rtl/hpm_pkg.sv tb/tb_hpm_bw_mult.sv --top-module tb_hpm_bw_mult
./obj_dir/Vtb_hpm_bw_mult
```

To run another test, give its file and module name in place of
`tb_hpm_bw_mult`. All tests finish in well under a second.

## Changing the size

`N` may be any value of 2 or more. The generator, the triangle and its
wiring are all derived from `N` (see `hpm_pkg`). The exhaustive 8-bit test
covers the default. `tb_hpm_tree` also runs the tree at N = 2 and N = 4.
For larger `N`, copy `tb_hpm_bw_mult` with random operands in place of the
exhaustive loop.

## What is fixed and what was chosen

These points follow the published design:

* the Baugh-Wooley form of the partial products;
* the 8-bit default and the 4-bit variant;
* the triangle: its rows and cell counts, half adders at the right end of
  each row, sums down, carries left, and the numbering of the product bits.

These are choices made here:

* The published 8 x 8 matrix is the unsigned one. The signed form used here
  is the standard modified Baugh-Wooley one.
* The `tc` input that switches between signed and unsigned at run time.
* The order in which a column's bits are fed to its cells.
* Adding the 2^(2N-1) constant with an XOR on the top bit.
* Building the array as purely combinational logic.

The conventional Baugh-Wooley array that the HPM version is usually compared
with is not included.
