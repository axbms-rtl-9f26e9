# Radix-4 Booth multiplier with constant-row sign extension

A signed multiplier, 8 x 8 bits by default, built the classic way: radix-4
Booth recoding halves the number of partial products, a handful of constant
1s replaces sign extension, and a Wallace tree of 3:2 compressors reduces
everything to two rows before a single carry-propagate adder. On an FPGA
that adder is the slice carry chain. The result is exact. This is the
reference structure that approximate radix-4 and radix-8 Booth multipliers
for FPGAs start from. No approximate variant is part of this RTL.

The design is combinational and has no clock. Any even operand width works.

## Booth digits and the five partial products

The multiplier `B` is cut into overlapping 3-bit groups
`{b[2i+1], b[2i], b[2i-1]}`, with `b[-1] = 0`. Each group is one radix-4 digit:

| group      | digit | partial product | negation bit |
|------------|-------|-----------------|--------------|
| 000        | 0     | 0               | 0            |
| 001, 010   | +1    | A               | 0            |
| 011        | +2    | 2A              | 0            |
| 100        | -2    | ~2A             | 1            |
| 101, 110   | -1    | ~A              | 1            |
| 111        | 0     | ~0              | 1            |

An N-bit `B` gives N/2 digits, so an 8-bit `B` gives four partial products.
Negative digits use the one's complement. The missing +1 is the
*negation bit*, which is just `b[2i+1]`. It is added in the tree at the
weight of the partial product's least significant bit. Group 111 needs no
special case: `~0 + 1 = 0`.

`A` is sign-extended to N+1 bits before selection, so `2A` fits. Each
partial product is therefore N+1 bits wide.

## The sign-extension constants (the subtle part)

Partial product `i` is signed and shifted left by `2i`. Adding it to a
2N-bit sum would normally mean copying its sign bit up to bit 2N-1 in every
row. Instead, each row is written as an (N+2)-bit value:

* its N+1 bits at columns `2i .. 2i+N`;
* its **inverted** sign `~s_i` at column `2i+N+1`, where `s_i = pp_i[N]`;
* a constant **1** at column `2i+N+2`. This is dropped when the column is
  `2N` or higher, which is the case for the last row.

In addition, a single constant **1** goes at column `N+1`.

Why this works: a signed (N+2)-bit row whose top bit is `s` equals
`~s * 2^(N+1) - 2^(N+1)` plus its lower bits. Inverting the sign bit
therefore leaves each row short by `2^(N+1) * 4^i`. Over all rows the
shortfall is `K = 2^(N+1) * (4^(N/2) - 1) / 3`. The constants add
`2^(N+1) + 2K`. Together that is `2^(N+1) + 3K = 2^(2N+1)`, which is 0
modulo `2^(2N)`. So the sum is exact for every even N.

For 8 x 8 (`.` = partial-product bit, `S` = inverted sign, `n_i` = negation
bit of digit i), the columns are 15 down to 0:

```
 col: 15 14 13 12 11 10  9  8  7  6  5  4  3  2  1  0
row0:                 1  S  .  .  .  .  .  .  .  .  .    PP0
row1:           1  S  .  .  .  .  .  .  .  .  .    n0    PP1 << 2
row2:     1  S  .  .  .  .  .  .  .  .  .    n1          PP2 << 4
row3:  S  .  .  .  .  .  .  .  .  .    n2                PP3 << 6 (its 1 at col 16 is dropped)
row4:                    1       n3                      extra 1 at col 9
```

Each negation bit sits in the free column just below the previous
row's least significant bit. So five rows of 16 bits hold the whole
matrix.

## The Wallace tree

`wallace_tree` takes any number of W-bit rows. At each level it groups the
rows in threes, in index order. Each group goes through a row of W full
adders (`csa_3to2`), whose outputs are the sum bits and the majority bits
shifted one column left. The one or two rows left over pass to the next
level unchanged. The row count goes `n -> 2*floor(n/3) + n mod 3` until two
rows remain, and a `+` adds those two. For the 8 x 8 multiplier the tree
has three levels (5 -> 4 -> 3 -> 2).

Carries out of column W-1 are discarded, which is correct for a product
truncated to 2N bits. Bits that are constant 0 in the matrix are removed
by any synthesis tool. So the tree is written at full row width without
cost.

## Interface and timing

`booth_r4_mult #(parameter int unsigned N = 8)`

| port | dir | width | meaning                         |
|------|-----|-------|---------------------------------|
| `a`  | in  | N     | multiplicand, two's complement  |
| `b`  | in  | N     | multiplier (Booth-recoded)      |
| `p`  | out | 2N    | `a * b`, two's complement       |

There is no clock, reset or handshake. `p` is valid after one propagation
delay through the encoder, three compressor levels and the final adder. To
pipeline the multiplier, put registers around it, or split it between
`wallace_tree` levels.

## Feeding it unsigned pixels

Image filters multiply 8-bit unsigned pixels (0..255), which do not fit
a signed 8-bit operand. For kernels whose coefficients sum to zero, such
as Sobel's, subtract 128 from every pixel first. The offset cancels in
the weighted sum, so the gradient is unchanged. `tb_sobel_workload`
computes Sobel gradients this way. It matches an integer reference on
every pixel. For other kernels, use `N = 10` and zero-extend the pixels.

## Files

| file | contents |
|------|----------|
| `rtl/booth_pkg.sv` | `booth_sel_e` enum (the five selections) and `booth_decode()` |
| `rtl/booth_r4_encoder.sv` | recoding and partial-product selection, outputs `pp[N/2]` and `neg` |
| `rtl/csa_3to2.sv` | one row of full adders, a 3:2 carry-save compressor |
| `rtl/wallace_tree.sv` | generic row-level Wallace reduction plus final adder |
| `rtl/booth_r4_mult.sv` | top: builds the dot matrix above and instantiates the other two |
| `tb/tb_booth_r4_mult.sv` | all 65,536 operand pairs at N = 8; counts every digit value, group 111, negative and extreme products |
| `tb/tb_booth_r4_encoder.sv` | all operand pairs; checks every partial product, negation bit and digit value |
| `tb/tb_wallace_tree.sv` | random and all-ones rows through trees of 2, 3, 5 and 12 rows |
| `tb/tb_booth_r4_mult_sizes.sv` | N = 2 and 4 exhaustively, N = 12 and 16 with random and corner operands |
| `tb/tb_sobel_workload.sv` | Sobel edge detection on a generated 32 x 32 image, every product through the multiplier |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl rtl/booth_pkg.sv tb/tb_booth_r4_mult.sv \
          --top-module tb_booth_r4_mult -Mdir obj
./obj/Vtb_booth_r4_mult
```

Replace the testbench name to run the others. Each finishes in well under
a second. `booth_pkg.sv` must come first on the command line; `-y rtl`
finds the remaining modules by name.

## How far to trust it, and what was chosen here

* Exactness is verified exhaustively at N = 2, 4 and 8. At N = 12 and 16
  it is verified with 30,000 random pairs plus the corner operands 0, 1,
  -1, the maximum and the minimum. The constant scheme is also proven
  above for every even N.
* Operands are taken as two's complement. Unsigned operands would need one
  more Booth digit and a different constant row.
* The dot layout (N+1 bits per partial product, where the constants go) is
  the standard published scheme. The placement of the negation bits and of
  the extra 1 into particular tree rows is this design's own choice. So is
  the in-order grouping of rows in the Wallace tree.
* The tree uses plain full adders. The LUT-level packing that FPGA-tuned
  versions of this multiplier use is not included: it is a mapping onto a
  vendor's 6-input LUTs and carry chains. Synthesis tools perform their own
  version of it.
* No pipelining or timing target is built in. Power and delay numbers
  depend entirely on the target device.
