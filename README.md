# 8x8 vertically-and-crosswise multiplier with 2x2 blocks and a 16-to-7 reduction

This is an unsigned 8x8-bit combinational multiplier. It follows the
vertically-and-crosswise scheme (Urdhava Tiryakbhyam) from Vedic
mathematics. Each operand is cut into four 2-bit digits. Every pair of digits
is multiplied at once in its own 2x2 multiplier, which gives 16 partial
products of 4 bits each.

The main idea is in what comes next. Because the partial products have
weights 2^0, 2^2, ..., 2^12, many of them occupy disjoint bit ranges. Those
need no adder: they can be written side by side in one wider word. That packs
the 16 partial products into seven numbers, and only those seven are added.
The usual way to build an 8x8 Vedic multiplier uses four 4x4 multipliers and a
carry-save adder tree. This design replaces both with 2x2 blocks, wiring, and
a small adder.

```
 a[7:0] ─┐   ┌──────────────┐  pp[4][4]  ┌────────────────────────────────┐
         ├──►│ vedic_pp_gen │───────────►│ vedic_pp_reduce_add            │──► product[15:0]
 b[7:0] ─┘   │ 16 x 2x2 mul │  (4 bit    │ concatenate into X1..X7,       │
             └──────────────┘   each)    │ q1=X2+X3 q2=X4+X5 q3=X6+X7,    │
                                         │ X1 + 4*q1 + 16*q2 + 64*q3      │
                                         └────────────────────────────────┘
```

## Digits and partial products

Digit `i` of an operand is bits `(2i+1, 2i)`, for `i` = 0..3. The partial
product `pp[i][j]` is a-digit `i` times b-digit `j`. It is at most 3*3 = 9, so
it fits in 4 bits, and its weight in the final product is `2^(2(i+j))`.

A common way to name the products is p1..p16. It counts a-digits from the
top, and b-digits from the top within each a-digit:

| p  | digits        | weight | p   | digits        | weight |
|----|---------------|--------|-----|---------------|--------|
| p1 | a(7,6)·b(7,6) | 2^12   | p9  | a(3,2)·b(7,6) | 2^8    |
| p2 | a(7,6)·b(5,4) | 2^10   | p10 | a(3,2)·b(5,4) | 2^6    |
| p3 | a(7,6)·b(3,2) | 2^8    | p11 | a(3,2)·b(3,2) | 2^4    |
| p4 | a(7,6)·b(1,0) | 2^6    | p12 | a(3,2)·b(1,0) | 2^2    |
| p5 | a(5,4)·b(7,6) | 2^10   | p13 | a(1,0)·b(7,6) | 2^6    |
| p6 | a(5,4)·b(5,4) | 2^8    | p14 | a(1,0)·b(5,4) | 2^4    |
| p7 | a(5,4)·b(3,2) | 2^6    | p15 | a(1,0)·b(3,2) | 2^2    |
| p8 | a(5,4)·b(1,0) | 2^4    | p16 | a(1,0)·b(1,0) | 2^0    |

In the RTL, p_k is `pp[3 - (k-1)/4][3 - (k-1)%4]`.

Each 2x2 multiplier (`vedic_mul2x2`) is the vertically-and-crosswise method
on two binary digits. The two vertical products `a0·b0` and `a1·b1` form the
outer columns. The two crosswise products `a1·b0` and `a0·b1` are added in the
middle column by a half adder. A second half adder adds that carry to
`a1·b1`. In total this is four AND gates and two half adders.

## The reduction: 16 partial products into 7 numbers

A 4-bit product of weight `2^w` covers bits `w .. w+3`. Two products whose
weights differ by 2^4 or more therefore never overlap. Adding them is the
same as concatenating them. So the products are grouped into rows whose
weights step by 4 bits. Each row becomes one number:

| number | width  | LSB weight | contents, high to low (weights)          |
|--------|--------|------------|------------------------------------------|
| X1     | 16 bit | 2^0        | p1 (12), p3 (8), p8 (4), p16 (0)         |
| X2     | 12 bit | 2^2        | p2 (10), p4 (6), p12 (2)                 |
| X3     | 12 bit | 2^2        | p5 (10), p7 (6), p15 (2)                 |
| X4     | 8 bit  | 2^4        | p6 (8), p11 (4)                          |
| X5     | 8 bit  | 2^4        | p9 (8), p14 (4)                          |
| X6     | 4 bit  | 2^6        | p10 (6)                                  |
| X7     | 4 bit  | 2^6        | p13 (6)                                  |

The grouping is forced by how many products share each weight. The weights
2^0, 2^2, ..., 2^12 hold 1, 2, 3, 4, 3, 2, 1 products. That puts eight
products at 2^0, 2^4, 2^8 and 2^12, and eight at 2^2, 2^6 and 2^10. X1 takes
one product from each weight 0, 4, 8 and 12. X2/X3 take
the three at weights 2, 6 and 10 twice over. X4/X5 take what is left at 4
and 8. X6/X7 take the remaining two at 6.

This stage costs no logic. In `vedic_pp_reduce_add` it is a single
`always_comb` block of concatenations into the packed struct
`vedic_pkg::reduced_t`.

## Adding the seven numbers

The numbers of equal weight are added in pairs:

```
q1 = X2 + X3   13 bits, weight 2^2
q2 = X4 + X5    9 bits, weight 2^4
q3 = X6 + X7    5 bits, weight 2^6
product = X1 + q1·2^2 + q2·2^4 + q3·2^6      (mod 2^16)
```

The last line is built as `(X1 + q1·4) + (q2·16 + q3·64)`, which gives an
adder tree of depth three. For real partial products the sum never exceeds
255·255 = 65025, so nothing is lost by keeping 16 bits. Every adder is a
plain `+`, and synthesis is free to pick its architecture.

## Interface and timing

`vedic_mul8x8` (top):

| port      | dir | width | meaning               |
|-----------|-----|-------|-----------------------|
| `a`       | in  | 8     | multiplicand, unsigned |
| `b`       | in  | 8     | multiplier, unsigned   |
| `product` | out | 16    | `a * b`                |

The design has no clock, no reset and no registers. `product` is valid one
combinational delay after `a` or `b` changes. To pipeline it, register the
`pp` array between the two stages, or the output.

The sizes are fixed by the structure, not set by parameters. The operand
width `N = 8` and the derived `DIGITS = 4` are in `vedic_pkg`, together with
the types `pp_mat_t` (4x4 array of 4-bit products) and `reduced_t` (X1..X7).
The reduction table above is written out for 8x8. A wider multiplier would
need a new table in `vedic_pp_reduce_add`, not only a larger `N`.

## Files

| file                        | what it is                                          |
|-----------------------------|-----------------------------------------------------|
| `rtl/vedic_pkg.sv`          | widths and types shared by the modules               |
| `rtl/vedic_mul2x2.sv`       | 2x2 multiplier, 4 AND + 2 half adders                |
| `rtl/vedic_pp_gen.sv`       | 16 parallel 2x2 multipliers                          |
| `rtl/vedic_pp_reduce_add.sv`| 16-to-7 reduction, pairwise sums, final sum          |
| `rtl/vedic_mul8x8.sv`       | top                                                  |
| `tb/tb_*.sv`                | one self-checking testbench per module               |

## Verification

Each testbench compares against values it computes itself and prints
`TB_RESULT checks=N failures=M`. Each also has a time-based watchdog.

- `tb_vedic_mul2x2`: all 16 input pairs.
- `tb_vedic_pp_gen`: corner values and 2000 random operand pairs. Each of the
  16 outputs is checked against the product of the digits, which the
  testbench extracts itself.
- `tb_vedic_pp_reduce_add`: 5000 sets of arbitrary 4-bit values on all 16
  inputs, including values no 2x2 multiplier can produce. The result is
  compared with the sum of `pp[i][j]·2^(2(i+j))` mod 2^16, so any product
  placed at a wrong weight shows up. The testbench also requires each
  pairwise sum q1, q2, q3 to carry out of its operand width at least once.
- `tb_vedic_mul8x8`: the whole multiplier, exhaustively over all 65536
  operand pairs, at the top's only size. It also counts the following, and
  fails if any never happens: every one of the 16 2x2 blocks reaching its
  maximum of 9, X1 holding four non-zero products, and a carry out of each
  of q1, q2 and q3.

All four pass. Each testbench was also confirmed to fail on a deliberately
broken copy of its module, and on an empty module.

Coarse synthesis with yosys gives 96 AND and 32 XOR cells in the 16
multipliers, plus four adder cells for the sums. The design has no
flip-flops.

To run one testbench with Verilator, for example the end-to-end one:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv \
  rtl/vedic_pkg.sv tb/tb_vedic_mul8x8.sv --top-module tb_vedic_mul8x8
./obj_dir/Vtb_vedic_mul8x8
```

It finishes in well under a second.

## Design choices and limits

These points go beyond the method itself. They were decided here:

- **Operand format.** Operands are unsigned. A signed version would need a
  sign correction or a Baugh-Wooley style generator, which this design does
  not have.
- **X1 in the final sum.** The final sum includes X1, the 16-bit word of the
  products at weights 2^0, 2^4, 2^8 and 2^12. The pairwise sums q1..q3 cover
  only X2..X7, and the product is `X1 + q1 + q2 + q3` at their weights.
- **Shape of the last addition.** `(X1 + q1) + (q2 + q3)` is one choice. Any
  order gives the same result. Timing-driven synthesis may rebalance it.
- **Adders.** No carry-save or other specific adder is instantiated. Each
  sum is a `+`.
- **Gates of the 2x2 block.** The gate-level form of the 2x2 multiplier is
  the standard one, not a specified netlist.
- **Timing.** The design is purely combinational. No delay or area on a
  particular device is claimed: the testbenches check function only.
- **Width.** Only 8x8 is built. The same digit-and-row scheme extends to
  16x16 and 32x32, but those widths need their own reduction tables. They
  are not provided.
