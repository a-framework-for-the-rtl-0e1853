# Low-error fixed-width radix-4 Booth multiplier

DSP datapaths often want an n-bit product from two n-bit operands: the word
length stays constant from stage to stage. The exact product has 2n bits, so
the n low bits are thrown away anyway. A *fixed-width* multiplier saves area
and power by never building most of the partial-product columns that feed
those low bits. If they are simply dropped (direct truncation), the result is
biased and can be off by several output LSBs. The RTL here keeps a few more columns than
the output needs and replaces the rest with a small data-dependent bias. That
brings the mean error close to what rounding the exact product would give,
for a fraction of the full multiplier's hardware.

The default configuration is an 8 x 8 two's-complement multiplier with an
8-bit output. It uses modified (radix-4) Booth recoding, keeps w = 2 extra
columns, and takes its compensation index from the bits of the first dropped
column. A two-case ("Type 1") threshold on that index picks the bias
constant. Over all 65,536 operand pairs, its maximum error is 188 and its
mean absolute error is 66.07, in units of 2^0 of the full 16-bit product (one
output LSB is 256). Direct truncation of the same array gives 1024 and 384.25,
so the compensation removes 82.8 % of the mean error.

## The partial-product array

Radix-4 Booth recoding scans the multiplier B in overlapping triplets
`{b[2i+1], b[2i], b[2i-1]}` (with `b[-1] = 0`). Each triplet becomes one
digit `d_i = b[2i-1] + b[2i] - 2 b[2i+1]` in {-2, ..., +2}, so an n-bit
operand needs only n/2 partial-product rows. Row i is `d_i * A * 4^i`.
Hardware builds it as (A or 2A) XOR neg, n+1 bits wide, plus a single `1` at
the row's least significant column when the row is negated (the `neg` bit,
called Ctrl_i[2] below).

Sign extension uses the sign-generate scheme. Row i brings its inverted sign
bit `~s` at column 2i+n. One constant, `-(2^n + 2^(n+2) + ... + 2^(2n-2)) mod
2^(2n)`, replaces every extension bit of every row. For n = 8 this constant
is 0xAB00.

For n = 8, w = 2 the array looks like this (S = partial-product bit that is
built, t = index bit, . = bit that is not built, N = negation bit. The
`th` row stands for the three index bits, each entering column 6, and only one of
the two K rows is added):

```
column     15 14 13 12 11 10  9  8  7  6 |  5  4  3  2  1  0
row 0                           ~s  S  S |  t  .  .  .  .  .
row 1                     ~s  S  S  S  S |  t  .  .  .
row 2               ~s  S  S  S  S  S  S |  t  .
row 3         ~s  S  S  S  S  S  S  S  S |
neg bits                               N |     .     .     .
constant    1     1     1     1  1       |
theta                                 th |
K (K1=2)                            1    |
K (K2=1)                               1 |
            \______ output p ______/ \___/
                                  w guard columns
```

Columns 8..15 form the output. Columns 6 and 7 are the w = 2 guard columns,
which are kept and summed but not output. Columns 0..5 are cut off. Of those,
only column 5 has hardware, and only to produce the index.

## The compensation bias

Dropping columns 0..5 loses their sum, L. The bias estimates L / 2^(n-w)
from information that is cheap to get:

* **Index theta.** Theta counts the ones among the partial-product bits of
  column n-w-1, the most significant dropped column. For n = 8 these are
  `S_{2,1}`, `S_{1,3}` and `S_{0,5}`. No index bit is complemented: this is
  the variant with Q = 0. The theta bits are added one column up, at column
  n-w (weight 2^(n-w)). In the units of that column this is theta itself. In
  effect, each index bit also stands for the lower columns beneath it.
* **Constant [K]_r.** A small integer, also added at column n-w. It covers
  the part of L that theta does not predict. It also covers the rounding
  offset 2^(w-1) - 1/2 that turns the final truncation into round-to-nearest
  on average.
* **Type 1 binary thresholding.** One constant is not enough, because the
  expected leftover differs between `theta = 0` and `theta > 0`. The design
  uses K1 when theta = 0 and K2 otherwise. In hardware this is an OR of the
  index bits driving a 2-way select of a w-bit constant (`comp_bias`).

The sum of the kept columns, the theta bits and [K]_r is then truncated to
its n top bits. Written as a formula:

```
p = floor( (P - L + (theta + K) * 2^(n-w)) / 2^n ),   K = (theta == 0) ? K1 : K2
```

where P is the exact product. Note that P - L is exactly the sum of the kept
columns.

### How K1 and K2 were chosen

The method restricts [K]_r to {0, 1, 2^(w-1) - 1, 2^(w-1)}, which is {0, 1, 2}
for w = 2. K itself is

```
K = 2^w * ( L/2^n  -  theta/2^w  +  (1 - 2^-w)/2 )
```

that is, what remains after theta, plus the rounding offset. This design
averages K over all operand pairs, separately for the pairs with theta = 0
and with theta > 0, and rounds each mean:

| n | mean K, theta = 0 | mean K, theta > 0 | [K1]_r | [K2]_r |
|---|---|---|---|---|
| 4 | 1.70 | 1.33 | 2 | 1 |
| 6 | 1.83 | 1.32 | 2 | 1 |
| 8 | 1.97 | 1.35 | 2 | 1 |

So K1 = 2 and K2 = 1 at every size. For n = 8, K1 = 2 is a single `1` in
column 7 when no index bit is set, and K2 = 1 is a single `1` in column 6
when one is. Both constants are parameters of `fw_booth_mult`.

## Accuracy

All figures are exhaustive over every operand pair. The error is
`A*B - p*2^n`, in units of 2^0 of the full product. Variance is that of the
signed error.

| n | max error | mean abs. error | variance | direct truncation: max / mean |
|---|---|---|---|---|
| 4 | 8 | 3.75 | 21.19 | 32 / 12.25 |
| 6 | 40 | 15.96 | 350.75 | 192 / 72.25 |
| 8 | 188 | 66.07 | 5778.11 | 1024 / 384.25 |

The published evaluation of this method lists 218 / 69.00 (max / mean) for
n = 8, 53 / 15.25 for n = 6 and 8 / 3.28 for n = 4. With the array above,
none of the nine (K1, K2) pairs allowed for w = 2 reproduces those numbers
exactly. The pair used here is the one the averaging gives. Against the
published figures, it has a lower maximum error at n = 8 and n = 6 and a lower
mean error at n = 8. Its mean error is slightly higher at n = 6 and n = 4
(15.96 against 15.25, 3.75 against 3.28).

For direct truncation, the n = 8 maximum and mean (1024 and 384.25) agree
exactly with the published values. The published n = 4 and n = 6 means
(10.88 and 70.50) and all published variances do not agree. For example, the
published variance at n = 8 is 18479 for direct truncation and 1799 for this
multiplier. Those figures must have been computed in some other way, so
compare variances only within the table above.

## Hardware structure

```
fw_booth_mult                       top, combinational
 |- booth_encoder   x n/2           triplet -> {neg, two, one}
 |- booth_pp_row    x n/2           selector cells for columns >= n-w-1
 |- comp_bias                       OR of theta bits, selects K1 / K2
 '- csa_array                       linear carry-save array + final adder
     '- csa32       x (M-2)         one row of n+w full adders
```

`csa_array` sums M operand vectors, each n+w bits wide and covering columns
n-w .. 2n-1:

* the n/2 rows;
* one vector holding the sign-generate constant and the kept negation bits,
  which never share a column;
* one vector per theta bit;
* the [K]_r vector.

For n = 8 that is M = 9 operands, reduced by 7 rows of 10 full adders and one
10-bit carry-propagate adder. The adder is written as `+` and left to
synthesis. All of this arithmetic is modulo 2^(n+w), which is exact because
the full product fits in 2n bits.

The shared control-word type `booth_ctrl_t` lives in `fwbooth_pkg`.

### Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | N | multiplicand, two's complement |
| `b` | in | N | multiplier, two's complement |
| `p` | out | N | fixed-width product, about A*B / 2^N, two's complement |

The multiplier is purely combinational, with no clock and no reset. The
result is valid one combinational delay after the operands settle. The longest
path runs through an encoder, a selector, M-2 carry-save rows and the final
adder. A 0.18 um implementation of this method is reported at 5.93 ns, fit
for 100 MHz. Registers, if needed, belong to the surrounding datapath.

### Parameters (`fw_booth_mult`)

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | operand and product width, even, >= 4 |
| `W` | 2 | guard columns kept below the product LSB, 1 .. N-1 |
| `K1` | 2 | bias constant when theta = 0, must fit in W bits |
| `K2` | 1 | bias constant when theta > 0, must fit in W bits |

Other N and W values build the same structure: the index is always the column
just below the kept ones. The K values for another N or W must be worked out
again with the averaging above. W = 1 gives the one-guard-column variant of
the method, but this design was only evaluated at W = 2.

## Choices made in this design

The following choices were made where the method as published leaves room;
the rest follows it.

* **Row width n+1.** Each row carries n magnitude bits plus a sign bit at
  column 2i+n. This is the only width that represents 2A exactly, and it is
  where the sign-generate constant places the inverted sign. The full product
  before truncation is therefore exact. The row testbench checks this for every
  multiplicand and digit.
* **The -0 triplet (111)** produces an all-zero row with no negation bit.
* **K1 = 2, K2 = 1**, derived as described above.
* **Adder structure.** The linear carry-save array is this design's own. It
  is the simplest structure that sums the kept columns. A Wallace or Dadda tree over the same operand bits would give the
  same results with less delay.
* **No registers.** The multiplier is a combinational block.
* **Not modelled:** the physical implementation, that is, the standard-cell
  layout, area, delay and power.

## Simulating

Every file in `rtl/` and `tb/` holds one module or package. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_fw_booth_mult \
    rtl/fwbooth_pkg.sv tb/fwbooth_ref_pkg.sv tb/tb_fw_booth_mult.sv
./obj_dir/Vtb_fw_booth_mult
```

Each testbench ends with a line `TB_RESULT checks=<n> failures=<n>`. Every
one of them finishes in well under a second.

| testbench | what it covers |
|---|---|
| `tb_booth_encoder` | all 8 triplets against the digit formula |
| `tb_booth_pp_row` | every A and every digit; full and truncated rows |
| `tb_comp_bias` | every index pattern; a second instance with W = 3 |
| `tb_csa_array` | random operand sums for M = 9, 2 and 5 |
| `tb_fw_booth_mult` | default 8 x 8 design, all 65,536 pairs, bit-exact against the reference; error statistics; counts of each mechanism (K1 and K2 cases, maximum theta, negated rows, 2A rows, -0 triplets) |
| `tb_fw_booth_error_sweep` | n = 4, 6, 8, all pairs; the accuracy table above |

`tb/fwbooth_ref_pkg.sv` holds the reference model. It is written
arithmetically, from each row's digit times A, not bit by bit like the RTL,
so the two are independent.
