# Carry-save multipliers without a final adder

A conventional carry-save array multiplier finishes with the low half of the
product in plain binary, but the high half is still split into a carry vector
and a sum vector. A carry-propagate adder has to merge them, and its delay
grows with n.

This design removes that adder. The array is rearranged so that the high half
leaves it **most significant digit first**. Each digit is still a carry-sum
pair, but it is ready early. A small conversion network takes each digit as it
arrives and settles, bit by bit, whether a carry from the lower digits will
reach each upper bit. The conversion runs alongside the array. When the last
digit appears, only two more gate levels are needed. The whole 2n-bit product
is therefore ready a constant time after the array, whatever n is.

The design comes in two versions:

* **Radix 2** (`csm_mult_r2`): a full-adder array. It produces the n+1 least
  significant bits directly and the n-1 most significant bits as carry-sum
  digits, which are converted on the fly.
* **Radix 4** (`csm_mult_r4`): the upper half is formed as n/2-1 redundant
  radix-4 digits and converted in radix 4.

`csm_top` puts both side by side on the same operands. Both handle two's
complement operands (`SIGNED = 1`, the default) or unsigned ones
(`SIGNED = 0`). All logic is combinational.

## Arithmetic

For two's complement operands, the array adds only positive bits. It uses the
Baugh-Wooley scheme in Blankenship's form, with m = n-1 as the index of the
sign bit:

* an elementary product `x[i]&y[j]` is used as it is when neither index is m;
* a product with exactly one sign bit is replaced by its complemented form:
  `~x[i]&y[m]` and `x[m]&~y[j]`;
* `x[m] + y[m]` is added at weight m, through a half adder;
* `x[m] | y[m]` is added at weight 2n-2 and again at weight 2n-1. This
  term also stands for `x[m]&y[m]`.

Modulo 2^(2n), the sum of these bits equals the two's complement product. For
unsigned operands, the plain products are used and the extra terms are left
out.

## Radix-2 array (`csm_r2_array`)

The adders form a triangle plus one diagonal. Here is the case n = 5, with
weights running from high (left) to low (right):

```
weight:      9   8   7   6   5   4   3   2   1   0
row 1                FA  FA  FA  FA  FA  FA  FA
row 2            D   D   FA  FA  FA  FA  FA
row 3                    D   FA  FA  FA
row 4                        D   FA
final bit                    z5  z4  z3  z2  z1  z0
```

**Triangle.** It holds (n-1)^2 full adders. Row r covers weights r to
2n-2-r, so each row loses one cell at each end. The cell at row r and
weight w adds three bits:

* the sum from the cell above it;
* the carry from the cell one weight lower in the row above;
* one new elementary product.

Row 1 starts from products only. Where a column has a bit to spare, its third
input is 0. Each low column w = 1 .. n-1 ends in a single bit, `z[w]`, after w
full-adder delays.

**Diagonal.** The `D` cells are n-1 full adders, one for each weight w = n to
2n-2. Each adds the three bits that the triangle leaves in column w. Carries
are *not* passed along the diagonal. Instead, the digit of weight 2^(2n-k) is
formed from two bits:

```
p_k = c_k + s_k,   s_k = sum of the diagonal adder at weight 2n-k,
                   c_k = carry of the diagonal adder at weight 2n-k-1
```

Three cases are special:

* p_1 pairs the OR term (weight 2n-1) with the carry of the weight-2n-2
  adder.
* The weight-2n-2 adder has only two live inputs: the OR term and one carry.
* The sum of the weight-n adder is the final bit `z[n]`.

The half adder for `x[m] + y[m]` is off the critical path. Its sum enters the
last cell of column n-1, and its carry enters row n-2 of column n.

**Timing**, in full-adder delays after the AND gates:

| output | ready after |
|---|---|
| p_1 | 2 |
| p_k | k+1 |
| p_(n-1) and z[0..n] | n |

Each product sits in the triangle in a fixed order. For the n = 5 layout,
this order matches the reference drawing cell by cell. For other n, the same
ordering rule is applied:

* in columns w >= n-1: the complemented `y[m]` product, then the plain
  products with rising x index, then the complemented `x[m]` product, then
  the half-adder bit;
* in lower columns: the plain products with falling x index.

Because all products exist at the same moment, this order affects wiring but
not delay.

Cost: (n-1)^2 + (n-1) full adders, 1 half adder, 1 OR gate and n^2 AND
gates. For n = 5 that is 20 full adders.

## On-the-fly conversion (`csm_otf_r2`, `csm_otf_d_r2`)

Let A_k = c_k XOR s_k be digit k taken modulo 2. The final bit m_k is either
A_k, or A_k+1 when a carry arrives from the lower digits. That carry depends
only on the digits below k, and those arrive one at a time, each one stage
after the previous.

So each output bit has a chain of decision cells, one per lower digit. The
chain starts at **u** (undecided), and each new digit p_i updates it:

| current | p_i = 0 | p_i = 1 | p_i = 2 |
|---|---|---|---|
| u | g | u | t |
| g | g | g | g |
| t | t | t | t |

* **g**: no carry can arrive; m_k = A_k.
* **t**: a carry arrives; m_k = A_k + 1 mod 2.

This is the carry-select rule, applied as the digits become available.

**Encoding.** The state is held in two wires, gamma and delta (`csm_pkg::dec_t`):

| state | gamma | delta |
|---|---|---|
| u | 0 | 0 |
| g | 1 | 0 |
| t | 0 | 1 |

One cell computes:

```
gamma' = ~delta & ~c & ~s | gamma
delta' = ~gamma &  c &  s | delta
```

At the end of the chain only delta matters: `m_k = c_k ^ s_k ^ delta_k`.
Result bit 2n-k is m_k.

The chains for bits 1 .. n-2 together use (n-1)(n-2)/2 cells. The lowest
digit, p_(n-1), needs no chain, because the low bits z[0..n] are final and
send no carry up. A carry out of p_1 is dropped, which keeps the result
modulo 2^(2n).

A chain step uses a digit as soon as that digit exists. As a result, only the
last decision cell and the final XOR lie after the last digit: n+2
full-adder delays in all. Bottom-row decision cells see digit p_(n-1) with a
fan-out of up to n-2. A real layout needs a buffer there.

## Radix-4 version (`csm_mult_r4`, `csm_r4_array`, `csm_otf_r4`)

**Digit format.** The n-2 most significant bits leave the array as n/2-1
radix-4 digits. Digit i has:

* two bits, c1[i] and s1[i], of weight 2^(2n-2i+1);
* one bit, c0[i], of weight 2^(2n-2i).

Its value p_i = 2(c1+s1)+c0 therefore lies in 0..5. The n+2 lower bits are
final.

**Digit formation.** The digits are formed by a diagonal of 2-bit full
adders (`csm_cla2`), one per digit, which pass no carries to each other. The
2-bit adder computes `2(alpha+beta) + gamma + delta + epsilon = 4mu + 2eta + xi`.
Adder i works as follows:

* **inputs:** bits of weight 2^(2n-2i) on alpha and beta, and bits of weight
  2^(2n-2i-1) on gamma and delta;
* **outputs:** mu becomes c1[i], eta becomes c0[i], and xi becomes s1[i+1];
* **last adder:** its xi is result bit n+1.

s1[1] is the XOR of the bits at weight 2^(2n-1). Carries beyond that weight
are discarded.

**Conversion.** The converter works as in radix 2, with a different digit
rule:

* m_k = (A_k + delta_k) mod 4, with A_k = {c1^s1, c0};
* the table entry for u becomes: p <= 2 gives g, p = 3 stays u, p >= 4
  gives t.

With maj = majority(c1, s1, c0), one decision cell computes:

```
gamma' = ~delta & ~maj(c1, s1, c0) | gamma
delta' = ~gamma & c1 & s1          | delta
```

The pair {z[2n-2k+1], z[2n-2k]} is m_k.

**Radix-4 array (`csm_r4_array`).** The elementary products are reduced by
n/2 rows of (5,3) counters (`csm_bpe`), as in the original radix-4 scheme:

* Row r has counters at weights 2r .. 2r+n. The counter at weight w adds
  two new products, x[w-2r]&y[2r] and x[w-2r-1]&y[2r+1]. It also adds three
  bits left by the row above: the sum bit from weight w, the middle bit from
  w-1 and the high bit from w-2.
* Row 0 has no row above. It takes the two sign inputs of the
  Baugh-Wooley scheme on its free inputs at weight n-1.
* Each row leaves one bit at weight 2r and two at weight 2r+1 that no later
  row takes. A ripple of half adders (even weights) and full adders (odd
  weights) turns them into z[0] .. z[n-1]. Every row adds two columns, so
  the ripple keeps pace with the rows.
* After the last row, weights n .. 2n-2 hold three bits each. One diagonal
  of full adders, with no carries between them, reduces them to two bits.
  At weight n the full adder's sum meets the ripple carry in a half adder,
  which gives z[n].
* The 2-bit adder diagonal then forms the digits. The last 2-bit adder takes
  the ripple carry on epsilon, and its xi is z[n+1].

Delay: n/2 counters, then one full adder and one 2-bit adder for the digits.
The low bits follow the rows through the ripple.

**Difference from the original radix-4 scheme.** The row arrangement, the
counters and both diagonals follow the original. The cell-by-cell wiring of
its drawing is not reproduced:

* In the original, the digits leave the array one after another, most
  significant first, and the conversion overlaps with the array. Here all
  digits leave after the last row, so the decision chains add their delay
  (up to n/2-2 decision cells) at the end.
* The original takes its low-edge cells (binary full adders and XOR gates)
  from earlier radix-4 arrays. The half-adder/full-adder ripple here is this
  design's own version.

## Files

| module | role |
|---|---|
| `csm_pkg` | decision-state type `dec_t` and constants `DEC_U`, `DEC_G`, `DEC_T` |
| `csm_top` | both multipliers on shared `x`, `y`; outputs `z_r2`, `z_r4` and the redundant digits (`p2_c`, `p2_s`, `p4_c1`, `p4_s1`, `p4_c0`) for observation |
| `csm_mult_r2` | radix-2 multiplier = `csm_r2_array` + `csm_otf_r2` |
| `csm_r2_array` | products, half adder, OR term, full-adder triangle and diagonal |
| `csm_fa`, `csm_ha` | full adder, half adder |
| `csm_otf_r2`, `csm_otf_d_r2` | radix-2 converter and its decision cell |
| `csm_mult_r4` | radix-4 multiplier = `csm_r4_array` + `csm_otf_r4` |
| `csm_r4_array` | products, (5,3)-counter rows, low-edge ripple, full-adder and 2-bit adder diagonals |
| `csm_bpe` | (5,3) counter: adds five bits of equal weight |
| `csm_cla2` | 2-bit full adder (two-level carry lookahead) |
| `csm_otf_r4`, `csm_otf_d_r4` | radix-4 converter and its decision cell |

**Parameters:**

* `N` is the operand width. It is 5 for the radix-2 modules and 8 for the
  radix-4 modules and the top.
* The radix-2 array needs N >= 3; the radix-4 array needs an even N >= 4.
  An elaboration-time assertion enforces both limits.
* `SIGNED` selects two's complement (1) or unsigned (0) operands.
* `ND` sizes a stand-alone converter: n-1 digits in radix 2, n/2-1 in
  radix 4.

Lint reports a few unused items, and they are expected:

* the gamma bit at the end of each chain;
* the `DEC_G` and `DEC_T` constants, which the testbenches use;
* in `csm_otf_r4`, the lowest digit is a direct copy of its inputs;
* in `csm_r4_array`, the high bit of the last row's top counter (weight 2n),
  which falls outside the 2n-bit result.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

* **Cells** (`tb_csm_fa`, `tb_csm_ha`, `tb_csm_bpe`, `tb_csm_cla2`, `tb_csm_otf_d_r2`,
  `tb_csm_otf_d_r4`): every input combination. The decision cells are
  checked against the u/g/t table.
* **Converters** (`tb_csm_otf_r2`, `tb_csm_otf_r4`): every digit combination
  at the default size. The output must equal the weighted sum of the digits
  modulo the word size.
* **Arrays** (`tb_csm_r2_array` at n = 5, `tb_csm_r4_array` at n = 8): all
  operand pairs, signed and unsigned. The low bits must equal the product's,
  and low bits plus weighted digits must equal the product.
* **Multipliers** (`tb_csm_mult_r2` at n = 5, `tb_csm_mult_r4` at n = 8): all
  operand pairs, signed and unsigned.
* **Top** (`tb_csm_top`, default parameters): all 65536 signed 8x8 pairs
  through both multipliers. It also counts, per digit, how often the digit
  generates, propagates or kills a carry, and how often the converter
  actually flips a bit or increments a digit. It fails if any of these never
  happens. All of them occur thousands of times.

* **Widths** (`tb_csm_widths`): both multipliers over all operand pairs at
  other widths, signed and unsigned: n = 3 .. 9 for radix 2 and n = 4 .. 10
  for radix 4.

To run a testbench with Verilator:

```
verilator --binary --timing -Irtl rtl/csm_pkg.sv tb/tb_csm_top.sv --top-module tb_csm_top
./obj_dir/Vtb_csm_top
```

The simulations are untimed: the testbenches check values, not delays. The
delays quoted above come from counting adder levels in the structure.

## Not included

* The exact cell layout of the original radix-4 array, which lets its digits
  leave one at a time, most significant first. See above.
* Pipeline registers, handshakes and reset. The multipliers are purely
  combinational, and so is the structure they are based on.
* Booth recoding or other higher-radix product generation. The elementary
  products are plain radix-2 AND terms.
