# Normalizing borrow-save numbers with a one-bit correction tree

After a floating-point subtraction the significand has to be shifted left
until its leading one reaches the top bit. When the difference is still held
in a redundant form (borrow-save: every digit is -1, 0 or +1), the leading
non-zero digit is not the leading one of the value. For example `1 -1 -1 -1`
is `8-4-2-1 = 1`. Converting to binary first and then counting zeros puts
three logarithmic-delay steps in series.

This RTL takes the faster route. The digits are recoded in constant time
into a bit string `w` whose leading one is either exactly at the leading one
of `|value|` or **one position too high**. Three units then work on the same
input at once:

* a leading-zero tree counts the zeros of `w`;
* a second tree, the *correction tree*, decides whether that count is one
  short, and also yields the sign and a zero flag;
* a subtractor converts the digits to binary sign-magnitude.

A coarse shift by the count, then an optional one-position shift, leaves the
magnitude normalized. The correction tree is a single binary tree of small
nodes. Each node maps 2 × 3 bits to 3 bits, so 54 digits need 6 levels.

```
 dp,dn ──┬─► bs_recoder ──w──► lza_tree ──lza_cnt──┐
         │        └──sym──► corr_tree ──corr, sign, zero
         │                                  │       │
         └─► bs_converter ──mag──────► norm_shifter ──► norm, shamt
```

## Digits and recoding (`bs_recoder`)

Digit `i` is `dp[i] - dn[i]`, so `00` and `11` both mean 0. Each position
sees digits `i+1`, `i` and `i-1`. A zero digit is assumed above the top
digit and below the bottom one. From these digits, with `e`/`p`/`m` meaning
"digit is 0 / +1 / -1", it forms four mutually exclusive patterns:

| pattern | condition (digits i+1, i, i-1)            | meaning                          |
|---------|-------------------------------------------|----------------------------------|
| `u`     | `(e p + ~e m) · e`  e.g. `0 1 0`, `1 -1 0` | isolated positive unit           |
| `s`     | `(e p + ~e m) · p`                         | positive, followed by a +1       |
| `v`     | `(e m + ~e p) · e`                         | isolated negative unit           |
| `t`     | `(e m + ~e p) · m`                         | negative, followed by a -1       |
| `z`     | none of the above                          | nothing significant here         |

The head term `e p + ~e m` covers the cases where a 1 starts the number
and where a `1 -1` pair collapses into a single 1 one position lower. Then
`w = u|s|v|t`. Each position also gets a 3-bit symbol `{a,b,c}`:

| symbol | s   | u   | x   | z   | y   | v   | t   |
|--------|-----|-----|-----|-----|-----|-----|-----|
| abc    | 001 | 010 | 011 | 100 | 101 | 110 | 111 |

`x` and `y` never come out of the recoder. They are the tree's results for
"positive, correction needed" and "negative, correction needed". The code is
chosen so that `a` is the sign, `b|c` means "not zero" and `(a^b)&c` picks
out `x` and `y`.

## Why the count can be one short, and the correction tree (`corr_tree`)

The count from `w` is one short in just one case. An isolated unit is
followed, after one or more `z`, by something of the opposite sign.
Take `0 1 0 -1 1 0`, which is 16 − 4 + 2 = 14 = `001110`. It recodes to
`z u z z v z`, so `w` = `010010` and the count is 1, but the true count
is 2. The strings that need a correction are

```
X = z* u z+ (v|t) ...      positive
Y = z* v z+ (u|s) ...      negative
```

The tree classifies every sub-string as one of the seven symbols above.
`Z` means all `z`, `U`/`V` a lone unit among zeros, `S`/`T` a settled sign
with no correction, and `X`/`Y` a correction. The class of a
concatenation follows from the class of its two halves:

| left half          | right half       | result                |
|--------------------|------------------|-----------------------|
| `Z`                | any              | right half            |
| `S`, `T`, `X`, `Y` | any              | left half             |
| `U` or `V`         | `Z`              | left half             |
| `U` or `V`         | anything else    | `{a_left, a_right, 1}`|

The last row gives `U`+positive → `S`, `U`+negative → `X`,
`V`+negative → `T` and `V`+positive → `Y`. The node is two 2:1 selectors in
series (`rbr_pkg::corr_node`). At the root:

```
corr = (a ^ b) & c      sign = a      zero = ~(b | c)
```

Strings whose length is not a power of two are padded with `z` at the least
significant end, which no node notices.

## Leading-zero count and shift (`lza_tree`, `norm_shifter`, `bs_converter`)

`lza_tree` is the standard divide-and-conquer counter. A node gets
`(l, z_l)` from its upper half and `(r, z_r)` from its lower half, where `z`
means "has a one". It returns `t = z_l ? {0,l} : {1,r}` and `z = z_l | z_r`,
so the count grows by one bit per level. `bs_converter` forms `dp - dn` and
negates it when negative. `norm_shifter` shifts the magnitude left by
`lza_cnt`, then by one more place if `corr` is set, and reports
`shamt = lza_cnt + corr`. Only a left correction is ever needed, because the
count is never too large.

## Top level `rbr_normalizer`

| port       | dir | width       | meaning                                           |
|------------|-----|-------------|---------------------------------------------------|
| `dp`, `dn` | in  | N           | borrow-save digits, bit N-1 most significant      |
| `lza_cnt`  | out | clog2(N)    | count of leading zeros of `w`                     |
| `corr`     | out | 1           | the count is one short                            |
| `shamt`    | out | clog2(N)+1  | full normalization shift                          |
| `sign`     | out | 1           | value is negative (from the correction tree)      |
| `conv_neg` | out | 1           | value is negative (from the converter)            |
| `zero`     | out | 1           | value is zero; `norm`, `shamt`, `sign` are then meaningless |
| `norm`     | out | N           | normalized magnitude, leading one in bit N-1      |

`N` defaults to 54. Everything is combinational, with no clock and no
reset. The correction is needed only by the last one-place shift, so its tree
may finish after the counting tree. An immediate assertion checks that the
two trees agree on whether the value is zero.

## How far it can be trusted

The two end-to-end tests compare against integer arithmetic on the input
value, not against the RTL's own equations, so they would catch a wrong node
rule or a wrong recoding term.

* `tb_rbr_normalizer` runs the full 54-digit design on 30,000 digit strings.
  Most are built to cancel, like `1 -1 -1 ... tail` or `1 0..0 -1 tail`. It
  checks zero, both signs, `lza_cnt + corr`, `shamt` and `norm`. It counts
  positive and negative results with and without a correction, plus zero,
  and fails if any of these never occurs (each occurs more than 5,000 times).
* `tb_rbr_normalizer_exh` runs every one of the 4^8 bit patterns at N = 8.
  Both codes for a zero digit are included. About 20,000 patterns need a
  correction.
* Block tests:
  * recoder: exhaustive at N = 6, against the unexpanded sum-of-products
    form, and checks the "same or one position too high" property of `w`;
  * correction tree: random symbol strings against a left-to-right scan;
  * counting tree, converter and shifter: random values at 54 bits.

Parts that are this design's own choice, not fixed by the published scheme:

* **Node rule table.** The table above was derived from the grammar of the
  `X`/`Y` strings. Its only support is the exhaustive and random tests
  against the arithmetic value.
* **`Y` definition.** `Y` is taken as `v z+ (u|s)`, the mirror image of `X`.
* **Converter and shifter.** The converter is written as a plain
  subtraction, with the adder architecture left to synthesis. The shifter is
  a plain barrel shift.
* **Normalized value.** The non-redundant magnitude is normalized. Shifting
  the redundant digits instead would also be possible.
* **Inputs and the correction tree.** Carry-save input is not handled: it
  would first need a conversion to borrow-save. Circuit-level options are
  not modelled, such as building the node selectors from pass transistors.

## Simulating and changing it

All files are in `rtl/` (the package `rbr_pkg.sv` first) and `tb/`. For
example:

```
verilator --binary --timing --assert -Irtl rtl/rbr_pkg.sv rtl/rbr_normalizer.sv \
    tb/tb_rbr_normalizer.sv --top-module tb_rbr_normalizer
./obj_dir/Vtb_rbr_normalizer
```

Each testbench prints `TB_RESULT checks=<n> failures=<m>`. The full-size test
takes a few seconds. To change the width, set `N` on `rbr_normalizer`. The
trees round up to the next power of two internally, so any `N >= 2` is accepted (N = 8 and N = 54 are the sizes tested end to end).
The testbenches at 54 bits build their reference values in 64-bit integers,
so they need `N <= 62`. To try another node rule, edit `corr_node` in
`rbr_pkg.sv`; the exhaustive N = 8 test will show at once whether it still
gives correct shifts.
