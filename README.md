# Signed-digit floating-point adder

A combinational IEEE-754 single-precision adder/subtractor whose significand
arithmetic is done in radix-2 signed-digit (SD) numbers instead of two's
complement.

A conventional floating-point adder loses time in two places:

* **The operand swap.** It must know which operand has the larger magnitude so
  that it always subtracts the smaller one. When the exponents are equal, that
  takes a full-width comparison of the significands.
* **The carry chain** of the significand adder.

This design avoids both. It shifts the smaller-exponent significand right, as
usual. Each aligned magnitude then becomes an SD number carrying its operand's
sign, with every digit in {-1, 0, +1}. Two such numbers can be added in either
order, so there is no swap. A carry never travels more than one digit, so the
addition takes constant time. The SD sum then goes down two paths side by side:

* conversion back to binary, which holds the only carry chain left;
* computing the normalization shift count straight from the SD digits.

```
 in1 in2 sub
    |  |
 [unpack]--signs--------------------------------+--------------[judge_sign]--+
    |  \--exponents--[judge_size]--e_big--------|------------------+          |
    |                 |sh1   |sh2               |                  |          |
 m1 [r_shifter]  m2 [r_shifter]                 |                  |          |
    [rs_generator]   [rs_generator]   (adds R,S)|                  |          |
          \             /                       |                  |          |
           [  sd_coder  ] <--------signs--------+                  |          |
                 |  x, y (26 digits each)                          |          |
           [  sd_adder  ]  row of 26 sdfa cells                    |          |
                 |  z (27 digits)                                  |          |
        +--------+---------+                                       |          |
 [sd_decoder]         [shift_amount]                               |          |
  |mag  |neg------------------------------------------------------|--------->+
  |                     | t                                        |          |
 [        lshift_round         ]--sh, rnd_ovf--------------->[exp_adder]      |
                 | frac                                            | e_res    |
                 +-------------------->[ pack ]<-------------------+<---------+
                                          |
                                         out
```

Everything is combinational. There is no clock or reset: `out` follows `in1`,
`in2` and `sub`.

## What it computes

Operands and result are `{sign, exponent[EXP_W-1:0], fraction[FRAC_W-1:0]}`
with bias 2^(EXP_W-1)-1 and a hidden leading 1. The defaults `EXP_W = 8` and
`FRAC_W = 23` give IEEE single precision. `sub = 1` computes `in1 - in2` by
inverting the sign of `in2`.

The arithmetic is exact up to the two guard digits:

1. The operand with the smaller exponent is shifted right by the exponent
   difference.
2. Only two digits are kept below its significand: **R**, the first bit shifted
   out, and **S**, the OR of all the others (the sticky bit).
3. The two signed values are added exactly.
4. The sum is normalized and rounded **to nearest, with a tie rounded away from
   zero**. The one bit below the result's last place decides.

Special cases are handled as follows:

| Input or result | What this design does |
|---|---|
| Exponent field 0 | The operand is zero. Denormals are flushed to zero. |
| Exponent field 255 | Treated as an ordinary exponent. Infinity and NaN operands are **not** supported. |
| Exponent overflow | The result is signed infinity. |
| Exponent underflow (exponent ≤ 0) | The result is signed zero. No denormals are produced. |
| Exact zero from operands of different sign | +0 |
| -0 + -0 | -0 |

**This is not a bit-exact IEEE round-to-nearest-even adder.** It differs in two
cases:

* **Ties** round up in magnitude instead of to even.
* **Sticky bit after a left shift.** In a subtraction with an exponent
  difference of 3 or more, the sum may need a one-place left shift. The S digit
  then becomes the rounding bit, and it stands for "something below R"
  rather than an exact half.

The end-to-end test measures both effects alongside its pass/fail checks. Its
stimulus leans towards small exponent differences, so ties are common. Of
200,000 random sums:

* 11,429 (5.7 %) differ from exact round-to-nearest-even;
* 279 (0.14 %) still differ when exact rounding also sends ties away from
  zero. These are the lost-sticky cases.

Every difference is one unit in the last place.

Widening the guard field to three digits (G, R, S) and adding a ties-to-even
test in `lshift_round` would make it exact. The end-to-end testbench checks
against a reference model with exactly the rounding described above.

## Signed digits on wires

Each digit uses two wires, `[sign, abs]`:

| Code | Digit value |
|---|---|
| `00` | 0 |
| `01` | +1 |
| `11` | -1 |

The code `10` is never produced, and any block that reads it treats it as 0.
A p-digit number is a 2p-bit vector, with digit i in bits `[2i+1:2i]`. For
example, (1, 0, 0, -1) is `01 00 00 11`.

The code makes the **SD coder** (`sd_coder`) trivial. Bit b of a magnitude with
sign s becomes the digit `{s & b, b}`, which costs one AND gate per digit.

## The carry-free adder (`sdfa`, `sd_adder`)

This is the heart of the design. Adding digits x_i + y_i gives a value in
-2..2, which must be split into a carry c_i and an intermediate digit w_i with
2·c_i + w_i = x_i + y_i. The final digit is z_i = w_i + c_{i-1}. For z_i to
stay in {-1, 0, 1} without a second carry, w_i and c_{i-1} must never have the
same sign.

Each cell looks at the neighbouring pair below it to arrange this (ADD1):

| x_i + y_i | Condition on x_{i-1} + y_{i-1} | w_i | c_i |
|---|---|---|---|
| ±2 | any | 0 | ±1 |
| 0 | any | 0 | 0 |
| +1 | > 0 (the carry from below will be 0 or +1) | -1 | +1 |
| +1 | ≤ 0 (the carry from below will be 0 or -1) | +1 | 0 |
| -1 | < 0 | +1 | -1 |
| -1 | ≥ 0 | -1 | 0 |

ADD2 then adds c_{i-1}.

The carry out of a pair always has the sign of that pair's sum, or is 0. So the
choice in ADD1 always leaves room for the incoming carry, whatever it turns out
to be. Every sum digit depends on only three digit positions, so the adder's
delay does not depend on its width.

The 26-digit operands are:

* 24 significand bits,
* R and S.

They give a 27-digit sum. The top digit z_26 is the last carry.

## Back to binary and normalizing

**SD to binary (`sd_decoder`).** Split the sum into a vector P of the +1 digits
and a vector M of the -1 digits, so that the value is P - M. The decoder forms
P + ~M = value - 1 once, then:

* if that is negative, its bitwise complement is exactly |value|;
* otherwise the magnitude is P + ~M + 1.

This compound-adder form gives sign and magnitude from one carry-propagate
addition, with no second negation. An exact zero reports `neg = 0`.

**Shift count from the digits (`shift_amount`).** This block scans the SD sum
from the top. It counts:

* the zero digits above the leading nonzero digit d;
* then each directly following digit equal to -d, because (d, -d) has the same
  value as (0, d).

The scan stops at the first digit that is neither. The count is then either the
number of leading zeros of |value|, or one less. It is one less when the scan
stops on zeros that are followed by a digit of sign -d, because the value then
lies just below the anticipated power of two. `lshift_round` removes this
error: after shifting, if the top bit is still 0, it shifts one more place.

**Frame and rounding (`lshift_round`).** The magnitude is kept with two integer
bits, weights 2 and 1, because a same-sign sum can reach 2 or more. The total
left shift `sh` is therefore 0 when the sum carried into the weight-2 bit and 1
for an already-normalized sum. After the shift:

* the FRAC_W bits below the leading 1 are the fraction;
* the next bit rounds it.

If rounding carries into a new integer bit (1.11…1 + 1 ulp), `rnd_ovf` is set
and the fraction becomes 0.

**Exponent and sign.** `exp_adder` computes
e_res = e_big + 1 - sh + rnd_ovf, where e_big is the larger input exponent.
`pack` saturates it: e_res ≥ 255 gives infinity and e_res ≤ 0 gives zero.
`judge_sign` gives the common sign when both operand signs are equal, and
otherwise the sign of the SD sum. The sign needs no comparison because the
operands were never swapped.

## Worked example (8-bit fraction)

With `FRAC_W = 8`, the sum 2^3 × 1.01000001 + (−2^1 × 1.11000111) goes through
the datapath as follows:

| Stage | Value |
|---|---|
| Aligned A | 1.01000001, R=0, S=0 |
| Aligned B (shifted right by 2) | 0.01110001, R=1, S=1 |
| SD sum, as binary magnitude | 00.11001111 01 (positive) |
| Shift count | t = 1 anticipated, corrected to sh = 2. This is one place in the usual 1.f frame. |
| Normalized | 1.10011110 \| 1. The tie rounds up. |
| Result | 2^2 × 1.10011111 |

`tb/tb_worked_example.sv` checks every row of this table.

## Files

| File | Block |
|---|---|
| `rtl/sdfp_pkg.sv` | Digit type, the codes above, and digit encode/decode functions |
| `rtl/unpack.sv` | Splits the fields, restores the hidden 1, flushes zero-exponent operands, applies `sub` |
| `rtl/judge_size.sv` | Exponent difference, one right-shift amount per operand (clamped at 26), larger exponent |
| `rtl/r_shifter.sv` | Alignment barrel shifter that keeps all shifted-out bits |
| `rtl/rs_generator.sv` | Aligned significand plus R and S |
| `rtl/sd_coder.sv` | Attaches the signs and produces SD operands |
| `rtl/sdfa.sv` | One SD adder cell (ADD1, ADD2) |
| `rtl/sd_adder.sv` | Row of `sdfa` cells |
| `rtl/sd_decoder.sv` | SD to sign and magnitude |
| `rtl/shift_amount.sv` | Leading-one anticipation from the SD digits |
| `rtl/judge_sign.sv` | Result sign |
| `rtl/lshift_round.sv` | Normalization shift, one-place correction, rounding |
| `rtl/exp_adder.sv` | Result exponent |
| `rtl/pack.sv` | Result word, with infinity on overflow and zero on underflow |
| `rtl/sd_fp_adder.sv` | Top level |

## Parameters

The top-level parameters are `EXP_W` (default 8) and `FRAC_W` (default 23). All
internal widths follow from them:

* significand: FRAC_W+1 bits;
* SD operands: FRAC_W+3 digits;
* SD sum: FRAC_W+4 digits.

The datapath has no width limit of its own. The end-to-end testbench is
written for single precision: its corner cases are 32-bit constants, and its
reference model works in 64-bit integers with the alignment shift capped at
40. To test double precision (`EXP_W = 11`, `FRAC_W = 52`), change those
constants and raise the cap to at least FRAC_W+3. The 64-bit integers are
still wide enough at that size. `tb_worked_example` already runs the
design at an 8-bit fraction.

## Verification

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each compares
the block against values computed independently with integer arithmetic. The
checks are:

* exhaustive for `sdfa` (every digit combination with every carry the cell
  below can produce), `judge_size`, `judge_sign` and `exp_adder`;
* random with edge cases for the others.

Each ends by printing `TB_RESULT checks=N failures=M`.

`tb_sd_fp_adder` runs the full single-precision adder at its default
parameters. It applies hand-written corner cases, then 200,000 random operand
pairs whose exponent differences lean towards small values, and compares every
result with a reference model. It also counts each datapath event through
hierarchical references, and fails if any of them never occurred:

* a same-sign carry into the weight-2 bit;
* a negative SD sum;
* equal exponents with the first operand smaller;
* the one-place shift correction;
* a deep cancellation;
* a rounding carry;
* an operand lying entirely in S;
* overflow;
* underflow;
* an exact zero;
* subtraction.

To run one testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb rtl/sdfp_pkg.sv tb/tb_sd_fp_adder.sv \
          --top-module tb_sd_fp_adder -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. The full-adder test takes under a
second of simulation.

## Design choices

These follow the usual practice for such adders rather than a given
specification:

* the treatment of zero, denormal, infinity and NaN encodings, and the overflow
  and underflow handling;
* the `sub` input;
* the clamp of the alignment shift at FRAC_W+3;
* making the SD-to-binary conversion exact with the compound-adder form;
* the one-place correction after the anticipated shift.

These are part of the signed-digit method itself:

* the two-wire digit code;
* the ADD1/ADD2 rule;
* the R/S guard digits;
* the result sign taken from the SD sum;
* the shift count taken from the SD digits.
