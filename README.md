# 16-bit complex multiplier built from Vedic (Urdhva Tiryakbhyam) multipliers

A complex product

    (A + jB)(C + jD) = (AC - BD) + j(AD + BC)

costs four real multiplications, one subtraction and one addition. In DSP
datapaths (FFT butterflies, filters, mixers) the four multipliers dominate
area, delay and power. This design builds each real multiplier with the
*Urdhva Tiryakbhyam* ("vertically and crosswise") rule of Vedic arithmetic.
That rule computes all partial products of a multiplication in parallel from
one small 2x2 cell, replicated recursively. The real and imaginary parts are
then formed with carry-save adders.

The whole circuit is combinational: four 16-bit operands go in, a 32-bit real
part and a 32-bit imaginary part come out, with no clock and no latency.

## Structure

```
complex_mul (N = 16)
├── vedic_mul  u_mul_ac ─┐
├── vedic_mul  u_mul_bd ─┴─> cs_subtractor u_sub_re ──> re, re_neg   (AC - BD)
├── vedic_mul  u_mul_ad ─┐
├── vedic_mul  u_mul_bc ─┴─> cs_adder      u_add_im ──> im, im_carry (AD + BC)
│
vedic_mul (N = 2/4/8/16) selects one of:
vedic_mul16 = 4 x vedic_mul8 + vedic_combine
vedic_mul8  = 4 x vedic_mul4 + vedic_combine
vedic_mul4  = 4 x vedic_mul2 + vedic_combine
vedic_mul2  = 4 AND gates + 2 half_adder
vedic_combine, cs_adder = csa_3to2 row + one carry-propagate adder
cs_subtractor = cs_adder with the subtrahend inverted and carry-in 1
```

All four multipliers work in parallel. The critical path is one 16x16 Vedic
multiplier followed by one carry-save add/subtract stage.

## The 2x2 cell (`vedic_mul2`)

With `a = {a1,a0}` and `b = {b1,b0}`, the rule works column by column:

| step | operation | result |
|------|-----------|--------|
| vertical (right) | `a0·b0` | `s0` |
| crosswise | `a1·b0 + a0·b1` (half adder) | `s1`, carry `c1` |
| vertical (left) | `a1·b1 + c1` (half adder) | `s2`, carry `c2` |

The product is `{c2, s2, s1, s0}`. The hardware is four AND gates and two
half adders.

## Building larger multipliers (`vedic_mul4/8/16`, `vedic_combine`)

An NxN block splits each operand into halves of H = N/2 bits,
`a = {ah, al}` and `b = {bh, bl}`. Four half-size Vedic blocks then compute,
at the same time:

- `q0 = al·bl` and `q3 = ah·bh` (vertical),
- `q1 = ah·bl` and `q2 = al·bh` (crosswise).

The product is `p = q0 + ((q1 + q2) << H) + (q3 << N)`.

The way `vedic_combine` adds the four products is the part of this design
that is hardest to see from the formula. `q0` occupies bits `[N-1:0]` and
`q3 << N` occupies bits `[2N-1:N]`. Because they never overlap, their sum is
just the concatenation `{q3, q0}`, and no adder is needed for it. That leaves
three 2N-bit operands: `{q3,q0}`, `q1 << H` and `q2 << H`. One 3:2
carry-save row (`csa_3to2`) turns them into a sum vector and a carry vector
with a single full-adder delay. One carry-propagate adder adds those two. The
exact product always fits in 2N bits, so the top carry of the carry-save row
is always zero and is left unused. Verilator's lint reports this as an unused
bit.

The hierarchy is written as explicit 4x4, 8x8 and 16x16 modules rather than
as one self-instantiating module. The wrapper `vedic_mul #(N)` picks the
right one for N = 2, 4, 8 or 16, so the complex multiplier can be built
narrower.

## Real and imaginary parts (`cs_subtractor`, `cs_adder`)

`cs_adder` compresses `x`, `y` and a carry-in (placed at bit 0) with one
carry-save row, then finishes with a carry-propagate adder. It produces
`{co, s} = x + y + ci`. The imaginary part uses it with `ci = 0`.

`cs_subtractor` is the same adder used as `x + ~y + 1`. Its carry out is 1
exactly when `x >= y`, so `neg = ~co` marks a negative difference.

## Number format

- The operands `a` (A), `b` (B), `c` (C) and `d` (D) are **unsigned** N-bit
  numbers, because the Vedic blocks are unsigned multipliers.
- `re` is `AC - BD` in 2N-bit two's complement, and `im` is `AD + BC` modulo
  2^(2N). These are the 32-bit R and I outputs of the original 16-bit design.
  They are exact as long as the true results fit: `|AC - BD| < 2^31` and
  `AD + BC < 2^32`. This holds, for example, for any operands below 2^15.
- With full-range 16-bit operands, the results need 33 bits. The two flag
  outputs provide that extra bit: `{re_neg, re}` is the exact 33-bit signed
  real part, and `{im_carry, im}` the exact 33-bit unsigned imaginary part.

Reference operand sets and their results, all checked by the testbench:

| A | B | C | D | re (signed) | im |
|---|---|---|---|---|---|
| 21908 | 23022 | 23093 | 23093 | -25725602 | 1037568490 |
| 32618 | 2773 | 27221 | 6821 | 868979945 | 297971211 |
| 27306 | 24330 | 28181 | 31395 | 5670036 | 1542915600 |

## What follows the original design and what is added

These parts follow the original design:

- the 2x2 gate-level cell;
- the construction of each block from four half-size blocks up to 16x16;
- four multipliers feeding one subtractor (real part) and one adder
  (imaginary part);
- add and subtract with carry-save adders;
- 16-bit operands and 32-bit results.

These are choices of this design, because the original leaves them open:

- how the four sub-products of each level are summed (one carry-save row,
  then one carry-propagate adder);
- unsigned operands;
- purely combinational timing, with no pipeline registers, clock or reset;
- the `re_neg` and `im_carry` flags, and the carry-in and carry-out of
  `cs_adder`;
- the carry-propagate adders, which are written as `+` and left to synthesis.

The original work also built a Booth-recoded complex multiplier, but only as
a baseline to compare against. It is not part of this RTL. The original
FPGA implementation reports 2501 slices, a maximum delay of 29.347 ns and
144.33 mW. These figures depend on the device and the tool, and this RTL
has not been checked against them.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops through a watchdog if it hangs.

| testbench | what it checks |
|---|---|
| `tb_vedic_mul2` | all 16 operand pairs |
| `tb_vedic_mul4`, `tb_vedic_mul8` | every operand pair (256 and 65,536) |
| `tb_vedic_mul16` | corner cases, walking ones, 50,000 random pairs |
| `tb_cs_adder`, `tb_cs_subtractor` | 32-bit corner cases and 20,000 random operands; carry-out and negative cases must occur |
| `tb_complex_mul` | default 16-bit top: the three reference sets, corner cases, 20,000 random operand sets against 64-bit integer arithmetic; counts negative real parts, non-negative real parts and imaginary carry-outs, and fails if any never happens |
| `tb_complex_mul_sizes` | the top at N = 2 and N = 4 for every input, and at N = 8 with 20,000 random inputs |

Each testbench was also run against a copy of its module with one
deliberate error, such as a swapped operand half, a dropped carry or an
inverted flag. Each one failed.

## Simulating

The design needs no clock. With Verilator 5, for example:

```
verilator --binary --timing -y rtl -y tb +libext+.sv -Irtl \
          --top-module tb_complex_mul tb/tb_complex_mul.sv
./obj_dir/Vtb_complex_mul
```

To run another test, replace `tb_complex_mul` with the name of a different
testbench. `verilator --lint-only -Wall -y rtl +libext+.sv --top-module
complex_mul rtl/complex_mul.sv` lints the design. To change the operand
width, set `complex_mul #(.N(8))` to 2, 4, 8 or 16. Any other width needs an
extra `vedic_mulN` level, written the same way as `vedic_mul16`.
