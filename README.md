# IEEE-754 floating point adder, multiplier and their building blocks

A floating point sum or product is an integer operation on the significands
wrapped in exponent bookkeeping: line the operands up, add or multiply,
bring the result back to the form `1.xxx × 2^e`, and round it to the
available precision. This RTL implements that recipe for IEEE-754 binary
formats (single precision by default, double precision by parameter) as a
combinational adder/subtractor and a combinational multiplier, both rounding
to nearest even. Next to them are the smaller circuits such units are built
from or that speed them up: barrel shifters, a guard/round/sticky alignment
shifter, a normalization shifter, a rounding step, and a compound adder that
produces `Sum` and `Sum+1` at once so that rounding becomes a selection.

All of it is plain synthesizable SystemVerilog with no clock: every output
follows its inputs combinationally.

## Number format and conventions

| | single | double |
|---|---|---|
| width | 32 | 64 |
| exponent field `EXP_W` | 8 | 11 |
| stored fraction `FRAC_W` | 23 | 52 |
| precision p (fraction + hidden one) | 24 | 53 |
| bias | 127 | 1023 |

A word is `{sign, biased exponent, fraction}`. Exponent all ones with a zero
fraction is infinity, with a nonzero fraction NaN.

Choices made here where IEEE-754 allows options or where a simple unit
usually simplifies:

* **Subnormals are flushed.** An operand with exponent field 0 is read as a
  (signed) zero, whatever its fraction. A result whose exponent, after
  rounding, would be 0 or less becomes a signed zero with `underflow` and
  `inexact` set.
* **Overflow gives infinity** (not the largest finite number), with
  `overflow` and `inexact`.
* **NaN results are canonical**: `0 11..1 10..0` (`0x7FC00000` in single
  precision). `invalid` is raised for `inf - inf` and `0 × inf`; NaN
  operands propagate without raising it (signalling and quiet NaNs are not
  told apart).
* **Exact zero sums are +0**, except that `(+0) + (+0)` and `(-0) + (-0)`
  keep their sign.
* Flags are `fp_pkg::fp_flags_t = {invalid, overflow, underflow, inexact}`.
  Division by zero cannot occur in these units and has no flag.

## The adder (`fp_add`)

Ports: `a`, `b`, `sub` (1 computes `a - b` by flipping b's sign) → `y`,
`flags`. The datapath, for p-bit significands:

1. **Order by magnitude.** The operands are compared as unsigned
   `{exponent, fraction}` words (zeros as 0). The larger one supplies the
   tentative exponent and the result sign; `d = e_large - e_small`. Comparing
   the whole magnitude, not only the exponents, means the later subtraction
   is always `large - small` and never needs a complement step.
2. **Align (`align_shift_grs`).** The smaller significand is shifted right
   by `d`. Two extra bits keep the first two bits shifted out (guard G and
   round R), and a third bit, the sticky S, is the OR of everything shifted
   out beyond R. The aligned operand is therefore p+3 bits. Shift amounts
   above p+2 give the same G/R/S as p+2, so the amount is clamped there.
3. **Add or subtract** `{M_large, 000}` and the aligned `{M_small, G, R, S}`
   in a p+3 bit adder with a carry-out bit. It is an effective subtraction
   when the signs (after `sub`) differ.
4. **Normalize.** A carry out (only on addition) shifts the sum right by one.
   The bit that falls off is ORed into the sticky bit, and the exponent goes
   up by one. Otherwise `norm_shifter` counts the leading zeros, shifts them
   out, and the count is taken off the exponent. A zero sum stops here as an
   exact zero.
5. **Round (`round_rne`).** In the normalized p+3 bit word, the p-th bit is
   M0 (the result LSB), the next bit is R″ and the OR of the last two is S″.
   One is added at M0 when `R″ & (M0 | S″)`. If all p bits were ones the
   increment carries out. The result is then `1.000…0`, one exponent step
   higher.
6. **Exceptions** are judged on the exponent after rounding: `>= 2^EXP_W - 1`
   overflows, `<= 0` underflows.

Why three extra bits are enough: when `d >= 2` the difference loses at most
one leading bit. So at most G moves into the result and R becomes the
rounding bit, while S still says whether anything lies below. When `d <= 1`
nothing beyond G was shifted out, so the subtraction is exact however many
leading zeros it produces. Treating a set S as a 1 at its own position during
subtraction gives the correct rounding direction in every case. The
testbenches check this against exact arithmetic.

## The multiplier (`fp_mul`)

Ports: `a`, `b` → `y`, `flags`.

1. Tentative exponent `e_a + e_b - bias`. It is held two bits wider than the
   field, so it can go negative or past the top without wrapping.
2. Sign `s_a XOR s_b`.
3. The p-bit significands, hidden ones included, are multiplied into a
   2p-bit product in `[1, 4)`. The RTL uses the `*` operator; the multiplier
   structure is left to synthesis.
4. If the product's MSB is set (product ≥ 2) the product is shifted right by
   one and the exponent incremented. The p bits from the leading one down are
   the significand, the next bit is R, the OR of all lower bits is S.
5. Round to nearest even and re-normalize on carry-out exactly as in the
   adder, then check overflow and underflow on the final exponent.

For example, `0x408051EB × 0x40566666` (≈ 4.0100 × 3.3500) gives
`0x4156EF9C`, and `0x40066666²` (2.1²) gives `0x408D1EB7`.

## Round to nearest even (`round_rne`)

Inputs: the p-bit significand whose LSB is M0, the round bit R and the sticky
bit S. The rule `R & (M0 | S)` rounds up above the halfway point, never below
it, and exactly at halfway only when M0 is odd. With two bits after the
point:

| value | result | value | result |
|---|---|---|---|
| X0.00 | X0 | X1.00 | X1 |
| X0.01 | X0 | X1.01 | X1 |
| X0.10 | X0 (tie, stays even) | X1.10 | X1 + 1 (tie, goes to even) |
| X0.11 | X0 + 1 | X1.11 | X1 + 1 |

`cout` reports a carry out of the MSB, and `inexact` is `R | S`.

## Shifters

* **`barrel_rshift`**: right shift by any amount in one level of logic,
  one W:1 multiplexer per output bit, zero fill. Amounts ≥ W clear the word.
  The alignment shifter is built on it.
* **`align_shift_grs`**: the adder's alignment shifter with G/R/S
  generation. It places the significand at the top of a 2p+2 bit field, shifts
  it with `barrel_rshift`, takes G and R from just below the significand
  field, and ORs the low p bits into S.
* **`norm_shifter`**: a priority encoder for the leading zero count and a
  logarithmic left shifter (one 2:1 multiplexer stage per count bit). It
  also outputs a zero flag.
* **`barrel_rotate`**: a 4-bit shift-and-rotate shifter. `sel` = S1 S0 moves
  the word toward the MSB by 0–3 places. With `rot = 1` the bits wrap
  around:

  | S1 S0 | Y3 Y2 Y1 Y0 |
  |---|---|
  | 00 | D3 D2 D1 D0 |
  | 01 | D2 D1 D0 D3 |
  | 10 | D1 D0 D3 D2 |
  | 11 | D0 D3 D2 D1 |

  With `rot = 0` the vacated low bits are zeros (a logical left shift).
* **`barrel_dist`**: an 8-bit distributed (logarithmic) shifter. There are
  three stages of 2:1 multiplexers, shifting right by 1, 2 and 4. A
  multiplexer input that would come from beyond bit 7 takes the `fill`
  input, so the shifter can fill with zeros or with ones.

## Compound adder and rounding by selection

`compound_adder` returns `Sum = A + B'` and `Sum+1 = A + B' + 1` from one
carry-propagate structure, with `B' = B` or, when `sub = 1`, `B' = ~B`. In
subtract mode the two outputs and their complements cover every candidate:

| output | value |
|---|---|
| `sum1` = A + ~B + 1 | A − B |
| `sum` = A + ~B | A − B − 1 |
| `~sum1` | B − A − 1 |
| `~sum` | B − A |

It is a *flagged prefix* adder. A Kogge-Stone tree over the bit generates
`g = a & b'` and propagates `p = a ^ b'` gives, for each bit i, the carry
into it, `G[i-1:0]`, and the group propagate `P[i-1:0]`.
`sum[i] = p[i] ^ G[i-1:0]`. Adding one to `sum` flips its trailing ones and
the zero above them. The low i bits of `sum` are all ones exactly when the
low i propagates are all ones, so `flag[i] = P[i-1:0]` (with `flag[0] = 1`)
and `sum1 = sum ^ flag`. The extra cost over a plain prefix adder is one
XOR per bit.

`round_select` then picks `Sum` or `Sum+1` from the rounding mode
(`fp_pkg::round_mode_t`), the result sign and the g, r, s bits below the
LSB:

| mode | Sum+1 when |
|---|---|
| nearest even | `g & (LSB | r | s)` |
| toward zero | never |
| toward +∞ | sign positive and `g | r | s` |
| toward −∞ | sign negative and `g | r | s` |

It also passes on the carry out of the chosen word (`cout`) and reports the
choice (`inc`). A full adder built this way also needs a `Sum+2` candidate
when the sum carries out and the rounding position moves up one bit. That
selection is not part of this block.

## Top level (`fp_top`)

`fp_top` places the units side by side, each with its own ports:

| prefix | unit |
|---|---|
| `add_*` | `fp_add` (`add_a`, `add_b`, `add_sub` → `add_y`, `add_flags`) |
| `mul_*` | `fp_mul` (`mul_a`, `mul_b` → `mul_y`, `mul_flags`) |
| `rot_*` | `barrel_rotate` (`rot_d`, `rot_sel`, `rot_en` → `rot_y`) |
| `dist_*` | `barrel_dist` (`dist_d`, `dist_sh`, `dist_fill` → `dist_y`) |
| `ca_*` | `compound_adder` + `round_select` (`ca_a`, `ca_b`, `ca_sub`, `ca_mode`, `ca_sign`, `ca_grs` = {g, r, s} → `ca_y`, `ca_cout`, `ca_inc`) |

Parameters: `EXP_W` (8), `FRAC_W` (23), `ROT_W` (4), `DIST_W` (8) and `CA_W`
(`FRAC_W + 1`). The adder's own alignment and normalization shifters are
internal instances. The stand-alone shifters and the compound adder are not
wired into it.

## Scope

The units are the simple, single-path forms. Faster organisations are
outside this RTL:

* multipliers with two data paths;
* pipelined versions of the adder and multiplier;
* the triple-path adder, with separate bypass, near and far paths;
* leading zero anticipation;
* leading one prediction with position correction;
* the close/far-path rounding selection that uses `Sum+2`.

Only round to nearest even is built into `fp_add` and `fp_mul`. The other
three modes exist only in `round_select`.

## Files

* `rtl/fp_pkg.sv`: format constants, `round_mode_t`, `fp_flags_t`.
* `rtl/fp_add.sv`, `rtl/fp_mul.sv`: the floating point units.
* `rtl/align_shift_grs.sv`, `rtl/norm_shifter.sv`, `rtl/round_rne.sv`,
  `rtl/barrel_rshift.sv`: adder and multiplier parts.
* `rtl/barrel_rotate.sv`, `rtl/barrel_dist.sv`: stand-alone shifters.
* `rtl/compound_adder.sv`, `rtl/round_select.sv`: compound adder and
  rounding selection.
* `rtl/fp_top.sv`: top level.
* `tb/<module>_tb.sv`: one self-checking testbench per module.
* `tb/fp_ref_pkg.sv`: reference arithmetic used by the floating point
  testbenches.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends the run with a failure if it hangs.

* `fp_add_tb` and `fp_mul_tb` drive a single and a double precision instance
  and compare every result and flag with `fp_ref_pkg`. That package computes
  the exact sum or product with wide integers and rounds it by comparing the
  discarded remainder with one half, so it shares no structure with the
  hardware. The random operands come from mixed classes:
  * random bit patterns;
  * nearby exponents;
  * deep cancellation;
  * infinities, NaNs and subnormals;
  * the ends of the exponent range;
  * all-ones fractions;
  * for the multiplier, products just below 2, which force the rounding
    carry-out.

  About 120,000 vectors run per testbench. `fp_mul_tb` also checks the two
  worked examples above.
* `fp_top_tb` runs the whole top at its default parameters. It checks every
  output and counts how often each mechanism fires:
  * in the adder: alignment with sticky, carry-out normalization,
    leading-zero normalization, round up, rounding re-normalization,
    overflow, underflow, invalid;
  * in the multiplier: the same list, with its one-bit normalization in place
    of the two normalization cases;
  * each rotation and the shift mode;
  * the fill of the distributed shifter;
  * each rounding mode of the compound adder, and subtraction.

  A mechanism that never fires counts as a failure.
* The small blocks are tested exhaustively or nearly so: every shift amount,
  every rounding-table case, every mode and g/r/s combination. Each one is
  compared with integer arithmetic.

To run one with Verilator 5:

```sh
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/fp_add_tb.sv --top-module fp_add_tb
./obj_dir/Vfp_add_tb
```

Replace `fp_add_tb` with any other testbench name. Each run takes seconds.
For a different precision, set `EXP_W` and `FRAC_W` on `fp_add`, `fp_mul` or
`fp_top`. The reference class `fp_ref#(EXP_W, FRAC_W)` supports p up to 60.
