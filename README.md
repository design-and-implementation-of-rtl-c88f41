# Radix-100 decimal64 divider

This is synthesizable SystemVerilog for an IEEE 754-2008 decimal64 divider. Its core is a
**radix-100 digit-recurrence divider**: each iteration produces two decimal quotient digits,
so the 16-digit coefficient quotient needs only nine iterations. A complete division takes
**14 clock cycles** from start to result.

The architecture follows the thesis *Design And Implementation of a Radix-100 Division Unit*:
pre-scaling, selection by truncation, compensation, reused carry-save adders, on-the-fly
conversion and rounding. This RTL is an independent implementation of that architecture.
Where it departs from the published design, the section "Departures" below says so.

## The idea: selection by truncation

A digit-recurrence divider computes

    R(i) = 100 * R(i-1) - q(i) * D

For radix 100 the quotient digit q(i) lies in −99..99. Choosing it by comparing against
multiples of D (as SRT division does) would need about 200 comparisons per step.

Selection by truncation avoids that. The divisor is first scaled so that it is almost exactly
1, that is D' in [1, 1 + 1/99). Once D' ≈ 1, the quotient pair is simply the integer part of
100·R. It can be read from the three leading digits of the remainder: the sign digit, then
qH and qL. The dividend is scaled by the same factor, so the quotient does not change.

The scaling factor P has three digits (1.xy or 2.xy). A 600-entry table indexed by the three
leading digits of D_m supplies it. D_m is the divisor times 1, 2 or 5, chosen so that its
leading digit is large:

- ×5 when the divisor's leading digit is 1.
- ×2 when it is 2..4.
- ×1 when it is 5..9.

For six indices no 3-digit factor is tight enough, so a 4-digit factor is used: 1.105,
1.065, 1.055, 1.045, 1.025 or 1.015. These are stored as the same two digits with a 2-bit
code saying which digit moves one place down.

The table is not written out as numbers. `prescale_lut` computes it at elaboration from the
range condition: the smallest P with `idx*P >= 10^5` and `(idx+1)*P*99 < 10^7`. The
exception rows are then overwritten.

Multiplying by P costs no real multiplier. P is split into at most five terms, each one of
0, ±1, ±2, 5 or 10 times a power of ten times D_m. These come from D_m, its doubled and
quintupled forms, and their 9's complements. One decimal carry-save adder (DCSA) folds the
five terms into four sums and two carry vectors.

## The partial remainder and the iteration

The remainder uses a W = 23 digit frame:

- Digit 22 is a **sign digit** of weight 10^0: 0 for positive, 9 for negative (10's
  complement).
- Digits 21..0 are the fraction, with weights 10^-1 down to 10^-22.

Everything is computed modulo 10 in the sign digit, so nothing above it is kept.

Between iterations the remainder is in carry-save form: a BCD digit plus a 2-bit carry (0..2)
per digit. One iteration works as follows.

1. **Digit recognition** (`digit_recognition`):
   - The top three digits (sign, h, l) are turned into 11-bit one-hot codes of s+c.
   - A carry out of l moves the h code up one place (a shift, not an adder).
   - The sign is predicted from the sign digit and the carry out of h.
2. **Multiples selection** (`multiples_select`): the pair is q = 10h + l for a positive
   remainder, or 10h + l − 99 for a negative one. Only 1..5·D' are stored, so a digit that
   would need 6..9·D' is replaced by its complement plus a compensation of ±10·D' (for l) or
   ±100·D' (for h):

   | Sign | Condition | Multiple | Compensation |
   |---|---|---|---|
   | plus | h ≥ 5 | 10 − h | −100·D' |
   | plus | h < 5 | −h | none |
   | minus | h ≤ 3 | −1 − h | +100·D' |
   | minus | h > 3 | 9 − h | none |

   l is handled the same way, with ±10·D'. When both compensations are needed, the
   precomputed ±110·D' is used (`compensation_table`).
3. **Low carry**: the carry coming up from the digits below l is not known while the digits
   are read. Two candidates are therefore prepared: multiple kl and kl − 1, with digit ql and
   ql + 1. The carry output of the shared decimal adder (`dcpa`) picks between them.
4. **Addition** uses three DCSAs in two levels:
   - First level, adder a: the remainder ×100, recoded to 1-bit carries by `pr_recode`, plus
     the qL multiple.
   - First level, adder b: the qH multiple ×10 plus the compensation.
   - Second level, adder c: merges the two results.
   - `carry_combine` turns the two remaining carry vectors back into 2-bit carries.
   - Negative multiples are 9's complements. Their "+1" goes into a free carry position:
     bit 0 of the shifted remainder carry and bit 0 of the compensation carry.

Two boundary cases need care:

- **Don't-care case.** When sign, h and l all read 9, the carry from below may or may not make
  the remainder positive. The pair is forced to 0. This keeps R inside [−1, 1) either way.
- **Remainder of exactly −1.** This happens after a don't-care step from exactly −0.01. The
  carry-save form can read 8.99 until the low carry is added. The sign digit is then 8, which
  the sign table does not cover. This design flags the case (`wrap`), reads it as 9.00 and
  selects the pair −99. Random testing found this case; operands such as 8 / 8008 reach it.

## Fourteen cycles and hardware reuse

The three DCSAs and the decimal carry-propagate adder (DCPA) do different work in different
cycles. `r100_ctrl` sequences them:

| Cycle | Mode | Work |
|---|---|---|
| (start edge) | | divisor into the pre-scaler input register; dividend aligned and registered |
| 1 | `M_PS_D` | pre-scale the divisor: table lookup, term selection, first DCSA |
| 2 | `M_PS_X` | pre-scale the dividend; DCSAs reduce the divisor terms to carry-save D' |
| 3 | `M_ADD_X` | DCSAs reduce the dividend terms to R0 = X'/10; DCPA makes D' compact; doubler and quintupler give 2D', 4D', 5D' |
| 4 | `M_MUL3` | DCPA gives 3D' = D' + 2D'; DCSAs give +110·D' and −110·D' |
| 5..13 | `M_ITER` | nine iterations, two quotient digits each |
| 14 | `M_ROUND` | DCPA makes the final remainder compact; its sign and zero drive rounding |

`done` pulses in the cycle after cycle 14. That is exactly 14 rising edges after the edge
that sampled `start`.

## Alignment, quotient digits and rounding

The coefficients enter as normalized fractions x = 0.x1..x16 and d = 0.d1..d16 (x1, d1 ≠ 0).

If x ≥ d, the dividend is shifted one digit right before pre-scaling. The comparison is a
plain unsigned compare of the BCD vectors. This design also divides the scaled dividend by 10
on entry.

Together these give R0 < 0.102 and a quotient Q = x/d·10^-(1+shift) in [0.01, 0.1). Q
therefore always has one leading zero followed by 17 significant digits: 16 digits plus a
round digit.

**On-the-fly conversion** (`otf_converter`): each signed pair is written into its two digit
positions of an 18-digit register as it arrives. A negative pair is stored as 100 + v, and
one is borrowed from the digits already stored. A per-digit zero flag tells which trailing
zeros become 9s. No final carry-propagate conversion is needed.

**Rounding** (`round_norm`) implements roundTiesToEven:

- The leading zero is dropped. The round digit and the final remainder decide the result:
  - the remainder's sign tells whether the exact quotient lies just below or just above the
    digit string;
  - whether the remainder is zero decides exact ties.
- The incremented value is formed without an adder: trailing 9s become 0 and the digit above
  them is raised.
- An all-nines coefficient becomes 1000000000000000 and the exponent is raised by one. The
  rounding block supports this, but it cannot occur for two normalized 16-digit operands.

Because of the redundant digits, a quotient that rounds to exactly 0.1 can come out without a
leading zero, as 0.1000… with a negative remainder. The exponent adjustment accounts for this:

    exp_adj = 1 + shift − 16 − lz + carry

## Decimal64 wrapper

`dfp64_divider` is the top level. Its datapath:

- `dpd_decode` unpacks each operand: sign, 10-bit biased exponent, and 16 BCD digits from the
  combination field and five densely-packed declets.
- `lz_shifter` normalizes each coefficient and counts the shift.
- `r100_divider` divides the coefficients.
- `exponent_calc` computes the result exponent and sign:
  `eq = ex − ed + 398 + exp_adj + lzd − lzx`, clamped to 0..767; `sq = sx xor sd`.
- `dpd_encode` packs the result.

Special cases:

| Case | Result |
|---|---|
| Zero divisor (`div_zero_detect`) | Signed infinity; `div_by_zero` raised. |
| Zero dividend, non-zero divisor | Signed zero with exponent ex − ed + 398. |
| Infinity or NaN operand | Only flagged on `special_in`. |
| Exponent overflow or underflow | Exponent clamped; `exp_range_err` raised. |

For zero operands the coefficient divider still runs, on a dummy operand, so the latency is
always 14. The result is always normalized: 16 significant digits with the leading zero
removed. The IEEE "preferred exponent" of exact quotients is not restored.

### Interface of `dfp64_divider`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | sample `fx`, `fd` at this edge; ignored while `busy` |
| `fx`, `fd` | in | 64 | dividend and divisor, decimal64 DPD |
| `busy` | out | 1 | a division is in progress |
| `done` | out | 1 | one-cycle pulse 14 edges after start |
| `fq` | out | 64 | quotient, decimal64 DPD; valid from `done` until the next start |
| `div_by_zero` | out | 1 | divisor was zero |
| `exp_range_err` | out | 1 | result exponent had to be clamped |
| `special_in` | out | 1 | an operand was infinity or NaN (`fq` not meaningful) |

## Departures from the published design

- **Widths.** The datapath is wider than published:
  - remainder: 23 digits instead of 22;
  - pre-scaler outputs: 23 instead of 21;
  - multiples: 20 instead of 18.

  This keeps the scaled dividend (up to about 10.1) exact, together with the one-digit
  alignment shift.
- **Dividend alignment.** The x ≥ d shift and the fixed /10 entry are this design's way of
  keeping R0 in range and the quotient's leading-zero count constant. The thesis only says
  the scaled dividend is shifted by its number of integer digits.
- **DCSA.** The digit carry-save adder is written directly from its arithmetic definition:
  per digit, carry and sum equal x + y + c. It is not written as gate equations.
- **Digit 5.** For a positive digit 5, the compensated form 10 − 5 with −10·D' is used. The
  thesis's algorithm chapter and its implementation chapter disagree on this entry; the
  implementation chapter is followed.
- **The −1 remainder case** (`wrap`, described above) is an addition.
- **No −D' register.** Negative multiples are made from the positive ones by the Negative
  (9's complement) blocks when selected.
- **Special values.** The exception logic of IEEE 754 (NaN, infinity inputs, overflow and
  underflow results) is outside the published design. Here it is only flagged.
- **Declet coding and field layout** are the standard's. The thesis only names the
  converters.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. The reference values are computed
independently, with wide integer arithmetic in the testbench:

- Adders and multiplier blocks are checked by value, modulo the frame width.
- The pre-scaler is checked against operand × P × (1, 2 or 5). The check also requires the
  scaled divisor to lie in [1, 1 + 1/99).
- The parameter table is checked against its range condition and the six listed exceptions.
- Selection blocks are checked by their arithmetic meaning. For example, the selected
  multiples plus compensation must equal −(10·qh + ql)·D'.
- `tb_r100_divider`, `tb_dfp64_divider` and `tb_dfp64_workload` compare every quotient with
  floor(x·10^k / d), rounded to nearest with ties to even. They check the 14-cycle latency on
  every division. They count each internal mechanism and fail if one never happened:
  - compensation, negative digits, low-carry selection, the don't-care case, the −1 case;
  - exceptional parameters, the dividend shift, leading-zero removal;
  - round-up, ties;
  - divide by zero, zero dividend, leading digits 8/9 in the combination field.
- `tb_dfp64_workload` runs 300,000 random decimal64 divisions at full size, about 15 s in
  verilator. `tb_dfp64_divider` is the same test with 2,000 random divisions.

Not verified: timing or area in any real technology, and behaviour for infinity or NaN
inputs.

## Simulating

Verilator 5 (`--binary --timing`) is enough. The package must come first. For example:

    verilator --binary --timing -Irtl -y rtl rtl/r100_pkg.sv tb/tb_dfp64_divider.sv \
        --top-module tb_dfp64_divider -o sim && ./obj_dir/sim

Replace the testbench name to run any other test. The design has no `x`/`z`-dependent
behaviour, and every register is reset.

## Files

| File | Block |
|---|---|
| `rtl/r100_pkg.sv` | widths (NDIG = 16, QDIG = 18, ITERS = 9, W/PW/MW), `mode_t` |
| `rtl/dfp64_divider.sv` | top: decimal64 divider |
| `rtl/r100_divider.sv` | coefficient divider: alignment, pre-scaler, iteration module, controller |
| `rtl/r100_ctrl.sv` | 14-cycle sequencer |
| `rtl/prescaler.sv`, `rtl/prescale_lut.sv` | pre-scaling module and parameter table |
| `rtl/iteration_unit.sv` | remainder and multiple registers, reuse MUXes, adders, digit path |
| `rtl/digit_recognition.sv`, `rtl/multiples_select.sv`, `rtl/compensation_table.sv` | quotient-digit selection |
| `rtl/pr_recode.sv`, `rtl/carry_combine.sv` | carry format conversions |
| `rtl/dcsa.sv`, `rtl/dcpa.sv` | decimal carry-save and carry-propagate adders |
| `rtl/bcd_nines_comp.sv`, `rtl/bcd_doubler.sv`, `rtl/bcd_quintupler.sv` | Negative, ×2, ×5 |
| `rtl/otf_converter.sv`, `rtl/round_norm.sv` | on-the-fly conversion, rounding |
| `rtl/dpd_decode.sv`, `rtl/dpd_encode.sv`, `rtl/lz_shifter.sv`, `rtl/div_zero_detect.sv`, `rtl/exponent_calc.sv` | decimal64 wrapper blocks |
