# Decimal64 floating-point adder/subtractor (IEEE 754-2008, DPD encoding)

Binary floating point cannot hold most decimal fractions exactly: 0.1 is a
repeating binary fraction. Financial and commercial software therefore
computes in decimal. This RTL adds or subtracts two IEEE 754-2008 **Decimal64**
numbers in hardware. Each operand has 16 decimal digits and its exponent is a
power of ten. The result is rounded in one of seven modes, and the unit raises
the inexact, overflow and invalid flags.

The unit uses a *single path*: every operation goes through the same chain of
stages. The stages are: unpack, align, add or subtract in BCD, normalise and
round, repack. The significand adder is a 19-digit BCD adder. It subtracts by
nine's complement with an end-around carry, and its carry chain is split into
carry-select groups of four digits.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | synchronous, active-high reset; clears both register stages |
| `operand_a`, `operand_b` | in | 64 | Decimal64 operands, DPD (densely packed decimal) encoding |
| `sign_in` | in | 1 | 0 computes a + b, 1 computes a − b |
| `round_mode` | in | 3 | rounding mode, see the table below |
| `result` | out | 64 | Decimal64 result, DPD encoding, canonical declets |
| `inexact`, `overflow`, `invalid` | out | 1 each | exception flags of this result |

The operands, `sign_in` and `round_mode` are registered on one clock edge. The
whole datapath between the two register stages is combinational. The result
and flags are registered on the next edge. So a result appears two clock edges
after its operands are applied, and the unit accepts one new operation every
cycle. There is no valid/ready handshake. The original description has only a
clock and a reset; the two register stages are this implementation's choice.

## Number format

A Decimal64 value is (−1)^s × c × 10^q, where the coefficient c is an integer
of up to 16 digits. Stored fields:

| bits | field |
|---|---|
| 63 | sign |
| 62:58 | combination field G |
| 57:50 | exponent continuation (low 8 exponent bits) |
| 49:0 | five 10-bit declets, 3 digits each (digits 2..16) |

The biased exponent E = q + 398 has 10 bits and runs from 0 to 767. G holds the
top two exponent bits and the leading digit:

- `0xxxx` / `10xxx`: leading digit 0..7.
- `110xx` / `1110x`: leading digit 8 or 9.
- `11110`: infinity.
- `11111`: NaN. Bit 57 set marks a signalling NaN.

A declet packs three digits into 10 bits. `dpd_decode` accepts all 1024
patterns, including the 24 non-canonical ones. `dpd_encode` produces only the
1000 canonical ones.

Decimal formats are *redundant*: 1.0 × 10^1 and 10 × 10^0 are the same number.
The set of encodings of one number is its cohort. An exact sum must use the
*preferred exponent* min(qa, qb). A rounded sum must use the smallest exponent
that fits the result into 16 digits. Much of the datapath exists to meet this
rule, not only to get the value right.

## Datapath

```
operand_a/b ─► decompose ─► exp_diff ─► sig_align ─► bcd_adder ─► shift_round ─► exp_adjust ─► dpf_converter ─► result
                 │  (DPD→BCD,   (leading zeros,  (shift large    (19 digits,    (normalise,      (final          (BCD→DPD,
                 │   eff. op)    shift amounts)   left, small     9's compl.,    round, +1)       exponent,       NaN/inf/
                 │                                 right/left)     end-around)                     overflow)       overflow)
                 └──────────────────────────► sign_result ◄── swap, complement_out
```

### Effective operation

`decompose` unpacks both operands into sign, biased exponent and 16 BCD
digits. The operation is an *effective subtraction* when
`sign_in ^ sign_a ^ sign_b` is 1. For example, a − b with b negative is an
effective addition. From here on the datapath works on magnitudes.

### Alignment (exp_diff, sig_align)

This is the least obvious part of the design. The two significands must be
brought to one common exponent without losing digits that could change the
rounded result.

1. Count the leading zero digits of each significand (lzA, lzB). The
   *effective exponent* of each operand is exponent − leading zeros, which is
   the exponent it would have if its digits were pushed to the top of the
   16-digit field.
2. The *large operand* L is the one with the larger effective exponent.
   Operand a wins a tie. A zero is never the large operand unless both are
   zero. `swap` = 1 means L is operand b. Let eL, eS be the exponents of the
   large and small operand.
3. If eL ≥ eS, L is shifted **left** by `left_amount = min(eL − eS, lzL)`.
   This is as far as needed, and never past its top digit. The common
   exponent is `er_int = eL − left_amount`. The small operand is shifted
   **right** by `right_amount = er_int − eS` into three extra positions: a
   guard digit, a round digit and a sticky bit. The sticky bit is the OR of
   everything shifted further. Shifts beyond 20 digits saturate, because such
   an operand only sets sticky.
4. If eL < eS, the small operand has the larger exponent but still the smaller
   magnitude. It has enough leading zeros to be shifted **left** by
   `left_small_amount = eS − eL`. L stays where it is and `er_int = eL`, which
   is already the preferred exponent.

Example: 0786000000000000 × 10^6 + 43720 × 10^0. The first operand has one
leading zero, so it moves left by 1 to 7860000000000000 × 10^5. The second is
shifted right by 5 and its five low digits, 43720, land in the guard, round
and sticky positions. The result exponent is 5.

### BCD add/subtract (bcd_adder, bcd_cell, carry_effect)

The adder works on 19 digits: na2 followed by three zero digits, and nb2 with
its sticky bit widened to a digit (0000 or 0001).

- **Cells.** Each `bcd_cell` optionally nine's-complements its b digit. It adds
  the two digits and the carry in a 4-bit binary adder, then corrects sums
  above 9 by adding 6, which produces the decimal carry.
- **Nine's-complement subtraction.** A − B = A + (99…9 − B) + 1 when A > B.
  - A carry out of the top digit means the difference is positive. That carry
    is added back at the least significant digit (*end-around carry*).
  - No carry means the difference is negative, including A = B. The adder
    output is then nine's-complemented (`complement_out`), and the sign logic
    inverts the result sign.
  - `carry_effect` makes both decisions.
- **Carry-select groups.** The digits form groups of `GROUP` = 4 digits (the
  top group has three real digits). Each group computes its sum for carry-in 0
  and for carry-in 1 in parallel, so only a chain of five 2:1 multiplexers
  runs across the 19 digits. The end-around carry is not fed back into that
  chain, which would make a combinational loop. Instead the mux chain is
  evaluated twice over the same group sums: once with carry-in 0 to get the
  top carry, then once with the end-around carry to select the sums.

In an effective addition, a carry out of the top digit (`carry_out`) means the
sum has 17 digits.

### Normalisation and rounding (shift_round = rounding_circuit + round_decision + bcd_incrementer)

- **`normalize`.** A 17-digit sum is shifted right by one digit. The carry
  becomes the leading digit and the exponent goes up by 1.
- **`exp_zero` / `rslt_zero`.** Otherwise the result may have leading zeros
  after a cancelling subtraction. It is shifted left by
  k = min(leading zeros, er_int − min(ea, eb)), so the exponent never drops
  below the preferred exponent. In practice k ≤ 1 for a non-zero result.
  Larger values of k occur only for a zero result, where they bring the
  exponent of the zero down to min(ea, eb).
- **Classifying the discarded part.** The top 16 digits are kept. The first
  discarded digit decides `round_flag` (≥ 5). `sticky` is set when the
  discarded part is neither 0 nor exactly one half. Together they encode four
  cases: 00 exact, 01 below half, 10 exactly half, 11 above half.
- **Rounding decision.** `round_decision` turns the four cases, the result
  sign and the parity of the last kept digit into an increment:

| code | mode | increments when |
|---|---|---|
| 000 | nearest, ties to even | above half, or half and last digit odd |
| 001 | away from zero | discarded part ≠ 0 |
| 010 | toward +∞ | ≠ 0 and result positive |
| 011 | toward −∞ | ≠ 0 and result negative |
| 100 | toward zero | never |
| 101 | half up (nearest, ties away) | ≥ half |
| 110 | half down (nearest, ties toward zero) | above half |
| 111 | (unused) | treated as 000 |

- **Increment.** `bcd_incrementer` adds one to the 16 digits. When 99…9 rolls
  over, the coefficient becomes 1000…0 and `ex_adj` raises the exponent by one.
- **Inexact.** `inexact` is set whenever anything non-zero was discarded.

### Exponent and sign

`exp_adjust` computes er = er_int + normalize + ex_adj − k. If er exceeds 767,
it raises `max`, which means overflow. `sign_result` gives:

- In an effective addition: the sign of a.
- In an effective subtraction: sign_in ^ sign_b when exactly one of `swap` and
  `complement_out` is set, otherwise the sign of a.

An exact zero difference is +0, or −0 in round-toward-−∞. A sum of two zeros
with the same effective sign keeps that sign.

### Repacking and special values (dpf_converter)

The finite result is encoded back to DPD. Special cases are applied in this
order:

| case | result | flags |
|---|---|---|
| any signalling NaN | `0 11111 0…0` (quiet NaN, payload not kept) | invalid |
| any quiet NaN | same quiet NaN | none |
| ∞ and ∞ in an effective subtraction | quiet NaN | invalid |
| a infinite | ∞ with the sign of a | none |
| b infinite | ∞ with sign sign_in ^ sign_b | none |
| overflow, round toward 0, toward +∞ with negative result, or toward −∞ with positive result | largest finite value 9999999999999999 × 10^369 | overflow, inexact |
| overflow, any other mode | ∞ | overflow, inexact |

Underflow cannot occur in addition: no result exponent is below min(ea, eb).

## Departures and choices

The main configuration of the original thesis design is: single path,
nine's-complement subtraction, and the carry-look-ahead (carry-select) BCD
adder. The thesis preferred that adder over the ripple-carry version.
Alternatives it only compared are not included: the ten's-complement cell,
and a second adder with swapped operands feeding an output multiplexer.

Where this RTL departs from, or adds to, that description:

- **Larger operand with the smaller exponent.** The original shifts the large
  operand fully left and the small one further still. This puts the common
  exponent below min(ea, eb), so a later right shift would be needed. Here the
  small operand is shifted left only by the exponent difference, so the common
  exponent is min(ea, eb) at once. The numerical result is the same.
- **Zero operands.** The original handles a zero operand at the output stage.
  Here the operand selection handles it: a zero is never the large operand.
- **Infinity minus infinity.** This raises invalid, as IEEE 754-2008 requires.
  One passage of the original says the flag stays low.
- **Output encodings.** Infinities are produced canonically (continuation
  fields zero). NaN results never propagate a payload.
- **Rounding flags.** `round_flag` and `sticky` are defined as listed above so
  that the rounding table gives correctly rounded results for all seven modes.
- **Overflow.** Overflow is detected as "final exponent > 767". This covers
  the decimal-carry and rounding-carry cases of the original.
- **Registers.** The two register stages, the reset behaviour and the handling
  of mode code 111 are this implementation's choices.

## Verification

Every module has a self-checking testbench in `tb/`, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`. The shared reference model is
`tb/tb_dfp_ref_pkg.sv`. It works on plain 128-bit integers, not BCD:

- it packs and unpacks Decimal64 values;
- it adds exactly;
- it rounds to 16 digits with the preferred-exponent rule;
- it applies the special-value rules above.

`tb_dfp_addsub64` drives the complete unit at its only configuration: one
operation per cycle, results checked two cycles later. The stimulus is:

- the worked alignment examples;
- ties and non-ties in every rounding mode, for both signs;
- overflow by rounding and by decimal carry;
- NaN and infinity combinations;
- 20,000 random operations with nearby, distant and near-maximum exponents,
  random coefficient lengths, zeros, all-nines coefficients and arbitrary bit
  patterns.

It counts how often each mechanism fires and fails if one never does. The
mechanisms are: decimal-carry normalisation, end-around carry, complemented
output, left shift of the large operand, left shift of the small operand,
right shift, leading-zero removal, rounding increment (per mode), rounding
carry into the exponent, overflow, invalid, infinity and NaN results.

The published test vectors used for the original design (3063 add/subtract
cases) are not included. The random comparison against the reference model
stands in for them.

To run a testbench with Verilator 5 (the package files first):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dfp_pkg.sv tb/tb_dfp_ref_pkg.sv tb/tb_dfp_addsub64.sv \
  --top-module tb_dfp_addsub64 -o sim -y rtl +libext+.sv
./obj_dir/sim
```

Replace `tb_dfp_addsub64` with any other `tb_<module>` to test one block.

## Files

| file | contents |
|---|---|
| `rtl/dfp_pkg.sv` | widths, rounding-mode and class enums, unpacked-operand struct, special encodings |
| `rtl/dfp_addsub64.sv` | top: input/output registers and the datapath |
| `rtl/decompose.sv`, `rtl/decompose_one.sv`, `rtl/dpd_decode.sv` | unpacking, effective operation |
| `rtl/exp_diff.sv`, `rtl/lzd16.sv` | leading zeros, large operand, shift amounts, common exponent |
| `rtl/sig_align.sv` | alignment shifters with guard/round/sticky |
| `rtl/bcd_adder.sv`, `rtl/bcd_group.sv`, `rtl/bcd_cell.sv`, `rtl/nines_comp.sv`, `rtl/carry_effect.sv` | 19-digit BCD adder/subtractor |
| `rtl/sign_result.sv` | result sign |
| `rtl/shift_round.sv`, `rtl/rounding_circuit.sv`, `rtl/round_decision.sv`, `rtl/bcd_incrementer.sv` | normalisation and rounding |
| `rtl/exp_adjust.sv` | final exponent and overflow |
| `rtl/dpf_converter.sv`, `rtl/dpd_encode.sv` | repacking, special values, flags |

Parameters you can change: `bcd_adder.GROUP` (carry-select group size) and
`bcd_incrementer.DIGITS`. Changing the format width (for example to Decimal128)
means changing the constants in `dfp_pkg` and the fixed 19/76-bit widths in
the alignment, adder and rounding stages.
