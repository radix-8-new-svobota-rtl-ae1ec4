# Radix-8 New Svoboda-Tung floating-point divider

This is an IEEE 754 floating-point divider that produces three quotient bits
per clock. It uses no quotient-selection table. It is built on the New
Svoboda-Tung (NST) division method. Both operands are first multiplied by a
factor K that brings the divisor very close to 1. With such a divisor, the next
quotient digit is simply the leading digit of the shifted partial remainder.
The remainder is kept in a redundant radix-8 signed-digit form. Each
subtraction is therefore carry-free: its delay does not grow with the word
length.

Two complete units are provided side by side:

| unit | format | quotient digits | cycles per division |
|------|--------|-----------------|---------------------|
| `u_sp` | binary32 (8/23) | 9 | 11 |
| `u_dp` | binary64 (11/52) | 19 | 21 |

## Number system

The radix is b = 8, and each digit comes from the maximally redundant set
{-7 … 7} (α = 7). A digit takes 4 bits. Non-negative digits are plain binary.
Negative digits use the 4-bit two's complement code: -7 = `1001`, …,
-1 = `1111`. The code `1000` is never used. In `nst_pkg`, the type is
`sd_digit_t`.

The algorithm is the MROR variant: "maximally redundant, optimally recoded".
In this variant, β = b/2 − 1 = 3. For convergence, the scaled divisor must
satisfy 1 ≤ Y < 1 + δ, where δ = (α − β)/(b·α) = 1/14.

## Prescaling (`prescaler`)

The divisor significand Y lies in [1, 2). Its leading fraction bits choose one
of 16 intervals. Interval i has the factor K = 1 − i/32. The prescaler never
multiplies by K. Instead, K is written as 1/2 plus at most three more powers of
two, and one of those may be a subtracted 1/32:

| i | K | terms | Y interval (1 + d, in 1/32) |
|---|---|-------|-----------------|
| 0 | 32/32 | ½+½ | [0, 2) |
| 1 | 31/32 | ½+½−1/32 | [2, 3) |
| 2 | 30/32 | ½+¼+⅛+1/16 | [3, 4) |
| 3 | 29/32 | ½+¼+⅛+1/32 | [4, 5) |
| 4 | 28/32 | ½+¼+⅛ | [5, 6) |
| 5 | 27/32 | ½+¼+⅛−1/32 | [6, 8) |
| 6 | 26/32 | ½+¼+1/16 | [8, 9) |
| 7 | 25/32 | ½+¼+1/32 | [9, 11) |
| 8 | 24/32 | ½+¼ | [11, 13) |
| 9 | 23/32 | ½+¼−1/32 | [13, 15) |
| 10 | 22/32 | ½+⅛+1/16 | [15, 17) |
| 11 | 21/32 | ½+⅛+1/32 | [17, 20) |
| 12 | 20/32 | ½+⅛ | [20, 22) |
| 13 | 19/32 | ½+1/16+1/32 | [22, 25) |
| 14 | 18/32 | ½+1/16 | [25, 28.5) |
| 15 | 17/32 | ½+1/32 | [28.5, 32) |

For every Y, this gives 1 ≤ K·Y < 15/14. The factors and their term
decomposition come from the original design. Two boundaries sit higher than a
decoding of only the first five fraction bits would put them: 11|12 is at
20/32 rather than 19/32, and 14|15 at 28.5/32 rather than 28/32. With the
lower boundaries, Y = 51/32 would scale to 1020/1024 and Y = 60/32 to
1020/1024. Both are below 1, and the recurrence would fail. The 28.5/32
boundary needs a sixth divisor bit, and only for the 28/32 slice.

The selected shifted copies of the dividend are added by three levels of the
carry-free signed-digit adder: (½ + A) + (B + C), then ± 1/32. The result is
already the signed-digit initial remainder R(0) = K·X/2. Its delay does not
depend on the operand width. The divisor is kept in ordinary binary digits,
because the compensation multiplexers need it that way. So K·Y, and
D = K·Y − 1 with its multiples 3D, 5D and 7D, are formed with binary adders in
the same load cycle.

## The recurrence step (`nst_iteration`)

Each cycle performs R(j+1) = 8·R(j) − q·Y. The remainder has an integer digit
r0 (from −1 to 1) and NF fraction digits r1 r2 …

1. **Recode unit** (`recode_unit`). It takes v = 8·r0 + r1 and the next digit
   r2. If they have opposite signs and |r2| > 3, one unit moves between them:
   - if v > 0 and r2 < −3, then q = v − 1 and u = r2 + 8;
   - if v < 0 and r2 > 3, then q = v + 1 and u = r2 − 8.

   Otherwise, q = v and u = r2. A value v = ±8 can arise, because the adder may
   leave a transfer in r0. In that case, q saturates at ±7 and u takes the
   remaining ±8, so u can reach ±8. The value 64·r0 + 8·r1 + r2 = 8q + u is
   always kept.
2. **Shifter.** Multiplying by 8 is a one-digit shift, so it is only wiring.
   The integer part of 8R equals q exactly. The new fraction word is therefore
   u, r3, r4, …, 0.
3. **Compensation unit** (`compensation_unit`). Only q·(Y − 1) = q·D still has
   to be subtracted. Multiplexers select |q|·D from D, 2D, 3D, 4D, 5D, 6D and
   7D. The result is split into octal digits, and the digits are negated when
   q > 0.
4. **Signed-digit adder** (`sd_adder`). It adds the two digit words. The
   transfer out of the first fraction position becomes the new r0.

**Why the remainder stays bounded.** Suppose |R| < 1 and D < 1/14. Then
R' = (u + f)/8 − q·D, where |f| < 1 is the value of the digits after u. Two
cases cover everything:
- u and q have opposite signs. Recoding guarantees |u| ≤ 3, so
  |R'| < 4/8 + 7/14 = 1.
- u and q do not have opposite signs. The two terms partly cancel, so
  |R'| < max(8/8, 1/2) = 1.

So |R| < 1 holds for ever, and |q| ≤ 7 suffices. Because q·D < 1/2, the first
digit of q·D is at most 3. The sum at the first position therefore stays within
−11 … 8. The same carry rule as the adder digits handles it, without widening
the adder.

## Carry-free adder (`sd_adder_digit`, `sd_adder`)

Each position adds two digits into a sum in −14 … 14. The sum is split into a
transfer c and an interim digit t:
- if the sum is 7 or more, c = +1 and t = sum − 8;
- if the sum is −7 or less, c = −1 and t = sum + 8;
- otherwise, c = 0 and t = sum.

This keeps t within −6 … 6. The final digit is t plus the transfer from the
position below, which always lands in −7 … 7. No transfer depends on an
incoming transfer, so the adder has no carry chain.

## Quotient, remainder and rounding

Each digit q goes into the on-the-fly converter (`otf_converter`). It keeps two
values: Q, and QM = Q − 1 unit. Both are updated by shifting and appending a
digit, never by a carry.

After the last iteration, a single binary subtraction reduces the signed-digit
remainder to its sign and a zero flag. This is the only carry-propagate
operation in the significand path.
- A negative remainder selects QM. The result is then the exact truncated
  quotient ⌊X/(2Y)·8^ND⌋.
- Any non-zero remainder sets the sticky bit.

`nst_fpdiv` then processes that result:
- It normalizes the quotient. X/(2Y) lies in (1/4, 1), so at most one shift is
  needed.
- It rounds to nearest-even, using a guard bit and the sticky bit.
- It packs the sign, exponent and fraction.

ND = ⌈(M+3)/3⌉ quotient digits leave room for the normalization shift and the
guard bit. M is the significand width, including the hidden bit.

## Interface and timing

`nst_r8_divider` ports:

- shared: `clk`, `rst_n` (asynchronous, active low);
- per unit (`sp_*` and `dp_*`): `start`, `a` (dividend), `b` (divisor),
  `busy`, `done`, `result`, `flags`.

`flags` is `fp_flags_t`, which holds invalid, div_by_zero, overflow, underflow
and inexact.

A division runs as follows:
- **Start.** A `start` pulse while `busy` is low is sampled at clock edge k.
  The operands only need to be valid in that cycle. During this cycle the
  operands are prescaled and loaded.
- **Iterations.** Edges k+1 … k+ND each perform one iteration.
- **Result.** The normalize/round cycle ends at edge k+ND+1. After that edge,
  `done` is high for one cycle, and `result` and `flags` hold until the next
  division completes.

In total, a division occupies ND + 2 cycles: 11 for single precision and 21
for double precision. Special operands (NaN, ∞, zero) take the same time.

## What this design decides for itself

- **Special values.** NaN operands give the quiet NaN `0 11…1 10…0`. The cases
  0/0 and ∞/∞ raise invalid. Dividing a finite non-zero value by zero returns
  ∞ and raises div_by_zero.
- **Subnormals.** Subnormal operands are read as zero. Results below the normal
  range are flushed to a signed zero, with underflow and inexact raised.
  Overflow returns ∞.
- **Rounding.** Only round-to-nearest-even is provided.
- **Transfer threshold.** The adder's transfer threshold (|sum| ≥ 7) is one
  valid choice among several. The gate-level equations of the reference adder
  are not reproduced. The adder is written behaviourally from its
  interim/final-sum function.
- **Integer digit.** The remainder keeps an integer digit of −1 … 1 rather
  than being forced to 0. The recode unit folds that digit into the next
  quotient digit, which is why q can saturate.
- **Prescaler transitions.** The transition points of intervals 11 and 14
  differ from a 5-bit-only table (see above). The interval decision uses a
  sixth divisor bit in one slice.
- **Multiples of D.** The odd multiples of D are computed once per division
  and held in registers.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=… failures=…`. The checks are worked out independently of
the RTL:

- `tb_sd_adder_digit`: exhaustive over all digit pairs and incoming transfers.
  `tb_sd_adder`: random words, with a check that cin changes digit 0 only.
- `tb_recode_unit`: exhaustive. `tb_compensation_unit`: exact value of −q·D.
- `tb_nst_iteration`: R' = 8R − qY exactly, and |R'| < 1. It uses random
  remainders and chains of steps.
- `tb_prescaler`: every divisor slice against an independent interval table.
  It checks K·X/2 and K·Y exactly and 1 ≤ K·Y < 15/14.
- `tb_otf_converter`, `tb_nst_divider_core`: quotient and sticky compared
  with long integer division, and the latency checked.
- `tb_nst_fpdiv`: 200,000 single-precision divisions against an integer
  reference model (`tb_fp_ref_pkg`), with a latency check.
- `tb_nst_r8_divider`: end to end at the default configuration. It runs
  300,000 single and 150,000 double divisions at the same time. Double results
  are also compared with the simulator's native IEEE double division. It
  checks 11- and 21-cycle latency. It counts these mechanisms and requires
  each to occur in both units:
  - all 16 prescale intervals;
  - both recode cases;
  - the ±8 saturation;
  - a negative final remainder;
  - both normalization outcomes;
  - rounding up;
  - special operands;
  - overflow and underflow.

## Files and simulation

`rtl/`:

| file | content |
|------|---------|
| `nst_pkg.sv` | digit types, constants, transfer rule, flag struct |
| `sd_adder_digit.sv`, `sd_adder.sv` | carry-free signed-digit adder |
| `recode_unit.sv`, `compensation_unit.sv`, `nst_iteration.sv` | one recurrence step |
| `prescaler.sv` | interval decision, scaling of X (carry-free) and Y |
| `otf_converter.sv` | on-the-fly quotient conversion |
| `nst_divider_core.sv` | registers, control, final remainder sign |
| `nst_fpdiv.sv` | IEEE unpack, special values, normalize, round; `EXP_W`/`FRAC_W` choose the format |
| `nst_r8_divider.sv` | top: single and double units |

To run a testbench with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/nst_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_nst_r8_divider.sv \
    --top-module tb_nst_r8_divider -o sim
./obj_dir/sim
```

Use the same command for any other testbench; only the testbench file and the
top module change.

To build another format, instantiate `nst_fpdiv` with a different
`EXP_W`/`FRAC_W`. The fraction must have at least 6 bits. ND and NF follow
from the width.
