# SEERAD: a rounding-based approximate divider

SEERAD divides without a division loop. It replaces the divisor B by a
nearby number of the form

    B_r = 2^(K+L) / D

where 2^K is B rounded down to a power of two and D, L are small constants.
The quotient then becomes

    A / B  ~=  A / B_r  =  D * A / 2^(K+L)

That is a multiplication by a constant with two or three set bits, plus a
right shift. The whole divider is one combinational path of a few adders and
a barrel shifter, not the N iterations of a digit-recurrence divider. The cost
is a bounded relative error: at most 6.25 % at the most accurate setting.
That is acceptable for error-tolerant work such as image processing.

The RTL in `rtl/` implements the divider for any width N ≥ 8 and for the four
published accuracy levels, in signed and unsigned forms. The default is a
32-bit signed divider at accuracy level 4.

## Divisor groups and the constants D, L

One (L, D) pair for all divisors gives a worst-case error of 37.5 %. To do
better, the divisors are split into groups by the bits just after their
leading one. Each group gets its own D, and all groups of a level share one L.
Accuracy level `ACC_LEVEL` reads `ACC_LEVEL-1` bits after the leading one, so
it has `2^(ACC_LEVEL-1)` groups:

| Level | L | Bits after the leading one → D | Max. error |
|---|---|---|---|
| 1 | 3 | (none) → 5 | 37.5 % |
| 2 | 4 | 0 → 12, 1 → 9 | 25 % |
| 3 | 5 | 00 → 28, 01 → 24, 10 → 20, 11 → 17 | 12.5 % |
| 4 | 7 | 000 → 120, 001 → 108, 010 → 97, 011 → 88, 100 → 82, 101 → 76, 110 → 70, 111 → 66 | 6.25 % |

Example: B = 10 = `1010b` has K = 3. At level 4 the three bits after the
leading one are `010`, so D = 97 and A/10 is computed as A·97/2^10 = A/10.56.

Each D was chosen, by exhaustive search, to minimise the mean relative error
of its group. Among equally good values, the one with the fewest nonzero
digits in signed-digit form (digits −1, 0, +1) was taken. For example,
120 = 128 − 8 and 97 = 128 − 32 + 1. So at most two shifted copies of |A| are
needed at levels 1–3, and three at level 4. The worst-case error of a level is
1 − D_max / 2^L. It occurs when B is an exact power of two.

If B is shorter than the bits a level reads (for example B = 1 at level 4),
the missing bits count as 0.

The table lives in `rtl/seerad_pkg.sv` (`level_l`, `level_d`). The signed-digit
forms are not stored: `naf_digit` computes the non-adjacent form of each D
during elaboration, and `level_terms` derives the number of shift terms from
it.

## Datapath

All stages are combinational; there are no registers.

    a, b ─► sign detector ─ |A| ─────────────────────────► multiply ─ terms ─► adder
                 │          |B| ─► rounding ─ B_f ─► index detector ─ D ─┘        │
                 │                            │                                   ▼
                 │                            └──────────────────────────────► shifter
                 └─ sign ─────────────────────────────────────────────────► sign set ─► q

| Module | Job |
|---|---|
| `seerad_sign_detector` | Computes \|A\|, \|B\| (two's complement negation when negative) and the quotient sign, sign(A) XOR sign(B). |
| `seerad_rounding` | Computes B_f = 2^K: keeps only the leading one of \|B\|. It is a ripple chain from the top bit down, with a "one seen above" signal that masks every lower bit. |
| `seerad_index_detector` | Finds the group index from the bits after the leading one. Index bit j is OR over i of B_f[i] & B[i−1−j], so the one-hot B_f selects the bits without a shifter. It then looks up D. |
| `seerad_multiply` | For each nonzero signed digit of D, outputs \|A\| shifted to that digit's position, negated if the digit is −1. It compares D with each constant of the level and selects the matching group's fixed shifts. |
| `seerad_adder` | Adds the 2N-bit terms into D·\|A\|. |
| `seerad_shifter` | Divides by 2^(K+L). K is encoded from B_f, and a logarithmic barrel shifter shifts right by K. The 2^L is only where the binary point sits. |
| `seerad_sign_set` | Negates the result (two's complement) when exactly one input was negative. |
| `seerad` | Top level. It wires the stages and leaves out the sign stages when `SIGNED = 0`. |

## The quotient format

`q` is `2N+L` bits wide, in fixed point with N integer bits and N+L fraction
bits:

    q / 2^(N+L) = ± D·|A| / 2^(K+L)

This value is exact: nothing is rounded or shifted out after the
approximation of B. D < 2^L, so D·|A| has at most N+L bits. K < N, so a right
shift by K of that product placed N bits up keeps every bit. Since D/2^L < 1,
the magnitude of the quotient is never larger than |A|, so N integer bits are
always enough. When `SIGNED = 1`, q is in two's complement.

To get an integer quotient, take `q[2N+L-1 : N+L]`. That truncates toward
zero for positive results and toward −∞ for negative ones. Any other rounding
is left to the user.

Widths at N = 32: L = 3, 4, 5 and 7 for levels 1–4, so `q` is 67, 68, 69 or
71 bits wide.

## Parameters and interface

`seerad #(N, ACC_LEVEL, SIGNED)`:

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 32 | Operand width. Must be larger than L. |
| `ACC_LEVEL` | 4 | Accuracy level, 1–4. Sets the number of groups, L, the D table and the number of shift terms. |
| `SIGNED` | 1 | 1: operands are two's complement. 0: operands are unsigned, and the sign detector and sign set are left out. |

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `a` | in | N | Dividend |
| `b` | in | N | Divisor |
| `q` | out | 2N+L | Quotient, N+L fraction bits |
| `div_by_zero` | out | 1 | High when b = 0. q is then 0. |

## Accuracy

The error depends only on the divisor, never on A. Measured on this RTL by
`tb_seerad_mre`, for unsigned operands with A and B ≥ 1:

| Level | Mean relative error, 8 bit | 16 bit | 32 bit (sampled) | Max. error |
|---|---|---|---|---|
| 1 | 16.55 % | 16.25 % | ≈16.3 % | 37.5 % |
| 2 | 9.15 % | 8.77 % | ≈8.8 % | 25 % |
| 3 | 4.66 % | 4.55 % | ≈4.56 % | 12.5 % |
| 4 | 2.42 % | 2.20 % | ≈2.21 % | 6.25 % |

These match the published figures for the algorithm. Beyond about 12 bits the
mean error hardly changes with width.

The error is signed. The quotient is too small for divisors at the bottom of
their group and can be too large at the top of it. The worst case in
magnitude is always at an exact power of two.

## Choices not fixed by the published design

- **Division by zero.** The published design does not define it. This RTL
  returns q = 0 and raises the extra output `div_by_zero`.
- **Sign set.** The published design says the result is "complemented" when
  one input is negative. This RTL uses two's complement negation, so a
  negative quotient is the exact negative of the positive one. A one's
  complement would be off by one LSB of the fraction.
- **Group numbering.** The published index equation and its table number two
  of the level-3 groups differently. Here the group index is simply the bits
  after the leading one read as a binary number. Only the internal numbering
  of groups depends on this; which D a divisor gets does not.
- **Short divisors.** Bits below B[0] count as 0. This choice reproduces the
  published 8-bit error figures exactly.
- **Inner structure of the stages.** The sign detector, adder and sign set
  are only named in the published design. Here they are plain negations and
  a multi-operand sum, left to synthesis. The multiply stage is a selection
  among fixed shifts. The barrel shifter is logarithmic after a one-hot to
  binary encoder.
- **Unsigned form.** The unsigned variant is the same datapath without the
  sign stages, as published. It is selected here by the `SIGNED` parameter.

Not included: the exact SRT dividers the divider was published against.

## Image division

A typical use is image division: each output pixel is the quotient of two
corresponding 8-bit pixels from consecutive frames, used to detect change.
`tb_seerad_image` runs this on generated 352×288 frames: a gradient with a
moving square, plus noise. It measures the PSNR of the approximate quotient
image against the exact one, with peak value 255. Pixels with a zero divisor
are left out. At the default width it gives about 62, 67, 73 and 79 dB for
levels 1 to 4. That is in the 56–92 dB range reported for natural video
sequences. Results on real footage will differ with its content.

## Verification

Each module has a self-checking testbench in `tb/`. All of them compare
against `tb/seerad_ref_pkg.sv`, a reference model written independently of
the RTL. It re-types the D table, finds the leading one with a loop and
multiplies with `*`.

| Testbench | What it checks |
|---|---|
| `tb_seerad_sign_detector`, `tb_seerad_rounding`, `tb_seerad_index_detector`, `tb_seerad_multiply`, `tb_seerad_adder`, `tb_seerad_shifter`, `tb_seerad_sign_set` | Each stage on its own, on corner cases and random values. The multiply test covers every D of every level and the 2/2/2/3 term counts. |
| `tb_seerad` | The whole divider in all eight configurations (4 levels × signed/unsigned, N = 32), bit-exact against the model on about 20,000 operand pairs. It counts every group of every level, every K from 0 to 31, negated results, two negative inputs, the most negative input, the zero divisor, large unsigned operands and subtracting terms. It fails if any of these never occurred. |
| `tb_seerad_full` | The default configuration with no parameter overrides: the worked example 1000/10 = 94.7265625 in all four sign combinations, B = 1, B = 0, and 5000 random divisions. |
| `tb_seerad_mre` | The accuracy table above, checked against the expected values. |
| `tb_seerad_image` | Image division on generated frames at all four levels. Every quotient pixel is bit-exact, the PSNR rises with the level, and it lies within 50–100 dB. |

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
after a fixed number of cycles if it hangs.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/seerad_pkg.sv tb/seerad_ref_pkg.sv tb/tb_seerad.sv \
        --top-module tb_seerad -y rtl -y tb +libext+.sv -o sim
    ./obj_dir/sim

Any other testbench builds the same way with its own file and top module.
Each one takes well under a minute.

The RTL passes `verilator --lint-only -Wall` and elaborates with the slang
front end of yosys. No timing, power or area figures come with this RTL.
