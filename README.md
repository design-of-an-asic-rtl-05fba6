# Single-precision floating-point adder with per-case datapaths

This is a combinational IEEE 754 single-precision adder (`s = a + b`, round to nearest even).
Before doing any arithmetic it sorts every input pair into one of four cases:

| case | operands | handled by |
|------|----------|------------|
| normal | both normal | far-and-close-path datapath |
| mixed | one normal, one denormal | same datapath, after the denormal is pre-normalised |
| denormal | both denormal | a single 24-bit add, no alignment |
| exception | any zero, infinity or NaN | a lookup of the result, no arithmetic |

All three result blocks work on every input pair in parallel, and a final multiplexer keeps the one
that matches the case. The easy cases do not travel through the full datapath, and the normal case
gets a far/close split tuned for speed. The design follows the architecture of the paper *Design of an
ASIC-Based High Speed 32-bit Floating Point Adder*. This RTL is an independent implementation
of that architecture. The sections below mark what it adds or chooses where the paper is silent.

The result is meant to be bit-exact IEEE 754 for every input, denormals included, except that every
NaN result is the quiet NaN `7FC00000`. The testbenches check this against an independent
exact model on directed corner cases and over a million random pairs; it has not been proven
exhaustively.

## Block structure

```
            +-------------+
 a, b ----->|  enabler    |--- sel, outa, outb ----------------------+
            +-------------+                                          |
 a, b ----> normalized_mixed (sel, outa, outb) ---- s_norm ---+      |
 a, b ----> denormalized --------------------------- s_denorm -+-> selector --> s
 a, b ----> exception (outa, outb) ----------------- s_exc ----+
```

`fp_adder` is the top. Inside `normalized_mixed`:

```
 norm_pre (wiring) --nA_n,nB_n--+
                                +-> norm_mix_sel --nA,nB,mixed--> norm_mix_pre --+--> close_path --+
 mixed_pre ---------nA_m,nB_m---+                                                 +--> far_path  ---+--> norm_mix --> s
```

Shared primitives: `kogge_stone_adder` (compound adder), `lop` (leading one predictor), `lod`
(leading one detector) and `barrel_shifter`. Types and codes are in `fp_pkg`.

## Operand classes and the select code

`enabler` drives `outa`/`outb` (`op_type_e`) and `sel` (`in_case_e`), all 2 bits:

| `op_type_e` | code | meaning |
|---|---|---|
| `T_ZERO` | 00 | exponent 0, fraction 0 |
| `T_DENORM` | 01 | exponent 0, fraction not 0 |
| `T_NORMAL` | 10 | exponent 1..254 |
| `T_SPECIAL` | 11 | exponent 255 (infinity or NaN) |

| `in_case_e` | code | selected result |
|---|---|---|
| `C_NORMAL` | 00 | `normalized_mixed` |
| `C_DENORM` | 01 | `denormalized` |
| `C_MIXED` | 10 | `normalized_mixed` |
| `C_EXCEPT` | 11 | `exception` |

The paper names these signals and their widths but gives no codes; the codes are this design's own.

## The mixed case: a denormal with a negative exponent

This is the least conventional part of the design. In the mixed case, one operand is normal and
the other denormal. A denormal's significand `0.f` can have many leading zeros. `mixed_pre`
normalises it anyway:

1. `lod` counts the leading zeros `c` of the 24-bit significand `{0, f}` (`c` >= 1).
2. `barrel_shifter` shifts it left by `c`, so its MSB is 1.
3. `c` is written into the 8-bit exponent field of the prepared word.

That exponent field now means a *negative* exponent: the value is `1.f' x 2^(-126-c)`, which no
IEEE encoding can express. Only the `mixed` flag, raised by `norm_mix_sel`, tells later stages to
read it that way. `norm_mix_pre` then computes the exponent difference as `expA - (1 - c)`.
`mixed_pre` always places the normal operand in `nA_m` (the larger one: every normal number
exceeds every denormal) and the shifted denormal in `nB_m`. After that, the normal datapath
treats the pair like two normal numbers, with a full 24-bit significand for the smaller one.

Example: `006ce3ee + 02081cea = 0215b968`. The denormal has `c = 1`, the normal has exponent 4, so
the shift is 4. The result is the correctly rounded IEEE sum.

## Preparation: order, path and exponent difference

Prepared operands are 33-bit words `{sign, exponent[7:0], significand[23:0]}` (`prep_t`), with the
implicit bit in front of the fraction (the `norm_pre` step, plain wiring inside `normalized_mixed`, sets it to 1). `norm_mix_pre` produces:

- `sub`: the signs differ (effective subtraction).
- `A`, `B`: the operands ordered by magnitude. `A` is the larger, and its sign is the result's sign.
  In the mixed case no comparison is needed.
- `exp_large`: the exponent of `A`.
- `exp_diff`: the exponent difference in 5 bits, saturated at 31. From 27 on, the smaller operand
  only reaches the sticky bit, so saturation loses nothing.
- `one_d`: the difference is exactly 1.
- `path`: 1 selects the far path. That is any addition, and any subtraction with a difference
  above 1. The close path takes subtractions with a difference of 0 or 1.

## Close path: cancellation

Subtracting nearly equal numbers can cancel many leading bits but needs no rounding beyond one
guard bit. The exact difference is `D = {A,0} - ({B,0} >> d)`, 25 bits wide, for `d` in {0, 1}.

- **Compound adder.** `kogge_stone_adder` adds `A` to the inverted upper 24 bits of the shifted
  `B` and yields both `sum = A - B' - 1` and `sum1 = A - B'`. If a 1 fell into the guard bit
  (`d = 1` and `B` odd), the upper part of `D` is `sum` with a guard of 1; otherwise it is `sum1`.
- **Leading one predictor.** In parallel with the adder, `lop` looks at the operand bits. It uses
  the signed digits `a[i] - b[i]`, with the indicator
  `f[i+1] = (a[i+1] ^ b[i+1]) & ~(~a[i] & b[i])`. The highest set `f` is the position of the
  leading one or one above it, because the difference lies in `(2^(p-1), 2^(p+1))`.
- **Normalisation.** `barrel_shifter` shifts `D` left by the prediction, then a 2:1 mux adds one
  more bit if the MSB is still 0. The exponent is `exp_large` minus the shift. The shift is capped
  at `exp_large - 1`; a result that would fall below the normal range stays denormal, with
  exponent field 0.
- **Rounding.** Only an unshifted result (`d = 1`, MSB set) has a guard bit to round. Rounding up
  means `sum + 1`, which the compound adder already provides as `sum1`, so rounding costs only a
  mux. The round-up can never overflow.
- An exact zero (`A = B`, `d = 0`) raises `zero_close` and becomes `+0`.

## Far path: alignment and rounding

For the far path `B` is shifted right by `exp_diff` into a 27-bit word: 24 bits, guard, round, and a
sticky bit that ORs in everything shifted past it (the shifter's `lost` output). The compound
adder works on the upper 24 bits and gives `sum` and `sum1` again:

- **Addition.** The low three bits pass through unchanged. Without a carry out, the result is
  `sum`, rounded with the low bits. With a carry out, it shifts right one place and `sum[0]`
  becomes the guard bit. In both cases "round up" selects `sum1`, which already has the right
  carry. A round-up from `FFFFFF` produces `800000` and increments the exponent.
- **Subtraction** (difference of 2 or more). A non-zero low part borrows: the upper part is then
  `sum`, otherwise `sum1`, and the low part becomes `8 - low`. The result is at least half of `A`,
  so at most a one-bit left shift follows, and rounding again picks `sum1`. When `exp_large` is 1
  there is no room to shift, so the result stays denormal.
- An exponent reaching 255 gives infinity.

Rounding is round to nearest, ties to even, everywhere.

## Denormal pairs

Both exponents are 0, so the significands line up without shifting. `denormalized` feeds
`{exponent LSB, fraction}` into the 24-bit compound adder. For like signs the carry into bit 23
lands exactly in the exponent LSB, so a sum that overflows becomes the smallest normal number
without any extra logic. For unlike signs the adder computes `a + ~b`: if that carries out, the
result is `sum1 = a - b`; otherwise it is `~sum = b - a`, with `b`'s sign. Every result is exact.

## Exceptions

| operands | result |
|---|---|
| zero + x | x (zero + zero is -0 only if both are -0) |
| infinity + finite | that infinity |
| infinity + infinity, same sign | that infinity |
| infinity + infinity, opposite signs | NaN |
| NaN + anything | NaN (`7FC00000`) |

The paper's table covers the rows above except "NaN + non-NaN". That row, the NaN value and the
signed-zero rule follow IEEE 754 and are this design's choices.

## Interface and timing

```
module fp_adder (input logic [31:0] a, input logic [31:0] b, output logic [31:0] s);
```

There is no clock, reset or handshake: `s` is a combinational function of `a` and `b`. The paper
reports about 6.3 ns for its synthesised version of this structure. To pipeline the design,
register the enabler outputs and the three block results in front of `selector`. Inside
`normalized_mixed`, the boundary between `norm_mix_pre` and the two paths is the other natural cut.

Nothing is parameterised at the top. `kogge_stone_adder`, `lop`, `lod` and `barrel_shifter` take a
width parameter; their defaults are the widths used in the adder.

## Departures and own choices

- Encodings of `sel`, `outa` and `outb` (see above).
- Overflow to infinity, the NaN value, the signed-zero rules and NaN + number: IEEE 754 behaviour
  where the paper gives none.
- The LOP equation, the one-bit LOP correction, the guard/round/sticky bookkeeping of the far path
  and the guard-bit scheme of the close path. The paper names the LOP, the compound adder with
  built-in rounding and the barrel shifters, but not their internals.
- The close and far paths handle results that fall into the denormal range (reachable through the
  mixed case or small exponents) by stopping normalisation at exponent 1.
- Operands are ordered by full magnitude, not by exponent alone, so the close path never sees a
  negative difference.
- `zero_close` and a separate sign input on `norm_mix` are extra signals not shown in the paper's
  block diagram.
- The paper's diagram labels the far path's exponent input `exp_diff[7:0]` beside a separate
  `exp_diff[4:0]`. Here that input is `exp_large[7:0]`, which the far path needs for its output
  exponent.
- Additions always take the far path, even with an exponent difference of 0 or 1.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. The expected values come from
`tb/fp_ref_pkg.sv`, a reference adder that shares nothing with the RTL. It scales both operands to
a common exponent in a 300-bit integer, adds exactly and rounds once. Each testbench prints
`TB_RESULT checks=N failures=M`.

`tb_fp_adder` is the end-to-end test. It covers the four example additions from the paper
(normal `41bb8937 + 45baf1c9 = 45bbad52`, denormal `0031a76d + 000001bd = 0031a92a`, mixed
`006ce3ee + 02081cea = 0215b968`, and `fb000000 + 41bb8937 = fb000000`), the exception table, and
directed corner cases. It then runs one million random pairs drawn from all operand kinds, with
cancelling pairs weighted in. It also counts each mechanism: every case, both paths, LOP
correction, round-up, carry-out, overflow, denormal results, and denormal sums carrying into the
normal range. A mechanism that never fires counts as a failure.

`tb_fig8_cases` replays the paper's example waveforms as timed steps of 50 ns each. Where the paper
prints a result, it is checked against that; otherwise it is checked against the reference model.
It also checks which input case the enabler reports. All testbenches pass.

Run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fp_pkg.sv tb/fp_ref_pkg.sv rtl/*.sv tb/tb_fp_adder.sv --top-module tb_fp_adder
./obj_dir/Vtb_fp_adder
```

For a block testbench, replace the last file and `--top-module`. `fp_pkg.sv` and `fp_ref_pkg.sv`
must come first.
