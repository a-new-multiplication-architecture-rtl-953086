# DBNS × floating-point multiplier behind a flash ADC

A sample from a flash ADC can be coded as one double-base number, `2^b · 3^t`.
A filter coefficient stays in IEEE-754 single precision. Multiplying the two
needs no multiplier array. Both operands are moved into the base-2 exponent
domain, where the product becomes additions, and the result is moved back into
IEEE single format with the linear rule `2^x ≈ 1 + x`. What is left is a bank
of 23-bit comparators, a shift-and-add constant multiplication and a few
adders.

This repository holds synthesizable SystemVerilog for that multiplier and for
the chain around it:

```
 vin ──► 63 comparators ──► DBNE ROM encoder ──► FIR inner-product processor ──► y (IEEE single)
 (real)  flash_adc_model     dbne                 dbns_fir
         (behavioural)       thermometer → b,t      ├─ dbns_fp_mul  (DBNS × float)
                                                    │    ├─ mant_corr      comparators → d
                                                    │    └─ frac_int_conv  t·log2 3 → I, F
                                                    └─ fp_add       (float accumulator)
```

`adc_dbns_fir_top` wires the whole chain. Shared types (`dbns_t`, `float32_t`)
and the constants live in `dbns_pkg`.

## Number formats

- **DBNS operand** (`dbns_t`): sign `s`, binary exponent `b` and ternary
  exponent `t`, both 9-bit signed (−256…255). Value `(−1)^s · 2^b · 3^t`.
- **Coefficient and result** (`float32_t`): IEEE single, `(−1)^sign ·
  (1 + f) · 2^(E − 127)` with a 23-bit fraction `f`.

Nine-bit exponents are enough to place a single term within 0.15 LSB of every
level of a 6-bit ADC. With fewer bits the error grows quickly: about 0.6 LSB
at 8 bits.

## The double-base number encoder (`dbne`)

The ADC spans 0.55 V to 1.05 V in 63 levels, with LSB = 0.5/62 V = 8.065 mV.
Level DV (1…63) has the voltage `V(DV) = 0.55 + (DV − 1)·LSB`. The encoder is a
ROM encoder. The 1→0 transition of the thermometer code raises one word line,
and that row drives the `b` and `t` bit lines. Unselected rows contribute
nothing, as in a wired-OR.

Each row holds the pair `(b, t)` with −256 ≤ b, t ≤ 255 that minimises
`|V(DV) − 2^b 3^t|`. The search is over all 512 values of `t`, taking for each
the two integers `b` nearest to `log2 V − t·log2 3`. Some rows, as examples:

| DV | V (V) | b | t | 2^b 3^t | error (LSB) |
|---:|---:|---:|---:|---:|---:|
| 1 | 0.550000 | −134 | 84 | 0.549751 | 0.031 |
| 21 | 0.711290 | −10 | 6 | 0.711914 | 0.077 |
| 49 | 0.937097 | 11 | −7 | 0.936443 | 0.081 |
| 61 | 1.033871 | 195 | −123 | 1.034987 | 0.138 |

The exponents are large and of opposite sign. The term balances a large power
of two against a large power of three. `rtl/dbne_rom.hex` holds the 64 words
`{b[8:0], t[8:0]}`. Row 0 (input below the first comparator) repeats row 1.

## The multiplier (`dbns_fp_mul`)

The product to form is

```
T = (1 + f) · 2^(Bc−127) · 2^b · 3^t
```

### Step 1: the coefficient mantissa as a power of two

`1 + f ≈ 2^(f + d)` where `d(f) = log2(1+f) − f`. The function `d` is zero at
f = 0 and at f = 1. It peaks at D_MAX = 0.08607 for f = 1/ln2 − 1 = 0.4427.
`mant_corr` approximates `d` by a piecewise constant with N + 1 pieces, using
N comparators that work in parallel:

- Let K = (N−1)/2 and step = D_MAX/(K+1).
- Comparators 1…K sit where `d(f)` rises through step, 2·step, … K·step.
  Comparator K+1 sits at the peak. Comparators K+2…N sit where `d(f)` falls
  back through K·step, …, step.
- The number c of comparators that fire selects the constant
  `d_c = (2·min(c, N−c) + 1) · D_MAX/(N+1)`, the middle of the step band that
  the segment spans.

The worst error is therefore D_MAX/(N+1). For N = 1, 3, 7, …, 511 that gives
0.0430, 0.0215, 0.0108, …, 0.00017. The default is N = 127, with a worst error
of 0.00067. N must be odd.

The 127 thresholds and 128 constants are computed at elaboration by functions
in `dbns_pkg`. These functions compute log2 in fixed point by repeated
squaring and find the crossings by bisection. No table is stored in a file,
and changing `N` regenerates everything.

### Step 2: the ternary exponent as a power of two

`3^t = 2^(t·log2 3) = 2^(I + F)`. `frac_int_conv` forms `t·log2 3` without a
multiplier. It adds copies of `t` shifted by each position where log2 3,
rounded to 23 fraction bits, has a one:

```
log2 3 ≈ 1.1001010111000000000110 1₂  → shifts 0, 1, 4, 6, 8, 9, 10, 20, 21, 23
```

`I` is the floor of the sum (10-bit signed) and `F` its 23-bit fraction. The
error is below |t|·2⁻²⁴.

### Step 3: recombination and normalisation

```
T ≈ 2^(f + d + F) · 2^(Bc + b + I)
S = f + d + F                       (one 3-operand 23-bit addition)
fraction_out = S mod 1
exp_out      = Bc + b + I + floor(S)
sign_out     = sign(coef) XOR s
```

This is `2^S ≈ 2^floor(S) · (1 + frac(S))`. If S < 1 the mantissa is 1 + S.
If 1 ≤ S < 2 the mantissa is S and the exponent gains 1. S ≥ 2 is handled the
same way but cannot occur with 9-bit `t`: the largest fraction of t·log2 3 is
0.99699. A zero or subnormal coefficient gives zero. Infinity and NaN pass
through. An exponent at 255 or above saturates to infinity, and one at 0 or
below flushes to zero.

### Accuracy: what to expect

The input side is corrected by `d`. The output side uses `2^x ≈ 1 + x` with no
correction, so the product is **biased high**: up to +6.2 % when frac(S) is
near 0.443, and about +4 % on average. It can fall short only by the
comparator error, D_MAX/(N+1). Worked example, coefficient 1.0 times the DV = 1
code (b = −134, t = 84):

```
I = 133, F = 0.136849, d = 0.000672 (f = 0 still lies in segment 0)
S = 0.137521 → mantissa 1.137521, exponent 127 − 134 + 133 = 126
T = 0.56876   (exact 2^−134 3^84 = 0.54975, +3.5 %)
```

Note that 1.0 × 1 gives 0x3F801609 (1.00067), not 1.0, because segment 0
adds d_0 = D_MAX/128.

In a filter, the average part of the error acts as a small gain (about +0.35 dB).
The data-dependent part limits the stop band. In `tb_fir_response`, a
52-tap Blackman low-pass reaches −78 to −99 dB with exact arithmetic, and
−50 to −68 dB with DBNS data through this multiplier.

## The FIR inner-product processor (`dbns_fir`)

`y(n) = Σ_{k=0}^{TAPS−1} h(k)·x(n−k)` with TAPS = 52. The filter uses one
multiplier and one adder, as an accumulate recursion `acc ← acc + h(k)·x(n−k)`
run one tap per clock:

- A sample is accepted on a clock edge with `in_valid && in_ready`. It shifts
  into a 52-stage delay line of `dbns_t`.
- On each of the next 52 edges, the product for tap k is registered.
  One edge later it is added to the accumulator, so the multiplier and the
  adder each sit in their own register stage.
- `out_valid` pulses **TAPS + 1 = 53 edges** after the accepting edge.
  `in_ready` is low while a sum is being formed, and offers made then are
  ignored. The throughput is one output per 54 cycles.
- Delay-line stages that have not yet received a sample since reset add +0,
  so the filter starts from an all-zero history.
- Coefficients are written through `coef_we/coef_addr/coef_data` while the
  filter is idle. An assertion flags writes while busy.
- Reset is synchronous and active low. It does not clear the coefficients.

## Floating-point adder (`fp_add`)

This is a conventional single-precision adder, combinational. It orders the
operands by magnitude, aligns them with guard/round/sticky bits, adds or
subtracts, then renormalises, shifting left by the leading-zero count after
cancellation. It rounds to nearest even. Subnormals are treated as zero, and
NaN results are 0x7FC00000.

## Top level (`adc_dbns_fir_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `vin` | in | `real` | analog input in volts (drives the behavioural comparator bank) |
| `sample` / `ready` | in / out | 1 | take a sample on an edge where both are high |
| `coef_we`, `coef_addr`, `coef_data` | in | 1, 6, 32 | coefficient write port (IEEE single) |
| `y_valid`, `y` | out | 1, 32 | filter output pulse and value |
| `x_b`, `x_t`, `x_level` | out | 9, 9, 6 | current encoder output, for observation |

Parameters: `TAPS` (52) and `N` (127, number of mantissa comparators).
`flash_adc_model` has `V_LOW` = 0.55, `V_HIGH` = 1.05 and `BITS` = 6. The
comparator thresholds are placed half an LSB below each level. That model is
not synthesizable: it compares a `real` input. The synthesizable part starts at
`dbne`.

## Where this departs from the source description

- **Threshold placement and the constants d.** The printed description says
  only that the comparators compare the mantissa with known constants, and
  that the error falls as D_MAX/(N+1). The level-crossing rule above
  reproduces that error table exactly (`tb_mant_corr_sweep`). It is still a
  reconstruction.
- **log2 3 shifts.** The shift set includes 2⁻¹⁰ (and 2⁻²³). Without it the
  exponent of 3^t would be off by up to 0.25 for |t| = 255.
- **Exponent range.** The description sometimes states a range of [−127, 127].
  The encoder's table needs ±256, so all DBNS exponents are 9-bit signed, and
  `I` is 10 bits.
- **The sequential FIR schedule, handshake, coefficient port, latency, the
  adder's rounding and all special-value handling** are this design's own.
- **Not built:** the transistor-level comparator, resistor ladder and encoder
  layout of the ADC (only a behavioural comparator bank is provided), and the
  conventional floating-point multiplier and floating-point FIR used as
  comparison baselines.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=… failures=…` and has a watchdog. Reference arithmetic in
`tb/dbns_ref_pkg.sv` uses double precision and is independent of the RTL.

| Testbench | What it checks |
|---|---|
| `tb_flash_adc_model` | thermometer code and level for a 3001-point voltage sweep |
| `tb_dbne` | all 64 codes against an exhaustive nearest-term search, plus the example rows; error ≤ 0.15 LSB |
| `tb_frac_int_conv` | all 512 values of `t`, bit-exact and against real `t·log2 3` |
| `tb_mant_corr` | error ≤ D_MAX/(N+1), monotone segments, all segments used, closed-form constants |
| `tb_mant_corr_sweep` | worst error for N = 1…511 against the expected error table |
| `tb_dbns_fp_mul` | 40 000 random products against the specified approximation and the exact product; both normalisation cases; zero, infinity, overflow, underflow |
| `tb_fp_add` | 100 000 random sums bit-exact against double-precision-then-round; cancellation, ties, specials |
| `tb_dbns_fir` | 70 outputs of a 52-tap filter against the summed approximation; latency 53; ignored offers; start-up |
| `tb_fir_response` | pass-band gain within 0.6 dB of ideal; stop band below −45 dB |
| `tb_adc_dbns_fir_top` | whole chain at default size (52 taps, N = 127): voltages in, outputs against the model and against the ideal filter within 6.3 %; counts start-up, ignored strobes, clamping below and above range, both normalisation cases, negative products |

Run one with plain Verilator from the repository root (the ROM file is read
as `rtl/dbne_rom.hex`, relative to the working directory):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/dbns_pkg.sv tb/dbns_ref_pkg.sv tb/tb_adc_dbns_fir_top.sv \
  --top-module tb_adc_dbns_fir_top -Mdir obj
./obj/Vtb_adc_dbns_fir_top
```

Replace the last testbench file and top module name to run another. Every
testbench builds in seconds and runs in well under a second.

## Changing the design

- **Accuracy/area trade-off:** set `N` (odd). Thresholds and constants follow
  automatically. The delay is one comparator level plus a population count,
  whatever N is.
- **Other filter lengths:** set `TAPS`. Latency is TAPS + 1.
- **Other ADC ranges or exponent widths:** regenerate `dbne_rom.hex` with the
  rule above. For a different exponent width, change `EXP_W` in `dbns_pkg`.
