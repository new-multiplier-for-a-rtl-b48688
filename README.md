# Hybrid double-base × floating-point multiplier behind a flash ADC

A flash ADC can emit each sample directly as one double-base term,
`x ≈ 2^b · 3^t`, instead of a binary word. Filter coefficients stay in
IEEE-754 single precision, `h = (1+f) · 2^(B-127)`. The product `h · x` can then
be formed almost entirely by adding exponents:

* `3^t = 2^(t·log2 3)`. The constant `log2 3` is a short sum of powers of two,
  so `t·log2 3` needs only shifted copies of `t` and an adder tree. The result
  is split into an integer `I` and a 23-bit fraction `F`.
* `1+f ≈ 2^(f+d)`. Here `d` is a small constant picked from a table by a bank
  of parallel 23-bit comparators on `f`. This is a piecewise-constant fix for
  the gap between `log2(1+f)` and `f`.
* So `h · x ≈ 2^(f+d+F) · 2^(B+b+I-127)`. The multiplier adds `f+d+F` (two
  23-bit additions) and `B+b+I` (two short additions). It has no array
  multiplier: only comparators, shifters and adders.

This repository holds synthesizable SystemVerilog for that multiplier. It also
holds the digital chain it sits in: the flash ADC's 0-1 generator, the
double-base number encoder (DBNE), and a direct-form FIR filter with one hybrid
multiplier per tap. The scheme comes from *New Multiplier for a Double-Base
Number System Linked to a Flash ADC* (Nguyen, Kim, Choi, Lim, Choi, Kim). The RTL
is an independent implementation. Where the published description leaves
details open, this code makes its own choices, and they are listed below.

## Signal chain

```
 analog in ──► comparator bank ──thermo[62:0]──► zero_one_generator ──onehot[63:0]──►
 (not in RTL)                                    (combinational)

     dbns_encoder ──{zero,b,t}──► dbns_fir_filter ───────────────────────────► y
     (table + register)            ├ coefficient_memory   (8 × fp32)
                                   ├ delay line           x[n] … x[n-7]
                                   ├ 8 × hybrid_multiplier
                                   │      ├ mantissa_comparator  (f → d)
                                   │      └ frac_int_conversion  (t → I, F)
                                   ├ 8 × dbns_linearizer  (2^mant·2^expo → fixed point)
                                   └ adder tree + output register
```

`dbns_adc_fir_top` wires the chain together. The analog comparator bank (the
threshold-inverter comparators and gain boosters of the flash ADC) is not
logic, so its thermometer code is an input port of the top.

| Stage                   | Latency  | Throughput    |
|-------------------------|----------|---------------|
| zero_one_generator      | 0        | —             |
| dbns_encoder (buffer)   | 1 clock  | 1 sample/clock |
| FIR delay line          | 1 clock  |               |
| hybrid_multiplier       | 1 clock  |               |
| linearizer + adder, `y` | 1 clock  |               |
| **top total**           | **4 clocks** from `sample_valid` to `y_valid` | 1 sample/clock |

Every stage carries a valid bit alongside its data. There is no back-pressure.

## Number formats (`dbns_pkg`)

| Name             | Layout                                   | Value |
|------------------|------------------------------------------|-------|
| `fp32_t`         | `{sign, exp[7:0], frac[22:0]}`           | `±(1+frac/2^23)·2^(exp-127)`; `exp == 0` is read as zero (no subnormals, no Inf/NaN) |
| `dbns_t`         | `{zero, b[7:0], t[7:0]}`, b, t two's complement | `2^b·3^t`, or 0 when `zero` |
| multiplier result | `mant[24:0]` (2 integer + 23 fraction bits), `expo[10:0]` signed, still biased by 127 | `±2^(mant/2^23) · 2^(expo-127)` |
| filter value      | `OUT_W`-bit two's complement, `OUT_FRAC` fraction bits (48/24 by default) | each product; `y` is `OUT_W + clog2(TAPS)` bits wide |

Samples are non-negative because the 6-bit ADC is unipolar. The product's sign
is therefore the coefficient's sign.

## The piecewise log approximation (the core of the multiplier)

`e(f) = log2(1+f) − f` is 0 at both ends of `[0,1)`. It peaks at
`D_MAX = 0.086`, at `f ≈ 0.443`. The error range `[0, D_MAX]` is cut into
`N_PART` equal bands of width `d0 = D_MAX / N_PART`. `N_PART` is 7 by default,
so `d0 ≈ 0.0123`.

* Each inner band edge `k·d0` (k = 1 … N_PART−1) is crossed twice by `e(f)`:
  once while it rises and once while it falls. That gives `2·(N_PART−1)`
  crossing points `y_j`. With the default, there are 12 comparators. The
  crossing points for N_PART = 7, rounded, are 0.029, 0.061, 0.098, 0.140,
  0.192, 0.262 on the rising side and 0.640, 0.726, 0.794, 0.853, 0.906,
  0.955 on the falling side.
* `mantissa_comparator` compares `f` with all the `y_j` in parallel. The number
  of constants at or below `f` gives the segment. Folding the segment number
  back gives the band `k`: it counts up to N_PART−1 and then back down.
* The band's constant is `d = k·d0`, the lower edge of the band. So `f + d`
  never exceeds `log2(1+f)` and falls short of it by less than `d0`. (Near the
  peak the shortfall is `d0 + 0.00007`. This is because 0.086 is the true
  maximum 0.08607 rounded.)
* All constants are computed at elaboration time. Package functions use
  bisection in `real` arithmetic and round each result to 23 bits. Change
  `N_PART` or `D_MAX` and the comparator bank is regenerated.

The same bands also turn the result back into a linear number
(`dbns_linearizer`). Take `x = log2(1+f)`. Then `1 + x − 2^x` equals `e(f)`,
so the band edges in the `x` domain are `log2(1+y_j)`. Using these, the
linearizer forms `2^x ≈ 1 + x − d`, which exceeds `2^x` by less than `d0`. The
comparator module serves both uses; its `LINEAR` parameter selects the
threshold set.

**Accuracy you can expect.** In the exponent domain, the multiplier
underestimates `log2(h·x)` by 0 to 0.0124 (N_PART = 7). That is a relative
error between 0 and −0.86 %. Reversion to linear adds between 0 and +1.24 % of
the leading power of two. A filtered product is therefore within about ±1.3 %
of the exact product, plus truncation below the output LSB. With N_PART = 5 the
log error bound is 0.0173; with N_PART = 9 it is 0.0096. `tb_partition_error`
measures exactly these bounds. The original letter plots multiplication errors
near 10⁻⁴ for N = 7. This construction does not reach that level. A
piecewise-constant correction with about 2·N pieces cannot get there either,
because its error scales with `D_MAX/N_PART`.

## Ternary exponent to binary (`frac_int_conversion`)

`log2 3 ≈ 2^0+2^-1+2^-4+2^-6+2^-8+2^-9+2^-10+2^-20+2^-21+2^-23`. The block forms
the ten copies `t·2^(23−i)`. These are exact, because `t` is an integer and
there are 23 fraction bits. It adds them in a 10→5→3→1 tree. The sum is split
into:

* `I`, the floor of the sum, 9 bits signed;
* `F`, the fraction, in `[0, 1)`.

Two details:

* Carries out of the fraction go into `I`, and negative `t` uses the floor.
  This keeps `F` non-negative.
* `I` needs 9 bits, not 8: `|t·log2 3|` reaches 203.

The published circuit splits this work differently: eight shifts and two
addition stages for the fraction, and three shifts and two addition stages for
the integer. Here a single sum over all ten terms gives the same value, carries
included, and synthesis is free to restructure the tree.

The series stops after 2^-23. The next binary digit of `log2 3` is 2^-27, so
`I+F` differs from `t·log2 3` by `|t|·1.35e-8`. That is at most 1.7e-6, or
about 15 LSB of `F`, at `|t| = 128`.

## The multiplier datapath (`hybrid_multiplier`)

```
 coef.frac ─┬─► mantissa_comparator ─d─► [Buffer] ─┐
            └──────────────────────────► [Acc] ───(+)──(+)──► mant = f + d + F
 x.t ───────► frac_int_conversion ─F─► [reg] ───────────┘
                                  └─I─► [reg] ─────────────┐
 coef.exp (B) ─(+)─► [reg] ───────────────────────────────(+)─► expo = B + b + I
 x.b ───────────┘
```

One register stage holds `m` (Acc), `d` (Buffer), and the aligned `F`, `I`,
`B+b`, sign and zero flags. The final adders follow it, so the result appears
one clock after the operands.

* `mant` is not normalised. `f+d+F` can reach 2.09, and its two integer bits
  count as extra powers of two.
* `expo` is 11 bits, because `B+b+I` outgrows 8 bits.

## The encoder (`dbns_encoder`)

Each ADC level `X` (1 … 63) is mapped to `(b, t)` by a fixed rule. The encoder
takes the smallest `|t|`, trying `t ≥ 0` first, whose term `2^b·3^t` with
`b = round(log2 X − t·log2 3)` is within 0.5 LSB of `X`. This means the sample
can always be rounded back to its level. For 6 bits the table needs
`|t| ≤ 20` and `−26 ≤ b ≤ 37`. For example, 5 → `2^4·3^-1`, 10 → `2^-3·3^4`, and
63 → `2^25·3^-12`.

The table is computed at elaboration time by `dbns_pkg::dbne_pair`, and read
out ROM-style: each output bit is the OR of the one-hot lines that set it.
Level 0 sets the `zero` flag. The output is registered (the buffer stage).

## What follows the original design and what is this implementation's choice

Taken from the published description:

* the chain ADC → 0-1 generator → DBNE → DBNS FIR with single-precision
  coefficients;
* the 6-bit ADC;
* 23-bit comparators selecting a deviation constant;
* `D_MAX = 0.086` and `N = 7`;
* the `log2 3` series and its index set, with shifts and adds;
* the mantissa path `m + d + F` and the exponent path `B + b + I`;
* 8-bit `B`, `b`, `t`.

Choices made here, because the description gives no detail:

* How the comparator constants and `d` values are placed. Here they are equal
  error bands with `d` at the band's lower edge, giving 12 comparators for N = 7.
* The DBNE table rule, the zero flag, and the DBNE register.
* The reversion to linear (`dbns_linearizer`), its fixed-point output format,
  truncation and saturation. The description names the step but does not draw
  it.
* The product representation `2^(f+d+F)·2^(B+b+I)`. The description also writes
  the mantissa as `1+f+F`, without `d`. This implementation follows the
  datapath drawing, which adds `d`, and reverts separately.
* The register stages, latencies, valid handshake and synchronous active-low
  reset.
* The FIR tap count of 8, the parallel-multiplier form, and fixed-point
  accumulation.
* The coefficient register file and its write port.
* Sign and zero handling. There is no Inf/NaN and no subnormal support.
* Widths: 9-bit `I` and 11-bit `expo`.

Not implemented:

* The analog comparator bank and gain boosters.
* The double-precision variant. It is only discussed in the description.
  Widths are fixed in `dbns_pkg` (`MANT_W`, `EXP_W`).

## Parameters

| Parameter  | Default | Where | Meaning |
|------------|---------|-------|---------|
| `ADC_BITS` | 6       | top, zero_one_generator, dbns_encoder | ADC resolution |
| `TAPS`     | 8       | top, dbns_fir_filter, coefficient_memory | filter length |
| `N_PART`   | 7       | top, filter, multiplier, comparator, linearizer | number of error bands |
| `D_MAX`    | 0.086   | same | peak of `log2(1+f) − f` |
| `OUT_W`, `OUT_FRAC` | 48, 24 | top, filter, linearizer | fixed-point product format |
| `T_MAX`, `DBNE_EPS` | 127, 0.5 | dbns_encoder | table search limits |

## Simulation

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`. References are computed independently in
`real` arithmetic: `log2`, powers of 2 and 3, and exact filter sums. There are
no copies of the RTL's algorithms.

| Testbench | What it checks |
|-----------|----------------|
| `tb_zero_one_generator` | all 64 thermometer codes |
| `tb_dbns_encoder` | every level within 0.5 LSB, zero flag, 1-clock latency |
| `tb_frac_int_conversion` | all 256 values of `t` against the series and against `t·log2 3` |
| `tb_mantissa_comparator` | band error bounds in both modes; every band hit |
| `tb_hybrid_multiplier` | random operands, log-domain bound, flags, latency, carries |
| `tb_dbns_linearizer` | random inputs; saturation and flush to zero |
| `tb_coefficient_memory` | reset and random writes |
| `tb_dbns_fir_filter` | about 700 samples against exact sums; exact out_valid timing; coefficient reload |
| `tb_dbns_adc_fir_top` | end to end at default sizes (see below) |
| `tb_partition_error` | error sweep for N_PART = 5, 7, 9 |

`tb_dbns_adc_fir_top` drives a sine through a model of the ideal flash
comparators. It checks the DBNE output and `y` cycle by cycle, and counts each
mechanism, failing if one never occurs:

* zero and full-scale samples;
* positive and negative `t`;
* negative coefficients;
* all seven deviation bands;
* mantissa carries;
* a coefficient reload;
* gaps and back-to-back samples.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dbns_adc_fir_top \
    -y rtl -y tb +libext+.sv rtl/dbns_pkg.sv tb/tb_dbns_adc_fir_top.sv
./obj_dir/Vtb_dbns_adc_fir_top
```

All testbenches finish in well under a second of simulation time.
