# Multiplier-less 16th-order Butterworth band-stop IIR filter

This filter removes the 8.4–13.2 kHz band from a signal sampled at 48 kHz and
passes the rest unchanged. It is a single 16th-order IIR section in
**direct form II**, and it contains no multipliers. Each of its 33 constant
coefficients is a fixed network of shifts and adders. The coefficient is
written in **canonical signed digit (CSD)** form, or in **factored CSD (FCSD)**
form, where the coefficient is split into two factors and each factor gets
its own CSD network.

| Property | Value |
|---|---|
| Response | Butterworth band-stop, order 16, −3 dB edges 8400 / 13200 Hz, fs = 48 kHz |
| Structure | direct form II, one section, 16 shared delays |
| Coefficients | Q16 integers (a0 = 65536), 17 numerator + 17 denominator |
| Input / state / output | 16 / 28 / 18 bits, signed two's complement |
| Throughput, latency | one sample per clock; output registered one clock after the input |
| Multipliers | none: shift-and-add, CSD or FCSD (`MULT_STYLE`, default FCSD) |

Measured in simulation: 0.00 dB at 1, 4 and 20 kHz; −52.9, −55.1 and
−56.1 dB at 10, 10.8 and 11.6 kHz; −3.14 dB at 8400 Hz and −3.00 dB at
13200 Hz.

## The recursion

Direct form II runs the signal through the poles first and the zeros second,
so both halves can share one delay line holding the intermediate signal `w`.
For every accepted sample:

```
w[n] = round( (x[n]·2^16 − Σ_{k=1..16} a_k · w[n−k]) / 2^16 )
y[n] = round( (Σ_{k=0..16} b_k · w[n−k]) / 2^16 )
```

`round` adds 2^15 and shifts right arithmetically. All products are exact,
so the only rounding happens at these two points. The whole recursion,
from the delay-line taps through 16 products, the feedback sum, rounding,
`b0·w[n]` and the output sum, is one combinational path between two clock
edges. It is not pipelined, because a pipeline register inside the feedback
loop would change the transfer function. The clock period is therefore set
by a long adder chain, and the sample rate equals the clock rate at most.
At 48 kHz this is no constraint.

### Word widths

The 16 feedback coefficients make `w` much larger than `x`. The
worst-case gain from `x` to `w` (the sum of the magnitudes of the impulse
response of 1/A(z)) is 541, which is 10 bits. The state is therefore 28 bits:
16 + 10, plus 2 spare. The worst-case gain of the complete filter is 3.54,
so the output is 18 bits. Products and sums use 56 bits internally, and
synthesis trims the bits it does not need. Two immediate assertions in
`iir_bandstop_df2` fire if the state or the output ever wraps. The testbench
drives the worst-case input sequence for the state (full-scale samples with
the sign pattern of the 1/A(z) impulse response) and checks that the
assertions stay quiet.

### Coefficients

The coefficients come from a standard design. Start with an 8th-order analog
Butterworth low-pass prototype, transform it to a band-stop with the two
edges above, and map it to z with the bilinear transform, prewarped at the
edges. Each resulting value is then stored as `round(c · 65536)`. They live
in `rtl/iir_pkg.sv` as `B_COEF` and `A_COEF`.

With Q16 coefficients, the largest pole radius is 0.946, so the quantised
filter is comfortably stable. Quantisation matters more as the order
of a single direct-form section grows. At Q16 the poles of this filter move
by less than 0.001. A 32nd-order version of the same filter would be
unstable at Q16 and needs at least Q18. Rounding shifts the lower −3 dB edge
by 0.13 dB. To use another
response, replace the two arrays and keep `a0 = 2^COEF_FRAC`. Then check the
state width against the new worst-case gain of 1/A(z).

## Shift-and-add multipliers

### CSD (`csd_const_mult`)

A constant `C` is recoded at elaboration into digits `d_k ∈ {−1, 0, +1}` in
non-adjacent form. In this form no two neighbouring digits are non-zero, and
the count of non-zero digits is the smallest of any signed-digit form. The
product is `Σ d_k · (x << k)`, so the network needs one adder or subtractor
per non-zero digit after the first. Example:
`99 = 128 − 32 + 4 − 1`, so `99·x = (x<<7) − (x<<5) + (x<<2) − x`, with three
adders. The recoding is done by `csd_pos_mask`/`csd_neg_mask` in
`iir_pkg`, so any integer can be passed as the `COEF` parameter.

### FCSD (`fcsd_const_mult`)

If `C = F1 · F2`, then `C·x = F2·(F1·x)`: two CSD networks in cascade. When
the factors have few non-zero digits, this needs fewer adders than the CSD
form of `C`. For example, `99 = 3 · 33 = (4 − 1)(32 + 1)` needs two adders
instead of three. `iir_pkg::fcsd_factor` tries every odd factor up to
`MAX_FACTOR` (1023). It keeps the one with the fewest adders, counted as
`(digits(F1) − 1) + (digits(F2) − 1)`, and falls back to plain CSD when no
factor helps. The intermediate word is sized to hold `F1·x` exactly.

For this filter's 33 coefficients, the adder count drops from 188 (CSD) to
171 (FCSD). Thirteen coefficients factor, with factors 3, 5, 9, 73, 129 and
131. The price is a longer adder chain on the factored products.

Both styles give bit-identical outputs, because every product is exact.
`MULT_STYLE` on `iir_bandstop_df2` selects one style for the whole filter.

## Interface of `iir_bandstop_df2`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | active-low, synchronous: clears the state, `y_out` and `out_valid` |
| `in_valid` | in | 1 | `x_in` holds a sample this cycle |
| `x_in` | in | 16 | signed input sample |
| `out_valid` | out | 1 | `y_out` holds a new sample (one clock after `in_valid`) |
| `y_out` | out | 18 | signed output sample; holds its value between samples |

A cycle with `in_valid` low leaves the state untouched, so samples can arrive
at any rate up to one per clock. Parameters: `MULT_STYLE` (`MULT_FCSD` or
`MULT_CSD`), `IN_W` (16), `W_W` (28) and `OUT_W` (18).

## Files

| File | Contents |
|---|---|
| `rtl/iir_pkg.sv` | order, Q format, coefficients, CSD/FCSD elaboration functions, `mult_style_e` |
| `rtl/csd_const_mult.sv` | CSD shift-and-add constant multiplier |
| `rtl/fcsd_const_mult.sv` | factored-CSD constant multiplier (two CSD stages) |
| `rtl/df2_delay_line.sv` | the 16 × 28-bit state chain with shift enable |
| `rtl/iir_bandstop_df2.sv` | the filter (top) |
| `tb/iir_ref_pkg.sv` | bit-exact software model of the recursion, using `*` |
| `tb/tb_csd_const_mult.sv`, `tb/tb_fcsd_const_mult.sv` | products against 64-bit multiplication; recoding and factor choice |
| `tb/tb_df2_delay_line.sv` | shift, hold and reset against a queue model |
| `tb/tb_iir_bandstop_df2.sv` | the filter at default parameters: impulse, noise, worst case, tones, idle cycles, reset |
| `tb/tb_iir_bandstop_csd.sv` | CSD build against the FCSD build and the model |

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops at a watchdog if it hangs. For
example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/iir_pkg.sv tb/iir_ref_pkg.sv rtl/csd_const_mult.sv rtl/fcsd_const_mult.sv \
  rtl/df2_delay_line.sv rtl/iir_bandstop_df2.sv tb/tb_iir_bandstop_df2.sv \
  --top-module tb_iir_bandstop_df2 -Mdir obj -o sim && obj/sim
```

The full filter test runs at default parameters in well under a second. It
compares every output sample bit for bit with `iir_ref_pkg`. It checks that
`out_valid` follows `in_valid` by exactly one clock. For each tone, it
compares the measured gain with |H| computed in floating point from the
coefficients.

## How far it can be trusted, and where it departs

- **Verified:** bit-exact equality with an independent model over about
  22,000 samples for the FCSD build and 4,000 for the CSD build. This
  includes idle cycles and a reset in mid-stream. The frequency response
  was measured at six frequencies, and the state was exercised at its worst
  case. Timing closure and resource use on a real device were not checked.
- **Coefficients and Q format:** derived here from the specification
  (Butterworth, order 16, 8.4/13.2 kHz, 48 kHz). They are not a published
  table.
- **Widths:** chosen here from the worst-case gains. The reference
  implementation this design follows reports 272 flip-flops, which would fit
  16 × 17 bits. That is too narrow for the state of this filter with 16-bit
  input, so this design uses 467 flip-flops (16 × 28 + 18 + 1).
- **Factor search:** the FCSD method says only to factor each coefficient
  and write the factors in CSD. Two factors, with the first odd and at most
  1023, are this design's choice. The reported FCSD savings of roughly
  1–2 % of LUTs are of the same order as the 9 % adder saving here.
- **Handshake, reset and rounding** (`in_valid`/`out_valid`, synchronous
  active-low reset, round half up) are this design's choices.
