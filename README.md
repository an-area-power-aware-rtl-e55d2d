# Stochastic/binary compressive gammachirp filterbank (32 channels)

A gammachirp filter models the human cochlea: it is a narrow, asymmetric
band-pass filter, and a bank of them covering 20 Hz – 20 kHz splits sound the
way the basilar membrane does. A straightforward digital version needs
hundreds of multipliers. This design removes them. Every multiplication is
done in the *stochastic* domain, where a number is the density of ones in a bit
stream and a product is a single AND gate. Every addition stays in ordinary
binary arithmetic. Two further ideas make that work:

* **Fixed random-number generation (FRNG).** The random numbers that turn
  binary values into bit streams come from an LFSR whose period equals the
  stream length exactly. Every sample therefore uses the *same* random
  sequence. The stochastic error becomes a fixed, repeatable function of the
  operands instead of fresh noise at every sample. This matters because the
  noise would otherwise pile up through the eight cascaded IIR sections of each
  channel.
* **Gain compression by stream length.** The stream length N_sto = 2^n − 1
  is a run-time input. Long streams (n = 10, 1023 cycles) give a wide dynamic
  range. Short streams make the arithmetic coarser, so weak components vanish
  and strong ones still pass. The design uses this accuracy loss as a
  level-dependent gain control, the way the cochlea compresses loud sounds.

This RTL implements the filterbank architecture of the chip described in
*"An area/power-aware 32-channel compressive gammachirp filterbank chip based
on hybrid stochastic/binary computation"*. That publication gives the
structure, the stochastic circuit elements and the FRNG rule. It does not give
the widths, the interfaces, the coefficient values or the control logic. Those
are this design's own choices, marked as such below and in each file's header.

## Structure

```
gc_filterbank                       top: 32 channels, shared control and RNG
├── sc_op_ctrl                      operation sequencer (N_sto stochastic + 1 binary cycle)
├── frng_lfsr                       FRNG: one LFSR, period N_sto, state + bit-reversed state
└── gc_channel  x32                 one gammachirp filter, channel index 0..31
    └── sc_biquad  x8               2nd-order IIR section, sections 0-3 gammatone,
        │                           sections 4-7 asymmetric compensation
        ├── sc_b2s  x10             binary-to-stochastic: 5 operands + 5 coefficients
        ├── sc_mult x5              AND (magnitudes) + XOR (signs)
        └── sc_s2b  x5              stochastic-to-binary: ones counter, scale, sign
gc_pkg                              widths, types, LFSR taps, coefficient functions
```

The channel response is G_C(f) ≈ G_T(f)·H_C(f). G_T is a 4th-order gammatone
filter, four sections in cascade. H_C is an asymmetric compensation filter,
four more sections whose poles and zeros sit on opposite sides of the centre
frequency and tilt the passband. All 256 sections work in parallel, and all
of them share one controller and one LFSR.

After synthesis to generic cells the full design is about 28.7 k word-level
cells and 21 k flip-flop bits. Most of the flip-flops are the 1280 ten-bit
S2B counters and the 256 × 5 eleven-bit section registers.

## How one operation works

An *operation* processes one input sample. It lasts N_cyc = 2^n clock cycles:

| cycles | name | what happens |
|---|---|---|
| 0 … N_sto−1 | stochastic | LFSR steps; every B2S compares; every AND output is counted |
| N_sto | binary (`bin`) | counts become signed numbers, five are summed per section; registers shift; new input sample taken |

The clock must therefore run at f_s · 2^n: 49.15 MHz for f_s = 48 kHz and
n = 10. The published text says both "N_sto = N_cyc − 1" and "clock = f_s ·
N_sto". This design follows the first statement and spends one extra cycle per
sample on the binary step.

### Number formats

* **Samples** are signed 11-bit two's complement. For streaming, a sample is
  split into a sign bit and a 10-bit magnitude m. The code −1024 is clamped to
  magnitude 1023.
* **Coefficients** are a sign and a 10-bit magnitude with one integer bit. The
  LSB is 2^−9, so the range is (−2, 2). That is enough for a1 of every stable
  section. A section stores {b0, b1, b2, −a1, −a2}, so its output is the plain
  sum of five products.

### B2S → AND/XOR → S2B, exactly

Let n be the LFSR width and r_t (t = 0 … N_sto−1) the LFSR states in one
period. Every value 1 … 2^n−1 appears exactly once.

* **B2S** (`sc_b2s`): the operand stream bit is `m_top >= r_t`, where
  `m_top = m >> (10 − n)`. Over one period this stream contains exactly
  `m_top` ones.
* **Coefficient B2S** uses the same comparator. It is fed with `rev_n(r_t)`,
  the n LFSR bits in reversed order. Bit reversal keeps the
  one-of-each-value property but breaks the shift relation between
  successive states. As a result the two stream families are nearly
  uncorrelated.
* **Multiply** (`sc_mult`): the product bit is the AND of the two stream bits,
  and the product sign is the XOR of the two signs.
* **S2B** (`sc_s2b`): counts the product ones, c ≈ m_top · c_top / 2^n. In
  the binary cycle it outputs `±(c << (11 − n))`. That shift puts the product
  back in sample LSBs for any n: 10 − n for the magnitude truncation, plus 1
  for the coefficient's integer bit.
* **Sum and saturate** (`sc_biquad`): the five signed products are added and
  the sum is clipped to ±1023. The result is the new output y[t].

With FRNG the count is a deterministic function of the two magnitudes. With
bit reversal at n = 10 it deviates from the ideal product by 0.6 counts rms
(worst case about 2.5 counts) over random operand pairs.

A first version drove the coefficients from a second LFSR with the reciprocal
polynomial. It had about 4 counts rms of error, correlated between operands,
and channel 28 lost its passband altogether: about −7 dB everywhere. Choosing
how the second random value is made is therefore the most consequential
decision the publication leaves open.

### Timing of the cascade

A section computes y[t] from the samples it already holds. In the binary cycle
it hands y[t] straight to the next section (`y_new`), which takes it as its
next input at the end of that cycle. Each section thus adds one operation of
latency. An input sample reaches the channel output **8 operations** after it
is taken, and the binary-cycle adder depth stays at one section.

### Top-level interface (`gc_filterbank`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock at f_s·2^n; asynchronous active-low reset |
| `n_sel` | in | 4 | requested LFSR width n (N_sto = 2^n − 1). It is sampled in the binary cycle and clamped to 3…10 |
| `x_in` | in | 11 | input sample, taken at the end of the cycle in which `x_take` is high |
| `x_take` | out | 1 | binary cycle |
| `y[32]` | out | 32 × 11 | channel outputs, index 0 = 20 Hz … 31 = 20 kHz |
| `y_valid` | out | 1 | high in the first cycle of an operation, when `y` has just been updated |
| `n_cur` | out | 4 | width in use during this operation |
| `sat_any` | out | 32 | a section of that channel saturated in the last operation |

When n changes, the LFSR restarts from its seed. The new operation
then begins at the start of its own period. The external clock is expected to
be retuned to f_s·2^n.

## Coefficients

`gc_pkg` computes all 1280 coefficients at elaboration, using real-valued
constant functions. No table file is involved.

* **Channel frequencies**: equally spaced on the ERB-number scale
  ERBN(f) = 21.4·log10(0.00437·f + 1), from 20 Hz to 20 kHz.
  ERB(f) = 24.7 + 0.108·f. This reproduces the published 32-entry table:
  channel index 27 (channel 28 counted from 1) is 11 239.8 Hz.
* **Gammatone, sections 0–3**: poles r·e^{±jθ} with r = exp(−2π·b·ERB/f_s),
  θ = 2π·f_r/f_s and b = 1.019. Each section has one zero at
  r·(cos θ ± √(3 ± 2^1.5)·sin θ), and the four sections take the four sign
  combinations. This is the usual four-biquad factorisation of the 4th-order
  gammatone.
* **Compensation, sections 4–7 (k = 1…4)**: poles r_k·e^{±jφ_k} and zeros
  r_k·e^{±jϕ_k}, where
  * r_k = exp(−k·p1·2π·b·ERB/f_s),
  * φ_k = 2π(f_r + p0^{k−1}·p2·c·b·ERB)/f_s,
  * ϕ_k = 2π(f_r − p0^{k−1}·p2·c·b·ERB)/f_s,
  * p0 = 2, p1 = 1.35 − 0.19|c|, p2 = 0.29 − 0.004|c|, c = −2.
* Every section's numerator is scaled to unit gain at f_r. Values are rounded
  to the 2^−9 grid, and magnitudes saturate at 1023.

The published text prints φ_k with an extra factor 2π inside the frequency
offset. That would put the 4th compensation pole more than 10 kHz away from a
4 kHz centre frequency, so the standard form above is used. The values of p0,
p1, p2, c and the gammatone section form are not printed in the publication;
the ones used here are the commonly published IIR-gammachirp values. To change
the filter set, edit `sec_tap_real` in `gc_pkg`. `C_CHIRP`, `B_ERB`, `FS`,
`F_LO` and `F_HI` are package constants.

## Stream length and gain compression

`tb_ch28_response` measures channel index 27 with 500-amplitude tones
(gain = output RMS relative to input RMS):

| tone | n = 10 (N_sto 1023) | n = 6 (63) | n = 4 (15) |
|---|---|---|---|
| 2.0 kHz | −26.9 dB | below resolution (output 0) | – |
| 5.6 kHz | −22.3 dB | | |
| 8.0 kHz | −10.8 dB | | |
| 11.24 kHz (f_r) | +1.6 dB | +5.8 dB | output 0 |
| 14.0 kHz | −22.3 dB | | |
| 22.0 kHz | −27.9 dB | | |

At full length the channel is a band-pass with about 25–30 dB of selectivity.
In this coefficient set the lower skirt is shallower than the upper one.
Shorter streams keep the strong in-band component and discard weaker ones,
which narrows the dynamic range. At n = 4 nothing passes. An idealised
floating-point model with the same quantised coefficients gives −42 dB at
2 kHz and −59 dB at 22 kHz, so the stochastic arithmetic costs roughly
15–30 dB of stop-band depth.

## Departures and open points

* **Own choices, not in the publication:** all widths beyond the 11-bit
  input; the coefficient format; the comparison `>=` and the top-n-bit
  truncation for short streams; the S2B scaling; saturation; the bit-reversed
  coefficient random value; LFSR polynomials and seed; reseeding on an n
  change; the n range 3…10 (only n = 10 is named in the publication); the
  `x_take`/`y_valid` interface; the parallel 32-output port; one operation of
  latency per section; asynchronous reset.
* **Coefficients are fixed at elaboration** (`COEF` parameter per section). The
  publication does not say whether the chip's coefficients are programmable.
* **Low channels are coarse.** At f_s = 48 kHz the poles of the channels
  below a few hundred hertz lie within 0.005–0.01 of the unit circle.
  Neither the 2^−9 coefficient grid nor a 1023-cycle stream (resolution
  1/1023) can place them faithfully. Plain rounding puts a pole exactly on
  the unit circle for channels 0–4 (≤ 210 Hz), and the section then locks
  into saturation. The coefficient functions therefore limit −a1 to
  1 + a2 − 2^−9. With that limit the first section of channel 3 (152 Hz)
  follows a 163 Hz tone without saturating. Its error against an ideal
  section is still larger than the signal: RMS 725 against 504
  (`tb_sec1_163hz`). The higher channels, such as channel 28 above, behave
  as band-pass filters. `sat_any` reports saturation, and the end-to-end test
  sees it in several channels with full-scale inputs.
* **Not built:** the conventional free-running RNG, which the publication only
  uses for comparison. Also not built: the pads, supply and silicon-level
  items, and the external FPGA that supplies samples and clock.

## Simulating

Each testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. Compile with the package files first, for
example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_gc_filterbank \
    rtl/gc_pkg.sv tb/gc_ref_pkg.sv rtl/*.sv tb/tb_gc_filterbank.sv
./obj_dir/Vtb_gc_filterbank
```

`tb/gc_ref_pkg.sv` is an integer reference model written from the number
formats above. It has its own LFSR from tap lists, counts products cycle by
cycle, and steps sections. Every datapath test compares the RTL with it bit
for bit.

| testbench | what it checks |
|---|---|
| `tb_sc_mult` | all input combinations; product density on a grid |
| `tb_sc_b2s` | sign/magnitude split, −1024 clamp, exact ones count per period for n = 3…10 |
| `tb_sc_s2b` | scaled, signed count for random streams; restart per operation |
| `tb_frng_lfsr` | sequence = reference; every value once; period exactly N_sto over two operations; bit-reversed output; hold and reseed |
| `tb_sc_op_ctrl` | 2^n-cycle operations, single binary cycle, clamping, reseed on change, `out_valid` |
| `tb_sc_biquad` | default and high-gain sections vs model, impulse latency, saturation, n changes |
| `tb_gc_channel` | elaborated coefficients against independently computed values; all 8 section outputs vs model; per-section latency |
| `tb_gc_filterbank` | full default size, all 32 channels vs model. Covers impulse latency of 8 operations, tones, n = 10 → 6 → 3 (clamped) → 10 → 8, operation length, saturation flags |
| `tb_ch28_response` | the measurement table above, with every output also checked against the model |
| `tb_sec1_163hz` | first-section output of channel 3 for a 163 Hz tone vs model and vs an ideal section; identical output when the run is repeated from reset |

The full-size test (`tb_gc_filterbank`, all parameters at their defaults)
takes about a minute to compile and under a second to run.
