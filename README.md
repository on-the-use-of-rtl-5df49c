# PCM/FM demodulator for FPGAs

This design receives telemetry sent as PCM/FM: a 1 Mbit/s NRZ bit stream that
frequency-modulates a carrier. The receiver gets the signal on a 70 MHz
intermediate frequency (IF), sampled at 100 Msamples/s. It returns the
recovered bits and a bit clock. Every step after the converter is
discrete-time:

```
ADC 100 Ms/s ─► quad_mixer ─► fir_decim (I) ─┐            ┌─► downsampler ─► timing_sync ─► bit_data
  70 MHz IF      (DDS LO)     fir_decim (Q) ─┴► fm_pll_demod ┘     5:1            early-late    bit_clk
                              469 taps, 5:1       PLL discriminator  4 Ms/s        timing PLL    bit_valid
                              100 → 20 Ms/s       at 20 Ms/s         4 samples/bit
```

The FM discriminator is a second-order phase-locked loop (PLL). A DDS (direct
digital synthesizer) follows the phase of the baseband signal, and the loop
filter's output, the DDS frequency word, is the demodulated signal. This is the
smallest of the usual discrete-time FM demodulators. Its cost is that the whole
loop must settle in one sample period. Bit timing is recovered by a
conventional interpolating timing loop with an early-late detector that works
at 4 samples per bit.

## Rates and schedule

The whole receiver runs from one 100 MHz clock with one synchronous,
active-high reset. The slower sections do not have clocks of their own. Each
block passes a one-cycle `valid` strobe to the next, and a block works only on
cycles when its input strobe is high:

| point                      | rate          | strobe         | width  |
|----------------------------|---------------|----------------|--------|
| ADC samples                | 100 Ms/s      | `adc_valid`    | 14 bit |
| mixer output (I, Q)        | 100 Ms/s      | internal       | 16 bit |
| baseband after FIR         | 20 Ms/s       | `bb_valid`     | 12 bit |
| discriminator output       | 20 Ms/s       | `disc_valid`   | 12 bit |
| PCM pulse train            | 4 Ms/s        | `pcm_valid`    | 12 bit |
| recovered bits             | 1 Mbit/s      | `bit_valid`    | 1 bit  |

The 5:1 rate changes come from counters in `fir_decim` and `downsampler`.
`adc_valid` may have gaps. Every stage counts input strobes, not clock cycles.

## The PLL discriminator (`fm_pll_demod`)

The loop has three parts:

* `dds`: a 32-bit phase accumulator. Its top 10 bits address a 1024-entry,
  12-bit cosine table. The sine is read from the same table a quarter turn
  back.
* `phase_error_detector`: `e = Q·cos θ − I·sin θ`, the imaginary part of the
  input multiplied by the conjugate of the oscillator. This equals
  `A·sin(φ − θ)`, where `A` is the input amplitude. The result is rounded to
  18 bits. A one-radian error at full-scale input gives about 2^15.
* `loop_filter`: `integ += K2·e`, `v = K1·e + integ`. Both sums saturate at
  32 bits.

`v` is the DDS phase step in units of 2^-32 turn per sample. The output is
`v >>> 17`, saturated to 12 bits: 1 LSB is 305 Hz and ±2047 is ±625 kHz.

**One-cycle loop.** The DDS table read, the detector and the loop filter are
combinational logic between the phase register and the integrator register.
Both registers update on the same `in_valid`, so the loop has exactly one
sample of delay, the textbook second-order loop. This puts two multipliers,
an 18×44 multiply and several adders on one register-to-register path. The
loop could be pipelined across the five clocks each 20 Ms/s sample has, but
that would add loop delay and change the dynamics. It is left single-cycle.

**Gains.** `loop_filter` takes the parameter set of a library loop-filter core:

| parameter  | value | meaning                                    |
|------------|-------|--------------------------------------------|
| `ACC_W`    | 32    | accumulator and output width               |
| `LOOP_BW`  | 0.2   | normalised loop noise bandwidth Bn·T       |
| `DAMPING`  | 1.0   | damping factor ζ                           |
| `KP`, `K0` | 1.0   | detector and DDS gains                     |
| `SPS`      | 1     | samples per symbol N                       |
| `K_PREC`   | 44    | width of the gain constants                |
| `ORDER`    | 2     | 2 keeps the integrator, 1 drops it         |

From these, at elaboration:

```
θ  = Bn·T / (ζ + 1/(4ζ)) / N
K1 = 4ζθ / (1 + 2ζθ + θ²) / (Kp·K0)
K2 = 4θ²  / (1 + 2ζθ + θ²) / (Kp·K0)
```

The gains are then converted to integers with 24 fractional bits.
`GAIN_SCALE` is the number of DDS units per detector unit for one radian:
(2^32/2π)/2^15. At Bn·T = 0.2 per 20 Ms/s sample, the loop's noise bandwidth
is 4 MHz.

**Bandwidth reading.** The source design gives two bandwidths for this loop:

* a normalised loop bandwidth of 0.2 in the core's settings;
* a "closed loop bandwidth of 200 kHz" in its test description.

At 20 Ms/s, 200 kHz would be Bn·T = 0.01. A floating-point model of this
receive chain with Bn·T = 0.01 cannot follow 1 Mbit/s data with modulation
index 0.7: about 40% of bits are wrong even without noise. With 0.2 the data
comes out clean. The default is therefore 0.2. Set `LOOP_BW = 0.01` to get the
other value.

**Signal level.** The loop's real bandwidth scales with the input amplitude,
because the detector gain is `A`. The gains assume `KP = 1`, a full-scale
phasor. The FIR output stage therefore applies a gain of 8. An IF signal at
0.2 of ADC full scale then arrives at about 0.8 of full scale. In the
system, an LNA ahead of the converter sets this level. There is no AGC.

## The IF filter (`fir_decim`)

There are two identical filters, one per rail: 469 taps at 100 Ms/s, 5:1
downsampling. The coefficients are a Hamming-windowed sinc. They are computed
at elaboration from `CUTOFF_HZ`, normalised to unity DC gain, and stored as
18-bit values with 24 fractional bits.

The filter computes only the outputs that are kept. Output
`y[n] = Σ h[k]·x[n−k]` is split by tap residue `j = k mod 5`. While sample
`x[n−j]` enters, the filter adds the taps with that residue. Tap
`k = 5q + j` then always sits at delay-line position `5q`. So one multiplier
bank serves all five phases, with the coefficient set chosen by a phase
counter (4, 3, 2, 1, 0).

The taps are also symmetric, `h[k] = h[468−k]`. Each multiplier therefore
takes the sum of a sample and its mirror sample. The mirror of tap `k` sits
at position `468 − k − j`, which depends on the phase, so a 5-way
multiplexer picks it. The centre tap, `h[234]`, has no partner. The result is
47 multipliers (17×18 bits) per rail doing the work of 469.

The accumulator clears after the phase-0 sample. The result is scaled by
2^(GAIN_SHIFT) into 12 bits with rounding and saturation.

**Bandwidth.** The specification is a 3-dB bandwidth of 200 kHz and a
transition band of 678 kHz. A 469-tap Hamming window at 100 Ms/s gives a
transition band of about 0.7 MHz, which matches. The default cutoff,
265 kHz, puts the one-sided 3-dB point at 200 kHz. That is the literal
reading, and it filters a 1 Mbit/s, ±350 kHz-deviation signal hard. The BER
results below show the cost. If 200 kHz is read as the pass-band edge, the
cutoff becomes 539 kHz (200 + 678/2). That setting performs much better. It
is available as `CUTOFF_HZ` (and `FIR_CUTOFF_HZ` on the top).

## Bit timing recovery (`timing_sync`, `farrow_interp`)

The input is the discriminator output at 4 samples per bit. The loop works as
follows:

1. **Interpolation control.** A 32-bit modulo-1 counter `η` counts down by
   `W` on every sample. `W` is nominally 1/2, so the counter underflows twice
   per bit. An underflow at sample m marks an interpolation instant `m + μ`.
   In principle `μ = η/W`; the design uses `2η`, which is exact at the
   nominal `W` and off by the small loop correction otherwise.
2. **Interpolation.** `farrow_interp` is a piecewise-parabolic Farrow
   interpolator with α = 1/2, so all its coefficients are shifts. It uses
   x(m−1)…x(m+2). The newest sample is x(m+2), so the interpolant comes two
   samples after its instant.
3. **Early-late detector.** Strobes alternate between on-time and mid-bit.
   At each mid-bit strobe the detector forms
   `e = sign(on-time) · (late mid-bit − early mid-bit)`. This is negative
   when the on-time strobe is late.
4. **Loop filter and counter step.** `loop_filter` (Bn·T = 0.01 per bit,
   ζ = 1) updates once per bit. The new step is `W = 1/2 − v`, limited to
   3/8…5/8, so a late estimate makes the strobes come sooner.

Outputs:

* `bit_data` is 1 for a positive on-time sample, meaning frequency above the
  carrier. `bit_valid` pulses once per bit.
* `bit_clk` goes low when a new bit is put out and high at the next mid-bit
  strobe, so its rising edge is in the middle of the data bit.

If the loop happens to lock with the on-time and mid-bit roles swapped, that
point is unstable for an early-late detector, and the loop moves on to the
right one.

## Departures from the source design, and what is this design's own

Only the things listed here come from the source design:

* the rates (100/20/4 Ms/s, 70 MHz IF, 1 Mbit/s, 4 samples/bit);
* a 469-tap low-pass IF filter per rail, with its bandwidth figures;
* a PLL discriminator with damping 1 and the loop-filter parameter set above;
* 12-bit I/Q and discriminator words;
* an early-late timing loop.

Everything else was chosen for this design:

* **Clocking.** One clock with valid strobes replaces the separate 100, 20
  and 4 MHz clock domains.
* **Oscillators.** The DDS size and the mixer's DDS local oscillator.
* **Filters.** Window-method FIR coefficients, the polyphase structure and
  the ×8 output gain. The downsampler to 4 Ms/s keeps one sample in five with
  no filter.
* **Detector.** The cross-product phase detector.
* **Timing loop.** The structure of the timing loop: counter, parabolic
  interpolator and detector form. Its bandwidth (0.01 per bit) and gain
  estimates.
* **Word widths.** The 14-bit ADC and every width not listed in the rates
  table.
* **Outputs.** Bit polarity and bit clock phase.

The two bandwidth readings above are the largest open questions. Both are
parameters.

The design leaves out:

* the discriminator options built from a CORDIC or from a divider;
* analog parts (ADC, LNA, mixers);
* board I/O.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench                  | what it checks |
|----------------------------|----------------|
| `tb_dds`                   | cosine/sine against a reference phase for four frequency words; phase held when disabled |
| `tb_quad_mixer`            | I/Q against `x·cos`, `−x·sin` for random samples; a 70 MHz tone mixes to DC |
| `tb_fir_decim`             | impulse response equals the recomputed taps in polyphase order; DC gain; 100 kHz passband; −3 dB at 200 kHz; 1.5 MHz stop band; one output per 5 inputs, with gaps in the input strobe |
| `tb_phase_error_detector`  | exact arithmetic on random inputs; `A·sin` law and sign |
| `tb_loop_filter`           | integer model of the gains and update rule, enable gating, first-order mode, saturation |
| `tb_fm_pll_demod`          | frequency steps from −250 kHz to +600 kHz: settling within 30 samples, mean within 2 LSB, residual phase error |
| `tb_downsampler`           | 1-in-5 selection with irregular strobes |
| `tb_farrow_interp`         | exact on lines, matches the parabolic formula, sinusoid accuracy |
| `tb_timing_sync`           | raised-cosine bit stream with ±0.2% rate offset: no bit errors after acquisition, `W` moves the right way, one bit clock per bit |
| `tb_pcmfm_demod_top`       | the whole receiver at default parameters: PN15 PCM/FM at 70 MHz IF with a 500 ppm fast bit clock and small noise, 4000 bits, rates at every stage, both signs of PLL error, both timing corrections, zero errors after 150 bits |
| `tb_ber_sweep`             | bit error rate against Eb/N0 in Gaussian noise, default and wide IF filter side by side |

Results of `tb_ber_sweep` (6000 bits per point, 0.2 of full scale at the ADC,
modulation index 0.7, NRZ with no premodulation filter). The error rate is
estimated as the number of PN-recurrence mismatches divided by 3:

| Eb/N0 | default filter (3 dB at 200 kHz) | wide filter (cutoff 539 kHz) |
|-------|----------------------------------|------------------------------|
| 6 dB  | 0.15                             | 0.12                         |
| 9 dB  | 0.13                             | 1.0e-2                       |
| 12 dB | 0.11                             | 3.4e-4                       |
| 15 dB | 1.2e-2                           | 0 in 5799                    |

A floating-point model of the same chain with ideal bit timing gives the same
default-filter error rate (2.8% at 12 dB at 0.15 full scale). The fixed-point
design is therefore not the limit. The default filter bandwidth is.

### Running the testbenches with Verilator

Each testbench needs the package first. Verilator finds the modules in
`rtl/` by file name (`-y`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/pcmfm_pkg.sv tb/tb_pcmfm_demod_top.sv --top-module tb_pcmfm_demod_top
./obj_dir/Vtb_pcmfm_demod_top
```

Run times:

* `tb_pcmfm_demod_top`: a few seconds;
* `tb_ber_sweep`: about a minute;
* every other testbench: under a second.

Testbenches that need randomness use `$urandom`.

## Size

The design uses:

* **FIR filters:** 47 multipliers (17×18) per rail, 94 in all.
* **Mixer and detector:** 2 each.
* **Interpolator:** 2.
* **Loop filters:** two 18×44 and two 16×44 multiplies, about three DSP
  slices each.

That comes to roughly 112 DSP slices. A Virtex-4 SX35 has 192. The cosine
tables (1024×12) and the FIR coefficients are computed at elaboration. No
memory files are needed.
