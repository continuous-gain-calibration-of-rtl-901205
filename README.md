# Parallel delta-sigma A/D converter with continuous gain calibration

A parallel delta-sigma (ΠΔΣ) converter runs M identical delta-sigma channels
side by side on the same input. Each channel multiplies the input by its own
±1 Hadamard sequence before its modulator and multiplies the decimated result
by the same sequence again afterwards. Summed, the channels rebuild the input
at M times the bandwidth a single channel would give at the same clock. The
weak point is matching: if the channels' gains differ by only 1 %, the
sequences no longer cancel and the spectrum fills with modulation images.

This design removes those gain errors while the converter runs. It adds one
more channel, modulated with a ±1 sequence `s_c` that is itself a linear
combination of all M Hadamard sequences. Its output is therefore, up to noise,
a fixed linear function of the M channel outputs taken before demodulation. The
weights of that function reveal each channel's gain. An LMS filter tracks the
weights and turns them into one gain correction per channel.

The RTL is SystemVerilog (IEEE 1800-2017). The digital back end
(`pids_backend`) is synthesizable. The analog parts (mixers, modulators) are
behavioural models, so the full converter (`pids_adc`) runs in simulation.

## Signal path

For channel r = 1..M, in the order the data flows:

    x[n] ─(× s_r[n])─ ΔΣ ─ H(z) ─ ↓D ─┬─(× p_r)─(× c_r)─┐
                                      │                  Σ ── y
                                      └──> LMS <── calibration channel (× s_c, ΔΣ, H(z), ↓D)
                                            │
                                            └──> c_1 .. c_M

* **Modulation sequences.** `s_r[n]` is row r−1 of the M×M Sylvester Hadamard
  matrix (`H = [H H; H −H]`). Each element is held for D samples, D being the
  oversampling ratio. Channel 1 gets all ones, so it acts as an ordinary
  converter. The demodulation sign `p_r` is the same sequence read once per
  decimated sample.
* **Analog channel** (`dsm_channel_model`). This model applies the mixer, the
  channel's gain `a_r` and offset `b_r`, and a 4th-order modulator. The
  modulator is an error-feedback loop with noise transfer function
  (1 − z⁻¹)⁴, signal transfer 1 and a 10-bit quantiser (LSB = 2/512).
* **H(z) and ↓D** (`cic_decimator`). This is a CIC filter one Hadamard period
  long (M·D input samples), with output every D samples. At the default order 1
  the Hadamard sequences cancel exactly: the demodulated sum is M times the sum
  of the input over each block of D samples. `tb_pids_backend` checks this bit
  for bit. Higher orders (`CIC_ORDER`) filter the modulator noise harder, but
  then the signal is no longer rebuilt exactly.
* **Correction and sum** (`channel_correct`, `output_combiner`). Each `w_r` is
  sign-flipped by `p_r`, multiplied by `c_r` and summed into `y`.

## The calibration channel

The calibration sequence must satisfy `s_c[n] = Σ α_r s_r[n]`. Every α_r must
be non-zero and all must have the same magnitude, so that each channel counts
equally. `s_c` must take only the values ±1, so that the extra channel can be
identical to the others. For M = 16 this needs |α_r| = 1/4.

Because the Hadamard matrix is its own inverse up to 1/M, α is the Walsh
transform of `s_c`. A sequence whose Walsh transform is flat in magnitude is a
*bent function*. This design uses

    s_c[j] = (−1)^(j0·j1 ⊕ j2·j3)        (j = Hadamard column, bits j3..j0)

This function is its own dual, so α_r = ¼·(−1)^(r0·r1 ⊕ r2·r3). The same
construction works for any M that is a power of 4 (|α_r| = 1/√M). The package
`pids_pkg` holds these functions. `tb_hadamard_seq_gen` checks through the
Walsh transform that the generated `s_c` really has these coefficients.

With channel gains `a_r`, offsets `b_r` and calibration-channel gain `a_c`, the
decimated outputs satisfy

    w_c = β_0 + Σ β_r w_r,   β_r = α_r · a_c / a_r,   β_0 = b_c − Σ β_r b_r

so `c_r = β_r / α_r = a_c / a_r`. Scaling each channel by `c_r` gives every
channel the same gain `a_c`. Only a common gain error remains, and that does
not create images.

## LMS calibrator (`lms_calibrator`)

Once per decimated sample the calibrator does two steps:

1. It computes `e = w_c − β_0 − Σ β_r w_r` at full precision and registers it,
   together with the `w_r`.
2. It updates `β_r += 2^−MU_LOG2 · e · w_r` and `β_0 += 2^−MU0_LOG2 · e`.

Number formats:

* `β_r` is signed, 34 bits wide with 30 fraction bits. It saturates at its
  range.
* `β_0` has the width of `w` plus 32 bits.
* `c_r` is `β_r` with the sign of α_r applied, read with 28 fraction bits,
  because |α_r| = 2⁻². No divider is needed.

After reset `β_r = α_r` (all `c_r = 1.0`). `adapt_en` low freezes the
coefficients.

Step size: `MU_LOG2 = 29` suits channel outputs of about 700 LSB rms, which is
what a half-scale random input produces with the default 10-bit modulators. It
gives a time constant of roughly 1000 decimated samples, so the corrections
settle within a few thousand samples; a larger step settles faster but
jitters more. If the signal level or
`Q_BITS` changes, change `MU_LOG2` by 2 per factor of 2 in channel amplitude.
The testbenches show this: `tb_pids_backend` uses 12-bit codes with
`MU_LOG2 = 33`. The offset weight `β_0` has its own, larger step, because its
regressor (the constant 1) is tiny next to `w_r`. The design estimates `β_0`
but does not correct offsets.

## Timing

* One input sample per clock. The sequence generator's signs go out
  combinationally from its column counter.
* The modulator registers its code. `LAT = 1` delays the decimation strobe and
  the demodulation column by that one clock.
* A block's last code reaches the CIC one clock after the sample. `w` appears
  one clock later, `z` (corrected) one clock after that, and `y` one clock
  after that. `y_valid` pulses once every D clocks.
* The LMS calibrator updates the coefficients two clocks after `w`. A sample
  is therefore corrected with the coefficients learned from the samples before
  it. This needs D ≥ 2.

## Modules

| file | what it is |
|---|---|
| `rtl/pids_pkg.sv` | Hadamard element, calibration sequence, α signs |
| `rtl/hadamard_seq_gen.sv` | modulation, calibration and demodulation signs, decimation strobe |
| `rtl/dsm_channel_model.sv` | behavioural analog channel: mixer, gain/offset error, 4th-order ΔΣ |
| `rtl/cic_decimator.sv` | H(z) and ↓D |
| `rtl/channel_correct.sv` | × p_r, × c_r |
| `rtl/output_combiner.sv` | Σ over the channels |
| `rtl/lms_calibrator.sv` | LMS estimation of β, output c |
| `rtl/pids_backend.sv` | synthesizable digital part, M + 1 channels |
| `rtl/pids_adc.sv` | simulation top: M + 1 analog models and the back end |

Default parameters: M = 16 channels, D = 6, `Q_BITS` = 10, `CIC_ORDER` = 1,
34-bit coefficients with 30 fraction bits, `MU_LOG2` = 29, `MU0_LOG2` = 8. In
`pids_adc`, `GAIN_ERR` = 0.01 gives channel k the gain
1 + 0.01·(((5k+2) mod 9) − 4)/4, a spread over ±1 %. The calibration channel
is k = 17.

## What is taken from the converter's definition, and what is not

Taken from the definition:

* the architecture: M Hadamard-modulated channels plus one calibration
  channel, calibration from the outputs before demodulation, correction after
  demodulation;
* the Hadamard construction and the D-fold repetition;
* the ±1/4 coefficient magnitude;
* the LMS estimate and `c_r = β_r/α_r`;
* the evaluated configuration: 16 channels, D = 6, 4th-order modulators,
  ±1 % gain errors, 4096 calibration samples.

Choices made in this design:

* the particular calibration sequence (the bent function);
* the filter H(z), a one-period CIC;
* the modulator topology and its 10-bit quantiser;
* all word lengths, step sizes, reset values and the pipeline;
* the gain-error pattern.

Published simulations of this method report 38 dB SNR uncalibrated and
109 dB calibrated with multi-tone inputs. Those numbers depend on a
decimation filter and modulators that are not specified, and this design does
not reproduce them.
With the one-period CIC, the modulator noise that passes the filter limits the
result to about 50 dB signal-to-error. The gain-error images themselves are
removed: the corrections settle to about 10⁻³ of `a_c/a_r`.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=F` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_hadamard_seq_gen` | signs against a matrix built by the block recursion; strobe period and latency; `p_r` column; α of `s_c` = ±1/4 with the package's signs |
| `tb_dsm_channel_model` | four running sums of (output − gain·s·x − offset) stay within ±LSB/2, which checks unit signal transfer and (1 − z⁻¹)⁴ noise shaping |
| `tb_cic_decimator` | exact match with direct convolution, for order 1 (default) and order 3 (wrap-around) |
| `tb_channel_correct` | exact `floor(p·w·c/2^C_FRAC)`, latency |
| `tb_output_combiner` | exact sum including extreme values, latency |
| `tb_lms_calibrator` | exact first error; freeze; c_r within 5·10⁻⁴ of a_c/a_r after 4096 samples of synthetic data; β_0 |
| `tb_pids_backend` | with ideal quantisers: signs every sample; every output bit-exact with calibration frozen; c_r within 2·10⁻³ after 4096 samples; error reduced |
| `tb_pids_adc` | full converter at its defaults (no overrides), random input: frozen, then 4096 calibrating samples, then measurement. c_r within 1.5·10⁻³; overall scale equal to a_c; rms error below 60 % of the uncalibrated error |
| `tb_pids_adc_multitone` | three tones uncalibrated, calibration on random input, three tones calibrated: signal-to-error improves by at least 3 dB (measured ≈ 43.7 → 51.2 dB) |

Each testbench runs in well under a second. To simulate one with Verilator:

    verilator --binary --timing -Irtl -y rtl -y tb rtl/pids_pkg.sv tb/tb_pids_adc.sv \
              --top-module tb_pids_adc -o sim
    ./obj_dir/sim

## Limits

* Offsets are estimated (`β_0`) but not corrected. Channel offsets, when
  present, still appear as tones after demodulation.
* The demodulation alignment assumes the order-1 CIC. With a higher
  `CIC_ORDER`, the filter's group delay is not compensated in `p_r`.
* `M` must be a power of 4. Otherwise no ±1 calibration sequence with
  equal-magnitude coefficients of this form exists.
* `pids_adc` uses real-valued models and cannot be synthesized; use
  `pids_backend` for implementation.
