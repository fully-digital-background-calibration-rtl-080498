# Background calibration of channel mismatches in a time-interleaved ADC

A time-interleaved ADC (TIADC) reaches a high sample rate by letting M slower
sub-ADCs take turns. Sub-ADC i converts samples i, i+M, i+2M, ... and a
multiplexer merges their outputs into one stream at fs. The sub-ADCs are
never identical. Each one has its own:

- **offset** O_i
- **gain error** g_i
- **sampling-instant error (skew)** r_i

A sample of channel i is therefore

    y_i[k] = (1 + g_i) * x((kM + i) Ts + r_i) + O_i

Because the errors repeat every M samples, they show up as spurs in the
spectrum:
- The offsets give fixed tones at k·fs/M.
- Gain and skew errors give images of the input at ±f_in + k·fs/M.

With the four-channel error set used for verification, the worst spur is
about 20 dB below the signal.

This RTL removes all three errors digitally, in the background, while the
converter runs on its normal input. No calibration signal and no
interruption are needed:

1. Each channel's **offset** is estimated as the mean of its own samples and
   subtracted.
2. The **gain and skew** errors are decomposed on the rows of a Hadamard
   matrix. For each row, the design builds a replica of the image that row
   would produce. A weighted sum of these replicas, the *pseudo aliasing
   signals*, is subtracted from the stream.
3. The weights come from LMS loops. They correlate the corrected output,
   with the input signal notched out, against the pseudo aliasing signals,
   and keep adjusting until no image is left.

At the default parameters (M = 4, 12-bit sub-ADCs, a 33-tap derivative
filter), the end-to-end test reduces the spurs from about -20 dBc to below
-100 dBc.

## Data path

    sub-ADC frames ──► tiadc_mux ──► offset_cal ──► deriv_fir ──► pseudo_alias_gen ──► mismatch_corrector ──► y_c
                                                                                            ▲            │
                                                                                    w_gk, w_rk           │
                                                                                            │            ▼
                                                                                      mismatch_estimator ◄┘
                                                              (deriv_fir, pseudo_alias_gen, notch_filter, 2(M-1) × lms_correlator)

The design processes one interleaved sample per clock, so the clock runs at
fs. Every sample travels with a valid bit and its channel index i = n mod M.
The index selects the offset to subtract and the Hadamard signs to apply.

| stage | latency |
|---|---|
| `tiadc_mux` | frame accepted at edge t; words leave at t+1 .. t+M |
| `offset_cal` | 1 clock |
| `deriv_fir` | (NTAPS-1)/2 = 16 samples of centring delay, then 2 clocks |
| `pseudo_alias_gen` | 1 clock |
| `mismatch_corrector` | 1 clock |

After reset, the first corrected sample leaves 6 clocks after the first
frame. That sample is the one 16 samples older, taken from the zero-filled
delay line. In steady state, a sample leaves 16 samples plus 5 clocks after
the multiplexer emitted it. All estimates start at zero after reset. Until
they settle, the output is simply the uncorrected stream, delayed.

## Offset calibration (`offset_cal`)

With a zero-mean input, the mean of a channel's own samples equals its
offset. Each channel has its own accumulator. After N = 2^LOG2_NAVG samples
of that channel (default 1024), the sum is divided by N (an arithmetic
shift with rounding). The result replaces the channel's estimate, and the
accumulator restarts. Every sample has its channel's current estimate
subtracted as it passes.

This stage also converts the 12-bit ADC word into the internal format (see
*Number formats*), which keeps 5 bits below the ADC LSB. The estimates are
therefore finer than one ADC code. `est_update` pulses whenever an estimate
changes.

Offsets must be removed before the gain and skew loops run. An offset tone
at k·fs/M correlates with the Hadamard patterns exactly as a gain error
would.

## Derivative filter (`deriv_fir`)

To first order, a skew r_i turns a sample into x + r_i·x'. Correcting and
estimating skew therefore needs the derivative of the stream. The design
uses a 33-tap FIR differentiator. Its taps are the ideal differentiator
h[k] = (-1)^k / k, with h[0] = 0, multiplied by a Hanning window
w[n] = 0.5(1 - cos(2π(n+1)/34)). The window tames the ripple caused by
truncating the filter.

- **Tap computation:** the taps are computed at elaboration by a constant
  function in `tiadc_pkg` (`deriv_tap`) and rounded to Q1.15. No table file
  is involved. Changing `NTAPS` or `CFRAC` recomputes them.
- **Accuracy:** the response is within 0.4 % of jω up to about 0.6π.
- **Aligned outputs:** besides y', the block outputs the centre-tap sample.
  A sample and its derivative therefore always leave together, 16 samples
  later. Every later stage relies on this alignment.

The delay line advances only on valid samples, so gaps in the stream are
harmless.

## Pseudo aliasing signals and correction

This is the core of the technique.

### Why Hadamard rows

Write the per-channel gain errors as a vector g = (g_0 .. g_{M-1}). Project
it onto the rows of the order-M Hadamard matrix F:

    w_gk = (1/M) · Σ_i T_k[i] · g_i,     so that  g_i = Σ_k w_gk · T_k[i]

Here T_k[i] = ±1 is row k. The design uses the Sylvester ordering,
T_k[i] = (-1)^popcount(k & i). For M = 4 the rows are:

| row | T_k |
|---|---|
| T_1 | (1, -1, 1, -1) |
| T_2 | (1, 1, -1, -1) |
| T_3 | (1, -1, -1, 1) |

Row 0 is all ones. A common gain on all channels causes no spur, so row 0
is not needed.

A gain error that follows pattern T_k adds w_gk·T_k[i]·y to each sample,
which is a copy of the signal modulated by ±1. That modulated copy *is* the
image. So the stream y_ek(n) = T_k[ch(n)]·y(n) reproduces, up to the scale
factor w_gk, the image that gain pattern k creates. The same holds for skew
with the derivative: y'_ek(n) = T_k[ch(n)]·y'(n).

### Building the replicas (`pseudo_alias_gen`)

Since T_k[i] = ±1, building y_ek and y'_ek is a conditional negation,
selected by the sample's channel index. It uses no multiplier. The block
emits all M-1 rows in parallel and passes the sample and channel along.

### Subtracting them (`mismatch_corrector`)

The corrector applies

    y_c(n) = y(n) − Σ_{k=1}^{M-1} w_gk · y_ek(n) − Σ_{k=1}^{M-1} w_rk · y'_ek(n)

It uses 2(M-1) multiplies, full-precision accumulation, rounding, and
saturation to the internal width.

The correction is first order in the errors. For gain it is exact at its
own fixed point: the loop settles where every channel has the same
effective gain, (1+g_i)(1 − Σ_k w_gk T_k[i]) = constant. For skew the
residual is second order in r_i. With skews of 10^-3 Ts, this is far below
the converter's noise.

## Estimation loop (`mismatch_estimator`)

This is the part that is easiest to get wrong.

The estimator adjusts the weights until the corrected output y_c contains
no image of any Hadamard pattern. Each weight has its own LMS correlator:

    w_gk ← w_gk + μ_g · y_n(n) · p_gk(n)
    w_rk ← w_rk + μ_r · y_n(n) · p_rk(n)

Here y_n is the corrected output after a notch filter. The p signals are
pseudo aliasing signals. **Both are built from the corrected output y_c**,
not from the correction path. For that purpose the estimator has its own
derivative FIR and pseudo aliasing generator running on y_c. The two design
choices that make the loop converge to the right values are explained
below.

**Why the references come from y_c.** Suppose the references were built
from the uncorrected stream. They would carry the images themselves, and
their product with the residual image adds a term that does not vanish when
the correction is right. In simulation, that variant settled the gain
weights near twice their correct value and biased the skew weights by
several times theirs. Built from y_c, the references lose their image
content exactly as the correction becomes right. The loop then has the
correct fixed point.

**Why the notch removes the input signal.** y_c holds the signal x plus a
small residual image e. The gain correlation y_c·T_k·y_c contains
e·T_k·x, which is the wanted term. It also contains x·T_k·e, which has the
same size and sign, so that is harmless. The skew correlation is different.
Its wanted term is e·T_k·x', while the term x·T_k·e' carries the opposite
sign for a skew image. For a skew image the two cancel, and the skew loop
loses its restoring force (in simulation the skew weights rotated without
settling).

Removing x from the error side leaves only the wanted term. `notch_filter`
does this with the three-tap FIR

    y_n(n) = (y(n) − c·y(n−1) + y(n−2)) / 4,      c = 2·cos(ω0)

Its double zero on the unit circle at ±ω0 removes a tone at ω0 completely,
while images at other frequencies pass with gain |2cos ω − c|/4. The notch
frequency is a run-time input, `notch_c`, in Q2.16. The user must set it to
the input frequency, in radians per sample:

    notch_c = round(2·cos(2π·f_in/fs) · 2^16)

Images that fall close to ω0 are attenuated as well, and the loop for that
pattern becomes proportionally slower. The pattern whose image sits at
exactly f_in is T_0, which is never estimated.

**Alignment.** The notch and the pseudo aliasing generator both take the
derivative filter's centre-sample output and both take one clock. The error
and the references therefore meet on the same sample (an assertion checks
this). The notch's own one-sample group delay is part of what the loop
sees. It does not bias the result, because the fixed point is where the
image is zero.

**Step sizes and precision.**
- The steps are powers of two: μ_g = 2^-7 and μ_r = 2^-6, on the internal
  sample scale. Their defaults are `MU_G_SHIFT` and `MU_R_SHIFT`.
- Each correlator integrates e·p >>> MU_SHIFT in an accumulator with 32
  fraction bits, which saturates instead of wrapping.
- The weight is the top 18 bits of the accumulator (Q-format: 19 fraction
  bits, range ±0.25; skew weights are in units of Ts).

With the four-channel test error set and a 0.8-full-scale tone:
- Gain weights settle within 3·10^-4 of final by about 25 000 samples.
- Skew weights settle within 6·10^-5 by about 40 000 samples.

Larger steps converge faster but leave more jitter on the weights.

## Number formats

All numbers are two's complement.

| quantity | width | fraction bits | range |
|---|---|---|---|
| sub-ADC word (`ADC_W`) | 12 | 11 | ±1 |
| internal sample y, y_c, y_n (`DW`, `DFRAC`) | 18 | 16 | ±2 |
| derivative y' | 19 | 16 | ±4 |
| weights w_gk, w_rk (`W_W`, `W_FRAC`) | 18 | 19 | ±0.25 |
| FIR taps (`CW`, `CFRAC`) | 16 | 15 | ±1 |
| notch setting `notch_c` | 19 | 16 | ±4 (uses ±2) |

The parameters live in `tiadc_pkg`, and every module takes its own copy as
a typed parameter with the package value as default.
- `M` must be a power of two, because the Hadamard order must be one.
- The widths can be changed together, provided W_FRAC ≤ 2·DFRAC.

## Top-level interface (`tiadc_calib_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock at fs; asynchronous active-low reset |
| `adc_valid` | in | 1 | a frame of M sub-ADC words is present |
| `adc_data[M]` | in | ADC_W each | word of sub-ADC i |
| `notch_c` | in | DW+1 | 2·cos(ω0) of the input tone |
| `out_valid`, `out_ch`, `out_data` | out | 1, log2 M, DW | corrected stream y_c with channel index |
| `offset_est[M]`, `offset_update` | out | DW each, 1 | offset estimates and their update pulse |
| `wg[M-1]`, `wr[M-1]` | out | W_W each | current gain and skew weights (index k-1 = row k) |

The sub-ADCs deliver one frame of M words at a time, at most one frame
every M clocks. Back-to-back frames every M clocks give a gap-free stream.
An assertion in the multiplexer flags a frame that arrives early. The
sub-ADCs themselves are analog and not part of this RTL. Their clock
crossing to the fs clock is outside the design too, so frames must arrive
synchronous to `clk`.

The per-channel errors can be read back from the weights:
- gain: g_i ≈ Σ_k w_gk·T_k[i], relative to the mean gain
- skew: r_i ≈ Σ_k w_rk·T_k[i], relative to the mean sampling instant

Offsets are absolute.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints a
single `TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_tiadc_mux` | order, data, channel tags and one-clock latency of frames, back to back and with gaps |
| `tb_offset_cal` | bit-exact against a reference model (N = 16), estimates near the programmed offsets, update pulses |
| `tb_deriv_fir` | tap antisymmetry, 2-clock latency, centre sample, derivative against A·ω·cos(ωn) for ω up to 0.6π |
| `tb_pseudo_alias_gen` | every output against independently written T_1..T_3 sign tables |
| `tb_mismatch_corrector` | bit-exact against a 64-bit model, including saturation |
| `tb_notch_filter` | bit-exact model with saturation; response zero at ω0 and \|2cos ω − c\|/4 elsewhere |
| `tb_lms_correlator` | bit-exact integrator, both saturation limits, closed loop settling on a target |
| `tb_mismatch_estimator` | closed loop with a behavioural corrector: all six weights reach the programmed gain/skew patterns |
| `tb_tiadc_calib_top` | whole design at default parameters (see below) |
| `tb_tiadc_workload` | whole design with a noisy input (60 dB SNR): SNDR and spurs before and after calibration |

`tb_tiadc_calib_top` drives the top through `tiadc_frontend_model`, a
behavioural four-channel converter. The model samples a sine at bin 613 of
4096 at the skewed instants and applies the gain and offset errors. It uses
this error set, with channel 0 as the reference:

| channel | O_i | g_i | r_i / Ts |
|---|---|---|---|
| 0 | -0.10675 | 0 | 0 |
| 1 | 0.075462 | 0.007622 | -0.0009263 |
| 2 | 0.044737 | -0.018279 | -0.000096028 |
| 3 | 0.021234 | -0.036089 | 0.00029001 |

The model then quantizes to 12 bits. The test runs 100 000 samples at
default parameters and checks:

- **latency:** 6 clocks to the first output;
- **pass-through:** channel tags, and early outputs equal to the raw samples;
- **offsets:** every estimate within 2^-10 of the true offset;
- **gain weights:** within 5·10^-5 of the exact fixed point;
- **skew weights:** within 4·10^-5 of (1/M)·Σ T_k[i]·r_i;
- **convergence times:** as listed above;
- **spectrum:** single-bin DFTs at every offset and image frequency. The
  worst spur must be above -40 dBc before calibration and below -90 dBc
  after. Measured: -19.9 dBc before, -102.3 dBc after;
- **mechanisms:** offset updates, gain adaptation, skew adaptation and a
  nonzero correction must each have occurred at least once.

`tb_tiadc_workload` repeats this with white input noise added before
quantization, which sets the input SNR to 60.0 dB. Over 120 000 samples,
the SNDR rises from 18.0 dB (mismatch-limited) to about 59.8 dB, within
0.3 dB of the input's own SNR. The worst mismatch bin after calibration
then sits at the noise floor, below -87 dBc in every seed tried. With
noise the weights wander by a few 10^-5 around their noise-free values.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/tiadc_pkg.sv tb/tb_tiadc_calib_top.sv --top-module tb_tiadc_calib_top
    ./obj_dir/Vtb_tiadc_calib_top

The full-size run takes well under a second.

## Limits and departures from the original description

- **Notch placement.** The original description places the notch "at kπ/M"
  and does not give its structure. A notch only at the image frequencies
  does not stop the signal from cancelling the skew loop's restoring force
  (see *Estimation loop*). This design therefore notches the input
  frequency and needs that frequency as a setting. It targets narrow-band
  inputs of known frequency. A broadband input would need a different
  signal-rejection filter.
- **Estimator references.** The pseudo aliasing signals used for
  estimation are built from the corrected output, with a second derivative
  FIR. The correction path has its own. The estimation side alone still
  uses a single FIR.
- **Offset averaging.** The offset is a block average of 1024 samples per
  channel, refreshed every block. The original work reports settling within
  about 50 samples, which suggests a running average. This design favours
  accuracy over speed.
- **Convergence times.** The original reports about 10 000 samples (gain)
  and 30 000 (skew). The step sizes were not given. Here they are about
  25 000 and 40 000 with the default powers of two.
- **Meaning of the weights.** The weights are the Hadamard components of
  the per-channel errors, (1/M)·F·g. They are not the per-channel values
  themselves.
- **Throughput.** The datapath handles one sample per clock. A 2.7 GS/s
  converter, the rate the technique was evaluated at, would need a 2.7 GHz
  clock or an M-way parallel rewrite of the datapath, which is not
  provided.
- **Input noise.** The original evaluation used a 60 dB SNR converter; the
  workload test reproduces that noise level with white Gaussian-like
  noise. Other noise shapes (jitter, colored noise) are not modelled.
- **Bandwidth mismatch** between channels is not addressed, in line with
  the original scope.

## Lint notes

Verilator reports four kinds of warning. Each is explained in the header of
the file it comes from:
- the reset appears in assertion disable conditions as well as in the
  asynchronous resets;
- two outputs of the estimator's pseudo aliasing generator are left open
  on purpose;
- the upper bits of a full-width intermediate in `offset_cal` are unused;
- the package constant `CH_W` is unused by the design modules.
