# Blind gain and timing-skew calibration for undersampling time-interleaved ADCs

A time-interleaved ADC (TIADC) reaches a high sample rate by letting M slower
sub-ADCs take turns. If the sub-ADCs differ in gain (g_m) or sample a little
early or late (a skew of r_m sample periods), the output contains spurious
copies of the input spectrum shifted by multiples of fs/M. This RTL removes
those copies in the background. It needs no reference channel and no test
signal. It also works when the analog input lies above fs/2, in any Nyquist
band, and the TIADC is used as an undersampling (sub-sampling) receiver.

The design follows the pipelined fixed-point architecture published by
H. Le Duc, V.-P. Hoang and D. M. Nguyen, "FPGA Implementation of Channel
Mismatch Calibration in TIADCs for Signals in Any Nyquist Bands" (REV Journal
on Electronics and Communications, 2018). That architecture builds on the
blind compensation method of Vogel, Saleem and Mendel (ICECS 2008). The
default configuration is a 4-channel TIADC with 31-tap filters and LMS step
sizes 2^-5 (gain) and 2^-7 (timing). With those defaults, one corrected
sample comes out per clock, 19 clocks after the raw sample went in.

## The idea

For small skews, sub-ADC m delivers about `g_m x[n] + g_m r_m x'[n]`. Here x'
is the derivative of the input in units of one sample period. Expanding the
per-channel gains and skews in a DFT over the channel index gives

    y[n] = x[n] + e[n],   e[n] = c_g^T m_n x[n] + c_r^T m_n x'[n]

- `m_n` is a fixed modulation vector of M-1 entries:
  `2cos(k 2pi n/M)`, `-2sin(k 2pi n/M)` for k = 1..M/2-1, followed by `(-1)^n`.
  For M = 4 this is `(2cos(pi n/2), -2sin(pi n/2), (-1)^n)`, whose entries
  are only 0, ±1 and ±2.
- `c_g` and `c_r` are M-1 unknown coefficients each. They hold the real and
  imaginary parts of `G_k = 1/M sum g_m e^{-j2pi km/M}` and
  `R_k = 1/M sum g_m r_m e^{-j2pi km/M}`. The model assumes G_0 = 1 and
  R_0 = 0: mean gain 1, and no common delay.

The calibrator builds `x_hat_g = m_n y` and `x_hat_r = m_n (h_bpd * y)` from
the distorted output itself. It forms `e_hat = c_g^T x_hat_g + c_r^T x_hat_r`
and outputs `y - e_hat`.

The coefficients are learned in the **mismatch band**. This is a part of the
spectrum that the input does not occupy, so it holds only mismatch images.
The filter `f[n]` keeps just that band:

- applied to `y`, it gives `d[n]`, which holds the images alone;
- applied to every element of `x_hat_g` and `x_hat_r`, it gives `x_bar_g` and `x_bar_r`.

LMS then drives `eps = d - c_g^T x_bar_g - c_r^T x_bar_r` towards zero:

    c <- c + mu * x_bar * eps

The input statistics hardly matter. The update correlates the observed images
with their predicted shapes, not the signal with itself.

## Differentiating a signal that came from another Nyquist band

This part is what makes the design work above the first Nyquist band. After
undersampling, a tone at `N*fs + f_b` (odd band K = 2N+1) shows up at
`f_b`. In an even band, a tone at `N*fs - f_b` shows up at `f_b`, so the
spectrum is mirrored. A plain
differentiator on the samples therefore sees only the folded frequency. The
true derivative, which sets the size of the skew error, is much larger. The
part that is missing is `2pi * floor(K/2)` times a 90° phase-shifted copy of
the signal. Its sign depends on whether band K mirrors the spectrum. Hence
the bandpass derivative filter

    h_bpd[n] = h_d[n] + (-1)^K * floor(K/2) * 2pi * h_h[n]

Here `h_d` is an ideal differentiator, `jw`, and `h_h` is a Hilbert
transformer, `-j sgn(w)`. Both are 31-tap, Hann-windowed, linear-phase FIRs.
`bpd_filter` builds exactly this. K is a run-time input (`nyq_band`), so a
single build covers bands 1 to 15. K = 1 reduces to the plain differentiator.
The scale factor grows with K, so at high K the sfix13_En8 derivative word
saturates: the `deriv_sat` output flags this.

## Datapath and timing

Stage numbers count clocks from the moment a sample enters on `y_in`. Every
FIR has a combinational output; the register after it is listed as its own
stage. The FIRs add 15 samples of group delay.

| stage | correction path | estimation path |
|---|---|---|
| 0 | `y_in` enters h_d, h_h (group delay 15) | |
| 1–17 | y delay line; h_d / h_h register; scale by K and add; register → `h_bpd*y` aligned with y delayed 17 | |
| 18 | modulators (register): `x_hat_g`, `x_hat_r` | |
| 19 | `c_g·x_hat_g`, `c_r·x_hat_r` (register); `e_hat`; **`x_out = y(19) - e_hat`** | f[n] on y(18), x_hat_g, x_hat_r (group delay 15) |
| 34 | | `d`, `x_bar_g`, `x_bar_r` registered |
| 35 | | `d` delayed once more; `c·x_bar` registered → `e_bar`; `eps = d - e_bar`; x_bar delayed once more into the LMS |
| 36–39 | | LMS: product, step shift, accumulator, output register |

The 17-clock delay of y is the 15-sample group delay plus two registers in
the derivative path. This is what lets one modulation phase counter serve
both modulators. After reset the counter assumes that the first sample comes
from sub-ADC 0 and that samples follow in channel order. If your TIADC starts
elsewhere, the coefficients still converge, but to the DFT of a rotated
channel numbering.

The coefficient feedback loop is delayed by about 20 clocks. With step sizes
of 2^-5 and 2^-7 this delay is harmless: the estimates settle in tens of
thousands of samples.

## Word formats

Formats are written sfixW_EnF: W bits, two's complement, F fractional bits.

| signal | format |
|---|---|
| `y_in` (TIADC sample) | sfix13_En11 |
| h_d, h_h and h_bpd outputs; `x_hat_g`, `x_hat_r` | sfix13_En8 |
| `d`, `x_bar_g`, `x_bar_r` (f[n] outputs) | sfix13_En11 |
| `c_g·x_hat_g` / `c_r·x_hat_r` | sfix12_En18 / sfix12_En15 |
| `e_hat` | sfix16_En18 |
| `c·x_bar` parts, `e_bar`, `eps` | sfix13_En16 |
| LMS product, gain / timing | sfix20_En16 / sfix18_En12 |
| `c_g`, `c_r` | sfix24_En31 (range ±2^-8) |
| `x_out` | sfix14_En11 |
| FIR taps / m_n constants / band scale | sfix16_En15 / sfix16_En13 / sfix20_En12 |

Every narrowing rounds half up and saturates. Rounding matters most in the
LMS product: truncation there would add a constant bias to every update,
which the loop would turn into a coefficient offset. The coefficient word
limits the mismatch the design can correct. |G_k| and |R_k| must stay below
about 0.0039. That is ample for gain spreads around 0.2% and skews below
about 0.1% of a sample period.

## Files

| file | contents |
|---|---|
| `rtl/tiadc_cal_pkg.sv` | formats, FIR tap formulas, round/saturate helpers |
| `rtl/fir_filter.sv` | linear-phase FIR: differentiator, Hilbert, or mismatch-band band-stop |
| `rtl/bpd_filter.sv` | bandpass derivative filter with run-time Nyquist band |
| `rtl/modulator.sv` | multiplication by m_n, any even M |
| `rtl/inner_product.sv` | registered c^T x |
| `rtl/lms_update.sv` | one LMS coefficient: product, shift, accumulator |
| `rtl/tiadc_cal_top.sv` | the calibrator |
| `tb/tiadc_model_pkg.sv` | behavioural TIADC model: tones, gains, skews, noise, expected coefficients |
| `tb/tb_*.sv` | one self-checking testbench per module |

The FIR taps are computed during elaboration from closed-form expressions
times a Hann window `w[j] = 0.5(1 + cos(2pi j/32))`, j = -15..15:

- differentiator: `(-1)^j / j`, and 0 at j = 0;
- Hilbert: `2/(pi j)` for odd j, 0 otherwise;
- band-stop: `delta[j] - (sin(F_HI pi j) - sin(F_LO pi j))/(pi j)`.

No tables are stored in files.

## Top-level interface (`tiadc_cal_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | one sample per clock; asynchronous active-low reset, which also clears the coefficients |
| `y_in[12:0]` | in | TIADC output, sub-ADC 0 first after reset |
| `nyq_band[3:0]` | in | Nyquist band K of the analog input (1 = baseband); may change at any time |
| `x_out[13:0]` | out | corrected sample, 19 clocks after its `y_in` |
| `c_g[M-1]`, `c_r[M-1]` | out | current coefficient estimates |
| `eps[12:0]` | out | LMS error, useful for monitoring convergence |
| `deriv_sat`, `coef_sat` | out | saturation in the derivative/modulator path or an LMS accumulator |

Parameters: `M` (4), `NTAPS` (31), `F_LO`/`F_HI` (0.25/0.97, the edges of the
f[n] stop band as fractions of pi), `MU_G_SHIFT` (5), `MU_R_SHIFT` (7).

## Where this departs from the published design

- **Mismatch-band filter.** The original uses a 31-tap f[n] with cut-off
  0.8π, that is, a high-pass. For the evaluated input (third band, folding to
  0.4π..0.8π), the k = M/2 image folds to 0.2π..0.6π, where no high-pass can
  see it. The short transition band also lets signal leak into d. Built with
  that filter (`F_LO = 0`, `F_HI = 0.8`), this RTL diverges on that input:
  SNDR falls from 45.9 dB to 29.6 dB. The default here is therefore a band
  stop over 0.25π..0.97π, which passes both free regions. With 31 taps the
  window's transition is about ±0.12π wide. Edges at 0.3π..0.9π left enough
  signal leaking into `d` to bias the coefficients (mean SNDR gain 8.8 dB
  over 16 random mismatch draws, against 10.9 dB with the default). The upper
  edge at 0.97π keeps the response near π at about half gain, and without
  that region the estimate fails. Set the edges to bracket your own signal
  band, with most of the transition outside it.
- **Balancing registers.** In the original drawing, `d` reaches the error
  adder one clock before `e_bar`, and the LMS takes `x_bar` before its
  register. Here `d` and the LMS copy of `x_bar` each get one more register,
  so that all three meet `eps` in the same clock.
- **Step-size words.** The word labels after the step-size blocks in the
  original drawing do not correspond to shifts of 2^-5 and 2^-7. The RTL uses
  the stated step sizes as shifts into the printed sfix24_En31 accumulator.
- **Coefficient range.** Published convergence plots show one gain
  coefficient near -0.018. This is outside the printed sfix24_En31 range. The
  RTL keeps the printed word, which saturates, and is verified with
  mismatches that fit it.
- **Choices of this design:**
  - FIR and constant word lengths;
  - the run-time Nyquist-band input;
  - rounding and saturation everywhere;
  - reset behaviour;
  - the channel-0-first convention.
- **Rate.** The design takes one sample per clock. The 2.7 GS/s of the
  evaluated converter would need a polyphase, multi-lane version, which is
  not part of this design.

## Verification

Every module has a self-checking testbench that compares it with values
computed independently in the testbench:

- `fir_filter`: all taps against the closed-form formulas, plus the gain of
  f[n] at 0.6π (stop), 0.1π (pass) and π (about one half);
- `bpd_filter`: the derivative of tones in bands 1–4 against the exact
  analog derivative;
- `modulator`: exact for M = 4, and against floating point for M = 8;
- `inner_product` and `lms_update`: bit-exact against integer reference
  models; `lms_update` also gets a closed-loop convergence test.

`tb_tiadc_cal_top` runs the whole design at its default parameters:

- Input: a 4-channel TIADC model with gains (1.003, 0.998, 1.001, 0.998) and
  skews of a few 1e-4 sample periods, both normalised so that G_0 = 1 and
  R_0 = 0. The signal is 42 tones at 1.2–1.4 fs (3.24–3.78 GHz at 2.7 GS/s),
  with 60 dB SNR noise and 13-bit quantization.
- Latency: before the coefficients move, `x_out` must equal `y_in` 19 clocks earlier.
- Third band: after 50K samples and after 90K samples, all six coefficients
  must lie near their analytic values. SNDR rose from 45.7 dB to 56.4 dB.
- Second band: `nyq_band` switches to 2 without a reset, and the input moves
  to 0.6–0.8 fs. The coefficients re-settle, and SNDR rose from 49.2 dB to 56.8 dB.
- Fourth band (1.6–1.8 fs): SNDR rose from 43.8 dB to 55.0 dB. Here the
  Hilbert branch is scaled by 4π. The k = 1 gain pair settles about 6e-4
  away from its analytic values, which costs little SNDR. The testbench
  allows four times the usual tolerance in this band.
- First band (0.2–0.4 fs, plain differentiator): SNDR rose from 51.4 dB to 56.7 dB.

The whole run, 360K samples, takes about two seconds.

`tb_tiadc_cal_random` draws the mismatches at random: Gaussian, with 0.2 %
standard deviation on the gains and 0.33 ps on the skews (8.9e-4 of a
sample period at 2.7 GS/s). It runs four draws from reset, each for 90K
samples of the third-band input. The corrected SNDR is 56.1–56.5 dB, from
43.6–50.3 dB before. Each coefficient must land within 3e-4 (gain) or
1.5e-4 (timing) of its analytic value. This is wider than in the fixed-mismatch
test, because larger mismatches leave a larger leakage bias.

The RTL elaborates for any even M (2, 6 and 8 lint cleanly). End to end,
only M = 4 is verified. With M = 8 and a narrow third-band input
(1.25–1.35 fs, stop band 0.4π..0.8π), the k = 3 coefficient pair does not
converge. Only one side of that image falls into the mismatch band, and there
its gain and timing parts are almost collinear. More channels need more
oversampling, or a mismatch band chosen for the image positions.

Simulating with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal \
      rtl/tiadc_cal_pkg.sv rtl/fir_filter.sv rtl/bpd_filter.sv rtl/modulator.sv \
      rtl/inner_product.sv rtl/lms_update.sv rtl/tiadc_cal_top.sv \
      tb/tiadc_model_pkg.sv tb/tb_tiadc_cal_top.sv --top-module tb_tiadc_cal_top
    ./obj_dir/Vtb_tiadc_cal_top

For the random-mismatch test, use `tb/tb_tiadc_cal_random.sv` and
`--top-module tb_tiadc_cal_random` instead. Each testbench prints
`TB_RESULT checks=N failures=M` at the end. The
unit testbenches need only the package, their module and, for `bpd_filter`,
`fir_filter.sv`.
