// Behavioural model of an M-channel time-interleaved ADC with gain and timing
// mismatches, for testbenches only (not synthesizable).
//
// Sub-ADC m = n mod M takes sample n at time (n + r[m]) * Ts and scales it by
// g[m]; the channel outputs are multiplexed back into one stream y[n]. The
// analog input is a sum of NT equal-amplitude tones spread evenly over a band
// [f_lo, f_hi] given as fractions of the overall sampling rate fs, so a band
// above 0.5 is undersampled and folds into the first Nyquist band. The model
// also returns the ideal sample x(n*Ts) and the sample quantized to the
// calibrator's sfix13_En11 input word, optionally with white Gaussian
// thermal noise at a given SNR, and computes the mismatch coefficients
// c_g, c_r that a perfect calibration converges to:
//   G_k = 1/M sum_m g[m] e^{-j2pi k m/M},  R_k = 1/M sum_m g[m] r[m] e^{-j2pi k m/M}
//   c_g = (Re G_1, Im G_1, ..., Re G_{M/2-1}, Im G_{M/2-1}, G_{M/2}), c_r likewise.
package tiadc_model_pkg;

  localparam real PI = 3.14159265358979323846;

  class tiadc_model;
    int  m_ch;
    real g[];
    real r[];
    real f[];
    real ph[];
    real amp;
    real noise_rms;   // thermal noise added to every sample

    function new(int m, int nt, real amplitude);
      m_ch = m;
      g    = new[m];
      r    = new[m];
      f    = new[nt];
      ph   = new[nt];
      amp  = amplitude;
      noise_rms = 0.0;
      for (int i = 0; i < m; i++) begin g[i] = 1.0; r[i] = 0.0; end
      for (int i = 0; i < nt; i++) ph[i] = 2.0 * PI * real'($urandom % 10000) / 10000.0;
    endfunction

    function void set_band(real f_lo, real f_hi);
      for (int i = 0; i < f.size(); i++)
        f[i] = f_lo + (f_hi - f_lo) * real'(i) / real'(f.size() - 1);
    endfunction

    // Normalise the mismatches so that the mean gain is 1 (G_0 = 1) and the
    // gain-weighted mean skew is 0 (R_0 = 0), as the mismatch model assumes.
    function void normalise();
      real sg, sgr;
      sg = 0.0; sgr = 0.0;
      foreach (g[i]) sg += g[i];
      foreach (g[i]) g[i] = g[i] * m_ch / sg;
      foreach (g[i]) sgr += g[i] * r[i];
      foreach (g[i]) r[i] = r[i] - sgr / (g[i] * m_ch);
    endfunction

    function real analog(real t);
      real s;
      s = 0.0;
      foreach (f[i]) s += amp * $cos(2.0 * PI * f[i] * t + ph[i]);
      return s;
    endfunction

    function real ideal(longint n);
      return analog(real'(n));
    endfunction

    // Set the thermal noise for a given signal-to-noise ratio in dB.
    function void set_snr(real snr_db);
      noise_rms = amp * $sqrt(real'(f.size()) / 2.0) / (10.0 ** (snr_db / 20.0));
    endfunction

    // Standard normal deviate (Box-Muller).
    static function real gauss();
      real u1, u2;
      u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
      u2 = real'($urandom % 1000000) / 1000000.0;
      return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
    endfunction

    function real sample(longint n);
      int m;
      m = int'(n % m_ch);
      return g[m] * analog(real'(n) + r[m]) + noise_rms * gauss();
    endfunction

    // Quantize to a signed word of w bits with fr fractional bits (round, clip).
    static function int quant(real v, int w, int fr);
      real s;
      int  q, hi;
      s  = v * real'(1 << fr);
      q  = $rtoi(s < 0.0 ? s - 0.5 : s + 0.5);
      hi = (1 << (w - 1)) - 1;
      if (q > hi) q = hi;
      if (q < -hi - 1) q = -hi - 1;
      return q;
    endfunction

    // Expected coefficient e (0..M-2) of c_g (timing = 0) or c_r (timing = 1).
    function real expected(bit timing, int e);
      int  k;
      bit  im;
      real re_s, im_s, a;
      k  = (e == m_ch - 2) ? m_ch / 2 : e / 2 + 1;
      im = (e != m_ch - 2) && (e % 2 == 1);
      re_s = 0.0; im_s = 0.0;
      for (int m = 0; m < m_ch; m++) begin
        a = timing ? g[m] * r[m] : g[m];
        re_s += a * $cos(2.0 * PI * k * m / m_ch) / m_ch;
        im_s -= a * $sin(2.0 * PI * k * m / m_ch) / m_ch;
      end
      return im ? im_s : re_s;
    endfunction
  endclass

endpackage
