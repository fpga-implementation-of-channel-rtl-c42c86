// Shared definitions for the TIADC gain/timing mismatch calibrator.
//
// Holds the fixed-point word formats of the datapath, the kinds of FIR filter
// the design uses, the real-valued design formulas for their taps, and a
// round-and-saturate helper that every stage uses when it narrows a word.
//
// Formats are written sfixW_EnF: a W-bit two's complement word with F
// fractional bits. The formats named below are the ones printed on the
// hardware architecture this design follows; the coefficient format of the
// FIR filters, the word that carries the Nyquist-band scale factor and the
// rounding mode (round half up, saturate on overflow) are this design's own
// choices.
package tiadc_cal_pkg;

  // ---- datapath word formats -------------------------------------------
  localparam int Y_W    = 13;  localparam int Y_F    = 11;  // TIADC samples y[n]
  localparam int XO_W   = 14;  localparam int XO_F   = 11;  // corrected output x[n]
  localparam int H_W    = 13;  localparam int H_F    = 8;   // h_d, h_h, h_bpd outputs, x_hat vectors
  localparam int FB_W   = 13;  localparam int FB_F   = 11;  // f[n] outputs (d, x_bar vectors)
  localparam int EG_W   = 12;  localparam int EG_F   = 18;  // c_g . x_hat_g
  localparam int ER_W   = 12;  localparam int ER_F   = 15;  // c_r . x_hat_r
  localparam int EH_W   = 16;  localparam int EH_F   = 18;  // e_hat[n] (own choice)
  localparam int EB_W   = 13;  localparam int EB_F   = 16;  // e_bar parts, e_bar and epsilon
  localparam int C_W    = 24;  localparam int C_F    = 31;  // mismatch coefficients
  localparam int PG_W   = 20;  localparam int PG_F   = 16;  // LMS product, gain branch
  localparam int PR_W   = 18;  localparam int PR_F   = 12;  // LMS product, timing branch
  localparam int COEF_W = 16;  localparam int COEF_F = 15;  // FIR taps (own choice)
  localparam int SC_W   = 20;  localparam int SC_F   = 12;  // Nyquist-band scale (own choice)
  localparam int KNB_W  = 4;                                // Nyquist band number width

  localparam real PI = 3.14159265358979323846;

  typedef enum logic [1:0] {
    FIR_DIFF     = 2'd0,   // ideal differentiator, H = j*w
    FIR_HILBERT  = 2'd1,   // Hilbert transformer, H = -j*sgn(w)
    FIR_BANDSTOP = 2'd2    // mismatch-band filter f[n]: rejects F_LO*pi..F_HI*pi
  } fir_kind_e;

  // Ideal low-pass impulse response, cut-off c*pi, at centred index j.
  function automatic real lowpass_tap(real c, int j);
    if (j == 0) return c;
    return $sin(c * PI * j) / (PI * j);
  endfunction

  // Tap i (0..ntaps-1, i = delay in samples) of a linear-phase FIR of odd
  // length ntaps, Hann-windowed: w[j] = 0.5*(1 + cos(2*pi*j/(ntaps+1))).
  function automatic real fir_tap(fir_kind_e kind, int ntaps, int i, real f_lo, real f_hi);
    int  j;
    real h, w;
    j = i - (ntaps - 1) / 2;
    w = 0.5 * (1.0 + $cos(2.0 * PI * j / (ntaps + 1)));
    case (kind)
      FIR_DIFF:    h = (j == 0) ? 0.0 : (((j % 2) != 0) ? -1.0 : 1.0) / j;
      FIR_HILBERT: h = ((j % 2) != 0) ? 2.0 / (PI * j) : 0.0;
      default:     h = ((j == 0) ? 1.0 : 0.0) - (lowpass_tap(f_hi, j) - lowpass_tap(f_lo, j));
    endcase
    return h * w;
  endfunction

  // Value v scaled by 2^-shift with round half up (shift may be <= 0 for a
  // left shift), then saturated to a signed word of out_w bits.
  function automatic logic signed [63:0] rnd_sat(logic signed [63:0] v, int shift, int out_w);
    logic signed [63:0] r, hi, lo;
    if (shift > 0) r = (v + (64'sd1 <<< (shift - 1))) >>> shift;
    else           r = v <<< (-shift);
    hi = (64'sd1 <<< (out_w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (out_w - 1));
    if (r > hi) return hi;
    if (r < lo) return lo;
    return r;
  endfunction

  // True when rnd_sat(v, shift, out_w) would clip.
  function automatic logic clips(logic signed [63:0] v, int shift, int out_w);
    logic signed [63:0] r;
    if (shift > 0) r = (v + (64'sd1 <<< (shift - 1))) >>> shift;
    else           r = v <<< (-shift);
    return (r > ((64'sd1 <<< (out_w - 1)) - 64'sd1)) || (r < -(64'sd1 <<< (out_w - 1)));
  endfunction

endpackage
