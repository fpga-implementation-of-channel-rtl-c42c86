// Background calibration of gain and timing mismatches in an M-channel
// time-interleaved ADC (TIADC) whose input lies in any Nyquist band.
//
// Model: y[n] = x[n] + e[n], e[n] = c_g^T m_n y[n] + c_r^T m_n (h_bpd * y)[n],
// where m_n is the modulation vector of the M-channel interleaving, h_bpd the
// bandpass derivative filter for Nyquist band K, and c_g / c_r the unknown
// gain and timing mismatch coefficients (M-1 each).
//
// Correction path: x_hat_g = m_n y and x_hat_r = m_n (h_bpd * y) are weighted
// with the current coefficients to give e_hat[n], and x[n] = y[n] - e_hat[n].
// Estimation path: the mismatch-band filter f[n] removes the signal band from
// y (giving d[n], which then holds only mismatch images) and from every
// element of x_hat_g and x_hat_r (giving x_bar_g, x_bar_r). The LMS blocks
// drive eps[n] = d[n] - c_g^T x_bar_g - c_r^T x_bar_r towards zero.
//
// Interface: one sfix13_En11 sample per clock on y_in, no handshake. The
// first sample after reset is taken as the one from sub-ADC 0, and samples
// follow in channel order. nyq_band is the Nyquist band K of the analog input
// (1..15) and may change at any time. x_out (sfix14_En11) is the corrected
// sample, 19 clocks after the matching y_in. c_g / c_r expose the coefficient
// estimates (sfix24_En31); eps the LMS error (sfix13_En16); the *_sat outputs
// flag saturations.
//
// Timing (as in the pipelined architecture this follows): y is delayed 17
// clocks to line up with h_bpd (15 samples of filter group delay plus two
// registers); the modulators and the coefficient multipliers add one register
// each, so e_hat lines up with y delayed 19 clocks. The f[n] filters (15
// samples of group delay) and their output registers put d and x_bar 34
// clocks after the input.
//
// Own choices: d[n] is delayed one more clock so that it meets e_bar[n],
// which carries the extra register of its coefficient multiplier, and x_bar
// is delayed one more clock on its way into the LMS so that it meets eps[n]
// ("the delays of each signal datapath are made balanced"). e_hat is held as
// sfix16_En18. f[n] is a band-stop filter whose edges F_LO, F_HI are
// parameters (default 0.25*pi..0.97*pi); setting F_LO = 0 gives a high-pass
// filter with cut-off F_HI*pi.
module tiadc_cal_top
  import tiadc_cal_pkg::*;
#(
  parameter int  M          = 4,
  parameter int  NTAPS      = 31,
  parameter real F_LO       = 0.25,
  parameter real F_HI       = 0.97,
  parameter int  MU_G_SHIFT = 5,
  parameter int  MU_R_SHIFT = 7,
  localparam int NC         = M - 1,
  localparam int PH_W       = (M > 1) ? $clog2(M) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [Y_W-1:0]  y_in,
  input  logic [KNB_W-1:0]       nyq_band,
  output logic signed [XO_W-1:0] x_out,
  output logic signed [C_W-1:0]  c_g [NC],
  output logic signed [C_W-1:0]  c_r [NC],
  output logic signed [EB_W-1:0] eps,
  output logic                   deriv_sat,
  output logic                   coef_sat
);

  localparam int GD      = (NTAPS - 1) / 2;   // FIR group delay
  localparam int D_Y     = GD + 2;            // delay of y to the modulator (17)
  localparam int D_TOT   = D_Y + 2;           // input-to-output latency (19)
  localparam logic [PH_W-1:0] PH_RESET = PH_W'((M - (D_Y % M)) % M);

  // ---------------- delay line of y and channel phase ---------------------
  logic signed [Y_W-1:0] yd [1:D_TOT];
  logic [PH_W-1:0]       phase;   // channel index of yd[D_Y]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= D_TOT; i++) yd[i] <= '0;
      phase <= PH_RESET;
    end else begin
      yd[1] <= y_in;
      for (int i = 2; i <= D_TOT; i++) yd[i] <= yd[i-1];
      phase <= (int'(phase) == M - 1) ? '0 : phase + 1'b1;
    end
  end

  // ---------------- correction path ---------------------------------------
  logic signed [H_W-1:0]  y_bpd;
  logic signed [H_W-1:0]  xh_g [NC];
  logic signed [H_W-1:0]  xh_r [NC];
  logic signed [EG_W-1:0] eh_g;
  logic signed [ER_W-1:0] eh_r;
  logic signed [EH_W-1:0] e_hat;
  logic                   bpd_sat, modg_sat, modr_sat;

  bpd_filter #(.NTAPS(NTAPS)) u_bpd (
    .clk, .rst_n, .y(y_in), .nyq_band, .yd(y_bpd), .sat(bpd_sat));

  modulator #(.M(M), .IN_W(Y_W), .IN_F(Y_F), .OUT_W(H_W), .OUT_F(H_F)) u_mod_g (
    .clk, .rst_n, .s(yd[D_Y]), .phase, .v(xh_g), .sat(modg_sat));

  modulator #(.M(M), .IN_W(H_W), .IN_F(H_F), .OUT_W(H_W), .OUT_F(H_F)) u_mod_r (
    .clk, .rst_n, .s(y_bpd), .phase, .v(xh_r), .sat(modr_sat));

  inner_product #(.N(NC), .X_W(H_W), .X_F(H_F), .K_W(C_W), .K_F(C_F), .P_W(EG_W), .P_F(EG_F))
    u_eh_g (.clk, .rst_n, .x(xh_g), .c(c_g), .p(eh_g));

  inner_product #(.N(NC), .X_W(H_W), .X_F(H_F), .K_W(C_W), .K_F(C_F), .P_W(ER_W), .P_F(ER_F))
    u_eh_r (.clk, .rst_n, .x(xh_r), .c(c_r), .p(eh_r));

  assign e_hat = EH_W'(rnd_sat(64'(eh_g) + (64'(eh_r) <<< (EG_F - ER_F)), 0, EH_W));
  assign x_out = XO_W'(rnd_sat((64'(yd[D_TOT]) <<< (EH_F - Y_F)) - 64'(e_hat), EH_F - XO_F, XO_W));
  assign deriv_sat = bpd_sat | modg_sat | modr_sat;

  // ---------------- estimation path ---------------------------------------
  logic signed [FB_W-1:0] d_f, d_q, d_q2;
  logic signed [FB_W-1:0] xb_g_f [NC];
  logic signed [FB_W-1:0] xb_r_f [NC];
  logic signed [FB_W-1:0] xb_g   [NC];
  logic signed [FB_W-1:0] xb_r   [NC];
  logic signed [FB_W-1:0] xb_g2  [NC];
  logic signed [FB_W-1:0] xb_r2  [NC];
  logic signed [EB_W-1:0] eb_g, eb_r;
  logic [NC-1:0]          sat_g, sat_r;

  fir_filter #(.KIND(FIR_BANDSTOP), .NTAPS(NTAPS), .IN_W(Y_W), .IN_F(Y_F),
               .OUT_W(FB_W), .OUT_F(FB_F), .F_LO(F_LO), .F_HI(F_HI))
    u_f_d (.clk, .rst_n, .x(yd[D_Y+1]), .y(d_f));

  for (genvar k = 0; k < NC; k++) begin : g_fbank
    fir_filter #(.KIND(FIR_BANDSTOP), .NTAPS(NTAPS), .IN_W(H_W), .IN_F(H_F),
                 .OUT_W(FB_W), .OUT_F(FB_F), .F_LO(F_LO), .F_HI(F_HI))
      u_f_g (.clk, .rst_n, .x(xh_g[k]), .y(xb_g_f[k]));
    fir_filter #(.KIND(FIR_BANDSTOP), .NTAPS(NTAPS), .IN_W(H_W), .IN_F(H_F),
                 .OUT_W(FB_W), .OUT_F(FB_F), .F_LO(F_LO), .F_HI(F_HI))
      u_f_r (.clk, .rst_n, .x(xh_r[k]), .y(xb_r_f[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q  <= '0;
      d_q2 <= '0;
      for (int k = 0; k < NC; k++) begin
        xb_g[k]  <= '0;  xb_r[k]  <= '0;
        xb_g2[k] <= '0;  xb_r2[k] <= '0;
      end
    end else begin
      d_q  <= d_f;
      d_q2 <= d_q;
      for (int k = 0; k < NC; k++) begin
        xb_g[k]  <= xb_g_f[k];  xb_r[k]  <= xb_r_f[k];
        xb_g2[k] <= xb_g[k];    xb_r2[k] <= xb_r[k];
      end
    end
  end

  inner_product #(.N(NC), .X_W(FB_W), .X_F(FB_F), .K_W(C_W), .K_F(C_F), .P_W(EB_W), .P_F(EB_F))
    u_eb_g (.clk, .rst_n, .x(xb_g), .c(c_g), .p(eb_g));

  inner_product #(.N(NC), .X_W(FB_W), .X_F(FB_F), .K_W(C_W), .K_F(C_F), .P_W(EB_W), .P_F(EB_F))
    u_eb_r (.clk, .rst_n, .x(xb_r), .c(c_r), .p(eb_r));

  // eps[n] = d[n] - e_bar[n], e_bar[n] = eb_g + eb_r saturated to sfix13_En16
  logic signed [EB_W-1:0] e_bar;
  assign e_bar = EB_W'(rnd_sat(64'(eb_g) + 64'(eb_r), 0, EB_W));
  assign eps   = EB_W'(rnd_sat((64'(d_q2) <<< (EB_F - FB_F)) - 64'(e_bar), 0, EB_W));

  for (genvar k = 0; k < NC; k++) begin : g_lms
    lms_update #(.X_W(FB_W), .X_F(FB_F), .E_W(EB_W), .E_F(EB_F), .PROD_W(PG_W), .PROD_F(PG_F),
                 .MU_SHIFT(MU_G_SHIFT), .CO_W(C_W), .CO_F(C_F))
      u_lms_g (.clk, .rst_n, .xb(xb_g2[k]), .eps, .c(c_g[k]), .sat(sat_g[k]));
    lms_update #(.X_W(FB_W), .X_F(FB_F), .E_W(EB_W), .E_F(EB_F), .PROD_W(PR_W), .PROD_F(PR_F),
                 .MU_SHIFT(MU_R_SHIFT), .CO_W(C_W), .CO_F(C_F))
      u_lms_r (.clk, .rst_n, .xb(xb_r2[k]), .eps, .c(c_r[k]), .sat(sat_r[k]));
  end

  assign coef_sat = |sat_g | |sat_r;

endmodule
