// End-to-end test of the TIADC mismatch calibrator at its default size
// (M = 4 channels, 31-tap filters, mu_g = 2^-5, mu_r = 2^-7).
//
// A behavioural 4-channel TIADC model with fixed gain and timing mismatches
// feeds a 42-tone input, first from the third Nyquist band (1.2..1.4 fs, the
// band 3.24..3.78 GHz at fs = 2.7 GHz) and then, without a reset, from the
// second band (0.6..0.8 fs), then the fourth (1.6..1.8 fs) and the first
// (0.2..0.4 fs), changing nyq_band to match each time. The samples
// carry white noise at 60 dB SNR and are quantized to 13 bits. Checks:
//   * latency: before the coefficients move, x_out equals y_in 19 clocks earlier;
//   * each phase: after CONV_AT samples and again at the end of the phase,
//     the coefficient estimates lie near the values computed from the
//     model's gains and skews (four times the tolerance in band 4), and the SNDR
//     of the corrected output exceeds that of the uncorrected samples by at
//     least MIN_GAIN_DB (bands 3, 4) or MIN_GAIN_2_DB (bands 1, 2) and
//     reaches MIN_SNDR_DB (MIN_SNDR_4_DB in band 4);
//   * mechanisms seen at least once: coefficient updates, odd-band runs,
//     even-band runs, band switches.
module tb_tiadc_cal_top;
  import tiadc_cal_pkg::*;
  import tiadc_model_pkg::*;

  localparam int  M           = 4;
  localparam int  NC          = M - 1;
  localparam int  LAT         = 19;
  localparam int  PHASE_LEN   = 90000;
  localparam int  MEAS_LEN    = 20000;
  localparam real MIN_GAIN_DB = 8.0;
  // The second-band input sits at lower analog frequencies, so its timing
  // error and hence the uncorrected error are smaller, while the noise floor
  // (60 dB SNR plus 13-bit quantization) stays: less room for improvement.
  localparam real MIN_GAIN_2_DB = 5.0;
  localparam real MIN_SNDR_DB = 54.0;
  // Band 4 scales the Hilbert branch by 4*pi: derivative words are twice as
  // large as in band 3 and their rounding and filter ripple weigh more, so
  // it settles to a slightly lower SNDR. Its k = 1 gain pair also settles
  // further from the model values (about 6e-4 off) at little cost in SNDR,
  // so the coefficient tolerance is four times wider there.
  localparam real MIN_SNDR_4_DB = 53.0;
  localparam int  CONV_AT     = 50000;   // samples allowed to converge

  logic                   clk = 1'b0;
  logic                   rst_n = 1'b0;
  logic signed [Y_W-1:0]  y_in = '0;
  logic [KNB_W-1:0]       nyq_band = 4'd3;
  logic signed [XO_W-1:0] x_out;
  logic signed [C_W-1:0]  c_g [NC];
  logic signed [C_W-1:0]  c_r [NC];
  logic signed [EB_W-1:0] eps;
  logic                   deriv_sat, coef_sat;

  tiadc_cal_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_updates = 0, n_odd = 0, n_even = 0, n_switch = 0, n_dsat = 0, n_csat = 0;

  tiadc_model adc;
  real        xid_hist [LAT+1];   // ideal samples, index = age in clocks
  int         yq_hist  [LAT+1];   // quantized TIADC samples
  longint     n = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Drive one sample on the falling edge and keep the histories.
  task automatic step();
    real xi, ys;
    @(negedge clk);
    rst_n = 1'b1;   // the first sample after reset comes from sub-ADC 0
    xi = adc.ideal(n);
    ys = adc.sample(n);
    for (int i = LAT; i > 0; i--) begin
      xid_hist[i] = xid_hist[i-1];
      yq_hist[i]  = yq_hist[i-1];
    end
    xid_hist[0] = xi;
    yq_hist[0]  = tiadc_model::quant(ys, Y_W, Y_F);
    y_in        = Y_W'(yq_hist[0]);
    n++;
  endtask

  function automatic real c2r(logic signed [C_W-1:0] c);
    return real'(c) / real'(64'd1 << C_F);
  endfunction

  // Run len samples, measuring SNDR over the last MEAS_LEN of them.
  task automatic check_coefs(string name, real scale);
    real ce, cx;
    for (int e = 0; e < NC; e++) begin
      ce = adc.expected(0, e);  cx = c2r(c_g[e]);
      $display("  c_g[%0d] = %e expected %e", e, cx, ce);
      check((cx - ce) < 2.0e-4 * scale && (ce - cx) < 2.0e-4 * scale, $sformatf("%s: c_g[%0d] off", name, e));
      ce = adc.expected(1, e);  cx = c2r(c_r[e]);
      $display("  c_r[%0d] = %e expected %e", e, cx, ce);
      check((cx - ce) < 1.0e-4 * scale && (ce - cx) < 1.0e-4 * scale, $sformatf("%s: c_r[%0d] off", name, e));
    end
  endtask

  task automatic run_phase(int len, string name, real min_gain, real min_sndr, real tol_scale);
    real px, pu, pc, xo, x_ref, y_ref, sndr_u, sndr_c;
    logic signed [C_W-1:0] prev_g0;
    px = 0.0; pu = 0.0; pc = 0.0;
    for (int i = 0; i < len; i++) begin
      prev_g0 = c_g[0];
      step();
      // outputs settled after the rising edge that took the previous sample
      if (c_g[0] != prev_g0) n_updates++;
      if (i == CONV_AT) begin
        $display("%s after %0d samples:", name, CONV_AT);
        check_coefs({name, " at 50K"}, 1.5 * tol_scale);
      end
      if (deriv_sat) n_dsat++;
      if (coef_sat)  n_csat++;
      if (i >= len - MEAS_LEN) begin
        // x_out now belongs to the sample driven LAT+1 steps ago
        xo    = real'(x_out) / real'(1 << XO_F);
        x_ref = xid_hist[LAT+0];
        y_ref = real'(yq_hist[LAT]) / real'(1 << Y_F);
        px += x_ref * x_ref;
        pu += (x_ref - y_ref) * (x_ref - y_ref);
        pc += (x_ref - xo) * (x_ref - xo);
      end
    end
    sndr_u = 10.0 * $log10(px / pu);
    sndr_c = 10.0 * $log10(px / pc);
    $display("%s: SNDR before %0.2f dB, after %0.2f dB", name, sndr_u, sndr_c);
    check(sndr_c - sndr_u >= min_gain, {name, ": SNDR improvement too small"});
    check(sndr_c >= min_sndr, {name, ": corrected SNDR too low"});
    check_coefs(name, tol_scale);
  endtask

  // watchdog
  initial begin
    repeat (4 * PHASE_LEN + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    adc = new(M, 42, 0.8 / 42.0 * 2.2);
    adc.g = '{1.003, 0.998, 1.001, 0.998};
    adc.r = '{3.0e-4, -9.0e-4, 6.0e-4, 0.0};
    adc.normalise();
    adc.set_band(1.2, 1.4);
    adc.set_snr(60.0);
    for (int i = 0; i <= LAT; i++) begin xid_hist[i] = 0.0; yq_hist[i] = 0; end

    repeat (2) @(negedge clk);

    // latency: coefficients are still zero for the first ~38 clocks
    for (int i = 0; i < 36; i++) begin
      step();
      if (i >= LAT) check(int'(x_out) == yq_hist[LAT], $sformatf("latency, sample %0d", i));
    end

    run_phase(PHASE_LEN - 36, "band 3", MIN_GAIN_DB, MIN_SNDR_DB, 1.0);
    n_odd++;

    nyq_band = 4'd2;
    adc.set_band(0.6, 0.8);
    n_switch++;
    run_phase(PHASE_LEN, "band 2", MIN_GAIN_2_DB, MIN_SNDR_DB, 1.0);
    n_even++;

    nyq_band = 4'd4;
    adc.set_band(1.6, 1.8);
    n_switch++;
    run_phase(PHASE_LEN, "band 4", MIN_GAIN_DB, MIN_SNDR_4_DB, 4.0);
    n_even++;

    nyq_band = 4'd1;
    adc.set_band(0.2, 0.4);
    n_switch++;
    run_phase(PHASE_LEN, "band 1", MIN_GAIN_2_DB, MIN_SNDR_DB, 1.0);
    n_odd++;

    $display("mechanisms: updates=%0d odd=%0d even=%0d switch=%0d deriv_sat=%0d coef_sat=%0d",
             n_updates, n_odd, n_even, n_switch, n_dsat, n_csat);
    check(n_updates > 0, "no coefficient update seen");
    check(n_odd > 0 && n_even > 0 && n_switch > 0, "band runs missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
