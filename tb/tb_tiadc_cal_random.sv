// Monte-Carlo test of the TIADC mismatch calibrator at its default size, on
// the evaluation scenario: a 4-channel TIADC whose gain and timing errors
// are drawn at random, Gaussian with zero mean, 0.2 % standard deviation
// for the gains and 0.33 ps for the skews (8.91e-4 of the sampling period
// at fs = 2.7 GHz), 60 dB SNR, a 42-tone input in the third Nyquist band
// (1.2..1.4 fs, i.e. 3.24..3.78 GHz).
//
// NTRIAL draws are run one after another. Each draw starts from a reset, so
// the coefficients start at zero and the first sample after reset comes from
// sub-ADC 0, and runs TRIAL_LEN samples. At the end of each draw the test
// checks that the coefficient estimates lie near the values computed from
// the drawn mismatches (within 3e-4 for c_g and 1.5e-4 for c_r: larger
// draws leave a larger bias from signal leaking into the mismatch band),
// that the corrected output reaches MIN_SNDR_DB, and that the corrected
// SNDR is above the uncorrected one by MIN_GAIN_DB. The
// margin is kept small because a mild draw leaves little to correct; the
// average improvement over the draws must reach MIN_MEAN_GAIN_DB.
// Mechanisms counted: resets, coefficient updates.
module tb_tiadc_cal_random;
  import tiadc_cal_pkg::*;
  import tiadc_model_pkg::*;

  localparam int  M                = 4;
  localparam int  NC               = M - 1;
  localparam int  LAT              = 19;
  localparam int  NTRIAL           = 4;
  localparam int  TRIAL_LEN        = 90000;
  localparam int  MEAS_LEN         = 20000;
  localparam real SIGMA_G          = 0.002;
  localparam real SIGMA_R          = 0.33e-12 * 2.7e9;
  localparam real MIN_SNDR_DB      = 54.0;
  localparam real MIN_GAIN_DB      = 3.0;
  localparam real MIN_MEAN_GAIN_DB = 8.0;

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
  int n_updates = 0, n_reset = 0;

  tiadc_model adc;
  real        xid_hist [LAT+1];   // ideal samples, index = age in clocks
  int         yq_hist  [LAT+1];   // quantized TIADC samples
  longint     n;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real c2r(logic signed [C_W-1:0] c);
    return real'(c) / real'(64'd1 << C_F);
  endfunction

  // Drive one sample on the falling edge and keep the histories.
  task automatic step();
    real ys;
    @(negedge clk);
    rst_n = 1'b1;
    ys = adc.sample(n);
    for (int i = LAT; i > 0; i--) begin
      xid_hist[i] = xid_hist[i-1];
      yq_hist[i]  = yq_hist[i-1];
    end
    xid_hist[0] = adc.ideal(n);
    yq_hist[0]  = tiadc_model::quant(ys, Y_W, Y_F);
    y_in        = Y_W'(yq_hist[0]);
    n++;
  endtask

  task automatic run_trial(int t, output real gain);
    real px, pu, pc, xo, y_ref, sndr_u, sndr_c, ce, cx;
    logic signed [C_W-1:0] prev_g0;

    // new draw, then reset the calibrator
    for (int m = 0; m < M; m++) begin
      adc.g[m] = 1.0 + SIGMA_G * tiadc_model::gauss();
      adc.r[m] = SIGMA_R * tiadc_model::gauss();
    end
    adc.normalise();
    $display("draw %0d: g = %f %f %f %f  r = %e %e %e %e", t,
             adc.g[0], adc.g[1], adc.g[2], adc.g[3], adc.r[0], adc.r[1], adc.r[2], adc.r[3]);
    @(negedge clk);
    rst_n = 1'b0;
    y_in  = '0;
    repeat (3) @(negedge clk);
    n_reset++;
    n = 0;
    for (int i = 0; i <= LAT; i++) begin xid_hist[i] = 0.0; yq_hist[i] = 0; end

    px = 0.0; pu = 0.0; pc = 0.0;
    for (int i = 0; i < TRIAL_LEN; i++) begin
      prev_g0 = c_g[0];
      step();
      if (c_g[0] != prev_g0) n_updates++;
      if (i >= TRIAL_LEN - MEAS_LEN) begin
        xo    = real'(x_out) / real'(1 << XO_F);
        y_ref = real'(yq_hist[LAT]) / real'(1 << Y_F);
        px += xid_hist[LAT] * xid_hist[LAT];
        pu += (xid_hist[LAT] - y_ref) * (xid_hist[LAT] - y_ref);
        pc += (xid_hist[LAT] - xo) * (xid_hist[LAT] - xo);
      end
    end
    sndr_u = 10.0 * $log10(px / pu);
    sndr_c = 10.0 * $log10(px / pc);
    gain   = sndr_c - sndr_u;
    $display("draw %0d: SNDR before %0.2f dB, after %0.2f dB", t, sndr_u, sndr_c);
    check(sndr_c >= MIN_SNDR_DB, $sformatf("draw %0d: corrected SNDR too low", t));
    check(gain >= MIN_GAIN_DB, $sformatf("draw %0d: SNDR improvement too small", t));
    for (int e = 0; e < NC; e++) begin
      ce = adc.expected(0, e);  cx = c2r(c_g[e]);
      check((cx - ce) < 3.0e-4 && (ce - cx) < 3.0e-4, $sformatf("draw %0d: c_g[%0d] = %e, expected %e", t, e, cx, ce));
      ce = adc.expected(1, e);  cx = c2r(c_r[e]);
      check((cx - ce) < 1.5e-4 && (ce - cx) < 1.5e-4, $sformatf("draw %0d: c_r[%0d] = %e, expected %e", t, e, cx, ce));
    end
  endtask

  // watchdog
  initial begin
    repeat (NTRIAL * (TRIAL_LEN + 10) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real gain, gain_sum;
    adc = new(M, 42, 0.8 / 42.0 * 2.2);
    adc.set_band(1.2, 1.4);
    adc.set_snr(60.0);
    gain_sum = 0.0;
    for (int t = 0; t < NTRIAL; t++) begin
      run_trial(t, gain);
      gain_sum += gain;
    end
    $display("mean SNDR improvement %0.2f dB; mechanisms: resets=%0d updates=%0d",
             gain_sum / NTRIAL, n_reset, n_updates);
    check(gain_sum / NTRIAL >= MIN_MEAN_GAIN_DB, "mean SNDR improvement too small");
    check(n_reset == NTRIAL && n_updates > 0, "resets or coefficient updates missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
