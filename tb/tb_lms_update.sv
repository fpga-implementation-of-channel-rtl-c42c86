// Testbench for lms_update (gain-branch formats: x_bar sfix13_En11,
// eps sfix13_En16, product sfix20_En16, mu = 2^-5, c sfix24_En31).
//
// 1. Bit-exact: random inputs are run through a reference model of the
//    four-stage pipeline kept here in 64-bit integers; c must match it on
//    every clock, which also fixes the latency at 4 clocks.
// 2. Saturation: a long run of large positive products must stop the
//    coefficient at the top of sfix24 and raise sat.
// 3. Closed loop: with eps = (c_true - c) * x_bar formed here from the
//    module's own output, c must converge to c_true = -1.5e-3.
module tb_lms_update;
  import tiadc_cal_pkg::*;

  logic                   clk = 1'b0, rst_n = 1'b0;
  logic signed [FB_W-1:0] xb = '0;
  logic signed [EB_W-1:0] eps = '0;
  logic signed [C_W-1:0]  c;
  logic                   sat;

  lms_update dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clip(longint v, int w);
    longint hi = (64'sd1 <<< (w - 1)) - 1;
    if (v > hi) return hi;
    if (v < -hi - 1) return -hi - 1;
    return v;
  endfunction

  initial begin
    longint pr, st, ac, co, ctrue, xr, cr;
    bit     seen_sat;
    real    cr_real, xv;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pr = 0; st = 0; ac = 0; co = 0;
    // 1. bit-exact against the reference pipeline
    for (int t = 0; t < 4000; t++) begin
      xb  = FB_W'($urandom);
      eps = EB_W'($signed($urandom_range(0, 255)) - 128);
      @(negedge clk);
      co = ac;
      ac = clip(ac + st, C_W);
      st = clip(pr <<< 10, C_W);                                  // 2^(31-16-5)
      pr = clip((longint'(xb) * longint'(eps) + 1024) >>> 11, PG_W); // En27 -> En16
      checks++;
      if (longint'(c) != co) begin
        failures++;
        $display("FAIL: t=%0d c=%0d expected %0d", t, c, co);
      end
    end
    // 2. saturation
    seen_sat = 0;
    xb  = 13'sd4095;
    eps = 13'sd4095;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (sat) seen_sat = 1;
    end
    checks++;
    if (!seen_sat || c != {1'b0, {(C_W-1){1'b1}}}) begin
      failures++;
      $display("FAIL: saturation, sat seen %0b, c=%0d", seen_sat, c);
    end
    // 3. closed loop towards c_true
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    ctrue = -longint'(1.5e-3 * 2.0 ** 31);
    for (int t = 0; t < 60000; t++) begin
      xv  = 0.9 * $sin(0.37 * t);
      xb  = FB_W'($rtoi(xv * 2048.0));
      xr  = longint'(xb);
      cr  = longint'(c);
      // eps in En16: (c_true - c)[En31] * x[En11] -> En42, shift 26
      eps = EB_W'(clip(((ctrue - cr) * xr) >>> 26, EB_W));
      @(negedge clk);
    end
    cr_real = real'(c) / 2.0 ** 31;
    $display("closed loop: c = %e (target -1.5e-3)", cr_real);
    checks++;
    if (cr_real > -1.4e-3 || cr_real < -1.6e-3) begin
      failures++;
      $display("FAIL: closed loop did not converge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
