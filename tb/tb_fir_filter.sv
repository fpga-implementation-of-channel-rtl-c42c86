// Testbench for fir_filter in its three uses.
//
// 1. Impulse response: an impulse through each filter kind must reproduce the
//    taps worked out here independently from the closed-form formulas
//    (differentiator (-1)^j/j, Hilbert 2/(pi*j) for odd j, band-stop
//    delta - (lowpass(0.97) - lowpass(0.25))), times a Hann window, at delays
//    0..30, to within one output LSB.
// 2. Frequency response of the band-stop f[n] at its default edges: a tone
//    at 0.6*pi (inside the rejected band) must come out below 5% of its
//    amplitude, a tone at 0.1*pi (lower mismatch band) above 80%, and a
//    tone at pi, where the upper edge at 0.97*pi leaves half the window's
//    transition, between 35% and 60%.
module tb_fir_filter;
  import tiadc_cal_pkg::*;

  localparam int  NT = 31;
  localparam real PI_R = 3.14159265358979323846;

  logic                   clk = 1'b0, rst_n = 1'b0;
  logic signed [Y_W-1:0]  x = '0;
  logic signed [H_W-1:0]  y_d, y_h;
  logic signed [FB_W-1:0] y_f;

  fir_filter #(.KIND(FIR_DIFF))    u_d (.clk, .rst_n, .x, .y(y_d));
  fir_filter #(.KIND(FIR_HILBERT)) u_h (.clk, .rst_n, .x, .y(y_h));
  fir_filter #(.KIND(FIR_BANDSTOP), .OUT_W(FB_W), .OUT_F(FB_F))
    u_f (.clk, .rst_n, .x, .y(y_f));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic real ref_tap(int kind, int i);
    int  j;
    real h, w;
    j = i - 15;
    w = 0.5 + 0.5 * $cos(2.0 * PI_R * j / 32.0);
    if (kind == 0)      h = (j == 0) ? 0.0 : ((j % 2 != 0) ? -1.0 / j : 1.0 / j);
    else if (kind == 1) h = (j % 2 != 0) ? 2.0 / (PI_R * j) : 0.0;
    else if (j == 0)    h = 1.0 - (0.97 - 0.25);
    else                h = -($sin(0.97 * PI_R * j) - $sin(0.25 * PI_R * j)) / (PI_R * j);
    return h * w;
  endfunction

  task automatic cmp(real got, real expv, real lsb, string what);
    checks++;
    if (got - expv > lsb || expv - got > lsb) begin
      failures++;
      $display("FAIL: %s got %f expected %f", what, got, expv);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real amp_in, amp_f, a;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // impulse of height 0.5 (1024 in sfix13_En11)
    for (int i = 0; i < NT + 4; i++) begin
      x = (i == 0) ? 13'sd1024 : 13'sd0;
      #1;   // combinational output for the current delay line
      if (i < NT) begin
        cmp(real'(y_d) / 256.0,  0.5 * ref_tap(0, i), 1.5 / 256.0,  $sformatf("h_d tap %0d", i));
        cmp(real'(y_h) / 256.0,  0.5 * ref_tap(1, i), 1.5 / 256.0,  $sformatf("h_h tap %0d", i));
        cmp(real'(y_f) / 2048.0, 0.5 * ref_tap(2, i), 1.5 / 2048.0, $sformatf("f tap %0d", i));
      end else begin
        cmp(real'(y_f) / 2048.0, 0.0, 0.5 / 2048.0, "f after impulse");
      end
      @(negedge clk);
    end
    // tone responses of f[n]
    for (int k = 0; k < 3; k++) begin
      real wn;
      wn = (k == 0) ? 0.6 : (k == 1) ? 0.1 : 1.0;
      amp_f = 0.0;
      for (int n = 0; n < 200; n++) begin
        x = Y_W'($rtoi(0.8 * $cos(wn * PI_R * n) * 2048.0));
        #1;
        if (n > 40) begin
          a = real'(y_f) / 2048.0;
          if (a < 0.0) a = -a;
          if (a > amp_f) amp_f = a;
        end
        @(negedge clk);
      end
      amp_in = 0.8;
      checks++;
      if ((k == 0 && amp_f > 0.05 * amp_in) || (k == 1 && amp_f < 0.8 * amp_in) ||
          (k == 2 && (amp_f < 0.35 * amp_in || amp_f > 0.6 * amp_in))) begin
        failures++;
        $display("FAIL: f[n] gain at %0.2f*pi is %f", wn, amp_f / amp_in);
      end else
        $display("f[n] gain at %0.2f*pi: %f", wn, amp_f / amp_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
