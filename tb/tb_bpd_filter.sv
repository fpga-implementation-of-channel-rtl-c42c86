// Testbench for bpd_filter: feeds single tones as they look after
// undersampling from Nyquist band K = 1, 2, 3 and 4 and compares the output,
// 17 clocks later, with the exact derivative of the analog tone,
// d/dn cos(2*pi*f*n + p) = -2*pi*f*sin(2*pi*f*n + p), with f the analog
// frequency as a fraction of fs. Tolerance covers the 31-tap filters' ripple
// and the output rounding; a wrong latency, sign or scale factor shows as an
// error of the order of the amplitude. Finally band 15 must flag saturation.
module tb_bpd_filter;
  import tiadc_cal_pkg::*;

  localparam int LAT = 17;

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic signed [Y_W-1:0] y = '0;
  logic [KNB_W-1:0]      nyq_band = 4'd1;
  logic signed [H_W-1:0] yd;
  logic                  sat;

  bpd_filter dut (.*);
  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  real hist [LAT+1];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tone(int k, real f, real amp);
    real ph, err, worst, got;
    int  cnt;
    nyq_band = 4'(k);
    worst = 0.0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      ph = 2.0 * PI * f * n + 0.3;
      y  = Y_W'($rtoi(amp * $cos(ph) * real'(1 << Y_F)));
      for (int i = LAT; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = -2.0 * PI * f * amp * $sin(ph);
      if (n > 60) begin
        // yd now holds the output for the sample driven LAT steps ago (its
        // register took it at the last rising edge)
        got = real'(yd) / real'(1 << H_F);
        err = got - hist[LAT];
        if (err < 0.0) err = -err;
        if (err > worst) worst = err;
      end
    end
    checks++;
    // relative error bound: 3% of the derivative amplitude plus 2 LSB
    if (worst > 0.03 * 2.0 * PI * f * amp + 2.0 / real'(1 << H_F)) begin
      failures++;
      $display("FAIL: K=%0d f=%0.3f worst error %f (amplitude %f)", k, f, worst, 2.0 * PI * f * amp);
    end else
      $display("K=%0d f=%0.3f worst error %f of %f", k, f, worst, 2.0 * PI * f * amp);
  endtask

  initial begin
    for (int i = 0; i <= LAT; i++) hist[i] = 0.0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // analog frequencies (fraction of fs) in bands 1..4; baseband 0.2..0.4 fs
    tone(1, 0.25, 0.9);
    tone(1, 0.35, 0.9);
    tone(2, 1.0 - 0.25, 0.9);
    tone(2, 1.0 - 0.35, 0.9);
    tone(3, 1.0 + 0.25, 0.9);
    tone(3, 1.0 + 0.32, 0.9);
    tone(4, 2.0 - 0.3, 0.5);
    // saturation: band 15 scales the Hilbert branch by -7*2*pi and clips
    begin
      bit seen;
      seen = 0;
      nyq_band = 4'd15;
      for (int n = 0; n < 100; n++) begin
        @(negedge clk);
        y = Y_W'($rtoi(0.9 * $cos(2.0 * PI * 0.3 * n) * real'(1 << Y_F)));
        if (sat) seen = 1;
      end
      checks++;
      if (!seen) begin failures++; $display("FAIL: no saturation flagged in band 15"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
