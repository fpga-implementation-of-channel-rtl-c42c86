// Testbench for modulator.
//
// M = 4 (default): for random samples at every phase, the three outputs must
// equal s times (2cos(pi*p/2), -2sin(pi*p/2), (-1)^p), i.e. the integer table
// {2,0,-2,0}, {0,-2,0,2}, {1,-1,1,-1}, moved from sfix13_En11 to sfix13_En8
// with round half up, one clock later. Full-scale inputs must not saturate
// (|2s| < 4 is inside sfix13_En8).
// M = 8: the seven outputs must match 2cos(k*2pi*p/8), -2sin(k*2pi*p/8)
// (k = 1..3) and (-1)^p, computed here in floating point, within 1 LSB.
module tb_modulator;
  import tiadc_cal_pkg::*;

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic signed [Y_W-1:0] s = '0;
  logic [1:0]            ph4 = '0;
  logic [2:0]            ph8 = '0;
  logic signed [H_W-1:0] v4 [3];
  logic signed [H_W-1:0] v8 [7];
  logic                  sat4, sat8;

  modulator               u4 (.clk, .rst_n, .s, .phase(ph4), .v(v4), .sat(sat4));
  modulator #(.M(8))      u8 (.clk, .rst_n, .s, .phase(ph8), .v(v8), .sat(sat8));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam real PI_R = 3.14159265358979323846;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  tab [4][3] = '{'{2, 0, 1}, '{0, -2, -1}, '{-2, 0, 1}, '{0, 2, -1}};
    int  sv, e4, p;
    real e8, g8;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      sv  = (t < 8) ? ((t % 2) ? -4096 : 4095) : $signed($urandom_range(0, 8191)) - 4096;
      p   = t % 8;
      s   = Y_W'(sv);
      ph4 = 2'(p);
      ph8 = 3'(p);
      @(negedge clk);
      for (int e = 0; e < 3; e++) begin
        // s*m/8 rounded half up: floor((s*m + 4) / 8)
        e4 = (sv * tab[p % 4][e] + 4) >>> 3;
        checks++;
        if (int'(v4[e]) != e4) begin
          failures++;
          $display("FAIL: M=4 phase %0d elem %0d s=%0d got %0d expected %0d", p % 4, e, sv, v4[e], e4);
        end
      end
      checks++;
      if (sat4) begin failures++; $display("FAIL: M=4 saturation flagged"); end
      for (int e = 0; e < 7; e++) begin
        if (e == 6)          e8 = (p % 2) ? -1.0 : 1.0;
        else if (e % 2 == 0) e8 = 2.0 * $cos(2.0 * PI_R * (e / 2 + 1) * p / 8.0);
        else                 e8 = -2.0 * $sin(2.0 * PI_R * (e / 2 + 1) * p / 8.0);
        e8 = e8 * sv / 8.0;
        g8 = real'(v8[e]);
        checks++;
        if (g8 - e8 > 1.0 || e8 - g8 > 1.0) begin
          failures++;
          $display("FAIL: M=8 phase %0d elem %0d got %f expected %f", p, e, g8, e8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
