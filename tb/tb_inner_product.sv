// Testbench for inner_product with the formats of the correction path
// (x: sfix13_En8, c: sfix24_En31, p: sfix12_En18). Random vectors, including
// large ones that must saturate, are compared one clock later with
// p = clip(floor((sum x_k*c_k + 2^20) / 2^21)), computed here in 64-bit
// integers.
module tb_inner_product;
  import tiadc_cal_pkg::*;

  logic                   clk = 1'b0, rst_n = 1'b0;
  logic signed [H_W-1:0]  x [3];
  logic signed [C_W-1:0]  c [3];
  logic signed [EG_W-1:0] p;

  inner_product dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc, q;
    int     nsat;
    nsat = 0;
    foreach (x[k]) begin x[k] = '0; c[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      acc = 0;
      for (int k = 0; k < 3; k++) begin
        x[k] = H_W'($urandom);
        // mostly small coefficients (|c| < 2^-9), sometimes full scale
        c[k] = (t % 10 == 0) ? C_W'($urandom) : C_W'($signed($urandom_range(0, 1 << 23)) - (1 << 22));
        acc += longint'(x[k]) * longint'(c[k]);
      end
      q = (acc + (64'sd1 << 20)) >>> 21;
      if (q > 2047)  begin q = 2047;  nsat++; end
      if (q < -2048) begin q = -2048; nsat++; end
      @(negedge clk);
      checks++;
      if (longint'(p) != q) begin
        failures++;
        $display("FAIL: t=%0d got %0d expected %0d", t, p, q);
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
