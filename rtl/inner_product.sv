// Registered inner product c^T x of an N-element coefficient vector and an
// N-element signal vector.
//
// This is the multiplier drawn with a coefficient vector in the calibrator:
// c_g^T x_hat_g and c_r^T x_hat_r build the error estimate e_hat[n] in the
// correction path, and c_g^T x_bar_g and c_r^T x_bar_r build e_bar[n] in the
// estimation path. The N products are summed at full precision, rounded half
// up and saturated to P_W/P_F, and registered: latency one clock.
module inner_product
  import tiadc_cal_pkg::*;
#(
  parameter int N   = 3,
  parameter int X_W = H_W,
  parameter int X_F = H_F,
  parameter int K_W = C_W,
  parameter int K_F = C_F,
  parameter int P_W = EG_W,
  parameter int P_F = EG_F
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [X_W-1:0] x [N],
  input  logic signed [K_W-1:0] c [N],
  output logic signed [P_W-1:0] p
);

  logic signed [63:0] acc;

  always_comb begin
    acc = '0;
    for (int k = 0; k < N; k++) acc += 64'(x[k]) * 64'(c[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= '0;
    else        p <= P_W'(rnd_sat(acc, X_F + K_F - P_F, P_W));
  end

endmodule
