// LMS update of one mismatch coefficient: c[n] = c[n-1] + mu * x_bar[n] * eps[n].
//
// Pipeline, as drawn in the LMS block of the architecture this follows:
//   1. product x_bar * eps, rounded to PROD_W/PROD_F        (register)
//   2. step size mu = 2^-MU_SHIFT applied as a shift, and the
//      result aligned to the coefficient format C_W/C_F        (register)
//   3. accumulator c <= c + step                             (register)
//   4. output copy of the accumulator                        (register)
// so a product reaches the coefficient output 4 clocks after its inputs. The
// gain branch uses sfix20_En16 products and mu = 2^-5, the timing branch
// sfix18_En12 products and mu = 2^-7; both keep coefficients in sfix24_En31.
//
// Own choices: rounding is half up (truncation would bias the estimate), the
// aligned step and the accumulator saturate instead of wrapping, and reset
// clears the coefficient to 0.
module lms_update
  import tiadc_cal_pkg::*;
#(
  parameter int X_W      = FB_W,
  parameter int X_F      = FB_F,
  parameter int E_W      = EB_W,
  parameter int E_F      = EB_F,
  parameter int PROD_W   = PG_W,
  parameter int PROD_F   = PG_F,
  parameter int MU_SHIFT = 5,
  parameter int CO_W     = C_W,
  parameter int CO_F     = C_F
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [X_W-1:0]  xb,    // filtered signal vector element x_bar
  input  logic signed [E_W-1:0]  eps,   // estimation error epsilon[n]
  output logic signed [CO_W-1:0] c,     // coefficient estimate
  output logic                   sat    // accumulator clipped this clock
);

  logic signed [PROD_W-1:0] prod_q;
  logic signed [CO_W-1:0]   step_q, acc_q;
  logic signed [63:0]       acc_next;

  assign acc_next = 64'(acc_q) + 64'(step_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '0;
      step_q <= '0;
      acc_q  <= '0;
      c      <= '0;
      sat    <= 1'b0;
    end else begin
      prod_q <= PROD_W'(rnd_sat(64'(xb) * 64'(eps), X_F + E_F - PROD_F, PROD_W));
      step_q <= CO_W'(rnd_sat(64'(prod_q), PROD_F + MU_SHIFT - CO_F, CO_W));
      acc_q  <= CO_W'(rnd_sat(acc_next, 0, CO_W));
      c      <= acc_q;
      sat    <= clips(acc_next, 0, CO_W);
    end
  end

endmodule
