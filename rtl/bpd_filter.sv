// Bandpass derivative filter h_bpd[n] = h_d[n] + (-1)^K * floor(K/2) * 2*pi * h_h[n].
//
// Estimates the first derivative (in units of one sample period) of an input
// that was undersampled from the K-th Nyquist band. The baseband derivative
// comes from the differentiator h_d; the part lost by folding comes from the
// Hilbert transformer h_h scaled by (-1)^K floor(K/2) 2*pi. K is a run-time
// input, so the same hardware serves any Nyquist band (K = 1 gives a plain
// differentiator).
//
// Pipeline, as in the architecture this follows: both 31-tap filters are
// followed by a register; the Hilbert branch is then multiplied by the scale
// factor, added to the differentiator branch, and the sum is registered.
// Latency: 2 clocks plus the filters' group delay of (NTAPS-1)/2 = 15 samples,
// 17 samples in all. All three outputs are sfix13_En8 as printed.
//
// Own choices: the scale factor is held in a register (sfix20_En12) that is
// reloaded from nyq_band every clock, so a change of band takes effect one
// clock later; the scaled Hilbert word and the sum saturate instead of
// wrapping. Bands up to 15 are accepted; the scale of band 0 is 0.
module bpd_filter
  import tiadc_cal_pkg::*;
#(
  parameter int NTAPS = 31
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [Y_W-1:0]   y,         // sfix13_En11 TIADC sample
  input  logic [KNB_W-1:0]        nyq_band,  // Nyquist band K of the analog input
  output logic signed [H_W-1:0]   yd,        // sfix13_En8 derivative estimate
  output logic                    sat        // a saturation happened this clock
);

  // round(2*pi * 2^SC_F)
  localparam logic signed [SC_W-1:0] TWO_PI_Q = SC_W'($rtoi(2.0 * PI * real'(1 << SC_F) + 0.5));

  logic signed [H_W-1:0]  hd, hh, hd_q, hh_q, hh_s;
  logic signed [SC_W-1:0] scale_q;
  logic signed [63:0]     hh_prod, sum;

  fir_filter #(.KIND(FIR_DIFF), .NTAPS(NTAPS), .IN_W(Y_W), .IN_F(Y_F), .OUT_W(H_W), .OUT_F(H_F))
    u_hd (.clk, .rst_n, .x(y), .y(hd));

  fir_filter #(.KIND(FIR_HILBERT), .NTAPS(NTAPS), .IN_W(Y_W), .IN_F(Y_F), .OUT_W(H_W), .OUT_F(H_F))
    u_hh (.clk, .rst_n, .x(y), .y(hh));

  always_comb begin
    hh_prod = 64'(hh_q) * 64'(scale_q);
    hh_s    = H_W'(rnd_sat(hh_prod, SC_F, H_W));
    sum     = 64'(hd_q) + 64'(hh_s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hd_q    <= '0;
      hh_q    <= '0;
      yd      <= '0;
      scale_q <= '0;
      sat     <= 1'b0;
    end else begin
      hd_q    <= hd;
      hh_q    <= hh;
      scale_q <= nyq_band[0] ? -(SC_W'(nyq_band >> 1) * TWO_PI_Q) : (SC_W'(nyq_band >> 1) * TWO_PI_Q);
      yd      <= H_W'(rnd_sat(sum, 0, H_W));
      sat     <= clips(hh_prod, SC_F, H_W) || clips(sum, 0, H_W);
    end
  end

endmodule
