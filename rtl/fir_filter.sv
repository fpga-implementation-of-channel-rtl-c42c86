// Linear-phase FIR filter, one sample per clock.
//
// Used for the three fixed filters of the calibrator: the ideal
// differentiator h_d[n], the Hilbert transformer h_h[n] (both 31 taps, as in
// the design this follows) and the mismatch-band filter f[n] (31 taps). The
// taps are worked out at elaboration from the ideal impulse responses times a
// Hann window (tiadc_cal_pkg::fir_tap) and rounded to sfix16_En15.
//
// Structure: direct form. A shift register holds the last NTAPS-1 inputs; the
// output is the combinational sum of the taps times the current and delayed
// inputs, rounded half up and saturated to OUT_W/OUT_F. There is no register
// at the output: the stage after the filter registers it, as the z^-1 blocks
// that follow every filter in the architecture do. Latency is therefore zero
// clocks plus the group delay of (NTAPS-1)/2 samples.
//
// The f[n] default is a band-stop filter rejecting F_LO*pi..F_HI*pi (the
// signal band after undersampling); F_LO = 0 turns it into a high-pass with
// cut-off F_HI*pi. The window and coefficient word are this design's choice.
module fir_filter
  import tiadc_cal_pkg::*;
#(
  parameter fir_kind_e KIND   = FIR_DIFF,
  parameter int        NTAPS  = 31,
  parameter int        IN_W   = Y_W,
  parameter int        IN_F   = Y_F,
  parameter int        OUT_W  = H_W,
  parameter int        OUT_F  = H_F,
  parameter real       F_LO   = 0.25,
  parameter real       F_HI   = 0.97
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);

  typedef logic signed [COEF_W-1:0] coef_arr_t [NTAPS];

  function automatic coef_arr_t design_taps();
    coef_arr_t c;
    real       s;
    for (int i = 0; i < NTAPS; i++) begin
      s = fir_tap(KIND, NTAPS, i, F_LO, F_HI) * real'(1 << COEF_F);
      c[i] = COEF_W'(rnd_sat(64'($rtoi(s < 0.0 ? s - 0.5 : s + 0.5)), 0, COEF_W));
    end
    return c;
  endfunction

  localparam coef_arr_t COEF = design_taps();
  localparam int ACC_W = IN_W + COEF_W + $clog2(NTAPS) + 1;

  logic signed [IN_W-1:0]  dl [NTAPS];   // dl[i] = x delayed by i samples
  logic signed [ACC_W-1:0] acc;

  assign dl[0] = x;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < NTAPS; i++) dl[i] <= '0;
    end else begin
      for (int i = 1; i < NTAPS; i++) dl[i] <= dl[i-1];
    end
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < NTAPS; i++) acc += ACC_W'(dl[i]) * ACC_W'(COEF[i]);
  end

  assign y = OUT_W'(rnd_sat(64'(acc), IN_F + COEF_F - OUT_F, OUT_W));

endmodule
