// Modulation by the vector m_n of the M-channel mismatch model.
//
// For a sample s[n] it forms the M-1 products m_n * s[n] with
//   m_n = (2cos(1*2pi*n/M), -2sin(1*2pi*n/M), ..., 2cos((M/2-1)*2pi*n/M),
//          -2sin((M/2-1)*2pi*n/M), (-1)^n).
// n enters only through its residue modulo M, the `phase` input, which is the
// index of the sub-ADC that took the sample. The entries of m_n are worked out
// at elaboration and held as sfix16_En13 constants (exact for M = 4, where
// they are 0, +-1 and +-2 and the multipliers reduce to shifts and negations).
// Products are rounded half up and saturated to OUT_W/OUT_F.
//
// The output vector is registered: latency one clock, one sample per clock.
// In the calibrator the modulator is the multiplier m_n followed by the z^-1
// stage that comes after it. M must be even.
module modulator
  import tiadc_cal_pkg::*;
#(
  parameter int M     = 4,
  parameter int IN_W  = Y_W,
  parameter int IN_F  = Y_F,
  parameter int OUT_W = H_W,
  parameter int OUT_F = H_F,
  localparam int NC   = M - 1,
  localparam int PH_W = (M > 1) ? $clog2(M) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  s,
  input  logic [PH_W-1:0]         phase,
  output logic signed [OUT_W-1:0] v [NC],
  output logic                    sat
);

  localparam int MV_W = 16;
  localparam int MV_F = 13;
  typedef logic signed [MV_W-1:0] mtab_t [M*NC];   // entry p*NC+e

  function automatic logic signed [MV_W-1:0] q14(real r);
    return MV_W'($rtoi(r < 0.0 ? r * 8192.0 - 0.5 : r * 8192.0 + 0.5));
  endfunction

  function automatic mtab_t make_table();
    mtab_t t;
    for (int p = 0; p < M; p++) begin
      for (int k = 1; k < M / 2; k++) begin
        t[p*NC+2*k-2] = q14( 2.0 * $cos(2.0 * PI * k * p / M));
        t[p*NC+2*k-1] = q14(-2.0 * $sin(2.0 * PI * k * p / M));
      end
      t[p*NC+NC-1] = q14(((p % 2) != 0) ? -1.0 : 1.0);
    end
    return t;
  endfunction

  localparam mtab_t MTAB = make_table();

  logic signed [63:0] prod [NC];
  logic               any_clip;

  always_comb begin
    any_clip = 1'b0;
    for (int e = 0; e < NC; e++) begin
      prod[e]  = 64'(s) * 64'(MTAB[int'(phase)*NC+e]);
      any_clip = any_clip | clips(prod[e], IN_F + MV_F - OUT_F, OUT_W);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < NC; e++) v[e] <= '0;
      sat <= 1'b0;
    end else begin
      for (int e = 0; e < NC; e++) v[e] <= OUT_W'(rnd_sat(prod[e], IN_F + MV_F - OUT_F, OUT_W));
      sat <= any_clip;
    end
  end

endmodule
