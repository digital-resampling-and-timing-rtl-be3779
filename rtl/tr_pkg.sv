// tr_pkg: types, widths and elaboration-time helpers shared by the
// resampling and timing recovery datapath.
//
// Number formats (two's complement throughout):
//   sample_t : 14-bit signed sample or interpolant, as used by common
//              ADC/DAC parts.  A 2-PAM symbol has amplitude +/-2^11.
//   mu_t     : 20-bit signed fractional interval.  Because 0 <= mu < 1 the
//              sign bit is always 0, so mu carries 19 fraction bits (Q0.19).
//   Time base accumulators hold a 20-bit fraction plus one MSB that toggles
//   on every integer cross-over (21 bits in all).
//
// The helper functions are used only to compute constants while the design
// is elaborated (raised-cosine coefficients, fixed-point steps).  They use
// plain real arithmetic with a short Taylor series so that no simulator math
// library is needed.
package tr_pkg;

  localparam int XW     = 14;   // sample / interpolant width
  localparam int MUW    = 20;   // fractional interval width (sign + 19 fraction bits)
  localparam int MUF    = MUW - 1;
  localparam int FRACW  = 20;   // fraction bits of a time base accumulator
  localparam int ACCW   = FRACW + 1;
  localparam int ERRW   = 2 * XW + 1;  // Gardner error width

  typedef logic signed [XW-1:0]  sample_t;
  typedef logic signed [MUW-1:0] mu_t;
  typedef logic [ACCW-1:0]       acc_t;
  typedef logic signed [ERRW-1:0] err_t;

  // Interpolator placed in the timing recovery loop.
  typedef enum logic [1:0] {
    INTERP_LINEAR    = 2'd0,
    INTERP_PARABOLIC = 2'd1,
    INTERP_CUBIC     = 2'd2
  } interp_e;

  localparam int SAMPLE_MAX = (1 << (XW - 1)) - 1;
  localparam int SAMPLE_MIN = -(1 << (XW - 1));

  // Saturate a wide signed value to the sample range.
  function automatic sample_t sat_sample(input logic signed [47:0] v);
    if (v > 48'(SAMPLE_MAX))      return sample_t'(SAMPLE_MAX);
    else if (v < -48'sd8192)      return sample_t'(SAMPLE_MIN);
    else                          return sample_t'(v);
  endfunction

  // ---------------------------------------------------------------------
  // Elaboration-time helpers (real arithmetic, constant arguments only)
  // ---------------------------------------------------------------------
  localparam real PI = 3.14159265358979323846;

  // sin(x) for any real x: reduce to [-pi, pi], then a 15-term Taylor series.
  function automatic real c_sin(input real x);
    real r, term, sum;
    int  n;
    r = x;
    while (r >  PI) r = r - 2.0 * PI;
    while (r < -PI) r = r + 2.0 * PI;
    term = r;
    sum  = r;
    for (n = 1; n < 15; n++) begin
      term = -term * r * r / real'((2 * n) * (2 * n + 1));
      sum  = sum + term;
    end
    return sum;
  endfunction

  function automatic real c_cos(input real x);
    return c_sin(x + PI / 2.0);
  endfunction

  // Raised-cosine impulse response, t in symbol periods, peak 1 at t = 0.
  //   h(t) = sinc(t) * cos(pi*beta*t) / (1 - (2*beta*t)^2)
  // At |t| = 1/(2*beta) the limit pi/4 * sinc(1/(2*beta)) is used.
  function automatic real c_rc(input real t, input real beta);
    real sinc, den, x;
    if (t == 0.0) sinc = 1.0;
    else          sinc = c_sin(PI * t) / (PI * t);
    x   = 2.0 * beta * t;
    den = 1.0 - x * x;
    if (den < 1.0e-9 && den > -1.0e-9) begin
      x = 1.0 / (2.0 * beta);
      return (PI / 4.0) * c_sin(PI * x) / (PI * x);
    end
    return sinc * c_cos(PI * beta * t) / den;
  endfunction

  // Round a real to the nearest integer (a real-to-integer cast rounds).
  function automatic longint c_round(input real v);
    return longint'(v);
  endfunction

endpackage
