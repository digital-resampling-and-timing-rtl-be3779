// interp_cubic: cubic Lagrange interpolator in Farrow structure.
//
// Four samples xm1 = x[m_k-1], x0 = x[m_k], x1 = x[m_k+1], x2 = x[m_k+2]
// and the fractional interval mu give the interpolant at m_k + mu:
//     y = ((v3*mu + v2)*mu + v1)*mu + v0
// with the Farrow branch sums (coefficients scaled by 6 so they become the
// small integers 0, +-1, +-2, +-3, +-6, realised with shifts and adds):
//     6*v3 =  x2 - 3*x1 + 3*x0 -   xm1
//     6*v2 =       3*x1 - 6*x0 + 3*xm1
//     6*v1 = -x2 + 6*x1 - 3*x0 - 2*xm1
//       v0 =                x0
// The three multiplications by mu form a cascade, and the result is divided
// by 6 at the end: a shift by one and a multiplication by the constant 1/3.
// Four guard bits are carried through the cascade; each product with mu is
// truncated, and the final result is rounded and saturated to 14 bits.
//
// Interface: 14-bit signed samples, mu in Q0.19 (20-bit signed, sign 0),
// 14-bit signed interpolant y.  Timing: combinational; the enclosing circuit
// registers y when its output enable is high.
module interp_cubic
  import tr_pkg::*;
(
  input  sample_t xm1,
  input  sample_t x0,
  input  sample_t x1,
  input  sample_t x2,
  input  mu_t     mu,
  output sample_t y
);
  localparam int G      = 4;                      // guard bits in the cascade
  localparam int THIRD  = 21845;                  // round(2^16 / 3)
  localparam int DW     = XW + 6;                 // branch sum width

  logic signed [DW-1:0]   b3, b2, b1;            // 6*v3, 6*v2, 6*v1
  logic signed [DW+G:0]   s3, s2, s1;            // cascade accumulators (Q.G)
  logic signed [DW+G+MUW:0] p3, p2, p1;
  logic signed [47:0]     six_frac;              // 6*(y - x0) in Q.G
  logic signed [47:0]     scaled;
  logic signed [47:0]     yw;

  function automatic logic signed [DW-1:0] ext(input sample_t v);
    return DW'(v);
  endfunction

  always_comb begin
    // Farrow branch filters: fixed coefficients as shift-and-add.
    b3 = ext(x2) - ((ext(x1) <<< 1) + ext(x1)) + ((ext(x0) <<< 1) + ext(x0)) - ext(xm1);
    b2 = ((ext(x1) <<< 1) + ext(x1)) - ((ext(x0) <<< 2) + (ext(x0) <<< 1))
       + ((ext(xm1) <<< 1) + ext(xm1));
    b1 = -ext(x2) + ((ext(x1) <<< 2) + (ext(x1) <<< 1)) - ((ext(x0) <<< 1) + ext(x0))
       - (ext(xm1) <<< 1);
    // Nested evaluation: three multipliers by mu.
    s3 = (DW+G+1)'(b3) <<< G;
    p3 = s3 * mu;
    s2 = (DW+G+1)'(p3 >>> MUF) + ((DW+G+1)'(b2) <<< G);
    p2 = s2 * mu;
    s1 = (DW+G+1)'(p2 >>> MUF) + ((DW+G+1)'(b1) <<< G);
    p1 = s1 * mu;
    six_frac = 48'(p1 >>> MUF);
    // Divide by 6 = multiply by 1/3, then shift by one (plus the guard bits),
    // rounding to nearest.
    scaled = six_frac * 48'(THIRD);
    yw     = ((scaled + (48'sd1 <<< (16 + G))) >>> (17 + G)) + 48'(x0);
    y      = sat_sample(yw);
  end
endmodule
