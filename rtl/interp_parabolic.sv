// interp_parabolic: piecewise parabolic interpolator (alpha = 0.5) in Farrow
// structure.
//
// With alpha = 0.5 the Farrow coefficients are multiples of 0.5, so the
// branch sums are formed as twice their value with plain adds and a shift:
//     2*v2 =  x2 -   x1 - x0 + xm1          (alpha * ( x2 - x1 - x0 + xm1))
//     2*v1 = -x2 + 3*x1 - x0 - xm1          (-alpha*x2 + (alpha+1)*x1
//                                            + (alpha-1)*x0 - alpha*xm1)
//       v0 =  x0
//     y    = (v2*mu + v1)*mu + v0
// Only two multiplications by mu are needed.  Four guard bits are carried
// through the cascade, each product is truncated, and the final halving is
// rounded to nearest and saturated to 14 bits.
//
// Interface: 14-bit signed samples xm1 = x[m_k-1], x0 = x[m_k],
// x1 = x[m_k+1], x2 = x[m_k+2]; mu in Q0.19; 14-bit signed y.
// Timing: combinational; registered by the enclosing circuit.
module interp_parabolic
  import tr_pkg::*;
(
  input  sample_t xm1,
  input  sample_t x0,
  input  sample_t x1,
  input  sample_t x2,
  input  mu_t     mu,
  output sample_t y
);
  localparam int G  = 4;
  localparam int DW = XW + 3;

  logic signed [DW-1:0]     b2, b1;
  logic signed [DW+G:0]     s2, s1;
  logic signed [DW+G+MUW:0] p2, p1;
  logic signed [47:0]       yw;

  function automatic logic signed [DW-1:0] ext(input sample_t v);
    return DW'(v);
  endfunction

  always_comb begin
    b2 = ext(x2) - ext(x1) - ext(x0) + ext(xm1);
    b1 = -ext(x2) + ((ext(x1) <<< 1) + ext(x1)) - ext(x0) - ext(xm1);
    s2 = (DW+G+1)'(b2) <<< G;
    p2 = s2 * mu;
    s1 = (DW+G+1)'(p2 >>> MUF) + ((DW+G+1)'(b1) <<< G);
    p1 = s1 * mu;
    // p1 / 2^19 is 2*(y - x0) in Q.G; halve with rounding.
    yw = ((48'(p1 >>> MUF) + (48'sd1 <<< G)) >>> (G + 1)) + 48'(x0);
    y  = sat_sample(yw);
  end
endmodule
