// interp_linear: linear interpolator written with a single multiplier.
//
// The interpolant between the basepoint sample x0 = x[m_k] and the next
// sample x1 = x[m_k+1] at fractional interval mu is
//     y = (x1 - x0) * mu + x0,
// which is the two-coefficient filter h(mu) = 1 - mu, h(mu - 1) = mu
// rearranged so that one multiplier and two adders suffice.
//
// Interface: x0, x1 are 14-bit signed samples, mu is Q0.19 in a 20-bit
// signed word (sign bit always 0).  y is a 14-bit signed interpolant.
// Timing: purely combinational; the enclosing circuit registers y with its
// output enable k, so the whole interpolator has one cycle of latency there.
// The product is truncated (floor) by 19 bits, as in the reference design;
// the result is saturated to 14 bits, a choice of this implementation.
module interp_linear
  import tr_pkg::*;
(
  input  sample_t x0,
  input  sample_t x1,
  input  mu_t     mu,
  output sample_t y
);
  logic signed [XW:0]         diff;
  logic signed [XW+MUW:0]     prod;
  logic signed [47:0]         sum;

  always_comb begin
    diff = {x1[XW-1], x1} - {x0[XW-1], x0};
    prod = diff * mu;
    sum  = 48'(prod >>> MUF) + 48'(x0);
    y    = sat_sample(sum);
  end
endmodule
