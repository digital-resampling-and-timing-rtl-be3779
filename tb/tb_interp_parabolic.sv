// tb_interp_parabolic: checks the piecewise parabolic Farrow interpolator
// (alpha = 0.5) against its impulse response evaluated in floating point:
//   y = x2*(a*mu^2 - a*mu) + x1*(-a*mu^2 + (a+1)*mu)
//     + x0*(-a*mu^2 + (a-1)*mu + 1) + xm1*(a*mu^2 - a*mu)
// Random samples and intervals, the corner mu = 0, samples of a straight
// line (which the filter reproduces) and full-scale extremes.
// Tolerance is 2 LSB.
module tb_interp_parabolic;
  import tr_pkg::*;
  sample_t xm1, x0, x1, x2, y;
  mu_t     mu;
  int checks = 0, failures = 0;

  interp_parabolic dut (.xm1, .x0, .x1, .x2, .mu, .y);

  function automatic real ref_y(input real a, input real b, input real c, input real d, input real u);
    real al = 0.5;
    return d * (al*u*u - al*u) + c * (-al*u*u + (al + 1.0)*u)
         + b * (-al*u*u + (al - 1.0)*u + 1.0) + a * (al*u*u - al*u);
  endfunction

  task automatic apply(input int a, input int b, input int c, input int d, input int m);
    real r, u;
    xm1 = sample_t'(a); x0 = sample_t'(b); x1 = sample_t'(c); x2 = sample_t'(d); mu = mu_t'(m);
    #1;
    u = real'(m) / 524288.0;
    r = ref_y(a, b, c, d, u);
    if (r > 8191.0) r = 8191.0;
    if (r < -8192.0) r = -8192.0;
    checks++;
    if (real'(y) - r > 2.0 || r - real'(y) > 2.0) begin
      failures++;
      if (failures < 10) $display("FAIL: x=%0d %0d %0d %0d mu=%0d y=%0d ref=%0.2f", a, b, c, d, m, y, r);
    end
  endtask

  initial begin
    int a, b, c, d, m;
    // mu = 0 gives x0 exactly
    for (int i = 0; i < 50; i++) begin
      b = int'($urandom_range(0, 8000)) - 4000;
      apply(int'($urandom_range(0, 8000)) - 4000, b, int'($urandom_range(0, 8000)) - 4000,
            int'($urandom_range(0, 8000)) - 4000, 0);
    end
    // random, amplitude kept so that the true value stays in range
    for (int i = 0; i < 3000; i++) begin
      a = int'($urandom_range(0, 4000)) - 2000;
      b = int'($urandom_range(0, 4000)) - 2000;
      c = int'($urandom_range(0, 4000)) - 2000;
      d = int'($urandom_range(0, 4000)) - 2000;
      m = int'($urandom_range(0, 524287));
      apply(a, b, c, d, m);
    end
    // samples of the line 300t - 700 at t = -1, 0, 1, 2
    for (int i = 0; i < 200; i++) begin
      m = int'($urandom_range(0, 524287));
      apply(-1000, -700, -400, -100, m);
    end
    // full-scale extremes
    for (int i = 0; i < 500; i++) begin
      a = ($urandom_range(0, 1) != 0) ? 8191 : -8192;
      b = ($urandom_range(0, 1) != 0) ? 8191 : -8192;
      c = ($urandom_range(0, 1) != 0) ? 8191 : -8192;
      d = ($urandom_range(0, 1) != 0) ? 8191 : -8192;
      apply(a, b, c, d, int'($urandom_range(0, 524287)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
