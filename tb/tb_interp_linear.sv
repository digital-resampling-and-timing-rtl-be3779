// tb_interp_linear: checks the one-multiplier linear interpolator against
// y = x0*(1 - mu) + x1*mu in floating point (truncation allows 1 LSB),
// including mu = 0 and full-scale samples.
module tb_interp_linear;
  import tr_pkg::*;
  sample_t x0, x1, y;
  mu_t     mu;
  int checks = 0, failures = 0;

  interp_linear dut (.x0, .x1, .mu, .y);

  task automatic apply(input int b, input int c, input int m);
    real r, u;
    x0 = sample_t'(b); x1 = sample_t'(c); mu = mu_t'(m);
    #1;
    u = real'(m) / 524288.0;
    r = real'(b) * (1.0 - u) + real'(c) * u;
    checks++;
    if (real'(y) - r > 1.0 || r - real'(y) > 1.0) begin
      failures++;
      if (failures < 10) $display("FAIL: x0=%0d x1=%0d mu=%0d y=%0d ref=%0.2f", b, c, m, y, r);
    end
  endtask

  initial begin
    for (int i = 0; i < 50; i++)
      apply(int'($urandom_range(0, 16383)) - 8192, int'($urandom_range(0, 16383)) - 8192, 0);
    for (int i = 0; i < 3000; i++)
      apply(int'($urandom_range(0, 16383)) - 8192, int'($urandom_range(0, 16383)) - 8192,
            int'($urandom_range(0, 524287)));
    apply(-8192, 8191, 524287);
    apply(8191, -8192, 262144);
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
