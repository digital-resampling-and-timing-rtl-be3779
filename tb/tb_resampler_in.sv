// tb_resampler_in: checks the input clock time base resampler (step 0.99,
// cubic interpolation, every 4th interpolant forwarded).
//
// The input is a sine, A = 6000, 0.04 cycles per input sample, with random
// gaps in x_valid.  A real-valued model of the time base gives, for every
// interpolant, the instant it represents: (n - 1) + mu on the input sample
// index, where n is the sample at which the ramp crossed an integer.  The
// interpolant must equal the sine evaluated at that instant minus a fixed
// pipeline latency of whole input samples; the latency is found on the
// first outputs and then held.  Tolerance 4 LSB (cubic interpolation error
// at this frequency is about 1.5 LSB).  Rates: 99 interpolants per 100
// input samples, one forwarded output per 4 interpolants.
module tb_resampler_in;
  import tr_pkg::*;
  localparam real A = 6000.0, F = 0.04, TWO_PI = 6.283185307179586;
  localparam int unsigned STEP = 1038090;
  logic clk = 1'b0, rst_n = 1'b0, x_valid = 1'b0;
  sample_t x_in = '0;
  sample_t y_all, y_out;
  logic    y_all_valid, y_valid;
  mu_t     mu_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  resampler_in #(.STEP(STEP), .INV_STEP(1059167), .DOWN(4)) dut
    (.clk, .rst_n, .x_valid, .x_in, .y_all, .y_all_valid, .y_out, .y_valid, .mu_o);

  real t_q [$];
  real ramp = 0.0, delta;
  int  n_in = 0, n_all = 0, n_out = 0, lat = -1;
  real sq_err [8];

  function automatic real sig(real t);
    return A * $sin(TWO_PI * F * t);
  endfunction

  initial begin
    real t, d, frac;
    delta = real'(STEP) / 1048576.0;
    for (int l = 0; l < 8; l++) sq_err[l] = 0.0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 30000; i++) begin
      if (i > 0) @(negedge clk);
      x_valid = (i < 5000) ? 1'b1 : ($urandom_range(0, 4) != 0);
      if (x_valid) x_in = sample_t'($rtoi(sig(real'(n_in + 1)) + ((sig(real'(n_in + 1)) >= 0.0) ? 0.5 : -0.5)));
      @(posedge clk);
      if (x_valid) begin
        n_in++;
        if ($floor(ramp + delta) != $floor(ramp)) begin
          ramp = ramp + delta;
          frac = ramp - $floor(ramp);
          t_q.push_back(real'(n_in - 1) + (1.0 - frac / delta));
        end else begin
          ramp = ramp + delta;
        end
      end
      if (y_all_valid) begin
        t = t_q.pop_front();
        n_all++;
        if (n_all > 20 && n_all <= 220)
          for (int l = 0; l < 8; l++) begin
            d = real'(y_all) - sig(t - real'(l));
            sq_err[l] += d * d;
          end
        if (n_all == 220) begin
          lat = 0;
          for (int l = 1; l < 8; l++) if (sq_err[l] < sq_err[lat]) lat = l;
          $display("pipeline latency %0d input samples", lat);
        end
        if (lat >= 0) begin
          checks++;
          d = real'(y_all) - sig(t - real'(lat));
          if (d > 4.0 || d < -4.0) begin
            failures++;
            if (failures < 10) $display("FAIL: interpolant %0d = %0d, expected %0.2f", n_all, y_all, sig(t - real'(lat)));
          end
        end
      end
      if (y_valid) n_out++;
    end
    checks++;
    if (n_all < n_in * 99 / 100 - 3 || n_all > n_in * 99 / 100 + 3) begin
      failures++;
      $display("FAIL: %0d interpolants for %0d inputs", n_all, n_in);
    end
    checks++;
    if (n_out < n_all / 4 - 1 || n_out > n_all / 4 + 1) begin
      failures++;
      $display("FAIL: %0d outputs for %0d interpolants", n_out, n_all);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
