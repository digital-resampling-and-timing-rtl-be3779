// tb_resampler_out: checks the output clock time base resampler at the two
// conversion ratios F_out/F_in = 10/17 and 10/3, each with the input clock
// 0.5% slower than nominal so the synchroniser has an offset to track.
//
// Ratio 10/17: clk_in period 20.1 ns, clk 17 ns, M = 2 (step 0.8458).
// Ratio 10/3 : clk_in period 20.1 ns, clk 3 ns,  M = 2 (step 0.1493).
// The input is a sine of 0.05 cycles per input sample, amplitude 6000.
// After the loop settles each instance must show: locked; step within 0.1%
// of T_clk/T_in; no interface wait over the measurement; output sine fitted
// by least squares at the frequency the ideal converter would give, with
// amplitude within 1% of 6000 and a residual at least 40 dB below the
// signal.  A wrong rate leaves the fit with a large residual.
`timescale 1ns / 1ps
module tb_resampler_out;
  import tr_pkg::*;
  localparam real A = 6000.0, F = 0.05, TWO_PI = 6.283185307179586;
  localparam real TIN = 20.1;
  localparam int  NSETTLE = 40000;   // output samples before measuring
  localparam int  NMEAS   = 4000;

  int checks = 0, failures = 0;
  logic clk_in = 1'b0, rst_in_n = 1'b0, rst_n = 1'b0;
  logic clk_a = 1'b0, clk_b = 1'b0;
  sample_t x_in = '0;
  int n_in = 0;

  always #(TIN / 2.0) clk_in = ~clk_in;
  always #8.5 clk_a = ~clk_a;    // 17 ns
  always #1.5 clk_b = ~clk_b;    // 3 ns

  always @(posedge clk_in) begin
    n_in <= n_in + 1;
    x_in <= sample_t'($rtoi(A * $sin(TWO_PI * F * real'(n_in + 1))));
  end

  sample_t ya, yb;
  logic    va, vb, la, lb;
  logic [FRACW-1:0] sa, sb;

  resampler_out #(.M(2), .STEP_INIT(891290)) dut_a (
    .clk_in, .rst_in_n, .x_valid(1'b1), .x_in, .clk(clk_a), .rst_n,
    .y(ya), .y_valid(va), .step(sa), .locked(la));
  resampler_out #(.M(2), .STEP_INIT(157286)) dut_b (
    .clk_in, .rst_in_n, .x_valid(1'b1), .x_in, .clk(clk_b), .rst_n,
    .y(yb), .y_valid(vb), .step(sb), .locked(lb));

  // least-squares fit accumulators, per instance
  real ss[2], cc[2], sc[2], ys[2], yc[2], yy[2];
  int  nout[2], nwait[2];
  bit  meas[2], done[2];

  task automatic take(int i, sample_t y, real fo);
    real s, c;
    nout[i]++;
    if (nout[i] == NSETTLE) meas[i] = 1;
    if (meas[i] && !done[i]) begin
      s = $sin(TWO_PI * fo * real'(nout[i]));
      c = $cos(TWO_PI * fo * real'(nout[i]));
      ss[i] += s * s; cc[i] += c * c; sc[i] += s * c;
      ys[i] += real'(y) * s; yc[i] += real'(y) * c; yy[i] += real'(y) * real'(y);
      if (nout[i] == NSETTLE + NMEAS) done[i] = 1;
    end
  endtask

  always @(posedge clk_a) if (va) take(0, ya, F * 2.0 * 17.0 / TIN);
  always @(posedge clk_b) if (vb) take(1, yb, F * 2.0 * 3.0 / TIN);
  always @(posedge clk_a) if (meas[0] && !done[0] && dut_a.stall) nwait[0]++;
  always @(posedge clk_b) if (meas[1] && !done[1] && dut_b.stall) nwait[1]++;

  task automatic evaluate(int i, real step_now, real step_exp, bit lk);
    real det, a, b, amp, res, snr;
    checks++;
    if (!lk) begin failures++; $display("FAIL: instance %0d not locked", i); end
    checks++;
    if (step_now > step_exp * 1.001 || step_now < step_exp * 0.999) begin
      failures++;
      $display("FAIL: instance %0d step %0.5f, expected %0.5f", i, step_now, step_exp);
    end
    checks++;
    if (nwait[i] != 0) begin failures++; $display("FAIL: instance %0d waited %0d times", i, nwait[i]); end
    det = ss[i] * cc[i] - sc[i] * sc[i];
    a = (ys[i] * cc[i] - yc[i] * sc[i]) / det;
    b = (yc[i] * ss[i] - ys[i] * sc[i]) / det;
    amp = $sqrt(a * a + b * b);
    res = yy[i] - a * ys[i] - b * yc[i];
    if (res < 1.0e-3) res = 1.0e-3;
    snr = 10.0 * $log10((yy[i] - res) / res);
    $display("instance %0d: step %0.5f, amplitude %0.1f, signal/residual %0.1f dB",
             i, step_now, amp, snr);
    checks++;
    if (amp > A * 1.01 || amp < A * 0.99) begin failures++; $display("FAIL: instance %0d amplitude %0.1f", i, amp); end
    checks++;
    if (snr < 40.0) begin failures++; $display("FAIL: instance %0d residual only %0.1f dB down", i, snr); end
  endtask

  initial begin
    for (int i = 0; i < 2; i++) begin
      ss[i] = 0; cc[i] = 0; sc[i] = 0; ys[i] = 0; yc[i] = 0; yy[i] = 0;
      nout[i] = 0; nwait[i] = 0; meas[i] = 0; done[i] = 0;
    end
    #100;
    rst_in_n = 1'b1;
    rst_n = 1'b1;
    wait (done[0] && done[1]);
    evaluate(0, real'(sa) / 1048576.0, 17.0 / TIN, la);
    evaluate(1, real'(sb) / 1048576.0, 3.0 / TIN, lb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TIN * 200000.0);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
