// tb_rc_upsampler: checks the raised-cosine pulse-shaping upsampler
// (roll-off 0.25, 10-symbol group delay, 16 samples per symbol).
//
// Part 1: a single +1 symbol among zeros.  The output must be the sampled
// pulse: peak 2048 exactly 161 samples after the symbol is taken, zeros at
// the other symbol instants (within 1 LSB), and each sample within 1 LSB
// of 2048 * rc(t) computed here with the simulator's own $sin/$cos.
// Part 2: random 2-PAM symbols with random enable gaps; every output is
// compared with the superposition of pulses (tolerance 12 LSB, the sum of
// 21 coefficient rounding errors).  sym_req must come once per 16 enabled
// samples.
module tb_rc_upsampler;
  import tr_pkg::*;
  localparam real BETA = 0.25;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [4:0] sym_level = '0;
  logic    sym_req;
  sample_t x_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rc_upsampler #(.SPS(16), .SPAN(10), .BETA(BETA), .PAM_BITS(1), .AMP(2048)) dut
    (.clk, .rst_n, .en, .sym_level, .sym_req, .x_out);

  function automatic real rc(real t);
    real x;
    if (t == 0.0) return 1.0;
    x = 2.0 * BETA * t;
    if (x * x > 0.999999 && x * x < 1.000001)
      return (3.14159265358979 / 4.0) * $sin(3.14159265358979 / (2.0 * BETA)) /
             (3.14159265358979 / (2.0 * BETA));
    return $sin(3.14159265358979 * t) / (3.14159265358979 * t) *
           $cos(3.14159265358979 * BETA * t) / (1.0 - x * x);
  endfunction

  // symbols taken so far, and the enabled-sample index at which each was taken
  int   sym_val [$];
  int   sym_at  [$];
  int   nsamp = 0, nreq = 0;
  bit   impulse_mode = 1;
  int   impulse_sent = 0;
  real  expv, d;
  int   peak_at = -1;

  initial begin
    int lev_rand;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 12000; n++) begin
      if (n > 0) @(negedge clk);
      en = (n < 400) ? 1'b1 : ($urandom_range(0, 3) != 0);
      if (n == 400) impulse_mode = 0;
      lev_rand = ($urandom_range(0, 1) != 0) ? 1 : -1;
      sym_level = impulse_mode ? ((impulse_sent == 0) ? 5'sd1 : 5'sd0) : 5'(lev_rand);
      @(posedge clk);
      if (en) begin
        if (sym_req) begin
          nreq++;
          sym_val.push_back(int'(sym_level));
          sym_at.push_back(nsamp);
          if (impulse_mode) impulse_sent++;
        end
        #1;
        // x_out now holds the sample computed at enabled index nsamp, using
        // the symbols taken before this edge
        expv = 0.0;
        for (int s = 0; s < sym_val.size(); s++) begin
          if (sym_at[s] < nsamp) begin
            d = real'(nsamp - sym_at[s] - 1) / 16.0 - 10.0;
            if (d >= -10.0 && d <= 10.0) expv += 2048.0 * real'(sym_val[s]) * rc(d);
          end
        end
        if (nsamp > 0) begin
          checks++;
          d = real'(x_out) - expv;
          if (d > (impulse_mode ? 1.0 : 12.0) || d < -(impulse_mode ? 1.0 : 12.0)) begin
            failures++;
            if (failures < 10) $display("FAIL: sample %0d x_out=%0d expected %0.2f", nsamp, x_out, expv);
          end
        end
        if (impulse_mode && x_out == 2048) peak_at = nsamp;
        nsamp++;
      end
    end
    checks++;
    if (peak_at != 176) begin failures++; $display("FAIL: impulse peak at sample %0d, expected 176", peak_at); end
    checks++;
    if (nreq != nsamp / 16 && nreq != nsamp / 16 + 1) begin
      failures++;
      $display("FAIL: %0d symbol requests for %0d samples", nreq, nsamp);
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
