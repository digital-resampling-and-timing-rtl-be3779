// tb_timing_recovery_out: closed-loop check of the output clock time base
// timing recovery (cubic interpolator, Gardner detector, PI loop filter).
//
// The testbench plays the clock domain interface: it offers a stream of
// raised-cosine shaped 2-PAM samples (roll-off 0.25, amplitude 1800) at
// 3.96 samples per symbol, computed here in real arithmetic, and moves to
// the next sample whenever rd_en is high.  One clock in eight is stalled
// at random, as the interface's wait would do.  The loop starts from step
// 0.5 with gains K1 = 6, K2 = 13 (the top's defaults 8/16 pull in over a
// 1% offset far more slowly than this test lasts) and must lock: from
// symbol 3000 on, the step at every symbol must be 3.96/8 = 0.495 within
// 0.002; every decision over the last 1000 symbols must equal the
// transmitted bit (at the delay, of either sign, found by correlation),
// each counted as one check; and every strobe must come exactly four
// interpolants after the previous one.
module tb_timing_recovery_out;
  import tr_pkg::*;
  localparam real SPS = 3.96, BETA = 0.25, AMP = 1800.0, PI = 3.14159265358979;
  localparam int  NSYM = 4200;
  logic clk = 1'b0, rst_n = 1'b0, stall = 1'b0;
  logic rd_en, y_valid, sym_en, sym_bit;
  sample_t rd_data = '0, y, sym_y;
  err_t err;
  logic [FRACW-1:0] step;
  mu_t mu_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  timing_recovery_out #(.INTERP(INTERP_CUBIC), .M(2), .STEP_INIT(524288), .K1(6), .K2(13)) dut
    (.clk, .rst_n, .stall, .rd_en, .rd_data, .y, .y_valid, .sym_y, .sym_en, .sym_bit,
     .err, .step, .mu_o);

  bit a [NSYM + 40];
  bit rx [$];
  int n_samp = 0, n_y = 0, n_sym = 0, n_y_strobe = 0;

  function automatic real rc(real t);
    real x;
    if (t == 0.0) return 1.0;
    x = 2.0 * BETA * t;
    if (x * x > 0.999999 && x * x < 1.000001)
      return (PI / 4.0) * $sin(PI / (2.0 * BETA)) / (PI / (2.0 * BETA));
    return $sin(PI * t) / (PI * t) * $cos(PI * BETA * t) / (1.0 - x * x);
  endfunction

  function automatic sample_t sample_at(int n);
    real t, v;
    int s0;
    t = real'(n) / SPS;
    s0 = int'($floor(t));
    v = 0.0;
    for (int s = s0 - 10; s <= s0 + 11; s++)
      if (s >= 0 && s < NSYM + 40) v += (a[s] ? AMP : -AMP) * rc(t - real'(s));
    return sample_t'($rtoi(v));
  endfunction

  initial begin
    int best_off, best_match, match, nwin;
    bit rd_q, yv_q, se_q, sb_q;
    for (int s = 0; s < NSYM + 40; s++) a[s] = ($urandom_range(0, 1) != 0);
    rd_data = sample_at(0);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (n_sym < NSYM && n_samp < int'(SPS * real'(NSYM + 20))) begin
      // outputs are registered or depend on stall only: sample them before
      // the rising edge, then let the edge act
      @(negedge clk);
      stall = ($urandom_range(0, 7) == 0);
      #1;
      rd_q = rd_en; yv_q = y_valid; se_q = sym_en; sb_q = sym_bit;
      @(posedge clk);
      if (rd_q) n_samp++;
      if (yv_q) n_y++;
      if (se_q) begin
        n_sym++;
        rx.push_back(sb_q);
        // strobes four interpolants apart (the strobe's own interpolant
        // was already counted above)
        if (n_sym > 1) begin
          checks++;
          if (n_y - n_y_strobe != 4) begin
            failures++;
            if (failures < 10)
              $display("FAIL: %0d interpolants between strobes at symbol %0d", n_y - n_y_strobe, n_sym);
          end
        end
        n_y_strobe = n_y;
        if (n_sym >= 3000) begin
          checks++;
          if (real'(step) / 1048576.0 > 0.497 || real'(step) / 1048576.0 < 0.493) begin
            failures++;
            if (failures < 10)
              $display("FAIL: step %0.5f at symbol %0d, expected 0.495", real'(step) / 1048576.0, n_sym);
          end
        end
      end
      #1 rd_data = sample_at(n_samp);
    end
    $display("symbols %0d, samples read %0d, interpolants %0d, step %0.5f",
             n_sym, n_samp, n_y, real'(step) / 1048576.0);
    // decisions: find the delay between transmitted and decided symbols
    nwin = 1000;
    best_off = 0; best_match = -1;
    for (int off = -40; off <= 40; off++) begin
      match = 0;
      for (int j = rx.size() - nwin; j < rx.size(); j++)
        if (j - off >= 0 && j - off < NSYM + 40 && rx[j] == a[j - off]) match++;
      if (match > best_match) begin best_match = match; best_off = off; end
    end
    // every decision in the window, at that delay
    for (int j = rx.size() - nwin; j < rx.size(); j++) begin
      checks++;
      if (j - best_off < 0 || j - best_off >= NSYM + 40 || rx[j] != a[j - best_off]) failures++;
    end
    if (best_match != nwin)
      $display("FAIL: %0d of %0d decisions correct (delay %0d)", best_match, nwin, best_off);
    checks++;
    if (n_y < 4 * n_sym - 8 || n_y > 4 * n_sym + 8) begin
      failures++;
      $display("FAIL: %0d interpolants for %0d symbols", n_y, n_sym);
    end
    checks++;
    if (n_sym < NSYM) begin failures++; $display("FAIL: only %0d symbols", n_sym); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
