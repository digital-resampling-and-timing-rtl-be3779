// tb_perf_analysis_top: end-to-end test of the performance analysis circuit
// at its default parameters (cubic interpolator under test, 2-PAM).
//
// clk_a runs at F_c (period 10 ns) and clk_b at F_c/2, edge aligned.  The
// test runs NSYM symbols and then checks:
//   * the loop's step size has settled to 0.495 (0.99 * 16/4 / (2*4)),
//   * every recovered symbol decision in the final window is correct and
//     the MER there reaches MER_MIN,
//   * the general-purpose resampler beside the chain (input clock 20.1 ns,
//     its own clock 17 ns, a 0.05 cycle/sample sine) has locked, its step
//     is within 0.1% of 17/20.1, it never waited once locked and it produced the
//     expected number of output samples (20.1/34 per input), all within the sine's amplitude,
//   * each mechanism of the circuit happened: resampler cycles without an
//     interpolant (step 0.99), timing-recovery cycles without an input load,
//     clock-domain-interface wait, early and late Gardner errors, step-size
//     updates, and clamping-free operation of the output time base.
`timescale 1ns / 1ps
module tb_perf_analysis_top;
  import tr_pkg::*;

  localparam int  NSYM    = 20000;
  localparam real MER_MIN = 44.0;
  localparam int  STEP_EXP = 519045;      // round(0.495 * 2^20)
  localparam int  STEP_TOL = 1049;        // 0.001

  logic clk_a = 1'b0, clk_b = 1'b0;
  logic rst_a_n = 1'b0, rst_b_n = 1'b0;

  logic signed [4:0] tx_level;
  logic              tx_sym_en, rs_valid, rx_y_valid, rx_sym_en, rx_bit, rx_rd_en, cdc_wait;
  sample_t           tx_sample, rs_sample, rx_y, rx_sym;
  err_t              rx_err;
  logic [FRACW-1:0]  rx_step;

  // general-purpose resampler stimulus
  localparam real AS_TIN = 20.1, AS_TCLK = 17.0, AS_F = 0.05, AS_A = 6000.0;
  logic             as_clk_in = 1'b0, as_clk = 1'b0;
  logic             as_rst_in_n = 1'b0, as_rst_n = 1'b0;
  logic             as_x_valid = 1'b0, as_y_valid, as_locked;
  sample_t          as_x_in = '0, as_y;
  logic [FRACW-1:0] as_step;
  real              as_ph0;
  int               as_n_in = 0, as_n_out = 0, as_n_big = 0, as_n_wait = 0;

  always #(AS_TIN / 2.0)  as_clk_in = ~as_clk_in;
  always #(AS_TCLK / 2.0) as_clk    = ~as_clk;

  // A sine with a random start phase, one sample per input clock.
  always @(negedge as_clk_in) if (as_rst_in_n) begin
    as_x_in    <= sample_t'($rtoi(AS_A * $sin(6.283185307179586 * AS_F * as_n_in + as_ph0)));
    as_x_valid <= 1'b1;
    as_n_in++;
  end

  always @(posedge as_clk) if (as_rst_n) begin
    if (as_y_valid) begin
      as_n_out++;
      if (as_y > sample_t'(6100) || as_y < -sample_t'(6100)) as_n_big++;
    end
    if (dut.u_asrc.stall && as_locked) as_n_wait++;
  end

  int checks = 0, failures = 0;

  always #5  clk_a = ~clk_a;
  always #10 clk_b = ~clk_b;

  perf_analysis_top dut (
    .clk_a, .rst_a_n, .clk_b, .rst_b_n,
    .tx_level, .tx_sym_en, .tx_sample, .rs_sample, .rs_valid,
    .rx_y, .rx_y_valid, .rx_sym, .rx_sym_en, .rx_bit, .rx_err, .rx_step,
    .rx_rd_en, .cdc_wait,
    .asrc_clk_in(as_clk_in), .asrc_rst_in_n(as_rst_in_n), .asrc_x_valid(as_x_valid),
    .asrc_x_in(as_x_in), .asrc_clk(as_clk), .asrc_rst_n(as_rst_n), .asrc_y(as_y),
    .asrc_y_valid(as_y_valid), .asrc_step(as_step), .asrc_locked(as_locked)
  );

  mer_monitor #(.PAM_BITS(1), .NWIN(1000)) u_mon (
    .clk_a, .tx_level, .tx_sym_en, .clk_b, .rx_sym, .rx_sym_en
  );

  // Mechanism counters.
  int n_tx_sym = 0, n_rs_skip = 0, n_rs_out = 0, n_m_skip = 0, n_wait = 0;
  int n_err_pos = 0, n_err_neg = 0, n_step_upd = 0, n_rx_sym = 0;
  logic [FRACW-1:0] step_q;

  always @(posedge clk_a) if (rst_a_n) begin
    if (tx_sym_en) n_tx_sym++;
    if (!dut.u_rs.y_all_valid && n_tx_sym > 30) n_rs_skip++;
    if (rs_valid) n_rs_out++;
  end

  always @(posedge clk_b) if (rst_b_n) begin
    step_q <= rx_step;
    if (n_rx_sym > 2 && rx_step != step_q) n_step_upd++;
    if (dut.u_tr.u_fgen.k && !dut.u_tr.u_fgen.m) n_m_skip++;
    if (cdc_wait && n_rx_sym > 20) n_wait++;
    if (rx_sym_en) begin
      n_rx_sym++;
      if (rx_err > 0) n_err_pos++;
      if (rx_err < 0) n_err_neg++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    real mer;
    int  off, serr, nused;
    longint t0;
    as_ph0 = real'($urandom % 1000) * 6.283185307179586 / 1000.0;
    repeat (4) @(posedge clk_b);
    rst_a_n = 1'b1;
    rst_b_n = 1'b1;
    @(negedge as_clk_in) as_rst_in_n = 1'b1;
    @(negedge as_clk)    as_rst_n    = 1'b1;
    wait (n_tx_sym >= NSYM);
    @(posedge clk_b);
    $display("tx symbols %0d, rx symbols %0d, final step %0d (%0.5f)",
             n_tx_sym, n_rx_sym, rx_step, real'(rx_step) / 1048576.0);
    u_mon.analyse(mer, off, serr, nused);
    check(nused == 1000, "MER window not filled");
    check(rx_step >= FRACW'(STEP_EXP - STEP_TOL) && rx_step <= FRACW'(STEP_EXP + STEP_TOL),
          $sformatf("step %0d not within %0d of 0.495", rx_step, STEP_TOL));
    check(mer >= MER_MIN, $sformatf("MER %0.2f dB below %0.1f", mer, MER_MIN));
    check(serr == 0, $sformatf("%0d symbol decision errors", serr));
    // Rates: resampler output is 0.99/4 of the sample rate; the receiver
    // yields one symbol per transmitted symbol once locked.
    check(n_rs_out > int'(0.2475 * 16 * NSYM) - 200 && n_rs_out < int'(0.2475 * 16 * NSYM) + 200,
          $sformatf("resampler output count %0d", n_rs_out));
    check(n_rx_sym > NSYM - 300 && n_rx_sym < NSYM + 100,
          $sformatf("recovered symbol count %0d", n_rx_sym));
    $display("resampler beside: step %0.5f locked %0d in %0d out %0d",
             real'(as_step) / 1048576.0, as_locked, as_n_in, as_n_out);
    check(as_locked, "general-purpose resampler not locked");
    check(real'(as_step) / 1048576.0 > 0.999 * AS_TCLK / AS_TIN &&
          real'(as_step) / 1048576.0 < 1.001 * AS_TCLK / AS_TIN,
          $sformatf("general-purpose resampler step %0d", as_step));
    check(as_n_wait == 0, $sformatf("general-purpose resampler waited %0d cycles", as_n_wait));
    check(as_n_big == 0, $sformatf("%0d resampler outputs beyond the sine amplitude", as_n_big));
    // one output per 2 * 17 ns for one input per 20.1 ns
    check(as_n_out > int'(as_n_in * AS_TIN / (2.0 * AS_TCLK)) - 20 &&
          as_n_out < int'(as_n_in * AS_TIN / (2.0 * AS_TCLK)) + 2,
          $sformatf("resampler outputs %0d for %0d inputs", as_n_out, as_n_in));
    $display("mechanisms: rs_skip=%0d m_skip=%0d cdc_wait=%0d err+=%0d err-=%0d step_upd=%0d",
             n_rs_skip, n_m_skip, n_wait, n_err_pos, n_err_neg, n_step_upd);
    check(n_rs_skip > 0, "resampler never skipped an output");
    check(n_m_skip > 0, "timing recovery never skipped an input load");
    check(n_wait > 0, "clock domain interface never waited");
    check(n_err_pos > 0 && n_err_neg > 0, "Gardner error of one sign only");
    check(n_step_upd > 0, "step size never updated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSYM * 16 + 20000) @(posedge clk_a);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
