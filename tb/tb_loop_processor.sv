// tb_loop_processor: checks the proportional-integral loop filter.
//
// A real-valued model applies round-to-nearest scaling by 2^-K2 into the
// step accumulator (clamped to [0, 1)) and by 2^-K1 into the one-cycle
// phase correction (clamped to +/-(2^19-1)).  Random errors arrive on random
// symbol strobes with random clock-enable stalls; the step and phase must
// match the model on every cycle.  Two steering checks follow: a run of
// positive errors must raise the step, a run of negative errors lower it,
// and a long run of large errors must stop at the clamps.
module tb_loop_processor;
  import tr_pkg::*;
  localparam int K1 = 8, K2 = 16;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b1, sym_en = 1'b0;
  err_t err = '0;
  logic [FRACW-1:0]      step;
  logic signed [FRACW:0] phase;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  loop_processor #(.STEP_INIT(524288), .K1(K1), .K2(K2)) dut
    (.clk, .rst_n, .ce, .sym_en, .err, .step, .phase);

  longint m_step = 524288, m_phase = 0;

  function automatic longint rnd_shift(longint v, int k);
    return longint'($floor(real'(v) / real'(longint'(1) << k) + 0.5));
  endfunction

  task automatic run_cycle(bit rnd_err, longint fixed_err);
    longint p;
    @(negedge clk);
    ce     = ($urandom_range(0, 7) != 0);
    sym_en = ($urandom_range(0, 3) == 0);
    if (rnd_err) err = err_t'(longint'($urandom_range(0, 200000000)) - 100000000);
    else         err = err_t'(fixed_err);
    @(posedge clk);
    if (ce) begin
      m_phase = 0;
      if (sym_en) begin
        m_step = m_step + rnd_shift(longint'(err), K2);
        if (m_step < 0) m_step = 0;
        if (m_step > 1048575) m_step = 1048575;
        p = rnd_shift(longint'(err), K1);
        if (p > 524287) p = 524287;
        if (p < -524287) p = -524287;
        m_phase = p;
      end
    end
    #1;
    checks++;
    if (longint'(step) != m_step || longint'(phase) != m_phase) begin
      failures++;
      if (failures < 10)
        $display("FAIL: err=%0d step=%0d exp %0d phase=%0d exp %0d", err, step, m_step, phase, m_phase);
    end
  endtask

  initial begin
    longint s0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    #1;
    checks++;
    if (step != 20'd524288) begin failures++; $display("FAIL: step not 0.5 after reset"); end
    for (int i = 0; i < 20000; i++) run_cycle(1, 0);
    s0 = longint'(step);
    for (int i = 0; i < 400; i++) run_cycle(0, 3000000);
    checks++;
    if (!(longint'(step) > s0)) begin failures++; $display("FAIL: positive error did not raise the step"); end
    s0 = longint'(step);
    for (int i = 0; i < 400; i++) run_cycle(0, -3000000);
    checks++;
    if (!(longint'(step) < s0)) begin failures++; $display("FAIL: negative error did not lower the step"); end
    for (int i = 0; i < 2000; i++) run_cycle(0, 268000000);
    checks++;
    if (step != 20'hFFFFF) begin failures++; $display("FAIL: step not clamped at top: %0d", step); end
    for (int i = 0; i < 2000; i++) run_cycle(0, -268000000);
    checks++;
    if (step != 20'd0) begin failures++; $display("FAIL: step not clamped at zero: %0d", step); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
