// tb_gardner_ted: checks the Gardner timing error detector against a
// behavioural model.
//
// Random interpolants arrive with random valid gaps and random clock-enable
// stalls.  The model counts interpolants modulo 4, keeps the midpoint
// (count 2) and the previous strobe (count 0), and at each strobe expects
// err = mid * (previous strobe - current strobe), the strobe value on
// sym_y and a one-cycle sym_en.  A known "late" pattern (a rising ramp
// sampled after the symbol centre) must give a negative error.
module tb_gardner_ted;
  import tr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b1, y_valid = 1'b0;
  sample_t y = '0;
  err_t    err;
  sample_t sym_y;
  logic    sym_en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gardner_ted #(.SPS(4)) dut (.clk, .rst_n, .ce, .y_valid, .y, .err, .sym_y, .sym_en);

  int     m_ph = 0;
  longint m_mid = 0, m_prev = 0, m_err = 0, m_sym = 0;
  bit     m_en = 0;

  // drive on the falling edge, model and compare on the rising edge
  task automatic step_model();
    if (ce) begin
      m_en = 0;
      if (y_valid) begin
        if (m_ph == 2) m_mid = longint'(y);
        if (m_ph == 0) begin
          m_err  = m_mid * (m_prev - longint'(y));
          m_prev = longint'(y);
          m_sym  = longint'(y);
          m_en   = 1;
        end
        m_ph = (m_ph + 1) % 4;
      end
    end
  endtask

  task automatic compare();
    checks++;
    if (longint'(err) != m_err || longint'(sym_y) != m_sym || sym_en != m_en) begin
      failures++;
      if (failures < 10)
        $display("FAIL: err=%0d exp %0d sym_y=%0d exp %0d en=%0b exp %0b",
                 err, m_err, sym_y, m_sym, sym_en, m_en);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // random traffic
    for (int i = 0; i < 20000; i++) begin
      if (i > 0) @(negedge clk);
      ce      = (i < 4000) ? 1'b1 : ($urandom_range(0, 5) != 0);
      y_valid = (i < 2000) ? 1'b1 : ($urandom_range(0, 2) != 0);
      y       = sample_t'($urandom_range(0, 16383));
      if (i % 997 == 0) y = (i % 2) ? sample_t'(SAMPLE_MAX) : sample_t'(SAMPLE_MIN);
      @(posedge clk);
      step_model();
      #1 compare();
    end
    // late sampling: strobes at -A then +A, midpoint taken after the zero
    // crossing (positive): err = mid * (-A - A) < 0
    @(negedge clk);
    ce = 1'b1;
    while (m_ph != 0) begin
      y_valid = 1'b1; y = '0;
      @(posedge clk); step_model(); @(negedge clk);
    end
    for (int s = 0; s < 8; s++) begin
      y_valid = 1'b1;
      case (s)
        0: y = -sample_t'(2000);
        2: y = sample_t'(300);
        4: y = sample_t'(2000);
        default: y = sample_t'(1000);
      endcase
      @(posedge clk); step_model(); #1 compare();
      @(negedge clk);
    end
    checks++;
    if (!(err < 0)) begin failures++; $display("FAIL: late sampling gave err=%0d, expected < 0", err); end
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
