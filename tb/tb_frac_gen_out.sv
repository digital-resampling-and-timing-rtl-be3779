// tb_frac_gen_out: checks the output clock time base interval generator.
//
// A model accumulates step + phase (clamped to [0,1)) modulo 1 in 20-bit
// integer arithmetic and predicts, per cycle, the input enable m (integer
// cross-over), the output enable k (every M = 2 cycles) and
// mu = fraction >> 1.  Phases: constant step 0.495, random phase kicks
// (including ones that must be clamped), and random clock-enable gaps
// during which nothing may change.
module tb_frac_gen_out;
  import tr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b1;
  logic [FRACW-1:0] step = 20'd519045;
  logic signed [FRACW:0] phase = '0;
  logic m, k;
  mu_t  mu;
  acc_t acc_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  frac_gen_out #(.M(2)) dut (.clk, .rst_n, .ce, .step, .phase, .m, .k, .mu, .acc_o);

  initial begin
    longint acc_m, inc;
    bit m_ref, k_ref;
    int kc, nm;
    acc_m = 0; kc = 0; nm = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      if (i > 0) @(negedge clk);
      ce = (i < 5000) ? 1'b1 : ($urandom_range(0, 4) != 0);
      if (i >= 2000 && $urandom_range(0, 9) == 0)
        phase = (FRACW+1)'(int'($urandom_range(0, 1200000)) - 600000);
      else
        phase = '0;
      if (i >= 10000 && i < 10100) step = 20'hFFFFF;
      else if (i == 10100)         step = 20'd519045;
      @(posedge clk);
      if (ce) begin
        inc = longint'(step) + longint'(phase);
        if (inc < 0) inc = 0;
        if (inc > 1048575) inc = 1048575;
        m_ref = ((acc_m + inc) >= 1048576);
        acc_m = (acc_m + inc) % 1048576;
        k_ref = (kc == 1);
        kc = (kc + 1) % 2;
        #1;
        checks += 3;
        if (m !== m_ref) begin failures++; if (failures < 10) $display("FAIL: cycle %0d m=%0b exp %0b", i, m, m_ref); end
        if (k !== k_ref) begin failures++; if (failures < 10) $display("FAIL: cycle %0d k=%0b exp %0b", i, k, k_ref); end
        if (mu !== mu_t'(acc_m >> 1)) begin failures++; if (failures < 10) $display("FAIL: cycle %0d mu=%0d exp %0d", i, mu, acc_m >> 1); end
        if (m) nm++;
      end else begin
        #1;
        checks++;
        if (acc_o[FRACW-1:0] != FRACW'(acc_m)) begin failures++; $display("FAIL: accumulator moved while ce low"); end
      end
    end
    checks++;
    if (nm < 8000) begin failures++; $display("FAIL: only %0d input enables", nm); end
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
