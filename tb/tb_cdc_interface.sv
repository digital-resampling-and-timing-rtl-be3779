// tb_cdc_interface: checks the four-register clock domain interface with
// unrelated clocks (10 ns write clock, 17 ns read clock).
//
// The writer stores an incrementing count.  Every read accepted (read_en
// high while wait is low) must return the next count: no sample lost,
// repeated or torn.  Three phases: reader slightly faster than the writer
// (the receiver's normal case, occasional waits), reader asking every read
// clock (wait must rise and hold the read), and writer pausing (wait must
// rise; rdata holds the last sample).  wait must be high straight after
// reset.  A reader slower than the writer is outside the interface's
// operating range (four registers, no back-pressure) and is not tested.
module tb_cdc_interface;
  logic clk_a = 1'b0, clk_b = 1'b0, rst_a_n = 1'b0, rst_b_n = 1'b0;
  logic write_en = 1'b0, read_en = 1'b0, wait_o;
  logic [13:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  int phase_id = 0;
  int nwait_steady = 0, nwait_fast = 0, nwait_pause = 0, nread = 0;
  logic [13:0] expect_v = '0;

  always #5   clk_a = ~clk_a;
  always #8.5 clk_b = ~clk_b;

  cdc_interface #(.W(14)) dut (.clk_a, .rst_a_n, .write_en, .wdata, .clk_b, .rst_b_n,
                               .read_en, .rdata, .wait_o);

  // writer: one sample every 4 write clocks (40 ns)
  int wcnt = 0;
  always @(posedge clk_a) if (rst_a_n) begin
    wcnt <= (wcnt == 3) ? 0 : wcnt + 1;
    if (write_en) wdata <= wdata + 1'b1;
  end
  always_comb write_en = rst_a_n && (wcnt == 3) && (phase_id != 3);

  // reader: requests come from a phase accumulator, as in the receiver,
  // where reads follow the integer cross-overs of a time base.
  int racc = 0;
  always @(negedge clk_b) begin
    case (phase_id)
      1: begin  // 0.45 requests per 17 ns = one per 37.8 ns, writes one per 40 ns
        racc = racc + 45;
        read_en <= (racc >= 100);
        if (racc >= 100) racc = racc - 100;
      end
      default: read_en <= 1'b1;
    endcase
  end

  always @(posedge clk_b) if (rst_b_n) begin
    if (read_en && !wait_o) begin
      checks++;
      nread++;
      if (rdata !== expect_v) begin
        failures++;
        if (failures < 10) $display("FAIL: read %0d expected %0d", rdata, expect_v);
      end
      expect_v <= expect_v + 1'b1;
    end
    if (read_en && wait_o) begin
      if (phase_id == 1) nwait_steady++;
      if (phase_id == 2) nwait_fast++;
      if (phase_id == 3) nwait_pause++;
    end
  end

  initial begin
    repeat (2) @(posedge clk_b);
    #1;
    checks++;
    if (!wait_o) begin failures++; $display("FAIL: wait low after reset"); end
    rst_a_n = 1'b1;
    rst_b_n = 1'b1;
    // phase 1: reader slightly faster than the writer; it waits now and then.
    phase_id = 1;
    #40000;
    // phase 2: read every read clock, clearly faster than the writer.
    phase_id = 2;
    #20000;
    // phase 3: writer pauses, reader keeps asking.
    phase_id = 3;
    #2000;
    checks++;
    if (!wait_o) begin failures++; $display("FAIL: wait low with writer paused"); end
    checks++;
    if (rdata !== expect_v - 1'b1) begin failures++; $display("FAIL: rdata %0d not held at last sample", rdata); end
    phase_id = 4;
    #4000;
    checks++;
    if (nwait_fast == 0 || nwait_pause == 0) begin
      failures++;
      $display("FAIL: wait never raised (fast %0d, pause %0d)", nwait_fast, nwait_pause);
    end
    checks++;
    if (nread < 1400) begin failures++; $display("FAIL: only %0d reads", nread); end
    $display("reads %0d, waits: %0d %0d %0d", nread, nwait_steady, nwait_fast, nwait_pause);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
