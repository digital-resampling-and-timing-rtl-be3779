// tb_frac_gen_in: checks the input clock time base interval generator.
//
// A floating-point model keeps the ramp t*Delta (Delta = STEP/2^20 exactly)
// and, for every input sample, decides whether an integer was crossed and
// what mu = 1 - frac/Delta is.  The DUT must raise k on the same samples
// (one cycle after the en edge) with mu within 2^-16.  en is driven with
// random gaps.  The rate is checked too: 99 interpolants per 100 input
// samples for the default step 0.99.
module tb_frac_gen_in;
  import tr_pkg::*;
  localparam int unsigned STEP = 1038090;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic k;
  mu_t  mu;
  acc_t acc_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  frac_gen_in dut (.clk, .rst_n, .en, .k, .mu, .acc_o);

  initial begin
    real ramp, delta, frac, mu_ref;
    int  nk_dut, nk_ref, nen;
    bit  crossed;
    delta = real'(STEP) / 1048576.0;
    ramp = 0.0; nk_dut = 0; nk_ref = 0; nen = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      if (i > 0) @(negedge clk);
      en = (i < 10000) ? 1'b1 : ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
      if (en) begin
        nen++;
        crossed = ($floor(ramp + delta) != $floor(ramp));
        ramp  = ramp + delta;
        frac  = ramp - $floor(ramp);
        mu_ref = 1.0 - frac / delta;
        checks++;
        if (k != crossed) begin
          failures++;
          if (failures < 10) $display("FAIL: sample %0d k=%0b expected %0b", nen, k, crossed);
        end
        if (crossed) begin
          nk_ref++;
          checks++;
          if (real'(mu) / 524288.0 - mu_ref > 1.0 / 65536.0 ||
              mu_ref - real'(mu) / 524288.0 > 1.0 / 65536.0) begin
            failures++;
            if (failures < 10) $display("FAIL: mu=%0d ref=%0.6f", mu, mu_ref);
          end
        end
      end else begin
        checks++;
        if (k) begin
          failures++;
          $display("FAIL: k without en");
        end
      end
      if (k) nk_dut++;
      if (i == 9999) begin
        checks++;
        if (nk_dut != 9900 && nk_dut != 9899) begin
          failures++;
          $display("FAIL: %0d interpolants for 10000 samples, expected 9900", nk_dut);
        end
      end
    end
    checks++;
    if (nk_dut != nk_ref) begin
      failures++;
      $display("FAIL: k count %0d vs %0d", nk_dut, nk_ref);
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
