// tb_pam_lfsr: checks the pseudo-random PAM symbol source for 2, 4 and 8
// levels.
//
// An independent model generates the maximal-length sequence from the
// recurrence b[n] = b[n-23] xor b[n-18] (polynomial x^23 + x^18 + 1) and
// takes BITS new bits per symbol, newest bit in the LSB.  The bit group is
// read as a Gray code and mapped to the odd levels -(L-1) .. (L-1).  Every
// symbol of every instance is compared; en is toggled at random to check
// that the source only advances when enabled.  The levels must also be
// roughly balanced (each level within 20% of its share).
module tb_pam_lfsr;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [4:0] lev1, lev2, lev3;
  logic [0:0] b1;
  logic [1:0] b2;
  logic [2:0] b3;
  int checks = 0, failures = 0;
  localparam logic [22:0] SEED = 23'h5A_5A5A;

  always #5 clk = ~clk;

  pam_lfsr #(.BITS(1), .SEED(SEED)) u1 (.clk, .rst_n, .en, .level(lev1), .bits(b1));
  pam_lfsr #(.BITS(2), .SEED(SEED)) u2 (.clk, .rst_n, .en, .level(lev2), .bits(b2));
  pam_lfsr #(.BITS(3), .SEED(SEED)) u3 (.clk, .rst_n, .en, .level(lev3), .bits(b3));

  // bit history per instance: hist[i][0] is the newest bit
  bit hist [3][23];
  int counts [3][8];

  function automatic int gray_level(int g, int nbits);
    int b;
    b = g;
    for (int s = 1; s < nbits; s++) b = b ^ (g >> s);
    return 2 * b - ((1 << nbits) - 1);
  endfunction

  task automatic check_inst(int idx, int nbits, int lev);
    int g, expv;
    g = 0;
    for (int i = 0; i < nbits; i++) g = g | (int'(hist[idx][i]) << i);
    expv = gray_level(g, nbits);
    checks++;
    counts[idx][g]++;
    if (lev != expv) begin
      failures++;
      if (failures < 10) $display("FAIL: BITS=%0d level=%0d expected %0d", nbits, lev, expv);
    end
  endtask

  initial begin
    bit nb;
    for (int k = 0; k < 3; k++) begin
      for (int i = 0; i < 23; i++) hist[k][i] = SEED[i];
      for (int g = 0; g < 8; g++) counts[k][g] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 30000; n++) begin
      if (n > 0) @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (en) begin
        for (int k = 0; k < 3; k++) begin
          for (int r = 0; r <= k; r++) begin
            nb = hist[k][22] ^ hist[k][17];
            for (int i = 22; i > 0; i--) hist[k][i] = hist[k][i-1];
            hist[k][0] = nb;
          end
        end
      end
      #1;
      check_inst(0, 1, int'(lev1));
      check_inst(1, 2, int'(lev2));
      check_inst(2, 3, int'(lev3));
    end
    for (int k = 0; k < 3; k++) begin
      for (int g = 0; g < (2 << k); g++) begin
        checks++;
        if (counts[k][g] < 30000 / (2 << k) * 8 / 10 || counts[k][g] > 30000 / (2 << k) * 12 / 10) begin
          failures++;
          $display("FAIL: BITS=%0d code %0d seen %0d times", k + 1, g, counts[k][g]);
        end
      end
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
