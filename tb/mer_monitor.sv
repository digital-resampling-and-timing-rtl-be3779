// mer_monitor: testbench helper that records transmitted PAM levels and
// recovered symbol strobes and measures the modulation error ratio.
//
// tx levels are captured on clk_a when tx_sym_en is high; recovered strobes
// on clk_b when rx_sym_en is high.  analyse() looks at the last NWIN
// strobes, finds the symbol offset between the two streams by correlation,
// fits a real gain, and returns
//     MER = 10*log10( sum (g*a)^2 / sum (r - g*a)^2 )
// with a the transmitted level and r the strobe, plus the number of symbol
// decisions (nearest level) that differ from the transmitted ones.
module mer_monitor #(
  parameter int PAM_BITS = 1,
  parameter int NWIN     = 800
) (
  input logic              clk_a,
  input logic signed [4:0] tx_level,
  input logic              tx_sym_en,
  input logic              clk_b,
  input logic signed [13:0] rx_sym,
  input logic              rx_sym_en
);
  int tx_q[$];
  int rx_q[$];

  always @(posedge clk_a) if (tx_sym_en) tx_q.push_back(int'(tx_level));
  always @(posedge clk_b) if (rx_sym_en) rx_q.push_back(int'(rx_sym));

  function automatic real log10r(input real v);
    return $ln(v) / $ln(10.0);
  endfunction

  task automatic analyse(output real mer_db, output int off_best, output int sym_errors,
                         output int n_used);
    int  nrx, ntx, r0;
    real best, c, g, sp, se, num, den;
    int  lvl, dec, L;
    nrx = rx_q.size();
    ntx = tx_q.size();
    L = 1 << PAM_BITS;
    r0 = nrx - NWIN;
    best = -1.0;
    off_best = 0;
    mer_db = -100.0;
    sym_errors = -1;
    n_used = 0;
    if (r0 < 0) return;
    // rx index n corresponds to tx index n + off.
    for (int off = -200; off <= 200; off++) begin
      if (r0 + off < 0 || nrx - 1 + off >= ntx) continue;
      c = 0.0;
      for (int n = r0; n < nrx; n++) c += real'(rx_q[n]) * real'(tx_q[n + off]);
      if (c > best) begin best = c; off_best = off; end
    end
    if (best <= 0.0) return;
    num = 0.0; den = 0.0;
    for (int n = r0; n < nrx; n++) begin
      num += real'(rx_q[n]) * real'(tx_q[n + off_best]);
      den += real'(tx_q[n + off_best]) * real'(tx_q[n + off_best]);
    end
    g = num / den;
    sp = 0.0; se = 0.0; sym_errors = 0;
    for (int n = r0; n < nrx; n++) begin
      lvl = tx_q[n + off_best];
      sp += (g * lvl) * (g * lvl);
      se += (real'(rx_q[n]) - g * lvl) * (real'(rx_q[n]) - g * lvl);
      // nearest odd level: 2*floor(r/(2*g)) + 1 (g is the size of one level)
      dec = 2 * int'($floor(real'(rx_q[n]) / (2.0 * g))) + 1;
      if (dec > L - 1)  dec = L - 1;
      if (dec < -(L - 1)) dec = -(L - 1);
      if (dec != lvl) sym_errors++;
    end
    if (se < 1.0e-9) se = 1.0e-9;
    mer_db = 10.0 * log10r(sp / se);
    n_used = nrx - r0;
    $display("  MER %0.2f dB over %0d symbols (gain %0.4f, offset %0d, decision errors %0d)",
             mer_db, n_used, g, off_best, sym_errors);
  endtask
endmodule
