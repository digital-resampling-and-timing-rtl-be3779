// timing_recovery_out: timing recovery with output clock time base.
//
// The circuit runs on clk = M * F_out (M = 2) and produces four interpolants
// per symbol.  frac_gen_out reconstructs the output clock time base in units
// of the input period; each integer cross-over raises m, which reads one
// input sample (rd_en / rd_data, normally from a clock domain interface)
// into a four-register window.  On every M-th cycle (k) the interpolator
// under test, chosen by INTERP, computes an interpolant from the window and
// mu = frac(Y_out/T_in).  The Gardner detector uses two of every four
// interpolants to estimate the timing error once per symbol, and the loop
// processor turns it into a phase kick and a new step size for the time
// base.  Once locked, the step equals T_out/(M*T_in) and the strobes fall on
// the symbol centres; sym_y carries the strobe and sym_bit the 2-PAM
// decision (its sign).
//
// stall (normally the wait signal of the clock domain interface) freezes
// every register of the receiver for that cycle, so no sample is repeated
// and no interpolant is lost; the pulse outputs rd_en, y_valid and sym_en
// are masked while stalled.
//
// Pipeline: m, k, mu registered (cycle 0) -> window load and mu/k alignment
// (cycle 1) -> interpolant register y (cycle 2) -> TED registers (cycle 3).
// The linear interpolator uses x[m_k] and x[m_k+1] of the same window, so
// all three choices see the same basepoint.
module timing_recovery_out
  import tr_pkg::*;
#(
  parameter interp_e     INTERP    = INTERP_CUBIC,
  parameter int unsigned M         = 2,
  parameter int unsigned STEP_INIT = 524288,   // 0.5 in Q0.20
  parameter int unsigned K1        = 8,
  parameter int unsigned K2        = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  stall,
  output logic                  rd_en,
  input  sample_t               rd_data,
  output sample_t               y,
  output logic                  y_valid,
  output sample_t               sym_y,
  output logic                  sym_en,
  output logic                  sym_bit,
  output err_t                  err,
  output logic [FRACW-1:0]      step,
  output mu_t                   mu_o
);
  logic                  m, k, k_d;
  mu_t                   mu, mu_d;
  logic signed [FRACW:0] phase;
  sample_t               win [4];
  sample_t               y_c;
  logic                  ce;
  logic                  y_v, sym_v;

  assign ce = ~stall;

  frac_gen_out #(.M(M)) u_fgen (
    .clk, .rst_n, .ce, .step, .phase, .m, .k, .mu, .acc_o()
  );

  if (INTERP == INTERP_LINEAR) begin : g_lin
    interp_linear u_interp (.x0(win[2]), .x1(win[1]), .mu(mu_d), .y(y_c));
  end else if (INTERP == INTERP_PARABOLIC) begin : g_par
    interp_parabolic u_interp (
      .xm1(win[3]), .x0(win[2]), .x1(win[1]), .x2(win[0]), .mu(mu_d), .y(y_c));
  end else begin : g_cub
    interp_cubic u_interp (
      .xm1(win[3]), .x0(win[2]), .x1(win[1]), .x2(win[0]), .mu(mu_d), .y(y_c));
  end

  assign rd_en   = m & ce;
  assign y_valid = y_v & ce;
  assign sym_en  = sym_v & ce;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) win[i] <= '0;
      mu_d    <= '0;
      k_d     <= 1'b0;
      y       <= '0;
      y_v     <= 1'b0;
    end else if (ce) begin
      if (m) begin
        win[0] <= rd_data;
        for (int i = 1; i < 4; i++) win[i] <= win[i-1];
      end
      mu_d    <= mu;
      k_d     <= k;
      y_v     <= k_d;
      if (k_d) y <= y_c;
    end
  end

  gardner_ted #(.SPS(4)) u_ted (
    .clk, .rst_n, .ce, .y_valid(y_v), .y, .err, .sym_y, .sym_en(sym_v)
  );

  loop_processor #(.STEP_INIT(STEP_INIT), .K1(K1), .K2(K2)) u_loop (
    .clk, .rst_n, .ce, .sym_en(sym_v), .err, .step, .phase
  );

  assign sym_bit = ~sym_y[XW-1];
  assign mu_o    = mu_d;
endmodule
