// tb_perf_workloads: the interpolator comparison and the PAM-order sweep run
// on five copies of the performance analysis circuit side by side.
//
//   cub2 : cubic interpolator,     2-PAM
//   lin2 : linear interpolator,    2-PAM
//   par2 : parabolic interpolator, 2-PAM (alpha = 0.5)
//   cub4 : cubic interpolator,     4-PAM
//   cub8 : cubic interpolator,     8-PAM
// The three 2-PAM runs share the loop gains G1 = 2^-8, G2 = 2^-15 so the
// interpolators are compared under the same loop.  4-PAM and 8-PAM carry
// less average power into the Gardner error, so they use G1 = 2^-6,
// G2 = 2^-13 to pull in from the initial step of 0.5.
// For each run the step must settle to 0.495, all symbol decisions in the
// last 1000 symbols must be correct and the MER must reach a floor; the
// cubic interpolator must beat both the linear and the parabolic one.
module tb_perf_workloads;
  import tr_pkg::*;

  localparam int NSYM = 20000;
  localparam int NRUN = 5;
  localparam int STEP_EXP = 519045;
  localparam int STEP_TOL = 1049;

  logic clk_a = 1'b0, clk_b = 1'b0;
  logic rst_a_n = 1'b0, rst_b_n = 1'b0;
  always #5  clk_a = ~clk_a;
  always #10 clk_b = ~clk_b;

  logic [FRACW-1:0] step [NRUN];
  logic             tx_en [NRUN];
  int checks = 0, failures = 0;
  int n_tx = 0;

  `define PERF_RUN(IDX, NAME, INTERP_V, BITS_V, K1_V, K2_V)                      \
    logic signed [4:0] NAME``_lvl;                                             \
    logic              NAME``_txen, NAME``_rxen;                               \
    sample_t           NAME``_rx;                                              \
    perf_analysis_top #(.INTERP(INTERP_V), .PAM_BITS(BITS_V), .K1(K1_V),        \
                        .K2(K2_V)) u_``NAME (                                  \
      .clk_a, .rst_a_n, .clk_b, .rst_b_n,                                      \
      .tx_level(NAME``_lvl), .tx_sym_en(NAME``_txen), .tx_sample(),            \
      .rs_sample(), .rs_valid(), .rx_y(), .rx_y_valid(), .rx_sym(NAME``_rx),   \
      .rx_sym_en(NAME``_rxen), .rx_bit(), .rx_err(), .rx_step(step[IDX]),      \
      .rx_rd_en(), .cdc_wait(), .asrc_clk_in(1'b0), .asrc_rst_in_n(1'b0),      \
      .asrc_x_valid(1'b0), .asrc_x_in('0), .asrc_clk(1'b0), .asrc_rst_n(1'b0), \
      .asrc_y(), .asrc_y_valid(), .asrc_step(), .asrc_locked());               \
    assign tx_en[IDX] = NAME``_txen;                                           \
    mer_monitor #(.PAM_BITS(BITS_V), .NWIN(1000)) m_``NAME (                   \
      .clk_a, .tx_level(NAME``_lvl), .tx_sym_en(NAME``_txen), .clk_b,          \
      .rx_sym(NAME``_rx), .rx_sym_en(NAME``_rxen));

  `PERF_RUN(0, cub2, INTERP_CUBIC,     1, 8, 15)
  `PERF_RUN(1, lin2, INTERP_LINEAR,    1, 8, 15)
  `PERF_RUN(2, par2, INTERP_PARABOLIC, 1, 8, 15)
  `PERF_RUN(3, cub4, INTERP_CUBIC,     2, 6, 13)
  `PERF_RUN(4, cub8, INTERP_CUBIC,     3, 6, 13)

  always @(posedge clk_a) if (rst_a_n && tx_en[0]) n_tx++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic judge(input string name, input int idx, input real mer, input int serr,
                       input int nused, input real floor_db);
    $display("%s: step %0.5f", name, real'(step[idx]) / 1048576.0);
    check(nused == 1000, {name, ": window not filled"});
    check(step[idx] >= FRACW'(STEP_EXP - STEP_TOL) && step[idx] <= FRACW'(STEP_EXP + STEP_TOL),
          $sformatf("%s: step %0d not near 0.495", name, step[idx]));
    check(serr == 0, $sformatf("%s: %0d decision errors", name, serr));
    check(mer >= floor_db, $sformatf("%s: MER %0.2f below %0.1f", name, mer, floor_db));
  endtask

  initial begin
    real mer [NRUN];
    int  off, serr, nused;
    repeat (4) @(posedge clk_b);
    rst_a_n = 1'b1;
    rst_b_n = 1'b1;
    wait (n_tx >= NSYM);
    @(posedge clk_b);
    m_cub2.analyse(mer[0], off, serr, nused); judge("cubic 2-PAM",     0, mer[0], serr, nused, 38.0);
    m_lin2.analyse(mer[1], off, serr, nused); judge("linear 2-PAM",    1, mer[1], serr, nused, 28.0);
    m_par2.analyse(mer[2], off, serr, nused); judge("parabolic 2-PAM", 2, mer[2], serr, nused, 28.0);
    m_cub4.analyse(mer[3], off, serr, nused); judge("cubic 4-PAM",     3, mer[3], serr, nused, 30.0);
    m_cub8.analyse(mer[4], off, serr, nused); judge("cubic 8-PAM",     4, mer[4], serr, nused, 30.0);
    check(mer[0] > mer[1] + 3.0, "cubic does not beat linear");
    check(mer[0] > mer[2] + 3.0, "cubic does not beat parabolic");
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
