// perf_analysis_top: circuit that measures how well an interpolator performs
// inside a timing recovery loop.
//
// Transmit side (clk_a, F_c = F_tx = 16 F_symbol):
//   pam_lfsr -> rc_upsampler   pseudo-random PAM symbols, raised-cosine
//                              shaped at 16 samples per symbol (x1[m1])
//   resampler_in               cubic resampler with a fixed step of 0.99:
//                              output rate 0.99 F_tx, which models the
//                              sampling frequency and timing offset of a
//                              free-running receiver clock; its output enable
//                              is down-sampled by 4 (b[j], F_in = 3.96 F_sym)
// cdc_interface                carries b[j] from clk_a into clk_b
// Receive side (clk_b = F_c/2 = 8 F_symbol = M * F_out with M = 2):
//   timing_recovery_out        output clock time base, interpolator under
//                              test (INTERP), Gardner TED, loop processor;
//                              recovers 4 samples per symbol and the symbol
//                              strobes a'[i]
// The receiver reads 3.96 samples per symbol with a clock of 8 F_symbol, so
// the loop's step size must settle to 3.96 / 8 = 0.495.
// The clocks are inputs: in hardware they come from an FPGA clock
// synthesizer with clk_b derived from clk_a at half its rate.
//
// Observation outputs: the transmitted symbol levels (tx_level with
// tx_sym_en, clk_a domain), the resampler output, the recovered strobes
// (rx_sym, rx_sym_en, rx_bit) and the loop state (step, err, wait) in the
// clk_b domain.  An external analyser computes MER from tx and rx symbols.
//
// Beside the chain, with its own clocks and asrc_* ports, sits the
// general-purpose resampler (resampler_out): input samples on asrc_clk_in,
// output samples every 2 cycles of asrc_clk, its output time base locked to
// the input sample rate.  At its defaults it converts at a rate ratio of
// 10/17 (step 17/20).  It shares nothing with the chain.
//
// Taken from the published circuit: the chain, the rates, the 0.99 step,
// the down-sampling by 4, the 2-PAM +/-2^11 signal with roll-off 0.25 and a
// group delay of 10 symbols.  Own choices: the LFSR polynomial, the loop
// gains (K1 = 8, K2 = 16, found by simulation), and that the interface's
// wait freezes the whole receiver (see cdc_interface).
module perf_analysis_top
  import tr_pkg::*;
#(
  parameter interp_e     INTERP    = INTERP_CUBIC,
  parameter int          PAM_BITS  = 1,
  parameter int unsigned RS_STEP   = 1038090,   // 0.99 in Q0.20
  parameter int unsigned RS_INV    = 1059167,   // 1/0.99 in Q0.20
  parameter int unsigned STEP_INIT = 524288,    // 0.5 in Q0.20
  parameter int unsigned K1        = 8,
  parameter int unsigned K2        = 16
) (
  input  logic                  clk_a,
  input  logic                  rst_a_n,
  input  logic                  clk_b,
  input  logic                  rst_b_n,
  // transmit side, clk_a
  output logic signed [4:0]     tx_level,
  output logic                  tx_sym_en,
  output sample_t               tx_sample,
  output sample_t               rs_sample,
  output logic                  rs_valid,
  // receive side, clk_b
  output sample_t               rx_y,
  output logic                  rx_y_valid,
  output sample_t               rx_sym,
  output logic                  rx_sym_en,
  output logic                  rx_bit,
  output err_t                  rx_err,
  output logic [FRACW-1:0]      rx_step,
  output logic                  rx_rd_en,
  output logic                  cdc_wait,
  // general-purpose resampler, independent of the chain above
  input  logic                  asrc_clk_in,
  input  logic                  asrc_rst_in_n,
  input  logic                  asrc_x_valid,
  input  sample_t               asrc_x_in,
  input  logic                  asrc_clk,
  input  logic                  asrc_rst_n,
  output sample_t               asrc_y,
  output logic                  asrc_y_valid,
  output logic [FRACW-1:0]      asrc_step,
  output logic                  asrc_locked
);
  logic [PAM_BITS-1:0] tx_bits;
  sample_t             cdc_data;

  pam_lfsr #(.BITS(PAM_BITS)) u_src (
    .clk(clk_a), .rst_n(rst_a_n), .en(tx_sym_en), .level(tx_level), .bits(tx_bits)
  );

  rc_upsampler #(.SPS(16), .SPAN(10), .BETA(0.25), .PAM_BITS(PAM_BITS)) u_shape (
    .clk(clk_a), .rst_n(rst_a_n), .en(1'b1), .sym_level(tx_level),
    .sym_req(tx_sym_en), .x_out(tx_sample)
  );

  resampler_in #(.STEP(RS_STEP), .INV_STEP(RS_INV), .DOWN(4)) u_rs (
    .clk(clk_a), .rst_n(rst_a_n), .x_valid(1'b1), .x_in(tx_sample),
    .y_all(), .y_all_valid(), .y_out(rs_sample), .y_valid(rs_valid), .mu_o()
  );

  cdc_interface #(.W(XW)) u_cdc (
    .clk_a, .rst_a_n, .write_en(rs_valid), .wdata(rs_sample),
    .clk_b, .rst_b_n, .read_en(rx_rd_en), .rdata(cdc_data), .wait_o(cdc_wait)
  );

  timing_recovery_out #(
    .INTERP(INTERP), .M(2), .STEP_INIT(STEP_INIT), .K1(K1), .K2(K2)
  ) u_tr (
    .clk(clk_b), .rst_n(rst_b_n), .stall(cdc_wait), .rd_en(rx_rd_en), .rd_data(sample_t'(cdc_data)),
    .y(rx_y), .y_valid(rx_y_valid), .sym_y(rx_sym), .sym_en(rx_sym_en),
    .sym_bit(rx_bit), .err(rx_err), .step(rx_step), .mu_o()
  );

  // Stands beside the chain with its own clocks and ports.
  resampler_out u_asrc (
    .clk_in(asrc_clk_in), .rst_in_n(asrc_rst_in_n), .x_valid(asrc_x_valid),
    .x_in(asrc_x_in), .clk(asrc_clk), .rst_n(asrc_rst_n), .y(asrc_y),
    .y_valid(asrc_y_valid), .step(asrc_step), .locked(asrc_locked)
  );
endmodule
