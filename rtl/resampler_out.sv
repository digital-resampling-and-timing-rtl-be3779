// resampler_out: asynchronous sample-rate converter with an output clock
// time base locked to the input sample clock (general-purpose resampler).
//
// Input samples arrive one per clk_in edge (x_valid) and are written into a
// clock domain interface of DEPTH registers (8: with the read side reading
// up to one sample per clock, the synchronizer alone hides 2 to 3 samples,
// more than four registers leave room for).  Everything else runs on the system
// clock clk = M * F_out; an output sample is produced every M clocks (k), so
// the output rate is F_out without a separate output clock.
//
// Two ramps count time in units of input samples:
//   * input clock time base: a counter advanced by 1 per input sample in the
//     clk_in domain, carried into clk as an 8-bit Gray code (integer only);
//   * output clock time base (frac_gen_out): advanced by step + phase per
//     clock; each integer cross-over raises m, which loads the next input
//     sample from the interface into the interpolator window, and its
//     fraction is mu.
// The time base synchroniser (loop_processor, updated every clock) takes
// the ramp difference Y_in - Y_out - LAG as its error, so the output ramp
// trails the arriving samples by LAG samples; its integral part (Accumulator
// 2) settles to F_in / (M * F_out).  While the interface has nothing to read
// (wait) the whole read side holds, as in timing_recovery_out.
//
// The loop is narrow (natural frequency about 2^-10 of the clock, damping
// about 1) so that the one-sample steps of the integer input ramp do not
// reach the output.  With only a few registers of slack, acquisition must
// start from a step near the nominal ratio: STEP_INIT is that ratio and the
// loop tracks the clock offset (tested up to 0.5%).
//
// Interface: x_in/x_valid in the clk_in domain; y/y_valid, step and
// locked in the clk domain.  y is registered; it follows the window by two
// clocks.  locked is high once |error| < 5/4 sample (the integer input ramp
// and the clock grid alone make it swing by almost +/-1) for 4096 clocks
// in a row.
//
// From the published circuit: output clock time base with step set by a
// PLL against the input ramp, m on integer cross-over, k every M clocks,
// mu = frac, cubic interpolation, a circular-buffer interface.  Own choices:
// the ramp difference from a Gray-coded sample counter, the LAG of 2
// samples, the interface depth, the loop gains and the lock detector.
module resampler_out
  import tr_pkg::*;
#(
  parameter int unsigned M         = 2,        // system clocks per output sample
  parameter int unsigned STEP_INIT = 891290,   // nominal F_in/(M F_out): 17/20 for a 10/17 rate
  parameter int unsigned K1        = 9,        // G1 = 2^-K1 (per clock)
  parameter int unsigned K2        = 20,       // G2 = 2^-K2 (per clock)
  parameter int unsigned LAG       = 2097152,  // 2 samples, Q.20
  parameter int unsigned DEPTH     = 8         // interface registers
) (
  input  logic              clk_in,
  input  logic              rst_in_n,
  input  logic              x_valid,
  input  sample_t           x_in,
  input  logic              clk,
  input  logic              rst_n,
  output sample_t           y,
  output logic              y_valid,
  output logic [FRACW-1:0]  step,
  output logic              locked
);
  localparam int CW = 8;                // ramp counter width (integer part)
  localparam int EW = CW + FRACW;       // ramp difference width

  // ---- input clock time base (clk_in domain) ----
  logic [CW-1:0] yin_bin, yin_gray;
  always_ff @(posedge clk_in or negedge rst_in_n) begin
    if (!rst_in_n) begin
      yin_bin  <= '0;
      yin_gray <= '0;
    end else if (x_valid) begin
      yin_bin  <= yin_bin + 1'b1;
      yin_gray <= (yin_bin + 1'b1) ^ ((yin_bin + 1'b1) >> 1);
    end
  end

  // ---- carried into clk ----
  logic [CW-1:0] g1, g2, yin_c;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1 <= '0;
      g2 <= '0;
    end else begin
      g1 <= yin_gray;
      g2 <= g1;
    end
  end
  always_comb begin
    yin_c[CW-1] = g2[CW-1];
    for (int i = CW - 2; i >= 0; i--) yin_c[i] = yin_c[i+1] ^ g2[i];
  end

  // ---- sample interface ----
  logic    stall, ce, rd;
  sample_t rd_data;
  cdc_interface #(.W(XW), .DEPTH(DEPTH)) u_cdc (
    .clk_a(clk_in), .rst_a_n(rst_in_n), .write_en(x_valid), .wdata(x_in),
    .clk_b(clk), .rst_b_n(rst_n), .read_en(rd), .rdata(rd_data), .wait_o(stall)
  );
  assign ce = ~stall;

  // ---- output clock time base ----
  logic                  m, k;
  mu_t                   mu;
  acc_t                  acc;
  logic signed [FRACW:0] phase;
  frac_gen_out #(.M(M)) u_fgen (
    .clk, .rst_n, .ce, .step, .phase, .m, .k, .mu, .acc_o(acc)
  );
  assign rd = m & ce;

  // integer part of the output ramp: samples loaded so far
  logic [CW-1:0] yout_int;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   yout_int <= '0;
    else if (rd)  yout_int <= yout_int + 1'b1;
  end

  // ---- time base synchroniser: error = Y_in - Y_out - LAG ----
  logic signed [EW-1:0] diff;
  err_t                 err;
  always_comb begin
    diff = $signed({yin_c - yout_int, {FRACW{1'b0}}})
         - $signed(EW'({1'b0, acc[FRACW-1:0]}))
         - $signed(EW'(LAG));
    err  = ERRW'(diff);
  end

  loop_processor #(.STEP_INIT(STEP_INIT), .K1(K1), .K2(K2)) u_sync (
    .clk, .rst_n, .ce, .sym_en(1'b1), .err, .step, .phase
  );

  // ---- interpolator ----
  sample_t win [4];
  sample_t y_c;
  mu_t     mu_d;
  logic    k_d;
  interp_cubic u_interp (
    .xm1(win[3]), .x0(win[2]), .x1(win[1]), .x2(win[0]), .mu(mu_d), .y(y_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) win[i] <= '0;
      mu_d    <= '0;
      k_d     <= 1'b0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (ce) begin
        if (m) begin
          win[0] <= rd_data;
          for (int i = 1; i < 4; i++) win[i] <= win[i-1];
        end
        mu_d <= mu;
        k_d  <= k;
        if (k_d) begin
          y       <= y_c;
          y_valid <= 1'b1;
        end
      end
    end
  end

  // ---- lock detector ----
  localparam logic signed [EW-1:0] LOCK_TOL = EW'(5 << (FRACW - 2));
  logic [12:0] lk_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lk_cnt <= '0;
      locked <= 1'b0;
    end else if (diff > LOCK_TOL || diff < -LOCK_TOL) begin
      lk_cnt <= '0;
      locked <= 1'b0;
    end else if (lk_cnt[12]) begin
      locked <= 1'b1;
    end else begin
      lk_cnt <= lk_cnt + 1'b1;
    end
  end
endmodule
