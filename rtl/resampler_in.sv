// resampler_in: resampler with input clock time base and a fixed step,
// followed by down-sampling of its output by DOWN.
//
// One input sample arrives per clock (M = 1; x_valid marks it).  Samples
// shift through a four-register window.  frac_gen_in advances the input
// clock time base by the step Delta = T_in/T_out per sample and raises k
// with mu when an output instant falls between the previous two samples.
// The cubic interpolator needs one sample beyond that interval, so the
// request waits for the next input sample; then the window holds
// x[m_k-1], x[m_k], x[m_k+1], x[m_k+2] and the interpolant is registered
// one clock later (y_all, y_all_valid).  The output rate is Delta times the
// input rate (0.99 by default, so one input sample in a hundred yields no
// interpolant).  Down-sampling by DOWN simply keeps every DOWN-th output
// enable (y_out, y_valid).
//
// Latency: the interpolant for a cross-over detected on input sample n is
// registered two input samples later plus one clock.  If the input has
// gaps, a k that comes while no sample is present is held, with its mu,
// until the next sample arrives.
//
// The fixed step, the mu formula and the down-sampling by 4 follow the
// published circuit; the window alignment and the hold of a pending k are
// this design's own.
module resampler_in
  import tr_pkg::*;
#(
  parameter int unsigned STEP     = 1038090,  // round(0.99 * 2^20)
  parameter int unsigned INV_STEP = 1059167,  // round(2^20 / 0.99)
  parameter int unsigned DOWN     = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    x_valid,
  input  sample_t x_in,
  output sample_t y_all,
  output logic    y_all_valid,
  output sample_t y_out,
  output logic    y_valid,
  output mu_t     mu_o
);
  localparam int DW = (DOWN > 1) ? $clog2(DOWN) : 1;

  sample_t       win [4];        // win[0] newest ... win[3] oldest
  logic          k, pend, cur_k;
  mu_t           mu, cur_mu;
  sample_t       y_c;
  logic [DW-1:0] dcnt;

  frac_gen_in #(.STEP(STEP), .INV_STEP(INV_STEP)) u_fgen (
    .clk, .rst_n, .en(x_valid), .k, .mu, .acc_o()
  );

  interp_cubic u_interp (
    .xm1(win[3]), .x0(win[2]), .x1(win[1]), .x2(win[0]), .mu(cur_mu), .y(y_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) win[i] <= '0;
      pend        <= 1'b0;
      cur_k       <= 1'b0;
      cur_mu      <= '0;
      y_all       <= '0;
      y_all_valid <= 1'b0;
      y_out       <= '0;
      y_valid     <= 1'b0;
      dcnt        <= '0;
    end else begin
      // Input window and alignment of (k, mu) with it.
      if (x_valid) begin
        win[0] <= x_in;
        for (int i = 1; i < 4; i++) win[i] <= win[i-1];
        cur_k  <= k || pend;
        pend   <= 1'b0;
        if (k || pend) cur_mu <= mu;
      end else begin
        cur_k <= 1'b0;
        if (k) begin
          pend   <= 1'b1;
        end
      end
      // Interpolant register, enabled by the aligned output enable.
      y_all_valid <= cur_k;
      y_valid     <= 1'b0;
      if (cur_k) begin
        y_all <= y_c;
        if (dcnt == DW'(DOWN - 1) || DOWN == 1) begin
          dcnt    <= '0;
          y_out   <= y_c;
          y_valid <= 1'b1;
        end else begin
          dcnt <= dcnt + 1'b1;
        end
      end
    end
  end

  assign mu_o = cur_mu;
endmodule
