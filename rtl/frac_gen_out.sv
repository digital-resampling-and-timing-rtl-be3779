// frac_gen_out: fractional interval generator for the output clock time base
// method (output time base, input time base and interval generator merged).
//
// The accumulator is the output clock time base scaled by the input period,
// Y_out/T_in, with a 20-bit fraction and one MSB.  It runs on the system
// clock clk = M * F_out and adds, every cycle, the step size supplied by the
// loop processor (nominally T_out/(M*T_in)) plus a one-cycle phase
// correction.  When the MSB changes the ramp has crossed an integer: the
// input enable m is raised for one cycle and one input sample must be loaded
// into the interpolator.  The output enable k is high on one cycle out of M
// (every edge of the output clock), and the fractional interval is simply
// the accumulator fraction, mu = frac(Y_out/T_in): no division is needed.
//
// Interface: step is unsigned Q0.20 (below 1.0), phase is a signed Q0.20
// correction applied in the current cycle.  Outputs m, k and mu are
// registered on the same edge; mu keeps 19 of the 20 fraction bits.
// ce is a clock enable: while it is low every register holds, which lets
// the receiver stall when its input buffer has no sample ready.
// The sum step + phase is clamped to [0, 1) so that at most one input sample
// is requested per clock; the clamp is a safety choice of this design.
module frac_gen_out
  import tr_pkg::*;
#(
  parameter int unsigned M = 2          // system clock cycles per output sample
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ce,
  input  logic [FRACW-1:0]       step,
  input  logic signed [FRACW:0]  phase,
  output logic                   m,
  output logic                   k,
  output mu_t                    mu,
  output acc_t                   acc_o
);
  localparam int CW = (M > 1) ? $clog2(M) : 1;

  acc_t                  acc, acc_nx;
  logic signed [FRACW+2:0] inc;
  logic [FRACW-1:0]      inc_c;
  logic [CW-1:0]         kcnt;

  always_comb begin
    inc = (FRACW+3)'($signed({1'b0, step})) + (FRACW+3)'(phase);
    if (inc < 0)                                 inc_c = '0;
    else if (inc > (FRACW+3)'((1 << FRACW) - 1)) inc_c = '1;
    else                                         inc_c = inc[FRACW-1:0];
    acc_nx = acc + ACCW'(inc_c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      m    <= 1'b0;
      k    <= 1'b0;
      mu   <= '0;
      kcnt <= '0;
    end else if (ce) begin
      acc <= acc_nx;
      m   <= (acc_nx[FRACW] != acc[FRACW]);
      mu  <= mu_t'({1'b0, acc_nx[FRACW-1:FRACW-MUF]});
      if (kcnt == CW'(M - 1)) begin
        kcnt <= '0;
        k    <= 1'b1;
      end else begin
        kcnt <= kcnt + 1'b1;
        k    <= 1'b0;
      end
    end
  end

  assign acc_o = acc;
endmodule
