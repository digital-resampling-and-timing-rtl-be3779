// frac_gen_in: fractional interval generator for the input clock time base
// method (input time base, output time base and interval generator merged).
//
// The accumulator is the input clock time base scaled by the output period,
// Y_in/T_out.  It holds a 20-bit fraction and one MSB.  Each input sample
// (en = 1; the circuit runs at one clock per input sample, M = 1) adds the
// fixed step Delta = T_in/T_out.  When the MSB changes, the ramp has crossed
// an integer, i.e. an output sampling instant of the (implied, never built)
// output clock time base lies between the previous and the current input
// sample.  The output enable k is then raised for one cycle and the
// fractional interval, measured from the previous input sample, is
//     mu = 1 - frac(Y_in/T_out) / Delta.
// The division by the step is done as a multiplication by the constant
// INV_STEP = 2^20/Delta, which is possible because the step is fixed here.
//
// Interface: en marks an input sample; k (registered) pulses for each
// interpolant; mu (Q0.19) is registered together with k and held until the
// next cross-over.  Latency: k and mu appear on the clock edge that takes
// the input sample whose arrival completed the crossing.
// Parameter defaults give the step 0.99 of the reference configuration.
module frac_gen_in
  import tr_pkg::*;
#(
  parameter int unsigned STEP     = 1038090,  // round(0.99 * 2^20)
  parameter int unsigned INV_STEP = 1059167   // round(2^20 / 0.99)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic k,
  output mu_t  mu,
  output acc_t acc_o
);
  acc_t acc, acc_nx;
  logic [FRACW-1:0] frac_nx;
  logic [2*FRACW+1:0] scaled;      // frac * INV_STEP, Q40
  logic [FRACW:0]     past;        // frac / Delta in Q0.19 (may reach 1.0)
  mu_t                mu_nx;

  always_comb begin
    acc_nx  = acc + ACCW'(STEP);
    frac_nx = acc_nx[FRACW-1:0];
    scaled  = (2*FRACW+2)'(frac_nx) * (2*FRACW+2)'(INV_STEP);
    past    = (FRACW+1)'(scaled >> (2*FRACW - MUF));
    if (past >= (FRACW+1)'(1 << MUF)) mu_nx = '0;
    else                              mu_nx = mu_t'((FRACW+1)'(1 << MUF) - past);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      k   <= 1'b0;
      mu  <= '0;
    end else begin
      k <= 1'b0;
      if (en) begin
        acc <= acc_nx;
        if (acc_nx[FRACW] != acc[FRACW]) begin
          k  <= 1'b1;
          mu <= mu_nx;
        end
      end
    end
  end

  assign acc_o = acc;

  // The step must stay below one: at most one cross-over per input sample.
  initial assert (STEP < (1 << FRACW)) else $error("frac_gen_in: STEP must be below 1.0");
endmodule
