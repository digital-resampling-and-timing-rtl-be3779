// gardner_ted: Gardner timing error detector for a stream with four
// interpolants per symbol (one real channel, as for PAM or either rail of a
// square QAM constellation).
//
// The interpolants are counted modulo 4.  Phase 0 is the symbol strobe and
// phase 2 the sample midway between two strobes; phases 1 and 3 are not
// used.  At every strobe l the detector forms
//     e[l] = y[l-1/2] * (y[l-1] - y[l])
// and pulses sym_en with the error and the strobe value.  With this sign a
// late sampling phase gives a negative error on average, an early one a
// positive error.  The error is only meaningful on symbol transitions;
// random data makes it noisy, which the loop filter smooths.
//
// ce is a clock enable (all registers hold while it is low).
// Interface: y/y_valid in; err (29-bit signed), sym_y (the strobe) and
// sym_en out, registered, one cycle after the strobe interpolant.
module gardner_ted
  import tr_pkg::*;
#(
  parameter int SPS = 4            // interpolants per symbol
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ce,
  input  logic    y_valid,
  input  sample_t y,
  output err_t    err,
  output sample_t sym_y,
  output logic    sym_en
);
  localparam int CW = $clog2(SPS);

  logic [CW-1:0]        ph;
  sample_t              y_mid, y_prev;
  logic signed [XW:0]   diff;

  assign diff = {y_prev[XW-1], y_prev} - {y[XW-1], y};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph     <= '0;
      y_mid  <= '0;
      y_prev <= '0;
      err    <= '0;
      sym_y  <= '0;
      sym_en <= 1'b0;
    end else if (ce) begin
      sym_en <= 1'b0;
      if (y_valid) begin
        ph <= (ph == CW'(SPS - 1)) ? '0 : ph + 1'b1;
        if (ph == CW'(SPS / 2)) y_mid <= y;
        if (ph == '0) begin
          err    <= ERRW'(y_mid) * ERRW'(diff);
          y_prev <= y;
          sym_y  <= y;
          sym_en <= 1'b1;
        end
      end
    end
  end
endmodule
