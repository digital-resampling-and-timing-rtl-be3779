// rc_upsampler: up-sampler by SPS with raised-cosine pulse shaping.
//
// Conceptually the PAM symbols are zero-stuffed to SPS samples per symbol
// and passed through a raised-cosine FIR with roll-off BETA whose group
// delay is SPAN symbol periods (2*SPAN*SPS + 1 taps, 321 by default).  It is
// built in polyphase form: only the 2*SPAN + 1 most recent symbols are kept,
// and output phase p (0..SPS-1) is
//     x = sum_j level[j] * c[p + SPS*j],   j = 0 .. 2*SPAN.
// Symbols are small odd integers, so each product is a short multiply (a
// sign change for 2-PAM).  The coefficients
//     c[n] = round(AMP/(L-1) * h_rc((n - SPAN*SPS)/SPS))
// are computed while the design is elaborated; the peak is 1 at t = 0, so
// the outermost symbols of 2-PAM reach +/-AMP at the symbol instants.
//
// Interface: en advances one output sample; sym_req is high in the cycle
// whose en edge takes a new symbol from sym_level.  x_out is registered:
// it changes on the en edge and belongs to the phase before that edge.
// The filter length, roll-off and sampling rate follow the reference test
// setup; the polyphase organisation and coefficient width are choices of
// this design.
module rc_upsampler
  import tr_pkg::*;
#(
  parameter int  SPS      = 16,
  parameter int  SPAN     = 10,
  parameter real BETA     = 0.25,
  parameter int  PAM_BITS = 1,
  parameter int  AMP      = 2048
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic signed [4:0] sym_level,
  output logic              sym_req,
  output sample_t           x_out
);
  localparam int NT = 2 * SPAN * SPS + 1;
  localparam int NS = 2 * SPAN + 1;
  localparam int CW = 16;
  localparam int PW = $clog2(SPS);
  localparam real UNIT = real'(AMP) / real'((1 << PAM_BITS) - 1);

  logic signed [CW-1:0] coef [NT];
  logic signed [4:0]    hist [NS];
  logic [PW-1:0]        ph;
  logic signed [31:0]   acc;

  for (genvar n = 0; n < NT; n++) begin : g_coef
    localparam int CN = int'(c_round(UNIT * c_rc(real'(n - SPAN * SPS) / real'(SPS), BETA)));
    assign coef[n] = CW'(CN);
  end

  always_comb begin
    acc = '0;
    for (int j = 0; j < NS; j++) begin
      if (int'(ph) + SPS * j < NT)
        acc = acc + 32'(hist[j]) * 32'(coef[int'(ph) + SPS * j]);
    end
  end

  assign sym_req = en && (ph == PW'(SPS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph    <= '0;
      x_out <= '0;
      for (int j = 0; j < NS; j++) hist[j] <= '0;
    end else if (en) begin
      x_out <= sat_sample(48'(acc));
      if (ph == PW'(SPS - 1)) begin
        ph      <= '0;
        hist[0] <= sym_level;
        for (int j = 1; j < NS; j++) hist[j] <= hist[j-1];
      end else begin
        ph <= ph + 1'b1;
      end
    end
  end
endmodule
