// pam_lfsr: pseudo-random PAM symbol source.
//
// A 23-bit Fibonacci linear feedback shift register (x^23 + x^18 + 1,
// maximal length) is stepped BITS times for every symbol.  The BITS new bits
// are Gray-decoded and mapped to one of L = 2^BITS equally spaced odd levels
// -(L-1), ..., -1, +1, ..., +(L-1).  BITS = 1 gives the +/-1 symbols of
// 2-PAM; 2 and 3 give 4-PAM and 8-PAM.
//
// Interface: level (signed) and bits show the current symbol; en advances to
// the next symbol on the clock edge.  The level is valid from reset.
module pam_lfsr #(
  parameter int          BITS = 1,
  parameter logic [22:0] SEED = 23'h5A_5A5A
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  output logic signed [4:0]      level,
  output logic [BITS-1:0]        bits
);
  logic [22:0]     sr, sr_nx;
  logic [BITS-1:0] bin;

  always_comb begin
    sr_nx = sr;
    for (int i = 0; i < BITS; i++)
      sr_nx = {sr_nx[21:0], sr_nx[22] ^ sr_nx[17]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sr <= SEED;
    else if (en)  sr <= sr_nx;
  end

  // Gray decode: binary MSB = Gray MSB, then running XOR.
  always_comb begin
    bits = sr[BITS-1:0];
    bin[BITS-1] = bits[BITS-1];
    for (int i = BITS - 2; i >= 0; i--) bin[i] = bin[i+1] ^ bits[i];
    level = 5'(2 * int'(bin)) - 5'((1 << BITS) - 1);
  end

  initial assert (BITS >= 1 && BITS <= 3) else $error("pam_lfsr: BITS must be 1..3");
endmodule
