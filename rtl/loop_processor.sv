// loop_processor: loop filter that turns Gardner timing errors into the step
// size and phase corrections of the reconstructed clock time base.
//
// It is a proportional-plus-integral filter enabled by the symbol enable,
// because a timing error exists only once per symbol:
//   * the proportional leg (gain G1 = 2^-K1) is applied once, as a phase
//     correction added to the time base accumulator in the cycle after the
//     symbol enable;
//   * the integral leg (gain G2 = 2^-K2, much smaller than G1) accumulates
//     into Accumulator 2, which holds the step size.  It starts at STEP_INIT
//     and settles to T_out/(M*T_in) once the loop has locked.
// Gains are powers of two so that they are plain arithmetic shifts; each
// shift rounds to nearest, because a truncating shift of a signed error
// would bias the step size downwards by half an LSB per symbol.
//
// ce is a clock enable (all registers hold while it is low).
// Interface: sym_en/err in; step (unsigned Q0.20, clamped to [0,1)) and
// phase (signed Q0.20, zero except for one cycle per symbol) out.
module loop_processor
  import tr_pkg::*;
#(
  parameter int unsigned STEP_INIT = 524288,   // 0.5 in Q0.20
  parameter int unsigned K1        = 8,        // G1 = 2^-K1
  parameter int unsigned K2        = 16        // G2 = 2^-K2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ce,
  input  logic                  sym_en,
  input  err_t                  err,
  output logic [FRACW-1:0]      step,
  output logic signed [FRACW:0] phase
);
  localparam int IW = 32;
  localparam logic signed [IW-1:0] STEP_MAX = IW'((1 << FRACW) - 1);
  localparam logic signed [IW-1:0] PH_MAX   = IW'((1 << (FRACW - 1)) - 1);

  logic signed [IW-1:0] acc2, acc2_nx, prop;
  logic signed [IW-1:0] err_x;

  assign err_x = IW'(err);

  always_comb begin
    acc2_nx = acc2 + ((err_x + (IW'(1) <<< (K2 - 1))) >>> K2);
    if (acc2_nx < 0)             acc2_nx = '0;
    else if (acc2_nx > STEP_MAX) acc2_nx = STEP_MAX;
    prop = (err_x + (IW'(1) <<< (K1 - 1))) >>> K1;
    if (prop > PH_MAX)        prop = PH_MAX;
    else if (prop < -PH_MAX)  prop = -PH_MAX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc2  <= IW'(STEP_INIT);
      phase <= '0;
    end else if (ce) begin
      phase <= '0;
      if (sym_en) begin
        acc2  <= acc2_nx;
        phase <= (FRACW+1)'(prop);
      end
    end
  end

  assign step = acc2[FRACW-1:0];
endmodule
