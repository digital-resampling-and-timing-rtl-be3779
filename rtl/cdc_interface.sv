// cdc_interface: clock domain interface between two blocks on different
// clocks, built as a small asynchronous circular buffer.
//
// DEPTH registers hold samples (four by default, as in the published
// circuit; a power of two).  A write counter in the clk_a domain selects
// the register written when write_en is high; a read counter in the clk_b
// domain selects the register read when read_en is high.  There are no full
// or empty flags: the two sides are expected to run at the same average
// rate.  Instead a wait signal stops the read counter when it has caught up
// with the write counter, so that a register is never read while it may be
// written; during wait the previous sample is repeated.  Once raised, wait
// holds until two registers are filled again (also after reset), so the
// read counter settles half a buffer behind the write counter and, in
// steady state, wait stays low.  The hysteresis is this design's choice.
//
// The write counter crosses into clk_b as Gray code through a two-stage
// synchronizer (this implementation's choice; the counters and the wait
// signal follow the reference structure).  read data is taken straight from
// the selected register, so a sample read on an edge is usable in the same
// clk_b cycle as rdata; the register cannot change then, because the writer
// is at least one slot ahead.
//
// Interface: write side clk_a/rst_a_n/write_en/wdata; read side
// clk_b/rst_b_n/read_en/rdata/wait_o.  rdata shows the register the read
// counter points at; read_en advances the counter unless wait_o is high.
module cdc_interface
  import tr_pkg::*;
#(
  parameter int W     = XW,
  parameter int DEPTH = 4
) (
  input  logic         clk_a,
  input  logic         rst_a_n,
  input  logic         write_en,
  input  logic [W-1:0] wdata,
  input  logic         clk_b,
  input  logic         rst_b_n,
  input  logic         read_en,
  output logic [W-1:0] rdata,
  output logic         wait_o
);
  localparam int PW = $clog2(DEPTH);

  logic [W-1:0]  regs [DEPTH];
  logic [PW-1:0] wptr, wptr_gray;
  logic [PW-1:0] sync1, sync2;      // Gray write counter in clk_b domain
  logic [PW-1:0] wptr_b;            // decoded
  logic [PW-1:0] rptr;
  logic [W-1:0]  last;
  logic [PW-1:0] fill;              // registers filled, as seen by clk_b
  logic          hold;

  // ---- write side (clk_a) ----
  always_ff @(posedge clk_a or negedge rst_a_n) begin
    if (!rst_a_n) begin
      wptr      <= '0;
      wptr_gray <= '0;
    end else if (write_en) begin
      wptr      <= wptr + 1'b1;
      wptr_gray <= (wptr + 1'b1) ^ ((wptr + 1'b1) >> 1);
    end
  end

  always_ff @(posedge clk_a) begin
    if (write_en) regs[wptr] <= wdata;
  end

  // ---- read side (clk_b) ----
  always_ff @(posedge clk_b or negedge rst_b_n) begin
    if (!rst_b_n) begin
      sync1 <= '0;
      sync2 <= '0;
    end else begin
      sync1 <= wptr_gray;
      sync2 <= sync1;
    end
  end

  always_comb begin
    wptr_b[PW-1] = sync2[PW-1];
    for (int i = PW - 2; i >= 0; i--) wptr_b[i] = wptr_b[i+1] ^ sync2[i];
  end
  assign fill   = wptr_b - rptr;
  assign wait_o = hold || (fill == '0);

  always_ff @(posedge clk_b or negedge rst_b_n) begin
    if (!rst_b_n)           hold <= 1'b1;
    else if (fill == '0)            hold <= 1'b1;
    else if (fill >= PW'(2))        hold <= 1'b0;
  end

  always_ff @(posedge clk_b or negedge rst_b_n) begin
    if (!rst_b_n) begin
      rptr <= '0;
      last <= '0;
    end else if (read_en && !wait_o) begin
      rptr <= rptr + 1'b1;
      last <= regs[rptr];
    end
  end

  // The current register while data is available, else the last sample.
  assign rdata = wait_o ? last : regs[rptr];

  initial assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("cdc_interface: DEPTH must be a power of two, at least 4");
endmodule
