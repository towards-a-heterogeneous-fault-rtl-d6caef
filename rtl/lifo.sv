// lifo: bounded last-in-first-out store for one processor's output words.
//
// The Checker keeps each processor's outputs in a LIFO of DEPTH words (four in
// the published evaluation). A word is written with push and read back newest
// first: dout always shows the top of stack and pop removes it. count is the
// number of stored words, full and empty are derived from it, and clear
// empties the store in one cycle. A push while full or a pop while empty is
// ignored (the Checker never issues one; assertions flag it). Push and pop in
// the same cycle replace the top word. Storage is a plain register array so
// the block synthesises to LUT RAM or flip-flops. Timing: everything takes
// effect at the rising clock edge; dout and the flags are combinational
// from the stored state.
module lifo #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       push,
  input  logic [W-1:0]               din,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       full,
  output logic                       empty
);
  localparam int unsigned CW = $clog2(DEPTH+1);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [CW-1:0] sp;          // number of words stored = index of next free slot
  logic [IW-1:0] top_idx;
  logic [IW-1:0] wr_idx;
  logic          do_push, do_pop;

  assign full    = (sp == CW'(DEPTH));
  assign empty   = (sp == '0);
  assign count   = sp;
  assign top_idx = IW'(sp - CW'(1));
  assign dout    = empty ? '0 : mem[top_idx];
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  // With a simultaneous pop the new word overwrites the old top.
  assign wr_idx  = do_pop ? top_idx : IW'(sp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp <= '0;
    end else if (clear) begin
      sp <= '0;
    end else if (do_push && !do_pop) begin
      sp <= sp + CW'(1);
    end else if (do_pop && !do_push) begin
      sp <= sp - CW'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push && !clear) mem[wr_idx] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
