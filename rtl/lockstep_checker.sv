// lockstep_checker: stores the output vectors of both processors and compares them.
//
// Each processor hands over its outputs one word at a time through its DATA
// register and the b_Tx handshake: the processor writes DATA, sets b_Tx
// (tx_a / tx_b here), and the Checker stores the word in that processor's LIFO
// and pulses tx_clr_* to clear b_Tx, which tells the processor it may send the
// next word. Each LIFO holds DEPTH words. When a LIFO is full the pending
// transfer is held (busy_* high, b_Tx stays set) until room is made.
//
// Room is made by a partial comparison: as soon as both LIFOs are full the
// Checker pops them together, newest first, comparing word against word, and
// remembers any difference. Vectors longer than DEPTH are therefore checked in
// DEPTH-word slices, as a circular buffer of limited size. The final comparison
// is started by the main FSM (start) once both processors have met at the
// checkpoint: it first compares the two word counts (a difference is a size
// error, and so is a checkpoint at which neither side sent any word), then pops and compares the remaining words. The result (done, ok,
// err_size, err_mismatch) is held, and new transfers are refused, until clear.
//
// Timing: a word is stored one cycle after b_Tx is seen; a comparison takes one
// cycle per stored word plus one. Storing in two LIFOs, the b_Tx handshake,
// comparing element by element and by count, and the busy signal follow the
// published description; slice-wise comparison of overlong vectors is this
// design's reading of how a 4-word LIFO passes a 5-word test vector.
module lockstep_checker #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tx_a,
  input  logic [W-1:0] data_a,
  input  logic         tx_b,
  input  logic [W-1:0] data_b,
  input  logic         start,
  input  logic         clear,
  output logic         tx_clr_a,
  output logic         tx_clr_b,
  output logic         busy_a,
  output logic         busy_b,
  output logic         done,
  output logic         ok,
  output logic         err_size,
  output logic         err_mismatch,
  output logic         slice_cmp     // pulses when a partial comparison begins
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  typedef enum logic [1:0] {CK_IDLE, CK_CMP, CK_DONE} ck_state_e;

  ck_state_e     state_q, state_d;
  logic          final_q, final_d;
  logic          mism_q, mism_d, size_q, size_d;
  logic          any_q, any_d;     // a slice was compared since the last clear
  logic          push_a, push_b, pop;
  logic [W-1:0]  top_a, top_b;
  logic [CW-1:0] cnt_a, cnt_b;
  logic          full_a, full_b, empty_a, empty_b;

  lifo #(.DEPTH(DEPTH), .W(W)) u_lifo_a (
    .clk, .rst_n, .clear, .push(push_a), .din(data_a), .pop,
    .dout(top_a), .count(cnt_a), .full(full_a), .empty(empty_a)
  );
  lifo #(.DEPTH(DEPTH), .W(W)) u_lifo_b (
    .clk, .rst_n, .clear, .push(push_b), .din(data_b), .pop,
    .dout(top_b), .count(cnt_b), .full(full_b), .empty(empty_b)
  );

  always_comb begin
    state_d   = state_q;
    final_d   = final_q;
    mism_d    = mism_q;
    size_d    = size_q;
    any_d     = any_q;
    push_a    = 1'b0;
    push_b    = 1'b0;
    pop       = 1'b0;
    slice_cmp = 1'b0;
    unique case (state_q)
      CK_IDLE: begin
        if (start) begin
          final_d = 1'b1;
          // Unequal counts, or no output at all from either side, is an error.
          if (cnt_a != cnt_b || (empty_a && !any_q)) begin
            size_d  = 1'b1;
            state_d = CK_DONE;
          end else if (empty_a) begin
            state_d = CK_DONE;
          end else begin
            state_d = CK_CMP;
          end
        end else if (full_a && full_b) begin
          final_d   = 1'b0;
          any_d     = 1'b1;
          slice_cmp = 1'b1;
          state_d   = CK_CMP;
        end else begin
          push_a = tx_a && !full_a;
          push_b = tx_b && !full_b;
        end
      end
      CK_CMP: begin
        pop = 1'b1;
        if (top_a != top_b) mism_d = 1'b1;
        if (cnt_a == CW'(1) || cnt_b == CW'(1) || empty_a || empty_b)
          state_d = final_q ? CK_DONE : CK_IDLE;
      end
      CK_DONE: ;
      default: state_d = CK_IDLE;
    endcase
    if (clear) begin
      state_d = CK_IDLE;
      final_d = 1'b0;
      mism_d  = 1'b0;
      size_d  = 1'b0;
      any_d   = 1'b0;
      push_a  = 1'b0;
      push_b  = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= CK_IDLE;
      final_q <= 1'b0;
      mism_q  <= 1'b0;
      size_q  <= 1'b0;
      any_q   <= 1'b0;
    end else begin
      state_q <= state_d;
      final_q <= final_d;
      mism_q  <= mism_d;
      size_q  <= size_d;
      any_q   <= any_d;
    end
  end

  assign tx_clr_a     = push_a;
  assign tx_clr_b     = push_b;
  assign busy_a       = tx_a && full_a;
  assign busy_b       = tx_b && full_b;
  assign done         = (state_q == CK_DONE);
  assign err_size     = size_q;
  assign err_mismatch = mism_q;
  assign ok           = done && !size_q && !mism_q;

  // Both LIFOs are popped together, so a comparison never starts with unequal counts.
  a_cmp_equal_counts: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == CK_CMP) |-> (cnt_a == cnt_b));
endmodule
