// synchro: brings the two processors to a common point of execution.
//
// Three states: Idle, Ready and Sync. The main FSM raises en when a
// synchronisation is needed (at a checkpoint, and again to resume execution
// after the Checker has run); en low returns the block to Idle at once. In
// Ready the block waits for both processors to set their b_ready_to_sync bit
// (rts_a, rts_b). It then enters Sync and raises b_ready towards both. Each
// processor acknowledges by clearing b_ready_to_sync; its b_ready drops as soon
// as it has acknowledged, so a fast processor that already sets
// b_ready_to_sync again for its next checkpoint is not confused by a stale
// b_ready. When both have acknowledged, done pulses for one cycle and the
// block returns to Idle. waiting is high while one or both processors have not
// yet arrived; the main FSM times that phase out.
//
// The three states, b_ready_to_sync, b_ready and the acknowledge by clearing
// b_ready_to_sync follow the published description. The per-processor
// acknowledge flags, the done pulse and the timeout living in the main FSM are
// this design's choices.
module synchro
  import xlockstep_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           rts_a,
  input  logic           rts_b,
  output logic           b_ready_a,
  output logic           b_ready_b,
  output logic           waiting,
  output logic           done,
  output synchro_state_e state
);
  synchro_state_e state_q, state_d;
  logic ack_a_q, ack_b_q, ack_a_d, ack_b_d;

  always_comb begin
    state_d = state_q;
    ack_a_d = ack_a_q;
    ack_b_d = ack_b_q;
    done    = 1'b0;
    unique case (state_q)
      SY_IDLE: begin
        ack_a_d = 1'b0;
        ack_b_d = 1'b0;
        if (en) state_d = SY_READY;
      end
      SY_READY: begin
        if (!en)                   state_d = SY_IDLE;
        else if (rts_a && rts_b)   state_d = SY_SYNC;
      end
      SY_SYNC: begin
        if (!rts_a) ack_a_d = 1'b1;
        if (!rts_b) ack_b_d = 1'b1;
        if (!en) begin
          state_d = SY_IDLE;
        end else if (ack_a_d && ack_b_d) begin
          done    = 1'b1;
          state_d = SY_IDLE;
        end
      end
      default: state_d = SY_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= SY_IDLE;
      ack_a_q <= 1'b0;
      ack_b_q <= 1'b0;
    end else begin
      state_q <= state_d;
      ack_a_q <= ack_a_d;
      ack_b_q <= ack_b_d;
    end
  end

  assign b_ready_a = (state_q == SY_SYNC) && !ack_a_q;
  assign b_ready_b = (state_q == SY_SYNC) && !ack_b_q;
  assign waiting   = (state_q == SY_READY);
  assign state     = state_q;
endmodule
