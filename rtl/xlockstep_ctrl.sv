// xlockstep_ctrl: main state machine of the lockstep accelerator.
//
// Five states: Idle, Synchro, Checker, Resume and Error.
//   Idle    -> Synchro  first_checkpoint: either processor sets b_ready_to_sync.
//   Synchro -> Checker  sync: the Synchro block reports both processors met.
//   Synchro -> Error    timeout_error: the second processor did not arrive
//                       within the programmed number of clock cycles.
//   Checker -> Resume   success: the Checker found both output vectors equal.
//   Checker -> Error    error: a word or the word count differs.
//   Resume  -> Idle     resumes_execution: the second Synchro instance has
//                       released both processors together.
//   Error   -> Idle     recovered_error: both processors set error_fixed.
// The states and transitions follow the published state diagram. The timeout
// is counted here, in clock cycles of this block, while the Synchro block
// waits for the second processor. The limit is the TIMEOUT register of the
// processor that arrived first (the Arm one if both arrive in the same cycle);
// a limit of 0 disables the timeout. These are this design's choices. The
// Checker is cleared on every return to Idle, and the error_fixed bits on
// leaving Error. err_timeout stays set while in Error.
module xlockstep_ctrl
  import xlockstep_pkg::*;
#(
  parameter int unsigned TW = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rts_a,
  input  logic            rts_b,
  input  logic [TW-1:0]   timeout_a,
  input  logic [TW-1:0]   timeout_b,
  input  logic            sync_waiting,
  input  logic            sync_done,
  input  logic            resume_done,
  input  logic            chk_done,
  input  logic            chk_ok,
  input  logic            fix_a,
  input  logic            fix_b,
  output lockstep_state_e state,
  output logic            sync_en,
  output logic            resume_en,
  output logic            chk_start,
  output logic            chk_clear,
  output logic            fix_clr,
  output logic            error,
  output logic            err_timeout
);
  lockstep_state_e state_q, state_d;
  logic [TW-1:0]   limit_q, limit_d;
  logic [TW-1:0]   cnt_q, cnt_d;
  logic            tmo_q, tmo_d;

  always_comb begin
    state_d   = state_q;
    limit_d   = limit_q;
    cnt_d     = cnt_q;
    tmo_d     = tmo_q;
    sync_en   = 1'b0;
    resume_en = 1'b0;
    chk_start = 1'b0;
    chk_clear = 1'b0;
    fix_clr   = 1'b0;
    unique case (state_q)
      LS_IDLE: begin
        cnt_d = '0;
        if (rts_a || rts_b) begin
          limit_d = rts_a ? timeout_a : timeout_b;
          state_d = LS_SYNCHRO;
        end
      end
      LS_SYNCHRO: begin
        sync_en = 1'b1;
        if (sync_done) begin
          state_d = LS_CHECKER;
        end else if (sync_waiting) begin
          cnt_d = cnt_q + TW'(1);
          if (limit_q != '0 && cnt_d >= limit_q) begin
            tmo_d   = 1'b1;
            state_d = LS_ERROR;
          end
        end
      end
      LS_CHECKER: begin
        chk_start = 1'b1;
        if (chk_done) state_d = chk_ok ? LS_RESUME : LS_ERROR;
      end
      LS_RESUME: begin
        resume_en = 1'b1;
        if (resume_done) begin
          chk_clear = 1'b1;
          state_d   = LS_IDLE;
        end
      end
      LS_ERROR: begin
        if (fix_a && fix_b) begin
          fix_clr   = 1'b1;
          chk_clear = 1'b1;
          tmo_d     = 1'b0;
          state_d   = LS_IDLE;
        end
      end
      default: state_d = LS_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= LS_IDLE;
      limit_q <= '0;
      cnt_q   <= '0;
      tmo_q   <= 1'b0;
    end else begin
      state_q <= state_d;
      limit_q <= limit_d;
      cnt_q   <= cnt_d;
      tmo_q   <= tmo_d;
    end
  end

  assign state       = state_q;
  assign error       = (state_q == LS_ERROR);
  assign err_timeout = tmo_q;
endmodule
