// xlockstep: loosely-coupled dual-core lockstep accelerator (top level).
//
// Two processors of different architectures run the same program. At each
// checkpoint they meet here: first they are synchronised, then the output
// words each one sent since the last checkpoint are compared, then both are
// released together. A processor that fails to arrive within a timeout, or
// outputs that differ in value or number, put the accelerator into an Error
// state that it leaves only when both processors report the error handled.
//
// Structure: one AXI4-Lite register bank per processor (port "arm" for the
// Arm core, port "rv" for the RISC-V core), two Synchro instances (one for the
// checkpoint, one to resume execution), one Checker with a LIFO per processor,
// and the main FSM. See xlockstep_pkg for the register map and bit layout.
//
// A processor's sequence per checkpoint, through its own bank:
//   1. for each output word: write DATA, set CONTROL.b_Tx, wait for STATUS.b_Tx
//      to read 0 (STATUS.busy shows the wait is for LIFO space);
//   2. set CONTROL.b_ready_to_sync, wait for STATUS.b_ready (or STATUS.error),
//      then clear b_ready_to_sync;
//   3. wait for STATUS.check_done (or STATUS.error);
//   4. set b_ready_to_sync again, wait for STATUS.b_ready, clear it, continue.
// On STATUS.error the processor clears b_ready_to_sync, handles the error and
// sets CONTROL.error_fixed. Leaving Error empties both LIFOs and cancels a
// transfer still pending in b_Tx, so the next checkpoint starts clean.
//
// Both bus ports and all logic run on one clock; a processor in another clock
// domain reaches its port through a clock-domain bridge outside this block.
// That single clock, and the register bit layout, are this design's choices.
module xlockstep
  import xlockstep_pkg::*;
#(
  parameter int unsigned DEPTH = 4   // words per Checker LIFO
) (
  input  logic            clk,
  input  logic            rst_n,
  input  axil_req_t       arm_req,
  output axil_rsp_t       arm_rsp,
  input  axil_req_t       rv_req,
  output axil_rsp_t       rv_rsp,
  output lockstep_state_e state_o,
  output logic            error_o
);
  logic [31:0] data_a, data_b, tmo_a, tmo_b, status_a, status_b;
  logic        rts_a, rts_b, tx_a, tx_b, fix_a, fix_b;
  logic        tx_clr_a, tx_clr_b, fix_clr;
  logic        sync_en, resume_en, sync_waiting, sync_done, resume_done;
  logic        s0_rdy_a, s0_rdy_b, s1_rdy_a, s1_rdy_b;
  logic        chk_start, chk_clear, chk_done, chk_ok, chk_size, chk_mism;
  logic        busy_a, busy_b, error, err_timeout;
  synchro_state_e  s0_state, s1_state;
  lockstep_state_e state;

  axil_regs u_arm_slave (
    .clk, .rst_n, .req(arm_req), .rsp(arm_rsp),
    .data_o(data_a), .rts_o(rts_a), .tx_o(tx_a), .fix_o(fix_a), .timeout_o(tmo_a),
    .status_i(status_a), .tx_clr(tx_clr_a | fix_clr), .fix_clr
  );

  axil_regs u_riscv_slave (
    .clk, .rst_n, .req(rv_req), .rsp(rv_rsp),
    .data_o(data_b), .rts_o(rts_b), .tx_o(tx_b), .fix_o(fix_b), .timeout_o(tmo_b),
    .status_i(status_b), .tx_clr(tx_clr_b | fix_clr), .fix_clr
  );

  synchro u_synchro (
    .clk, .rst_n, .en(sync_en), .rts_a, .rts_b,
    .b_ready_a(s0_rdy_a), .b_ready_b(s0_rdy_b),
    .waiting(sync_waiting), .done(sync_done), .state(s0_state)
  );

  synchro u_synchro_to_resume (
    .clk, .rst_n, .en(resume_en), .rts_a, .rts_b,
    .b_ready_a(s1_rdy_a), .b_ready_b(s1_rdy_b),
    .waiting(), .done(resume_done), .state(s1_state)
  );

  lockstep_checker #(.DEPTH(DEPTH), .W(32)) u_checker (
    .clk, .rst_n,
    .tx_a, .data_a, .tx_b, .data_b,
    .start(chk_start), .clear(chk_clear),
    .tx_clr_a, .tx_clr_b, .busy_a, .busy_b,
    .done(chk_done), .ok(chk_ok), .err_size(chk_size), .err_mismatch(chk_mism),
    .slice_cmp()
  );

  xlockstep_ctrl u_ctrl (
    .clk, .rst_n, .rts_a, .rts_b, .timeout_a(tmo_a), .timeout_b(tmo_b),
    .sync_waiting, .sync_done, .resume_done,
    .chk_done, .chk_ok, .fix_a, .fix_b,
    .state, .sync_en, .resume_en, .chk_start, .chk_clear, .fix_clr,
    .error, .err_timeout
  );

  function automatic logic [31:0] status_word(input logic rdy, input logic tx, input logic busy);
    logic [31:0] s;
    s = '0;
    s[ST_READY]    = rdy;
    s[ST_TX]       = tx;
    s[ST_BUSY]     = busy;
    s[ST_CHK_DONE] = chk_done;
    s[ST_CHK_OK]   = chk_ok;
    s[ST_ERROR]    = error;
    s[ST_ERR_TMO]  = err_timeout;
    s[ST_ERR_MISM] = chk_mism;
    s[ST_ERR_SIZE] = chk_size;
    s[ST_STATE_LSB +: 3] = state;
    return s;
  endfunction

  assign status_a = status_word(s0_rdy_a | s1_rdy_a, tx_a, busy_a);
  assign status_b = status_word(s0_rdy_b | s1_rdy_b, tx_b, busy_b);
  assign state_o  = state;
  assign error_o  = error;

  // Only one Synchro instance is ever active.
  a_one_synchro: assert property (@(posedge clk) disable iff (!rst_n)
    !(s0_state != SY_IDLE && s1_state != SY_IDLE && sync_en && resume_en));
endmodule
