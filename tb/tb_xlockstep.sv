// tb_xlockstep: end-to-end test of the lockstep accelerator at its default
// size (four-word LIFOs). Two processor models, one per bus port, run the
// checkpoint protocol through their own register banks: initialise TIMEOUT,
// send output words with the b_Tx handshake, synchronise, wait for the check,
// synchronise again to resume, and on an error report error_fixed.
//
// Workloads:
//   * the checker table: every pair of vector lengths 0..5 on each side with
//     equal contents (36 checkpoints), then five-word vectors differing in one
//     position (5) and equal (1);
//   * the synchro table: both processors arrive (Arm first, then RISC-V
//     first), only one arrives (timeout), neither arrives (nothing happens).
// Expected outcomes are computed from the lengths, positions and arrival
// pattern only. Monitors count how often each mechanism occurred: successful
// synchronisation, resume, timeout error, mismatch error, size error, busy
// stall, slice comparison, recovery; each must occur at least once. The
// duration of every timeout episode is checked against the TIMEOUT value.
module tb_xlockstep;
  import xlockstep_pkg::*;

  localparam int unsigned DEPTH = 4;   // the design's default
  localparam logic [31:0] ARM_BASE = 32'h83C0_0000;
  localparam logic [31:0] RV_BASE  = 32'h8000_0000;
  localparam int unsigned TMO = 300;

  typedef enum int {R_OK, R_TIMEOUT, R_MISMATCH, R_SIZE, R_NONE} result_e;

  logic clk = 0, rst_n = 0;
  axil_req_t arm_req, rv_req;
  axil_rsp_t arm_rsp, rv_rsp;
  lockstep_state_e state_o;
  logic error_o;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_sync = 0, n_resume = 0, n_timeout = 0, n_mism = 0, n_size = 0;
  int n_busy = 0, n_slice = 0, n_recover = 0;
  int synchro_cycles = 0;
  int cycles = 0;
  always @(posedge clk) cycles++;

  xlockstep dut (.clk, .rst_n, .arm_req, .arm_rsp, .rv_req, .rv_rsp, .state_o, .error_o);
  axil_master_bfm arm (.clk, .rst_n, .req(arm_req), .rsp(arm_rsp));
  axil_master_bfm rv  (.clk, .rst_n, .req(rv_req),  .rsp(rv_rsp));

  always #5 clk = ~clk;

  lockstep_state_e prev_state = LS_IDLE;
  always @(posedge clk) begin
    if (state_o == LS_SYNCHRO) synchro_cycles++;
    if (prev_state == LS_SYNCHRO && state_o == LS_CHECKER) n_sync++;
    if (prev_state == LS_RESUME  && state_o == LS_IDLE)    n_resume++;
    if (prev_state == LS_ERROR   && state_o == LS_IDLE)    n_recover++;
    if (prev_state == LS_SYNCHRO && state_o == LS_ERROR) begin
      n_timeout++;
      checks++;
      if (synchro_cycles != TMO + 1) begin
        failures++;
        $display("FAIL: timeout after %0d cycles in Synchro, expected %0d", synchro_cycles, TMO + 1);
      end
    end
    if (prev_state == LS_CHECKER && state_o == LS_ERROR) begin
      if (dut.u_checker.err_size) n_size++;
      else                        n_mism++;
    end
    if (state_o != LS_SYNCHRO) synchro_cycles = 0;
    if (dut.u_checker.busy_a || dut.u_checker.busy_b) n_busy++;
    if (dut.u_checker.slice_cmp) n_slice++;
    prev_state <= state_o;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  task automatic wr(input int side, input logic [31:0] ofs, input logic [31:0] d);
    if (side == 0) arm.write(ARM_BASE + ofs, d, 4'hF);
    else           rv.write(RV_BASE + ofs, d, 4'hF);
  endtask

  task automatic rd(input int side, input logic [31:0] ofs, output logic [31:0] d);
    if (side == 0) arm.read(ARM_BASE + ofs, d);
    else           rv.read(RV_BASE + ofs, d);
  endtask

  // Poll STATUS until any bit of mask is set; returns the STATUS word.
  task automatic poll(input int side, input logic [31:0] mask, output logic [31:0] st);
    int n = 0;
    do begin rd(side, 32'(OFS_STATUS), st); n++; end while ((st & mask) == 0 && n < 3000);
    if (n >= 3000) begin
      failures++;
      $display("FAIL: side %0d polling %h timed out", side, mask);
    end
  endtask

  // Poll until b_Tx reads 0 (word stored) or the accelerator reports an error.
  task automatic wait_tx(input int side, output bit err);
    logic [31:0] st;
    int n = 0;
    err = 0;
    forever begin
      rd(side, 32'(OFS_STATUS), st); n++;
      if (st[ST_ERROR]) begin err = 1; break; end
      if (!st[ST_TX]) break;
      if (n >= 3000) begin
        failures++; $display("FAIL: side %0d b_Tx stuck", side); break;
      end
    end
  endtask

  task automatic handle_error(input int side, input logic [31:0] st, output result_e res);
    if (st[ST_ERR_TMO])       res = R_TIMEOUT;
    else if (st[ST_ERR_SIZE]) res = R_SIZE;
    else                      res = R_MISMATCH;
    wr(side, 32'(OFS_CONTROL), 32'h0);
    wr(side, 32'(OFS_CONTROL), 32'(1) << CTRL_FIX);
  endtask

  // One processor's work for one checkpoint.
  task automatic cpu(input int side, input logic [31:0] vec[6], input int n,
                     input int delay, input bit reach, output result_e res);
    logic [31:0] st;
    bit err;
    res = R_NONE;
    for (int i = 0; i < n; i++) begin
      wr(side, 32'(OFS_DATA), vec[i]);
      wr(side, 32'(OFS_CONTROL), 32'(1) << CTRL_TX);
      wait_tx(side, err);
      if (err) begin
        rd(side, 32'(OFS_STATUS), st);
        handle_error(side, st, res);
        return;
      end
      repeat ($urandom_range(3)) @(negedge clk);
    end
    repeat (delay) @(negedge clk);
    if (!reach) begin
      // Stuck elsewhere: only notices the accelerator's error.
      poll(side, 32'(1) << ST_ERROR, st);
      handle_error(side, st, res);
      return;
    end
    wr(side, 32'(OFS_CONTROL), 32'(1) << CTRL_RTS);
    poll(side, (32'(1) << ST_READY) | (32'(1) << ST_ERROR), st);
    if (st[ST_ERROR]) begin handle_error(side, st, res); return; end
    wr(side, 32'(OFS_CONTROL), 32'h0);
    poll(side, (32'(1) << ST_CHK_DONE) | (32'(1) << ST_ERROR), st);
    if (st[ST_ERROR]) begin handle_error(side, st, res); return; end
    if (!st[ST_CHK_OK]) begin
      poll(side, 32'(1) << ST_ERROR, st);
      handle_error(side, st, res);
      return;
    end
    wr(side, 32'(OFS_CONTROL), 32'(1) << CTRL_RTS);
    poll(side, (32'(1) << ST_READY) | (32'(1) << ST_ERROR), st);
    wr(side, 32'(OFS_CONTROL), 32'h0);
    res = st[ST_ERROR] ? R_TIMEOUT : R_OK;
  endtask

  // One checkpoint on both processors; compare with the expected outcome.
  task automatic checkpoint(input int na, input int nb, input int diff_pos,
                            input int da, input int db, input bit ra, input bit rb,
                            input result_e expect_res);
    logic [31:0] va[6], vb[6];
    result_e res_a, res_b;
    for (int i = 0; i < 6; i++) begin
      va[i] = $urandom;
      vb[i] = (i == diff_pos) ? ~va[i] : va[i];
    end
    fork
      cpu(0, va, na, da, ra, res_a);
      cpu(1, vb, nb, db, rb, res_b);
    join
    check(res_a == expect_res && res_b == expect_res,
          $sformatf("N_A=%0d N_B=%0d diff=%0d reach=%0d%0d: got %s/%s expected %s",
                    na, nb, diff_pos, ra, rb, res_a.name(), res_b.name(), expect_res.name()));
    repeat (3) @(negedge clk);
    check(state_o == LS_IDLE, "back in Idle after checkpoint");
  endtask

  function automatic result_e expect_sizes(input int na, input int nb);
    int a = na, b = nb;
    while (a >= DEPTH && b >= DEPTH) begin a -= DEPTH; b -= DEPTH; end
    if (a > DEPTH || b > DEPTH) return R_TIMEOUT;   // one side held busy, never reaches the checkpoint
    if (a != b || (na == 0 && nb == 0)) return R_SIZE;
    return R_OK;
  endfunction

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] st;
    result_e dummy;
    repeat (3) @(negedge clk); rst_n = 1;
    // initXLockstep on both processors
    fork
      wr(0, 32'(OFS_TIMEOUT), TMO);
      wr(1, 32'(OFS_TIMEOUT), TMO);
    join
    // Checker table: lengths
    for (int na = 0; na <= 5; na++)
      for (int nb = 0; nb <= 5; nb++)
        checkpoint(na, nb, -1, $urandom_range(20), $urandom_range(20), 1, 1, expect_sizes(na, nb));
    // Checker table: contents
    for (int p = 0; p < 5; p++) checkpoint(5, 5, p, 0, 0, 1, 1, R_MISMATCH);
    checkpoint(5, 5, -1, 0, 0, 1, 1, R_OK);
    // Synchro table
    checkpoint(2, 2, -1, 0, 150, 1, 1, R_OK);       // Arm first, RISC-V second
    checkpoint(2, 2, -1, 150, 0, 1, 1, R_OK);       // RISC-V first, Arm second
    checkpoint(2, 2, -1, 0, 0, 1, 0, R_TIMEOUT);    // RISC-V never arrives
    checkpoint(2, 2, -1, 0, 0, 0, 1, R_TIMEOUT);    // Arm never arrives
    // Neither arrives: the accelerator stays in Idle.
    repeat (2 * TMO) @(negedge clk);
    check(state_o == LS_IDLE && !error_o, "no checkpoint, no state change");
    // A normal checkpoint still works afterwards.
    checkpoint(3, 3, -1, 5, 0, 1, 1, R_OK);

    $display("cycles=%0d", cycles);
    $display("sync=%0d resume=%0d timeout=%0d mismatch=%0d size=%0d busy_cycles=%0d slices=%0d recover=%0d",
             n_sync, n_resume, n_timeout, n_mism, n_size, n_busy, n_slice, n_recover);
    check(n_sync > 0,    "synchronisation happened");
    check(n_resume > 0,  "resume happened");
    check(n_timeout > 0, "timeout error happened");
    check(n_mism > 0,    "mismatch error happened");
    check(n_size > 0,    "size error happened");
    check(n_busy > 0,    "busy stall happened");
    check(n_slice > 0,   "slice comparison happened");
    check(n_recover > 0, "error recovery happened");
    check(arm.bad_responses == 0 && rv.bad_responses == 0, "all bus responses OKAY");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
