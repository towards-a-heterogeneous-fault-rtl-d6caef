// tb_xlockstep_ctrl: self-checking test of the main state machine.
// Drives the Synchro/Checker status inputs directly and checks every edge of
// the five-state diagram, the enables given in each state, the timeout limit
// taken from the processor that arrived first (exact cycle count), a disabled
// timeout (limit 0), and recovery only when both error_fixed bits are set.
module tb_xlockstep_ctrl;
  import xlockstep_pkg::*;

  logic clk = 0, rst_n = 0;
  logic rts_a = 0, rts_b = 0, sync_waiting = 0, sync_done = 0, resume_done = 0;
  logic chk_done = 0, chk_ok = 0, fix_a = 0, fix_b = 0;
  logic [31:0] timeout_a = 0, timeout_b = 0;
  lockstep_state_e state;
  logic sync_en, resume_en, chk_start, chk_clear, fix_clr, error, err_timeout;
  int checks = 0, failures = 0;

  xlockstep_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t (state=%s)", what, $time, state.name());
    end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(negedge clk);
  endtask

  // Wait in Synchro with sync_waiting high; return cycles until Error.
  task automatic wait_timeout(output int n);
    n = 0;
    sync_waiting = 1;
    while (state == LS_SYNCHRO && n < 1000) begin tick(); n++; end
    sync_waiting = 0;
  endtask

  task automatic recover();
    fix_a = 1; tick(3);
    check(state == LS_ERROR, "one error_fixed is not enough");
    fix_b = 1;
    #1 check(fix_clr && chk_clear, "fix_clr and chk_clear on recovery");
    tick();
    check(state == LS_IDLE && !err_timeout, "recovered_error -> Idle");
    fix_a = 0; fix_b = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    tick(2); rst_n = 1; tick();
    check(state == LS_IDLE, "reset to Idle");
    timeout_a = 20; timeout_b = 7;
    // Full success path.
    rts_b = 1; tick();
    check(state == LS_SYNCHRO && sync_en, "first_checkpoint -> Synchro");
    sync_waiting = 1; tick(3); sync_waiting = 0;
    rts_a = 1; sync_done = 1; tick(); sync_done = 0;
    check(state == LS_CHECKER && chk_start && !sync_en, "sync -> Checker");
    rts_a = 0; rts_b = 0;
    tick(4);
    check(state == LS_CHECKER, "Checker waits for result");
    chk_done = 1; chk_ok = 1; tick(); chk_done = 0; chk_ok = 0;
    check(state == LS_RESUME && resume_en, "success -> Resume");
    tick(2);
    resume_done = 1;
    #1 check(chk_clear, "checker cleared on resume");
    tick(); resume_done = 0;
    check(state == LS_IDLE, "resumes_execution -> Idle");
    // Timeout with RISC-V first: limit 7.
    rts_b = 1; tick();
    wait_timeout(n);
    check(state == LS_ERROR && error && err_timeout, "timeout_error -> Error");
    check(n == 7, $sformatf("timeout after %0d cycles, expected 7", n));
    rts_b = 0;
    recover();
    // Timeout with Arm first: limit 20.
    rts_a = 1; tick();
    wait_timeout(n);
    check(n == 20, $sformatf("timeout after %0d cycles, expected 20", n));
    rts_a = 0;
    recover();
    // Checker error path.
    rts_a = 1; rts_b = 1; tick();
    sync_done = 1; tick(); sync_done = 0;
    chk_done = 1; chk_ok = 0; tick(); chk_done = 0;
    check(state == LS_ERROR && !err_timeout, "error -> Error");
    rts_a = 0; rts_b = 0;
    recover();
    // Timeout disabled.
    timeout_a = 0;
    rts_a = 1; tick();
    sync_waiting = 1; tick(200); sync_waiting = 0;
    check(state == LS_SYNCHRO, "limit 0 never times out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
