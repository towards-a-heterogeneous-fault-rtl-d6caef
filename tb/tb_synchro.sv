// tb_synchro: self-checking test of the Synchro handshake.
// Covers: both processors arriving (either one first, or together), b_ready
// rising only once both are ready, per-processor acknowledge, done pulse and
// return to Idle, a processor that re-arms b_ready_to_sync before the other
// acknowledged, and abort by dropping en.
module tb_synchro;
  import xlockstep_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, rts_a = 0, rts_b = 0;
  logic b_ready_a, b_ready_b, waiting, done;
  synchro_state_e state;
  int checks = 0, failures = 0;
  int done_count = 0;

  synchro dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (done) done_count++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t (state=%s rdy=%b%b)", what, $time, state.name(), b_ready_a, b_ready_b);
    end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick(2); rst_n = 1; tick();
    check(state == SY_IDLE, "idle after reset");
    // Case 1: A first, then B.
    en = 1; tick();
    check(state == SY_READY && waiting, "ready after en");
    rts_a = 1; tick(3);
    check(state == SY_READY && !b_ready_a && !b_ready_b, "no b_ready with one processor");
    rts_b = 1; tick();
    check(state == SY_SYNC && b_ready_a && b_ready_b, "b_ready after both");
    rts_a = 0; tick();
    check(!b_ready_a && b_ready_b && state == SY_SYNC, "A acknowledged, B not yet");
    check(done_count == 0, "no done before both ack");
    rts_b = 0;
    #1 check(done == 1, "done pulses on last ack");
    tick();
    check(state == SY_IDLE && done_count == 1, "back to idle after done");
    // Case 2: B first, then A; A re-arms before B acknowledges.
    check(state == SY_IDLE, "idle");
    tick(); check(state == SY_READY, "ready again");
    rts_b = 1; tick(2); rts_a = 1; tick();
    check(b_ready_a && b_ready_b, "b_ready case 2");
    rts_a = 0; tick(); rts_a = 1; tick();
    check(!b_ready_a && state == SY_SYNC, "A re-armed does not see stale b_ready");
    rts_b = 0; tick();
    check(done_count == 2 && state == SY_IDLE, "done with A re-armed");
    en = 0; rts_a = 0; tick();
    // Case 3: both together.
    en = 1; rts_a = 1; rts_b = 1; tick(2);
    check(state == SY_SYNC, "both together");
    rts_a = 0; rts_b = 0; tick();
    check(done_count == 3 && state == SY_IDLE, "done case 3");
    en = 0; tick();
    // Case 4: abort by en low while waiting.
    en = 1; tick(); rts_a = 1; tick(3);
    en = 0; tick();
    check(state == SY_IDLE && done_count == 3, "abort returns to idle without done");
    rts_a = 0; tick();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
