// tb_axil_regs: self-checking test of one AXI4-Lite register bank.
// Uses an AXI4-Lite master model (tb/axil_master_bfm) and checks: DATA and
// TIMEOUT read back, byte strobes, unused words read zero and ignore writes,
// STATUS mirrors the core's input and ignores writes, b_ready_to_sync
// read/write, b_Tx and error_fixed write-1-to-set with hardware clear, and
// one-cycle write/read response latency.
module tb_axil_regs;
  import xlockstep_pkg::*;

  logic clk = 0, rst_n = 0;
  axil_req_t req;
  axil_rsp_t rsp;
  logic [31:0] data_o, timeout_o, status_i = 32'h0;
  logic rts_o, tx_o, fix_o, tx_clr = 0, fix_clr = 0;
  int checks = 0, failures = 0;

  axil_regs dut (.*);
  axil_master_bfm bfm (.clk, .rst_n, .req, .rsp);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  task automatic expect_read(input logic [31:0] addr, input logic [31:0] exp, input string what);
    logic [31:0] d;
    bfm.read(addr, d);
    check(d == exp, $sformatf("%s: read %h expected %h", what, d, exp));
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    expect_read(32'h83C0_0000, 32'h0, "DATA after reset");
    for (int i = 0; i < 8; i++) begin
      v = $urandom;
      bfm.write(32'h83C0_0000, v, 4'hF);
      check(data_o == v, "DATA output");
      expect_read(32'h83C0_0000, v, "DATA");
      bfm.write(32'h83C0_0008, ~v, 4'hF);
      check(timeout_o == ~v, "TIMEOUT output");
      expect_read(32'h8000_0008, ~v, "TIMEOUT (upper address bits ignored)");
    end
    bfm.write(32'h0000_0000, 32'hAABBCCDD, 4'hF);
    bfm.write(32'h0000_0000, 32'h11223344, 4'b0101);
    expect_read(32'h0, 32'hAA22CC44, "byte strobes");
    for (int a = 'h0C; a <= 'h18; a += 4) begin
      bfm.write(32'(a), 32'hFFFF_FFFF, 4'hF);
      expect_read(32'(a), 32'h0, "unused word");
    end
    status_i = 32'h0000_0A5C;
    expect_read(32'h1C, 32'h0000_0A5C, "STATUS mirrors core");
    bfm.write(32'h1C, 32'h0, 4'hF);
    expect_read(32'h1C, 32'h0000_0A5C, "STATUS read-only");
    // CONTROL
    bfm.write(32'h04, 32'h1, 4'hF);
    check(rts_o && !tx_o && !fix_o, "b_ready_to_sync set");
    bfm.write(32'h04, 32'h3, 4'hF);
    check(rts_o && tx_o, "b_Tx set");
    bfm.write(32'h04, 32'h0, 4'hF);
    check(!rts_o && tx_o, "writing 0 clears rts but not b_Tx");
    @(negedge clk); tx_clr = 1; @(negedge clk); tx_clr = 0;
    check(!tx_o, "hardware clears b_Tx");
    bfm.write(32'h04, 32'h4, 4'hF);
    check(fix_o, "error_fixed set");
    expect_read(32'h04, 32'h4, "CONTROL readback");
    @(negedge clk); fix_clr = 1; @(negedge clk); fix_clr = 0;
    check(!fix_o, "hardware clears error_fixed");
    bfm.write(32'h04, 32'h1, 4'hE);
    check(!rts_o, "CONTROL needs byte 0 strobe");
    check(bfm.last_write_cycles == 2 && bfm.last_read_cycles == 1 && bfm.bad_responses == 0,
          $sformatf("response latency w=%0d r=%0d", bfm.last_write_cycles, bfm.last_read_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
