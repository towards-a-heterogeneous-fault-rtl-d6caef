// tb_lifo: self-checking test of the LIFO store.
// Pushes random words against a queue-based reference model, pops them in
// reverse order, checks count/full/empty, a simultaneous push+pop that
// replaces the top word, and clear.
module tb_lifo;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned W     = 32;

  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic full, empty;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  lifo #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (count=%0d dout=%h)", what, count, dout);
    end
  endtask

  task automatic compare_state();
    check(count == model.size(), "count");
    check(full == (model.size() == DEPTH), "full");
    check(empty == (model.size() == 0), "empty");
    if (model.size() != 0) check(dout == model[$], "top word");
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare_state();
    for (int round = 0; round < 20; round++) begin
      // fill to full
      while (model.size() < DEPTH) begin
        din = $urandom; push = 1;
        @(negedge clk); push = 0;
        model.push_back(din);
        compare_state();
      end
      // replace top with a simultaneous push and pop
      din = $urandom; push = 1; pop = 1;
      @(negedge clk); push = 0; pop = 0;
      void'(model.pop_back()); model.push_back(din);
      compare_state();
      // pop a random number of words, newest first
      for (int k = 0, n = $urandom_range(DEPTH, 1); k < n; k++) begin
        pop = 1;
        @(negedge clk); pop = 0;
        void'(model.pop_back());
        compare_state();
      end
      if (round % 5 == 4) begin
        clear = 1; @(negedge clk); clear = 0;
        model.delete();
        compare_state();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
