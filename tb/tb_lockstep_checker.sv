// tb_lockstep_checker: self-checking test of the Checker, built on the
// published functional test table: every pair of vector lengths N_A, N_B in
// 0..5 (36 cases) with equal contents, plus five-word vectors that differ in
// exactly one position (five cases) and one that is equal. Each side feeds its
// words through the b_Tx handshake; a side whose LIFO is full is held busy.
// Both lengths zero is an error, as in the table. The expected result, which side is held, the number of words left for the
// final comparison and hence its latency (one cycle, plus one per word left
// when the counts agree) are worked out here from the lengths alone.
module tb_lockstep_checker;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned W     = 32;
  localparam int unsigned VMAX  = 5;

  logic clk = 0, rst_n = 0, start = 0, clear = 0, run = 0;
  logic tx_a, tx_b, tx_clr_a, tx_clr_b, busy_a, busy_b;
  logic done, ok, err_size, err_mismatch, slice_cmp;
  logic [W-1:0] data_a, data_b;
  logic [W-1:0] vec_a [VMAX], vec_b [VMAX];
  int n_a = 0, n_b = 0, idx_a = 0, idx_b = 0;
  int checks = 0, failures = 0;
  int busy_seen = 0, slices = 0;

  lockstep_checker #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  assign tx_a   = run && (idx_a < n_a);
  assign tx_b   = run && (idx_b < n_b);
  assign data_a = (idx_a < VMAX) ? vec_a[idx_a] : '0;
  assign data_b = (idx_b < VMAX) ? vec_b[idx_b] : '0;

  always @(posedge clk) begin
    if (tx_clr_a) idx_a <= idx_a + 1;
    if (tx_clr_b) idx_b <= idx_b + 1;
    if (busy_a || busy_b) busy_seen++;
    if (slice_cmp) slices++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (N_A=%0d N_B=%0d)", what, n_a, n_b);
    end
  endtask

  // One checkpoint: transfer, compare, check result and latency.
  task automatic run_case(input int na, input int nb, input int diff_pos);
    int a, b, ca, cb, lat, exp_lat;
    bit exp_ok, exp_size;
    for (int i = 0; i < VMAX; i++) begin
      vec_a[i] = $urandom;
      vec_b[i] = vec_a[i] ^ ((i == diff_pos) ? 32'h0000_0100 : 32'h0);
    end
    n_a = na; n_b = nb; idx_a = 0; idx_b = 0;
    @(negedge clk); run = 1;
    // Let the transfers run until both sides are finished or held.
    repeat (40) @(negedge clk);
    // Model: slices of DEPTH leave when both LIFOs are full.
    a = na; b = nb;
    while (a >= DEPTH && b >= DEPTH) begin a -= DEPTH; b -= DEPTH; end
    ca = (a > DEPTH) ? DEPTH : a;
    cb = (b > DEPTH) ? DEPTH : b;
    check(idx_a == na - (a - ca), "words accepted from A");
    check(idx_b == nb - (b - cb), "words accepted from B");
    check(busy_a == (a > DEPTH), "busy A");
    check(busy_b == (b > DEPTH), "busy B");
    exp_size = (ca != cb) || (na == 0 && nb == 0);
    exp_ok   = (na == nb) && (na > 0) && (diff_pos < 0 || diff_pos >= na);
    exp_lat  = (exp_size || ca == 0) ? 1 : 1 + ca;
    start = 1;
    lat = 0;
    do begin @(posedge clk); lat++; #1; end while (!done && lat < 20);
    check(done, "done");
    check(ok == exp_ok, "result");
    check(err_size == exp_size, "size error flag");
    check(lat == exp_lat, $sformatf("latency %0d expected %0d", lat, exp_lat));
    @(negedge clk); start = 0; run = 0;
    clear = 1; @(negedge clk); clear = 0;
    check(!done && !err_size && !err_mismatch, "clear");
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int na = 0; na <= 5; na++)
      for (int nb = 0; nb <= 5; nb++)
        run_case(na, nb, -1);
    for (int p = 0; p < 5; p++) run_case(5, 5, p);
    run_case(5, 5, -1);
    check(busy_seen > 0, "busy state exercised");
    check(slices > 0, "slice comparison exercised");
    $display("busy cycles=%0d slice comparisons=%0d", busy_seen, slices);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
