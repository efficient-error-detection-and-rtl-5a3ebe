// Testbench for mldd_control: feeds scripted check-sum sequences, one per iteration,
// and checks in which iteration finish comes, whether it is early, that shift is given
// for every other iteration, the detection registers and the OR gates, and that start
// is ignored while busy. Sequences: all clean, an error seen only in iteration 1, 2 or
// 3 (full decode), an error seen only from iteration 4 on (still early), and random.
module tb_mldd_control;
  localparam int N = 15, J = 4;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [J-1:0] b = '0;
  logic         load, shift, finish, early, busy, or1, or2, dff1, dff2;
  logic [3:0]   iter;
  int checks = 0, failures = 0;
  int n_early = 0, n_full = 0;

  mldd_control #(.N(N), .J(J)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(logic got, logic exp, string what, int k);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in iteration %0d: got %b exp %b", what, k, got, exp);
    end
  endtask

  // Runs one word; seq[k] is the check-sum vector of iteration k (1-based).
  task automatic run(logic [J-1:0] seq [N+1]);
    bit exp_early = (seq[1] == 0) && (seq[2] == 0) && (seq[3] == 0);
    int last = exp_early ? 3 : N;
    @(negedge clk); start = 1; b = '0;
    #1; expect_eq(load, 1'b1, "load", 0);
    @(negedge clk); start = 0;
    for (int k = 1; k <= last; k++) begin
      b = seq[k];
      if (k == 2) start = 1;            // must be ignored while busy
      #1;
      expect_eq(busy, 1'b1, "busy", k);
      expect_eq(load, 1'b0, "load while busy", k);
      expect_eq(32'(iter) == k, 1'b1, "iteration counter", k);
      expect_eq(or1, |seq[k], "or1", k);
      if (k == 3) begin
        expect_eq(dff1, |seq[2], "dff1", k);
        expect_eq(dff2, |seq[1], "dff2", k);
        expect_eq(or2, |seq[1] | |seq[2] | |seq[3], "or2", k);
      end
      expect_eq(finish, k == last, "finish", k);
      expect_eq(early, exp_early && k == last, "early", k);
      expect_eq(shift, !(exp_early && k == last), "shift", k);
      @(negedge clk);
      start = 0;
    end
    b = '0; #1;
    expect_eq(busy, 1'b0, "idle after finish", last + 1);
    if (exp_early) n_early++; else n_full++;
  endtask

  initial begin
    logic [J-1:0] seq [N+1];
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (seq[k]) seq[k] = '0;
    run(seq);                                   // clean
    for (int e = 1; e <= 3; e++) begin          // error seen only in iteration e
      foreach (seq[k]) seq[k] = '0;
      seq[e] = 4'b0100;
      run(seq);
    end
    foreach (seq[k]) seq[k] = (k >= 4) ? 4'b1111 : 4'b0000;
    run(seq);                                   // seen late only: early finish
    for (int r = 0; r < 300; r++) begin
      foreach (seq[k]) seq[k] = ($urandom_range(2, 0) == 0) ? J'($urandom) : '0;
      run(seq);
    end
    checks++;
    if (n_early == 0 || n_full == 0) begin failures++; $display("FAIL coverage"); end
    $display("early finishes %0d, full decodes %0d", n_early, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
