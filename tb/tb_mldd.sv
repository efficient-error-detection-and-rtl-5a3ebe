// Testbench for mldd, the majority logic decoder/detector.
//
// For every one of the 128 codewords: the clean word (must come out unchanged, with
// err_detected=0, done high 3 clock edges after the edge that takes start), every single and double bit error
// (must be corrected, err_detected=1, done N=15 edges after it), and random
// triple and quadruple errors (must be detected: err_detected=1 and 15 edges).
// Because the code and the checks are linear, detection depends only on the error
// pattern; every one of the 1,820 three- and four-bit patterns and the 3,003 five-bit
// patterns is then applied once, each to a random codeword. All three- and four-bit
// patterns must be detected; of the five-bit ones exactly 18 escape the three
// detection iterations (a property of the code, worked out by enumerating its checks).
// Some three-bit errors (one more than the code corrects) must come out uncorrected.
module tb_mldd;
  import eg_ref_pkg::*;

  localparam int N = 15;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [14:0] cw_in = '0, y;
  logic        busy, done, err_detected;
  int checks = 0, failures = 0;
  int n_clean = 0, n_corrected = 0, n_detected = 0, n5_missed = 0, n5_total = 0;
  int n3_total = 0, n3_wrong = 0;

  mldd dut (.*);

  always #5 clk = ~clk;

  // Decodes one word; returns output, detection flag and the latency in clock edges.
  task automatic decode(input logic [14:0] w, output logic [14:0] out,
                        output logic det, output int lat);
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy before start"); end
    start = 1; cw_in = w;
    @(posedge clk); lat = 0;
    @(negedge clk); start = 0; cw_in = 15'($urandom);
    do begin @(posedge clk); lat++; #1; end while (!done && lat < 100);
    out = y; det = err_detected;
  endtask

  task automatic check(logic [14:0] cw, logic [14:0] err, bit must_correct, bit must_detect);
    logic [14:0] out; logic det; int lat;
    decode(cw ^ err, out, det, lat);
    if (must_correct) begin
      checks++;
      if (out !== cw) begin failures++; $display("FAIL not corrected cw=%b err=%b out=%b", cw, err, out); end
    end
    if (err == 0) begin
      checks += 2;
      if (det !== 1'b0) begin failures++; $display("FAIL false detection cw=%b", cw); end
      if (lat != 3) begin failures++; $display("FAIL clean latency %0d", lat); end
      n_clean++;
    end else if (must_detect) begin
      checks += 2;
      if (det !== 1'b1) begin failures++; $display("FAIL undetected cw=%b err=%b", cw, err); end
      if (lat != N) begin failures++; $display("FAIL error latency %0d", lat); end
      if (must_correct) n_corrected++; else n_detected++;
      if (popcount15(err) == 3) begin
        n3_total++;
        if (out !== cw) n3_wrong++;
      end
    end else begin
      n5_total++;
      if (!det) n5_missed++;
      checks++;
      if (lat != (det ? N : 3)) begin failures++; $display("FAIL latency %0d det=%b", lat, det); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int x = 0; x < 128; x++) begin
      logic [14:0] c;
      c = ref_encode(7'(x));
      check(c, '0, 1, 0);
      for (int a = 0; a < 15; a++) begin
        check(c, 15'd1 << a, 1, 1);
        for (int b2 = a + 1; b2 < 15; b2++)
          check(c, (15'd1 << a) | (15'd1 << b2), 1, 1);
      end
      for (int r = 0; r < 10; r++) check(c, rand_mask(3 + (r % 2)), 0, 1);
      for (int r = 0; r < 4; r++) check(c, rand_mask(5), 0, 0);
    end
    n5_missed = 0; n5_total = 0;
    for (int m = 1; m < (1 << 15); m++) begin
      int w;
      logic [14:0] c;
      w = popcount15(15'(m));
      c = ref_encode(7'($urandom));
      if (w == 3 || w == 4) check(c, 15'(m), 0, 1);
      else if (w == 5)      check(c, 15'(m), 0, 0);
    end
    checks++;
    if (n5_total != 3003 || n5_missed != 18) begin
      failures++;
      $display("FAIL five-bit patterns: %0d of %0d missed, expected 18 of 3003", n5_missed, n5_total);
    end
    // Three errors exceed t = 2: they are flagged but not always corrected.
    checks++;
    if (n3_wrong == 0) begin failures++; $display("FAIL no uncorrected three-bit error seen"); end
    $display("three-bit errors left uncorrected: %0d of %0d", n3_wrong, n3_total);
    $display("clean %0d corrected %0d detected(3-4 bits) %0d; 5-bit errors missed %0d of %0d",
             n_clean, n_corrected, n_detected, n5_missed, n5_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
