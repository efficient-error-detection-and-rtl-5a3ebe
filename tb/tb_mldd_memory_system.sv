// End-to-end testbench for mldd_memory_system at its default size (16 words).
//
// Writes every word, then reads words back while soft errors are injected into the
// stored codewords: none (the word must leave after the three detection iterations,
// rd_valid 4 edges after rd_en), one or two flipped bits (the word must come back
// corrected after the full decode, 16 edges), three or four flipped bits (the error
// must be reported). Some writes are hit by a one-cycle encoder fault, which the
// encoder's detector must catch and the write must be redone. Each mechanism is
// counted and must occur at least once.
module tb_mldd_memory_system;
  import eg_ref_pkg::*;

  localparam int DEPTH = 16, AW = 4, N = 15;

  logic          clk = 0, rst_n = 0;
  logic          wr_en = 0, rd_en = 0, upset_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0, upset_addr = '0;
  logic [6:0]    wr_data = '0, rd_data;
  logic [14:0]   upset_mask = '0, enc_fault_mask = '0, rd_codeword;
  logic          wr_ready, enc_retry, rd_ready, rd_valid, rd_err_detected;

  logic [6:0]    shadow [DEPTH];
  int checks = 0, failures = 0;
  int n_early = 0, n_corrected = 0, n_detected = 0, n_retry = 0, n_upset = 0;

  mldd_memory_system dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic write(int a, logic [6:0] d, bit enc_fault);
    int waited = 0;
    @(negedge clk);
    while (!wr_ready) @(negedge clk);
    wr_en = 1; wr_addr = AW'(a); wr_data = d;
    if (enc_fault) enc_fault_mask = rand_mask($urandom_range(3, 1));
    #1;
    checks++;
    if (enc_retry !== enc_fault) fail($sformatf("enc_retry=%b for fault=%b", enc_retry, enc_fault));
    @(negedge clk);
    wr_en = 0; enc_fault_mask = '0; wr_data = 7'($urandom);
    if (enc_fault) begin
      n_retry++;
      checks++;
      if (wr_ready) fail("write not held after encoder fault");
      #1;
      checks++;
      if (enc_retry) fail("retry repeated without fault");
      @(negedge clk);
    end
    shadow[a] = d;
  endtask

  task automatic read(int a, logic [14:0] err);
    int lat = 0;
    int w = popcount15(err);
    if (w != 0) begin
      @(negedge clk); upset_en = 1; upset_addr = AW'(a); upset_mask = err;
      @(negedge clk); upset_en = 0;
      n_upset++;
    end
    @(negedge clk);
    while (!rd_ready) @(negedge clk);
    rd_en = 1; rd_addr = AW'(a);
    @(posedge clk);
    @(negedge clk); rd_en = 0;
    do begin @(posedge clk); lat++; #1; end while (!rd_valid && lat < 100);
    checks += 2;
    if (w == 0) begin
      if (rd_err_detected) fail($sformatf("false detection at %0d", a));
      if (lat != 4) fail($sformatf("clean latency %0d", lat));
      n_early++;
    end else begin
      if (!rd_err_detected) fail($sformatf("error weight %0d undetected at %0d", w, a));
      if (lat != N + 1) fail($sformatf("error latency %0d", lat));
    end
    if (w <= 2) begin
      checks += 2;
      if (rd_data !== shadow[a]) fail($sformatf("data %b exp %b (err %b)", rd_data, shadow[a], err));
      if (rd_codeword !== ref_encode(shadow[a])) fail("codeword not restored");
      if (w != 0) n_corrected++;
    end else begin
      n_detected++;
    end
    // Upsets stay in memory (no write-back): rewrite the word to clear them.
    if (w != 0) write(a, shadow[a], 1'b0);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) write(a, 7'($urandom), a % 5 == 2);
    for (int a = 0; a < DEPTH; a++) read(a, '0);
    for (int r = 0; r < 400; r++) begin
      int a, w;
      a = $urandom_range(DEPTH - 1, 0);
      w = $urandom_range(4, 0);
      if (r % 7 == 0) write(a, 7'($urandom), r % 3 == 0);
      read(a, rand_mask(w));
    end
    checks++;
    if (n_early == 0 || n_corrected == 0 || n_detected == 0 || n_retry == 0 || n_upset == 0)
      fail("a mechanism never occurred");
    $display("early finishes %0d, corrected %0d, detected-only %0d, encoder retries %0d, upsets %0d",
             n_early, n_corrected, n_detected, n_retry, n_upset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
