// Testbench for cw_memory: writes every word, reads it back with one cycle of read
// latency, flips bits through the upset port and checks write-over-upset priority,
// all against a shadow array.
module tb_cw_memory;
  localparam int DEPTH = 16, WIDTH = 15, AW = 4;

  logic             clk = 0;
  logic             wr_en = 0, rd_en = 0, upset_en = 0;
  logic [AW-1:0]    wr_addr = '0, rd_addr = '0, upset_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, upset_mask = '0, rd_data;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  cw_memory #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic read_check(int a);
    @(negedge clk); rd_en = 1; rd_addr = AW'(a);
    @(negedge clk); rd_en = 0;
    checks++;
    if (rd_data !== shadow[a]) begin
      failures++;
      $display("FAIL read %0d: %h exp %h", a, rd_data, shadow[a]);
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = AW'(a); wr_data = WIDTH'($urandom);
      shadow[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < DEPTH; a++) read_check(a);
    // upsets
    for (int r = 0; r < 40; r++) begin
      int a;
      a = $urandom_range(DEPTH - 1, 0);
      @(negedge clk); upset_en = 1; upset_addr = AW'(a); upset_mask = WIDTH'($urandom);
      shadow[a] ^= upset_mask;
      @(negedge clk); upset_en = 0;
      read_check(a);
    end
    // write and upset to the same word in the same cycle: the write wins
    @(negedge clk); wr_en = 1; wr_addr = 3; wr_data = 15'h1234;
    upset_en = 1; upset_addr = 3; upset_mask = 15'h7fff; shadow[3] = 15'h1234;
    @(negedge clk); wr_en = 0; upset_en = 0;
    read_check(3);
    // read data holds while rd_en is low
    @(negedge clk); @(negedge clk);
    checks++;
    if (rd_data !== shadow[3]) begin failures++; $display("FAIL rd_data not held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
