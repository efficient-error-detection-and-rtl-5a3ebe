// Testbench for cyclic_shift_reg: random loads, shifts with and without correction,
// and idle cycles, compared every cycle with a behavioural model of the rotation.
module tb_cyclic_shift_reg;
  localparam int N = 15;

  logic         clk = 0, rst_n = 0;
  logic         load = 0, shift = 0, corr = 0;
  logic [N-1:0] load_data = '0, q, model;
  int checks = 0, failures = 0;

  cyclic_shift_reg #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      load      = ($urandom_range(9, 0) == 0);
      shift     = ($urandom_range(3, 0) != 0);
      corr      = ($urandom_range(3, 0) == 0);
      load_data = N'($urandom);
      @(posedge clk);
      if (load)       model = load_data;
      else if (shift) model = {model[N-2:0], model[N-1] ^ corr};
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL t=%0d q=%b exp=%b", t, q, model);
      end
    end
    // a full turn of N plain shifts restores the word
    @(negedge clk); load = 1; load_data = 15'h2d4b; shift = 0; corr = 0;
    @(negedge clk); load = 0; shift = 1;
    repeat (N) @(negedge clk);
    shift = 0;
    checks++;
    if (q !== 15'h2d4b) begin failures++; $display("FAIL full turn %h", q); end
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
