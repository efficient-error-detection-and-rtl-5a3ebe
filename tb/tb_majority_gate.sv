// Testbench for majority_gate: all 16 input patterns of the 4-input gate and all 32 of
// a 5-input gate, against a count of ones.
module tb_majority_gate;
  logic [3:0] b4;
  logic [4:0] b5;
  logic       m4, m5;
  int checks = 0, failures = 0;

  majority_gate #(.J(4)) dut4 (.b(b4), .maj(m4));
  majority_gate #(.J(5)) dut5 (.b(b5), .maj(m5));

  initial begin
    for (int x = 0; x < 32; x++) begin
      int n4, n5;
      n4 = 0; n5 = 0;
      b4 = 4'(x); b5 = 5'(x);
      for (int k = 0; k < 4; k++) n4 += (x >> k) & 1;
      for (int k = 0; k < 5; k++) n5 += (x >> k) & 1;
      #1;
      checks += 2;
      if (m4 !== (n4 > 4 - n4)) begin failures++; $display("FAIL J=4 b=%b m=%b", b4, m4); end
      if (m5 !== (n5 > 5 - n5)) begin failures++; $display("FAIL J=5 b=%b m=%b", b5, m5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
