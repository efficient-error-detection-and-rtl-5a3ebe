// Testbench for xor_matrix with the default check masks: the four check sums written
// out by hand, checked on every codeword (all zero), on single-bit words and on random
// words.
module tb_xor_matrix;
  import eg_ref_pkg::*;

  logic [14:0] q;
  logic [3:0]  b, exp;
  int checks = 0, failures = 0;

  xor_matrix dut (.q, .b);

  task automatic check;
    #1;
    exp[0] = q[0] ^ q[8]  ^ q[12] ^ q[14];
    exp[1] = q[1] ^ q[2]  ^ q[10] ^ q[14];
    exp[2] = q[3] ^ q[5]  ^ q[6]  ^ q[14];
    exp[3] = q[7] ^ q[11] ^ q[13] ^ q[14];
    checks++;
    if (b !== exp) begin
      failures++;
      $display("FAIL q=%b b=%b exp=%b", q, b, exp);
    end
  endtask

  initial begin
    for (int x = 0; x < 128; x++) begin
      q = ref_encode(7'(x)); check();
      checks++;
      if (b !== 4'b0) begin failures++; $display("FAIL codeword %b gives %b", q, b); end
    end
    for (int a = 0; a < 15; a++) begin q = 15'd1 << a; check(); end
    for (int r = 0; r < 3000; r++) begin q = 15'($urandom); check(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
