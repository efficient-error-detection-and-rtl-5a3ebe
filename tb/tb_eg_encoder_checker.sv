// Testbench for eg_encoder_checker: every codeword must pass, every codeword with 1 to
// 4 flipped bits must fail, and random vectors must fail exactly when they are not
// codewords.
module tb_eg_encoder_checker;
  import eg_ref_pkg::*;

  logic [14:0] cw, syndrome;
  logic        error;
  int checks = 0, failures = 0;

  eg_encoder_checker dut (.cw, .syndrome, .error);

  task automatic check(bit exp_err);
    #1;
    checks++;
    if (error !== exp_err || ((syndrome != '0) != exp_err)) begin
      failures++;
      $display("FAIL cw=%b error=%b syndrome=%b exp_err=%b", cw, error, syndrome, exp_err);
    end
  endtask

  initial begin
    for (int x = 0; x < 128; x++) begin
      logic [14:0] c;
      c = ref_encode(7'(x));
      cw = c; check(1'b0);
      for (int a = 0; a < 15; a++) begin
        cw = c ^ (15'd1 << a); check(1'b1);
        for (int b = a + 1; b < 15; b++) begin
          cw = c ^ (15'd1 << a) ^ (15'd1 << b); check(1'b1);
        end
      end
      for (int r = 0; r < 20; r++) begin
        cw = c ^ rand_mask(3 + (r % 2)); check(1'b1);
      end
    end
    for (int r = 0; r < 2000; r++) begin
      cw = 15'($urandom); check(!ref_is_codeword(cw));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
