// Testbench for eg_encoder: checks the published simulation vectors of the encoder and
// all 128 information words against the gate-level reference equations.
module tb_eg_encoder;
  import eg_ref_pkg::*;

  logic [6:0]  info;
  logic [14:0] cw;
  int checks = 0, failures = 0;

  eg_encoder dut (.info, .cw);

  task automatic check(logic [14:0] exp, string what);
    checks++;
    if (cw !== exp) begin
      failures++;
      $display("FAIL %s: info=%b cw=%b exp=%b", what, info, cw, exp);
    end
  endtask

  initial begin
    // Published input/output pairs (bit 6 / bit 14 first).
    logic [6:0]  vin  [5] = '{7'b0000001, 7'b0110110, 7'b0111001, 7'b0000101, 7'b1010001};
    logic [14:0] vout [5] = '{15'b000101110000001, 15'b110110110110110, 15'b000001100111001,
                              15'b010010110000101, 15'b111110111010001};
    for (int v = 0; v < 5; v++) begin
      info = vin[v]; #1; check(vout[v], "published vector");
    end
    for (int x = 0; x < 128; x++) begin
      info = 7'(x); #1; check(ref_encode(info), "exhaustive");
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
