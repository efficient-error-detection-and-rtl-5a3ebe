// Majority gate of the majority logic decoder.
//
// Outputs 1 when more of its J inputs are 1 than are 0 (a tie gives 0). A 1 means the
// bit under decoding is judged wrong and is flipped. With J=4 orthogonal checks this
// corrects the bit whenever the word holds at most two errors. Combinational.
module majority_gate #(
  parameter int unsigned J = 4
) (
  input  logic [J-1:0] b,
  output logic         maj
);

  localparam int unsigned CW = $clog2(J + 1);
  logic [CW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned j = 0; j < J; j++)
      ones = ones + CW'(b[j]);
    maj = (32'(ones) * 2) > J;
  end

endmodule
