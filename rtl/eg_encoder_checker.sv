// Detector that checks the encoder's output before it is written to memory.
//
// The encoded vector is a codeword exactly when every row of the parity-check matrix
// has even parity over it. The N rows are the cyclic rotations of one weight-4 row
// (eg_ldpc_pkg::H_ROW0), so the detector is N four-input XOR gates and an OR gate.
// The source says only that a detector verifies the encoded vector and that a failed
// check makes the encoding be redone; computing the syndrome is this design's choice.
//
// Interface: cw[14:0] in; syndrome[14:0] and error (syndrome non-zero) out.
// Combinational, no latency.
module eg_encoder_checker
  import eg_ldpc_pkg::*;
(
  input  codeword_t cw,
  output codeword_t syndrome,
  output logic      error
);

  always_comb begin
    for (int unsigned r = 0; r < N; r++)
      syndrome[r] = ^(cw & rotl(H_ROW0, r));
    error = |syndrome;
  end

endmodule
