// XOR matrix of the majority logic decoder.
//
// Forms the J parity check sums B1..BJ from fixed taps of the cyclic shift register.
// Check j is the XOR of the register bits selected by MASK[j]. With the default masks
// (eg_ldpc_pkg::CHECK_MASK) every check contains the bit under decoding, q[N-1], and no
// two checks share any other bit, which is what lets a majority vote decide on q[N-1].
// Combinational.
module xor_matrix #(
  parameter int unsigned N = 15,
  parameter int unsigned J = 4,
  parameter logic [J-1:0][N-1:0] MASK = eg_ldpc_pkg::CHECK_MASK
) (
  input  logic [N-1:0] q,
  output logic [J-1:0] b
);

  always_comb
    for (int unsigned j = 0; j < J; j++)
      b[j] = ^(q & MASK[j]);

endmodule
