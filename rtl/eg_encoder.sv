// Systematic (15,7,5) EG-LDPC encoder.
//
// Purely combinational. The seven information bits are copied to codeword bits c0..c6;
// each of the eight parity bits c7..c14 is one XOR gate over the information bits
// listed in eg_ldpc_pkg::PARITY_MASK, i.e. n-k = 8 XOR gates in all, as in the
// source's encoder circuit.
//
// Interface: info[6:0] in, cw[14:0] out (cw[6:0] == info). No clock, no latency.
module eg_encoder
  import eg_ldpc_pkg::*;
(
  input  info_t     info,
  output codeword_t cw
);

  always_comb begin
    cw[K-1:0] = info;
    for (int unsigned p = 0; p < N - K; p++)
      cw[K + p] = ^(info & PARITY_MASK[p]);
  end

endmodule
