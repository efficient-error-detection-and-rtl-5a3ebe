// Constants of the (15,7,5) Euclidean-geometry LDPC code used by the protected memory.
//
// The code is systematic: codeword bits c0..c6 are the information bits i0..i6 and
// c7..c14 are parity bits. PARITY_MASK[p] selects the information bits whose XOR is
// parity bit c(7+p); the selections are those of the published encoder circuit and
// reproduce its published simulation vectors (for example i=0000101 gives
// c=010010110000101, bit 14 first).
//
// The code is cyclic, so a single set of J=4 check sums that are orthogonal on bit
// N-1 decodes every bit once the word is rotated through the decoder register.
// CHECK_MASK[j] is a weight-4 row of the parity-check matrix that contains bit 14; the
// four rows share no other bit. They were derived from the encoder (they are the only
// weight-4 dual codewords containing bit 14) and are this design's own derivation,
// since the source gives the check equations only as an "XOR matrix".
// H_ROW0 is one such row; its N cyclic rotations form the full parity-check matrix.
package eg_ldpc_pkg;

  localparam int unsigned N = 15;        // codeword length
  localparam int unsigned K = 7;         // information bits
  localparam int unsigned J = 4;         // orthogonal check sums per bit
  localparam int unsigned DETECT_ITERS = 3;  // iterations watched by the detector

  typedef logic [N-1:0] codeword_t;
  typedef logic [K-1:0] info_t;
  typedef logic [J-1:0] checks_t;

  // Information-bit selections of parity bits c7..c14 (bit b set = i_b is XORed).
  localparam logic [N-K-1:0][K-1:0] PARITY_MASK = '{
    7'b1101000,   // c14 = i3 ^ i5 ^ i6
    7'b0110100,   // c13 = i2 ^ i4 ^ i5
    7'b0011010,   // c12 = i1 ^ i3 ^ i4
    7'b0001101,   // c11 = i0 ^ i2 ^ i3
    7'b1101110,   // c10 = i1 ^ i2 ^ i3 ^ i5 ^ i6
    7'b0110111,   // c9  = i0 ^ i1 ^ i2 ^ i4 ^ i5
    7'b1110011,   // c8  = i0 ^ i1 ^ i4 ^ i5 ^ i6
    7'b1010001    // c7  = i0 ^ i4 ^ i6
  };

  // Check sums orthogonal on bit 14 (register position N-1).
  localparam logic [J-1:0][N-1:0] CHECK_MASK = '{
    15'h6880,     // B4: c7  ^ c11 ^ c13 ^ c14
    15'h4068,     // B3: c3  ^ c5  ^ c6  ^ c14
    15'h4406,     // B2: c1  ^ c2  ^ c10 ^ c14
    15'h5101      // B1: c0  ^ c8  ^ c12 ^ c14
  };

  localparam codeword_t H_ROW0 = 15'h5101;

  // Rotate a codeword towards the MSB by k positions (bit j moves to j+k mod N).
  function automatic codeword_t rotl(codeword_t w, int unsigned k);
    codeword_t r;
    for (int unsigned j = 0; j < N; j++) r[(j + k) % N] = w[j];
    return r;
  endfunction

endpackage
