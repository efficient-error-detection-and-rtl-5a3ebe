// Reference models shared by the testbenches, written independently of the RTL.
//
// ref_encode spells out the eight parity equations of the (15,7,5) EG-LDPC encoder
// gate by gate; ref_is_codeword re-encodes the information half and compares.
package eg_ref_pkg;

  function automatic logic [14:0] ref_encode(logic [6:0] i);
    logic [14:0] c;
    c[6:0] = i;
    c[7]  = i[0] ^ i[4] ^ i[6];
    c[8]  = i[0] ^ i[1] ^ i[4] ^ i[5] ^ i[6];
    c[9]  = i[0] ^ i[1] ^ i[2] ^ i[4] ^ i[5];
    c[10] = i[1] ^ i[2] ^ i[3] ^ i[5] ^ i[6];
    c[11] = i[0] ^ i[2] ^ i[3];
    c[12] = i[1] ^ i[3] ^ i[4];
    c[13] = i[2] ^ i[4] ^ i[5];
    c[14] = i[3] ^ i[5] ^ i[6];
    return c;
  endfunction

  function automatic bit ref_is_codeword(logic [14:0] c);
    return ref_encode(c[6:0]) == c;
  endfunction

  function automatic int unsigned popcount15(logic [14:0] v);
    int unsigned n = 0;
    for (int b = 0; b < 15; b++) n += int'(v[b]);
    return n;
  endfunction

  // Random 15-bit mask with exactly w bits set.
  function automatic logic [14:0] rand_mask(int unsigned w);
    logic [14:0] m = '0;
    while (popcount15(m) < w) m[$urandom_range(14, 0)] = 1'b1;
    return m;
  endfunction

endpackage
