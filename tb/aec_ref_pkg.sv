// aec_ref_pkg: reference model used by the testbenches.
//
// Works row by row on H (the RTL works column by column): row r of H is
// gathered into a bit mask over the codeword, and a check or syndrome bit
// is the parity of the word ANDed with that mask. Codewords are up to
// 80 bits wide; unused upper bits are zero.
package aec_ref_pkg;
  import aec_pkg::*;

  typedef logic [79:0] word_t;

  // Row r of H as a mask over codeword bits.
  function automatic word_t h_row(int unsigned k, int unsigned r);
    word_t m = '0;
    int unsigned n = k + check_bits(k);
    for (int unsigned i = 0; i < n; i++) m[i] = cw_col(k, i)[r];
    return m;
  endfunction

  function automatic logic [15:0] ref_syndrome(int unsigned k, word_t w);
    logic [15:0] s = '0;
    for (int unsigned r = 0; r < check_bits(k); r++) s[r] = ^(w & h_row(k, r));
    return s;
  endfunction

  // Codeword {parity, data}: check bit r is the parity of the data bits
  // selected by row r (the identity part contributes only bit r itself).
  function automatic word_t ref_encode(int unsigned k, word_t data);
    word_t w = data & ((word_t'(1) << k) - 1);
    for (int unsigned r = 0; r < check_bits(k); r++) w[k + r] = ^(w & h_row(k, r) & ((word_t'(1) << k) - 1));
    return w;
  endfunction

  function automatic word_t burst(int unsigned pos, int unsigned len);
    return ((word_t'(1) << len) - 1) << pos;
  endfunction

  function automatic word_t rand_word();
    return 80'({$urandom(), $urandom(), $urandom()});
  endfunction
endpackage
