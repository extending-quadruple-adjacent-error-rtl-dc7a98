// aec_pkg: code tables and helper functions shared by the adjacent-error-
// correcting (AEC) encoder and decoder.
//
// A codeword is cw[N-1:0] = {parity[R-1:0], data[K-1:0]}: the R check bits
// sit above the K data bits, and "adjacent" means neighbouring indices of
// cw. The parity-check matrix H is R x N and is systematic: its left R
// columns (those of the check bits) form the identity matrix, the rest are
// the data columns. Column j of H (j = 0 is the leftmost) belongs to
// codeword bit N-1-j, so HCOLk[0] is the column of parity[R-1] and
// HCOLk[N-1] the column of data[0].
//
// The syndrome of an error pattern is the XOR of the H columns of the bits
// it flips. The codes below were chosen so that every all-ones burst of
// length 1..BURSTk (a single error, two adjacent errors, ... up to BURSTk
// adjacent errors) has its own nonzero syndrome, which is what lets the
// decoder correct all of them. The 8-, 16- and 32-bit tables were found by
// a backtracking column search started from the identity: add a column if
// none of the new burst syndromes collides with one already taken,
// otherwise try the next candidate (low Hamming weight first) and step
// back when none fits. The 64-bit code is a shortened cyclic code whose
// columns are computed below. A burst longer than BURSTk cannot be
// corrected; it is either flagged as uncorrectable or, when its syndrome
// equals that of a correctable burst, miscorrected.
//
// Supported data widths: 8, 16, 32 and 64 bits with 5, 7, 8 and 9 check bits.
package aec_pkg;

  // One H column, wide enough for every supported check-bit count.
  typedef logic [15:0] col_t;

  // K=8, R=5: all-ones bursts of length 1..2 have distinct nonzero syndromes
  localparam int unsigned BURST8 = 2;
  localparam col_t HCOL8 [13] = '{
    16'h010, 16'h008, 16'h004, 16'h002, 16'h001, 16'h012, 16'h005, 16'h00a, 16'h011, 16'h01a, 16'h007, 16'h009,
    16'h01c
  };
  // K=16, R=7: all-ones bursts of length 1..5 have distinct nonzero syndromes
  localparam int unsigned BURST16 = 5;
  localparam col_t HCOL16 [23] = '{
    16'h040, 16'h020, 16'h010, 16'h008, 16'h004, 16'h002, 16'h001, 16'h00a, 16'h050, 16'h014, 16'h022, 16'h048,
    16'h017, 16'h046, 16'h06e, 16'h015, 16'h061, 16'h037, 16'h064, 16'h075, 16'h054, 16'h033, 16'h04c
  };
  // K=32, R=8: all-ones bursts of length 1..5 have distinct nonzero syndromes
  localparam int unsigned BURST32 = 5;
  localparam col_t HCOL32 [40] = '{
    16'h080, 16'h040, 16'h020, 16'h010, 16'h008, 16'h004, 16'h002, 16'h001, 16'h02c, 16'h044, 16'h0a1, 16'h050,
    16'h02a, 16'h088, 16'h031, 16'h04c, 16'h026, 16'h082, 16'h009, 16'h04a, 16'h094, 16'h00a, 16'h048, 16'h0c4,
    16'h029, 16'h013, 16'h041, 16'h015, 16'h032, 16'h09a, 16'h039, 16'h0cf, 16'h0b0, 16'h072, 16'h079, 16'h0e2,
    16'h016, 16'h0da, 16'h0fb, 16'h0e6
  };

  // K=64, R=9: a shortened cyclic code. Column j of H is x^j mod g(x) with
  // g(x) = x^9 + x^6 + x^5 + x^2 + 1, its 9 bits written in reverse order
  // so that the first 9 columns are the identity in the orientation used
  // above. All-ones bursts of length 1..6 have distinct nonzero syndromes.
  localparam int unsigned BURST64 = 6;
  localparam logic [9:0]  G64     = 10'h265;

  typedef logic [72:0][15:0] col64_t;  // packed: element j is column j

  function automatic col64_t cyclic64_cols();
    col64_t     h;
    logic [8:0] v = 9'h001;  // x^j mod g(x)
    for (int unsigned j = 0; j < 73; j++) begin
      h[j] = '0;
      for (int unsigned b = 0; b < 9; b++) h[j][8-b] = v[b];
      v = v[8] ? ({v[7:0], 1'b0} ^ G64[8:0]) : {v[7:0], 1'b0};
    end
    return h;
  endfunction

  localparam col64_t HCOL64 = cyclic64_cols();

  // Number of check bits for a data width.
  function automatic int unsigned check_bits(int unsigned k);
    case (k)
      8:       return 5;
      16:      return 7;
      32:      return 8;
      64:      return 9;
      default: return 0;
    endcase
  endfunction

  // Longest all-ones burst the table of this data width corrects.
  function automatic int unsigned max_burst(int unsigned k);
    case (k)
      8:       return BURST8;
      16:      return BURST16;
      32:      return BURST32;
      64:      return BURST64;
      default: return 0;
    endcase
  endfunction

  // Column j of H, j = 0 being the leftmost (check bit R-1).
  function automatic col_t h_col(int unsigned k, int unsigned j);
    case (k)
      8:       return HCOL8[j];
      16:      return HCOL16[j];
      32:      return HCOL32[j];
      64:      return HCOL64[j];
      default: return '0;
    endcase
  endfunction

  // H column of codeword bit i (cw[i]).
  function automatic col_t cw_col(int unsigned k, int unsigned i);
    return h_col(k, k + check_bits(k) - 1 - i);
  endfunction

  // Row r of H as a mask over the codeword bits: bit i is set when cw[i]
  // takes part in check r.
  typedef logic [127:0] row_t;
  function automatic row_t h_row(int unsigned k, int unsigned r);
    row_t m = '0;
    for (int unsigned i = 0; i < k + check_bits(k); i++) m[i] = cw_col(k, i)[r];
    return m;
  endfunction

  // Syndrome of the all-ones burst that flips cw[pos +: len].
  function automatic col_t burst_syn(int unsigned k, int unsigned pos, int unsigned len);
    col_t s = '0;
    for (int unsigned i = 0; i < len; i++) s ^= cw_col(k, pos + i);
    return s;
  endfunction

endpackage
