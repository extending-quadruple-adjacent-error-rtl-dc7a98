// aec_syndrome: syndrome calculation, S = r.H^T.
//
// Syndrome bit r is the XOR of the codeword bits selected by row r of H,
// i.e. the XOR of the H columns of every codeword bit that is 1. It is
// zero for a codeword and, for a corrupted word, equals the syndrome of
// the error pattern alone. Combinational.
module aec_syndrome
  import aec_pkg::*;
#(
  parameter  int unsigned K = 64,
  localparam int unsigned R = check_bits(K),
  localparam int unsigned N = K + R
) (
  input  logic [N-1:0] c,    // received (possibly corrupted) codeword
  output logic [R-1:0] syn   // syndrome
);

  // one XOR tree per syndrome bit over the codeword bits of its H row
  for (genvar r = 0; r < R; r++) begin : g_row
    localparam row_t ROW = h_row(K, r);
    assign syn[r] = ^(c & ROW[N-1:0]);
  end

endmodule
