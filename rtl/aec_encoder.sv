// aec_encoder: systematic encoder of the adjacent-error-correcting code.
//
// Each check bit r is the XOR of the data bits whose H column has a 1 in
// row r (v = u.G with G = [I | P]); because the check-bit part of H is the
// identity, this makes the syndrome of the finished codeword zero. The
// codeword is {parity, data}: check bits in the top R bits, data below,
// the layout of the waveforms of the original design. Purely
// combinational, no clock. The H columns come from aec_pkg; which code is
// used follows from K alone.
module aec_encoder
  import aec_pkg::*;
#(
  parameter  int unsigned K = 64,            // data bits
  localparam int unsigned R = check_bits(K), // check bits
  localparam int unsigned N = K + R          // codeword bits
) (
  input  logic [K-1:0] d,       // data word to protect
  output logic [R-1:0] parity,  // check bits
  output logic [N-1:0] cw       // encoded codeword {parity, d}
);

  // one XOR tree per check bit over the data bits of its H row
  for (genvar r = 0; r < R; r++) begin : g_row
    localparam row_t ROW = h_row(K, r);
    assign parity[r] = ^(d & ROW[K-1:0]);
  end

  assign cw = {parity, d};

endmodule
