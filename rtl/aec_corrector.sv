// aec_corrector: error correction and parity removal.
//
// Flips the codeword bits selected by the error mask and returns the
// corrected codeword and its data part, the low K bits (the check bits
// are dropped). Combinational.
module aec_corrector #(
  parameter int unsigned K = 64,  // data bits
  parameter int unsigned R = 9    // check bits
) (
  input  logic [K+R-1:0] c,         // received codeword
  input  logic [K+R-1:0] err_mask,  // bits located as wrong
  output logic [K+R-1:0] cw_fixed,  // corrected codeword
  output logic [K-1:0]   data       // corrected data
);

  assign cw_fixed = c ^ err_mask;
  assign data     = cw_fixed[K-1:0];

endmodule
