// aec_decoder: the three decoding steps in sequence, all combinational:
// syndrome calculation (aec_syndrome), error detection and location
// (aec_error_detect) and error correction (aec_corrector). The output is
// the original data word with up to A adjacent flipped bits repaired,
// plus status flags describing what was found.
module aec_decoder
  import aec_pkg::*;
#(
  parameter  int unsigned K = 64,
  parameter  int unsigned A = max_burst(K),
  localparam int unsigned R = check_bits(K),
  localparam int unsigned N = K + R,
  localparam int unsigned LW = $clog2(A + 1),
  localparam int unsigned PW = $clog2(N)
) (
  input  logic [N-1:0]  c,              // received codeword
  output logic [K-1:0]  data,           // corrected data
  output logic [N-1:0]  cw_fixed,       // corrected codeword
  output logic [R-1:0]  syn,            // syndrome
  output logic          detected,       // an error was seen
  output logic          correctable,    // it was a burst of <= A bits and was repaired
  output logic          uncorrectable,  // it could not be located
  output logic [LW-1:0] burst_len,
  output logic [PW-1:0] burst_pos
);

  logic [N-1:0] err_mask;

  aec_syndrome #(.K(K)) u_syn (.c(c), .syn(syn));

  aec_error_detect #(.K(K), .A(A)) u_det (
    .syn(syn), .err_mask(err_mask), .detected(detected),
    .correctable(correctable), .uncorrectable(uncorrectable),
    .burst_len(burst_len), .burst_pos(burst_pos)
  );

  aec_corrector #(.K(K), .R(R)) u_cor (
    .c(c), .err_mask(err_mask), .cw_fixed(cw_fixed), .data(data)
  );

endmodule
