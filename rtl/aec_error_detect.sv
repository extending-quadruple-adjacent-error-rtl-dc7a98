// aec_error_detect: error detection and location from the syndrome.
//
// A nonzero syndrome means an error. The syndrome is then compared, in
// parallel, with the precomputed syndrome of every all-ones burst of
// length 1..A at every position of the codeword (the single, double
// adjacent, triple adjacent, ... errors). The code guarantees that these
// syndromes are all different, so at most one comparator fires; its
// burst becomes the error mask. A nonzero syndrome that matches no burst
// is reported as uncorrectable and leaves the mask at zero.
// Combinational. The burst syndromes are elaboration-time constants
// computed from the H columns of aec_pkg.
//
// Detection by a nonzero syndrome and correction by syndrome uniqueness
// follow the published design; the parallel-comparator structure and the
// uncorrectable, burst_len and burst_pos outputs are this design's own.
module aec_error_detect
  import aec_pkg::*;
#(
  parameter  int unsigned K = 64,
  parameter  int unsigned A = max_burst(K),     // longest burst corrected
  localparam int unsigned R = check_bits(K),
  localparam int unsigned N = K + R,
  localparam int unsigned LW = $clog2(A + 1),
  localparam int unsigned PW = $clog2(N)
) (
  input  logic [R-1:0]  syn,
  output logic [N-1:0]  err_mask,       // bits to flip
  output logic          detected,       // syndrome is nonzero
  output logic          correctable,    // syndrome matched a burst
  output logic          uncorrectable,  // nonzero and no match
  output logic [LW-1:0] burst_len,      // length of the matched burst, 0 if none
  output logic [PW-1:0] burst_pos       // lowest codeword bit of the burst
);

  // The code tables only guarantee unique syndromes up to max_burst(K).
  if (R == 0 || A == 0 || A > max_burst(K)) begin : g_bad_cfg
    $error("aec_error_detect: K=%0d, A=%0d is not a supported code", K, A);
  end

  // hit[l-1][p]: syndrome equals that of the burst cw[p +: l]
  logic [N-1:0] hit [A];

  for (genvar l = 1; l <= A; l++) begin : g_len
    for (genvar p = 0; p < N; p++) begin : g_pos
      if (p + l <= N) begin : g_cmp
        localparam col_t S = burst_syn(K, p, l);
        assign hit[l-1][p] = (syn == R'(S));
      end else begin : g_none
        assign hit[l-1][p] = 1'b0;
      end
    end
  end

  // Mask of the burst cw[p +: l].
  function automatic logic [N-1:0] run(int unsigned p, int unsigned l);
    logic [N-1:0] m = '0;
    for (int unsigned b = 0; b < l; b++) m[p + b] = 1'b1;
    return m;
  endfunction

  // At most one hit is set, so the outputs are plain ORs of the hits,
  // each gated onto the mask, length and position of its own burst.
  always_comb begin
    err_mask    = '0;
    correctable = 1'b0;
    burst_len   = '0;
    burst_pos   = '0;
    for (int unsigned l = 1; l <= A; l++) begin
      for (int unsigned p = 0; p + l <= N; p++) begin
        correctable |= hit[l-1][p];
        err_mask    |= {N{hit[l-1][p]}} & run(p, l);
        burst_len   |= {LW{hit[l-1][p]}} & LW'(l);
        burst_pos   |= {PW{hit[l-1][p]}} & PW'(p);
      end
    end
  end

  assign detected      = |syn;
  assign uncorrectable = detected && !correctable;

endmodule
