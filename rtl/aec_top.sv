// aec_top: memory protected by an adjacent-error-correcting code.
//
// Data d is encoded on the way in (cw = {parity, d}) and the codeword is
// written into a DEPTH-word memory at addr when wr is set. Radiation is
// modelled by the upset port of the memory, which flips any chosen bits of
// a stored word. A read (rd) loads the stored, possibly corrupted,
// codeword into c one clock later; the decoder works on c
// combinationally, so out and the status flags are valid in the same
// cycle as c (out_valid). Up to A adjacent flipped bits anywhere in the
// codeword are corrected; other nonzero syndromes are flagged.
// Defaults are the main configuration: 64 data bits, 9 check bits.
//
// The chain encode -> memory -> syndrome -> detect -> correct, the data
// widths with their check-bit counts and the signal names d, cw, c, out,
// clk, rst, wr and addr (4 bits) follow the published design. The rd and
// out_valid handshake, the one-cycle read, the upset port and the status
// outputs are choices of this implementation. The published target of 7
// adjacent bits at K = 64 (6 at 16 and 32) is not reached: the shipped
// codes correct up to A = 6 adjacent bits at K = 64 and 5 at K = 16 and
// 32 (see aec_pkg).
module aec_top
  import aec_pkg::*;
#(
  parameter  int unsigned K     = 64,
  parameter  int unsigned A     = max_burst(K),
  parameter  int unsigned DEPTH = 16,
  localparam int unsigned R     = check_bits(K),
  localparam int unsigned N     = K + R,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned LW    = $clog2(A + 1),
  localparam int unsigned PW    = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr,             // write d at addr
  input  logic          rd,             // read addr
  input  logic [AW-1:0] addr,
  input  logic [K-1:0]  d,              // data in
  output logic [N-1:0]  cw,             // codeword of d
  input  logic          seu_en,         // upset injection
  input  logic [AW-1:0] seu_addr,
  input  logic [N-1:0]  seu_mask,
  output logic [N-1:0]  c,              // codeword read from memory
  output logic [K-1:0]  out,            // corrected data
  output logic          out_valid,
  output logic [R-1:0]  syn,
  output logic          err_detected,
  output logic          err_corrected,
  output logic          err_uncorrectable,
  output logic [LW-1:0] burst_len,
  output logic [PW-1:0] burst_pos
);


  aec_encoder #(.K(K)) u_enc (.d(d), .parity(), .cw(cw));

  aec_memory #(.W(N), .DEPTH(DEPTH)) u_mem (
    .clk(clk), .rst(rst), .wr(wr), .rd(rd), .addr(addr), .wdata(cw),
    .rdata(c), .rvalid(out_valid),
    .seu_en(seu_en), .seu_addr(seu_addr), .seu_mask(seu_mask)
  );

  aec_decoder #(.K(K), .A(A)) u_dec (
    .c(c), .data(out), .cw_fixed(), .syn(syn),
    .detected(err_detected), .correctable(err_corrected),
    .uncorrectable(err_uncorrectable),
    .burst_len(burst_len), .burst_pos(burst_pos)
  );

endmodule
