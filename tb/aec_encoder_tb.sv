// aec_encoder_tb: checks the encoder at 16, 32 and 64 data bits. Every
// codeword must carry the data unchanged in its low bits, have a zero
// syndrome under the reference (row-wise) model and match the reference
// encoding; encoding must be linear (enc(a^b) = enc(a)^enc(b)).
module aec_encoder_tb;
  import aec_pkg::*;
  import aec_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0] d16, d16b;  logic [22:0] cw16, cw16b;
  logic [31:0] d32;        logic [39:0] cw32;
  logic [63:0] d64, d64b;  logic [72:0] cw64, cw64b;

  aec_encoder #(.K(16)) u16  (.d(d16),  .parity(), .cw(cw16));
  aec_encoder #(.K(16)) u16b (.d(d16b), .parity(), .cw(cw16b));
  aec_encoder #(.K(32)) u32  (.d(d32),  .parity(), .cw(cw32));
  aec_encoder #(.K(64)) u64  (.d(d64),  .parity(), .cw(cw64));
  aec_encoder #(.K(64)) u64b (.d(d64b), .parity(), .cw(cw64b));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      automatic word_t r1 = rand_word(), r2 = rand_word();
      if (t == 0) begin r1 = '0; r2 = '1; end
      d16 = r1[15:0]; d16b = r2[15:0]; d32 = r1[31:0]; d64 = r1[63:0]; d64b = r2[63:0];
      #1;
      check(cw16[15:0] == d16 && cw32[31:0] == d32 && cw64[63:0] == d64, "data field");
      check(ref_syndrome(16, word_t'(cw16)) == 0, "K=16 syndrome of codeword");
      check(ref_syndrome(32, word_t'(cw32)) == 0, "K=32 syndrome of codeword");
      check(ref_syndrome(64, word_t'(cw64)) == 0, "K=64 syndrome of codeword");
      check(word_t'(cw16) == ref_encode(16, word_t'(d16)), "K=16 reference");
      check(word_t'(cw32) == ref_encode(32, word_t'(d32)), "K=32 reference");
      check(word_t'(cw64) == ref_encode(64, word_t'(d64)), "K=64 reference");
      // linearity: encode(d ^ db) against the two separate codewords
      begin
        automatic logic [22:0] a16, b16; automatic logic [72:0] a64, b64;
        a16 = cw16; b16 = cw16b; a64 = cw64; b64 = cw64b;
        d16 = d16 ^ d16b; d64 = d64 ^ d64b;
        #1;
        check(cw16 == (a16 ^ b16) && cw64 == (a64 ^ b64), "linearity");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
