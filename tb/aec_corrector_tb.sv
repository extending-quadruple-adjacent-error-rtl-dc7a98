// aec_corrector_tb: random received words and error masks at 64 data bits
// (9 check bits); the corrected word must be their XOR and the data the
// low 64 bits of it.
module aec_corrector_tb;
  import aec_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [72:0] c, mask, fixed;
  logic [63:0] data;

  aec_corrector #(.K(64), .R(9)) dut (.c(c), .err_mask(mask), .cw_fixed(fixed), .data(data));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      automatic word_t w = rand_word(), m = rand_word();
      c = w[72:0];
      mask = (t < 100) ? '0 : m[72:0];
      #1;
      checks++;
      if (fixed != (c ^ mask) || data != 64'(c ^ mask)) begin
        failures++;
        $display("FAIL: c=%h mask=%h fixed=%h data=%h", c, mask, fixed, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
