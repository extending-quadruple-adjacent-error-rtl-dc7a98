// aec_syndrome_tb: at 16, 32 and 64 data bits, the syndrome of a clean
// codeword must be zero, and the syndrome of a codeword with a random
// error pattern must equal the reference syndrome of the pattern alone
// (computed row by row). Single-bit errors must give exactly the H column
// of that bit.
module aec_syndrome_tb;
  import aec_pkg::*;
  import aec_ref_pkg::*;

  int checks = 0, failures = 0, done = 0;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 3; g++) begin : g_k
    localparam int unsigned K = (g == 0) ? 16 : (g == 1) ? 32 : 64;
    localparam int unsigned R = check_bits(K);
    localparam int unsigned N = K + R;
    logic [N-1:0] c;
    logic [R-1:0] syn;

    aec_syndrome #(.K(K)) dut (.c(c), .syn(syn));

    initial begin
      for (int t = 0; t < 200; t++) begin
        automatic word_t cw = ref_encode(K, rand_word());
        automatic word_t e  = (t < 100) ? '0 : rand_word() & ((word_t'(1) << N) - 1);
        c = N'(cw ^ e);
        #1;
        checks++;
        if (16'(syn) != ref_syndrome(K, e)) begin
          failures++;
          $display("FAIL K=%0d syn=%h expected %h", K, syn, ref_syndrome(K, e));
        end
      end
      for (int unsigned i = 0; i < N; i++) begin
        c = N'(word_t'(1) << i);
        #1;
        checks++;
        if (16'(syn) != cw_col(K, i)) begin
          failures++;
          $display("FAIL K=%0d single error at %0d", K, i);
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
