// aec_decoder_tb: at 16, 32 and 64 data bits, random data words are
// encoded by the reference model and hit with every correctable burst
// (length 1..A, every position); the decoder must return the original
// data and codeword and flag a corrected error. Clean codewords must pass
// unflagged. Bursts one bit longer than A must never be passed on as
// clean: they are flagged as uncorrectable or (rarely) miscorrected.
module aec_decoder_tb;
  import aec_pkg::*;
  import aec_ref_pkg::*;

  int checks = 0, failures = 0, done = 0;

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 3; g++) begin : g_k
    localparam int unsigned K = (g == 0) ? 16 : (g == 1) ? 32 : 64;
    localparam int unsigned A = max_burst(K);
    localparam int unsigned R = check_bits(K);
    localparam int unsigned N = K + R;
    logic [N-1:0] c, fixed;
    logic [K-1:0] data;
    logic [R-1:0] syn;
    logic         det, corr, unc;

    aec_decoder #(.K(K)) dut (
      .c(c), .data(data), .cw_fixed(fixed), .syn(syn), .detected(det),
      .correctable(corr), .uncorrectable(unc), .burst_len(), .burst_pos()
    );

    task automatic check(bit ok, string what);
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL K=%0d: %s", K, what);
      end
    endtask

    initial begin
      for (int t = 0; t < 8; t++) begin
        automatic word_t d  = rand_word() & ((word_t'(1) << K) - 1);
        automatic word_t cw = ref_encode(K, d);
        c = N'(cw);
        #1;
        check(word_t'(data) == d && !det && !corr && !unc, "clean word");
        for (int unsigned l = 1; l <= A + 1; l++) begin
          for (int unsigned p = 0; p + l <= N; p++) begin
            c = N'(cw ^ burst(p, l));
            #1;
            if (l <= A)
              check(word_t'(data) == d && word_t'(fixed) == cw && det && corr && !unc,
                    $sformatf("burst len %0d pos %0d", l, p));
            else
              check(det && (corr != unc), $sformatf("long burst pos %0d", p));
          end
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
