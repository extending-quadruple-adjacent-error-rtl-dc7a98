// aec_error_detect_tb: at 16, 32 and 64 data bits, feeds the syndrome of
// every all-ones burst of length 1..A at every position and expects the
// burst back as the mask, with its length and position and the
// correctable flag. A zero syndrome must flag nothing. Every other
// syndrome value is then tried: it must be reported uncorrectable with an
// empty mask. The set of burst syndromes is built by the reference model.
module aec_error_detect_tb;
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
    localparam int unsigned A = max_burst(K);
    localparam int unsigned R = check_bits(K);
    localparam int unsigned N = K + R;
    localparam int unsigned LW = $clog2(A + 1);
    localparam int unsigned PW = $clog2(N);
    logic [R-1:0]  syn;
    logic [N-1:0]  mask;
    logic          det, corr, unc;
    logic [LW-1:0] blen;
    logic [PW-1:0] bpos;
    bit            seen [logic [15:0]];

    aec_error_detect #(.K(K)) dut (
      .syn(syn), .err_mask(mask), .detected(det), .correctable(corr),
      .uncorrectable(unc), .burst_len(blen), .burst_pos(bpos)
    );

    task automatic check(bit ok, string what);
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL K=%0d: %s", K, what);
      end
    endtask

    initial begin
      syn = '0;
      #1;
      check(!det && !corr && !unc && mask == 0, "zero syndrome");
      for (int unsigned l = 1; l <= A; l++) begin
        for (int unsigned p = 0; p + l <= N; p++) begin
          automatic word_t e = burst(p, l);
          syn = R'(ref_syndrome(K, e));
          seen[16'(syn)] = 1'b1;
          #1;
          check(det && corr && !unc && word_t'(mask) == e && blen == LW'(l) && bpos == PW'(p),
                $sformatf("burst len %0d pos %0d: syn=%h det=%b corr=%b unc=%b mask=%h blen=%0d bpos=%0d", l, p, syn, det, corr, unc, mask, blen, bpos));
        end
      end
      for (int unsigned s = 1; s < (1 << R); s++) begin
        if (!seen.exists(16'(s))) begin
          syn = R'(s);
          #1;
          check(det && !corr && unc && mask == 0, $sformatf("non-burst syndrome %h", s));
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
