// aec_top_driver: stimulus and checking for one aec_top instance, shared
// by the end-to-end testbenches. It fills the memory with random data,
// checks every codeword against the reference encoder, reads each word
// back clean, then for every burst length 1..A (and for bursts one longer)
// strikes a random word at a random position through the upset port,
// reads it and checks the corrected data and the flags, rewriting the
// word afterwards. Reads must answer one cycle after rd. Each mechanism
// is counted: writes, clean reads, corrected bursts per length, upsets
// reported uncorrectable, long bursts miscorrected, and a reset in the
// middle of the run that must leave every word reading as zero.
module aec_top_driver
  import aec_pkg::*;
  import aec_ref_pkg::*;
#(
  parameter  int unsigned K      = 64,
  parameter  int unsigned ROUNDS = 4,   // upsets per burst length
  localparam int unsigned A      = max_burst(K),
  localparam int unsigned R      = check_bits(K),
  localparam int unsigned N      = K + R,
  localparam int unsigned AW     = 4,
  localparam int unsigned LW     = $clog2(A + 1),
  localparam int unsigned PW     = $clog2(N)
) (
  input  logic          clk,
  output logic          rst,
  output logic          wr,
  output logic          rd,
  output logic [AW-1:0] addr,
  output logic [K-1:0]  d,
  output logic          seu_en,
  output logic [AW-1:0] seu_addr,
  output logic [N-1:0]  seu_mask,
  input  logic [N-1:0]  cw,
  input  logic [N-1:0]  c,
  input  logic [K-1:0]  out,
  input  logic          out_valid,
  input  logic          err_detected,
  input  logic          err_corrected,
  input  logic          err_uncorrectable,
  input  logic [LW-1:0] burst_len,
  input  logic [PW-1:0] burst_pos,
  output int            checks,
  output int            failures,
  output bit            done
);

  logic [K-1:0] shadow [16];
  int n_write = 0, n_clean = 0, n_uncorr = 0, n_miscorr = 0, n_reset = 0;
  int n_corr [A + 1];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL K=%0d: %s", K, what);
    end
  endtask

  task automatic write_word(int unsigned a, logic [K-1:0] v);
    addr = AW'(a); d = v; wr = 1'b1;
    #1;
    check(word_t'(cw) == ref_encode(K, word_t'(v)), "encoder output");
    @(posedge clk);
    #1 wr = 1'b0;
    shadow[a] = v;
    n_write++;
  endtask

  // read one word; returns after the cycle in which out is valid
  task automatic read_word(int unsigned a);
    addr = AW'(a); rd = 1'b1;
    @(posedge clk);
    #1 rd = 1'b0;
    check(out_valid, "out_valid one cycle after rd");
  endtask

  task automatic strike(int unsigned a, int unsigned pos, int unsigned len);
    seu_addr = AW'(a); seu_mask = N'(burst(pos, len)); seu_en = 1'b1;
    @(posedge clk);
    #1 seu_en = 1'b0;
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    foreach (n_corr[i]) n_corr[i] = 0;
    rst = 1'b1; wr = 1'b0; rd = 1'b0; seu_en = 1'b0;
    addr = '0; d = '0; seu_addr = '0; seu_mask = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(!out_valid, "no output after reset");

    for (int unsigned a = 0; a < 16; a++) write_word(a, K'(rand_word()));
    for (int unsigned a = 0; a < 16; a++) begin
      read_word(a);
      check(out == shadow[a] && !err_detected && !err_corrected && !err_uncorrectable,
            $sformatf("clean read %0d", a));
      n_clean++;
    end

    for (int unsigned l = 1; l <= A + 1; l++) begin
      for (int unsigned t = 0; t < ROUNDS; t++) begin
        automatic int unsigned a   = $urandom_range(0, 15);
        automatic int unsigned pos = (t == 0) ? 0 : (t == 1) ? N - l : $urandom_range(0, N - l);
        strike(a, pos, l);
        read_word(a);
        check(word_t'(c) == (ref_encode(K, word_t'(shadow[a])) ^ burst(pos, l)), "stored word carries the upset");
        if (l <= A) begin
          check(out == shadow[a] && err_detected && err_corrected && !err_uncorrectable &&
                burst_len == LW'(l) && burst_pos == PW'(pos),
                $sformatf("corrected burst len %0d pos %0d", l, pos));
          if (out == shadow[a] && err_corrected) n_corr[l]++;
        end else begin
          check(err_detected && (err_corrected != err_uncorrectable), "long burst detected");
          if (err_uncorrectable) n_uncorr++;
          else n_miscorr++;
        end
        write_word(a, K'(rand_word()));
      end
    end

    // a pattern that is not a burst: two single errors far apart, read
    // until one of them is reported uncorrectable
    for (int t = 0; t < 200 && n_uncorr == 0; t++) begin
      automatic int unsigned p1 = $urandom_range(0, N / 2 - 1);
      automatic int unsigned p2 = $urandom_range(N / 2 + A, N - 1);
      seu_addr = 4'd3; seu_mask = N'(burst(p1, 1) | burst(p2, 1)); seu_en = 1'b1;
      @(posedge clk);
      #1 seu_en = 1'b0;
      read_word(3);
      check(err_detected, "double error detected");
      if (err_uncorrectable) n_uncorr++;
      write_word(3, shadow[3]);
    end

    // reset in the middle of the run clears the memory
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    n_reset++;
    for (int unsigned a = 0; a < 16; a++) begin
      read_word(a);
      check(out == '0 && !err_detected, "word cleared by reset");
    end

    // every mechanism must have happened
    check(n_write > 0, "writes");
    check(n_clean > 0, "clean reads");
    for (int unsigned l = 1; l <= A; l++) begin
      check(n_corr[l] > 0, $sformatf("corrected bursts of length %0d", l));
      $display("K=%0d corrected bursts of length %0d: %0d", K, l, n_corr[l]);
    end
    check(n_uncorr > 0, "uncorrectable errors reported");
    check(n_reset > 0, "reset");
    $display("K=%0d writes=%0d clean=%0d uncorrectable=%0d miscorrected_long=%0d resets=%0d",
             K, n_write, n_clean, n_uncorr, n_miscorr, n_reset);
    done = 1'b1;
  end

endmodule
