// aec_top_full_tb: end-to-end test of aec_top at its default
// configuration (64 data bits, 9 check bits, 16 words), driven and checked
// by aec_top_driver with more upsets per burst length.
module aec_top_full_tb;
  import aec_pkg::*;

  localparam int unsigned K = 64;
  localparam int unsigned A = max_burst(K);
  localparam int unsigned N = K + check_bits(K);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks, failures;
  bit done;
  logic          rst, wr, rd, seu_en, out_valid, det, corr, unc;
  logic [3:0]    addr, seu_addr;
  logic [K-1:0]  d, out;
  logic [N-1:0]  cw, c, seu_mask;
  logic [$clog2(A + 1)-1:0] blen;
  logic [$clog2(N)-1:0]     bpos;

  aec_top dut (
    .clk(clk), .rst(rst), .wr(wr), .rd(rd), .addr(addr), .d(d), .cw(cw),
    .seu_en(seu_en), .seu_addr(seu_addr), .seu_mask(seu_mask), .c(c),
    .out(out), .out_valid(out_valid), .syn(), .err_detected(det),
    .err_corrected(corr), .err_uncorrectable(unc), .burst_len(blen), .burst_pos(bpos)
  );

  aec_top_driver #(.K(K), .ROUNDS(40)) drv (
    .clk(clk), .rst(rst), .wr(wr), .rd(rd), .addr(addr), .d(d), .seu_en(seu_en),
    .seu_addr(seu_addr), .seu_mask(seu_mask), .cw(cw), .c(c), .out(out),
    .out_valid(out_valid), .err_detected(det), .err_corrected(corr),
    .err_uncorrectable(unc), .burst_len(blen), .burst_pos(bpos),
    .checks(checks), .failures(failures), .done(done)
  );

  initial begin
    #10000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
