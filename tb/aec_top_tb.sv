// aec_top_tb: end-to-end test of the protected memory at the three sizes
// with their own top-level configurations: 16, 32 and 64 data bits, plus
// the 8-bit word with 5 check bits. Each
// instance is driven and checked by aec_top_driver.
module aec_top_tb;
  import aec_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks [4], failures [4];
  bit done [4];

  initial begin
    #10000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2] + checks[3],
             failures[0] + failures[1] + failures[2] + failures[3] + 1);
    $finish;
  end

  for (genvar g = 0; g < 4; g++) begin : g_k
    localparam int unsigned K = (g == 0) ? 16 : (g == 1) ? 32 : (g == 2) ? 64 : 8;
    localparam int unsigned A = max_burst(K);
    localparam int unsigned N = K + check_bits(K);
    logic          rst, wr, rd, seu_en, out_valid, det, corr, unc;
    logic [3:0]    addr, seu_addr;
    logic [K-1:0]  d, out;
    logic [N-1:0]  cw, c, seu_mask;
    logic [$clog2(A + 1)-1:0] blen;
    logic [$clog2(N)-1:0]     bpos;

    aec_top #(.K(K)) dut (
      .clk(clk), .rst(rst), .wr(wr), .rd(rd), .addr(addr), .d(d), .cw(cw),
      .seu_en(seu_en), .seu_addr(seu_addr), .seu_mask(seu_mask), .c(c),
      .out(out), .out_valid(out_valid), .syn(), .err_detected(det),
      .err_corrected(corr), .err_uncorrectable(unc), .burst_len(blen), .burst_pos(bpos)
    );

    aec_top_driver #(.K(K)) drv (
      .clk(clk), .rst(rst), .wr(wr), .rd(rd), .addr(addr), .d(d), .seu_en(seu_en),
      .seu_addr(seu_addr), .seu_mask(seu_mask), .cw(cw), .c(c), .out(out),
      .out_valid(out_valid), .err_detected(det), .err_corrected(corr),
      .err_uncorrectable(unc), .burst_len(blen), .burst_pos(bpos),
      .checks(checks[g]), .failures(failures[g]), .done(done[g])
    );
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2] + checks[3],
             failures[0] + failures[1] + failures[2] + failures[3]);
    $finish;
  end
endmodule
