// aec_memory_tb: random writes, reads and upset injections against a
// shadow array kept by the testbench. Checks the one-cycle read latency
// (rvalid and rdata the cycle after rd), read-before-write on the same
// cycle, that an upset XORs its mask into exactly one word, and that
// reset clears every word.
module aec_memory_tb;
  localparam int unsigned W = 73, DEPTH = 16, AW = 4;

  int checks = 0, failures = 0;
  logic          clk = 1'b0, rst, wr, rd, rvalid, seu_en;
  logic [AW-1:0] addr, seu_addr;
  logic [W-1:0]  wdata, rdata, seu_mask;
  logic [W-1:0]  shadow [DEPTH];
  logic [W-1:0]  exp_data;
  logic          exp_valid;

  aec_memory #(.W(W), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .wr(wr), .rd(rd), .addr(addr), .wdata(wdata),
    .rdata(rdata), .rvalid(rvalid), .seu_en(seu_en), .seu_addr(seu_addr),
    .seu_mask(seu_mask)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    rst = 1'b1; wr = 1'b0; rd = 1'b0; seu_en = 1'b0;
    addr = '0; seu_addr = '0; wdata = '0; seu_mask = '0;
    foreach (shadow[i]) shadow[i] = '0;
    exp_valid = 1'b0; exp_data = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      // drive a random operation for the next edge
      wr       = ($urandom_range(0, 2) == 0);
      rd       = ($urandom_range(0, 1) == 0);
      seu_en   = ($urandom_range(0, 5) == 0);
      addr     = AW'($urandom());
      seu_addr = AW'($urandom());
      wdata    = {$urandom(), $urandom(), $urandom()};
      seu_mask = W'(7) << $urandom_range(0, W - 3);
      if (t == 1000) rst = 1'b1;
      @(posedge clk);
      // reference behaviour at this edge
      if (rst) begin
        foreach (shadow[i]) shadow[i] = '0;
        exp_valid = 1'b0;
      end else begin
        exp_valid = rd;
        if (rd) exp_data = shadow[addr];
        if (wr) shadow[addr] = wdata;
        if (seu_en) shadow[seu_addr] ^= seu_mask;
      end
      #1;
      check(rvalid == exp_valid, "rvalid");
      if (exp_valid) check(rdata == exp_data, $sformatf("read data t=%0d", t));
      rst = 1'b0;
    end
    // read back everything
    wr = 1'b0; seu_en = 1'b0; rd = 1'b1;
    for (int unsigned a = 0; a < DEPTH; a++) begin
      addr = AW'(a);
      @(posedge clk);
      #1;
      check(rvalid && rdata == shadow[a], $sformatf("final read %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
