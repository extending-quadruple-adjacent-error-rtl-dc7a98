// aec_memory: codeword store with an upset-injection port.
//
// DEPTH words of W bits. A write (wr) stores wdata at addr on the rising
// clock edge. A read (rd) returns mem[addr] in rdata one cycle later, with
// rvalid set for that cycle; when wr and rd name the same cycle the read
// sees the old word. The upset port models a particle strike: when seu_en
// is set, the word at seu_addr is XORed with seu_mask at the clock edge
// (after any write of that cycle to the same address). Synchronous,
// active-high reset clears every word to zero, which is a valid codeword
// of a linear code.
//
// Only the existence of a codeword memory and its 4-bit address come from
// the published design; port timing, reset and the upset port are choices
// of this implementation.
module aec_memory #(
  parameter  int unsigned W     = 73,  // word width (a codeword)
  parameter  int unsigned DEPTH = 16,  // number of words
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr,
  input  logic          rd,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata,
  output logic          rvalid,
  input  logic          seu_en,
  input  logic [AW-1:0] seu_addr,
  input  logic [W-1:0]  seu_mask
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < DEPTH; i++) mem[i] <= '0;
      rdata  <= '0;
      rvalid <= 1'b0;
    end else begin
      if (wr) mem[addr] <= wdata;
      if (seu_en) mem[seu_addr] <= ((wr && addr == seu_addr) ? wdata : mem[seu_addr]) ^ seu_mask;
      rvalid <= rd;
      if (rd) rdata <= mem[addr];
    end
  end

endmodule
