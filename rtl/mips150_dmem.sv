// mips150_dmem: data memory.
// A single-port synchronous RAM with a write enable per byte lane (an FPGA
// block RAM). Address, write data and byte enables come from the X stage and
// are sampled on the leading edge of M; a read returns the word during M
// (read-before-write when both happen together). Lane 0 is bits 7:0 and
// holds the byte at the lowest address (little-endian, a choice of this
// design). DEPTH is in 32-bit words; addr is a word address.
module mips150_dmem #(
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [3:0]    we,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int b = 0; b < 4; b++) begin
      if (we[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
    end
    rdata <= mem[addr];
  end

endmodule
