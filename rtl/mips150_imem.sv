// mips150_imem: instruction memory.
// A single-port synchronous-read RAM (an FPGA block RAM). The PC register
// drives addr during the I stage; the word is captured in the output register
// on the clock edge that ends I, so rdata is the instruction register seen by
// the X stage. Reset clears the output register to a NOP, so the pipeline
// starts empty. A separate write port (load_we/load_addr/load_data) lets a
// host or boot loader fill the memory; it is this design's own addition,
// since the text does not say how programs get into the memory.
// DEPTH is in 32-bit words; addr is a word address.
module mips150_imem #(
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] addr,
  output logic [31:0]   rdata,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [31:0]   load_data
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  always_ff @(posedge clk) begin
    if (rst) rdata <= 32'h0000_0000;
    else     rdata <= mem[addr];
  end

endmodule
