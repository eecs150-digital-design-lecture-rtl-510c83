// mips150_regfile: the 32 x 32-bit MIPS register file.
// Two combinational read ports serve the X stage; one write port is written
// on the rising clock edge that ends the M stage, so an instruction two slots
// behind the writer reads the new value in its X stage without any bypass.
// Register $0 always reads as zero and ignores writes. Registers are cleared
// by reset (a choice of this design; the text does not say).
module mips150_regfile (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  ra1,
  output logic [31:0] rd1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd2,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd
);

  logic [31:0] regs [1:31];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == 5'd0) ? 32'd0 : regs[ra1];
  assign rd2 = (ra2 == 5'd0) ? 32'd0 : regs[ra2];

endmodule
