// mips150_alu: the arithmetic/logic unit of the X stage.
// Combinational. It adds, subtracts, does the bitwise operations, signed and
// unsigned set-less-than, the three shifts and the LUI shift-by-16, selected by
// op. Add and subtract wrap around: this processor raises no overflow
// exceptions (a choice of this design; ADD and ADDU behave the same).
// Interface: a and b are the two 32-bit operands (b is rt or the immediate),
// shamt the shift amount; y is ready in the same cycle.
module mips150_alu
  import mips150_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  output logic [31:0] y
);

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_SLL:  y = b << shamt;
      ALU_SRL:  y = b >> shamt;
      ALU_SRA:  y = $unsigned($signed(b) >>> shamt);
      ALU_LUI:  y = {b[15:0], 16'd0};
      default:  y = '0;
    endcase
  end

endmodule
