// mips150_branch_unit: branch/jump resolution in the X stage.
// It compares the (forwarded) register operands for the conditional branches
// and chooses the next fetch address. Because the branch resolves in X while
// the delay-slot instruction is being fetched in I, the PC register loads the
// target at the end of X: the delay-slot instruction always executes and no
// instruction is ever squashed.
// Interface: pc_x is the address of the X-stage instruction, pc_i the PC
// register (address being fetched). Branch targets are pc_x + 4 + (imm << 2),
// J/JAL targets {pc_x+4 [31:28], index, 00}, JR/JALR targets rs.
// Combinational.
module mips150_branch_unit
  import mips150_pkg::*;
(
  input  br_type_e    br_type,
  input  logic [31:0] rs_val,
  input  logic [31:0] rt_val,
  input  logic [31:0] pc_x,
  input  logic [31:0] pc_i,
  input  logic [15:0] imm,
  input  logic [25:0] jidx,
  output logic        taken,
  output logic [31:0] next_pc
);

  logic [31:0] pc_x4, br_target, j_target;
  assign pc_x4     = pc_x + 32'd4;
  assign br_target = pc_x4 + {{14{imm[15]}}, imm, 2'b00};
  assign j_target  = {pc_x4[31:28], jidx, 2'b00};

  always_comb begin
    unique case (br_type)
      BR_EQ:   taken = (rs_val == rt_val);
      BR_NE:   taken = (rs_val != rt_val);
      BR_LEZ:  taken = rs_val[31] || (rs_val == 32'd0);
      BR_GTZ:  taken = !rs_val[31] && (rs_val != 32'd0);
      BR_LTZ:  taken = rs_val[31];
      BR_GEZ:  taken = !rs_val[31];
      BR_J:    taken = 1'b1;
      BR_JR:   taken = 1'b1;
      default: taken = 1'b0;
    endcase
  end

  always_comb begin
    if (!taken)                 next_pc = pc_i + 32'd4;
    else if (br_type == BR_J)   next_pc = j_target;
    else if (br_type == BR_JR)  next_pc = rs_val;
    else                        next_pc = br_target;
  end

endmodule
