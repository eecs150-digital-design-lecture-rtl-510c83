// mips150_decoder: instruction decode for the X stage.
// Combinational. It turns a 32-bit MIPS instruction into the control word
// ctrl_t (ALU operation, operand and immediate selection, destination
// register, write-back source, memory access and branch type). The
// instruction set is the commonly used MIPS-I integer subset:
//   R-type: SLL SRL SRA SLLV SRLV SRAV JR JALR ADD ADDU SUB SUBU AND OR XOR
//           NOR SLT SLTU
//   I-type: ADDI ADDIU SLTI SLTIU ANDI ORI XORI LUI LB LH LW LBU LHU SB SH SW
//           BEQ BNE BLEZ BGTZ BLTZ BGEZ
//   J-type: J JAL
// The subset, the absence of overflow traps, and decoding every other
// encoding as a no-operation are choices of this design. valid reports
// whether the encoding was recognised.
module mips150_decoder
  import mips150_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl,
  output logic        valid
);

  logic [5:0] op, fn;
  logic [4:0] rt, rd;
  assign op = instr[31:26];
  assign fn = instr[5:0];
  assign rt = instr[20:16];
  assign rd = instr[15:11];

  always_comb begin
    ctrl = '{alu_op: ALU_ADD, b_is_imm: 1'b0, imm_kind: IMM_SEXT, shamt_var: 1'b0,
             reg_write: 1'b0, dst: 5'd0, wb_sel: WB_ALU, mem_read: 1'b0,
             mem_write: 1'b0, mem_size: MEM_WORD, mem_unsigned: 1'b0,
             br_type: BR_NONE};
    valid = 1'b1;
    unique case (op)
      OP_RTYPE: begin
        ctrl.reg_write = 1'b1;
        ctrl.dst       = rd;
        unique case (fn)
          FN_SLL:  ctrl.alu_op = ALU_SLL;
          FN_SRL:  ctrl.alu_op = ALU_SRL;
          FN_SRA:  ctrl.alu_op = ALU_SRA;
          FN_SLLV: begin ctrl.alu_op = ALU_SLL; ctrl.shamt_var = 1'b1; end
          FN_SRLV: begin ctrl.alu_op = ALU_SRL; ctrl.shamt_var = 1'b1; end
          FN_SRAV: begin ctrl.alu_op = ALU_SRA; ctrl.shamt_var = 1'b1; end
          FN_JR:   begin ctrl.reg_write = 1'b0; ctrl.dst = 5'd0; ctrl.br_type = BR_JR; end
          FN_JALR: begin ctrl.wb_sel = WB_LINK; ctrl.br_type = BR_JR; end
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SLTU: ctrl.alu_op = ALU_SLTU;
          default: begin ctrl.reg_write = 1'b0; ctrl.dst = 5'd0; valid = 1'b0; end
        endcase
      end
      OP_REGIMM: begin
        if (rt == 5'd0)      ctrl.br_type = BR_LTZ;
        else if (rt == 5'd1) ctrl.br_type = BR_GEZ;
        else                 valid = 1'b0;
      end
      OP_J:    ctrl.br_type = BR_J;
      OP_JAL:  begin
        ctrl.br_type = BR_J; ctrl.reg_write = 1'b1; ctrl.dst = 5'd31; ctrl.wb_sel = WB_LINK;
      end
      OP_BEQ:  ctrl.br_type = BR_EQ;
      OP_BNE:  ctrl.br_type = BR_NE;
      OP_BLEZ: ctrl.br_type = BR_LEZ;
      OP_BGTZ: ctrl.br_type = BR_GTZ;
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        ctrl.reg_write = 1'b1;
        ctrl.dst       = rt;
        ctrl.b_is_imm  = 1'b1;
        unique case (op)
          OP_SLTI:  ctrl.alu_op = ALU_SLT;
          OP_SLTIU: ctrl.alu_op = ALU_SLTU;
          OP_ANDI:  begin ctrl.alu_op = ALU_AND; ctrl.imm_kind = IMM_ZEXT; end
          OP_ORI:   begin ctrl.alu_op = ALU_OR;  ctrl.imm_kind = IMM_ZEXT; end
          OP_XORI:  begin ctrl.alu_op = ALU_XOR; ctrl.imm_kind = IMM_ZEXT; end
          OP_LUI:   begin ctrl.alu_op = ALU_LUI; ctrl.imm_kind = IMM_ZEXT; end
          default:  ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        ctrl.reg_write    = 1'b1;
        ctrl.dst          = rt;
        ctrl.b_is_imm     = 1'b1;
        ctrl.wb_sel       = WB_MEM;
        ctrl.mem_read     = 1'b1;
        ctrl.mem_size     = (op == OP_LW) ? MEM_WORD :
                            (op == OP_LH || op == OP_LHU) ? MEM_HALF : MEM_BYTE;
        ctrl.mem_unsigned = (op == OP_LBU || op == OP_LHU);
      end
      OP_SB, OP_SH, OP_SW: begin
        ctrl.b_is_imm  = 1'b1;
        ctrl.mem_write = 1'b1;
        ctrl.mem_size  = (op == OP_SW) ? MEM_WORD : (op == OP_SH) ? MEM_HALF : MEM_BYTE;
      end
      default: valid = 1'b0;
    endcase
    // A write to $0 is no write at all; this keeps forwarding simple.
    if (ctrl.dst == 5'd0) ctrl.reg_write = 1'b0;
  end

endmodule
