// tb_mips150_decoder: self-checking test of instruction decode.
// Encodes one instruction of each kind with the test assembler and checks
// the fields of the control word that matter for it.
module tb_mips150_decoder;
  import mips150_pkg::*;
  import mips_asm_pkg::*;
  logic [31:0] instr;
  ctrl_t ctrl;
  logic valid;
  int checks = 0, failures = 0;

  mips150_decoder dut (.instr(instr), .ctrl(ctrl), .valid(valid));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ctrl(logic [31:0] i, string name, alu_op_e op, logic bimm, logic rw,
                             int dst, wb_sel_e wb, logic mr, logic mw, br_type_e br);
    instr = i; #1;
    checks++;
    if (!valid || (rw && ctrl.alu_op != op) || ctrl.b_is_imm != bimm || ctrl.reg_write != rw ||
        int'(ctrl.dst) != (rw ? dst : 0) || (rw && ctrl.wb_sel != wb) || ctrl.mem_read != mr ||
        ctrl.mem_write != mw || ctrl.br_type != br) begin
      failures++;
      $display("decode of %s wrong: %p", name, ctrl);
    end
  endtask

  initial begin
    expect_ctrl(a_addu(5, 3, 4),   "addu",  ALU_ADD,  0, 1, 5,  WB_ALU,  0, 0, BR_NONE);
    expect_ctrl(a_add(5, 3, 4),    "add",   ALU_ADD,  0, 1, 5,  WB_ALU,  0, 0, BR_NONE);
    expect_ctrl(a_sub(7, 6, 5),    "sub",   ALU_SUB,  0, 1, 7,  WB_ALU,  0, 0, BR_NONE);
    expect_ctrl(a_and(1, 2, 3),    "and",   ALU_AND,  0, 1, 1,  WB_ALU,  0, 0, BR_NONE);
    expect_ctrl(a_or(1, 2, 3),     "or",    ALU_OR,   0, 1, 1,  WB_ALU,  0, 0, BR_NONE);
    expect_ctrl(a_xor(1, 2, 3),    "xor",   ALU_XOR,  0, 1, 1,  WB_ALU,  0, 0, BR_NONE);
    expect_ctrl(a_nor(1, 2, 3),    "nor",   ALU_NOR,  0, 1, 1,  WB_ALU,  0, 0, BR_NONE);
    expect_ctrl(a_slt(1, 2, 3),    "slt",   ALU_SLT,  0, 1, 1,  WB_ALU,  0, 0, BR_NONE);
    expect_ctrl(a_sltu(1, 2, 3),   "sltu",  ALU_SLTU, 0, 1, 1,  WB_ALU,  0, 0, BR_NONE);
    expect_ctrl(a_sll(9, 8, 3),    "sll",   ALU_SLL,  0, 1, 9,  WB_ALU,  0, 0, BR_NONE);
    expect_ctrl(a_sra(9, 8, 3),    "sra",   ALU_SRA,  0, 1, 9,  WB_ALU,  0, 0, BR_NONE);
    expect_ctrl(a_addiu(8, 9, -3), "addiu", ALU_ADD,  1, 1, 8,  WB_ALU,  0, 0, BR_NONE);
    expect_ctrl(a_andi(9, 9, 1),   "andi",  ALU_AND,  1, 1, 9,  WB_ALU,  0, 0, BR_NONE);
    expect_ctrl(a_lui(8, 16'hffff),"lui",   ALU_LUI,  1, 1, 8,  WB_ALU,  0, 0, BR_NONE);
    expect_ctrl(a_lw(9, 0, 8),     "lw",    ALU_ADD,  1, 1, 9,  WB_MEM,  1, 0, BR_NONE);
    expect_ctrl(a_lbu(9, 1, 8),    "lbu",   ALU_ADD,  1, 1, 9,  WB_MEM,  1, 0, BR_NONE);
    expect_ctrl(a_sw(4, 12, 8),    "sw",    ALU_ADD,  1, 0, 0,  WB_ALU,  0, 1, BR_NONE);
    expect_ctrl(a_beq(9, 0, -3),   "beq",   ALU_ADD,  0, 0, 0,  WB_ALU,  0, 0, BR_EQ);
    expect_ctrl(a_bne(9, 0, -3),   "bne",   ALU_ADD,  0, 0, 0,  WB_ALU,  0, 0, BR_NE);
    expect_ctrl(a_blez(9, 2),      "blez",  ALU_ADD,  0, 0, 0,  WB_ALU,  0, 0, BR_LEZ);
    expect_ctrl(a_bgtz(9, 2),      "bgtz",  ALU_ADD,  0, 0, 0,  WB_ALU,  0, 0, BR_GTZ);
    expect_ctrl(a_bltz(9, 2),      "bltz",  ALU_ADD,  0, 0, 0,  WB_ALU,  0, 0, BR_LTZ);
    expect_ctrl(a_bgez(9, 2),      "bgez",  ALU_ADD,  0, 0, 0,  WB_ALU,  0, 0, BR_GEZ);
    expect_ctrl(a_j(32'h40),       "j",     ALU_ADD,  0, 0, 0,  WB_ALU,  0, 0, BR_J);
    expect_ctrl(a_jal(32'h40),     "jal",   ALU_ADD,  0, 1, 31, WB_LINK, 0, 0, BR_J);
    expect_ctrl(a_jr(31),          "jr",    ALU_ADD,  0, 0, 0,  WB_ALU,  0, 0, BR_JR);
    expect_ctrl(a_jalr(5, 6),      "jalr",  ALU_ADD,  0, 1, 5,  WB_LINK, 0, 0, BR_JR);
    // immediate kinds and load sizes
    instr = a_andi(1, 2, 3); #1; checks++; if (ctrl.imm_kind != IMM_ZEXT) failures++;
    instr = a_slti(1, 2, 3); #1; checks++; if (ctrl.imm_kind != IMM_SEXT || ctrl.alu_op != ALU_SLT) failures++;
    instr = a_lhu(1, 2, 3);  #1; checks++; if (ctrl.mem_size != MEM_HALF || !ctrl.mem_unsigned) failures++;
    instr = a_lb(1, 2, 3);   #1; checks++; if (ctrl.mem_size != MEM_BYTE || ctrl.mem_unsigned) failures++;
    instr = a_sb(1, 2, 3);   #1; checks++; if (ctrl.mem_size != MEM_BYTE || !ctrl.mem_write) failures++;
    instr = a_sllv(1, 2, 3); #1; checks++; if (!ctrl.shamt_var) failures++;
    // writes to $0 are dropped, unknown opcodes are invalid no-ops
    instr = a_addu(0, 1, 2); #1; checks++; if (ctrl.reg_write) failures++;
    instr = {6'h3f, 26'h0};  #1; checks++; if (valid || ctrl.reg_write || ctrl.mem_write) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
