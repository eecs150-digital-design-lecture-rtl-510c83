// mips_asm_pkg: a tiny MIPS assembler for the testbenches.
// Each function returns the 32-bit encoding of one instruction, so test
// programs can be written as lists of calls. Encodings follow the MIPS-I
// instruction formats (R: op rs rt rd shamt funct, I: op rs rt imm16,
// J: op index26).
package mips_asm_pkg;

  function automatic logic [31:0] enc_r(input logic [5:0] fn, input int rs, rt, rd, sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] enc_i(input logic [5:0] op, input int rs, rt, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] enc_j(input logic [5:0] op, input logic [31:0] target);
    return {op, target[27:2]};
  endfunction

  function automatic logic [31:0] a_addu (int rd, rs, rt); return enc_r(6'h21, rs, rt, rd); endfunction
  function automatic logic [31:0] a_add  (int rd, rs, rt); return enc_r(6'h20, rs, rt, rd); endfunction
  function automatic logic [31:0] a_subu (int rd, rs, rt); return enc_r(6'h23, rs, rt, rd); endfunction
  function automatic logic [31:0] a_sub  (int rd, rs, rt); return enc_r(6'h22, rs, rt, rd); endfunction
  function automatic logic [31:0] a_and  (int rd, rs, rt); return enc_r(6'h24, rs, rt, rd); endfunction
  function automatic logic [31:0] a_or   (int rd, rs, rt); return enc_r(6'h25, rs, rt, rd); endfunction
  function automatic logic [31:0] a_xor  (int rd, rs, rt); return enc_r(6'h26, rs, rt, rd); endfunction
  function automatic logic [31:0] a_nor  (int rd, rs, rt); return enc_r(6'h27, rs, rt, rd); endfunction
  function automatic logic [31:0] a_slt  (int rd, rs, rt); return enc_r(6'h2a, rs, rt, rd); endfunction
  function automatic logic [31:0] a_sltu (int rd, rs, rt); return enc_r(6'h2b, rs, rt, rd); endfunction
  function automatic logic [31:0] a_sll  (int rd, rt, sh); return enc_r(6'h00, 0, rt, rd, sh); endfunction
  function automatic logic [31:0] a_srl  (int rd, rt, sh); return enc_r(6'h02, 0, rt, rd, sh); endfunction
  function automatic logic [31:0] a_sra  (int rd, rt, sh); return enc_r(6'h03, 0, rt, rd, sh); endfunction
  function automatic logic [31:0] a_sllv (int rd, rt, rs); return enc_r(6'h04, rs, rt, rd); endfunction
  function automatic logic [31:0] a_srav (int rd, rt, rs); return enc_r(6'h07, rs, rt, rd); endfunction
  function automatic logic [31:0] a_jr   (int rs);         return enc_r(6'h08, rs, 0, 0); endfunction
  function automatic logic [31:0] a_jalr (int rd, rs);     return enc_r(6'h09, rs, 0, rd); endfunction
  function automatic logic [31:0] a_addiu(int rt, rs, imm); return enc_i(6'h09, rs, rt, imm); endfunction
  function automatic logic [31:0] a_addi (int rt, rs, imm); return enc_i(6'h08, rs, rt, imm); endfunction
  function automatic logic [31:0] a_slti (int rt, rs, imm); return enc_i(6'h0a, rs, rt, imm); endfunction
  function automatic logic [31:0] a_sltiu(int rt, rs, imm); return enc_i(6'h0b, rs, rt, imm); endfunction
  function automatic logic [31:0] a_andi (int rt, rs, imm); return enc_i(6'h0c, rs, rt, imm); endfunction
  function automatic logic [31:0] a_ori  (int rt, rs, imm); return enc_i(6'h0d, rs, rt, imm); endfunction
  function automatic logic [31:0] a_xori (int rt, rs, imm); return enc_i(6'h0e, rs, rt, imm); endfunction
  function automatic logic [31:0] a_lui  (int rt, imm);     return enc_i(6'h0f, 0, rt, imm); endfunction
  function automatic logic [31:0] a_lw   (int rt, imm, rs); return enc_i(6'h23, rs, rt, imm); endfunction
  function automatic logic [31:0] a_lb   (int rt, imm, rs); return enc_i(6'h20, rs, rt, imm); endfunction
  function automatic logic [31:0] a_lbu  (int rt, imm, rs); return enc_i(6'h24, rs, rt, imm); endfunction
  function automatic logic [31:0] a_lh   (int rt, imm, rs); return enc_i(6'h21, rs, rt, imm); endfunction
  function automatic logic [31:0] a_lhu  (int rt, imm, rs); return enc_i(6'h25, rs, rt, imm); endfunction
  function automatic logic [31:0] a_sw   (int rt, imm, rs); return enc_i(6'h2b, rs, rt, imm); endfunction
  function automatic logic [31:0] a_sh   (int rt, imm, rs); return enc_i(6'h29, rs, rt, imm); endfunction
  function automatic logic [31:0] a_sb   (int rt, imm, rs); return enc_i(6'h28, rs, rt, imm); endfunction
  // Branch offsets are in instructions, relative to the delay slot.
  function automatic logic [31:0] a_beq  (int rs, rt, off); return enc_i(6'h04, rs, rt, off); endfunction
  function automatic logic [31:0] a_bne  (int rs, rt, off); return enc_i(6'h05, rs, rt, off); endfunction
  function automatic logic [31:0] a_blez (int rs, off);     return enc_i(6'h06, rs, 0, off); endfunction
  function automatic logic [31:0] a_bgtz (int rs, off);     return enc_i(6'h07, rs, 0, off); endfunction
  function automatic logic [31:0] a_bltz (int rs, off);     return enc_i(6'h01, rs, 0, off); endfunction
  function automatic logic [31:0] a_bgez (int rs, off);     return enc_i(6'h01, rs, 1, off); endfunction
  function automatic logic [31:0] a_j    (logic [31:0] t);  return enc_j(6'h02, t); endfunction
  function automatic logic [31:0] a_jal  (logic [31:0] t);  return enc_j(6'h03, t); endfunction
  function automatic logic [31:0] a_nop  ();                return 32'h0; endfunction

endpackage
