// mips150_pkg: types and constants shared by the MIPS150 processor blocks.
// It holds the MIPS opcode and function-field encodings used by the decoder,
// the ALU operation and branch-type enumerations, the decoded control word
// carried down the pipeline, and the memory map of the serial line interface.
// The serial register addresses follow the SPIM terminal layout
// (receiver control/data at 0xFFFF0000/4, transmitter control/data at
// 0xFFFF0008/C); the other encodings are standard MIPS-I.
package mips150_pkg;

  // Primary opcodes (instr[31:26])
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_REGIMM = 6'h01;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_BLEZ  = 6'h06;
  localparam logic [5:0] OP_BGTZ  = 6'h07;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_SLTI  = 6'h0a;
  localparam logic [5:0] OP_SLTIU = 6'h0b;
  localparam logic [5:0] OP_ANDI  = 6'h0c;
  localparam logic [5:0] OP_ORI   = 6'h0d;
  localparam logic [5:0] OP_XORI  = 6'h0e;
  localparam logic [5:0] OP_LUI   = 6'h0f;
  localparam logic [5:0] OP_LB    = 6'h20;
  localparam logic [5:0] OP_LH    = 6'h21;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_LBU   = 6'h24;
  localparam logic [5:0] OP_LHU   = 6'h25;
  localparam logic [5:0] OP_SB    = 6'h28;
  localparam logic [5:0] OP_SH    = 6'h29;
  localparam logic [5:0] OP_SW    = 6'h2b;

  // R-type function codes (instr[5:0])
  localparam logic [5:0] FN_SLL  = 6'h00;
  localparam logic [5:0] FN_SRL  = 6'h02;
  localparam logic [5:0] FN_SRA  = 6'h03;
  localparam logic [5:0] FN_SLLV = 6'h04;
  localparam logic [5:0] FN_SRLV = 6'h06;
  localparam logic [5:0] FN_SRAV = 6'h07;
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_JALR = 6'h09;
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_NOR  = 6'h27;
  localparam logic [5:0] FN_SLT  = 6'h2a;
  localparam logic [5:0] FN_SLTU = 6'h2b;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  typedef enum logic [3:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ, BR_J, BR_JR
  } br_type_e;

  typedef enum logic [1:0] { IMM_SEXT, IMM_ZEXT } imm_kind_e;

  typedef enum logic [1:0] { MEM_WORD, MEM_HALF, MEM_BYTE } mem_size_e;

  typedef enum logic [1:0] { WB_ALU, WB_MEM, WB_LINK } wb_sel_e;

  // Decoded control word of one instruction
  typedef struct packed {
    alu_op_e   alu_op;
    logic      b_is_imm;     // ALU operand B is the immediate, not rt
    imm_kind_e imm_kind;
    logic      shamt_var;    // shift amount from rs[4:0] instead of instr[10:6]
    logic      reg_write;
    logic [4:0] dst;          // destination register (0 when none)
    wb_sel_e   wb_sel;
    logic      mem_read;
    logic      mem_write;
    mem_size_e mem_size;
    logic      mem_unsigned;
    br_type_e  br_type;
  } ctrl_t;

  // Memory map
  localparam logic [15:0] IO_PAGE      = 16'hFFFF;  // addresses 0xFFFFxxxx are I/O
  localparam logic [15:0] SERIAL_BASE  = 16'h0000;  // serial registers at 0xFFFF0000..0xFFFF000F
  localparam logic [3:0]  RX_CTRL_OFS  = 4'h0;
  localparam logic [3:0]  RX_DATA_OFS  = 4'h4;
  localparam logic [3:0]  TX_CTRL_OFS  = 4'h8;
  localparam logic [3:0]  TX_DATA_OFS  = 4'hC;


endpackage
