// mips150_cpu: the MIPS150 3-stage pipelined processor core.
//
// Stages:
//   I  The PC register addresses the instruction memory; the instruction is
//      captured in the memory's output register (the instruction register)
//      at the end of I.
//   X  Decode, register-file read, forwarding, ALU, branch compare and
//      branch/jump target. The data-memory address, store data and byte
//      enables are driven here and sampled by memory on the edge that
//      starts M.
//   M  Load data returns from memory or I/O and is aligned; the result is
//      written into the register file on the edge that ends M.
//
// Hazards are handled without stalling, as the pipeline rules require:
//   * Branch delay slot: a branch resolves in X while the next sequential
//     instruction is fetched; that instruction always executes and the PC
//     loads the target at the end of X.
//   * Load delay slot: load data is known only in M, so the instruction right
//     after a load reads the register's old value. The one after that reads
//     the register file, which was written at the end of the load's M.
//   * ALU results are forwarded from the X/M register to the X-stage
//     operands (mips150_forward_unit).
//
// Interface: imem_addr/imem_rdata connect to a synchronous-read instruction
// memory with a registered, reset-to-NOP output. dmem_* is the data bus:
// byte address, per-lane write strobes and a read request in X, read data
// (already selected among memory and devices) in M. All state changes on the
// rising clock edge; rst is synchronous and active high. The reset PC,
// little-endian byte lanes and ignoring of the low address bits on unaligned
// accesses are choices of this design.
module mips150_cpu
  import mips150_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  // instruction memory
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  // data bus
  output logic [31:0] dmem_addr,
  output logic [3:0]  dmem_we,
  output logic        dmem_re,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata
);

  // ---------------- I stage ----------------
  logic [31:0] pc, next_pc;
  logic [31:0] pc_x;  // address of the instruction in X

  always_ff @(posedge clk) begin
    if (rst) begin
      pc   <= RESET_PC;
      pc_x <= RESET_PC;
    end else begin
      pc   <= next_pc;
      pc_x <= pc;
    end
  end

  assign imem_addr = pc;

  // ---------------- X stage ----------------
  logic [31:0] ir;
  ctrl_t       ctrl;
  logic        instr_valid;
  logic [4:0]  rs, rt;
  logic [31:0] rf_rs, rf_rt, rs_val, rt_val;
  logic [31:0] imm_ext, alu_b, alu_y;
  logic [4:0]  shamt;
  logic        fwd_a, fwd_b;
  logic        br_taken;

  assign ir = imem_rdata;
  assign rs = ir[25:21];
  assign rt = ir[20:16];

  mips150_decoder u_dec (.instr(ir), .ctrl(ctrl), .valid(instr_valid));

  // X/M pipeline register
  logic        m_reg_write;
  logic [4:0]  m_dst;
  wb_sel_e     m_wb_sel;
  logic [31:0] m_result;
  mem_size_e   m_mem_size;
  logic        m_mem_unsigned;
  logic [1:0]  m_addr_lo;
  logic [31:0] wb_data;

  mips150_regfile u_rf (
    .clk(clk), .rst(rst),
    .ra1(rs), .rd1(rf_rs),
    .ra2(rt), .rd2(rf_rt),
    .we(m_reg_write), .wa(m_dst), .wd(wb_data)
  );

  mips150_forward_unit u_fwd (
    .x_rs(rs), .x_rt(rt),
    .m_reg_write(m_reg_write), .m_is_load(m_wb_sel == WB_MEM), .m_dst(m_dst),
    .fwd_a(fwd_a), .fwd_b(fwd_b)
  );

  assign rs_val  = fwd_a ? m_result : rf_rs;
  assign rt_val  = fwd_b ? m_result : rf_rt;
  assign imm_ext = (ctrl.imm_kind == IMM_ZEXT) ? {16'd0, ir[15:0]} : {{16{ir[15]}}, ir[15:0]};
  assign alu_b   = ctrl.b_is_imm ? imm_ext : rt_val;
  assign shamt   = ctrl.shamt_var ? rs_val[4:0] : ir[10:6];

  mips150_alu u_alu (.op(ctrl.alu_op), .a(rs_val), .b(alu_b), .shamt(shamt), .y(alu_y));

  mips150_branch_unit u_br (
    .br_type(ctrl.br_type), .rs_val(rs_val), .rt_val(rt_val),
    .pc_x(pc_x), .pc_i(pc), .imm(ir[15:0]), .jidx(ir[25:0]),
    .taken(br_taken), .next_pc(next_pc)
  );

  // data bus, driven in X and sampled on the leading edge of M
  assign dmem_addr = alu_y;
  assign dmem_re   = ctrl.mem_read;

  always_comb begin
    dmem_we    = 4'b0000;
    dmem_wdata = rt_val;
    if (ctrl.mem_write) begin
      unique case (ctrl.mem_size)
        MEM_BYTE: begin
          dmem_wdata = {4{rt_val[7:0]}};
          dmem_we    = 4'b0001 << alu_y[1:0];
        end
        MEM_HALF: begin
          dmem_wdata = {2{rt_val[15:0]}};
          dmem_we    = alu_y[1] ? 4'b1100 : 4'b0011;
        end
        default: dmem_we = 4'b1111;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      m_reg_write    <= 1'b0;
      m_dst          <= 5'd0;
      m_wb_sel       <= WB_ALU;
      m_result       <= '0;
      m_mem_size     <= MEM_WORD;
      m_mem_unsigned <= 1'b0;
      m_addr_lo      <= 2'd0;
    end else begin
      m_reg_write    <= ctrl.reg_write;
      m_dst          <= ctrl.dst;
      m_wb_sel       <= ctrl.wb_sel;
      m_result       <= (ctrl.wb_sel == WB_LINK) ? pc_x + 32'd8 : alu_y;
      m_mem_size     <= ctrl.mem_size;
      m_mem_unsigned <= ctrl.mem_unsigned;
      m_addr_lo      <= alu_y[1:0];
    end
  end

  // ---------------- M stage ----------------
  logic [31:0] load_data;
  logic [7:0]  ld_byte;
  logic [15:0] ld_half;

  assign ld_byte = dmem_rdata[8*m_addr_lo +: 8];
  assign ld_half = m_addr_lo[1] ? dmem_rdata[31:16] : dmem_rdata[15:0];

  always_comb begin
    unique case (m_mem_size)
      MEM_BYTE: load_data = m_mem_unsigned ? {24'd0, ld_byte} : {{24{ld_byte[7]}}, ld_byte};
      MEM_HALF: load_data = m_mem_unsigned ? {16'd0, ld_half} : {{16{ld_half[15]}}, ld_half};
      default:  load_data = dmem_rdata;
    endcase
  end

  assign wb_data = (m_wb_sel == WB_MEM) ? load_data : m_result;

  // A memory operation is either a read or a write, never both.
  a_mem_rw_excl: assert property (@(posedge clk) disable iff (rst)
                                  !(dmem_re && dmem_we != 4'b0000));

endmodule
