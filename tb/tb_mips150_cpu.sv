// tb_mips150_cpu: self-checking test of the 3-stage processor core.
// The core runs a test program from a model instruction memory (synchronous
// read, output reset to NOP) against a model data memory. The program
// exercises ALU forwarding into operands, store data and branch compares,
// the load delay slot (the next instruction sees the old value), the branch
// delay slot (always executed, the instruction after it skipped), a counted
// loop, JAL/JR with their delay slots, shifts, compares, byte and halfword
// loads and stores. It then stores every register to memory; the testbench
// compares them with values worked out by hand. Because the pipeline never
// stalls, every instruction takes one cycle: the final marker store, the
// 110th instruction executed, must reach memory on the 111th clock edge.
module tb_mips150_cpu;
  import mips_asm_pkg::*;

  logic clk = 0, rst = 1;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic [3:0]  dmem_we;
  logic        dmem_re;
  logic [31:0] imem [256];
  logic [31:0] dmem [1024];
  int checks = 0, failures = 0, cyc = 0, marker_cyc = -1;

  mips150_cpu dut (.clk(clk), .rst(rst), .imem_addr(imem_addr), .imem_rdata(imem_rdata),
                   .dmem_addr(dmem_addr), .dmem_we(dmem_we), .dmem_re(dmem_re),
                   .dmem_wdata(dmem_wdata), .dmem_rdata(dmem_rdata));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    imem_rdata <= rst ? 32'd0 : imem[imem_addr[9:2]];
    dmem_rdata <= dmem[dmem_addr[11:2]];
    for (int b = 0; b < 4; b++) if (dmem_we[b]) dmem[dmem_addr[11:2]][8*b +: 8] <= dmem_wdata[8*b +: 8];
    if (!rst) begin
      if (dmem_we != 0 && dmem_addr == 32'h300 && marker_cyc < 0) marker_cyc <= cyc;
      cyc <= cyc + 1;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_r [32];
    foreach (imem[i]) imem[i] = 32'd0;
    foreach (dmem[i]) dmem[i] = 32'd0;
    imem[0]  = a_addiu(1, 0, 5);
    imem[1]  = a_addiu(2, 1, 7);       // rs forwarded
    imem[2]  = a_addu(3, 2, 1);        // rs forwarded, rt from register file
    imem[3]  = a_sw(3, 16'h100, 0);    // store data forwarded
    imem[4]  = a_lw(4, 16'h100, 0);
    imem[5]  = a_addu(5, 4, 0);        // load delay slot: old $4
    imem[6]  = a_addu(6, 4, 0);        // new $4
    imem[7]  = a_beq(0, 0, 2);         // to 10
    imem[8]  = a_addiu(7, 0, 1);       // branch delay slot, executes
    imem[9]  = a_addiu(8, 0, 1);       // skipped
    imem[10] = a_addiu(10, 0, 0);
    imem[11] = a_addiu(11, 0, 10);
    imem[12] = a_addu(10, 10, 11);     // loop
    imem[13] = a_addiu(11, 11, -1);
    imem[14] = a_bne(11, 0, -3);       // compare on forwarded $11
    imem[15] = a_addiu(12, 12, 1);     // delay slot, every iteration
    imem[16] = a_jal(32'd21 * 4);
    imem[17] = a_addiu(13, 0, 3);      // delay slot of jal
    imem[18] = a_lui(16, 16'h8000);
    imem[19] = a_j(32'd24 * 4);
    imem[20] = a_nop();
    imem[21] = a_addiu(14, 0, 16'h77); // subroutine
    imem[22] = a_jr(31);
    imem[23] = a_addiu(15, 0, 9);      // delay slot of jr
    imem[24] = a_ori(16, 16, 16'h00F0);
    imem[25] = a_sra(17, 16, 4);
    imem[26] = a_srl(18, 16, 4);
    imem[27] = a_slt(19, 16, 0);
    imem[28] = a_sltu(20, 16, 0);
    imem[29] = a_sb(16, 16'h104, 0);
    imem[30] = a_addiu(21, 0, -2);
    imem[31] = a_sh(21, 16'h106, 0);
    imem[32] = a_lw(22, 16'h104, 0);
    imem[33] = a_lb(23, 16'h104, 0);
    imem[34] = a_lbu(24, 16'h104, 0);
    imem[35] = a_lh(25, 16'h106, 0);
    imem[36] = a_lhu(26, 16'h106, 0);
    imem[37] = a_nor(27, 0, 0);
    imem[38] = a_bltz(16, 2);          // taken, to 41
    imem[39] = a_addiu(28, 0, 1);      // delay slot
    imem[40] = a_addiu(29, 0, 1);      // skipped
    imem[41] = a_bgez(16, 5);          // not taken
    imem[42] = a_addiu(30, 0, 2);
    imem[43] = a_addiu(9, 0, 3);
    for (int r = 1; r < 32; r++) imem[43 + r] = a_sw(r, 16'h200 + 4 * r, 0);
    imem[75] = a_sw(27, 16'h300, 0);   // marker
    imem[76] = a_j(32'd76 * 4);
    imem[77] = a_nop();

    exp_r = '{32'd0, 32'd5, 32'd12, 32'd17, 32'd17, 32'd0, 32'd17, 32'd1, 32'd0, 32'd3,
              32'd55, 32'd0, 32'd10, 32'd3, 32'h77, 32'd9, 32'h8000_00F0, 32'hF800_000F,
              32'h0800_000F, 32'd1, 32'd0, 32'hFFFF_FFFE, 32'hFFFE_00F0, 32'hFFFF_FFF0,
              32'h0000_00F0, 32'hFFFF_FFFE, 32'h0000_FFFE, 32'hFFFF_FFFF, 32'd1, 32'd0,
              32'd2, 32'd72};

    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (marker_cyc >= 0);
    repeat (5) @(posedge clk);
    for (int r = 1; r < 32; r++) begin
      checks++;
      if (dmem[(32'h200 + 4 * r) / 4] !== exp_r[r]) begin
        failures++;
        $display("$%0d = %h, expected %h", r, dmem[(32'h200 + 4 * r) / 4], exp_r[r]);
      end
    end
    checks++;
    if (dmem[32'h100 / 4] !== 32'd17) begin failures++; $display("word at 0x100 wrong"); end
    checks++;
    if (marker_cyc != 110) begin
      failures++;
      $display("marker store on clock edge %0d, expected 110 (one instruction per cycle)", marker_cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
