// tb_mips150_top: end-to-end test of the MIPS150 system at its default
// sizes (4096-word memories, 434 clocks per serial bit).
// A polling console program is loaded into the instruction memory while
// reset is held. For every character that arrives on the serial input it
//   - polls the receiver control register until Ready, reads the character,
//     and in the load delay slot copies the register that is being loaded
//     (so it copies the previous character),
//   - stores a running count and that previous character in data memory,
//   - writes the character to an external device register at 0xFFFF0100 and
//     reads it back (the device model here returns it with bit 5 flipped),
//   - polls the transmitter Ready bit and sends the character, then polls
//     again (the transmitter is now busy) and sends the device's answer.
// The testbench drives 8N1 frames into serial_in, decodes serial_out and
// checks the echoed characters, memory contents and the gap between the two
// echoes. It also counts how often each mechanism of the design happened:
// forwarding, taken branches with their delay slots, the load delay slot,
// receiver polling while empty, transmitter polling while busy, external
// device accesses. A mechanism that never happened counts as a failure.
module tb_mips150_top;
  import mips_asm_pkg::*;
  import mips150_pkg::*;

  localparam int CPB = 434;   // default of mips150_top
  localparam int NCHARS = 4;

  logic        clk = 0, rst = 1;
  logic        serial_in, serial_out;
  logic        imem_load_we;
  logic [11:0] imem_load_addr;
  logic [31:0] imem_load_data;
  logic [15:0] ext_io_addr;
  logic        ext_io_re;
  logic [3:0]  ext_io_we;
  logic [31:0] ext_io_wdata, ext_io_rdata, ext_reg;

  int checks = 0, failures = 0;
  int n_fwd = 0, n_branch = 0, n_load_slot = 0, n_rx_empty = 0, n_tx_busy = 0;
  int n_ext_wr = 0, n_ext_rd = 0;

  mips150_top dut (
    .clk(clk), .rst(rst), .serial_in(serial_in), .serial_out(serial_out),
    .imem_load_we(imem_load_we), .imem_load_addr(imem_load_addr), .imem_load_data(imem_load_data),
    .ext_io_addr(ext_io_addr), .ext_io_re(ext_io_re), .ext_io_we(ext_io_we),
    .ext_io_wdata(ext_io_wdata), .ext_io_rdata(ext_io_rdata)
  );

  always #5 clk = ~clk;

  // external device model: one register at 0xFFFF0100, read back with bit 5 flipped
  always_ff @(posedge clk) begin
    if (rst) ext_reg <= '0;
    else if (ext_io_we != 0 && ext_io_addr == 16'h0100) ext_reg <= ext_io_wdata;
    ext_io_rdata <= ext_reg ^ 32'h20;
  end

  // mechanism counters
  always @(posedge clk) if (!rst) begin
    if (dut.u_cpu.fwd_a || dut.u_cpu.fwd_b) n_fwd++;
    if (dut.u_cpu.br_taken) n_branch++;
    if (dut.u_cpu.m_reg_write && dut.u_cpu.m_wb_sel == WB_MEM &&
        (dut.u_cpu.m_dst == dut.u_cpu.rs || dut.u_cpu.m_dst == dut.u_cpu.rt)) n_load_slot++;
    if (dut.u_adapter.sel && dut.u_adapter.re && dut.u_adapter.offset == 4'h0 && !dut.u_adapter.rx_ready) n_rx_empty++;
    if (dut.u_adapter.sel && dut.u_adapter.re && dut.u_adapter.offset == 4'h8 && !dut.u_adapter.tx_ready) n_tx_busy++;
    if (ext_io_we != 0) n_ext_wr++;
    if (ext_io_re) n_ext_rd++;
  end

  // serial output decoder
  logic [7:0] rxq [$];
  longint frame_start [$];
  longint now = 0;
  always @(posedge clk) now++;

  initial begin
    forever begin
      logic [7:0] b;
      longint t0;
      @(negedge serial_out);
      t0 = now;
      repeat (CPB / 2) @(posedge clk);
      if (serial_out != 1'b0) continue;
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = serial_out;
      end
      repeat (CPB) @(posedge clk);
      checks++;
      if (serial_out != 1'b1) begin failures++; $display("stop bit missing"); end
      rxq.push_back(b);
      frame_start.push_back(t0);
    end
  end

  task automatic send_char(logic [7:0] c);
    logic [9:0] f;
    f = {1'b1, c, 1'b0};
    for (int i = 0; i < 10; i++) begin
      serial_in = f[i];
      repeat (CPB) @(posedge clk);
    end
    serial_in = 1'b1;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prog [30];
    logic [7:0]  sent [NCHARS];
    prog[0]  = a_lui(8, 16'hFFFF);
    prog[1]  = a_addiu(3, 0, 0);
    prog[2]  = a_addiu(2, 0, 0);
    prog[3]  = a_lw(9, 0, 8);          // wait for receiver Ready
    prog[4]  = a_nop();
    prog[5]  = a_andi(9, 9, 1);
    prog[6]  = a_beq(9, 0, -4);
    prog[7]  = a_nop();
    prog[8]  = a_lw(2, 4, 8);          // receiver data
    prog[9]  = a_addu(6, 2, 0);        // load delay slot: previous character
    prog[10] = a_addiu(3, 3, 1);
    prog[11] = a_sw(3, 16'h100, 0);
    prog[12] = a_sw(6, 16'h104, 0);
    prog[13] = a_sw(2, 16'h100, 8);    // external device
    prog[14] = a_lw(5, 16'h100, 8);
    prog[15] = a_nop();
    prog[16] = a_lw(9, 8, 8);          // wait for transmitter Ready
    prog[17] = a_nop();
    prog[18] = a_andi(9, 9, 1);
    prog[19] = a_beq(9, 0, -4);
    prog[20] = a_nop();
    prog[21] = a_sw(2, 12, 8);         // echo
    prog[22] = a_lw(9, 8, 8);          // wait again
    prog[23] = a_nop();
    prog[24] = a_andi(9, 9, 1);
    prog[25] = a_beq(9, 0, -4);
    prog[26] = a_nop();
    prog[27] = a_sw(5, 12, 8);         // device answer
    prog[28] = a_j(32'd3 * 4);
    prog[29] = a_nop();

    serial_in = 1'b1;
    imem_load_we = 0; imem_load_addr = 0; imem_load_data = 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 30; i++) begin
      @(negedge clk);
      imem_load_we = 1; imem_load_addr = 12'(i); imem_load_data = prog[i];
    end
    @(negedge clk); imem_load_we = 0;
    @(negedge clk); rst = 0;
    repeat (3 * CPB) @(posedge clk);

    sent[0] = 8'h4B;  // 'K'
    for (int n = 1; n < NCHARS; n++) sent[n] = 8'h41 + 8'($urandom % 26);
    for (int n = 0; n < NCHARS; n++) begin
      send_char(sent[n]);
      repeat (25 * CPB) @(posedge clk);  // both echoes go out
    end

    checks++;
    if (rxq.size() != 2 * NCHARS) begin
      failures++;
      $display("%0d characters echoed, expected %0d", rxq.size(), 2 * NCHARS);
    end
    for (int n = 0; n < NCHARS && 2 * n + 1 < rxq.size(); n++) begin
      longint gap;
      checks += 3;
      if (rxq[2*n] !== sent[n]) begin failures++; $display("echo %0d: %h expected %h", n, rxq[2*n], sent[n]); end
      if (rxq[2*n+1] !== (sent[n] ^ 8'h20)) begin
        failures++; $display("device answer %0d: %h expected %h", n, rxq[2*n+1], sent[n] ^ 8'h20);
      end
      // the second echo waits only for the first frame to end
      gap = frame_start[2*n+1] - frame_start[2*n];
      if (gap < 10 * CPB || gap > 10 * CPB + 20) begin
        failures++; $display("frames %0d cycles apart, expected a little over %0d", gap, 10 * CPB);
      end
    end
    checks += 2;
    if (dut.u_dmem.mem[64] !== NCHARS) begin failures++; $display("count %0d", dut.u_dmem.mem[64]); end
    if (dut.u_dmem.mem[65] !== {24'd0, sent[NCHARS-2]}) begin
      failures++; $display("load delay slot copy %h expected %h", dut.u_dmem.mem[65], sent[NCHARS-2]);
    end

    $display("forwarding %0d, taken branches %0d, load delay slot uses %0d, rx polls while empty %0d, tx polls while busy %0d, device writes %0d, device reads %0d",
             n_fwd, n_branch, n_load_slot, n_rx_empty, n_tx_busy, n_ext_wr, n_ext_rd);
    checks += 7;
    if (n_fwd == 0)       begin failures++; $display("forwarding never happened"); end
    if (n_branch == 0)    begin failures++; $display("no branch taken"); end
    if (n_load_slot == 0) begin failures++; $display("load delay slot never used"); end
    if (n_rx_empty == 0)  begin failures++; $display("receiver never polled while empty"); end
    if (n_tx_busy == 0)   begin failures++; $display("transmitter never polled while busy"); end
    if (n_ext_wr != NCHARS) begin failures++; $display("device writes %0d", n_ext_wr); end
    if (n_ext_rd != NCHARS) begin failures++; $display("device reads %0d", n_ext_rd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
