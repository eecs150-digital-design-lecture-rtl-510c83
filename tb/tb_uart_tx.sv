// tb_uart_tx: self-checking test of the UART transmitter.
// Sends ASCII 'K' (0x4B, bits 1 1 0 1 0 0 1 0 from the least significant
// end) and random bytes, samples the line in the middle of every bit and
// checks start bit, data bits LSB first and stop bit. Also checks that
// ready stays low for exactly 10 bit times per frame.
module tb_uart_tx;
  localparam int CPB = 16;
  logic clk = 0, rst = 1;
  logic [7:0] data;
  logic valid, ready, serial_out;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk(clk), .rst(rst), .data(data), .valid(valid),
                                     .ready(ready), .serial_out(serial_out));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic send_and_check(logic [7:0] b);
    int busy;
    @(negedge clk);
    check(ready && serial_out, "idle before frame");
    data = b; valid = 1;
    @(negedge clk); valid = 0; data = 8'hAA;
    // now one cycle into the start bit: move to its middle
    repeat (CPB / 2 - 1) @(negedge clk);
    check(serial_out == 1'b0, "start bit");
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(negedge clk);
      check(serial_out == b[i], $sformatf("data bit %0d of %h", i, b));
    end
    repeat (CPB) @(negedge clk);
    check(serial_out == 1'b1, "stop bit");
    busy = CPB / 2 - 1 + 9 * CPB;  // negedges counted since the one after acceptance
    while (!ready) begin @(negedge clk); busy++; end
    check(busy == 10 * CPB, $sformatf("frame length %0d cycles, expected %0d", busy, 10 * CPB));
  endtask

  initial begin
    valid = 0; data = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    send_and_check(8'h4B);   // 'K'
    for (int n = 0; n < 20; n++) send_and_check(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
