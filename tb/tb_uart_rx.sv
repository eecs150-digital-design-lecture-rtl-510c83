// tb_uart_rx: self-checking test of the UART receiver.
// Drives 8N1 frames on the serial input, including 'K' and random bytes,
// with idle gaps of random length, and checks every received byte and that
// exactly one valid pulse comes per frame. A frame with a low stop bit must
// not be delivered.
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 0, rst = 1;
  logic serial_in;
  logic [7:0] data;
  logic valid;
  int checks = 0, failures = 0, pulses = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk(clk), .rst(rst), .serial_in(serial_in),
                                     .data(data), .valid(valid));
  always #5 clk = ~clk;

  logic [7:0] expq [$];

  always @(posedge clk) if (!rst && valid) begin
    pulses++;
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected byte %h", data); end
    else begin
      logic [7:0] e;
      e = expq.pop_front();
      if (data !== e) begin failures++; $display("received %h expected %h", data, e); end
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(logic [7:0] b, logic stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      serial_in = f[i];
      repeat (CPB) @(posedge clk);
    end
    serial_in = 1;
    repeat (2 + $urandom % (3 * CPB)) @(posedge clk);
  endtask

  initial begin
    int sent;
    serial_in = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    expq.push_back(8'h4B); frame(8'h4B, 1);
    sent = 1;
    for (int n = 0; n < 30; n++) begin
      logic [7:0] b;
      b = 8'($urandom);
      expq.push_back(b); frame(b, 1); sent++;
    end
    frame(8'h55, 0);   // framing error: dropped
    repeat (2 * CPB) @(posedge clk);
    expq.push_back(8'hC3); frame(8'hC3, 1); sent++;
    repeat (2 * CPB) @(posedge clk);
    checks++;
    if (pulses != sent || expq.size() != 0) begin
      failures++;
      $display("%0d bytes delivered for %0d good frames", pulses, sent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
