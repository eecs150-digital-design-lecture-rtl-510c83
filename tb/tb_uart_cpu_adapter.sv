// tb_uart_cpu_adapter: self-checking test of the memory-mapped serial
// registers. The UART side is driven directly by the testbench. Checks:
// receiver Ready rises when a character arrives and falls when the data
// register is read; receiver data holds the character in bits 7:0 with the
// rest zero; transmitter Ready mirrors the transmitter; a write to the
// transmitter data register starts a send only while Ready is 1; reads
// return data on the clock edge after the request.
module tb_uart_cpu_adapter;
  logic clk = 0, rst = 1;
  logic sel, re, we, tx_valid, tx_ready, rx_valid;
  logic [3:0] offset;
  logic [7:0] wdata, tx_data, rx_data;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  uart_cpu_adapter dut (.clk(clk), .rst(rst), .sel(sel), .offset(offset), .re(re), .we(we),
                        .wdata(wdata), .rdata(rdata), .tx_data(tx_data), .tx_valid(tx_valid),
                        .tx_ready(tx_ready), .rx_data(rx_data), .rx_valid(rx_valid));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_read(logic [3:0] ofs, output logic [31:0] v);
    @(negedge clk); sel = 1; re = 1; we = 0; offset = ofs;
    @(posedge clk); #1 v = rdata;
    @(negedge clk); sel = 0; re = 0;
  endtask

  task automatic bus_write(logic [3:0] ofs, logic [7:0] d, output logic started);
    @(negedge clk); sel = 1; re = 0; we = 1; offset = ofs; wdata = d;
    #1 started = tx_valid;
    check(tx_data == d, "tx data lane");
    @(negedge clk); sel = 0; we = 0;
  endtask

  initial begin
    logic [31:0] v;
    logic st;
    sel = 0; re = 0; we = 0; offset = 0; wdata = 0; tx_ready = 1; rx_valid = 0; rx_data = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    bus_read(4'h0, v); check(v == 32'd0, "rx not ready after reset");
    bus_read(4'h8, v); check(v == 32'd1, "tx ready");
    // a character arrives
    for (int n = 0; n < 20; n++) begin
      logic [7:0] c;
      c = 8'($urandom);
      @(negedge clk); rx_valid = 1; rx_data = c;
      @(negedge clk); rx_valid = 0; rx_data = 8'hEE;
      bus_read(4'h0, v); check(v == 32'd1, "rx ready after arrival");
      bus_read(4'h0, v); check(v == 32'd1, "control read does not clear ready");
      bus_read(4'h4, v); check(v == {24'd0, c}, $sformatf("rx data %h expected %h", v, c));
      bus_read(4'h0, v); check(v == 32'd0, "rx ready cleared by data read");
    end
    // transmit side
    tx_ready = 1;
    bus_write(4'hC, 8'h4B, st); check(st, "write with tx ready starts send");
    tx_ready = 0;
    bus_read(4'h8, v); check(v == 32'd0, "tx busy");
    bus_write(4'hC, 8'h41, st); check(!st, "write while busy ignored");
    bus_write(4'h8, 8'h41, st); check(!st, "write to control does not send");
    tx_ready = 1;
    // an access outside the block does nothing
    @(negedge clk); sel = 0; we = 1; offset = 4'hC; #1 check(!tx_valid, "unselected write");
    @(negedge clk); we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
