// tb_mips150_imem: self-checking test of the instruction memory.
// Loads random words through the load port, then reads them back one per
// cycle and checks that each word appears in the output register one clock
// after its address, and that reset forces the output to a NOP.
module tb_mips150_imem;
  localparam int D = 256;
  logic clk = 0, rst = 1;
  logic [7:0] addr, load_addr;
  logic [31:0] rdata, load_data;
  logic load_we;
  logic [31:0] model [D];
  int checks = 0, failures = 0;

  mips150_imem #(.DEPTH(D)) dut (.clk(clk), .rst(rst), .addr(addr), .rdata(rdata),
                                 .load_we(load_we), .load_addr(load_addr), .load_data(load_data));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0; load_we = 0; load_addr = 0; load_data = 0;
    @(posedge clk); #1;
    checks++; if (rdata !== 32'd0) failures++;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 8'(i); load_data = $urandom; model[i] = load_data;
    end
    @(negedge clk); load_we = 0; rst = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk); addr = 8'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        if (failures < 10) $display("imem[%0d] = %h expected %h", addr, rdata, model[addr]);
      end
    end
    rst = 1; @(posedge clk); #1;
    checks++; if (rdata !== 32'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
