// tb_mips150_dmem: self-checking test of the data memory.
// Random mixes of byte-masked writes and reads against a model; a read
// returns the word as it was before a write on the same edge.
module tb_mips150_dmem;
  localparam int D = 64;
  logic clk = 0;
  logic [5:0] addr;
  logic [3:0] we;
  logic [31:0] wdata, rdata, exp_r;
  logic [31:0] model [D];
  int checks = 0, failures = 0;

  mips150_dmem #(.DEPTH(D)) dut (.clk(clk), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first so the model is known
    for (int i = 0; i < D; i++) begin
      @(negedge clk); addr = 6'(i); we = 4'hF; wdata = $urandom; model[i] = wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      addr = 6'($urandom); we = (n % 2) ? 4'($urandom) : 4'h0; wdata = $urandom;
      exp_r = model[addr];
      for (int b = 0; b < 4; b++) if (we[b]) model[addr][8*b +: 8] = wdata[8*b +: 8];
      @(posedge clk); #1;
      checks++;
      if (rdata !== exp_r) begin
        failures++;
        if (failures < 10) $display("dmem[%0d] read %h expected %h", addr, rdata, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
