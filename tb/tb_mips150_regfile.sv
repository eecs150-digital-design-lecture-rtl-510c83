// tb_mips150_regfile: self-checking test of the register file.
// Random writes and reads against a model array: a write becomes visible
// on the cycle after its clock edge, $0 stays zero, reset clears all.
module tb_mips150_regfile;
  logic clk = 0, rst = 1;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic we;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  mips150_regfile dut (.clk(clk), .rst(rst), .ra1(ra1), .rd1(rd1), .ra2(ra2), .rd2(rd2),
                       .we(we), .wa(wa), .wd(wd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); @(posedge clk);
    rst <= 0;
    // after reset every register reads zero
    for (int r = 0; r < 32; r++) begin
      ra1 = 5'(r); ra2 = 5'(31 - r); #1;
      check(rd1, 32'd0, "reset rd1");
      check(rd2, 32'd0, "reset rd2");
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0;
      wa = 5'($urandom);
      wd = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom);
      #1;
      check(rd1, model[ra1], "rd1");
      check(rd2, model[ra2], "rd2");
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
