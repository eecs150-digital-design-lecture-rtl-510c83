// tb_mips150_alu: self-checking test of the ALU.
// Drives 400 random operand pairs (plus corner values) through every ALU
// operation and compares the result with a reference computed here from
// the MIPS definitions of the operations.
module tb_mips150_alu;
  import mips150_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y, exp_y;
  logic [4:0]  shamt;
  int checks = 0, failures = 0;

  mips150_alu dut (.op(op), .a(a), .b(b), .shamt(shamt), .y(y));

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z, logic [4:0] s);
    longint sx, sz;
    sx = longint'($signed(x));
    sz = longint'($signed(z));
    case (o)
      ALU_ADD:  return 32'(longint'(x) + longint'(z));
      ALU_SUB:  return 32'(longint'(x) - longint'(z));
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~(x | z);
      ALU_SLT:  return (sx < sz) ? 32'd1 : 32'd0;
      ALU_SLTU: return (longint'(x) < longint'(z)) ? 32'd1 : 32'd0;
      ALU_SLL:  return 32'(longint'(z) * (longint'(1) << s));
      ALU_SRL:  return 32'(longint'(z) / (longint'(1) << s));
      ALU_SRA:  begin
                  logic [31:0] r;
                  r = z;
                  for (int k = 0; k < 32; k++) if (k < s) r = {z[31], r[31:1]};
                  return r;
                end
      ALU_LUI:  return {z[15:0], 16'h0000};
      default:  return 32'd0;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1234_5678};
    for (int o = 0; o <= int'(ALU_LUI); o++) begin
      for (int n = 0; n < 436; n++) begin
        op = alu_op_e'(o);
        if (n < 36) begin a = corners[n % 6]; b = corners[n / 6]; end
        else begin a = $urandom; b = $urandom; end
        shamt = 5'($urandom);
        #1;
        exp_y = ref_alu(op, a, b, shamt);
        checks++;
        if (y !== exp_y) begin
          failures++;
          if (failures < 10) $display("ALU mismatch op=%s a=%h b=%h sh=%0d y=%h exp=%h", op.name(), a, b, shamt, y, exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
