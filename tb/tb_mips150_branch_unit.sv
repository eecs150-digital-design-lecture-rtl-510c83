// tb_mips150_branch_unit: self-checking test of branch resolution.
// For every branch type and random operands, checks the taken decision and
// the next fetch address (delay-slot successor, branch target relative to
// the delay slot, jump region target, or register target).
module tb_mips150_branch_unit;
  import mips150_pkg::*;
  br_type_e br_type;
  logic [31:0] rs_val, rt_val, pc_x, pc_i, next_pc, exp_pc;
  logic [15:0] imm;
  logic [25:0] jidx;
  logic taken, exp_t;
  int checks = 0, failures = 0;

  mips150_branch_unit dut (.br_type(br_type), .rs_val(rs_val), .rt_val(rt_val), .pc_x(pc_x),
                           .pc_i(pc_i), .imm(imm), .jidx(jidx), .taken(taken), .next_pc(next_pc));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t <= int'(BR_JR); t++)
      for (int n = 0; n < 300; n++) begin
        int s;
        br_type = br_type_e'(t);
        rs_val = (n % 5 == 0) ? 32'd0 : $urandom;
        rt_val = (n % 3 == 0) ? rs_val : $urandom;
        pc_x = {$urandom, 2'b00};
        pc_i = pc_x + 4;
        imm = 16'($urandom); jidx = 26'($urandom);
        #1;
        s = $signed(rs_val);
        case (br_type_e'(t))
          BR_EQ:  exp_t = rs_val == rt_val;
          BR_NE:  exp_t = rs_val != rt_val;
          BR_LEZ: exp_t = s <= 0;
          BR_GTZ: exp_t = s > 0;
          BR_LTZ: exp_t = s < 0;
          BR_GEZ: exp_t = s >= 0;
          BR_J, BR_JR: exp_t = 1;
          default: exp_t = 0;
        endcase
        if (!exp_t) exp_pc = pc_i + 4;
        else if (br_type == BR_J) exp_pc = {pc_i[31:28], jidx, 2'b00};
        else if (br_type == BR_JR) exp_pc = rs_val;
        else exp_pc = pc_i + 32'($signed(imm)) * 4;
        checks += 2;
        if (taken !== exp_t) failures++;
        if (next_pc !== exp_pc) begin
          failures++;
          if (failures < 10) $display("type %s next_pc %h expected %h", br_type.name(), next_pc, exp_pc);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
