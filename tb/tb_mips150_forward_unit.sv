// tb_mips150_forward_unit: self-checking test of the forwarding selection.
// Sweeps all register pairs and M-stage states and checks that the ALU
// result is forwarded exactly when the M instruction writes a nonzero
// register read in X and is not a load.
module tb_mips150_forward_unit;
  logic [4:0] x_rs, x_rt, m_dst;
  logic m_reg_write, m_is_load, fwd_a, fwd_b;
  int checks = 0, failures = 0;

  mips150_forward_unit dut (.x_rs(x_rs), .x_rt(x_rt), .m_reg_write(m_reg_write),
                            .m_is_load(m_is_load), .m_dst(m_dst), .fwd_a(fwd_a), .fwd_b(fwd_b));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ea, eb;
    for (int d = 0; d < 32; d++)
      for (int s = 0; s < 32; s++)
        for (int k = 0; k < 4; k++) begin
          m_dst = 5'(d); x_rs = 5'(s); x_rt = 5'((s * 7 + d) % 32);
          m_reg_write = k[0]; m_is_load = k[1];
          #1;
          ea = k[0] && !k[1] && d != 0 && d == s;
          eb = k[0] && !k[1] && d != 0 && d == int'(x_rt);
          checks += 2;
          if (fwd_a !== ea) failures++;
          if (fwd_b !== eb) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
