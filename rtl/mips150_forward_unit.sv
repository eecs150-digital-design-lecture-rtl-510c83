// mips150_forward_unit: ALU-result forwarding for the 3-stage pipeline.
// The instruction in M writes the register file only at the end of M, one
// cycle too late for the instruction right behind it in X. When that X
// instruction reads a register the M instruction will write from its ALU
// (or link) result, this unit selects the M-stage result in place of the
// register file output. A load in M is never forwarded: its data arrives
// from memory during M, and the instruction in the load delay slot sees the
// old register value. Register $0 is never forwarded.
// Combinational; fwd_a / fwd_b select the forwarded value for rs / rt.
module mips150_forward_unit (
  input  logic [4:0] x_rs,
  input  logic [4:0] x_rt,
  input  logic       m_reg_write,
  input  logic       m_is_load,
  input  logic [4:0] m_dst,
  output logic       fwd_a,
  output logic       fwd_b
);

  logic m_fwd_ok;
  assign m_fwd_ok = m_reg_write && !m_is_load && (m_dst != 5'd0);
  assign fwd_a = m_fwd_ok && (m_dst == x_rs);
  assign fwd_b = m_fwd_ok && (m_dst == x_rt);

endmodule
