// hazard_unit: hazard detection for the 3-stage (I/X/M) RV32I pipeline.
//
// Purely combinational; it sees the source registers of the instructions in
// I and X and the destinations of the instructions in X and M.
//  * Data hazard: when the instruction in M writes a non-zero register that
//    the instruction in X reads, and M is not a load, fwd_a / fwd_b select
//    the M-stage result instead of the value read from the register file
//    ("selectively forward the ALU result back to the input of the ALU").
//  * Load hazard: when X holds a load whose destination is a register the
//    instruction in I reads, stall is raised: the PC and the instruction in I
//    hold for one cycle and a nop enters X. Independent instructions after a
//    load are not delayed.
//  * Control hazard: with predict-not-taken, a taken branch or a jump in X
//    (x_redirect) raises kill_i, turning the instruction in I into a nop.
//    A redirect overrides a stall, since the stalled instruction is killed.
// The detection rules are the standard ones; the lecture gives the three
// policies but leaves the exact logic to the designer.
module hazard_unit
  import riscv_pkg::*;
(
  input  reg_idx_t i_rs1,
  input  reg_idx_t i_rs2,
  input  logic     i_uses_rs1,
  input  logic     i_uses_rs2,
  input  reg_idx_t x_rs1,
  input  reg_idx_t x_rs2,
  input  reg_idx_t x_rd,
  input  logic     x_regwen,
  input  logic     x_is_load,
  input  logic     x_redirect,
  input  reg_idx_t m_rd,
  input  logic     m_regwen,
  input  logic     m_is_load,
  output logic     fwd_a,
  output logic     fwd_b,
  output logic     stall,
  output logic     kill_i
);
  logic m_fwd_ok, load_use;

  always_comb begin
    m_fwd_ok = m_regwen && !m_is_load && (m_rd != '0);
    fwd_a    = m_fwd_ok && (m_rd == x_rs1);
    fwd_b    = m_fwd_ok && (m_rd == x_rs2);

    load_use = x_is_load && x_regwen && (x_rd != '0) &&
               ((i_uses_rs1 && (i_rs1 == x_rd)) || (i_uses_rs2 && (i_rs2 == x_rd)));
    kill_i   = x_redirect;
    stall    = load_use && !x_redirect;
  end
endmodule
