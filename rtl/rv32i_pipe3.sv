// rv32i_pipe3: 3-stage pipelined RV32I processor (stages I, X, M).
//
//  I  (instruction fetch): IMEM is read combinationally at the PC and the
//     register file is read with the raw rs1/rs2 fields of the instruction.
//     If the instruction in M is writing one of those registers in this very
//     cycle, its write-back value is taken instead (write-back bypass).
//  X  (execute): the instruction word travels with its operands; here it is
//     decoded, its immediate generated, its operands optionally replaced by
//     the M-stage result (ALU forwarding), branches compared and the ALU
//     evaluated. Branch and jump targets are ready at the end of X. DMEM is
//     addressed by the ALU result: the store is written, and the load read,
//     on the clock edge that starts M.
//  M  (memory): the loaded word is aligned and extended, the write-back value
//     (memory, ALU result or pc+4) is chosen and written to the register file
//     at the end of M.
//
// Hazards (see hazard_unit): ALU results are forwarded from M to X; an
// instruction that reads the destination of a load directly in front of it
// waits one cycle in I (a nop goes to X) and then receives the loaded value
// through the write-back bypass; branches are predicted not taken, and a
// taken branch, JAL or JALR in X kills the instruction in I and refetches at
// the target, costing one cycle. All of these follow the lecture's project
// pipeline summary; resolving JAL in X, the write-back bypass in I and
// decoding in X are this design's choices ("instruction decode and register
// file access is up to you").
//
// Interface: synchronous active-high reset (PC = RESET_PC, bubbles in X and
// M); imem_* loads the program; pc, dmem_* and the ev_* pulses (forward,
// load-use stall, kill, write-back bypass) make the pipeline observable.
module rv32i_pipe3
  import riscv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter word_t       RESET_PC   = 32'h0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       imem_we,
  input  word_t      imem_waddr,
  input  word_t      imem_wdata,
  output word_t      pc,
  output logic [3:0] dmem_we,
  output word_t      dmem_addr,
  output word_t      dmem_wdata,
  output logic       ev_fwd,
  output logic       ev_load_stall,
  output logic       ev_kill,
  output logic       ev_wb_bypass
);
  // ---------------------------------------------------------------- I stage
  word_t inst_i, rf_a, rf_b, rs1v_i, rs2v_i;
  logic  byp_a, byp_b;

  // ---------------------------------------------------------------- X stage
  word_t pc_x, inst_x, rs1v_x, rs2v_x;
  word_t imm_x, opa_x, opb_x, alu_a, alu_b, alu_y, target_x;
  logic  br_eq, br_lt;
  ctrl_t ctrl_x;
  logic  fwd_a, fwd_b, stall, kill_i;

  // ---------------------------------------------------------------- M stage
  word_t      alu_m, pc4_m, mem_word_m, wb_m;
  reg_idx_t   rd_m;
  logic       regwen_m, is_load_m;
  wb_sel_e    wb_sel_m;
  logic [2:0] funct3_m;

  // ================================================================ I stage
  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(pc), .inst(inst_i), .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  regfile u_rf (
    .clk, .rst,
    .addr_a(rs1_of(inst_i)), .addr_b(rs2_of(inst_i)), .addr_d(rd_m),
    .data_d(wb_m), .we(regwen_m),
    .data_a(rf_a), .data_b(rf_b)
  );

  // Register written at the end of M, read in I during the same cycle.
  assign byp_a  = regwen_m && (rd_m != '0) && (rd_m == rs1_of(inst_i));
  assign byp_b  = regwen_m && (rd_m != '0) && (rd_m == rs2_of(inst_i));
  assign rs1v_i = byp_a ? wb_m : rf_a;
  assign rs2v_i = byp_b ? wb_m : rf_b;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc     <= RESET_PC;
      pc_x   <= RESET_PC;
      inst_x <= NOP;
      rs1v_x <= '0;
      rs2v_x <= '0;
    end else if (kill_i) begin
      pc     <= target_x;
      inst_x <= NOP;
    end else if (stall) begin
      inst_x <= NOP;             // PC and the instruction in I hold
    end else begin
      pc     <= pc + 32'd4;
      pc_x   <= pc;
      inst_x <= inst_i;
      rs1v_x <= rs1v_i;
      rs2v_x <= rs2v_i;
    end
  end

  // ================================================================ X stage
  control u_ctrl (.inst(inst_x), .br_eq, .br_lt, .ctrl(ctrl_x));
  imm_gen u_imm  (.inst(inst_x), .imm_sel(ctrl_x.imm_sel), .imm(imm_x));

  hazard_unit u_hz (
    .i_rs1(rs1_of(inst_i)), .i_rs2(rs2_of(inst_i)),
    .i_uses_rs1(uses_rs1(inst_i)), .i_uses_rs2(uses_rs2(inst_i)),
    .x_rs1(rs1_of(inst_x)), .x_rs2(rs2_of(inst_x)), .x_rd(rd_of(inst_x)),
    .x_regwen(ctrl_x.reg_wen), .x_is_load(ctrl_x.is_load), .x_redirect(ctrl_x.pc_sel),
    .m_rd(rd_m), .m_regwen(regwen_m), .m_is_load(is_load_m),
    .fwd_a, .fwd_b, .stall, .kill_i
  );

  // Forwarding muxes in front of the ALU operand muxes and the comparator.
  assign opa_x = fwd_a ? wb_m : rs1v_x;
  assign opb_x = fwd_b ? wb_m : rs2v_x;

  branch_comp u_bc (.a(opa_x), .b(opb_x), .br_un(ctrl_x.br_un), .br_eq, .br_lt);

  assign alu_a = ctrl_x.a_sel ? pc_x  : opa_x;
  assign alu_b = ctrl_x.b_sel ? imm_x : opb_x;

  alu u_alu (.a(alu_a), .b(alu_b), .alu_sel(ctrl_x.alu_sel), .y(alu_y));

  assign target_x = {alu_y[31:1], 1'b0};

  // DMEM: clocked on the edge that starts M.
  assign dmem_addr  = alu_y;
  assign dmem_wdata = store_data(ctrl_x.funct3, opb_x);
  assign dmem_we    = (ctrl_x.mem_rw == MEM_WRITE) ? store_be(ctrl_x.funct3, alu_y[1:0]) : 4'b0;

  dmem #(.WORDS(DMEM_WORDS), .SYNC_READ(1'b1)) u_dmem (
    .clk, .addr(dmem_addr), .wdata(dmem_wdata), .be(dmem_we), .rdata(mem_word_m)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      regwen_m  <= 1'b0;
      is_load_m <= 1'b0;
      rd_m      <= '0;
      alu_m     <= '0;
      pc4_m     <= '0;
      wb_sel_m  <= WB_ALU;
      funct3_m  <= '0;
    end else begin
      regwen_m  <= ctrl_x.reg_wen;
      is_load_m <= ctrl_x.is_load;
      rd_m      <= rd_of(inst_x);
      alu_m     <= alu_y;
      pc4_m     <= pc_x + 32'd4;
      wb_sel_m  <= ctrl_x.wb_sel;
      funct3_m  <= ctrl_x.funct3;
    end
  end

  // ================================================================ M stage
  always_comb begin
    unique case (wb_sel_m)
      WB_MEM:  wb_m = load_extend(funct3_m, alu_m[1:0], mem_word_m);
      WB_ALU:  wb_m = alu_m;
      WB_PC4:  wb_m = pc4_m;
      default: wb_m = alu_m;
    endcase
  end

  // ================================================================ events
  assign ev_fwd        = (fwd_a && uses_rs1(inst_x)) || (fwd_b && uses_rs2(inst_x));
  assign ev_load_stall = stall;
  assign ev_kill       = kill_i;
  assign ev_wb_bypass  = !stall && !kill_i &&
                         ((byp_a && uses_rs1(inst_i)) || (byp_b && uses_rs2(inst_i)));

  // A stall must never coincide with a kill.
  a_stall_kill: assert property (@(posedge clk) disable iff (rst) !(stall && kill_i));
endmodule
