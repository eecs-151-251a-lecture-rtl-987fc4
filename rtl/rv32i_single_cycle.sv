// rv32i_single_cycle: single-cycle RV32I processor.
//
// Every instruction completes in one clock cycle. The datapath is the one the
// lecture builds up: pc register, +4 adder, PCSel mux (0: pc+4, 1: ALU
// result), IMEM, register file read by inst[19:15]/inst[24:20] and written at
// inst[11:7], immediate generator on inst[31:7], branch comparator on the two
// register values, ASel mux (0: Reg[rs1], 1: pc) and BSel mux (0: Reg[rs2],
// 1: imm) into the ALU, DMEM addressed by the ALU result with Reg[rs2] as
// write data, and the WBSel mux (0: mem, 1: alu, 2: pc+4) feeding the
// register file. A combinational controller drives all select lines.
//
// Timing: the critical path is PC -> IMEM -> register file -> ALU -> DMEM ->
// write-back mux -> register file setup. The register file, DMEM and PC are
// written on the rising edge; reset (synchronous, active high) sets the PC to
// RESET_PC. Own choices beyond the lecture: byte/half loads and stores
// (extension done here, byte lanes in DMEM), LUI/AUIPC, and clearing bit 0 of
// the JALR target as the RISC-V ISA requires.
//
// Interface: imem_we/imem_waddr/imem_wdata load the program; pc and the
// dmem_* outputs show the fetch address and the store traffic.
module rv32i_single_cycle
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
  output word_t      dmem_wdata
);
  word_t inst, pc_plus4, pc_next, imm, rs1_val, rs2_val;
  word_t alu_a, alu_b, alu_y, mem_word, load_val, wb;
  logic  br_eq, br_lt;
  ctrl_t ctrl;

  // ---- PC and fetch ----
  assign pc_plus4 = pc + 32'd4;
  assign pc_next  = ctrl.pc_sel ? {alu_y[31:1], 1'b0} : pc_plus4;

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;
  end

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(pc), .inst, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  // ---- decode, register read, immediate ----
  control u_ctrl (.inst, .br_eq, .br_lt, .ctrl);

  regfile u_rf (
    .clk, .rst,
    .addr_a(rs1_of(inst)), .addr_b(rs2_of(inst)), .addr_d(rd_of(inst)),
    .data_d(wb), .we(ctrl.reg_wen),
    .data_a(rs1_val), .data_b(rs2_val)
  );

  imm_gen u_imm (.inst, .imm_sel(ctrl.imm_sel), .imm);

  // ---- execute ----
  branch_comp u_bc (.a(rs1_val), .b(rs2_val), .br_un(ctrl.br_un), .br_eq, .br_lt);

  assign alu_a = ctrl.a_sel ? pc  : rs1_val;
  assign alu_b = ctrl.b_sel ? imm : rs2_val;

  alu u_alu (.a(alu_a), .b(alu_b), .alu_sel(ctrl.alu_sel), .y(alu_y));

  // ---- memory ----
  assign dmem_addr  = alu_y;
  assign dmem_wdata = store_data(ctrl.funct3, rs2_val);
  assign dmem_we    = (ctrl.mem_rw == MEM_WRITE) ? store_be(ctrl.funct3, alu_y[1:0]) : 4'b0;

  dmem #(.WORDS(DMEM_WORDS), .SYNC_READ(1'b0)) u_dmem (
    .clk, .addr(dmem_addr), .wdata(dmem_wdata), .be(dmem_we), .rdata(mem_word)
  );

  assign load_val = load_extend(ctrl.funct3, alu_y[1:0], mem_word);

  // ---- write back ----
  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb = load_val;
      WB_ALU:  wb = alu_y;
      WB_PC4:  wb = pc_plus4;
      default: wb = alu_y;
    endcase
  end
endmodule
