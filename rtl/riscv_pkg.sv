// riscv_pkg: types, constants and small helper functions shared by the
// RV32I single-cycle processor and the 3-stage (I/X/M) pipelined processor.
//
// The control-signal names (PCSel, ImmSel, RegWEn, BrUn, BSel, ASel, ALUSel,
// MemRW, WBSel) and the mux input numbering (PCSel 0 = pc+4 / 1 = alu,
// ASel 0 = rs1 / 1 = pc, BSel 0 = rs2 / 1 = imm, WBSel 0 = mem / 1 = alu /
// 2 = pc+4) follow the classic RISC-V teaching datapath. The enum encodings of
// ImmSel and ALUSel are this design's own. Opcode and funct3 values are the
// RV32I base ISA encodings.
package riscv_pkg;

  localparam int unsigned XLEN = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // RV32I major opcodes (inst[6:0])
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;

  // A bubble: addi x0, x0, 0
  localparam word_t NOP = 32'h0000_0013;

  typedef enum logic [2:0] {
    IMM_I, IMM_S, IMM_B, IMM_U, IMM_J
  } imm_sel_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU,
    ALU_XOR, ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

  typedef enum logic [1:0] {
    WB_MEM = 2'd0, WB_ALU = 2'd1, WB_PC4 = 2'd2
  } wb_sel_e;

  typedef enum logic {
    MEM_READ = 1'b0, MEM_WRITE = 1'b1
  } mem_rw_e;

  // Everything the controller drives (one bundle, so that it can be carried
  // down a pipeline as a unit).
  typedef struct packed {
    logic     pc_sel;   // 0: pc+4, 1: ALU result
    imm_sel_e imm_sel;
    logic     reg_wen;
    logic     br_un;
    logic     b_sel;    // 0: Reg[rs2], 1: imm
    logic     a_sel;    // 0: Reg[rs1], 1: pc
    alu_op_e  alu_sel;
    mem_rw_e  mem_rw;
    wb_sel_e  wb_sel;
    logic     is_load;
    logic [2:0] funct3; // access size for loads and stores
  } ctrl_t;

  function automatic reg_idx_t rs1_of(word_t inst); return inst[19:15]; endfunction
  function automatic reg_idx_t rs2_of(word_t inst); return inst[24:20]; endfunction
  function automatic reg_idx_t rd_of (word_t inst); return inst[11:7];  endfunction

  // Does the instruction read rs1 / rs2? Used by the load-use check so that
  // immediate bits of LUI/AUIPC/JAL are not mistaken for register numbers.
  function automatic logic uses_rs1(word_t inst);
    case (inst[6:0])
      OP_JALR, OP_BRANCH, OP_LOAD, OP_STORE, OP_IMM, OP_REG: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic uses_rs2(word_t inst);
    case (inst[6:0])
      OP_BRANCH, OP_STORE, OP_REG: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // Does the instruction write rd? (x0 is filtered by the caller.)
  function automatic logic writes_rd(word_t inst);
    case (inst[6:0])
      OP_LUI, OP_AUIPC, OP_JAL, OP_JALR, OP_LOAD, OP_IMM, OP_REG: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // Store: byte enables for an access of size funct3[1:0] at byte offset off.
  function automatic logic [3:0] store_be(logic [2:0] funct3, logic [1:0] off);
    case (funct3[1:0])
      2'b00:   return 4'b0001 << off;
      2'b01:   return off[1] ? 4'b1100 : 4'b0011;
      default: return 4'b1111;
    endcase
  endfunction

  // Store: replicate the low byte/half of rs2 onto every lane it may occupy.
  function automatic word_t store_data(logic [2:0] funct3, word_t rs2);
    case (funct3[1:0])
      2'b00:   return {4{rs2[7:0]}};
      2'b01:   return {2{rs2[15:0]}};
      default: return rs2;
    endcase
  endfunction

  // Load: pick the addressed byte/half out of the word and extend it
  // (funct3[2] = 1 means zero extension: LBU, LHU).
  function automatic word_t load_extend(logic [2:0] funct3, logic [1:0] off, word_t w);
    logic [7:0]  b;
    logic [15:0] h;
    b = w[8*off +: 8];
    h = off[1] ? w[31:16] : w[15:0];
    case (funct3)
      3'b000:  return {{24{b[7]}}, b};
      3'b100:  return {24'b0, b};
      3'b001:  return {{16{h[15]}}, h};
      3'b101:  return {16'b0, h};
      default: return w;
    endcase
  endfunction

endpackage
