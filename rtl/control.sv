// control: combinational controller of the RV32I datapath.
//
// A case statement on the opcode (inst[6:0]) sets every control signal, with
// safe defaults first (no register write, memory read), as the lecture
// recommends. Branches: ImmSel=B, ASel=1 (pc), BSel=1 (imm), ALUSel=Add, no
// register write; PCSel is 1 when the condition holds, from BrEq and BrLT
// (BNE, BGE and BGEU use their complements; BrUn=1 for BLTU/BGEU). JALR:
// ImmSel=I, ASel=0 (rs1), BSel=1, ALUSel=Add, PCSel=1, WBSel=2 (pc+4). JAL:
// ImmSel=J, ASel=1, BSel=1, ALUSel=Add, PCSel=1, WBSel=2. Loads and stores use
// ALUSel=Add on rs1 and the I or S immediate. The ALU operation of register
// and immediate arithmetic comes from funct3 and inst[30].
// Unknown opcodes (FENCE, SYSTEM and illegal ones) act as nops.
//
// Interface: inst, br_eq, br_lt in; ctrl (riscv_pkg::ctrl_t) out. No state.
module control
  import riscv_pkg::*;
(
  input  word_t inst,
  input  logic  br_eq,
  input  logic  br_lt,
  output ctrl_t ctrl
);
  logic [6:0] opcode;
  logic [2:0] funct3;
  logic       f7b5;

  assign opcode = inst[6:0];
  assign funct3 = inst[14:12];
  assign f7b5   = inst[30];

  function automatic alu_op_e arith_op(logic [2:0] f3, logic alt, logic is_reg);
    case (f3)
      3'b000:  return (is_reg && alt) ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return alt ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    // Defaults: do nothing visible.
    ctrl.pc_sel  = 1'b0;
    ctrl.imm_sel = IMM_I;
    ctrl.reg_wen = 1'b0;
    ctrl.br_un   = 1'b0;
    ctrl.b_sel   = 1'b0;
    ctrl.a_sel   = 1'b0;
    ctrl.alu_sel = ALU_ADD;
    ctrl.mem_rw  = MEM_READ;
    ctrl.wb_sel  = WB_ALU;
    ctrl.is_load = 1'b0;
    ctrl.funct3  = funct3;

    case (opcode)
      OP_REG: begin
        ctrl.reg_wen = 1'b1;
        ctrl.alu_sel = arith_op(funct3, f7b5, 1'b1);
      end
      OP_IMM: begin
        ctrl.reg_wen = 1'b1;
        ctrl.b_sel   = 1'b1;
        ctrl.alu_sel = arith_op(funct3, f7b5, 1'b0);
      end
      OP_LOAD: begin
        ctrl.reg_wen = 1'b1;
        ctrl.b_sel   = 1'b1;
        ctrl.wb_sel  = WB_MEM;
        ctrl.is_load = 1'b1;
      end
      OP_STORE: begin
        ctrl.imm_sel = IMM_S;
        ctrl.b_sel   = 1'b1;
        ctrl.mem_rw  = MEM_WRITE;
      end
      OP_BRANCH: begin
        ctrl.imm_sel = IMM_B;
        ctrl.a_sel   = 1'b1;
        ctrl.b_sel   = 1'b1;
        ctrl.br_un   = funct3[1];          // BLTU, BGEU
        case (funct3)
          3'b000:  ctrl.pc_sel =  br_eq;   // BEQ
          3'b001:  ctrl.pc_sel = !br_eq;   // BNE
          3'b100,
          3'b110:  ctrl.pc_sel =  br_lt;   // BLT, BLTU
          3'b101,
          3'b111:  ctrl.pc_sel = !br_lt;   // BGE, BGEU: !(A < B)
          default: ctrl.pc_sel = 1'b0;
        endcase
      end
      OP_JALR: begin
        ctrl.pc_sel  = 1'b1;
        ctrl.reg_wen = 1'b1;
        ctrl.b_sel   = 1'b1;
        ctrl.wb_sel  = WB_PC4;
      end
      OP_JAL: begin
        ctrl.pc_sel  = 1'b1;
        ctrl.imm_sel = IMM_J;
        ctrl.reg_wen = 1'b1;
        ctrl.a_sel   = 1'b1;
        ctrl.b_sel   = 1'b1;
        ctrl.wb_sel  = WB_PC4;
      end
      OP_LUI: begin
        ctrl.imm_sel = IMM_U;
        ctrl.reg_wen = 1'b1;
        ctrl.b_sel   = 1'b1;
        ctrl.alu_sel = ALU_PASSB;
      end
      OP_AUIPC: begin
        ctrl.imm_sel = IMM_U;
        ctrl.reg_wen = 1'b1;
        ctrl.a_sel   = 1'b1;
        ctrl.b_sel   = 1'b1;
      end
      default: ;
    endcase
  end
endmodule
