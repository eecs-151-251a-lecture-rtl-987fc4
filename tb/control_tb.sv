// control_tb: checks the controller's outputs for each instruction kind
// against a table of expected settings (the branch, JALR and JAL rows follow
// the settings printed on the datapath diagrams), and the branch decision
// PCSel for all six branch conditions under all BrEq/BrLT combinations.
module control_tb;
  import riscv_pkg::*;
  import rv_ref_pkg::*;
  word_t inst;
  logic br_eq, br_lt;
  ctrl_t c;
  int checks = 0, failures = 0;

  control dut (.inst, .br_eq, .br_lt, .ctrl(c));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (inst %h)", what, inst); end
  endtask

  // expected: pc_sel imm_sel reg_wen b_sel a_sel alu_sel mem_rw wb_sel
  task automatic row(word_t in, logic pcs, imm_sel_e is, logic rw, logic bs, logic as,
                     alu_op_e al, mem_rw_e mr, wb_sel_e wb, string name);
    inst = in; br_eq = 0; br_lt = 0; #1;
    chk(c.pc_sel == pcs,  {name, " PCSel"});
    chk(c.reg_wen == rw,  {name, " RegWEn"});
    chk(c.b_sel == bs,    {name, " BSel"});
    chk(c.a_sel == as,    {name, " ASel"});
    chk(c.alu_sel == al,  {name, " ALUSel"});
    chk(c.mem_rw == mr,   {name, " MemRW"});
    if (rw) chk(c.wb_sel == wb, {name, " WBSel"});
    if (bs) chk(c.imm_sel == is, {name, " ImmSel"});
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row(ADD(1, 2, 3),   0, IMM_I, 1, 0, 0, ALU_ADD,  MEM_READ,  WB_ALU, "add");
    row(SUB(1, 2, 3),   0, IMM_I, 1, 0, 0, ALU_SUB,  MEM_READ,  WB_ALU, "sub");
    row(SLL(1, 2, 3),   0, IMM_I, 1, 0, 0, ALU_SLL,  MEM_READ,  WB_ALU, "sll");
    row(SLT(1, 2, 3),   0, IMM_I, 1, 0, 0, ALU_SLT,  MEM_READ,  WB_ALU, "slt");
    row(SLTU(1, 2, 3),  0, IMM_I, 1, 0, 0, ALU_SLTU, MEM_READ,  WB_ALU, "sltu");
    row(XOR(1, 2, 3),   0, IMM_I, 1, 0, 0, ALU_XOR,  MEM_READ,  WB_ALU, "xor");
    row(SRL(1, 2, 3),   0, IMM_I, 1, 0, 0, ALU_SRL,  MEM_READ,  WB_ALU, "srl");
    row(SRA(1, 2, 3),   0, IMM_I, 1, 0, 0, ALU_SRA,  MEM_READ,  WB_ALU, "sra");
    row(OR(1, 2, 3),    0, IMM_I, 1, 0, 0, ALU_OR,   MEM_READ,  WB_ALU, "or");
    row(AND(1, 2, 3),   0, IMM_I, 1, 0, 0, ALU_AND,  MEM_READ,  WB_ALU, "and");
    row(ADDI(1, 2, -1), 0, IMM_I, 1, 1, 0, ALU_ADD,  MEM_READ,  WB_ALU, "addi");
    row(ADDI(1, 2, 'h400), 0, IMM_I, 1, 1, 0, ALU_ADD, MEM_READ, WB_ALU, "addi with imm bit 10 set");
    row(SRAI(1, 2, 3),  0, IMM_I, 1, 1, 0, ALU_SRA,  MEM_READ,  WB_ALU, "srai");
    row(SLLI(1, 2, 3),  0, IMM_I, 1, 1, 0, ALU_SLL,  MEM_READ,  WB_ALU, "slli");
    row(ANDI(1, 2, 3),  0, IMM_I, 1, 1, 0, ALU_AND,  MEM_READ,  WB_ALU, "andi");
    row(LW(1, 2, 8),    0, IMM_I, 1, 1, 0, ALU_ADD,  MEM_READ,  WB_MEM, "lw");
    row(SW(1, 2, 8),    0, IMM_S, 0, 1, 0, ALU_ADD,  MEM_WRITE, WB_ALU, "sw");
    row(JALR(1, 2, 8),  1, IMM_I, 1, 1, 0, ALU_ADD,  MEM_READ,  WB_PC4, "jalr");
    row(JAL(1, 8),      1, IMM_J, 1, 1, 1, ALU_ADD,  MEM_READ,  WB_PC4, "jal");
    row(LUI(1, 5),      0, IMM_U, 1, 1, 0, ALU_PASSB, MEM_READ, WB_ALU, "lui");
    row(AUIPC(1, 5),    0, IMM_U, 1, 1, 1, ALU_ADD,  MEM_READ,  WB_ALU, "auipc");
    row(32'h0000_000F,  0, IMM_I, 0, 0, 0, ALU_ADD,  MEM_READ,  WB_ALU, "fence as nop");
    chk(c.is_load == 0, "fence not a load");
    inst = LW(1, 2, 8); #1; chk(c.is_load == 1, "lw is a load");
    inst = LBU(1, 2, 8); #1; chk(c.funct3 == 3'b100, "lbu funct3");
    // branches: ImmSel=B, ASel=1, BSel=1, ALUSel=Add, RegWEn=0, MemRW=Read
    for (int f = 0; f < 8; f++) begin
      if (f == 2 || f == 3) continue;
      for (int e = 0; e < 2; e++) for (int l = 0; l < 2; l++) begin
        logic exp;
        inst = enc_b(16, 3, 2, f); br_eq = e[0]; br_lt = l[0]; #1;
        case (f)
          0: exp = e[0];
          1: exp = !e[0];
          4, 6: exp = l[0];
          default: exp = !l[0];
        endcase
        chk(c.pc_sel == exp, $sformatf("branch f3=%0d eq=%0d lt=%0d", f, e, l));
        chk(c.imm_sel == IMM_B && c.a_sel && c.b_sel && c.alu_sel == ALU_ADD &&
            !c.reg_wen && c.mem_rw == MEM_READ, "branch datapath settings");
        chk(c.br_un == (f >= 6), "BrUn");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
