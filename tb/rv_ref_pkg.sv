// rv_ref_pkg: verification helpers for the RV32I processors.
//
// * Instruction encoders (a tiny assembler) for the RV32I formats.
// * rv_iss: an instruction-set reference model, written independently of the
//   RTL, that executes a program one instruction at a time and also works
//   out the cycle cost the 3-stage pipeline should show: one extra cycle per
//   taken branch or jump (the killed instruction) and one per load whose
//   destination the next executed instruction reads (the load-use stall).
// * gen_random_program: fills a program with random arithmetic, loads,
//   stores and short forward branches over a small register set, so that
//   back-to-back dependences (forwarding, load-use) are frequent.
package rv_ref_pkg;

  typedef logic [31:0] u32;

  // ------------------------------------------------------------ encoders
  function automatic u32 enc_r(int f7, int rs2, int rs1, int f3, int rd, int op);
    return {f7[6:0], rs2[4:0], rs1[4:0], f3[2:0], rd[4:0], op[6:0]};
  endfunction
  function automatic u32 enc_i(int imm, int rs1, int f3, int rd, int op);
    return {imm[11:0], rs1[4:0], f3[2:0], rd[4:0], op[6:0]};
  endfunction
  function automatic u32 enc_s(int imm, int rs2, int rs1, int f3);
    return {imm[11:5], rs2[4:0], rs1[4:0], f3[2:0], imm[4:0], 7'b0100011};
  endfunction
  function automatic u32 enc_b(int imm, int rs2, int rs1, int f3);
    return {imm[12], imm[10:5], rs2[4:0], rs1[4:0], f3[2:0], imm[4:1], imm[11], 7'b1100011};
  endfunction
  function automatic u32 enc_u(int imm20, int rd, int op);
    return {imm20[19:0], rd[4:0], op[6:0]};
  endfunction
  function automatic u32 enc_j(int imm, int rd);
    return {imm[20], imm[10:1], imm[11], imm[19:12], rd[4:0], 7'b1101111};
  endfunction

  function automatic u32 ADD (int rd, int a, int b); return enc_r(0,  b, a, 0, rd, 'h33); endfunction
  function automatic u32 SUB (int rd, int a, int b); return enc_r(32, b, a, 0, rd, 'h33); endfunction
  function automatic u32 SLL (int rd, int a, int b); return enc_r(0,  b, a, 1, rd, 'h33); endfunction
  function automatic u32 SLT (int rd, int a, int b); return enc_r(0,  b, a, 2, rd, 'h33); endfunction
  function automatic u32 SLTU(int rd, int a, int b); return enc_r(0,  b, a, 3, rd, 'h33); endfunction
  function automatic u32 XOR (int rd, int a, int b); return enc_r(0,  b, a, 4, rd, 'h33); endfunction
  function automatic u32 SRL (int rd, int a, int b); return enc_r(0,  b, a, 5, rd, 'h33); endfunction
  function automatic u32 SRA (int rd, int a, int b); return enc_r(32, b, a, 5, rd, 'h33); endfunction
  function automatic u32 OR  (int rd, int a, int b); return enc_r(0,  b, a, 6, rd, 'h33); endfunction
  function automatic u32 AND (int rd, int a, int b); return enc_r(0,  b, a, 7, rd, 'h33); endfunction
  function automatic u32 ADDI(int rd, int a, int imm); return enc_i(imm, a, 0, rd, 'h13); endfunction
  function automatic u32 SLTI(int rd, int a, int imm); return enc_i(imm, a, 2, rd, 'h13); endfunction
  function automatic u32 XORI(int rd, int a, int imm); return enc_i(imm, a, 4, rd, 'h13); endfunction
  function automatic u32 ANDI(int rd, int a, int imm); return enc_i(imm, a, 7, rd, 'h13); endfunction
  function automatic u32 SLLI(int rd, int a, int sh);  return enc_i(sh, a, 1, rd, 'h13); endfunction
  function automatic u32 SRAI(int rd, int a, int sh);  return enc_i(sh + 'h400, a, 5, rd, 'h13); endfunction
  function automatic u32 LW  (int rd, int a, int imm); return enc_i(imm, a, 2, rd, 'h03); endfunction
  function automatic u32 LH  (int rd, int a, int imm); return enc_i(imm, a, 1, rd, 'h03); endfunction
  function automatic u32 LBU (int rd, int a, int imm); return enc_i(imm, a, 4, rd, 'h03); endfunction
  function automatic u32 LB  (int rd, int a, int imm); return enc_i(imm, a, 0, rd, 'h03); endfunction
  function automatic u32 SW  (int b, int a, int imm);  return enc_s(imm, b, a, 2); endfunction
  function automatic u32 SH  (int b, int a, int imm);  return enc_s(imm, b, a, 1); endfunction
  function automatic u32 SB  (int b, int a, int imm);  return enc_s(imm, b, a, 0); endfunction
  function automatic u32 BEQ (int a, int b, int off);  return enc_b(off, b, a, 0); endfunction
  function automatic u32 BNE (int a, int b, int off);  return enc_b(off, b, a, 1); endfunction
  function automatic u32 BLT (int a, int b, int off);  return enc_b(off, b, a, 4); endfunction
  function automatic u32 BGE (int a, int b, int off);  return enc_b(off, b, a, 5); endfunction
  function automatic u32 BLTU(int a, int b, int off);  return enc_b(off, b, a, 6); endfunction
  function automatic u32 BGEU(int a, int b, int off);  return enc_b(off, b, a, 7); endfunction
  function automatic u32 JAL (int rd, int off);        return enc_j(off, rd); endfunction
  function automatic u32 JALR(int rd, int a, int imm); return enc_i(imm, a, 0, rd, 'h67); endfunction
  function automatic u32 LUI (int rd, int imm20);      return enc_u(imm20, rd, 'h37); endfunction
  function automatic u32 AUIPC(int rd, int imm20);     return enc_u(imm20, rd, 'h17); endfunction

  // ------------------------------------------------------------ reference model
  class rv_iss;
    u32 x [32];
    u32 mem [];          // word array
    u32 prog [];
    u32 pc;
    int unsigned executed, taken, load_use;
    // state for the load-use rule
    bit   prev_load;
    int   prev_rd;

    function new(int unsigned dmem_words, int unsigned imem_words);
      mem  = new[dmem_words];
      prog = new[imem_words];
      foreach (mem[i])  mem[i]  = '0;
      foreach (prog[i]) prog[i] = 32'h0000_0013;
      foreach (x[i])    x[i]    = '0;
      pc = 0; executed = 0; taken = 0; load_use = 0; prev_load = 0; prev_rd = 0;
    endfunction

    static function automatic u32 sext(u32 v, int bits);
      u32 m = 32'h1 << (bits - 1);
      v = v & ((32'h1 << bits) - 1);
      return (v ^ m) - m;
    endfunction

    function void step();
      u32 in  = prog[(pc >> 2) % prog.size()];
      int op  = in[6:0];
      int rd  = in[11:7];
      int f3  = in[14:12];
      int r1  = in[19:15];
      int r2  = in[24:20];
      u32 a   = x[r1];
      u32 b   = x[r2];
      u32 ii  = sext(in[31:20], 12);
      u32 is  = sext({in[31:25], in[11:7]}, 12);
      u32 ib  = sext({in[31], in[7], in[30:25], in[11:8], 1'b0}, 13);
      u32 ij  = sext({in[31], in[19:12], in[20], in[30:21], 1'b0}, 21);
      u32 nxt = pc + 4;
      u32 res = '0;
      u32 ea, w;
      bit wr = 0, use1 = 0, use2 = 0, is_ld = 0, cond = 0;
      case (op)
        'h33: begin
          wr = 1; use1 = 1; use2 = 1;
          case (f3)
            0: res = in[30] ? a - b : a + b;
            1: res = a << b[4:0];
            2: res = ($signed(a) < $signed(b)) ? 1 : 0;
            3: res = (a < b) ? 1 : 0;
            4: res = a ^ b;
            5: res = in[30] ? u32'($signed(a) >>> b[4:0]) : a >> b[4:0];
            6: res = a | b;
            default: res = a & b;
          endcase
        end
        'h13: begin
          wr = 1; use1 = 1;
          case (f3)
            0: res = a + ii;
            1: res = a << in[24:20];
            2: res = ($signed(a) < $signed(ii)) ? 1 : 0;
            3: res = (a < ii) ? 1 : 0;
            4: res = a ^ ii;
            5: res = in[30] ? u32'($signed(a) >>> in[24:20]) : a >> in[24:20];
            6: res = a | ii;
            default: res = a & ii;
          endcase
        end
        'h03: begin
          wr = 1; use1 = 1; is_ld = 1;
          ea = a + ii;
          w  = mem[(ea >> 2) % mem.size()] >> (8 * ea[1:0]);
          case (f3)
            0: res = sext(w, 8);
            1: res = sext(w, 16);
            4: res = w & 32'hff;
            5: res = w & 32'hffff;
            default: res = w;
          endcase
        end
        'h23: begin
          use1 = 1; use2 = 1;
          ea = a + is;
          w  = mem[(ea >> 2) % mem.size()];
          case (f3)
            0: begin w[8*ea[1:0] +: 8] = b[7:0]; end
            1: begin if (ea[1]) w[31:16] = b[15:0]; else w[15:0] = b[15:0]; end
            default: w = b;
          endcase
          mem[(ea >> 2) % mem.size()] = w;
        end
        'h63: begin
          use1 = 1; use2 = 1;
          case (f3)
            0: cond = (a == b);
            1: cond = (a != b);
            4: cond = ($signed(a) < $signed(b));
            5: cond = ($signed(a) >= $signed(b));
            6: cond = (a < b);
            7: cond = (a >= b);
            default: cond = 0;
          endcase
          if (cond) nxt = pc + ib;
        end
        'h6f: begin wr = 1; res = pc + 4; nxt = pc + ij; cond = 1; end
        'h67: begin wr = 1; use1 = 1; res = pc + 4; nxt = (a + ii) & ~32'h1; cond = 1; end
        'h37: begin wr = 1; res = {in[31:12], 12'b0}; end
        'h17: begin wr = 1; res = pc + {in[31:12], 12'b0}; end
        default: ;
      endcase
      // cycle-cost bookkeeping for the pipeline
      if (prev_load && prev_rd != 0 && ((use1 && r1 == prev_rd) || (use2 && r2 == prev_rd)))
        load_use++;
      prev_load = is_ld && wr;
      prev_rd   = rd;
      if (cond) taken++;
      if (wr && rd != 0) x[rd] = res;
      pc = nxt;
      executed++;
    endfunction
  endclass

  // ------------------------------------------------------------ random programs
  // Registers x1 (data base address) and x0 are never written; random code
  // uses x2..x7 so that consecutive instructions often depend on each other.
  // Branches skip forward by 1 or 2 instructions only, so the program always
  // reaches its end. Returns the number of instructions written.
  function automatic int gen_random_program(ref u32 p [], input int n, input int base_addr);
    int k = 0;
    p[k++] = LUI(1, base_addr >> 12);
    p[k++] = ADDI(1, 1, base_addr & 'hfff);
    for (int r = 2; r < 8; r++) p[k++] = ADDI(r, 0, $urandom_range(0, 4095) - 2048);
    while (k < n) begin
      int rd  = $urandom_range(2, 7);
      int ra  = $urandom_range(0, 7);
      int rb  = $urandom_range(0, 7);
      int sel = $urandom_range(0, 15);
      case (sel)
        0:  p[k++] = ADD(rd, ra, rb);
        1:  p[k++] = SUB(rd, ra, rb);
        2:  p[k++] = XOR(rd, ra, rb);
        3:  p[k++] = SRA(rd, ra, rb);
        4:  p[k++] = SLTU(rd, ra, rb);
        5:  p[k++] = ADDI(rd, ra, $urandom_range(0, 4095) - 2048);
        6:  p[k++] = SLLI(rd, ra, $urandom_range(0, 31));
        7:  p[k++] = LW(rd, 1, 4 * $urandom_range(0, 15));
        8:  p[k++] = LB(rd, 1, $urandom_range(0, 63));
        9:  p[k++] = LH(rd, 1, 2 * $urandom_range(0, 31));
        10: p[k++] = SW(rb, 1, 4 * $urandom_range(0, 15));
        11: p[k++] = SB(rb, 1, $urandom_range(0, 63));
        12: p[k++] = SH(rb, 1, 2 * $urandom_range(0, 31));
        13: p[k++] = BEQ(ra, rb, 4 * $urandom_range(2, 3));
        14: p[k++] = BLT(ra, rb, 4 * $urandom_range(2, 3));
        default: p[k++] = BGEU(ra, rb, 4 * $urandom_range(2, 3));
      endcase
    end
    return k;
  endfunction

  // ------------------------------------------------------------ program helpers
  localparam u32 MARK_ADDR = 32'hFFFF_FFFC;  // "end of test" store address

  // Append three nops, the end-of-test store and a jump-to-self; returns the
  // byte address of the end-of-test store.
  function automatic u32 finish_program(ref u32 p [], input int k);
    u32 mark_pc;
    for (int i = 0; i < 3; i++) p[k++] = ADDI(0, 0, 0);
    mark_pc = 4 * k;
    p[k++] = SW(0, 0, -4);
    p[k++] = JAL(0, 0);
    return mark_pc;
  endfunction

  // A directed program that uses every RV32I instruction class and every
  // hazard case of the 3-stage pipeline. Returns the instruction count.
  function automatic int directed_program(ref u32 p []);
    int k = 0;
    p[k++] = ADDI(1, 0, 'h200);
    p[k++] = ADDI(2, 0, -5);
    p[k++] = ADDI(3, 0, 7);
    p[k++] = ADD(4, 2, 3);        // x3 from M (forward), x2 being written back
    p[k++] = SUB(5, 4, 3);        // x4 forwarded
    p[k++] = SLL(6, 3, 3);
    p[k++] = SLT(7, 2, 3);
    p[k++] = SLTU(8, 2, 3);
    p[k++] = XOR(9, 2, 3);
    p[k++] = SRL(10, 2, 3);
    p[k++] = SRA(11, 2, 3);
    p[k++] = OR(12, 2, 3);
    p[k++] = AND(13, 2, 3);
    p[k++] = SLTI(14, 2, -4);
    p[k++] = XORI(15, 2, 'h55);
    p[k++] = ANDI(16, 2, 'hff);
    p[k++] = SLLI(17, 3, 20);
    p[k++] = SRAI(18, 2, 1);
    p[k++] = LUI(19, 'habcde);
    p[k++] = AUIPC(20, 1);
    p[k++] = SW(2, 1, 0);
    p[k++] = SH(3, 1, 4);
    p[k++] = SB(2, 1, 7);
    p[k++] = LW(21, 1, 0);
    p[k++] = ADD(22, 21, 3);      // load-use: one stall
    p[k++] = LH(23, 1, 4);
    p[k++] = LB(24, 1, 7);
    p[k++] = LBU(25, 1, 7);
    p[k++] = ADDI(26, 0, 0);
    p[k++] = ADDI(26, 26, 1);     // loop:
    p[k++] = BLT(26, 3, -4);      //   taken 6 times, then falls through
    p[k++] = BEQ(2, 2, 8);        // taken
    p[k++] = ADDI(27, 0, 99);     //   (killed)
    p[k++] = BNE(2, 2, 8);        // not taken
    p[k++] = BGE(3, 2, 8);        // taken
    p[k++] = ADDI(27, 27, 1);
    p[k++] = BLTU(3, 2, 8);       // taken (unsigned)
    p[k++] = ADDI(27, 27, 2);
    p[k++] = BGEU(3, 2, 8);       // not taken
    p[k++] = JAL(28, 12);
    p[k++] = ADDI(27, 27, 4);
    p[k++] = ADDI(27, 27, 8);
    p[k++] = AUIPC(29, 0);        // jal target
    p[k++] = JALR(30, 29, 12);    // to the lw below
    p[k++] = ADDI(27, 27, 16);
    p[k++] = LW(31, 1, 0);
    p[k++] = BEQ(31, 2, 8);       // load-use into a taken branch
    p[k++] = ADDI(27, 27, 32);
    p[k++] = SW(27, 1, 8);
    p[k++] = SW(22, 1, 12);
    return k;
  endfunction

endpackage
