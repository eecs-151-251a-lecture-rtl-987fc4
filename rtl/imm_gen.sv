// imm_gen: immediate generator ("Imm. Gen" of the RV32I datapath).
//
// Combinational. From inst[31:7] it builds the 32-bit immediate of the format
// named by imm_sel. The I, S and B layouts follow the lecture's immediate
// table: the upper bits always come from inst[31] (sign extension), bits
// 10:5 from inst[30:25], and only bit 7 of the instruction changes role
// between S (imm[0]) and B (imm[11], with imm[0] = 0 because branch offsets
// are even). J follows the JAL format imm[20|10:1|11|19:12] in inst[31:12].
// The U format (inst[31:12] << 12) is not drawn in the lecture; it is added
// here for LUI and AUIPC.
module imm_gen
  import riscv_pkg::*;
(
  input  word_t    inst,
  input  imm_sel_e imm_sel,
  output word_t    imm
);
  always_comb begin
    unique case (imm_sel)
      IMM_I:   imm = {{21{inst[31]}}, inst[30:25], inst[24:21], inst[20]};
      IMM_S:   imm = {{21{inst[31]}}, inst[30:25], inst[11:8], inst[7]};
      IMM_B:   imm = {{20{inst[31]}}, inst[7], inst[30:25], inst[11:8], 1'b0};
      IMM_U:   imm = {inst[31:12], 12'b0};
      IMM_J:   imm = {{12{inst[31]}}, inst[19:12], inst[20], inst[30:21], 1'b0};
      default: imm = '0;
    endcase
  end
endmodule
