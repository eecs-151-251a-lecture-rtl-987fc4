// alu: the RV32I arithmetic and logic unit.
//
// Combinational: y = a <op> b for the operation in alu_sel. The lecture names
// the unit and its ALUSel control and uses the Add operation for branch,
// JAL and JALR target computation; the operation list here is the RV32I
// integer set plus PASSB (y = b) for LUI, which is this design's choice.
// Shift amounts use b[4:0].
module alu
  import riscv_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_e alu_sel,
  output word_t   y
);
  always_comb begin
    unique case (alu_sel)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_SLL:   y = a << b[4:0];
      ALU_SLT:   y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {31'b0, a < b};
      ALU_XOR:   y = a ^ b;
      ALU_SRL:   y = a >> b[4:0];
      ALU_SRA:   y = word_t'($signed(a) >>> b[4:0]);
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
