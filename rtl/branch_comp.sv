// branch_comp: branch comparator ("Branch Comp." of the RV32I datapath).
//
// Combinational. br_eq = 1 when a == b; br_lt = 1 when a < b, compared as
// two's-complement numbers unless br_un = 1, which selects an unsigned
// compare. Greater-or-equal is not a separate output: the controller takes it
// as !(a < b). Both outputs and the BrUn input are as in the lecture.
module branch_comp #(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic            br_un,
  output logic            br_eq,
  output logic            br_lt
);
  always_comb begin
    br_eq = (a == b);
    br_lt = br_un ? (a < b) : ($signed(a) < $signed(b));
  end
endmodule
