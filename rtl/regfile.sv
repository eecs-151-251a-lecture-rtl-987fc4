// regfile: the integer register file ("Reg[]" of the RV32I datapath).
//
// NREGS registers of XLEN bits. Two combinational read ports (addr_a ->
// data_a, addr_b -> data_b, the DataA/DataB outputs of the lecture's
// diagram) and one write port (addr_d, data_d) written on the rising clock
// edge when we (RegWEn) is high. Register 0 always reads as zero and ignores
// writes. A read of the register being written in the same cycle returns the
// old value; the pipeline adds its own bypass for that case. Reset clears all
// registers (a choice of this design, so that simulation is deterministic).
module regfile #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned NREGS = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [AW-1:0]   addr_a,
  input  logic [AW-1:0]   addr_b,
  input  logic [AW-1:0]   addr_d,
  input  logic [XLEN-1:0] data_d,
  input  logic            we,
  output logic [XLEN-1:0] data_a,
  output logic [XLEN-1:0] data_b
);
  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && addr_d != '0) begin
      regs[addr_d] <= data_d;
    end
  end

  assign data_a = (addr_a == '0) ? '0 : regs[addr_a];
  assign data_b = (addr_b == '0) ? '0 : regs[addr_b];
endmodule
