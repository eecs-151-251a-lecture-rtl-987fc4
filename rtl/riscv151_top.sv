// riscv151_top: the two RV32I processors of this design side by side.
//
// u_sc is the single-cycle processor (one instruction per clock cycle, CPI 1,
// long clock period); u_p3 is the 3-stage I/X/M pipeline (shorter clock
// period, CPI slightly above 1 from load-use stalls and taken branches). They
// execute the same instruction set from their own instruction and data
// memories, so the same program can be loaded into both and their results
// compared. Both run from the same clock and synchronous reset; each has its
// own program-load port (sc_imem_* / p3_imem_*) and its own observation ports
// (fetch PC, store traffic); the pipeline also reports its hazard events.
module riscv151_top
  import riscv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter word_t       RESET_PC   = 32'h0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       sc_imem_we,
  input  word_t      sc_imem_waddr,
  input  word_t      sc_imem_wdata,
  input  logic       p3_imem_we,
  input  word_t      p3_imem_waddr,
  input  word_t      p3_imem_wdata,
  output word_t      sc_pc,
  output logic [3:0] sc_dmem_we,
  output word_t      sc_dmem_addr,
  output word_t      sc_dmem_wdata,
  output word_t      p3_pc,
  output logic [3:0] p3_dmem_we,
  output word_t      p3_dmem_addr,
  output word_t      p3_dmem_wdata,
  output logic       p3_ev_fwd,
  output logic       p3_ev_load_stall,
  output logic       p3_ev_kill,
  output logic       p3_ev_wb_bypass
);
  rv32i_single_cycle #(
    .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS), .RESET_PC(RESET_PC)
  ) u_sc (
    .clk, .rst,
    .imem_we(sc_imem_we), .imem_waddr(sc_imem_waddr), .imem_wdata(sc_imem_wdata),
    .pc(sc_pc), .dmem_we(sc_dmem_we), .dmem_addr(sc_dmem_addr), .dmem_wdata(sc_dmem_wdata)
  );

  rv32i_pipe3 #(
    .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS), .RESET_PC(RESET_PC)
  ) u_p3 (
    .clk, .rst,
    .imem_we(p3_imem_we), .imem_waddr(p3_imem_waddr), .imem_wdata(p3_imem_wdata),
    .pc(p3_pc), .dmem_we(p3_dmem_we), .dmem_addr(p3_dmem_addr), .dmem_wdata(p3_dmem_wdata),
    .ev_fwd(p3_ev_fwd), .ev_load_stall(p3_ev_load_stall),
    .ev_kill(p3_ev_kill), .ev_wb_bypass(p3_ev_wb_bypass)
  );
endmodule
