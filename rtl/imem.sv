// imem: instruction memory ("IMEM").
//
// WORDS x 32-bit array, word-addressed by addr[..:2] of the byte address (the
// PC); the read is combinational, so the instruction appears in the same cycle
// as the PC. A write port (we, waddr, wdata; byte address, clocked) loads the
// program. Addresses beyond the array wrap. Size, read timing and loading
// method are this design's choices; the lecture only names the block.
module imem #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] inst,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign inst = mem[addr[AW+1:2]];
endmodule
