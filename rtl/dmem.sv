// dmem: data memory ("DMEM").
//
// WORDS x 32-bit array addressed by addr[..:2] of the byte address. A write
// stores the byte lanes set in be (a non-zero be is MemRW = Write) on the
// rising clock edge. The read returns the whole addressed word:
//   SYNC_READ = 0: combinationally, as the single-cycle datapath needs;
//   SYNC_READ = 1: registered on the same clock edge as the write (read
//                  before write), as in the 3-stage pipeline where DMEM is
//                  clocked at the leading edge of the M stage.
// Picking and extending a byte or half-word is done by the processor. Size and
// byte enables are this design's choices.
module dmem #(
  parameter int unsigned WORDS     = 1024,
  parameter bit          SYNC_READ = 1'b0,
  localparam int unsigned AW       = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic [3:0]  be,
  output logic [31:0] rdata
);
  logic [31:0] mem [WORDS];
  logic [AW-1:0] idx;

  assign idx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    for (int l = 0; l < 4; l++)
      if (be[l]) mem[idx][8*l +: 8] <= wdata[8*l +: 8];
  end

  if (SYNC_READ) begin : g_sync
    always_ff @(posedge clk) rdata <= mem[idx];
  end else begin : g_async
    assign rdata = mem[idx];
  end
endmodule
