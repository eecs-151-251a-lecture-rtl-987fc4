// dmem_tb: random byte-enabled writes and reads on both data-memory variants
// (combinational read and read clocked with the write) against a byte-level
// model. For the clocked variant, the data must appear one edge after the
// address, and a read in the same cycle as a write to the same word returns
// the old contents.
module dmem_tb;
  localparam int W = 64;
  logic clk = 0;
  logic [31:0] addr = 0, wdata = 0, rd_async, rd_sync;
  logic [3:0]  be = 0;
  logic [7:0]  model [4*W];
  int checks = 0, failures = 0;

  dmem #(.WORDS(W), .SYNC_READ(1'b0)) dut_a (.clk, .addr, .wdata, .be, .rdata(rd_async));
  dmem #(.WORDS(W), .SYNC_READ(1'b1)) dut_s (.clk, .addr, .wdata, .be, .rdata(rd_sync));

  always #5 clk = ~clk;

  function automatic logic [31:0] mword(int i);
    return {model[4*i+3], model[4*i+2], model[4*i+1], model[4*i]};
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expect_sync;
    // initialise every word
    @(negedge clk);
    for (int i = 0; i < W; i++) begin
      addr = 4 * i; wdata = $urandom; be = 4'hf;
      for (int l = 0; l < 4; l++) model[4*i+l] = wdata[8*l +: 8];
      @(negedge clk);
    end
    for (int k = 0; k < 3000; k++) begin
      automatic int i = $urandom_range(0, W - 1);
      addr  = 4 * i + $urandom_range(0, 3);
      wdata = $urandom;
      be    = (k % 3 == 0) ? 4'h0 : 4'($urandom);
      #1;
      checks++;
      if (rd_async !== mword(i)) begin failures++; $display("FAIL async word %0d", i); end
      expect_sync = mword(i);                       // read before write
      @(posedge clk);
      for (int l = 0; l < 4; l++) if (be[l]) model[4*i+l] = wdata[8*l +: 8];
      #1;
      checks++;
      if (rd_sync !== expect_sync) begin failures++; $display("FAIL sync word %0d: %h vs %h", i, rd_sync, expect_sync); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
