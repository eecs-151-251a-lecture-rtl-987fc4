// imem_tb: loads the instruction memory through its write port with
// address-dependent words and reads every word back by byte address; checks
// that the read is combinational (valid in the cycle the address changes).
module imem_tb;
  localparam int W = 256;
  logic clk = 0, we = 0;
  logic [31:0] addr = 0, waddr = 0, wdata = 0, inst;
  int checks = 0, failures = 0;

  imem #(.WORDS(W)) dut (.clk, .addr, .inst, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  function automatic logic [31:0] pattern(int i);
    return 32'h9E37_79B9 * (i + 1) ^ (i << 7);
  endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < W; i++) begin
      we = 1; waddr = 4 * i; wdata = pattern(i);
      @(negedge clk);
    end
    we = 0;
    for (int k = 0; k < 2 * W; k++) begin
      automatic int i = $urandom_range(0, W - 1);
      addr = 4 * i; #1;
      checks++;
      if (inst !== pattern(i)) begin failures++; $display("FAIL word %0d: %h", i, inst); end
    end
    // byte offset bits are ignored, upper bits wrap
    addr = 4 * 5 + 3; #1; checks++; if (inst !== pattern(5)) failures++;
    addr = 4 * (W + 7); #1; checks++; if (inst !== pattern(7)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
