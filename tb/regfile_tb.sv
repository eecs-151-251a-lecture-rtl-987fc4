// regfile_tb: random writes and reads on the register file compared with a
// model array; checks that x0 stays zero, that a write lands on the clock
// edge (a same-cycle read returns the old value) and that reset clears.
module regfile_tb;
  logic clk = 0, rst = 1, we = 0;
  logic [4:0] addr_a = 0, addr_b = 0, addr_d = 0;
  logic [31:0] data_d = 0, data_a, data_b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile #(.XLEN(32), .NREGS(32)) dut (.clk, .rst, .addr_a, .addr_b, .addr_d, .data_d, .we, .data_a, .data_b);

  always #5 clk = ~clk;

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 32; r++) begin
      addr_a = r[4:0]; #1; chk(data_a, 0, "after reset");
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 3) != 0;
      addr_d = $urandom; data_d = $urandom;
      addr_a = (i % 4 == 0) ? addr_d : 5'($urandom);
      addr_b = $urandom;
      #1;
      chk(data_a, model[addr_a], "port A");
      chk(data_b, model[addr_b], "port B");
      @(posedge clk);
      if (we && addr_d != 0) model[addr_d] = data_d;
    end
    @(negedge clk);
    we = 0; addr_a = 0; addr_b = 0; #1;
    chk(data_a, 0, "x0 on port A");
    chk(data_b, 0, "x0 on port B");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
