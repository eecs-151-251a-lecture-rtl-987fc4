// rv32i_pipe3_tb: self-checking testbench of the 3-stage pipelined processor.
//
// Runs one directed program (every instruction class and hazard case) and a
// set of random programs. For each, an independent reference model (rv_iss)
// executes the same code from the same initial data memory; afterwards all 32
// registers and every data-memory word must match. The cycle in which the
// end-of-test store is in X must equal 1 + instructions executed before it
// + taken branches/jumps (1 killed slot each) + load-use pairs (1 stall each),
// which checks the pipeline's penalties. The hazard events are counted and
// each must have occurred at least once.
module rv32i_pipe3_tb;
  import rv_ref_pkg::*;

  localparam int IW = 1024, DW = 1024, NRAND = 25, RLEN = 160;

  logic clk = 0, rst = 1;
  logic imem_we = 0;
  logic [31:0] imem_waddr = 0, imem_wdata = 0;
  logic [31:0] pc, dmem_addr, dmem_wdata;
  logic [3:0]  dmem_we;
  logic ev_fwd, ev_load_stall, ev_kill, ev_wb_bypass;

  int checks = 0, failures = 0;
  int n_fwd = 0, n_stall = 0, n_kill = 0, n_byp = 0;
  int cyc = 0;

  rv32i_pipe3 #(.IMEM_WORDS(IW), .DMEM_WORDS(DW)) dut (
    .clk, .rst, .imem_we, .imem_waddr, .imem_wdata, .pc,
    .dmem_we, .dmem_addr, .dmem_wdata, .ev_fwd, .ev_load_stall, .ev_kill, .ev_wb_bypass
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      n_fwd   += int'(ev_fwd);
      n_stall += int'(ev_load_stall);
      n_kill  += int'(ev_kill);
      n_byp   += int'(ev_wb_bypass);
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_program(ref u32 p [], input int k, input string name);
    rv_iss iss = new(DW, IW);
    u32 mark_pc;
    int mark_cyc, expect_cyc, start;
    bit seen;
    mark_pc = finish_program(p, k);
    // load the program while in reset
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < IW; i++) begin
      imem_we = 1; imem_waddr = 4 * i; imem_wdata = p[i];
      iss.prog[i] = p[i];
      @(negedge clk);
    end
    imem_we = 0;
    @(negedge clk);
    for (int i = 0; i < DW; i++) iss.mem[i] = dut.u_dmem.mem[i];
    // reference: run to the end-of-test store
    while (iss.pc != mark_pc && iss.executed < 100000) iss.step();
    expect_cyc = 1 + iss.executed + iss.taken + iss.load_use;
    iss.step();
    // DUT
    rst = 0;
    start = cyc;
    seen = 0;
    mark_cyc = -1;
    while (!seen && cyc - start < 20000) begin
      @(negedge clk);
      if (dmem_we != 0 && dmem_addr == MARK_ADDR) begin
        seen = 1;
        mark_cyc = cyc - start;
      end
    end
    repeat (4) @(negedge clk);
    check(seen, $sformatf("%s: end-of-test store never seen", name));
    check(mark_cyc == expect_cyc,
          $sformatf("%s: end store in X at cycle %0d, expected %0d (%0d instr, %0d taken, %0d load-use)",
                    name, mark_cyc, expect_cyc, iss.executed, iss.taken, iss.load_use));
    for (int r = 0; r < 32; r++)
      check(dut.u_rf.regs[r] == iss.x[r] || r == 0,
            $sformatf("%s: x%0d = %h, expected %h", name, r, dut.u_rf.regs[r], iss.x[r]));
    begin
      int bad = 0;
      for (int i = 0; i < DW; i++) if (dut.u_dmem.mem[i] != iss.mem[i]) bad++;
      check(bad == 0, $sformatf("%s: %0d data memory words differ", name, bad));
    end
  endtask

  initial begin
    u32 p [] = new[IW];
    int k;
    foreach (p[i]) p[i] = ADDI(0, 0, 0);
    k = directed_program(p);
    run_program(p, k, "directed");
    // specific results of the directed program, worked out by hand
    check(dut.u_rf.regs[4]  == 32'd2,          "x4 = -5 + 7");
    check(dut.u_rf.regs[22] == 32'd2,          "x22 = lw(-5) + 7 after load-use stall");
    check(dut.u_rf.regs[26] == 32'd7,          "loop ran 7 times");
    check(dut.u_rf.regs[27] == 32'd0,          "no skipped instruction executed");
    check(dut.u_rf.regs[25] == 32'h0000_00fb,  "lbu of stored byte 0xfb");
    for (int t = 0; t < NRAND; t++) begin
      foreach (p[i]) p[i] = ADDI(0, 0, 0);
      k = gen_random_program(p, RLEN, 'h100);
      run_program(p, k, $sformatf("random%0d", t));
    end
    $display("events: forward=%0d load_stall=%0d kill=%0d wb_bypass=%0d", n_fwd, n_stall, n_kill, n_byp);
    check(n_fwd > 0,   "ALU forwarding never happened");
    check(n_stall > 0, "load-use stall never happened");
    check(n_kill > 0,  "branch kill never happened");
    check(n_byp > 0,   "write-back bypass never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
