// riscv151_top_tb: end-to-end test of the whole design at its default sizes.
//
// The same programs (one directed, then random ones) are loaded into both
// processors through their program-load ports; both run from the same reset.
// An independent reference model (rv_iss) executes each program; afterwards
// the registers and data memories of both processors must equal the model's,
// and the end-of-test store must appear at the cycle the model predicts:
// after N instructions for the single-cycle processor, and after
// 1 + N + taken transfers + load-use pairs for the pipeline. Every mechanism
// of the pipeline (ALU forwarding, load-use stall, kill on a taken branch or
// jump, predicted-not-taken branch that falls through, write-back bypass) and
// every instruction class must occur at least once.
module riscv151_top_tb;
  import rv_ref_pkg::*;

  localparam int IW = 1024, DW = 1024, NRAND = 12, RLEN = 300;

  logic clk = 0, rst = 1;
  logic imem_we = 0;
  logic [31:0] imem_waddr = 0, imem_wdata = 0;
  logic [31:0] sc_pc, sc_dmem_addr, sc_dmem_wdata, p3_pc, p3_dmem_addr, p3_dmem_wdata;
  logic [3:0]  sc_dmem_we, p3_dmem_we;
  logic p3_ev_fwd, p3_ev_load_stall, p3_ev_kill, p3_ev_wb_bypass;

  int checks = 0, failures = 0;
  int n_fwd = 0, n_stall = 0, n_kill = 0, n_byp = 0, n_fall = 0;
  int n_class [7] = '{default: 0};
  int cyc = 0;

  riscv151_top dut (
    .clk, .rst,
    .sc_imem_we(imem_we), .sc_imem_waddr(imem_waddr), .sc_imem_wdata(imem_wdata),
    .p3_imem_we(imem_we), .p3_imem_waddr(imem_waddr), .p3_imem_wdata(imem_wdata),
    .sc_pc, .sc_dmem_we, .sc_dmem_addr, .sc_dmem_wdata,
    .p3_pc, .p3_dmem_we, .p3_dmem_addr, .p3_dmem_wdata,
    .p3_ev_fwd, .p3_ev_load_stall, .p3_ev_kill, .p3_ev_wb_bypass
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      n_fwd   += int'(p3_ev_fwd);
      n_stall += int'(p3_ev_load_stall);
      n_kill  += int'(p3_ev_kill);
      n_byp   += int'(p3_ev_wb_bypass);
      if (dut.u_p3.inst_x[6:0] == 7'h63 && !p3_ev_kill) n_fall++;
      case (dut.u_p3.inst_x[6:0])
        7'h33: n_class[0]++;
        7'h13: n_class[1]++;
        7'h03: n_class[2]++;
        7'h23: n_class[3]++;
        7'h63: n_class[4]++;
        7'h6f, 7'h67: n_class[5]++;
        7'h37, 7'h17: n_class[6]++;
        default: ;
      endcase
    end
  end

  initial begin : watchdog
    repeat (300000) @(posedge clk);
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
    int sc_mark, p3_mark, n_before, exp_p3, start;
    mark_pc = finish_program(p, k);
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < IW; i++) begin
      imem_we = 1; imem_waddr = 4 * i; imem_wdata = p[i];
      iss.prog[i] = p[i];
      @(negedge clk);
    end
    imem_we = 0;
    @(negedge clk);
    // both data memories start from the model's (arbitrary) contents
    for (int i = 0; i < DW; i++) begin
      iss.mem[i] = dut.u_sc.u_dmem.mem[i];
      dut.u_p3.u_dmem.mem[i] = iss.mem[i];
    end
    while (iss.pc != mark_pc && iss.executed < 100000) iss.step();
    n_before = iss.executed;
    exp_p3   = 1 + iss.executed + iss.taken + iss.load_use;
    iss.step();
    rst = 0;
    start = cyc;
    sc_mark = -1;
    p3_mark = -1;
    while ((sc_mark < 0 || p3_mark < 0) && cyc - start < 20000) begin
      @(negedge clk);
      if (sc_mark < 0 && sc_dmem_we != 0 && sc_dmem_addr == MARK_ADDR) sc_mark = cyc - start;
      if (p3_mark < 0 && p3_dmem_we != 0 && p3_dmem_addr == MARK_ADDR) p3_mark = cyc - start;
    end
    repeat (4) @(negedge clk);
    check(sc_mark == n_before, $sformatf("%s: single-cycle end at %0d, expected %0d", name, sc_mark, n_before));
    check(p3_mark == exp_p3,   $sformatf("%s: pipeline end at %0d, expected %0d", name, p3_mark, exp_p3));
    for (int r = 1; r < 32; r++) begin
      check(dut.u_sc.u_rf.regs[r] == iss.x[r],
            $sformatf("%s: single-cycle x%0d = %h, expected %h", name, r, dut.u_sc.u_rf.regs[r], iss.x[r]));
      check(dut.u_p3.u_rf.regs[r] == iss.x[r],
            $sformatf("%s: pipeline x%0d = %h, expected %h", name, r, dut.u_p3.u_rf.regs[r], iss.x[r]));
    end
    begin
      int bad_sc = 0, bad_p3 = 0;
      for (int i = 0; i < DW; i++) begin
        if (dut.u_sc.u_dmem.mem[i] != iss.mem[i]) bad_sc++;
        if (dut.u_p3.u_dmem.mem[i] != iss.mem[i]) bad_p3++;
      end
      check(bad_sc == 0, $sformatf("%s: %0d single-cycle memory words differ", name, bad_sc));
      check(bad_p3 == 0, $sformatf("%s: %0d pipeline memory words differ", name, bad_p3));
    end
    $display("%s: %0d instructions, single-cycle %0d cycles, pipeline %0d cycles", name, n_before, sc_mark, p3_mark);
  endtask

  initial begin
    u32 p [] = new[IW];
    int k;
    foreach (p[i]) p[i] = ADDI(0, 0, 0);
    k = directed_program(p);
    run_program(p, k, "directed");
    for (int t = 0; t < NRAND; t++) begin
      foreach (p[i]) p[i] = ADDI(0, 0, 0);
      k = gen_random_program(p, RLEN, 'h100);
      run_program(p, k, $sformatf("random%0d", t));
    end
    $display("pipeline events: forward=%0d load_stall=%0d kill=%0d fall_through=%0d wb_bypass=%0d",
             n_fwd, n_stall, n_kill, n_fall, n_byp);
    $display("instruction classes in X: reg=%0d imm=%0d load=%0d store=%0d branch=%0d jump=%0d upper=%0d",
             n_class[0], n_class[1], n_class[2], n_class[3], n_class[4], n_class[5], n_class[6]);
    check(n_fwd > 0,   "ALU forwarding never happened");
    check(n_stall > 0, "load-use stall never happened");
    check(n_kill > 0,  "kill of the instruction in I never happened");
    check(n_fall > 0,  "no branch fell through as predicted");
    check(n_byp > 0,   "write-back bypass never happened");
    foreach (n_class[c]) check(n_class[c] > 0, $sformatf("instruction class %0d never executed", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
