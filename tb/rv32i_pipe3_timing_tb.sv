// rv32i_pipe3_timing_tb: replays the four pipeline-timing examples of the
// 3-stage pipeline and checks, cycle by cycle, which instruction is in the X
// stage (a killed or stalled slot shows as a nop):
//   data hazard   add x5,x3,x4 ; add x7,x6,x5        X: add, add (forwarded)
//   load hazard   lw x5,0(x4)  ; add x7,x6,x5        X: lw, nop, add
//   not taken     bne x1,x1,L1 ; add ; add ; L1: sub X: bne, add, add, sub
//   taken         beq x1,x1,L1 ; add ; L1: sub       X: beq, nop, sub
// and the register results of each example.
module rv32i_pipe3_timing_tb;
  import rv_ref_pkg::*;

  localparam int IW = 64, DW = 64;

  logic clk = 0, rst = 1;
  logic imem_we = 0;
  logic [31:0] imem_waddr = 0, imem_wdata = 0;
  logic [31:0] pc, dmem_addr, dmem_wdata;
  logic [3:0]  dmem_we;
  logic ev_fwd, ev_load_stall, ev_kill, ev_wb_bypass;
  int checks = 0, failures = 0;

  rv32i_pipe3 #(.IMEM_WORDS(IW), .DMEM_WORDS(DW)) dut (
    .clk, .rst, .imem_we, .imem_waddr, .imem_wdata, .pc,
    .dmem_we, .dmem_addr, .dmem_wdata, .ev_fwd, .ev_load_stall, .ev_kill, .ev_wb_bypass
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Load p (k words, the rest nops), reset, run until the instruction at
  // byte address first_pc reaches X, then record the next n words in X.
  task automatic run(u32 p [], int k, u32 first_inst, int n, ref u32 seen []);
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < IW; i++) begin
      imem_we = 1; imem_waddr = 4 * i; imem_wdata = (i < k) ? p[i] : ADDI(0, 0, 0);
      @(negedge clk);
    end
    imem_we = 0;
    rst = 0;
    while (dut.inst_x != first_inst) @(negedge clk);
    seen = new[n];
    for (int i = 0; i < n; i++) begin
      seen[i] = dut.inst_x;
      @(negedge clk);
    end
    repeat (4) @(negedge clk);
  endtask

  task automatic compare(string name, u32 seen [], u32 exp []);
    for (int i = 0; i < exp.size(); i++)
      chk(seen[i] == exp[i], $sformatf("%s: X stage in cycle %0d holds %h, expected %h", name, i, seen[i], exp[i]));
  endtask

  localparam u32 BUBBLE = 32'h0000_0013;

  initial begin
    u32 p [] = new[16];
    u32 seen [];
    // preamble sets x1=1, x2=2, x3=3, x4=8 (an address), x6=6; data word at 8
    u32 pre [6] = '{ADDI(1, 0, 1), ADDI(2, 0, 2), ADDI(3, 0, 3), ADDI(4, 0, 8), ADDI(6, 0, 6), ADDI(9, 0, 100)};
    int k;

    // data hazard
    k = 0; foreach (pre[i]) p[k++] = pre[i];
    p[k++] = ADD(5, 3, 4);
    p[k++] = ADD(7, 6, 5);
    run(p, k, ADD(5, 3, 4), 2, seen);
    compare("data hazard", seen, '{ADD(5, 3, 4), ADD(7, 6, 5)});
    chk(dut.u_rf.regs[7] == 17, "data hazard: x7 = 6 + (3 + 8)");

    // load hazard
    k = 0; foreach (pre[i]) p[k++] = pre[i];
    p[k++] = SW(9, 4, 0);
    p[k++] = LW(5, 4, 0);
    p[k++] = ADD(7, 6, 5);
    run(p, k, LW(5, 4, 0), 3, seen);
    compare("load hazard", seen, '{LW(5, 4, 0), BUBBLE, ADD(7, 6, 5)});
    chk(dut.u_rf.regs[7] == 106, "load hazard: x7 = 6 + 100");

    // independent instruction after a load: no delay
    k = 0; foreach (pre[i]) p[k++] = pre[i];
    p[k++] = LW(5, 4, 0);
    p[k++] = ADD(7, 6, 3);
    run(p, k, LW(5, 4, 0), 2, seen);
    compare("load, no dependence", seen, '{LW(5, 4, 0), ADD(7, 6, 3)});

    // branch not taken
    k = 0; foreach (pre[i]) p[k++] = pre[i];
    p[k++] = BNE(1, 1, 12);
    p[k++] = ADD(5, 3, 4);
    p[k++] = ADD(6, 1, 2);
    p[k++] = SUB(7, 6, 5);
    run(p, k, BNE(1, 1, 12), 4, seen);
    compare("not taken", seen, '{BNE(1, 1, 12), ADD(5, 3, 4), ADD(6, 1, 2), SUB(7, 6, 5)});
    chk(dut.u_rf.regs[7] == 32'(3 - 11), "not taken: x7 = (1 + 2) - (3 + 8)");

    // branch taken
    k = 0; foreach (pre[i]) p[k++] = pre[i];
    p[k++] = BEQ(1, 1, 8);
    p[k++] = ADD(5, 3, 4);
    p[k++] = SUB(7, 6, 5);
    run(p, k, BEQ(1, 1, 8), 3, seen);
    compare("taken", seen, '{BEQ(1, 1, 8), BUBBLE, SUB(7, 6, 5)});
    chk(dut.u_rf.regs[5] == 0, "taken: killed add did not write x5");
    chk(dut.u_rf.regs[7] == 6, "taken: x7 = 6 - 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
