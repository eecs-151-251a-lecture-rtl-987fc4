// branch_comp_tb: checks BrEq and BrLT (signed and unsigned) of the branch
// comparator on corner values and random operands. The signed reference
// compares sign bits first and magnitudes second, a different formulation
// from the RTL's $signed comparison.
module branch_comp_tb;
  logic [31:0] a, b;
  logic br_un, br_eq, br_lt;
  int checks = 0, failures = 0;

  branch_comp #(.XLEN(32)) dut (.a, .b, .br_un, .br_eq, .br_lt);

  task automatic try(logic [31:0] x, logic [31:0] y, logic un);
    logic e_lt;
    a = x; b = y; br_un = un;
    #1;
    if (un) e_lt = (x < y);
    else    e_lt = (x[31] != y[31]) ? x[31] : (x[30:0] < y[30:0]);
    checks += 2;
    if (br_eq !== (x == y)) begin failures++; $display("FAIL eq %h %h", x, y); end
    if (br_lt !== e_lt)     begin failures++; $display("FAIL lt %h %h un=%0d", x, y, un); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] c [6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'hffff_fffb};
    foreach (c[i]) foreach (c[j]) for (int u = 0; u < 2; u++) try(c[i], c[j], u[0]);
    for (int i = 0; i < 2000; i++) begin
      automatic logic [31:0] x = $urandom, y = $urandom;
      if (i % 5 == 0) y = x;
      try(x, y, i[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
