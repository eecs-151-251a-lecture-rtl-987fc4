// hazard_unit_tb: random and directed stimulus of the hazard unit compared
// with the three rules of the 3-stage pipeline: forward the M result to X
// when M (not a load) writes a non-zero register that X reads; stall one
// cycle when X is a load whose destination the instruction in I reads; kill
// the instruction in I on a redirect, which overrides the stall.
module hazard_unit_tb;
  logic [4:0] i_rs1, i_rs2, x_rs1, x_rs2, x_rd, m_rd;
  logic i_uses_rs1, i_uses_rs2, x_regwen, x_is_load, x_redirect, m_regwen, m_is_load;
  logic fwd_a, fwd_b, stall, kill_i;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_stall = 0, n_kill = 0;

  hazard_unit dut (.*);

  task automatic evaluate();
    logic e_fa, e_fb, e_lu, e_st;
    #1;
    e_fa = m_regwen && !m_is_load && m_rd != 0 && m_rd == x_rs1;
    e_fb = m_regwen && !m_is_load && m_rd != 0 && m_rd == x_rs2;
    e_lu = x_is_load && x_regwen && x_rd != 0 &&
           ((i_uses_rs1 && i_rs1 == x_rd) || (i_uses_rs2 && i_rs2 == x_rd));
    e_st = e_lu && !x_redirect;
    checks += 4;
    if (fwd_a !== e_fa)  begin failures++; $display("FAIL fwd_a"); end
    if (fwd_b !== e_fb)  begin failures++; $display("FAIL fwd_b"); end
    if (stall !== e_st)  begin failures++; $display("FAIL stall"); end
    if (kill_i !== x_redirect) begin failures++; $display("FAIL kill"); end
    n_fwd += int'(e_fa || e_fb); n_stall += int'(e_st); n_kill += int'(x_redirect);
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: add x5,x3,x4 ; add x7,x6,x5  -> forward x5 into operand B
    i_rs1 = 0; i_rs2 = 0; i_uses_rs1 = 0; i_uses_rs2 = 0;
    x_rs1 = 6; x_rs2 = 5; x_rd = 7; x_regwen = 1; x_is_load = 0; x_redirect = 0;
    m_rd = 5; m_regwen = 1; m_is_load = 0;
    evaluate();
    checks++; if (!(fwd_b && !fwd_a && !stall)) begin failures++; $display("FAIL directed forward"); end
    // directed: lw x5,0(x4) in X ; add x7,x6,x5 in I -> stall
    x_rd = 5; x_is_load = 1; i_rs1 = 6; i_rs2 = 5; i_uses_rs1 = 1; i_uses_rs2 = 1; m_regwen = 0;
    evaluate();
    checks++; if (!stall) begin failures++; $display("FAIL directed stall"); end
    // same but not dependent -> no delay
    i_rs2 = 4;
    evaluate();
    checks++; if (stall) begin failures++; $display("FAIL directed no-stall"); end
    // random, small register range so that matches are frequent
    for (int k = 0; k < 5000; k++) begin
      {i_rs1, i_rs2, x_rs1, x_rs2, x_rd, m_rd} = {6{5'b0}};
      i_rs1 = $urandom_range(0, 3); i_rs2 = $urandom_range(0, 3);
      x_rs1 = $urandom_range(0, 3); x_rs2 = $urandom_range(0, 3);
      x_rd  = $urandom_range(0, 3); m_rd  = $urandom_range(0, 3);
      {i_uses_rs1, i_uses_rs2, x_regwen, x_is_load, m_regwen, m_is_load} = 6'($urandom);
      x_redirect = ($urandom_range(0, 3) == 0);
      evaluate();
    end
    checks++; if (n_fwd == 0 || n_stall == 0 || n_kill == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
