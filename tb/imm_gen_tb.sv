// imm_gen_tb: checks the immediate generator for all five formats with
// directed extreme values and random instructions. Expected values are
// computed by arithmetic shifts of the whole instruction word, a different
// route from the RTL's bit concatenation.
module imm_gen_tb;
  import riscv_pkg::*;
  word_t inst, imm;
  imm_sel_e sel;
  int checks = 0, failures = 0;

  imm_gen dut (.inst, .imm_sel(sel), .imm);

  function automatic word_t expect_imm(word_t in, imm_sel_e s);
    word_t si = word_t'($signed(in) >>> 20);            // I: bits 31:20, sign-extended
    case (s)
      IMM_I: return si;
      IMM_S: return (si & ~word_t'(32'h1f)) | word_t'(in[11:7]);
      IMM_B: return ((si & ~word_t'(32'h81f)) | (word_t'(in[7]) << 11) | (word_t'(in[11:8]) << 1));
      IMM_U: return in & 32'hffff_f000;
      default: return ((si & ~word_t'(32'hff801)) | (in & 32'h000f_f000) | (word_t'(in[20]) << 11)) ;
    endcase
  endfunction

  task automatic try(word_t in, imm_sel_e s);
    word_t e;
    inst = in; sel = s;
    #1;
    e = expect_imm(in, s);
    checks++;
    if (imm !== e) begin
      failures++;
      $display("FAIL: inst=%h sel=%s imm=%h expected=%h", in, s.name(), imm, e);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    imm_sel_e s;
    // beq x1, x2, L1 with offset -4096 and +4094 (the B range limits)
    try(32'h8020_8063, IMM_B);   // imm = -4096
    try(32'h7E20_8FE3, IMM_B);   // imm = +4094
    try(32'hFFF0_0013, IMM_I);   // addi x0, x0, -1
    try(32'h8000_006F, IMM_J);   // jal offset -2^20
    for (int i = 0; i < 2000; i++) begin
      s = imm_sel_e'($urandom_range(0, 4));
      try($urandom, s);
    end
    // spot values worked out by hand
    inst = 32'h8020_8063; sel = IMM_B; #1;
    checks++; if (imm !== 32'hFFFF_F000) begin failures++; $display("FAIL: B min"); end
    inst = 32'h7E20_8FE3; sel = IMM_B; #1;
    checks++; if (imm !== 32'h0000_0FFE) begin failures++; $display("FAIL: B max"); end
    inst = 32'h0080_006F; sel = IMM_J; #1;   // jal x0, +8
    checks++; if (imm !== 32'h0000_0008) begin failures++; $display("FAIL: J +8"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
