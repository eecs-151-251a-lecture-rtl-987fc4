// alu_tb: checks every ALU operation on corner and random operands against
// reference results computed in the testbench (shifts by repeated single-bit
// steps, set-less-than by subtraction sign/borrow).
module alu_tb;
  import riscv_pkg::*;
  word_t a, b, y;
  alu_op_e op;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .alu_sel(op), .y);

  function automatic word_t ref_y(word_t x, word_t z, alu_op_e o);
    word_t r;
    logic [32:0] d;
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x + ~z + 1;
      ALU_SLL:  begin r = x; repeat (z[4:0]) r = {r[30:0], 1'b0}; return r; end
      ALU_SRL:  begin r = x; repeat (z[4:0]) r = {1'b0, r[31:1]}; return r; end
      ALU_SRA:  begin r = x; repeat (z[4:0]) r = {r[31], r[31:1]}; return r; end
      ALU_SLT:  begin d = {x[31], x} - {z[31], z}; return {31'b0, d[32]}; end
      ALU_SLTU: begin d = {1'b0, x} - {1'b0, z}; return {31'b0, d[32]}; end
      ALU_XOR:  return (x | z) & ~(x & z);
      ALU_OR:   return ~(~x & ~z);
      ALU_AND:  return ~(~x | ~z);
      ALU_PASSB: return z;
      default:  return '0;
    endcase
  endfunction

  task automatic try(word_t x, word_t z, alu_op_e o);
    a = x; b = z; op = o;
    #1;
    checks++;
    if (y !== ref_y(x, z, o)) begin
      failures++;
      $display("FAIL: %s %h %h -> %h expected %h", o.name(), x, z, y, ref_y(x, z, o));
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t c [5] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_fffb};
    for (int o = 0; o <= int'(ALU_PASSB); o++) begin
      foreach (c[i]) foreach (c[j]) try(c[i], c[j], alu_op_e'(o));
      for (int i = 0; i < 300; i++) try($urandom, $urandom, alu_op_e'(o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
