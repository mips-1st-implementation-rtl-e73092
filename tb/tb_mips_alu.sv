// tb_mips_alu: self-checking test of the MIPS ALU.
// Applies random and corner-case operands to Add, Sub and Or and checks the
// result and the Zero flag against arithmetic done in the testbench.
module tb_mips_alu;
  import mips_pkg::*;

  logic [31:0] a, b, result;
  alu_ctrl_e   alu_ctrl;
  logic        zero;
  int          checks = 0, failures = 0;

  mips_alu dut (.a(a), .b(b), .alu_ctrl(alu_ctrl), .result(result), .zero(zero));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] ta, tb, input alu_ctrl_e op);
    logic [31:0] exp;
    a = ta; b = tb; alu_ctrl = op;
    #1;
    case (op)
      ALU_ADD: exp = ta + tb;
      ALU_SUB: exp = ta + ~tb + 32'd1;
      default: exp = ta | tb;
    endcase
    checks++;
    if (result !== exp || zero !== (exp == 32'd0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %h z=%b exp %h", op, ta, tb, result, zero, exp);
    end
  endtask

  initial begin
    check(32'd5, 32'd3, ALU_ADD);
    check(32'd5, 32'd5, ALU_SUB);
    check(32'hffff_ffff, 32'd1, ALU_ADD);
    check(32'd0, 32'd0, ALU_OR);
    check(32'h0000_f0f0, 32'h0f0f_0000, ALU_OR);
    check(32'd3, 32'd5, ALU_SUB);
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] ra, rb;
      ra = $urandom;
      rb = (i % 7 == 0) ? ra : $urandom;
      check(ra, rb, alu_ctrl_e'(i % 3 == 0 ? ALU_ADD : i % 3 == 1 ? ALU_SUB : ALU_OR));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
