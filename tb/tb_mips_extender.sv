// tb_mips_extender: checks sign and zero extension of the 16-bit immediate
// over all 65536 immediates, against integer arithmetic in the testbench.
module tb_mips_extender;
  import mips_pkg::*;

  logic [15:0] imm;
  logic        ext_op;
  logic [31:0] ext;
  int          checks = 0, failures = 0;

  mips_extender dut (.imm(imm), .ext_op(ext_op), .ext(ext));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      for (int e = 0; e < 2; e++) begin
        logic [31:0] exp;
        imm = 16'(i); ext_op = e[0];
        #1;
        exp = (e == 1 && i >= 32768) ? 32'(i - 65536) : 32'(i);
        checks++;
        if (ext !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL imm=%h ext_op=%0d got %h exp %h", imm, e, ext, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
