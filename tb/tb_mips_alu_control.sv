// tb_mips_alu_control: exhaustive test of the local ALU decoder.
// For every ALUOp code and all 64 func values, checks ALUctr: Add, Sub, Or
// for the direct requests; for R-format, Sub for func 100010, Add otherwise.
module tb_mips_alu_control;
  import mips_pkg::*;

  alu_op_e    alu_op;
  logic [5:0] funct;
  alu_ctrl_e  alu_ctrl;
  int         checks = 0, failures = 0;

  mips_alu_control dut (.alu_op(alu_op), .funct(funct), .alu_ctrl(alu_ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e ops[4] = '{ALUOP_ADD, ALUOP_SUB, ALUOP_OR, ALUOP_FUNC};
    for (int o = 0; o < 4; o++) begin
      for (int f = 0; f < 64; f++) begin
        alu_ctrl_e exp;
        alu_op = ops[o];
        funct  = 6'(f);
        #1;
        case (o)
          0: exp = ALU_ADD;
          1: exp = ALU_SUB;
          2: exp = ALU_OR;
          default: exp = (f == 'h22) ? ALU_SUB : ALU_ADD;
        endcase
        checks++;
        if (alu_ctrl !== exp) begin
          failures++;
          $display("FAIL aluop=%0d funct=%b got %0d exp %0d", o, funct, alu_ctrl, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
