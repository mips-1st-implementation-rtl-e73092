// tb_mips_control: checks the main decoder against the decode table.
// The expected rows are the course table for add/sub (R-format), ori, lw,
// sw, beq and jump, with don't-care entries given the value the design
// drives (0). All 64 opcodes are tried; opcodes outside the table must not
// write a register or memory, branch or jump.
module tb_mips_control;
  import mips_pkg::*;

  logic [5:0] opcode;
  ctrl_t      ctrl;
  int         checks = 0, failures = 0;

  mips_control dut (.opcode(opcode), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {RegDst, ALUSrc, MemtoReg, RegWrite, MemRead, MemWrite, Branch, Jump, ExtOp}
  function automatic logic [8:0] exp_row(logic [5:0] op);
    case (op)
      6'b000000: return 9'b1_0_0_1_0_0_0_0_0;
      6'b001101: return 9'b0_1_0_1_0_0_0_0_0;
      6'b100011: return 9'b0_1_1_1_1_0_0_0_1;
      6'b101011: return 9'b0_1_0_0_0_1_0_0_1;
      6'b000100: return 9'b0_0_0_0_0_0_1_0_0;
      6'b000010: return 9'b0_0_0_0_0_0_0_1_0;
      default:   return 9'b0;
    endcase
  endfunction

  function automatic logic [2:0] exp_aluop(logic [5:0] op);
    case (op)
      6'b000000: return 3'b111;  // use func
      6'b001101: return 3'b010;  // Or
      6'b000100: return 3'b001;  // Sub
      default:   return 3'b000;  // Add
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 64; i++) begin
      logic [8:0] got;
      opcode = 6'(i);
      #1;
      got = {ctrl.reg_dst, ctrl.alu_src, ctrl.mem_to_reg, ctrl.reg_write,
             ctrl.mem_read, ctrl.mem_write, ctrl.branch, ctrl.jump, ctrl.ext_op};
      checks++;
      if (got !== exp_row(opcode)) begin
        failures++;
        $display("FAIL opcode=%b row %b exp %b", opcode, got, exp_row(opcode));
      end
      checks++;
      if (ctrl.alu_op !== exp_aluop(opcode)) begin
        failures++;
        $display("FAIL opcode=%b aluop %b exp %b", opcode, ctrl.alu_op, exp_aluop(opcode));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
