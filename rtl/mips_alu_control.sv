// mips_alu_control: the local ALU decoder of the single-cycle MIPS core.
//
// Only the ALU needs the 6-bit func field, so the main decoder passes a
// short ALUOp request and this small decoder next to the ALU turns it into
// the 3-bit ALUctr. For I-format and memory instructions ALUOp already names
// the operation (Or for ori, Add for lw/sw address arithmetic, Sub for beq);
// for R-format (ALUOp = ALUOP_FUNC) the func field selects it: 100000 add,
// 100010 sub. Other func codes are not defined by the instruction set this
// core implements and select Add (this design's choice).
//
// Purely combinational.
module mips_alu_control
  import mips_pkg::*;
(
  input  alu_op_e    alu_op,
  input  logic [5:0] funct,
  output alu_ctrl_e  alu_ctrl
);

  always_comb begin
    unique case (alu_op)
      ALUOP_SUB: alu_ctrl = ALU_SUB;
      ALUOP_OR:  alu_ctrl = ALU_OR;
      ALUOP_FUNC: begin
        unique case (funct)
          FN_ADD:  alu_ctrl = ALU_ADD;
          FN_SUB:  alu_ctrl = ALU_SUB;
          default: alu_ctrl = ALU_ADD;  // undefined codes
        endcase
      end
      default:   alu_ctrl = ALU_ADD;
    endcase
  end

endmodule
