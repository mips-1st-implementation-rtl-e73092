// mips_alu: the 32-bit ALU of the single-cycle MIPS core.
//
// Computes A+B, A-B or A|B as selected by ALUctr, and raises Zero when the
// result is all zeros; beq uses Sub and Zero to compare its two registers.
// Overflow is not detected (add and sub wrap), a choice of this design.
// Purely combinational.
module mips_alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = XLEN
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_ctrl_e        alu_ctrl,
  output logic [WIDTH-1:0] result,
  output logic             zero
);

  always_comb begin
    unique case (alu_ctrl)
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = a + b;
    endcase
  end

  assign zero = (result == '0);

endmodule
