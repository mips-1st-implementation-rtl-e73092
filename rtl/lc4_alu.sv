// lc4_alu: 16-bit ALU of the single-cycle LC4 core.
//
// ALUk selects A+B (00), A AND B (01), NOR of A and B (10) or B passed
// through unchanged (11, used by MOV and LIM). Addition wraps.
// Purely combinational.
module lc4_alu
  import lc4_pkg::*;
(
  input  logic [WORD-1:0] a,
  input  logic [WORD-1:0] b,
  input  aluk_e           alu_k,
  output logic [WORD-1:0] y
);

  always_comb begin
    unique case (alu_k)
      ALUK_ADD: y = a + b;
      ALUK_AND: y = a & b;
      ALUK_NOR: y = ~(a | b);
      default:  y = b;       // ALUK_MOV
    endcase
  end

endmodule
