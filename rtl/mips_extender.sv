// mips_extender: sign or zero extension of the 16-bit immediate.
//
// ExtOp = 1 copies bit 15 into the upper 16 bits (lw, sw address offsets);
// ExtOp = 0 fills them with zeros (ori, a logical operation).
// Purely combinational.
module mips_extender
  import mips_pkg::*;
(
  input  logic [15:0]     imm,
  input  logic            ext_op,
  output logic [XLEN-1:0] ext
);

  assign ext = {{(XLEN-16){ext_op & imm[15]}}, imm};

endmodule
