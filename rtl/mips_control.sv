// mips_control: the main decoder ("decode ROM") of the single-cycle MIPS core.
//
// The 6-bit opcode is the ROM address; each row holds the datapath control
// signals for one instruction. The rows follow the course's decode table for
// add/sub (both R-format, opcode 000000), ori, lw, sw, beq and j. Entries the
// table leaves as don't-care are driven to 0 here, and MemRead (drawn in the
// datapath figure but not in the table) is set for lw only. Opcodes outside
// the table decode to an all-zero row, which writes nothing and falls
// through to PC+4: they behave as no-ops (a choice of this design).
//
// Purely combinational; the R-format row asks the local ALU decoder to use
// the func field (ALUOp = ALUOP_FUNC).
module mips_control
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl        = '0;
    ctrl.alu_op = ALUOP_ADD;
    unique case (opcode)
      OP_RTYPE: begin
        ctrl.reg_dst   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.alu_op    = ALUOP_FUNC;
      end
      OP_ORI: begin
        ctrl.alu_src   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.ext_op    = 1'b0;
        ctrl.alu_op    = ALUOP_OR;
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_write  = 1'b1;
        ctrl.mem_read   = 1'b1;
        ctrl.ext_op     = 1'b1;
        ctrl.alu_op     = ALUOP_ADD;
      end
      OP_SW: begin
        ctrl.alu_src   = 1'b1;
        ctrl.mem_write = 1'b1;
        ctrl.ext_op    = 1'b1;
        ctrl.alu_op    = ALUOP_ADD;
      end
      OP_BEQ: begin
        ctrl.branch = 1'b1;
        ctrl.alu_op = ALUOP_SUB;
      end
      OP_J: begin
        ctrl.jump = 1'b1;
      end
      default: ;
    endcase
  end

  // Every row does at most one of: write a register, store, branch, jump.
  always_comb begin
    assert ($countones({ctrl.reg_write, ctrl.mem_write, ctrl.branch, ctrl.jump}) <= 1)
      else $error("mips_control: conflicting control row for opcode %b", opcode);
  end

endmodule
