// lc4_decode: instruction decoder of the single-cycle LC4 core.
//
// Maps the 4-bit opcode instr[15:12] to the datapath controls: the
// destination register mux (DRmux), the ALU input muxes (Amux, Bmux), the
// ALU function (ALUk), the register-input mux (REGmux), the register-file
// load (LDreg), the DMEM write (DMEMrw) and the branch flag (isBR). The
// operand fields and ALUk values follow the LC4 instruction table: ALU
// instructions use ALUk = opcode[1:0]; LDR, STR, LEA and BRR add (ALUk=00);
// LIM passes the offset through (ALUk=11). The 0/1 sense of each mux select
// matches the numbered inputs of the LC4 datapath drawing; unassigned
// opcodes decode to a no-op (no register or memory write, no branch), which
// is this design's choice. Purely combinational.
module lc4_decode
  import lc4_pkg::*;
(
  input  logic [3:0] opcode,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl       = '0;
    ctrl.alu_k = ALUK_ADD;
    unique case (opcode)
      OP_ADD, OP_AND, OP_NOR, OP_MOV: begin
        ctrl.dr_mux  = 1'b1;
        ctrl.a_mux   = 1'b1;
        ctrl.b_mux   = 1'b0;
        ctrl.alu_k   = aluk_e'(opcode[1:0]);
        ctrl.reg_mux = 1'b1;
        ctrl.ld_reg  = 1'b1;
      end
      OP_LDR: begin
        ctrl.a_mux   = 1'b1;
        ctrl.b_mux   = 1'b1;
        ctrl.reg_mux = 1'b0;
        ctrl.ld_reg  = 1'b1;
      end
      OP_STR: begin
        ctrl.a_mux   = 1'b1;
        ctrl.b_mux   = 1'b1;
        ctrl.dmem_rw = 1'b1;
      end
      OP_LEA: begin
        ctrl.a_mux   = 1'b0;
        ctrl.b_mux   = 1'b1;
        ctrl.reg_mux = 1'b1;
        ctrl.ld_reg  = 1'b1;
      end
      OP_LIM: begin
        ctrl.b_mux   = 1'b1;
        ctrl.alu_k   = ALUK_MOV;
        ctrl.reg_mux = 1'b1;
        ctrl.ld_reg  = 1'b1;
      end
      OP_BRR: begin
        ctrl.a_mux = 1'b1;
        ctrl.b_mux = 1'b1;
        ctrl.is_br = 1'b1;
      end
      default: ;
    endcase
  end

  // An instruction writes a register, stores, or branches: never two of them.
  always_comb begin
    assert ($countones({ctrl.ld_reg, ctrl.dmem_rw, ctrl.is_br}) <= 1)
      else $error("lc4_decode: conflicting controls for opcode %b", opcode);
  end

endmodule
