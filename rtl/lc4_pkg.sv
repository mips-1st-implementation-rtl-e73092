// lc4_pkg: shared types and constants of the single-cycle LC4 core.
//
// LC4 is a 16-bit, LC-3-like teaching ISA reduced so that every instruction
// runs in one cycle. Opcodes (instr[15:12]):
//   0000 ADD, 0001 AND, 0010 NOR, 0011 MOV   DR=instr[5:3] <- SR1 op SR2
//   1001 LDR  DR=instr[8:6] <- DMEM[baseR + sext(off6)]
//   1010 STR  DMEM[baseR + sext(off6)] <- R[instr[8:6]]
//   1011 LEA  DR=instr[8:6] <- PC + sext(off6)
//   1100 LIM  DR=instr[8:6] <- sext(off6)
//   1111 BRR  PC <- baseR + sext(off6) if R[instr[8:6]] < 0
// For the four ALU instructions the ALU function ALUk is the opcode's low
// two bits. The other opcodes are unassigned and execute as no-ops here.
package lc4_pkg;

  localparam int unsigned WORD = 16;

  localparam logic [3:0] OP_ADD = 4'b0000;
  localparam logic [3:0] OP_AND = 4'b0001;
  localparam logic [3:0] OP_NOR = 4'b0010;
  localparam logic [3:0] OP_MOV = 4'b0011;
  localparam logic [3:0] OP_LDR = 4'b1001;
  localparam logic [3:0] OP_STR = 4'b1010;
  localparam logic [3:0] OP_LEA = 4'b1011;
  localparam logic [3:0] OP_LIM = 4'b1100;
  localparam logic [3:0] OP_BRR = 4'b1111;

  typedef enum logic [1:0] {
    ALUK_ADD = 2'b00,
    ALUK_AND = 2'b01,
    ALUK_NOR = 2'b10,
    ALUK_MOV = 2'b11   // pass B through
  } aluk_e;

  // Control word produced by the decoder
  typedef struct packed {
    logic  dr_mux;   // 0: DR = instr[8:6], 1: DR = instr[5:3]
    logic  a_mux;    // 0: ALU A = PC,      1: ALU A = SR1out
    logic  b_mux;    // 0: ALU B = SR2out,  1: ALU B = SEXT(instr[5:0])
    aluk_e alu_k;
    logic  reg_mux;  // 0: register input = DMEM out, 1: ALU result
    logic  ld_reg;   // register file write enable
    logic  dmem_rw;  // 1: write DMEM
    logic  is_br;    // conditional register branch
  } ctrl_t;

endpackage
