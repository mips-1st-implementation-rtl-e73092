// mips_pkg: shared types and constants of the single-cycle MIPS core.
//
// The opcode and func values are the standard MIPS encodings of the seven
// instructions the core executes (add, sub, ori, lw, sw, beq, j). The 3-bit
// ALU control code (ALUctr) encoding is this design's own choice; the
// instruction set only fixes which operation (Add, Sub, Or) each
// instruction needs. ALUOp, the main decoder's request to the local ALU
// decoder, reuses the ALUctr codes and adds one code, ALUOP_FUNC, meaning
// "R-format: take the operation from the func field".
package mips_pkg;

  localparam int unsigned XLEN = 32;

  // Primary opcodes, instr[31:26]
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_J     = 6'b000010;
  localparam logic [5:0] OP_BEQ   = 6'b000100;
  localparam logic [5:0] OP_ORI   = 6'b001101;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;

  // R-format function codes, instr[5:0]
  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;

  // ALU operation select (ALUctr<2:0>)
  typedef enum logic [2:0] {
    ALU_ADD = 3'b000,
    ALU_SUB = 3'b001,
    ALU_OR  = 3'b010
  } alu_ctrl_e;

  // Main decoder -> local ALU decoder request (ALUOp)
  typedef enum logic [2:0] {
    ALUOP_ADD  = 3'b000,
    ALUOP_SUB  = 3'b001,
    ALUOP_OR   = 3'b010,
    ALUOP_FUNC = 3'b111
  } alu_op_e;

  // One row of the decode ROM: the datapath control signals
  typedef struct packed {
    logic    reg_dst;     // 1: write register is rd, 0: rt
    logic    alu_src;     // 1: ALU B input is the extended immediate
    logic    mem_to_reg;  // 1: register write data comes from DMEM
    logic    reg_write;
    logic    mem_read;
    logic    mem_write;
    logic    branch;
    logic    jump;
    logic    ext_op;      // 1: sign extend, 0: zero extend
    alu_op_e alu_op;
  } ctrl_t;

endpackage
