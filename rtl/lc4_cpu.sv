// lc4_cpu: single-cycle 16-bit LC4 processor.
//
// One instruction per clock. The PC addresses IMEM; the instruction's fixed
// fields drive the register file directly (SR1 = instr[11:9],
// SR2 = instr[8:6]) while instr[15:12] is decoded. DRmux picks the
// destination (instr[5:3] for ALU instructions, instr[8:6] for LDR, LEA and
// LIM). Amux feeds the ALU's A input with SR1out or the PC (LEA), Bmux feeds
// B with SR2out or SEXT(instr[5:0]). The ALU result is both the DMEM address
// and, through REGmux, a register-write source; SR2out is the DMEM write
// data (STR). The next PC is PC_inc = PC+1, or the ALU result (baseR +
// offset) for a BRR whose condition register is negative: isBR AND
// SR2out[15].
//
// Interface: the program is loaded through the IMEM load port while rst is
// high (reset puts PC at 0 and clears the registers; writes are suppressed
// during reset). pc/instr show the instruction executing this cycle, wb_*
// and st_* the register and memory writes at the end of it, br_taken a taken
// BRR. LEA adds the offset to the address of the LEA itself (the PC before
// the increment). Memory depths and the load port are this design's
// choices; everything else follows the LC4 datapath drawing and table.
module lc4_cpu
  import lc4_pkg::*;
#(
  parameter int unsigned IMEM_AW = 16,
  parameter int unsigned DMEM_AW = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               imem_load_we,
  input  logic [IMEM_AW-1:0] imem_load_addr,
  input  logic [WORD-1:0]    imem_load_data,
  output logic [WORD-1:0]    pc,
  output logic [WORD-1:0]    instr,
  output logic               wb_en,
  output logic [2:0]         wb_addr,
  output logic [WORD-1:0]    wb_data,
  output logic               st_en,
  output logic [WORD-1:0]    st_addr,
  output logic [WORD-1:0]    st_data,
  output logic               br_taken
);

  ctrl_t           ctrl;
  logic [WORD-1:0] pc_inc, sr1_out, sr2_out, sext6, alu_a, alu_b, alu_y, dmem_out;
  logic [2:0]      dr;

  // PC register and PC_inc
  assign pc_inc = pc + 16'd1;

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= br_taken ? alu_y : pc_inc;
  end

  assign br_taken = ctrl.is_br & sr2_out[WORD-1] & ~rst;

  lc4_imem #(.ADDR_W(IMEM_AW)) u_imem (
    .clk      (clk),
    .addr     (pc),
    .instr    (instr),
    .load_we  (imem_load_we),
    .load_addr(imem_load_addr),
    .load_data(imem_load_data)
  );

  lc4_decode u_decode (
    .opcode(instr[15:12]),
    .ctrl  (ctrl)
  );

  assign dr = ctrl.dr_mux ? instr[5:3] : instr[8:6];

  lc4_regfile u_regfile (
    .clk    (clk),
    .rst    (rst),
    .sr1    (instr[11:9]),
    .sr2    (instr[8:6]),
    .sr1_out(sr1_out),
    .sr2_out(sr2_out),
    .ld_reg (wb_en),
    .dr     (dr),
    .din    (wb_data)
  );

  assign sext6 = {{(WORD-6){instr[5]}}, instr[5:0]};
  assign alu_a = ctrl.a_mux ? sr1_out : pc;
  assign alu_b = ctrl.b_mux ? sext6 : sr2_out;

  lc4_alu u_alu (
    .a    (alu_a),
    .b    (alu_b),
    .alu_k(ctrl.alu_k),
    .y    (alu_y)
  );

  lc4_dmem #(.ADDR_W(DMEM_AW)) u_dmem (
    .clk    (clk),
    .dmem_rw(st_en),
    .addr   (alu_y),
    .din    (sr2_out),
    .dout   (dmem_out)
  );

  assign wb_en   = ctrl.ld_reg & ~rst;
  assign wb_addr = dr;
  assign wb_data = ctrl.reg_mux ? alu_y : dmem_out;
  assign st_en   = ctrl.dmem_rw & ~rst;
  assign st_addr = alu_y;
  assign st_data = sr2_out;

endmodule
