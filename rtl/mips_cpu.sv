// mips_cpu: single-cycle MIPS processor (add, sub, ori, lw, sw, beq, j).
//
// Every instruction completes in one clock cycle (CPI = 1): in a single
// combinational wave the instruction is fetched from IMEM at the PC, its
// register fields address the register file directly (source registers sit
// at fixed bit positions, so they are read while the opcode is decoded), the
// main decoder turns the opcode into control signals, the ALU computes,
// DMEM is read or written, and on the next rising edge the result is
// written to the register file and the PC moves on. The cycle time is set by
// the slowest instruction, lw (IMEM, register read, ALU, DMEM, write-back).
//
// Datapath multiplexers, as in the standard single-cycle diagram:
//   RegDst   : write register = rd (instr[15:11]) or rt (instr[20:16])
//   ALUSrc   : ALU B = register rt or the extended immediate
//   MemtoReg : write data = DMEM read data or ALU result
// Branch AND Zero selects the beq target; Jump selects the j target.
//
// Interface: the program is loaded through the IMEM load port while rst is
// high. pc/instr show the instruction executing this cycle; wb_* show the
// register write and st_* the memory write that happen at the end of it.
// Register and memory writes are suppressed during reset. IMEM/DMEM depths
// (IMEM_AW/DMEM_AW, word-address bits) and the load port are this design's
// choices; the datapath, control table and jump/branch targets follow the
// course's processor.
module mips_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_AW  = 10,
  parameter int unsigned DMEM_AW  = 10,
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic               clk,
  input  logic               rst,
  // program load
  input  logic               imem_load_we,
  input  logic [IMEM_AW-1:0] imem_load_addr,
  input  logic [31:0]        imem_load_data,
  // status
  output logic [31:0]        pc,
  output logic [31:0]        instr,
  output logic               wb_en,
  output logic [4:0]         wb_addr,
  output logic [31:0]        wb_data,
  output logic               st_en,
  output logic [31:0]        st_addr,
  output logic [31:0]        st_data
);

  ctrl_t       ctrl;
  alu_ctrl_e   alu_ctrl;
  logic [31:0] rs_data, rt_data, imm_ext, alu_b, alu_result, mem_rdata;
  logic        zero;
  logic [4:0]  rs, rt, rd, write_reg;

  assign rs = instr[25:21];
  assign rt = instr[20:16];
  assign rd = instr[15:11];

  mips_ifu #(.RESET_PC(RESET_PC)) u_ifu (
    .clk      (clk),
    .rst      (rst),
    .branch   (ctrl.branch),
    .zero     (zero),
    .jump     (ctrl.jump),
    .br_offset(instr[15:0]),
    .j_index  (instr[25:0]),
    .pc       (pc)
  );

  mips_imem #(.ADDR_W(IMEM_AW)) u_imem (
    .clk      (clk),
    .addr     (pc),
    .instr    (instr),
    .load_we  (imem_load_we),
    .load_addr(imem_load_addr),
    .load_data(imem_load_data)
  );

  mips_control u_control (
    .opcode(instr[31:26]),
    .ctrl  (ctrl)
  );

  assign write_reg = ctrl.reg_dst ? rd : rt;

  mips_regfile #(.NREGS(32), .WIDTH(32)) u_regfile (
    .clk   (clk),
    .rst   (rst),
    .raddr1(rs),
    .raddr2(rt),
    .rdata1(rs_data),
    .rdata2(rt_data),
    .we    (wb_en),
    .waddr (write_reg),
    .wdata (wb_data)
  );

  mips_extender u_ext (
    .imm   (instr[15:0]),
    .ext_op(ctrl.ext_op),
    .ext   (imm_ext)
  );

  mips_alu_control u_alu_control (
    .alu_op  (ctrl.alu_op),
    .funct   (instr[5:0]),
    .alu_ctrl(alu_ctrl)
  );

  assign alu_b = ctrl.alu_src ? imm_ext : rt_data;

  mips_alu #(.WIDTH(32)) u_alu (
    .a       (rs_data),
    .b       (alu_b),
    .alu_ctrl(alu_ctrl),
    .result  (alu_result),
    .zero    (zero)
  );

  mips_dmem #(.ADDR_W(DMEM_AW)) u_dmem (
    .clk      (clk),
    .mem_read (ctrl.mem_read),
    .mem_write(st_en),
    .addr     (alu_result),
    .wdata    (rt_data),
    .rdata    (mem_rdata)
  );

  assign wb_en   = ctrl.reg_write & ~rst;
  assign wb_addr = write_reg;
  assign wb_data = ctrl.mem_to_reg ? mem_rdata : alu_result;
  assign st_en   = ctrl.mem_write & ~rst;
  assign st_addr = alu_result;
  assign st_data = rt_data;

endmodule
