// lecture_cpus: the two single-cycle processors side by side.
//
// Instantiates the 32-bit single-cycle MIPS core (add, sub, ori, lw, sw,
// beq, j) and the 16-bit single-cycle LC4 core. They share clock and reset
// but are otherwise independent: each has its own program-load port and its
// own status outputs, brought out unchanged (mips_* and lc4_* ports). See
// mips_cpu and lc4_cpu for the timing of each; both execute one instruction
// per clock after reset is released.
module lecture_cpus #(
  parameter int unsigned MIPS_IMEM_AW = 10,
  parameter int unsigned MIPS_DMEM_AW = 10,
  parameter int unsigned LC4_IMEM_AW  = 16,
  parameter int unsigned LC4_DMEM_AW  = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  // MIPS
  input  logic                    mips_imem_load_we,
  input  logic [MIPS_IMEM_AW-1:0] mips_imem_load_addr,
  input  logic [31:0]             mips_imem_load_data,
  output logic [31:0]             mips_pc,
  output logic [31:0]             mips_instr,
  output logic                    mips_wb_en,
  output logic [4:0]              mips_wb_addr,
  output logic [31:0]             mips_wb_data,
  output logic                    mips_st_en,
  output logic [31:0]             mips_st_addr,
  output logic [31:0]             mips_st_data,
  // LC4
  input  logic                    lc4_imem_load_we,
  input  logic [LC4_IMEM_AW-1:0]  lc4_imem_load_addr,
  input  logic [15:0]             lc4_imem_load_data,
  output logic [15:0]             lc4_pc,
  output logic [15:0]             lc4_instr,
  output logic                    lc4_wb_en,
  output logic [2:0]              lc4_wb_addr,
  output logic [15:0]             lc4_wb_data,
  output logic                    lc4_st_en,
  output logic [15:0]             lc4_st_addr,
  output logic [15:0]             lc4_st_data,
  output logic                    lc4_br_taken
);

  mips_cpu #(.IMEM_AW(MIPS_IMEM_AW), .DMEM_AW(MIPS_DMEM_AW)) u_mips (
    .clk           (clk),
    .rst           (rst),
    .imem_load_we  (mips_imem_load_we),
    .imem_load_addr(mips_imem_load_addr),
    .imem_load_data(mips_imem_load_data),
    .pc            (mips_pc),
    .instr         (mips_instr),
    .wb_en         (mips_wb_en),
    .wb_addr       (mips_wb_addr),
    .wb_data       (mips_wb_data),
    .st_en         (mips_st_en),
    .st_addr       (mips_st_addr),
    .st_data       (mips_st_data)
  );

  lc4_cpu #(.IMEM_AW(LC4_IMEM_AW), .DMEM_AW(LC4_DMEM_AW)) u_lc4 (
    .clk           (clk),
    .rst           (rst),
    .imem_load_we  (lc4_imem_load_we),
    .imem_load_addr(lc4_imem_load_addr),
    .imem_load_data(lc4_imem_load_data),
    .pc            (lc4_pc),
    .instr         (lc4_instr),
    .wb_en         (lc4_wb_en),
    .wb_addr       (lc4_wb_addr),
    .wb_data       (lc4_wb_data),
    .st_en         (lc4_st_en),
    .st_addr       (lc4_st_addr),
    .st_data       (lc4_st_data),
    .br_taken      (lc4_br_taken)
  );

endmodule
