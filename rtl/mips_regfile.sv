// mips_regfile: register file of the single-cycle MIPS core.
//
// NREGS registers of WIDTH bits with two combinational read ports (rs, rt)
// and one write port (write register, write data, RegWrite) that updates on
// the rising clock edge, so an instruction reads its sources and writes its
// result in the same cycle. Register 0 always reads as zero and ignores
// writes, following the MIPS convention. Reset clears all registers; both
// choices belong to this design.
module mips_regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    raddr1,
  input  logic [AW-1:0]    raddr2,
  output logic [WIDTH-1:0] rdata1,
  output logic [WIDTH-1:0] rdata2,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1 = (raddr1 == '0) ? '0 : regs[raddr1];
  assign rdata2 = (raddr2 == '0) ? '0 : regs[raddr2];

endmodule
