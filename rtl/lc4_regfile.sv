// lc4_regfile: register file of the single-cycle LC4 core.
//
// Eight 16-bit general registers R0..R7 with two combinational read ports
// (SR1 -> SR1out, SR2 -> SR2out) and one write port (DR, in, LD_REG) that
// updates on the rising clock edge. All eight registers are writable (R0 is
// not hardwired to zero, as in LC-3). Reset clears them; that is this
// design's choice.
module lc4_regfile
  import lc4_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [2:0]      sr1,
  input  logic [2:0]      sr2,
  output logic [WORD-1:0] sr1_out,
  output logic [WORD-1:0] sr2_out,
  input  logic            ld_reg,
  input  logic [2:0]      dr,
  input  logic [WORD-1:0] din
);

  logic [WORD-1:0] regs [8];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) regs[i] <= '0;
    end else if (ld_reg) begin
      regs[dr] <= din;
    end
  end

  assign sr1_out = regs[sr1];
  assign sr2_out = regs[sr2];

endmodule
