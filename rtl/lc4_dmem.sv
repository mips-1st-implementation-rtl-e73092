// lc4_dmem: data memory of the single-cycle LC4 core.
//
// 2**ADDR_W 16-bit words, word addressed by the ALU result. The read port
// (out) is combinational; when DMEMrw is high the word on "in" (SR2out) is
// written at the rising clock edge. The default of 16 address bits covers
// the whole 16-bit address space.
module lc4_dmem
  import lc4_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic            clk,
  input  logic            dmem_rw,
  input  logic [WORD-1:0] addr,
  input  logic [WORD-1:0] din,
  output logic [WORD-1:0] dout
);

  logic [WORD-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (dmem_rw) mem[addr[ADDR_W-1:0]] <= din;
  end

  assign dout = mem[addr[ADDR_W-1:0]];

endmodule
