// lc4_imem: instruction memory of the single-cycle LC4 core.
//
// 2**ADDR_W 16-bit words, word addressed (the PC counts words: PC <- PC+1).
// The default of 16 address bits covers the whole 16-bit address space.
// Reads are combinational. A synchronous load port lets a host fill it with
// a program while the core is held in reset (this design's choice).
module lc4_imem
  import lc4_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic [WORD-1:0]   addr,
  output logic [WORD-1:0]   instr,
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [WORD-1:0]   load_data
);

  logic [WORD-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign instr = mem[addr[ADDR_W-1:0]];

endmodule
