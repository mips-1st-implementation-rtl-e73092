// mips_imem: instruction memory of the single-cycle MIPS core.
//
// 2**ADDR_W 32-bit words. The read port takes a byte address and returns the
// word it falls in combinationally (the low two address bits are ignored,
// instructions being 4-byte aligned), so fetch completes within the cycle.
// A synchronous load port (load_we, load_addr as a word index, load_data)
// lets a host fill the memory with a program, typically while the core is
// held in reset. The depth and the load port are this design's choices.
module mips_imem #(
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic [31:0]       addr,
  output logic [31:0]       instr,
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [31:0]       load_data
);

  logic [31:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign instr = mem[addr[ADDR_W+1:2]];

endmodule
