// mips_dmem: data memory of the single-cycle MIPS core.
//
// 2**ADDR_W 32-bit words addressed by the byte address the ALU computes
// (low two bits ignored: lw and sw move aligned words). Reads are
// combinational and gated by MemRead (the output is zero otherwise); writes
// of the write data (register rt) happen on the rising edge when MemWrite is
// high. The depth is this design's choice; addresses beyond it wrap.
module mips_dmem #(
  parameter int unsigned ADDR_W = 10
) (
  input  logic        clk,
  input  logic        mem_read,
  input  logic        mem_write,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  logic [31:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (mem_write) mem[addr[ADDR_W+1:2]] <= wdata;
  end

  assign rdata = mem_read ? mem[addr[ADDR_W+1:2]] : '0;

endmodule
