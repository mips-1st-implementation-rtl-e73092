// mips_ifu: program counter and next-PC logic of the single-cycle MIPS core.
//
// Instructions are 4 bytes and always aligned, so the PC is kept as a
// 30-bit word address and the two low address bits are implied zeros. Each
// cycle the word PC advances by one (PC+4 in bytes). A beq adds its
// sign-extended 16-bit offset (in words) to PC+1 when Branch AND Zero; a j
// replaces the PC with the pseudo-direct target {PC[31:28], IR[25:0], 00},
// which keeps the upper four address bits and so can reach anywhere within
// the current 256 MB region (e.g. the user region 0x0... or the supervisor
// region 0x8...). The jump mux comes after the branch mux.
//
// Interface: pc is the byte address of the current instruction; the target
// fields come straight from the instruction. The PC loads on the rising
// edge; reset puts it at RESET_PC.
module mips_ifu #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        branch,
  input  logic        zero,
  input  logic        jump,
  input  logic [15:0] br_offset,  // instr[15:0]
  input  logic [25:0] j_index,    // instr[25:0]
  output logic [31:0] pc
);

  logic [29:0] pc_w, pc_inc, br_target, j_target, pc_br, pc_next;

  assign pc_inc    = pc_w + 30'd1;
  assign br_target = pc_inc + {{14{br_offset[15]}}, br_offset};
  assign j_target  = {pc_w[29:26], j_index};
  assign pc_br     = (branch & zero) ? br_target : pc_inc;
  assign pc_next   = jump ? j_target : pc_br;

  always_ff @(posedge clk) begin
    if (rst) pc_w <= RESET_PC[31:2];
    else     pc_w <= pc_next;
  end

  assign pc = {pc_w, 2'b00};

endmodule
