// tb_mips_ifu: random test of the MIPS program counter and next-PC logic.
// Each cycle applies random Branch, Zero, Jump, offset and jump index and
// checks the new PC against PC+4, the beq target PC+4+(offset<<2) (taken
// only when Branch and Zero are both high) or the jump target
// {PC[31:28], index, 00}. Checks reset to RESET_PC and counts each path.
module tb_mips_ifu;
  localparam logic [31:0] RST_PC = 32'h8000_0100;
  logic        clk = 0, rst, branch, zero, jump;
  logic [15:0] br_offset;
  logic [25:0] j_index;
  logic [31:0] pc, model;
  int          checks = 0, failures = 0, n_seq = 0, n_br = 0, n_j = 0;

  mips_ifu #(.RESET_PC(RST_PC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; branch = 0; zero = 0; jump = 0; br_offset = 0; j_index = 0;
    @(posedge clk); #1;
    checks++;
    if (pc !== RST_PC) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 0; model = RST_PC;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      branch    = ($urandom % 3) == 0;
      zero      = ($urandom % 2) == 0;
      jump      = ($urandom % 8) == 0;
      br_offset = 16'($urandom);
      j_index   = 26'($urandom);
      if (jump) begin
        model = {model[31:28], j_index, 2'b00}; n_j++;
      end else if (branch && zero) begin
        model = model + 32'd4 + {{14{br_offset[15]}}, br_offset, 2'b00}; n_br++;
      end else begin
        model = model + 32'd4; n_seq++;
      end
      @(posedge clk); #1;
      checks++;
      if (pc !== model) begin
        failures++;
        $display("FAIL cycle %0d pc=%h exp %h", i, pc, model);
        model = pc;
      end
    end
    if (n_seq == 0 || n_br == 0 || n_j == 0) failures++;
    $display("sequential=%0d branch=%0d jump=%0d", n_seq, n_br, n_j);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
