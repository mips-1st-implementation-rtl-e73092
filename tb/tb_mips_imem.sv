// tb_mips_imem: fills the MIPS instruction memory through its load port
// with a pattern, then reads every word back by byte address (including
// unaligned byte addresses, whose low two bits must be ignored).
module tb_mips_imem;
  localparam int unsigned AW = 10;
  logic          clk = 0;
  logic [31:0]   addr, instr, load_data;
  logic          load_we;
  logic [AW-1:0] load_addr;
  int            checks = 0, failures = 0;

  mips_imem #(.ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pat(int i);
    return 32'h9e37_79b9 * 32'(i + 1) ^ 32'(i);
  endfunction

  initial begin
    load_we = 0; load_addr = 0; load_data = 0; addr = 0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = AW'(i); load_data = pat(i);
    end
    @(negedge clk); load_we = 0;
    for (int i = 0; i < 2**AW; i++) begin
      addr = 32'(i * 4) + 32'($urandom % 4);
      #1;
      checks++;
      if (instr !== pat(i)) begin
        failures++;
        $display("FAIL addr=%h got %h exp %h", addr, instr, pat(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
