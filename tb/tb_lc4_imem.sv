// tb_lc4_imem: fills the whole 64K-word LC4 instruction memory through its
// load port with a pattern and reads every word back.
module tb_lc4_imem;
  localparam int unsigned AW = 16;
  logic          clk = 0, load_we;
  logic [15:0]   addr, instr, load_data;
  logic [AW-1:0] load_addr;
  int            checks = 0, failures = 0;

  lc4_imem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] pat(int i);
    return 16'((i * 40503 + 17) ^ (i >> 5));
  endfunction

  initial begin
    load_we = 0; load_addr = 0; load_data = 0; addr = 0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = AW'(i); load_data = pat(i);
    end
    @(negedge clk); load_we = 0;
    for (int i = 0; i < 2**AW; i++) begin
      addr = 16'(i);
      #1;
      checks++;
      if (instr !== pat(i)) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%h got %h exp %h", addr, instr, pat(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
