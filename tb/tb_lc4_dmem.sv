// tb_lc4_dmem: random reads and writes of the LC4 data memory (default
// 64K words) against a shadow array: a write lands only when DMEMrw is high,
// and the read port always shows the addressed word.
module tb_lc4_dmem;
  logic        clk = 0, dmem_rw;
  logic [15:0] addr, din, dout;
  logic [15:0] shadow [int];
  int          checks = 0, failures = 0;

  lc4_dmem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dmem_rw = 0; addr = 0; din = 0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      // confine to a window so addresses repeat
      addr    = 16'($urandom % 64) + ((i % 2) ? 16'hffc0 : 16'h0);
      din     = 16'($urandom);
      dmem_rw = !shadow.exists(int'(addr)) || ($urandom % 2) == 0;
      #1;
      if (shadow.exists(int'(addr))) begin
        checks++;
        if (dout !== shadow[int'(addr)]) begin
          failures++;
          $display("FAIL addr=%h got %h exp %h", addr, dout, shadow[int'(addr)]);
        end
      end
      @(posedge clk);
      if (dmem_rw) shadow[int'(addr)] = din;
      #1;
      checks++;
      if (dout !== shadow[int'(addr)]) begin
        failures++;
        $display("FAIL after write addr=%h got %h exp %h", addr, dout, shadow[int'(addr)]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
