// tb_mips_dmem: random reads and writes of the MIPS data memory against a
// shadow array. Checks that a write lands only when MemWrite is high, that
// the stored word is read back at the byte address it was written to, and
// that the read data is zero while MemRead is low.
module tb_mips_dmem;
  localparam int unsigned AW = 6;
  logic        clk = 0, mem_read, mem_write;
  logic [31:0] addr, wdata, rdata;
  logic [31:0] shadow [2**AW];
  int          checks = 0, failures = 0;

  mips_dmem #(.ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem_read = 0; mem_write = 0; addr = 0; wdata = 0;
    // initialise every word
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      mem_write = 1; addr = 32'(i * 4); wdata = 32'(i) * 32'h0101_0101;
      shadow[i] = wdata;
    end
    for (int i = 0; i < 4000; i++) begin
      int idx;
      @(negedge clk);
      idx       = int'($urandom % (2**AW));
      mem_write = ($urandom % 2) == 0;
      mem_read  = ($urandom % 4) != 0;
      addr      = 32'(idx * 4);
      wdata     = $urandom;
      #1;
      checks++;
      if (rdata !== (mem_read ? shadow[idx] : 32'd0)) begin
        failures++;
        $display("FAIL read idx=%0d rd=%b got %h exp %h", idx, mem_read, rdata, shadow[idx]);
      end
      @(posedge clk);
      if (mem_write) shadow[idx] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
