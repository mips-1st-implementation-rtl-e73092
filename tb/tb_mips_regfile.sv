// tb_mips_regfile: random test of the 32 x 32 MIPS register file.
// Each cycle writes a random register (sometimes with RegWrite low) and
// reads two random registers, comparing both read ports with a shadow
// array. Register 0 must stay zero; reset must clear all registers. Also
// checks that a write is visible on the read ports the cycle after it.
module tb_mips_regfile;
  logic        clk = 0, rst;
  logic [4:0]  raddr1, raddr2, waddr;
  logic [31:0] rdata1, rdata2, wdata;
  logic        we;
  logic [31:0] shadow [32];
  int          checks = 0, failures = 0;

  mips_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    checks++;
    if (rdata1 !== shadow[raddr1] || rdata2 !== shadow[raddr2]) begin
      failures++;
      $display("FAIL r%0d=%h (exp %h) r%0d=%h (exp %h)", raddr1, rdata1, shadow[raddr1],
               raddr2, rdata2, shadow[raddr2]);
    end
  endtask

  initial begin
    rst = 1; we = 0; waddr = 0; wdata = 0; raddr1 = 0; raddr2 = 0;
    foreach (shadow[i]) shadow[i] = '0;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    for (int r = 0; r < 32; r++) begin
      raddr1 = 5'(r); raddr2 = 5'(31 - r); #1 check_reads();
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      we     = ($urandom % 4) != 0;
      waddr  = 5'($urandom);
      wdata  = $urandom;
      raddr1 = (i % 3 == 0) ? waddr : 5'($urandom);
      raddr2 = 5'($urandom);
      #1 check_reads();
      @(posedge clk);
      if (we && waddr != 0) shadow[waddr] = wdata;
      #1 check_reads();
    end
    // reset clears
    @(negedge clk); we = 0; rst = 1;
    @(posedge clk); #1 rst = 0;
    foreach (shadow[i]) shadow[i] = '0;
    for (int r = 0; r < 32; r++) begin
      raddr1 = 5'(r); raddr2 = 5'(r); #1 check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
