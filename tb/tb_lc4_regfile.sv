// tb_lc4_regfile: random test of the 8 x 16 LC4 register file against a
// shadow array, including writes to R0 (a normal register here), writes
// with LD_REG low, read-after-write in the next cycle and reset.
module tb_lc4_regfile;
  logic        clk = 0, rst, ld_reg;
  logic [2:0]  sr1, sr2, dr;
  logic [15:0] sr1_out, sr2_out, din;
  logic [15:0] shadow [8];
  int          checks = 0, failures = 0;

  lc4_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    checks++;
    if (sr1_out !== shadow[sr1] || sr2_out !== shadow[sr2]) begin
      failures++;
      $display("FAIL R%0d=%h (exp %h) R%0d=%h (exp %h)", sr1, sr1_out, shadow[sr1],
               sr2, sr2_out, shadow[sr2]);
    end
  endtask

  initial begin
    rst = 1; ld_reg = 0; dr = 0; din = 0; sr1 = 0; sr2 = 0;
    foreach (shadow[i]) shadow[i] = '0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      ld_reg = ($urandom % 4) != 0;
      dr     = 3'($urandom);
      din    = 16'($urandom);
      sr1    = (i % 3 == 0) ? dr : 3'($urandom);
      sr2    = 3'($urandom);
      #1 check_reads();
      @(posedge clk);
      if (ld_reg) shadow[dr] = din;
      #1 check_reads();
    end
    @(negedge clk); ld_reg = 0; rst = 1;
    @(posedge clk); #1 rst = 0;
    foreach (shadow[i]) shadow[i] = '0;
    for (int r = 0; r < 8; r++) begin
      sr1 = 3'(r); sr2 = 3'(7 - r); #1 check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
