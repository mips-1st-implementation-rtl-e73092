// tb_lc4_alu: checks the LC4 ALU's four functions (ADD, AND, NOR, MOV) on
// corner cases and random operands against results computed in the
// testbench.
module tb_lc4_alu;
  import lc4_pkg::*;

  logic [15:0] a, b, y;
  aluk_e       alu_k;
  int          checks = 0, failures = 0;

  lc4_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [15:0] exp;
      int          k;
      k = i % 4;
      a = (i < 16) ? 16'hffff : 16'($urandom);
      b = (i < 8) ? 16'h0001 : 16'($urandom);
      alu_k = aluk_e'(k);
      #1;
      case (k)
        0: exp = 16'((int'(a) + int'(b)) % 65536);
        1: exp = a & b;
        2: exp = ~a & ~b;
        default: exp = b;
      endcase
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL k=%0d a=%h b=%h got %h exp %h", k, a, b, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
