// tb_lc4_decode: checks the LC4 decoder for all 16 opcodes against the
// instruction table: destination field, ALU input sources, ALUk, register
// input source, register write, DMEM write and branch flag.
module tb_lc4_decode;
  import lc4_pkg::*;

  logic [3:0] opcode;
  ctrl_t      ctrl;
  int         checks = 0, failures = 0;

  lc4_decode dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {dr_mux, a_mux, b_mux, alu_k[1:0], reg_mux, ld_reg, dmem_rw, is_br};
  // fields that do not matter for an opcode are masked out
  function automatic logic [8:0] exp_row(int op);
    case (op)
      0:  return 9'b1_1_0_00_1_1_0_0;
      1:  return 9'b1_1_0_01_1_1_0_0;
      2:  return 9'b1_1_0_10_1_1_0_0;
      3:  return 9'b1_1_0_11_1_1_0_0;
      9:  return 9'b0_1_1_00_0_1_0_0;
      10: return 9'b0_1_1_00_0_0_1_0;
      11: return 9'b0_0_1_00_1_1_0_0;
      12: return 9'b0_0_1_11_1_1_0_0;
      15: return 9'b0_1_1_00_0_0_0_1;
      default: return 9'b0;
    endcase
  endfunction

  function automatic logic [8:0] care(int op);
    case (op)
      3:  return 9'b1_0_1_11_1_1_1_1;      // MOV ignores A
      10: return 9'b0_1_1_11_0_1_1_1;      // STR writes no register
      12: return 9'b1_0_1_11_1_1_1_1;      // LIM ignores A
      15: return 9'b0_1_1_11_0_1_1_1;
      0, 1, 2, 9, 11: return 9'h1ff;
      default: return 9'b0_0_0_00_0_1_1_1; // no-op: no writes, no branch
    endcase
  endfunction

  initial begin
    for (int op = 0; op < 16; op++) begin
      logic [8:0] got;
      opcode = 4'(op);
      #1;
      got = {ctrl.dr_mux, ctrl.a_mux, ctrl.b_mux, ctrl.alu_k, ctrl.reg_mux,
             ctrl.ld_reg, ctrl.dmem_rw, ctrl.is_br};
      checks++;
      if ((got & care(op)) !== (exp_row(op) & care(op))) begin
        failures++;
        $display("FAIL opcode=%b got %b exp %b", opcode, got, exp_row(op));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
