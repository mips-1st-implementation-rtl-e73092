// tb_lc4_cpu: end-to-end test of the single-cycle LC4 core at its default
// (64K-word) memory sizes.
//
// Runs EPISODES episodes. Each loads a directed program through the IMEM load port and presets the rest
// of IMEM (random instructions) and DMEM directly, resets the core and runs
// it in lockstep with the instruction-level reference model: every
// cycle the PC, the instruction, the register write, the store and the
// branch decision must match the model (one instruction per cycle). The
// registers after the directed part are checked against constants, and
// every opcode, a taken and a not-taken BRR, and an unassigned opcode must
// occur.
module tb_lc4_cpu;
  import lc4_iss_pkg::*;

  localparam int unsigned AW = 16, EPISODES = 10, CYCLES = 2000;

  logic            clk = 0, rst = 1;
  logic            imem_load_we = 0;
  logic [AW-1:0]   imem_load_addr = '0;
  logic [15:0]     imem_load_data = '0;
  logic [15:0]     pc, instr, wb_data, st_addr, st_data;
  logic            wb_en, st_en, br_taken;
  logic [2:0]      wb_addr;
  int              checks = 0, failures = 0;
  int              seen[16];
  int              n_taken = 0, n_not_taken = 0;
  bit              directed_checked = 0;
  lc4_iss          m;

  lc4_cpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (EPISODES * (CYCLES + 100)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL pc=%h %s got %h exp %h", m.pc, what, got, exp);
    end
  endtask

  initial begin
    for (int ep = 0; ep < EPISODES; ep++) begin
      rst = 1;
      m = new(AW, AW);
      fill_program(m);
      foreach (m.imem[i]) dut.u_imem.mem[i] = m.imem[i];
      foreach (m.dmem[i]) dut.u_dmem.mem[i] = m.dmem[i];
      // the directed part goes in through the load port
      for (int i = 0; i < DIRECTED_END; i++) begin
        @(negedge clk);
        imem_load_we = 1; imem_load_addr = AW'(i); imem_load_data = m.imem[i];
      end
      @(negedge clk);
      imem_load_we = 0;
      @(negedge clk);
      rst = 0;
      for (int c = 0; c < CYCLES; c++) begin
        bit          wb, st, tk;
        logic [2:0]  wa;
        logic [15:0] wd, sa, sd;
        int          kind;
        #1;
        if (!directed_checked && m.pc == 16'(DIRECTED_END)) begin
          logic [15:0] r[8];
          foreach (r[i]) r[i] = dut.u_regfile.regs[i];
          checks++;
          if (directed_errors(r) != 0) begin
            failures++;
            $display("FAIL directed program results");
          end
          directed_checked = 1;
        end
        expect_eq("pc", pc, m.pc);
        expect_eq("instr", instr, m.fetch());
        m.step(wb, wa, wd, st, sa, sd, tk, kind);
        seen[kind]++;
        if (kind == 15) begin
          if (tk) n_taken++; else n_not_taken++;
        end
        expect_eq("br_taken", 16'(br_taken), 16'(tk));
        expect_eq("wb_en", 16'(wb_en), 16'(wb));
        if (wb) begin
          expect_eq("wb_addr", 16'(wb_addr), 16'(wa));
          expect_eq("wb_data", wb_data, wd);
        end
        expect_eq("st_en", 16'(st_en), 16'(st));
        if (st) begin
          expect_eq("st_addr", st_addr, sa);
          expect_eq("st_data", st_data, sd);
        end
        @(negedge clk);
      end
    end
    checks++;
    if (!directed_checked) begin failures++; $display("FAIL directed part never finished"); end
    foreach (seen[k]) begin
      if (k inside {0, 1, 2, 3, 9, 10, 11, 12, 15, 5}) begin
        $display("opcode %h: %0d", k, seen[k]);
        checks++;
        if (seen[k] == 0) begin failures++; $display("FAIL opcode %h never executed", k); end
      end
    end
    $display("BRR taken %0d, not taken %0d", n_taken, n_not_taken);
    checks++;
    if (n_taken == 0 || n_not_taken == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
