// tb_mips_cpu: end-to-end test of the single-cycle MIPS core.
//
// Runs EPISODES episodes; each loads a fresh test program through the IMEM load port (a directed part with
// known results, then random add/sub/ori/lw/sw/beq/j and undefined
// instructions), presets DMEM, releases reset and runs the core in lockstep
// with the instruction-level reference model: every cycle the PC, the
// instruction, the register write and the memory store must match what the
// model does for that instruction, which also checks CPI = 1. The register
// values after the directed part are checked against constants, and every
// instruction kind, both beq outcomes and a write to $0 must occur.
module tb_mips_cpu;
  import mips_iss_pkg::*;

  localparam int unsigned IAW = 10, DAW = 10, EPISODES = 8, CYCLES = 1500;

  logic            clk = 0, rst = 1;
  logic            imem_load_we = 0;
  logic [IAW-1:0]  imem_load_addr = '0;
  logic [31:0]     imem_load_data = '0;
  logic [31:0]     pc, instr, wb_data, st_addr, st_data;
  logic            wb_en, st_en;
  logic [4:0]      wb_addr;
  int              checks = 0, failures = 0;
  int              seen[9];
  int              r0_writes = 0;
  bit              directed_checked = 0;
  mips_iss         m;

  mips_cpu #(.IMEM_AW(IAW), .DMEM_AW(DAW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (EPISODES * (CYCLES + 1100)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL pc=%h %s got %h exp %h", m.pc, what, got, exp);
    end
  endtask

  initial begin
    string names[9] = '{"nop", "add", "sub", "ori", "lw", "sw", "beq-not-taken", "beq-taken", "j"};
    for (int ep = 0; ep < EPISODES; ep++) begin
      m = new(IAW, DAW);
      rst = 1;
      fill_program(m);
      foreach (m.imem[i]) begin
        @(negedge clk);
        imem_load_we = 1; imem_load_addr = IAW'(i); imem_load_data = m.imem[i];
      end
      @(negedge clk);
      imem_load_we = 0;
      foreach (m.dmem[i]) dut.u_dmem.mem[i] = m.dmem[i];
      @(negedge clk);
      rst = 0;
      for (int c = 0; c < CYCLES; c++) begin
        bit          wb, st;
        logic [4:0]  wa;
        logic [31:0] wd, sa, sd;
        int          kind;
        #1;
        if (!directed_checked && m.pc == 32'(DIRECTED_END * 4)) begin
          logic [31:0] r[32];
          foreach (r[i]) r[i] = dut.u_regfile.regs[i];
          r[0] = 0;
          checks++;
          if (directed_errors(r) != 0) begin
            failures++;
            $display("FAIL directed program results");
          end
          directed_checked = 1;
        end
        expect_eq("pc", pc, m.pc);
        expect_eq("instr", instr, m.fetch());
        m.step(wb, wa, wd, st, sa, sd, kind);
        seen[kind]++;
        if (wb && wa == 0) r0_writes++;
        expect_eq("wb_en", 32'(wb_en), 32'(wb));
        if (wb) begin
          expect_eq("wb_addr", 32'(wb_addr), 32'(wa));
          expect_eq("wb_data", wb_data, wd);
        end
        expect_eq("st_en", 32'(st_en), 32'(st));
        if (st) begin
          expect_eq("st_addr", st_addr, sa);
          expect_eq("st_data", st_data, sd);
        end
        @(negedge clk);
      end
    end
    checks++;
    if (!directed_checked) begin failures++; $display("FAIL directed part never finished"); end
    for (int k = 1; k < 9; k++) begin
      $display("%s: %0d", names[k], seen[k]);
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL %s never executed", names[k]); end
    end
    $display("writes to $0: %0d, undefined/no-op: %0d", r0_writes, seen[0]);
    checks++;
    if (r0_writes == 0 || seen[0] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
