// tb_lecture_cpus: end-to-end test of the top, both processors at the
// default sizes (MIPS 1K-word IMEM and DMEM, LC4 64K-word IMEM and DMEM).
//
// In each of several episodes both cores are held in reset while their
// programs are loaded (the directed parts through the top's load ports, the
// random remainder and the DMEM contents preset directly), then both run
// concurrently, each in lockstep with its instruction-level reference model:
// every cycle PC, instruction, register write and store (and the LC4 branch
// decision) must match, i.e. one instruction completes per cycle. Results
// of the directed programs are checked against constants. Each mechanism
// must happen at least once: every MIPS instruction, beq taken and not
// taken, a discarded write to $0, an undefined opcode; every LC4 opcode, BRR
// taken and not taken, an unassigned opcode.
module tb_lecture_cpus;
  import mips_iss_pkg::*;
  import lc4_iss_pkg::*;

  localparam int unsigned MAW = 10, LAW = 16, EPISODES = 6, CYCLES = 2000;

  logic            clk = 0, rst = 1;
  logic            mips_imem_load_we = 0;
  logic [MAW-1:0]  mips_imem_load_addr = '0;
  logic [31:0]     mips_imem_load_data = '0;
  logic [31:0]     mips_pc, mips_instr, mips_wb_data, mips_st_addr, mips_st_data;
  logic            mips_wb_en, mips_st_en;
  logic [4:0]      mips_wb_addr;
  logic            lc4_imem_load_we = 0;
  logic [LAW-1:0]  lc4_imem_load_addr = '0;
  logic [15:0]     lc4_imem_load_data = '0;
  logic [15:0]     lc4_pc, lc4_instr, lc4_wb_data, lc4_st_addr, lc4_st_data;
  logic            lc4_wb_en, lc4_st_en, lc4_br_taken;
  logic [2:0]      lc4_wb_addr;

  int      checks = 0, failures = 0;
  int      mseen[9], lseen[16];
  int      m_r0 = 0, l_taken = 0, l_not_taken = 0;
  bit      m_dir = 0, l_dir = 0;
  mips_iss mm;
  lc4_iss  lm;

  lecture_cpus dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (EPISODES * (CYCLES + 1200)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic step_mips();
    bit          wb, st;
    logic [4:0]  wa;
    logic [31:0] wd, sa, sd;
    int          kind;
    if (!m_dir && mm.pc == 32'(mips_iss_pkg::DIRECTED_END * 4)) begin
      logic [31:0] r[32];
      foreach (r[i]) r[i] = dut.u_mips.u_regfile.regs[i];
      r[0] = 0;
      checks++;
      if (mips_iss_pkg::directed_errors(r) != 0) begin
        failures++; $display("FAIL MIPS directed results");
      end
      m_dir = 1;
    end
    expect_eq("mips pc", mips_pc, mm.pc);
    expect_eq("mips instr", mips_instr, mm.fetch());
    mm.step(wb, wa, wd, st, sa, sd, kind);
    mseen[kind]++;
    if (wb && wa == 0) m_r0++;
    expect_eq("mips wb_en", 32'(mips_wb_en), 32'(wb));
    if (wb) begin
      expect_eq("mips wb_addr", 32'(mips_wb_addr), 32'(wa));
      expect_eq("mips wb_data", mips_wb_data, wd);
    end
    expect_eq("mips st_en", 32'(mips_st_en), 32'(st));
    if (st) begin
      expect_eq("mips st_addr", mips_st_addr, sa);
      expect_eq("mips st_data", mips_st_data, sd);
    end
  endtask

  task automatic step_lc4();
    bit          wb, st, tk;
    logic [2:0]  wa;
    logic [15:0] wd, sa, sd;
    int          kind;
    if (!l_dir && lm.pc == 16'(lc4_iss_pkg::DIRECTED_END)) begin
      logic [15:0] r[8];
      foreach (r[i]) r[i] = dut.u_lc4.u_regfile.regs[i];
      checks++;
      if (lc4_iss_pkg::directed_errors(r) != 0) begin
        failures++; $display("FAIL LC4 directed results");
      end
      l_dir = 1;
    end
    expect_eq("lc4 pc", 32'(lc4_pc), 32'(lm.pc));
    expect_eq("lc4 instr", 32'(lc4_instr), 32'(lm.fetch()));
    lm.step(wb, wa, wd, st, sa, sd, tk, kind);
    lseen[kind]++;
    if (kind == 15) begin
      if (tk) l_taken++; else l_not_taken++;
    end
    expect_eq("lc4 br_taken", 32'(lc4_br_taken), 32'(tk));
    expect_eq("lc4 wb_en", 32'(lc4_wb_en), 32'(wb));
    if (wb) begin
      expect_eq("lc4 wb_addr", 32'(lc4_wb_addr), 32'(wa));
      expect_eq("lc4 wb_data", 32'(lc4_wb_data), 32'(wd));
    end
    expect_eq("lc4 st_en", 32'(lc4_st_en), 32'(st));
    if (st) begin
      expect_eq("lc4 st_addr", 32'(lc4_st_addr), 32'(sa));
      expect_eq("lc4 st_data", 32'(lc4_st_data), 32'(sd));
    end
  endtask

  initial begin
    for (int ep = 0; ep < EPISODES; ep++) begin
      rst = 1;
      mm = new(MAW, MAW);
      lm = new(LAW, LAW);
      mips_iss_pkg::fill_program(mm);
      lc4_iss_pkg::fill_program(lm);
      foreach (mm.imem[i]) dut.u_mips.u_imem.mem[i] = mm.imem[i];
      foreach (mm.dmem[i]) dut.u_mips.u_dmem.mem[i] = mm.dmem[i];
      foreach (lm.imem[i]) dut.u_lc4.u_imem.mem[i] = lm.imem[i];
      foreach (lm.dmem[i]) dut.u_lc4.u_dmem.mem[i] = lm.dmem[i];
      // directed parts through the load ports (poisoned first)
      for (int i = 0; i < 64; i++) begin
        dut.u_mips.u_imem.mem[i] = '1;
        dut.u_lc4.u_imem.mem[i]  = '1;
      end
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        mips_imem_load_we = 1; mips_imem_load_addr = MAW'(i); mips_imem_load_data = mm.imem[i];
        lc4_imem_load_we  = 1; lc4_imem_load_addr  = LAW'(i); lc4_imem_load_data  = lm.imem[i];
      end
      @(negedge clk);
      mips_imem_load_we = 0;
      lc4_imem_load_we  = 0;
      @(negedge clk);
      rst = 0;
      for (int c = 0; c < CYCLES; c++) begin
        #1;
        step_mips();
        step_lc4();
        @(negedge clk);
      end
    end
    begin
      string mnames[9] = '{"nop", "add", "sub", "ori", "lw", "sw", "beq-not-taken", "beq-taken", "j"};
      checks++;
      if (!m_dir || !l_dir) begin failures++; $display("FAIL a directed part never finished"); end
      for (int k = 0; k < 9; k++) begin
        $display("MIPS %s: %0d", mnames[k], mseen[k]);
        checks++;
        if (mseen[k] == 0) begin failures++; $display("FAIL MIPS %s never happened", mnames[k]); end
      end
      $display("MIPS writes to $0 discarded: %0d", m_r0);
      checks++;
      if (m_r0 == 0) failures++;
      foreach (lseen[k]) begin
        if (k inside {0, 1, 2, 3, 5, 9, 10, 11, 12, 15}) begin
          $display("LC4 opcode %h: %0d", k, lseen[k]);
          checks++;
          if (lseen[k] == 0) begin failures++; $display("FAIL LC4 opcode %h never happened", k); end
        end
      end
      $display("LC4 BRR taken %0d, not taken %0d", l_taken, l_not_taken);
      checks++;
      if (l_taken == 0 || l_not_taken == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
