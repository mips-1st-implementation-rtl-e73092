// lc4_iss_pkg: instruction-level reference model of the single-cycle LC4
// core, used by testbenches to check the RTL cycle by cycle.
//
// step() executes one instruction from the LC4 instruction table (ADD, AND,
// NOR, MOV, LDR, STR, LEA, LIM, BRR; other opcodes are no-ops) and reports
// the register write, the store and whether a branch was taken. LEA uses
// the address of the LEA itself. Memories wrap at their size.
package lc4_iss_pkg;

  class lc4_iss;
    int unsigned iaw, daw;
    logic [15:0] imem[];
    logic [15:0] dmem[];
    logic [15:0] regs[8];
    logic [15:0] pc;

    function new(int unsigned iaw_i, int unsigned daw_i);
      iaw  = iaw_i;
      daw  = daw_i;
      imem = new[1 << iaw];
      dmem = new[1 << daw];
      foreach (regs[i]) regs[i] = '0;
      pc = '0;
    endfunction

    function logic [15:0] fetch();
      return imem[pc & ((1 << iaw) - 1)];
    endfunction

    // kind = opcode (0..15); taken reports a taken BRR
    function void step(output bit wb, output logic [2:0] wa,
                       output logic [15:0] wd, output bit st,
                       output logic [15:0] sa, output logic [15:0] sd,
                       output bit taken, output int kind);
      logic [15:0] ins, r1, r2, off, npc;
      logic [2:0]  f1, f2, f3;
      ins = fetch();
      f1  = ins[11:9];
      f2  = ins[8:6];
      f3  = ins[5:3];
      r1  = regs[f1];
      r2  = regs[f2];
      off = {{10{ins[5]}}, ins[5:0]};
      npc = pc + 16'd1;
      wb = 0; wa = '0; wd = '0; st = 0; sa = '0; sd = '0; taken = 0;
      kind = int'(ins[15:12]);
      case (ins[15:12])
        4'h0: begin wb = 1; wa = f3; wd = r1 + r2; end
        4'h1: begin wb = 1; wa = f3; wd = r1 & r2; end
        4'h2: begin wb = 1; wa = f3; wd = ~(r1 | r2); end
        4'h3: begin wb = 1; wa = f3; wd = r2; end
        4'h9: begin wb = 1; wa = f2; wd = dmem[(r1 + off) & ((1 << daw) - 1)]; end
        4'ha: begin st = 1; sa = r1 + off; sd = r2; end
        4'hb: begin wb = 1; wa = f2; wd = pc + off; end
        4'hc: begin wb = 1; wa = f2; wd = off; end
        4'hf: if (r2[15]) begin taken = 1; npc = r1 + off; end
        default: ;
      endcase
      if (wb) regs[wa] = wd;
      if (st) dmem[sa & ((1 << daw) - 1)] = sd;
      pc = npc;
    endfunction
  endclass

  function automatic logic [15:0] enc3(logic [3:0] op, logic [2:0] a,
                                       logic [2:0] b, logic [2:0] c);
    return {op, a, b, c, 3'b000};
  endfunction

  function automatic logic [15:0] enc6(logic [3:0] op, logic [2:0] a,
                                       logic [2:0] b, logic [5:0] off);
    return {op, a, b, off};
  endfunction

  // Test program: a directed part at word 0 with known results, ending in
  // a branch to word 64, then random instructions filling the rest of IMEM.
  // DMEM gets a pattern. After the directed part:
  // R0=46 R1=5 R2=3 R3=8 R4=1 R5=0xfff2 R6=0xffff R7=8.
  localparam int unsigned DIRECTED_END = 64;

  function automatic void fill_program(lc4_iss m);
    logic [15:0] p[$];
    p.push_back(enc6(4'hc, 0, 1, 6'd5));     //  0 LIM R1, 5
    p.push_back(enc6(4'hc, 0, 2, 6'd3));     //  1 LIM R2, 3
    p.push_back(enc3(4'h0, 1, 2, 3));        //  2 ADD R3, R1, R2     = 8
    p.push_back(enc3(4'h1, 1, 2, 4));        //  3 AND R4, R1, R2     = 1
    p.push_back(enc3(4'h2, 1, 3, 5));        //  4 NOR R5, R1, R3     = ~13
    p.push_back(enc3(4'h3, 0, 2, 6));        //  5 MOV R6, R2         = 3
    p.push_back(enc6(4'ha, 1, 3, 6'h3e));    //  6 STR R3 -> [R1-2]   (addr 3)
    p.push_back(enc6(4'h9, 2, 7, 6'd0));     //  7 LDR R7 <- [R2+0]   = 8
    p.push_back(enc6(4'hb, 0, 0, 6'd10));    //  8 LEA R0, PC+10      = 18
    p.push_back(enc6(4'hf, 0, 1, 6'd0));     //  9 BRR R0 if R1<0 (not taken)
    p.push_back(enc6(4'hc, 0, 0, 6'd32));    // 10 LIM R0, -32
    p.push_back(enc6(4'hc, 0, 1, 6'd5));     // 11 LIM R1, 5 (unchanged)
    p.push_back(enc6(4'hc, 0, 0, 6'h20));    // 12 LIM R0, -32
    p.push_back(enc3(4'h3, 0, 0, 0));        // 13 MOV R0, R0
    p.push_back(enc6(4'hc, 0, 4, 6'd1));     // 14 LIM R4, 1 (unchanged)
    // BRR to 64: base R0 = -32 (0xffe0): needs base + off = 64 -> use LEA
    p.push_back(enc6(4'hb, 0, 0, 6'd31));    // 15 LEA R0, PC+31      = 46
    p.push_back(enc6(4'hc, 0, 6, 6'h3f));    // 16 LIM R6, -1 (condition)
    p.push_back(enc6(4'hf, 0, 6, 6'd18));    // 17 BRR R0+18 = 64 if R6<0
    foreach (m.imem[i]) begin
      if (i < p.size()) m.imem[i] = p[i];
      else if (i < DIRECTED_END) m.imem[i] = 16'h4000;   // unassigned: no-op
      else m.imem[i] = rand_instr();
    end
    foreach (m.dmem[i]) m.dmem[i] = 16'(i * 7 + 3);
    m.dmem[3] = 16'h0;
  endfunction

  function automatic logic [15:0] rand_instr();
    logic [3:0] ops[16] = '{4'h0, 4'h1, 4'h2, 4'h3, 4'h9, 4'ha, 4'hb, 4'hc,
                            4'hf, 4'hf, 4'hf, 4'h0, 4'hc, 4'hc, 4'h5, 4'he};
    return {ops[$urandom % 16], 12'($urandom)};
  endfunction

  function automatic int directed_errors(logic [15:0] r[8]);
    int e = 0;
    if (r[1] != 5)       e++;
    if (r[2] != 3)       e++;
    if (r[3] != 8)       e++;
    if (r[4] != 1)       e++;
    if (r[5] != 16'hfff2) e++;
    if (r[6] != 16'hffff) e++;
    if (r[7] != 8)       e++;
    if (r[0] != 46)      e++;
    return e;
  endfunction

endpackage
