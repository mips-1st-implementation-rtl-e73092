// mips_iss_pkg: instruction-level reference model of the single-cycle MIPS
// core, used by testbenches to check the RTL cycle by cycle.
//
// The model executes one instruction per step() call straight from the
// instruction-set definition (add, sub, ori, lw, sw, beq, j; any other
// opcode is a no-op) and reports the register write and memory store the
// instruction makes. Memories wrap at their size exactly as the RTL's do:
// word index = byte address bits [AW+1:2].
package mips_iss_pkg;

  class mips_iss;
    int unsigned iaw, daw;
    logic [31:0] imem[];
    logic [31:0] dmem[];
    logic [31:0] regs[32];
    logic [31:0] pc;

    function new(int unsigned iaw_i, int unsigned daw_i);
      iaw  = iaw_i;
      daw  = daw_i;
      imem = new[1 << iaw];
      dmem = new[1 << daw];
      foreach (regs[i]) regs[i] = '0;
      pc = '0;
    endfunction

    function int unsigned iidx(logic [31:0] a);
      return (a >> 2) & ((1 << iaw) - 1);
    endfunction

    function int unsigned didx(logic [31:0] a);
      return (a >> 2) & ((1 << daw) - 1);
    endfunction

    function logic [31:0] fetch();
      return imem[iidx(pc)];
    endfunction

    // Execute one instruction. kind: 0 nop, 1 add, 2 sub, 3 ori, 4 lw,
    // 5 sw, 6 beq not taken, 7 beq taken, 8 j
    function void step(output bit wb, output logic [4:0] wa,
                       output logic [31:0] wd, output bit st,
                       output logic [31:0] sa, output logic [31:0] sd,
                       output int kind);
      logic [31:0] ins, a, b, simm, zimm, npc;
      logic [5:0]  op, fn;
      logic [4:0]  rs, rt, rd;
      ins  = fetch();
      op   = ins[31:26];
      rs   = ins[25:21];
      rt   = ins[20:16];
      rd   = ins[15:11];
      fn   = ins[5:0];
      a    = regs[rs];
      b    = regs[rt];
      simm = {{16{ins[15]}}, ins[15:0]};
      zimm = {16'h0, ins[15:0]};
      npc  = pc + 32'd4;
      wb = 0; wa = '0; wd = '0; st = 0; sa = '0; sd = '0; kind = 0;
      case (op)
        6'h00: begin
          wb = 1; wa = rd;
          if (fn == 6'h22) begin wd = a - b; kind = 2; end
          else begin wd = a + b; kind = (fn == 6'h20) ? 1 : 0; end
        end
        6'h0d: begin wb = 1; wa = rt; wd = a | zimm; kind = 3; end
        6'h23: begin wb = 1; wa = rt; wd = dmem[didx(a + simm)]; kind = 4; end
        6'h2b: begin st = 1; sa = a + simm; sd = b; kind = 5; end
        6'h04: begin
          if (a == b) begin npc = pc + 32'd4 + (simm << 2); kind = 7; end
          else kind = 6;
        end
        6'h02: begin npc = {pc[31:28], ins[25:0], 2'b00}; kind = 8; end
        default: ;
      endcase
      if (wb && wa != 0) regs[wa] = wd;
      if (st) dmem[didx(sa)] = sd;
      pc = npc;
    endfunction
  endclass

  // Instruction encoders
  function automatic logic [31:0] enc_r(logic [4:0] rs, logic [4:0] rt,
                                        logic [4:0] rd, logic [5:0] fn);
    return {6'h00, rs, rt, rd, 5'd0, fn};
  endfunction

  function automatic logic [31:0] enc_i(logic [5:0] op, logic [4:0] rs,
                                        logic [4:0] rt, logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic logic [31:0] enc_j(logic [25:0] idx);
    return {6'h02, idx};
  endfunction

  // Test program: a directed part at word 0 that exercises every
  // instruction with known results, ending in a jump to word 64, followed
  // by random instructions filling the rest of IMEM. DMEM gets a pattern.
  // After the directed part: $3=8 $4=2 $5=0x8000 $6=8 $7=2 $9=0 $10=15.
  localparam int unsigned DIRECTED_END = 64;

  function automatic void fill_program(mips_iss m);
    logic [31:0] p[$];
    p.push_back(enc_i(6'h0d, 0, 1, 16'd5));        //  0 ori $1,$0,5
    p.push_back(enc_i(6'h0d, 0, 2, 16'd3));        //  1 ori $2,$0,3
    p.push_back(enc_r(1, 2, 3, 6'h20));            //  2 add $3,$1,$2
    p.push_back(enc_r(1, 2, 4, 6'h22));            //  3 sub $4,$1,$2
    p.push_back(enc_i(6'h0d, 0, 5, 16'h8000));     //  4 ori $5,$0,0x8000
    p.push_back(enc_i(6'h2b, 0, 3, 16'd8));        //  5 sw  $3,8($0)
    p.push_back(enc_i(6'h23, 0, 6, 16'd8));        //  6 lw  $6,8($0)
    p.push_back(enc_i(6'h2b, 5, 4, 16'hfffc));     //  7 sw  $4,-4($5)
    p.push_back(enc_i(6'h23, 5, 7, 16'hfffc));     //  8 lw  $7,-4($5)
    p.push_back(enc_i(6'h0d, 0, 8, 16'd1));        //  9 ori $8,$0,1
    p.push_back(enc_i(6'h0d, 0, 9, 16'd3));        // 10 ori $9,$0,3
    p.push_back(enc_i(6'h04, 9, 0, 16'd3));        // 11 beq $9,$0,15
    p.push_back(enc_r(9, 8, 9, 6'h22));            // 12 sub $9,$9,$8
    p.push_back(enc_r(10, 1, 10, 6'h20));          // 13 add $10,$10,$1
    p.push_back(enc_j(26'd11));                    // 14 j   11
    p.push_back(enc_i(6'h04, 1, 2, 16'd1));        // 15 beq $1,$2 (not taken)
    p.push_back(enc_r(1, 1, 0, 6'h20));            // 16 add $0,$1,$1 (discarded)
    p.push_back(enc_j(26'(DIRECTED_END)));         // 17 j   64
    foreach (m.imem[i]) begin
      if (i < p.size()) m.imem[i] = p[i];
      else if (i < DIRECTED_END) m.imem[i] = enc_j(26'(DIRECTED_END));
      else m.imem[i] = rand_instr(m.imem.size());
    end
    foreach (m.dmem[i]) m.dmem[i] = 32'(i) * 32'h0001_0003 + 32'h1234;
  endfunction

  function automatic logic [31:0] rand_instr(int unsigned depth);
    logic [4:0]  rs, rt, rd;
    logic [15:0] imm;
    int unsigned sel;
    rs  = 5'($urandom % 8);
    rt  = 5'($urandom % 8);
    rd  = 5'($urandom % 8);
    imm = 16'($urandom);
    sel = $urandom % 20;
    case (sel)
      0, 1, 2:  return enc_r(rs, rt, rd, 6'h20);
      3, 4, 5:  return enc_r(rs, rt, rd, 6'h22);
      6, 7, 8:  return enc_i(6'h0d, rs, rt, imm);
      9, 10:    return enc_i(6'h23, rs, rt, imm);
      11, 12:   return enc_i(6'h2b, rs, rt, imm);
      13, 14, 15: return enc_i(6'h04, rs, rt, 16'(int'($urandom % 41) - 20));
      16:       return enc_j(26'(DIRECTED_END + $urandom % (depth - DIRECTED_END)));
      17:       return enc_r(rs, rt, rd, 6'($urandom));       // other func: adds
      18:       return {6'h3f, 26'($urandom)};                  // undefined opcode
      default:  return enc_i(6'h0d, 0, rt, imm);
    endcase
  endfunction

  // Checks the register values expected after the directed part.
  function automatic int directed_errors(logic [31:0] r[32]);
    int e = 0;
    if (r[0] != 0)        e++;
    if (r[3] != 8)        e++;
    if (r[4] != 2)        e++;
    if (r[5] != 32'h8000) e++;
    if (r[6] != 8)        e++;
    if (r[7] != 2)        e++;
    if (r[9] != 0)        e++;
    if (r[10] != 15)      e++;
    return e;
  endfunction

endpackage
