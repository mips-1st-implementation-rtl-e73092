# Two single-cycle teaching processors: MIPS and LC4

A processor is easiest to understand when every instruction finishes in a
single clock cycle. On each rising edge a new instruction address sits in the PC. During
the cycle one combinational wave then passes through the machine. It fetches the
instruction, reads its source registers, decodes the opcode, computes in the ALU,
and reads or writes data memory. At the next edge the result is written back and
the PC moves on. The control is a plain lookup table with no state machine, and
every instruction takes exactly one cycle (CPI = 1). The cost is the clock period. It must
cover the slowest instruction, a load, which passes through instruction memory,
the register file, the ALU, data memory and the write-back multiplexer in turn.
Most of the hardware sits idle for most of each cycle.

This repository holds two such machines, built the same way:

* **`mips_cpu`**: a 32-bit MIPS subset with `add`, `sub`, `ori`, `lw`, `sw`,
  `beq` and `j`. It is the classic single-cycle datapath: a main decoder
  ("decode ROM") plus a small local ALU decoder that reads the `func`
  field.
* **`lc4_cpu`**: "LC4", a 16-bit LC-3-like ISA cut down so that every
  instruction fits in one cycle. It has eight registers, a 4-bit opcode, a
  2-bit ALU function, loads and stores, LEA, a load-immediate and one
  register-indirect conditional branch.

`lecture_cpus` is the top. It puts the two cores side by side on a shared clock
and reset, and each core keeps its own ports.

## Why the datapath can be this simple

The instruction sets are chosen so that fetch and decode need no cleverness:

* Every instruction is the same length. The next address is always known
  without decoding: PC+4 bytes for MIPS and PC+1 word for LC4.
* Source-register fields are always at the same bit positions. The register
  file is addressed straight from the instruction bits while the opcode is
  still being decoded. A field that an instruction does not use is read
  anyway and ignored.

MIPS instruction formats (bit 31 on the left):

| format | fields (widths) |
|---|---|
| R | opcode(6) rs(5) rt(5) rd(5) shamt(5) func(6) |
| I | opcode(6) rs(5) rt(5) immediate(16) |
| J | opcode(6) target(26) |

## The MIPS core

### Datapath

```
 PC ──► IMEM ──► instr ─┬─ [25:21] rs ──► RF read 1 ─────────────► ALU A
                        ├─ [20:16] rt ──► RF read 2 ─┬─► ALUSrc 0 ─► ALU B ──► result ─┬─► DMEM addr
                        │                            └──────────────────────► DMEM write data
                        ├─ [15:0] ──► extender (ExtOp) ─► ALUSrc 1          │
                        ├─ RegDst: write reg = rd [15:11] (1) or rt (0)     │
                        └─ MemtoReg: write data = DMEM data (1) or ALU result (0)
```

| module | role |
|---|---|
| `mips_ifu` | PC register, PC+4, branch adder, jump-target merge, branch and jump multiplexers |
| `mips_imem` | instruction memory, combinational read, plus a load port |
| `mips_regfile` | 32 × 32-bit, 2 read ports + 1 write port; `$0` is always zero |
| `mips_control` | main decoder, indexed by the opcode |
| `mips_alu_control` | local ALU decoder: (ALUOp, func) → ALUctr |
| `mips_alu` | Add / Sub / Or and a Zero flag |
| `mips_extender` | 16 → 32-bit extension, signed or unsigned as ExtOp selects |
| `mips_dmem` | data memory: combinational read gated by MemRead, write on the rising edge |

### Control: the decode table

The main decoder works like a ROM. The opcode is the row address, and each row is
the full set of datapath controls for that instruction. Entries that do not
matter for an instruction are driven to 0.

| | add / sub | ori | lw | sw | beq | j |
|---|---|---|---|---|---|---|
| opcode | 000000 | 001101 | 100011 | 101011 | 000100 | 000010 |
| RegDst | 1 | 0 | 0 | – | – | – |
| ALUSrc | 0 | 1 | 1 | 1 | 0 | – |
| MemtoReg | 0 | 0 | 1 | – | – | – |
| RegWrite | 1 | 1 | 1 | 0 | 0 | 0 |
| MemRead | 0 | 0 | 1 | 0 | 0 | 0 |
| MemWrite | 0 | 0 | 0 | 1 | 0 | 0 |
| Branch | 0 | 0 | 0 | 0 | 1 | 0 |
| Jump | 0 | 0 | 0 | 0 | 0 | 1 |
| ExtOp (1 = sign) | – | 0 | 1 | 1 | – | – |
| ALU operation | from func | Or | Add | Add | Sub | – |

Only the ALU needs the 6-bit `func` field, so the main decoder does not decode
it. Instead it sends a 3-bit **ALUOp**. For I-format and memory instructions
ALUOp already is the ALU operation: Or for `ori`, Add for the `lw`/`sw` address,
and Sub for the `beq` compare. For R-format it holds a reserved code, "use func". The local
decoder `mips_alu_control` then maps func `100000` to Add and `100010` to Sub. This keeps the
main table narrow, and the `func` bits reach the ALU select through a short path.
The ALUctr encoding (Add `000`, Sub `001`, Or `010`) is this design's own choice,
so ALUctr bit 2 is always 0. ALUctr is three bits wide, although some drawings of
this datapath show a 4-bit ALU operation input, because three operations need no more.

Opcodes outside the table decode to an all-zero row and act as no-ops. R-format
`func` codes other than add and sub perform an add.

### Next PC: word PC, branches and pseudo-direct jumps

This is the part of the core that takes the most care to follow.

* Instructions are 4-byte aligned, so `mips_ifu` keeps a **30-bit word PC**.
  The two low address bits are always `00` and are appended only at the output
  (`pc` is a byte address). Sequential flow adds 1 to the word PC, which is +4 bytes.
* **beq** computes `target = (PC+1) + sext(imm16)` in words, which is
  `PC + 4 + (imm << 2)` in bytes. Counting the offset in words rather than bytes
  gives it four times the reach. The branch is taken when the decoder's Branch
  signal AND the ALU's Zero flag are both 1. The ALU computes `rs − rt`, so Zero means `rs == rt`.
* **j** builds a pseudo-direct target by concatenating
  `PC[31:28] | target[25:0] | 00`. The upper four address bits are kept, so a
  jump can reach anywhere in the current 256 MB region but cannot leave it. For example, a
  program in the user region `0x0…` stays there, and code in the supervisor
  region `0x8…` stays there. The upper bits come from the PC of the jump itself,
  not from PC+4. The two differ only for a jump in the last word of a region.
* The branch multiplexer comes first, then the jump multiplexer:
  `next = Jump ? jtarget : (Branch & Zero ? btarget : PC+1)`.

### Memories

Both memories are arrays of 32-bit words with combinational reads. Writes (and
the IMEM load port) take effect on the rising edge. The default depth is
1024 words each (`IMEM_AW`, `DMEM_AW` = 10 address bits). This size is chosen
here and is not part of the original design. Addresses beyond the memory wrap
around. `lw` and `sw` move aligned words, and the two low address bits are ignored.

## The LC4 core

### Instruction set

Fields are bits [15:12] opcode, [11:9], [8:6], [5:3] or [5:0]. `off6` is the
sign-extended 6-bit field [5:0].

| opcode | instruction | effect | ALUk |
|---|---|---|---|
| 0000 | ADD  DR, SR1, SR2 | R[5:3] ← R[11:9] + R[8:6] | 00 |
| 0001 | AND  DR, SR1, SR2 | R[5:3] ← R[11:9] & R[8:6] | 01 |
| 0010 | NOR  DR, SR1, SR2 | R[5:3] ← ~(R[11:9] \| R[8:6]) | 10 |
| 0011 | MOV  DR, SR2 | R[5:3] ← R[8:6] | 11 |
| 1001 | LDR  DR, baseR, off6 | R[8:6] ← DMEM[R[11:9] + off6] | 00 |
| 1010 | STR  SR, baseR, off6 | DMEM[R[11:9] + off6] ← R[8:6] | 00 |
| 1011 | LEA  DR, off6 | R[8:6] ← PC + off6 | 00 |
| 1100 | LIM  DR, off6 | R[8:6] ← off6 | 11 |
| 1111 | BRR  baseR, CND, off6 | if R[8:6] < 0: PC ← R[11:9] + off6 | 00 |

For the four ALU instructions, the ALU function is simply the opcode's low two bits.
The other seven opcodes are unassigned and execute as no-ops.

### Datapath

`lc4_cpu` contains the PC register and its +1 incrementer, the 6-bit sign
extender and the multiplexers. The decoder drives all of them:

| mux | select 0 | select 1 |
|---|---|---|
| DRmux (destination) | instr[8:6] (LDR, LEA, LIM) | instr[5:3] (ALU instructions) |
| Amux (ALU A) | PC (LEA) | SR1out |
| Bmux (ALU B) | SR2out (ALU instructions) | sext(instr[5:0]) |
| REGmux (register input) | DMEM out (LDR) | ALU result |
| next-PC mux | PC+1 | ALU result (taken BRR) |

The register file's second read port serves three uses. It is the second ALU
operand, the store data (STR), and the branch condition (BRR). That works
because all three use the same field, [8:6]. The ALU result is used in three
places as well: as the memory address, as the register value, and as the branch
target. A BRR is taken when `isBR AND SR2out[15]`, which is a sign test with no
compare hardware.

LEA adds the offset to the address of the LEA instruction itself, not to PC+1.

Both memories default to 2¹⁶ 16-bit words (`IMEM_AW`, `DMEM_AW` = 16), the
whole 16-bit word address space. Reads are combinational, writes happen on the
rising edge, and DMEM writes when `DMEMrw` = 1. All eight registers are general
purpose, including R0.

## Interfaces and timing

Both cores have the same outside view:

* `clk`, `rst`: reset is synchronous. While `rst` is high, the PC is set to 0,
  the registers are cleared, and no register or memory write happens.
* `imem_load_we/addr/data`: a write port into instruction memory (word
  address). Load the program while `rst` is high, then release reset. The
  original design does not say how instruction memory is filled; this port is
  an addition.
* Status outputs, valid during the cycle in which an instruction executes:
  `pc` and `instr`; `wb_en/wb_addr/wb_data`, the register write that happens
  at the end of the cycle; `st_en/st_addr/st_data`, the memory store; and for
  LC4, `br_taken`.

The first instruction executes in the first cycle after `rst` falls. After
that, one instruction completes every cycle. The top `lecture_cpus` brings out the
MIPS core's ports with the `mips_` prefix and the LC4 core's with `lc4_`.

## Choices made here, where the original design is silent

* **MIPS**: `$0` is hardwired to zero. There is no overflow exception. The
  encodings of ALUctr and ALUOp are chosen here. MemRead (not in the control
  table) is set for `lw`, and DMEM's read data is forced to zero when MemRead is low.
  The memory depth is 1024 words. The datapath uses a sign-or-zero extender
  controlled by ExtOp in place of a plain sign extender, because `ori` zero-extends.
* **LC4**: the 0/1 sense of the mux selects is chosen to fit the ISA, as is the
  polarity of `DMEMrw` (1 = write). Unassigned opcodes are no-ops. R0 is an
  ordinary register. LEA uses the PC of the LEA itself.
* **Both**: synchronous reset to PC 0, register files cleared on reset, and
  the program-load port.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The small blocks are tested exhaustively or
with random inputs against values the testbench computes itself.
The processors are checked against instruction-level reference models
(`tb/mips_iss_pkg.sv`, `tb/lc4_iss_pkg.sv`) that execute straight from the
ISA definitions above:

* Each test runs several episodes. Each episode loads a directed program
  with known results and then random instructions filling the rest of the
  instruction memory, resets the core, and runs it in lockstep with the model.
* Every cycle, the PC, the instruction, the register write, the store and the
  branch decision must match what the model does for that one instruction.
  This checks the results, the control and the one-instruction-per-cycle timing.
* The tests count the mechanisms exercised and fail if any never occurs. For
  MIPS these are every instruction, beq both taken and not taken, a discarded
  write to `$0`, and undefined opcodes. For LC4 they are every opcode, BRR both
  taken and not taken, and unassigned opcodes.

`tb_lecture_cpus` runs both cores together at the default sizes. The DMEM
contents and most of the instruction memory are preset by hierarchical
reference (e.g. `dut.u_lc4.u_dmem.mem`), and the directed programs go in
through the load ports.

To simulate with Verilator (from the repository root):

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
  rtl/mips_pkg.sv rtl/lc4_pkg.sv tb/mips_iss_pkg.sv tb/lc4_iss_pkg.sv \
  tb/tb_lecture_cpus.sv --top-module tb_lecture_cpus -Mdir obj
./obj/Vtb_lecture_cpus
```

Replace `tb_lecture_cpus` with any other `tb_<module>` to test a single block.
The whole top-level run takes well under a second.

## Changing it

* Memory sizes are the `*_AW` parameters of `mips_cpu`, `lc4_cpu` and
  `lecture_cpus`. `mips_cpu` also takes `RESET_PC`.
* To add a MIPS instruction, add its opcode and func constants to `mips_pkg`
  and a row to `mips_control`. If it needs a new ALU operation, add the
  operation to `alu_ctrl_e`, `mips_alu_control` and `mips_alu`. Then teach
  `mips_iss_pkg` the instruction so that the lockstep tests cover it.
* For LC4, opcodes and the control word are in `lc4_pkg`, and `lc4_decode`
  holds one case per opcode.
