# A statically pipelined processor in SystemVerilog

A conventional five-stage pipeline spends much of its energy on work the
program never asked for. Every pipeline register is written every cycle.
Register-file operands are read even when forwarding then replaces them.
Hazard and forwarding logic runs on every instruction. Every fetch reads the
branch predictor and the branch target buffer.

A *static pipeline* (SP) moves that control into the compiler. The
processor has only two stages, fetch and execute. The pipeline registers
become named internal registers that instructions read and write directly.
An instruction is not an operation such as `add r2,r3,r6`. It is a bundle
of independent *effects*, and each effect drives one unit for one cycle:

```
LV = M[CP2];        OPER2 = CP2 + SE;             # load, and address increment
OPER1 = LV + CP1;   PTB = b:&SEQ;                 # add, and "next instruction branches to SEQ"
M[CP2] = OPER1;     CP2 = OPER2;   PC = OPER2 != RS2, @PTB;   # store, copy, branch
```

These three instructions are the whole loop body of
`for (i = 0; i < 100; i++) a[i] += m;`. The loop-invariant values stay in
internal registers: `m` in CP1, the stride 4 in SE, the end address in RS2.
The loop reads no register-file operands at all. The branch target is
computed once, before the loop. The branch predictor is read only because
the instruction before the branch asks for it. No hardware checks for
hazards: the compiler orders the effects so that every value is there when
it is read.

This repository holds synthesizable RTL for such a processor. It has 8 KB
instruction and data stores, a 256-entry branch prediction buffer, 32
registers and 32-bit template-encoded instructions. There are self-checking
testbenches for every block and for the whole machine.

## Registers and datapath

| register | written by | meaning |
|---|---|---|
| RS1, RS2 | register-file read effects | read data of the 32 x 32-bit register file |
| SE | short/long immediate effects | sign-extended immediate; the long form can instead replace only the upper half |
| LV | load effects | value loaded from the data store |
| OPER1 | ALU effect | ALU result |
| OPER2 | integer-addition effect | adder result |
| TARG | integer-addition effect | adder result used as a branch target (`TARG = PC + SE`) |
| CP1, CP2 | copy effect | copies of any other register (keep loop invariants or pointers) |
| SEQ | copy effect | usually `PC + 1`, the address after a loop head or a return address |
| PTB | PTB effect (in `sp_fetch`) | the next instruction is a point of transfer of control |
| PC | fetch | address of the executing instruction; counts instructions, not bytes |

The interconnect (`sp_interconnect`) feeds every unit from these registers.
The units are the ALU, the integer adder, the data store, the register-file
write port and the copy path. The interconnect also carries PC and PC+1.
All effects of an instruction read the values held at the start of the
cycle. They all write at the end of the cycle, so the effects of one
instruction act in parallel. Each result can be used by the next
instruction.

Data addresses are byte addresses, with little-endian byte order. Word,
half-word and byte loads and stores are supported. A register-file read
returns the old value when the same register is written in the same cycle.
Register 0 is always zero.

## Instruction encoding

Every instruction is 32 bits. The top 5 bits are a template ID. The ID
chooses one of four field layouts and says which effect kind each field
holds:

```
A: ID[31:27] | E10[26:17] | E10[16:7]  | E7[6:0]
B: ID[31:27] | PTB[26:24] | E7[23:17]  | E10[16:7] | E7[6:0]
C: ID[31:27] | E10[26:17] | LIMM[16:0]
D: ID[31:27] | PTB[26:24] | E7[23:17]  | LIMM[16:0]
```

10-bit effects:

| kind | bits |
|---|---|
| ALU | op[9:6] a[5:3] b[2:0] -> OPER1. op 0 = no-op. Ops 12-15 (BEQ, BNE, BLT, BGE) are branch compares and do not write OPER1 |
| load/store | op[9:6] addr[5:3] data[2:0]. op 0 = no-op, 1-5 = LW LH LHU LB LBU, 9-11 = SW SH SB |
| dual read | reg[9:5] -> RS1, reg[4:0] -> RS2 |
| register write | en[9] reg[8:4] src[3:0] |
| FPU | listed in the format, but no FPU is built: the instruction raises `illegal` and does nothing |

7-bit effects:

| kind | bits |
|---|---|
| integer addition | a[6:4] (code 0 = PC) b[3:1] dest[0] (0 = OPER2, 1 = TARG) |
| load signed word | en[6] addr[5:3] -> LV |
| single read | en[6] which[5] (0 = RS1, 1 = RS2) reg[4:0] |
| short immediate | SE = sign-extended [6:0] |
| copy | dest[6:5] (CP1, CP2, SEQ, 3 = none) src[4:1] |
| PTB | [2] unconditional, [1:0] target: 1 = TARG, 2 = SEQ, 3 = RS2, 0 = none (the same code as the 3-bit PTB field of formats B and D; template 17 carries it as a 7-bit effect) |

3-bit operand fields name RS1, RS2, SE, LV, OPER1, OPER2, CP1 and CP2
(codes 0 to 7). 4-bit fields also reach TARG (8), SEQ (9), PC (10) and
PC+1 (11). The 17-bit long immediate sets `SE = sext(imm[15:0])`, or sets
`SE = {imm[15:0], SE[15:0]}` when bit 16 is set. Two instructions therefore
build any 32-bit constant.

The 32 templates are listed in `template_lookup` in `rtl/sp_pkg.sv`.
Template 0 is a no-op. Templates 1-19 use format A, 20-26 format B, 27-29
format C, and 30-31 format D. Formats C and D always write SE. To leave a
field unused, choose a template without it or use the field's no-op code
(`tb/sp_asm_pkg.sv` has encoder functions for all of this).

## Transfers of control

A branch has three parts, and the SP separates them:

1. **Target.** An ordinary effect computes it ahead of time into TARG
   (`TARG = PC + SE`), SEQ (`SEQ = PC + 1`) or RS2 (for indirect jumps and
   returns). A loop can compute it once, before the loop.
2. **Point of transfer.** A PTB effect in instruction *i* says that
   instruction *i+1* transfers control. It also names the target register
   and says whether the transfer is conditional (`b:`) or not (`j:`).
3. **Decision.** A conditional transfer is decided by an ALU compare in
   instruction *i+1*.

Timing (`rtl/sp_fetch.sv`):

| cycle | execute | fetch |
|---|---|---|
| 2 | *i*: PTB written; a conditional PTB reads the BPB for *i+1* | *i+1* |
| 3 | *i+1*: the compare resolves the branch | the PTB target register, or *i+2* if the BPB predicts not taken |
| 4 | on a misprediction: a bubble (the cycle-3 fetch is squashed) | the correct address |

There is no branch target buffer, because the target is always in a
register. The BPB is read only for conditional transfers. A correctly
predicted branch costs no cycles, and a mispredicted one costs one. A jump
through TARG, SEQ or RS2 is never mispredicted. The BPB has 256 two-bit
saturating counters. They are indexed by the branch's instruction address
and reset to weakly not taken. The effects of instruction *i+1* itself
always execute.

## Blocks

| file | block |
|---|---|
| `sp_pkg.sv` | formats, template table, codes, `ctrl_t`, `sp_events_t` |
| `sp_decoder.sv` | template and effect decoding (combinational) |
| `sp_regfile.sv` | 32 x 32 register file, 2 reads, 1 write |
| `sp_alu.sv` | ALU and branch compares |
| `sp_interconnect.sv` | source multiplexers |
| `sp_bpb.sv` | branch prediction buffer |
| `sp_fetch.sv` | fetch address selection, PTB register, squash and redirect |
| `sp_core.sv` | internal registers, adder, effect execution; instantiates the above |
| `sp_icache.sv` | 8 KB instruction store, synchronous read, load port |
| `sp_dcache.sv` | 8 KB data store; its registered load result is LV |
| `sp_top.sv` | core and both stores |

`sp_top` has two load ports, `prog_*` for instructions and `dmem_*` for
data words. Use them while `rst_n` is low: reset clears only the core, so
the stores keep their contents. After reset the core fetches from
`RESET_PC` (0). `pc` and `events` describe the instruction in execute. The
events are register-file reads and writes, ALU and adder use, data
accesses, BPB reads, taken transfers, mispredictions and the number of
internal registers written. They are the counts an activity-based energy
estimate needs.

## Departures from the source description and open points

- **Caches.** Only the capacity (8 KB each) is specified. Both stores are
  built as always-hit memories with no tags, no miss handling and no next
  memory level.
- **FPU.** The instruction format lists FPU effects, but the unit's
  operations, number format and destination are not specified, so no FPU is
  built.
- **Encodings are this design's own.** This covers the template table, the
  bit layout inside each effect, the ALU and memory operation codes, the PTB
  code, and the two-part long immediate. The source fixes only the field
  widths (5-bit ID, 3-bit PTB, 10-bit and 7-bit effects, long immediate)
  and the effect kinds.
- **Chosen where unspecified.** Misprediction recovery (squash, then
  redirect), the BPB counter type and reset value, reset values (all zero),
  register 0 as zero, and byte order.
- **Corner cases.** A PTB issued by a mispredicted point of transfer is
  dropped. A conditional PTB whose next instruction has no compare counts
  as not taken, and an assertion warns about it.
- **Not built.** The longer (64-bit) instruction format, which the source
  reports as an alternative, is not built.

## Simulation

Each testbench in `tb/` prints `TB_RESULT checks=N failures=M`. For
example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sp_pkg.sv tb/sp_asm_pkg.sv \
          tb/sp_top_tb.sv --top-module sp_top_tb
./obj_dir/Vsp_top_tb
```

- `sp_top_tb` runs at the default sizes. It runs the `a[i] += m` loop over
  100 words, then a second program with a correctly predicted not-taken
  branch, a jump through TARG that skips an instruction, a two-part
  constant, half-word and byte accesses, and a jump through RS2. It checks
  memory, registers and event counts. It also checks the loop's cycle count:
  3 per iteration plus one bubble for each of the two mispredictions (the
  first and last iterations). It counts every control-transfer mechanism
  and fails if one never happens.
- `sp_crc32_tb` runs a bitwise CRC-32 kernel, the core of one of the
  benchmarks the design was evaluated with, over a generated buffer. It
  compares the result with a reference computed in the testbench and
  prints the event counts, weighted by relative unit energies (cache 5.10,
  BPB 0.65, register-file access 1.00, ALU 4.11, internal register write
  0.10).
- `sp_loop_opt_tb` runs the same loop twice. The first run uses the plain
  effect expansion of the MIPS loop, where every operation reads its
  operands from the register file and writes its result back. That costs
  19 cycles, 8 register-file reads and 3 writes per iteration. The second
  run uses the scheduled form: 3 cycles per iteration and no register-file
  access. Both runs must give the same array result.
- `sp_core_tb` runs a summing loop with the branch through TARG, using
  memories modelled in the testbench.
- The block testbenches compare each block with a reference model or a
  hand-written trace (`sp_fetch_tb` checks the fetch address cycle by
  cycle).

Programs are written with the helpers in `tb/sp_asm_pkg.sv`. For example,
`fa(1, E10_NOP, e_mem(MEM_LW, S_CP2, S_RS1), e_add(S_CP2, S_SE, 1'b0))`
encodes `LV = M[CP2]; OPER2 = CP2 + SE`.
