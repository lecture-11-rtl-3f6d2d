# PARCv1 processors: single-cycle, multicycle (FSM) and pipelined

This RTL implements one small instruction set three ways, so that the
microarchitectures can be compared directly on the same programs:

| microarchitecture | CPI | cycle | what limits it |
|---|---|---|---|
| single-cycle (`sc_proc`) | 1 | long: fetch, register read, ALU or multiply, memory and write-back all fit in one cycle | the longest path through the whole datapath |
| multicycle FSM (`fsm_proc`) | > 1 (about 10 on the test program, 38 cycles for a multiply) | short: one register-to-register transfer over a shared bus | one transfer per cycle |
| five-stage pipeline (`pipe_proc`) | about 1 (1.0 for independent code, 1.46 on the test program) | short: one stage | data and control hazards |

The FSM processor exists three times, with a **hardwired** control unit, a
**vertically microcoded** one and a **horizontally microcoded** one. All three
control units produce the same control signals and take the same number of
cycles. `parc_top` places all five processors side by side.

All of it follows the single-cycle, FSM and pipelined PARCv1 designs of the
lecture "Processor Microarchitecture (Part 2)". Where that lecture stops
(blank rows of control tables, unspecified encodings, an exercise), the
choices made here are stated in each section and collected under
[Departures and own choices](#departures-and-own-choices).

## Instruction set

PARCv1 is a MIPS-like 32-bit subset. All three processors implement:

| instruction | meaning | encoding (op / funct) |
|---|---|---|
| `addu rd, rs, rt` | rd <- rs + rt | 0x00 / 0x21 |
| `addiu rt, rs, imm` | rt <- rs + sext(imm) | 0x09 |
| `mul rd, rs, rt` | rd <- low 32 bits of rs * rt | 0x1C / 0x02 |
| `lw rt, imm(rs)` | rt <- M[rs + sext(imm)] | 0x23 |
| `sw rt, imm(rs)` | M[rs + sext(imm)] <- rt | 0x2B |
| `j target` | pc <- {pc+4[31:28], target, 00} | 0x02 |
| `jal target` | r31 <- pc+4; then as `j` | 0x03 |
| `jr rs` | pc <- rs | 0x00 / 0x08 |
| `bne rs, rt, imm` | if rs != rt: pc <- pc+4 + sext(imm)<<2 | 0x05 |
| `lw.ai rt, imm(rs)` | rt <- M[rs + sext(imm)]; then rs <- rs + 4 | 0x3B |

Field positions are the usual ones: rs = ir[25:21], rt = ir[20:16],
rd = ir[15:11], imm = ir[15:0], target = ir[25:0]. The opcode numbers are
MIPS32's. `lw.ai` (auto-incrementing load) takes the unused opcode 0x3B. When
rt and rs of `lw.ai` are the same register, the increment wins, because it is
the later of the two assignments. Register r0 always reads zero. An undefined
opcode executes as a no-op.

Everything shared lives in `rtl/parc_pkg.sv`: the encodings, the decoder
function `decode()`, the memory request and response structs, the control
field enums, and the FSM states with their control table.

## Memory interface

Each processor talks to memory with a pair of structs:

```
mem_req_t  { val, op (MEM_READ/MEM_WRITE), addr[31:0], data[31:0] }   // processor -> memory
mem_resp_t { data[31:0] }                                             // memory -> processor
```

The memory is assumed to answer **combinationally within the same cycle**, as
a small fast cache would. So there is no ready and no response-valid signal,
and no processor ever waits for memory. A read returns data in the cycle of
the request. A write takes effect at the next rising edge. The single-cycle
and pipelined processors have separate instruction and data ports. The FSM
processor has one port for both. The memory is not part of the RTL. The
testbenches use a behavioural model of it, `tb/test_mem.sv`.

## Single-cycle processor (`sc_proc`, `sc_ctrl`)

The `pc` register addresses instruction memory, and the instruction comes
straight back. In the same cycle:

- the register file is read at rs and rt;
- `sext`, `br_tgen` (pc+4 + sext(imm)<<2) and `j_tgen` ({pc+4[31:28], target, 00}) form the immediate and the branch and jump targets;
- the op1 mux picks rt, sext(imm) or pc+4;
- the ALU computes rs op op1 and reports `eq`, and the multiplier computes rs * rt;
- the ALU result is the data-memory address and rt is the store data;
- the `wb_sel` mux picks the ALU result, the product or the load data, and writes it back to rd, rt or r31.

`pc` then loads pc+4, `j_targ`, rs (for `jr`) or `br_targ`.

`sc_ctrl` is the control table as combinational logic (see its header for the
full table). The rows for addu, mul, lw, j and jr come from the lecture. The
rows for addiu, sw, jal, bne and lw.ai are this design's. `jal` passes pc+4
through the op1 mux and an ALU copy function. `lw.ai` writes rs + 4 from its
own adder through the register file's second write port, in the same cycle
as the load data.

## Multicycle FSM processor (`fsm_proc`)

### Datapath (`fsm_dpath`, `iau`, `alu`, `regfile`)

Everything hangs off one 32-bit **datapath bus**. Each cycle exactly one
source drives the bus:

- `PC`;
- `iau`, the immediate unit: `si` = sext(IR[15:0]), `ts` = IR[25:0]<<2, `sis` = sext(IR[15:0])<<2;
- `alu`;
- the register file read port;
- `RD`, the memory read-data register.

Any set of registers can load from the bus:

- `PC`, `IR`, `A` and `WD` (the store data) load the bus value;
- `B` loads the bus or `B << 1`;
- `C` loads the bus or `C >> 1`.

The register file has a single address, chosen from 31, 0, rs, rt and rd. It
reads onto the bus and writes from it. The bus value is also the memory
address. `RD` captures the memory response every cycle, so a value requested
in one state is read out of `RD` in the next.

The ALU functions are:

- `+4`: A+4;
- `+`: A+B;
- `+?`: A+B if C[0] is set, else A;
- `cmp`: sets the status bit `eq` = (A == B);
- `jt`: {A[31:28], B[27:0]}.

`+?` together with the two shifters is a shift-and-add multiplier. A
multiply takes 32 cycles.

The drawn tri-state bus is built as an AND-OR multiplexer. An assertion
checks that no two drivers are enabled together.

### Control sequences

Control is a sequence of one-cycle states. Each state sets some of the 24
control signals: 5 bus enables, 6 register enables, 2 shift selects, the iau
function (2 bits), the ALU function (3 bits), the register-file address
select (3 bits), the register-file write enable, and the memory request
valid and op. The only status bit is `eq`.

| state(s) | micro-operations | next |
|---|---|---|
| F0 | mem.addr <- PC (read); A <- PC | |
| F1 | IR <- RD | |
| F2 | PC <- A+4; A <- A+4 | dispatch on opcode |
| A0-A2 (addu) | A <- RF[rs]; B <- RF[rt]; RF[rd] <- A+B | F0 |
| AI0-AI2 (addiu) | A <- RF[rs]; B <- si; RF[rt] <- A+B | F0 |
| M0-M2 (mul) | A <- RF[r0] (= 0); B <- RF[rs]; C <- RF[rt] | |
| M3-M33 | A <- A +? B; B <- B<<1; C <- C>>1 | |
| M34 | RF[rd] <- A +? B | F0 |
| L0-L3 (lw) | A <- RF[rs]; B <- si; mem.addr <- A+B (read); RF[rt] <- RD | F0 |
| S0-S3 (sw) | WD <- RF[rt]; A <- RF[rs]; B <- si; mem.addr <- A+B (write WD) | F0 |
| J0-J1 (j) | B <- ts; PC <- jt | F0 |
| JA0-JA2 (jal) | B <- ts; RF[31] <- PC; PC <- jt | F0 |
| JR0 (jr) | PC <- RF[rs] | F0 |
| B0-B1 (bne) | A <- RF[rs]; B <- RF[rt] | |
| B2 | compare A == B, and in the same cycle B <- sis | F0 if equal |
| B3-B4 | A <- PC; PC <- A+B | F0 |
| LA0-LA4 (lw.ai) | A <- RF[rs]; B <- si; mem.addr <- A+B (read); RF[rt] <- RD; RF[rs] <- A+4 | F0 |

An instruction therefore takes 3 fetch cycles plus its own states:

| instruction | cycles |
|---|---|
| addu, addiu | 6 |
| mul | 38 |
| lw, sw | 7 |
| j | 5 |
| jal | 6 |
| jr | 4 |
| bne | 6 not taken, 8 taken |
| lw.ai | 8 |

Because PC already holds pc+4 after F2, `jal` links PC directly and the
branch adds `sis` to PC.

The lecture gives the state names, the length of every sequence and the
micro-operations of F0-F2 and A0-A2. The other states' micro-operations and
the lw.ai sequence are this design's, written to fit those lengths. The whole
table is the function `fsm_state_cs()` in the package.

### Three control units

**Hardwired** (`fsm_ctrl_hw`): a state register plus two pieces of
combinational logic, the state-to-control-signal table and the transition
logic.

**Vertically microcoded** (`fsm_ctrl_uc`): a microprogram counter (uPC)
addresses a read-only control store of 68 microinstructions, each 23 bits
wide. The microinstruction is encoded more tightly than the raw signals:

- a 3-bit bus-source number, which a decoder turns into the five bus enables;
- one shift bit, decoded into both B/C mux selects;
- the register enables, the functions, the register-file fields and the memory fields;
- a 2-bit next-state field:

| field | next uPC |
|---|---|
| `n` | uPC + 1 |
| `d` | dispatch address, decoded from the opcode |
| `f` | F0 |
| `b` | F0 if `eq`, else uPC + 1 |

The control store is computed at elaboration from the same table as the
hardwired unit. Microinstruction addresses equal the hardwired state numbers,
so the units can be compared cycle by cycle.

**Horizontally microcoded** (`fsm_ctrl_hz`): the same sequencer as the
vertical unit (uPC, n/d/f/b field, dispatch decoder), but each
microinstruction holds all 24 control signals unencoded, one bit each. The
word drives the datapath with no decoders, so the store is wider: 26 bits per
word instead of 23. With so few signals the difference here is small. The
gap grows with the number of control signals that are never active
together.

Set the `fsm_proc` parameter `CTRL` to choose a unit: `FSM_HARDWIRED` (the
default), `FSM_VERTICAL` or `FSM_HORIZONTAL`.

## Pipelined processor (`pipe_proc`, `pipe_stage_ctrl`)

### Stages

| stage | work | pipeline registers into the next stage |
|---|---|---|
| F | `pc_F` addresses instruction memory; pc+4 | `ir_FD`, `pc_plus4_FD`, `val_FD` |
| D | control-signal table; register read; `j_tgen`, `br_tgen`; op1 mux (rt / sext / pc+4); jumps resolved | `op0_DX`, `op1_DX`, `sd_DX`, `btarg_DX`, `cs_DX`, `val_DX` |
| X | ALU and multiplier; `result_sel_X`; bne resolved from `eq_X`; rs+4 for lw.ai | `result_XM`, `sd_XM`, `cs_XM`, `val_XM` |
| M | data memory (address `result_XM`, data `sd_XM`); `wb_sel_M` | `result_MW`, `cs_MW`, `val_MW` |
| W | register-file write (and the second write for lw.ai) | |

The control signals decoded in D travel down the pipeline with the data.
Each stage uses its part of them.

### Stall and squash control

This is the part that most needs care. Every stage has the same small
control block, `pipe_stage_ctrl`. It holds the stage's valid bit and works
from five inputs: the previous stage's `next_val`, this stage's own stall and
squash hazards, and the OR of the `ostall` and `osquash` signals of all later
stages. From these it derives, with this priority:

```
squash   = val & later_osquash                     // killed by a later stage
ostall   = val & !squash & hazard_stall            // this stage's own stall
stall    = val & !squash & (ostall | later_ostall) // hold this stage
osquash  = val & !squash & !stall & hazard_squash  // kill all earlier stages
next_val = val & !stall & !squash                  // pass a transaction on
reg_en   = !stall                                  // enable for this stage's input registers
```

This order matters:

- A squash beats a stall, because a killed instruction must not hold up the pipeline.
- A stalled instruction cannot originate a squash, because its decision is not final yet.
- A stage never squashes itself, only the stages before it.

When a stage stalls, all earlier stages stall with it, because each of them
sees the stall in its `later_ostall`. The stage just after it receives a
bubble, because `next_val` is 0.

The hazards handled:

- **RAW (read after write)**: D stalls while a source register (rs and/or rt, depending on the instruction) is the destination of a valid instruction in X, M or W. There is no bypassing. W is included because the register file has no write-to-read bypass. A dependent instruction therefore waits until its producer has written back, which costs up to 3 cycles.
- **Jumps** (`j`, `jal`, `jr`): resolved in D. They squash F, and the PC loads the target, so a jump costs 1 cycle. A `jr` whose rs is not ready stalls first, and squashes only once it can go.
- **Taken `bne`**: resolved in X. It squashes F and D, and the PC loads `btarg_DX`, so a taken branch costs 2 cycles. A not-taken branch costs nothing: the pipeline always predicts fall-through.
- **Structural and WAW/WAR hazards** cannot occur in this organisation: separate memory ports, in-order issue, a single write-back stage. So there is no logic for them.

The F stage's valid bit resets to 1, so the first fetch of the reset PC
happens in the first cycle after reset.

### lw.ai in the pipeline

rs + 4 is formed by its own adder in X (from `op0_DX`) and carried through M
to W. In W the register file's second write port writes it in the same cycle
as the load data. Hazard detection counts both destinations.

## Top level (`parc_top`)

`parc_top` instantiates `sc_proc`, `fsm_proc` three times (hardwired,
vertical and horizontal control) and `pipe_proc`. All five share the clock and a synchronous
active-high reset. Each brings out its own memory ports. The FSM processors
also bring out their current state. The only parameter is `RESET_PC`
(default 0).

## Verification

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
ends by printing `TB_RESULT checks=N failures=M` and has a cycle watchdog.
The processor testbenches share `tb/parc_tb_pkg.sv`, which contains:

- an assembler;
- a program generator: a directed part that exercises every instruction, a counted loop, a call and return, a skipped block, back-to-back dependences and `lw.ai` with rt == rs, followed by a pseudo-random block of arithmetic, load, store and `lw.ai` instructions; the program ends by storing r1..r31 to a result area;
- an instruction-set simulator, which also predicts the cycle count of each microarchitecture. The pipeline prediction comes from a separate stage-timing model, not from the RTL.

The processor and top-level testbenches check:

- the final registers and data memory against the simulator;
- the **exact cycle count**: n instructions in n cycles for single-cycle; the sum of the state counts above for FSM; the timing model for the pipeline;
- for the pipeline, the exact number of RAW stall cycles, jump squashes and branch squashes;
- that every mechanism happened at least once: stalls, both kinds of squash, FSM dispatch, multiply steps, the early return of a not-taken branch, taken branches, lw.ai, jal/jr.

`parc_top_tb` runs the whole design at its default parameters. On its
199-instruction program it reports:

| processor | cycles | CPI |
|---|---|---|
| single-cycle | 199 | 1.0 |
| FSM (all three control units) | 2051 | 10.3 |
| pipelined | 291 | 1.46 (79 stall cycles) |

`workloads_tb` runs the two short comparison sequences on all five
processors:

| sequence | single-cycle | FSM | pipelined |
|---|---|---|---|
| lw, addu, j | 3 | 18 | 4 (one squash) |
| three independent addiu | 3 | 18 | 3 |

To simulate with Verilator (package files first):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module parc_top_tb \
    rtl/parc_pkg.sv tb/parc_tb_pkg.sv rtl/*.sv tb/test_mem.sv tb/parc_top_tb.sv
./obj_dir/Vparc_top_tb
```

Replace `parc_top_tb` with any other testbench name. `-Wno-fatal` is needed
because Verilator warns that `parc_pkg.sv` is listed twice, and about width
extensions in the testbench assembler. Both warnings are harmless. Each
testbench runs in seconds.

## Departures and own choices

Where the lecture is silent or leaves an exercise, this design chose:

- **Encodings**: MIPS32 opcode numbers, plus 0x3B for `lw.ai`.
- **lw.ai datapaths**: a second register-file write port and a separate +4 adder in the single-cycle and pipelined processors; five extra states in the FSM processor. The lecture poses `lw.ai` as an exercise and gives only its semantics.
- **Control rows**: the blank rows of the single-cycle control table (addiu, sw, jal, bne, lw.ai), and the FSM state contents beyond F0-F2 and A0-A2.
- **Hazard policy**: stall on every RAW dependence, no bypassing. Branches are resolved in X and jumps in D, as the placement of the target generators and of `eq_X` suggests. One pipeline drawing marks the PC mux "always pc_plus4", which is a pipeline with no control-hazard handling. This design follows the text's squashing scheme instead.
- **ALU details**: the ALU copy function used by `jal` in the single-cycle and pipelined datapaths, and the reading of "+?" as a conditional add on C[0].
- **Microcode**: the microinstruction field layouts of both microcoded units. The horizontal unit uses the vertical unit's sequencer. The control stores are read-only. The lecture only names horizontal microcoding and says it needs a large control store.
- **Reset**: r0 hardwired to zero, every register cleared by reset, reset PC 0. The F stage's valid bit resets to 1, where the generic stage control resets valid to 0, so that the reset PC is fetched.

Left out:

- **A writable control store**: mentioned only as a possibility.
- **The memory system**: assumed, not designed.
- **The no-squash pipeline variant**: the simpler "stall without squash" control is a special case of `pipe_stage_ctrl` with the squash inputs tied low, so it has no separate module.

## Files

| file | content |
|---|---|
| `rtl/parc_pkg.sv` | encodings, types, decoder, FSM states and control table |
| `rtl/regfile.sv`, `alu.sv`, `mul.sv`, `br_tgen.sv`, `j_tgen.sv`, `iau.sv` | shared datapath units |
| `rtl/sc_ctrl.sv`, `sc_proc.sv` | single-cycle processor |
| `rtl/fsm_dpath.sv`, `fsm_ctrl_hw.sv`, `fsm_ctrl_uc.sv`, `fsm_ctrl_hz.sv`, `fsm_proc.sv` | multicycle processor |
| `rtl/pipe_stage_ctrl.sv`, `pipe_proc.sv` | pipelined processor |
| `rtl/parc_top.sv` | all five side by side |
| `tb/*_tb.sv` | one testbench per module, plus `workloads_tb` |
| `tb/parc_tb_pkg.sv`, `tb/test_mem.sv` | assembler, program generator, ISA simulator, memory model |
