# Six-stage in-order pipeline with scoreboard, poison bits and full bypassing

This is a small in-order processor pipeline. It shows how a pipelined CPU
keeps data and control hazards correct without ever flushing a stage:

* a **scoreboard** (one busy bit per register) stops an instruction in
  register read until the values it needs exist;
* **epochs** mark the instructions fetched after a mispredicted branch, and
  execute marks those instructions **poisoned** instead of dropping them. A
  poisoned instruction still travels to writeback. It changes nothing
  architectural, but it still releases the scoreboard entry it claimed;
* a **bypass network** hands results produced in execute and memory straight
  back to register read, so most dependent instructions need not wait for
  writeback;
* one execute operation, a multiply, runs in a **three-stage function unit**
  while the execute stage waits for it.

The structure follows lecture L12 ("Bypassing") of *Computer Architecture:
A Constructive Approach* (MIT 6.S078, 2012). That lecture explains it in
Bluespec-style rules. This RTL is an independent SystemVerilog version. The
lecture does not define an instruction set, memory sizes or widths, so those
are choices made here; they are listed under "Departures and choices" below.

```
        +-----------------------------------pc (redirect)----------+
        v                                                          |
  F --fr--> D --dr--> R --rr--> X --xr--> M --mr--> W              |
  |                   ^  ^  ^   |         |         |              |
 imem                 |  |  |   +---------)---------)--------------+
                      |  |  +---bypass----+         |   (X -> F)
                      |  +------bypass--------------+ ... (X, M -> R)
                      +---- scoreboard clear + register-file write (W -> R)
```

Stages: F fetch, D decode, R register read, X execute, M memory, W writeback.
fr, dr, rr, xr and mr are two-entry FIFOs between the stages. Each stage
takes the record at the head of its input FIFO, adds what it computes, and
pushes the record into its output FIFO. A stage that cannot finish leaves
the record where it is.

## Stage records

Each FIFO carries one record per instruction, defined in `uarch_pkg`. Each
record holds everything the earlier stages produced, plus bookkeeping fields:

| record (FIFO) | architectural part | bookkeeping |
|---|---|---|
| `FetchData` (fr) | `FBundle` = instruction word | pc, instruction number `inum`, `epoch` |
| `DecData` (dr) | + `DecBundle` = type, ALU function, `r_dest`, `op1`, `op2`, immediate | same |
| `RegData` (rr) | + `RegBundle` = `src1`, `src2` | same |
| `ExecData` (xr, mr) | + `EBundle` = `cond` (redirect), `addr`, `data` | + `poisoned` |

Functions `newDecData`, `newRegData` and `newExecData` start a stage's
record by copying the earlier fields. A stage only writes its own fields.

## Data hazards: scoreboard and stall rule

`regread_stage` holds the scoreboard. For the instruction at the head of dr
it does this:

```
stall = (writes r_dest and busy[r_dest])                 -- write-after-write
      | (busy[op1] and no bypass for op1)                 -- read-after-write
      | (busy[op2] and no bypass for op2)
src   = bypass value if one is offered, else register-file value
```

If there is no stall and rr has room, the instruction is issued and
`busy[r_dest]` is set. Writeback clears the bit again, and register read
sees the clear in the same cycle. If a clear and a new set hit the same
register in one cycle, the set wins.

Two rules make the single busy bit correct. Both look obvious only after
seeing what fails without them:

1. **Stall on a busy destination.** Without the write-after-write stall,
   two writers of one register could be in flight together. The older one's
   writeback would clear the bit while the younger one is still on its way.
   A reader issued in between would then take a stale value from the
   register file. With the stall, each register has at most one writer in
   flight.
2. **Writeback always clears, even for a poisoned instruction.** Register
   read does not look at epochs. So an instruction fetched in a branch
   shadow may already have claimed its destination before execute finds out
   it is on the wrong path. If that instruction were simply dropped, its
   busy bit would never clear. The next correct-path writer of that register
   would then wait forever (a dead-instruction deadlock). Letting it flow to
   writeback as a poisoned record fixes this: writeback does the bookkeeping
   and skips the register write.

## Control hazards: epochs and poison bits

Fetch always predicts pc+4. Execute resolves branches and jumps. When one
is taken (`EBundle.cond`), execute does three things in the same cycle:
sends the target to fetch, flips its own epoch bit, and moves the record on.
At the next clock edge fetch loads the target and flips its own epoch bit.
Every record fetched before that edge carries the old epoch. When such a
record reaches execute, execute does not run it. Instead it sets
`poisoned`, sends no redirect and offers no bypass value, and passes the
record on. Memory skips the access of a poisoned load or store. Writeback
skips the register write of a poisoned record but still clears the busy
bit. There is no flush signal anywhere: killing an instruction is just one
bit in its record. A single epoch bit is enough because execute is the only
place that changes it.

## Bypassing

`bypass_net` is combinational. Two stages offer values to it: execute
(producer 0) and memory (producer 1). Each offer is a `BypassValue`
{valid, register number, value}, and register read has two request ports.
Each stage offers only in the cycle it hands a record to the next FIFO, and
only for a live record that writes a register:

* execute offers ALU and multiply results (a load's value does not exist
  yet);
* memory offers any register value, including a load's data;
* writeback needs no bypass port. Its register-file write shows up on the
  register-file read ports in the same cycle, and the busy bit clears at the
  same moment.

So an instruction that uses an ALU result issues in the cycle its producer
leaves execute. An instruction that uses a load's data issues when the load
leaves memory. If both stages offer the same register, execute (the younger
value) wins. The write-after-write stall means this never happens in the
pipeline.

Bypassed values are used only in the cycle they are offered. A record that
sits in xr or mr waiting for the next stage offers nothing until it moves.
Readers of its result wait, which is correct, because the register stays
busy until writeback.

## Multi-cycle execute

`multistage_unit` is a three-step pipeline joined by its own FIFOs m1 and
m2. `request` performs step M1 and pushes into m1. An internal step performs
M2 and moves the result from m1 to m2. `response` performs M3 on the head of
m2. Here it computes the low 32 bits of a 32x32 multiply:
M1 forms the partial products `a*b[15:0]` and `a*b[31:16]`, M2 adds the
overlapping 16-bit halves, and M3 assembles the result.

In `execute_stage` a live multiply starts the unit and sets `waiting`. The
record stays at the head of rr. When the response arrives and xr has room,
the record leaves with the product, and the product is bypassed like an ALU
result. A multiply therefore spends three cycles in execute, plus any cycles
spent waiting for xr. A poisoned multiply does not start the unit.

## Timing

* Every FIFO takes a new record when it is not full and gives one up when it
  is not empty. These two conditions are independent, so no ready signal
  runs back through several stages in one cycle. With two entries per FIFO
  an unstalled program moves one instruction per cycle.
* F to D to R to X: an instruction fetched in cycle t can be executed in
  cycle t+3. A taken branch or jump executed in cycle t makes the target be
  fetched in cycle t+1. The records fetched in between (three when nothing
  stalls) are poisoned.
* A dependent ALU instruction directly behind its producer issues without a
  stall (execute bypass). An instruction that uses a load stalls in register
  read until the load leaves memory.
* Memory accesses take one cycle. Parameter `MEM_WAIT` adds that many wait
  cycles to each live load or store, to model a slow memory.

Example: the sequence `00: add r1,r0,r0; 04: j 40; ...; 40: add r1,r0,r0;
44: add r2,r1,r0` runs as follows. The jump executes three cycles after it
is fetched. Address 0x40 is fetched in the next cycle. The shadow
instructions are poisoned. The add at 0x44 receives r1 from the execute
bypass.

## Instruction set (choice made here)

32-bit MIPS-style encoding, 32 registers of 32 bits, r0 reads as zero, no
branch delay slot, byte addresses with word-aligned accesses:

| class | instructions | result available |
|---|---|---|
| ALU, register | `ADDU SUBU AND OR XOR SLT SLTU` (opcode 0, funct 21,23,24,25,26,2A,2B) | end of X |
| ALU, immediate | `ADDIU SLTI` (sign-extended), `ANDI ORI XORI` (zero-extended), `LUI` | end of X |
| multiply | `MUL rd,rs,rt` (opcode 1C, funct 02), low 32 bits | end of X, after 3 cycles |
| memory | `LW rt,off(rs)`, `SW rt,off(rs)` | load: end of M |
| control | `BEQ BNE` (target pc+4+4*off), `J` (target {pc+4[31:28], index, 00}) | redirect from X |

Unknown encodings execute as no-ops.

## Top-level interface (`six_stage_proc`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | clock; synchronous active-high reset (FIFOs empty, scoreboard clear, registers 0, pc = `RESET_PC`) |
| `imem_init_we/addr/data` | in | write a word into instruction memory (byte address) |
| `dmem_init_we/addr/data` | in | write a word into data memory; use while `rst` is high |
| `commit_valid` | out | a live instruction leaves writeback this cycle, in program order |
| `commit_pc`, `commit_inum` | out | its pc and fetch number |
| `commit_wr_reg`, `commit_rdst`, `commit_data` | out | register written and value |
| `commit_is_store`, `commit_addr`, `commit_data` | out | store address and data |
| `events` | out | `PipeEvents` pulses: `raw_stall`, `waw_stall`, `bypass_x`, `bypass_m`, `redirect`, `poisoned`, `mul_start`, `mul_wait`, `mem_wait` |

Parameters: `IMEM_WORDS` = `DMEM_WORDS` = 1024, `MEM_WAIT` = 0,
`RESET_PC` = 0. The memories are not reset. Load them first, then release
`rst`. There is no halt instruction; a jump to itself serves as a stop.

## Modules

| file | role |
|---|---|
| `uarch_pkg.sv` | widths, instruction classes, opcodes, stage records, `BypassValue`, `PipeEvents` |
| `pipe_fifo.sv` | stage FIFO (`DEPTH` 2, type parameter `T`), with handshake assertions |
| `fetch_stage.sv` | pc, pc+4 prediction, redirect, fetch epoch, instruction number |
| `decode_stage.sv` | instruction decoder; unused operand fields become r0 |
| `regread_stage.sv` | stall rule, operand selection, scoreboard set; instantiates `scoreboard` |
| `scoreboard.sv` | busy bits with same-cycle clear |
| `regfile.sv` | 32x32 registers, 2 read ports, 1 write port, reads see the same-cycle write |
| `bypass_net.sv` | `NPROD` producers, 2 consumer ports |
| `execute_stage.sv` | epoch check and poisoning, redirect, bypass offer, multi-cycle wait; instantiates `exec_unit` and `multistage_unit` |
| `exec_unit.sv` | combinational ALU, address, branch and jump computation |
| `multistage_unit.sv` | three-stage multiplier with internal FIFOs m1, m2 |
| `memory_stage.sv` | load/store unless poisoned, optional wait states, bypass offer |
| `writeback_stage.sv` | busy-bit clear always, register write unless poisoned, commit trace |
| `word_mem.sv` | word memory, combinational read, clocked write (instruction and data) |
| `six_stage_proc.sv` | top level: the pipeline above |

The synthesizable code uses `always_ff`/`always_comb`, packed structs and
enums from the package, and a type parameter on the FIFO.

## Simulation

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_six_stage_full \
    -Irtl -Itb rtl/uarch_pkg.sv tb/tb_isa_pkg.sv rtl/*.sv tb/tb_six_stage_full.sv
./obj_dir/Vtb_six_stage_full
```

To run another testbench, swap in its name. Testbenches that do not use
`tb_isa_pkg` can leave it off the command line.

| testbench | what it shows |
|---|---|
| `tb_six_stage_full` | whole pipeline at default parameters. A directed program plus 600 random instructions. Every commit is compared with an instruction-level reference model (`tb_isa_pkg::IsaModel`), and so is the final register file. Every mechanism must occur. |
| `tb_six_stage_proc` | the same check with `MEM_WAIT=3` and another random program, so that memory wait cycles occur as well |
| `tb_waterfall_examples` | the lecture's four short jump/shadow sequences (one of them starting with a slow load): correct-path commits only, in order, no deadlock, shadow instructions poisoned, execute bypass used, write-after-write wait behind a poisoned writer |
| `tb_<module>` | one per module: random traffic against a model (FIFO, register file, scoreboard, bypass network, memory, execute function, writeback), or directed scenarios (fetch redirect and epoch, decoder fields, stall and release cases in register read, poisoning, redirect and 3-cycle multiply in execute, wait states and poisoned accesses in memory) |

`tb_isa_pkg` also has encoder functions (`ADDU(rd,rs,rt)`, `LW(rt,off,rs)`,
`BEQ(rs,rt,off)`, `J(addr)`, ...) for writing test programs.

## Departures and choices

The items below are not fixed by the lecture. They are choices made here,
or a reading of what the lecture shows:

* **Instruction set, widths, sizes.** The lecture shows only `add`, `ld` and
  `j` in examples, at byte addresses 00, 04, ..., 40, 44. The ISA above, the
  32x32-bit register file and the 1024-word memories are this design's.
* **FIFO depth 2.** The lecture's diagrams show a jump executing while a
  load is held in memory, which needs room for two records between execute
  and memory. All stage FIFOs and m1/m2 are therefore two deep.
* **Writeback feedback.** The lecture feeds writeback straight into register
  read. Here that feedback is the same-cycle scoreboard clear plus a
  register file whose reads see the write in progress, not a third bypass
  port.
* **Bypass sources.** The lecture's first version bypasses only ALU results
  from execute. Its full-bypassing version lets every register-writing stage
  bypass. Here execute (ALU and multiply results) and memory bypass. The
  priority order, and reporting which producer served a request, are
  additions.
* **Multi-cycle operation.** The lecture gives the three-step structure but
  not the operation. The multiply and its split into steps are this
  design's. A poisoned multiply never starts the unit.
* **Memory.** Reads are combinational. `MEM_WAIT` is an addition that
  reproduces the lecture's slow-load example. Memory contents are loaded
  through ports, not reset.
* **Observation ports.** The commit trace and the `events` pulses are
  additions for checking and performance counting.
* **Not built.** There are no exceptions or interrupts, no byte or halfword
  memory accesses, no register-indirect jumps or links, and no branch
  predictor beyond pc+4.
