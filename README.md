# FASTCHART: a time-deterministic CPU with its real-time kernel in hardware

Hard real-time software needs execution times it can count, not estimate.
Pipelines, caches, DMA and interrupts make instruction timing statistical, and
a software kernel adds scheduling and context-switch time that grows with the
number of tasks. FASTCHART removes both sources of jitter:

* the **CPU** is a small 16-bit load/store machine with no pipeline, no cache
  and no interrupts, so every instruction takes a fixed one or two cycles;
* the **Real-Time Unit (RTU)** is the whole real-time kernel built as
  hardware. It runs beside the CPU, keeps the task states, schedules by
  static priority, counts delays and prepares the next task's registers while
  the current task keeps running. A task switch then costs the CPU exactly
  one clock cycle, and the kernel costs it no time at all.

The design is sized for small systems: up to **64 tasks** and **8
priorities**. This repository holds synthesizable SystemVerilog for the CPU,
the RTU and the top level that joins them. It also has self-checking
testbenches for every block and an end-to-end test that runs five tasks.

## Task model

Every task is in one of four states. Three real-time calls, issued by the
CPU as ordinary instructions, move tasks between them:

| call | effect |
|---|---|
| `ACT ra, rb` | activate the inactive task whose ID is in `ra`, at the priority in `rb`; it becomes ready. If that task is not inactive, the call is refused and status bit E is set. |
| `DLY ra` | the calling task waits for `ra` system time ticks, then becomes ready again |
| `TERM` | the calling task becomes inactive until some task activates it again |

A ready task with a higher priority than the executing one preempts it, and
the preempted task becomes ready again. Equal priorities do not preempt.
Priority 7 is the highest and 0 the lowest.

Each hardware block of the RTU stands for one of these states:

| state | hardware |
|---|---|
| executing | the CPU, and the OLD register in the RTU (ID and priority of the current task) |
| ready | Ready Queue: 8 FIFOs of task IDs, one per priority, 8 deep |
| waiting | Wait Queue: 64 down-counters, one per task, with the task's priority |
| terminated | Terminate Queue: 64 INAC flags (1 = inactive) |

The saved registers of every task are kept in the TCB (task control block)
memory.

## How a task switch works

This part of the design is the hardest to follow. It rests on two pairs of
things: two register sets, and two task registers in the RTU.

**Two register sets.** The CPU has two complete sets of R0-R7, SR, PC and IL
(the instruction latch). One set is *active*, and the CPU uses it. The other
is the *shadow* set, which the RTU reads and writes one word per cycle. A
one-cycle `swap` pulse exchanges the two sets. This exchange is the task
switch.

**OLD and NEW.** OLD holds the current task, and NEW holds the next one. NEW
is the head of the ready queue, and its context has already been copied into
the shadow set.

The sequence, with the cycle counts of this implementation:

1. **Fetch NEW (1 cycle).** When NEW is empty and the ready queue is not, the
   control unit pops the head of the highest non-empty FIFO into NEW.
2. **Load (11 cycles).** The register counter steps through the 11 words of
   the task's TCB entry. It copies TCB memory at `NEW.id * 11 + counter` into
   the shadow set. The CPU keeps executing OLD meanwhile.
3. **Switch (1 cycle).** `swap` fires in one of three cases:
   * the CPU has given up the processor with `DLY` or `TERM`;
   * the CPU is idle;
   * `NEW.prio > OLD.prio`, the CPU is at an instruction boundary and the
     Not-Switch-Flag is low.

   A preempted OLD is pushed back into its ready FIFO in the same cycle.
4. **Write back (11 cycles).** The shadow set now holds the old task's
   registers. The register counter copies them to TCB memory at
   `OLD.id * 11 + counter` while the CPU runs the new task. For a task that
   terminated, nothing is saved. Its TCB entry is reset to the task's start
   context in one cycle, so a later `ACT` starts it from the beginning.
5. **NEW becomes OLD**, NEW is emptied, and the cycle returns to step 1.

So an activation that preempts takes 1 + 11 + 1 = 13 cycles from the
acknowledged `ACT` to the first instruction of the new task. A voluntary
switch takes 1 cycle when NEW is already loaded. Two things follow from the
shared shadow set:

* a second switch must wait until the write-back and the next load have
  finished;
* real-time calls that arrive during a transfer stall the CPU until the
  transfer ends.

The ready queue changes while NEW waits, and three cases can arise:

* **A higher-priority task becomes ready while NEW waits.** NEW goes back to
  its FIFO (at the tail). The higher task is fetched and loaded instead.
* **The CPU calls `DLY`/`TERM` and nothing is ready.** The RTU switches to
  "no task". `run` goes low and the CPU idles until a task becomes ready,
  which is then switched in at once.
* **Several delays run out together.** The expired counters are moved to the
  ready queue one per cycle, highest priority first (lower ID first among
  equals).

The control unit does at most one of these actions per cycle, in this order:

1. give NEW back;
2. switch;
3. accept a CPU call (acknowledged in the same cycle);
4. move one expired task to the ready queue;
5. fetch NEW.

The **Not-Switch-Flag** (`nsf`) blocks preemption, but not voluntary
switches. The CPU raises it during the two cycles of a two-cycle
instruction, so a switch never splits one. A program can also hold it with
`SNSF` and release it with `CNSF` around a critical section. It is cleared
whenever the sets are exchanged.

## The CPU

### Programming model and memory

* 16-bit data, 16-bit word addresses, one main memory shared by all tasks.
* Registers R0-R7. **R0 is the return-stack pointer**, and R1-R7 are general
  purpose.
* SR holds the flags Z (bit 0), N (1), C (2), V (3) and E (4, the error code
  of the last `ACT`).
* PC is the program counter and IL the instruction latch.
* Each task owns a 1024-word slice of memory: task `n` lives at
  `n*1024 .. n*1024+1023`. Its code starts at the bottom and its return stack
  grows down from the top. Global data and data stacks go in between,
  managed by the program.
* A task's start context is `PC = n*1024`, `R0 = (n+1)*1024`, and all other
  registers 0.

### Instruction set

Every instruction is one 16-bit word. Bits [15:12] hold the opcode:

| opcode | syntax | operation | cycles |
|---|---|---|---|
| 0 | `ALU op rd, rs, sh` | `rd = shift(rd op rs)`, flags from the result; `op` in [5:3]: ADD SUB AND OR XOR MOV CMP NOT (CMP writes only flags); `sh` in [2:0]: none SHL SHR ASR ROL ROR SWAP(bytes) CLR | 1 |
| 1 | `ADDI rd, imm9` | `rd = rd + sext(imm9)`, flags | 1 |
| 2 | `LDI rd, imm9` | `rd = sext(imm9)` | 1 |
| 3 | `LDHI rd, imm8` | `rd[15:8] = imm8` | 1 |
| 4 | `LOAD rd, (rs)` | `rd = mem[ea]`; mode in [5:4]: `(rs)`, `(rs)+`, `-(rs)`, `(rs)-` | 2 |
| 5 | `STORE rd, (rs)` | `mem[ea] = rd`, same modes | 2 |
| 6 | `Bcc off9` | if cond: `PC = PC+1+off9`; cond in [11:9]: EQ NE CS CC MI PL ES EC | 1 |
| 7 | `BRA off12` | `PC = PC+1+off12` | 1 |
| 8 | `CSR off12` | push `PC+1` to `-(R0)`, `PC = PC+1+off12` | 2 |
| 9 | `RSR` | pop `PC` from `(R0)+` | 2 |
| A | `ACT ra, rb` / `TERM` / `DLY ra` / `SNSF` / `CNSF` | sub-function in [11:9] = 0..4; `ra` in [8:6], `rb` in [5:3] | 1 + stall |
| F | `NOP` | | 1 |

Fields: `rd` is in bits [11:9] and `rs` in [8:6]. Unused opcodes act as `NOP`.
`tb/fc_asm_pkg.sv` has one encoder function per format.

### Timing

There is no pipeline. In the first cycle the instruction is read from memory
(the bus read is combinational), decoded and, for a one-cycle instruction,
executed. A two-cycle instruction keeps the instruction in IL and makes its
data access in the second cycle. `LOAD R3,(R4)+` therefore takes two cycles
and writes both R3 and R4. The counts are exact: a straight-line program
takes (one-cycle instructions) + 2 x (two-cycle instructions) cycles. Only
two things add cycles:

* a real-time call waiting for the RTU;
* time during which the RTU has switched the CPU away.

## Interfaces

`fastchart` (top):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `mem_addr` | out | 16 | main-memory word address |
| `mem_re` | out | 1 | read strobe (informational) |
| `mem_rdata` | in | 16 | read data; must be valid in the same cycle as `mem_addr` |
| `mem_we`, `mem_wdata` | out | 1, 16 | write, taken at the rising clock edge |
| `cpu_run` | out | 1 | a task is loaded (low = CPU idle) |
| `cpu_retire` | out | 1 | an instruction completed this cycle |
| `old_task`, `new_task` | out | 10 | OLD and NEW registers `{valid, id[5:0], prio[2:0]}` |
| `ev` | out | 8 | one-cycle event pulses `{swap, preempt, voluntary, idle, replace, expire, act_err, overflow}` |

Parameters: `TICK_DIV` (clock cycles per system time tick, default 1000),
`TIME_W` (delay counter width, 16), `RQ_DEPTH` (ready FIFO depth, 8). Task
count, priority count and data width are constants in `fc_pkg`.

After reset, task 0 runs at priority 0 from address 0 with its start context
in the active set. All other tasks are inactive until activated. The main
memory itself is not part of the design.

Between the CPU and the RTU:

* **Real-time calls:** `rt_req`, `rt_op`, `rt_arg0`, `rt_arg1` from the CPU,
  answered by `rt_ack` and `rt_err` in the same cycle.
* **Switch requests:** `switch_req` (after `DLY`/`TERM`) and `nsf` from the
  CPU.
* **Switch control:** `run` and `swap` from the RTU.
* **Shadow set:** `sh_idx`, `sh_we`, `sh_wdata` and `sh_rdata` give the RTU
  word access to the shadow register set.

## Where this design fills gaps or departs from the original

The overall structure follows the original FASTCHART description:

* the state model and the three calls;
* the two register sets and the one-cycle switch;
* the OLD/NEW registers and the order of write-back, NEW-to-OLD and fetch;
* the 8 x 8 ready FIFOs;
* the 64 wait counters served in priority order;
* the INAC flags and the error code on a refused `ACT`;
* the TCB address `ID x TCB_SIZE + register counter`;
* the context R0-R7, SR, PC, IL;
* the 1- and 2-cycle instruction timing and the `(R4)+` addressing;
* the Not-Switch-Flag.

The description does not give the following, so they are this design's own
choices:

* **Instruction encoding, ALU/shifter operations, flags, the E bit.** All
  invented here.
* **PC-relative calls.** The original example is `CSR $1000`, an absolute
  target. A 16-bit instruction cannot hold both an opcode and a 16-bit
  address. The CPU schematic adds PC and the instruction latch, so calls and
  branches here are relative.
* **No three-cycle instructions.** The original mentions "two- or
  three-cycle instructions" but describes only two-cycle ones.
* **R0 as the stack pointer.** The original text calls the stack pointer
  "the first register R1" but stores "R0 to R7" in the TCB. This design
  names the stack pointer R0.
* **Context transfer speed.** In the original simulation model a whole
  context moves to or from TCB memory in one cycle. This design moves one
  word per cycle (11 cycles each way) in the background, using the register
  counter. The switch itself still takes one cycle. Widening the TCB port
  would shorten steps 2 and 4.
* **Priority order.** Which end is "highest" is not stated. Here 7 is
  highest.
* **Task start addresses, reset state, idle, giving NEW back, restarting a
  terminated task.** All of section "How a task switch works" beyond the
  OLD/NEW rules is this design's own.
* **Tick.** The period of the system time tick is a parameter (`TICK_DIV`).
  The tick counter runs freely, so a delay of n ticks lasts between n-1 and
  n tick periods.
* **A full ready FIFO** (more than 8 ready tasks of one priority) drops the
  push and pulses `ev.overflow`. The original does not treat this case.
* **Out-of-range IDs.** An `ACT` with an ID of 64 or more is refused.

The original also estimates about 100,000 gates for a 16-bit FASTCHART. The
RTL here has not been taken to gates.

## Files

| file | content |
|---|---|
| `rtl/fc_pkg.sv` | sizes, types, opcodes, start context |
| `rtl/fastchart.sv` | top: CPU + RTU |
| `rtl/fc_cpu.sv` | CPU: decoder, datapath, Not-Switch-Flag |
| `rtl/fc_regbank.sv` | double register set |
| `rtl/fc_alu.sv`, `rtl/fc_shifter.sv` | ALU and shifter |
| `rtl/fc_rtu.sv` | RTU: wires the blocks below |
| `rtl/fc_control_unit.sv` | OLD/NEW, switch sequencing, register counter, tick |
| `rtl/fc_ready_queue.sv`, `rtl/fc_fifo.sv` | ready queue and its FIFOs |
| `rtl/fc_wait_queue.sv` | delay counters |
| `rtl/fc_terminate_queue.sv` | INAC flags |
| `rtl/fc_tcb_memory.sv` | TCB memory |
| `tb/tb_*.sv` | one self-checking testbench per block; `tb_fastchart` and `tb_fastchart_64tasks` end to end |
| `tb/fc_main_mem.sv`, `tb/fc_asm_pkg.sv` | memory model and instruction encoders for the tests |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops (`-Wno-fatal` keeps Verilator's lint warnings on the testbenches from stopping the build). A watchdog
ends it with a failure if it hangs. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fc_pkg.sv tb/tb_fastchart.sv --top-module tb_fastchart -o sim
./obj_dir/sim
```

Swap in any other `tb_*` name to run that test.

`tb_fastchart` runs the top with every parameter at its default. Five tasks
at priorities 0, 2, 1, 5 and 4 run in about 3000 cycles, and the test
exercises:

* activation and preemption;
* a refused activation;
* a preemption held off by `SNSF`;
* replacement of NEW;
* three delays that expire;
* subroutine calls;
* `LOAD (r)+`;
* termination of every task, ending with the CPU idle.

It checks every result in memory and fails if any of these mechanisms never
happens. It prints a line per task switch.

`tb_fastchart_64tasks` runs the system at full capacity, also with default
parameters:

* task 0 activates all 63 other tasks while holding the Not-Switch-Flag, task
  `n` at priority `n mod 8`, so the ready queue holds 63 tasks and seven of
  the eight FIFOs are full at once;
* each task then runs the same program: it counts to three in its own memory
  slice, with a delay of one to four ticks after each step, and terminates
  (about 13,000 cycles in all).

It checks that no FIFO overflows, that every counter reaches 3, that all
189 delays expire, and that at every switch no ready task outranks the one
switched in.

The block tests also check the cycle counts:

* `tb_fc_cpu`: 40 cycles for 19 one-cycle and 9 two-cycle instructions plus
  a 3-cycle call stall.
* `tb_fc_rtu`: 13 cycles from an activation to the preempting switch, and
  expiry after the programmed number of ticks.
* `tb_fc_wait_queue`: the priority order of simultaneous expiries.

## How far to trust it

* **What is tested.** Every block passes its own randomized or directed
  self-checking test against an independent reference. The top runs the
  five-task scenario and the 64-task capacity run above.
* **What is not.** Nothing has been tried on an FPGA or taken to gates. Long
  random programs have not been simulated. Neither have more than eight
  ready tasks of one priority, which the design reports as an overflow.
* **How much is invented.** The real-time behaviour follows the original
  closely. The instruction encoding is entirely this design's, so any
  assembler or binary written for another FASTCHART implementation will not
  run unchanged.
