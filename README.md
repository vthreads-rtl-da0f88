# VThreads: a VLIW chip multiprocessor with POSIX threads in hardware

VThreads is a small chip multiprocessor meant to be attached to a host CPU
as a compute accelerator. It uses many simple VLIW cores ("Contexts"). The
point of it is that the three thread primitives a parallel C program needs
are not library code:

- `create` starts a new thread on a free core.
- `join` waits for a thread to finish.
- `exit` ends the thread and frees its core.

Each of these is one instruction. A central hardware state machine serves
it in a few clock cycles, where a software threads library takes thousands.
A thread created this way starts running within a handful of clocks. That
makes very fine-grained threading worthwhile: a loop of eight iterations
can be split over eight cores.

This repository is synthesizable SystemVerilog for one shared-memory
*System* of that architecture. It is sized by default like the largest
configuration the architecture was evaluated in:

- 8 Contexts, each with one hardware thread slot (HyperContext)
- a 2-issue VLIW pipeline per Context, with 2 integer ALUs, 2 multipliers
  and one load/store channel
- 256 KB of shared data memory in 4 banks

## Hierarchy and vocabulary

```
vt_galaxy                   top: one System
 ├─ dbg_if                  host port + hardware thread manager
 │   ├─ thread_table        state of every HC, affinity masks, allocation search
 │   │   ├─ hc_state_fsm    one per HC
 │   │   └─ ff1_biased      round-robin "find first one"
 │   └─ instrumentation     16 x 33-bit event counters
 ├─ vt_context  (x NC)      one VLIW core with NH thread slots
 │   ├─ vt_ife              fetch: PCs, branch_pred, iram_banked, ifetch_queue
 │   ├─ vt_midpipe          decode/read: declogic, port_alloc, gprf, bypass
 │   └─ vt_cluster          execute: ialu, imult, bru, fpcore (fp_dp, fdiv), cl_lsu
 ├─ periph_wrap             peripheral register space + peripheral memory masters
 └─ dram_sys                banked data memory + crossbar
```

- **Galaxy**: the whole accelerator. Only one System is built here. Going
  between Systems is the host's job, through its own DMA.
- **System**: one shared-memory multiprocessor.
- **Context**: one VLIW processor. It runs long instruction words (LIWs) of
  up to `W` operations, which are called *syllables*.
- **HyperContext (HC)**: a hardware thread slot inside a Context. It has its
  own PC, its own 64 x 32 register file and its own state. The HCs of one
  Context share its pipeline by vertical multithreading: one HC issues per
  clock. Each HC has a thread id, `{context[11:4], hc[3:0]}`. The `CPUID`
  instruction returns the same value.

## The thread manager (dbg_if, thread_table, hc_state_fsm)

This is the heart of the design and the part that takes most care to read.

### HC states

Every HC is in one of six states:

| State | Meaning |
|---|---|
| DEBUG | After reset; owned by the host. |
| READY | Free; can be given a new thread. |
| RUNNING | Fetching and executing. |
| JOIN | Executed `join` on a thread that is still running; waits. |
| TERM_SYNC | Transient, one clock, after `exit`; then READY. |
| TERM_ASYNC | Transient, one clock, after a host terminate; then READY. |

How an HC moves between states:

- The host moves an HC from DEBUG to READY, or back, by writing its state.
- A `create`, or a host START command, moves a READY HC to RUNNING.
- `exit` goes RUNNING → TERM_SYNC → READY.
- A host terminate goes RUNNING or JOIN → TERM_ASYNC → READY.
- A `join` on a thread that is still live goes RUNNING → JOIN. The HC
  returns to RUNNING when that thread terminates.
- A `join` on a thread that has already ended returns at once, and the
  joiner stays RUNNING.

Any event that is not allowed in the current state is ignored and flagged
(`illegal`).

### Requests from the cores

A Context sends a thread primitive as a request to the thread manager. The
request carries:

- the operation: create, join or exit
- two operands: for `create`, the start PC and the argument; for `join`,
  the thread id

The request is held until a one-clock `thr_ack`. For a create, the new
thread id arrives in `thr_result` together with the ack.

The manager serves one request at a time. It picks requests round robin
over all HCs of the System, so one busy Context cannot starve another.
The manager is deliberately a single serialisation point. Thread
bookkeeping then never races, and each request takes only a few clocks.

### Finding a free HC for `create`

`create` is a two-level round-robin search. `thread_table` holds, for
every Context:

- the states of its HCs
- two masks the host can write:
  - `C_Affin`: which Contexts this Context's threads may be placed on
  - `HC_Affin`: which of a Context's HCs may be used
- two round-robin pointers, `cPtr` and `hcPtr`

The search, for a request from Context *r*:

1. `hcAvail[c]` is set when Context *c* has a READY HC allowed by its
   `HC_Affin`. AND-ing it with `C_Affin` of Context *r* gives `cRdy`.
2. A biased find-first-one (`ff1_biased`) searches `cRdy` starting at
   `cPtr[r]` and wrapping round. The chosen Context is registered.
3. In the next clock a second biased find-first-one searches that
   Context's free HCs, starting at its `hcPtr`.
4. Both pointers move to one past the winner, so successive creates spread
   over the machine.

The result is ready one clock after the request. If no HC is free, the
request stays pending and is retried. The creating thread simply stalls
until some thread exits.

### Starting a thread

When an HC is chosen, the manager drives `start_valid/start_h/start_pc/
start_sp/start_arg` to its Context for one clock. The Context then:

- loads the PC
- writes the argument into `r3`
- writes the stack pointer into `r1`

Stack pointers are fixed per HC. HC *h* of Context *c* gets
`DRAM_BYTES - (c*NH+h)*STACK_SIZE - 16`, so the stacks grow down from the
top of the data memory, 2 KB each by default.

The first LIW of the new thread reaches the decoder 3 clocks after the
start: one clock to load the PC, one for the IRAM read, and one for
alignment.

### Join and exit

For `join`, the manager looks up the target's state:

- If the target is neither RUNNING nor JOIN, the join is acknowledged at
  once.
- Otherwise the joiner goes to JOIN and its request stays unanswered.

When a thread exits, any HC waiting on it is acknowledged and returns to
RUNNING. This happens whether the thread ends by `exit` or by a host
terminate. If the host terminates the waiting HC instead, its pending
join is dropped. `THREAD_OPS` (register 0x40) counts every acknowledged
primitive.

## The Context pipeline (vt_ife, vt_midpipe, vt_cluster)

```
 IRAM even/odd ─► align ─► per-HC fetch queue ─► Thread_Select ─► decode
   ▲  (vt_ife)                                  (one HC/clock)     │
   │ redirect                                                      ▼
   └── BRU ◄── IALU x W / IMULT x W / LSU ◄── issue (round robin) ◄── register read + bypass
                (vt_cluster)                   (vt_midpipe)
```

### Fetch (vt_ife)

Each HC has its own PC and its own small fetch queue.

- Each clock, one HC that has queue space fetches one LIW. HCs take turns
  round robin.
- The IRAM is split into an even and an odd bank of `W`-syllable lines.
  A LIW that straddles two lines is still read in one clock: line *L* and
  line *L+1* always come from different banks. `iram_banked` computes the
  two bank addresses and rotates the syllables into place. The LIW ends at
  the first syllable whose stop bit is set.
- A 2-bit saturating-counter predictor guesses the next PC. It has one
  history table per HC and one shared branch-target array. A predicted-taken
  branch redirects fetch right away.
- Thread_Select picks, round robin, an HC that has a queued LIW and is not
  blocked downstream, and passes the LIW to the decoders.

### Decode and register read (vt_midpipe)

- `declogic` turns each syllable into control fields.
- `port_alloc` gives the register sources of the whole LIW to the read
  ports of the HC's register file in syllable order. There are no fixed
  per-slot ports. `r0` is always zero and needs no port.
- The register file is read in the clock the LIW arrives. In the same
  clock, `bypass` replaces a value with the one being written back, when
  both are for the same HC and the same register. The decoded LIW and its
  operands are then clocked into the HC's issue-queue entry. In the
  architecture the register-file read is registered and its data arrive
  late in the next clock. Here the read is combinational, which is
  simpler.
- Each HC has one issue-queue entry. The issue logic picks among the HCs
  whose entry is full, round robin.

### Execute (vt_cluster)

A whole LIW executes at once:

- `W` integer ALUs and `W` multipliers, with configurable latency
- the floating-point core: `W` single-precision data-paths for add,
  subtract, multiply and integer-to-float, each 4 clocks, and one shared
  iterative divider taking 30 clocks
- the branch unit
- the load/store unit, whose one channel reaches any DRAM bank through the
  crossbar
- the thread-primitive, `CPUID` and peripheral-register syllables

All results of a LIW are written back together:

- 2 clocks after dispatch for ALU-only LIWs
- 3 clocks if the LIW has a multiply
- 5 clocks with a floating-point operation, 31 with a division
- later, if it waits for memory, the thread manager or a peripheral

The branch unit resolves the branch, updates the predictor and, on a
misprediction, flushes the HC's fetch queue and re-steers its PC.

### One LIW in flight per HC

Each HC has at most one LIW between issue and write-back. This design
chose that rule. It removes every data and control hazard inside a thread
without needing a compiler that knows the exact pipeline. Throughput comes
from interleaving the HCs of a Context. A Context with a single HC issues
about one LIW every three clocks.

## Memory system (dram_sys, cl_lsu, periph_wrap)

- The data memory has `BANKS` single-port banks, interleaved by word:
  address bits `[3:2]` pick the bank with 4 banks.
- Every Context has one channel per bank. Three more channels can reach any
  bank: the peripheral wrapper, the debug DMA, and the host memory port.
- Each bank has a round-robin arbiter. A request is held until `gnt`. Read
  data comes back one clock after the grant, or two clocks with
  `XBAR_PIPE=1`.
- Two requests to the same bank in the same clock are a *bank conflict*.
  It is counted as an event.

The **peripheral wrapper** holds the 256-register peripheral space. Both
the HCs and the host can reach it. The space is divided into windows of
`256/KP` registers, one window per peripheral:

| Offset | Register |
|---|---|
| 0 | ID: `0x56540100 + k` |
| 1 | CTRL: writing bit 0 = 1 pulses `p_start[k]` |
| 2 | STATUS: `{done, busy}` |
| 3 and up | User registers, passed on to the peripheral |

The memory masters of the peripherals are merged round robin into a
4-entry queue towards the DRAM, with one read outstanding at a time. The
streaming peripherals themselves are outside the design. Their ports are
brought out of the top.

## Instruction set

The binary encoding is this design's own. It is a compact VEX-like 32-bit
syllable format:

```
[31] stop (last syllable of the LIW)  [30:25] opcode  [24:19] rd
[18:13] rs1   [12:7] rs2   or  [12:0] signed imm13   or  [18:0] imm19
```

| op | syllable | op | syllable |
|---|---|---|---|
| 0 | NOP | 16/17 | MUL (low word), MULHU (unsigned high word) |
| 1..10 | ADD SUB AND OR XOR SHL SHR SRA SLT SLTU | 20 | LDW rd, imm13(rs1) |
| 11 | ADDI rd, rs1, imm13 | 21 | STW rd → imm13(rs1) (store data in the rd field) |
| 12 | LUI rd, imm19 (rd = imm19 << 13) | 24/25 | BNEZ/BEQZ rs1, imm13 |
| 26 | GOTO imm19 | 32 | CREATE rd ← id; PC = rs1, argument = rs2 |
| 33 | JOIN rs1 (thread id) | 34 | EXIT |
| 35 | CPUID rd | 40/41 | RDPERIPH / WRPERIPH rd, imm13(rs1) |
| 48/49/50 | FADD / FSUB / FMUL rd, rs1, rs2 | 51 | ITOF rd, rs1 (signed integer to float) |
| 52 | FDIV rd, rs1, rs2 | | |

Notes on the encoding:

- Branch offsets count syllables, that is 4 bytes each, from the address of
  the branch's LIW.
- A LIW may hold several loads and stores. They go to the LSU channel in
  slot order. Only the first branch, the first thread primitive, the first
  peripheral syllable and the first FDIV of a LIW are executed. A second
  FDIV in the same LIW writes 0.
- Floating-point values are IEEE-754 single precision and live in the
  general registers. Rounding is to nearest, ties to even. Denormal inputs
  and results become zero, and every NaN result is `0x7FC00000`.
- `tb/vt_asm_pkg.sv` has small functions that build syllables.

## Host interface

The host reaches the design through two ports:

- **APB-style register port**: `psel/penable/pwrite/paddr/pwdata/prdata/
  pready`.
- **Word memory port**: `hm_*`. Hold `hm_req` until `hm_gnt`; read data
  arrives with `hm_rvalid`.

Register map (byte offsets):

| Addr | Register |
|---|---|
| 0x00 | SEL `{hc[15:8], ctx[7:0]}` — target of the registers below |
| 0x04/08/0C | PC / SP / ARG used by START |
| 0x10 | CMD: 1 READY, 2 DEBUG, 3 START, 4 EXIT (terminate) |
| 0x14 | STATE of the selected HC |
| 0x18 | AFFIN `{HC_Affin[31:16], C_Affin[15:0]}` of the selected Context |
| 0x1C/20 | DMA address / data (auto-increment) |
| 0x24/28 | IRAM address / data of the selected Context (write only, auto-increment) |
| 0x2C | INSTR_CFG `{select_only[15], event[12:8], counter[3:0]}` |
| 0x30/34 | Selected counter, low 32 bits / bit 32 |
| 0x38/3C | Peripheral register address / data |
| 0x40 | THREAD_OPS |

A typical boot sequence:

1. Write the program into the IRAM of every Context.
2. Put data into DRAM through DMA or the memory port.
3. Write READY (CMD=1) to every HC.
4. Start one HC (CMD=3) at the program's entry point.

From then on the program creates its own threads.

Writing an event number to a counter attaches the counter to that event and
clears it. With bit 15 set, the write only selects the counter for reading.
The event numbers are:

| Bits | Event |
|---|---|
| 0..7 | Context 0: LIW issued, syllables issued, mispredict, LSU busy, bypass used, LIW fetched, predicted taken, bad opcode |
| 8..15 | The same events for Context 1 |
| 16..23 | The same events OR-ed over all Contexts |
| 24 | DRAM bank conflict |
| 25 | Thread primitive acknowledged |
| 26 | HC started |
| 27 | An HC is waiting in JOIN |

## Where this RTL departs from the architecture it implements

Built as described:

- the HC state machine and the host commands
- the affinity-based two-level biased allocation search
- the even/odd IRAM with its aligner
- the per-HC fetch queues and per-HC register files
- the 2-bit predictor with per-HC history and a shared target array
- dynamic read-port allocation and the bypass
- round-robin thread selection and issue
- the configurable ALU and multiplier latencies
- the floating-point core: two 4-stage single-precision data-paths with
  integer conversion, plus an iterative divider
- the banked system memory behind a crossbar
- the peripheral register space and peripheral memory aggregation
- 16 counters of 33 bits

Own choices, where the architecture gives no detail:

- the instruction encoding and the integer operation set
- the host register map
- the stack placement and the argument/stack registers
- one LIW in flight per HC
- the queue depths
- the predictor size: 64 entries
- the IRAM size: 16 KB
- the multiplier latency: 2
- floating-point rounding and special-value handling, and the divider
  algorithm
- the peripheral register layout

Differences worth knowing:

- **Join** completes when the joined thread terminates. One description of
  the architecture says instead that a joining thread waits "until the
  parent joins". The state diagram was followed.
- In the allocation search, the second find-first-one is biased with the
  chosen Context's `hcPtr`, not with `cPtr`.
- The peripheral register space is one per System, shared by all Contexts.
  It is not one per Context.
- **Not built**:
  - predicate registers
  - the link register and calls
  - the 512 control registers (RDCTRL/WRCTRL)
  - custom MIMO instruction extensions (64-bit syllables)
  - more than one cluster per Context
  - the optional thread-pick pipeline stage
  - the hierarchical crossbar
  - dual-port memories and the doubled memory clock
  - SIMD/vector registers
  - multi-System Galaxies
- The instruction memory is word-addressed per syllable. Instruction
  addresses are kept in bytes, but must be multiples of 4.
- Memories are plain arrays. A technology flow would map them to SRAM
  macros.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
ends with a line `TB_RESULT checks=N failures=M`. They compare against
independent models:

- randomised checks against reference arithmetic. The floating-point
  reference is computed through double precision and rounded
  independently of the RTL.
- scoreboards of memory traffic
- cycle counts where a latency is defined: ALU/MUL write-back,
  start-to-fetch, allocation result, memory read

`tb_vt_context` runs a two-HC program on one Context, with the testbench
acting as the thread manager and the memory.

`tb_vt_galaxy` runs the full design at its default size:

- A main thread creates 8 workers on a machine that has only 7 free HCs,
  so one create must stall.
- The workers run counted loops and store their results.
- Main joins them all, uses the multiplier and the peripheral registers,
  and exits.
- The host checks every result, terminates a spinning thread, and forces
  bank conflicts.
- It counts each mechanism: allocation stalls, join waits and immediate
  joins, mispredicts, bypasses, predicted-taken branches, loads and stores,
  multiplies, floating-point operations and divisions, peripheral writes
  and starts, peripheral memory reads, both
  kinds of termination, and bank conflicts. Any mechanism that never
  happened is a failure.
- It finishes in under 1000 cycles of the main thread.

`tb_vt_microbench` measures the thread-primitive latencies on the same
full design, in clocks at the Context/thread-manager boundary:

- create, from the create request to the new thread's first issued word: 5
- join, from the worker's exit request to the main thread's join
  acknowledge: 1
- create and join of an empty function: 7

It also checks that a single-syllable branch whose unused slot holds an
EXIT encoding still re-steers. A bug in this case was found by this
testbench and fixed in `vt_cluster`.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/vt_pkg.sv rtl/fp_pkg.sv tb/vt_asm_pkg.sv tb/tb_vt_galaxy.sv \
    --top-module tb_vt_galaxy
./obj_dir/Vtb_vt_galaxy
```

Every file in `rtl/` and `tb/` starts with a comment describing its
interface and timing.
