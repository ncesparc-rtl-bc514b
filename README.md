# NCESPARC+: a multithreaded SPARC V8 integer unit

In a large distributed shared-memory machine a load can take 10, 30 or more
than 100 cycles to return, depending on whether it hits the local bank, a
bank in the same cluster or a remote cluster. A conventional processor sits
idle for that time. NCESPARC+ keeps up to 16 threads resident in hardware
and runs one of them at a time. When the running thread is about to wait,
the processor switches to another ready thread within a few cycles, and the
memory access goes on in the background. A thread waits when:

- its next instruction misses in the instruction cache;
- it uses a register whose load has not returned;
- it spins in a lock loop.

This is coarse-grain multithreading. A thread runs at full single-thread
speed until it blocks, and the switch costs 2 to 4 cycles. Nothing is saved
to memory on a switch.

This repository holds synthesizable SystemVerilog (IEEE 1800-2017) for the
processor: the pipeline, register file, instruction cache, branch unit,
ALU, shifter, multiplier/divider, context state, scheduler, busy-wait
detector and Memory Interface Unit. It also holds self-checking testbenches
for every unit, an end-to-end test, and a workload test that runs a
multithreaded inner product on 1, 2, 4 and 8 contexts.

## Hardware contexts and the register file

A *context* is the state of one thread:

- PC and nPC;
- the integer condition codes, CWP, S, PS and ET;
- WIM, TBR and Y;
- a status word;
- a group of register windows.

All contexts share one 520-word register file (`ncs_regfile`). It has 32
windows of 16 registers (8 locals and 8 outs; a window's ins are the next
window's outs) plus 8 globals. The contexts split the windows evenly:
with `NCTX` contexts, each one owns `32/NCTX` consecutive windows. At reset,
context *k* has its CWP at the top window of its group. Its WIM marks the
bottom window of the same group, which is kept free for trap handlers. A
context thus has `32/NCTX - 1` windows for nested procedures. One more SAVE
raises a window_overflow trap, whose handler spills a window to memory as
on any SPARC. With 16 contexts every SAVE overflows, so a program with
deep calls is better run with fewer contexts. The globals are shared by all
contexts, which are meant to be threads of one process.

The physical register for an architectural register *r* in window *w* is:

- `r` for the globals (`r < 8`);
- `8 + 16*w + (r-8)` for the outs;
- `8 + 16*w + 8 + (r-16)` for the locals;
- `8 + 16*((w+1) mod 32) + (r-24)` for the ins.

Every register has a *scoreboard bit*. A load sets its destination's bit
in D. The MIU clears it when the data is written through the second write
port. The register file has two read ports and two write ports: W writes
through one, the MIU through the other. A write is visible to a read in the
same cycle.

## Status ASRs: the programming model of the contexts

Each context has a status word, readable and writable as ASR 1..16
(ASR *k+1* is context *k*; ASR 0 is Y, as in SPARC V8):

| bit | name | meaning |
|----:|------|---------|
| 31 | waiting | the thread is suspended. Set by hardware when it blocks, or by software. |
| 30 | mapped | a thread is loaded in this context |
| 29 | no switching | never switch away from this thread (single-thread mode, e.g. inside a critical section) |
| 28 | no i-miss switch | wait for an instruction-cache refill instead of switching |
| 27 | no dependence switch | wait for a pending load instead of switching |
| 26 | no synch switch | do not turn a busy-wait loop into a synch instruction |
| 3:0 | — | context number (read only) |

ASR 17 reads the running context's number. After reset:

- context 0 is mapped and ready, and starts at `RESET_PC`;
- every other context is unmapped.

To start context *k*, write `0x4000_0000` (mapped, ready) to ASR *k+1*.
It begins at `RESET_PC` and can find out which thread it is by reading
ASR 17.

A thread can suspend itself by writing bit 31 of its own status word. It
then resumes at the next instruction once someone clears the bit. Writing
bit 31 of another context only marks that context.

The scheduler (`ncs_scheduler`) picks the next context that is mapped and
not waiting. The search is round robin and starts after the context that
ran last. It decides in one cycle.

## The pipeline and how a switch happens

There are four stages:

- **F** fetches from the instruction cache.
- **D** decodes, reads the register file, checks the scoreboard, resolves
  branches and moves CWP for SAVE/RESTORE.
- **E** runs the ALU, shifter or multiplier/divider, computes addresses and
  hands loads and stores to the MIU.
- **W** writes the result back.

Every stage carries the context number, PC, nPC and instruction word of its
instruction. Each instruction reads its PSR fields from its own context's
state. So when F switches to a new context, the older instructions of the
old context still finish normally. The pipeline is never drained.

The cost of each kind of switch, with a ready context available:

| event | detected in | what happens | cycles lost |
|-------|-------------|--------------|------------:|
| instruction cache miss | F | The fetched word is dropped and the refill goes to the MIU. Cycle n+1 schedules with no fetch; cycle n+2 fetches for the new context. | 2 |
| dependence on a pending load | D | The D and F instructions are dropped. The thread restarts at the dependent instruction once the load returns. | 3 |
| busy-wait loop | E | The load becomes an internal synch instruction. The E, D and F instructions (the rest of the loop) are dropped. | 4 |
| software (`wrasr` bit 31 of the thread's own ASR) | E | like the busy-wait case | 4 |

If a load is in E and the instruction in D uses its destination, D first
waits one *interlock* cycle. A load that goes straight out to an idle
memory port and hits the data cache returns within that cycle, so no switch
is needed. If the scoreboard bit is still set after the interlock, the
switch follows.

If the context's disable bit for the event is set, F or D stalls until the
data arrives instead of switching. If no other context is ready, the
processor idles until the MIU wakes one.

Other pipeline details:

- **Branches.** Bicc, CALL and JMPL are resolved in D by `ncs_branch_unit`.
  It has one 32-bit adder for the target and uses the condition codes
  by-passed from E. Delayed branches and the annul bit follow SPARC V8. A
  taken branch costs no cycles.
- **By-pass.** An E→D by-pass feeds an ALU, shift, multiply or divide
  result to the very next instruction. W-stage writes reach D through the
  register file's write-through. No data hazard needs a NOP.
- **Stores.** A store (or SWAP) with register+register addressing needs
  three source registers, so it spends a second cycle in D.
- **Multiply and divide.** UMUL/SMUL finish in one cycle. UDIV/SDIV
  use a 32-step restoring divider that holds E for 33 cycles. The
  multiplier writes the high word of the product to Y. The divider divides
  Y:rs1 and leaves the remainder in Y. Division by zero returns all ones
  with V set, unless traps are enabled, in which case it traps.

## Traps

Traps follow SPARC V8 and are taken only while PSR.ET = 1. D marks the
instruction that traps:

| cause | trap type |
|-------|----------:|
| SAVE into a window whose WIM bit is set | 0x05 window_overflow |
| RESTORE into a window whose WIM bit is set | 0x06 window_underflow |
| UDIV/SDIV by zero | 0x2A division_by_zero |
| Ticc whose condition holds | 0x80 + (rs1 + operand) mod 128 |
| RETT with traps enabled | 0x02 illegal_instruction |

The marked instruction has no other effect. In E it takes two cycles:

1. It writes its PC into %l1 of window CWP−1.
2. It writes its nPC into %l2 of window CWP−1.

Then the trap is taken:

- CWP is decremented;
- PS takes the old S, S is set and ET is cleared;
- TBR.tt takes the trap type;
- the context's younger instructions are dropped;
- the context restarts at `TBR` through the scheduler, like a context
  switch (4 cycles).

A handler returns with `jmpl %l1; rett %l2` to re-execute the instruction,
or with `jmpl %l2; rett %l2+4` to skip it. RETT moves CWP up in D, jumps
like JMPL and restores S and ET in E. While ET = 0 these conditions are
ignored. SPARC V8 would enter error mode instead; this design keeps
running.

## Busy-wait loop detection

A spin lock or a barrier on SPARC is usually a four-instruction loop: a
load, LDSTUB or SWAP of the lock word; a cc-setting test of the loaded
register (for example `orcc` with `%g0`); a conditional branch back to the
load; and the branch's delay slot. Each pass costs a memory access and
does no useful work.

Each context has a small counter (`ncs_sync_detector`) that is updated in E:

- A load, LDSTUB or SWAP sets the counter to 1. If the counter is already
  4 and the instruction is at the same PC as the load that started the
  sequence, it goes to 5 instead.
- A cc-setting ALU instruction at count 1 and a Bicc at count 2 add one.
  So does any instruction at count 3 (the delay slot).
- Any other instruction clears the counter.

Reaching 5 means the loop has started its second pass. Instead of running
the load again, E sends an *internal synch instruction* to the MIU, and the
thread is suspended. The synch instruction means "repeat this access until
it returns 0". When it reads 0, the MIU writes 0 to the destination
register and wakes the thread, which resumes after the loop. A `ld`-based
test-and-test-and-set inner loop works the same way as an LDSTUB loop.

## The Memory Interface Unit

`ncs_miu` takes all memory traffic off the pipeline. It has three queues:

| fifo | default depth | holds |
|------|--------------:|-------|
| instruction fetch | 4 | line refills, tagged with the context that missed |
| load/store | 16 | loads, stores, LDSTUB, SWAP and synch instructions in program order, tagged with context and physical destination register (which encodes the window) |
| synchronization | 16 (≥ contexts) | synch instructions whose last try did not read 0 |

Every context has at most one synch instruction outstanding, so the
synchronization fifo cannot overflow if it has one entry per context. This
is what makes the scheme deadlock-free.

**Arbiter.** `cfg_if_prio = 1` always serves the instruction fetch fifo
first. `cfg_if_prio = 0` alternates between it and the load/store side. On
the load/store side:

- a store at the head goes before a synch retry;
- a synch retry is made when the load/store fifo is empty;
- otherwise one synch retry is made before each load.

**Consistency.** With `cfg_pc_mode = 0` (Sequential Consistency) every
access goes to memory in program order. With `cfg_pc_mode = 1` (Processor
Consistency) a word load that matches a pending word store takes its data
from the youngest such store at once, without a memory access. Everything
else stays in program order. LDSTUB and SWAP always go to memory after the
stores before them. The fifo entries are compared associatively, so making
the load/store fifo deeper costs comparators as well as storage.

**Fall-through.** When the load/store fifo is empty and the port is idle,
an access from E is issued in the same cycle it arrives.

**Memory port** (on `ncesparc`):

- `mem_req_valid`/`mem_req_ready` hand over one `mem_req_t`, which holds
  the kind (IFETCH, LOAD, STORE, LDSTUB, SWAP), the word address, the byte
  enables and the store data.
- Only one access is outstanding at a time.
- Every request is answered with `mem_rvalid` beats on `mem_rdata`. A
  refill returns `LINE_BYTES/4` words, with `mem_rlast` on the last.
  Other accesses return one beat: the old word for loads and atomics, and
  an acknowledge for stores.
- The atomic read-modify-write of LDSTUB/SWAP is done on the memory side.
- Memory is big-endian, as in SPARC.

Behind this port the processor expects an MMU, a data cache and memory.
The processor does not contain them.

When an access completes:

- **Load:** the MIU writes the register through the register file's second
  port (clearing its scoreboard bit). It wakes the context if the context
  is waiting for that register.
- **Refill:** the cache line is written and the context that missed is
  woken.

## Instruction cache

`ncs_icache` is direct mapped: 16 KB with 32-byte lines by default, giving
512 lines. The lookup is combinational: tag compare and word select in the
F cycle. The cache is refilled one word per MIU beat. The line's valid bit
is set with the last beat.

## Observability

`ev` (`ncs_events_t`) gives one pulse per cycle for each mechanism:

- instruction retired;
- switch for a miss, a dependence, a synch loop or software;
- idle (no ready context);
- interlock and E→D by-pass;
- stalls: full load/store fifo, divider, miss with switching off,
  dependence with switching off;
- annulled delay slot;
- trap taken;
- store-to-load forward;
- synch retry and synch done.

`ret_valid/ret_ctx/ret_pc/ret_ir` show each instruction as it leaves E.

## Parameters (`ncesparc`)

| parameter | default | meaning |
|-----------|--------:|---------|
| `NCTX` | 16 | hardware contexts (1, 2, 4, 8 or 16; 32 must be divisible by it) |
| `ICACHE_BYTES` | 16384 | instruction cache size |
| `LINE_BYTES` | 32 | cache line size |
| `IFQ_DEPTH` | 4 | instruction fetch fifo entries |
| `LSQ_DEPTH` | 16 | load/store fifo entries |
| `SYQ_DEPTH` | 16 | synchronization fifo entries (must be at least `NCTX`) |
| `RESET_PC` | 0 | start address of every context |

The MIU's mode pins (`cfg_pc_mode`, `cfg_if_prio`) are sampled every cycle.
They are meant to be held constant while the processor runs.

## What is not there

- **Other traps.** Traps are raised only for the causes listed under
  Traps. There are no alignment, privileged-instruction or
  unimplemented-instruction traps, and no interrupts.
- **Ignored instructions.** LDD/STD, alternate-space loads and stores,
  tagged arithmetic, MULScc, FLUSH, and FPU/coprocessor instructions are
  executed as no-ops.
- **Off-chip parts.** The data cache, MMU, write buffer and memory are not
  part of the processor. Testbenches use a behavioural model
  (`tb/ncs_mem_model.sv`).
- **Store coalescing.** None in the load/store fifo. Forwarding is word to
  word only.
- **Thread creation.** There is no thread-spawn instruction. Software
  starts a context by writing its status ASR, and every context starts at
  `RESET_PC`.

## Verification

Every unit has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog:

| testbench | what it checks |
|-----------|----------------|
| `tb_ncs_alu` | 10 operations × random operands against a reference, all four flags |
| `tb_ncs_shifter` | random SLL/SRL/SRA |
| `tb_ncs_branch_unit` | all 16 conditions on all flag values, annul rule, targets |
| `tb_ncs_muldiv` | signed/unsigned multiply and divide, Y results, 33-cycle divide latency |
| `tb_ncs_fifo` | random push/pop against a queue model |
| `tb_ncs_regfile` | window mapping, write-through on both write ports, scoreboard |
| `tb_ncs_icache` | hits, misses, refill, tag conflicts |
| `tb_ncs_scheduler` | round-robin choice for random ready sets |
| `tb_ncs_sync_detector` | the loop sequence, broken sequences, PC match, disable |
| `tb_ncs_ctx_file` | reset window groups, wake-ups for the right register, priorities |
| `tb_ncs_miu` | arbitration, forwarding (PC only), synch retry, latencies |
| `tb_ncesparc` | end to end at the default size, described below |
| `tb_ncs_traps` | at the default size: window overflow with the SAVE re-executed after RETT, division by zero, software trap; %l1/%l2, TBR.tt, PSR in and after the handler |
| `tb_ncs_workload` | the inner-product workload, described below |

`tb_ncesparc` runs the processor at its defaults (16 contexts). Sixteen
threads compute an inner product, take an LDSTUB lock, signal a barrier and
park themselves. The master also takes a software trap. The test runs twice:

1. Processor Consistency, fetch priority, memory latency 10;
2. Sequential Consistency, alternating arbiter, memory latency 30.

It checks every partial result and the total. It also checks that each
switch costs exactly 2, 3 or 4 cycles, and that every mechanism listed
under Observability happens at least once.

`tb_ncs_workload` runs the inner product of two 8192-element vectors.
Multiplication is done in software by a shift-and-add loop. Four
processors are built with 1, 2, 4 and 8 contexts and a 1 KB instruction
cache, each with a 64 KB 2-way data cache timing model in front of memory.
For each memory latency (10, 30 or 100 cycles), the test runs the vectors
split into contiguous and into interleaved slices. The result table:

| slices, latency | 1 ctx | 2 ctx | 4 ctx | 8 ctx |
|-----------------|------:|------:|------:|------:|
| contiguous, 10 | 519 k cycles (CPI 1.15) | 476 k | 477 k | 477 k |
| contiguous, 30 | 561 k (1.24) | 481 k | 476 k | 477 k |
| contiguous, 100 | 704 k (1.56) | 626 k | 597 k | 584 k |
| interleaved, 100 | 705 k (1.56) | 624 k | 506 k | 480 k (1.06) |

With enough contexts, the cost of a 100-cycle memory almost disappears.
With interleaved slices, the threads' misses fall on different lines, so
they overlap better. The test checks every result. At latencies of 30 and
100 it also checks that more contexts are never slower than one, and that
eight contexts are faster.

## Simulating

Everything simulates with plain Verilator 5; no C++ harness is needed.
Run it from the repository root: a testbench that loads memory uses paths
relative to it. The end-to-end test:

```
verilator --binary --timing -Wno-fatal --top-module tb_ncesparc \
  rtl/ncs_pkg.sv tb/tb_sparc_asm.sv rtl/*.sv tb/ncs_mem_model.sv tb/tb_ncesparc.sv
./obj_dir/Vtb_ncesparc
```

For the workload, add `tb/ncs_ip_system.sv tb/tb_ncs_workload.sv` and use
`--top-module tb_ncs_workload`. For the trap test, use `tb/tb_ncs_traps.sv`
in place of `tb/tb_ncesparc.sv`. A unit test needs only the package, the
unit and its testbench, for example:

```
verilator --binary --timing -Wno-fatal --top-module tb_ncs_miu \
  rtl/ncs_pkg.sv rtl/ncs_fifo.sv rtl/ncs_miu.sv tb/ncs_mem_model.sv tb/tb_ncs_miu.sv
```

Programs are built inside the testbenches with the encoder functions in
`tb/tb_sparc_asm.sv` (`ld`, `orcc`, `bicc`, `wrasr`, ...), so no assembler
or image files are needed. To try a new program, write it the same way into
`u_mem.mem[]` before releasing reset.

## Files

| file | contents |
|------|----------|
| `rtl/ncs_pkg.sv` | types (memory requests, fifo entries, context state, events), opcodes, window mapping, byte-lane helpers |
| `rtl/ncesparc.sv` | top: pipeline, control, context switching, wiring |
| `rtl/ncs_regfile.sv` | 520 × 32 register file, 2R/2W, scoreboard |
| `rtl/ncs_alu.sv`, `rtl/ncs_shifter.sv`, `rtl/ncs_muldiv.sv` | execute units |
| `rtl/ncs_branch_unit.sv` | condition test, target adder, annul |
| `rtl/ncs_icache.sv` | direct-mapped instruction cache |
| `rtl/ncs_ctx_file.sv` | per-context PC/PSR/WIM/TBR/Y/status |
| `rtl/ncs_scheduler.sv` | round-robin context selection |
| `rtl/ncs_sync_detector.sv` | busy-wait loop counters |
| `rtl/ncs_miu.sv`, `rtl/ncs_fifo.sv` | Memory Interface Unit and its queues |
| `tb/ncs_mem_model.sv` | memory, optional data cache timing, atomics |
| `tb/tb_sparc_asm.sv` | SPARC instruction encoders |
| `tb/ncs_ip_system.sv` | one processor + memory running the inner product |
| `tb/tb_*.sv` | testbenches |

Each source file opens with a description of what it does, its interface
and timing, and which choices are its own.
