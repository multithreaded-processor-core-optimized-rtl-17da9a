# PAR core: a SIMT multi-lane, multithreaded processor core

The PAR core runs one program many times over: a *PAR packet* names a thread
program and a number of threads, and the threads differ only in their thread index
`i0`. No thread talks to another, so the hardware never has to synchronise them.
The design builds on this in two ways:

* **One front end for everything.** A single fetch unit reads each instruction
  once and broadcasts it to all lanes (4 by default). There is no branch
  prediction, no prefetching and no wide issue. Control instructions (`xp`, `loop`,
  `brk`) never reach the lanes: the fetch unit runs them itself on a *mask* that
  has one bit per hardware thread.
* **Latency hidden by threads, not by speculation.** Each lane holds T threads (4
  by default) and executes every instruction once per thread, one thread per
  cycle. A 4-stage FPU therefore stays full with four independent threads, and
  each thread's result can be forwarded as soon as it exists. Issue and commit are
  in order.

With 4 lanes × 4 threads, 16 threads advance together through the instruction
stream. A packet with more threads runs as consecutive *groups* of 16.

All sources are SystemVerilog in `rtl/` (design) and `tb/` (self-checking
testbenches). The top module is `par_core`.

## Block map

```
              start/nthreads/i0/inherited regs           ic_we (program load)
                          |                                   |
                    +-----v------------------------+    +-----v-----+
                    | par_fetch                    |<---| par_icache|  1024 x 32 bit
                    |  PC, masks, 2 control stacks |--->|           |
                    +--+---------------------------+    +-----------+
      instruction + mask | ^ predicates, loop counter, ready/empty
        +----------------+-+----------+---------------+
        v                v            v               v
    par_lane 0       par_lane 1   par_lane 2      par_lane 3     (T threads each)
        | L/S port       |            |               |
    +---v----------------v------------v---------------v---+
    | par_dmem_xbar (round robin per bank; host port first) |<-- h_* host port
    +---+-------------+--------------+--------------+------+
     par_dmem_bank  par_dmem_bank  par_dmem_bank  par_dmem_bank  (4096 x 64 bit)
```

Inside a lane (`par_lane`):

```
 instr -> par_decode -> dispatch --+--> par_fu(ALU) -- par_alu  --+
                         |         +--> par_fu(FPU) -- par_fpu  --+--> output buffers
 par_regfile <-----------+         +--> par_fu(L/S) -- par_lsu  --+    = forwarding
 par_predfile <----------+         +--> par_fu(CMP) -- par_cmp  --+       network
 par_rob <---------------+                                         |
    ^ head retires: writes registers/predicates, frees the slot <--+
```

## Thread groups, masks and the control stack

This is the least obvious part of the design. All of it is in `par_fetch`.

**Program shape.** A thread program is a sequence of *instruction blocks*. Bit 0
of every instruction is the *stop bit*, which marks the last instruction of a
block. At a block end, the fetch unit does not simply step to PC+1. It asks the
top of the *command stack* what to do next.

**Masks.** The fetch unit holds a mask of LANES×T bits, one per hardware thread.
Each lane receives its T bits along with every broadcast instruction. A thread
whose bit is clear executes the instruction as a no-op: its destination keeps
its old value. Every instruction also has a qualifying predicate `qp`. A thread
writes its result only where `qp AND mask` is true.

**Two stacks.** Both are `par_ctrl_stack` instances, 16 entries deep.

* The *command stack* holds entries `{kind, address, qp, saved mask}`. The
  kinds are PAR, LOOPC (counted loop), LOOPP (pure conditional loop), RETURN
  and JOIN.
* The *counter stack* holds the remaining thread count of the packet and the
  counters of the open counted loops.

Overflow and underflow are sticky status outputs.

**What each event does.**

| event | action |
|---|---|
| packet start | push PAR(start) and the count `nthreads − 16`. The mask enables `min(nthreads,16)` threads. |
| `xp L` | new mask = mask AND qp. If no thread is left, the xp is skipped. Otherwise push RETURN(next PC, old mask) when the xp is mid-block, or JOIN(old mask) when it ends its block, then jump to L. |
| `loop r, L` / `loop L` | Like xp, but also push LOOPC (with counter r−1 on the counter stack) or LOOPP. The loop body is the block at L. |
| block end, top RETURN | pop, restore the mask, continue at the saved address. |
| block end, top JOIN | pop, restore the mask, then let the next command decide. |
| block end, top LOOPC/LOOPP | mask = mask AND qp. If a thread is left and the counter is non-zero (LOOPC), decrement the counter and rerun L. Otherwise pop, restore the mask from before the loop and let the next command decide. |
| `brk` | Threads whose qp is true leave the innermost loop. If that is every active thread, pop through that loop and take its exit. |
| block end, top PAR | wait until every lane is empty. If threads remain, start the next group at the packet start, with the `i0` base advanced by 16. Otherwise pop and pulse `done`. |

**Waiting on predicates.** A control decision needs predicate values that the
lanes may still be computing. The fetch unit reads every lane's predicate file
and waits until the named predicate is final in all lanes. For a counted loop it
also waits for the counter register. Because the instruction cache has a
one-cycle synchronous read, straight code and taken jumps both sustain one
instruction per cycle. Only a wait on a predicate costs cycles.

**Loop counts are shared.** All threads of a packet use the same count. The
count is read from the named register of lane 0, thread 0, and is normally an
inherited register. A thread can still leave early through its predicate or
`brk`.

## Lane pipeline: tags, slots and per-thread forwarding

A lane has four functional units: ALU, FPU (integer and FP multiply, divide,
multiply-accumulate), load/store, and compare. Each unit sits in a `par_fu`
shell that holds its instruction queue (QSIZE = 2 slots) and its issue logic.

* **Tag = (unit, slot).** Dispatch takes a queue slot and a ROB entry. If either
  is full, the lane drops `ready` and the whole front end stalls. The slot stays
  taken until the instruction *retires*. So a slot number names the in-flight
  instruction, and slot k's output buffer holds its results for all T threads.
  Two slots per unit give the two output buffers of the evaluated configuration.
* **Renaming at dispatch.** Each source register that is still being produced
  is recorded with its producer's tag. The destination register (and any
  predicate destinations) get the new tag and become invalid.
* **Issue** is in order within each unit. The oldest slot issues when the unit
  is idle and the instruction's qualifying predicate is final, so the per-thread
  write enables are known. Threads then enter the datapath 0, 1, …, T−1, one per
  cycle. Each thread enters as soon as its own operands exist. Thread 0 of a
  consumer can start while the producer is still working on thread 3.
* **Merge instead of masking.** Every GPR writer also reads the old value of its
  destination. A thread whose enable is false returns that old value, so a
  forwarded value always equals what the register will hold after commit.
* **Commit.** The ROB head retires once its unit's output buffer is complete and
  its predicate is final. It writes all T threads in one cycle under
  `qp AND mask`, frees the slot, and broadcasts the tag. Waiting operands then
  switch to reading the register file.

Latencies are 1 cycle for the ALU, compare unit and memory, and 4 for the FPU.

## Registers and instruction encoding

* **Registers.** r0–r15 are general registers, each with one 64-bit word per
  thread. r16–r31 are the 16 inherited registers, which are read-only and loaded
  from the packet at start. r16 is `i0`, the thread index, computed as the group
  base + lane·T + thread.
* **Predicates.** There are 8 predicate registers p0–p7 with one bit per thread.
  p0 always reads as true. A compare writes the condition to `pt` and its
  complement to `pf`; if `pt == pf`, the `pt` value wins.
* **Instruction word.** `qp[31:29] xp[28] op[27:22] rd[21:17] ra[16:12]
  f[11:10] x[9:6] rb[5:1] stop[0]`. The I-type immediate is imm9 `[9:1]`;
  `set`/`sli` use imm16 `[16:1]`. Compare instructions use a 5-bit opcode in
  `[27:23]` with pt `[22:20]` and pf `[19:17]`.
* **Opcodes chosen by this design** (the rest follow the instruction-set
  definition; see `par_pkg`):

  | instruction | encoding |
  |---|---|
  | `ld` | 36, size in x[1:0] (0 = 8 bytes, 1 = 4, 2 = 2, 3 = 1) |
  | `st` | 37, same size field |
  | `loop r, L` | 50 |
  | `loop L` | 51 |
  | `brk` | 52 |
  | FP add/sub/mul/mac | 35 with x = 8, operation in f |
  | FP abs | 35 with x = 9 |
  | FP compares | compare group x = 6 |
  | predicate logic | compare group x = 15 |

  Jump and loop targets are absolute.
* **Memory addressing.** Addresses count 64-bit words. The load/store unit adds
  ra + rb. A load made by several threads of one instruction to the same address
  goes to memory once, and later threads reuse the data.

## Memory system

The local data memory is 4 banks of 4096 × 64-bit words, word-interleaved by the
low address bits. `par_dmem_xbar` grants each bank to one requester per cycle.
The host port is served first; after it, lanes are served in round-robin order.
A lane that loses arbitration keeps its request up and its L/S unit waits. Read
data arrives one cycle after the grant. The memory never misses. There is no
cache, no global memory and no path to a lower memory level. The host port
loads inputs and reads results while the core is idle.

## Where this design departs from the original description

* **Not built:**
  * indirect `xp` (through a register) and `ext`;
  * FP divide `div.d` (two of the benchmark kernels need it);
  * packed/parallel compare variants;
  * the p7 side effect of add and min/max;
  * the global load/store instructions, which the original description leaves without an encoding or a memory behind them.
* **Floating point** rounds toward zero and flushes subnormals. Integer divide is
  combinational in front of the FPU pipeline.
* **Between thread groups** the lanes are fully drained. No instruction of the
  next group overlaps the previous one.
* **xp that ends a block** pushes a JOIN entry, so the caller's mask comes back
  when the target block ends. This case is not spelled out in the original
  description.
* **Partial `brk` limitation.** Threads removed by a partial `brk` stay off until
  the loop ends. But if the loop body returns from an `xp`, the mask saved by
  that `xp` is restored, and it still includes those threads.
* **The evaluated configuration sweeps** 1–8 threads per lane and 1–64 lanes.
  Only the 4 × 4 default is verified here.
* **The benchmark data sets do not fit.** The evaluated workloads use
  10⁵–3·10⁶ words of data, but the local memory holds 16 K words. The
  scaled-vector-addition packet of 1280 threads fits and is simulated.
* **Added ports:** the host data port, the program-load port and the
  event/status outputs.
* **The master core** that builds packets is not part of the design. Its side
  appears as the `start`/`nthreads`/`i0_init`/`inh_data` ports.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops, with a
watchdog. With Verilator 5:

```
verilator --binary --assert -Wno-fatal -Irtl rtl/par_pkg.sv tb/tb_par_core.sv \
          --top-module tb_par_core -Mdir obj_core -o sim
./obj_core/sim
```

Other modules are found through `-Irtl`; substitute any `tb/tb_par_*.sv`.

`tb_par_core` uses the default parameters. It loads a thread program, then runs
40 threads (three groups, the last one partial) in about 440 cycles. The program
uses:

* an `xp` in the middle of a block;
* a counted loop;
* a pure conditional loop whose threads leave one by one through `brk`;
* a load of one address by all threads;
* an integer multiply on the FPU pipeline;
* memory bank conflicts.

It checks every result word against a model. It also counts failures for any
mechanism that never occurred: stalls, control waits, expands, loop iterations
and exits, breaks, returns, groups, forwarding, replicated loads, bank waits and
predicate waits.

`tb_par_sva` runs the scaled vector addition `V3[i] = a·V1[i] + b·V2[i]`. It is
one packet of 1280 threads, which run as 80 groups, on the default core. It
checks all 1280 results and takes about 1900 cycles.

The unit testbenches (`tb_par_alu`, `tb_par_fpu`, `tb_par_cmp`, `tb_par_lsu`,
`tb_par_fu`, `tb_par_rob`, `tb_par_regfile`, `tb_par_predfile`,
`tb_par_decode`, `tb_par_ctrl_stack`, `tb_par_icache`, `tb_par_dmem_bank`,
`tb_par_dmem_xbar`, `tb_par_lane`, `tb_par_fetch`) drive random or hand-built
stimulus against independent reference models. `tb_par_fpu` also checks the
4-cycle latency.

## Changing the design

* The sizes are parameters of `par_core`:
  * `LANES`, `T`
  * `QSIZE`, `NROB`
  * `NGPR`, `NINH`
  * `FP_LAT`
  * `IC_DEPTH`
  * `NBANK`, `BANK_WORDS`
  * `SDEPTH`
* `T` should be a power of two.
* `NROB` should be at least 4 × `QSIZE`: the ROB has to hold every queued
  instruction.
* Slot numbers are 3 bits wide (`SLOT_W` in `par_pkg`), which limits `QSIZE`
  to 8.
* Shared types, opcodes and the micro-operation list live in `rtl/par_pkg.sv`.
  Adding an instruction means touching three places:
  * the decoder, to map it to a unit and micro-operation;
  * the unit datapath;
  * the unit's testbench model.
