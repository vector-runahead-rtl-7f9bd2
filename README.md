# Vector Runahead

Pointer-chasing loops like `C[f(B[g(A[i])])]` stall an out-of-order core.
The load at the head of the reorder buffer misses in the cache, and the
window fills. The next misses cannot be found because each address depends
on the load before it. Classic runahead keeps executing past the stall, but
it reaches only as far as the window lets it fetch. Inside that stretch it
finds at most one chain of dependent misses per loop iteration.

Vector Runahead takes a different approach. As soon as runahead meets a load
whose addresses form a known stride (`A[i]`), it stops walking the loop one
iteration at a time. That striding load becomes a vector load covering the
next 8 iterations, and every instruction that depends on it is turned into
a vector operation too. The dependent loads become gathers, and the
address arithmetic becomes lane-wise ALU operations. The vector stream is
replicated P times (*pipelined copies*), so P×8 iterations go to memory
together, one level of the chain after another. The mode ends only when the
whole chain has been issued (possibly over several *rounds*), not when the
blocking miss returns. The core then restores its checkpoint and
re-executes normally, and now finds its data in the cache.

This repository holds the additions to an out-of-order core that implement
this idea, written in synthesizable SystemVerilog. The core itself, its
caches and DRAM are not included. They appear as ports, and the testbenches
model them behaviourally.

## Main numbers

| Item | Value | Where |
|---|---|---|
| Lanes per vector (64-bit) | 8 (512 bits) | `vr_pkg::LANES` |
| Pipelined copies P | 8 | `vector_runahead.P` |
| Unroll U (iterations covered = U×8) | 8, so 64 iterations | `vector_runahead.U` |
| Physical vector registers | 96 | `VREGS` |
| Register deallocation queue (RDQ) | 192 entries | `RDQ_ENTRIES` |
| Stride detector | 32 entries, tagless, indexed by PC[4:0] | `RPT_ENTRIES` |
| Round timeout | 200 instructions | `TIMEOUT` |
| Runahead entry when the issue queue is | ≥ 80% of 97 entries | `IQ_SIZE` |
| Architectural integer registers tracked | 16 | `vr_pkg::NUM_AREGS` |

These numbers describe a Skylake-class core with a 224-entry ROB, a 4-wide
front end, a 32 KB L1-D and 24 L1 MSHRs. The added storage is small: about
456 B of stride detector, 4 B of taint vector, 112 B of VRAT (16 × 8 × 7
bits) and 768 B of RDQ.

## Blocks

```
                 ld_* (training)          dec_* (decoded runahead stream)
                      |                              |
               +--------------+  lookup   +-----------------------------+
               |stride_detector|<-------->|          vectorizer          |
               +--------------+  term wr  |  taint_vector   vrat (16xP)  |
                      ^                   +-----------------------------+
  core status         | events              |  alloc    |  alloc  | vector micro-ops
  ---------->  +--------------+             v           v         v
  restore <--- | runahead_ctrl|        vreg_freelist <- rdq    vec_backend --> mem_req
               +--------------+          (96 regs)   (192)   (queue, VRF,  <-- mem_rsp
                      ^                                  ^     ALU, loads)
                      +---- all_invalid, idle -----------+--------+
```

| File | Role |
|---|---|
| `rtl/vr_pkg.sv` | Shared widths, micro-op formats (`sop_t`, `vuop_t`), modes and termination causes |
| `rtl/stride_detector.sv` | Reference prediction table: last address, stride, 2-bit confidence and terminator PC for each load PC |
| `rtl/runahead_ctrl.sv` | Mode state machine, checkpoint and restore, rounds, termination |
| `rtl/vectorizer.sv` | Classifies each runahead instruction, renames it through the VRAT and emits P micro-ops |
| `rtl/taint_vector.sv` | Two flags for each architectural register: *vectorized* and *invalid* |
| `rtl/vrat.sv` | Vector register alias table: 16 registers × P copies |
| `rtl/vreg_freelist.sv` | Free physical vector registers, with checkpoint and restore |
| `rtl/rdq.sv` | Register deallocation queue |
| `rtl/vec_backend.sv` | Vector micro-op queue, register file, ALU, strided and gather loads, branch masks |
| `rtl/vec_alu.sv` | 8-lane integer ALU |
| `rtl/vector_runahead.sv` | Top level |

## Modes

`runahead_ctrl` has four modes (`mode_e`):

- **NORMAL.** Runahead starts when a missing load blocks the ROB head and
  either the ROB is full or the issue queue holds at least 80% of its 97
  entries (78 entries). The controller saves the PC to resume from and the
  16-entry front-end RAT. It also tells the free list to save its state.
- **RUNAHEAD.** This is ordinary scalar runahead. The core executes the
  decoded stream itself, with `sc_valid` for each instruction. The
  vectorizer keeps the taint vector up to date, and the stride detector is
  looked up with every decoded PC. If the blocking load returns first, the
  mode ends as classic runahead would. If a load with confidence 3 is
  decoded first, vector mode starts.
- **VECTOR.** This is vector-runahead mode, organised in rounds (see
  below). The return of the blocking load is ignored here. The goal is to
  issue the whole chain.
- **EXIT.** This lasts one cycle. It restores the RAT, redirects fetch
  (`restore_valid`, `restore_pc`, `restore_rat`), clears the taint vector,
  VRAT and RDQ, restores the free list, and flushes the vector backend.

## Vectorizing the instruction stream

For each decoded instruction, `vectorizer` reads the taint flags of its
sources and places it in one of these classes:

| Class | Action | Destination flags |
|---|---|---|
| The striding load that opens a round | P strided vector loads | vectorized |
| Has a vectorized source (vector mode) | P copies: ALU op, gather or branch predicate | vectorized |
| Floating point, already vector, or an invalid source | dropped | invalid |
| Store | dropped | unchanged |
| Anything else | scalar: the core executes it | cleared (loop-invariant) |

A loop-invariant source of a vectorized instruction is read from the core's
register file in the same cycle (`sreg_val1`, `sreg_val2`) and broadcast to
all lanes. This is how base addresses such as `&B[0]` and hash constants
reach the vector operations. A vectorized load that writes no integer
register (for example one that loads a floating-point value) is still
issued as a gather, so that its lines are prefetched, but it writes no
register.

The *terminator* is the PC of the last dependent load in the chain. It
lives in the detector entry of the striding load. If that field was empty
when vector mode started, every vectorized dependent load writes its own PC
there, so the last one remains. The next vector interval then knows where
the chain ends.

## Pipelined copies and register renaming

Each vectorized instruction is emitted as P micro-ops, one per cycle. Copy
`c` takes its sources from column `c` of the VRAT and gets a fresh physical
vector register from `vreg_freelist`. The P copies of an instruction are
independent, so the backend overlaps them. The 8 lanes of copy 0, the 8
lanes of copy 1, and so on are all waiting on memory at the same time.

The lanes cover distinct loop iterations. If `A0` is the detector's last
address for the striding load and `s` its stride, then lane `l` of copy
`c` in round `r` handles iteration

```
k = (r*P + c)*8 + l + 1,    address = A0 + k*s
```

The registers come from a pool of only 96. With P = 8, each vectorized
architectural register holds 8 of them at a time. `vectorizer` therefore
stalls when the free list is empty. It reports `ev_stuck` when no register
can ever be freed (the free list is empty and the RDQ holds no entry that
could return one). The
controller ends vector mode on that signal instead of deadlocking.

## Releasing registers: the RDQ

Vector mode has no reorder buffer. Nothing retires, so the normal rule
("free the old mapping when the new writer commits") does not apply.
Instead, every copy of every vectorized instruction takes one entry in the
`rdq`, allocated in program order. The entry holds the register that the
copy's destination replaced in the VRAT (if any), plus an *executed* bit.
When the backend finishes a micro-op, it marks the entry by index
(`exec_valid`, `exec_rdq_idx`). The head of the queue frees its register
once it has executed, at most one entry per cycle.

Freeing in order matters. Once the head has executed, every older reader of
the replaced register has also executed: older micro-ops sit nearer the
head, and the backend issues in order. So the register can be reused
safely. A full RDQ, like an empty free list, stalls the vectorizer.

## Rounds: covering U×8 iterations with P copies

U sets how many iterations a vector interval covers (U×8). P sets how many
run in parallel. With U > P there are U/P rounds:

1. A round starts when the striding load is decoded: P strided loads for
   the next P×8 iterations.
2. A round ends on the first of four events:
   - the same striding load is decoded again (the loop came around);
   - every copy of the terminator load has been emitted;
   - every lane of every copy is invalid;
   - `TIMEOUT` instructions were handled in the round.
3. If rounds remain, the next decode of the striding load opens the next
   round. Its iterations continue where the last round stopped.
4. After the last round, the controller waits until the backend has sent
   every queued lane request. Then it exits.

With the default U = P = 8 there is one round of 64 iterations. P = 1
trades parallelism for fewer registers: 8 lanes in flight, 8 rounds.
With P = 1 a round is short, so it usually ends at the next striding load
before the responses of its invalid lanes are back. The all-invalid exit
therefore matters mostly with deeper pipelining.

## Lane masks

Each pipelined copy has an 8-bit lane mask in `vec_backend`. A masked lane
sends no memory request and takes no part in branches. Lanes are masked in
two ways:

- **Invalid accesses.** A lane whose load response carries `err` (for
  example a fault or an address that cannot be translated) is turned off
  for the rest of the round.
- **Branches.** A vectorized branch evaluates its condition in every active
  lane. The first active lane decides the direction, which the core follows
  (`vbr_valid`, `vbr_taken`). Lanes that disagree are masked, because
  their iterations would have taken the other path.

Masks last for one round, and several rounds can be in flight in the queue
at once. So the reset is tied to program order, not to a timer. Every
micro-op carries its round number (`rnd`). The strided loads are the first
micro-ops of a round. When copy `c`'s strided load issues, mask `c` is set
to all ones and takes that round number. Micro-ops of an older round that
are still queued behind it keep the mask they had when they issued. A late
error response from an older round is ignored.

`all_invalid` (every mask empty, and no strided load waiting to start a new
round) ends the round early.

## Vector backend

`vec_backend` is an in-order queue of 16 micro-ops. The head issues when
its source registers are ready. Each of the 96 registers has a ready bit,
cleared when a micro-op that writes it is accepted.

- **ALU operations** take one cycle in `vec_alu`, which supports add,
  subtract, logic operations, shifts, multiply and move.
- **Loads** take one of 8 load slots, and the head moves on without
  waiting. So a dependent micro-op waits only for its own copy's load.
  - The lanes of a load go out one per cycle on `mem_req`, using a
    valid/ready handshake.
  - Responses may return in any order. They are matched by a tag made of a
    generation, the slot and the lane.
  - A slot writes its register when all of its lanes have returned.
  - A strided load reads `base + lane*stride`. A gather reads
    `a + (b << scale) + imm` for each lane.
- **The register file** has 96 × 512 bits and is written as a memory. A
  load's write-back takes the write port for that cycle.
- **Flush** (on exit) empties the queue and the slots. It also bumps the
  generation, so that responses still outstanding are dropped. Runahead
  may end before they arrive: their job was to bring lines into the cache.

## Core interface (top `vector_runahead`)

All signals are synchronous to `clk`. `rst_n` is an asynchronous
active-low reset.

| Signals | Meaning |
|---|---|
| `head_load_miss`, `rob_full`, `iq_count`, `blocking_load_done` | Entry and exit conditions |
| `ckpt_pc`, `rat_in[16]` | State saved on entry |
| `ld_valid`, `ld_pc`, `ld_addr` | Every executed load, used to train the stride detector |
| `dec_valid`, `dec_uop` (`sop_t`), `dec_ready` | Decoded instructions during runahead, one per cycle |
| `sreg_val1`, `sreg_val2` | Core register values of `dec_uop.rs1` and `rs2`, in the same cycle |
| `sc_valid` | The accepted instruction is a scalar runahead operation for the core to execute |
| `vbr_valid`, `vbr_taken` | Direction of a vectorized branch |
| `mem_req*`, `mem_rsp*` | One 64-bit lane load per request to the L1-D; the MSHR limit is applied with `mem_req_ready` |
| `restore_valid`, `restore_pc`, `restore_rat` | End of runahead: restore and refetch |
| `mode`, `round_start`, `last_term` | Status: current mode, round start, why the last round ended |

`sop_t` is a compact decoded-instruction format:

- opcode class: ALU, load, store, branch, FP, vector or nop;
- ALU function and branch condition;
- `rd`, `rs1` and `rs2`, with use flags;
- immediate, and a scale for indexed loads.

A real core would map its own micro-ops onto it.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/vr_pkg.sv rtl/stride_detector.sv rtl/taint_vector.sv rtl/vrat.sv \
    rtl/vreg_freelist.sv rtl/rdq.sv rtl/vec_alu.sv rtl/vec_backend.sv \
    rtl/runahead_ctrl.sv rtl/vectorizer.sv rtl/vector_runahead.sv \
    tb/tb_vector_runahead.sv --top-module tb_vector_runahead -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace the last testbench and top name to run another one. A unit
testbench needs only the package and its own block, except
`tb_vectorizer`, which also needs `taint_vector` and `vrat`. `+verilator+rand+reset+2` starts every register at a random value,
which checks that reset covers everything that is read.

| Testbench | What it does |
|---|---|
| `tb_stride_detector`, `tb_taint_vector`, `tb_vrat`, `tb_vreg_freelist`, `tb_rdq`, `tb_vec_alu` | Random stimulus against a reference model, plus directed corner cases |
| `tb_vectorizer` | Classification, copy and round numbering, lane addresses, terminator learning, RDQ and free-list use |
| `tb_vec_backend` | ALU and load timing, out-of-order responses, masking by invalid lanes and by branches, the round change, flush |
| `tb_runahead_ctrl` | Both entry conditions, every termination cause, rounds, restore |
| `tb_vector_runahead` | End to end at the default parameters (U = P = 8) |
| `tb_vector_runahead_rounds` | The same program at U = 8, P = 4, giving two rounds |
| `tb_vector_runahead_p1` | The same program at U = 8, P = 1: eight rounds, and at most 16 requests in flight, never filling the MSHRs |
| `tb_vector_runahead_chains` | Four loop kernels at the default parameters: 2-, 3-, 4- and 5-level chains, masked or hashed; each run with the terminator unknown and then known |

The end-to-end testbenches place a small core model and a memory with 24
MSHRs around the top. They run six runahead episodes:

- a hashed three-level chain A → B → C;
- the same chain entered through the issue-queue condition, once the
  terminator is known;
- plain scalar runahead;
- a chain whose striding lanes are all invalid;
- a chain long enough to hit the timeout;
- a chain with a data-dependent branch.

For the A → B → C episodes, the testbench checks the complete set of
addresses issued against a closed-form model. It also checks the restored
PC, and counts each mechanism (entry, vector start, rounds, every
termination cause, masking, stalls, register release, memory back-pressure).
A mechanism that never happened is a failure.

## Departures and choices

Where this design departs from the description it is based on:

- **The vector queue is separate.** The original reuses the core's issue
  queue, vector register file and vector units. Here the vector micro-ops
  have their own 16-entry in-order queue, register file and 8 load slots,
  so that the block stands alone. The register count (96) and the width
  (512 bits) are unchanged.
- **The core is outside this design.** Fetch, decode, rename, ROB and the
  caches stay in the core. The micro-op format `sop_t` is this design's
  own.
- **Emit rate.** One micro-op copy is emitted per cycle, and one decoded
  instruction is accepted at a time. The core's front end is 4 wide.
- **Timeout counting.** The timeout counts decoded instructions in each
  round.
- **Deadlock guard.** `ev_stuck` ends vector mode when all 96 registers
  are held and none can be freed. The original has no such rule.
- **Stride detector update rule.** On a matching stride, confidence goes
  up by one; otherwise it goes down by one. The stride is replaced when
  confidence is below 2. A stride that does not fit in 16 bits never
  matches. The table has no tags, so loads that alias share an entry.
- **Branch decision.** A branch follows the first lane that is still
  active, not lane 0 as such. If lane 0 had been masked, it would
  otherwise decide for an iteration that is no longer followed.
- **Round semantics.**
  - When a round ends for a reason other than meeting the striding load
    again, the next round starts at the next decode of the striding load.
  - Addresses continue from the previous round.
  - The mode exits only after the backend has sent all queued lanes.
- **Scalar runahead registers.** The RDQ here releases vector registers
  only. Releasing the scalar registers of runahead instructions early is
  left to the core.
- **Resets.** Register-file contents have no reset; everything else does.
