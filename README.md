# LEN5-style out-of-order RV64 core with a configurable-latency coprocessor

## The idea

Small systems-on-chip often pair a simple in-order CPU with an accelerator
that runs custom instructions. While the accelerator works on a long
operation, an in-order CPU mostly waits. This design instead uses an
out-of-order core. It keeps issuing, executing and retiring independent
instructions (loop counters, address updates, other arithmetic) while the
accelerator is busy. The accelerator's latency is hidden as long as there
is enough independent work and enough room inside the core to hold it.

The accelerator here is a stand-in, the Configurable-Latency Coprocessor
(CLC). Each CLC instruction says how many cycles it should take and whether
the unit behaves as an iterative block (one operation at a time) or as a
pipeline (a new operation every cycle). Sweeping latency, mode and the
amount of surrounding work shows how well the core covers the latency, and
where it stops coping.

The limit comes from the ReOrder Buffer (ROB, the in-order list of all
instructions in flight). Its entries are handed out strictly in sequence. So
once the long CLC instruction sits at the oldest position, at most
`ROB_DEPTH - 1` younger instructions can enter behind it. For a loop of one
CLC instruction of latency L followed by N single-cycle instructions, with
ROB size R, the steady-state instructions per cycle (IPC) are

    IPC = (1 + N) / (L + N - R + 1)

With N = L this tends to 0.5 as L grows. The testbench checks this formula.

## Block overview

All sources are in `rtl/`, one module or package per file.

| File | Role |
|---|---|
| `len5_pkg.sv` | Sizes, opcodes, shared structures |
| `fetch_unit.sv` | PC, instruction-memory requests, 4-entry instruction queue, redirects |
| `branch_predictor.sv` | gshare direction counters, branch target buffer (BTB), return-address stack |
| `issue_stage.sv` (+ `decoder.sv`) | Decode, allocate ROB entry, read operands, rename, dispatch |
| `reg_status.sv` | For each architectural register: which ROB entry will produce it |
| `regfile.sv` | 32 x 64-bit registers, two write ports (one per commit slot) |
| `reservation_station.sv` | Waiting room for each execution unit, operand snooping, result holding |
| `alu.sv`, `muldiv.sv`, `branch_unit.sv` | Execution units |
| `clc.sv` | The configurable-latency coprocessor |
| `lsu.sv` | Load buffer (8), store buffer (16), hazard checks, store-to-load forwarding |
| `mem_bridge.sv` | Splits 64-bit data accesses into 32-bit bus transactions |
| `cdb_arbiter.sv` | Common Data Bus (CDB): picks one result per cycle |
| `rob.sv` | 32-entry ROB with in-order and out-of-order commit |
| `len5_top.sv` | Connects everything; plain ports for both memory buses |

Default sizes: ROB 32, ALU station 8, branch station 4, MUL/DIV station 4,
CLC station 4, load buffer 8, store buffer 16.

## The ROB and out-of-order commit

This is the most delicate part of the design.

Allocation is sequential: each issued instruction takes the entry at the
tail, and its index becomes its tag everywhere in the core. Results arrive
over the CDB and are stored in the entry.

There are two commit slots per cycle.

- **In-order slot.** Looks only at the head (oldest) entry. It may commit
  anything that is done. If the head raised an exception or is a
  mispredicted branch, committing it flushes the whole backend.
- **Out-of-order slot.** Picks the oldest done entry behind the head whose
  commit can no longer be undone. The entry itself must have no exception
  and must not be a mispredicted branch. Every older branch, jump, load or
  store must already be done, correctly predicted and free of exceptions.
  A store committed here is only marked in the store buffer; it still
  writes memory in program order.

Committed entries are marked. The head then moves forward past every
already-committed entry, so one long instruction at the head can be
followed by a burst of head movement once it finishes. Entries freed out of
order are **not** reused early, which is exactly the in-order-allocation
limit described above.

Write-after-write (WAW) hazards need care when commits happen out of order.
A committing instruction writes the register file only if no younger
instruction with the same destination has already committed. The ROB
reports this on `commit_write`. The register-status table clears its busy
bit only when the committing tag is still the newest writer. An early bug
came from gating register writes on the rename table alone: a wrong-path
instruction had renamed the register, so the last correct write was lost.

For synthesis speed, the ROB scans are written on rotated bit vectors
(rotate by the head pointer, then pick the first set bit). Updates use loops
over constant indices instead of writes at a computed index.

## The coprocessor (CLC)

The interface is valid-ready on both sides. A request carries mode, latency
(12 bits, from the instruction's immediate), data and a small id. The
result is the data operand, returned after the chosen latency together with
its id.

- **Pipelined mode.** A chain of `PIPE_STAGES` (32) registers. The latency
  picks which register is the output. A new request can be taken every
  cycle. If the output is not accepted, the whole chain holds.
- **Iterative mode.** A down-counter of up to `MAX_LATENCY` (4095) cycles.
  No new request is taken until the previous result has been accepted.

Latency 0 counts as 1. Pipelined latencies above 32 are clamped to 32.

Two instructions drive the CLC. Both are I-type on the custom-0 opcode
(`0001011`):

    xdummy.iter rd, rs1, imm   funct3 = 000   imm = latency
    xdummy.pipe rd, rs1, imm   funct3 = 001   imm = output pipeline stage

The CLC has its own 4-entry reservation station, like any other unit.

## Reservation stations and the CDB

Every unit except the load-store unit sits behind a reservation station.
An entry waits until both operands are known. It watches the CDB for the
tags it is missing.

- **Selection.** Ready entries go to the unit in round-robin order. The
  branch station is the exception: it runs strictly in program order, so
  misprediction recovery stays simple.
- **Results.** A finished result is kept in its entry until the CDB takes
  it. The unit is then free for the next instruction.

The CDB carries one result per cycle. The branch unit always wins
arbitration, because resolving branches unlocks commits. The other four
sources take turns round-robin.

## Load-store unit

The load and store buffers also act as the LSU's reservation stations.

- **Stores.** A store reports completion once its address and data are
  known. It writes memory only after it commits, oldest first.
- **Loads.** A load compares its address against all older stores still in
  the buffer. It waits if an older store's address is unknown, or if the
  youngest overlapping store covers only part of the load. If that store
  covers the whole load, the data are forwarded from it and memory is not
  accessed. Otherwise the load reads memory.
- **Limits.** One memory access is in flight at a time, and committed
  stores go first. Misaligned accesses raise an exception.

Supported accesses are LW, LWU, LD, SW and SD. The 64-bit port goes through
`mem_bridge`. An access that fits in one 32-bit word becomes one bus
transaction; a 64-bit access becomes two.

## Frontend, speculation and recovery

The fetch unit asks for one instruction word per cycle, up to four in
flight, and queues the responses. The predictor works as follows:

- **BTB.** A direct-mapped table with 64 entries. It only learns transfers
  that were actually taken.
- **Direction.** For conditional branches, 2-bit counters indexed by PC xor
  an 8-bit global history (gshare). The counters start at "weakly taken",
  so a loop branch is predicted correctly from its second pass.
- **Calls and returns.** A 4-entry return-address stack.

When a branch resolves as mispredicted, the branch unit redirects fetch at
once. Issue is then held until that branch commits and flushes the backend.
This avoids having to squash only the entries younger than the branch, and
needs no per-branch checkpoints. In the meantime the frontend is already
fetching from the correct path.
Responses to fetch requests sent before a redirect are counted and dropped.

Exceptions (illegal instruction, misaligned access or jump target, ECALL)
are taken at commit. They flush the core and restart fetch at `TRAP_ADDR`
(default 0x100), and are reported on `exc_valid`, `exc_cause` and `exc_pc`.

## Top-level interface

`len5_top` has plain ports.

- **Instruction bus:** `imem_req/gnt/addr/rvalid/rdata`. It carries 32-bit
  words with in-order responses.
- **Data bus:** `dmem_req/gnt/we/addr/be/wdata/rvalid/rdata`. It is 32 bits
  wide, with request/grant and an in-order rvalid (OBI-like).
- **Observation:** `dbg_reg_addr/dbg_reg_data` reads any register. There are
  also the `mcycle` and `minstret` counters.
- **Events:** `ev_*` pulses for ROB-full stalls, RS-full stalls, out-of-order
  commits, mispredictions, flushes, CLC requests in each mode, CDB
  conflicts and load forwarding.

Parameters: `BOOT_ADDR`, `TRAP_ADDR`, the station and buffer sizes, and the
CLC's `CLC_PIPE_STAGES` and `CLC_MAX_LATENCY`. The ROB size is set in
`len5_pkg.sv`.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with the
line `TB_RESULT checks=N failures=M` and has a timeout. `tb/rv_asm.sv` holds
instruction encoders used to build test programs.

`tb_len5_top` runs the full core at default parameters against a shared
instruction/data memory model. It includes these programs:

- A functional program with random bus stalls. It covers arithmetic,
  MUL/DIV, loads, stores, forwarding, a mispredicted branch whose wrong-path
  store must not reach memory, and a call/return.
- An illegal instruction, which must trap with the right cause and PC.
- CLC loops in both modes, with latency 1/5/10/20 and 1 to 20 independent
  instructions per loop. The dependent variant and the variant with a
  housekeeping call are also run.
- Long loops with latency = N = 64, 120 and 200. Their measured IPC must be
  within 0.06 of the formula above.

Some measured IPCs:

| Workload | IPC |
|---|---|
| iterative CLC, L = 20, N = 20 | 0.97 |
| pipelined CLC, L = 20, N = 5 | 0.80 |
| iterative CLC, L = 20, N = 5 | 0.28 |
| L = N = 64 | 0.63 (formula 0.67) |
| L = N = 120 | 0.56 (formula 0.58) |
| L = N = 200 | 0.54 (formula 0.545) |

## Simulating with Verilator

From the repository root (Verilator 5, with `--timing`):

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
      --top-module tb_len5_top -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/len5_pkg.sv tb/rv_asm.sv tb/tb_len5_top.sv -o sim
    ./obj_dir/sim

Replace `tb_len5_top` with any other `tb/tb_<module>` to run a unit bench.
The run prints `TB_RESULT checks=... failures=...` and exits.

## Where this design departs from the published LEN5 description

- **Not reproduced from the original.** The predictor sizes, fetch queue,
  instruction encodings of the CLC instructions, trap handling and memory
  protocol are not described, so they are chosen here.
- **Misprediction recovery.** Fetch is redirected at resolution as
  described. The backend flush waits for the branch to commit, and issue
  stalls in between, instead of squashing only the younger entries at
  once.
- **Round-robin selection.** The reservation stations use a rotating
  priority that starts after the last entry sent. This prevents starvation
  like the described scheme. It does not, however, finish a whole batch of
  eligible entries before it looks at newly ready ones.
- **Instruction set.** Only the RV64IM subset needed by the workloads is
  decoded. There are no CSR instructions, no floating point and no
  compressed instructions. Cycle and instruction counts are output ports
  instead of CSRs.
- **CLC sizes.** The pipeline depth (32) and the maximum iterative latency
  (4095) are not given in the description and are chosen here. Pipelined
  latencies above 32 are clamped.
- **Not built.** The host microcontroller and its bus are replaced by the
  top-level memory ports. The in-order comparison core is not built.
- **Numbers.** The IPC curves follow the described trends, but the numbers
  come from this implementation, not from the original core.
