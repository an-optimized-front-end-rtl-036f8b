# Front-end physical register file with banking and writeback filtering

In a conventional out-of-order core every instruction reads its operands from
a large, heavily ported physical register file after it issues. This design
moves that read to the front of the pipeline. Right after rename, an
instruction reads the operands that already exist from a *front-end physical
register file* (FPRF). It then carries those values into the issue queue,
where each entry has its own operand storage, the *value register file*
(VRF). Operands that do not exist yet reach the queue entry later, when the
producing instruction writes back. Nothing is read from a register file after
issue.

Two ideas keep the FPRF cheap:

* **Banking.** The FPRF is split into 8 banks with only 2 read ports and 2
  write ports each. Conflicts are solved by a dedicated arbitration stage.
  Reads of the same register in one cycle share a port (*read sharing*).
* **Writeback filtering.** A result is written into the FPRF only if some
  rename map can still point to its register: the current map, or a map
  saved at an unresolved branch. Any other result is needed only by
  consumers already waiting in the queue, so the FPRF write, and the bank
  write port, are saved.

The RTL is a complete, cycle-accurate, synthesizable model of the back-end
of one such core. The top level holds two clusters, integer and
floating-point, with 160 physical registers each. Each cluster covers
rename, the FPRF stages, the issue queue with its VRF, four functional
units, writeback, the reorder buffer, in-order commit and branch
misprediction recovery. Fetch, decode, branch prediction, loads and stores,
and the caches are not part of it. A cluster takes decoded micro-ops and
returns fetch redirects.

## Pipeline of one cluster

```
RENAME -> ARB -> FPRF -> QUEUE -> ISSUE -> EXE (1 or 2 cycles) -> WB -> COMMIT
```

| Stage  | What happens |
|--------|--------------|
| RENAME | Sources are looked up in the map. Each source is classed *computed* (its value is in the FPRF) or *pending*. Destinations take free registers. Branches save a checkpoint. The reorder buffer allocates entries. |
| ARB    | Read ports of the 8 banks are granted to the computed sources, oldest instruction first. |
| FPRF   | The banks are read with the granted ports. |
| QUEUE  | The instruction enters the issue queue. The values it has go into its VRF slots. |
| ISSUE  | Up to 4 ready instructions are selected. Their operands come from the VRF, or from the bypass of this cycle's writebacks. |
| EXE    | The functional unit runs: latency 1 for integer, 2 for floating point. |
| WB     | Results are broadcast to the queue and the front-end stages. Each is written into the FPRF unless it is filtered. A branch misprediction is detected here. |
| COMMIT | Up to 4 instructions retire in order. The previous mapping of each committed destination goes back to the free list. |

A micro-op renamed in cycle t with all operands ready issues in cycle t+4.
Its result can commit in cycle t+5+latency. The core testbench checks this
depth.

## Computed bits: deciding what to read at rename

Rename keeps one bit per logical register: does the value of the current
mapping already exist? Renaming a destination clears its bit. A writeback
to the register currently mapped sets it again. A result that is written
back in the same cycle as the lookup also counts as computed, because the
write reaches the bank before the FPRF stage reads it.

A source whose bit is set reads the FPRF. A source whose bit is clear waits
for the producer's writeback.

Sources are looked up in program order within a group. A source that names
the destination of an older instruction in the same group takes that new
register and is pending.

## ARB stage: banking, arbitration, read sharing

Physical register `p` lives in bank `p % 8`, row `p / 8`, so there are 20
rows per bank. The arbiter (`bank_arbiter`) walks the group from oldest to
youngest. For each instruction it tries to place all of its computed
sources on free read ports.

* **Read sharing.** A source whose register is already being read this
  cycle reuses that port. Sharing works across the whole group, not only
  within one instruction.
* **In-order grant.** An instruction is granted only if every one of its
  sources gets a port.
* **Stall.** The first instruction that does not fit waits in ARB, together
  with every younger one, and retries next cycle. Older granted
  instructions move on. Rename is held while ARB holds a refused
  instruction.

The grant also programs the bank ports for the next cycle. It tells every
operand which bank port will deliver it (`src_port`).

## Values in flight: VRF, bypass and front-end snooping

A pending operand can get its value in three ways:

1. **VRF write (wakeup).** The instruction is already in the queue. The
   writeback matches its tag, and the value is written into the entry's
   VRF slot.
2. **Bypass.** The writeback happens in the very cycle the entry is
   selected. The value is taken from the writeback bus straight into the
   functional unit.
3. **Front-end snoop.** The instruction is still in ARB, FPRF or QUEUE. The
   stage register compares its pending tags with the writeback bus and
   captures the value.

Without the snoop, a value produced between rename and queue insertion would
be lost, because the queue only sees writebacks that happen after insertion.

The queue (`iq_vrf`) has 32 entries, each with two value slots (left and
right operand). Select is by lowest entry index. The n-th selected entry goes
to the n-th functional unit that can accept work.

## Writeback: filtering and write-port conflicts

The filter (`wb_filter`) builds a 160-bit mask every cycle. It is the OR of
the one-hot decode of the current rename map and of every valid checkpoint
in the branch stack (16 entries).

A result whose register is not in the mask can never be read from the FPRF
again:

* No current mapping names it. Any later consumer was renamed after the
  register was remapped.
* No misprediction can bring back a map that names it.

Such a result is still broadcast to the queue and to the front-end stages,
but it is not written into the banks, and it takes no write port.

Each bank has 2 write ports for the 4 writeback ports of a cluster. Among
results of the same cycle that are not filtered, the lowest writeback port
wins. A result that finds no free write port stays in its functional unit.
That unit takes no new work until the result is written. Filtered results
never wait.

## Misprediction recovery

Every branch saves the following checkpoint in the branch stack:

* the rename map after its own group's older instructions;
* the free-list head.

When a branch writes back with a wrong prediction, recovery runs in the same
cycle. If several branches mispredict together, the oldest one wins.
Recovery does the following:

* restores the map and the free-list head;
* discards every younger checkpoint (the branch's own stays until the
  branch commits);
* removes every younger instruction from the front-end stages, the queue,
  the functional units and the reorder buffer (by age relative to the
  reorder-buffer head);
* asks fetch to restart at the correct pc.

The computed bits must also go back to their state at the branch. The
cluster keeps one *written* bit per physical register. The bit is cleared
when the register is allocated and set when it is written back. On recovery,
the computed bit of each logical register is rebuilt as the written bit of
its restored mapping. This is exact, because a register stays allocated,
with its value, for as long as any checkpoint names it.

Committed branches free their checkpoint. A full branch stack, reorder
buffer or free list holds rename.

## Module map

| File | Role |
|------|------|
| `rtl/fprf_pkg.sv` | sizes, micro-op and pipeline structs, event counters, bank mapping |
| `rtl/fprf_top.sv` | integer cluster (latency 1) and FP cluster (latency 2), side by side |
| `rtl/fprf_core.sv` | one cluster: pipeline registers, stall and flush control, wiring |
| `rtl/rename_map.sv` | rename map, computed bits, written bits, recovery |
| `rtl/free_list.sv` | circular list of free registers; checkpointable head |
| `rtl/branch_stack.sv` | checkpoints of map and free-list head |
| `rtl/bank_arbiter.sv` | ARB stage |
| `rtl/fprf_banks.sv` | 8 banks x 20 rows x 64 bits, 2R/2W per bank, write-port arbitration |
| `rtl/wb_filter.sv` | filter mask and per-writeback decision |
| `rtl/iq_vrf.sv` | issue queue with VRF, wakeup, select, bypass, flush |
| `rtl/fu_alu.sv` | pipelined functional unit, branch resolution, hold on back-pressure |
| `rtl/rob.sv` | reorder buffer, in-order commit, truncation on flush |

## Parameters

The package values are those of the evaluated machine:

| Parameter | Value |
|-----------|-------|
| `WIDTH` | 4 |
| `NUM_LREGS` | 32 |
| `NUM_PREGS` | 160 |
| `NUM_BANKS` | 8 |
| `RD_PORTS` | 2 |
| `WR_PORTS` | 2 |
| `IQ_SIZE` | 32 |
| `ROB_SIZE` | 128 |
| `NUM_FU` | 4 |

This design chose the following values itself:

* `XLEN` = 64;
* `NUM_CKPT` = 16;
* `FL_SIZE` = 128.

`fprf_core` has three parameters of its own:

* `FU_LAT` sets the functional-unit latency.
* `READ_SHARING=0` gives the configuration without read sharing.
* `WB_FILTER=0` writes every result, which turns the filter off for
  comparison.

## Where this design departs from the original proposal

* **Operation set.** The functional units execute a small stand-in set:
  add, sub, and, or, xor, add-immediate, and branch-if-zero/nonzero. The FP
  cluster runs the same operations with latency 2. Real FP arithmetic is
  not modeled.
* **No loads or stores.** There are no loads and no memory queue. As a
  result, only branches take checkpoints; the proposal also checkpoints
  loads that can replay.
* **Eager filter mask.** The filter mask is computed in full each cycle.
  The cheaper, lazily updated mask is only sketched in the proposal and is
  not built.
* **Single queue.** One 32-entry queue per cluster is built. The
  distributed variant (four queues of eight entries) is not.
* **Own choices.** The following are this design's own choices, where the
  proposal says nothing:
  * bank interleaving on the low register bits;
  * write-port priority and holding the unit on a conflict;
  * select order;
  * front-end snooping;
  * the written-bit recovery of computed bits;
  * reset: logical register i maps to physical register i, all computed, all
    values 0.
* **Independent clusters.** The two clusters take independent micro-op
  streams. Splitting one instruction stream into integer and FP parts
  belongs to decode, which is outside the design.

## Simulation

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and ends with `$finish`. Example with
plain Verilator:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/fprf_pkg.sv $(ls rtl/*.sv | grep -v fprf_pkg) \
  tb/core_driver.sv tb/tb_fprf_top.sv --top-module tb_fprf_top
./obj_dir/Vtb_fprf_top +verilator+rand+reset+2
```

| Testbench | What it checks |
|-----------|----------------|
| `tb_fprf_top` | Full size, both clusters. Runs 30,000-instruction random programs with mispredicted branches through each cluster. Every committed pc, destination and value is compared with a sequential reference model. Each mechanism must occur at least once: FPRF reads, read sharing, bank stall, queue-full stall, filtered and written writebacks, write-port conflicts, VRF writes, bypasses, front-end snoops, recoveries. Prints the event totals, IPC and the share of filtered writebacks. |
| `tb_fprf_core` | The same checks on one cluster in two builds: default, and FU_LAT=2 with no read sharing and no filter. Also checks the pipeline depth. |
| `tb_rename_map`, `tb_free_list`, `tb_branch_stack`, `tb_bank_arbiter`, `tb_fprf_banks`, `tb_wb_filter`, `tb_iq_vrf`, `tb_fu_alu`, `tb_rob` | Unit tests against independent reference models, random and directed. |

`tb/core_driver.sv` holds the shared stimulus and checker:

* **Program generation.** It builds a random program. About 15% of the
  micro-ops are forward branches, each with a random static prediction.
  Some phases use only six registers, to cause bank conflicts and sharing.
  Other phases are long dependence chains, to fill the queue.
* **Fetch.** It fetches along the predicted path and follows redirects.
* **Checking.** It keeps the architectural state for comparison.

## How far it can be trusted

* **End-to-end results.** Committed results have matched the reference
  model over several seeds. The runs included mispredictions, bank and
  write-port conflicts, queue-full stalls and filtering.
* **Faults are caught.** A deliberately broken version of every module is
  caught by its testbench.
* **Timing is not modelled.** The model is cycle-accurate but has no timing
  model. The one-cycle recovery and the full-width filter mask are
  optimistic for a real clock.
* **Not measured.** IPC and energy against a conventional register file have
  not been measured.
