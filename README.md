# Demand-Only Broadcast clustered execution core

A clustered out-of-order core often gives every cluster its own copy of the
physical register file, so that each copy needs fewer read ports and sits next
to its functional units. The usual cost is that every result goes to every
cluster: with four clusters, each result is written four times and driven
across all four bypass networks, even when nothing in three of those clusters
will ever read it.

**Demand-Only Broadcast** sends a result into a remote cluster only if that
cluster is known to hold a consumer of it when the producer's tag arrives.
Each cluster tracks, per physical register, whether it has seen the tag
(*Broadcast* bit) and whether any of its instructions needs the value
(*Use* bit). The tag always goes everywhere, because wakeup needs it. The data,
which follows the tag a fixed number of cycles later, is let into a cluster's
register file and bypass latches only if the Use bit was set when the tag
arrived. A consumer that shows up after its producer's data was blocked asks
for a **copy instruction**. This is a move from a register to itself, inserted
into the producer's cluster, and it broadcasts the tag and value again.

This repository holds synthesizable SystemVerilog for such a core: 4 clusters
of 4 functional units (16-wide), a 512-entry physical register file copied in
every cluster and split into 4 write banks, 64-entry scheduling windows, and a
512-entry instruction window. On the random programs of the end-to-end test,
the core makes about 1.7 register-file writes per result, where full broadcast
would make 4. The published figure for the technique, on SPECint2000, is 1.6.

## How a value reaches another cluster

Each cluster runs this pipeline for an instruction selected in cycle `t`:

| cycle | stage          | what happens |
|-------|----------------|--------------|
| t     | WAKEUP/SELECT  | destination tag on the cluster's tag bus; local dependants wake at the edge and can be selected in t+1 |
| t+1   | RF READ 1      | |
| t+2   | RF READ 2      | register file read |
| t+3   | EXEC           | operands from the register file or the bypass latches; result on the data bus |

So the data follows its tag by `TAG_TO_DATA = 3` cycles. Moving across one
cluster boundary costs one cycle. Tag and data take the same path through the
`intercluster_latches`, so a broadcast from cluster *i* arrives at cluster *j*
`|i-j|` cycles late, and it still arrives 3 cycles after its tag.

When a tag arrives in a cluster, that cluster's Busy-Bit Table sets the
register's Broadcast bit and reads its Use bit. The Use bit read is delayed 3
cycles and becomes the enable of that bus in the cycle the data arrives. A
disabled result is neither written into this register-file copy nor latched
for bypass, and the cluster counts it as blocked. The producer's own cluster
always accepts the result, because an instruction sets the Use bit of its own
destination when it is issued.

Example: producer A runs in cluster 0 and consumer B is in cluster 3.

```
cycle 0   A selected, tag in cluster 0
cycle 2   B issued into cluster 3: sets Use[A] in cluster 3's table
cycle 3   A's tag reaches cluster 3: Broadcast[A] set, Use[A] read = 1 -> enable;
          B wakes
cycle 4   B selected
cycle 6   A's data reaches cluster 3 and is written / latched (enable was 1)
```

If B were issued after cycle 3 instead, the Use bit would have read 0 and A's
data would have been dropped at cluster 3. That case is handled next.

## The Busy-Bit Table rules

This is the part that needs the most care: every cluster has its own table,
and all the decisions are made there (`rtl/busy_bit_table.sv`).

At **issue** (insertion into the scheduling window), each source register's
*old* entry is read, as a scoreboard would:

| Broadcast | Use | tag on a bus now | result |
|-----------|-----|------------------|--------|
| any       | any | yes              | ready; the Use read of that tag sees this consumer, so the data is let in |
| 1         | 1   | no               | ready: the value is in this cluster's register file |
| 1         | 0   | no               | **copy needed**: not ready, request a copy, reset Broadcast |
| 0         | any | no               | not ready: wait for the tag |

In every case the source's Use bit is set. The instruction also sets the Use
bit of its own destination.

At **allocation**, every instruction issued anywhere in the core clears both
bits of its new destination register in all four tables. This removes what
the register's previous lifetime left behind. A consumer issued in the same
cycle as its producer must not see those stale bits either, so the issue-time
read treats a register being allocated in that cycle as clear. Without that
bypass, a consumer can wake on a dead value. The end-to-end test caught
exactly that.

**Copy instructions** are ready as soon as they are inserted and touch no table
entry. When a copy's tag reaches a cluster whose consumer asked for it, that
consumer's request set the Use bit, so the data goes in. The request also
cleared the Broadcast bit, so any later consumer in that cluster waits for the
copy's tag instead of asking again.

## Copy requests and insertion

Copy requests from all 16 issue slots (2 sources each) go to the **Copy Request
Vector** (`copy_request_unit`), one bit per physical register. A request made
at issue in cycle `T` is visible to the steering logic in `T+2`. Every cycle, a
priority circuit picks up to 4 set bits per cluster, lowest register number
first. A copy goes to the cluster that produced the value. With the banked
register file, that cluster is simply the register's bank, the top two bits of
its number. The steering logic places copies before regular instructions, in
the lowest issue ports of that cluster. After the 3-cycle steer-to-issue
pipeline, the copy is issued in `T+5`. So copies take issue ports and window
entries away from real instructions, and can push those to other clusters.

## Renaming and steering

`rename_steer` handles up to 16 instructions per cycle in program order:

1. It renames the sources through the register alias table (RAT). The
   destinations of older instructions in the same group are included.
2. It picks the preferred cluster. This is the bank of the first source's
   physical register, or of the second source if there is only that one.
   Instructions without sources use Modulo-4: four go to cluster 0, the next
   four to cluster 1, and so on.
3. It checks that the cluster has a free issue port (4 per cycle), a free
   window entry, and, if the instruction writes a register, a free register
   in its bank. If not, it takes the closest cluster that has all three. On a
   tie it takes the lower-numbered cluster. If no cluster can take the
   instruction, or the instruction window is full, that instruction and all
   younger ones wait.
4. It allocates the destination from the chosen cluster's bank (`free_list`).
   The old mapping goes to the instruction window, which frees it when the
   instruction retires.

Window occupancy is counted when an instruction is steered, so entries that
are still in the issue pipeline count as used.

## Module map

| file | role |
|------|------|
| `rtl/dob_pkg.sv` | sizes, micro-operation and bus types |
| `rtl/dob_core.sv` | top: steering, issue pipeline, 4 clusters, inter-cluster latches, copy vector, free lists, instruction window |
| `rtl/rename_steer.sv` | RAT, dependence-based steering, banked allocation, copy placement |
| `rtl/free_list.sv` | free registers of one bank (circular queue, 4 out / 16 in per cycle) |
| `rtl/instr_window.sv` | 512-entry in-order window, retirement, register release |
| `rtl/copy_request_unit.sv` | Copy Request Vector and per-cluster priority pick |
| `rtl/cluster.sv` | one cluster: table, window, pipeline, bypass, gating |
| `rtl/busy_bit_table.sv` | Broadcast/Use bits, ready, copy detection, Use read at tag time |
| `rtl/sched_window.sv` | non-compacting window, 16-bus wakeup CAM, destination tags |
| `rtl/select_logic.sv` | up to 4 grants per cycle, lowest index first |
| `rtl/regfile.sv` | one register-file copy: 4 banks x 128, 4 write ports per bank, 8 read ports |
| `rtl/func_unit.sv` | integer ALU |
| `rtl/intercluster_latches.sv` | delay chain for broadcasts between clusters |

Main sizes are in `dob_pkg`: `NUM_CLUSTERS=4`, `FU_PER_CL=4`, `ISSUE_PORTS=4`,
`NUM_PREGS=512`, `SW_ENTRIES=64`, `IW_ENTRIES=512`, `NUM_AREGS=32`, `DATA_W=64`,
`TAG_TO_DATA=3`, `STEER_TO_ISSUE=3`.

## Interface of `dob_core`

- `in_valid[16]`, `in_insn[16]` offer decoded instructions in program order.
  `in_valid` must be a prefix.
- `accept_cnt` tells how many were taken this cycle; offer the rest again.
- `ret_valid/ret_dst_v/ret_dst/ret_data[16]` are the in-order commit stream.
- The `ev_*` outputs are per-cycle event counts:
  - register-file writes (all copies), and how many of them were remote;
  - blocked broadcasts;
  - bypassed operands;
  - results;
  - copy requests and copies inserted;
  - instructions with a source, and how many of them missed their preferred
    cluster;
  - Modulo-4 steers;
  - stall.

The instruction set is deliberately minimal: `ADD SUB AND OR XOR ADDI LI MOV`,
with a 16-bit sign-extended immediate. After reset, architectural register *r*
maps to physical register *r*, and its value is undefined until written.
Reset is asynchronous and active low.

## Simulating

Every testbench checks itself and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/dob_pkg.sv tb/tb_dob_core.sv \
          --top-module tb_dob_core -Mdir obj_core
./obj_core/Vtb_dob_core
```

Replace `dob_core` with any block name for its unit test. `tb_dob_core` runs
the core at its full default size on a 4000-instruction random program. A
reference model checks every retired value. The test also reports, and
requires to be non-zero: remote writes, blocked broadcasts, bypasses, copy
requests, inserted copies, off-preference steering, Modulo-4 steering and
stalls. It also checks that each result is either written or blocked in every
cluster, and that fewer than 4 writes are made per result. For every copy
request, it checks that the copy is issued no earlier than 5 cycles later, and
it requires some copies to be issued exactly 5 cycles after their request. It
finishes in well under a second.

The unit tests cover:

- the Busy-Bit Table cases above, one by one;
- wakeup and select timing (back-to-back wakeup, 4 grants per cycle);
- the 2-cycle copy request delay and per-cluster picks;
- one cluster with the tag-to-data delay, bypass, a remote write, a blocked
  broadcast and a copy;
- the steering rules;
- the free lists, the instruction window (filled to 512), the register file,
  the latches and the ALU against reference models.

## Where this core departs from the published design

- **Memory and front end.** There are no loads or stores, data caches (the
  published core has two replicated L1 copies), instruction cache, branch
  predictor, L2 or memory request buffer. The core takes decoded
  micro-operations from its own small instruction set, not Alpha
  instructions, so the SPECint2000 programs of the published evaluation cannot
  run on it.
- **No branch misprediction recovery.** There is no RAT checkpoint or
  bulk clear of the tables.
- **Tag-to-data distance.** It is 3 cycles, from the pipeline's three stages
  after select. One published timing example uses 2 cycles for simplicity.
- **Copy timing.** In the published timing example a copy is issued and
  selected in the same cycle. Here, as for every instruction, selection
  happens the cycle after insertion, so copies run one cycle later than in
  that example.
- **Shortened front end.** Rename and steering take one cycle, then 3 cycles
  to issue. The published pipeline has 4 dependence-analysis/steer stages plus
  a routing-delay stage.
- **Unpublished details.** These were chosen here:
  - lowest-index select;
  - lowest-number copy pick;
  - lower-cluster tie break in steering;
  - copies placed before regular instructions;
  - window entries freed at EXEC (instructions never replay).
- **Configuration.** Only the 4-issue-port configuration was simulated.
  `ISSUE_PORTS` is a package constant, and the 6-port variant is untested.
- **Circuit level.** The register file's layout (stacked banks, dual-rail
  write bitlines) and the power model are not represented. Only the port
  structure and the write counts are.
