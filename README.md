# Eager register release in a redundantly multi-threaded processor

In redundant multithreading (RMT), a *leading* thread runs the program and a
*trailing* thread runs it again to catch transient faults. The leader sends
every committed result to the trailer through a register value queue (RVQ),
so each value exists in two or three places at once: the leader's physical
register file, the RVQ, and (once checked) the trailer's register file.

A conventional out-of-order core keeps a physical register until the
instruction that overwrites its logical register commits. It has to, because
a squash of that overwriter must restore the old mapping. In an RMT machine
the old value has a copy outside the leader. So the leader can free the
register much earlier, and fetch the value back from the copy in the rare case
a squash needs it. That is *eager register release*. With it, a small register
file holds a large instruction window. The evaluated single-thread machine
gets from 50 registers what a conventional one gets from 80.

This repository holds synthesizable SystemVerilog for the register side of
such a machine. It covers the leading core's rename, reorder and release
logic, the queues to the trailer, the store buffer and the trailer's checking
stage. The out-of-order issue logic, the functional units, the front end, the
caches and the trailing core's pipeline are not included. Their signals are
ports of the top module.

## The machine this belongs to

The configuration built is the single-thread, power-efficient chip-level
arrangement (ST-P-CRTR):

```
   out-of-order core (leading thread)            in-order core (trailing thread)
 +--------------------------------------+      +------------------------------+
 | rename table   ROB   usage table     |      |                              |
 |        \        |       |            | RVQ  |  trailing_checker            |
 |  issue queue -> FUs   register file -+=====>+  (compare, then write the    |
 |   (external)  (external)    ^        | LVQ  |   trailer register file)     |
 |                             |        +=====>+                              |
 |           copy-back on recovery      | BOQ  |                              |
 |           <-------------------------+=====>+                              |
 |  store buffer <-- trailer's stores   |      |                              |
 +--------------------------------------+      +------------------------------+
```

- The **leader commits before checking** (asymmetric commit). Its stores go
  to a store buffer, not to memory. A store reaches memory only when the
  trailer has produced the same store.
- The **RVQ** carries each committed register result to the trailer. It also
  carries the instruction's source operand values. With them the slower
  in-order trailer can execute without waiting for its own operands; it still
  verifies them.
- The **LVQ** carries load values, so the trailer never reads the cache. It
  sits outside the checked sphere, so it is ECC protected. Here that is a
  (72,64) SEC-DED Hamming code: single-bit errors are corrected and double-bit
  errors are flagged.
- The **BOQ** carries branch outcomes. They serve only as predictions for the
  trailer, so the BOQ has no ECC.
- The **trailer's register file** holds checked state. It is not ECC protected
  here, like the baseline it is compared with.

## When a register is released eagerly

A physical register P, written by instruction A, is returned to the free list
once all three of these hold:

1. no consumer that was dispatched is still waiting to read P;
2. A has committed, so P's value has been copied into the RVQ;
3. a younger instruction B that writes the same logical register has been
   renamed.

Condition 3 guarantees that no *new* consumer can pick up P. Condition 1
covers the consumers already in flight. Condition 2 guarantees that a copy
exists outside the leader.

The `usage_table` keeps, for every physical register:

| field | set | cleared |
|---|---|---|
| overwrite bit | B renames the same logical register | B is squashed |
| in_RVQ bit, RVQ address, inum | A commits and its value is pushed into the RVQ | P is reallocated |
| pending_consumers | +1 per source when a consumer is dispatched (renamed) | -1 when the consumer issues, or is squashed before issuing |
| overwriter's ROB index | B is renamed | — |
| ready | the value is written back | P is reallocated |

Here *inum* is the RVQ sequence number of A's entry. Every cycle the table
offers the lowest-numbered register that qualifies. The leading core then
frees it. It also marks B's ROB entry with the de-allocate bit, A's inum and
A's RVQ address. These have to live in B's entry, because P's own usage entry
is overwritten as soon as P is reused. When B commits, its de-allocate bit
tells the core not to free P a second time.

At most one register is released per cycle. A candidate whose overwriter is
committing in that same cycle is skipped, and the normal commit-time release
takes it instead.

## Recovery: getting an eagerly released value back

A mispredicted branch between A and B squashes B and everything younger. Any
instruction C that received P after the eager release is younger than B, so C
is squashed too and P becomes free again. The old value must then be put back
into P.

The core walks the ROB from the youngest entry back to the branch, **one
entry per cycle**, while `recovering` is high. For each removed entry it:

- restores the old logical-to-physical mapping in the rename table;
- frees the entry's destination register;
- gives back its consumer counts if it had not issued yet;
- re-instates the old register if the entry's de-allocate bit is set. It takes
  P back out of the free list and writes A's value into it, from one of two
  places:
  - **from the RVQ**, if the trailer has not consumed A's entry yet. The RVQ
    tells this by comparing A's inum with its head's sequence number.
  - **from the trailer's register file**, if the entry is gone. The trailer
    cannot have executed B yet, because B never committed. So the trailer's
    copy of that logical register still holds A's checked value.

Walking back one entry per cycle is this design's choice. A squash of n
instructions keeps `recovering` high for n + 1 cycles. Rename, issue,
writeback, commit and eager release all pause during that time. The machine
this comes from assumes the copy-back overlaps with refetching the correct
path. It estimates about 6.6 copy-backs per mispredict.

### The coverage trade-off

Copying back from the trailer's register file loses one guarantee. If that
trailer register is hit by a soft error after it was checked, the leader
takes in the corrupted value, and from then on both threads agree on it. The
error then goes undetected. For this to happen the branch must be squashed in
the short window after the trailer has executed A and before the leader
commits B. That window is rare, because the trailer normally lags by hundreds
of instructions. The source machine measured only 0.0004% of injected trailer
faults being copied back. The `inj_*` ports of the top flip one bit of a
trailer register to model such a fault.

`tb_fault_injection` measures this on the RTL. It makes 250 runs, each with
one bit flip in a random trailer register, and sorts each run by what
happens first:

| outcome | what happens first | runs |
|---|---|---|
| masked | the trailer overwrites the register with a checked value | 79 |
| detected | a check disagrees: a source operand, a result, a store or a branch outcome | 165 |
| undetected | the leader copies the corrupted value back during a recovery walk | 6 |

That is 2.4% undetected, far above the 0.0004% quoted above. The test
workload is harsh on purpose: a quarter of its branches mispredict, and in
some phases the trailer follows the leader by only a few instructions. That
makes the window between A and B wide open. With a slack of hundreds of
instructions, that window almost never opens.

## Modules

| module | role |
|---|---|
| `rmt_pkg` | sizes, index types, `rob_entry_t`, SEC-DED `ecc_encode`/`ecc_decode` |
| `eager_rmt_top` | leading core + RVQ + LVQ + BOQ + store buffer + trailing checker |
| `leading_core` | rename/dispatch, operand read, writeback, commit, eager release, recovery walk |
| `rename_table` | 32-entry map, identity at reset, restore port for the walk |
| `free_list` | bit-vector pool, lowest-first allocation, three release ports, reclaim |
| `usage_table` | per-register book-keeping and eager-release candidate |
| `rob` | 160-entry circular reorder buffer, squash from the tail |
| `phys_regfile` | NR-read/NW-write register file (defaults 8/4) |
| `rvq` | FIFO plus address read port and present test |
| `lvq` | SEC-DED protected FIFO |
| `boq` | FIFO of taken bit and target |
| `store_buffer` | FIFO; compares the head with the trailer's store, writes memory |
| `trailing_checker` | compares trailer results with the RVQ head, trailer register file |
| `sync_fifo` | shared FIFO (any depth, fall-through head) |

### Top-level interface and timing

Everything is synchronous to `clk`, with a synchronous active-high `rst`. All
`*_ready`, `iss_val*` and queue-head outputs are combinational in the cycle
their request is presented. Updates take effect at the next rising edge.

- `ren_*`: offer one instruction per cycle (`rename_req_t`: class,
  destination, up to two sources). When `ren_ready` is high it is accepted,
  and the cycle's `ren_rob` and `ren_*_preg` name its ROB slot and physical
  registers. Dispatch into the external issue queue happens in the same cycle.
- `preg_ready`: one bit per physical register. It is set when the value has
  been written back.
- `iss_v`/`iss_rob`: an instruction leaves the issue queue. `iss_val1/2` give
  its operands in the same cycle.
- `wb_*`: one result per cycle. `wb_aux` is the store address or branch
  target, `wb_taken` the branch outcome. `wb_mispredict` starts recovery. The
  external pipeline must not issue or write back while `recovering` is high,
  and must drop its squashed instructions.
- `trl_*`: the trailing pipeline's side of the RVQ (results, predicted
  operands, `trl_reg_error`), the LVQ (`trl_load_*`, ECC flags), the BOQ and
  the store buffer. A trailer request may be presented only while the matching
  `*_ready`/`*_valid` is high.
- `mem_*`: checked stores to memory.
- `ev_*`: one-cycle event strobes (commit, eager release, conventional
  release, copy-back from RVQ or from the trailer register file, squashed
  entry, rename stall for lack of registers, commit stall on a full queue).

Commit waits when the queue it needs is full. A register result needs the RVQ,
a load the LVQ, a store the store buffer and a branch the BOQ.

## Parameters

| parameter | default | origin |
|---|---|---|
| `NUM_PREGS` | 50 | the single-thread file size at which eager release matches 80 conventional registers |
| `ROB_SIZE` | 160 | reorder buffer per thread |
| `RVQ_DEPTH` / `BOQ_DEPTH` / `LVQ_DEPTH` | 600 / 200 / 400 | queue sizes of the evaluated machine |
| `phys_regfile` `NR`/`NW` | 8 / 4 | single-thread file ports; the one-wide core uses 3 / 2 |
| `STB_DEPTH` | 64 | this design's choice |
| register width, logical registers | 64, 32 | Alpha AXP |

The index types in `rmt_pkg` are 8 bits for physical registers and ROB
indices, and 10 bits for RVQ addresses. That covers every configuration the
source machine evaluates: register files of 50–200 entries, a 160-entry ROB
and a 600-entry RVQ. Larger sizes require wider types there.

## Where this departs from the evaluated machine

- **Width.** The evaluated core fetches, dispatches and commits four
  instructions per cycle. This RTL renames, issues, writes back and commits
  one per cycle. Going wider needs intra-group dependency handling in rename,
  and more ports on the usage table and free list.
- **Outside the RTL.** The issue queue (40 integer and 30 FP entries in the
  evaluated core), the functional units, fetch and branch prediction, caches,
  the trailing core's pipeline and its frequency scaling are not designed
  here. They appear as ports.
- **Recovery latency.** Recovery walks one ROB entry per cycle and stalls the
  pipeline. The evaluated machine assumes no penalty, with a sensitivity study
  at +5 and +10 cycles.
- **Release rate.** At most one eager release per cycle.
- **Exceptions.** A recovery walk starts only from a mispredicted branch at
  writeback. The same walk would serve an exception, but it would start at
  the excepting instruction itself. No exception input exists.
- **Multi-threaded variants.** SRTR, CRTR and MT-P-CRTR run two threads per
  out-of-order core, with register files of 100–200 entries and 16 read and 8
  write ports. They are not built. The release logic is per thread, but the
  top has one leading thread.
- **Store buffer and its errors.** The store buffer depth, and what happens
  on a mismatch (flag, drop, no write), are this design's choices. The
  recovery that follows a detected error is not modelled.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops through a watchdog if it hangs.

- `tb_eager_rmt_top` runs the whole design at its default sizes. The
  testbench acts as the leader's issue queue and functional units, and as the
  trailing pipeline. It renames a random 12,000-instruction program of ALU
  operations, loads, stores and branches, issues them out of order once
  `preg_ready` allows, and writes back after random latencies. A quarter of
  the branches mispredict, and wrong-path instructions follow them. The
  trailer side re-executes the program in order on a reference register file
  and presents each result, load, branch and store. A value the leader got
  wrong shows up as a check error. Examples are a register freed too early,
  or one re-instated from the wrong place. The trailer's speed changes in
  phases: sometimes it keeps up closely, so copy-backs come from its register
  file; sometimes it stops, so the queues fill. The test requires each of
  these to happen: eager release, conventional release, both copy-back
  sources, squash walks, rename stalls, commit stalls, LVQ ECC corrections and
  checked stores. It also checks every walk's length against the number of
  squashed instructions. A run takes about 29,000 cycles.
- `tb_regfile_sizes` runs the same driver (`tb/rmt_e2e_bench.sv`, a
  parameterised copy of the end-to-end driver) at 50, 60, 70 and 80 physical
  registers, side by side, with the same requirements. Throughput stays at
  about 0.44 commits per cycle at every size. The one-wide pipeline and the
  random issue and trailer models set the pace here, not the register file,
  so this run shows correctness at each size, not the speed-up.
- `tb_fault_injection` is the soft-error study described under the coverage
  trade-off above. Before the flip in each run, every check must pass.
- `tb_leading_core` is a directed test. It checks that the release happens
  exactly one cycle after the last consumer issues, and that the register is
  reallocated and then squashed. It checks that the value comes back from the
  RVQ in one case and from the trailer register file in another (the RVQ then
  holds a wrong value on purpose). It also checks the commit/release race.
- The unit testbenches compare each block with a model: the queues at their
  full depths, ECC on every codeword bit, and so on.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_eager_rmt_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/rmt_pkg.sv tb/tb_eager_rmt_top.sv -o sim
./obj_dir/sim
```

Swap the top module and file name for any other testbench. The testbenches
use only `$urandom`, so they run on two-state simulators.
