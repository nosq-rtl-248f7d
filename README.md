# Store-load communication without a store queue

An out-of-order core normally forwards data from in-flight stores to later
loads through a store queue. Every load searches that queue associatively,
and the search scales badly with window size. This RTL implements the
alternative published as **NoSQ** by T. Sha, M. Martin and A. Roth (MICRO 2006;
IEEE Micro 2007). The core has no store queue and no load queue:

* A load that will read an in-flight store is not executed. At rename, its
  destination register is mapped to the physical register that holds the
  store's data. This is *speculative memory bypassing* (SMB). After that, the
  store-to-load communication is ordinary register communication.
* A predictor decides which loads do this and which store they read. It
  predicts a *distance*: how many dynamic stores back the store lies.
* Stores are not executed out of order at all. They wait in the reorder
  buffer. A longer in-order commit pipeline then reads their base and data
  registers, computes their addresses and writes the data cache.
* The same commit pipeline checks every load. It uses the *store
  vulnerability window* (SVW) filter, so that only a few loads reread the
  cache. A wrong value squashes the load and everything younger, and
  retrains the predictor.

The modules in `rtl/` cover the memory-communication side of such a core:
rename with SMB, the predictor, the delay buffer, the reorder buffer, the
register file, the SSN counters and the commit pipeline. The front end,
the out-of-order execution engine, the free list and the data cache are
outside the top module and are reached through ports. The testbenches model those parts.

## Store sequence numbers

Everything is expressed in store sequence numbers (SSNs). These are 20-bit
counters that number dynamic stores in program order. SSN 0 means "no
store".

| counter | meaning |
|---|---|
| `ssn_rename` | SSN of the youngest renamed store. The next store gets `ssn_rename + 1`. |
| `ssn_commit` | SSN of the youngest store that has written the data cache. |

A load records `ssn_rename` when it is renamed. That value is the number of
stores older than the load. A distance `d` therefore names the store with
SSN `ssn_rename - d`. Distance 0 is the store immediately before the load.

Wrap-around: when `ssn_rename` reaches its largest value, rename stops. The
core drains: the reorder buffer and the commit pipeline empty and every
store commits. Then both counters return to 0 and the SSBF is cleared. The
SSBF is the only structure that keeps SSNs beyond the window
(`ssn_counters.sv`). The parameter `SSN_MAX` on `nosq_top` moves the wrap
point, so tests can reach it quickly.

## Rename: turning a store-load pair into a register mapping

`smb_rename` handles one instruction per cycle.

* **Store.** The store takes SSN `ssn_rename + 1`. The physical register of
  its data operand goes into the **store register queue** (SRQ) at index
  `SSN mod 128`. The store then enters the reorder buffer only.
* **Load.** The predictor is read with the load PC and the path history. On
  a hit, `ssn_bypass = ssn_rename - distance`. Then one of three cases
  applies:
  * **Bypassing.** The predicted store has not committed
    (`ssn_bypass > ssn_commit`) and the entry's confidence is at least 2.
    The load's destination is mapped to `SRQ[ssn_bypass]`. The load takes
    no free register and enters the reorder buffer already complete.
  * **Delayed.** The store is in flight but confidence is below 2. The load
    goes into the **delay buffer** (`delay_buffer`, 8 entries) together
    with `ssn_bypass`. Each cycle the buffer releases the oldest load whose
    store has committed (`ssn_commit >= ssn_bypass`) on the `rel_*` port.
    From there it runs as a nonbypassing load. Rename stalls while the
    buffer is full.
  * **Nonbypassing.** Every other load, including one whose predicted store
    has already committed. It is dispatched and reads the cache as usual.
* **Other instructions** are renamed and dispatched normally.

The SRQ holds register numbers only. It is read only at rename and never at
execute, so it adds no path to the execution core.

## The bypassing predictor

`bypass_predictor` holds two set-associative tables of 1,024 entries, 4 ways
each. Each entry has a valid bit, a tag, an 8-bit distance and a 2-bit
confidence counter.

* The *path-insensitive* table is indexed and tagged by the load PC.
* The *path-sensitive* table also mixes in a 16-bit path history
  (`path_history`). Each conditional branch shifts in one bit, its
  direction. Each call shifts in two bits, PC bits 3:2.
* Both tables are read at every lookup. The path-sensitive hit wins.

Training arrives from the commit pipeline, and both tables get the same
request:

* **Misprediction** (the verification reread found a different value). The
  correct distance is installed. An existing entry loses one confidence
  step. A new entry starts at confidence 2.
* **Load with a prediction and no squash** (bypassing or delayed). The
  confidence rises if the SSBF shows that the predicted store really was
  the last writer of the address. Otherwise it falls.

A load that keeps meeting different stores therefore drops below the
threshold and becomes a delayed load. It waits for the store rather than
risk a squash. It climbs back to bypassing once its predictions hold again.

Distances too large for 8 bits saturate at 255. Such a distance always
points at a committed store, so the load is nonbypassing.

## Verification: the extended commit pipeline

This is the least obvious part. `commit_pipeline` takes one instruction per
cycle from the reorder buffer through eight stages:

| stage | work |
|---|---|
| S0 ROB read | pop the head when it is complete |
| S1 Reg read | read the base register and the data register (store data, or the value the load produced) |
| S2 Agen | address = base + sign-extended 12-bit offset |
| S3 SVW1 | look up the SSBF with the load address |
| S4 SVW2 | decide whether the load must reread the cache |
| S5 DC1 | store: write cache and SSBF, advance `ssn_commit`. Load that must be checked: reread the cache |
| S6 DC2 | compare the reread value. Squash and train on a mismatch; update confidence; write the committed map table |
| S7 Commit | retire |

**The SSBF** (`ssbf`) is a tagged, 4-way, 256-entry table. For each 8-byte
word it holds the SSN of the youngest committed store to that word. On a
miss it returns the largest SSN ever evicted from the set. That value is
never too small, so the "older than" test below stays safe.

**Filter tests**, in S4:

* *Bypassing load.* The load is safe if the SSBF hits and holds exactly
  `ssn_bypass`. That means the last store to the address is the one the
  load took its value from.
* *Nonbypassing or delayed load.* At execution, the engine reports
  `ssn_commit` as the load's `ssn_nvul`. The load is safe if
  `SSBF[addr] <= ssn_nvul`: no store to that address committed after the
  load read the cache.

Other loads reread the cache in S5 and compare in S6.

**Forwarding.** Stores update the SSBF in S5. A load in S3 could therefore
miss a store that sits one or two stages ahead of it. S3 compares its
address with the stores in S4 and S5 and takes the youngest matching SSN.

**Squash.** A mismatch in S6 happens in the same cycle for all of the
following:

* S0 to S5 are emptied, and the cache and SSBF writes of the store in S5
  are suppressed.
* `squash_valid` and `squash_pc` tell the front end to refetch from the
  load.
* The reorder buffer is flushed.
* The speculative map table is reloaded from the committed one.
* `ssn_rename` returns to the load's rename-time SSN.
* The path history returns to the load's rename-time value.

The load is not committed; it is fetched again.

**Training distance** is the load's rename-time SSN minus `SSBF[addr]`. That
is the distance to the store the load should have read. If the SSBF missed,
no such store is known and 255 is used instead.

The pipeline needs two register-file read ports and one data-cache port.
Store commit and load rereads share them. These are the ports a
conventional core spends on executing stores.

Latency: a store writes the cache 5 cycles after it leaves the reorder
buffer and retires after 7. The testbench checks both numbers.

## Interfaces of `nosq_top`

* **Decode:** `dec_valid`, `dec` (`dec_inst_t`: PC, operation, logical
  registers, 12-bit offset, branch and call flags) and `dec_ready`.
* **Free list:** `new_preg` is the next free physical register. It is
  consumed when `preg_used` is high. Bypassing loads do not consume one.
  **Reclaiming registers is left to the free list.** With SMB, several
  logical registers can map to one physical register, so simple "free the
  previous mapping at commit" is not safe without reference counts.
* **Out-of-order engine:**
  * `disp_*` gives the dispatched operation, its registers and
    `disp_rob_idx`.
  * `rel_*` hands over delayed loads once their store has committed.
  * `ooo_rd_*` are 8 register read ports.
  * Each of the 4 `wb_*` ports completes a reorder-buffer entry. It writes
    the register file when `wb_has_dst` is set. For a load it returns
    `wb_ssn_nvul`, the `ssn_commit` value when the load read the cache.
  * `ooo_full` holds rename.
  * On `squash_valid` the engine must drop all its work.
* **Data cache:** `dc_*` is the commit pipeline's port; read data is
  expected one cycle after the request. `evict_*` creates an SSBF
  pseudo-entry (SSN = `ssn_commit`) for a word the cache evicts, so stores
  by other processors are not missed.
* **Observation:** `retire_*`, plus `ev_*` event strobes for the load
  classification, filtered and reexecuted loads, training and SSN clears.

All storage resets asynchronously on `rst_n` low. All lookups (predictor,
SRQ, map table, SSBF, register file) are combinational within the cycle.

## Modules

| file | role |
|---|---|
| `nosq_pkg.sv` | widths, `dec_inst_t`, `rob_entry_t`, `pred_t`, `train_t`, load-kind enum |
| `nosq_top.sv` | top: wires everything below |
| `smb_rename.sv` | rename with SMB; contains `path_history`, `bypass_predictor`, `store_register_queue`, `rename_map` |
| `bypass_predictor.sv`, `bp_table.sv` | the hybrid distance predictor and its table |
| `path_history.sv` | branch and call path history |
| `store_register_queue.sv` | SRQ |
| `rename_map.sv` | speculative and committed map tables |
| `ssn_counters.sv` | `ssn_rename`, `ssn_commit`, wrap-around |
| `delay_buffer.sv` | holds delayed loads until their store commits |
| `rob.sv` | augmented reorder buffer (128 entries) |
| `regfile.sv` | 160 × 64-bit physical registers, 10 read and 4 write ports |
| `commit_pipeline.sv` | eight-stage commit with verification; contains `ssbf` |
| `ssbf.sv` | store sequence Bloom filter |

## Sizes and how far they follow the published design

Taken from the published evaluation:

* 128-instruction window (reorder buffer).
* 2,048-entry bypassing predictor.
* 20-bit SSNs (given there as an example width).
* Eight-stage commit pipeline.
* Four writeback ports, matching the four-way issue.
* No store queue or load queue.

This design's own choices, where the published description gives no
number:

* 32-bit addresses and 64-bit data.
* 32 logical and 160 physical registers.
* SRQ size 128.
* Delay buffer of 8 entries.
* SSBF of 256 entries, 4 ways, word granularity.
* Predictor split into two equal tables of 4 ways.
* 22-bit tags, 8-bit distances, 2-bit confidence with threshold 2.
* 16-bit path history.
* The hash functions.

With these widths the predictor holds 33 bits per entry, 8.25 KB in all.
The published figure is 10 KB.

Departures to be aware of:

* **Width.** Rename and commit handle one instruction per cycle. The
  published core is four-way and commits two loads and one store per
  cycle. Widening needs dependency checks within a rename group (a load
  bypassing from a store in the same group) and SSBF ordering within a
  commit group.
* **Stage split.** The published pipeline has eight commit stages but names
  only six. Here the SVW stage and the cache stage each take two cycles.
* **Access size.** Only full 64-bit accesses are handled. Partial-word
  bypassing is not implemented.
* **Squash point.** A verification failure squashes the load itself and
  refetches it, and the training distance is measured from the load's
  rename-time SSN. Both are choices made here; the published text describes
  only a pipeline squash and a distance computed from `ssn_commit`, which
  has the same value when the load commits.
* **Prediction correctness** for confidence updates means "the SSBF names
  the predicted store". This definition is chosen here.
* **Not part of this RTL:** the front end, the issue queue and execution
  units, the free list and the data cache.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. It ends by
printing `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_nosq_top rtl/nosq_pkg.sv tb/tb_nosq_top.sv
./obj_dir/Vtb_nosq_top
```

Replace `tb_nosq_top` with any other testbench name.

* **`tb_nosq_top`** runs a generated 2,560-instruction loop program
  through the whole top. The testbench acts as the front end, the free
  list (registers handed out in rotation), a random-latency out-of-order
  engine and the data cache.
  * The loop contains fixed-distance store-load pairs, a load that never
    meets an in-flight store, a load whose source store depends on the
    data, and a load whose source follows a branch.
  * Every retired result and the final memory are compared with an
    in-order reference run.
  * The test requires that each mechanism happens at least once:
    bypassing, nonbypassing and delayed loads (held, then released);
    filtered and reexecuted
    loads; squashes; training; SSN wrap-around (with `SSN_MAX` = 100);
    SSBF pseudo-entries; and rename stalls.
  * Typical counts: about 400 bypassing loads, 290 delayed, 60 squashes
    and 8 wrap-arounds.
* **`tb_nosq_top_full`** is the same program with every parameter at its
  default. SSNs do not wrap there.
* The block testbenches compare against reference models with random
  stimulus, or run directed sequences. `tb_commit_pipeline` checks the
  filter tests, forwarding, squash, training distances and stage latency.

Both tools accept all files. The lint warnings that remain are unused bits
of wide types (for example PC bits outside an index) and the reset used in
assertion `disable iff` clauses.
