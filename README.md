# Hardware transactional memory for GPU local memory

Work-items of a GPU work-group that update shared data in local memory
(the LDS, a banked on-chip scratchpad) normally need locks built from atomics,
or a barrier that lets one work-item through at a time. This RTL replaces
those locks with hardware transactions that cover only the local memory of one
work-group. A wavefront brackets a critical section with `TX.Begin` and
`TX.Commit`. Work-items run it speculatively, in lockstep as usual. Each LDS
bank detects conflicting accesses on its own and keeps the old values so they
can be put back. Work-items that lose a conflict are switched off and
re-run the section, while the others commit.

The scheme is GPU-LocalTM (Villegas, Navarro, Asenjo, Plata, Ubal, Kaeli),
built on an AMD Southern Islands–style compute unit. That unit has 32 LDS banks
of 2 KB, wavefronts of 64 work-items, and work-groups of up to 256 work-items
(4 wavefronts). The published description is architectural and was evaluated
in a simulator. This code is a synthesizable reading of it. Every point the
description leaves open was settled here, and the last section lists those
choices.

## The three masks of a wavefront

A wavefront already has an `EXEC` mask, one bit per work-item, which the
compiler changes for if/else and loops. The TM hardware adds a third 64-bit
mask, the **transaction conflict mask** (TCM). A work-item executes only when
`EXEC = 1` and `TCM = 0`. Conflicts never touch `EXEC`, so a later
`EXEC` update (for example, leaving an if) cannot wake up a work-item that has
already failed. `tcm_ctrl` holds TCM, the previous TCM (`TCM_OLD`) and the mode
of the wavefront.

* `TX.Begin` backs up the vector registers. It clears TCM on a first attempt.
* An LDS conflict sets the work-item's TCM bit.
* `TX.Commit` commits if TCM is all zeros. Otherwise the wavefront jumps back
  to `TX.Begin` with `EXEC := TCM`, so only the work-items that failed run
  again.

TCM keeps its value until the retry's `TX.Begin`. That `TX.Begin` copies it
to `TCM_OLD`.

### Forward progress: two serialization levels

Retrying alone can livelock. If a retry ends with exactly the TCM of the
previous attempt, the wavefront escalates:

| situation at the retry's `TX.Begin`             | new mode                  | TCM becomes                  |
|-------------------------------------------------|---------------------------|------------------------------|
| TCM differs from `TCM_OLD`                      | TX                        | all zeros                    |
| TCM equals `TCM_OLD`, mode was TX               | wavefront serialization   | TCM with its lowest set bit cleared |
| TCM equals `TCM_OLD`, mode was wavefront serial | work-group serialization  | TCM with its lowest set bit cleared |

With one bit cleared, exactly one of the failed work-items runs. The rest stay
masked and are handed back through `EXEC := TCM` at the commit. In
work-group serialization the top level also does three things:

* It takes a lock.
* It aborts every other wavefront that is inside a transaction. Their TCM is
  set to the lanes that entered it, and their memory and registers are
  restored.
* It refuses the `TX.Begin` of the other wavefronts (`cmd_ready_o` stays low)
  until the lock holder commits.

One work-item running alone in the work-group cannot conflict, so it always
completes.

Example with 4 work-items. Work-items 2 and 3 conflict twice:

```
attempt 1  EXEC 1111  TCM after run 0011  -> restart, EXEC := 0011
attempt 2  TCM_OLD 0011, TCM 0000 ... TCM after run 0011 -> restart
attempt 3  equal masks: wavefront serial, TCM 0001 (WI2 runs, WI3 masked)
           commit -> EXEC := 0001
attempt 4  TCM_OLD 0001, TCM 0000, TX mode, WI3 runs and commits
```
(masks are written work-item 0 first)

Nested `TX.Begin`/`TX.Commit` pairs are flattened by a depth counter.

## Inside a bank: shadow area and three-stage conflict detection

This part does the real work and is the hardest to follow. Every bank
(`lds_bank_tm`) versions its own words, and banks run in parallel.

**Layout.** A work-group that declares `N` words of variables in a bank
(`n_vars`, the same for all banks) uses rows `0..N-1` of the bank for the
variables. Row `k+N` holds the backup of row `k`. The owner of row `k` is one
byte (a work-item id, 0..255) stored at byte `k` after word `2N`: word
`2N + k/4`, byte lane `k % 4`. Finding the backup and the owner therefore only
takes two additions, and every variable has a backup slot, so the shadow area
can never overflow. A valid bit per row, kept in flip-flops, tells whether a
shadow entry is in use. The owner byte has no spare code for "none".

```
row 0      +---------------------+
           | variables  (N words)|
row N      +---------------------+
           | backups    (N words)|   backup(k) = row k+N
row 2N     +---------------------+
           | owner bytes (N/4 w) |   owner(k)  = byte k from row 2N
           +---------------------+
           | other space         |   plain accesses only
row 511    +---------------------+
```

N may be at most 227: 2N + ⌈N/4⌉ must fit in 512 words. Over 32 banks that is
7264 words (29,056 bytes) of transactional variables.

**Bloom signatures.** Each bank keeps one 8-bit signature for each of the 256
work-items of the work-group (`bloom_unit`, 2048 bits per bank). Reads and
writes share the same signature. A row `r` sets bit `r % 8`. The modulo hash
keeps consecutive rows on different bits. One query checks all 256 signatures
in one cycle.

**An access by work-item *w* to row *k < N* inside a transaction:**

1. *Fast detection (Bloom).*
   * Another work-item's bit is set: this is a **conflict**. The access is not
     performed, and *w* is reported and gets its TCM bit.
   * No bit is set: this is a **new access**. The bank reads the old value,
     writes it to row `k+N`, writes *w* into the owner byte, sets the valid
     bit and the Bloom bit, and then performs the access.
   * Only *w*'s own bit is set: go to stage 2.
2. *Ownership detection.* The bank reads the owner byte.
   * If it is *w* (**owner hit**), it performs the access with no versioning
     work.
   * Otherwise, or if no entry is valid, the own bit was a hash alias
     (**false owner hit**), and the access is handled as a new one.
3. *Conflict broadcast.* When an LDS instruction has finished all its lanes,
   and any lane conflicted, every bank receives the wavefront's TCM. Each bank
   then scans its owner area and, for every valid entry owned by a selected
   work-item, copies the backup back and drops the entry. The scan also clears
   those work-items' Bloom signatures. The shadow registers of the conflicted
   lanes are restored at the same time. TCM is the only broadcast medium. No
   separate conflict bus exists.

At `TX.Commit` the same scan runs in *clear* mode for the work-items that
committed. It drops their entries and signatures without copying anything
back.

A false positive in the Bloom stage, for example two rows 8 apart touched by
different work-items, is treated as a real conflict. That is the price of
checking 256 small signatures in parallel instead of reading owner records.

Plain accesses, meaning accesses outside a transaction or to rows `≥ N`, go
straight to the array.

## Timing

The bank array has a single port with synchronous read, so it does one memory
operation per cycle. The Bloom query takes one cycle. In `lds_bank_tm`, the
times from acceptance to response are:

| access                          | read | write |
|---------------------------------|------|-------|
| plain                           | 2    | 1     |
| conflict                        | 1    | 1     |
| owner hit (+ owner check)       | 3    | 2     |
| new access (+ backup, + owner)  | 3    | 4     |
| false owner hit on a valid entry| 4    | 5     |

A restore or clear scan costs 1 cycle for each owner word that has no valid
entry. A word with valid entries costs 2 cycles in clear mode, or 3 + 2 per
restored entry in restore mode. One more cycle ends the scan. All banks scan
in parallel, and the top waits for the slowest one.

In the top (`gpu_localtm_lds`):

* **LDS instruction.** Lanes are spread over rounds. Each round gives every
  bank at most one lane (the lowest pending lane; coalesced accesses finish in
  one round). A round lasts as long as its slowest bank. If any lane
  conflicted, one broadcast restore scan follows.
* **`TX.Begin`.** It answers 2 cycles after acceptance. The register backup
  happens in the accepting cycle. When the begin enters work-group
  serialization, the restore scan for the aborted wavefronts is added.
* **`TX.Commit`.** It answers after the clear scan of the committing lanes.

## Top-level interface (`gpu_localtm_lds`)

The top serves one work-group. It stands where the compute unit's LDS is and
is driven by the wavefront scheduler, which this code does not include.

* `cmd_valid_i/cmd_ready_o`, `cmd_i` (`CMD_TX_BEGIN`, `CMD_TX_COMMIT`,
  `CMD_LDS_READ`, `CMD_LDS_WRITE`), `cmd_wf_i`, `cmd_exec_i`: one command at a
  time.
* `cmd_addr_i`, `cmd_wdata_i`: one word address and one data word per lane.
  Bank = address % 32, row = address / 32.
* `resp_valid_o`: a one-cycle pulse. It comes with:
  * `resp_rdata_o`;
  * `resp_done_o`, the lanes that completed, or for a commit the lanes that
    committed;
  * `resp_conflict_o`;
  * `resp_restart_o` and `resp_exec_new_o`, which tell the scheduler to jump
    back to `TX.Begin` with the new `EXEC`.
* `tcm_o`, `mode_o`, `wg_lock_o`, `wg_lock_wf_o`: the transactional state.
  `ev_valid_o/ev_res_o` report each bank's access outcomes, for statistics.
* `vr_*`: a write port and a read port for the shadowed vector registers
  (`VREGS` per wavefront).
* `n_vars_i`: N, set by the compiler/runtime for the running kernel.

Reset is asynchronous and active low. The bank arrays are not reset.

## Files

| file | contents |
|------|----------|
| `rtl/localtm_pkg.sv` | sizes and enums (bank outcome, bank operation, mode, command) |
| `rtl/gpu_localtm_lds.sv` | top: sequencing of begin/commit/LDS instructions, broadcast, work-group lock |
| `rtl/lds_bank_tm.sv` | one bank: shadow area, three-stage detection, restore/clear scans |
| `rtl/bloom_unit.sv` | 256 × 8-bit signatures of one bank and their evaluation |
| `rtl/bank_sram.sv` | 512 × 32 single-port array with byte enables |
| `rtl/tcm_ctrl.sv` | TCM, TCM_OLD, mode and commit/restart logic of one wavefront |
| `rtl/shadow_vreg.sv` | vector registers in pairs (one-cycle backup, per-lane restore) |
| `rtl/lds_bank_sched.sv` | per-round choice of one lane per bank |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_gpu_localtm_lds` end to end |

Parameters and their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_BANKS` | 32 | LDS banks |
| `BANK_WORDS` | 512 | words per 2 KB bank |
| `WF_SIZE` | 64 | work-items per wavefront |
| `NUM_WF` | 4 | wavefronts per work-group |
| `VREGS` | 4 | vector registers per wavefront (own choice) |

Work-items per work-group (`WF_SIZE × NUM_WF`) sets both the number of Bloom
signatures and the owner id width. Keep it at 256 or below, so that ids fit
the owner byte.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and finishes. Run
them with Verilator 5 from the directory that holds `rtl/` and `tb/`. For
example, for the end-to-end test at full size:

```
verilator --binary --timing --assert -Irtl rtl/localtm_pkg.sv \
  rtl/bank_sram.sv rtl/bloom_unit.sv rtl/lds_bank_tm.sv rtl/tcm_ctrl.sv \
  rtl/shadow_vreg.sv rtl/lds_bank_sched.sv rtl/gpu_localtm_lds.sv \
  tb/tb_gpu_localtm_lds.sv --top-module tb_gpu_localtm_lds -o sim
./obj_dir/sim
```

For a single block, list the package, the block, the modules it instantiates
and its `tb/tb_<block>.sv`.

What the tests establish:

* **`tb_gpu_localtm_lds`** runs at full size in a few seconds. The test acts
  as the compute unit. Four wavefronts, interleaved one command at a time,
  run a hash-table insert. Each work-item does a read-modify-write of its
  bucket's counter, writes its id into the bucket's log word (a row that
  aliases in the Bloom hash), and writes its id into a tally word shared
  between buckets. Work-items that lose a conflict restart until all commit.
  It runs with 4 buckets and then with 1 bucket.
  * It checks that each work-item commits once, that every counter is exact
    (atomicity plus rollback), and that conflicted lanes get their registers
    back.
  * It checks the `TX.Begin` latency and that `TX.Begin` is refused under the
    work-group lock.
  * It requires every mechanism to occur: new access, owner hit, false owner
    hit, conflict, plain access, bank-serialized rounds, broadcast, a conflict
    after a completed write, restart, both serialization modes, abort, stall
    and commit clear.
* **`tb_lds_bank_tm`** compares the bank with an independent model of the
  same layout. The model covers outcome, read data, shadow contents read back
  through plain accesses, scan counts and exact cycle counts.
* **`tb_tcm_ctrl`** replays the 4-work-item example above, an escalation to
  work-group serialization, an abort and a nested transaction.
* **`tb_workload_ht`, `tb_workload_km` and `tb_workload_ga`** run the three
  evaluation workloads on the full-size top. Each one sweeps 2 to 256
  buckets, centres or solutions. The hash table checks that every id lands
  in exactly one slot of its bucket. K-means checks the exact sums and counts
  per centre. The genetic algorithm replays all committed transactions in
  commit order and requires every read to match, which checks
  serializability. Each prints the cycles, restarts and serializations per
  size. They share `tb/ltm_core_driver.svh`, a simple compute-unit driver,
  which needs `-Itb` on the Verilator command line.
* The remaining testbenches check the Bloom unit, array, scheduler and
  shadow registers against reference models.

## Choices made here, and limits

The published description fixes the bank and signature sizes, the hash, the
shadow layout, the mask rules, the serialization policy and the
one-operation-per-cycle cost model. The following choices are this
implementation's own:

* **Valid bits.** Valid bits mark shadow entries, because the owner byte
  cannot say "no owner".
* **Restore timing.** The "restore locally, then broadcast" of a conflict is
  done as one restore scan in all banks after the LDS instruction. Registers
  of conflicted lanes are restored at that point too.
* **Signature clearing.** Signatures of aborted work-items are cleared along
  with their entries. The description states this only for commit.
* **When TCM is cleared.** TCM is cleared at the retry's `TX.Begin`, as in
  the worked example of the description, not at the commit, as one sentence
  of the text suggests. Externally the two behave the same.
* **Lane choice.** Serialization keeps the lowest conflicted lane.
  Arbitration serves the lowest pending lane per bank.
* **Abort.** An abort by work-group serialization marks the aborted
  wavefront's TCM with the lanes that entered the transaction. The next retry
  does not count towards escalation, and `TX.Begin` stalls through
  `cmd_ready_o`.
* **Write cost of a new access.** A new *write* costs three extra cycles, not
  two, because the old value has to be read first.
* **Where the signatures live.** Signatures are flip-flops beside each bank
  rather than vector registers. The function is the same, but the register
  capacity they would take from kernels is not modelled.
* **Where TCM lives.** TCM is a register inside `tcm_ctrl` rather than a
  scalar register of the register file. The width (64 bits) and the
  one-per-wavefront placement are the same.
* **Command port.** The command/response port, the bank request handshake
  and the per-wavefront register count are interface choices.

Not included:

* the compute unit itself (SIMD and scalar units, instruction fetch and
  decode, the `TX.Begin`/`TX.Commit` encodings);
* the compiler's allocation of the shadow area;
* global-memory transactions, which the description leaves to future work.
