# Time-redundant checkpoint/recovery for a LEON3-class processor

A single soft processor in an SRAM FPGA on a satellite is exposed to single-event
upsets: one flipped flip-flop in the pipeline or one corrupted register can make
it write a wrong value to main memory. The usual remedy, running two or three
processors in lockstep, costs two or three times the logic. This design uses
**time** instead of copies of the hardware. The processor runs every piece of
code twice and compares the results. Only a result both runs agree on is allowed
to reach main memory. On a disagreement the piece runs a third time, and a
2-out-of-3 vote decides.

Main memory is the reference. It is assumed to be protected by its own EDAC, and
the processor runs with its caches disabled. So a result is only "committed" when
it is written to main memory. Everything the processor holds before that write
can be thrown away and recomputed. The hardware therefore:

* takes a **checkpoint** of the processor state after every committed main-memory
  write;
* splits the program into **slices**, each ending at the next main-memory write;
* runs each slice, **rolls back** to the checkpoint, and runs it again.

## The slice sequence

The controller (`cr_control`) watches the processor's bus port and steers the
**write mux** (`write_mux`) that sits between the processor and the bus.

| Run | What happens to the slice's write | Next |
|---|---|---|
| RUN1 | Acknowledged locally but never put on the bus (BLOCK). Its (address, data) pair is saved in slot 0. | Rollback, then RUN2 |
| RUN2, same pair as slot 0 | Passed to the bus (PASS). | Checkpoint, next slice in RUN1 |
| RUN2, different pair | Saved in slot 1 and blocked. | Rollback, then RUN3 |
| RUN3, pair matches slot 0 or slot 1, or slots 0 and 1 agree | The majority pair is written to the bus (VOTE). | Checkpoint, next slice in RUN1 |
| RUN3, all three differ | Nothing is written. `cr_error_o` is raised and the processor stays halted. | ERROR (left only by reset) |

More details of the sequence:

* **What is compared.** The comparison and the vote are done on the whole
  64-bit (address, data) pair as one word.
* **Reads are not filtered.** Instruction fetches and loads always go through
  the mux. A slice may read memory as often as it likes. Nothing it reads changes
  between runs, because no write has reached memory since the checkpoint.
* **Held writes.** A write that shows up while a rollback is pending is held:
  it is neither acknowledged nor sent to the bus.

Without faults, every slice runs exactly twice. Each slice therefore has one
rollback and one checkpoint. This is the price of the scheme: the run time roughly
doubles. The original LEON3 implementation measured 105–113 % extra time on small
benchmarks, on top of the slowdown from running without caches.

## What a checkpoint contains and how a rollback restores it

The processor state has two parts, and each is saved in a different way.

**Pipeline and bus-interface state (`cr_data`).**

* This is every flip-flop of the integer unit's pipeline plus the cache/AHB
  controller state machines: 2502 + 323 + 830 + 34 = **3689 bits** in the LEON3
  configuration used.
* The processor exports this state as one vector (`proc_state_i`).
* `cr_data` copies the vector into a shadow register, one cycle after a write
  commits. The first checkpoint is taken in the first cycle after reset.
* On a rollback, `proc_restore_o` is high for one cycle. The processor then loads
  `proc_ckpt_state_o` back into its registers.

**Register file (`rf_ckpt_unit`, `ckpt_stack`, `regfile_4p`).** Copying the whole
windowed register file at every checkpoint would cost far more storage. Instead,
the unit keeps an undo log:

* The register file has a **fourth read port**. Its address is tied to the write
  address, so in the cycle of each register write it delivers the value about to
  be overwritten.
* The unit pushes that (8-bit address, 32-bit old value) pair onto a
  **64-entry stack**.
* A checkpoint flushes the stack in one cycle. If a register write happens in the
  checkpoint cycle itself, it belongs to the new slice and stays as the only entry.
* A rollback pops the stack one entry per cycle and writes each old value back,
  newest first. When a register was written several times, its oldest saved value
  is written last, so that is the value that stays.

**Rollback timing.**

* The controller first asks the **AHB stopper** for the bus (STOP), then waits for
  the grant.
* It then restores the pipeline in one cycle (REC_PIPE). The stack unwind starts in
  that same cycle.
* It stays in REC_RF until the stack is empty.

A rollback with N saved registers therefore takes **1 + N cycles after the stopper
has the bus**, plus the arbitration latency. The testbenches check this exact count.
For comparison, the original implementation reported an average of about 17 cycles
per rollback, with 7–8 registers saved.

**Overflow.** If a slice writes more than 64 registers without a main-memory write,
a push finds the stack full:

* the entry is lost, so the slice can no longer be undone;
* the unit records a sticky overflow flag;
* the controller goes to ERROR.

This is a policy chosen for this RTL. Real code rarely comes close to the limit:
typical slices write fewer than ten registers.

## Halting the processor: the AHB stopper

The rollback must not race with a running pipeline. `ahb_stopper` is a second AHB
master on the same bus:

* While the controller holds `stop_req`, the stopper asserts HBUSREQ and HLOCK and
  presents a write request.
* Once the arbiter grants it (HGRANT with HREADY), it reports `stop_grtd` and keeps
  the bus locked.
* While it owns the bus it issues only IDLE transfers (HTRANS = 00, HADDR = 0), so
  it never touches memory. Its constant HTRANS/HADDR outputs are intended.
* The processor has no caches, so it cannot fetch without the bus and simply
  stalls.
* Dropping `stop_req` releases the bus in the next cycle.

## Blocks and hierarchy

```
leon3cr_top                 system level: CR-modified leon3x + stopper
├── leon3x_cr               everything the scheme adds inside the processor wrapper
│   ├── cr_control          slice/run state machine, slots, compare, vote
│   ├── cr_data             3689-bit checkpoint register
│   ├── write_mux           HOLD / BLOCK / PASS / VOTE on the processor's writes
│   ├── rf_ckpt_unit        3-port ⇄ 4-port mux, push on write, unwind on recovery
│   ├── ckpt_stack          64 × (8 + 32)-bit LIFO with flush
│   └── regfile_4p          256 × 32 register file, 2 read + 1 write + checkpoint read
└── ahb_stopper             second AHB master that halts the processor
cr_pkg                      widths, bus and event structs, enums, vote3()
```

These parts of the LEON3 system are **not** included: the integer unit itself, the
cache/AHB controller, the AHB arbiter, the memory controller and memory, and GPIO.
They are vendor IP. `leon3cr_top` exposes all their connections as ports:

* **Pipeline state:** `proc_state_i`, `proc_ckpt_state_o` and `proc_restore_o`.
* **Register file:** the three-port register-file bus, `proc_rf_i` plus the two
  read data outputs.
* **Memory bus:** the processor's bus port (`proc_bus_i` / `proc_bus_o`) and the
  filtered bus side (`bus_req_o` / `bus_rsp_i`).
* **Stopper:** the stopper's AHB master signals, plus `stop_hgrant_i` and
  `hready_i`.
* **Status:** `cr_error_o`, `cr_state_o`, one-cycle event strobes in
  `cr_events_o` (checkpoint, rollback, match, mismatch, voted, error) and the stack
  occupancy.

Parameters on `leon3cr_top` and `leon3x_cr`:

* `STATE_BITS` is the checkpoint width, default 3689.
* `DEPTH` is the stack depth, default 64.

## Where this RTL departs from the LEON3 implementation

* **Simplified bus.** The processor-side bus is a simple request/ready interface,
  `bus_req_t` and `bus_rsp_t`. Address, write data and the write flag come together
  in one request. It stands in for the LEON3 AHB master record types. The stopper
  alone speaks AHB signal names.
* **One state vector.** The checkpoint is one flat vector, not per-unit copies
  inside the integer unit and cache controllers. The processor must provide the
  export/restore path.
* **Register file.** It has 256 entries, addressed by 8 bits, with combinational
  reads. A real LEON3 register file is smaller (its size depends on the number of
  register windows) and may be synchronous. The stack stores the full 8-bit address
  either way.
* **Choices made for this RTL:**
  * The checkpoint is taken in the cycle after the bus accepts the committed write.
  * A checkpoint is taken right after reset.
  * Writes are held during a pending rollback.
  * A stack overflow ends in ERROR.
  * The stopper uses IDLE transfers with a locked bus.
  * ERROR is left only by reset.
* **Not built:** protection of the checkpoint and stack storage against upsets,
  such as parity, ECC or signatures. The control logic and the stored checkpoint
  data are assumed fault-free.
* **Later hardening, not built:** two further steps are proposed as ways to reduce
  the failures that checkpoint recovery cannot catch. One is partial TMR on the few
  pipeline signals that halt or trap the processor at once. The other is
  parity-per-byte with duplication as EDAC on the register file. Both come from
  other work and are not part of this RTL.
* **Not part of this design:** the DMR and TMR alternatives. They detect errors on
  the bus by comparing two or three processors.

## Simulating

All testbenches are self-checking. Each prints one line
`TB_RESULT checks=N failures=M` and stops. Each has a cycle watchdog.

```
verilator --binary --timing --assert -Irtl -Itb rtl/cr_pkg.sv tb/leon3cr_top_tb.sv \
          --top-module leon3cr_top_tb -Mdir obj_top
./obj_top/Vleon3cr_top_tb
```

Replace the testbench name to run any other one. Verilator finds the other modules
through `-Irtl -Itb`.

| Testbench | What it shows |
|---|---|
| `leon3cr_top_tb` | Runs the full system at default sizes. Details below. |
| `leon3cr_workloads_tb` | Runs the four benchmark programs, with and without an upset, and reports rollback statistics. Details below. |
| `leon3x_cr_tb` | The leon3x level with a modelled stopper: the checksum runs once without a fault and once with one upset. It also checks the final register contents. |
| `cr_control_tb` | Directed slices: block, rollback, pass, mismatch, both vote outcomes, triple mismatch, overflow, a held write, and exact rollback cycle counts. |
| `rf_ckpt_unit_tb` | Random register writes, then checkpoints and recoveries. The register file is compared with a reference copy taken at the checkpoint, and unwind cycles are counted. |
| `ckpt_stack_tb`, `regfile_4p_tb`, `cr_data_tb`, `write_mux_tb`, `ahb_stopper_tb` | Random and directed unit tests against reference models. |

**What `leon3cr_top_tb` does.** It runs the full system at default sizes, using
`tb/cpu_model.sv`. That file is a small behavioural processor, not a LEON3. It
exports its pipeline state and runs built-in programs:

* an XOR checksum of a 67-character NMEA sentence, run 5 times;
* a basic arithmetic loop;
* a loop that writes registers without storing, to trigger an overflow.

The testbench supplies the memory, with random wait states, and a priority
arbiter. It injects upsets into the processor's store pipeline register and into
the register file. Every bus write is compared, in order, with the value the
program must produce. Each rollback is checked to last 1 + N cycles, and the
stopper must own the bus in every recovery cycle. The testbench
counts every mechanism: checkpoints, rollbacks, matches, mismatches, votes, errors,
overflows, held writes, wait states, unwinds and stopper grants. A mechanism that
never happens counts as a failure.

**What `leon3cr_workloads_tb` does.** It runs four small benchmark programs on the
behavioural processor, through `leon3cr_top` at default sizes. Each program runs
once without a fault and once with one upset in a random slice. It prints the
measured averages below. In the cycle counts:

* 1 cycle is the blocked write;
* 4 cycles are stopper arbitration with the testbench's registered arbiter;
* the rest is 1 + N for N saved registers.

| Workload | Slices | Saved registers per rollback | Cycles per rollback |
|---|---|---|---|
| basic: (a+b)-(c+d), 50 times | 50 | 11.02 | 17.02 |
| bsort: 10 elements sorted in memory, 5 times | 516 | 4.30 | 10.30 |
| nmea: XOR checksum of a 67-character sentence, 5 times | 351 | 3.95 | 9.95 |
| hamming: Hamming(7,4) encoding by matrix product, 5 times | 226 | 8.22 | 14.22 |

The same programs compiled for a real LEON3 saved 7–8 registers and took 16–19 cycles
per rollback. These numbers depend on the instruction mix of the processor, not on this
RTL. The 64-entry stack is far from full in every case.

At the end, the testbench runs an upset campaign. The nmea program is run 200 times.
In each run, one random bit of the processor state is inverted at a random cycle.
The state bits are halted, phase, pc, store address and store data. Typical results,
depending on the seed:

| Outcome | Share of the 200 runs |
|---|---|
| Correct (masked) | 78–86 % |
| Detected and recovered by the vote | 11–15 % |
| Hang | 2–8 % |
| Wrong value written | 0–1 % |

**What causes the two bad outcomes.**

* **Hang.** An upset of the pc or of the halted bit can stop the processor, or
  send it into a loop, before its next memory write. No comparison ever happens.
  Nothing in the scheme bounds the length of a slice, so a watchdog timer would be
  needed to catch this.
* **Wrong value written.** An upset can hit while a write that has already matched
  is waiting for the bus. If it lands between that comparison and the checkpoint
  that follows, the corrupted state is saved as good. Both runs of the next slice
  then agree on a wrong result.

In the campaign, every upset in the store address/data registers must be masked or
recovered. The testbench checks this.

Fault injection in the testbenches works in two ways:

* `cpu_model` XORs a mask into its state (`seu_i`, `seu_mask_i`);
* the testbench inverts a bit of a value on its way into the register file. This
  acts like an upset of that register right after it is written.
