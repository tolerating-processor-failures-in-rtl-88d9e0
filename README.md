# LACROSS distributed DMR pair — node-controller RTL

A logical processor is built from two cores on **different nodes** of a
distributed shared-memory machine. The *master* runs ahead. The *slave* runs the
same program a fixed number of cycles behind (550 by default). Every external
input reaches the master first. The master records the cycle in which its core
took the input and sends it to the slave. The slave's core receives the input
at exactly the same point in its own execution. With that, the two cores stay
in lock-step even though they share no clock and sit several network hops
apart.

Both cores fold their results into 16-bit fingerprints. The slave compares
them. A mismatch rolls both cores back to the slave's last checkpoint: a
shadow copy of the register file plus an undo log of overwritten cache lines.
Outputs that change system state are released only after they are covered by
a matching fingerprint. The exceptions are read-shared requests, and dirty
replies for blocks that the *validation filter* knows were written in an
already-verified interval. Those go out directly from the master.

This repository holds the node-controller side of one pair. The top is
`lacross_pair`. It has a master half, a slave half, and the two link
directions as ports. The cores, caches, directory and network are outside it.

## Timestamps and the master-to-slave lag

`timestamp_counter` keeps one timestamp per core. It advances on the core clock
enable. In the slave instance it starts after `LAG` enabled cycles. From then
on, master and slave timestamps differ by a constant. The slave halts its
timestamp along with its core while it waits for a master fingerprint (see
below), so the constant holds.

## Coordination messages and the gated delivery queue

`coord_sender` (master) hands an accepted input to the core in the same cycle.
It queues `{ts, payload}` for the slave. `gated_delivery_queue` (slave) holds
arriving messages in a small associative array. Each cycle it finds the entry
with the earliest delivery time and delivers it when the slave timestamp equals
that time, so out-of-order arrival is harmless. An entry that is already past
its time is dropped and flagged `late`; with a correctly sized lag this never
happens.

## Drift monitor

`drift_monitor` measures the slack of each arriving message: its delivery time
minus the slave's local time. Below `MARGIN` it raises `slow_req`, which a
clock generator would answer by slowing the slave (down-spread modulation). The
request is held until the slack recovers to `2*MARGIN`. The clock generator
itself is not part of this RTL; `s_slow_req` is a port.

## Fingerprints and checkpoint intervals

- `fingerprint_gen` is a CRC-16 (0x1021, preset 0xFFFF) over each retired
  result word. It exposes both the registered value and the value the current
  cycle would produce.
- `interval_ctrl` ends an interval at the `INTERVAL`-th retirement (128), at the
  `STORE_LIMIT`-th logged store (32, so the slave's log cannot overflow), or
  when an output needs the slave's corroboration. The decision is
  combinational, in the cycle of the event.
- At the end of an interval the master sends `{epoch, seq, fp}` to the slave.
  It also marks its log and the validation filter, and flash-copies its
  register file.
- `fp_checker` (slave) compares the slave's fingerprint with the oldest queued
  master fingerprint in the same cycle. A match advances the sequence number,
  flash-copies the slave's `rrf` shadow and empties the slave's `ckpt_log`. If
  the master value has not arrived, the slave core and timestamp stop until it
  does.
- An ACK or NACK goes back to the master one cycle after the comparison.

## Checkpoint: redundant register file and checkpoint log

- `rrf` is the architectural register file with a shadow copy. Checkpoint and
  restore each take one cycle. A checkpoint includes a write made in the same
  cycle.
- `ckpt_log` is a FIFO of `{block, old line}` with interval marks. It can
  release the oldest interval, release everything, or replay all live entries
  newest first, one per cycle.
- The slave log holds one interval (32 entries). The master log (256 entries,
  32 marks) holds every interval not yet acknowledged. This lets the master
  roll back to exactly the slave's checkpoint. A full master log stalls the
  master core and its timestamp until an ACK frees space.

## Recovery

- `slave_recovery` starts on a fingerprint mismatch or a mismatching output.
  It flips the recovery epoch. It then restores the shadow registers and
  replays its log in reverse. Next it streams the register checkpoint to the
  master, one register per cycle, and waits for a restart message. It resumes
  its core in the cycle its own timestamp reaches the restart time.
- An output mismatch that has no fingerprint NACK of its own sends a NACK
  explicitly.
- `master_recovery` starts on a NACK. It stops the core in that cycle and flips
  its epoch. It replays its log back to the last acknowledged interval and
  clears the validation filter. It loads the received registers, then sends
  `restart {ts+1}` and resumes in the next cycle.
- Messages from the old epoch are dropped on arrival.

## Permanent faults

`fault_monitor` runs on both sides. It declares a permanent fault after
`MISMATCH_LIMIT` (3) mismatches with no match between them, or after `TIMEOUT`
(2200) cycles of waiting with no fingerprint or acknowledgement. The member
that declares it goes **solo** (non-redundant): inputs go straight to its core
and outputs straight to the network. Hot-spare pairs are not built.

## Validation filter

`validation_filter` (master) has 64 fully associative entries of
`{block, region}`. Each interval is one region (32 regions).

- A store adds its block to the current region unless it is already there.
- An ACK clears the oldest region.
- A lookup by a dirty reply hits if the block is present in any region.
- On overflow (no free entry, or all regions in use) the filter clears itself.
  It stops logging until the next interval starts. Lookups count as hits until
  every fingerprint sent before the overflow has been acknowledged.

## Output release

- `release_ctrl` (master) sends read-shared requests, and dirty replies that
  miss the filter, straight to the network. It marks every other output (dirty
  replies that hit, exclusive reads, IO, others) for release by the slave. It
  ends the interval in the same cycle.
- Every output is forwarded to the slave.
- `output_corroborator` (slave) compares each slave output with the master's
  forwarded copy. A difference is an error that starts recovery.
- Outputs the slave must release wait in a send buffer. A fingerprint match
  makes them sendable; a mismatch drops them, because they will be produced
  again.

## Credit-debit flow control

`credit_return` (slave) reports `{free send-buffer slots, inputs delivered}`
every 32 cycles. `credit_counter` (master) computes
`free − (accepted − delivered) − RESERVE` and refuses new inputs while this is
not positive.

## Files

| file | role |
|---|---|
| `rtl/lacross_pkg.sv` | widths, message structs, output classes |
| `rtl/lacross_pair.sv` | top: one pair, links as ports |
| `rtl/lacross_master_nc.sv`, `rtl/lacross_slave_nc.sv` | the two halves |
| `rtl/timestamp_counter.sv`, `coord_sender.sv`, `gated_delivery_queue.sv`, `drift_monitor.sv` | input replication |
| `rtl/fingerprint_gen.sv`, `interval_ctrl.sv`, `fp_checker.sv`, `fault_monitor.sv` | error detection |
| `rtl/rrf.sv`, `ckpt_log.sv`, `slave_recovery.sv`, `master_recovery.sv` | checkpoint and recovery |
| `rtl/validation_filter.sv`, `release_ctrl.sv`, `output_corroborator.sv` | output release |
| `rtl/credit_counter.sv`, `credit_return.sv`, `sync_fifo.sv` | flow control, helper FIFO |
| `tb/tb_<module>.sv` | self-checking unit bench per module |
| `tb/tb_lacross_pair.sv`, `tb/tb_core_model.sv` | end-to-end bench with behavioural cores and link |
| `tb/tb_lag_sweep.sv`, `tb/tb_lag_run.sv` | the pair at 1100- and 2200-cycle lags |

## Interface assumptions

- The core side is abstracted to one input, one retirement (a 64-bit result
  word), one store (block and old 64-byte line) and one output per cycle.
  Each has a valid signal, and `core_run` gates them.
- Recovery writes old lines back through `undo_*`.
- The core keeps its registers in the pair's `rrf` through `rd_*` and `wr_*`.
- Each link direction is a set of valid/data ports. The carrying network is
  expected to deliver each message type in order, except coordination
  messages, which may overtake each other.

## Verification

Every module has a unit bench with a reference model, random stimulus and a
watchdog. `tb_lacross_pair` runs the full-size pair (no parameter overrides)
for about 48,000 cycles against two behavioural cores and a link with jitter.
It injects:

- a slave state error,
- a master state error,
- a corrupted slave output,
- stores to many distinct blocks,
- link latency close to the lag,
- an input burst,
- finally, loss of the master's fingerprints.

It checks that the slave sees every input at the master's delivery time, and
that it retires the same results and overwrites the same lines at the same
timestamps. After every recovery it checks that both halves restart from the
master's committed state at the slave's last match. It also checks that only
allowed outputs bypass the slave, and that
both halves end solo. It counts every mechanism (recoveries on both sides, log
undo, filter bypass and overflow, credit stalls, slow-down requests,
fingerprint waits) and fails if any never happens.

## Where this design goes beyond the source

The source describes the mechanisms. The following points are this
design's own choices, and a reader changing the RTL should know them:

- **Master rollback depth.** The slave keeps one checkpoint, replaced at every
  match. The master runs up to a lag plus a round trip ahead, so it must roll
  back further. Here the master's undo log keeps every store not yet
  acknowledged. After a NACK the master lands exactly on the slave's
  checkpoint. The source does not say how deep the master's log is.
- **Register hand-over.** On recovery the slave sends its restored register
  file to the master, one register per cycle, and the master loads it. The
  master then restarts from the same state as the slave, even if its own
  registers were the corrupted ones.
- **Slave waits for fingerprints.** If the slave finishes an interval before
  the master's fingerprint for it has arrived, its core and timestamp stop. The
  lag is kept because both stop together.
- **Lag actually kept.** A full master log stalls the master core and its
  timestamp together, so the slave cannot tell the stall apart from normal
  running. Meanwhile the slave runs on up to the last fingerprint it has, so
  a stall shortens the master-to-slave lag. The drift monitor keeps the slack
  above its margin but does not restore the full lag. With the 256-entry
  master log the pair holds about 1045 cycles. That is enough for the
  550-cycle default but not for a network whose minimum delay is 1100 or 2200
  cycles; those need a deeper master log.
- **Inputs after a rollback.** Inputs taken by the cores during an interval
  that is rolled back are not stored and are not delivered again. Both cores
  re-execute from the checkpoint without them, and they are expected to re-issue
  the requests that produced them. The source does not say how such inputs are
  treated.
- **Sequence numbers and epochs** on link messages let late messages from
  before a rollback be recognised and dropped.
- **Hash.** The hash is CRC-16. The source only asks for a small 16-bit hash
  of architectural updates.
- **Output mismatch.** A mismatching output starts the same recovery as a
  mismatching fingerprint.
- **Sizes.** Interval length (128 retirements), store limit (32), filter
  regions (32), queue depths, credit period, drift margin, mismatch limit (3)
  and timeout (2200 cycles, four times the lag) are assumed values. The
  filter size (64), lag (550), fingerprint width (16) and line size (64 bytes)
  come from the source.
- **Core model.** The core interface takes one retirement per cycle. The
  source's core retires up to eight per cycle. A wider core would need a
  wider fingerprint update and more log bandwidth.

`tb_lag_sweep` runs two pairs side by side at lags of 1100 and 2200 cycles
through the same kinds of events and checks, with the timeout at four times the
lag. Its drift phase brings the coordination latency close to the lag present
at that moment.

## Simulating

All files follow the one-module-per-file rule, so the simulator finds them by
name:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/lacross_pkg.sv tb/tb_lacross_pair.sv --top-module tb_lacross_pair
./obj_dir/Vtb_lacross_pair
```

Every bench ends with a line `TB_RESULT checks=<n> failures=<n>`. The pair
bench also prints how often each mechanism happened. Replace
`tb_lacross_pair` with any `tb_<module>` to run a unit bench.

## Not built

The processor core, caches, memory controller, DRAM, directory controller,
torus router, spread-spectrum clock generator and hot-spare pairs. The paper
describes these only by name or takes them from the baseline machine.
