# Per-entry proactive NBTI recovery for RS, ROB and register files

PMOS transistors age under negative bias temperature instability (NBTI):
while a PMOS gate sits at logic 0 its threshold voltage creeps up, and a
storage cell eventually loses its read stability. Holding the gate at 1
only heals the damage weakly. Recovery is much stronger when the source is
also pulled to ground, so that the gate-to-source voltage is positive. In
an SRAM-style cell this means pulling down a virtual Vdd rail, which
destroys the stored value.

The busiest storage in an out-of-order core is the reservation stations
(RS), the reorder buffer (ROB) and the physical register files (PR). These
structures are never idle as a whole, so they cannot be recovered a bank at
a time, and there is no spare copy to hold their contents. Their
*individual entries*, however, are free for much of the time. This design
power-gates each free entry on its own. When an entry is released and
enough other entries are ready, its virtual Vdd rail is pulled to ground
and it recovers until it is needed again. A small controller per structure
wakes recovered entries up early enough that dispatch rarely stalls.

The RTL covers the recovery controller for all five structures of a
4-issue core: integer RS, FP RS, ROB, integer PR file and FP PR file. It
also contains the dispatch resource check that takes entries from them, and
a behavioural model of the power-gated entry storage.

## Entry states and their timing

This is the part to understand first. Every entry is in one of three
steady states:

| state      | meaning                                              | rail |
|------------|------------------------------------------------------|------|
| `BUSY`     | allocated to an instruction                          | up   |
| `READY`    | free and powered; can be allocated this cycle        | up   |
| `INACTIVE` | free, rail at ground, recovering; content destroyed  | down |

Two transient states, `ENTERING` and `EXITING`, cover the way into and out
of recovery. The latencies are fixed by the scheme's circuit numbers. At
2 GHz, one cycle is enough to drive a single entry's rail (130 ps for a
64-bit entry, 150 ps for a 256-bit one). The power-down decision takes 2
cycles and the wake-up decision takes 1.

```
release cycle t, keep ready:   BUSY(t) -> READY(t+1)                       no overhead
release cycle t, recover:      BUSY(t) -> ENTERING(t+1, t+2) -> INACTIVE(t+3)
                               rail enable drops in t+2 (rail falls), down from t+3
wake-up decided in cycle t:    INACTIVE(t) -> EXITING(t+1) -> READY(t+2)
                               rail enable rises in t+1
allocation in cycle t:         READY(t) -> BUSY(t+1)
```

So entering recovery costs 3 cycles and leaving it costs 2. A release that
stays ready costs nothing. The ready-or-recover choice is made in the
release cycle itself, and the entry spends the second decision cycle in
`ENTERING`. The original description gives both a 2-cycle power-down
decision and a zero-cost busy-to-ready transition. Making the choice in the
release cycle keeps both true.

`entry_state_ctrl` holds one state machine and a 2-bit timer per entry. It
also drives the per-entry rail enable `vdd_en`. Assertions check that
every command fits the entry's state: allocate only `READY`, release only
`BUSY`, wake only `INACTIVE`.

## Automatic bit flipping

A 6T cell has two cross-coupled PMOS transistors, and each can get its own
virtual Vdd rail. If the cell holds 0 and the rail of the left PMOS is
pulled down, the cell flips to 1 and stays there. The left PMOS then
recovers whatever the entry held before. So no aligning write is needed
before recovery, and no backup either, because only free entries are ever
powered down. `vvdd_entry_array` models this behaviour:

- The rail follows `vdd_en` one clock later (`rail_up`).
- While the rail is down, every bit of the entry becomes 1.
- Writes to an entry whose rail is down are dropped.

An entry that comes back from recovery therefore reads all ones until it is
written. This file is a behavioural model of a custom array. A real
implementation would use an SRAM-style macro with separate rails and a
2- or 3-stage buffer per entry.

## The controller of one structure (`nbti_fu`)

```
            deallocate                       power down
  entries ─────────────► idle_detect ─► power_down_logic ──────────┐
     ▲                                      │   ▲                  ▼
     │                                n_to_ready ready_cnt   entry_state_ctrl ─► vdd_en ─► vvdd_entry_array
     │                                      ▼   │                  ▲
     │                              ready_count_tracker            │ power on
     │                                      │ wake_n (Wakeup N)    │
     │                                      ▼                      │
     │                               wake_up_logic (inactive ptr) ─┘
     │   grants
     └────────── rr_allocator ◄── n_req from dispatch_check
```

- **`idle_detect`**: one AND gate per entry. An RS or ROB entry is
  released when its busy bit, kept by the host, is clear. The host clears
  that bit after execution for the RS and after commit for the ROB. A
  physical register is released when three things hold: the RAT no longer
  references it, no reader is pending, and no unresolved branch protects
  it.
- **`power_down_logic`**: the count it works from is the tracker's count
  minus this cycle's allocations. Squashed releases come first. They always
  stay ready, because the correct path will most likely reuse them at
  once. Then each ordinary release, in index order, stays ready while the
  running count is below `THRESH`. The rest go to recovery.
- **`ready_count_tracker`**: an up/down counter. It counts down for
  allocations and up for releases left ready and for wake-up commands.
  An entry counts as ready from its wake-up command, so one shortfall is
  never answered twice. When the projected count is below `THRESH`, it
  asks for the missing number of entries (`wake_n`, at most `MAX_WAKE` per
  cycle).
- **`wake_up_logic`**: keeps an inactive pointer. It powers on the first
  `wake_n` inactive entries found from the pointer in circular order. Then
  it moves the pointer past the last entry woken. Allocation runs round
  the structure in circular order, so the inactive entries form runs and
  the search is short in practice.
- **`rr_allocator`**: grants up to `W` ready entries a cycle in
  round-robin order. This spreads busy time, and so recovery time, evenly
  over all entries. It reports how many it can grant (`avail`), and the
  dispatcher takes `n_req <= avail`.

The threshold is three times the issue width: 12 ready entries per
structure for a 4-issue core. Waking an entry takes 2 cycles. So the
threshold covers about three cycles of full-rate allocation while more
entries are woken. An assertion checks that the tracker's counter always
equals the number of entries that are `READY` or `EXITING`.

## Top level (`nbti_recovery_top`)

| unit  | entries | bits/entry | release rule                           |
|-------|---------|-----------:|----------------------------------------|
| `irs` | 60      | 256        | busy bit clear (after execution)       |
| `frs` | 60      | 256        | busy bit clear (after execution)       |
| `rob` | 128     | 64         | busy bit clear (after commit)          |
| `ipr` | 128     | 64         | not in RAT, no reader, no open branch  |
| `fpr` | 128     | 64         | not in RAT, no reader, no open branch  |

Each unit has 4 read and 2 write ports, the port count of the register
entry whose rail timing was characterised. `dispatch_check` admits up to 4
instructions a cycle, in order. An instruction needs a ROB entry, an entry
in the RS of its class and, if it writes a register, a PR of its class.
Dispatch stops at the first instruction that does not fit (`stall`), and
nothing is allocated for the instructions behind it. For each dispatched
instruction the top returns the ROB, RS and PR entry it received. These
entries become `BUSY` in the next cycle.

### What the host must do

- Set an RS/ROB entry's busy bit, or a PR's `rat_ref`, `consumer` and
  `spec` bits, from the cycle after the grant. Clear them when the entry is
  to be released. The entry is released in the first cycle in which they
  are clear.
- On a mis-speculation, clear the bits of the squashed entries and raise
  their `squash` bit in that same cycle.
- Write an entry only while it is allocated. Powered-down entries ignore
  writes.

`clk` is the only clock. `rst_n` is a synchronous, active-low reset. After
reset every entry is `READY`, every rail is up and every counter holds the
entry count.

## Parameters

| parameter                      | default    | where it comes from                      |
|--------------------------------|------------|------------------------------------------|
| `ISSUE_W` / `W`                | 4          | issue width of the target core           |
| `READY_THRESH` / `THRESH`      | 12         | three times the issue width              |
| RS / ROB / PR entries          | 60 / 128 / 128 | target core configuration            |
| RS / ROB / PR entry width      | 256 / 64 / 64  | entry sizes of the target core       |
| `RD_PORTS` / `WR_PORTS`        | 4 / 2      | characterised register entry             |
| `PD_DECIDE_CYC`, `WU_DECIDE_CYC`, `VDD_DRIVE_CYC` | 2, 1, 1 | `nbti_pkg`          |
| `MAX_WAKE`                     | 4 (= W)    | own choice                               |

## Choices made here, beyond the scheme

- The ready-or-recover choice is made in the release cycle (see above).
- When several entries are released in one cycle, they are handled in index
  order. Squashed PRs stay ready, like squashed RS and ROB entries.
- The wake-up logic keeps a single search pointer. The original
  description speaks of pointers to the first few inactive entries, moved
  up by power-down and down by power-on.
- Up to `MAX_WAKE` = 4 entries are woken per cycle. The consumer list and
  the speculation mode are each one bit per register, kept by the host.
- The state encoding, the reset state, the dispatch port format and the
  in-order dispatch prefix are all this design's own.
- The rail drivers and the SRAM cells are analog parts. They appear only
  through their timing, in `entry_state_ctrl`, and their logic effect, in
  `vvdd_entry_array`.

## Simulating

Each module has a self-checking testbench in `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/nbti_pkg.sv \
    tb/tb_nbti_recovery_top.sv --top-module tb_nbti_recovery_top -o sim
./obj_dir/sim
```

`tb_nbti_recovery_top` runs the whole design at its default size for
20,000 cycles, which takes about a second after a 15-second build. A host
model inside the testbench does the following:

- dispatches a random mix of integer and FP instructions;
- releases RS entries after a random execution time;
- retires up to 4 instructions a cycle from the ROB head, in order;
- frees registers as their references drain;
- squashes younger instructions every 211 cycles;
- stops retirement for 400 of every 1500 cycles to imitate long cache
  misses.

The testbench checks ROB data integrity from dispatch to retirement. It
checks that no entry is granted twice, that a recovered entry reads all
ones, that a release sent to recovery is `INACTIVE` exactly 3 cycles
later, and that the ready counts are consistent. It also requires each
mechanism to occur at least once in every unit: power-down, wake-up,
dispatch stall, partial dispatch, squash and release-to-ready.

`tb_nbti_fu` checks one 32-entry unit more closely:

- the 3-cycle entry into recovery and the 2-cycle exit;
- that an entry goes to recovery only when the count stays at or above
  the threshold;
- that a wake-up happens whenever the unit is short of ready entries and
  has entries to wake.

`tb_idle_profiles` shows the trade-off the threshold controls. It drives a
128-entry ROB-like unit (`rob_host_model`) with two synthetic instruction
streams. Each stream goes once to a unit with the 12-entry threshold and
once to a baseline whose threshold equals the entry count, so that the
baseline never powers anything down. The two streams give:

| stream | idle entry-cycles | share of idle spent in recovery | dispatch loss |
|--------|------------------:|--------------------------------:|--------------:|
| sparse: 0-2 instr/cycle, long idle periods     | 85 % | 88 % | 0 % |
| busy: 2-4 instr/cycle, ~12-cycle idle periods  | 32 % | 69 % | 0 % |

The shorter the idle periods, the more of them the 3-cycle entry and the
2-cycle exit eat up. While 12 entries stay ready, a 4-wide dispatcher
never waits on a wake-up in these streams. Stalls appear only when the
buffer is really full.

## Size

Coarse synthesis of the full top level gives about 75,000 word-level
cells and about 60,000 memory bits. The entry storage is 55,296 of those
bits: 2 × 60 × 256 plus 3 × 128 × 64. The per-entry state machines make up
most of the rest. The pointers and counters add about 600 flip-flops. Most of the logic
is in the circular searches of the allocators and the wake-up logic, and
in the running-count chain of the power-down logic. These are linear
scans over the entries. A faster implementation would use parallel-prefix
counting.
