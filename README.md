# VMP: a shared-bus multiprocessor with software-managed caches

VMP connects several fast processors to one shared memory over a shared
bus. Each processor has a large, virtually addressed cache. The unusual
part is who manages that cache. The hardware does not handle misses,
replacement or consistency. Software on the processor does.

On a miss, the cache refuses the reference and the processor traps to a
handler in the board's local memory. The handler:

1. translates the address;
2. asks the cache controller for the least-recently-used slot of the set;
3. writes that slot back if it is modified;
4. tells the controller to move the 128-byte block in;
5. resumes.

Consistency follows a single-writer, multiple-readers rule. A small state
machine on every board, the bus monitor, watches the bus. When another
board touches a block this board holds, the monitor either aborts the
transaction or queues an interrupt for the software, or both.

This repository holds synthesizable SystemVerilog for one VMP node:

- five processor boards with their caches, block copiers, bus monitors,
  action tables, interrupt FIFOs and local memories;
- the system bus and its arbiter;
- three proposed extensions:
  - a lock segment, served by per-board lock caches, a lock bus and a lock
    memory;
  - a memory-side consistency directory that can take over from the bus
    monitors;
  - hardware handling of simple misses: a cache directory interface (CDI)
    on each board, plus a miss sequencer that stalls the processor instead
    of trapping. The software can switch this on.

The processors (a 68020 with a 68881 FPU in the prototype) and the memory
board are not part of the RTL. Their signals are ports of the top module. A
behavioural memory model is in `tb/`.

## Node structure

```
                 vmp_system (top)
  +-----------------------------------------------------------------+
  |  proc_board 0 .. NPROC-1                                        |
  |   +-----------+  +--------------+  +--------------+             |
  |   | vmp_cache |<-| block_copier |--| action_table |<-+          |
  |   +-----------+  +--------------+  +--------------+  |          |
  |   +-----------+  +--------------+  +--------------+  |          |
  |   | local_mem |  |  intr_fifo   |<-| bus_monitor  |--+          |
  |   +-----------+  +--------------+  +--------------+             |
  |   +------------+  +-----+  +----------------------+             |
  |   | lock_cache |  | cdi |  | miss sequencer (FSM) |             |
  |   +------------+  +-----+  +----------------------+             |
  |                                                                 |
  |  bus_arbiter (system bus)     consistency_directory             |
  |  bus_arbiter (lock bus)       lock_memory                       |
  +-----------------------------------------------------------------+
        | processor ports            | memory board ports
```

| File | Role |
|---|---|
| `rtl/vmp_pkg.sv` | Shared types: bus commands, action codes, slot flags, processor and software register structs, lock bus structs |
| `rtl/vmp_system.sv` | Top: boards, system bus merge, wired-OR abort, arbiters, lock memory, directory |
| `rtl/proc_board.sv` | One board: routes references to cache, local memory or lock cache; software register view; hardware miss sequencer |
| `rtl/vmp_cache.sv` | 4-way, 128 KB, virtually addressed cache with asid in the tag; faults on miss and on writes to non-writable slots |
| `rtl/block_copier.sv` | Cache controller transfer engine: read shared/private, write back, assert ownership, notify |
| `rtl/bus_monitor.sv` | Action-table lookup of foreign transactions; abort and interrupt |
| `rtl/action_table.sv` | Two bits per physical block frame |
| `rtl/intr_fifo.sv` | 512-entry interrupt FIFO with sticky overflow |
| `rtl/bus_arbiter.sv` | Round-robin arbiter, grant held while requested |
| `rtl/local_mem.sv` | Board-private memory for the cache software |
| `rtl/lock_cache.sv` | Per-board cache of lock bits |
| `rtl/lock_memory.sv` | Home of the lock bits on the lock bus |
| `rtl/consistency_directory.sv` | N+1 bits per block frame on the memory side |
| `rtl/cdi.sv` | Cache directory interface: walks the page records in local memory for the hardware miss sequencer |

## The processor's view: references and traps

Each board has two struct ports:

- `preq`/`prsp`: the processor's memory references.
- `sreq`/`srsp`: the cache controller's registers, as the software sees
  them.

A reference (`preq.req` held high) is steered to one of three places:

- **Cache.** Answered one cycle later. `prsp.fault` says what happened:
  - `FAULT_NONE`: a hit.
  - `FAULT_MISS`: no valid slot with the same virtual tag and asid.
  - `FAULT_WRITE`: a write to a slot that is not exclusively owned.

  The processor treats a fault as a trap.
- **Local memory.** Selected by `preq.local_sel`.
- **Lock cache.** Any address in the lock segment, `LOCK_BASE` upwards.

While a block transfer is running, cache references are held with no
answer. They complete only after the transfer has finished or aborted.
This is how the retried reference after a miss synchronises with the
block move. If the transfer was aborted, the retry faults again.

The cache does not need flushing on a context switch, because the asid is
part of the tag.

Through the register port the software can:

- read and write the tag, asid and flags of any slot;
- read the LRU way of a set (`srsp.lru_way`). An invalid way is chosen
  first. The answer stays the same until the set is referenced, so a retried
  miss gets the same slot.
- start a bus transaction (`copy_go`, `copy_cmd`, `paddr`) and watch
  `copy_busy`, `copy_done` and `copy_aborted`;
- read and write the action-table entry of a frame;
- pop the interrupt FIFO and clear its overflow flag;
- allocate a lock to an address space.

`srsp.ready` goes high once the reset sweeps are done: cache tags, action
table and lock cache. `prsp.irq` is high while the FIFO is not empty or has
overflowed.

Slot flags:

| Flag | Meaning |
|---|---|
| `valid` | The slot holds a block. |
| `writable` | Exclusively owned; writes hit. |
| `modified` | Written since the move in. |
| `may_own` | The user has write permission, so software may claim ownership. |

## System bus and block transfers

All bus traffic is a transfer of one 128-byte block. It is started by the
block copier on the software's command.

| Command | Data | Purpose |
|---|---|---|
| `BUS_READ_SHARED` | 32 words from memory | Move in a read-only copy |
| `BUS_READ_PRIVATE` | 32 words from memory | Move in an exclusive copy |
| `BUS_WRITE_BACK` | 32 words to memory | Move a block out |
| `BUS_ASSERT_OWN` | none | Make a shared copy exclusive |
| `BUS_NOTIFY` | none | Signal the boards that asked to hear about a frame (address-space unmapping) |

One transaction, cycle by cycle:

1. The copier requests the bus. The arbiter grants it round-robin and keeps
   the grant while the request stays high.
2. **Address cycle.** The owner drives `bus_a`: valid, command, its board
   number and the physical address. All boards and the memory see it.
3. **Snoop cycle.** Every bus monitor, and the directory when enabled, may
   raise the wired-OR abort. The copier and the memory both sample it. An
   aborted transaction moves no data and changes nothing. The copier ends
   with `copy_aborted`, and the software retries later.
4. **Data.** Read data arrives one word per cycle after the memory's
   first-word latency. Write-back words move one per cycle while the memory
   holds `wready`.
5. **Finish.** The copier updates the slot and the action table:

   | Command | Slot | Action-table entry |
   |---|---|---|
   | Read shared / read private | tag, asid and flags installed | `SHARED` / `PRIVATE` |
   | Assert ownership | made writable | `PRIVATE` |
   | Write back | `modified` cleared | unchanged |

   `copy_done` pulses one cycle after the finish.

Cycle counts with a memory whose first word comes `L` cycles after the
snoop cycle:

| Transaction | Cycles |
|---|---|
| Move in | 6 + L + 32 |
| Write back | 38 |
| Assert ownership | 6 |
| Aborted | 5 |

The system bus carries 32 bits. The boards' bus drivers are ORed, which is
safe because only the granted board drives.

## Consistency: action table, bus monitor, interrupt FIFO

Each board keeps two bits for every physical block frame of memory:

| Entry | Foreign transaction | Monitor action |
|---|---|---|
| `ACT_PRIVATE` | read shared, read private, assert ownership, write back | abort and interrupt: software writes back and releases |
| `ACT_SHARED` | read private, assert ownership, write back | interrupt: software invalidates |
| `ACT_NOTIFY` | notify | interrupt |
| `ACT_IGNORE` | any | none |

The monitor ignores transactions issued by its own board.

Timing:

- The lookup is combinational in the address cycle.
- The abort and the FIFO push are registered. They appear in the snoop
  cycle.
- `irq` rises one cycle after the push.

An interrupt entry holds the command, the source board and the physical
address.

The FIFO has 512 entries. A push into a full FIFO is dropped and sets a
sticky overflow flag. Overflow is a signal to the software that it must
write back all modified blocks and invalidate the whole cache, because a
lost entry might have been an unmapping notice.

A block the board has replaced may leave a stale action entry behind. The
software clears it on demand when an interrupt arrives for a block it no
longer holds.

## Lock segment: lock cache, lock bus, lock memory

The lock segment is a range of single-bit locks, one per byte address, at
`LOCK_BASE = 0xFFFF_F000` (4096 locks). Each lock belongs to an address
space.

| Processor access | Lock operation |
|---|---|
| Read | test |
| Read-modify-write (`preq.rmw`) | test-and-set |
| Write | clear |

The answer is returned in `prsp.rdata[0]`. Using a lock from the wrong
address space gives `FAULT_LOCK`.

The lock cache (direct mapped, 256 entries) answers as much as it can
itself:

- **Test that misses.** Answers 1 ("held") at once and fetches the lock
  over the lock bus in the background. The processor never sees a lock
  miss. A spinning processor simply finds the copy on its next test.
- **Test-and-set of a lock whose copy is set.** Answers 1 locally. Spinning
  on a held lock costs no bus traffic.
- **All other operations.** Go to the lock memory, and the processor waits.
  This covers test-and-set of a free or uncached lock, clear, and
  allocation.

The lock memory performs each operation atomically. It replies one cycle
later, and the reply is broadcast to all lock caches. Every cache that
holds a copy of the changed lock updates it. After one board clears a lock,
the others see it free without a miss.

Allocation is a software register command (`sreq.lock_alloc`). It gives the
lock to an asid and clears it.

The lock bus has its own round-robin arbiter. It shares nothing with the
system bus.

## Memory-side consistency directory

The directory is the proposed alternative to per-board action tables. It
sits with the memory and keeps N+1 bits per block frame:

- one bit: exclusive or shared;
- N bits: one per board, saying which boards hold a copy.

`N` is 15.

With `dir_mode = 1`, the boards' bus monitors are switched off. The
directory checks every address phase, with `s` as the requesting board:

| Transaction | Another board owns the block exclusively | Otherwise |
|---|---|---|
| Read shared | abort; interrupt the owner | add `s` as a holder |
| Read private / assert ownership | abort; interrupt the owner | interrupt the other holders; `s` becomes exclusive owner |
| Write back | abort; interrupt the owner | interrupt the other holders; `s` stays a shared holder |
| Notify | n/a | interrupt every other holder |

The abort and the interrupt appear in the snoop cycle, exactly like the
monitors'. Interrupts go only to boards in the mask. They enter those
boards' normal interrupt FIFOs, so the software handles them the same way.

Change `dir_mode` only while the bus is idle and the caches hold nothing
that the directory has not seen.

## Hardware handling of simple misses

A simple miss is one where the software's cache directory already knows the
block's physical address and the replacement slot is not modified. Setting
`sreq.hw_miss` lets the board handle such misses itself. The processor
stalls (no `ack`) instead of trapping.

On a miss, the board's miss sequencer:

1. takes the LRU slot of the set. If that slot is modified, it traps as
   before, because the write-back address is unknown to the hardware.
2. clears the slot's tag. It also asks the CDI to remove the slot from the
   page record that owned it.
3. asks the CDI to translate the virtual address. If there is no record,
   or it is a write without write permission, it traps.
4. starts a read shared (read private for a write) into the slot. Meanwhile
   the CDI records the new slot in the page record and in the slot map.
5. releases the processor once both are done. If the transfer was aborted,
   it waits `RETRY_WAIT` cycles and starts again from step 1. If this board
   has consistency interrupts queued, it traps instead: those interrupts
   are served only by the software. Without that rule, two stalled boards
   could each wait forever for the other to write a block back.

A write to a shared copy whose `may_own` flag is set goes to the same
sequencer. It translates the address and then asserts ownership. If the
claim is aborted, it traps. It also traps while consistency interrupts are
queued on the board. One of them may be the invalidation of this very copy,
and claiming a stale copy would silently lose another board's write. The
software's write-fault handler must follow the same rule: serve the FIFO
first, then claim ownership only if the copy is still there.

The CDI reads and writes the software's data structures in local memory.
These are word addresses, and the layout is this design's choice:

| Structure | Where | Contents |
|---|---|---|
| Hash table | `HT_BASE + h`, `h = vpn ^ (asid << 2)` mod 1024 | address of the first page record, 0 = empty |
| Page record +0 | anywhere | `{2'b0, asid, vpn[21:0]}` |
| Page record +1 | | `{physical page[31:10], 9'b0, write permission}` |
| Page record +2 | | next record in the chain, 0 = end |
| Page record +3..+10 | | one word per 128-byte block of the 1 KB page: `{valid, 19'b0, set, way}` |
| Slot map | `SBM_BASE + set*WAYS + way` | `{valid, 12'b0, block, record address}` |

A walk stops after `MAX_CHAIN` = 8 records. A translation that hits the
first record takes 8 cycles, and each further record adds 4. The old
slot's action-table entry is not cleared. When an interrupt arrives for a
block the board no longer holds, the interrupt handler clears that entry.
Empty page records are not freed by the hardware. Local memory is not
cleared at reset. The software must zero the hash table and the slot map
before it sets `hw_miss`.

`prsp` stays quiet for the whole sequence. The counters `n_hw_miss` and
`n_hw_trap` on the top count misses served and misses handed back to
software.

## Parameters

Defaults are those of the prototype where it gives them:

| Parameter | Default | Notes |
|---|---|---|
| `NPROC` | 5 | Boards per node; the prototype plan is 5-processor nodes |
| `SETS` × `WAYS` × `BLOCK_WORDS` | 256 × 4 × 32 | 128 KB, 4-way, 128-byte blocks; `SETS=1024` gives the 512 KB caches used in the trace studies |
| `FIFO_DEPTH` | 512 | |
| `DIR_N` | 15 | |
| `FRAMES` | 65536 | 8 MB of memory; own assumption |
| `LM_WORDS` | 65536 | 256 KB local memory; own assumption |
| `LC_ENTRIES` | 256 | Own assumption |
| `LOCKS` | 4096 | Own assumption |
| `RETRY_WAIT` | 16 | Cycles before a hardware miss is retried after an abort; own assumption |
| CDI `HT_ENTRIES`, `MAX_CHAIN`, `PAGE_W` | 1024, 8, 10 | Own assumptions |

At the defaults the node synthesizes to about 3000 cells plus about
17 Mbit of memory arrays. Most of that is the five action tables and the
directory, each sized by physical memory.

## Where this RTL departs from, or goes beyond, the described machine

These parts are this design's own choices:

- the cycle plan of the bus;
- the 32-bit data path;
- every encoding;
- the register-struct view of the cache controller, which stands in for
  the memory-mapped registers the software uses;
- the round-robin arbitration.

**Lock bus.** The lock bus protocol was left open in the description. The
lock memory as the home of the lock values, and the local answer to a
test-and-set on a held copy, are choices made here.

**Directory.** The directory's rules beyond the read-private case follow
the single-writer rule of the bus monitor.

**Hardware misses.** Two things here are this design's own choices. The
first is how the page records are laid out. The second is the order of the
sequencer's steps within the described sequence. The CDI is also used to
find the physical address for an ownership claim, because the cache keeps
only virtual tags. The description lets that case go without the CDI.

**Not built.** The processor, the FPU and the memory board are outside the RTL.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one:

- prints `TB_RESULT checks=N failures=M`;
- has a watchdog.

The testbenches that need a system memory use `tb/vme_mem_model.sv`. This
is a sequential-access memory model in which every word starts as
`addr * 0x9E3779B9 ^ 0x5A5A0F0F`, so expected data can be computed.

Example, the full node at default size:

```
verilator --binary --timing -Irtl -Itb --top-module tb_vmp_system \
    rtl/vmp_pkg.sv tb/tb_vmp_system.sv
./obj_dir/Vtb_vmp_system
```

`tb_vmp_system` plays the five processors and their miss and interrupt
handlers. It counts each mechanism and fails if any of them never happens:

- misses and write faults;
- move in and write back, including the write back of a modified victim on
  replacement;
- ownership claims;
- aborts and retries;
- invalidation and downgrade interrupts;
- notify;
- FIFO overflow;
- bus contention between two boards;
- a processor held during a transfer;
- lock acquisition, local spinning, background lock fetch, lock update
  broadcast and lock protection;
- directory aborts and directory interrupts;
- misses served in hardware, including an ownership claim, and a miss
  handed back to software.

It runs in well under a second.

`tb_workload` is a synthetic parallel workload at default sizes. Four
boards each run a reference stream with locality:

- 25 % of references go to 8 KB of shared data, the rest to 64 KB of
  private data crowded onto 32 sets;
- 30 % of references are writes.

The testbench plays each board's cache software in its own process. The
run has three phases:

1. every miss traps to the software;
2. the page records are built and simple misses are handled in hardware;
3. one board copies physical pages block by block through one cache slot
   while other caches still own the source and destination blocks. The
   owned transfers are aborted and retried.

It checks:

- every read returns a value that was written to that word, or the
  initial contents;
- a board reads back its own last write;
- after a final write-back, memory holds the last value written to every
  word.

Each trap or interrupt is charged 100 cycles of handler overhead. With
that charge, one typical run gives:

| Phase | Misses | Cycles per reference |
|---|---|---|
| Software handling | 2352 | 37.6 |
| Hardware handling (1741 misses served without a trap, 560 trapped) | | 31.0 |

The reference streams are synthetic. They stand in for the multiprocessor
trace studies but do not reproduce them. The caches are the 128 KB default
rather than the 512 KB of those studies, which needs `SETS=1024`. The
100-cycle trap charge is a model of processor state saving, not a
measurement. Run it the same way as `tb_vmp_system`, with
`--top-module tb_workload` and `tb/tb_workload.sv`.
