# Event Queue and asynchronous event handling for a multithreaded node

A conventional processor handles an event (a TLB miss, a block-status miss, a
message arrival) *synchronously*: it stops the faulting thread, cancels the
instructions behind it, switches context to a handler and switches back. The
cost is tens to hundreds of cycles per event and grows with pipeline depth and
width.

This design supports the *asynchronous* alternative used on the M-Machine's
Multi-ALU Processor (MAP). When hardware detects an event it does not
interrupt anyone. It writes a small **event packet** into an **Event Queue
(EQ)**. A dedicated **event thread**, one of the system threads on cluster 0,
takes packets from the queue and resolves them while user threads keep issuing
on the same cluster. The handler sleeps while the queue is empty and wakes as
soon as a word arrives. When the queue gets close to full, every cluster stops
issuing user operations, so no new events can appear until the handler has
caught up.

The RTL covers three things:

- the Event Queue Unit, with its datapath and four control submodules;
- the per-cluster dynamic scheduler that turns `event_av` and `wmark` into
  issue decisions and produces the queue `pop`;
- a top level that wires one EQ to the four cluster schedulers.

## Event packets

An event packet has one to four 66-bit words. Each word is 65 data bits plus
one memory synchronization bit. Word 0 carries the faulting operation and, in
its four low bits, the **event type**. The handler uses the event type to know
how many more words to dequeue. Words 1 to 3, when present, are:

1. the memory address;
2. the operation data;
3. the address of the target register, which is mapped into memory.

`eq_pkg` defines `eq_word_t` and `event_word0_t`. The hardware does not look
inside the words. The mapping from event type to packet length belongs to the
handler software. The testbench uses `length = event_type[1:0] + 1`.

Packets arrive over the C-Switch, the inter-cluster crossbar, one word per
cycle in a burst. The C-Switch serializes all writers: the External Memory
Interface, the configuration space controller and the caches. So the EQ needs
no arbitration. A word is for the EQ when `csw.dav` is high,
`csw.tslot == 6` and `csw.xfr_type == XFR_QUEUE`.

## The read handshake (pop and undo)

This is the least obvious part of the design. The handler reads the queue by
naming a register that is mapped to the front of the queue. Reading the word
and deciding to keep it happen in different pipeline stages:

- `qdata` always shows the front word. It is a combinational read of the
  register file at the read pointer.
- The SZ (issue) stage of cluster 0 pulses **`pop`** when it issues the read.
  The read pointer moves at the next rising edge, so the next word is on
  `qdata` one cycle later. A pop on an empty queue is ignored.
- If the EX stage then cannot use the word, it raises **`undo`** in the
  *very next* cycle. The read pointer steps back one entry and the word is at
  the front again. This works because a popped word is never moved or
  cleared. Its slot is also not handed to a writer during that one-cycle
  window: the occupancy counter treats it as taken (`hold`).
- `event_av` is high while the queue holds at least one word. It rises in the
  cycle after the clock edge that writes the first word into an empty queue.

```
cycle        0     1     2     3     4     5     6
csw word     w0    w1
event_av     0     1     1     1     0     1     0
qdata        -     w0    w0    w1    -     w1    -
pop                      1     1           1
undo                                 1
```

In this sequence, w0 is popped and consumed. w1 is popped and returned with
undo. During the undo cycle the queue is empty, so `event_av` is low. w1 is
available again one cycle later and is popped again.

There are two handshake rules, checked by assertions in `eq_maincontrol`:

- undo may only come in the cycle right after a pop that was taken;
- pop and undo are never raised in the same cycle.

## Watermark and stall

`eq_qcount` counts the words in the queue:

- +1 for each write;
- −1 for each pop;
- +1 for each undo.

`wmark` is high while the count is **at or above** the watermark register. It
drops as soon as the count falls below the register again. There is a single
threshold, with no separate low watermark.

`wmark` goes to the scheduler of all four clusters. While it is high, no user
thread issues, so no new events are created. Events already in flight still
arrive. The headroom between the watermark and 192 entries must cover them.

The watermark resets to 160, which leaves 32 words (eight full packets) of
headroom. It can be reloaded through a small scan chain:

- hold `diag_shift` high for 8 clocks;
- present the new value on `diag_si`, least significant bit first;
- the old value comes out on `diag_so`.

If a word does arrive when no slot is free, it is dropped. The watermark is
meant to keep that from ever happening.

## Dynamic scheduler

Each cluster has six thread slots:

- slots 0-3 hold user V-Threads;
- slots 4-5 hold system V-Threads;
- slot 4 holds the event thread.

Every cycle the scheduler issues at most one slot. A slot is *eligible* when
`thread_ready` is set for it, with two extra rules:

- user slots are not eligible while `wmark` is high;
- the event slot is not eligible while its next operation reads the queue
  (`evt_reads_queue`) and `event_av` is low. This is how the handler sleeps
  and wakes with no scheduling overhead.

There are two priority levels:

- the upper level holds the system slots and any user slot whose
  `user_hipri` bit is set;
- the lower level holds the other user slots.

The scheduler serves the upper level first. Within a level the choice is
round-robin, starting after the slot that last issued *at that level*. Each
level keeps its own pointer, and this matters. With a single shared pointer,
each handler issue would restart the user rotation at thread 0. A handler
that issues every third cycle would then starve threads 2 and 3. With
separate pointers, the cycles the handler leaves idle are spread evenly over
the user threads. Those user instructions cover the handler's long-latency
operations, which is where asynchronous handling gains over synchronous
handling.

On cluster 0, issuing the event slot with `evt_reads_queue` high produces
`pop`. The other three clusters are given `event_av = 0` and
`evt_reads_queue = 0`. They only see `wmark`.

## Module map

| file | role |
|---|---|
| `rtl/eq_pkg.sv` | sizes (192 entries, 65+1 bits, 6 slots, 4 clusters), C-Switch word, transfer-type enum, packet word 0 layout |
| `rtl/eq_regfile.sv` | 192 × 66 register file. One-hot read and write addresses. Combinational read, write on the rising edge. An all-zero write address writes nothing. |
| `rtl/eq_regcontrol.sv` | Read and write pointers. Wrap at `qsize`, step back on undo, one-hot encoding. |
| `rtl/eq_qcount.sv` | Occupancy count, `empty`, `full`, `wmark`. |
| `rtl/eq_progreg.sv` | Watermark register (scan-loadable) and hard-wired `qsize`. |
| `rtl/eq_maincontrol.sv` | C-Switch decode, pop/undo qualification, `event_av`, handshake assertions. |
| `rtl/eq_unit.sv` | The Event Queue Unit: the five modules above. |
| `rtl/dynamic_scheduler.sv` | Issue scheduler of one cluster. |
| `rtl/map_event_subsystem.sv` | Top: one `eq_unit` and four `dynamic_scheduler`s. |

Top-level ports:

- Inputs: the C-Switch word `csw`, per-cluster `thread_ready[4][6]` and
  `user_hipri[4][4]`, the cluster 0 handler's `evt_reads_queue`, and `undo`
  from the cluster 0 EX stage.
- Outputs: each cluster's issue choice (`issue_valid`, `issue_slot`), plus
  `qdata`, `event_av`, `wmark` and `pop`.

The C-Switch, the cluster pipelines, the units that detect events and the
handler software lie outside the RTL.

## Where this RTL departs from, or adds to, the original design

- **Single clock edge.** The original is a two-phase design. Its controller
  changes the register-file addresses on the falling edge, and undo is due
  before the falling edge. Here every register uses the rising edge. The
  cycle in which each signal changes is kept, and so is the rate of one word
  per cycle.
- **Widths and encodings** of the thread-slot field (3 bits) and transfer
  type (2 bits, `XFR_QUEUE = 1`) are this design's own.
- **Watermark rule.** Two descriptions of the original differ: one says
  "reaches", the other "exceeds". This RTL asserts `wmark` when the count
  reaches the watermark (≥).
- **`event_av`** depends only on the queue contents. It is not asserted early
  from the word still arriving on the C-Switch.
- **Invented details:**
  - the watermark reset value (160);
  - the scan-chain protocol;
  - dropping a word when the queue is full;
  - the one-cycle `hold` of a popped slot;
  - the slot numbering;
  - the two-level priority scheme with its per-level round-robin pointers;
  - holding *all* user issues under `wmark`. The original only says that
    operations which may cause events must not issue.
- **Not modelled:** the scheduler issues one H-Thread per cycle. It does not
  model the three operations (integer, memory, floating point) inside each
  instruction word.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/eq_pkg.sv tb/tb_map_event_subsystem.sv --top-module tb_map_event_subsystem
./obj_dir/Vtb_map_event_subsystem
```

Replace the testbench name to run another one:

- `tb_eq_regfile`
- `tb_eq_regcontrol`
- `tb_eq_qcount`
- `tb_eq_progreg`
- `tb_eq_maincontrol`
- `tb_eq_unit`
- `tb_dynamic_scheduler`
- `tb_bsm_event_workload`

All testbenches run at the default sizes (192 entries) in seconds.

What the tests cover:

- **`tb_eq_unit`** replays the handshake table above cycle by cycle. It checks
  that foreign C-Switch traffic and empty pops are ignored. It then runs
  random traffic against a reference queue: filling to the top, dropping
  words, undo, and pointer wrap-around. Finally it loads a watermark of 20
  through the scan chain and checks where `wmark` rises and falls.
- **`tb_map_event_subsystem`** runs the whole path for 30,000 cycles:
  - user issues on four clusters create packets, which reach the C-Switch
    six cycles later;
  - a handler model on cluster 0 reads packets by event type, sometimes
    returns a word with undo, and runs routines of random length;
  - every consumed word is compared, in order, with the words sent;
  - each cycle it checks that no user thread issues under `wmark`, that pops
    happen only with `event_av`, and that `event_av` follows the first word
    into an empty queue by one cycle.

  It counts and requires each mechanism to occur: the wmark stall, the handler
  sleeping and waking, undo, a raised-priority user thread, ignored traffic,
  queue wrap-around, and all four packet lengths.

- **`tb_bsm_event_workload`** replays one block-status-miss event on the
  reference timeline. The faulting store is in EX at cycle 0. The four-word
  packet is written from cycle 6. `event_av` is high at cycle 7, and the
  sleeping handler pops word 0 in that same cycle, then words 1 to 3 on
  cycles 8 to 10. The handler then runs until cycle 879, ready in 36% of its
  cycles, while four user threads are always ready.

  The test checks that cluster 0 issues in every cycle. It measures 317
  handler issues in 872 cycles, with 139, 139, 138 and 139 issues for the
  four user threads.

To change the queue size, set `DEPTH` on `eq_unit` or `map_event_subsystem`.
The watermark default follows as `DEPTH - 32`, and every width is derived
from `DEPTH`.
