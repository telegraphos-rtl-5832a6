# Telegraphos host interface board (HIB)

A cluster of workstations can act as a shared-memory multiprocessor if each
processor can load and store directly into the memory of the others. The
Telegraphos HIB makes this possible. It is a network interface on the
workstation's I/O bus. Each board holds part of the cluster-wide shared
memory. Every load or store that the processor issues to a shared address
becomes an operation on one of those memories, with no system call and no
interrupt:

- a store to another node's memory is sent as a packet, and the processor
  is released as soon as the board has latched it;
- a load from another node's memory holds the processor until the data
  come back.

Around this core the board adds the following mechanisms:

- **atomic operations** on any shared word: fetch-and-store,
  fetch-and-increment and compare-and-swap;
- **non-blocking remote copy**;
- **two ways of launching those operations from user code**: a global
  *special mode*, and per-application *contexts* protected by keys and
  filled through *shadow addresses*;
- **page access counters** that raise an interrupt when a remote page has
  been used often enough for the operating system to think about moving it;
- a **count of outstanding remote operations** with a fence (memory
  barrier);
- **eager update**: a page may have copies on other nodes, and every store
  to it is multicast to them;
- an **owner-based update protocol** with *pending-write counters*. It keeps
  those copies coherent when several nodes write the same word.

This repository is synthesizable SystemVerilog for one board. The board is
built at its published sizes:

| Memory | Size |
|---|---|
| Multiprocessor memory (MPM) | 16 MByte |
| Page counters | 64K pages × two 16-bit counters |
| Multicast directory | 16K entries × 32 bits |
| Link FIFOs | 2 Kbit each |

It also includes testbenches for every unit, and an end-to-end test of
three boards joined through a switch model.

## The board

```
 host I/O bus ──> tg_tc_if ──> tg_central_ctrl <──> tg_mpm            16 MByte shared memory
                                 │  │  │        <──> tg_atomic         fetch-and-store / -inc, CAS
                                 │  │  │        <──> tg_page_counters  64K x (16+16) bit
                                 │  │  │        <──> tg_multicast      16K x 32 bit lists + page modes
                                 │  │  │        <──> tg_outstanding    outstanding-operation count
                                 │  │  │        <──> tg_counter_cache  32-entry CAM of pending writes
                                 │  │  │        <──> tg_context        16 launch contexts with keys
 link in ──> tg_link_in ─────────┘  └──────────────> tg_link_out ──> link out
```

| File | Unit |
|---|---|
| `tg_pkg.sv` | Address map, register map, packet and list-entry layouts, shared types |
| `tg_hib.sv` | Top level. It wires the units together and exports the host bus, the two link ports and a few status outputs. |
| `tg_tc_if.sv` | Host bus interface. It latches one request, releases stores at once, holds loads until data return, and decodes the address. |
| `tg_central_ctrl.sv` | The sequencer that carries out every processor request and every incoming packet |
| `tg_link_in.sv`, `tg_link_out.sv` | 16-packet (2 Kbit) FIFOs to and from the network. Inbound drops misaddressed packets. Outbound stamps the sender. |
| `tg_fifo.sv` | Generic FIFO used by both link interfaces |
| `tg_mpm.sv` | 4M × 32 bit shared memory, one port, synchronous read |
| `tg_atomic.sv` | Combinational atomic unit: new value and old value of a word |
| `tg_page_counters.sv` | Read and write access counters per cluster page, with alarm |
| `tg_multicast.sv` | Linked lists of remote copies per local page, a list walker, and the page-mode bits |
| `tg_outstanding.sv` | Up/down counter of remote operations not yet completed |
| `tg_counter_cache.sv` | Content-addressable cache of non-zero pending-write counters |
| `tg_context.sv` | Argument registers and keys of the launch contexts, and the shadow-store key check |

All clocked logic uses one clock and an asynchronous active-low reset. The
reset clears control state; the memories are not cleared.

## Address map

The host sees one 32-bit byte address space. `tg_tc_if` splits it as
follows.

| Address bits | Meaning |
|---|---|
| `31 = 0` | Shared memory. `[28:24]` is the node that holds the word (up to 32 nodes). `[23:2]` is the word inside that node's 16 MByte. |
| `31 = 0, 30 = 1` | *Shadow* of the shared address in `[28:0]`. A store here does not write memory. It hands the physical address to a launch context (see below). |
| `31 = 1, 13:12 = 00` | Board registers, index in `[7:2]` |
| `31 = 1, 12 = 1` | Context registers: context `[11:8]`, field `[3:2]` (0 = operation, 1 = data 0, 2 = data 1, 3 = launch) |
| `31 = 1, 13:12 = 11` | Key of context `[11:8]`. Only the operating system should map this page. |

A page is 8 KByte (2K words). The page number inside a node therefore has
11 bits, and a cluster-wide page `{node, page}` has 16 bits. That matches
the 64K entries of the page counters exactly.

| Reg | Name | Read | Write |
|---|---|---|---|
| 0 | `SPECIAL` | `{special, op[1:0]}` | enter special mode with operation `data[1:0]` (0 fetch-and-store, 1 fetch-and-inc, 2 compare-and-swap, 3 remote copy); with `data[2]` set, leave special mode and drop the arguments |
| 1 | `LAUNCH` | launch the special operation; returns its result | – |
| 2 | `OUTSTAND` | number of outstanding remote operations | – |
| 3 | `FENCE` | returns only when nothing is outstanding | – |
| 4 | `PCNT_SEL` | – | `{is_write[16], page[15:0]}` selects a page counter |
| 5 | `PCNT_DAT` | selected counter | load selected counter |
| 6 | `IRQ` | `{pending[31], lost[30], is_write[16], page[15:0]}` | clear the alarm |
| 7 | `MC_SEL` | – | select multicast entry (14 bits) |
| 8 | `MC_DAT` | selected entry | write selected entry |
| 9 | `PMODE` | copy bit of page `MC_SEL` | `{copy[11], page[10:0]}` |
| 10 | `NODE` | this board's node number | – |

## Remote loads and stores

`tg_tc_if` latches one bus request and acknowledges a store in the next
cycle. It acknowledges a load only when central control returns its data.
A second request waits on the bus until the latch is free, so the processor
feels back-pressure only when the board is busy.

Central control decides by the node field of the address:

- **A local word** is read or written in the MPM. A local store may also
  need to be multicast; see the next sections.
- **A remote word** first decrements the page access counter of that remote
  page. Then:
  - a load sends `RD_REQ` and waits for `RD_RESP`;
  - a store sends `WR` and counts one outstanding operation, which the
    remote node's `ACK` retires. If the word's page has copies, the home
    node first multicasts the store to them, as for its own stores, and
    acknowledges afterwards. A fence therefore also covers the copies.

In the end-to-end test, a remote load holds the processor for 10 cycles
with an idle network and a one-cycle switch. A remote store releases the
processor after 1 cycle. A burst of 100 remote stores is absorbed by the
request latch and the two 16-packet FIFOs. Once these are full,
back-pressure holds the processor for the rest of the burst, and no store
is lost. Over 10000 operations with random switch hold-offs, a remote load
costs 11 cycles on average. Back-to-back remote stores cost about 3 cycles
each. That rate is set by the sending board, which updates the page access
counter (a two-cycle read-modify-write) before it sends each store.

## Packets

The network carries one 129-bit `packet_t` per transfer, with valid/ready
flow control. The board assumes the network delivers packets in order
between any pair of nodes. The owner protocol below depends on that.

| Field | Bits | Use |
|---|---|---|
| `ptype` | 4 | packet type |
| `src`, `dst` | 5 + 5 | sender (stamped by `tg_link_out`) and destination |
| `orig` | 5 | for updates: the node whose store caused it |
| `sop` | 2 | atomic operation |
| `addr` | 22 | word address at the destination |
| `addr2` | 22 | remote copy: word address at the requester |
| `data`, `data2` | 32 + 32 | value, or the two atomic arguments |

| Type | Meaning | Answer |
|---|---|---|
| `RD_REQ` / `RD_RESP` | remote load | data |
| `WR` | remote store | `ACK`, after the home has multicast it to the page's copies |
| `AT_REQ` / `AT_RESP` | atomic operation at the word's home | old value |
| `CP_REQ` / `CP_RESP` | remote copy: read at the home, write at the requester | the response retires the copy |
| `FWD` | store to a copy, sent to the page owner | retired when its own reflection returns |
| `UPDATE` | multicast update, eager or reflected | `ACK` |
| `ACK` | completion | – |

## Special operations: special mode and contexts

An atomic operation or a copy needs more arguments than one load or store
can carry. The board collects them from ordinary bus cycles, so user code
needs no system call. There are two ways to do this.

**Special mode.** This is the simple, global mechanism:

1. A store to `SPECIAL` chooses the operation and enters special mode.
2. The next shared-memory stores are not performed. Their address and data
   are latched as argument slots 0 and 1.
3. A load of `LAUNCH` starts the operation and leaves special mode.

The slots are used as follows:

| Operation | Slot 0 | Slot 1 |
|---|---|---|
| fetch-and-store | address of the word, and the value to store | – |
| fetch-and-inc | address of the word | – |
| compare-and-swap | address of the word, and the compare value | data: the swap value |
| remote copy | source word | destination word |

Atomic operations run at the word's home node: on the local MPM, or by an
`AT_REQ` packet. The launch load returns the old value.

A remote copy moves a word from any node into this node's memory. Only
the word address of slot 1 is used; its node field is ignored. The copy
returns 0 at once. It completes in the background and counts
as outstanding until its data are written, so a fence waits for it.

A sequence cut short, for example by a page fault on an argument store,
leaves the board in special mode. A `SPECIAL` store with bit 2 set returns
it to a clean state without launching anything.

Special mode belongs to the whole board. Two processes that interleave
their argument stores would corrupt each other, so it is meant for code
that cannot be interrupted.

**Contexts.** Sixteen register sets, each holding:

- an operation;
- two data words;
- two physical addresses;
- a key.

The operation and data words are written by plain stores to the context's
registers.

An address cannot be written directly. User code knows only virtual
addresses, so it stores to the *shadow* of the shared word instead. The
memory management unit translates the shadow address like the word itself.
The board therefore sees the physical address with bit 30 set. The stored
value says where that address goes:

| Bits | Use |
|---|---|
| `[31:28]` | context number |
| `[16]` | address slot |
| `[15:0]` | key |

If the key does not match the context's key, the store is dropped and
`key_rejects` counts it. Only the operating system can load a key, through
the key page, so a process can fill only contexts whose key it was given.

A load of the context's launch register starts the operation exactly as
`LAUNCH` does in special mode. Contexts need no global mode, so several
processes may use them at once.

## Page access counters

Each cluster page has a read counter and a write counter (64K × 2 × 16 bit
in one memory). Each remote load or store by the local processor
decrements the counter for that page and kind, unless it is already zero.
The decrement that takes a counter from 1 to 0 raises `irq` and latches the
page and kind in `IRQ`.

If a second counter reaches zero while the first alarm is pending, the
alarm does not change, and the `lost` bit is set. The operating system
loads the counters through `PCNT_SEL`/`PCNT_DAT`. When a page has been used
enough, it can copy the page or move it. Each counter access is a
read-modify-write that takes two cycles.

Atomic operations and copies do not decrement the counters. Only plain
remote loads and stores do.

## Multicast and coherent copies

This is the most involved part of the board.

### Eager update

A local page can have copies at any number of other nodes. `tg_multicast`
holds one linked list per page in a 16K × 32 bit memory. The entry layout
is:

| Field | Bits |
|---|---|
| `valid` | 1 |
| `last` | 1 |
| `next` | 14 |
| `node` | 5 |
| `page` | 11 |

Entry `p` (for `p` < 2K) is the head of local page `p`'s list. Further
entries are chained anywhere in the memory through `next`. The operating
system builds the lists with `MC_SEL`/`MC_DAT`.

After every local store, central control walks the page's list. For each
entry it sends one `UPDATE` with the same word offset in the copy's page,
at one destination per cycle while the link accepts. Each update counts as
outstanding until the copy's node returns an `ACK`. A fence after a store
therefore also waits until every copy has been updated.

### Why copies drift apart

Two nodes may each store to their own copy of the same word and multicast
the value. The network gives no order between the two multicasts, so node
A can end with A's value and node B with B's value, and they stay
different for good.

### Updates through the owner

Every page has one owner, the node whose list holds all copies. Each other
node marks its copy with the page-mode bit (`PMODE`). The single list entry
of a marked page names the owner and the owner's page.

A store to a marked copy is not multicast by the writer. It is sent to the
owner as `FWD`. The owner:

1. performs it on its own memory;
2. multicasts it to every copy, the writer's included, as an `UPDATE`
   tagged with the writer's node in `orig`.

A store by the owner itself, or a remote `WR` into the owner's page, is
multicast the same way, tagged with the owner's node. The owner walks a
whole list before it serves the next packet or store. All copies therefore
see the owner's order of updates, because the network keeps packets in
order per pair of nodes.

### Reading your own write

The writer must see its new value at once. So the store to a copy also
updates the local copy immediately. That creates a new risk, shown by this
sequence:

1. The processor writes 2.
2. The processor writes 3.
3. The reflected 2 comes back and overwrites the 3.
4. The processor reads the stale 2.

Updates that arrive while one of the node's own writes to the same word is
still on its way are older than that write, so they can be dropped safely.
The board keeps a count of such *pending writes* per word and applies these
rules:

1. A store to a copy updates the local word, increments the word's counter
   and sends `FWD` to the owner.
2. An `UPDATE` whose `orig` is this node is the reflection of one of its
   own writes. It is not applied, and the counter is decremented.
3. Any other `UPDATE` to a word whose counter is non-zero is not applied.
   The counter does not change.
4. Loads ignore the counters.

Each node therefore sees a subsequence of the owner's values, in the
owner's order.

### The counter cache

Only non-zero counters matter, and there are at most as many as there are
writes in flight. `tg_counter_cache` is a fully associative table:

- 32 entries, each holding a 22-bit word address and a 4-bit count;
- a first write allocates the lowest free entry;
- an entry is freed when its count returns to zero.

When the table is full, or a count is at its maximum, the store to a copy
cannot take a counter. Central control then parks the store in a *held*
slot and stops taking new bus requests. It keeps serving incoming packets,
so reflections can still arrive and free an entry. The held store is
retried ahead of anything new from the bus.

Rule 3 needs the counter lookup in the same cycle as the update, so the
CAM compares all 32 tags combinationally.

The end-to-end test plays out the two possible arrival orders of the
two-writer example at full size:

- an update that arrives before the writer's reflection is ignored;
- an update that arrives after it is applied.

In both orders, every copy ends with the owner's last value. The test also
fills the counter cache and checks that the processor stalls and then
continues.

## Completion and the fence

Fast stores are acknowledged before they are done. A processor that writes
`data` and then `flag` on two different nodes could have `flag` arrive
first. `tg_outstanding` counts every remote operation from issue to
completion:

| Operation | Completed by |
|---|---|
| `WR` | `ACK` |
| `UPDATE` | `ACK` |
| `FWD` | the writer's own reflection |
| remote copy | `CP_RESP` |

A load of `FENCE` is answered only when the count is zero. Synchronization
code issues it before releasing a lock. The count is a 16-bit register. An
assertion reports an overflow or a completion with nothing outstanding.

## Central control

`tg_central_ctrl` is a single state machine. One `always_comb` block
computes the next state and every output, and one `always_ff` block
registers them. In the idle state it picks, in this order:

1. an incoming packet;
2. a fence that can now complete;
3. a held store;
4. a new bus request.

Incoming packets go first so that replies, acknowledgements and
reflections always drain, even while the processor is stalled on a load, a
fence or the counter cache.

| States | Work |
|---|---|
| `S_PKT_RD`, `S_SEND` | read the MPM for a packet, then send the reply |
| `S_MC` | walk a multicast list |
| `S_H_LRD`, `S_H_PMODE`, `S_H_PC` | local load; page-mode check before a local store; page counter before a remote access |
| `S_REG_PC`, `S_REG_PC_RSP`, `S_REG_MC` | register access to the counters and lists |
| `S_LAUNCH`, `S_LAUNCH_RD` | special operation |

Central control takes the following number of cycles:

| Operation | Cycles |
|---|---|
| local load | 3 |
| local store to a page without copies | 3 |
| acknowledgement, update, copy or load response | 1, plus its reply if any |
| remote store at its home (write, list check, `ACK`) | 2, plus 1 per copy |
| remote store issued by this board (page counter, send) | about 3 |
| each multicast destination | 1, when the link is free |

## Interfaces of the top

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `my_node` | in | 5 | this board's node number |
| `tc_valid`, `tc_we`, `tc_addr`, `tc_wdata` | in | 1, 1, 32, 32 | host request; hold until `tc_ack` |
| `tc_ack`, `tc_rdata` | out | 1, 32 | one-cycle acknowledge; load data |
| `lo_valid`, `lo_pkt` / `lo_ready` | out / in | 1, 129 / 1 | outgoing link |
| `li_valid`, `li_pkt` / `li_ready` | in / out | 1, 129 / 1 | incoming link |
| `irq` | out | 1 | page counter alarm pending |
| `special_mode` | out | 1 | special mode active |
| `outstanding`, `misrouted`, `key_rejects` | out | 16 each | status counters |

Parameters of `tg_hib`:

| Parameter | Default | Meaning |
|---|---|---|
| `MPM_AW` | 22 | 4M words = 16 MByte |
| `PC_PAGES_LOG2` | 16 | 64K pages |
| `MC_ENTRIES_LOG2` | 14 | 16K entries |
| `FIFO_DEPTH` | 16 | 2 Kbit per link |
| `CC_ENTRIES` | 32 | counter cache entries |
| `CC_CNT_W` | 4 | pending-write count width |
| `KEY_W` | 16 | key width |

At these sizes the board holds about 137 Mbit of memory, almost all of it
in the MPM.

## Departures and limits

**Departures from the published board:**

- The first published board used neither contexts nor the counter cache.
  Contexts belong to its successor. The counter cache was proposed, not
  built. Both are included here. A board whose copies are never marked as
  copies behaves like the plain eager-update board.
- The bus protocol, the link protocol, the packet format, the register and
  address maps, the 5-bit node number and the 8 KByte page are this
  design's own. The published description gives only the functions and
  the memory sizes.
- The shadow bit is bit 30, not the top bit. Bit 31 already selects the
  register space.
- Writes and updates are acknowledged by packets so that the outstanding
  count can be retired. The published description does not say how
  completion is detected.
- Page counters decrement on plain remote loads and stores only.
- Results of atomic operations and remote copies are written only at
  their home word. They are not multicast to copies of the page. A remote
  `WR` that targets a node's copy (not the owner's page) also stays
  local. Software should address the owner's page.

**Known limits:**

- Central control does one thing at a time. While it waits in `S_SEND` or
  `S_MC` for a full outgoing FIFO, it takes only acknowledgements from the
  network, because they need no reply. That is enough for store streams
  in every direction: `tb_tg_coherence` saturates all links and checks
  that they drain. A cycle of boards each blocked on a request packet at
  the head of the next board's input, for example long multicast walks
  that meet, could still lock in principle. Request and reply traffic
  share one link, and the board adds no separate path for replies.
- Special mode is not safe against two processes interleaving their
  argument stores (see above).
- Only one load at a time can be outstanding. The bus latch holds one
  request.
- The MPM is modelled as a synchronous SRAM array. DRAM timing and refresh
  are not modelled.
- The switch and the workstation are not part of the RTL. The testbenches
  use behavioural models of them (`tb/tg_switch_model.sv` and
  `tb/tg_host_model.sv`).

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. Each also has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_tg_hib -Irtl -y rtl -y tb rtl/tg_pkg.sv tb/tb_tg_hib.sv
./obj_dir/Vtb_tg_hib +verilator+rand+reset+2
```

Replace `tb_tg_hib` with any other `tb_*` to test one unit. The `1ns/1ps`
timescale matters: the testbenches drive inputs a fraction of a nanosecond
after the clock edge.

`tb_tg_hib` runs three boards at full size, joined by a switch model that
can hold back any destination to create back-pressure. It builds in
seconds and runs in well under a second. It performs every operation through the host bus and checks the
results through the bus. It also counts, from internal signals, each
mechanism it meant to exercise, and fails any that never happened. The
mechanisms are:

- forwards;
- reflections of the node's own writes;
- ignored and applied updates;
- counter-cache stalls;
- back-pressure;
- each packet kind;
- alarms;
- fence waits.

It also checks the latencies quoted above.

`tb_tg_coherence` is a workload test of the owner protocol. It also uses
three full-size boards. Node 0 owns a page, and nodes 1 and 2 hold copies
of it. All three processors store unique values to the same three words
at random times, 150 stores each. The switch adds random hold-offs.

The test records every value written into each word at each board. It
checks that:

- each copy's sequence of values is a subsequence of the owner's, so no
  node ever sees an older value return after a newer one;
- a writer always reads back its own value;
- all copies end with the owner's value.

Two more phases follow. In the first, saturating store streams run
between the boards in both directions, and the test checks that they
complete. In the second, one board performs 10000 remote loads and then
10000 remote stores, and the test reports their average cost.

Most unit testbenches compare their block with a reference model over
thousands of random operations. Two are mostly directed:

- `tb_tg_multicast` builds a few lists and walks them, with random
  back-pressure;
- `tb_tg_central_ctrl` injects packets and host requests into the
  sequencer, with its helper units at reduced sizes, and compares the
  packets it sends. It ends with a random mix of stores, reflections and
  foreign updates on a copy page, checked against a model of the four
  counter rules.
