# SYMNET: an optical address network with snooping coherence (SystemVerilog)

A bus-based symmetric multiprocessor broadcasts one address request at a
time. Each request goes to every cache, and every cache snoops it. As
processors are added, that single broadcast slot becomes the bottleneck.

SYMNET replaces the electrical address bus with an optical broadcast tree:

- Each processor owns a fixed transmit slot, handed out by a circulating
  optical token.
- Several requests from different processors travel through the tree at the
  same time, one per stage.
- Every request reaches all caches, and memory, in the same cycle. That
  cycle defines a single global order of requests.

Snooping therefore still works. But a cache now has to watch requests that
were already in flight when it inserted its own. The coherence protocol,
COSYM, is a MOESI variant built for this, with three main changes:

- Every shared block has exactly one owner, so that one optical bit is
  enough for the snoop response.
- Sharers of a block form a linked list.
- Evictions hand ownership or list links on through the address network.

This repository holds synthesizable RTL for the address side of such a
machine:

- the token ring;
- the Y-coupler/splitter tree;
- per-processor address port controllers;
- COSYM L2 cache controllers;
- a memory controller.

It also holds testbenches, including a 32-processor end-to-end run at the
default parameters.

## The token ring: collision-free insertion

`token_generator` emits one pulse every `N_PROC` cycles. A chain of
one-cycle `delay_element`s carries the pulse past the processors, so
processor *i* sees it in cycle *g + i*. The result is `token_ring`, a
pre-allocated TDMA schedule:

- At most one processor inserts in any cycle, so requests never collide in
  the tree.
- Every processor gets a slot once per round of `N_PROC` cycles.

The delay is one cycle because the optical delay line, 20 cm of fibre, is
sized to about 1 ns, which is one processor cycle at 1 GHz.

`addr_port_ctrl` holds one request, offered with a valid/ready handshake. It
drives the request onto the processor's leaf link in the token cycle. Every
cycle it also forwards the controller's snoop bit on the same link.

## The Y-coupler tree: fixed-latency broadcast

`address_subnet` is a binary tree of `y_coupler_splitter` nodes, with
`log2(N)` levels. Each node has two directions:

- **Upward:** it ORs its two children's links into a register.
- **Downward:** it copies its parent's link to both children.
- **At the root:** the combined upward stream turns around into the
  downward tree.

Every hop takes one cycle. A request inserted in cycle *t* is therefore
visible at every leaf, and at memory's tap, in cycle *t + 2·log2(N) − 1*.
Counting the insertion cycle, that is 2·log2(N) cycles: one per stage of the
tree on the way up and one per stage on the way down.

- For a four-processor board: inserted in cycle 1, seen everywhere in
  cycle 4.
- For 32 processors: the request takes 9 cycles, and the snoop response
  arrives 10 cycles after visibility.

The snoop bit travels in the same link word, so it crosses the tree in the
same time. It is OR-combined on the way up. Assertions in the coupler flag
two requests, or two snoop responses, meeting at one node. Either would be a
protocol error.

The real network has two levels: processors on boards, and boards linked to
each other. With one cycle per hop the board boundary changes nothing
logically, so the RTL builds one uniform tree.

## COSYM: coherence when requests overlap in flight (`cosym_ctrl`)

This is the hardest part of the design. Read this section before changing
`cosym_ctrl`.

### One owner, one snoop bit

A block in E, O or M has an owner, and only the owner answers a miss. It
answers by raising the snoop bit (which arrives 2·log2(N) cycles after the
request is visible) and by sending the block over the data network.

- **Snoop high:** the requester loads the block in S.
- **Snoop low:** memory sends the block, and a read loads it in E.
- **A read to an E block** makes the owner O.

Memory (`mem_ctrl`) keeps no per-block state. It remembers each request for
`SNOOP_DLY` cycles and answers exactly when the snoop bit comes back low.

### Transient states of a read miss

A cache must watch requests from the moment its own request is **inserted**,
not from when it becomes **visible**. Other requests that are visible in
between come before its own in the global order.

| State | Meaning |
|---|---|
| `IE-ads` | Issued and inserted, not yet visible. The cache is reacting to other requests. |
| `IS-ads` | Another processor's read became visible first. That reader will be the owner or get the data first, so this cache will load S and stops reacting. |
| `IE-ds`, `IS-ds` | Own request visible; waiting for the snoop bit. |
| `IO-ds` | An `IE-ds` cache sees a later read. It owes that reader the block once its own copy arrives. |
| `IE-d`, `IS-d`, `IO-d` | Snoop known; waiting for data. |
| `II-d` | A later write has invalidated the block that is still arriving. It is used once, then dropped. |

A cache that owes a block to later requesters keeps them in a forward queue
and sends the block on as soon as its own copy arrives.

Write misses follow the same scheme (`IM-ad`, then `IM-d`). From the moment
its request is visible, the writer is the owner. It answers later requests
and forwards the block after it has written its word.

### The sharer chain

Each O or S line records its **next sharer**:

- The owner heads the chain.
- The most recent reader is the tail.
- When a read becomes visible, the tail records the reader as its next
  sharer.

Evictions use this chain:

- **Transfer write-back type 1** (evicting O with a next sharer): this
  request goes through the address network. The next sharer becomes O. No
  data moves, because all copies are equal.
- **Transfer write-back type 2** (evicting S): the previous sharer replaces
  its next-sharer pointer with the evicted block's next sharer.
- **Ordinary write-back** (evicting M, or O without sharers): the block goes
  to memory over the data network. A one-entry write-back buffer keeps
  answering for it until memory has it.

A transfer write-back is acknowledged on the snoop bit by the cache that
acted on it. Without an acknowledgement it is re-issued.

### Race rules

The original design resolves transfer write-back races with an algorithm
that is not public. This RTL uses its own rules:

- **Chain order is broadcast order.** An evicted line leaves the chain when
  its own transfer becomes visible. Until then it still appends readers and
  still accepts ownership.
- **First reader after the next sharer.** Every sharer also records the first
  reader that joined after its next sharer. A type 2 that says "no next
  sharer" may have been built before that reader joined. The recorded reader
  then becomes the next sharer, so it is not lost from the chain.
- **Void hand-over.** An evicting owner keeps answering until its type 1 is
  visible. If the sharer named in that type 1 has left by then, the
  hand-over is void. The cache stays the owner and sends again.
- **Committed type 2.** A sharer whose own type 2 is already committed to the
  network does not act on its next sharer's type 2. The next sharer
  re-issues.
- **Retry limit.** After `MAX_RETRY` unacknowledged tries, a type 2 is
  dropped and a type 1 becomes an ordinary write-back.
- **Upgrades (a write to an S/O copy).** These invalidate the other copies
  without moving data. An upgrade for a block written in the last `UPG_WIN`
  cycles is void, and every cache can tell this from its own record of
  recent writes. The writer then asks again: as an upgrade if it still has
  its copy, as a write miss if not.
- **Write-back buffer.** It stops answering once it has answered a write.
- **Eviction timing.** A line is not chosen as victim in the cycle that a
  request for it becomes visible.

## Data network, processors, and what is left out

The following are outside the RTL. Their connections are brought out of
`symnet_top`.

- **The data sub-network.** It is an optical crossbar, conflict-free, taking
  52 cycles per 32-byte block.
  - Each cache and memory has a `dn_tx`/`dn_rx` port pair. Memory is index
    `N_PROC`.
  - The testbenches model the data sub-network as a fixed-latency pipe. In
    that model, memory takes one write-back per cycle from a queue.
  - `WB_HOLD` defaults to 52 + `N_PROC`: the transfer time plus the longest
    possible wait in that queue.
- **The processors and their L1 caches.** Each L2 controller exposes a
  one-access-at-a-time port, `cpu_*`.
- **The VCSEL and photodetector arrays.** Their effect is the one-cycle hop
  latency.

Other simplifications and limits:

- **One outstanding miss per cache.** An eviction completes before the miss
  that caused it is inserted.
- **Write miss, upgrade and race rules are this design's own.** They were
  tested with random traffic (see below), not proven.
- **Default size.** The defaults are 32 processors, a 64 KB 4-way L2 with
  32-byte blocks, and a 4-cycle L2 hit. `N_PROC` may be any power of two up
  to 128.
- **Memory size.** Memory is 4096 blocks (`MEM_BLOCKS`), a size chosen for
  simulation.

## Files

| File | Content |
|---|---|
| `rtl/symnet_pkg.sv` | Request packet, link word, states, data-network message, event indices |
| `rtl/token_generator.sv`, `rtl/delay_element.sv`, `rtl/token_ring.sv` | Token TDMA |
| `rtl/y_coupler_splitter.sv`, `rtl/address_subnet.sv` | Broadcast tree |
| `rtl/addr_port_ctrl.sv` | Token-timed insertion |
| `rtl/cosym_ctrl.sv` | L2 controller and COSYM protocol |
| `rtl/mem_ctrl.sv` | Memory controller (answers on snoop low) |
| `rtl/symnet_top.sv` | Whole address side |
| `tb/tb_<block>.sv` | One self-checking testbench per block |
| `tb/symnet_driver.sv` | Shared environment for the machine-level tests |
| `tb/tb_symnet_top.sv` | Reduced machine, every mechanism required |
| `tb/tb_symnet_full.sv` | 32 processors, all defaults |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
Each has a watchdog. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl rtl/symnet_pkg.sv rtl/*.sv \
    tb/symnet_driver.sv tb/tb_symnet_top.sv --top-module tb_symnet_top
./obj_dir/Vtb_symnet_top
```

Block testbenches need only `rtl/` plus their own file. Add
`+verilator+seed+<n>` to vary the random traffic. Results:

| Testbench | Size | Result |
|---|---|---|
| `tb_symnet_top` | 4 processors, 2-way 4-set caches, 8-cycle data network | About 1,750 checks and 9,000 cycles. Passed on 20 seeds with no failures, and on 5 seeds at 2,000 operations per processor. |
| `tb_symnet_full` | 32 processors, defaults | 3,393 checks in about 62,000 cycles. Builds in about 90 s and runs in about a second. |

`tb_symnet_top` requires every mechanism at least once: the race paths, snoop
high, both transfer types, ordinary write-backs, re-issues, forwarding,
upgrades, acknowledgements, write-back buffer hits and memory answers.

Each machine-level run checks:

- every value read belongs to the word it was read from;
- no processor ever sees a word go back to an older version;
- all processors read the last value of every word at the end;
- no cache ever receives two blocks in one cycle.
