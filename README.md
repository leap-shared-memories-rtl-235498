# Coherent scratchpads, ring locks and ring barriers for FPGAs

This is synthesizable SystemVerilog for a small shared-memory system. It is
meant for FPGA designs where several processing engines need to share data.
There are three parts:

- **A coherence domain.** Each engine gets a *coherent scratchpad client*. The
  client looks like a simple SRAM: it takes reads, writes and fences and
  returns read data in order. Behind that interface is a private cache. The
  caches stay coherent by snooping on ring networks. A *controller* orders all
  coherence requests and connects the domain to the next level of memory.
- **A lock group.** Lock nodes on two rings pass lock tokens between them. No
  memory traffic is involved.
- **A barrier group.** Barrier nodes on one ring, with one master that collects
  arrivals and broadcasts the release.

The design follows the LEAP shared-memory architecture for FPGAs: MOSI
coherence on three rings with a global ordering point, plus lock and barrier
services kept outside the memory system. Where this implementation is simpler
than that architecture, the differences are listed at the end.

The top level is `leap_top`. By default it has:

- three clients with 1024-line caches, 64-bit lines and 14-bit line addresses;
- a controller;
- four lock nodes sharing one lock;
- two barrier nodes.

The controller keeps the data and the ownership information in two backing
stores. These stores sit outside the top and are reached through the `own_*`
and `dat_*` ports.

## The three coherence rings and the ordering point

Node ids: client *i* has id *i*. The controller has id `N_CLIENTS` (3 by
default). All four nodes sit on three unidirectional rings, in the order
client 0 → client 1 → client 2 → controller → client 0. There is one ring per
message class, so no class can block another:

| ring | carries | who injects | who ejects |
|---|---|---|---|
| unactivated request | GETS, GETM, PUTM from a cache | clients | controller only |
| activated request | the same requests, now ordered | controller | every client takes a copy and passes it on; the controller drops it when it returns |
| response | DATA, WB, WBCANCEL | clients (through the completion table) and the controller | the node named in `dest` |

A request means nothing until the controller activates it. The controller
activates requests in arrival order, so every node sees them in the same
order. That order is the global order of memory operations: a miss is
ordered when its request is activated, not when its data arrives.

Every ring is a chain of `ring_stop`s. Each stop has a two-entry registered
output buffer, and its ready signals never chain combinationally around the
ring. Through traffic has priority over local injection. A broadcast moves
only when the local node and the next stop can both take it.

## Protocol

Each cache line holds one of four steady states, I, S, O or M, plus a dirty
bit. A read hits in M, O or S. A write hits only in M. Any other access sends
GETS (for a read) or GETM (for a write or an upgrade).

The controller keeps one owner bit per line address. The bit says whether some
cache owns the line (M or O) or memory does. Three rules make this one bit
enough:

1. **Memory answers only when it owns the line.** Then the controller sets the
   owner bit and sends the data with `excl` set. The requester installs the
   line in **M**, even for a read. This is the exclusive-on-first-read shortcut.
   A later write needs no new transaction.
2. **A cache owner answers everything else.** On a foreign GETS, an M line
   becomes O and sends its data. On a foreign GETM, an M or O line sends its
   data and becomes I, and an S line becomes I. A GETS answered by a cache
   installs S.
3. **If the owner bit is 0, no cache holds a copy.** A foreign PUTM (an
   owner's write-back) invalidates every S copy. Without this rule, S copies
   could outlive the owner that answered for them.

Because M can now hold clean data, each line carries a dirty bit. When a
clean owned line is evicted, the write-back returns only the ownership and
the data store is not written.

### Transients live in the MSHR

The cache array stores only steady states. Everything in flight is kept in
`coh_mshr`:

- **The miss way.** It holds the outstanding GETS or GETM, and records whether
  that request has been activated and whether its data has arrived.
  - A GETM to a line we already own (O → M) completes as soon as it is
    activated, because it needs no data.
  - A foreign GETS or GETM to the same address that is activated *after* our
    own request is not answered yet. It goes onto the miss way's *forwarding
    list*.
  - When our access completes, the list is replayed on the updated line. So
    a foreign GETM ordered after our write receives the written value.
  - A foreign PUTM ordered after our GET marks the miss. If the miss ends in
    S, the copy is then dropped.
- **The write-back ways** (one per set, 32 by default). An evicted M or O line
  moves here, and its PUTM is sent.
  - Until the PUTM comes back activated, the way still answers snoops as the
    owner.
  - If a foreign GETM is ordered first, the way hands the data over and loses
    ownership. The write-back then becomes a `WBCANCEL`.
  - Otherwise the cache sends a `WB` with its data and dirty bit when it sees
    its own PUTM activated.

The cache blocks on a miss: one local request is outstanding at a time.
Snoops are still served during the miss. Each cycle does at most one action,
in this order: miss completion, replay of one forwarded snoop, retirement of
the miss, one snoop, one local request.

### Write-backs in two halves

A write-back is split in two. The PUTM travels as a request, so it is
ordered. The data (or the cancel) follows later on the response ring. This
keeps the request rings narrow, but it creates windows that the controller
must close:

- **A reader arrives between the PUTM and its data.** The controller's
  `wshr` holds an entry per pending write-back. The first GETS or GETM that
  hits an entry is recorded. When the WB arrives, the controller writes the
  data if it is dirty and gives the line straight to that requester, with the
  data and `excl`. The owner bit stays set. Any later requester in the same
  window is ordered after the new owner, and the new owner answers it.
- **The WB overtakes its own PUTM.** The two travel on different rings, so
  the WB can arrive before the controller has processed the PUTM. A WB with
  no matching WSHR entry goes back into the controller's write-back queue.
  The snoop queue then gets a turn, so the PUTM behind it can make progress.
- **A second PUTM to the same address.** It waits in the controller until the
  first write-back completes.
- **The write-back was cancelled.** `WBCANCEL` frees the entry. The owner bit
  stays set, because the cache that took the line with its GETM is now the
  owner.

A clean WB clears the owner bit. A dirty WB also writes the data store.

### Never stalling on the network

- A cache starts a miss only when its request buffer has room for both the
  PUTM of the victim and the GET.
- A snoop enters the cache only after the router's `completion_table` has
  given it an entry. When the table is full, the activated ring waits at that
  router, not inside the cache.
- A response is always accepted.
- Each completion names its table entry. The table then builds the response:
  data goes to the requester, WB and WBCANCEL go to the controller.
- A snoop that completes in the same cycle it arrives bypasses the table.
- A forwarded snoop keeps its entry until it is replayed.

## Client

`coh_client` = `marshaller` → `coh_cache` → `coh_router`.

- **Marshaller.** It lets a client word be narrower than a line
  (`CLIENT_W` < 64). A write becomes a masked line write: the word is
  replicated across the line and a byte mask selects it. Reads fetch the whole
  line, and a FIFO of word offsets picks each word out of the returned line.
- **Fences.** There are three kinds: read, write and full. They are accepted
  and retire at once, because the cache already completes requests in order.
- **`request_pending`.** High while a miss or a read is outstanding.

## Controller

`coh_controller` activates requests and answers them. It also applies
write-backs.

- **Activation.** Each unactivated request is broadcast on the activated
  ring. In the same cycle it is queued for the controller's own snoop.
- **Owner-bit lookup.** For a GETS or GETM that misses the WSHR, the
  controller reads the owner bit. If the bit is set, it does nothing more.
  If it is clear, it writes the bit to 1, reads the data and sends it.
- **PUTM.** A PUTM allocates a WSHR entry.
- **Priority.** Write-back messages from the response ring come before
  snoops. The exception is the retry turn described above.

The two backing stores use valid/ready requests and in-order responses of any
latency. `tb/pscratch_model.sv` is a behavioural model of such a store with a
fixed latency. It initialises each line to its address in the upper 32 bits.

## Lock service

Each `lock_node` keeps a 2-bit state and a forwarding id for every lock:

| state | meaning |
|---|---|
| N | not here |
| W | requested, waiting |
| U | held by the local client |
| O | here and idle |

The master node starts in O for every lock. Locks are granted as follows:

- **Acquire.** From N, the node sends `{lock, my id}` on the request ring and
  goes to W. From O, it goes straight to U and grants the lock.
- **A request passing a node.** The node consumes the request if:
  - it is in **O**: it sends the lock to the requester on the response ring
    and goes to N;
  - it is in **U** and its forwarding slot is free: it records the requester;
  - it is in **W**, its slot is free, and the requester's id is lower than its
    own: it records the requester.

  Otherwise the request keeps circling.
- **Release.** U → O. If a requester is recorded, the lock goes to it at
  once.

The id rule in W stops two waiting nodes from recording each other and
deadlocking. Every chain of recorded requesters therefore ends at the node
that has the lock.

Example: node 0 owns the lock, and nodes 2 and 3 request it in the same cycle.

1. Node 2's request reaches node 3, which is waiting and has a higher id, so
   node 3 records node 2.
2. Node 3's request reaches node 0, which sends the lock to node 3.
3. When node 3 releases, the lock goes to node 2.

`tb_lock_node` replays exactly this case.

Interface: `acq_valid/acq_id/acq_ready` (acquire), `grant_valid/grant_id` (a
one-cycle strobe), `rel_valid/rel_id/rel_ready` (release).

## Barrier service

The barrier is centralised in a master node:

1. **Set up.** The master stores a mask of the nodes that take part and
   broadcasts INIT. Each node raises `initialized` when INIT reaches it.
2. **Arrive.** A slave that reaches the barrier sends REACHED to the master.
3. **Release.** When every masked node has arrived, the master broadcasts
   DONE and raises its own `sync_valid`. Each slave raises `sync_valid` when
   DONE reaches it.

The mask stays set, so the same barrier serves round after round. With eight
nodes, a barrier costs 16 cycles on average in `tb_barrier_node`. That is
about 7.8 million barriers per second at 125 MHz.

## Parameters

| parameter | default | where |
|---|---|---|
| `ADDR_W` | 14 (line address) | `leap_pkg` |
| `DATA_W` | 64 (line = word) | `leap_pkg` |
| `NODE_W` | 4 (node id) | `leap_pkg` |
| `N_CLIENTS` | 3 | `leap_top` |
| `CLIENT_W` | 64 | `leap_top`, `coh_client`, `marshaller` |
| `CACHE_ENTRIES` | 1024, direct mapped | `leap_top`, `coh_client` |
| `MSHR_SETS` | 32 write-back ways | `leap_top`, `coh_client` |
| `CT_ENTRIES` | 8 completion-table entries | `leap_top`, `coh_client` |
| `WSHR_ENTRIES` | 8 | `leap_top`, `coh_controller` |
| `LOCK_NODES`, `LOCK_NUM` | 4, 1 | `leap_top` |
| `BAR_NODES` | 2 | `leap_top` |

The top sizes each cache's forwarding list to `N_CLIENTS` entries. All handshakes are valid/ready. Reset is asynchronous
and active low (`rst_n`).

At default size the top synthesises to about 6,600 cells, 7,300 flip-flop
bits and 223,000 memory bits. The memory is mostly the three 1024 × 64 data
arrays with their tags and states.

## Differences from the original architecture

- **One miss at a time.** The cache is blocking, with one outstanding miss.
  The original cache is pipelined, serves requests to different addresses out
  of order, and has retry queues for local and MSHR requests. Because of
  this, only one miss way exists instead of 32. The 32 write-back ways are
  kept.
- **One snoop at a time in the controller.** The controller processes snoops
  serially, one owner-bit lookup at a time. The original controller has an
  owner-bit *checkout table* that lets several lookups be in flight. That
  table is not built.
- **Only the first forwarded reader is kept.** The WSHR keeps only the first
  reader that hits a pending write-back, not a full list. This is enough
  because that reader becomes the owner and answers the rest.
- **Backing stores are outside the design.** The data and owner-bit stores,
  and the memory hierarchy behind them, are not part of this RTL. The same
  holds for the compiler-generated network between FPGAs. Ring links here
  are direct valid/ready wires.
- **Sizes not given by the original are my choices.** This covers the
  completion table, the WSHR, the forwarding list, the queue depths, the
  node-id width and the message formats.
- **The heat-transfer stencil does not fit the default address space.** A
  512 × 512 frame pair at 8 points per line needs 65,536 lines. Build it with
  `ADDR_W = 16` and more clients. The largest pair that fits 16,384 lines is
  256 × 255, which is what `tb_heat_transfer` runs.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it does |
|---|---|
| `tb_ring_stop` | random pass, eject, broadcast and drop decisions with random back-pressure; checks order, that injection never overtakes through traffic, and that nothing is lost |
| `tb_marshaller` | 16-bit words in 64-bit lines: masks, replication, read word selection |
| `tb_completion_table` | random snoops and out-of-order completions, same-cycle bypass, response addressing |
| `tb_coh_mshr` | write-back ways, owner flag, miss way, forwarding FIFO |
| `tb_wshr` | allocation, lookup, first-forwarder rule, free |
| `tb_coh_cache` | one cache against a reactive model of the ordering point, memory and a foreign cache (see below) |
| `tb_coh_router` | all three rings opened up, random traffic on every input |
| `tb_coh_controller` | directed cases: memory grant, owned line, reader waiting on a write-back, cancel, clean write-back, WB before its PUTM, pass-through |
| `tb_coh_client` | one client with 32-bit words and a 16-line cache, plus the controller and store models: 6,000 random reads, writes and fences |
| `tb_lock_node` | the node 2 / node 3 example above, then 600 random acquire/release pairs on two locks |
| `tb_barrier_node` | 8 nodes, 1000 rounds; checks that no node is released early and that a barrier takes at most 17 cycles |
| `tb_leap_top` | the whole design at default parameters (see below) |
| `tb_heat_transfer` | heat-transfer stencil: 256 × 255 grid of 8-bit points, 128 time steps on three engines, with a barrier and fences between steps; checks every point of the final frame (about 262,000 cycles per step, 2 minutes of simulation) |
| `tb_synthetic` | read latency of a local hit (1 cycle), of memory (19) and of a remote cache (12); 512-access read and write streams with 1, 2 and 3 clients active (about 20, 24 and 41 cycles per cold access), and warm (1 per cycle) |

How `tb_coh_cache` checks reads and data:

- Reads are checked against a reference applied in the global order. A hit
  takes effect when it is accepted. A miss takes effect when its request is
  activated.
- Foreign data, write-back contents and cancels are checked against which
  node owns each line.

`tb_leap_top` runs three things at once:

- **Coherence stress.** Sixteen words that all map to four sets. Each word has
  one writer that writes increasing counters, and every client reads every
  word.
- **Shared queue.** Two producers and two consumers share a 64-entry queue
  under the hardware lock, with 1024 items per producer.
- **Barrier.** 1000 barrier rounds.

It counts these protocol events and fails if any of them never happens:

- grants from memory and cache-to-cache transfers;
- dirty, clean and cancelled write-backs;
- WSHR forwarding;
- MSHR forwarding;
- O → M upgrades without data;
- fences;
- each way a lock is passed on;
- barrier completions.

It takes about 63,000 cycles.

To run a testbench with plain verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/leap_pkg.sv tb/tb_leap_top.sv --top-module tb_leap_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_leap_top` with any testbench name. Verilator finds the other files
through `-I`.
