# SCI-style cache-coherent ring in SystemVerilog

Four processing nodes share one 256-word global memory. Each node holds a
quarter of that memory and has a private cache in front of it. The nodes talk
over a unidirectional ring of point-to-point links. Coherence follows the idea
of the Scalable Coherent Interface (SCI): the directory is a **distributed
doubly linked list**. The home memory of a block stores only a pointer to the
first sharer. Each cached copy stores pointers to its neighbours in the list.
Reads join a list at its head. A write first leaves the list, becomes the head
through the home memory, and then purges every other copy.

The design is fully synthesizable. Every packet between blocks is a packed
struct with a valid strobe. The whole system is one top module,
`sci_ring`, with no inputs except clock and reset. It runs a fixed
demonstration script, or PRNG-generated traffic, and brings out the internal
events so that a testbench can observe them.

## System at a glance

```
           +---------+     +---------+     +---------+     +---------+
   ring -->| node A  |---->| node B  |---->| node C  |---->| node D  |--+
        |  +---------+     +---------+     +---------+     +---------+  |
        +---------------------------------------------------------------+
                   scheduler: go[3:0] / rq[3:0], one CPU at a time
```

Inside each node (`sci_node`):

```
  cpu ──41b──> decoder <──48b──> cache (128 lines, fully associative, LRU)
                  │  └──40/42b──> local_memory (64 words + directory)
                  └──48b──> sci_switch <── ring in / ──> ring out
```

| File | Role |
|---|---|
| `rtl/sci_pkg.sv` | widths, states, transaction codes, packet structs, demo script |
| `rtl/prng.sv` | 8-bit xor/shift next-address function |
| `rtl/cpu.sv` | traffic source: script or PRNG, one request per time slot |
| `rtl/scheduler.sv` | round-robin grant of time slots |
| `rtl/cache.sv` | fully associative cache with list state, pointers and LRU age |
| `rtl/local_memory.sv` | 64-word memory slice with the home directory |
| `rtl/sync_fifo.sv` | small FIFO used by the switch |
| `rtl/sci_switch.sv` | ring interface: bypass, receive, inject |
| `rtl/decoder.sv` | the coherence engine (by far the largest block) |
| `rtl/sci_node.sv` | one node |
| `rtl/sci_ring.sv` | top: four nodes, ring wiring, scheduler |

## Addresses and homes

A global address is 8 bits. Its top two bits name the **home node**: A=0,
B=1, C=2, D=3. Its low six bits index that node's local memory. Node B therefore
owns `$40`-`$7F`. The decoder strips the node part before it talks to its
memory, so all four memories are identical instances. After reset, every
word holds its own global address as data. This makes a read's result easy
to predict in tests.

Each memory word carries a directory entry:

* `state`: shared or not shared.
* `forw`: the node at the head of the sharing list. It is meaningful only when shared.

## Sharing lists and cache line states

A cache line holds: state (3 bits), forward pointer, backward pointer, address, data, and a 10-bit age.

| Code | State | Meaning |
|---|---|---|
| 000 | unused | free line |
| 001 | HOEL | head of an empty list: the only copy; the only state that may be written |
| 010 | HOL | head of a list with more entries; `forw` points to the next one |
| 011 | RLE | regular (middle) list entry; `forw` and `back` are both valid |
| 100 | TLE | tail list entry; only `back` is valid |

"Forward" always means towards the tail and "backward" towards the head. The
home memory points at the head. The list for `$11` after each node has read it
once, in the order A, B, C, D, is:

```
memory(A): shared, forw=D
D: HOL  forw=C            C: RLE forw=B back=D
B: RLE  forw=A back=C     A: TLE back=B
```

## Ring transactions

Ring packets are 48 bits: `{dest[1:0], trans[3:0], src[1:0], addr[7:0], data[31:0]}`.
Some packets are forwarded on behalf of a requester: read-to-head (4), write-to-head (5), purge (8), and a forwarded memory update (11). These packets keep the requester in `src`, so the last node can answer the requester directly.

| # | Name | Sent by → to | Effect at the receiver |
|---|---|---|---|
| 0 | head update | evicting HOL → next entry | becomes HOL (or HOEL if it was the tail); answers 12 |
| 1 | remote read | requester → home | not shared: answer 3 with data. Shared: forward as 4 to the head (or serve it, if the head is the home itself). The memory head becomes the requester |
| 2 | remote write | requester → home | like 1, but the old list is purged (5) instead of read |
| 3 | return data / write ok | home → requester | fill the line as HOEL, or finish the write |
| 4 | read to head | home → old head | HOEL→TLE, HOL→RLE, `back` := requester; answer 6 with data |
| 5 | write to head | home → old head | wipe the line; a HOEL head answers 7, a HOL head forwards 8 |
| 6 | old head data | old head → requester | fill as HOL, `forw` := old head |
| 7 | purge complete | tail → requester | requester may now write; its line becomes HOEL |
| 8 | purge rest of list | entry → next entry | HOL or RLE: wipe and pass on. TLE: wipe and answer 7 |
| 9 | update backward ptr | leaving entry → its forward neighbour | `back` := `src`; answer 12 to the node in `data[31:30]` |
| 10 | update forward ptr | leaving entry → its backward neighbour | `forw` := `src`; answer 12 to the node in `data[31:30]` |
| 11 | memory update (+purge) | new head → home | memory head := `src`. Data all zeros: also purge the old list. Data all ones: update only |
| 12 | pointer update confirm | answer to 0, 9, 10, 14 | continues the sender's job |
| 13 | purge completion | — | accepted like 7; this design never sends it |
| 14 | tail update | leaving tail → previous entry | HOL→HOEL, RLE→TLE; answers 12 |
| 15 | flush to memory | evicting HOEL → home | home writes back the data and marks the word not shared |

## How a CPU request is served (decoder)

The decoder runs one job at a time. A job is a CPU request, a line eviction, or the service of one incoming ring packet. Every CPU request starts with a cache look-up.

**Read hit.** Any valid state returns the cached data. No ring traffic is needed.

**Read miss.** The request goes to the home.
* If the home is this node, it reads its local memory.
  * Not shared: the line is filled as HOEL.
  * Shared: a 4 is sent to the head, and the reply 6 fills the line as HOL.
* Otherwise the decoder sends a 1 to the home. The answer is either 3 (fill as HOEL) or 6 (fill as HOL).

**Write.** Only a HOEL line can be written, so the writer first obtains exclusive ownership:

* **Hit in HOEL:** write the cache. Done.
* **Hit in HOL:** the writer is already head, and the home already points to it. It sends an 8 (purge) to its `forw`. Each entry wipes its copy and passes the 8 on. The tail answers 7 and the line becomes HOEL.
* **Hit in RLE:** the writer unlinks itself first:
  * a 9 to its forward neighbour, waiting for the 12;
  * then a 10 to its backward neighbour, waiting for the 12.
  * Then it makes itself head. If it is the home, it writes its local memory and sends an 8 to the old head. Otherwise it sends an 11 with data all zeros, and the home sends the 8.
* **Hit in TLE:** a 14 to its backward neighbour, waiting for the 12. Then it makes itself head and has the list purged, as for RLE.
* **Miss, remote home:** a 2 to the home. The home answers 3 if the block is not shared. Otherwise it purges the list: a 5 to the old head, then 8s down the list, or it serves the purge itself if it holds the head. The line is filled as HOEL when the 3 or 7 arrives.
* **Miss, local home:** a local memory write that makes this node head. If the block was shared, an 8 goes to the old head, and the fill waits for the 7.

**Requester id in 9/10.** The node asking for the pointer update puts its own id in the two most significant data bits. This is because `src` carries the new pointer value.

## Eviction (flush)

The cache raises `flush_req` when no line is free. Right after a CPU job that leaves the cache full, the decoder evicts the least recently used line:

* **HOEL:** the data goes home. This is a local memory flush, or a 15 to a remote home.
* **HOL:** a 0 makes the next entry the new head. Then the home's pointer is moved with an 11 with data all ones (or a local memory write).
* **RLE:** it unlinks with 9 and 10, like a writer does.
* **TLE:** it unlinks with 14.

After that the line is wiped.

Two messages get no answer: 15, and 11 with data all ones. When the last message of an eviction is one of these, the decoder waits `DRAIN_CYCLES` (16) cycles before starting a new job. This keeps a later request from the same node from reaching the home before the update.

## Cache replacement

* Each line has a 10-bit age.
* When a read, a write or a list update touches a line, that line's age is cleared. Every other line ages by one. Ages saturate at all ones.
* A write goes to the line that already holds the address. Otherwise it goes to the first free line. In a full cache it goes to the oldest line, taking the lowest index on a tie.
* The eviction step above always frees a line before the next fill. So in practice a fill never overwrites a valid line of another address.

## Switch and ring

Each link carries at most one packet per cycle and has a register at the switch output. The switch handles the three cases:

* **Bypass.** A packet for another node is passed on one cycle later, unchanged (the `bypass` event).
* **Receive.** A packet for this node goes into a 4-entry receive queue for the decoder. If that queue is full, the packet is sent round the ring once more (the `recirculate` event). So nothing is ever lost.
* **Inject.** Decoder packets wait in a 4-entry transmit queue. One goes out only in a cycle in which no packet passes through; waiting counts as the `inject_stall` event.

## CPU and scheduler

The scheduler grants one time slot at a time, in round-robin order starting with A. A CPU holds its request line `rq` while it waits for the grant and for the reply. It drops `rq` for at least one cycle after the reply. The scheduler moves on in any cycle in which the current owner's `rq` is low. One CPU transaction therefore runs at a time; the ring traffic and services it causes run concurrently in all nodes.

The CPU has two modes:

* `MODE=0`: the seven-step demonstration script in `sci_pkg::demo_txn`. Each node reads `$11`, `$22`, `$44`, `$88` and `$AA`, which builds four-entry lists. It then re-reads a cached address, which is a hit. Finally it writes:
  * A: `$44 ← 4`, as the tail.
  * B: `$88 ← 8`, from the middle.
  * C: `$22 ← 2`, from the middle.
  * D: `$11 ← 1`, as the head.
* `MODE=1`: addresses come from the 8-bit generator below, masked by `ADDR_MASK`.
  * The next address is `x ^= x >> 3; x ^= x << 5`, seeded with `SEED`. Seeds differ per node.
  * Bit 3 xor bit 6 of the new address selects a write.
  * The write data is `{6'b0, node, index, 8'hA5, addr}`.

A reply is accepted only if its address matches the request.

## Packet layouts

| Path | Width | Fields (msb first) |
|---|---|---|
| CPU ↔ decoder | 41 | rw, addr[7:0], data[31:0] |
| decoder ↔ cache | 48 | rw/hit, addr[7:0], state[2:0], forw[1:0], back[1:0], data[31:0] |
| decoder → memory | 40 | index[5:0], new head[1:0], data[31:0] |
| memory → decoder | 42 | index[5:0], state[1:0], forw[1:0], data[31:0] |
| ring | 48 | dest[1:0], trans[3:0], src[1:0], addr[7:0], data[31:0] |

Cache control is 00 list update, 01 read/write, 10 wipe, 11 select LRU line for eviction. Memory control is 00 read, 01 write, 10 flush. Memory read and write both return the old directory entry and data, and make the requester the new head.

## Timing

* Everything is synchronous to one clock, with synchronous active-high reset.
* Cache and memory answer one cycle after a request. The decoder spends two cycles per cache or memory access.
* A ring hop costs one cycle.
* A read hit completes about five cycles after the CPU's request.
* The complete demonstration (28 transactions, 4 nodes, 128-line caches) finishes in about 1100 cycles.

## Where this design departs from the original model

* **Valid strobes instead of idle codes.** The original marked an empty link by an all-ones packet. Here every interface has a valid bit.
* **All CPU replies come from the decoder.** The direct memory-to-CPU path and its 2:1 multiplexer belong to the original first-stage node without caches, and are not built.
* **Address map.** Homes use the top two address bits, so each node holds 64 consecutive words. Under this rule `$AA` lives in node C. A description that places it in node D conflicts with the 64-words-per-node offsets; the offsets were followed.
* **Requester id** in transactions 9 and 10 sits in `data[31:30]`.
* **Transaction 13** is accepted but never sent. The tail confirms a purge with 7.
* **Own additions:**
  * eviction immediately after the job that filled the cache;
  * the drain wait after messages that get no answer;
  * the switch queues and recirculation;
  * the sticky `proto_err` flag for unexpected packets;
  * a HOEL line reached by a purge is handled like a tail;
  * saturating ages.
* **No free-running mode.** An early variant let every CPU issue transactions at once and relied on the switch buffering decoder packets. That variant was abandoned in favour of the scheduler and is not offered here, although the switch still buffers.
* **Scheduler.** Serialising CPU transactions with the scheduler is kept. Decoders also serve ring packets while another node's transaction is running.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_prng` | all 256 inputs against an independent bit-level model; cycle length from the default seed |
| `tb_scheduler` | one-hot grant, A first, hand-over only when `rq` drops |
| `tb_cpu` | script order, PRNG addresses/direction/data, wrong-address replies ignored, `rq` protocol |
| `tb_cache` | hit/miss, fill order, LRU choice with ties, ageing, wipe, flush request |
| `tb_local_memory` | reset contents, directory updates of read, write and flush |
| `tb_sci_switch` | bypass delay, delivery order, inject stall, recirculation |
| `tb_decoder` | scripted ring/CPU exchange covering transactions 0-7, 9-12 and 14, HOL and HOEL evictions, hit latency |
| `tb_sci_node` | node A's script against a model of the other nodes; bypass; serving a remote read |
| `tb_sci_ring_demo` | the full-size demonstration: every completion's data, the lists for `$11` and `$22` after the reads, the exact sequence of ring messages for the first reads of `$11` and for each of the four writes, final states and directories, round-robin order, hits, bypass traffic, transaction mix |
| `tb_sci_ring` | 4 × 300 random transactions with 4-line caches. It checks against a reference memory and checks every list's consistency after each completion. It counts each transaction type, evictions in each state, hits, bypasses, stalls and recirculations |

To simulate one, with Verilator 5 (the package must come first):

```
verilator --binary --timing --assert rtl/sci_pkg.sv \
  $(ls rtl/*.sv | grep -v sci_pkg) tb/tb_sci_ring_demo.sv \
  --top-module tb_sci_ring_demo -o sim && ./obj_dir/sim
```

Useful knobs on `sci_ring`:

* `CACHE_LINES`: small values force evictions.
* `MODE` and `N_TRANS`: choose the traffic source and length.
* `ADDR_MASK`: squeezes random traffic onto a few addresses to raise sharing.
* `DRAIN_CYCLES`: the wait after unanswered messages.

## Limits

* Coherence has been checked by simulation only, on the scripted scenario and on random traffic with small caches. It has not been formally verified.
* The protocol assumes that CPU transactions are serialised by the scheduler. With several CPU transactions in flight at once, lists could race, and the design does not handle that.
* Memory contents after reset are fixed, not loaded from a file.
