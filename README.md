# Block transfers on a slotted-ring shared-memory multiprocessor

A NUMA operating system often copies whole pages from a remote memory into
the local one (page replication and migration). On a machine where every
remote access is a separate request/response over the network, a 4 KB page
costs a thousand round trips, and every one of them has to fight for the
remote memory again. This design adds one instruction, `LONG_READ
remote_base, local_base, size`, and the node-interface hardware that carries
it out: one request travels to the remote node, the remote node reads the
whole block out of its memory and streams it back in data packets, and the
requesting node writes those packets into its local memory while the
processor waits. Nothing else in the machine changes.

The machine follows the architecture of the paper *Architectural Support for
Block Transfers in a Shared-Memory Multiprocessor* (a Hector-like ring
multiprocessor). The RTL is an independent implementation of what that paper
describes; where the paper is silent, the choices made here are listed in
[Departures and own choices](#departures-and-own-choices).

## The machine

```
        +--------- node 0 ---------+      +--------- node 1 ---------+
 ring   |  proc port -> cache      |      |  proc port -> cache      |
 ---->--+-> node interface --------+--->--+-> node interface --------+--> ... --> node 15 --+
 ^      |   | cache-memory buffer  |      |                          |                      |
 |      |   | memory controller    |      |                          |                      |
 |      |   | local memory         |      |                          |                      |
 |      +--------------------------+      +--------------------------+                      |
 +------------------------------------------------------------------------------------------+
```

* `N_NODES` (16) nodes on a **unidirectional, bit-parallel slotted ring**.
  There is one slot per node; every clock each slot moves one node on. Node
  *i* receives what node *i-1* registered in the previous cycle.
* A slot holds either one request message or 8 bytes (two 32-bit words) of
  data, plus overhead: `full`, `nack`, packet kind, destination and source
  node, a word offset and a two-words-valid flag (`bt_pkg::slot_t`).
* Every node has a processor port, a cache, a node interface, a cache-memory
  buffer, a memory controller and a local memory (16384 words = 64 KB). A global
  word address is {node number, local word address}.
* A processor has at most one request outstanding. Its requests pass
  through a small cache (below) before they reach the node interface.

Because the ring is unidirectional, a request and its answer together always
travel exactly `N_NODES` hops, whichever node is addressed.

## The cache

Each node has a direct-mapped, write-through cache of 256 lines of four
words (`bt_cache`) between the processor port and the node interface.

* A one-word read that hits is answered in one cycle. A miss fetches the
  aligned four-word line through the node interface, from the local memory
  or, for another node's memory, as one request and two data packets.
* A write updates the line if it is present (no allocation on a miss) and is
  always forwarded.
* Reads of two to four words are forwarded uncached.
* A LONG_READ is forwarded; while the processor waits, the cache walks the
  lines of the local destination range and invalidates any it holds, since
  the block is written into memory through the cache-memory buffer, behind
  the cache's back.

There is no coherence between nodes: a cached line of another node's memory
is not invalidated when that memory changes. Software that shares writable
data between nodes has to use uncached (multi-word) reads or avoid stale
lines itself.

## Inside a node interface

```
 cache -------> requester FSM ----(local)----> cache-memory buffer --+
                     |                              ^                |
                     | request packet               | word writes    v
                     v                              |          memory controller
 PACK ----------> Q_out (block + 1)            Q_write (block)  (round robin)
  ^                  |                              ^                |
  | words            v                              |                |
  |          empty-slot mux --> latch --> next   UNPACK              |
  |                  ^                              ^                |
  |   previous ------+--------(packet for me)-------+                |
  |   node                          | requests                       |
  |                                 v                                |
  +---------- server FSM --> interface-memory buffer ----------------+
```

* **Ring stage** (`bt_ring_stage`): a slot addressed to this node is taken
  off the ring. If it is a request the node must refuse, it is instead
  marked `nack`, readdressed to its sender and left on the ring. An empty
  slot, or a slot this node has just emptied, is filled with the head of
  `Q_out`. The output is registered (the "latches").
* **UNPACK** (`bt_unpack`) steers what was taken off: requests to the
  server, simple-read data to the processor's result registers, block data
  to `Q_write` (address = local base + packet offset), write
  acknowledgements and refusals to the requester.
* **PACK** (`bt_pack`) pairs the words the memory returns for a remote read
  into data packets and pushes them into `Q_out`.
* **Q_out** holds a whole block (512 packets) plus the node's own request;
  **Q_write** holds a whole block. Both are `bt_fifo`.
* The **interface-memory buffer** (inside the node interface) carries
  everything that comes from other nodes to the memory. The
  **cache-memory buffer** (outside, on the node's bus) carries the
  processor's local accesses and the write phase of the node's own block
  transfer.

### Refusal and retry

The server takes one remote request at a time. While it is busy, that is,
until the last answer packet of the previous request is in `Q_out`, any
request addressed to the node is refused: it goes back to its sender with
the `nack` flag, and the sender's requester puts it into `Q_out` again
immediately. A request is also refused while `Q_out` lacks room for its whole
answer plus one request packet, which is what guarantees that `Q_out` can
never overflow.

This rule is what gives block transfers their advantage *and* their cost: a
block read holds its source node for the whole read phase (1024 memory
reads), so every ordinary request to that node is refused and retried until
the block has been read.

## A LONG_READ, phase by phase

1. **Request.** The requester builds one *block read* packet (source
   address, length) and puts it into `Q_out`; it takes the first empty slot.
2. **Read phase** (remote node). If accepted, the server issues one word read
   per cycle into its interface-memory buffer. The memory answers one word
   every `MEM_CYCLES` cycles; PACK packs two words per packet into `Q_out`.
3. **Transfer phase.** Packets leave `Q_out` whenever an empty slot passes.
   On a busy ring much or all of the block can pile up in `Q_out`, hence its
   size.
4. **Write phase** (requesting node). UNPACK puts each data packet into
   `Q_write`; the write sequencer turns each entry into two word writes in
   the cache-memory buffer. When the data comes faster than memory can take
   it (for example because the same memory is also serving another node),
   `Q_write` absorbs the excess. When the last word has been written the
   processor gets `proc_done`.

Because the block write uses the cache-memory buffer and the processor is
stalled, the node can meanwhile accept a request from another node through
the interface-memory buffer. The memory controller then alternates between
the two buffers (round robin), so the block write and the foreign request
share the memory bandwidth.

## Timing

The memory controller grants one request every `MEM_CYCLES` cycles (default
5); a response appears exactly `MEM_CYCLES` cycles after its request left
the buffer. On an idle ring, counted from the clock edge that accepts the
processor request to the cycle `proc_done` is high:

| access                              | cycles              | defaults |
|-------------------------------------|---------------------|----------|
| one-word read, cache hit            | 1                   | 1        |
| one-word local read, miss (line fill)| 5 + 4·M            | 25       |
| one-word remote read, miss (line fill, two packets) | 8 + 4·M + N | 44 |
| local read of k = 2..4 words        | 5 + k·M             | 25 (k=4) |
| remote read of k = 2..4 words       | 8 + k·M + N         | 34 (k=2) |
| local write                         | 5 + M               | 10       |
| remote write                        | 9 + M + N           | 30       |
| LONG_READ of L words                | 10 + (L+2)·M + N    | 5156 (L=1024) |

(M = `MEM_CYCLES`, N = `N_NODES`.) Two cycles of each figure except the hit
are the cache forwarding the request and returning the answer; the node
interface alone takes 6 + k·M + N for a remote read of k words. The read phase and the write phase
overlap: on an idle ring packets arrive at the rate the remote memory
produces them, which is the rate the local memory can write them.

## Processor port

Per node *i* of `bt_ring_system`:

| signal              | dir | meaning |
|---------------------|-----|---------|
| `proc_req_valid[i]` | in  | a request is presented |
| `proc_req[i]`       | in  | `bt_pkg::proc_req_t`: `op` (`OP_READ`, `OP_WRITE`, `OP_LONG_READ`), `node`, `addr`, `local_base`, `len`, `wdata` |
| `proc_req_ready[i]` | out | the node's cache is idle (no request in progress); the request is taken on a clock edge where valid and ready are both high |
| `proc_done[i]`      | out | one-cycle pulse: request complete |
| `proc_rdata[i][0:3]`| out | words of a read, valid from `proc_done` until the next read completes (a one-word read returns its word in element 0) |

* `OP_READ`: 1 to 4 words (`len`) at `node:addr`; local or remote (one or
  two packets). A one-word read goes through the cache; longer reads bypass
  it.
* `OP_WRITE`: one word; a remote write completes when its acknowledgement
  comes back.
* `OP_LONG_READ`: `len` (1 to `BLOCK_WORDS`) words from `node:addr` into
  the local memory at `local_base`. Always goes through the ring.

Reset `rst_n` is asynchronous and active low; memories are not cleared.

## Files

| file | contents |
|------|----------|
| `rtl/bt_pkg.sv` | sizes, slot format, packet kinds, memory and processor request types |
| `rtl/bt_ring_system.sv` | top: the ring of nodes |
| `rtl/bt_cache.sv` | processor cache |
| `rtl/bt_node_if.sv` | node interface: requester, server, write sequencer, its queues |
| `rtl/bt_ring_stage.sv` | ring latches and empty-slot multiplexer, refusal marking |
| `rtl/bt_unpack.sv`, `rtl/bt_pack.sv` | UNPACK and PACK |
| `rtl/bt_fifo.sv` | FIFO used for Q_out, Q_write and both memory buffers |
| `rtl/bt_mem_ctrl.sv`, `rtl/bt_memory.sv` | round-robin memory controller, memory array |
| `tb/tb_*.sv` | self-checking testbenches (below) |

Parameters of the top: `N_NODES` = 16, `BLOCK_WORDS` = 1024 (4 KB),
`MEM_WORDS` = 16384, `MEM_CYCLES` = 5 (must be ≥ 2), `BUF_DEPTH` = 2 (depth
of each memory buffer), `CACHE_LINES` = 256. `N_NODES` up to 16 fits the 4-bit node field of
`bt_pkg`; `BLOCK_WORDS` up to 2047 fits the length field.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog. Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bt_pkg.sv tb/tb_bt_ring_system_full.sv \
          --top-module tb_bt_ring_system_full
./obj_dir/Vtb_bt_ring_system_full
```

| testbench | what it shows |
|-----------|---------------|
| `tb_bt_fifo`, `tb_bt_memory` | queue and memory against models, random traffic |
| `tb_bt_mem_ctrl` | exact latency, response port, read data, strict alternation while both buffers wait |
| `tb_bt_ring_stage` | pass-through, take-off, refusal with readdressing, slot filling and refilling |
| `tb_bt_cache` | cache against a behavioural node interface: read values, one-cycle hits without a request, aligned line fills, invalidation by LONG_READ |
| `tb_bt_unpack`, `tb_bt_pack` | routing of every packet kind; packing of odd and even lengths |
| `tb_bt_node_if` | three node interfaces in a ring: every access kind with its exact cycle count, a LONG_READ, two LONG_READs to one node (refusal and retry) |
| `tb_bt_ring_system` | 8 nodes, 32-word blocks: all of the above plus heavy contention and all nodes copying at once; counts refusals, retries, round-robin conflicts, Q_write and Q_out backlog, cache hits and invalidations, requests served while the node's own block write is in progress, and fails if one never happened |
| `tb_bt_ring_system_full` | the same at the default size (16 nodes, 4 KB blocks), about 76,000 cycles |
| `tb_bt_replication` | page-replication workload, below |
| `tb_bt_synthetic` | matrix-multiply and SOR workloads with page replication, below |

All copied blocks are read back through the processor ports and compared
with a reference copy of every memory kept by the testbench.

**Page-replication workload** (`tb_bt_replication`, default size). Nodes
8–15 each replicate two 4 KB pages from nodes 0–7 while nodes 0–7 keep
issuing ordinary one-word remote reads. Run once with word-by-word copying
(one-word reads through the cache, one line fill per four words, and one
local write per word, as a machine without block support must do) and once
with `LONG_READ`:

| | cycles per page | ordinary remote read |
|---|---|---|
| word by word | ≈ 27,500 | ≈ 54 cycles |
| LONG_READ    | ≈ 8,900  | ≈ 950 cycles |

Block transfers make a replication take about a third of the time and make
ordinary remote accesses much slower, because block reads hold their source
nodes. That is
the trade-off the paper reports; the absolute numbers depend on the
memory timing chosen here and on this synthetic mix, not on the paper's
traces (which are not reproduced). The test checks only the direction:
LONG_READ under half the word-by-word time, ordinary reads slower.

**Synthetic algorithms** (`tb_bt_synthetic`, default size, 2,000,000-cycle
window per run). Each node runs its share of an algorithm as a stream of
processor requests. A simple page policy stands in for an operating
system. Read-only shared data lives in 4 KB pages on nodes 0–3. The first
touch of such a page by another node copies the whole page into that
node's memory, word by word in one run and with a `LONG_READ` in the other.
Writable shared data is never copied.

* Matrix multiply, 64 × 64 words. Node *i* owns four rows of A and C, and
  every node copies the four pages of B. The product is recomputed until
  the window closes, and every element of C is checked.
* Red-black SOR, 64 × 64 words, four rows per node. A neighbour's row is
  read remotely with uncached two-word reads. Only the right-hand side is
  copied.

| | program accesses (word by word → LONG_READ) | cycles per page copy |
|---|---|---|
| matrix multiply | 1,906,000 → 2,123,000 (×1.11) | 77,800 → 26,000 |
| SOR             | 2,063,000 → 2,074,000 (×1.005) | 33,200 → 16,700 |

Faster copies buy the most where the program cannot start before its pages
arrive. In SOR the copying is a small share of the run, and nodes 1–3 queue
behind each other's block reads on node 0. So the gain there is small. The
matrix sizes and the page policy are this design's own, so only the
direction of these numbers means anything.

## Departures and own choices

The paper gives the organisation and the protocol; it gives no widths,
timing or encodings. Chosen here:

* 32-bit words, 16-bit local word addresses, 64 KB of memory per node,
  5 cycles per memory access, memory buffers of 2 requests.
* The slot layout and packet kinds, including a word offset in every data
  packet (so the receiver needs no sequence state) and a one-word last
  packet for odd lengths.
* Remote writes are acknowledged, so that the processor knows when they are
  done.
* A refused request is retried at once. A request is also refused while
  `Q_out` lacks room for its whole answer.
* A node may refill, in the same cycle, a slot it has just emptied.
* A simple read returns up to four words (one or two packets); longer
  transfers are LONG_READs.
* The cache is this design's own: the paper only places a cache beside each
  processor. Its size, line, write policy, the invalidation of a LONG_READ's
  destination and the absence of inter-node coherence are choices made
  here.
* Local accesses from the processor are passed by the node interface into
  the cache-memory buffer; no separate processor-memory bus is modelled.
* Only remote-to-local block transfers exist, as in the paper. A LONG_READ
  whose source is the local node still goes round the ring.

Assertions (active in simulation) guard the rules the design relies on: no
push into a full queue, no PACK restart while busy, block and read lengths
within range, `MEM_CYCLES` ≥ 2.

`verilator --lint-only -Wall` reports three kinds of warning, all expected.
SYNCASYNCNET appears because reset is sampled by the assertions'
`disable iff` as well as driving the flip-flops' asynchronous reset.
UNUSEDSIGNAL covers address bits above the memory size, the top bit of
the server's packet count, and tag/index bits
that a helper function ignores. UNUSEDPARAM covers package constants kept
for testbenches and for readers.
