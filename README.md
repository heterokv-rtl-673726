# HeteroKV FPGA datapath: a sorting, B+ tree based request dispatcher

HeteroKV is a key-value store split between an FPGA smart NIC and a host CPU.
The CPU keeps the key-value pairs in many small hash tables. Each table covers
one contiguous key range and is sized to stay in a core's L2 cache. The FPGA
keeps the index: a B+ tree whose leaves are those hash tables. For every batch
of incoming requests the FPGA works out which table each request belongs to. It
then hands the CPU one work list per table, so that a single thread serves all
requests of one table while that table sits in its cache.

This repository holds SystemVerilog for the FPGA side of that scheme:

```
 NIC beats ─► unpack_pe ─► kv_req_buffer ─► merge_sorter ─► dispatch front ─► hobt ─► head_table_builder ─► KV requests queue
  (4 req/beat)  1 req/cycle   8192-entry batch   sorted by key    ▲                 key → leaf    per-leaf runs    head tables queue
                                                                  │                                              batch_done
                                        B+ tree updates from CPU ─┘ (leaf inserts / deletes, with priority)
```

The NIC, the PCIe link, the shared host memory holding the two queues, and the
CPU hash tables are not part of the RTL. Their signals are ports of
`heterokv_top`.

## Why sort first

The requests of a batch are sorted by key before they reach the index. Leaves
own disjoint key ranges, so after sorting, all requests for one leaf arrive back
to back. The dispatcher can then describe a whole batch with a few *head tables*
`{leaf pointer, number of requests}` that cut the sorted request list into runs.
No per-request bookkeeping is needed, and no CPU thread ever touches another
thread's table. The sort is stable: requests with equal keys keep their arrival
order, so a PUT followed by a GET of the same key is still served in that order.

## Requests and batches (`hkv_pkg`, `unpack_pe`, `kv_req_buffer`)

A request (`kv_req_t`, 67 bits) is `{pad, op, key[31:0], value[31:0]}`.
- `op` is GET, PUT, DELETE or SCAN.
- For a SCAN, `key` is the head key and `value` carries the tail key.
- `pad` marks a filler entry.

`unpack_pe` takes beats of up to `REQS_PER_BEAT` (4) requests plus a count, and
emits one request per cycle. It takes the next beat in the same cycle the last
request of the current one leaves.

`kv_req_buffer` is a FIFO of one batch (`BATCH_SIZE` = 8192). When 8192 requests
are waiting, it streams them out at one per cycle and marks the last one. New
requests keep arriving while a batch drains. A one-cycle `flush` pulse releases a
partial batch. The buffer pads that batch up to 8192 entries with fillers
(`pad` = 1, key all ones). The sorter therefore always sees full batches. The
`pad` bit is the top bit of the sort key, so fillers sort to the end. The
dispatcher drops them, except the very last one, which it forwards as the
end-of-batch marker.

## The line-rate merge sorter (`merge_sorter`, `merge_stage`)

The sorter is a chain of log2(8192) = 13 merge stages. Stage *k* receives sorted
runs of 2^k entries and merges each pair of runs into one run of 2^(k+1):

- The first run of a pair is written to FIFO A and the second to FIFO B. Each
  FIFO is 2·2^k deep, so the next pair can flow in while the current pair is
  being merged.
- The output takes the smaller of the two heads. On a tie it takes A, which
  keeps the sort stable. Once one side has delivered its 2^k entries, the output
  drains the other side only.
- Each stage takes at most one entry and gives at most one entry per cycle. A
  continuous stream of one request per cycle is therefore sustained: at 250 MHz
  that is 250 M requests/s.
- `in_ready` and `out_valid` of a stage depend only on registers, so
  back-pressure does not create long combinational paths through the chain.

Latency: stage *k* needs 2^k + 1 entries before it can emit its first one. The
first sorted entry of a batch therefore appears about 8192 + 13 cycles after the
first unsorted one enters. Storage is about 4 × 8192 entries of 67 bits in total
(2.2 Mbit). `out_last` marks every 8192nd output entry.

## The B+ tree index (`hobt`, `hobt_level_pe`)

This is the most involved part of the design.

**Structure.** The index has three levels. Each level is owned by one level PE
with its own node memory. The PEs are identical except for their size: 1, 16
and 256 nodes. A node (`tree_node_t`) holds up to `FANOUT` = 16 entries
`{key, ptr}` sorted by key, plus a count. In levels 0 and 1, `ptr` is a node
index in the level below. In level 2 it is a leaf pointer, i.e. the address of a
CPU hash table. At most 4096 leaves can be indexed.

**Lookup rule.** A key follows entry *i*, where *i* is the number of entries
1..cnt-1 whose key is ≤ the search key. Entry 0 therefore catches everything
below entry 1. Over the whole tree, a key lands in the leaf with the largest
separator not above it. After reset, node 0 of every level holds one entry
(key 0), leading to leaf `INIT_LEAF`.

**Two-cycle PE.** A PE accepts an operation and reads the addressed node in the
same cycle. In the next cycle it decides, writes the node back and registers its
output to the next level. A PE therefore starts one operation every two cycles,
and the three PEs form a pipeline:
- operations (lookups and updates alike) are accepted one every 2 cycles;
- a lookup returns its leaf pointer 2 × 3 = 6 cycles after it is accepted,
  unless it has to wait behind a split at some level.

**Updates: downstream, then upstream.** When a hash table on the CPU splits, the
CPU sends an insert `{first key of the new table, its pointer}`. When a table is
removed, it sends a delete `{key}`. Both travel down the tree like a lookup and
are applied in the bottom node:
- If an insert finds the bottom node full, the node splits. The lower 8 of the
  17 entries stay in place. The upper 9 move to a newly allocated node of that
  level.
- The PE then sends `{first key of the new node, its index}` upstream to the
  parent PE. The parent inserts it the same way and may split in turn.
- An upstream insert takes priority over a downstream operation at a PE.

**Pipelined updates.** Updates flow through the tree together with the
lookups, at the same rate of one operation every two cycles. `hobt` lets at
most `MAX_FLIGHT` = 4 operations into the tree at a time. Three mechanisms in
each level PE keep the results the same as if the operations had run one after
the other:
- *Reservation stations.* Each PE has a small queue for operations from the
  level above and one for split inserts from the level below. Split inserts go
  first. An operation that finds the PE idle and its queue empty is taken at
  once, so a lone lookup never waits.
- *Split forwarding.* A lookup can be routed to a node by the parent before the
  parent has received that node's split. Each PE therefore keeps its last four
  splits `{old node, split key, new node}`. An operation that arrives at an old
  node with a key at or above the split key is sent on to the new node.
- *Room check.* The root cannot split; the depth is fixed at three. On the way
  down each PE tells the next level whether a split from below could be
  absorbed (the `room` bit). It allows for up to three other operations that
  may insert first: a node needs more than three free entries, or (below the
  root) the level needs more than three free nodes and the level above must
  have room. If the bottom node is full and there is no room, the insert is
  refused (`upd_ok` = 0) and nothing changes. A delete that would empty a node
  is also refused.

An insert that splits nodes finishes at the highest level it reaches, so
updates can finish out of order. `hobt` reports each finish with the update's
key (`upd_key`) and queues finishes that happen in the same cycle.

Nodes are never merged or freed. When a deleted entry is not the first of its
node, its key range falls to the left neighbour. When it is the first, the range
falls to the next leaf on the right.

The original names a reservation-station strategy but does not describe it.
The queues, split forwarding, room margin and in-flight limit above are this
design's own way of doing it. The price of the margin is capacity: in the test,
about 2500 leaves fit before inserts are refused, out of at most 4096.

## Dispatch output (`head_table_builder`)

The builder receives lookup results at most one every two cycles, in sorted
order, each carrying its request and leaf pointer. For each result:

- It writes the request to the **KV requests queue** (`kvq_we`, `kvq_idx`,
  `kvq_data`). The index counts from 0 in every batch.
- When the leaf changes, it writes the finished run to the **head tables queue**
  (`htq_we`, `htq_idx`, `htq_data = {ptr, num}`).
- On the end-of-batch flag it closes the last run in the following cycle and
  pulses `batch_done` with the number of head tables and requests. This is the
  notice to the CPU that the batch is ready to serve.

A SCAN is dispatched to the leaf of its head key. Following the range into later
tables is left to the CPU.

## Top-level interface (`heterokv_top`)

| Port | Dir | Meaning |
|---|---|---|
| `beat_valid/ready`, `beat_reqs[4]`, `beat_count` | in | request beats from the NIC; each request is `{op, key, value}` (66 bits) |
| `flush` | in | release a partial batch |
| `upd_valid/ready`, `upd_delete`, `upd_key`, `upd_ptr` | in | index update from the CPU: insert (new leaf `upd_ptr` from `upd_key`) or delete |
| `upd_done`, `upd_ok`, `upd_done_key` | out | an update finished; applied or refused; its key (updates can finish out of order) |
| `kvq_*`, `htq_*` | out | write ports of the two queues |
| `batch_done`, `batch_heads`, `batch_reqs` | out | end of a batch's dispatch |
| `split_pulse[3]` | out | a node split, per level |

All handshakes are valid/ready. Reset is asynchronous and active low. The whole
design runs on one clock; the original runs at 250 MHz.

One index copy takes one lookup every two cycles. Once the sorter is faster than
that, the dispatcher back-pressures the sorter, the buffer and finally
`beat_ready`. A full batch takes 2 × 8192 cycles to dispatch. At 250 MHz that is
125 M requests/s. The original reports up to 430 M requests/s for the whole
system and scales by using several index copies. This RTL builds one copy.

## Parameters

| Name | Default | Where | Notes |
|---|---|---|---|
| `BATCH_SIZE` | 8192 | top, buffer, sorter | batch size of the original; must be a power of two |
| `REQS_PER_BEAT` | 4 | top, unpack | own choice (packet format not specified) |
| `KEY_W`, `VAL_W` | 32 | package | 32-bit keys and values, as evaluated |
| `LEVELS` | 3 | package | three-level index |
| `FANOUT` | 16 | package | own choice |
| `PTR_W` | 32 | package | leaf pointer / node index width, own choice |
| `IDX_W` | 16 | top, builder | queue index width, own choice |
| `INIT_LEAF` | 0 | top, index | leaf pointer of the single initial leaf |
| `MAX_FLIGHT` | 4 | index | operations inside the index at a time, own choice; sets the level PEs' `QDEPTH`, `RDEPTH` (4) and `MARGIN` (3) |

## What follows the original and what is this design's own

Taken from the original:
- 32-bit keys and values;
- 8K batches that are buffered and then sorted by key;
- a line-rate merge sorter;
- a three-level B+ tree with one PE per level that differ only in memory size,
  taking one operation every two cycles;
- updates that go down and then back up the tree, pipelined with lookups
  through reservation stations;
- per-leaf head tables `{pointer, number}` and a KV requests queue, followed by
  a notice to the CPU.

This design's own choices:
- the beat format;
- the flush-and-filler mechanism;
- the FIFO structure of the merge stages;
- the node format, fan-out, split rule and refusal rules;
- the reservation-station queues, split forwarding, room margin and in-flight
  limit of the index;
- priority of CPU updates at the index input;
- the queue write-port format.

Not built:
- the NIC, the PCIe / shared-memory transport and the CPU hash tables (software);
- several index copies.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_unpack_pe` | order and completeness under random stalls; 1 request/cycle for full beats |
| `tb_kv_req_buffer` | nothing leaves before 8 entries (test size); batch order and `last`; flush with fillers |
| `tb_merge_sorter` | stable sort of batches of 32 with many equal keys and fillers under random stalls; 1 entry/cycle in and out |
| `tb_hobt_level_pe` | insert, search, refused insert, split (upstream message and both halves), delete, upstream priority, 2-cycle latency and rate, update key tags |
| `tb_hobt` | default size: 1600 inserts, deletes and lookups back to back, checked in admission order against a model (splits and split forwarding must occur); then leaf inserts one at a time until inserts are refused, 4000 lookups, lookup rate and 6-cycle latency, deletes |
| `tb_head_table_builder` | queue writes, head tables and counts over many batches, including an empty one |
| `tb_heterokv_top` | end to end at default size: full batch of 8192 and a flushed partial batch, back-to-back CPU updates matched by key, back-pressure; sorted/stable queue, per-leaf head tables, dispatch rate |
| `tb_ycsb_mix` | default size: GET-, PUT- and SCAN-heavy batches (95/5 mixes) with skewed keys |

To simulate with Verilator (here the end-to-end test):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_heterokv_top \
    -y rtl -y tb +libext+.sv rtl/hkv_pkg.sv tb/tb_heterokv_top.sv
./obj_dir/Vtb_heterokv_top
```

Each full-size test runs in a few seconds. The testbenches drive and sample on
the rising clock edge with non-blocking assignments. The simulator is
two-state, so everything the design reads is reset or written before it is
read.
