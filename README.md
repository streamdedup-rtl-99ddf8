# StreamDedup core: in-line block deduplication in the data path

Storage that is reached over a network can drop duplicate pages before they
reach an SSD. This design does the work in hardware, on the stream. Each
incoming 4 KiB write page is hashed with SHA3-256. The 256-bit fingerprint is
then looked up in a hash table kept in the board's off-chip memory.

- A page seen before only has its reference count raised. It gets the storage
  address (SSD LBA) of the first copy, and its data is dropped.
- A new page is inserted in the table, compressed and sent on to be stored.
- Reads resolve a fingerprint to its SSD LBA.
- Erases lower the reference count. When the count reaches zero, the entry is
  freed and the host is told it may trim the SSD page.

Several boards share one fingerprint space. Each node owns a range of the
16-bit routing key (the top 16 bits of the fingerprint). A lookup for a key
the node does not own travels node to node until the owner answers.

The target rate is one 512-bit beat per cycle at 200 MHz (12.8 GB/s).

## Data path

```
DMA in --+                                              +--> DMA out
         +-> io_arbiter -> supporters -+-> fingerprint_engine (64 x sha3_core)
RDMA in -+                             |         | fp
                                       +--> inflight_controller (ring, tags)
                                       |         | lookup            ^ result, in order
                                       |   routing_table <-> net_req / net_rsp ports
                                       |         |
                                       |   hash_table_engine <-> off-chip memory (m_*)
                                       |         v
                                       +--> parse_result (page buffer)
                                                 | unique pages
                                           compression_engine <-> external GZip cores (gz_*)
                                                 v
                                            out_arbiter ----------> RDMA out
```

**Requests.** A request is one header beat, `req_hdr_t`, in the low bits of
the beat:

- `op`: read, write or erase;
- `npages`;
- `node`;
- `lba`, the host LBA of the first page.

A write is followed by `npages × 64` data beats. A read or erase is followed
by `npages` beats, one per page, each holding that page's fingerprint in bits
[255:0]. `io_arbiter` interleaves the DMA and RDMA streams one whole request at
a time, in round robin. `supporters` cuts each request into page requests and
sends write data to the fingerprint engine.

**Fingerprints.** `sha3_core` is an iterative Keccak-f[1600]:

- one round per cycle;
- lanes absorbed one 64-bit word per cycle;
- about 1,320 cycles for a 4 KiB page.

`fingerprint_engine` deals whole pages to its 64 cores in turn and collects
the digests in the same order. Fingerprints therefore come out in request
order, at about three times the input rate. Digest byte k sits in bits
[8k+7:8k].

**Ordering across out-of-order lookups.** `inflight_controller` is a ring
buffer. The slot address of a request is its tag, and the tag travels with
the lookup and comes back with the response. Lookups can finish in any order,
because they go to different FSMs and different nodes. Requests still leave
the ring strictly in order, so everything downstream sees a sequential
stream. A write waits in its slot until its fingerprint arrives.

**Routing** (`routing_table`). The table holds the node's own key range and up
to `NUM_ROUTES` entries `{nodeId, hashStart, hashEnd}`.

- A key inside the own range goes to the local hash table engine.
- A key inside an entry's range goes to that node.
- Any other key goes to an intermediate node. `cfg_mode=0` picks the entry
  nearest the key; `cfg_mode=1` picks the closest entry below it.

Responses go back by node id in the same way. Requests and responses use
separate paths, and each path arbitrates between local and network inputs.

## The hash table engine

This is the hardest part, and it is where most of the design's choices were
made.

**Memory layout.** Everything is addressed in 64-byte lines.

| region | contents |
|---|---|
| lines `0 .. 2^BUCKET_BITS/8 - 1` | bucket metadata: 8 buckets per line, 64 bits each: `{bloom[31:0], head[31:0]}` |
| next `NUM_ENTRIES/16` lines | off-chip stack of free entry indices, 16 × 32-bit per line |
| rest | entries, one line each: `{pad, next, ssd_lba, refcnt, fp}` |

The bucket is `fp[BUCKET_BITS-1:0]`. Entry index 0 means "end of list".

**Lookup FSMs** (`ht_fsm`, `NUM_FSM` copies). The distributor gives each
request to an idle FSM. The FSM then:

1. takes the bucket lock;
2. reads the bucket line;
3. walks the chained list;
4. updates or allocates an entry and rewrites the list head and the filter;
5. releases the lock and answers.

Each bucket has a 32-bit Bloom filter in its metadata. Three 5-bit bit
positions come from fingerprint bits [46:32] (`bloom_filter`). A write whose
bits are not all set is certainly new, so the list walk is skipped (the "fast
path"). If the filter says "maybe" and the walk does not find the page, that
was a false positive. While walking, the FSM builds a spare filter from every
fingerprint it passes. On a false positive it writes the spare back, which
also drops bits left behind by erased pages.

**Lock table** (`lock_table`). This is two-phase locking per bucket, with no
reply to the FSM. An FSM asks for a lock. If no other FSM holds that bucket,
the FSM's entry becomes active, and its *switch box* opens its memory port.
Otherwise the request is parked in a FIFO, and the head of that FIFO is
retried every cycle ahead of new requests. An assertion checks that no bucket
is ever held twice.

**Memory manager** (`memory_manager`). It works like malloc/free for entry
indices, using an on-chip cache of `FREE_CACHE` indices.

- Freed indices go into the cache. When the cache is full, they spill to the
  off-chip stack 16 at a time.
- When the cache falls below half full, it refills from the stack.
- If the stack is empty, fresh indices come from a *watermark* of
  never-used indices.

The watermark means the free list does not have to be written at start-up.
The only start-up work is clearing the metadata lines (`init_done`). That
takes 4,096 cycles for 32,768 buckets.

One memory port (`m_*`) is shared by the FSMs, the memory manager and the
initialiser, with round-robin arbitration. Responses are matched to requesters
by `id`, and each requester sees its responses in order. Memory latency can be
any number of cycles.

## Results and output

`parse_result` keeps write data in a page buffer while the lookup is
outstanding. It builds one `out_hdr_t` header beat per page. `to_ssd` is set
as follows:

- write: set when the page is new;
- read: set when the page is found;
- erase: set when the reference count reached zero.

New write pages go to `compression_engine`, and duplicates drop their data.
The compression engine deals pages in round robin to `NUM_GZIP` external
cores. Each core takes 64-bit words and returns 64-bit words with a byte
count. Results are collected in the same order. The engine writes the
compressed size into the header and packs the output back into 512-bit
beats. `out_arbiter` returns each message to the port its request came from
(`dma_out_*` or `rdma_out_*`). `*_last` marks the end of a message.

## Parameters of `streamdedup_core`

| parameter | default | meaning |
|---|---|---|
| `PAGE_BYTES` | 4096 | page size |
| `NUM_SHA3` | 64 | SHA3-256 cores |
| `NUM_GZIP` | 6 | GZip core ports |
| `NUM_FSM` | 8 | lookup FSMs |
| `BUCKET_BITS` | 15 | 32,768 buckets |
| `NUM_ENTRIES` | 262,144 | hash table entries (16 MiB of memory); raise for a full board |
| `RING_DEPTH` | 64 | in-flight requests, and pages held in the page buffer |
| `NUM_ROUTES` | 8 | remote routing entries |
| `FREE_CACHE` | 64 | on-chip free-index cache |
| `USE_BLOOM` | 1 | per-bucket Bloom filter on/off |

## Departures and limits

- The GZip cores, the RDMA network stack, the DMA shell and the off-chip
  memory are not included. They connect through the `gz_*`, `net_*`,
  `dma_*`/`rdma_*` and `m_*` ports.
- The free-index list uses a watermark instead of writing every free index at
  start-up.
- The default table has 262,144 entries, not the size that fills a 16 GB
  board (about 2.5 × 10^8 entries). The index and address widths allow the
  full size.
- New SSD LBAs are `{node id, entry index}`. In a real system the host side
  would allocate them.
- The request and header formats, the routing-key position, the Bloom-bit
  position and all handshakes are this design's own.
- Only the read, write and erase commands exist.
- Nothing here has been timed against a 200 MHz target.

## Simulating

Testbenches are in `tb/`. Each prints `TB_RESULT checks=N failures=M` and
stops itself with a watchdog.

- `tb_sha3_core`: digests of whole pages against reference values, and the
  cycle count per page.
- `tb_fingerprint_engine`: four cores, results in order.
- `tb_hash_table_engine`: random writes, reads and erases against a reference
  model, with a small table so that locks park, indices spill and refill, and
  the Bloom filter hits and misses.
- `tb_streamdedup_core`: three nodes connected by a network model. It runs
  writes with duplicates, reads, erase-all and rewrites. It counts each
  mechanism (Bloom fast path, false positive, parked lock, spill, refill,
  duplicate, remote lookup, multi-hop, compression, RDMA output, input stall)
  and fails if any of them never happened.

The Bloom filter, lookup FSM, lock table and memory manager are covered by
`tb_hash_table_engine`. The arbiters, supporters, in-flight controller,
routing table, result parser and compression engine are covered by
`tb_streamdedup_core`. Neither has a separate testbench.

Behavioural models for the memory (`sd_mem_model`) and the GZip cores
(`gzip_core_model`, an identity "compressor") are in `tb/`. With Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_streamdedup_core \
  -y rtl -y tb +libext+.sv rtl/sd_pkg.sv tb/tb_streamdedup_core.sv -o sim
./obj_dir/sim
```

The three-node test runs at reduced sizes: 4 SHA3 cores, 2 GZip cores,
4 FSMs, 8 buckets and 256 entries per node. `tb_streamdedup_full` runs one
node at every default parameter. It waits for the 4,096-cycle metadata
clear, then writes a page, writes it again and reads it back. It checks the
fingerprint, the stored data, the duplicate's reference count and the SSD
LBA. It finishes in seconds.
