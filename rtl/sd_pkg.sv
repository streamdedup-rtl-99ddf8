// sd_pkg: types, constants and small helper functions shared by the
// StreamDedup core.
//
// Data path: 512-bit beats (64 bytes per cycle), byte k of a beat in bits
// [8k+7:8k]. A page is 4 KiB = 64 beats. Fingerprints are SHA3-256 digests
// (256 bits, digest byte k in bits [8k+7:8k]).
//
// Off-chip memory is addressed in 512-bit lines. The hash table layout is
//   - bucket metadata: 64 bits per bucket, 8 buckets per line
//     ({bloom[31:0], head[31:0]}), bucket b in line META_BASE + b/8
//   - free-index stack: 32-bit indices, 16 per line
//   - entries: one 512-bit line per entry, entry i in line ENTRY_BASE + i;
//     index 0 is the null pointer and never allocated.
// The bucket index is taken from the least significant fingerprint bits,
// the Bloom filter hashes from 15 bits above the bucket index and the
// routing key from the 16 most significant bits, so the three are
// independent of each other.
package sd_pkg;

  localparam int DATA_W   = 512;
  localparam int KEEP_W   = DATA_W / 8;
  localparam int FP_W     = 256;
  localparam int NODE_W   = 8;     // node id width
  localparam int TAG_W    = 8;     // in-flight tag width (ring depth <= 256)
  localparam int LBA_W    = 64;
  localparam int IDX_W    = 32;    // hash table entry index
  localparam int REF_W    = 32;    // reference counter
  localparam int MADDR_W  = 28;    // 16 GB of 64-byte lines
  localparam int MID_W    = 5;     // memory transaction id (requester port)
  localparam int KEY_W    = 16;    // routing key width
  localparam int SIZE_W   = 16;    // compressed size in bytes
  localparam int NPG_W    = 16;    // pages per request
  localparam int BLOOM_LO = 32;    // lowest fingerprint bit used by the Bloom hashes

  typedef enum logic [1:0] {
    OP_READ  = 2'd0,
    OP_WRITE = 2'd1,
    OP_ERASE = 2'd2,
    OP_NONE  = 2'd3
  } op_e;

  // Request header: first beat of every request (low bits of the beat).
  // A write is followed by npages*PAGE_BEATS data beats, a read or erase
  // by npages beats each holding one fingerprint in bits [255:0].
  typedef struct packed {
    logic [LBA_W-1:0]  lba;      // host logical block address of the first page
    logic [NODE_W-1:0] node;     // requesting host / node
    logic [NPG_W-1:0]  npages;   // number of pages (>= 1)
    op_e               op;
  } req_hdr_t;

  // Per-page request kept in the in-flight ring buffer.
  typedef struct packed {
    logic [LBA_W-1:0]  lba;
    logic [NODE_W-1:0] node;
    logic              origin;   // 0: DMA, 1: RDMA
    op_e               op;
  } page_req_t;

  // Lookup request (Fig. 9): srcNode, tag, opCode, fingerprint.
  typedef struct packed {
    logic [NODE_W-1:0] src;
    logic [TAG_W-1:0]  tag;
    op_e               op;
    logic [FP_W-1:0]   fp;
  } lookup_req_t;

  // Lookup result metadata.
  typedef struct packed {
    logic              found;    // fingerprint was present before this request
    logic              zero;     // erase brought the reference count to zero (GC)
    logic [REF_W-1:0]  refcnt;   // reference count after the request
    logic [LBA_W-1:0]  ssd_lba;  // storage LBA of the page
  } lookup_meta_t;

  // Lookup response (Fig. 9): dstNode, tag, metadata.
  typedef struct packed {
    logic [NODE_W-1:0] dst;
    logic [TAG_W-1:0]  tag;
    lookup_meta_t      meta;
  } lookup_resp_t;

  // Hash table entry, one 512-bit line.
  typedef struct packed {
    logic [127:0]      pad;
    logic [IDX_W-1:0]  next;
    logic [LBA_W-1:0]  lba;
    logic [REF_W-1:0]  refcnt;
    logic [FP_W-1:0]   fp;
  } ht_entry_t;

  typedef struct packed {
    logic [31:0]       bloom;
    logic [IDX_W-1:0]  head;
  } bucket_meta_t;

  // Off-chip memory request / response (line granularity, byte strobes).
  typedef struct packed {
    logic               we;
    logic [MADDR_W-1:0] addr;
    logic [DATA_W-1:0]  wdata;
    logic [KEEP_W-1:0]  wstrb;
    logic [MID_W-1:0]   id;
  } mem_req_t;

  typedef struct packed {
    logic [DATA_W-1:0]  rdata;
    logic [MID_W-1:0]   id;
  } mem_resp_t;

  // Output header (first beat of every output message, low bits).
  typedef struct packed {
    logic [SIZE_W-1:0] comp_bytes;  // compressed size, 0 if no data follows
    logic [LBA_W-1:0]  ssd_lba;
    logic [FP_W-1:0]   fp;
    logic [REF_W-1:0]  refcnt;
    logic [LBA_W-1:0]  lba;         // host LBA
    logic [NODE_W-1:0] node;
    logic              to_ssd;      // a storage command is issued (store/read/erase)
    logic              found;
    logic              origin;
    op_e               op;
  } out_hdr_t;

  // Bloom filter: three 5-bit hashes taken from 15 fingerprint bits.
  function automatic logic [31:0] bloom_bits(input logic [FP_W-1:0] fp);
    logic [31:0] b;
    b = '0;
    b[fp[BLOOM_LO +: 5]]      = 1'b1;
    b[fp[BLOOM_LO + 5 +: 5]]  = 1'b1;
    b[fp[BLOOM_LO + 10 +: 5]] = 1'b1;
    return b;
  endfunction

  function automatic logic [KEY_W-1:0] route_key(input logic [FP_W-1:0] fp);
    return fp[FP_W-1 -: KEY_W];
  endfunction

endpackage
