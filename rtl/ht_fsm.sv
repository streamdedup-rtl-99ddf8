// ht_fsm: one lookup FSM of the hash table engine.
//
// Handles one lookup request (read, write or erase of a fingerprint) at a
// time. It asks the lock table for the bucket (bucket index = the low
// BUCKET_BITS fingerprint bits) and reads the bucket's metadata {Bloom
// filter, head pointer}; the lock table holds that read back until the lock
// is granted. Then:
//  - write, Bloom filter says absent: fast path, allocate an entry and insert
//    it at the list head, without walking the list;
//  - otherwise walk the linked list of 512-bit entries {fingerprint, refcount,
//    SSD LBA, next}, rebuilding a spare Bloom filter from every entry seen;
//  - found: write increments the refcount, read only reports, erase
//    decrements it and, at zero, unlinks the entry (updating the head pointer
//    or the predecessor's next field) and frees its index;
//  - not found after a walk (a Bloom false positive): the spare filter
//    replaces the bucket's filter; a write then inserts the new entry.
// Then the lock is released and the response {found, zero, refcount, SSD LBA}
// goes back with the request's tag to its source node. A new page's SSD LBA
// is {node id, entry index}. The flow follows the paper; the state encoding,
// the memory layout (see sd_pkg) and the LBA assignment are this design's
// choice. Memory writes use byte strobes so only the changed fields and the
// bucket's own 8 bytes of a shared metadata line are written.
// Timing: each memory access is one request and, for reads, one response;
// a fast-path insert takes 3 memory accesses, a hit k list steps plus the
// update.
module ht_fsm
  import sd_pkg::*;
#(
  parameter int BUCKET_BITS = 15,
  parameter int META_BASE   = 0,
  parameter int ENTRY_BASE  = 20480,
  parameter bit USE_BLOOM   = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NODE_W-1:0]      node_id,
  // lookup request / response
  input  logic                   req_valid,
  output logic                   req_ready,
  input  lookup_req_t            req,
  output logic                   rsp_valid,
  input  logic                   rsp_ready,
  output lookup_resp_t           rsp,
  // lock table
  output logic                   lk_valid,
  input  logic                   lk_ready,
  output logic                   lk_acquire,
  output logic [BUCKET_BITS-1:0] lk_bucket,
  // off-chip memory (through the lock table's switch box)
  output logic                   m_valid,
  input  logic                   m_ready,
  output mem_req_t               m_req,
  input  logic                   m_rvalid,
  input  logic [DATA_W-1:0]      m_rdata,
  // memory manager
  output logic                   al_valid,
  input  logic                   al_ready,
  input  logic [IDX_W-1:0]       al_idx,
  output logic                   fr_valid,
  input  logic                   fr_ready,
  output logic [IDX_W-1:0]       fr_idx,
  // events
  output logic                   ev_fast,      // Bloom fast-path insert
  output logic                   ev_false_pos, // Bloom false positive, filter swapped
  output logic [3:0]             ev_steps      // list entries read by the finished lookup
);
  typedef enum logic [3:0] {
    S_IDLE, S_LOCK, S_RD_META, S_W_META, S_RD_ENT, S_W_ENT, S_MISS,
    S_ALLOC, S_WRITE, S_FREE, S_UNLOCK, S_RSP
  } state_e;

  state_e       state, wr_next;
  lookup_req_t  r;
  bucket_meta_t meta;
  ht_entry_t    ent;
  logic [31:0]  spare, fbits, newbloom;
  logic         maybe;
  logic [IDX_W-1:0] cur, prev, nidx;
  lookup_meta_t res;
  logic [MADDR_W-1:0] wr_addr;
  logic [DATA_W-1:0]  wr_data;
  logic [KEEP_W-1:0]  wr_strb;
  logic [3:0]         steps;
  logic [1:0]         n_writes;      // writes still to issue before unlocking

  logic [BUCKET_BITS-1:0] bucket;
  logic [2:0]             slot;
  logic [MADDR_W-1:0]     meta_addr;

  ht_entry_t    rd_ent;
  bucket_meta_t rd_meta;
  assign rd_ent    = ht_entry_t'(m_rdata);
  assign rd_meta   = bucket_meta_t'(m_rdata[64*slot +: 64]);
  assign bucket    = r.fp[BUCKET_BITS-1:0];
  assign slot      = 3'(bucket);
  assign meta_addr = MADDR_W'(META_BASE) + MADDR_W'(bucket >> 3);

  bloom_filter u_bf (.fp(r.fp), .filter(meta.bloom), .bits(fbits), .maybe(maybe), .inserted(newbloom));

  function automatic logic [MADDR_W-1:0] ent_addr(input logic [IDX_W-1:0] i);
    return MADDR_W'(ENTRY_BASE) + MADDR_W'(i);
  endfunction

  function automatic logic [KEEP_W-1:0] meta_strb(input logic [2:0] s);
    return KEEP_W'(64'hFF) << (8 * s);
  endfunction

  // strobes of entry fields (bytes): fp 0-31, refcnt 32-35, lba 36-43, next 44-47
  localparam logic [KEEP_W-1:0] STRB_REF  = KEEP_W'(64'hF) << 32;
  localparam logic [KEEP_W-1:0] STRB_NEXT = KEEP_W'(64'hF) << 44;

  // in S_RD_ENT a list entry is read unless the Bloom filter or an empty list decides
  logic bloom_skip, walk_go;
  assign bloom_skip = USE_BLOOM && !maybe && steps == 0;
  assign walk_go    = !bloom_skip && cur != '0;

  assign req_ready  = (state == S_IDLE);
  assign lk_bucket  = bucket;
  assign lk_valid   = (state == S_LOCK) || (state == S_UNLOCK);
  assign lk_acquire = (state == S_LOCK);
  assign al_valid   = (state == S_ALLOC);
  assign fr_valid   = (state == S_FREE);
  assign fr_idx     = cur;
  assign rsp_valid  = (state == S_RSP);
  assign rsp.dst    = r.src;
  assign rsp.tag    = r.tag;
  assign rsp.meta   = res;

  always_comb begin
    m_valid = 1'b0;
    m_req   = '0;
    case (state)
      S_RD_META: begin m_valid = 1'b1; m_req.addr = meta_addr; end
      S_RD_ENT:  begin m_valid = walk_go; m_req.addr = ent_addr(cur); end
      S_WRITE: begin
        m_valid     = 1'b1;
        m_req.we    = 1'b1;
        m_req.addr  = wr_addr;
        m_req.wdata = wr_data;
        m_req.wstrb = wr_strb;
      end
      default: ;
    endcase
  end

  // write the bucket metadata {bloom, head} of this FSM's bucket
  task automatic put_meta(input logic [31:0] bloom, input logic [IDX_W-1:0] head);
    wr_addr <= meta_addr;
    wr_data <= {8{bloom, head}};
    wr_strb <= meta_strb(slot);
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      wr_next      <= S_IDLE;
      r            <= '0;
      meta         <= '0;
      ent          <= '0;
      spare        <= '0;
      cur          <= '0;
      prev         <= '0;
      nidx         <= '0;
      res          <= '0;
      wr_addr      <= '0;
      wr_data      <= '0;
      wr_strb      <= '0;
      steps        <= '0;
      n_writes     <= '0;
      ev_fast      <= 1'b0;
      ev_false_pos <= 1'b0;
      ev_steps     <= '0;
    end else begin
      ev_fast      <= 1'b0;
      ev_false_pos <= 1'b0;
      case (state)
        S_IDLE: if (req_valid) begin
          r     <= req;
          res   <= '0;
          steps <= '0;
          state <= S_LOCK;
        end
        S_LOCK:    if (lk_ready) state <= S_RD_META;
        S_RD_META: if (m_ready) state <= S_W_META;
        S_W_META: if (m_rvalid) begin
          meta  <= rd_meta;
          spare <= '0;
          prev  <= '0;
          cur   <= rd_meta.head;
          state <= S_RD_ENT;
        end
        S_RD_ENT: begin
          // decisions that need the metadata just latched
          if (bloom_skip) begin
            if (r.op == OP_WRITE) begin
              ev_fast <= 1'b1;
              spare   <= newbloom;
              state   <= S_ALLOC;
            end else state <= S_UNLOCK;             // certainly absent
          end else if (cur == '0) begin
            state <= S_MISS;
          end else if (m_ready) begin
            state <= S_W_ENT;
          end
        end
        S_W_ENT: if (m_rvalid) begin
          ent   <= rd_ent;
          spare <= spare | bloom_bits(rd_ent.fp);
          steps <= steps + 4'd1;
          if (rd_ent.fp == r.fp) begin
            res.found   <= 1'b1;
            res.ssd_lba <= rd_ent.lba;
            case (r.op)
              OP_WRITE: begin
                res.refcnt <= rd_ent.refcnt + 1'b1;
                wr_addr    <= ent_addr(cur);
                wr_data    <= {rd_ent.pad, rd_ent.next,
                               rd_ent.lba, rd_ent.refcnt + 32'd1,
                               rd_ent.fp};
                wr_strb    <= STRB_REF;
                wr_next    <= S_UNLOCK;
                state      <= S_WRITE;
              end
              OP_ERASE: begin
                res.refcnt <= rd_ent.refcnt - 1'b1;
                if (rd_ent.refcnt > 1) begin
                  wr_addr <= ent_addr(cur);
                  wr_data <= {rd_ent.pad, rd_ent.next,
                              rd_ent.lba, rd_ent.refcnt - 32'd1,
                              rd_ent.fp};
                  wr_strb <= STRB_REF;
                  wr_next <= S_UNLOCK;
                end else begin
                  res.zero <= 1'b1;
                  if (prev == '0) put_meta(meta.bloom, rd_ent.next);
                  else begin
                    wr_addr <= ent_addr(prev);
                    wr_data <= {128'b0, rd_ent.next, 352'b0};
                    wr_strb <= STRB_NEXT;
                  end
                  wr_next <= S_FREE;
                end
                state <= S_WRITE;
              end
              default: begin
                res.refcnt <= rd_ent.refcnt;
                state      <= S_UNLOCK;
              end
            endcase
          end else begin
            prev  <= cur;
            cur   <= rd_ent.next;
            state <= S_RD_ENT;
          end
        end
        S_MISS: begin
          // the whole list was read without a match; the spare filter is exact
          if (USE_BLOOM && maybe) ev_false_pos <= 1'b1;
          if (r.op == OP_WRITE) begin
            spare <= spare | fbits;
            state <= S_ALLOC;
          end else begin
            put_meta(spare, meta.head);
            wr_next <= S_UNLOCK;
            state   <= S_WRITE;
          end
        end
        S_ALLOC: if (al_ready) begin
          nidx        <= al_idx;
          res.refcnt  <= 32'd1;
          res.ssd_lba <= {LBA_W'(node_id) << 32} | LBA_W'(al_idx);
          wr_addr     <= ent_addr(al_idx);
          wr_data     <= {128'b0, meta.head, ({LBA_W'(node_id) << 32} | LBA_W'(al_idx)),
                          32'd1, r.fp};
          wr_strb     <= '1;
          n_writes    <= 2'd1;
          wr_next     <= S_WRITE;
          state       <= S_WRITE;
        end
        S_WRITE: if (m_ready) begin
          if (n_writes != 0) begin
            // second write of an insert: new head and updated filter
            n_writes <= '0;
            put_meta(USE_BLOOM ? spare : 32'hFFFF_FFFF, nidx);
            wr_next  <= S_UNLOCK;
          end else begin
            state <= wr_next;
          end
        end
        S_FREE:   if (fr_ready) state <= S_UNLOCK;
        S_UNLOCK: if (lk_ready) begin
          ev_steps <= steps;
          state    <= S_RSP;
        end
        S_RSP:    if (rsp_ready) state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end
endmodule
