// streamdedup_core: in-line deduplication core for one node of a
// disaggregated storage front end.
//
// Requests (read, write, erase; packets of 512-bit beats) come from the local
// host by DMA or from remote hosts by RDMA. The input arbiter merges them and
// the supporters slice them into single pages. Write pages are hashed by the
// fingerprint engine (SHA3-256) while their data waits in the page buffer
// of parse_result; reads and erases bring their fingerprint along. The
// in-flight controller holds every page request in a ring buffer, sends a
// lookup (tagged with its slot) to the routing table and retires requests in
// order once answered. The routing table sends a lookup to the local hash
// table engine if this node owns the fingerprint's key range, or to another
// node over the network (ports net_*); responses come back the same way.
// The hash table engine keeps fingerprint -> {refcount, SSD LBA} in off-chip
// memory (port m_*). parse_result turns each answer into an output header and
// hands unique write pages to the compression engine (external GZip cores on
// ports gz_*); the output arbiter returns each message to DMA or RDMA.
// The RDMA network stack, the DMA shell, the off-chip memory and the GZip
// cores are outside this module. The block structure is the paper's
// (Fig. 7); widths, packet formats and handshakes are this design's choice
// (see the block files).
module streamdedup_core
  import sd_pkg::*;
#(
  parameter int PAGE_BYTES  = 4096,
  parameter int NUM_SHA3    = 64,
  parameter int NUM_GZIP    = 6,
  parameter int NUM_FSM     = 8,
  parameter int BUCKET_BITS = 15,
  parameter int NUM_ENTRIES = 262144,
  parameter int RING_DEPTH  = 64,
  parameter int NUM_ROUTES  = 8,
  parameter int FREE_CACHE  = 64,
  parameter bit USE_BLOOM   = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  // requests
  input  logic              dma_in_valid,
  output logic              dma_in_ready,
  input  logic [DATA_W-1:0] dma_in_data,
  input  logic              rdma_in_valid,
  output logic              rdma_in_ready,
  input  logic [DATA_W-1:0] rdma_in_data,
  // output messages (header beat + compressed page)
  output logic              dma_out_valid,
  input  logic              dma_out_ready,
  output logic [DATA_W-1:0] dma_out_data,
  output logic              dma_out_last,
  output logic              rdma_out_valid,
  input  logic              rdma_out_ready,
  output logic [DATA_W-1:0] rdma_out_data,
  output logic              rdma_out_last,
  // inter-accelerator network (RDMA SEND of lookup metadata)
  output logic              net_req_out_valid,
  input  logic              net_req_out_ready,
  output lookup_req_t       net_req_out,
  output logic [NODE_W-1:0] net_req_out_node,
  input  logic              net_req_in_valid,
  output logic              net_req_in_ready,
  input  lookup_req_t       net_req_in,
  output logic              net_rsp_out_valid,
  input  logic              net_rsp_out_ready,
  output lookup_resp_t      net_rsp_out,
  output logic [NODE_W-1:0] net_rsp_out_node,
  input  logic              net_rsp_in_valid,
  output logic              net_rsp_in_ready,
  input  lookup_resp_t      net_rsp_in,
  // routing table configuration
  input  logic              cfg_we,
  input  logic [7:0]        cfg_addr,
  input  logic              cfg_valid,
  input  logic [NODE_W-1:0] cfg_node,
  input  logic [KEY_W-1:0]  cfg_start,
  input  logic [KEY_W-1:0]  cfg_end,
  input  logic              cfg_mode_we,
  input  logic              cfg_mode,
  input  logic [NODE_W-1:0] cfg_num_nodes,
  // off-chip memory
  output logic              m_valid,
  input  logic              m_ready,
  output mem_req_t          m_req,
  input  logic              m_rvalid,
  input  mem_resp_t         m_rsp,
  // GZip cores
  output logic [NUM_GZIP-1:0] gz_in_valid,
  input  logic [NUM_GZIP-1:0] gz_in_ready,
  output logic [63:0]         gz_in_data  [NUM_GZIP],
  output logic [NUM_GZIP-1:0] gz_in_last,
  input  logic [NUM_GZIP-1:0] gz_out_valid,
  output logic [NUM_GZIP-1:0] gz_out_ready,
  input  logic [63:0]         gz_out_data [NUM_GZIP],
  input  logic [NUM_GZIP-1:0] gz_out_last,
  input  logic [3:0]          gz_out_bytes [NUM_GZIP],
  // status
  output logic              init_done,
  output logic [IDX_W-1:0]  free_count,
  output logic [31:0]       cnt_fast,
  output logic [31:0]       cnt_false_pos,
  output logic [31:0]       cnt_park,
  output logic [31:0]       cnt_spill,
  output logic [31:0]       cnt_refill,
  output logic [31:0]       cnt_unique,
  output logic [31:0]       cnt_dup
);
  // input arbiter -> supporters
  logic              a_valid, a_ready, a_origin, a_first;
  logic [DATA_W-1:0] a_data;

  io_arbiter #(.PAGE_BYTES(PAGE_BYTES)) u_in_arb (
    .clk, .rst_n,
    .dma_valid(dma_in_valid), .dma_ready(dma_in_ready), .dma_data(dma_in_data),
    .rdma_valid(rdma_in_valid), .rdma_ready(rdma_in_ready), .rdma_data(rdma_in_data),
    .out_valid(a_valid), .out_ready(a_ready), .out_data(a_data), .out_origin(a_origin),
    .out_first(a_first));

  logic              p_valid, p_ready, p_has_fp, pg_valid, pg_ready;
  page_req_t         p_req;
  logic [FP_W-1:0]   p_fp;
  logic [DATA_W-1:0] pg_data;

  supporters #(.PAGE_BYTES(PAGE_BYTES)) u_sup (
    .clk, .rst_n,
    .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data), .in_origin(a_origin),
    .preq_valid(p_valid), .preq_ready(p_ready), .preq(p_req), .preq_has_fp(p_has_fp),
    .preq_fp(p_fp),
    .page_valid(pg_valid), .page_ready(pg_ready), .page_data(pg_data));

  // page stream to both the fingerprint engine and the page buffer
  logic fe_in_ready, pb_in_ready;
  assign pg_ready = fe_in_ready && pb_in_ready;

  logic            fe_valid, fe_ready;
  logic [FP_W-1:0] fe_fp;

  fingerprint_engine #(.NUM_CORES(NUM_SHA3), .PAGE_BYTES(PAGE_BYTES)) u_fe (
    .clk, .rst_n,
    .in_valid(pg_valid && pb_in_ready), .in_ready(fe_in_ready), .in_data(pg_data),
    .out_valid(fe_valid), .out_ready(fe_ready), .out_fp(fe_fp));

  // in-flight controller
  logic         lk_valid, lk_ready, if_rsp_valid, ret_valid, ret_ready;
  lookup_req_t  lk_req;
  lookup_resp_t if_rsp;
  page_req_t    ret_req;
  logic [FP_W-1:0] ret_fp;
  lookup_meta_t ret_meta;
  logic [$clog2(RING_DEPTH+1)-1:0] occupancy;

  inflight_controller #(.DEPTH(RING_DEPTH)) u_ifc (
    .clk, .rst_n,
    .alloc_valid(p_valid), .alloc_ready(p_ready), .alloc_req(p_req),
    .alloc_has_fp(p_has_fp), .alloc_fp(p_fp),
    .fp_valid(fe_valid), .fp_ready(fe_ready), .fp_in(fe_fp),
    .lk_valid, .lk_ready, .lk_req,
    .rsp_valid(if_rsp_valid), .rsp(if_rsp),
    .ret_valid, .ret_ready, .ret_req, .ret_fp, .ret_meta, .occupancy);

  // routing table
  logic         ht_req_valid, ht_req_ready, ht_rsp_valid, ht_rsp_ready;
  lookup_req_t  ht_req;
  lookup_resp_t ht_rsp;
  logic [NODE_W-1:0] self_id;

  routing_table #(.NUM_ROUTES(NUM_ROUTES)) u_rt (
    .clk, .rst_n,
    .cfg_we, .cfg_addr, .cfg_valid, .cfg_node, .cfg_start, .cfg_end,
    .cfg_mode_we, .cfg_mode, .cfg_num_nodes, .self_id,
    .lreq_valid(lk_valid), .lreq_ready(lk_ready), .lreq(lk_req),
    .nreq_valid(net_req_in_valid), .nreq_ready(net_req_in_ready), .nreq(net_req_in),
    .ht_req_valid, .ht_req_ready, .ht_req,
    .net_req_valid(net_req_out_valid), .net_req_ready(net_req_out_ready),
    .net_req(net_req_out), .net_req_node(net_req_out_node),
    .lrsp_valid(ht_rsp_valid), .lrsp_ready(ht_rsp_ready), .lrsp(ht_rsp),
    .nrsp_valid(net_rsp_in_valid), .nrsp_ready(net_rsp_in_ready), .nrsp(net_rsp_in),
    .if_rsp_valid, .if_rsp_ready(1'b1), .if_rsp,
    .net_rsp_valid(net_rsp_out_valid), .net_rsp_ready(net_rsp_out_ready),
    .net_rsp(net_rsp_out), .net_rsp_node(net_rsp_out_node));

  hash_table_engine #(.NUM_FSM(NUM_FSM), .BUCKET_BITS(BUCKET_BITS), .NUM_ENTRIES(NUM_ENTRIES),
                      .CACHE_DEPTH(FREE_CACHE), .USE_BLOOM(USE_BLOOM)) u_ht (
    .clk, .rst_n, .node_id(self_id),
    .req_valid(ht_req_valid), .req_ready(ht_req_ready), .req(ht_req),
    .rsp_valid(ht_rsp_valid), .rsp_ready(ht_rsp_ready), .rsp(ht_rsp),
    .m_valid, .m_ready, .m_req, .m_rvalid, .m_rsp,
    .init_done, .free_count, .cnt_fast, .cnt_false_pos, .cnt_park, .cnt_spill, .cnt_refill);

  // parse result
  logic              h_valid, h_ready, h_has_page, u_valid, u_ready;
  out_hdr_t          h;
  logic [DATA_W-1:0] u_data;

  parse_result #(.PAGE_BYTES(PAGE_BYTES), .BUF_PAGES(RING_DEPTH)) u_parse (
    .clk, .rst_n,
    .pg_in_valid(pg_valid && fe_in_ready), .pg_in_ready(pb_in_ready), .pg_in_data(pg_data),
    .ret_valid, .ret_ready, .ret_req, .ret_fp, .ret_meta,
    .hdr_valid(h_valid), .hdr_ready(h_ready), .hdr(h), .hdr_has_page(h_has_page),
    .pg_out_valid(u_valid), .pg_out_ready(u_ready), .pg_out_data(u_data),
    .cnt_unique, .cnt_dup);

  // compression
  logic              c_valid, c_ready, c_last;
  logic [DATA_W-1:0] c_data;

  compression_engine #(.NUM_CORES(NUM_GZIP), .PAGE_BYTES(PAGE_BYTES), .HDR_DEPTH(RING_DEPTH)) u_comp (
    .clk, .rst_n,
    .hdr_valid(h_valid), .hdr_ready(h_ready), .hdr(h), .hdr_has_page(h_has_page),
    .pg_valid(u_valid), .pg_ready(u_ready), .pg_data(u_data),
    .gz_in_valid, .gz_in_ready, .gz_in_data, .gz_in_last,
    .gz_out_valid, .gz_out_ready, .gz_out_data, .gz_out_last, .gz_out_bytes,
    .out_valid(c_valid), .out_ready(c_ready), .out_data(c_data), .out_last(c_last));

  out_arbiter u_out_arb (
    .clk, .rst_n,
    .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data), .in_last(c_last),
    .dma_valid(dma_out_valid), .dma_ready(dma_out_ready), .dma_data(dma_out_data),
    .dma_last(dma_out_last),
    .rdma_valid(rdma_out_valid), .rdma_ready(rdma_out_ready), .rdma_data(rdma_out_data),
    .rdma_last(rdma_out_last));
endmodule
