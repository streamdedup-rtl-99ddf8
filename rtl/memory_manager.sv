// memory_manager: allocates and frees hash table entry indices (malloc and
// free for the lookup FSMs).
//
// Free indices are served from an on-chip cache (a FIFO of CACHE_DEPTH
// 32-bit indices). Freed indices go back into the cache; when it is full
// they spill to a stack of free indices in off-chip memory (16 indices per
// 512-bit line, written with byte strobes). When the cache falls below half
// full it is refilled ahead of demand: from the off-chip stack while that
// holds indices, otherwise from a watermark of never-used indices that
// counts up from 1 to NUM_ENTRIES-1 (index 0 is the null pointer). The
// watermark replaces writing every index to off-chip memory at start-up; the
// paper instead stores all empty indices off-chip initially. The cache, the
// off-chip store and the prefetching follow the paper; the sizes, the
// watermark and the one-index-per-cycle ports are this design's choice.
// Ports: NUM_FSM alloc and free request ports, served round robin, one
// alloc and one free per cycle; alloc returns the cache head in the same
// cycle. One off-chip memory port with one outstanding read.
module memory_manager
  import sd_pkg::*;
#(
  parameter int NUM_FSM     = 8,
  parameter int NUM_ENTRIES = 262144,
  parameter int FREE_BASE   = 4096,     // first line of the off-chip free-index stack
  parameter int CACHE_DEPTH = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NUM_FSM-1:0] al_valid,
  output logic [NUM_FSM-1:0] al_ready,
  output logic [IDX_W-1:0]   al_idx,
  input  logic [NUM_FSM-1:0] fr_valid,
  output logic [NUM_FSM-1:0] fr_ready,
  input  logic [IDX_W-1:0]   fr_idx [NUM_FSM],
  // off-chip memory
  output logic               m_valid,
  input  logic               m_ready,
  output mem_req_t           m_req,
  input  logic               m_rvalid,
  input  logic [DATA_W-1:0]  m_rdata,
  // status
  output logic [IDX_W-1:0]   free_count,   // indices still available
  output logic               spill_event,
  output logic               refill_event
);
  localparam int FW = (NUM_FSM > 1) ? $clog2(NUM_FSM) : 1;
  localparam int CW = $clog2(CACHE_DEPTH + 1);

  logic            c_in_valid, c_in_ready, c_out_valid, c_out_ready;
  logic [IDX_W-1:0] c_in, c_out;
  logic [CW-1:0]   c_count;

  sd_fifo #(.WIDTH(IDX_W), .DEPTH(CACHE_DEPTH)) u_cache (
    .clk, .rst_n,
    .in_valid(c_in_valid), .in_ready(c_in_ready), .in_data(c_in),
    .out_valid(c_out_valid), .out_ready(c_out_ready), .out_data(c_out),
    .count(c_count));

  logic [IDX_W-1:0] watermark, sp;   // next never-used index; indices on the off-chip stack
  logic             rd_pend;
  logic [3:0]       rd_word;
  logic [FW-1:0]    rr_a, rr_f, pa, pf;
  logic             any_a, any_f;

  always_comb begin
    any_a = 1'b0; pa = '0;
    any_f = 1'b0; pf = '0;
    for (int k = 0; k < NUM_FSM; k++) begin
      if (!any_a && al_valid[((int'(rr_a) + k) % NUM_FSM)]) begin any_a = 1'b1; pa = FW'(((int'(rr_a) + k) % NUM_FSM)); end
    end
    for (int k = 0; k < NUM_FSM; k++) begin
      if (!any_f && fr_valid[((int'(rr_f) + k) % NUM_FSM)]) begin any_f = 1'b1; pf = FW'(((int'(rr_f) + k) % NUM_FSM)); end
    end
  end

  // allocation
  assign al_idx      = c_out;
  assign c_out_ready = any_a && c_out_valid;
  always_comb begin
    al_ready = '0;
    if (any_a && c_out_valid) al_ready[pa] = 1'b1;
  end

  // what enters the cache / goes off-chip this cycle
  logic do_free_cache, do_spill, do_refill_rd, do_bump;
  always_comb begin
    do_free_cache = 1'b0;
    do_spill      = 1'b0;
    do_refill_rd  = 1'b0;
    do_bump       = 1'b0;
    c_in_valid    = 1'b0;
    c_in          = '0;
    m_valid       = 1'b0;
    m_req         = '0;
    fr_ready      = '0;
    if (m_rvalid) begin                       // refill data returns
      c_in_valid = 1'b1;
      c_in       = m_rdata[32*rd_word +: 32];
    end else if (any_f && !rd_pend) begin     // a freed index
      if (c_in_ready) begin
        do_free_cache = 1'b1;
        c_in_valid    = 1'b1;
        c_in          = fr_idx[pf];
        fr_ready[pf]  = 1'b1;
      end else begin
        m_valid                = 1'b1;
        m_req.we               = 1'b1;
        m_req.addr             = MADDR_W'(FREE_BASE) + MADDR_W'(sp >> 4);
        m_req.wdata            = {16{fr_idx[pf]}};
        m_req.wstrb            = KEEP_W'(64'hF) << (4 * sp[3:0]);
        do_spill               = m_ready;
        fr_ready[pf]           = m_ready;
      end
    end else if (!rd_pend && c_count < CW'(CACHE_DEPTH / 2)) begin
      if (sp != '0) begin
        m_valid      = 1'b1;
        m_req.we     = 1'b0;
        m_req.addr   = MADDR_W'(FREE_BASE) + MADDR_W'((sp - 1) >> 4);
        do_refill_rd = m_ready;
      end else if (watermark < IDX_W'(NUM_ENTRIES)) begin
        do_bump    = 1'b1;
        c_in_valid = 1'b1;
        c_in       = watermark;
      end
    end
  end

  assign spill_event  = do_spill;
  assign refill_event = do_refill_rd;
  assign free_count   = IDX_W'(c_count) + sp + (IDX_W'(NUM_ENTRIES) - watermark);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      watermark <= IDX_W'(1);
      sp        <= '0;
      rd_pend   <= 1'b0;
      rd_word   <= '0;
      rr_a      <= '0;
      rr_f      <= '0;
    end else begin
      if (do_bump) watermark <= watermark + 1'b1;
      if (do_spill) sp <= sp + 1'b1;
      if (do_refill_rd) begin
        sp      <= sp - 1'b1;
        rd_pend <= 1'b1;
        rd_word <= 4'(sp - 1'b1);
      end
      if (m_rvalid) rd_pend <= 1'b0;
      if (any_a && c_out_valid) rr_a <= (pa == FW'(NUM_FSM - 1)) ? '0 : pa + 1'b1;
      if (|fr_ready) rr_f <= (pf == FW'(NUM_FSM - 1)) ? '0 : pf + 1'b1;
    end
  end
endmodule
