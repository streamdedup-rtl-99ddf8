// hash_table_engine: the hardware hash table that maps fingerprints to SSD
// LBAs and reference counts, kept in off-chip memory.
//
// Contents: a distributor that hands each lookup request to an idle lookup
// FSM, NUM_FSM lookup FSMs (ht_fsm) working concurrently, the lock table with
// its switch boxes (lock_table), the memory manager for entry indices
// (memory_manager), an initializer that clears all bucket metadata after
// reset, a round-robin arbiter that merges the FSMs', the memory manager's
// and the initializer's memory requests onto the single off-chip memory
// port, and a round-robin collector of the FSMs' responses. The structure is
// the paper's (Fig. 7, right); the arbitration policies and memory map are
// this design's choice.
// Memory map (512-bit lines): bucket metadata from line 0 (8 buckets per
// line), then the free-index stack (NUM_ENTRIES/16 lines), then the entries
// (one line each). With 8 entries per bucket on average this gives the
// paper's split: 1.45 % metadata, 5.8 % free indices, 92.75 % entries.
// Memory port: request valid/ready; read data returns later with the
// request's id (in any order across ids, in order per id), no back-pressure.
// Timing: requests are accepted only after initialization (2^BUCKET_BITS/8
// cycles after reset, init_done high).
module hash_table_engine
  import sd_pkg::*;
#(
  parameter int NUM_FSM     = 8,
  parameter int BUCKET_BITS = 15,
  parameter int NUM_ENTRIES = 262144,
  parameter int CACHE_DEPTH = 64,
  parameter bit USE_BLOOM   = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] node_id,
  input  logic              req_valid,
  output logic              req_ready,
  input  lookup_req_t       req,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output lookup_resp_t      rsp,
  // off-chip memory
  output logic              m_valid,
  input  logic              m_ready,
  output mem_req_t          m_req,
  input  logic              m_rvalid,
  input  mem_resp_t         m_rsp,
  // status
  output logic              init_done,
  output logic [IDX_W-1:0]  free_count,
  output logic [31:0]       cnt_fast,        // Bloom fast-path inserts
  output logic [31:0]       cnt_false_pos,   // Bloom false positives (filter rebuilt)
  output logic [31:0]       cnt_park,        // lock requests parked
  output logic [31:0]       cnt_spill,       // free indices spilled off-chip
  output logic [31:0]       cnt_refill       // free-index refills from off-chip
);
  localparam int META_LINES = (1 << BUCKET_BITS) / 8;
  localparam int FREE_BASE  = META_LINES;
  localparam int ENTRY_BASE = FREE_BASE + NUM_ENTRIES / 16;
  localparam int NP         = NUM_FSM + 2;         // memory ports: FSMs, manager, initializer
  localparam int PW         = $clog2(NP);
  localparam int FW         = (NUM_FSM > 1) ? $clog2(NUM_FSM) : 1;

  // ---------------- FSM array ----------------
  logic [NUM_FSM-1:0]     f_req_valid, f_req_ready, f_rsp_valid, f_rsp_ready;
  lookup_resp_t           f_rsp [NUM_FSM];
  logic [NUM_FSM-1:0]     lk_valid, lk_ready, lk_acquire, is_active;
  logic [BUCKET_BITS-1:0] lk_bucket [NUM_FSM];
  logic [NUM_FSM-1:0]     fm_valid, fm_ready, gm_valid, gm_ready, fm_rvalid;
  mem_req_t               fm_req [NUM_FSM];
  logic [NUM_FSM-1:0]     al_valid, al_ready, fr_valid, fr_ready;
  logic [IDX_W-1:0]       al_idx;
  logic [IDX_W-1:0]       fr_idx [NUM_FSM];
  logic [NUM_FSM-1:0]     ev_fast, ev_fp;
  logic                   park_event;

  // distributor: first idle FSM takes the request
  logic [FW-1:0] idle_sel;
  logic          any_idle;
  always_comb begin
    any_idle = 1'b0;
    idle_sel = '0;
    for (int i = 0; i < NUM_FSM; i++)
      if (!any_idle && f_req_ready[i]) begin any_idle = 1'b1; idle_sel = FW'(i); end
    for (int i = 0; i < NUM_FSM; i++)
      f_req_valid[i] = req_valid && init_done && any_idle && idle_sel == FW'(i);
  end
  assign req_ready = init_done && any_idle;

  for (genvar i = 0; i < NUM_FSM; i++) begin : g_fsm
    logic [3:0] unused_steps;
    ht_fsm #(.BUCKET_BITS(BUCKET_BITS), .META_BASE(0), .ENTRY_BASE(ENTRY_BASE),
             .USE_BLOOM(USE_BLOOM)) u_fsm (
      .clk, .rst_n, .node_id,
      .req_valid(f_req_valid[i]), .req_ready(f_req_ready[i]), .req(req),
      .rsp_valid(f_rsp_valid[i]), .rsp_ready(f_rsp_ready[i]), .rsp(f_rsp[i]),
      .lk_valid(lk_valid[i]), .lk_ready(lk_ready[i]), .lk_acquire(lk_acquire[i]),
      .lk_bucket(lk_bucket[i]),
      .m_valid(fm_valid[i]), .m_ready(fm_ready[i]), .m_req(fm_req[i]),
      .m_rvalid(fm_rvalid[i]), .m_rdata(m_rsp.rdata),
      .al_valid(al_valid[i]), .al_ready(al_ready[i]), .al_idx(al_idx),
      .fr_valid(fr_valid[i]), .fr_ready(fr_ready[i]), .fr_idx(fr_idx[i]),
      .ev_fast(ev_fast[i]), .ev_false_pos(ev_fp[i]), .ev_steps(unused_steps));
  end

  lock_table #(.NUM_FSM(NUM_FSM), .BUCKET_BITS(BUCKET_BITS)) u_lock (
    .clk, .rst_n,
    .lk_valid, .lk_ready, .lk_acquire, .lk_bucket, .is_active,
    .fsm_m_valid(fm_valid), .fsm_m_ready(fm_ready),
    .mem_m_valid(gm_valid), .mem_m_ready(gm_ready),
    .park_event);

  // ---------------- memory manager ----------------
  logic     mm_valid, mm_ready, mm_rvalid, mm_spill, mm_refill;
  mem_req_t mm_req;

  memory_manager #(.NUM_FSM(NUM_FSM), .NUM_ENTRIES(NUM_ENTRIES), .FREE_BASE(FREE_BASE),
                   .CACHE_DEPTH(CACHE_DEPTH)) u_mm (
    .clk, .rst_n,
    .al_valid, .al_ready, .al_idx, .fr_valid, .fr_ready, .fr_idx,
    .m_valid(mm_valid), .m_ready(mm_ready), .m_req(mm_req),
    .m_rvalid(mm_rvalid), .m_rdata(m_rsp.rdata),
    .free_count, .spill_event(mm_spill), .refill_event(mm_refill));

  // ---------------- initializer ----------------
  logic [$clog2(META_LINES+1)-1:0] init_line;
  logic     in_valid, in_ready;
  mem_req_t in_req;
  assign init_done = (init_line == ($clog2(META_LINES+1))'(META_LINES));
  assign in_valid  = !init_done;
  always_comb begin
    in_req       = '0;
    in_req.we    = 1'b1;
    in_req.addr  = MADDR_W'(init_line);
    in_req.wstrb = '1;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) init_line <= '0;
    else if (in_valid && in_ready) init_line <= init_line + 1'b1;
  end

  // ---------------- memory arbiter ----------------
  logic [NP-1:0] p_valid, p_ready;
  mem_req_t      p_req [NP];
  logic [PW-1:0] rr, pick;
  logic          any;

  always_comb begin
    for (int i = 0; i < NUM_FSM; i++) begin
      p_valid[i] = gm_valid[i];
      p_req[i]   = fm_req[i];
    end
    p_valid[NUM_FSM]   = mm_valid;
    p_req[NUM_FSM]     = mm_req;
    p_valid[NUM_FSM+1] = in_valid;
    p_req[NUM_FSM+1]   = in_req;
    any  = 1'b0;
    pick = '0;
    for (int k = 0; k < NP; k++) begin
      if (!any && p_valid[((int'(rr) + k) % NP)]) begin any = 1'b1; pick = PW'(((int'(rr) + k) % NP)); end
    end
    m_valid = any;
    m_req   = p_req[pick];
    m_req.id = MID_W'(pick);
    p_ready = '0;
    p_ready[pick] = any && m_ready;
  end

  assign gm_ready  = p_ready[NUM_FSM-1:0];
  assign mm_ready  = p_ready[NUM_FSM];
  assign in_ready  = p_ready[NUM_FSM+1];
  assign mm_rvalid = m_rvalid && m_rsp.id == MID_W'(NUM_FSM);
  always_comb
    for (int i = 0; i < NUM_FSM; i++) fm_rvalid[i] = m_rvalid && m_rsp.id == MID_W'(i);

  // ---------------- response collector ----------------
  logic [FW-1:0] rrr, rpick;
  logic          rany;
  always_comb begin
    rany  = 1'b0;
    rpick = '0;
    for (int k = 0; k < NUM_FSM; k++) begin
      if (!rany && f_rsp_valid[((int'(rrr) + k) % NUM_FSM)]) begin rany = 1'b1; rpick = FW'(((int'(rrr) + k) % NUM_FSM)); end
    end
  end
  assign rsp_valid = rany;
  assign rsp       = f_rsp[rpick];
  always_comb begin
    f_rsp_ready        = '0;
    f_rsp_ready[rpick] = rany && rsp_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr            <= '0;
      rrr           <= '0;
      cnt_fast      <= '0;
      cnt_false_pos <= '0;
      cnt_park      <= '0;
      cnt_spill     <= '0;
      cnt_refill    <= '0;
    end else begin
      if (any && m_ready) rr <= (pick == PW'(NP - 1)) ? '0 : pick + 1'b1;
      if (rany && rsp_ready) rrr <= (rpick == FW'(NUM_FSM - 1)) ? '0 : rpick + 1'b1;
      cnt_fast      <= cnt_fast + 32'($countones(ev_fast));
      cnt_false_pos <= cnt_false_pos + 32'($countones(ev_fp));
      cnt_park      <= cnt_park + 32'(park_event);
      cnt_spill     <= cnt_spill + 32'(mm_spill);
      cnt_refill    <= cnt_refill + 32'(mm_refill);
    end
  end
endmodule
