// lock_table: bucket locks for the concurrent lookup FSMs (two-phase
// locking), with the switch boxes that gate each FSM's memory access.
//
// An FSM sends a lock request {lockOp, bucketIdx} (its fsmId is its port
// number) and gets no answer back. Releases are processed at once by
// clearing the FSM's isActive flag. Acquires pass a round-robin arbiter, one
// per cycle, to the lock management logic: if no active table row holds the
// same bucket, the FSM's row is set to {bucketIdx, isActive}; otherwise the
// request is parked in a FIFO. Every cycle the request at the head of the
// parking queue is retried, ahead of any new request. An FSM's memory
// requests pass its switch box only while its row is active, so an FSM
// simply stalls on its first memory access until it holds the lock. The
// structure follows the paper (arbiter, lock management logic, park queue,
// fsmId/bucketIdx/isActive table, switch boxes, Fig. 8); the arbitration
// policy is this design's choice.
// Timing: a lock on a free bucket is active the cycle after the request.
module lock_table #(
  parameter int NUM_FSM     = 8,
  parameter int BUCKET_BITS = 15
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NUM_FSM-1:0]      lk_valid,
  output logic [NUM_FSM-1:0]      lk_ready,
  input  logic [NUM_FSM-1:0]      lk_acquire,           // 1: acquire, 0: release
  input  logic [BUCKET_BITS-1:0]  lk_bucket [NUM_FSM],
  output logic [NUM_FSM-1:0]      is_active,
  // switch boxes: FSM side and memory side of each FSM's request channel
  input  logic [NUM_FSM-1:0]      fsm_m_valid,
  output logic [NUM_FSM-1:0]      fsm_m_ready,
  output logic [NUM_FSM-1:0]      mem_m_valid,
  input  logic [NUM_FSM-1:0]      mem_m_ready,
  output logic                    park_event            // a request was parked this cycle
);
  localparam int FW = (NUM_FSM > 1) ? $clog2(NUM_FSM) : 1;

  logic [BUCKET_BITS-1:0] tab_bucket [NUM_FSM];

  // switch boxes
  assign mem_m_valid = fsm_m_valid & is_active;
  assign fsm_m_ready = mem_m_ready & is_active;

  // round-robin arbiter over acquire requests
  logic [FW-1:0] rr, pick;
  logic          any_acq;
  always_comb begin
    any_acq = 1'b0;
    pick    = '0;
    for (int k = 0; k < NUM_FSM; k++) begin
      if (!any_acq && lk_valid[((int'(rr) + k) % NUM_FSM)] && lk_acquire[((int'(rr) + k) % NUM_FSM)]) begin
        any_acq = 1'b1;
        pick    = FW'(((int'(rr) + k) % NUM_FSM));
      end
    end
  end

  // parking queue
  logic          pk_in_valid, pk_in_ready, pk_out_valid, pk_out_ready;
  logic [FW-1:0] pk_out;
  logic [$clog2(NUM_FSM+1)-1:0] pk_count;

  sd_fifo #(.WIDTH(FW), .DEPTH(NUM_FSM)) u_park (
    .clk, .rst_n,
    .in_valid(pk_in_valid), .in_ready(pk_in_ready), .in_data(pick),
    .out_valid(pk_out_valid), .out_ready(pk_out_ready), .out_data(pk_out),
    .count(pk_count));

  function automatic logic busy(input logic [BUCKET_BITS-1:0] b, input logic [NUM_FSM-1:0] act,
                                input logic [BUCKET_BITS-1:0] tb [NUM_FSM]);
    for (int j = 0; j < NUM_FSM; j++)
      if (act[j] && tb[j] == b) return 1'b1;
    return 1'b0;
  endfunction

  logic grant_park, grant_new;
  always_comb begin
    grant_park   = pk_out_valid && !busy(lk_bucket[pk_out], is_active, tab_bucket);
    pk_out_ready = grant_park;
    grant_new    = any_acq && !busy(lk_bucket[pick], is_active, tab_bucket) &&
                   !(grant_park && lk_bucket[pk_out] == lk_bucket[pick]);
    pk_in_valid  = any_acq && !grant_new;
    park_event   = pk_in_valid;
    for (int i = 0; i < NUM_FSM; i++)
      lk_ready[i] = lk_valid[i] && (!lk_acquire[i] || (any_acq && pick == FW'(i)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      is_active <= '0;
      rr        <= '0;
      for (int i = 0; i < NUM_FSM; i++) tab_bucket[i] <= '0;
    end else begin
      for (int i = 0; i < NUM_FSM; i++)
        if (lk_valid[i] && !lk_acquire[i]) is_active[i] <= 1'b0;
      if (grant_park) begin
        is_active[pk_out]  <= 1'b1;
        tab_bucket[pk_out] <= lk_bucket[pk_out];
      end
      if (grant_new) begin
        is_active[pick]  <= 1'b1;
        tab_bucket[pick] <= lk_bucket[pick];
      end
      if (any_acq) rr <= (pick == FW'(NUM_FSM - 1)) ? '0 : pick + 1'b1;
    end
  end

  // two FSMs never hold the same bucket
  always_ff @(posedge clk)
    if (rst_n)
      for (int i = 0; i < NUM_FSM; i++)
        for (int j = i + 1; j < NUM_FSM; j++)
          assert (!(is_active[i] && is_active[j] && tab_bucket[i] == tab_bucket[j]))
            else $error("bucket %0d locked by FSMs %0d and %0d", tab_bucket[i], i, j);
endmodule
