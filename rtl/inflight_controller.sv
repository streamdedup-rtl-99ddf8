// inflight_controller: ring buffer that keeps page requests in flight while
// their fingerprints are looked up, locally or on remote nodes.
//
// A page request takes the next free slot of a DEPTH-entry ring buffer; the
// slot address is its tag for the whole routing and lookup. Reads and erases
// bring their fingerprint along; a write's fingerprint comes later from the
// fingerprint engine, which returns them in page order, so a FIFO of the tags
// of writes still waiting for a fingerprint fills them in order. Lookup
// requests leave in allocation order as soon as the slot's fingerprint is
// known; responses come back in any order and are written into their slot
// by tag. The oldest slot retires, with its request, fingerprint and lookup
// result, once its response is in, so requests leave in arrival order. The
// paper describes the ring buffer, the tag and in-order retirement; the
// depth and the pending-fingerprint FIFO are this design's choice.
// Timing: one allocation, one fingerprint, one lookup issue, one response
// and one retirement per cycle.
module inflight_controller
  import sd_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  // page requests from the supporters
  input  logic          alloc_valid,
  output logic          alloc_ready,
  input  page_req_t     alloc_req,
  input  logic          alloc_has_fp,
  input  logic [FP_W-1:0] alloc_fp,
  // fingerprints of write pages, in page order
  input  logic          fp_valid,
  output logic          fp_ready,
  input  logic [FP_W-1:0] fp_in,
  // lookup requests to the routing table
  output logic          lk_valid,
  input  logic          lk_ready,
  output lookup_req_t   lk_req,
  // lookup responses from the routing table
  input  logic          rsp_valid,
  input  lookup_resp_t  rsp,
  // retired requests, in order
  output logic          ret_valid,
  input  logic          ret_ready,
  output page_req_t     ret_req,
  output logic [FP_W-1:0] ret_fp,
  output lookup_meta_t  ret_meta,
  output logic [$clog2(DEPTH+1)-1:0] occupancy
);
  localparam int AW = $clog2(DEPTH);

  page_req_t     q_req  [DEPTH];
  logic [FP_W-1:0] q_fp [DEPTH];
  lookup_meta_t  q_meta [DEPTH];
  logic [DEPTH-1:0] fp_ok, done;

  logic [AW-1:0] head, tail, iss;
  logic [$clog2(DEPTH+1)-1:0] count, issued;   // issued: slots from head already sent

  // tags of writes waiting for their fingerprint
  logic          pend_in_ready, pend_out_valid;
  logic [AW-1:0] pend_tag;
  logic [$clog2(DEPTH+1)-1:0] pend_count;

  logic do_alloc, do_fp, do_iss, do_ret;

  assign alloc_ready = (count < ($clog2(DEPTH+1))'(DEPTH)) && pend_in_ready;
  assign do_alloc    = alloc_valid && alloc_ready;
  assign fp_ready    = pend_out_valid;
  assign do_fp       = fp_valid && fp_ready;

  sd_fifo #(.WIDTH(AW), .DEPTH(DEPTH)) u_pend (
    .clk, .rst_n,
    .in_valid(do_alloc && !alloc_has_fp), .in_ready(pend_in_ready), .in_data(tail),
    .out_valid(pend_out_valid), .out_ready(fp_valid), .out_data(pend_tag),
    .count(pend_count));

  assign lk_valid   = (issued < count) && fp_ok[iss];
  assign lk_req.src = '0;                // filled in by the routing table
  assign lk_req.tag = TAG_W'(iss);
  assign lk_req.op  = q_req[iss].op;
  assign lk_req.fp  = q_fp[iss];
  assign do_iss     = lk_valid && lk_ready;

  assign ret_valid = (count != '0) && done[head];
  assign ret_req   = q_req[head];
  assign ret_fp    = q_fp[head];
  assign ret_meta  = q_meta[head];
  assign do_ret    = ret_valid && ret_ready;
  assign occupancy = count;

  always_ff @(posedge clk) begin
    if (do_alloc) begin
      q_req[tail] <= alloc_req;
      if (alloc_has_fp) q_fp[tail] <= alloc_fp;
    end
    if (do_fp) q_fp[pend_tag] <= fp_in;
    if (rsp_valid) q_meta[AW'(rsp.tag)] <= rsp.meta;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head   <= '0;
      tail   <= '0;
      iss    <= '0;
      count  <= '0;
      issued <= '0;
      fp_ok  <= '0;
      done   <= '0;
    end else begin
      if (do_alloc) begin
        tail        <= tail + 1'b1;
        fp_ok[tail] <= alloc_has_fp;
        done[tail]  <= 1'b0;
      end
      if (do_fp) fp_ok[pend_tag] <= 1'b1;
      if (do_iss) iss <= iss + 1'b1;
      if (rsp_valid) done[AW'(rsp.tag)] <= 1'b1;
      if (do_ret) head <= head + 1'b1;
      count  <= count + do_alloc - do_ret;
      issued <= issued + do_iss - do_ret;
    end
  end

  // a response must belong to a slot that was issued and is not yet done
  always_ff @(posedge clk)
    if (rst_n && rsp_valid)
      assert (!done[AW'(rsp.tag)]) else $error("duplicate lookup response for tag %0d", rsp.tag);
endmodule
