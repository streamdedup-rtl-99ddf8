// routing_table: chooses where a hash table lookup is done and where its
// response goes, for the distributed hash table spread over the nodes.
//
// Every node owns a range of a 16-bit routing key (the 16 most significant
// fingerprint bits). The table holds this node's id and range and up to
// NUM_ROUTES remote entries {nodeId, hashStart, hashEnd}, all written through
// the configuration port. A lookup request from the local in-flight
// controller is first stamped with this node's id as its source. A request
// whose key falls in the local range goes to the local hash table engine; if
// a table entry holds the key it goes straight to that node; otherwise an
// intermediate hop is chosen: with routingMode low the entry whose range is
// nearest to the key (in either direction around the ring), with
// routingMode high the closest preceding entry (smallest distance from the
// end of its range forward to the key), which realises Chord. Responses are
// routed the same way on their destination node id: to the local in-flight
// controller, to a matching entry, or by nearest / closest preceding node id
// modulo num_nodes. Requests and responses have separate paths that work in
// parallel. The paper gives the table fields, the match and hop-selection
// structure and the routingMode register (Fig. 9); the distance measures,
// the range encoding (inclusive, start > end meaning wrap-around) and the
// round-robin merge of local and network inputs are this design's choice.
// Timing: combinational decision, one request and one response per cycle.
module routing_table
  import sd_pkg::*;
#(
  parameter int NUM_ROUTES = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              cfg_we,
  input  logic [7:0]        cfg_addr,      // 0..NUM_ROUTES-1: entries, 255: local node
  input  logic              cfg_valid,     // entry valid bit
  input  logic [NODE_W-1:0] cfg_node,
  input  logic [KEY_W-1:0]  cfg_start,
  input  logic [KEY_W-1:0]  cfg_end,
  input  logic              cfg_mode_we,
  input  logic              cfg_mode,      // routingMode
  input  logic [NODE_W-1:0] cfg_num_nodes,
  output logic [NODE_W-1:0] self_id,
  // lookup requests: from the local in-flight controller and from the network
  input  logic              lreq_valid,
  output logic              lreq_ready,
  input  lookup_req_t       lreq,
  input  logic              nreq_valid,
  output logic              nreq_ready,
  input  lookup_req_t       nreq,
  output logic              ht_req_valid,   // to the local hash table engine
  input  logic              ht_req_ready,
  output lookup_req_t       ht_req,
  output logic              net_req_valid,  // to the network
  input  logic              net_req_ready,
  output lookup_req_t       net_req,
  output logic [NODE_W-1:0] net_req_node,
  // lookup responses: from the local hash table engine and from the network
  input  logic              lrsp_valid,
  output logic              lrsp_ready,
  input  lookup_resp_t      lrsp,
  input  logic              nrsp_valid,
  output logic              nrsp_ready,
  input  lookup_resp_t      nrsp,
  output logic              if_rsp_valid,   // to the local in-flight controller
  input  logic              if_rsp_ready,
  output lookup_resp_t      if_rsp,
  output logic              net_rsp_valid,  // to the network
  input  logic              net_rsp_ready,
  output lookup_resp_t      net_rsp,
  output logic [NODE_W-1:0] net_rsp_node
);
  localparam int RW = (NUM_ROUTES > 1) ? $clog2(NUM_ROUTES) : 1;

  logic [NUM_ROUTES-1:0] e_valid;
  logic [NODE_W-1:0]     e_node  [NUM_ROUTES];
  logic [KEY_W-1:0]      e_start [NUM_ROUTES];
  logic [KEY_W-1:0]      e_end   [NUM_ROUTES];
  logic [KEY_W-1:0]      self_start, self_end;
  logic                  routing_mode;
  logic [NODE_W-1:0]     num_nodes;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid      <= '0;
      self_id      <= '0;
      self_start   <= '0;
      self_end     <= '1;
      routing_mode <= 1'b0;
      num_nodes    <= NODE_W'(1);
      for (int i = 0; i < NUM_ROUTES; i++) begin
        e_node[i] <= '0; e_start[i] <= '0; e_end[i] <= '0;
      end
    end else begin
      if (cfg_we) begin
        if (cfg_addr == 8'hFF) begin
          self_id    <= cfg_node;
          self_start <= cfg_start;
          self_end   <= cfg_end;
        end else begin
          for (int i = 0; i < NUM_ROUTES; i++)
            if (cfg_addr == 8'(i)) begin
              e_valid[i] <= cfg_valid;
              e_node[i]  <= cfg_node;
              e_start[i] <= cfg_start;
              e_end[i]   <= cfg_end;
            end
        end
      end
      if (cfg_mode_we) begin
        routing_mode <= cfg_mode;
        num_nodes    <= cfg_num_nodes;
      end
    end
  end

  function automatic logic in_range(input logic [KEY_W-1:0] k, input logic [KEY_W-1:0] s,
                                    input logic [KEY_W-1:0] e);
    return (s <= e) ? (k >= s && k <= e) : (k >= s || k <= e);
  endfunction

  function automatic logic [NODE_W-1:0] node_dist(input logic [NODE_W-1:0] from,
                                                  input logic [NODE_W-1:0] to);
    // forward distance from 'from' to 'to' on a ring of num_nodes nodes
    return (to >= from) ? (to - from) : (to + num_nodes - from);
  endfunction

  // ---------------- request path ----------------
  logic        rq_sel, rq_last;
  lookup_req_t rq;
  logic        rq_valid;
  logic [KEY_W-1:0]  key;
  logic              rq_local;
  logic [NODE_W-1:0] rq_node;

  always_comb begin
    if (lreq_valid && nreq_valid) rq_sel = ~rq_last;
    else                          rq_sel = nreq_valid;
    rq_valid = rq_sel ? nreq_valid : lreq_valid;
    rq       = rq_sel ? nreq : lreq;
    if (!rq_sel) rq.src = self_id;
  end

  always_comb begin
    logic              hit;
    logic [KEY_W-1:0]  best, d, d2;
    key      = route_key(rq.fp);
    rq_local = in_range(key, self_start, self_end);
    hit      = 1'b0;
    rq_node  = self_id;
    best     = '1;
    d        = '0;
    d2       = '0;
    for (int i = 0; i < NUM_ROUTES; i++)
      if (e_valid[i] && !hit && in_range(key, e_start[i], e_end[i])) begin
        hit     = 1'b1;
        rq_node = e_node[i];
      end
    if (!hit)
      for (int i = 0; i < NUM_ROUTES; i++)
        if (e_valid[i]) begin
          d  = key - e_end[i];          // forward distance from the end of the range to the key
          d2 = e_start[i] - key;        // forward distance from the key to the start of the range
          if (!routing_mode && d2 < d) d = d2;
          if (d < best || (d == best && rq_node == self_id)) begin
            best    = d;
            rq_node = e_node[i];
          end
        end
  end

  assign ht_req_valid  = rq_valid && rq_local;
  assign ht_req        = rq;
  assign net_req_valid = rq_valid && !rq_local;
  assign net_req       = rq;
  assign net_req_node  = rq_node;
  assign lreq_ready    = !rq_sel && (rq_local ? ht_req_ready : net_req_ready);
  assign nreq_ready    =  rq_sel && (rq_local ? ht_req_ready : net_req_ready);

  // ---------------- response path ----------------
  logic         rs_sel, rs_last;
  lookup_resp_t rs;
  logic         rs_valid, rs_local;
  logic [NODE_W-1:0] rs_node;

  always_comb begin
    if (lrsp_valid && nrsp_valid) rs_sel = ~rs_last;
    else                          rs_sel = nrsp_valid;
    rs_valid = rs_sel ? nrsp_valid : lrsp_valid;
    rs       = rs_sel ? nrsp : lrsp;
    rs_local = (rs.dst == self_id);
  end

  always_comb begin
    logic              hit;
    logic [NODE_W-1:0] best, d, d2;
    hit     = 1'b0;
    rs_node = self_id;
    best    = '1;
    d       = '0;
    d2      = '0;
    for (int i = 0; i < NUM_ROUTES; i++)
      if (e_valid[i] && !hit && e_node[i] == rs.dst) begin
        hit     = 1'b1;
        rs_node = e_node[i];
      end
    if (!hit)
      for (int i = 0; i < NUM_ROUTES; i++)
        if (e_valid[i]) begin
          d  = node_dist(e_node[i], rs.dst);
          d2 = node_dist(rs.dst, e_node[i]);
          if (!routing_mode && d2 < d) d = d2;
          if (d < best || (d == best && rs_node == self_id)) begin
            best    = d;
            rs_node = e_node[i];
          end
        end
  end

  assign if_rsp_valid  = rs_valid && rs_local;
  assign if_rsp        = rs;
  assign net_rsp_valid = rs_valid && !rs_local;
  assign net_rsp       = rs;
  assign net_rsp_node  = rs_node;
  assign lrsp_ready    = !rs_sel && (rs_local ? if_rsp_ready : net_rsp_ready);
  assign nrsp_ready    =  rs_sel && (rs_local ? if_rsp_ready : net_rsp_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_last <= 1'b1;
      rs_last <= 1'b1;
    end else begin
      if (rq_valid && (lreq_ready || nreq_ready)) rq_last <= rq_sel;
      if (rs_valid && (lrsp_ready || nrsp_ready)) rs_last <= rs_sel;
    end
  end
endmodule
