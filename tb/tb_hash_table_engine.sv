// tb_hash_table_engine: random read / write / erase lookups against a
// reference map of fingerprint -> {refcount, SSD LBA}, on a small table
// (16 buckets, 4 FSMs, 256 entries, 8-entry index cache) so that lists grow
// long and every mechanism occurs: Bloom fast-path inserts, Bloom false
// positives, parked lock requests, spills and refills of free indices. At
// most one request per fingerprint is outstanding, so the expected result
// of each does not depend on the order in which the FSMs finish.
module tb_hash_table_engine;
  import sd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NFP = 48;

  logic         req_valid, req_ready, rsp_valid, m_valid, m_ready, m_rvalid, init_done;
  lookup_req_t  req;
  lookup_resp_t rsp;
  mem_req_t     m_req;
  mem_resp_t    m_rsp;
  logic [IDX_W-1:0] free_count;
  logic [31:0]  c_fast, c_fp, c_park, c_spill, c_refill;

  hash_table_engine #(.NUM_FSM(4), .BUCKET_BITS(4), .NUM_ENTRIES(256), .CACHE_DEPTH(8)) dut (
    .clk, .rst_n, .node_id(8'd3),
    .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready(1'b1), .rsp,
    .m_valid, .m_ready, .m_req, .m_rvalid, .m_rsp,
    .init_done, .free_count,
    .cnt_fast(c_fast), .cnt_false_pos(c_fp), .cnt_park(c_park), .cnt_spill(c_spill),
    .cnt_refill(c_refill));

  sd_mem_model #(.LATENCY(6)) u_mem (.clk, .rst_n, .m_valid, .m_ready, .m_req, .m_rvalid, .m_rsp);

  logic [FP_W-1:0]  fps [NFP];
  int               ref_cnt [NFP];
  logic [LBA_W-1:0] ref_lba [NFP];
  bit               busy [NFP];
  int               tag_fp [256];
  op_e              tag_op [256];
  int               outstanding = 0;

  // responses: compare with the reference and update it
  always @(negedge clk) if (rsp_valid) begin
    int f;
    f = tag_fp[rsp.tag];
    checks++;
    case (tag_op[rsp.tag])
      OP_WRITE: begin
        if (ref_cnt[f] == 0) begin
          if (rsp.meta.found || rsp.meta.refcnt != 1 || rsp.meta.ssd_lba[39:32] != 8'd3) begin
            failures++; $display("FAIL new write fp %0d: found=%0d ref=%0d lba=%h", f, rsp.meta.found, rsp.meta.refcnt, rsp.meta.ssd_lba);
          end
          ref_lba[f] = rsp.meta.ssd_lba;
          ref_cnt[f] = 1;
        end else begin
          ref_cnt[f]++;
          if (!rsp.meta.found || rsp.meta.refcnt != ref_cnt[f] || rsp.meta.ssd_lba != ref_lba[f]) begin
            failures++; $display("FAIL dup write fp %0d: found=%0d zero=%0d ref=%0d lba=%h exp ref %0d lba %h", f, rsp.meta.found, rsp.meta.zero, rsp.meta.refcnt, rsp.meta.ssd_lba, ref_cnt[f], ref_lba[f]);
          end
        end
      end
      OP_READ: begin
        if (rsp.meta.found != (ref_cnt[f] != 0) ||
            (ref_cnt[f] != 0 && (rsp.meta.refcnt != ref_cnt[f] || rsp.meta.ssd_lba != ref_lba[f]))) begin
          failures++; $display("FAIL read fp %0d: found=%0d zero=%0d ref=%0d lba=%h exp ref %0d lba %h", f, rsp.meta.found, rsp.meta.zero, rsp.meta.refcnt, rsp.meta.ssd_lba, ref_cnt[f], ref_lba[f]);
        end
      end
      default: begin
        if (ref_cnt[f] == 0) begin
          if (rsp.meta.found) begin failures++; $display("FAIL erase absent fp %0d", f); end
        end else begin
          ref_cnt[f]--;
          if (!rsp.meta.found || rsp.meta.refcnt != ref_cnt[f] || rsp.meta.zero != (ref_cnt[f] == 0)) begin
            failures++; $display("FAIL erase fp %0d: found=%0d zero=%0d ref=%0d lba=%h exp ref %0d lba %h", f, rsp.meta.found, rsp.meta.zero, rsp.meta.refcnt, rsp.meta.ssd_lba, ref_cnt[f], ref_lba[f]);
          end
        end
      end
    endcase
    busy[f] = 0;
    outstanding--;
  end

  task automatic issue(int f, op_e op, int tag);
    busy[f]     = 1;
    tag_fp[tag] = f;
    tag_op[tag] = op;
    outstanding++;
    @(negedge clk);
    req_valid = 1;
    req.src = 8'd1; req.tag = 8'(tag); req.op = op; req.fp = fps[f];
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  task automatic phase(int n, int pw, int pr, int maxf);
    int tag;
    tag = 0;
    for (int k = 0; k < n; k++) begin
      int f, p;
      op_e op;
      do f = $urandom_range(maxf - 1); while (busy[f]);
      p  = $urandom_range(99);
      op = (p < pw) ? OP_WRITE : (p < pw + pr) ? OP_READ : OP_ERASE;
      issue(f, op, tag);
      tag = (tag + 1) % 256;
    end
  endtask

  initial begin
    req_valid = 0; req = '0;
    for (int i = 0; i < NFP; i++) begin
      fps[i] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      ref_cnt[i] = 0; busy[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!init_done) @(posedge clk);
    phase(300, 70, 15, NFP);      // fill, with duplicates
    phase(400, 35, 30, NFP);      // mixed
    phase(500, 5, 10, NFP);       // mostly erase: frees, spills
    phase(400, 70, 10, NFP);      // refill from the off-chip stack
    while (outstanding != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    // every fingerprint read back
    for (int f = 0; f < NFP; f++) issue(f, OP_READ, f);
    while (outstanding != 0) @(posedge clk);
    // mechanisms seen
    checks++; if (c_fast   == 0) begin failures++; $display("FAIL no Bloom fast path"); end
    checks++; if (c_fp     == 0) begin failures++; $display("FAIL no Bloom false positive"); end
    checks++; if (c_park   == 0) begin failures++; $display("FAIL no parked lock"); end
    checks++; if (c_spill  == 0) begin failures++; $display("FAIL no spill"); end
    checks++; if (c_refill == 0) begin failures++; $display("FAIL no refill"); end
    $display("fast=%0d false_pos=%0d park=%0d spill=%0d refill=%0d", c_fast, c_fp, c_park, c_spill, c_refill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
