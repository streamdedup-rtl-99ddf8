// tb_streamdedup_full: one StreamDedup node at its default size (64 SHA3
// cores, 6 GZip ports, 8 lookup FSMs, 32,768 buckets, 262,144 entries),
// with a behavioural off-chip memory, pass-through GZip models and an idle
// network. After the metadata has been cleared it writes one 4 KiB page,
// writes the same page again and reads it back by fingerprint. Checked: the
// SHA3-256 fingerprint against a reference digest, that the first write is
// stored with its page data, that the second is a duplicate with reference
// count 2 and the same SSD LBA, and that the read finds that LBA.
module tb_streamdedup_full;
  import sd_pkg::*;
  localparam int NGZ = 6;
  localparam logic [FP_W-1:0] REF_FP =
    256'h3399d955954af9fe4745cf184f9024c6123af06cac2ed63047e6716141d23290;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              din_v, din_r, dout_v, dout_l, rout_v, rout_l, rin_r;
  logic [511:0]      din_d, dout_d, rout_d;
  logic              nqo_v, nqi_r, nso_v, nsi_r;
  lookup_req_t       nqo;
  lookup_resp_t      nso;
  logic [NODE_W-1:0] nqo_n, nso_n;
  logic              cfg_we, cfg_mode_we;
  logic [7:0]        cfg_addr;
  logic [NODE_W-1:0] cfg_node;
  logic [KEY_W-1:0]  cfg_start, cfg_end;
  logic              m_valid, m_ready, m_rvalid;
  mem_req_t          m_req;
  mem_resp_t         m_rsp;
  logic [NGZ-1:0]    gi_v, gi_r, gi_l, go_v, go_r, go_l;
  logic [63:0]       gi_d [NGZ];
  logic [63:0]       go_d [NGZ];
  logic [3:0]        go_b [NGZ];
  logic              init_done;
  logic [IDX_W-1:0]  free_count;
  logic [31:0]       c_fast, c_fp, c_park, c_spill, c_refill, c_uniq, c_dup;

  streamdedup_core dut (
    .clk, .rst_n,
    .dma_in_valid(din_v), .dma_in_ready(din_r), .dma_in_data(din_d),
    .rdma_in_valid(1'b0), .rdma_in_ready(rin_r), .rdma_in_data('0),
    .dma_out_valid(dout_v), .dma_out_ready(1'b1), .dma_out_data(dout_d), .dma_out_last(dout_l),
    .rdma_out_valid(rout_v), .rdma_out_ready(1'b1), .rdma_out_data(rout_d), .rdma_out_last(rout_l),
    .net_req_out_valid(nqo_v), .net_req_out_ready(1'b1), .net_req_out(nqo), .net_req_out_node(nqo_n),
    .net_req_in_valid(1'b0), .net_req_in_ready(nqi_r), .net_req_in('0),
    .net_rsp_out_valid(nso_v), .net_rsp_out_ready(1'b1), .net_rsp_out(nso), .net_rsp_out_node(nso_n),
    .net_rsp_in_valid(1'b0), .net_rsp_in_ready(nsi_r), .net_rsp_in('0),
    .cfg_we, .cfg_addr, .cfg_valid(1'b1), .cfg_node, .cfg_start, .cfg_end,
    .cfg_mode_we, .cfg_mode(1'b0), .cfg_num_nodes(8'd1),
    .m_valid, .m_ready, .m_req, .m_rvalid, .m_rsp,
    .gz_in_valid(gi_v), .gz_in_ready(gi_r), .gz_in_data(gi_d), .gz_in_last(gi_l),
    .gz_out_valid(go_v), .gz_out_ready(go_r), .gz_out_data(go_d), .gz_out_last(go_l),
    .gz_out_bytes(go_b),
    .init_done, .free_count, .cnt_fast(c_fast), .cnt_false_pos(c_fp), .cnt_park(c_park),
    .cnt_spill(c_spill), .cnt_refill(c_refill), .cnt_unique(c_uniq), .cnt_dup(c_dup));

  sd_mem_model #(.LATENCY(10)) u_mem (.clk, .rst_n, .m_valid, .m_ready, .m_req, .m_rvalid, .m_rsp);

  for (genvar g = 0; g < NGZ; g++) begin : g_gz
    gzip_core_model #(.PAGE_WORDS(512)) u_gz (
      .clk, .rst_n, .in_valid(gi_v[g]), .in_ready(gi_r[g]), .in_data(gi_d[g]), .in_last(gi_l[g]),
      .out_valid(go_v[g]), .out_ready(go_r[g]), .out_data(go_d[g]), .out_last(go_l[g]),
      .out_bytes(go_b[g]));
  end

  function automatic logic [511:0] beat(int b);
    logic [511:0] d;
    for (int k = 0; k < 64; k++) d[8*k +: 8] = 8'(b * 3 + k);
    return d;
  endfunction

  // output monitor: header beat, then data beats until last
  out_hdr_t hq [$];
  int       beat_i = -1, data_bad = 0, data_beats = 0;
  always @(negedge clk) begin
    if (dout_v) begin
      if (beat_i < 0) begin
        hq.push_back(out_hdr_t'(dout_d[$bits(out_hdr_t)-1:0]));
        beat_i = 0;
      end else begin
        if (dout_d != beat(beat_i)) data_bad++;
        beat_i++; data_beats++;
      end
      if (dout_l) beat_i = -1;
    end
    if (rout_v || nqo_v || nso_v) begin
      failures++; $display("FAIL unexpected output on RDMA or network port");
    end
  end

  task automatic put(logic [511:0] d);
    @(negedge clk);
    din_v = 1; din_d = d;
    #1;
    while (!din_r) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 din_v = 0;
  endtask

  task automatic request(op_e op);
    req_hdr_t h;
    h = '0; h.op = op; h.npages = 1; h.node = 8'd0; h.lba = 64'd77;
    put(512'(h));
    if (op == OP_WRITE) for (int b = 0; b < 64; b++) put(beat(b));
    else put(512'(REF_FP));
  endtask

  task automatic expect_hdr(string what, bit found, bit to_ssd, int bytes, int refcnt);
    int t;
    out_hdr_t h;
    t = 0;
    while (hq.size() == 0 && t < 20000) begin @(posedge clk); t++; end
    checks++;
    if (hq.size() == 0) begin failures++; $display("FAIL %s: no output", what); return; end
    h = hq.pop_front();
    if (h.fp != REF_FP || h.found != found || h.to_ssd != to_ssd ||
        int'(h.comp_bytes) != bytes || int'(h.refcnt) != refcnt || h.lba != 64'd77) begin
      failures++;
      $display("FAIL %s: found %0d to_ssd %0d bytes %0d ref %0d fp %h", what, h.found, h.to_ssd,
               h.comp_bytes, h.refcnt, h.fp);
    end
    if (what == "write") lba0 = h.ssd_lba;
    else begin
      checks++;
      if (h.ssd_lba != lba0) begin failures++; $display("FAIL %s: SSD LBA %h, expected %h", what, h.ssd_lba, lba0); end
    end
  endtask

  logic [LBA_W-1:0] lba0;

  initial begin
    din_v = 0; din_d = '0; cfg_we = 0; cfg_mode_we = 0;
    cfg_addr = 8'hFF; cfg_node = '0; cfg_start = 16'h0000; cfg_end = 16'hFFFF;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); cfg_we = 1; cfg_mode_we = 1;
    @(negedge clk); cfg_we = 0; cfg_mode_we = 0;
    while (!init_done) @(posedge clk);
    request(OP_WRITE);
    expect_hdr("write", 1'b0, 1'b1, 4096, 1);
    for (int t = 0; t < 5000 && data_beats < 64; t++) @(posedge clk);
    repeat (10) @(posedge clk);
    checks++;
    if (data_beats != 64 || data_bad != 0) begin
      failures++; $display("FAIL page data: %0d beats, %0d wrong", data_beats, data_bad);
    end
    request(OP_WRITE);
    expect_hdr("duplicate", 1'b1, 1'b0, 0, 2);
    request(OP_READ);
    expect_hdr("read", 1'b1, 1'b1, 0, 2);
    checks++;
    if (c_uniq != 1 || c_dup != 1 || c_fast != 1) begin
      failures++; $display("FAIL counters unique %0d dup %0d fast %0d", c_uniq, c_dup, c_fast);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
