// tb_streamdedup_core: end-to-end test of three StreamDedup nodes joined by
// a behavioural network, each with its own off-chip memory model and
// pass-through GZip models. The key space is split in three ranges; each
// node's routing table knows only the next node, so lookups and responses
// often take an intermediate hop. A host model writes pages drawn from 12
// contents (page byte k = ((k*7 + 3 + c*13) ^ (k >> 8)) mod 256, reference
// SHA3-256 digests below) through DMA and RDMA ports of all nodes, then
// reads them back by fingerprint, erases every reference, and reads again.
// Checked: fingerprints, exactly one store per content with the page data
// returned by the compression path, reference counts, SSD LBAs, garbage
// collection on the last erase, and that every mechanism occurred.
// PARAMETERS sets the node size; the defaults are reduced for run time.
module tb_streamdedup_core;
  import sd_pkg::*;
  localparam int NN = 3;
  localparam int NC = 12;
  localparam int NGZ = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [FP_W-1:0] dig [NC] = '{
    256'h592e4a7eefcacd9a0885da0fe9827960f4ead6858f615d37e0a4f0f3b5610413,
    256'h67da652057ab1904e02074d4eaa7130093579a2f41428568bbd09245f0b33bbb,
    256'he3f8061c7c633096bfee2434da4cb063ba5e1294d2b02c39a382fd5d0fb819cc,
    256'he1085a0e574969071034b898d7ef23bb4fb80424e7643443b63845a3d548146d,
    256'h21d6e8292d2c489153741eda5d80b921c08718ec66d361c3d8479d0925fad91c,
    256'h3e9947ba5938758e08176a37bd551075b492c361e76dfa117cb80ca2d6d5b74c,
    256'haa9be96bbb5e00de9261ebcc60dfd27574d658dec578c876dff28c4286a5a826,
    256'h7bc5bd5af541d257c131f381ee57e8ccd153015f8c12ed99f09c0fc243a90f0a,
    256'ha7bee02002c2bdc52efbdf2bb549b56a22162f75a3a938f6f7e6a3f9ff56749b,
    256'hb6d2f68460f7ebd23a070e7a98b8744991b575bc315f593ead43f69dd89d3da8,
    256'h75e38df5b73cfd423d158e2e795295127f3b3c9c59b0ca02f06a6e07483d2614,
    256'ha0cd1bb988459d6faa927707938f2f74886580966738544adafef3aaad96a36a};

  function automatic logic [511:0] beat(int b, int c);
    logic [511:0] r;
    for (int i = 0; i < 64; i++) begin
      int k;
      k = b*64 + i;
      r[8*i +: 8] = 8'(((k*7 + 3 + c*13) ^ (k >> 8)) & 255);
    end
    return r;
  endfunction

  function automatic int content_of(logic [FP_W-1:0] fp);
    for (int c = 0; c < NC; c++) if (dig[c] == fp) return c;
    return -1;
  endfunction

  // ---------------- nodes ----------------
  logic [NN-1:0] din_v, din_r, rin_v, rin_r, dout_v, dout_l, rout_v, rout_l;
  logic [511:0]  din_d [NN], rin_d [NN], dout_d [NN], rout_d [NN];
  logic [NN-1:0] nqo_v, nqo_r, nqi_v, nqi_r, nso_v, nso_r, nsi_v, nsi_r;
  lookup_req_t   nqo [NN], nqi [NN];
  lookup_resp_t  nso [NN], nsi [NN];
  logic [NODE_W-1:0] nqo_n [NN], nso_n [NN];
  logic [NN-1:0] cfg_we, cfg_mode_we, init_done;
  logic [7:0]    cfg_addr [NN];
  logic [NODE_W-1:0] cfg_node [NN];
  logic [KEY_W-1:0]  cfg_start [NN], cfg_end [NN];
  logic [31:0]   c_fast [NN], c_fp [NN], c_park [NN], c_spill [NN], c_refill [NN], c_uni [NN], c_dup [NN];

  for (genvar n = 0; n < NN; n++) begin : g_node
    logic m_valid, m_ready, m_rvalid;
    mem_req_t m_req;
    mem_resp_t m_rsp;
    logic [NGZ-1:0] gi_v, gi_r, gi_l, go_v, go_r, go_l;
    logic [63:0] gi_d [NGZ], go_d [NGZ];
    logic [3:0]  go_b [NGZ];
    logic [IDX_W-1:0] free_count;

    streamdedup_core #(.NUM_SHA3(4), .NUM_GZIP(NGZ), .NUM_FSM(4), .BUCKET_BITS(3),
                       .NUM_ENTRIES(256), .RING_DEPTH(16), .NUM_ROUTES(2), .FREE_CACHE(4)) dut (
      .clk, .rst_n,
      .dma_in_valid(din_v[n]), .dma_in_ready(din_r[n]), .dma_in_data(din_d[n]),
      .rdma_in_valid(rin_v[n]), .rdma_in_ready(rin_r[n]), .rdma_in_data(rin_d[n]),
      .dma_out_valid(dout_v[n]), .dma_out_ready(1'b1), .dma_out_data(dout_d[n]), .dma_out_last(dout_l[n]),
      .rdma_out_valid(rout_v[n]), .rdma_out_ready(1'b1), .rdma_out_data(rout_d[n]), .rdma_out_last(rout_l[n]),
      .net_req_out_valid(nqo_v[n]), .net_req_out_ready(nqo_r[n]), .net_req_out(nqo[n]), .net_req_out_node(nqo_n[n]),
      .net_req_in_valid(nqi_v[n]), .net_req_in_ready(nqi_r[n]), .net_req_in(nqi[n]),
      .net_rsp_out_valid(nso_v[n]), .net_rsp_out_ready(nso_r[n]), .net_rsp_out(nso[n]), .net_rsp_out_node(nso_n[n]),
      .net_rsp_in_valid(nsi_v[n]), .net_rsp_in_ready(nsi_r[n]), .net_rsp_in(nsi[n]),
      .cfg_we(cfg_we[n]), .cfg_addr(cfg_addr[n]), .cfg_valid(1'b1), .cfg_node(cfg_node[n]),
      .cfg_start(cfg_start[n]), .cfg_end(cfg_end[n]), .cfg_mode_we(cfg_mode_we[n]), .cfg_mode(1'b0),
      .cfg_num_nodes(8'(NN)),
      .m_valid, .m_ready, .m_req, .m_rvalid, .m_rsp,
      .gz_in_valid(gi_v), .gz_in_ready(gi_r), .gz_in_data(gi_d), .gz_in_last(gi_l),
      .gz_out_valid(go_v), .gz_out_ready(go_r), .gz_out_data(go_d), .gz_out_last(go_l), .gz_out_bytes(go_b),
      .init_done(init_done[n]), .free_count,
      .cnt_fast(c_fast[n]), .cnt_false_pos(c_fp[n]), .cnt_park(c_park[n]), .cnt_spill(c_spill[n]),
      .cnt_refill(c_refill[n]), .cnt_unique(c_uni[n]), .cnt_dup(c_dup[n]));

    sd_mem_model #(.LATENCY(10)) u_mem (.clk, .rst_n, .m_valid, .m_ready, .m_req, .m_rvalid, .m_rsp);

    for (genvar g = 0; g < NGZ; g++) begin : g_gz
      gzip_core_model #(.PAGE_WORDS(512)) u_gz (
        .clk, .rst_n, .in_valid(gi_v[g]), .in_ready(gi_r[g]), .in_data(gi_d[g]), .in_last(gi_l[g]),
        .out_valid(go_v[g]), .out_ready(go_r[g]), .out_data(go_d[g]), .out_last(go_l[g]),
        .out_bytes(go_b[g]));
    end
  end

  // ---------------- network model ----------------
  lookup_req_t  rq_q [NN][$];
  lookup_resp_t rs_q [NN][$];
  int n_remote = 0, n_hop = 0;
  // everything happens at the falling edge: values seen there are the ones
  // exchanged at the next rising edge
  logic [NN-1:0] took_q, took_s;
  lookup_req_t  cap_q [$];
  lookup_resp_t cap_s [$];
  int           cap_qn [$], cap_sn [$];
  assign nqo_r = '1;
  assign nso_r = '1;
  initial begin
    took_q = '0; took_s = '0; nqi_v = '0; nsi_v = '0;
    for (int n = 0; n < NN; n++) begin nqi[n] = '0; nsi[n] = '0; end
    forever begin
      @(negedge clk);
      // apply what was exchanged at the last rising edge
      for (int n = 0; n < NN; n++) begin
        if (took_q[n]) void'(rq_q[n].pop_front());
        if (took_s[n]) void'(rs_q[n].pop_front());
      end
      foreach (cap_q[i]) rq_q[cap_qn[i]].push_back(cap_q[i]);
      foreach (cap_s[i]) rs_q[cap_sn[i]].push_back(cap_s[i]);
      cap_q.delete(); cap_qn.delete(); cap_s.delete(); cap_sn.delete();
      for (int n = 0; n < NN; n++) begin
        nqi_v[n] = rq_q[n].size() > 0;
        nqi[n]   = (rq_q[n].size() > 0) ? rq_q[n][0] : '0;
        nsi_v[n] = rs_q[n].size() > 0;
        nsi[n]   = (rs_q[n].size() > 0) ? rs_q[n][0] : '0;
      end
      // inputs now stay fixed until the next falling edge: sample the exchange
      #1;
      took_q = nqi_v & nqi_r;
      took_s = nsi_v & nsi_r;
      if (rst_n)
        for (int n = 0; n < NN; n++) begin
          if (nqo_v[n]) begin
            cap_q.push_back(nqo[n]); cap_qn.push_back(int'(nqo_n[n]));
            n_remote++;
            if (nqo[n].src != 8'(n)) n_hop++;
          end
          if (nso_v[n]) begin cap_s.push_back(nso[n]); cap_sn.push_back(int'(nso_n[n])); end
        end
    end
  end

  // ---------------- output monitor ----------------
  int wr_sent [NC], wr_new [NC], wr_dup [NC], rd_ok [NC], rd_miss [NC], er_zero [NC], er_keep [NC];
  logic [LBA_W-1:0] lba_of [NC];
  int n_out = 0, n_dma_out = 0, n_rdma_out = 0, n_comp = 0;
  int exp_ref [NC];

  for (genvar n = 0; n < NN; n++) begin : g_mon
    for (genvar o = 0; o < 2; o++) begin : g_port
      logic v, l;
      logic [511:0] d;
      assign v = o ? rout_v[n] : dout_v[n];
      assign l = o ? rout_l[n] : dout_l[n];
      assign d = o ? rout_d[n] : dout_d[n];
      int beat_i = -1;
      int cur_c;
      always @(negedge clk) if (v) begin
        if (beat_i < 0) begin
          out_hdr_t h;
          int c;
          h = out_hdr_t'(d[$bits(out_hdr_t)-1:0]);
          c = content_of(h.fp);
          n_out++;
          if (o) n_rdma_out++; else n_dma_out++;
          checks++;
          if (c < 0 || h.origin != 1'(o)) begin
            failures++; $display("FAIL node %0d: unknown fingerprint or origin in header", n);
          end else begin
            cur_c = c;
            case (h.op)
              OP_WRITE: if (!h.found) begin
                wr_new[c]++;
                if (lba_of[c] != 0 && lba_of[c] != h.ssd_lba) begin failures++; $display("FAIL lba mismatch c%0d", c); end
                lba_of[c] = h.ssd_lba;
                if (!h.to_ssd || h.comp_bytes != 16'd4096 || h.refcnt != 1) begin
                  failures++; $display("FAIL new write c%0d", c);
                end
              end else begin
                wr_dup[c]++;
                if (lba_of[c] == 0) lba_of[c] = h.ssd_lba;
                if (h.to_ssd || h.comp_bytes != 0 || (lba_of[c] != 0 && h.ssd_lba != lba_of[c])) begin
                  failures++; $display("FAIL dup write c%0d to_ssd %0d bytes %0d lba %h exp %h", c, h.to_ssd, h.comp_bytes, h.ssd_lba, lba_of[c]);
                end
              end
              OP_READ: if (h.found) begin
                rd_ok[c]++;
                if (!h.to_ssd || h.refcnt != 32'(exp_ref[c]) || (lba_of[c] != 0 && h.ssd_lba != lba_of[c])) begin
                  failures++; $display("FAIL read c%0d ref %0d exp %0d", c, h.refcnt, exp_ref[c]);
                end
              end else rd_miss[c]++;
              default: ;
            endcase
            if (h.op == OP_ERASE) begin
              if (h.to_ssd) er_zero[c]++; else er_keep[c]++;
              if (!h.found) begin failures++; $display("FAIL erase of stored c%0d not found", c); end
            end
          end
          if (!l) beat_i = 0;
        end else begin
          checks++;
          n_comp += (beat_i == 0);
          if (d !== beat(beat_i, cur_c)) begin failures++; $display("FAIL page data c%0d beat %0d", cur_c, beat_i); end
          beat_i++;
          if (l) begin
            checks++;
            if (beat_i != 64) begin failures++; $display("FAIL page length %0d", beat_i); end
            beat_i = -1;
          end
        end
      end
    end
  end

  // ---------------- host model ----------------
  int n_stall = 0, n_pages = 0;

  task automatic put(int n, bit o, logic [511:0] d);
    @(negedge clk);
    if (o) begin rin_v[n] = 1; rin_d[n] = d; end
    else   begin din_v[n] = 1; din_d[n] = d; end
    #1;
    while (!(o ? rin_r[n] : din_r[n])) begin n_stall++; @(negedge clk); #1; end
    @(posedge clk);
    #1;
    if (o) rin_v[n] = 0; else din_v[n] = 0;
  endtask

  task automatic send(int n, bit o, op_e op, int cs [$]);
    req_hdr_t h;
    h = '0;
    h.op = op; h.npages = NPG_W'(cs.size()); h.node = 8'(n); h.lba = LBA_W'(1000 * n);
    put(n, o, 512'(h));
    foreach (cs[i]) begin
      n_pages++;
      if (op == OP_WRITE) begin
        wr_sent[cs[i]]++;
        for (int b = 0; b < 64; b++) put(n, o, beat(b, cs[i]));
      end else put(n, o, 512'(dig[cs[i]]));
    end
  endtask

  task automatic wait_out();
    int t;
    t = 0;
    while (n_out < n_pages && t < 100000) begin @(posedge clk); t++; end
    checks++;
    if (n_out != n_pages) begin failures++; $display("FAIL outputs %0d of %0d", n_out, n_pages); end
    repeat (100) @(posedge clk);
  endtask

  task automatic cfg(int n);
    // local range, then the next node as the only table entry
    int m;
    m = (n + 1) % NN;
    @(negedge clk);
    cfg_we[n] = 1; cfg_addr[n] = 8'hFF; cfg_node[n] = 8'(n);
    cfg_start[n] = 16'(n * 21846); cfg_end[n] = (n == NN-1) ? 16'hFFFF : 16'((n+1) * 21846 - 1);
    @(negedge clk);
    cfg_addr[n] = 8'd0; cfg_node[n] = 8'(m);
    cfg_start[n] = 16'(m * 21846); cfg_end[n] = (m == NN-1) ? 16'hFFFF : 16'((m+1) * 21846 - 1);
    cfg_mode_we[n] = 1;
    @(negedge clk);
    cfg_we[n] = 0; cfg_mode_we[n] = 0;
  endtask

  initial begin
    int wrs [NN+1][$];
    din_v = '0; rin_v = '0; cfg_we = '0; cfg_mode_we = '0;
    for (int n = 0; n < NN; n++) begin
      din_d[n] = '0; rin_d[n] = '0; cfg_addr[n] = '0; cfg_node[n] = '0; cfg_start[n] = '0; cfg_end[n] = '0;
    end
    for (int c = 0; c < NC; c++) begin
      wr_sent[c] = 0; wr_new[c] = 0; wr_dup[c] = 0; rd_ok[c] = 0; rd_miss[c] = 0;
      er_zero[c] = 0; er_keep[c] = 0; exp_ref[c] = 0; lba_of[c] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NN; n++) cfg(n);
    while (init_done != '1) @(posedge clk);

    // A: writes, with duplicates, through DMA on every node and RDMA on node 0
    fork
      begin send(0, 0, OP_WRITE, '{0, 1, 2}); send(0, 0, OP_WRITE, '{3, 0}); send(0, 0, OP_WRITE, '{4, 5, 6}); end
      begin send(0, 1, OP_WRITE, '{7, 8}); send(0, 1, OP_WRITE, '{1, 9, 1}); end
      begin send(1, 0, OP_WRITE, '{10, 11, 2}); send(1, 0, OP_WRITE, '{3, 4}); send(1, 0, OP_WRITE, '{0}); end
      begin send(2, 0, OP_WRITE, '{5, 6, 7}); send(2, 0, OP_WRITE, '{8, 9, 10, 11}); end
    join
    wait_out();
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (wr_new[c] != 1 || wr_new[c] + wr_dup[c] != wr_sent[c]) begin
        failures++; $display("FAIL content %0d: %0d new, %0d dup of %0d", c, wr_new[c], wr_dup[c], wr_sent[c]);
      end
      exp_ref[c] = wr_sent[c];
    end

    // B: read every content back by fingerprint
    fork
      send(0, 0, OP_READ, '{0, 1, 2, 3});
      send(1, 0, OP_READ, '{4, 5, 6, 7});
      send(2, 1, OP_READ, '{8, 9, 10, 11});
    join
    wait_out();
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (rd_ok[c] != 1) begin failures++; $display("FAIL read of content %0d", c); end
    end

    // C: erase every reference, spread over the nodes
    for (int c = 0; c < NC; c++)
      for (int k = 0; k < wr_sent[c]; k++) wrs[(c + k) % NN].push_back(c);
    fork
      send(0, 0, OP_ERASE, wrs[0]);
      send(1, 0, OP_ERASE, wrs[1]);
      send(2, 0, OP_ERASE, wrs[2]);
    join
    wait_out();
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (er_zero[c] != 1 || er_keep[c] != wr_sent[c] - 1) begin
        failures++; $display("FAIL erase of content %0d: %0d gc, %0d kept", c, er_zero[c], er_keep[c]);
      end
    end

    // D: reads of erased pages miss
    fork
      send(0, 0, OP_READ, '{0, 1, 2, 3, 4, 5});
      send(1, 0, OP_READ, '{6, 7, 8, 9, 10, 11});
    join
    wait_out();
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (rd_miss[c] != 1) begin failures++; $display("FAIL read after erase of content %0d", c); end
    end

    // E: store everything again (reuses freed entry indices)
    for (int c = 0; c < NC; c++) lba_of[c] = '0;
    fork
      send(0, 0, OP_WRITE, '{0, 1, 2, 3});
      send(1, 1, OP_WRITE, '{4, 5, 6, 7});
      send(2, 0, OP_WRITE, '{8, 9, 10, 11});
    join
    wait_out();
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (wr_new[c] != 2) begin failures++; $display("FAIL rewrite of content %0d", c); end
    end

    begin
      int s_fast, s_fp, s_park, s_spill, s_refill, s_uni, s_dup;
      s_fast = 0; s_fp = 0; s_park = 0; s_spill = 0; s_refill = 0; s_uni = 0; s_dup = 0;
      for (int n = 0; n < NN; n++) begin
        s_fast += c_fast[n]; s_fp += c_fp[n]; s_park += c_park[n]; s_spill += c_spill[n];
        s_refill += c_refill[n]; s_uni += c_uni[n]; s_dup += c_dup[n];
      end
      $display("bloom_fast=%0d bloom_false_pos=%0d lock_park=%0d spill=%0d refill=%0d unique=%0d dup=%0d",
               s_fast, s_fp, s_park, s_spill, s_refill, s_uni, s_dup);
      $display("remote=%0d hops=%0d compressed=%0d dma_out=%0d rdma_out=%0d input_stalls=%0d",
               n_remote, n_hop, n_comp, n_dma_out, n_rdma_out, n_stall);
      checks++; if (s_fast == 0)     begin failures++; $display("FAIL no Bloom fast path"); end
      checks++; if (s_fp == 0)       begin failures++; $display("FAIL no Bloom false positive"); end
      checks++; if (s_park == 0)     begin failures++; $display("FAIL no parked lock"); end
      checks++; if (s_spill == 0)    begin failures++; $display("FAIL no free-index spill"); end
      checks++; if (s_refill == 0)   begin failures++; $display("FAIL no free-index refill"); end
      checks++; if (s_dup == 0)      begin failures++; $display("FAIL no duplicate"); end
      checks++; if (n_remote == 0)   begin failures++; $display("FAIL no remote lookup"); end
      checks++; if (n_hop == 0)      begin failures++; $display("FAIL no intermediate hop"); end
      checks++; if (n_comp == 0)     begin failures++; $display("FAIL no compressed page"); end
      checks++; if (n_rdma_out == 0) begin failures++; $display("FAIL no RDMA output"); end
      checks++; if (n_stall == 0)    begin failures++; $display("FAIL no input stall"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
