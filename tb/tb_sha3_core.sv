// tb_sha3_core: checks the SHA3-256 core against reference digests of two
// generated pages, for a 4 KiB page (padding in a partial block) and a
// 1088-byte page (eight full rate blocks, padding in a block of its own).
// Page byte k = ((k*7 + 3 + seed*13) ^ (k >> 8)) mod 256. Also checks the
// cycle count of a 4 KiB page against the lane-serial schedule.
module tb_sha3_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         v4, r4, ov4, v1, r1, ov1;
  logic [511:0] d4, d1;
  logic [255:0] fp4, fp1;

  sha3_core #(.PAGE_BYTES(4096)) u4 (.clk, .rst_n, .in_valid(v4), .in_ready(r4), .in_data(d4),
                                      .out_valid(ov4), .out_ready(1'b1), .out_fp(fp4));
  sha3_core #(.PAGE_BYTES(1088)) u1 (.clk, .rst_n, .in_valid(v1), .in_ready(r1), .in_data(d1),
                                      .out_valid(ov1), .out_ready(1'b1), .out_fp(fp1));

  function automatic logic [511:0] beat(int b, int seed);
    logic [511:0] r;
    for (int i = 0; i < 64; i++) begin
      int k;
      k = b*64 + i;
      r[8*i +: 8] = 8'(((k*7 + 3 + seed*13) ^ (k >> 8)) & 255);
    end
    return r;
  endfunction

  logic [255:0] exp4 [2] = '{256'h592e4a7eefcacd9a0885da0fe9827960f4ead6858f615d37e0a4f0f3b5610413,
                             256'h67da652057ab1904e02074d4eaa7130093579a2f41428568bbd09245f0b33bbb};
  logic [255:0] exp1 [2] = '{256'h6f0f82f69a0cde83cb32bf9b08b7cfc5ce06448b8f9d3153c1c52877d368435e,
                             256'hc8d10047d335e98da57e5e9ff35e50387019034a3791c0bec5b98294ae479042};

  task automatic run4(int seed);
    int cyc;
    cyc = 0;
    for (int b = 0; b < 64; b++) begin
      v4 <= 1; d4 <= beat(b, seed);
      @(posedge clk); cyc++;
      while (!r4) begin @(posedge clk); cyc++; end
    end
    v4 <= 0;
    while (!ov4) begin @(posedge clk); cyc++; end
    checks++;
    if (fp4 !== exp4[seed]) begin failures++; $display("FAIL 4096 seed %0d got %h", seed, fp4); end
    // 64 beats * 9 cycles + 31 permutations * 24 + 1 pad cycle, small slack
    checks++;
    if (cyc < 1300 || cyc > 1340) begin failures++; $display("FAIL cycle count %0d", cyc); end
    @(posedge clk);
  endtask

  task automatic run1(int seed);
    for (int b = 0; b < 17; b++) begin
      v1 <= 1; d1 <= beat(b, seed);
      @(posedge clk);
      while (!r1) @(posedge clk);
    end
    v1 <= 0;
    while (!ov1) @(posedge clk);
    checks++;
    if (fp1 !== exp1[seed]) begin failures++; $display("FAIL 1088 seed %0d got %h", seed, fp1); end
    @(posedge clk);
  endtask

  initial begin
    v4 = 0; v1 = 0; d4 = '0; d1 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    fork
      begin run4(0); run4(1); end
      begin run1(0); run1(1); end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
