// tb_fingerprint_engine: streams eight 4 KiB pages (page byte k =
// ((k*7 + 3 + seed*13) ^ (k >> 8)) mod 256, seed = page number) through a
// 4-core engine and checks the digests against reference SHA3-256 values,
// their order, and that the first four pages enter at one beat per cycle.
module tb_fingerprint_engine;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid;
  logic [511:0] in_data;
  logic [255:0] out_fp;

  fingerprint_engine #(.NUM_CORES(4), .PAGE_BYTES(4096)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready(1'b1), .out_fp);

  logic [255:0] expd [8] = '{
    256'h592e4a7eefcacd9a0885da0fe9827960f4ead6858f615d37e0a4f0f3b5610413,
    256'h67da652057ab1904e02074d4eaa7130093579a2f41428568bbd09245f0b33bbb,
    256'he3f8061c7c633096bfee2434da4cb063ba5e1294d2b02c39a382fd5d0fb819cc,
    256'he1085a0e574969071034b898d7ef23bb4fb80424e7643443b63845a3d548146d,
    256'h21d6e8292d2c489153741eda5d80b921c08718ec66d361c3d8479d0925fad91c,
    256'h3e9947ba5938758e08176a37bd551075b492c361e76dfa117cb80ca2d6d5b74c,
    256'haa9be96bbb5e00de9261ebcc60dfd27574d658dec578c876dff28c4286a5a826,
    256'h7bc5bd5af541d257c131f381ee57e8ccd153015f8c12ed99f09c0fc243a90f0a};

  function automatic logic [511:0] beat(int b, int seed);
    logic [511:0] r;
    for (int i = 0; i < 64; i++) begin
      int k;
      k = b*64 + i;
      r[8*i +: 8] = 8'(((k*7 + 3 + seed*13) ^ (k >> 8)) & 255);
    end
    return r;
  endfunction

  int got = 0;
  always @(posedge clk) if (out_valid) begin
    checks++;
    if (out_fp !== expd[got]) begin failures++; $display("FAIL page %0d digest %h", got, out_fp); end
    got++;
  end

  initial begin
    int t0, t1;
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    t0 = $time;
    for (int p = 0; p < 8; p++) begin
      for (int b = 0; b < 64; b++) begin
        in_valid <= 1; in_data <= beat(b, p);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      if (p == 3) begin
        t1 = $time;
        checks++;
        if ((t1 - t0) / 10 > 258) begin failures++; $display("FAIL input stalled: %0d cycles", (t1-t0)/10); end
      end
    end
    in_valid <= 0;
    while (got < 8) @(posedge clk);
    repeat (10) @(posedge clk);
    checks++;
    if (got != 8) failures++;
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
