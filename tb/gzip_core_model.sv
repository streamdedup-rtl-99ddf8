// gzip_core_model: behavioural stand-in for an external GZip compression
// core with a 64-bit stream interface; not part of the design. It does not
// compress: it stores the page and returns it unchanged (all 8 bytes of each
// word valid), LATENCY cycles after the page's last input word, one word per
// cycle. This keeps the data path checkable end to end.
module gzip_core_model #(
  parameter int PAGE_WORDS = 512,
  parameter int LATENCY    = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [63:0] in_data,
  input  logic        in_last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [63:0] out_data,
  output logic        out_last,
  output logic [3:0]  out_bytes
);
  logic [63:0] buf_q [$];
  int          wait_n, n_out;
  logic        full;

  assign in_ready  = !full;
  assign out_valid = full && wait_n == 0 && buf_q.size() > 0;
  assign out_data  = (buf_q.size() > 0) ? buf_q[0] : '0;
  assign out_last  = (buf_q.size() == 1);
  assign out_bytes = 4'd8;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full   <= 1'b0;
      wait_n <= 0;
    end else begin
      if (in_valid && in_ready) begin
        buf_q.push_back(in_data);
        if (in_last) begin
          full   <= 1'b1;
          wait_n <= LATENCY;
        end
      end
      if (full && wait_n > 0) wait_n <= wait_n - 1;
      if (out_valid && out_ready) begin
        void'(buf_q.pop_front());
        if (buf_q.size() == 0) full <= 1'b0;
      end
    end
  end
endmodule
