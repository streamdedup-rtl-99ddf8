// fingerprint_engine: NUM_CORES SHA3-256 cores working on pages in parallel.
//
// Write pages arrive as a stream of 512-bit beats, PAGE_BYTES/64 beats per
// page. Whole pages are handed round robin to the cores (page n to core
// n mod NUM_CORES); each core has a one-page input FIFO so that the stream
// keeps moving at one beat per cycle while the core hashes. Fingerprints are
// collected round robin in the same order, so out_fp returns them in page
// order. The paper gives the core count (64), the parallel arrangement and
// its purpose (saturating the 12.8 GB/s input); the per-core page FIFO and
// the round-robin order are this design's choice.
//
// Timing: a core needs about 1300 cycles per 4 KiB page, so 64 cores keep up
// with one page every 64 cycles (one beat per cycle).
module fingerprint_engine #(
  parameter int NUM_CORES  = 64,
  parameter int PAGE_BYTES = 4096
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [511:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [255:0] out_fp
);
  localparam int PAGE_BEATS = PAGE_BYTES / 64;
  localparam int CW = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1;
  localparam int BW = (PAGE_BEATS > 1) ? $clog2(PAGE_BEATS) : 1;

  logic [CW-1:0] in_sel, out_sel;
  logic [BW-1:0] beat_cnt;

  logic [NUM_CORES-1:0]       f_in_ready, f_out_valid, c_in_ready, c_out_valid;
  logic [511:0]               f_out_data [NUM_CORES];
  logic [255:0]               c_fp       [NUM_CORES];

  for (genvar i = 0; i < NUM_CORES; i++) begin : g_core
    logic [$clog2(PAGE_BEATS+1)-1:0] unused_count;
    sd_fifo #(.WIDTH(512), .DEPTH(PAGE_BEATS)) u_fifo (
      .clk, .rst_n,
      .in_valid(in_valid && in_sel == CW'(i)), .in_ready(f_in_ready[i]), .in_data(in_data),
      .out_valid(f_out_valid[i]), .out_ready(c_in_ready[i]), .out_data(f_out_data[i]),
      .count(unused_count));
    sha3_core #(.PAGE_BYTES(PAGE_BYTES)) u_sha3 (
      .clk, .rst_n,
      .in_valid(f_out_valid[i]), .in_ready(c_in_ready[i]), .in_data(f_out_data[i]),
      .out_valid(c_out_valid[i]), .out_ready(out_ready && out_sel == CW'(i)), .out_fp(c_fp[i]));
  end

  assign in_ready  = f_in_ready[in_sel];
  assign out_valid = c_out_valid[out_sel];
  assign out_fp    = c_fp[out_sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sel   <= '0;
      out_sel  <= '0;
      beat_cnt <= '0;
    end else begin
      if (in_valid && in_ready) begin
        beat_cnt <= (beat_cnt == BW'(PAGE_BEATS - 1)) ? '0 : beat_cnt + 1'b1;
        if (beat_cnt == BW'(PAGE_BEATS - 1))
          in_sel <= (in_sel == CW'(NUM_CORES - 1)) ? '0 : in_sel + 1'b1;
      end
      if (out_valid && out_ready)
        out_sel <= (out_sel == CW'(NUM_CORES - 1)) ? '0 : out_sel + 1'b1;
    end
  end
endmodule
