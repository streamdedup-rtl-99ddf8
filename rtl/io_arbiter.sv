// io_arbiter: input DMA / RDMA arbiter of the StreamDedup core.
//
// Requests reach the core either by DMA from the local host or by RDMA from
// remote hosts. Both arrive as packets of 512-bit beats: a header beat
// (sd_pkg::req_hdr_t in its low bits) followed by npages*PAGE_BEATS data
// beats for a write, or npages fingerprint beats for a read or erase. The
// arbiter forwards whole packets, alternating between the two sources when
// both have a packet waiting, and marks each beat with its origin
// (0 = DMA, 1 = RDMA). The paper names the block; packet format and the
// round-robin policy are this design's choice.
// Timing: combinational pass-through, one beat per cycle, no bubble between
// packets.
module io_arbiter
  import sd_pkg::*;
#(
  parameter int PAGE_BYTES = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dma_valid,
  output logic              dma_ready,
  input  logic [DATA_W-1:0] dma_data,
  input  logic              rdma_valid,
  output logic              rdma_ready,
  input  logic [DATA_W-1:0] rdma_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic              out_origin,
  output logic              out_first     // header beat of a packet
);
  localparam int PAGE_BEATS = PAGE_BYTES / 64;

  logic        busy, sel, last_sel;
  logic [31:0] remain;   // payload beats still to pass
  logic        cur_sel;
  req_hdr_t    hdr;

  // choose a source at a packet boundary: the other one first if both wait
  always_comb begin
    if (busy)                        cur_sel = sel;
    else if (dma_valid && rdma_valid) cur_sel = ~last_sel;
    else                             cur_sel = rdma_valid;
  end

  assign out_valid  = cur_sel ? rdma_valid : dma_valid;
  assign out_data   = cur_sel ? rdma_data  : dma_data;
  assign out_origin = cur_sel;
  assign out_first  = !busy;
  assign dma_ready  = out_ready && !cur_sel;
  assign rdma_ready = out_ready &&  cur_sel;
  assign hdr        = req_hdr_t'(out_data[$bits(req_hdr_t)-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      sel      <= 1'b0;
      last_sel <= 1'b1;
      remain   <= '0;
    end else if (out_valid && out_ready) begin
      if (!busy) begin
        sel      <= cur_sel;
        last_sel <= cur_sel;
        remain   <= (hdr.op == OP_WRITE) ? 32'(hdr.npages) * PAGE_BEATS : 32'(hdr.npages);
        busy     <= (hdr.npages != '0);
      end else begin
        remain <= remain - 1;
        if (remain == 1) busy <= 1'b0;
      end
    end
  end
endmodule
