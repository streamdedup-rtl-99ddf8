// out_arbiter: output DMA / RDMA arbiter of the StreamDedup core.
//
// Output messages (a header beat, sd_pkg::out_hdr_t in its low bits,
// followed by the compressed page for a store command) go back the way the
// request came: to the DMA port for requests of the local host, to the RDMA
// port for requests from the network (origin bit of the header). A message
// is never split. The paper names the block; the routing by origin is this
// design's choice.
// Timing: combinational, one beat per cycle.
module out_arbiter
  import sd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_last,
  output logic              dma_valid,
  input  logic              dma_ready,
  output logic [DATA_W-1:0] dma_data,
  output logic              dma_last,
  output logic              rdma_valid,
  input  logic              rdma_ready,
  output logic [DATA_W-1:0] rdma_data,
  output logic              rdma_last
);
  logic busy, sel, cur;
  out_hdr_t h;

  assign h   = out_hdr_t'(in_data[$bits(out_hdr_t)-1:0]);
  assign cur = busy ? sel : h.origin;

  assign dma_valid  = in_valid && !cur;
  assign rdma_valid = in_valid &&  cur;
  assign dma_data   = in_data;
  assign rdma_data  = in_data;
  assign dma_last   = in_last;
  assign rdma_last  = in_last;
  assign in_ready   = cur ? rdma_ready : dma_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      sel  <= 1'b0;
    end else if (in_valid && in_ready) begin
      if (!busy) sel <= h.origin;
      busy <= !in_last;
    end
  end
endmodule
