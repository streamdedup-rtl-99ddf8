// supporters: request decoder and slicer of the StreamDedup core.
//
// Takes the packets of the input arbiter (header beat, then payload) and
// slices each request into single-page requests. For every page it emits a
// page request (operation, node, host LBA of that page, origin) towards the
// in-flight controller. A write page's PAGE_BEATS data beats follow its page
// request and go out on the page stream, which feeds both the fingerprint
// engine and the page buffer. A read or erase carries one fingerprint per
// page (one payload beat each, fingerprint in bits [255:0]); it is passed
// with the page request. The paper gives the function (decode, split, slice
// into single-page requests, read/write/erase); the packet format is this
// design's choice.
// Timing: one page request or one data beat per cycle.
module supporters
  import sd_pkg::*;
#(
  parameter int PAGE_BYTES = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_origin,
  // page requests to the in-flight controller
  output logic              preq_valid,
  input  logic              preq_ready,
  output page_req_t         preq,
  output logic              preq_has_fp,
  output logic [FP_W-1:0]   preq_fp,
  // write page data
  output logic              page_valid,
  input  logic              page_ready,
  output logic [DATA_W-1:0] page_data
);
  localparam int PAGE_BEATS = PAGE_BYTES / 64;

  typedef enum logic [1:0] {S_HDR, S_PREQ, S_DATA} state_e;
  state_e            state;
  req_hdr_t          hdr;
  logic [NPG_W-1:0]  page_i;
  logic [31:0]       beat_i;
  logic              origin;

  req_hdr_t in_hdr;
  assign in_hdr      = req_hdr_t'(in_data[$bits(req_hdr_t)-1:0]);
  assign preq.op     = hdr.op;
  assign preq.node   = hdr.node;
  assign preq.lba    = hdr.lba + LBA_W'(page_i);
  assign preq.origin = origin;
  assign preq_fp     = in_data[FP_W-1:0];
  assign page_data   = in_data;

  always_comb begin
    preq_valid  = 1'b0;
    preq_has_fp = 1'b0;
    page_valid  = 1'b0;
    in_ready    = 1'b0;
    case (state)
      S_HDR:  in_ready = 1'b1;
      S_PREQ: begin
        if (hdr.op == OP_WRITE) begin
          preq_valid = 1'b1;
        end else begin
          preq_valid  = in_valid;
          preq_has_fp = 1'b1;
          in_ready    = preq_ready;
        end
      end
      S_DATA: begin
        page_valid = in_valid;
        in_ready   = page_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_HDR;
      hdr    <= '0;
      page_i <= '0;
      beat_i <= '0;
      origin <= 1'b0;
    end else begin
      case (state)
        S_HDR: if (in_valid) begin
          hdr    <= in_hdr;
          origin <= in_origin;
          page_i <= '0;
          if (in_hdr.npages != '0) state <= S_PREQ;
        end
        S_PREQ: if (preq_valid && preq_ready) begin
          if (hdr.op == OP_WRITE) begin
            state  <= S_DATA;
            beat_i <= '0;
          end else begin
            page_i <= page_i + 1'b1;
            if (page_i + 1'b1 == hdr.npages) state <= S_HDR;
          end
        end
        S_DATA: if (page_valid && page_ready) begin
          beat_i <= beat_i + 1;
          if (beat_i == PAGE_BEATS - 1) begin
            page_i <= page_i + 1'b1;
            state  <= (page_i + 1'b1 == hdr.npages) ? S_HDR : S_PREQ;
          end
        end
        default: state <= S_HDR;
      endcase
    end
  end
endmodule
