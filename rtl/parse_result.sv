// parse_result: turns each retired page request and its lookup result into
// an output header, and decides what happens to a write page's data.
//
// Write page data from the supporters waits in a page buffer (a FIFO of
// whole pages, in request order) while the page's fingerprint is computed
// and looked up. When the in-flight controller retires a request, in order:
//  - write, new fingerprint: a store command (to_ssd); the page goes on to
//    the compression engine;
//  - write, duplicate: only the fingerprint goes back to the host (for its
//    LBA-to-fingerprint table); the page is dropped;
//  - read: a read command to the SSD LBA if the fingerprint is known;
//  - erase: an erase command if the reference count reached zero.
// Every header also carries the fingerprint, reference count and SSD LBA for
// the host. The decisions follow the paper (Fig. 6, Sec. 4.2); the page
// buffer and the header format are this design's choice.
// Output: a header stream (with has_page) and a page stream whose pages
// belong, in order, to the headers with has_page set.
// Timing: one header per cycle; a kept or dropped page moves one beat per
// cycle.
module parse_result
  import sd_pkg::*;
#(
  parameter int PAGE_BYTES = 4096,
  parameter int BUF_PAGES  = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // write page data, in request order
  input  logic              pg_in_valid,
  output logic              pg_in_ready,
  input  logic [DATA_W-1:0] pg_in_data,
  // retired requests
  input  logic              ret_valid,
  output logic              ret_ready,
  input  page_req_t         ret_req,
  input  logic [FP_W-1:0]   ret_fp,
  input  lookup_meta_t      ret_meta,
  // headers
  output logic              hdr_valid,
  input  logic              hdr_ready,
  output out_hdr_t          hdr,
  output logic              hdr_has_page,
  // unique pages
  output logic              pg_out_valid,
  input  logic              pg_out_ready,
  output logic [DATA_W-1:0] pg_out_data,
  output logic [31:0]       cnt_unique,
  output logic [31:0]       cnt_dup
);
  localparam int PAGE_BEATS = PAGE_BYTES / 64;

  logic              b_valid, b_ready;
  logic [DATA_W-1:0] b_data;
  logic [$clog2(PAGE_BEATS*BUF_PAGES+1)-1:0] b_count;

  sd_fifo #(.WIDTH(DATA_W), .DEPTH(PAGE_BEATS*BUF_PAGES)) u_pagebuf (
    .clk, .rst_n,
    .in_valid(pg_in_valid), .in_ready(pg_in_ready), .in_data(pg_in_data),
    .out_valid(b_valid), .out_ready(b_ready), .out_data(b_data), .count(b_count));

  // page movement after a write's header: keep (forward) or drop
  logic        moving, keep;
  logic [31:0] beat_i;

  logic is_write, is_new;
  assign is_write = (ret_req.op == OP_WRITE);
  assign is_new   = is_write && !ret_meta.found;

  always_comb begin
    hdr            = '0;
    hdr.op         = ret_req.op;
    hdr.origin     = ret_req.origin;
    hdr.found      = ret_meta.found;
    hdr.node       = ret_req.node;
    hdr.lba        = ret_req.lba;
    hdr.refcnt     = ret_meta.refcnt;
    hdr.fp         = ret_fp;
    hdr.ssd_lba    = ret_meta.ssd_lba;
    hdr.comp_bytes = '0;
    case (ret_req.op)
      OP_WRITE: hdr.to_ssd = !ret_meta.found;
      OP_READ:  hdr.to_ssd = ret_meta.found;
      OP_ERASE: hdr.to_ssd = ret_meta.found && ret_meta.zero;
      default:  hdr.to_ssd = 1'b0;
    endcase
  end

  assign hdr_has_page = is_new;
  assign hdr_valid    = ret_valid && !moving;
  assign ret_ready    = hdr_ready && !moving;

  assign pg_out_valid = moving && keep && b_valid;
  assign pg_out_data  = b_data;
  assign b_ready      = moving && (keep ? pg_out_ready : 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      moving     <= 1'b0;
      keep       <= 1'b0;
      beat_i     <= '0;
      cnt_unique <= '0;
      cnt_dup    <= '0;
    end else begin
      if (hdr_valid && hdr_ready && is_write) begin
        moving <= 1'b1;
        keep   <= is_new;
        beat_i <= '0;
        if (is_new) cnt_unique <= cnt_unique + 1;
        else        cnt_dup    <= cnt_dup + 1;
      end
      if (b_valid && b_ready) begin
        beat_i <= beat_i + 1;
        if (beat_i == PAGE_BEATS - 1) moving <= 1'b0;
      end
    end
  end
endmodule
