// compression_engine: NUM_CORES GZip cores behind width-converting FIFOs, fed
// round robin and drained in the same order.
//
// Headers arrive with has_page set for unique write pages, whose 512-bit
// beats come on the page stream. Page n (counting only pages) goes to core
// n mod NUM_CORES: its beats enter that core's input FIFO and are split into
// 64-bit words for the core (gz_in_last on the page's last word). The core's
// 64-bit output words (gz_out_bytes valid bytes each, gz_out_last on the
// last) are counted and stored in an output FIFO. The collector takes the
// headers in arrival order; for a page it waits until that core has
// finished it, writes the compressed size into the header, sends the header
// beat and then the compressed data packed eight words per 512-bit beat.
// Headers without a page pass straight through (in order). The GZip cores
// themselves are external (ports gz_*). The paper gives the core count (6),
// the 64-bit core interface, the FIFOs before and after and the round-robin
// distribution with in-order collection; the FIFO depths and the message
// format are this design's choice.
// Output: message stream, out_last on the last beat of each message.
module compression_engine
  import sd_pkg::*;
#(
  parameter int NUM_CORES  = 6,
  parameter int PAGE_BYTES = 4096,
  parameter int HDR_DEPTH  = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hdr_valid,
  output logic              hdr_ready,
  input  out_hdr_t          hdr,
  input  logic              hdr_has_page,
  input  logic              pg_valid,
  output logic              pg_ready,
  input  logic [DATA_W-1:0] pg_data,
  // GZip cores
  output logic [NUM_CORES-1:0] gz_in_valid,
  input  logic [NUM_CORES-1:0] gz_in_ready,
  output logic [63:0]          gz_in_data  [NUM_CORES],
  output logic [NUM_CORES-1:0] gz_in_last,
  input  logic [NUM_CORES-1:0] gz_out_valid,
  output logic [NUM_CORES-1:0] gz_out_ready,
  input  logic [63:0]          gz_out_data [NUM_CORES],
  input  logic [NUM_CORES-1:0] gz_out_last,
  input  logic [3:0]           gz_out_bytes [NUM_CORES],
  // output messages
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic              out_last
);
  localparam int PAGE_BEATS = PAGE_BYTES / 64;
  localparam int PAGE_WORDS = PAGE_BYTES / 8;
  localparam int OUT_WORDS  = 2 * PAGE_WORDS;      // room for one page that expands
  localparam int CW = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1;
  localparam int BW = (PAGE_BEATS > 1) ? $clog2(PAGE_BEATS) : 1;

  // ---------------- distribution ----------------
  logic [CW-1:0] in_rr, hdr_rr;
  logic [BW-1:0] in_beat;
  logic [NUM_CORES-1:0] if_in_ready, if_out_valid, if_out_ready;
  logic [DATA_W-1:0]    if_out_data [NUM_CORES];

  assign pg_ready = if_in_ready[in_rr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_rr   <= '0;
      in_beat <= '0;
    end else if (pg_valid && pg_ready) begin
      in_beat <= (in_beat == BW'(PAGE_BEATS - 1)) ? '0 : in_beat + 1'b1;
      if (in_beat == BW'(PAGE_BEATS - 1))
        in_rr <= (in_rr == CW'(NUM_CORES - 1)) ? '0 : in_rr + 1'b1;
    end
  end

  // order of headers, with the core that compresses their page
  logic                 o_in_ready, o_valid, o_ready;
  logic [$bits(out_hdr_t)+CW:0] o_in, o_out;
  logic [$clog2(HDR_DEPTH+1)-1:0] o_count;
  out_hdr_t       o_hdr;
  logic           o_has;
  logic [CW-1:0]  o_core;

  assign o_in      = {hdr, hdr_has_page, hdr_rr};
  assign hdr_ready = o_in_ready;
  assign {o_hdr, o_has, o_core} = o_out;

  sd_fifo #(.WIDTH($bits(out_hdr_t)+CW+1), .DEPTH(HDR_DEPTH)) u_order (
    .clk, .rst_n,
    .in_valid(hdr_valid), .in_ready(o_in_ready), .in_data(o_in),
    .out_valid(o_valid), .out_ready(o_ready), .out_data(o_out), .count(o_count));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hdr_rr <= '0;
    else if (hdr_valid && hdr_ready && hdr_has_page)
      hdr_rr <= (hdr_rr == CW'(NUM_CORES - 1)) ? '0 : hdr_rr + 1'b1;
  end

  // ---------------- per-core FIFOs ----------------
  logic [NUM_CORES-1:0] of_valid, of_ready, sz_valid, sz_ready;
  logic [68:0]          of_data [NUM_CORES];       // {last, bytes, word}
  logic [SIZE_W-1:0]    sz_data [NUM_CORES];

  for (genvar i = 0; i < NUM_CORES; i++) begin : g_core
    logic [$clog2(PAGE_BEATS+1)-1:0] c_in_cnt;
    logic [$clog2(OUT_WORDS+1)-1:0]  c_out_cnt;
    logic [1:0]                      c_sz_cnt;
    logic [2:0]                      word_i;
    logic [BW-1:0]                   beat_i;
    logic [SIZE_W-1:0]               bytes_acc;
    logic                            of_in_ready, sz_in_ready;

    sd_fifo #(.WIDTH(DATA_W), .DEPTH(PAGE_BEATS)) u_in (
      .clk, .rst_n,
      .in_valid(pg_valid && in_rr == CW'(i)), .in_ready(if_in_ready[i]), .in_data(pg_data),
      .out_valid(if_out_valid[i]), .out_ready(if_out_ready[i]), .out_data(if_out_data[i]),
      .count(c_in_cnt));

    // 512 -> 64 bit
    assign gz_in_valid[i]  = if_out_valid[i];
    assign gz_in_data[i]   = if_out_data[i][64*word_i +: 64];
    assign gz_in_last[i]   = (word_i == 3'd7) && (beat_i == BW'(PAGE_BEATS - 1));
    assign if_out_ready[i] = gz_in_ready[i] && (word_i == 3'd7);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        word_i <= '0;
        beat_i <= '0;
      end else if (gz_in_valid[i] && gz_in_ready[i]) begin
        word_i <= word_i + 3'd1;
        if (word_i == 3'd7)
          beat_i <= (beat_i == BW'(PAGE_BEATS - 1)) ? '0 : beat_i + 1'b1;
      end
    end

    // output words and compressed sizes
    sd_fifo #(.WIDTH(69), .DEPTH(OUT_WORDS)) u_out (
      .clk, .rst_n,
      .in_valid(gz_out_valid[i]), .in_ready(of_in_ready),
      .in_data({gz_out_last[i], gz_out_bytes[i], gz_out_data[i]}),
      .out_valid(of_valid[i]), .out_ready(of_ready[i]), .out_data(of_data[i]),
      .count(c_out_cnt));
    assign gz_out_ready[i] = of_in_ready && sz_in_ready;

    sd_fifo #(.WIDTH(SIZE_W), .DEPTH(2)) u_size (
      .clk, .rst_n,
      .in_valid(gz_out_valid[i] && gz_out_ready[i] && gz_out_last[i]), .in_ready(sz_in_ready),
      .in_data(bytes_acc + SIZE_W'(gz_out_bytes[i])),
      .out_valid(sz_valid[i]), .out_ready(sz_ready[i]), .out_data(sz_data[i]),
      .count(c_sz_cnt));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) bytes_acc <= '0;
      else if (gz_out_valid[i] && gz_out_ready[i])
        bytes_acc <= gz_out_last[i] ? '0 : bytes_acc + SIZE_W'(gz_out_bytes[i]);
    end
  end

  // ---------------- collection ----------------
  typedef enum logic [1:0] {C_HDR, C_DATA} cstate_e;
  cstate_e      cst;
  logic [CW-1:0] ccore;
  logic [DATA_W-1:0] pack;
  logic [2:0]   pack_n;
  out_hdr_t     h_out;
  logic         w_last;
  logic [63:0]  w_data;

  always_comb begin
    h_out            = o_hdr;
    h_out.comp_bytes = o_has ? sz_data[o_core] : '0;
    w_last           = of_data[ccore][68];
    w_data           = of_data[ccore][63:0];
    out_valid = 1'b0;
    out_data  = '0;
    out_last  = 1'b0;
    o_ready   = 1'b0;
    of_ready  = '0;
    sz_ready  = '0;
    case (cst)
      C_HDR: begin
        out_valid = o_valid && (!o_has || sz_valid[o_core]);
        out_data  = DATA_W'(h_out);
        out_last  = !o_has;
        o_ready   = out_valid && out_ready;
        sz_ready[o_core] = o_has && out_valid && out_ready;
      end
      C_DATA: begin
        // a beat goes out when eight words are packed or the page ends
        out_data = pack;
        out_data[64*pack_n +: 64] = w_data;
        out_valid = of_valid[ccore] && (pack_n == 3'd7 || w_last);
        out_last  = w_last;
        of_ready[ccore] = of_valid[ccore] && (out_valid ? out_ready : 1'b1);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst    <= C_HDR;
      ccore  <= '0;
      pack   <= '0;
      pack_n <= '0;
    end else begin
      case (cst)
        C_HDR: if (out_valid && out_ready && o_has) begin
          cst    <= C_DATA;
          ccore  <= o_core;
          pack   <= '0;
          pack_n <= '0;
        end
        C_DATA: if (of_valid[ccore] && of_ready[ccore]) begin
          if (out_valid) begin
            pack   <= '0;
            pack_n <= '0;
            if (w_last) cst <= C_HDR;
          end else begin
            pack[64*pack_n +: 64] <= w_data;
            pack_n <= pack_n + 3'd1;
          end
        end
        default: cst <= C_HDR;
      endcase
    end
  end
endmodule
