// sha3_core: SHA3-256 fingerprint of one fixed-size page.
//
// The fingerprint engine instantiates many of these in parallel. A page of
// PAGE_BYTES bytes arrives as 512-bit beats (byte k of the page in bits
// [8k+7:8k] of its beat, PAGE_BYTES/64 beats). Each beat is absorbed one
// 64-bit lane per cycle into the 1600-bit Keccak state; after every 17
// lanes (the 136-byte SHA3-256 rate) Keccak-f[1600] runs one round per
// cycle for 24 cycles. After the last beat the SHA3 padding (0x06 ... 0x80)
// is applied and a final permutation gives the digest, digest byte k in
// out_fp[8k+7:8k]. The standard defines the algorithm; the iterative,
// lane-serial structure is this design's choice (the paper uses an existing
// SHA3 core and gives only its function).
//
// Timing: one beat is taken every 8 cycles at most; a 4 KiB page takes
// 512 absorb cycles + 31 permutations of 24 cycles = 1256 cycles plus a few
// cycles of handshake. out_valid holds until out_ready.
module sha3_core #(
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
  localparam int WORDS = PAGE_BYTES / 8;

  localparam logic [63:0] RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};

  localparam int ROT [25] = '{ 0,  1, 62, 28, 27,
                              36, 44,  6, 55, 20,
                               3, 10, 43, 25, 39,
                              41, 45, 15, 21,  8,
                              18,  2, 61, 56, 14};

  typedef logic [63:0] lanes_t [25];

  function automatic logic [63:0] rol(input logic [63:0] a, input int n);
    return (n == 0) ? a : ((a << n) | (a >> (64 - n)));
  endfunction

  function automatic lanes_t keccak_round(input lanes_t a, input logic [63:0] rc);
    logic [63:0] c [5];
    logic [63:0] d [5];
    lanes_t b, r;
    for (int x = 0; x < 5; x++)
      c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x+4)%5] ^ rol(c[(x+1)%5], 1);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rol(a[x + 5*y] ^ d[x], ROT[x + 5*y]);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        r[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    r[0] = r[0] ^ rc;
    return r;
  endfunction

  typedef enum logic [2:0] {S_ABSORB, S_PERM, S_PAD, S_FINAL, S_DONE} state_e;
  state_e state;

  lanes_t      st;
  logic [511:0] beat;
  logic         beat_valid;
  logic [2:0]   lane_i;       // lane within the buffered beat
  logic [4:0]   pos;          // lane within the rate block (0..16)
  logic [$clog2(WORDS+1)-1:0] words;
  logic [4:0]   round;

  assign in_ready  = (state == S_ABSORB) && !beat_valid && (words < WORDS);
  assign out_valid = (state == S_DONE);
  always_comb
    for (int i = 0; i < 4; i++) out_fp[64*i +: 64] = st[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_ABSORB;
      beat       <= '0;
      beat_valid <= 1'b0;
      lane_i     <= '0;
      pos        <= '0;
      words      <= '0;
      round      <= '0;
      for (int i = 0; i < 25; i++) st[i] <= '0;
    end else begin
      case (state)
        S_ABSORB: begin
          if (in_valid && in_ready) begin
            beat       <= in_data;
            beat_valid <= 1'b1;
            lane_i     <= '0;
          end else if (beat_valid) begin
            st[pos] <= st[pos] ^ beat[64*lane_i +: 64];
            lane_i  <= lane_i + 3'd1;
            words   <= words + 1'b1;
            if (lane_i == 3'd7) beat_valid <= 1'b0;
            if (pos == 5'd16) begin
              pos   <= '0;
              round <= '0;
              state <= S_PERM;
            end else begin
              pos <= pos + 5'd1;
              if (words == WORDS - 1) state <= S_PAD;
            end
          end
        end
        S_PERM: begin
          st    <= keccak_round(st, RC[round]);
          round <= round + 5'd1;
          if (round == 5'd23)
            state <= (words == WORDS) ? S_PAD : S_ABSORB;
        end
        S_PAD: begin
          st[pos] <= st[pos] ^ 64'h06;
          st[16]  <= ((pos == 5'd16) ? (st[16] ^ 64'h06) : st[16]) ^ 64'h8000000000000000;
          round   <= '0;
          state   <= S_FINAL;
        end
        S_FINAL: begin
          st    <= keccak_round(st, RC[round]);
          round <= round + 5'd1;
          if (round == 5'd23) state <= S_DONE;
        end
        S_DONE: begin
          if (out_ready) begin
            state <= S_ABSORB;
            words <= '0;
            pos   <= '0;
            for (int i = 0; i < 25; i++) st[i] <= '0;
          end
        end
        default: state <= S_ABSORB;
      endcase
    end
  end
endmodule
