// sd_mem_model: behavioural model of the off-chip memory (HBM/DDR) seen by
// the hash table engine; not synthesizable logic and not part of the design.
// Lines of 512 bits are kept in a sparse array and read as zero until
// written. Requests are taken when ready (ready drops at random in about one
// cycle of READY_PCT) and served in order; read data returns LATENCY cycles
// after the request with the request's id. Writes honour the byte strobes.
module sd_mem_model
  import sd_pkg::*;
#(
  parameter int LATENCY   = 8,
  parameter int READY_PCT = 80
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      m_valid,
  output logic      m_ready,
  input  mem_req_t  m_req,
  output logic      m_rvalid,
  output mem_resp_t m_rsp
);
  logic [DATA_W-1:0] mem [logic [MADDR_W-1:0]];
  typedef struct {
    longint    due;
    mem_resp_t r;
  } pend_t;
  pend_t  q[$];
  longint cyc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_ready  <= 1'b0;
      m_rvalid <= 1'b0;
      m_rsp    <= '0;
      cyc      <= 0;
    end else begin
      cyc     <= cyc + 1;
      m_ready <= ($urandom_range(99) < READY_PCT);
      if (m_valid && m_ready) begin
        if (m_req.we) begin
          logic [DATA_W-1:0] old;
          old = mem.exists(m_req.addr) ? mem[m_req.addr] : '0;
          for (int b = 0; b < KEEP_W; b++)
            if (m_req.wstrb[b]) old[8*b +: 8] = m_req.wdata[8*b +: 8];
          mem[m_req.addr] = old;
        end else begin
          pend_t p;
          p.due     = cyc + LATENCY;
          p.r.id    = m_req.id;
          p.r.rdata = mem.exists(m_req.addr) ? mem[m_req.addr] : '0;
          q.push_back(p);
        end
      end
      if (q.size() > 0 && q[0].due <= cyc) begin
        m_rvalid <= 1'b1;
        m_rsp    <= q[0].r;
        void'(q.pop_front());
      end else begin
        m_rvalid <= 1'b0;
      end
    end
  end
endmodule
