// dma_arbiter: shares the data RAM's DMA port among the accelerators'
// DMA masters (NTT-Lite, Keccak share 0/1, X2X share 0/1).
// Round-robin: the grant goes to the first requesting master after the one
// granted last.  gnt is combinational in the requests; the slave must accept
// every request it is given (the data RAM does).  Read data of the slave
// arrives one cycle after the grant and is returned, with rvalid, to the
// master granted in that earlier cycle.  The arbitration policy is this
// design's choice; the accelerator description only states that the
// accelerators share one DMA interface.
module dma_arbiter
  import risq_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic     clk,
  input  logic     rst_n,
  input  dma_req_t m_req [N],
  output dma_rsp_t m_rsp [N],
  output dma_req_t s_req,
  input  logic [31:0] s_rdata
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] last_q, sel, rsel_q;
  logic          any, rd_q;

  always_comb begin
    any = 1'b0;
    sel = last_q;
    for (int k = 1; k <= int'(N); k++) begin
      int unsigned c;
      c = (int'(last_q) + k) % N;
      if (!any && m_req[c].req) begin
        any = 1'b1;
        sel = IW'(c);
      end
    end
    s_req = any ? m_req[sel] : '0;
    for (int i = 0; i < int'(N); i++) begin
      m_rsp[i].gnt    = any && (sel == IW'(i));
      m_rsp[i].rvalid = rd_q && (rsel_q == IW'(i));
      m_rsp[i].rdata  = s_rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q <= '0; rsel_q <= '0; rd_q <= 1'b0;
    end else begin
      if (any) last_q <= sel;
      rd_q   <= any && !s_req.we;
      rsel_q <= sel;
    end
  end
endmodule
