// dma_engine: accelerator-side master for the shared DMA interface.
// Turns a block read of 'rd_len' words starting at byte address 'rd_addr'
// into a valid/ready word stream, and a valid/ready word stream into
// consecutive writes starting at 'wr_addr'.  Both channels are (re)armed by a
// one-cycle start pulse.  One request per cycle goes out on the DMA port; a
// write waiting for the bus has priority over a read.  Read data returns one
// cycle after the grant (rvalid) and is collected in a FIFO of FIFO_DEPTH
// words; a read is only issued when the FIFO has room for every read still
// in flight, so backpressure from the consumer never loses data.
// Handshake and buffering are this design's choice; the accelerator
// description only states that the accelerators move data over a shared DMA
// interface.
module dma_engine
  import risq_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // read channel
  input  logic        rd_start,
  input  logic [31:0] rd_addr,
  input  logic [15:0] rd_len,
  output logic        rd_valid,
  output logic [31:0] rd_data,
  input  logic        rd_ready,
  // write channel
  input  logic        wr_start,
  input  logic [31:0] wr_addr,
  input  logic        wr_valid,
  input  logic [31:0] wr_data,
  output logic        wr_ready,
  // DMA master port
  output dma_req_t    dma_req,
  input  dma_rsp_t    dma_rsp
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);
  logic [31:0] raddr_q, waddr_q;
  logic [15:0] rleft_q;
  logic [31:0] fifo [FIFO_DEPTH];
  logic [CW-1:0] cnt_q;
  logic [$clog2(FIFO_DEPTH)-1:0] rp_q, wp_q;
  logic        infl_q;          // a read granted last cycle, data arrives now
  logic        want_rd, rd_gnt, push, pop;

  assign want_rd = (rleft_q != 16'd0) &&
                   ((32'(cnt_q) + 32'(infl_q)) < FIFO_DEPTH) && !wr_valid;

  always_comb begin
    dma_req = '0;
    if (wr_valid) begin
      dma_req.req   = 1'b1;
      dma_req.we    = 1'b1;
      dma_req.addr  = waddr_q;
      dma_req.wdata = wr_data;
    end else if (want_rd) begin
      dma_req.req   = 1'b1;
      dma_req.addr  = raddr_q;
    end
  end
  assign wr_ready = wr_valid && dma_rsp.gnt;
  assign rd_gnt   = !wr_valid && want_rd && dma_rsp.gnt;
  assign push     = infl_q && dma_rsp.rvalid;
  assign rd_valid = (cnt_q != '0);
  assign rd_data  = fifo[rp_q];
  assign pop      = rd_valid && rd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raddr_q <= '0; waddr_q <= '0; rleft_q <= '0;
      cnt_q <= '0; rp_q <= '0; wp_q <= '0; infl_q <= 1'b0;
    end else begin
      infl_q <= rd_gnt;
      if (rd_start) begin
        raddr_q <= rd_addr;
        rleft_q <= rd_len;
      end else if (rd_gnt) begin
        raddr_q <= raddr_q + 32'd4;
        rleft_q <= rleft_q - 16'd1;
      end
      if (wr_start)      waddr_q <= wr_addr;
      else if (wr_ready) waddr_q <= waddr_q + 32'd4;
      if (push) begin
        fifo[wp_q] <= dma_rsp.rdata;
        wp_q <= (32'(wp_q) == FIFO_DEPTH - 1) ? '0 : wp_q + 1'b1;
      end
      if (pop) rp_q <= (32'(rp_q) == FIFO_DEPTH - 1) ? '0 : rp_q + 1'b1;
      cnt_q <= cnt_q + CW'(push) - CW'(pop);
    end
  end
endmodule
