// data_ram: the system's data memory, WORDS x 32 bit, with two ports.
// Port A is a Wishbone slave on the MMIO bus (byte-lane writes by sel are
// not modelled: whole words only); it acks one cycle after the strobe and
// returns read data with the ack.  Port B is the DMA port: every request is
// accepted at once (gnt = req) and read data is returned one cycle later.
// Both ports can access the array in the same cycle; a same-address write
// from both ports in one cycle is resolved in favour of port B.  Contents
// are not reset.  The word-only access and the size are this design's
// choices.
module data_ram
  import risq_pkg::*;
#(
  parameter int unsigned WORDS = 16384,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  wb_req_t     a_req,
  output wb_rsp_t     a_rsp,
  input  dma_req_t    b_req,
  output logic        b_gnt,
  output logic [31:0] b_rdata
);
  logic [31:0] mem [WORDS];
  logic        a_hit, a_ack_q;
  logic [31:0] a_dat_q;
  logic [AW-1:0] a_idx, b_idx;
  assign a_hit = a_req.cyc && a_req.stb && !a_ack_q;
  assign a_rsp = '{ack: a_ack_q, dat: a_dat_q};
  assign a_idx = a_req.adr[AW+1:2];
  assign b_idx = b_req.addr[AW+1:2];
  assign b_gnt = b_req.req;

  always_ff @(posedge clk) begin
    if (a_hit && a_req.we) mem[a_idx] <= a_req.dat;
    if (b_req.req && b_req.we) mem[b_idx] <= b_req.wdata;
    a_dat_q   <= mem[a_idx];
    b_rdata   <= mem[b_idx];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_ack_q <= 1'b0;
    else        a_ack_q <= a_hit;
  end
endmodule
