// ram_1r1w: simple dual-port RAM, one synchronous read port and one write
// port (block-RAM style).  Read data appears one cycle after re_i with the
// address sampled at that edge; a write and a read of the same address in
// the same cycle return the old contents.  Contents are not reset.
module ram_1r1w #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
