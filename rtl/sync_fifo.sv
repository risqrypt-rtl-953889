// sync_fifo: synchronous first-in first-out buffer, DEPTH words of WIDTH
// bits (default 50x32, one per Keccak share, which holds a full
// 1600-bit state).  Push and pop in the same cycle are allowed, also when
// full (pop frees the slot).  'count' gives the fill level; 'clear' empties
// it.  The data head is shown combinationally (first-word fall-through).
module sync_fifo #(
  parameter int unsigned DEPTH = 50,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic [CW-1:0]    count,
  output logic             full,
  output logic             empty
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (32'(count) == DEPTH);
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign rdata   = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else if (clear) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_push) wp <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (32'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end
  always_ff @(posedge clk) if (do_push) mem[wp] <= wdata;
endmodule
