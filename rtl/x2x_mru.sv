// x2x_mru: mask refreshing unit of the X2X accelerator.
// Refresh (mask=0): arithmetic shares become (s0 + r, s1 - r) mod m, Boolean
// shares (s0 ^ r, s1 ^ r).  Initial masking (mask=1) of a plain value x given
// on s0: arithmetic (x - r mod m, r), Boolean (x ^ r, r).  The modulus m is
// q (prime=1, r must then be below q) or 2^k (prime=0, results are truncated
// to k bits).  In dual mode (power-of-two modulus only) the two 16-bit halves
// are handled independently with k <= 16.  One register stage: outputs are
// valid one cycle after the inputs, which is the extra cycle a refresh adds
// in front of a conversion.  Function per the accelerator description; the
// formulas are the usual first-order refresh.
module x2x_mru (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [3:0]  in_tag,
  input  logic        arith,
  input  logic        mask,
  input  logic        prime,
  input  logic        dual,
  input  logic [31:0] q,
  input  logic [5:0]  k,
  input  logic [31:0] s0,
  input  logic [31:0] s1,
  input  logic [31:0] r,
  output logic        out_valid,
  output logic [3:0]  out_tag,
  output logic [31:0] o0,
  output logic [31:0] o1
);
  function automatic logic [31:0] add_m(input logic [31:0] a, input logic [31:0] b,
                                        input logic [31:0] m, input logic pr);
    logic [32:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (pr) return (s >= {1'b0, m}) ? 32'(s - {1'b0, m}) : s[31:0];
    return s[31:0];
  endfunction
  function automatic logic [31:0] sub_m(input logic [31:0] a, input logic [31:0] b,
                                        input logic [31:0] m, input logic pr);
    logic [32:0] s;
    s = {1'b0, a} - {1'b0, b};
    if (pr && s[32]) return 32'(s + {1'b0, m});
    return s[31:0];
  endfunction

  logic [31:0] kmask, rr, n0, n1;
  always_comb begin
    kmask = (k >= 6'd32) ? 32'hFFFF_FFFF : ((32'd1 << k) - 32'd1);
    if (dual) kmask = {kmask[15:0], kmask[15:0]};
    rr = prime ? r : (r & kmask);
    if (!arith) begin
      n0 = mask ? (s0 ^ rr) : (s0 ^ rr);
      n1 = mask ? rr : (s1 ^ rr);
    end else if (dual && !prime) begin
      n0 = mask ? {s0[31:16] - rr[31:16], s0[15:0] - rr[15:0]}
                : {s0[31:16] + rr[31:16], s0[15:0] + rr[15:0]};
      n1 = mask ? rr : {s1[31:16] - rr[31:16], s1[15:0] - rr[15:0]};
    end else begin
      n0 = mask ? sub_m(s0, rr, q, prime) : add_m(s0, rr, q, prime);
      n1 = mask ? rr : sub_m(s1, rr, q, prime);
    end
    if (!prime) begin
      n0 = n0 & kmask;
      n1 = n1 & kmask;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_tag <= '0; o0 <= '0; o1 <= '0;
    end else begin
      out_valid <= in_valid;
      out_tag   <= in_tag;
      o0        <= n0;
      o1        <= n1;
    end
  end
endmodule
