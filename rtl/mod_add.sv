// mod_add: modular adder with a run-time dual-mode option.
// C = (A + B) mod Q: the sum is formed, Q is subtracted, and the difference is
// kept when it does not borrow.  Built like mod_sub out of two 16-bit halves:
// in single mode the carries ripple between halves, in dual mode each half is
// an independent 16-bit modular addition with its own half of Q.  ovf[1:0]
// reports, per half (both bits equal in single mode), that the reduction was
// applied.  Purely combinational; inputs must be below Q.
module mod_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] q,
  input  logic        dual,
  output logic [31:0] c,
  output logic [1:0]  ovf
);
  logic [16:0] sl, sh;     // sums with carry
  logic [17:0] dl, dh;     // sum - q, with borrow
  logic        cin_h, bin_h, red_l, red_h;

  always_comb begin
    sl    = {1'b0, a[15:0]} + {1'b0, b[15:0]};
    cin_h = dual ? 1'b0 : sl[16];
    sh    = {1'b0, a[31:16]} + {1'b0, b[31:16]} + {16'd0, cin_h};
    dl    = {1'b0, (dual ? sl : {1'b0, sl[15:0]})} - {2'b0, q[15:0]};
    bin_h = dual ? 1'b0 : dl[17];
    dh    = {1'b0, sh} - {2'b0, q[31:16]} - {17'd0, bin_h};
    if (dual) begin
      red_l = !dl[17];
      red_h = !dh[17];
      c[15:0]  = red_l ? dl[15:0] : sl[15:0];
      c[31:16] = red_h ? dh[15:0] : sh[15:0];
      ovf      = {red_h, red_l};
    end else begin
      red_l = !dh[17];
      red_h = red_l;
      c     = red_l ? {dh[15:0], dl[15:0]} : {sh[15:0], sl[15:0]};
      ovf   = {red_h, red_l};
    end
  end
endmodule
