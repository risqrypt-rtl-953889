// mod_mul: modular multiplier with quotient output (multiplier and divider).
// An integer product is formed by a 32x32 Karatsuba multiplier built from
// three 16-bit core products z0 = AL*BL, z2 = AH*BH, z1 = (AL+AH)(BL+BH).  An
// addend C is added to the product, and the sum P is reduced by a naive
// Barrett reduction that returns both quotient floor(P/Q) and remainder
// P mod Q for any divisor Q up to 32 bits: the quotient estimate is
// (P*DELTA) >> 64 with DELTA = floor((2^64-1)/Q), computed by a recursive
// 64x64 Karatsuba multiplier (nine core products), the remainder by a
// truncated multiplication, and at most two correction subtractions follow.
// Word modes:
//   single: P = A*B + C (64 bit), rem = P mod Q, quo = floor(P/Q)
//   dual:   per 16-bit half, P_x = A_x*B_x + C_x (C_x = C[31:0] / C[63:32]),
//           rem = {rem_h, rem_l}, quo = {quo_h[31:0], quo_l[31:0]}
//   poly:   C_H = (AL*BH + AH*BL + C_h) mod Q, C'_L = (AL*BL + C_l) mod Q,
//           rem = {C_H, C'_L} (C_h, C_l as in dual mode, zero for a product),
//           t = AH*BH not reduced (degree-1 polynomial product via Karatsuba)
// prod returns the unreduced P (dual: {P_h, P_l}).
// Timing: two pipeline stages.  Operands are taken when en is high; the
// Karatsuba products are registered in the first stage and the reduced
// results in the second, so outputs are valid two enabled cycles later.
// The Karatsuba/Barrett structure follows the accelerator description; the
// pipeline cut and the correction count are this design's choices.
module mod_mul
  import risq_pkg::*;
(
  input  logic        clk,
  input  logic        en,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [63:0] c,
  input  logic [31:0] q,
  input  logic [63:0] delta,
  input  word_mode_e  mode,
  output logic [31:0] rem,
  output logic [63:0] quo,
  output logic [63:0] prod,
  output logic [31:0] t
);
  // ---------- core and Karatsuba multipliers ----------
  function automatic logic [33:0] core17(input logic [16:0] x, input logic [16:0] y);
    return {17'd0, x} * {17'd0, y};
  endfunction

  function automatic logic [63:0] kmul32(input logic [31:0] x, input logic [31:0] y);
    logic [33:0] p0, p1, p2;
    logic [33:0] mid;
    p0  = core17({1'b0, x[15:0]}, {1'b0, y[15:0]});
    p2  = core17({1'b0, x[31:16]}, {1'b0, y[31:16]});
    p1  = core17({1'b0, x[15:0]} + {1'b0, x[31:16]}, {1'b0, y[15:0]} + {1'b0, y[31:16]});
    mid = p1 - p0 - p2;
    return {p2[31:0], 32'd0} + {14'd0, mid, 16'd0} + {32'd0, p0[31:0]};
  endfunction

  function automatic logic [65:0] kmul33(input logic [32:0] x, input logic [32:0] y);
    logic [65:0] r;
    r = {2'b0, kmul32(x[31:0], y[31:0])};
    if (x[32]) r = r + {2'b0, y[31:0], 32'd0};
    if (y[32]) r = r + {2'b0, x[31:0], 32'd0};
    if (x[32] && y[32]) r = r + {2'b01, 64'd0};
    return r;
  endfunction

  function automatic logic [127:0] kmul64(input logic [63:0] x, input logic [63:0] y);
    logic [63:0] p0, p2;
    logic [65:0] p1, mid;
    p0  = kmul32(x[31:0], y[31:0]);
    p2  = kmul32(x[63:32], y[63:32]);
    p1  = kmul33({1'b0, x[31:0]} + {1'b0, x[63:32]}, {1'b0, y[31:0]} + {1'b0, y[63:32]});
    mid = p1 - {2'b0, p0} - {2'b0, p2};
    return {p2, 64'd0} + {30'd0, mid, 32'd0} + {64'd0, p0};
  endfunction

  // naive Barrett reduction: returns {quotient, remainder}
  function automatic logic [95:0] barrett(input logic [63:0] p, input logic [31:0] m,
                                          input logic [63:0] dl);
    logic [127:0] qd;
    logic [63:0]  qe;
    logic [33:0]  r;
    qd = kmul64(p, dl);
    qe = qd[127:64];
    r  = p[33:0] - 34'(qe[33:0] * {2'b0, m});    // truncated multiplication
    for (int k = 0; k < 2; k++) begin
      if (r >= {2'b0, m}) begin
        r  = r - {2'b0, m};
        qe = qe + 64'd1;
      end
    end
    return {qe, r[31:0]};
  endfunction

  // ---------- stage 1: products ----------
  logic [33:0] z0_r, z1_r, z2_r;     // core products
  logic [63:0] c_r;
  logic [31:0] q_r;
  logic [63:0] d_r;
  word_mode_e  mode_r;
  logic [63:0] full_r;               // single-mode 32x32 product

  always_ff @(posedge clk) begin
    if (en) begin
      z0_r   <= core17({1'b0, a[15:0]}, {1'b0, b[15:0]});
      z2_r   <= core17({1'b0, a[31:16]}, {1'b0, b[31:16]});
      z1_r   <= core17({1'b0, a[15:0]} + {1'b0, a[31:16]}, {1'b0, b[15:0]} + {1'b0, b[31:16]});
      full_r <= kmul32(a, b);
      c_r    <= c;
      q_r    <= q;
      d_r    <= delta;
      mode_r <= mode;
    end
  end

  // ---------- stage 2: reduction ----------
  logic [95:0] br_s, br_l, br_h;
  logic [63:0] p_s;
  logic [31:0] p_l, p_h;
  logic [33:0] xprod;

  always_comb begin
    p_s   = full_r + c_r;
    p_l   = z0_r[31:0] + c_r[31:0];
    p_h   = z2_r[31:0] + c_r[63:32];
    xprod = z1_r - z0_r - z2_r;
    br_s  = barrett(p_s, q_r, d_r);
    if (mode_r == WM_POLY) begin
      br_h = barrett({30'd0, xprod} + {32'd0, c_r[63:32]}, q_r, d_r);
      br_l = barrett({32'd0, p_l}, q_r, d_r);
    end else begin
      br_h = barrett({32'd0, p_h}, q_r, d_r);
      br_l = barrett({32'd0, p_l}, q_r, d_r);
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      t <= z2_r[31:0];
      if (mode_r == WM_SINGLE) begin
        rem  <= br_s[31:0];
        quo  <= br_s[95:32];
        prod <= p_s;
      end else begin
        rem  <= {br_h[15:0], br_l[15:0]};
        quo  <= {br_h[63:32], br_l[63:32]};
        prod <= (mode_r == WM_POLY) ? {30'd0, xprod} : {p_h, p_l};
      end
    end
  end
endmodule
