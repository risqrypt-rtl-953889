// x2x_core: pipelined first-order A2B / B2A mask converter, 13 stages.
// One conversion enters per cycle (two in dual mode) and leaves 13 cycles
// later with its tag.
//   power-of-two modulus 2^k (prime=0):
//     A2B: arithmetic shares (A, r), x = A + r mod 2^k, become Boolean
//          shares (x', r), x = x' ^ r, by Goubin's method: a masked carry
//          vector T is iterated k-1 (here always 31) times, three iterations
//          per pipeline stage, with one random word gamma; no intermediate
//          depends on x without a mask.
//     B2A: Boolean shares (x', r) become (A, r), x = A + r mod 2^k, by
//          Goubin's affine trick A = F(x',g) ^ F(x', r^g) ^ x' with
//          F(a,b) = (a ^ b) - b.
//     dual: two independent 16-bit conversions; carries never cross bit 16.
//   prime modulus q (prime=1): the shares are recombined and re-shared with
//     a uniform rho in [0,q): A2B out (x ^ rho, rho), B2A out
//     ((x - rho) mod q, rho).  This path is functionally correct but not
//     leakage-resistant; the converter the accelerator integrates is an
//     external design whose internals are not given.
// Outputs are truncated to k bits (power of two) or lie in [0, q).  The
// 13-stage depth, dual mode and moduli follow the accelerator description;
// the conversion algorithms are this design's choice.
module x2x_core (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [3:0]  in_tag,
  input  logic        b2a,
  input  logic        prime,
  input  logic        dual,
  input  logic [31:0] q,
  input  logic [5:0]  k,
  input  logic [31:0] s0,       // A (A2B) or x' (B2A)
  input  logic [31:0] s1,       // r
  input  logic [31:0] gamma,    // fresh random word
  input  logic [31:0] rho,      // fresh random number below q
  output logic        out_valid,
  output logic [3:0]  out_tag,
  output logic [31:0] o0,
  output logic [31:0] o1
);
  localparam int unsigned STAGES = 13;
  localparam int unsigned ITERS  = 31;
  localparam int unsigned PER    = 3;

  typedef struct packed {
    logic        v;
    logic [3:0]  tag;
    logic        loop;      // A2B power-of-two: iterations pending
    logic        dual;
    logic [31:0] kmask;
    logic [31:0] xp, t, om, a, r;
  } st_t;

  function automatic logic [31:0] shl(input logic [31:0] x, input logic du);
    return du ? ((x << 1) & 32'hFFFE_FFFE) : (x << 1);
  endfunction
  function automatic logic [31:0] phi(input logic [31:0] a, input logic [31:0] b,
                                      input logic du);
    logic [31:0] s;
    s = a ^ b;
    return du ? {s[31:16] - b[31:16], s[15:0] - b[15:0]} : (s - b);
  endfunction

  st_t st [STAGES-1];
  st_t s_in;

  // stage 0 logic
  always_comb begin
    logic [31:0] g, x, km;
    logic [32:0] d;
    g = '0; x = '0; d = '0;
    km = (k >= 6'd32) ? 32'hFFFF_FFFF : ((32'd1 << k) - 32'd1);
    if (dual) km = {km[15:0], km[15:0]};
    s_in = '0;
    s_in.v = in_valid; s_in.tag = in_tag; s_in.dual = dual && !prime; s_in.kmask = km;
    s_in.r = s1;
    if (prime) begin
      s_in.kmask = 32'hFFFF_FFFF;
      s_in.r  = rho;
      if (b2a) begin
        x = s0 ^ s1;
        d = {1'b0, x} - {1'b0, rho};
        s_in.xp = d[32] ? 32'(d + {1'b0, q}) : d[31:0];
      end else begin
        d = {1'b0, s0} + {1'b0, s1};
        if (d >= {1'b0, q}) d = d - {1'b0, q};
        s_in.xp = d[31:0] ^ rho;
      end
    end else if (b2a) begin
      s_in.xp = phi(s0, gamma, s_in.dual) ^ phi(s0, s1 ^ gamma, s_in.dual) ^ s0;
    end else begin
      g = gamma;
      s_in.t  = shl(g, s_in.dual);
      x       = g ^ s1;
      s_in.om = g & x;
      x       = s_in.t ^ s0;
      g       = g ^ x;
      g       = g & s1;
      s_in.om = s_in.om ^ g;
      g       = s_in.t & s0;
      s_in.om = s_in.om ^ g;
      s_in.xp = x;
      s_in.a  = s0;
      s_in.loop = 1'b1;
    end
  end

  function automatic st_t iterate(input st_t s, input int base);
    st_t o;
    logic [31:0] g;
    o = s;
    if (s.loop) begin
      for (int i = 0; i < int'(PER); i++) begin
        if (base + i < int'(ITERS)) begin
          g   = o.t & o.r;
          g   = g ^ o.om;
          o.t = o.t & o.a;
          g   = g ^ o.t;
          o.t = shl(g, o.dual);
        end
      end
    end
    return o;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(STAGES) - 1; s++) st[s] <= '0;
      out_valid <= 1'b0; out_tag <= '0; o0 <= '0; o1 <= '0;
    end else begin
      st[0] <= s_in;
      for (int s = 1; s < int'(STAGES) - 1; s++) st[s] <= iterate(st[s-1], int'(PER) * (s - 1));
      out_valid <= st[STAGES-2].v;
      out_tag   <= st[STAGES-2].tag;
      o0        <= (st[STAGES-2].loop ? (st[STAGES-2].xp ^ st[STAGES-2].t) : st[STAGES-2].xp)
                   & st[STAGES-2].kmask;
      o1        <= st[STAGES-2].r & st[STAGES-2].kmask;
    end
  end
endmodule
