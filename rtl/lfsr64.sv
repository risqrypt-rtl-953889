// lfsr64: 64-bit Fibonacci LFSR with loop unrolling.
// Feedback polynomial x^64 + x^63 + x^61 + x^60 + 1 (primitive, period
// 2^64 - 1).  Each enabled cycle the register advances OUT_W steps and the
// OUT_W feedback bits of those steps are presented on 'rnd' (first step in
// bit 0).  'load' replaces the state with 'seed' (an all-zero seed is mapped
// to a fixed non-zero constant, since zero is the lock-up state).  The
// 64-bit state and the unrolled widths come from the PRNG description; the
// particular polynomial is this design's choice.
module lfsr64 #(
  parameter int unsigned OUT_W = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [63:0]      seed,
  input  logic             en,
  output logic [OUT_W-1:0] rnd
);
  logic [63:0] s_q, s_n;
  logic [OUT_W-1:0] r_n;

  always_comb begin
    s_n = s_q;
    for (int i = 0; i < int'(OUT_W); i++) begin
      r_n[i] = s_n[63] ^ s_n[62] ^ s_n[60] ^ s_n[59];
      s_n    = {s_n[62:0], r_n[i]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= 64'h9E37_79B9_7F4A_7C15;
      rnd <= '0;
    end else if (load) begin
      s_q <= (seed == 64'd0) ? 64'h9E37_79B9_7F4A_7C15 : seed;
    end else if (en) begin
      s_q <= s_n;
      rnd <= r_n;
    end
  end
endmodule
