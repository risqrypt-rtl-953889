// sampling_unit: pseudo-random sampling of NTT-Lite (SU).
// Consumes fields already cut to size by the encode unit and produces
// polynomial coefficients in [0, q).
//   CBD (rej=0): a field of 2*eta bits gives o0 = popcount(low eta bits),
//       o1 = popcount(high eta bits) and outputs (o0 - o1) mod q with the
//       first modular subtractor.
//   rejection (rej=1): a field x is accepted when x < beta, decided from the
//       borrow bits of the first modular subtractor; if 'center' is set the
//       second modular subtractor outputs (cen - x) mod q instead of x
//       (cen = beta/2 style centring constant from the auxiliary data).
// Dual mode handles two 16-bit lanes per word.  In dual rejection sampling a
// 16-bit buffer keeps an accepted value whose partner was rejected, so output
// words always carry two samples.  One output register with valid/ready;
// latency one cycle.  'clear' drops the buffered half-word.  The two
// subtractors, the borrow-based bound test and the 16-bit buffer follow the
// accelerator description; the interface is this design's own.
module sampling_unit (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        rej,
  input  logic        dual,
  input  logic        center,
  input  logic [3:0]  eta,
  input  logic [31:0] q,
  input  logic [31:0] beta,
  input  logic [31:0] cen,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  output logic        in_ready,
  output logic        out_valid,
  output logic [31:0] out_data,
  input  logic        out_ready
);
  logic [31:0] qq, o0, o1, s1_c, s2_c, cbd_v, val;
  logic [1:0]  s1_b, s2_b;
  logic        buf_v;
  logic [15:0] buf_d;

  function automatic logic [15:0] pop(input logic [15:0] x, input logic [3:0] n);
    logic [15:0] s;
    s = '0;
    for (int i = 0; i < 16; i++) if (i < int'(n)) s = s + 16'(x[i]);
    return s;
  endfunction

  always_comb begin
    qq = dual ? {q[15:0], q[15:0]} : q;
    if (dual) begin
      o0 = {pop(in_data[31:16], eta), pop(in_data[15:0], eta)};
      o1 = {pop(in_data[31:16] >> eta, eta), pop(in_data[15:0] >> eta, eta)};
    end else begin
      o0 = {16'd0, pop(in_data[15:0], eta)};
      o1 = {16'd0, pop(in_data[15:0] >> eta, eta)};
    end
  end

  // first subtractor: CBD difference, or bound test x - beta
  mod_sub u_sub1 (.a(rej ? in_data : o0), .b(rej ? (dual ? {beta[15:0], beta[15:0]} : beta) : o1),
                  .q(rej ? 32'd0 : qq), .dual(dual), .c(s1_c), .borrow(s1_b));
  // second subtractor: centring
  mod_sub u_sub2 (.a(dual ? {cen[15:0], cen[15:0]} : cen), .b(in_data), .q(qq), .dual(dual),
                  .c(s2_c), .borrow(s2_b));

  assign cbd_v = s1_c;
  assign val   = center ? s2_c : in_data;

  logic        acc_l, acc_h;
  logic [1:0]  n_new;
  logic [47:0] pool;      // up to three 16-bit values, oldest in the low bits
  logic [1:0]  n_pool;
  logic        fire;

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_valid && in_ready;

  always_comb begin
    acc_l = s1_b[0];
    acc_h = s1_b[1];
    n_new = 2'(acc_l) + 2'(acc_h);
    pool  = '0;
    n_pool = 2'(buf_v);
    if (buf_v) pool[15:0] = buf_d;
    if (acc_l) begin
      pool = pool | (48'(val[15:0]) << (16 * n_pool));
      n_pool = n_pool + 2'd1;
    end
    if (acc_h) begin
      pool = pool | (48'(val[31:16]) << (16 * n_pool));
      n_pool = n_pool + 2'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      buf_v     <= 1'b0;
      buf_d     <= '0;
    end else if (clear) begin
      out_valid <= 1'b0;
      buf_v     <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        if (!rej) begin
          out_valid <= 1'b1;
          out_data  <= cbd_v;
        end else if (!dual) begin
          if (s1_b[0]) begin
            out_valid <= 1'b1;
            out_data  <= val;
          end
        end else begin
          if (n_pool >= 2'd2) begin
            out_valid <= 1'b1;
            out_data  <= pool[31:0];
            buf_v     <= (n_pool == 2'd3);
            buf_d     <= pool[47:32];
          end else begin
            buf_v     <= (n_pool == 2'd1);
            buf_d     <= pool[15:0];
          end
        end
      end
    end
  end

  logic unused;
  assign unused = ^{n_new, s2_b};
endmodule
