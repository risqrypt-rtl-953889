// butterfly_unit: the arithmetic core of NTT-Lite.
// Takes three 32-bit operands (IN0..IN2) and produces two results (OUT0,
// OUT1) per cycle, fully pipelined with a fixed latency of LAT = 4 cycles.
// Submodules: modular adders/subtractors, a modular multiplier that also
// returns the Barrett quotient (so it doubles as a divider), a divide-by-two
// unit, an arithmetic right shifter, special-case checkers, and shift
// registers that carry operands alongside the multiplier pipeline.
//   stage 0  operand register; pre-adder/subtractor (for the GS butterfly)
//   stage 1-2  mod_mul (Karatsuba product, Barrett reduction)
//   stage 3  post adder/subtractor, divider by two, checkers -> output reg
// Operations (bu_op_e), with A=IN0, B=IN1, C=IN2:
//   CT      OUT0 = A + B*C, OUT1 = A - B*C (C = twiddle)
//   GS      OUT0 = (A + B)/2, OUT1 = (B - A)*C (C = twiddle including 1/2)
//   ADD/SUB OUT0 = A +/- B
//   MUL     OUT0 = A*B mod q; poly-mode: OUT0 = {C_H, C'_L}, OUT1 = T
//   MAC     OUT0 = A*B + C mod q (C < q per lane); poly-mode: as MUL with
//           C added to both halves of OUT0
//   PMUL2   OUT0 = {A[31:16], (A[15:0] + B*C) mod q}  (B = T, C = zeta)
//   COMP    OUT0 = floor((A*2^d + rnd*q/2)/q) mod 2^d
//   DECOMP  OUT0 = (A*q + rnd*2^(d-1)) >> d
//   DCMPOSE OUT0 = r1, OUT1 = r0 of A divided by alpha = beta, with
//           alpha_h = (alpha-1)/2 added before and subtracted after; when
//           post is set and r1 equals the corner value inv2, r1 = 0 and
//           r0 is decremented
//   CHKNORM OUT0 flag per lane: |A| >= beta'+1 with beta' = inv2
//   MKHINT  OUT0 = (|A| > inv2) or (A == q - inv2 and B != 0)
//   USEHINT C == 0: OUT0 = A; else A +/- 1 mod inv2 (plus when 0 < B <= beta)
//   SUM     OUT0 = running modular sum of A (restarted by 'first')
// In dual/poly mode the modulus is q[15:0] for both halves.  The operation
// set, the operand roles and the unsigned arithmetic follow the accelerator
// description; operand positions, the use of the auxiliary fields per
// operation and the pipeline cut are this design's choices.  MKHINT and
// USEHINT are single-mode only.
module butterfly_unit
  import risq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  bu_op_e      op,
  input  word_mode_e  mode,
  input  logic [31:0] in0,
  input  logic [31:0] in1,
  input  logic [31:0] in2,
  input  aux_t        aux,
  input  logic [5:0]  d,        // compress/decompress bit count, 1..31
  input  logic        rnd,      // rounding enable
  input  logic        post,     // decompose corner-case enable
  input  logic        first,    // SUM: first element
  output logic        out_valid,
  output logic [31:0] out0,
  output logic [31:0] out1
);
  localparam int unsigned LAT = 4;

  typedef struct packed {
    bu_op_e      op;
    word_mode_e  mode;
    logic [31:0] a, b, c;
    logic [31:0] pre_add;   // A + B mod q (GS)
    logic [5:0]  d;
    logic        post, first;
  } stage_t;

  stage_t s0, s1, s2;
  logic   v0, v1, v2;
  logic   dual0, dual2;
  logic [31:0] qe0, qe2;    // per-lane modulus for adders

  // ---------------- stage 0 ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v0 <= 1'b0;
    else        v0 <= in_valid;
  end
  always_ff @(posedge clk) begin
    s0.op <= op; s0.mode <= mode; s0.a <= in0; s0.b <= in1; s0.c <= in2;
    s0.d <= d; s0.post <= post; s0.first <= first;
    s0.pre_add <= '0;
  end

  assign dual0 = (s0.mode != WM_SINGLE);
  assign qe0   = dual0 ? {aux.q[15:0], aux.q[15:0]} : aux.q;

  logic [31:0] pre_sum, pre_dif;
  logic [1:0]  pre_ovf, pre_bor;
  mod_add u_pre_add (.a(s0.a), .b(s0.b), .q(qe0), .dual(dual0), .c(pre_sum), .ovf(pre_ovf));
  mod_sub u_pre_sub (.a(s0.b), .b(s0.a), .q(qe0), .dual(dual0), .c(pre_dif), .borrow(pre_bor));

  // multiplier operand selection
  logic [31:0] ma, mb, mq;
  logic [63:0] mc;
  logic [31:0] pw;          // 2^d per lane
  logic [31:0] rh;          // 2^(d-1)
  word_mode_e  mmode;
  always_comb begin
    pw    = 32'd1 << s0.d;
    rh    = rnd ? (32'd1 << (s0.d - 6'd1)) : 32'd0;
    ma    = s0.a;
    mb    = s0.b;
    mc    = '0;
    mq    = dual0 ? {16'd0, aux.q[15:0]} : aux.q;
    mmode = s0.mode;
    unique case (s0.op)
      BU_CT:   begin ma = s0.b;   mb = s0.c; end
      BU_GS:   begin ma = pre_dif; mb = s0.c; end
      BU_MAC:  mc = dual0 ? {16'd0, s0.c[31:16], 16'd0, s0.c[15:0]} : {32'd0, s0.c};
      BU_PMUL2: begin ma = s0.b; mb = s0.c; mc = {48'd0, s0.a[15:0]}; mmode = WM_SINGLE;
                      mq = {16'd0, aux.q[15:0]}; end
      BU_COMP: begin
        mb = dual0 ? {pw[15:0], pw[15:0]} : pw;
        mc = !rnd ? 64'd0 : dual0 ? {17'd0, aux.q[15:1], 17'd0, aux.q[15:1]} : {33'd0, aux.q[31:1]};
        if (mmode == WM_POLY) mmode = WM_DUAL;
      end
      BU_DECOMP: begin
        mb = dual0 ? {aux.q[15:0], aux.q[15:0]} : aux.q;
        mc = dual0 ? {rh, rh} : {32'd0, rh};
        if (mmode == WM_POLY) mmode = WM_DUAL;
      end
      BU_DCMPOSE: begin
        mb = dual0 ? 32'h0001_0001 : 32'd1;
        mq = dual0 ? {16'd0, aux.beta[15:0]} : aux.beta;
        mc = dual0 ? {17'd0, aux.beta[15:1] - 15'(!aux.beta[0]), 17'd0, aux.beta[15:1] - 15'(!aux.beta[0])}
                   : {33'd0, aux.beta[31:1] - 31'(!aux.beta[0])};
        if (mmode == WM_POLY) mmode = WM_DUAL;
      end
      default: ;
    endcase
  end

  logic [31:0] m_rem, m_t;
  logic [63:0] m_quo, m_prod;
  mod_mul u_mul (.clk(clk), .en(1'b1), .a(ma), .b(mb), .c(mc), .q(mq), .delta(aux.delta),
                 .mode(mmode), .rem(m_rem), .quo(m_quo), .prod(m_prod), .t(m_t));

  // ---------------- shift registers (stages 1,2) ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v1 <= 1'b0; v2 <= 1'b0; end
    else begin v1 <= v0; v2 <= v1; end
  end
  always_ff @(posedge clk) begin
    s1.op <= s0.op; s1.mode <= s0.mode; s1.a <= s0.a; s1.b <= s0.b; s1.c <= s0.c;
    s1.pre_add <= pre_sum; s1.d <= s0.d; s1.post <= s0.post; s1.first <= s0.first;
    s2.op <= s1.op; s2.mode <= s1.mode; s2.a <= s1.a; s2.b <= s1.b; s2.c <= s1.c;
    s2.pre_add <= s1.pre_add; s2.d <= s1.d; s2.post <= s1.post; s2.first <= s1.first;
  end

  // ---------------- stage 3: post processing ----------------
  assign dual2 = (s2.mode != WM_SINGLE);
  assign qe2   = dual2 ? {aux.q[15:0], aux.q[15:0]} : aux.q;

  logic [31:0] pa_a, pa_b, pa_q, pa_c;   // post adder
  logic [31:0] ps_a, ps_b, ps_q, ps_c;   // post subtractor
  logic [31:0] ck_c;                      // norm-check subtractor
  logic [1:0]  pa_ovf, ps_bor, ck_bor;
  logic        pa_dual, ps_dual;
  logic [31:0] div2_y;
  logic [31:0] acc;
  logic [31:0] o0, o1;
  logic [31:0] dmask, alpha_h, r1s;
  logic [15:0] r1h, r1l;
  logic        spec_s, spec_h, spec_l;

  mod_add  u_post_add (.a(pa_a), .b(pa_b), .q(pa_q), .dual(pa_dual), .c(pa_c), .ovf(pa_ovf));
  mod_sub  u_post_sub (.a(ps_a), .b(ps_b), .q(ps_q), .dual(ps_dual), .c(ps_c), .borrow(ps_bor));
  mod_sub  u_chk_sub  (.a(dual2 ? {aux.inv2[14:0], 1'b0, aux.inv2[14:0], 1'b0} : {aux.inv2[30:0], 1'b0}),
                       .b(pa_c), .q(32'd0), .dual(dual2), .c(ck_c), .borrow(ck_bor));
  mod_div2 u_div2     (.x(s2.pre_add), .q(qe2), .inv2(dual2 ? {aux.inv2[15:0], aux.inv2[15:0]} : aux.inv2),
                       .dual(dual2), .y(div2_y));

  always_comb begin
    dmask   = (32'd1 << s2.d) - 32'd1;
    alpha_h = {1'b0, aux.beta[31:1]} - 32'(!aux.beta[0]);
    r1s     = m_quo[31:0];
    r1h     = m_quo[47:32];
    r1l     = m_quo[15:0];
    spec_s  = s2.post && (m_quo[31:0] == aux.inv2);
    spec_h  = s2.post && (m_quo[63:32] == {16'd0, aux.inv2[15:0]});
    spec_l  = s2.post && (m_quo[31:0]  == {16'd0, aux.inv2[15:0]});
    pa_a = s2.a; pa_b = m_rem; pa_q = qe2; pa_dual = dual2;
    ps_a = s2.a; ps_b = m_rem; ps_q = qe2; ps_dual = dual2;
    o0 = '0; o1 = '0;
    unique case (s2.op)
      BU_CT:   begin o0 = pa_c; o1 = ps_c; end
      BU_GS:   begin o0 = div2_y; o1 = m_rem; end
      BU_ADD:  begin pa_b = s2.b; o0 = pa_c; end
      BU_SUB:  begin ps_b = s2.b; o0 = ps_c; end
      BU_MUL, BU_MAC: begin o0 = m_rem; o1 = m_t; end
      BU_PMUL2: begin o0 = {s2.a[31:16], m_rem[15:0]}; end
      BU_COMP: begin
        o0 = dual2 ? {m_quo[47:32] & dmask[15:0], m_quo[15:0] & dmask[15:0]}
                   : (m_quo[31:0] & dmask);
      end
      BU_DECOMP: begin
        o0 = dual2 ? {16'(m_prod[63:32] >> s2.d), 16'(m_prod[31:0] >> s2.d)}
                   : 32'(m_prod >> s2.d);
      end
      BU_DCMPOSE: begin
        ps_a = m_rem;
        if (dual2) begin
          ps_b = {alpha_h[15:0] + 16'(spec_h), alpha_h[15:0] + 16'(spec_l)};
          o0   = {spec_h ? 16'd0 : r1h, spec_l ? 16'd0 : r1l};
        end else begin
          ps_b = alpha_h + 32'(spec_s);
          o0   = spec_s ? 32'd0 : r1s;
        end
        o1 = ps_c;
      end
      BU_CHKNORM: begin
        pa_b = dual2 ? {aux.inv2[15:0], aux.inv2[15:0]} : aux.inv2;
        o0   = dual2 ? {15'd0, ck_bor[1], 15'd0, ck_bor[0]} : {31'd0, ck_bor[0]};
      end
      BU_MKHINT: begin
        pa_b = aux.inv2; pa_dual = 1'b0;
        o0   = {31'd0, ck_bor[0] || ((s2.a == aux.q - aux.inv2) && (s2.b != 32'd0))};
      end
      BU_USEHINT: begin
        pa_b = 32'd1; pa_q = aux.inv2; pa_dual = 1'b0;
        ps_b = 32'd1; ps_q = aux.inv2; ps_dual = 1'b0;
        if (s2.c == 32'd0)                                 o0 = s2.a;
        else if ((s2.b != 32'd0) && (s2.b <= aux.beta))    o0 = pa_c;
        else                                               o0 = ps_c;
      end
      BU_SUM: begin
        pa_a = acc; pa_b = s2.a;
        o0   = s2.first ? s2.a : pa_c;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      acc       <= '0;
    end else begin
      out_valid <= v2;
      if (v2 && s2.op == BU_SUM) acc <= o0;
    end
  end
  always_ff @(posedge clk) begin
    out0 <= o0;
    out1 <= o1;
  end

  logic unused;
  assign unused = ^{pre_ovf, pre_bor, pa_ovf, ps_bor, ck_c, m_prod[63:32] & 32'd0, LAT[0]};
endmodule
