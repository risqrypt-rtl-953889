// tb_mod_mul: self-checking test of the Karatsuba/Barrett modular multiplier.
// One random operation per cycle is issued in each of the three word modes:
// single (q = 8380417, P = A*B + C), dual (q = 3329 per 16-bit lane) and poly
// (degree-1 product plus a per-lane addend, modulo 3329).  Expected remainder, quotient and the
// unreduced high product are computed in the testbench with 64-bit integer
// arithmetic and compared two cycles later, which also checks the latency.
module tb_mod_mul;
  import risq_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] a = '0, b = '0, q = '0, rem, t;
  logic [63:0] c = '0, delta = '0, quo, prod;
  word_mode_e  mode = WM_SINGLE;
  mod_mul dut (.clk(clk), .en(1'b1), .a(a), .b(b), .c(c), .q(q), .delta(delta), .mode(mode),
               .rem(rem), .quo(quo), .prod(prod), .t(t));

  typedef struct { word_mode_e m; logic [31:0] rem; logic [63:0] quo; logic [31:0] t; } exp_t;
  exp_t exp_q[$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic exp_t model(word_mode_e m, logic [31:0] ai, logic [31:0] bi,
                                 logic [63:0] ci, logic [31:0] qi);
    exp_t e;
    longint unsigned p, pl, ph, x;
    e.m = m; e.t = 32'(longint'(ai[31:16]) * longint'(bi[31:16]));
    if (m == WM_SINGLE) begin
      p = longint'(ai) * longint'(bi) + ci;
      e.rem = 32'(p % qi); e.quo = p / qi;
    end else if (m == WM_DUAL) begin
      pl = longint'(ai[15:0]) * longint'(bi[15:0]) + longint'(ci[31:0]);
      ph = longint'(ai[31:16]) * longint'(bi[31:16]) + longint'(ci[63:32]);
      e.rem = {16'(ph % qi), 16'(pl % qi)};
      e.quo = {32'(ph / qi), 32'(pl / qi)};
    end else begin
      x  = longint'(ai[15:0]) * longint'(bi[31:16]) + longint'(ai[31:16]) * longint'(bi[15:0]) +
           longint'(ci[63:32]);
      pl = longint'(ai[15:0]) * longint'(bi[15:0]) + longint'(ci[31:0]);
      e.rem = {16'(x % qi), 16'(pl % qi)};
      e.quo = '0;
    end
    return e;
  endfunction

  int unsigned issued = 0;
  logic v1 = 1'b0, v2 = 1'b0, v3 = 1'b0;
  always @(posedge clk) begin
    exp_t e;
    v2 <= v1; v3 <= v2;
    if (v3) begin
      e = exp_q.pop_front();
      checks++;
      if (rem !== e.rem || (e.m != WM_POLY && quo !== e.quo) || (e.m == WM_POLY && t !== e.t)) begin
        failures++;
        $display("mode %0d: rem %h/%h quo %h/%h t %h/%h", e.m, rem, e.rem, quo, e.quo, t, e.t);
      end
    end
  end

  initial begin
    logic [31:0] q16;
    q16 = 32'd3329;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      unique case (i % 3)
        0: begin
          mode <= WM_SINGLE; q <= 32'd8380417; delta <= 64'hFFFF_FFFF_FFFF_FFFF / 64'd8380417;
          a <= $urandom % 8380417; b <= $urandom % 8380417; c <= {32'd0, $urandom};
          if (i == 0) begin a <= 32'd8380416; b <= 32'd8380416; c <= 64'd8380416; end
        end
        1: begin
          mode <= WM_DUAL; q <= q16; delta <= 64'hFFFF_FFFF_FFFF_FFFF / 64'(q16);
          a <= {16'($urandom % 3329), 16'($urandom % 3329)};
          b <= {16'($urandom % 3329), 16'($urandom % 3329)};
          c <= {32'($urandom % 3329), 32'($urandom % 3329)};
        end
        default: begin
          mode <= WM_POLY; q <= q16; delta <= 64'hFFFF_FFFF_FFFF_FFFF / 64'(q16);
          a <= {16'($urandom % 3329), 16'($urandom % 3329)};
          b <= {16'($urandom % 3329), 16'($urandom % 3329)};
          c <= {32'($urandom % 3329), 32'($urandom % 3329)};
        end
      endcase
      #1;
      exp_q.push_back(model(mode, a, b, c, q));
      v1 <= 1'b1;
      @(posedge clk);
      issued++;
    end
    v1 <= 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
