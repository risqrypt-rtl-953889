// tb_x2x_core: self-checking test of the 13-stage A2B/B2A mask converter.
// Random secrets are split into shares in the testbench and streamed into the
// converter one per cycle with fresh randomness: A2B and B2A for modulus
// 2^32 and 2^k (k random), dual 16-bit conversions, and A2B/B2A for the
// prime q = 3329.  The recombined output (XOR for Boolean, sum mod m for
// arithmetic sharing) must equal the secret, carry the input tag, and appear
// exactly 13 cycles after the input.
module tb_x2x_core;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n = 1'b0, in_valid = 1'b0, b2a = 1'b0, prime = 1'b0, dual = 1'b0;
  logic [3:0]  in_tag = '0, out_tag;
  logic [31:0] q = 32'd3329, s0 = '0, s1 = '0, gamma = '0, rho = '0, o0, o1;
  logic [5:0]  k = 6'd32;
  logic        out_valid;
  x2x_core dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_tag(in_tag), .b2a(b2a),
    .prime(prime), .dual(dual), .q(q), .k(k), .s0(s0), .s1(s1), .gamma(gamma), .rho(rho),
    .out_valid(out_valid), .out_tag(out_tag), .o0(o0), .o1(o1));

  typedef struct { logic [31:0] x; logic b2a, prime, dual; logic [5:0] k; logic [3:0] tag; int cyc; } exp_t;
  exp_t exp_q[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] kmask(logic [5:0] kk);
    return (kk >= 32) ? 32'hFFFF_FFFF : ((32'd1 << kk) - 1);
  endfunction

  always @(posedge clk) begin
    exp_t e;
    logic [31:0] rec, m;
    if (rst_n && out_valid) begin
      e = exp_q.pop_front();
      m = kmask(e.k);
      if (e.prime) rec = e.b2a ? 32'((longint'(o0) + longint'(o1)) % 3329) : (o0 ^ o1);
      else if (e.dual) rec = e.b2a ? {o0[31:16] + o1[31:16], o0[15:0] + o1[15:0]} : (o0 ^ o1);
      else rec = e.b2a ? ((o0 + o1) & m) : ((o0 ^ o1) & m);
      if (e.dual) rec &= {m[15:0], m[15:0]};
      checks++;
      if (rec !== e.x || out_tag !== e.tag || cyc - e.cyc != 13) begin
        failures++;
        $display("b2a=%0d prime=%0d dual=%0d k=%0d: got %h exp %h tag %0d/%0d lat %0d",
                 e.b2a, e.prime, e.dual, e.k, rec, e.x, out_tag, e.tag, cyc - e.cyc);
      end
    end
  end

  task automatic issue(logic ib2a, logic iprime, logic idual, logic [5:0] ik);
    exp_t e;
    logic [31:0] x, r, m, sh0;
    m = kmask(ik);
    x = $urandom; r = $urandom;
    if (iprime) begin x = $urandom % 3329; r = $urandom % 3329; end
    else if (idual) begin x &= {m[15:0], m[15:0]}; r &= {m[15:0], m[15:0]}; end
    else begin x &= m; r &= m; end
    if (ib2a) sh0 = x ^ r;
    else if (iprime) sh0 = 32'((longint'(x) + 3329 - longint'(r)) % 3329);
    else if (idual) sh0 = {x[31:16] - r[31:16], x[15:0] - r[15:0]} & {m[15:0], m[15:0]};
    else sh0 = (x - r) & m;
    e.x = x; e.b2a = ib2a; e.prime = iprime; e.dual = idual; e.k = ik;
    e.tag = 4'($urandom); e.cyc = cyc + 1;   // the edge counter updates after this edge
    in_valid <= 1'b1; b2a <= ib2a; prime <= iprime; dual <= idual; k <= ik;
    s0 <= sh0; s1 <= r; in_tag <= e.tag; gamma <= $urandom; rho <= $urandom % 3329;
    exp_q.push_back(e);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      unique case (i % 6)
        0: issue(1'b0, 1'b0, 1'b0, 6'd32);
        1: issue(1'b1, 1'b0, 1'b0, 6'd32);
        2: issue(1'($urandom), 1'b0, 1'b0, 6'(1 + $urandom % 32));
        3: issue(1'($urandom), 1'b0, 1'b1, 6'd16);
        4: issue(1'b0, 1'b1, 1'b0, 6'd12);
        default: issue(1'b1, 1'b1, 1'b0, 6'd12);
      endcase
    end
    in_valid <= 1'b0;
    repeat (16) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
