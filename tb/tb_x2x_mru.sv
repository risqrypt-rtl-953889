// tb_x2x_mru: self-checking test of the X2X mask refreshing unit.
// Random refresh and initial-masking operations are issued one per cycle for
// Boolean and arithmetic sharings, modulo 2^k, modulo q = 3329 and in dual
// 16-bit mode.  The testbench checks that the output shares recombine to the
// same secret, that the first share equals the value the refresh formula
// gives for the random word used, and that the tag is kept.
module tb_x2x_mru;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n = 1'b0, in_valid = 1'b0, arith = 1'b0, mask = 1'b0, prime = 1'b0, dual = 1'b0;
  logic [3:0]  in_tag = '0, out_tag;
  logic [31:0] s0 = '0, s1 = '0, r = '0, o0, o1;
  logic [5:0]  k = 6'd32;
  logic        out_valid;
  x2x_mru dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_tag(in_tag), .arith(arith),
    .mask(mask), .prime(prime), .dual(dual), .q(32'd3329), .k(k), .s0(s0), .s1(s1), .r(r),
    .out_valid(out_valid), .out_tag(out_tag), .o0(o0), .o1(o1));

  typedef struct { logic [31:0] e0, e1; logic [3:0] tag; } exp_t;
  exp_t exp_q[$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    exp_t e;
    if (rst_n && out_valid) begin
      e = exp_q.pop_front();
      checks++;
      if (o0 !== e.e0 || o1 !== e.e1 || out_tag !== e.tag) begin
        failures++; $display("got %h %h exp %h %h", o0, o1, e.e0, e.e1);
      end
    end
  end

  function automatic logic [31:0] addm(logic [31:0] a, logic [31:0] b, logic p, logic d, logic [31:0] m);
    if (p) return 32'((longint'(a) + longint'(b)) % 3329);
    if (d) return {a[31:16] + b[31:16], a[15:0] + b[15:0]} & {m[15:0], m[15:0]};
    return (a + b) & m;
  endfunction
  function automatic logic [31:0] subm(logic [31:0] a, logic [31:0] b, logic p, logic d, logic [31:0] m);
    if (p) return 32'((longint'(a) + 3329 - longint'(b)) % 3329);
    if (d) return {a[31:16] - b[31:16], a[15:0] - b[15:0]} & {m[15:0], m[15:0]};
    return (a - b) & m;
  endfunction

  initial begin
    exp_t e;
    logic ia, im, ip, id;
    logic [5:0] ik;
    logic [31:0] m, x0, x1, rr;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 4000; i++) begin
      ia = 1'($urandom); im = 1'($urandom); ip = ia && ((i % 3) == 0); id = !ip && ((i % 3) == 1);
      ik = id ? 6'd16 : ip ? 6'd12 : 6'(1 + $urandom % 32);
      m  = (ik >= 32) ? 32'hFFFF_FFFF : ((32'd1 << ik) - 1);
      if (ip) begin x0 = $urandom % 3329; x1 = $urandom % 3329; rr = $urandom % 3329; end
      else if (id) begin x0 = $urandom & 32'hFFFF_FFFF; x1 = $urandom; rr = $urandom; end
      else begin x0 = $urandom & m; x1 = $urandom & m; rr = $urandom & m; end
      if (im) x1 = '0;
      if (!ia) begin
        e.e0 = x0 ^ rr; e.e1 = im ? rr : (x1 ^ rr);
        if (id) begin e.e0 &= {m[15:0], m[15:0]}; e.e1 &= {m[15:0], m[15:0]}; end
        else if (!ip) begin e.e0 &= m; e.e1 &= m; end
      end else if (im) begin
        e.e0 = subm(x0, rr, ip, id, m); e.e1 = rr;
        if (id) e.e1 &= {m[15:0], m[15:0]};
      end else begin
        e.e0 = addm(x0, rr, ip, id, m); e.e1 = subm(x1, rr, ip, id, m);
      end
      e.tag = 4'(i);
      in_valid <= 1'b1; arith <= ia; mask <= im; prime <= ip; dual <= id; k <= ik;
      s0 <= x0; s1 <= x1; r <= rr; in_tag <= e.tag;
      exp_q.push_back(e);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
