// tb_butterfly_unit: self-checking test of the NTT-Lite butterfly unit.
// Random operands are streamed one per cycle through the CT and GS
// butterflies, modular add/subtract/multiply, multiply-accumulate, compress
// and decompress, in single mode with the Dilithium modulus 8380417 and in
// dual 16-bit mode with the Kyber modulus 3329.  Expected results are computed
// in the testbench with integer arithmetic; each result must appear exactly
// four cycles after its operands (the unit's pipeline latency).
module tb_butterfly_unit;
  import risq_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n = 1'b0, in_valid = 1'b0, out_valid;
  bu_op_e      op = BU_CT;
  word_mode_e  mode = WM_SINGLE;
  logic [31:0] in0 = '0, in1 = '0, in2 = '0, out0, out1;
  aux_t        aux = '0;
  logic [5:0]  d = 6'd10;
  butterfly_unit dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .op(op), .mode(mode),
    .in0(in0), .in1(in1), .in2(in2), .aux(aux), .d(d), .rnd(1'b1), .post(1'b0), .first(1'b0),
    .out_valid(out_valid), .out0(out0), .out1(out1));

  typedef struct { logic [31:0] o0, o1; logic chk1; int cyc; } exp_t;
  exp_t exp_q[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    exp_t e;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = exp_q.pop_front();
        if (out0 !== e.o0 || (e.chk1 && out1 !== e.o1) || cyc - e.cyc != 4) begin
          failures++;
          $display("out %h %h exp %h %h latency %0d", out0, out1, e.o0, e.o1, cyc - e.cyc);
        end
      end
    end
  end

  function automatic longint unsigned md(longint unsigned x, longint unsigned m);
    return x % m;
  endfunction

  // single-lane model; m = modulus
  function automatic void lane(bu_op_e o, longint unsigned m, longint unsigned a, longint unsigned b,
                               longint unsigned c, output longint unsigned r0, output longint unsigned r1);
    longint unsigned p, inv2;
    inv2 = (m + 1) / 2;
    p = (b * c) % m;
    r1 = 0;
    unique case (o)
      BU_CT:  begin r0 = (a + p) % m; r1 = (a + m - p) % m; end
      BU_GS:  begin r0 = ((a + b) % m * inv2) % m; r1 = (((b + m - a) % m) * c) % m; end
      BU_ADD: r0 = (a + b) % m;
      BU_SUB: r0 = (a + m - b) % m;
      BU_MUL: r0 = (a * b) % m;
      BU_MAC: r0 = (a * b + c) % m;
      BU_COMP: r0 = ((a * 1024 + m / 2) / m) % 1024;
      BU_DECOMP: r0 = (a * m + 512) >> 10;
      default: r0 = 0;
    endcase
  endfunction

  task automatic issue(bu_op_e o, word_mode_e wm);
    longint unsigned m, l0, l1, h0, h1;
    exp_t e;
    logic [31:0] x, y, z;
    m = (wm == WM_SINGLE) ? 8380417 : 3329;
    if (wm == WM_SINGLE) begin
      x = $urandom % 8380417; y = $urandom % 8380417; z = $urandom % 8380417;
      if (o == BU_DECOMP) x = $urandom % 1024;
      lane(o, m, x, y, z, l0, l1);
      e.o0 = 32'(l0); e.o1 = 32'(l1);
    end else begin
      x = {16'($urandom % 3329), 16'($urandom % 3329)};
      y = {16'($urandom % 3329), 16'($urandom % 3329)};
      z = {16'($urandom % 3329), 16'($urandom % 3329)};
      if (o == BU_DECOMP) x = x & 32'h03FF_03FF;
      lane(o, m, x[15:0], y[15:0], z[15:0], l0, l1);
      lane(o, m, x[31:16], y[31:16], z[31:16], h0, h1);
      e.o0 = {16'(h0), 16'(l0)}; e.o1 = {16'(h1), 16'(l1)};
    end
    e.chk1 = (o == BU_CT || o == BU_GS);
    e.cyc = cyc + 1;   // the edge counter updates after this edge
    aux.q <= 32'(m); aux.delta <= 64'hFFFF_FFFF_FFFF_FFFF / m;
    aux.inv2 <= 32'((m + 1) / 2); aux.beta <= 32'd0;
    op <= o; mode <= wm; in0 <= x; in1 <= y; in2 <= z; in_valid <= 1'b1;
    exp_q.push_back(e);
    @(posedge clk);
  endtask

  initial begin
    bu_op_e ops[8] = '{BU_CT, BU_GS, BU_ADD, BU_SUB, BU_MUL, BU_MAC, BU_COMP, BU_DECOMP};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int r = 0; r < 200; r++)
      for (int k = 0; k < 8; k++) begin
        // one aux setting per burst: the modulus only changes between bursts
        issue(ops[k], WM_SINGLE);
        in_valid <= 1'b0;
        repeat (5) @(posedge clk);
        issue(ops[k], WM_DUAL);
        in_valid <= 1'b0;
        repeat (5) @(posedge clk);
      end
    // back-to-back stream: one CT butterfly per cycle
    for (int i = 0; i < 64; i++) issue(BU_CT, WM_SINGLE);
    in_valid <= 1'b0;
    repeat (8) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
