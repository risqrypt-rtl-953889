// tb_x2x_prng: self-checking test of the X2X pseudo-random number generator.
// With q = 3329 and 12-bit candidates, each Z_q output must be below q
// whenever it is flagged valid, and the fraction of valid outputs must be
// close to 1 - (1 - 3329/4096)^3 = 0.9934, the acceptance rate of a
// three-candidate rejection sampler.  The 16- and 32-bit outputs must be
// balanced, must change every enabled cycle, and reloading the same seed must
// reproduce the same sequence.
module tb_x2x_prng;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [63:0] seed = 64'h1122_3344_5566_7788;
  logic [447:0] r16;
  logic [287:0] r32;
  logic [63:0]  zq;
  logic [1:0]   zq_valid;
  x2x_prng dut (.clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .en(en), .q(32'd3329),
    .kbits(6'd12), .r16(r16), .r32(r32), .zq(zq), .zq_valid(zq_valid));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, acc, ones;
    logic [447:0] first16[4], prev16;
    real rate;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    load <= 1'b1;
    @(posedge clk);
    load <= 1'b0; en <= 1'b1;
    n = 10000; acc = 0; ones = 0; prev16 = '0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      #1;
      if (i < 4) first16[i] = r16;
      for (int j = 0; j < 2; j++) begin
        if (zq_valid[j]) begin
          acc++;
          checks++;
          if (zq[32*j +: 32] >= 3329) begin failures++; $display("zq %0d out of range", zq[32*j +: 32]); end
        end
      end
      ones += $countones(r16) + $countones(r32);
      checks++;
      if (r16 == prev16) begin failures++; $display("r16 did not change"); end
      prev16 = r16;
    end
    rate = real'(acc) / real'(2 * n);
    $display("Z_q acceptance rate %f", rate);
    checks++;
    if (rate < 0.988 || rate > 0.998) failures++;
    checks++;
    if (ones < n * 352 || ones > n * 384) begin failures++; $display("bias: %0d ones", ones); end
    en <= 1'b0; load <= 1'b1;
    @(posedge clk);
    load <= 1'b0; en <= 1'b1;
    for (int i = 0; i < 4; i++) begin
      @(posedge clk);
      #1;
      checks++;
      if (r16 !== first16[i]) begin failures++; $display("reload did not repeat the sequence"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
