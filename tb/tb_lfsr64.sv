// tb_lfsr64: self-checking test of the unrolled 64-bit LFSR.
// Two instances (64 and 48 output bits per cycle) are compared every cycle
// with a bit-serial model of the recurrence s' = {s[62:0], s63^s62^s60^s59}
// kept in the testbench, after reset, after a seed load and after a load of
// the all-zero seed (which must be replaced by the non-zero default).  A
// cycle with 'en' low must hold the output.
module tb_lfsr64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [63:0] seed = '0, r64;
  logic [47:0] r48;
  lfsr64 #(.OUT_W(64)) u64 (.clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .en(en), .rnd(r64));
  lfsr64 #(.OUT_W(48)) u48 (.clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .en(en), .rnd(r48));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] m64, m48;
  function automatic logic [63:0] step(ref logic [63:0] s, input int n);
    logic [63:0] o;
    logic fb;
    o = '0;
    for (int i = 0; i < n; i++) begin
      fb = s[63] ^ s[62] ^ s[60] ^ s[59];
      o[i] = fb;
      s = {s[62:0], fb};
    end
    return o;
  endfunction

  task automatic run(int n);
    logic [63:0] e64, e48;
    int ones = 0;
    for (int i = 0; i < n; i++) begin
      en <= 1'b1;
      @(posedge clk);
      e64 = step(m64, 64);
      e48 = step(m48, 48);
      #1;
      checks++;
      if (r64 !== e64 || r48 !== e48[47:0]) begin
        failures++; $display("step %0d: %h/%h %h/%h", i, r64, e64, r48, e48[47:0]);
      end
      ones += $countones(r64);
    end
    en <= 1'b0;
    // about half of the output bits are ones
    checks++;
    if (ones < n * 28 || ones > n * 36) begin failures++; $display("bias: %0d ones in %0d bits", ones, 64 * n); end
  endtask

  initial begin
    logic [63:0] hold;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    m64 = 64'h9E37_79B9_7F4A_7C15; m48 = m64;
    run(200);
    hold = r64;
    repeat (3) @(posedge clk);
    checks++;
    if (r64 !== hold) begin failures++; $display("output changed while disabled"); end
    seed <= 64'h0123_4567_89AB_CDEF; load <= 1'b1;
    @(posedge clk);
    load <= 1'b0;
    m64 = 64'h0123_4567_89AB_CDEF; m48 = m64;
    run(300);
    seed <= '0; load <= 1'b1;
    @(posedge clk);
    load <= 1'b0;
    m64 = 64'h9E37_79B9_7F4A_7C15; m48 = m64;
    run(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
