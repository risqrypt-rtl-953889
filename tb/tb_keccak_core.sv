// tb_keccak_core: self-checking test of the masked Keccak-f[1600] core.
// The all-zero state is permuted from a random two-share split and the
// recombined lane (0,0) is compared with the published Keccak-f[1600] value
// 0xF1258F7940E1DDE7.  Random states are then permuted and compared lane by
// lane with a plain (unmasked) Keccak-f model written in the testbench; fresh
// random bits are supplied every cycle.  The core must be busy for exactly
// 96 cycles (24 rounds of 4 cycles) per permutation.
module tb_keccak_core;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 1'b0, start = 1'b0, busy, done, rnd_req;
  logic [1599:0] si0 = '0, si1 = '0, rnd = '0, so0, so1;
  keccak_core dut (.clk(clk), .rst_n(rst_n), .start(start), .state_i0(si0), .state_i1(si1),
    .rnd(rnd), .busy(busy), .done(done), .rnd_req(rnd_req), .state_o0(so0), .state_o1(so1));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    for (int i = 0; i < 50; i++) rnd[32*i +: 32] <= $urandom;

  function automatic logic [63:0] rol(logic [63:0] v, int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  // reference Keccak-f[1600]; round constants from the LFSR of the standard
  function automatic logic [1599:0] keccak_f(logic [1599:0] s_in);
    logic [63:0] a[25], b[25], c[5], dd[5], rc;
    logic [7:0] lfsr;
    int x, y, t, r, xx, yy;
    for (int i = 0; i < 25; i++) a[i] = s_in[64*i +: 64];
    lfsr = 8'h01;
    for (r = 0; r < 24; r++) begin
      for (x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
      for (x = 0; x < 5; x++) dd[x] = c[(x+4)%5] ^ rol(c[(x+1)%5], 1);
      for (int i = 0; i < 25; i++) a[i] ^= dd[i%5];
      // rho and pi along the (x,y) -> (y, 2x+3y) walk
      x = 1; y = 0; b = a;
      for (t = 0; t < 24; t++) begin
        xx = y; yy = (2*x + 3*y) % 5;
        b[xx + 5*yy] = rol(a[x + 5*y], ((t+1)*(t+2)/2) % 64);
        x = xx; y = yy;
      end
      b[0] = a[0];
      for (y = 0; y < 5; y++)
        for (x = 0; x < 5; x++)
          a[x+5*y] = b[x+5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
      rc = '0;
      for (int j = 0; j < 7; j++) begin
        rc[(1 << j) - 1] = lfsr[0];
        lfsr = lfsr[7] ? ((lfsr << 1) ^ 8'h71) : (lfsr << 1);
      end
      a[0] ^= rc;
    end
    for (int i = 0; i < 25; i++) keccak_f[64*i +: 64] = a[i];
  endfunction

  task automatic run(logic [1599:0] st, output logic [1599:0] res, output int cycles);
    logic [1599:0] m;
    for (int i = 0; i < 50; i++) m[32*i +: 32] = $urandom;
    si0 <= st ^ m; si1 <= m; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cycles = 0;
    do begin @(posedge clk); if (busy) cycles++; end while (!done);
    res = so0 ^ so1;
  endtask

  initial begin
    logic [1599:0] st, res, ref_v;
    int cycles;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run('0, res, cycles);
    checks++;
    if (res[63:0] !== 64'hF1258F7940E1DDE7) begin failures++; $display("zero state lane0 %h", res[63:0]); end
    checks++;
    if (res !== keccak_f('0)) begin failures++; $display("zero state mismatch with model"); end
    checks++;
    if (cycles != 96) begin failures++; $display("permutation took %0d cycles", cycles); end
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 50; i++) st[32*i +: 32] = $urandom;
      run(st, res, cycles);
      ref_v = keccak_f(st);
      checks++;
      if (res !== ref_v || cycles != 96) begin
        failures++; $display("random state %0d: lane0 %h exp %h, %0d cycles", n, res[63:0], ref_v[63:0], cycles);
      end
      // the shares alone must not equal the result
      checks++;
      if (so0 == ref_v || so1 == ref_v) begin failures++; $display("unmasked share"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
