// x2x_prng: pseudo-random number generator of the X2X accelerator.
// Sixteen 64-bit LFSRs run in parallel, unrolled so that twelve of them give
// 64 new bits per cycle, two give 48 and two give 32 (928 bits per cycle).
// The bits are split into 28 numbers in Z_2^16 (r16), 9 numbers in Z_2^32
// (r32) and, for two numbers in Z_q (zq), three candidates of KBITS =
// ceil(log2 q) bits each: the first candidate strictly below q is taken, and
// zq_valid[j] is low when none of the three is (the consumer then stalls).
// Each LFSR's seed is SEED mixed with its index.  'en' advances all LFSRs;
// outputs are valid from the cycle after an enabled cycle.
// The LFSR count, widths, output split and three-candidate rejection follow
// the accelerator description; the seed mixing and the bit-to-number
// assignment are this design's choices.
module x2x_prng (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [63:0] seed,
  input  logic        en,
  input  logic [31:0] q,
  input  logic [5:0]  kbits,
  output logic [447:0] r16,     // 28 x 16 bit
  output logic [287:0] r32,     // 9 x 32 bit
  output logic [63:0]  zq,      // 2 x 32 bit, each < q when valid
  output logic [1:0]   zq_valid
);
  logic [927:0] bits;

  for (genvar g = 0; g < 12; g++) begin : g_l64
    lfsr64 #(.OUT_W(64)) u_l (.clk(clk), .rst_n(rst_n), .load(load),
      .seed(seed ^ (64'(g + 1) * 64'hD6E8_FEB8_6659_FD93)), .en(en), .rnd(bits[64*g +: 64]));
  end
  for (genvar g = 0; g < 2; g++) begin : g_l48
    lfsr64 #(.OUT_W(48)) u_l (.clk(clk), .rst_n(rst_n), .load(load),
      .seed(seed ^ (64'(g + 13) * 64'hD6E8_FEB8_6659_FD93)), .en(en), .rnd(bits[768 + 48*g +: 48]));
  end
  for (genvar g = 0; g < 2; g++) begin : g_l32
    lfsr64 #(.OUT_W(32)) u_l (.clk(clk), .rst_n(rst_n), .load(load),
      .seed(seed ^ (64'(g + 15) * 64'hD6E8_FEB8_6659_FD93)), .en(en), .rnd(bits[864 + 32*g +: 32]));
  end

  assign r16 = bits[447:0];
  assign r32 = bits[735:448];

  logic [31:0] kmask;
  assign kmask = (kbits >= 6'd32) ? 32'hFFFF_FFFF : ((32'd1 << kbits) - 32'd1);

  always_comb begin
    zq = '0;
    zq_valid = '0;
    for (int j = 0; j < 2; j++) begin
      for (int c = 2; c >= 0; c--) begin
        logic [31:0] cand;
        cand = bits[736 + 96*j + 32*c +: 32] & kmask;
        if (cand < q) begin
          zq[32*j +: 32] = cand;
          zq_valid[j]    = 1'b1;
        end
      end
    end
  end
endmodule
