// keccak_core: first-order masked Keccak-f[1600] permutation, two Boolean
// shares.  The state s = s0 ^ s1.  Linear steps (theta, rho, pi, iota) act
// on each share separately; the only non-linear step, chi
// a ^ (~b & c), uses a domain-oriented masking (DOM) AND gate: the inner
// domain terms x0&y0, x1&y1 and the cross-domain terms x0&y1, x1&y0 are
// formed, each cross term is blinded with a fresh random bit and registered
// before the shares are recombined, so no register ever holds both shares of
// a value.  One round takes four cycles (theta | rho+pi | DOM products |
// DOM compression + iota), 24 rounds take 96 cycles.
// Interface: pulse 'start' with the two input shares; 'busy' is high for the
// 96 cycles; 'done' pulses when state_o0/state_o1 hold the result.  'rnd'
// must carry 1600 fresh random bits in the DOM-product cycle (phase 2) of
// every round.  Lane (x,y) occupies bits [64*(x+5y) +: 64].
// The 96-cycle latency and the masked core follow the accelerator
// description; the split of a round into four phases is this design's own.
module keccak_core (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [1599:0] state_i0,
  input  logic [1599:0] state_i1,
  input  logic [1599:0] rnd,
  output logic          busy,
  output logic          done,
  output logic          rnd_req,     // randomness consumed this cycle
  output logic [1599:0] state_o0,
  output logic [1599:0] state_o1
);
  localparam logic [63:0] RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};
  // rotation offsets indexed by x + 5y
  localparam int ROT [25] = '{
     0,  1, 62, 28, 27,
    36, 44,  6, 55, 20,
     3, 10, 43, 25, 39,
    41, 45, 15, 21,  8,
    18,  2, 61, 56, 14};

  typedef logic [63:0] lanes_t [25];

  function automatic logic [63:0] rotl(input logic [63:0] v, input int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  function automatic lanes_t unpack(input logic [1599:0] s);
    lanes_t l;
    for (int i = 0; i < 25; i++) l[i] = s[64*i +: 64];
    return l;
  endfunction

  function automatic logic [1599:0] pack(input lanes_t l);
    logic [1599:0] s;
    for (int i = 0; i < 25; i++) s[64*i +: 64] = l[i];
    return s;
  endfunction

  function automatic logic [1599:0] theta(input logic [1599:0] s);
    lanes_t a, o;
    logic [63:0] c [5];
    logic [63:0] dd;
    a = unpack(s);
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) begin
      dd = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
      for (int y = 0; y < 5; y++) o[x+5*y] = a[x+5*y] ^ dd;
    end
    return pack(o);
  endfunction

  function automatic logic [1599:0] rho_pi(input logic [1599:0] s);
    lanes_t a, o;
    a = unpack(s);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[y + 5*((2*x + 3*y) % 5)] = rotl(a[x+5*y], ROT[x+5*y]);
    return pack(o);
  endfunction

  // operand planes of chi: b = lane (x+1, y), c = lane (x+2, y)
  function automatic logic [1599:0] shift_x(input logic [1599:0] s, input int k);
    lanes_t a, o;
    a = unpack(s);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) o[x+5*y] = a[(x+k)%5 + 5*y];
    return pack(o);
  endfunction

  logic [1599:0] s0_q, s1_q;        // state shares
  logic [1599:0] i0_q, i1_q, c0_q, c1_q;
  logic [1:0]    ph_q;
  logic [4:0]    rnd_q;

  // DOM AND of x = ~b and y = c, per bit
  logic [1599:0] x0, x1, y0, y1;
  always_comb begin
    x0 = ~shift_x(s0_q, 1);
    x1 =  shift_x(s1_q, 1);
    y0 =  shift_x(s0_q, 2);
    y1 =  shift_x(s1_q, 2);
  end

  assign rnd_req = busy && (ph_q == 2'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; ph_q <= '0; rnd_q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; ph_q <= '0; rnd_q <= '0;
      end else if (busy) begin
        ph_q <= ph_q + 2'd1;
        if (ph_q == 2'd3) begin
          if (rnd_q == 5'd23) begin busy <= 1'b0; done <= 1'b1; end
          else rnd_q <= rnd_q + 5'd1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start && !busy) begin
      s0_q <= state_i0;
      s1_q <= state_i1;
    end else if (busy) begin
      unique case (ph_q)
        2'd0: begin s0_q <= theta(s0_q); s1_q <= theta(s1_q); end
        2'd1: begin s0_q <= rho_pi(s0_q); s1_q <= rho_pi(s1_q); end
        2'd2: begin
          i0_q <= x0 & y0;
          i1_q <= x1 & y1;
          c0_q <= (x0 & y1) ^ rnd;
          c1_q <= (x1 & y0) ^ rnd;
        end
        default: begin
          s0_q <= s0_q ^ i0_q ^ c0_q ^ {1536'd0, RC[rnd_q]};
          s1_q <= s1_q ^ i1_q ^ c1_q;
        end
      endcase
    end
  end

  assign state_o0 = s0_q;
  assign state_o1 = s1_q;
endmodule
