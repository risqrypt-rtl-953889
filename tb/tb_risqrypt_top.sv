// tb_risqrypt_top: end-to-end test of the co-design system at its default
// sizes (16384-word data and instruction RAMs).  The testbench plays the
// processor: it loads operands into the data RAM over the MMIO bus, programs
// the accelerators through their MMIO registers, waits for their done
// interrupts and reads the results back over the bus.
//   - instruction RAM: program words loaded and fetched back
//   - NTT-Lite: Dilithium NTT with loads and output, chained INTT (RAM_0
//     kept between commands), forwarded dual-mode addition for Kyber sizes,
//     a chained addition that takes its right operand from the transfer,
//     poly-mode point-wise multiplication, CHK_NORM with early termination
//   - Keccak: masked SHA3-256 of the empty message
//   - X2X: masked A2B of 16 words running at the same time as the Keccak
//     command, so that DMA requests collide in the arbiter
//   - X2X PRNG modulo 257, where the rejection sampler stalls
//   - an access to the external peripheral port
// Every result is compared with values computed here.  Each mechanism is
// counted (DMA contention, forwarding, chaining, dual and poly word modes,
// masked Keccak, early termination, PRNG stalls, peripheral access) and a
// mechanism that never happened counts as a failure.  Cycle counts of the
// accelerator commands are printed; the NTT must stay close to
// n'/2 log n' cycles.
module tb_risqrypt_top;
  import risq_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n = 1'b0;
  wb_req_t     dreq = '0, preq;
  wb_rsp_t     drsp, prsp;
  logic        i_en = 1'b0, il_we = 1'b0;
  logic [31:0] i_addr = '0, i_data, il_addr = '0, il_data = '0;
  logic [2:0]  irq;
  risqrypt_top dut (.clk(clk), .rst_n(rst_n), .cpu_d_req(dreq), .cpu_d_rsp(drsp),
    .cpu_i_en(i_en), .cpu_i_addr(i_addr), .cpu_i_data(i_data),
    .imem_load_we(il_we), .imem_load_addr(il_addr), .imem_load_data(il_data),
    .per_req(preq), .per_rsp(prsp), .irq_done(irq));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // external peripheral: a single register that acks one cycle after a strobe
  logic [31:0] per_reg = '0;
  int n_periph = 0;
  always @(posedge clk) begin
    prsp.ack <= preq.cyc && preq.stb && !prsp.ack;
    prsp.dat <= per_reg;
    if (preq.cyc && preq.stb && !prsp.ack) begin
      n_periph++;
      if (preq.we) per_reg <= preq.dat;
    end
  end
  initial prsp = '0;

  // DMA contention: cycles with more than one master requesting
  int n_contention = 0;
  always @(posedge clk) begin
    int r;
    r = 0;
    for (int i = 0; i < 5; i++) r += int'(dut.m_req[i].req);
    if (r > 1) n_contention++;
  end

  localparam logic [31:0] NTT = 32'h1000_0000, KEC = 32'h1000_0100, X2X = 32'h1000_0200;

  task automatic bus_write(logic [31:0] a, logic [31:0] v);
    dreq <= '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: a, dat: v};
    do @(posedge clk); while (!drsp.ack);
    dreq <= '0;
    @(posedge clk);
  endtask
  task automatic bus_read(logic [31:0] a, output logic [31:0] v);
    dreq <= '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: a, dat: '0};
    do @(posedge clk); while (!drsp.ack);
    v = drsp.dat;
    dreq <= '0;
    @(posedge clk);
  endtask
  task automatic wait_irq(int i, output int cycles);
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (!irq[i]);
  endtask
  task automatic chk(string what, logic [31:0] got, logic [31:0] e);
    checks++;
    if (got !== e) begin failures++; if (failures < 10) $display("%s: got %h expected %h", what, got, e); end
  endtask
  task automatic ntt_cmd(ntt_op_e op, word_mode_e wm, logic [7:0] flags, output int cycles);
    bus_write(NTT, 32'(op) | (32'(wm) << 5) | (32'(flags[0]) << 7) | (32'(flags[1]) << 8) |
              (32'(flags[2]) << 9) | (32'(flags[3]) << 10) | (32'(flags[5]) << 16) |
              32'h8000_0000);
    wait_irq(0, cycles);
  endtask
  localparam logic [7:0] F_LD1 = 8'd1, F_LD0 = 8'd2, F_FWD = 8'd4, F_OUT = 8'd8,
                         F_FWDB = 8'd32;
  task automatic ntt_mod(longint unsigned q);
    longint unsigned dl;
    dl = 64'hFFFF_FFFF_FFFF_FFFF / q;
    bus_write(NTT + 32, 32'(q));
    bus_write(NTT + 36, dl[31:0]);
    bus_write(NTT + 40, dl[63:32]);
    bus_write(NTT + 48, 32'((q + 1) / 2));
  endtask

  function automatic longint unsigned pw(longint unsigned b, longint unsigned e, longint unsigned m);
    longint unsigned r = 1;
    b %= m;
    while (e != 0) begin
      if (e[0]) r = (r * b) % m;
      b = (b * b) % m;
      e >>= 1;
    end
    return r;
  endfunction
  function automatic int brv(int x, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) r |= ((x >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

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


  initial begin
    longint unsigned q, z, acc, x, inv2;
    logic [31:0] a [256], b [256], zt [128], v, m, xs [16];
    int cyc, n_fwd = 0, n_chain = 0, n_dual = 0, n_poly = 0, n_masked = 0, n_early = 0, n_stall = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // ---- instruction RAM ----
    for (int i = 0; i < 8; i++) begin
      il_we <= 1'b1; il_addr <= 32'(i * 4); il_data <= 32'h0000_0013 + 32'(i << 20);
      @(posedge clk);
    end
    il_we <= 1'b0;
    for (int i = 0; i < 8; i++) begin
      i_en <= 1'b1; i_addr <= 32'(i * 4);
      @(posedge clk);
      i_en <= 1'b0;
      @(posedge clk);
      chk("instruction fetch", i_data, 32'h0000_0013 + 32'(i << 20));
    end

    // ---- peripheral port ----
    bus_write(32'h2000_0000, 32'h5A5A_0001);
    bus_read(32'h2000_0000, v);
    chk("peripheral register", v, 32'h5A5A_0001);

    // ---- NTT-Lite: Dilithium NTT, chained INTT ----
    q = 8380417; inv2 = (q + 1) / 2;
    ntt_mod(q);
    bus_write(NTT + 8, 32'd8);
    bus_write(NTT + 16, 32'h0000_0000);
    bus_write(NTT + 20, 32'h0000_2000);
    bus_write(NTT + 24, 32'd256);
    bus_write(32'h0, 32'h0);
    for (int k = 1; k < 256; k++) bus_write(32'(4 * k), 32'(pw(1753, brv(k, 8), q)));
    for (int i = 0; i < 256; i++) begin a[i] = $urandom % 32'(q); bus_write(32'(1024 + 4 * i), a[i]); end
    ntt_cmd(OP_NTT, WM_SINGLE, F_LD1 | F_LD0 | F_OUT, cyc);
    $display("NTT n'=256 with 512-word load and 256-word output: %0d cycles", cyc);
    for (int j = 0; j < 256; j += 3) begin
      z = pw(1753, 2 * brv(j, 8) + 1, q);
      acc = 0; x = 1;
      for (int i = 0; i < 256; i++) begin acc = (acc + a[i] * x) % q; x = (x * z) % q; end
      bus_read(32'(32'h2000 + 4 * j), v);
      chk("NTT", v, 32'(acc));
    end
    for (int k = 1; k < 256; k++) bus_write(32'(4 * k), 32'((pw(1753, brv(k, 8), q) * inv2) % q));
    ntt_cmd(OP_INTT, WM_SINGLE, F_LD1 | F_OUT, cyc);
    n_chain++;
    for (int i = 0; i < 256; i++) begin bus_read(32'(32'h2000 + 4 * i), v); chk("INTT", v, a[i]); end
    ntt_cmd(OP_NTT, WM_SINGLE, 8'd0, cyc);
    n_chain++;
    $display("NTT n'=256 chained, no transfers: %0d cycles", cyc);
    checks++;
    if (cyc > 1024 + 8 * 16) begin failures++; $display("NTT too slow"); end

    // ---- Kyber sizes: forwarded dual addition, poly PWM, CHK_NORM ----
    q = 3329;
    ntt_mod(q);
    bus_write(NTT + 8, 32'd7);
    bus_write(NTT + 24, 32'd128);
    for (int i = 0; i < 128; i++) begin
      a[i] = {16'($urandom % 3329), 16'($urandom % 3329)};
      b[i] = {16'($urandom % 3329), 16'($urandom % 3329)};
      bus_write(32'(4 * i), b[i]); bus_write(32'(512 + 4 * i), a[i]);
    end
    ntt_cmd(OP_ADD, WM_DUAL, F_LD1 | F_FWD | F_OUT, cyc);
    n_fwd++; n_dual++;
    $display("dual ADD n'=128 with forwarding: %0d cycles", cyc);
    for (int i = 0; i < 128; i++) begin
      bus_read(32'(32'h2000 + 4 * i), v);
      chk("dual ADD", v, {16'((a[i][31:16] + b[i][31:16]) % 3329), 16'((a[i][15:0] + b[i][15:0]) % 3329)});
    end
    // chained: the sum stays in NTT-Lite, a third array is streamed in as the
    // right operand
    for (int i = 0; i < 128; i++) begin
      zt[i] = {16'($urandom % 3329), 16'($urandom % 3329)};
      bus_write(32'(1024 + 4 * i), zt[i]);
    end
    bus_write(NTT + 16, 32'h0000_0400);
    ntt_cmd(OP_ADD, WM_DUAL, F_FWDB | F_OUT, cyc);
    bus_write(NTT + 16, 32'h0000_0000);
    n_chain++; n_fwd++;
    $display("chained dual ADD, right operand streamed: %0d cycles", cyc);
    for (int i = 0; i < 128; i++) begin
      bus_read(32'(32'h2000 + 4 * i), v);
      chk("chained ADD", v, {16'((a[i][31:16] + b[i][31:16] + zt[i][31:16]) % 3329),
                             16'((a[i][15:0] + b[i][15:0] + zt[i][15:0]) % 3329)});
    end
    bus_write(NTT + 24, 32'd256);
    for (int i = 0; i < 128; i++) begin
      zt[i] = $urandom % 3329;
      bus_write(32'(512 + 4 * i), zt[i]); bus_write(32'(1024 + 4 * i), a[i]);
    end
    ntt_cmd(OP_PWM, WM_POLY, F_LD1 | F_LD0 | F_OUT, cyc);
    n_poly++;
    $display("poly PWM n'=128 with loads and output: %0d cycles", cyc);
    for (int i = 0; i < 128; i++) begin
      longint unsigned a0, a1, b0, b1, c0, c1;
      a0 = a[i][15:0]; a1 = a[i][31:16]; b0 = b[i][15:0]; b1 = b[i][31:16];
      c0 = (a0 * b0 + ((a1 * b1) % 3329) * zt[i]) % 3329;
      c1 = (a0 * b1 + a1 * b0) % 3329;
      bus_read(32'(32'h2000 + 4 * i), v);
      chk("poly PWM", v, {16'(c1), 16'(c0)});
    end
    bus_write(NTT + 24, 32'd128);
    bus_write(NTT + 48, 32'd100);
    for (int i = 0; i < 128; i++) bus_write(32'(4 * i), (i == 9) ? {16'd7, 16'd2000} : {16'd5, 16'd3320});
    ntt_cmd(OP_CHK_NORM, WM_DUAL, F_LD0, cyc);
    ntt_cmd(OP_CHK_NORM, WM_DUAL, 8'd0, cyc);
    bus_read(NTT + 4, v);
    chk("CHK_NORM fail flag", 32'(v[2]), 32'd1);
    $display("CHK_NORM with a failure at index 9: %0d cycles", cyc);
    if (v[2] && cyc < 64) n_early++;

    // ---- Keccak (masked SHA3-256("")) and X2X A2B at the same time ----
    for (int i = 0; i < 34; i++) begin
      m = $urandom;
      bus_write(32'(32'h4000 + 4 * i), (i == 0 ? 32'h6 : i == 33 ? 32'h8000_0000 : 32'h0) ^ m);
      bus_write(32'(32'h4400 + 4 * i), m);
    end
    bus_write(KEC + 8, 32'h4000); bus_write(KEC + 12, 32'h4400);
    bus_write(KEC + 16, 32'h5000); bus_write(KEC + 20, 32'h5400);
    bus_write(KEC + 24, 32'd34); bus_write(KEC + 28, 32'd8); bus_write(KEC + 32, 32'd34);
    bus_write(KEC + 36, 32'h0F0F_1234); bus_write(KEC + 40, 32'h8765_4321);
    for (int i = 0; i < 16; i++) begin
      xs[i] = $urandom; m = $urandom;
      bus_write(32'(32'h6000 + 4 * i), xs[i] - m); bus_write(32'(32'h6400 + 4 * i), m);
    end
    bus_write(X2X + 8, 32'h6000); bus_write(X2X + 12, 32'h6400);
    bus_write(X2X + 16, 32'h7000); bus_write(X2X + 20, 32'h7400);
    bus_write(X2X + 24, 32'd16); bus_write(X2X + 32, 32'd32);
    bus_write(KEC, 32'h8000_0001);
    bus_write(X2X, 32'h8000_0000 | 32'(XOP_X2X));
    while (!(irq[1] && irq[2])) @(posedge clk);
    n_masked++;
    begin
      logic [31:0] digest [8] = '{32'hf8c6ffa7, 32'h66d71ebf, 32'h5647c151, 32'h62d661a0,
                                  32'h4dff80f5, 32'hfa493be4, 32'h4b0ad882, 32'h4a43f880};
      logic [31:0] s0, s1;
      for (int i = 0; i < 8; i++) begin
        bus_read(32'(32'h5000 + 4 * i), s0); bus_read(32'(32'h5400 + 4 * i), s1);
        chk("masked SHA3-256", s0 ^ s1, digest[i]);
      end
      for (int i = 0; i < 16; i++) begin
        bus_read(32'(32'h7000 + 4 * i), s0); bus_read(32'(32'h7400 + 4 * i), s1);
        chk("A2B", s0 ^ s1, xs[i]);
      end
    end

    // ---- X2X PRNG modulo 257 ----
    bus_write(X2X + 28, 32'd257);
    for (int r = 0; r < 6; r++) begin
      bus_write(X2X, 32'h8000_0000 | 32'(XOP_PRNG) | (32'd1 << 6));
      wait_irq(2, cyc);
      bus_read(X2X + 4, v);
      n_stall += int'(v[31:16]);
      for (int i = 0; i < 16; i++) begin
        logic [31:0] rv;
        bus_read(32'(32'h7000 + 4 * i), rv);
        checks++;
        if (rv >= 257) begin failures++; $display("PRNG value %0d", rv); end
      end
    end

    $display("mechanisms: DMA contention %0d, forwarding %0d, chaining %0d, dual %0d, poly %0d,",
             n_contention, n_fwd, n_chain, n_dual, n_poly);
    $display("            masked Keccak %0d, early stop %0d, PRNG stalls %0d, peripheral %0d",
             n_masked, n_early, n_stall, n_periph);
    checks += 9;
    if (n_contention == 0) begin failures++; $display("no DMA contention"); end
    if (n_fwd == 0) failures++;
    if (n_chain == 0) failures++;
    if (n_dual == 0) failures++;
    if (n_poly == 0) failures++;
    if (n_masked == 0) failures++;
    if (n_early == 0) begin failures++; $display("no early termination"); end
    if (n_stall == 0) begin failures++; $display("no PRNG stall"); end
    if (n_periph == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
