// tb_ntt_lite: self-checking test of the NTT-Lite polynomial accelerator.
// The accelerator is programmed over its Wishbone port and moves data through
// its DMA port into a memory model in the testbench (one-cycle read latency).
//   1. Dilithium NTT (q = 8380417, n' = 256, root of unity 1753): twiddles
//      and coefficients are loaded (LD1, LD0), transformed and streamed out;
//      the result is compared with a direct evaluation of the polynomial at
//      the odd powers of the root, in the NTT's bit-reversed order.
//   2. Chained INTT on the data left in RAM_0 must return the input.
//   3. A chained NTT without loads or output must take no more than
//      n'/2 log n' cycles plus the pipeline latency of each stage.
//   4. Kyber-size dual mode (q = 3329, two coefficients per word, n' = 128):
//      addition with forwarding, the sum of three arrays by chaining with the
//      third array streamed in as right operand (about 4n' cycles), poly-mode
//      point-wise multiplication and multiply-accumulate in degree-1 factors
//      (two passes, about 2n' cycles), SUM (about n' cycles),
//      and CHK_NORM with early termination on a failing coefficient.
module tb_ntt_lite;
  import risq_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     rst_n = 1'b0, irq;
  wb_req_t  wreq = '0;
  wb_rsp_t  wrsp;
  dma_req_t dreq;
  dma_rsp_t drsp;
  ntt_lite dut (.clk(clk), .rst_n(rst_n), .wb_req(wreq), .wb_rsp(wrsp), .dma_req(dreq),
                .dma_rsp(drsp), .irq_done(irq));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model on the DMA port
  logic [31:0] mem [4096];
  initial for (int i = 0; i < 4096; i++) mem[i] = '0;
  assign drsp.gnt = dreq.req;
  always @(posedge clk) begin
    drsp.rvalid <= dreq.req && !dreq.we;
    drsp.rdata  <= mem[dreq.addr[13:2]];
    if (dreq.req && dreq.we) mem[dreq.addr[13:2]] <= dreq.wdata;
  end
  initial begin drsp.rvalid = 1'b0; drsp.rdata = '0; end

  task automatic wb_write(int idx, logic [31:0] v);
    wreq <= '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: 32'(idx * 4), dat: v};
    do @(posedge clk); while (!wrsp.ack);
    wreq <= '0;
    @(posedge clk);
  endtask
  task automatic wb_read(int idx, output logic [31:0] v);
    wreq <= '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: 32'(idx * 4), dat: '0};
    do @(posedge clk); while (!wrsp.ack);
    v = wrsp.dat;
    wreq <= '0;
    @(posedge clk);
  endtask

  // start a command and count the cycles until done
  task automatic run(ntt_op_e op, word_mode_e wm, logic [7:0] flags, output int cycles,
                     input logic bconst = 1'b0);
    logic [31:0] ctrl;
    ctrl = 32'(op) | (32'(wm) << 5) | (32'(flags[0]) << 7) | (32'(flags[1]) << 8) |
           (32'(flags[2]) << 9) | (32'(flags[3]) << 10) | (32'(flags[4]) << 11) |
           (32'(bconst) << 12) | (32'(flags[5]) << 16) | 32'h8000_0000;
    wreq <= '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: 32'd0, dat: ctrl};
    do @(posedge clk); while (!wrsp.ack);
    wreq <= '0;
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (!irq);
  endtask
  localparam logic [7:0] F_LD1 = 8'd1, F_LD0 = 8'd2, F_FWD = 8'd4, F_OUT = 8'd8, F_FWDB = 8'd32;

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

  task automatic set_mod(longint unsigned q);
    longint unsigned dl;
    dl = 64'hFFFF_FFFF_FFFF_FFFF / q;
    wb_write(8, 32'(q));
    wb_write(9, dl[31:0]);
    wb_write(10, dl[63:32]);
    wb_write(12, 32'((q + 1) / 2));
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] e);
    checks++;
    if (got !== e) begin failures++; $display("%s: got %h expected %h", what, got, e); end
  endtask

  initial begin
    longint unsigned q, z, acc, x, inv2;
    logic [31:0] a [256], b [256], zt [128], e [128], v;
    int cyc, bad;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // ---------- 1. Dilithium NTT ----------
    q = 8380417; inv2 = (q + 1) / 2;
    set_mod(q);
    wb_write(2, 32'd8);          // log n'
    wb_write(4, 32'h0000_0000);  // SRC
    wb_write(5, 32'h0000_2000);  // DST
    wb_write(6, 32'd256);        // IN_LEN
    mem[0] = '0;
    for (int k = 1; k < 256; k++) mem[k] = 32'(pw(1753, brv(k, 8), q));
    for (int i = 0; i < 256; i++) begin a[i] = $urandom % 32'(q); mem[256 + i] = a[i]; end
    run(OP_NTT, WM_SINGLE, F_LD1 | F_LD0 | F_OUT, cyc);
    bad = 0;
    for (int j = 0; j < 256; j++) begin
      z = pw(1753, 2 * brv(j, 8) + 1, q);
      acc = 0; x = 1;
      for (int i = 0; i < 256; i++) begin acc = (acc + a[i] * x) % q; x = (x * z) % q; end
      checks++;
      if (mem[2048 + j] !== 32'(acc)) begin
        bad++; failures++;
        if (bad < 5) $display("NTT[%0d] got %0d expected %0d", j, mem[2048 + j], acc);
      end
    end
    // ---------- 2. chained INTT ----------
    for (int k = 1; k < 256; k++) mem[k] = 32'((pw(1753, brv(k, 8), q) * inv2) % q);
    run(OP_INTT, WM_SINGLE, F_LD1 | F_OUT, cyc);
    for (int i = 0; i < 256; i++) expect_eq("INTT", mem[2048 + i], a[i]);
    // ---------- 3. chained NTT, cycle count ----------
    run(OP_NTT, WM_SINGLE, 8'd0, cyc);
    $display("NTT n'=256 (no transfers): %0d cycles", cyc);
    checks++;
    if (cyc < 1024 || cyc > 1024 + 8 * 16) begin failures++; $display("NTT took %0d cycles", cyc); end

    // ---------- 4. Kyber dual / poly mode ----------
    q = 3329;
    set_mod(q);
    wb_write(2, 32'd7);
    wb_write(6, 32'd128);
    for (int i = 0; i < 128; i++) begin
      a[i] = {16'($urandom % 3329), 16'($urandom % 3329)};
      b[i] = {16'($urandom % 3329), 16'($urandom % 3329)};
      mem[i] = b[i]; mem[128 + i] = a[i];
    end
    // addition, A forwarded from the input stream
    run(OP_ADD, WM_DUAL, F_LD1 | F_FWD | F_OUT, cyc);
    for (int i = 0; i < 128; i++)
      expect_eq("dual ADD", mem[2048 + i], {16'((a[i][31:16] + b[i][31:16]) % 3329),
                                            16'((a[i][15:0] + b[i][15:0]) % 3329)});
    // three arrays D = A + B + E by chaining: ADD with B loaded and A
    // forwarded, result kept; then ADD with E streamed as the right operand
    begin
      int c0, c1;
      for (int i = 0; i < 128; i++) begin
        e[i] = {16'($urandom % 3329), 16'($urandom % 3329)};
        mem[256 + i] = e[i];
      end
      run(OP_ADD, WM_DUAL, F_LD1 | F_FWD, c0);
      wb_write(4, 32'h0000_0400);
      run(OP_ADD, WM_DUAL, F_FWDB | F_OUT, c1);
      wb_write(4, 32'h0000_0000);
      $display("A+B+E chained, n'=128: %0d + %0d cycles", c0, c1);
      checks++;
      if (c0 + c1 > 4 * 128 + 64) begin failures++; $display("chained sum took %0d cycles", c0 + c1); end
      for (int i = 0; i < 128; i++)
        expect_eq("chained ADD", mem[2048 + i],
                  {16'((a[i][31:16] + b[i][31:16] + e[i][31:16]) % 3329),
                   16'((a[i][15:0] + b[i][15:0] + e[i][15:0]) % 3329)});
    end
    // poly-mode PWM: RAM_1 = {B, zeta}, RAM_0 = A
    wb_write(6, 32'd256);
    for (int i = 0; i < 128; i++) begin
      zt[i] = $urandom % 3329;
      mem[i] = b[i]; mem[128 + i] = zt[i]; mem[256 + i] = a[i]; mem[384 + i] = '0;
    end
    run(OP_PWM, WM_POLY, F_LD1 | F_LD0, cyc);
    $display("poly PWM n'=128 (after loads): %0d cycles", cyc);
    run(OP_NOP, WM_SINGLE, F_OUT, cyc);
    for (int i = 0; i < 128; i++) begin
      longint unsigned a0, a1, b0, b1, c0, c1;
      a0 = a[i][15:0]; a1 = a[i][31:16]; b0 = b[i][15:0]; b1 = b[i][31:16];
      c0 = (a0 * b0 + ((a1 * b1) % 3329) * zt[i]) % 3329;
      c1 = (a0 * b1 + a1 * b0) % 3329;
      expect_eq("poly PWM", mem[2048 + i], {16'(c1), 16'(c0)});
    end
    // poly-mode MAC: RAM_1 still holds {B, zeta}; A is loaded again and the
    // addend streamed behind it
    wb_write(6, 32'd128);
    wb_write(4, 32'h0000_0400);
    for (int i = 0; i < 128; i++) begin
      e[i] = {16'($urandom % 3329), 16'($urandom % 3329)};
      mem[384 + i] = e[i];
    end
    run(OP_MAC, WM_POLY, F_LD0 | F_OUT, cyc);
    wb_write(4, 32'h0000_0000);
    $display("poly MAC n'=128 (with load and output): %0d cycles", cyc);
    for (int i = 0; i < 128; i++) begin
      longint unsigned a0, a1, b0, b1, c0, c1;
      a0 = a[i][15:0]; a1 = a[i][31:16]; b0 = b[i][15:0]; b1 = b[i][31:16];
      c0 = (a0 * b0 + ((a1 * b1) % 3329) * zt[i] + e[i][15:0]) % 3329;
      c1 = (a0 * b1 + a1 * b0 + e[i][31:16]) % 3329;
      expect_eq("poly MAC", mem[2048 + i], {16'(c1), 16'(c0)});
    end
    // SUM of the dual words (each lane summed separately)
    wb_write(6, 32'd128);
    for (int i = 0; i < 128; i++) mem[i] = a[i];
    run(OP_SUM, WM_DUAL, F_LD0 | F_OUT, cyc);
    acc = 0; x = 0;
    for (int i = 0; i < 128; i++) begin acc = (acc + a[i][15:0]) % 3329; x = (x + a[i][31:16]) % 3329; end
    expect_eq("SUM", mem[2048], {16'(x), 16'(acc)});
    // CHK_NORM: bound inv2 = 100, all small, then one large value at index 20
    wb_write(12, 32'd100);
    for (int i = 0; i < 128; i++) mem[i] = {16'($urandom % 50), 16'(3329 - 1 - $urandom % 50)};
    run(OP_CHK_NORM, WM_DUAL, F_LD0, cyc);
    wb_read(1, v);
    expect_eq("CHK_NORM pass flag", 32'(v[2]), 32'd0);
    run(OP_CHK_NORM, WM_DUAL, 8'd0, cyc);
    $display("CHK_NORM full pass: %0d cycles", cyc);
    mem[20] = {16'd1500, 16'd3};
    run(OP_CHK_NORM, WM_DUAL, F_LD0, cyc);
    wb_read(1, v);
    expect_eq("CHK_NORM fail flag", 32'(v[2]), 32'd1);
    run(OP_CHK_NORM, WM_DUAL, 8'd0, cyc);
    $display("CHK_NORM early stop: %0d cycles", cyc);
    checks++;
    if (cyc > 40) begin failures++; $display("CHK_NORM did not stop early (%0d cycles)", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
