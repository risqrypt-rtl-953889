// tb_keccak_acc: self-checking test of the Keccak accelerator (sponge in
// hardware around the masked permutation core).  Programmed over Wishbone,
// with a memory model on both DMA ports that also checks that the two
// share ports are never active in the same cycle.
//   1. SHA3-256 of the empty message (padded by software) in unmasked mode
//      must give the standard digest a7ffc6f8...8434a.
//   2. The same hash in masked mode, message given as two random shares:
//      the XOR of the two output shares must equal the digest.
//   3. A SHAKE128-style run with a three-block message and a three-block
//      output (rate 42 words) in masked mode is compared with a sponge model
//      in the testbench built on a plain Keccak-f[1600] function.
// Each run must last at least as long as the 96-cycle permutations it needs.
module tb_keccak_acc;
  import risq_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     rst_n = 1'b0, irq;
  wb_req_t  wreq = '0;
  wb_rsp_t  wrsp;
  dma_req_t dreq0, dreq1;
  dma_rsp_t drsp0, drsp1;
  keccak_acc dut (.clk(clk), .rst_n(rst_n), .wb_req(wreq), .wb_rsp(wrsp), .dma_req0(dreq0),
    .dma_rsp0(drsp0), .dma_req1(dreq1), .dma_rsp1(drsp1), .irq_done(irq));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model for both ports (one shared array)
  logic [31:0] mem [4096];
  int both_active = 0;
  initial for (int i = 0; i < 4096; i++) mem[i] = '0;
  assign drsp0.gnt = dreq0.req;
  assign drsp1.gnt = dreq1.req;
  always @(posedge clk) begin
    drsp0.rvalid <= dreq0.req && !dreq0.we;
    drsp0.rdata  <= mem[dreq0.addr[13:2]];
    drsp1.rvalid <= dreq1.req && !dreq1.we;
    drsp1.rdata  <= mem[dreq1.addr[13:2]];
    if (dreq0.req && dreq0.we) mem[dreq0.addr[13:2]] <= dreq0.wdata;
    if (dreq1.req && dreq1.we) mem[dreq1.addr[13:2]] <= dreq1.wdata;
    if (dreq0.req && dreq1.req) both_active++;
  end
  initial begin drsp0 = '0; drsp1 = '0; end

  task automatic wb_write(int idx, logic [31:0] v);
    wreq <= '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: 32'(idx * 4), dat: v};
    do @(posedge clk); while (!wrsp.ack);
    wreq <= '0;
    @(posedge clk);
  endtask
  task automatic run(logic masked, output int cycles);
    wreq <= '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: 32'd0, dat: 32'h8000_0000 | 32'(masked)};
    do @(posedge clk); while (!wrsp.ack);
    wreq <= '0;
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (!irq);
  endtask

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


  // sponge model: msg words (already padded), rate in words
  task automatic sponge(input logic [31:0] msg[$], input int rate, input int outw,
                        output logic [31:0] res[$]);
    logic [1599:0] s;
    s = '0;
    res.delete();
    for (int b = 0; b < msg.size() / rate; b++) begin
      for (int w = 0; w < rate; w++) s[32*w +: 32] ^= msg[b*rate + w];
      s = keccak_f(s);
    end
    while (res.size() < outw) begin
      for (int w = 0; w < rate && res.size() < outw; w++) res.push_back(s[32*w +: 32]);
      if (res.size() < outw) s = keccak_f(s);
    end
  endtask

  initial begin
    logic [31:0] msg[$], res[$], m;
    logic [31:0] digest [8] = '{32'hf8c6ffa7, 32'h66d71ebf, 32'h5647c151, 32'h62d661a0,
                                32'h4dff80f5, 32'hfa493be4, 32'h4b0ad882, 32'h4a43f880};
    int cyc;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    // 1. SHA3-256("")
    for (int i = 0; i < 34; i++) begin mem[i] = '0; mem[256 + i] = '0; end
    mem[0] = 32'h0000_0006; mem[33] = 32'h8000_0000;
    wb_write(2, 32'h0000); wb_write(3, 32'h0400);
    wb_write(4, 32'h2000); wb_write(5, 32'h2400);
    wb_write(6, 32'd34); wb_write(7, 32'd8); wb_write(8, 32'd34);
    wb_write(9, 32'h1234_5678); wb_write(10, 32'h9abc_def0);
    run(1'b0, cyc);
    $display("SHA3-256 unmasked: %0d cycles", cyc);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (mem[2048 + i] !== digest[i]) begin failures++; $display("digest word %0d: %h", i, mem[2048 + i]); end
    end
    checks++;
    if (cyc < 96) begin failures++; $display("faster than one permutation"); end
    // 2. masked SHA3-256("")
    for (int i = 0; i < 34; i++) begin
      m = $urandom;
      mem[256 + i] = m;
      mem[i] = (i == 0 ? 32'h6 : i == 33 ? 32'h8000_0000 : 32'h0) ^ m;
    end
    run(1'b1, cyc);
    $display("SHA3-256 masked: %0d cycles", cyc);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if ((mem[2048 + i] ^ mem[2304 + i]) !== digest[i]) begin
        failures++; $display("masked digest word %0d: %h", i, mem[2048 + i] ^ mem[2304 + i]);
      end
      checks++;
      if (mem[2048 + i] === digest[i]) begin failures++; $display("share 0 is not masked"); end
    end
    // 3. three-block absorb and squeeze, rate 42
    msg.delete();
    for (int i = 0; i < 126; i++) msg.push_back($urandom);
    for (int i = 0; i < 126; i++) begin m = $urandom; mem[i] = msg[i] ^ m; mem[256 + i] = m; end
    wb_write(6, 32'd126); wb_write(7, 32'd126); wb_write(8, 32'd42);
    run(1'b1, cyc);
    $display("3-block absorb + 3-block squeeze, masked: %0d cycles", cyc);
    sponge(msg, 42, 126, res);
    for (int i = 0; i < 126; i++) begin
      checks++;
      if ((mem[2048 + i] ^ mem[2304 + i]) !== res[i]) begin
        failures++; if (failures < 5) $display("sponge word %0d: %h exp %h", i, mem[2048 + i] ^ mem[2304 + i], res[i]);
      end
    end
    checks++;
    if (cyc < 5 * 96) begin failures++; $display("fewer than five permutations"); end
    checks++;
    if (both_active != 0) begin failures++; $display("share ports active together %0d times", both_active); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
