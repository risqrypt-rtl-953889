// tb_x2x_acc: self-checking test of the X2X mask conversion accelerator.
// Programmed over Wishbone, with a memory model on both share DMA ports that
// also checks that the two ports are never active in the same cycle.  Each
// command converts 16 elements whose shares the testbench prepares:
//   A2B with modulus 2^32, refresh + B2A (REFX2X) in dual 16-bit mode,
//   initial arithmetic masking modulo q = 8380417, Boolean refresh, 1-bit
//   B2A with a stride of 2, and PRNG output in [0, q) for q = 3329 and
//   q = 257.  The recombined outputs must equal the secrets, and random
//   numbers must be below q.  With q = 257 the rejection sampler fails often
//   enough that stall cycles must be reported in STATUS.  PRNG output in
//   [0, 4) must contain zeros, and in [1, 4) with the non-zero flag none.
module tb_x2x_acc;
  import risq_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     rst_n = 1'b0, irq;
  wb_req_t  wreq = '0;
  wb_rsp_t  wrsp;
  dma_req_t dreq0, dreq1;
  dma_rsp_t drsp0, drsp1;
  x2x_acc dut (.clk(clk), .rst_n(rst_n), .wb_req(wreq), .wb_rsp(wrsp), .dma_req0(dreq0),
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
  task automatic run(logic [31:0] ctrl, output int cycles);
    wreq <= '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: 32'd0, dat: 32'h8000_0000 | ctrl};
    do @(posedge clk); while (!wrsp.ack);
    wreq <= '0;
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (!irq);
  endtask


  task automatic wb_read(int idx, output logic [31:0] v);
    wreq <= '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: 32'(idx * 4), dat: '0};
    do @(posedge clk); while (!wrsp.ack);
    v = wrsp.dat;
    wreq <= '0;
    @(posedge clk);
  endtask
  function automatic logic [31:0] ctl(x2x_op_e op, x2x_mode_e md, logic dual, logic prime, logic arith);
    return 32'(op) | (32'(md) << 3) | (32'(dual) << 5) | (32'(prime) << 6) | (32'(arith) << 7);
  endfunction
  task automatic chk(string what, logic [31:0] got, logic [31:0] e);
    checks++;
    if (got !== e) begin failures++; $display("%s: got %h expected %h", what, got, e); end
  endtask

  initial begin
    logic [31:0] x [16], r, v;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    wb_write(2, 32'h0000); wb_write(3, 32'h0400);
    wb_write(4, 32'h2000); wb_write(5, 32'h2400);
    wb_write(6, 32'd16); wb_write(10, 32'hCAFE_F00D); wb_write(11, 32'h0BAD_BEEF);
    // A2B, 2^32
    wb_write(8, 32'd32);
    for (int i = 0; i < 16; i++) begin x[i] = $urandom; r = $urandom; mem[i] = x[i] - r; mem[256 + i] = r; end
    run(ctl(XOP_X2X, XM_A2B, 1'b0, 1'b0, 1'b0), cyc);
    $display("A2B x16: %0d cycles", cyc);
    for (int i = 0; i < 16; i++) chk("A2B", mem[2048 + i] ^ mem[2304 + i], x[i]);
    // refresh + B2A, dual 16-bit
    wb_write(8, 32'd16);
    for (int i = 0; i < 16; i++) begin x[i] = $urandom; r = $urandom; mem[i] = x[i] ^ r; mem[256 + i] = r; end
    run(ctl(XOP_REFX2X, XM_B2A, 1'b1, 1'b0, 1'b0), cyc);
    $display("REFX2X B2A dual x16: %0d cycles", cyc);
    for (int i = 0; i < 16; i++)
      chk("REFX2X dual", {mem[2048 + i][31:16] + mem[2304 + i][31:16], mem[2048 + i][15:0] + mem[2304 + i][15:0]}, x[i]);
    // arithmetic masking mod q
    wb_write(7, 32'd8380417);
    for (int i = 0; i < 16; i++) begin x[i] = $urandom % 8380417; mem[i] = x[i]; end
    run(ctl(XOP_MASK, XM_A2B, 1'b0, 1'b1, 1'b1), cyc);
    for (int i = 0; i < 16; i++) begin
      chk("MASK mod q", 32'((longint'(mem[2048 + i]) + longint'(mem[2304 + i])) % 8380417), x[i]);
      checks++;
      if (mem[2304 + i] >= 8380417) begin failures++; $display("mask not below q"); end
    end
    // Boolean refresh, 2^32
    wb_write(8, 32'd32);
    for (int i = 0; i < 16; i++) begin x[i] = $urandom; r = $urandom; mem[i] = x[i] ^ r; mem[256 + i] = r; end
    run(ctl(XOP_REF, XM_A2B, 1'b0, 1'b0, 1'b0), cyc);
    for (int i = 0; i < 16; i++) chk("Boolean refresh", mem[2048 + i] ^ mem[2304 + i], x[i]);
    checks++;
    if (mem[2304] === mem[256]) begin failures++; $display("refresh left the mask unchanged"); end
    // 1-bit B2A, stride 2
    wb_write(9, 32'd2);
    x[0] = $urandom; r = $urandom; mem[0] = x[0] ^ r; mem[256] = r;
    run(ctl(XOP_X2X, XM_B2A_BIT, 1'b0, 1'b0, 1'b0), cyc);
    for (int j = 0; j < 16; j++) chk($sformatf("1-bit B2A bit %0d", 2 * j), mem[2048 + j] + mem[2304 + j], 32'(x[0][2 * j]));
    // PRNG mod 3329 and mod 257
    wb_write(7, 32'd3329);
    run(ctl(XOP_PRNG, XM_A2B, 1'b0, 1'b1, 1'b0), cyc);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (mem[2048 + i] >= 3329) begin failures++; $display("PRNG %0d not below 3329", mem[2048 + i]); end
    end
    wb_write(7, 32'd257);
    v = '0;
    for (int n = 0; n < 8; n++) begin
      logic [31:0] st;
      run(ctl(XOP_PRNG, XM_A2B, 1'b0, 1'b1, 1'b0), cyc);
      wb_read(1, st);
      v += 32'(st[31:16]);
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (mem[2048 + i] >= 257) begin failures++; $display("PRNG %0d not below 257", mem[2048 + i]); end
      end
    end
    $display("PRNG q=257: %0d stall cycles in 8 runs", v);
    checks++;
    if (v == 0) begin failures++; $display("no PRNG stall seen"); end
    // non-zero range Z_2^k* with k = 2
    wb_write(8, 32'd2);
    begin
      int zeros = 0;
      for (int n = 0; n < 4; n++) begin
        run(ctl(XOP_PRNG, XM_A2B, 1'b0, 1'b0, 1'b0), cyc);
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (mem[2048 + i] >= 4) begin failures++; $display("PRNG %0d not below 4", mem[2048 + i]); end
          if (mem[2048 + i] == 0) zeros++;
        end
      end
      checks++;
      if (zeros == 0) begin failures++; $display("PRNG mod 4 never gave zero"); end
      for (int n = 0; n < 4; n++) begin
        run(ctl(XOP_PRNG, XM_A2B, 1'b0, 1'b0, 1'b0) | 32'h100, cyc);
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (mem[2048 + i] == 0 || mem[2048 + i] >= 4) begin
            failures++; $display("non-zero PRNG gave %0d", mem[2048 + i]);
          end
        end
      end
    end
    checks++;
    if (both_active != 0) begin failures++; $display("share ports active together %0d times", both_active); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
