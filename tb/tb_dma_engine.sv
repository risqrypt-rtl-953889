// tb_dma_engine: self-checking test of the accelerator DMA master.
// A memory model in the testbench grants requests at random (stalls) and
// returns read data one cycle after a granted read.  A 40-word block read is
// consumed with random backpressure while a 30-word block write is fed with
// random gaps; every word read must match the memory and every word written
// must land at its address.  The number of stalled request cycles is
// counted and must be non-zero.
module tb_dma_engine;
  import risq_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n = 1'b0, rd_start = 1'b0, wr_start = 1'b0, rd_ready = 1'b0, wr_valid = 1'b0;
  logic [31:0] rd_addr = 32'h100, wr_addr = 32'h400, wr_data = '0, rd_data;
  logic [15:0] rd_len = 16'd40;
  logic        rd_valid, wr_ready;
  dma_req_t    req;
  dma_rsp_t    rsp;
  dma_engine dut (.clk(clk), .rst_n(rst_n), .rd_start(rd_start), .rd_addr(rd_addr), .rd_len(rd_len),
    .rd_valid(rd_valid), .rd_data(rd_data), .rd_ready(rd_ready), .wr_start(wr_start),
    .wr_addr(wr_addr), .wr_valid(wr_valid), .wr_data(wr_data), .wr_ready(wr_ready),
    .dma_req(req), .dma_rsp(rsp));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model: random grant, read data one cycle after the grant
  logic [31:0] mem [512];
  logic        gnt_en = 1'b0;
  int          stalls = 0;
  initial for (int i = 0; i < 512; i++) mem[i] = 32'hA5A5_0000 + 32'(i * 7);
  always_comb begin
    rsp.gnt = req.req && gnt_en;
  end
  always @(posedge clk) begin
    gnt_en <= ($urandom % 4) != 0;
    rsp.rvalid <= rsp.gnt && !req.we;
    rsp.rdata  <= mem[req.addr[10:2]];
    if (rsp.gnt && req.we) mem[req.addr[10:2]] <= req.wdata;
    if (req.req && !rsp.gnt) stalls++;
  end
  initial begin rsp.rvalid = 1'b0; rsp.rdata = '0; end

  int nrd = 0, nwr = 0;
  always @(posedge clk) begin
    if (rst_n && rd_valid && rd_ready) begin
      checks++;
      if (rd_data !== 32'hA5A5_0000 + 32'((64 + nrd) * 7)) begin
        failures++; $display("read %0d: %h", nrd, rd_data);
      end
      nrd++;
    end
    rd_ready <= ($urandom % 3) != 0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    rd_start <= 1'b1; wr_start <= 1'b1;
    @(posedge clk);
    rd_start <= 1'b0; wr_start <= 1'b0;
    while (nwr < 30) begin
      wr_valid <= ($urandom % 2) != 0;
      wr_data  <= 32'hC0DE_0000 + 32'(nwr);
      @(posedge clk);
      if (wr_valid && wr_ready) nwr++;
    end
    wr_valid <= 1'b0;
    while (nrd < 40) @(posedge clk);
    repeat (10) @(posedge clk);
    checks++;
    if (nrd != 40 || rd_valid) begin failures++; $display("read %0d words, more pending %0d", nrd, rd_valid); end
    for (int i = 0; i < 30; i++) begin
      checks++;
      if (mem[256 + i] !== 32'hC0DE_0000 + 32'(i)) begin failures++; $display("write %0d: %h", i, mem[256 + i]); end
    end
    checks++;
    if (mem[256 + 30] !== 32'hA5A5_0000 + 32'((256 + 30) * 7)) begin failures++; $display("write overran"); end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
