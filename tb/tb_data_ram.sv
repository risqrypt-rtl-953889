// tb_data_ram: self-checking test of the dual-port data RAM at its default
// size (16384 words).  Port A (Wishbone) and port B (DMA) run random reads
// and writes at the same time against a word model in the testbench.  Port A
// must ack one cycle after the strobe with the read data; port B must grant
// every request at once and return read data one cycle later.  The two ports
// use disjoint address halves, so their order within a cycle does not matter.
// The memory has no reset, so a read is only compared once its word has been
// written.
module tb_data_ram;
  import risq_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n = 1'b0, b_gnt;
  wb_req_t     a_req = '0;
  wb_rsp_t     a_rsp;
  dma_req_t    b_req = '0;
  logic [31:0] b_rdata;
  data_ram dut (.clk(clk), .rst_n(rst_n), .a_req(a_req), .a_rsp(a_rsp), .b_req(b_req),
                .b_gnt(b_gnt), .b_rdata(b_rdata));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model [16384];
  logic        known [16384];
  initial for (int i = 0; i < 16384; i++) begin model[i] = '0; known[i] = 1'b0; end

  // port B: random requests, lower half of the memory
  logic        b_pend = 1'b0;
  logic [31:0] b_exp = '0;
  always @(posedge clk) begin
    logic [13:0] w;
    if (rst_n) begin
      checks++;
      if (b_pend && b_rdata !== b_exp) begin failures++; $display("port B read %h exp %h", b_rdata, b_exp); end
      if (b_req.req && !b_gnt) begin failures++; $display("port B not granted"); end
      b_pend <= b_req.req && !b_req.we && known[b_req.addr[15:2]];
      b_exp  <= model[b_req.addr[15:2]];
      if (b_req.req && b_req.we) begin
        model[b_req.addr[15:2]] = b_req.wdata;
        known[b_req.addr[15:2]] = 1'b1;
      end
      w = 14'($urandom % 8192);
      b_req <= '{req: ($urandom % 3) != 0, we: 1'($urandom), addr: {16'd0, w, 2'b00}, wdata: $urandom};
    end
  end

  initial begin
    logic [13:0] w;
    logic [31:0] v;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      w = 14'(8192 + $urandom % 8192);
      v = $urandom;
      if (n < 1000 || ($urandom % 2) != 0) begin
        a_req <= '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: {16'd0, w, 2'b00}, dat: v};
        model[w] = v;
        known[w] = 1'b1;
      end else
        a_req <= '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: {16'd0, w, 2'b00}, dat: '0};
      cyc = 0;
      do begin @(posedge clk); cyc++; end while (!a_rsp.ack);
      checks++;
      if (cyc != 2 || (!a_req.we && known[w] && a_rsp.dat !== model[w])) begin
        failures++; $display("port A %h: data %h exp %h after %0d edges", w, a_rsp.dat, model[w], cyc);
      end
      a_req <= '0;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
