// tb_dma_arbiter: self-checking test of the round-robin DMA arbiter with its
// five masters and a memory model as slave (read data one cycle after the
// grant).  Each master issues random reads and writes to its own region,
// holding a request until it is granted.  Checked: at most one grant per
// cycle, a grant only to a requester, the request forwarded to the slave
// unchanged, read data returned to the right master with rvalid, and
// fairness (no master waits longer than N-1 cycles while requesting).
module tb_dma_arbiter;
  import risq_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     rst_n = 1'b0;
  dma_req_t m_req [5];
  dma_rsp_t m_rsp [5];
  dma_req_t s_req;
  logic [31:0] s_rdata = '0;
  dma_arbiter #(.N(5)) dut (.clk(clk), .rst_n(rst_n), .m_req(m_req), .m_rsp(m_rsp),
                            .s_req(s_req), .s_rdata(s_rdata));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] mem [512];
  initial for (int i = 0; i < 512; i++) mem[i] = 32'(i) * 32'h01010101;
  always @(posedge clk) begin
    s_rdata <= mem[s_req.addr[10:2]];
    if (s_req.req && s_req.we) mem[s_req.addr[10:2]] <= s_req.wdata;
  end

  int wait_c [5];
  logic [31:0] exp_rd [5];
  logic        pend_rd [5];
  initial for (int i = 0; i < 5; i++) begin
    m_req[i] = '0; wait_c[i] = 0; pend_rd[i] = 1'b0; exp_rd[i] = '0;
  end

  always @(posedge clk) begin
    int g;
    if (rst_n) begin
      g = 0;
      for (int i = 0; i < 5; i++) begin
        // rvalid / data of last cycle's read
        checks++;
        if (m_rsp[i].rvalid !== pend_rd[i] || (pend_rd[i] && m_rsp[i].rdata !== exp_rd[i])) begin
          failures++; $display("master %0d: rvalid %0d data %h exp %0d %h", i, m_rsp[i].rvalid, m_rsp[i].rdata, pend_rd[i], exp_rd[i]);
        end
        pend_rd[i] = 1'b0;
        if (m_rsp[i].gnt) begin
          g++;
          checks++;
          if (!m_req[i].req || s_req !== m_req[i]) begin failures++; $display("bad grant to %0d", i); end
          if (!m_req[i].we) begin pend_rd[i] = 1'b1; exp_rd[i] = mem[m_req[i].addr[10:2]]; end
          wait_c[i] = 0;
        end else if (m_req[i].req) begin
          wait_c[i]++;
          checks++;
          if (wait_c[i] > 4) begin failures++; $display("master %0d starved", i); end
        end
      end
      checks++;
      if (g > 1) begin failures++; $display("%0d grants in one cycle", g); end
      // new requests
      for (int i = 0; i < 5; i++)
        if (!m_req[i].req || m_rsp[i].gnt) begin
          m_req[i].req   <= ($urandom % 3) != 0;
          m_req[i].we    <= 1'($urandom);
          m_req[i].addr  <= {21'd0, 3'(i), 6'($urandom), 2'b00};
          m_req[i].wdata <= $urandom;
        end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
