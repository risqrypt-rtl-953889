// tb_wb_mmio_decoder: self-checking test of the MMIO address decoder.
// Five slave models (data RAM, NTT-Lite, Keccak, X2X, external port) answer
// with their own tag.  Random addresses inside and outside the mapped ranges
// are accessed; the strobe must reach exactly the slave the address map
// names, and the response must come from that slave.
module tb_wb_mmio_decoder;
  import risq_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  wb_req_t m_req = '0;
  wb_rsp_t m_rsp;
  wb_req_t s_req [5];
  wb_rsp_t s_rsp [5];
  wb_mmio_decoder #(.DMEM_BYTES(65536)) dut (.m_req(m_req), .m_rsp(m_rsp), .s_req(s_req), .s_rsp(s_rsp));

  // combinational slave models: ack while strobed, data = tag ^ address
  always_comb
    for (int i = 0; i < 5; i++) begin
      s_rsp[i].ack = s_req[i].cyc && s_req[i].stb;
      s_rsp[i].dat = 32'(i + 1) << 28 ^ s_req[i].adr;
    end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int target(logic [31:0] a);
    if (a < 32'd65536) return 0;
    if (a[31:8] == 24'h100000) return 1;
    if (a[31:8] == 24'h100001) return 2;
    if (a[31:8] == 24'h100002) return 3;
    return 4;
  endfunction

  initial begin
    logic [31:0] a;
    int t, hits;
    for (int n = 0; n < 2000; n++) begin
      unique case (n % 5)
        0: a = $urandom % 65536;
        1: a = 32'h1000_0000 + ($urandom % 256);
        2: a = 32'h1000_0100 + ($urandom % 256);
        3: a = 32'h1000_0200 + ($urandom % 256);
        default: a = (n % 2) ? $urandom : 32'h1000_0300 + ($urandom % 4096);
      endcase
      a[1:0] = 2'b00;
      m_req <= '{cyc: 1'b1, stb: 1'b1, we: 1'(n % 2), adr: a, dat: 32'(n)};
      @(posedge clk);
      #1;
      t = target(a);
      hits = 0;
      for (int i = 0; i < 5; i++) if (s_req[i].cyc && s_req[i].stb) hits++;
      checks++;
      if (hits != 1 || !(s_req[t].cyc && s_req[t].stb) || s_req[t].we !== 1'(n % 2) || s_req[t].dat !== 32'(n)) begin
        failures++; $display("address %h: wrong slave strobed", a);
      end
      checks++;
      if (!m_rsp.ack || m_rsp.dat !== ((32'(t + 1) << 28) ^ a)) begin
        failures++; $display("address %h: response %h", a, m_rsp.dat);
      end
    end
    m_req <= '0;
    @(posedge clk);
    #1;
    checks++;
    for (int i = 0; i < 5; i++) if (s_req[i].stb && s_req[i].cyc) begin failures++; break; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
