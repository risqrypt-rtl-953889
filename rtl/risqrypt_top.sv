// risqrypt_top: hardware side of the post-quantum co-design system.
// A 32-bit processor (outside this module) drives an MMIO data bus and
// fetches from the instruction RAM.  The MMIO decoder connects its data bus
// to the data RAM, the three cryptographic accelerators and an external port
// for other peripherals.  The accelerators move their operands through a
// shared DMA interface into the second port of the data RAM: NTT-Lite
// (polynomial arithmetic) with one DMA master, Keccak and X2X (masked
// hashing and mask conversion) with one DMA master per share.  A round-robin
// arbiter serialises the five masters.
// Ports: clk, rst_n (active low, asynchronous); cpu_d_req/cpu_d_rsp the
// processor's Wishbone data bus; cpu_i_* the processor's instruction fetch
// port; imem_load_* a program-loading port; per_req/per_rsp the bus to other
// peripherals; irq_done[2:0] the done flags of NTT-Lite, Keccak and X2X.
// The system structure follows the published architecture; the
// address map (see wb_mmio_decoder) and memory sizes are this design's
// choices.
module risqrypt_top
  import risq_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 16384,
  parameter int unsigned IMEM_WORDS = 16384
) (
  input  logic        clk,
  input  logic        rst_n,
  input  wb_req_t     cpu_d_req,
  output wb_rsp_t     cpu_d_rsp,
  input  logic        cpu_i_en,
  input  logic [31:0] cpu_i_addr,
  output logic [31:0] cpu_i_data,
  input  logic        imem_load_we,
  input  logic [31:0] imem_load_addr,
  input  logic [31:0] imem_load_data,
  output wb_req_t     per_req,
  input  wb_rsp_t     per_rsp,
  output logic [2:0]  irq_done
);
  wb_req_t  s_req [5];
  wb_rsp_t  s_rsp [5];
  dma_req_t m_req [5];
  dma_rsp_t m_rsp [5];
  dma_req_t ram_req;
  logic     ram_gnt;
  logic [31:0] ram_rdata;

  wb_mmio_decoder #(.DMEM_BYTES(DMEM_WORDS * 4)) u_mmio (
    .m_req(cpu_d_req), .m_rsp(cpu_d_rsp), .s_req(s_req), .s_rsp(s_rsp));

  data_ram #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .rst_n(rst_n), .a_req(s_req[0]), .a_rsp(s_rsp[0]),
    .b_req(ram_req), .b_gnt(ram_gnt), .b_rdata(ram_rdata));

  instr_ram #(.WORDS(IMEM_WORDS)) u_imem (
    .clk(clk), .fetch_en(cpu_i_en), .fetch_addr(cpu_i_addr), .fetch_data(cpu_i_data),
    .load_we(imem_load_we), .load_addr(imem_load_addr), .load_data(imem_load_data));

  ntt_lite u_ntt (
    .clk(clk), .rst_n(rst_n), .wb_req(s_req[1]), .wb_rsp(s_rsp[1]),
    .dma_req(m_req[0]), .dma_rsp(m_rsp[0]), .irq_done(irq_done[0]));

  keccak_acc u_keccak (
    .clk(clk), .rst_n(rst_n), .wb_req(s_req[2]), .wb_rsp(s_rsp[2]),
    .dma_req0(m_req[1]), .dma_rsp0(m_rsp[1]), .dma_req1(m_req[2]), .dma_rsp1(m_rsp[2]),
    .irq_done(irq_done[1]));

  x2x_acc u_x2x (
    .clk(clk), .rst_n(rst_n), .wb_req(s_req[3]), .wb_rsp(s_rsp[3]),
    .dma_req0(m_req[3]), .dma_rsp0(m_rsp[3]), .dma_req1(m_req[4]), .dma_rsp1(m_rsp[4]),
    .irq_done(irq_done[2]));

  assign per_req  = s_req[4];
  assign s_rsp[4] = per_rsp;

  dma_arbiter #(.N(5)) u_arb (
    .clk(clk), .rst_n(rst_n), .m_req(m_req), .m_rsp(m_rsp), .s_req(ram_req), .s_rdata(ram_rdata));

  logic unused;
  assign unused = ram_gnt;
endmodule
