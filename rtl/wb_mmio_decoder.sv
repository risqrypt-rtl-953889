// wb_mmio_decoder: memory-mapped I/O interconnect between the processor's
// data bus (one Wishbone master) and the slaves: data RAM, NTT-Lite, Keccak,
// X2X and an external port for other peripherals.  The request is steered to
// the slave selected by the address; the response of the selected slave is
// returned.  Address map (this design's choice):
//   0x0000_0000 + DMEM_BYTES  data RAM          (slave 0)
//   0x1000_0000 .. 0x1000_00FF NTT-Lite        (slave 1)
//   0x1000_0100 .. 0x1000_01FF Keccak          (slave 2)
//   0x1000_0200 .. 0x1000_02FF X2X             (slave 3)
//   anything else              other peripherals (slave 4)
// Combinational; the slave's ack ends the cycle.
module wb_mmio_decoder
  import risq_pkg::*;
#(
  parameter int unsigned DMEM_BYTES = 65536
) (
  input  wb_req_t m_req,
  output wb_rsp_t m_rsp,
  output wb_req_t s_req [5],
  input  wb_rsp_t s_rsp [5]
);
  logic [2:0] sel;
  always_comb begin
    if (m_req.adr < DMEM_BYTES)                       sel = 3'd0;
    else if (m_req.adr[31:10] == 22'h04_0000) begin
      unique case (m_req.adr[9:8])
        2'd0:    sel = 3'd1;
        2'd1:    sel = 3'd2;
        2'd2:    sel = 3'd3;
        default: sel = 3'd4;
      endcase
    end else                                          sel = 3'd4;
    for (int i = 0; i < 5; i++) begin
      s_req[i]     = m_req;
      s_req[i].cyc = m_req.cyc && (sel == 3'(i));
      s_req[i].stb = m_req.stb && (sel == 3'(i));
    end
    m_rsp = s_rsp[sel];
  end
endmodule
