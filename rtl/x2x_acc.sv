// x2x_acc: mask conversion accelerator (X2X).
// Around the 13-stage converter (x2x_core) sit a PRNG (x2x_prng), a mask
// refreshing unit (x2x_mru, cascadable in front of the converter), two 16x32
// register files (one per share) and a control FSM.  Each share has its own
// DMA port, and the two ports are used one after the other.
// A command (CTRL write with bit 31) runs:
//   LD0  read LEN words of share 0 from SRC0 into register file 0
//        (1 word in 1-bit mode; not for OP_PRNG)
//   LD1  read share 1 from SRC1 into register file 1 (OP_X2X/REF/REFX2X)
//   PROC one element per cycle:
//        OP_PRNG    LEN random numbers: in [0,q) (prime) or [0,2^k); with
//                   the non-zero flag, zero is drawn again (Z_q*, Z_2^k*)
//        OP_MASK    initial masking of plain values (arithmetic or Boolean)
//        OP_REF     refresh of shares
//        OP_X2X     A2B or B2A conversion
//        OP_REFX2X  refresh followed by conversion (one cycle more latency)
//        1-bit mode (B2A_BIT): bit j*STRIDE of the single input word pair is
//        converted, j = 0..LEN-1 (B2A of one bit)
//        A prime-modulus element waits while the PRNG has no valid number
//        below q; such cycles are counted in STATUS[31:16].
//   WR0/WR1 write register file 0 to DST0 and register file 1 to DST1
//        (OP_PRNG writes only DST0).
// MMIO registers (word offsets): 0 CTRL ([2:0] op, [4:3] mode, [5] dual,
// [6] prime, [7] arithmetic domain for REF/MASK, [8] non-zero PRNG output,
// [31] start), 1 STATUS
// ([0] busy, [1] done, [31:16] stall cycles), 2 SRC0, 3 SRC1, 4 DST0,
// 5 DST1, 6 LEN (1..16), 7 Q, 8 K, 9 STRIDE, 10 SEED_LO, 11 SEED_HI (a
// write reloads the PRNG).
// Opcode set, units, register files, cascading and 1-bit mode follow the
// accelerator description; the register map and the load-then-process
// ordering are this design's choices.
module x2x_acc
  import risq_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  wb_req_t  wb_req,
  output wb_rsp_t  wb_rsp,
  output dma_req_t dma_req0,
  input  dma_rsp_t dma_rsp0,
  output dma_req_t dma_req1,
  input  dma_rsp_t dma_rsp1,
  output logic     irq_done
);
  // ---------------- registers ----------------
  x2x_op_e     op_q;
  x2x_mode_e   mode_q;
  logic        dual_q, prime_q, arith_q, nz_q, busy_q, done_q;
  logic [31:0] src0_q, src1_q, dst0_q, dst1_q, q_q;
  logic [4:0]  len_q;
  logic [5:0]  k_q, stride_q;
  logic [63:0] seed_q;
  logic        seed_ld, start, start_q, wb_hit;
  logic [3:0]  wb_idx;
  logic [15:0] stall_q;

  assign wb_hit = wb_req.cyc && wb_req.stb && !wb_rsp.ack;
  assign wb_idx = wb_req.adr[5:2];
  assign start  = wb_hit && wb_req.we && wb_idx == 4'd0 && wb_req.dat[31] && !busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_rsp <= '0; op_q <= XOP_PRNG; mode_q <= XM_A2B; dual_q <= 1'b0; prime_q <= 1'b0;
      arith_q <= 1'b0; nz_q <= 1'b0; src0_q <= '0; src1_q <= '0; dst0_q <= '0; dst1_q <= '0;
      q_q <= 32'd3329; len_q <= 5'd16; k_q <= 6'd32; stride_q <= 6'd1; seed_q <= '0;
      seed_ld <= 1'b0;
    end else begin
      wb_rsp.ack <= wb_hit;
      wb_rsp.dat <= '0;
      seed_ld    <= 1'b0;
      if (wb_hit && !wb_req.we) begin
        unique case (wb_idx)
          4'd0: wb_rsp.dat <= {23'd0, nz_q, arith_q, prime_q, dual_q, mode_q, op_q};
          4'd1: wb_rsp.dat <= {stall_q, 14'd0, done_q, busy_q};
          4'd2: wb_rsp.dat <= src0_q;
          4'd3: wb_rsp.dat <= src1_q;
          4'd4: wb_rsp.dat <= dst0_q;
          4'd5: wb_rsp.dat <= dst1_q;
          4'd6: wb_rsp.dat <= {27'd0, len_q};
          4'd7: wb_rsp.dat <= q_q;
          4'd8: wb_rsp.dat <= {26'd0, k_q};
          4'd9: wb_rsp.dat <= {26'd0, stride_q};
          default: ;
        endcase
      end
      if (wb_hit && wb_req.we && !busy_q) begin
        unique case (wb_idx)
          4'd0: begin
            op_q <= x2x_op_e'(wb_req.dat[2:0]); mode_q <= x2x_mode_e'(wb_req.dat[4:3]);
            dual_q <= wb_req.dat[5]; prime_q <= wb_req.dat[6]; arith_q <= wb_req.dat[7];
            nz_q <= wb_req.dat[8];
          end
          4'd2:  src0_q <= wb_req.dat;
          4'd3:  src1_q <= wb_req.dat;
          4'd4:  dst0_q <= wb_req.dat;
          4'd5:  dst1_q <= wb_req.dat;
          4'd6:  len_q  <= (wb_req.dat[4:0] == 5'd0 || wb_req.dat[4:0] > 5'd16) ? 5'd16 : wb_req.dat[4:0];
          4'd7:  q_q    <= wb_req.dat;
          4'd8:  k_q    <= (wb_req.dat[5:0] == 6'd0 || wb_req.dat[5:0] > 6'd32) ? 6'd32 : wb_req.dat[5:0];
          4'd9:  stride_q <= wb_req.dat[5:0];
          4'd10: seed_q[31:0] <= wb_req.dat;
          4'd11: begin seed_q[63:32] <= wb_req.dat; seed_ld <= 1'b1; end
          default: ;
        endcase
      end
    end
  end

  // ---------------- PRNG ----------------
  logic [447:0] r16;
  logic [287:0] r32;
  logic [63:0]  zq;
  logic [1:0]   zq_v;
  logic [5:0]   kq;         // ceil(log2 q)
  always_comb begin
    kq = 6'd1;
    for (int b = 0; b < 32; b++) if ((q_q - 32'd1) >> b != 32'd0) kq = 6'(b + 1);
  end
  x2x_prng u_prng (
    .clk(clk), .rst_n(rst_n), .load(seed_ld), .seed(seed_q), .en(busy_q || seed_ld),
    .q(q_q), .kbits(kq), .r16(r16), .r32(r32), .zq(zq), .zq_valid(zq_v));

  // ---------------- register files ----------------
  logic [31:0] rf0 [16];
  logic [31:0] rf1 [16];
  logic [31:0] bw0, bw1;    // 1-bit mode input word pair (kept apart from the write-back)

  // ---------------- DMA ----------------
  logic        rs0, rs1, ws0, ws1, rv0, rv1, wr0_ready, wr1_ready, wv0, wv1;
  logic [31:0] rd0, rd1;
  logic [15:0] ld_len;
  logic [4:0]  idx_q;
  dma_engine #(.FIFO_DEPTH(4)) u_dma0 (
    .clk(clk), .rst_n(rst_n), .rd_start(rs0), .rd_addr(src0_q), .rd_len(ld_len),
    .rd_valid(rv0), .rd_data(rd0), .rd_ready(1'b1),
    .wr_start(ws0), .wr_addr(dst0_q), .wr_valid(wv0), .wr_data(rf0[idx_q[3:0]]),
    .wr_ready(wr0_ready), .dma_req(dma_req0), .dma_rsp(dma_rsp0));
  dma_engine #(.FIFO_DEPTH(4)) u_dma1 (
    .clk(clk), .rst_n(rst_n), .rd_start(rs1), .rd_addr(src1_q), .rd_len(ld_len),
    .rd_valid(rv1), .rd_data(rd1), .rd_ready(1'b1),
    .wr_start(ws1), .wr_addr(dst1_q), .wr_valid(wv1), .wr_data(rf1[idx_q[3:0]]),
    .wr_ready(wr1_ready), .dma_req(dma_req1), .dma_rsp(dma_rsp1));

  // ---------------- FSM ----------------
  typedef enum logic [2:0] { P_IDLE, P_LD0, P_LD1, P_PROC, P_DRAIN, P_WR0, P_WR1 } ph_e;
  ph_e        ph_q;
  logic       first_q;
  logic [4:0] infl_q;
  logic       bitmode, two_share, use_core, use_mru, b2a;

  assign bitmode   = (mode_q == XM_B2A_BIT);
  assign two_share = (op_q == XOP_X2X) || (op_q == XOP_REF) || (op_q == XOP_REFX2X);
  assign use_core  = (op_q == XOP_X2X) || (op_q == XOP_REFX2X);
  assign use_mru   = (op_q == XOP_REF) || (op_q == XOP_MASK) || (op_q == XOP_REFX2X);
  assign b2a       = (mode_q != XM_A2B);
  assign ld_len    = bitmode ? 16'd1 : 16'(len_q);

  assign rs0 = (ph_q == P_LD0) && first_q;
  assign rs1 = (ph_q == P_LD1) && first_q;
  assign ws0 = (ph_q == P_WR0) && first_q;
  assign ws1 = (ph_q == P_WR1) && first_q;
  assign wv0 = (ph_q == P_WR0) && !first_q;
  assign wv1 = (ph_q == P_WR1) && !first_q;

  // processing issue
  logic        rnd_ok, iss;
  logic [31:0] kmask, e0, e1, prn;
  logic [5:0]  bitpos;
  always_comb begin
    kmask  = (k_q >= 6'd32) ? 32'hFFFF_FFFF : ((32'd1 << k_q) - 32'd1);
    prn    = prime_q ? zq[31:0] : (r32[31:0] & kmask);
    rnd_ok = (!prime_q || (zq_v == 2'b11)) && !(op_q == XOP_PRNG && nz_q && prn == '0);
    iss    = (ph_q == P_PROC) && (idx_q < len_q) && rnd_ok;
    bitpos = 6'(idx_q * stride_q);
    if (bitmode) begin
      e0 = {31'd0, bw0[bitpos[4:0]]};
      e1 = {31'd0, bw1[bitpos[4:0]]};
    end else begin
      e0 = rf0[idx_q[3:0]];
      e1 = rf1[idx_q[3:0]];
    end
  end

  // MRU then core
  logic        mru_v, core_v, core_in_v;
  logic [3:0]  mru_tag, core_tag, core_in_tag;
  logic [31:0] mru_o0, mru_o1, core_o0, core_o1, core_s0, core_s1;
  logic [31:0] rho_d, gam_d;

  x2x_mru u_mru (
    .clk(clk), .rst_n(rst_n), .in_valid(iss && use_mru), .in_tag(idx_q[3:0]),
    .arith((op_q == XOP_REFX2X) ? !b2a : arith_q), .mask(op_q == XOP_MASK),
    .prime(prime_q), .dual(dual_q), .q(q_q), .k(bitmode ? 6'd1 : k_q),
    .s0(e0), .s1(e1), .r(prime_q ? zq[63:32] : r32[31:0]),
    .out_valid(mru_v), .out_tag(mru_tag), .o0(mru_o0), .o1(mru_o1));

  always_ff @(posedge clk) begin
    rho_d <= zq[31:0];
    gam_d <= r32[63:32];
  end

  always_comb begin
    if (op_q == XOP_REFX2X) begin
      core_in_v = mru_v; core_in_tag = mru_tag; core_s0 = mru_o0; core_s1 = mru_o1;
    end else begin
      core_in_v = iss && (op_q == XOP_X2X); core_in_tag = idx_q[3:0]; core_s0 = e0; core_s1 = e1;
    end
  end

  x2x_core u_core (
    .clk(clk), .rst_n(rst_n), .in_valid(core_in_v), .in_tag(core_in_tag), .b2a(b2a),
    .prime(prime_q), .dual(dual_q && !prime_q), .q(q_q), .k(k_q),
    .s0(core_s0), .s1(core_s1),
    .gamma((op_q == XOP_REFX2X) ? gam_d : r32[63:32]),
    .rho((op_q == XOP_REFX2X) ? rho_d : zq[31:0]),
    .out_valid(core_v), .out_tag(core_tag), .o0(core_o0), .o1(core_o1));

  logic res_v;
  assign res_v = use_core ? core_v : mru_v;

  always_ff @(posedge clk) begin
    if ((ph_q == P_LD0) && rv0) rf0[idx_q[3:0]] <= rd0;
    if ((ph_q == P_LD1) && rv1) rf1[idx_q[3:0]] <= rd1;
    if ((ph_q == P_LD0) && rv0) bw0 <= rd0;
    if ((ph_q == P_LD1) && rv1) bw1 <= rd1;
    if (iss && op_q == XOP_PRNG) rf0[idx_q[3:0]] <= prn;
    if (use_core && core_v) begin rf0[core_tag] <= core_o0; rf1[core_tag] <= core_o1; end
    if (!use_core && mru_v) begin rf0[mru_tag] <= mru_o0; rf1[mru_tag] <= mru_o1; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q <= P_IDLE; first_q <= 1'b0; idx_q <= '0; infl_q <= '0;
      busy_q <= 1'b0; done_q <= 1'b0; stall_q <= '0; start_q <= 1'b0;
    end else begin
      first_q <= 1'b0;
      start_q <= start;       // act once the CTRL fields written with start are in place
      infl_q  <= infl_q + 5'(iss && op_q != XOP_PRNG) - 5'(res_v);
      if ((ph_q == P_PROC) && (idx_q < len_q) && !rnd_ok) stall_q <= stall_q + 16'd1;
      unique case (ph_q)
        P_IDLE: if (start_q) begin
          busy_q <= 1'b1; done_q <= 1'b0; stall_q <= '0; idx_q <= '0; first_q <= 1'b1;
          ph_q <= (op_q == XOP_PRNG) ? P_PROC : P_LD0;
        end
        P_LD0: if (rv0) begin
          idx_q <= idx_q + 5'd1;
          if (16'(idx_q) + 16'd1 == ld_len) begin
            idx_q <= '0; first_q <= 1'b1;
            ph_q <= two_share ? P_LD1 : P_PROC;
          end
        end
        P_LD1: if (rv1) begin
          idx_q <= idx_q + 5'd1;
          if (16'(idx_q) + 16'd1 == ld_len) begin idx_q <= '0; ph_q <= P_PROC; end
        end
        P_PROC: begin
          if (iss) idx_q <= idx_q + 5'd1;
          if (idx_q == len_q) ph_q <= P_DRAIN;
        end
        P_DRAIN: if (infl_q == '0) begin ph_q <= P_WR0; idx_q <= '0; first_q <= 1'b1; end
        P_WR0: if (wv0 && wr0_ready) begin
          idx_q <= idx_q + 5'd1;
          if (idx_q + 5'd1 == len_q) begin
            idx_q <= '0;
            if (op_q == XOP_PRNG) begin ph_q <= P_IDLE; busy_q <= 1'b0; done_q <= 1'b1; end
            else begin ph_q <= P_WR1; first_q <= 1'b1; end
          end
        end
        P_WR1: if (wv1 && wr1_ready) begin
          idx_q <= idx_q + 5'd1;
          if (idx_q + 5'd1 == len_q) begin ph_q <= P_IDLE; busy_q <= 1'b0; done_q <= 1'b1; end
        end
        default: ph_q <= P_IDLE;
      endcase
    end
  end

  assign irq_done = done_q;

  logic unused;
  assign unused = ^{r16, r32[287:64], wb_req.adr[31:6], wb_req.adr[1:0], bitpos[5]};
endmodule
