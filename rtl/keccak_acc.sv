// keccak_acc: Keccak accelerator with the sponge construction in hardware.
// A control FSM runs absorb and squeeze around the masked permutation core
// (keccak_core, 96 cycles per permutation).  Data moves through one 50x32
// FIFO per share, so that DMA transfers of the next input block, or of the
// previous output block, overlap the permutation.  Each share has its own
// DMA port; share 0 is transferred first, then share 1, so the two ports are
// never active in the same cycle.
//   absorb:  IN_LEN words are read from SRC0 (and SRC1 when MASKED) and XORed,
//            RATE words per block, into the state; a permutation follows each
//            block.  The message must already be padded by software.
//   squeeze: OUT_LEN words of the state are written to DST0 (and DST1), RATE
//            words per block, with a permutation between blocks.
// In unmasked mode share 1 stays zero (the core gets no randomness, so the
// DOM terms never reach share 1) and only port 0 is used.  The DOM
// randomness comes from 25 64-bit LFSRs (1600 bits per round), seeded by
// SEED.
// MMIO registers (word offsets): 0 CTRL ([0] masked, [31] start), 1 STATUS
// ([0] busy, [1] done), 2 SRC0, 3 SRC1, 4 DST0, 5 DST1, 6 IN_LEN, 7 OUT_LEN,
// 8 RATE (words, 1..50), 9 SEED_LO, 10 SEED_HI (a write reloads the LFSRs).
// The sponge in hardware, the FIFO sizes and the per-share DMA follow the
// accelerator description; the register map, padding by software and the
// randomness source are this design's choices.
module keccak_acc
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
  logic        masked_q, busy_q, done_q;
  logic [31:0] src0_q, src1_q, dst0_q, dst1_q;
  logic [15:0] in_len_q, out_len_q;
  logic [5:0]  rate_q;
  logic [63:0] seed_q;
  logic        seed_ld, start;
  logic        wb_hit;
  logic [3:0]  wb_idx;

  assign wb_hit  = wb_req.cyc && wb_req.stb && !wb_rsp.ack;
  assign wb_idx  = wb_req.adr[5:2];
  assign start   = wb_hit && wb_req.we && wb_idx == 4'd0 && wb_req.dat[31] && !busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_rsp <= '0; masked_q <= 1'b0; src0_q <= '0; src1_q <= '0; dst0_q <= '0; dst1_q <= '0;
      in_len_q <= '0; out_len_q <= '0; rate_q <= 6'd42; seed_q <= '0; seed_ld <= 1'b0;
    end else begin
      wb_rsp.ack <= wb_hit;
      wb_rsp.dat <= '0;
      seed_ld    <= 1'b0;
      if (wb_hit && !wb_req.we) begin
        unique case (wb_idx)
          4'd0: wb_rsp.dat <= {31'd0, masked_q};
          4'd1: wb_rsp.dat <= {30'd0, done_q, busy_q};
          4'd2: wb_rsp.dat <= src0_q;
          4'd3: wb_rsp.dat <= src1_q;
          4'd4: wb_rsp.dat <= dst0_q;
          4'd5: wb_rsp.dat <= dst1_q;
          4'd6: wb_rsp.dat <= {16'd0, in_len_q};
          4'd7: wb_rsp.dat <= {16'd0, out_len_q};
          4'd8: wb_rsp.dat <= {26'd0, rate_q};
          default: ;
        endcase
      end
      if (wb_hit && wb_req.we && !busy_q) begin
        unique case (wb_idx)
          4'd0:  masked_q  <= wb_req.dat[0];
          4'd2:  src0_q    <= wb_req.dat;
          4'd3:  src1_q    <= wb_req.dat;
          4'd4:  dst0_q    <= wb_req.dat;
          4'd5:  dst1_q    <= wb_req.dat;
          4'd6:  in_len_q  <= wb_req.dat[15:0];
          4'd7:  out_len_q <= wb_req.dat[15:0];
          4'd8:  rate_q    <= (wb_req.dat[5:0] == 6'd0 || wb_req.dat[5:0] > 6'd50) ? 6'd50 : wb_req.dat[5:0];
          4'd9:  seed_q[31:0]  <= wb_req.dat;
          4'd10: begin seed_q[63:32] <= wb_req.dat; seed_ld <= 1'b1; end
          default: ;
        endcase
      end
    end
  end

  // ---------------- randomness ----------------
  logic [1599:0] rnd;
  logic          rnd_req;
  for (genvar g = 0; g < 25; g++) begin : g_lfsr
    lfsr64 #(.OUT_W(64)) u_lfsr (
      .clk(clk), .rst_n(rst_n), .load(seed_ld),
      .seed(seed_q ^ (64'(g + 1) * 64'h9E37_79B9_7F4A_7C15)),
      .en(rnd_req || seed_ld), .rnd(rnd[64*g +: 64]));
  end

  // ---------------- permutation core ----------------
  logic          core_start, core_busy, core_done;
  logic [1599:0] st0_q, st1_q, co0, co1;
  keccak_core u_core (
    .clk(clk), .rst_n(rst_n), .start(core_start), .state_i0(st0_q), .state_i1(st1_q),
    .rnd(masked_q ? rnd : 1600'd0), .busy(core_busy), .done(core_done), .rnd_req(rnd_req),
    .state_o0(co0), .state_o1(co1));

  // ---------------- FIFOs ----------------
  logic        f0_push, f1_push, f0_pop, f1_pop, f0_full, f1_full, f0_empty, f1_empty;
  logic [31:0] f0_wd, f1_wd, f0_rd, f1_rd;
  logic [5:0]  f0_cnt, f1_cnt;
  sync_fifo #(.DEPTH(50), .WIDTH(32)) u_fifo0 (
    .clk(clk), .rst_n(rst_n), .clear(start), .push(f0_push), .wdata(f0_wd), .pop(f0_pop),
    .rdata(f0_rd), .count(f0_cnt), .full(f0_full), .empty(f0_empty));
  sync_fifo #(.DEPTH(50), .WIDTH(32)) u_fifo1 (
    .clk(clk), .rst_n(rst_n), .clear(start), .push(f1_push), .wdata(f1_wd), .pop(f1_pop),
    .rdata(f1_rd), .count(f1_cnt), .full(f1_full), .empty(f1_empty));

  // ---------------- DMA ----------------
  logic        rs1, ws0, ws1;
  logic        e_rd_start [2];
  logic        e_rd_valid [2], e_rd_ready [2];
  logic        e_wr_valid [2], e_wr_ready [2];
  logic [31:0] e_rd_addr [2], e_wr_addr [2], e_rd_data [2], e_wr_data [2];
  logic [15:0] e_rd_len [2];
  dma_engine #(.FIFO_DEPTH(4)) u_dma0 (
    .clk(clk), .rst_n(rst_n), .rd_start(e_rd_start[0]), .rd_addr(e_rd_addr[0]), .rd_len(e_rd_len[0]),
    .rd_valid(e_rd_valid[0]), .rd_data(e_rd_data[0]), .rd_ready(e_rd_ready[0]),
    .wr_start(ws0), .wr_addr(e_wr_addr[0]), .wr_valid(e_wr_valid[0]),
    .wr_data(e_wr_data[0]), .wr_ready(e_wr_ready[0]), .dma_req(dma_req0), .dma_rsp(dma_rsp0));
  dma_engine #(.FIFO_DEPTH(4)) u_dma1 (
    .clk(clk), .rst_n(rst_n), .rd_start(rs1), .rd_addr(e_rd_addr[1]), .rd_len(e_rd_len[1]),
    .rd_valid(e_rd_valid[1]), .rd_data(e_rd_data[1]), .rd_ready(e_rd_ready[1]),
    .wr_start(ws1), .wr_addr(e_wr_addr[1]), .wr_valid(e_wr_valid[1]),
    .wr_data(e_wr_data[1]), .wr_ready(e_wr_ready[1]), .dma_req(dma_req1), .dma_rsp(dma_rsp1));

  // ---------------- fetcher (absorb input) ----------------
  typedef enum logic [1:0] { F_IDLE, F_S0, F_S1 } fst_e;
  fst_e        fst_q;
  logic [15:0] f_off_q;       // words fetched (per share) so far
  logic [15:0] f_cnt_q;       // words of the current block still to arrive
  logic [15:0] f_blk;
  logic        f_go;
  assign f_blk = ((in_len_q - f_off_q) < 16'(rate_q)) ? (in_len_q - f_off_q) : 16'(rate_q);

  // ---------------- drainer (squeeze output) ----------------
  typedef enum logic [1:0] { D_IDLE, D_S0, D_S1 } dst_e;
  dst_e        dst_q;
  logic [15:0] d_off_q, d_cnt_q, d_blk_q;

  // ---------------- main FSM ----------------
  typedef enum logic [2:0] { M_IDLE, M_ABS, M_PERM, M_SQ, M_SQPERM, M_WAIT } mst_e;
  mst_e        mst_q;
  logic [15:0] a_done_q;      // words absorbed
  logic [5:0]  w_q;           // word position in block
  logic [15:0] o_done_q;      // words pushed for output
  logic [15:0] blk_q;
  logic        abs_ok;

  assign abs_ok = !f0_empty && (!masked_q || !f1_empty);

  always_comb begin
    e_rd_start[0] = 1'b0; e_rd_start[1] = 1'b0;  // [1] unused: see rs1
    e_rd_addr[0]  = src0_q + {14'd0, f_off_q, 2'b00};
    e_rd_addr[1]  = src1_q + {14'd0, f_off_q, 2'b00};
    e_rd_len[0]   = f_blk;  e_rd_len[1] = f_blk;
    f_go          = (fst_q == F_IDLE) && busy_q && (f_off_q < in_len_q) &&
                    (mst_q == M_ABS || mst_q == M_PERM) && !(mst_q == M_IDLE);
    if (f_go) e_rd_start[0] = 1'b1;
    e_rd_ready[0] = (fst_q == F_S0) && !f0_full;
    e_rd_ready[1] = (fst_q == F_S1) && !f1_full;
    // squeeze pushes
    f0_push = e_rd_valid[0] && e_rd_ready[0];
    f1_push = e_rd_valid[1] && e_rd_ready[1];
    f0_wd   = e_rd_data[0];
    f1_wd   = e_rd_data[1];
    if (mst_q == M_SQ) begin
      f0_push = 1'b1; f0_wd = st0_q[32*w_q +: 32];
      f1_push = masked_q; f1_wd = st1_q[32*w_q +: 32];
    end
  end

  // drainer requests
  always_comb begin
    e_wr_addr[0]  = dst0_q + {14'd0, d_off_q, 2'b00};
    e_wr_addr[1]  = dst1_q + {14'd0, d_off_q, 2'b00};
    e_wr_valid[0] = (dst_q == D_S0) && !f0_empty;
    e_wr_valid[1] = (dst_q == D_S1) && !f1_empty;
    e_wr_data[0]  = f0_rd;
    e_wr_data[1]  = f1_rd;
  end

  // second-share transfers start when the first share's block is complete
  assign rs1 = (fst_q == F_S0) && f0_push && (f_cnt_q == 16'd1) && masked_q;
  assign ws0 = (mst_q == M_SQ) && (16'(w_q) + 16'd1 == blk_q);
  assign ws1 = (dst_q == D_S0) && e_wr_valid[0] && e_wr_ready[0] && (d_cnt_q == 16'd1) && masked_q;

  // absorb and drain pops
  assign f0_pop = (mst_q == M_ABS && abs_ok) || (e_wr_valid[0] && e_wr_ready[0]);
  assign f1_pop = (mst_q == M_ABS && abs_ok && masked_q) || (e_wr_valid[1] && e_wr_ready[1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fst_q <= F_IDLE; f_off_q <= '0; f_cnt_q <= '0;
      dst_q <= D_IDLE; d_off_q <= '0; d_cnt_q <= '0; d_blk_q <= '0;
      mst_q <= M_IDLE; a_done_q <= '0; w_q <= '0; o_done_q <= '0; blk_q <= '0;
      busy_q <= 1'b0; done_q <= 1'b0; core_start <= 1'b0;
      st0_q <= '0; st1_q <= '0;
    end else begin
      core_start <= 1'b0;
      // fetcher
      unique case (fst_q)
        F_IDLE: if (f_go) begin fst_q <= F_S0; f_cnt_q <= f_blk; end
        F_S0: if (f0_push) begin
          f_cnt_q <= f_cnt_q - 16'd1;
          if (f_cnt_q == 16'd1) begin
            if (masked_q) begin fst_q <= F_S1; f_cnt_q <= f_blk; end
            else begin fst_q <= F_IDLE; f_off_q <= f_off_q + f_blk; end
          end
        end
        F_S1: if (f1_push) begin
          f_cnt_q <= f_cnt_q - 16'd1;
          if (f_cnt_q == 16'd1) begin fst_q <= F_IDLE; f_off_q <= f_off_q + f_blk; end
        end
        default: fst_q <= F_IDLE;
      endcase
      // drainer
      unique case (dst_q)
        D_S0: if (e_wr_valid[0] && e_wr_ready[0]) begin
          d_cnt_q <= d_cnt_q - 16'd1;
          if (d_cnt_q == 16'd1) begin
            if (masked_q) begin dst_q <= D_S1; d_cnt_q <= d_blk_q; end
            else begin dst_q <= D_IDLE; d_off_q <= d_off_q + d_blk_q; end
          end
        end
        D_S1: if (e_wr_valid[1] && e_wr_ready[1]) begin
          d_cnt_q <= d_cnt_q - 16'd1;
          if (d_cnt_q == 16'd1) begin dst_q <= D_IDLE; d_off_q <= d_off_q + d_blk_q; end
        end
        default: ;
      endcase
      // main
      unique case (mst_q)
        M_IDLE: if (start) begin
          busy_q <= 1'b1; done_q <= 1'b0; st0_q <= '0; st1_q <= '0;
          a_done_q <= '0; o_done_q <= '0; w_q <= '0; f_off_q <= '0; d_off_q <= '0;
          mst_q <= (in_len_q == 16'd0) ? M_SQ : M_ABS;
          blk_q <= (in_len_q < 16'(rate_q)) ? in_len_q : 16'(rate_q);
          if (in_len_q == 16'd0) blk_q <= (out_len_q < 16'(rate_q)) ? out_len_q : 16'(rate_q);
        end
        M_ABS: if (abs_ok) begin
          st0_q[32*w_q +: 32] <= st0_q[32*w_q +: 32] ^ f0_rd;
          if (masked_q) st1_q[32*w_q +: 32] <= st1_q[32*w_q +: 32] ^ f1_rd;
          a_done_q <= a_done_q + 16'd1;
          if (16'(w_q) + 16'd1 == blk_q) begin
            w_q <= '0; mst_q <= M_PERM; core_start <= 1'b1;
          end else w_q <= w_q + 6'd1;
        end
        M_PERM: if (core_done) begin
          st0_q <= co0; st1_q <= co1;
          if (a_done_q < in_len_q) begin
            mst_q <= M_ABS;
            blk_q <= ((in_len_q - a_done_q) < 16'(rate_q)) ? (in_len_q - a_done_q) : 16'(rate_q);
          end else begin
            mst_q <= M_WAIT;
            blk_q <= (out_len_q < 16'(rate_q)) ? out_len_q : 16'(rate_q);
          end
        end
        M_WAIT: if (dst_q == D_IDLE && f0_empty && f1_empty) begin
          if (o_done_q >= out_len_q) begin mst_q <= M_IDLE; busy_q <= 1'b0; done_q <= 1'b1; end
          else mst_q <= M_SQ;
        end
        M_SQ: begin
          o_done_q <= o_done_q + 16'd1;
          if (16'(w_q) + 16'd1 == blk_q) begin
            w_q <= '0;
            dst_q <= D_S0; d_cnt_q <= blk_q; d_blk_q <= blk_q;
            if (o_done_q + 16'd1 < out_len_q) begin
              mst_q <= M_SQPERM; core_start <= 1'b1;
            end else mst_q <= M_WAIT;
          end else w_q <= w_q + 6'd1;
        end
        M_SQPERM: if (core_done) begin
          st0_q <= co0; st1_q <= co1;
          blk_q <= ((out_len_q - o_done_q) < 16'(rate_q)) ? (out_len_q - o_done_q) : 16'(rate_q);
          mst_q <= M_WAIT;
        end
        default: mst_q <= M_IDLE;
      endcase
    end
  end

  assign irq_done = done_q;

  logic unused;
  assign unused = ^{core_busy, f0_cnt, f1_cnt, wb_req.adr[31:6], wb_req.adr[1:0]};
endmodule
