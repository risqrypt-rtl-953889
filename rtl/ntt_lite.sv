// ntt_lite: run-time configurable polynomial arithmetic accelerator.
// Holds two 128x32 RAM banks (together RAM_0, 256 words) and one 256x32 RAM
// (RAM_1), a butterfly unit (BU), an encode unit (EU) and a sampling unit
// (SU), sequenced by an FSM that generates all addresses.  RAM_0 word a lives
// in bank (XOR of the bits of a) at row a>>1, so the two words of any radix-2
// butterfly, and words i and i+n', sit in different banks and are read in
// the same cycle.
//
// One command (write of CTRL with bit 31 set) runs these phases in order:
//   LD1   load IN_LEN words from SRC into RAM_1 (twiddles, right operands)
//   LD0   load IN_LEN words from SRC into RAM_0
//   MAIN  the operation (Table of opcodes in risq_pkg::ntt_op_e):
//         NTT/INTT   in place on RAM_0, twiddle k read from RAM_1[k]
//         element-wise ops on i = 0..n'-1: A = RAM_0[i], or the input word
//                    itself when FWD is set (forwarding, no RAM_0 load);
//                    B = RAM_1[i], the constant BETA (BCONST) or the
//                    input word (FWDB, not with MAC/USE_HINT);
//                    MAC/USE_HINT take C from the input stream;
//                    result to RAM_0[i] (DECOMPOSE: r0 also to RAM_1[i]);
//                    poly-mode PWM and MAC take two passes (T kept in
//                    RAM_0[n'+i], zeta_i read from RAM_1[n'+i]; the MAC
//                    addend is taken in the first pass)
//         ENCODE     RAM_0 -> EU -> RAM_0 (packed words)
//         DECODE/CBD/REJ_SAMP  RAM_1 (IN_LEN words) -> EU (-> SU) -> RAM_0
//         CHK_NORM   stops at the first failing coefficient (STATUS.fail)
//   OUT   stream RAM_0[0..len) to DST (len = n', or the produced word count
//         for ENCODE/REJ_SAMP, or 1 for SUM)
//   CLR   zero the memories; overlapped with OUT when both are set
// Opcode NOP runs only the transfer phases that are flagged.
// Source words are read from SRC consecutively across all phases of one
// command, so a command can chain load, forwarded operand and stream
// operand.  Without LD/OUT the data stays in the RAMs for chained commands.
//
// MMIO registers (word offsets): 0 CTRL, 1 STATUS, 2 LOGN, 3 PARAM (d[5:0],
// eta[11:8]), 4 SRC, 5 DST, 6 IN_LEN, 8 Q, 9 DELTA_LO, 10 DELTA_HI, 11 BETA,
// 12 INV2.  CTRL: [4:0] opcode, [6:5] word mode, [7] LD1, [8] LD0, [9] FWD,
// [10] OUT, [11] CLR, [12] BCONST, [13] RND, [14] POST, [15] CENTER,
// [16] FWDB, [31] start.  STATUS: [0] busy, [1] done, [2] fail, [31:16] produced words.
// Wishbone acks one cycle after the strobe.
//
// The memory sizes, units, operation set, source types, forwarding,
// chaining and clear flag follow the accelerator description; the register
// map, the bank mapping, the phase order and where poly-mode keeps T and
// zeta are this design's choices.
module ntt_lite
  import risq_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  wb_req_t  wb_req,
  output wb_rsp_t  wb_rsp,
  output dma_req_t dma_req,
  input  dma_rsp_t dma_rsp,
  output logic     irq_done
);
  localparam int unsigned LAT = 4;   // butterfly unit latency

  // ---------------- registers ----------------
  ntt_op_e     op_q;
  word_mode_e  wm_q;
  logic        ld1_q, ld0_q, fwd_q, fwdb_q, out_q, clr_q, bconst_q, rnd_q, post_q, center_q;
  logic [3:0]  logn_q;
  logic [5:0]  d_q;
  logic [3:0]  eta_q;
  logic [31:0] src_q, dst_q;
  logic [15:0] in_len_q;
  aux_t        aux_q;
  logic        busy_q, done_q, fail_q;
  logic [15:0] cnt_out_q;     // produced words
  logic        start;

  logic [8:0]  np;            // n'
  assign np = 9'd1 << logn_q;

  // ---------------- MMIO ----------------
  logic        wb_hit;
  logic [3:0]  wb_idx;
  assign wb_hit = wb_req.cyc && wb_req.stb && !wb_rsp.ack;
  assign wb_idx = wb_req.adr[5:2];
  assign start  = wb_hit && wb_req.we && (wb_idx == 4'd0) && wb_req.dat[31] && !busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_rsp <= '0;
      op_q <= OP_NOP; wm_q <= WM_SINGLE;
      {ld1_q, ld0_q, fwd_q, fwdb_q, out_q, clr_q, bconst_q, rnd_q, post_q, center_q} <= '0;
      logn_q <= 4'd8; d_q <= 6'd12; eta_q <= 4'd2;
      src_q <= '0; dst_q <= '0; in_len_q <= '0;
      aux_q <= '0;
    end else begin
      wb_rsp.ack <= wb_hit;
      wb_rsp.dat <= '0;
      if (wb_hit && !wb_req.we) begin
        unique case (wb_idx)
          4'd0:  wb_rsp.dat <= {15'd0, fwdb_q, center_q, post_q, rnd_q, bconst_q, clr_q, out_q,
                                fwd_q, ld0_q, ld1_q, wm_q, op_q};
          4'd1:  wb_rsp.dat <= {cnt_out_q, 13'd0, fail_q, done_q, busy_q};
          4'd2:  wb_rsp.dat <= {28'd0, logn_q};
          4'd3:  wb_rsp.dat <= {20'd0, eta_q, 2'd0, d_q};
          4'd4:  wb_rsp.dat <= src_q;
          4'd5:  wb_rsp.dat <= dst_q;
          4'd6:  wb_rsp.dat <= {16'd0, in_len_q};
          4'd8:  wb_rsp.dat <= aux_q.q;
          4'd9:  wb_rsp.dat <= aux_q.delta[31:0];
          4'd10: wb_rsp.dat <= aux_q.delta[63:32];
          4'd11: wb_rsp.dat <= aux_q.beta;
          4'd12: wb_rsp.dat <= aux_q.inv2;
          default: ;
        endcase
      end
      if (wb_hit && wb_req.we && !busy_q) begin
        unique case (wb_idx)
          4'd0: begin
            op_q     <= ntt_op_e'(wb_req.dat[4:0]);
            wm_q     <= word_mode_e'(wb_req.dat[6:5]);
            ld1_q    <= wb_req.dat[7];  ld0_q  <= wb_req.dat[8];
            fwd_q    <= wb_req.dat[9];  out_q  <= wb_req.dat[10];
            clr_q    <= wb_req.dat[11]; bconst_q <= wb_req.dat[12];
            rnd_q    <= wb_req.dat[13]; post_q <= wb_req.dat[14];
            center_q <= wb_req.dat[15]; fwdb_q <= wb_req.dat[16];
          end
          4'd2:  logn_q <= (wb_req.dat[3:0] == 4'd0 || wb_req.dat[3:0] > 4'd8) ? 4'd8 : wb_req.dat[3:0];
          4'd3:  begin d_q <= wb_req.dat[5:0]; eta_q <= wb_req.dat[11:8]; end
          4'd4:  src_q <= wb_req.dat;
          4'd5:  dst_q <= wb_req.dat;
          4'd6:  in_len_q <= wb_req.dat[15:0];
          4'd8:  aux_q.q <= wb_req.dat;
          4'd9:  aux_q.delta[31:0] <= wb_req.dat;
          4'd10: aux_q.delta[63:32] <= wb_req.dat;
          4'd11: aux_q.beta <= wb_req.dat;
          4'd12: aux_q.inv2 <= wb_req.dat;
          default: ;
        endcase
      end
    end
  end

  // ---------------- memories ----------------
  logic [1:0]       b_re, b_we;
  logic [6:0]       b_raddr [2];
  logic [6:0]       b_waddr [2];
  logic [31:0]      b_wdata [2];
  logic [31:0]      b_rdata [2];
  logic             m1_re, m1_we;
  logic [7:0]       m1_raddr, m1_waddr;
  logic [31:0]      m1_wdata, m1_rdata;

  for (genvar g = 0; g < 2; g++) begin : g_bank
    ram_1r1w #(.DEPTH(128), .WIDTH(32)) u_bank (
      .clk(clk), .re(b_re[g]), .raddr(b_raddr[g]), .rdata(b_rdata[g]),
      .we(b_we[g]), .waddr(b_waddr[g]), .wdata(b_wdata[g]));
  end
  ram_1r1w #(.DEPTH(256), .WIDTH(32)) u_ram1 (
    .clk(clk), .re(m1_re), .raddr(m1_raddr), .rdata(m1_rdata),
    .we(m1_we), .waddr(m1_waddr), .wdata(m1_wdata));

  function automatic logic bank_of(input logic [7:0] a);
    return ^a;
  endfunction

  // logical RAM_0 ports: two reads (ra0/ra1), two writes (wa0/wa1)
  logic        r0_en0, r0_en1, w0_en0, w0_en1;
  logic [7:0]  r0_a0, r0_a1, w0_a0, w0_a1;
  logic [31:0] w0_d0, w0_d1;
  logic        rsel_q;                 // bank that served logical read 0
  logic [31:0] r0_q0, r0_q1;           // logical read data (one cycle later)

  always_comb begin
    b_re = '0; b_we = '0;
    b_raddr[0] = '0; b_raddr[1] = '0; b_waddr[0] = '0; b_waddr[1] = '0;
    b_wdata[0] = '0; b_wdata[1] = '0;
    if (r0_en0) begin
      b_re[bank_of(r0_a0)] = 1'b1; b_raddr[bank_of(r0_a0)] = r0_a0[7:1];
    end
    if (r0_en1) begin
      b_re[bank_of(r0_a1)] = 1'b1; b_raddr[bank_of(r0_a1)] = r0_a1[7:1];
    end
    if (w0_en0) begin
      b_we[bank_of(w0_a0)] = 1'b1; b_waddr[bank_of(w0_a0)] = w0_a0[7:1];
      b_wdata[bank_of(w0_a0)] = w0_d0;
    end
    if (w0_en1) begin
      b_we[bank_of(w0_a1)] = 1'b1; b_waddr[bank_of(w0_a1)] = w0_a1[7:1];
      b_wdata[bank_of(w0_a1)] = w0_d1;
    end
  end
  always_ff @(posedge clk) rsel_q <= bank_of(r0_a0);
  assign r0_q0 = b_rdata[rsel_q];
  assign r0_q1 = b_rdata[!rsel_q];

  // ---------------- DMA ----------------
  logic [15:0] src_used_q;     // source words consumed so far (address offset)
  logic        rd_start, wr_start, rd_valid, rd_ready, wr_valid, wr_ready;
  logic [15:0] rd_len;
  logic [31:0] rd_data, wr_data;
  dma_engine #(.FIFO_DEPTH(4)) u_dma (
    .clk(clk), .rst_n(rst_n),
    .rd_start(rd_start), .rd_addr(src_q + {14'd0, src_used_q, 2'b00}), .rd_len(rd_len),
    .rd_valid(rd_valid), .rd_data(rd_data), .rd_ready(rd_ready),
    .wr_start(wr_start), .wr_addr(dst_q),
    .wr_valid(wr_valid), .wr_data(wr_data), .wr_ready(wr_ready),
    .dma_req(dma_req), .dma_rsp(dma_rsp));

  // ---------------- FSM ----------------
  typedef enum logic [3:0] {
    S_IDLE, S_LD1, S_LD0, S_MAIN, S_DRAIN, S_OUT, S_CLR, S_FIN
  } state_e;
  state_e st_q;

  logic        first_q;        // first cycle of a phase
  logic [8:0]  i_q;            // issue index / element counter
  logic        pass_q;         // poly PWM pass
  logic [3:0]  stg_q;          // NTT stage
  logic [7:0]  bf_q;           // butterfly index within stage
  logic [15:0] wcnt_q;         // words written by the EU/SU path
  logic [15:0] out_len;
  logic [15:0] idle_q;

  logic        is_ntt, is_elem, is_eu, need_s, poly_pwm;
  assign is_ntt   = (op_q == OP_NTT) || (op_q == OP_INTT);
  assign is_eu    = (op_q == OP_ENCODE) || (op_q == OP_DECODE) || (op_q == OP_CBD) ||
                    (op_q == OP_REJ_SAMP);
  assign is_elem  = !is_ntt && !is_eu && (op_q != OP_NOP);
  assign need_s   = (fwd_q || fwdb_q || (op_q == OP_MAC) || (op_q == OP_USE_HINT)) && !pass_q;
  assign poly_pwm = (op_q == OP_PWM || op_q == OP_MAC) && (wm_q == WM_POLY);
  assign out_len  = (op_q == OP_ENCODE || op_q == OP_REJ_SAMP) ? wcnt_q :
                    (op_q == OP_SUM) ? 16'd1 : 16'(np);

  // ---- butterfly unit and its index shift register ----
  logic        bu_in_v, bu_out_v, bu_first;
  bu_op_e      bu_op;
  word_mode_e  bu_mode;
  logic [31:0] bu_a, bu_b, bu_c, bu_o0, bu_o1;
  logic        iss;                           // an element/butterfly issued
  logic        r_v;                           // read data valid this cycle
  logic [7:0]  r_ia, r_ib;                    // its indices
  logic [31:0] r_s;                           // stream word of that element
  logic        r_first;
  logic [7:0]  sr_ia [LAT];
  logic [7:0]  sr_ib [LAT];
  logic [8:0]  infl_q;                        // elements inside BU pipeline

  butterfly_unit u_bu (
    .clk(clk), .rst_n(rst_n), .in_valid(bu_in_v), .op(bu_op), .mode(bu_mode),
    .in0(bu_a), .in1(bu_b), .in2(bu_c), .aux(aux_q), .d(d_q), .rnd(rnd_q),
    .post(post_q), .first(bu_first), .out_valid(bu_out_v), .out0(bu_o0), .out1(bu_o1));

  always_comb begin
    bu_mode = wm_q;
    unique case (op_q)
      OP_NTT:        bu_op = BU_CT;
      OP_INTT:       bu_op = BU_GS;
      OP_ADD:        bu_op = BU_ADD;
      OP_SUB:        bu_op = BU_SUB;
      OP_PWM:        bu_op = pass_q ? BU_PMUL2 : BU_MUL;
      OP_MAC:        bu_op = pass_q ? BU_PMUL2 : BU_MAC;
      OP_COMPRESS:   bu_op = BU_COMP;
      OP_DECOMPRESS: bu_op = BU_DECOMP;
      OP_DECOMPOSE:  bu_op = BU_DCMPOSE;
      OP_CHK_NORM:   bu_op = BU_CHKNORM;
      OP_MAKE_HINT:  bu_op = BU_MKHINT;
      OP_USE_HINT:   bu_op = BU_USEHINT;
      OP_SUM:        bu_op = BU_SUM;
      default:       bu_op = BU_ADD;
    endcase
    if (pass_q) bu_mode = WM_SINGLE;
    bu_in_v  = r_v;
    bu_first = r_first;
    bu_a     = r0_q0;
    bu_b     = bconst_q ? aux_q.beta : m1_rdata;
    bu_c     = r_s;
    if (is_ntt) begin
      bu_b = r0_q1;
      bu_c = m1_rdata;
    end else if (fwd_q) begin
      bu_a = r_s;
    end else if (fwdb_q) begin
      bu_b = r_s;
    end
    if (pass_q) begin
      bu_b = r0_q1;       // T
      bu_c = m1_rdata;    // zeta
    end
  end

  // NTT address generation
  logic [7:0] ntt_len, ntt_j, ntt_k, ntt_g;
  always_comb begin
    if (op_q == OP_NTT) begin
      ntt_len = 8'(np >> (stg_q + 4'd1));
      ntt_g   = 8'(bf_q >> (logn_q - 4'd1 - stg_q));
      ntt_k   = 8'((9'd1 << stg_q) + 9'(ntt_g));
    end else begin
      ntt_len = 8'd1 << stg_q;
      ntt_g   = 8'(bf_q >> stg_q);
      ntt_k   = 8'((np >> stg_q) - 9'd1 - 9'(ntt_g));
    end
    ntt_j = 8'(ntt_g * ntt_len * 8'd2) | (bf_q & 8'(ntt_len - 8'd1));
  end

  // ---- RAM stream reader (EU input and OUT phase) ----
  logic [31:0] f_d [2];
  logic [1:0]  f_cnt;
  logic        f_pend, f_pop, f_issue, f_src1;
  logic [15:0] f_idx, f_total;
  assign f_src1  = (st_q == S_MAIN) && (op_q != OP_ENCODE);
  assign f_total = (st_q == S_OUT) ? out_len : (op_q == OP_ENCODE) ? 16'(np) : in_len_q;

  // ---- EU / SU ----
  logic eu_in_ready, eu_out_v, eu_out_ready, eu_empty, eu_flush, eu_clear;
  logic [31:0] eu_out_d;
  logic su_in_ready, su_out_v, su_out_ready;
  logic [31:0] su_out_d;
  logic eu_phase;
  assign eu_phase = (st_q == S_MAIN) && is_eu;
  assign eu_clear = start;
  assign eu_flush = (f_idx == f_total) && (f_cnt == 2'd0) && !f_pend;

  encode_unit u_eu (
    .clk(clk), .rst_n(rst_n), .clear(eu_clear), .dec(op_q != OP_ENCODE),
    .dual(wm_q != WM_SINGLE), .d(op_q == OP_CBD ? {1'b0, eta_q, 1'b0} : d_q),
    .flush(eu_flush && op_q == OP_ENCODE),
    .in_valid(eu_phase && f_cnt != 2'd0), .in_data(f_d[0]), .in_ready(eu_in_ready),
    .out_valid(eu_out_v), .out_data(eu_out_d), .out_ready(eu_out_ready), .empty(eu_empty));

  logic su_path;
  assign su_path = (op_q == OP_CBD) || (op_q == OP_REJ_SAMP);
  logic wr_room;
  assign wr_room = (op_q == OP_ENCODE) || (wcnt_q < 16'(np));

  sampling_unit u_su (
    .clk(clk), .rst_n(rst_n), .clear(start), .rej(op_q == OP_REJ_SAMP),
    .dual(wm_q != WM_SINGLE), .center(center_q), .eta(eta_q), .q(aux_q.q),
    .beta(aux_q.beta), .cen(aux_q.inv2),
    .in_valid(eu_phase && su_path && eu_out_v), .in_data(eu_out_d), .in_ready(su_in_ready),
    .out_valid(su_out_v), .out_data(su_out_d), .out_ready(su_out_ready));

  assign eu_out_ready = eu_phase && (su_path ? su_in_ready : wr_room);
  assign su_out_ready = eu_phase && wr_room;

  logic        eu_wr;
  logic [31:0] eu_wd;
  assign eu_wr = eu_phase && (su_path ? (su_out_v && su_out_ready) : (eu_out_v && eu_out_ready));
  assign eu_wd = su_path ? su_out_d : eu_out_d;

  assign f_pop = (st_q == S_OUT) ? (wr_valid && wr_ready)
                                 : (eu_phase && f_cnt != 2'd0 && eu_in_ready);
  assign f_issue = ((st_q == S_OUT) || eu_phase) && (f_idx < f_total) &&
                   ((3'(f_cnt) + 3'(f_pend) - 3'(f_pop)) < 3'd2);
  assign wr_valid = (st_q == S_OUT) && (f_cnt != 2'd0);
  assign wr_data  = f_d[0];

  // ---- memory port control ----
  logic elem_issue;
  logic [7:0] ii;
  assign ii = i_q[7:0];
  assign elem_issue = (st_q == S_MAIN) && is_elem && !first_q && (i_q < np) && !fail_q &&
                      (!need_s || rd_valid);
  logic ntt_issue;
  assign ntt_issue = (st_q == S_MAIN) && is_ntt && !first_q && ({1'b0, bf_q} < (np >> 1));
  assign iss = elem_issue || ntt_issue;

  always_comb begin
    r0_en0 = 1'b0; r0_en1 = 1'b0; r0_a0 = '0; r0_a1 = '0;
    w0_en0 = 1'b0; w0_en1 = 1'b0; w0_a0 = '0; w0_a1 = '0; w0_d0 = '0; w0_d1 = '0;
    m1_re = 1'b0; m1_raddr = '0; m1_we = 1'b0; m1_waddr = '0; m1_wdata = '0;
    rd_ready = 1'b0;
    // loads
    if ((st_q == S_LD1 || st_q == S_LD0) && !first_q) begin
      rd_ready = 1'b1;
      if (st_q == S_LD1) begin
        m1_we = rd_valid; m1_waddr = i_q[7:0]; m1_wdata = rd_data;
      end else begin
        w0_en0 = rd_valid; w0_a0 = i_q[7:0]; w0_d0 = rd_data;
      end
    end
    // element-wise issue
    if (elem_issue) begin
      rd_ready = need_s;
      r0_en0 = !fwd_q || pass_q; r0_a0 = ii;
      m1_re  = !bconst_q && !fwdb_q; m1_raddr = pass_q ? ii + 8'(np) : ii;
      if (pass_q) begin r0_en1 = 1'b1; r0_a1 = ii + 8'(np); end
    end
    if (ntt_issue) begin
      r0_en0 = 1'b1; r0_a0 = ntt_j;
      r0_en1 = 1'b1; r0_a1 = ntt_j + ntt_len;
      m1_re  = 1'b1; m1_raddr = ntt_k;
    end
    // stream reader
    if (f_issue) begin
      if (f_src1) begin m1_re = 1'b1; m1_raddr = f_idx[7:0]; end
      else        begin r0_en0 = 1'b1; r0_a0 = f_idx[7:0]; end
    end
    // BU write-back
    if (bu_out_v) begin
      if (is_ntt) begin
        w0_en0 = 1'b1; w0_a0 = sr_ia[LAT-1]; w0_d0 = bu_o0;
        w0_en1 = 1'b1; w0_a1 = sr_ib[LAT-1]; w0_d1 = bu_o1;
      end else if (op_q != OP_CHK_NORM) begin
        w0_en0 = 1'b1; w0_a0 = (op_q == OP_SUM) ? 8'd0 : sr_ia[LAT-1]; w0_d0 = bu_o0;
        if (poly_pwm && !pass_q) begin
          w0_en1 = 1'b1; w0_a1 = sr_ia[LAT-1] + 8'(np); w0_d1 = bu_o1;
        end
        if (op_q == OP_DECOMPOSE) begin
          m1_we = 1'b1; m1_waddr = sr_ia[LAT-1]; m1_wdata = bu_o1;
        end
      end
    end
    // EU/SU write-back
    if (eu_wr) begin
      w0_en0 = 1'b1; w0_a0 = wcnt_q[7:0]; w0_d0 = eu_wd;
    end
    // clearing: overlapped with OUT, or a dedicated pass
    if (st_q == S_OUT && clr_q && f_issue) begin
      w0_en1 = 1'b1; w0_a1 = f_idx[7:0]; w0_d1 = '0;
      m1_we  = 1'b1; m1_waddr = f_idx[7:0]; m1_wdata = '0;
    end
    if (st_q == S_CLR) begin
      w0_en0 = 1'b1; w0_a0 = {i_q[6:0], 1'b0}; w0_d0 = '0;
      w0_en1 = 1'b1; w0_a1 = {i_q[6:0], 1'b1}; w0_d1 = '0;
      m1_we  = 1'b1; m1_waddr = i_q[7:0]; m1_wdata = '0;
    end
  end

  // read-stage registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_v <= 1'b0; r_ia <= '0; r_ib <= '0; r_s <= '0; r_first <= 1'b0;
      for (int s = 0; s < LAT; s++) begin sr_ia[s] <= '0; sr_ib[s] <= '0; end
      infl_q <= '0;
    end else begin
      r_v     <= iss;
      r_ia    <= ntt_issue ? ntt_j : ii;
      r_ib    <= ntt_j + ntt_len;
      r_s     <= rd_data;
      r_first <= (i_q == 9'd0);
      sr_ia[0] <= r_ia; sr_ib[0] <= r_ib;
      for (int s = 1; s < LAT; s++) begin sr_ia[s] <= sr_ia[s-1]; sr_ib[s] <= sr_ib[s-1]; end
      infl_q <= infl_q + 9'(iss) - 9'(bu_out_v);
    end
  end

  // reader FIFO
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_cnt <= '0; f_pend <= 1'b0; f_d[0] <= '0; f_d[1] <= '0;
    end else if (start) begin
      f_cnt <= '0; f_pend <= 1'b0;
    end else begin
      f_pend <= f_issue;
      unique case ({f_pend, f_pop})
        2'b10: begin f_d[f_cnt[0]] <= f_src1 ? m1_rdata : r0_q0; f_cnt <= f_cnt + 2'd1; end
        2'b01: begin f_d[0] <= f_d[1]; f_cnt <= f_cnt - 2'd1; end
        2'b11: begin
          if (f_cnt == 2'd1) f_d[0] <= f_src1 ? m1_rdata : r0_q0;
          else begin f_d[0] <= f_d[1]; f_d[1] <= f_src1 ? m1_rdata : r0_q0; end
        end
        default: ;
      endcase
    end
  end

  // main sequencer
  logic eu_done;
  assign eu_done = (op_q == OP_ENCODE) ? (eu_flush && eu_empty)
                 : (!wr_room || (eu_flush && !eu_out_v && !su_out_v && idle_q > 16'd2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; first_q <= 1'b0; i_q <= '0; src_used_q <= '0; pass_q <= 1'b0;
      stg_q <= '0; bf_q <= '0; wcnt_q <= '0; idle_q <= '0; f_idx <= '0;
      busy_q <= 1'b0; done_q <= 1'b0; fail_q <= 1'b0; cnt_out_q <= '0;
      rd_start <= 1'b0; wr_start <= 1'b0; rd_len <= '0;
    end else begin
      rd_start <= 1'b0;
      wr_start <= 1'b0;
      first_q  <= 1'b0;
      if (f_issue) f_idx <= f_idx + 16'd1;
      if (eu_wr)   wcnt_q <= wcnt_q + 16'd1;
      idle_q <= (eu_out_v || su_out_v || f_cnt != 2'd0 || f_pend) ? 16'd0 : idle_q + 16'd1;
      unique case (st_q)
        S_IDLE: if (start) begin
          busy_q <= 1'b1; done_q <= 1'b0; fail_q <= 1'b0; src_used_q <= '0;
          pass_q <= 1'b0; stg_q <= '0; bf_q <= '0; wcnt_q <= '0; i_q <= '0; f_idx <= '0;
          first_q <= 1'b1;
          // phase selection happens in S_FIN-like dispatch below
          st_q <= S_FIN;
        end
        S_LD1, S_LD0: begin
          if (first_q) begin
            rd_start <= 1'b1; rd_len <= in_len_q;
          end else if (rd_valid) begin
            i_q <= i_q + 9'd1;
            src_used_q <= src_used_q + 16'd1;
            if (i_q + 9'd1 == 9'(in_len_q)) begin
              i_q <= '0; first_q <= 1'b1;
              st_q <= (st_q == S_LD1 && ld0_q) ? S_LD0 : S_MAIN;
            end
          end
        end
        S_MAIN: begin
          if (first_q) begin
            if (need_s && !pass_q) begin rd_start <= 1'b1; rd_len <= 16'(np); end
            if (is_eu) begin f_idx <= '0; idle_q <= '0; end
          end else if (is_elem) begin
            if (elem_issue) i_q <= i_q + 9'd1;
            if (bu_out_v && op_q == OP_CHK_NORM && bu_o0 != 32'd0) fail_q <= 1'b1;
            if ((i_q == np || fail_q) && !iss) st_q <= S_DRAIN;
          end else if (is_ntt) begin
            if (ntt_issue) bf_q <= bf_q + 8'd1;
            else if (infl_q == '0 && !r_v) begin
              if (stg_q + 4'd1 == logn_q) st_q <= S_DRAIN;
              else begin stg_q <= stg_q + 4'd1; bf_q <= '0; end
            end
          end else if (is_eu) begin
            if (eu_done) st_q <= S_DRAIN;
          end else begin
            st_q <= S_DRAIN;             // OP_NOP: transfers only
          end
        end
        S_DRAIN: begin
          if (bu_out_v && op_q == OP_CHK_NORM && bu_o0 != 32'd0) fail_q <= 1'b1;
          if (infl_q == '0 && !r_v) begin
            if (poly_pwm && !pass_q) begin
              pass_q <= 1'b1; i_q <= '0; first_q <= 1'b1; st_q <= S_MAIN;
            end else begin
              cnt_out_q <= is_eu ? wcnt_q : 16'(np);
              f_idx <= '0; first_q <= 1'b1; i_q <= '0;
              st_q <= out_q ? S_OUT : clr_q ? S_CLR : S_IDLE;
              if (!out_q && !clr_q) begin busy_q <= 1'b0; done_q <= 1'b1; end
            end
          end
        end
        S_OUT: begin
          if (first_q) wr_start <= 1'b1;
          if (wr_valid && wr_ready) begin
            i_q <= i_q + 9'd1;
            if (i_q + 9'd1 == 9'(out_len)) begin
              st_q <= S_IDLE; busy_q <= 1'b0; done_q <= 1'b1;
            end
          end
        end
        S_CLR: begin
          i_q <= i_q + 9'd1;
          if (i_q == 9'd255) begin st_q <= S_IDLE; busy_q <= 1'b0; done_q <= 1'b1; end
        end
        S_FIN: begin
          // dispatch after start
          first_q <= 1'b1;
          st_q <= ld1_q ? S_LD1 : ld0_q ? S_LD0 : S_MAIN;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign irq_done = done_q;

  logic unused;
  assign unused = ^{wb_req.adr[31:6], wb_req.adr[1:0], idle_q[15:3]};
endmodule
