// instruction_dispatcher: first tier of the two-tier instruction processing.
// It turns the stream of compressed 1024-bit instruction bundles into one
// decoded packet per cycle for the datapath, and performs the control flow
// (zero-overhead loops, jumps, traps) itself.
//
// Bundle layout (hierarchical VLIW encoding): 12-bit caps are stacked from
// bit 1023 downward, one per packet, ended by a 2-bit 00 marker; the packets
// are stacked from bit 0 upward, each holding the 20-bit heads of its
// active fields in field order followed by their variable-length tails.
//   datapath cap   [11:10]=01 [9:6] valid (bit 6+i = field i) [5:4] ring
//                  offset [3:0] total tail length in bytes
//   dispatcher cap [11:10]=10 [9:7] RPT/J/JAL/JR/BNEZ/TRAP [3:0] tail bytes
//                  (no heads, operands in the tail)
//   head           [19:14] op [13:10] rd [9:6] ra [5:2] rb [1:0] tsz
//                  (tail of 0/1/2/4 bytes, a sign-extended immediate)
// Two shifters follow the packets: a 386-bit cap shifter that moves by
// one cap (12 bits) per packet, and a head/tail shifter that moves by the
// size of the packet just issued (20 bits per head plus the tail length from
// the cap). Decoding only looks at fixed positions of the two shifters. On a
// redirect both are re-aligned from the bundle by the packet index and the
// head pointer of the target. A 2-bit look-ahead at the cap after the one
// being issued detects the bundle end one cycle early, so the prefetched next
// bundle is swapped in without a lost cycle.
//
// RPT n,m (repeat the following m caps n times), BNEZ and JR are decoded
// together with the datapath packet that follows them, so they take no
// datapath cycle. Two loop levels are kept, each with a copy of the bundle
// that holds the loop start, so jumping back costs nothing even across a
// bundle boundary; a body that continues into the following bundle keeps
// that bundle as the prefetched one. BNEZ and JR travel with the next
// packet: field 0 reads their register in the execute stage, and a taken
// branch squashes the packet decoded meanwhile (one empty cycle). J, JAL
// and TRAP insert one empty packet; JAL and TRAP use it to write the return
// position into r7 of field 0. A target outside the current and prefetched
// bundles costs one more cycle for the memory read.
//
// Interface: imem_re/imem_raddr/imem_rdata (one-cycle read), pkt (registered
// packet to the datapath), br_taken/br_target (resolution of the BNEZ/JR
// issued with the executing packet), trap_valid/trap_num, and single-cycle
// event strobes for loop-backs, bundle swaps, redirects and empty cycles.
//
// The cap, head and bundle sizes, the shifters, the look-ahead, the loop
// depth and the field-0 branch resolution follow the architecture. The bit
// fields, opcodes, tail layouts, the 30-bit position {bundle, packet index,
// head pointer}, the r7 link and the pipeline depth are this design's own.
// Only the low IMEM_AW bits of a bundle number address the memory (one
// 256-bundle page by default); the page bits are carried but not used.
// RPT, BNEZ and JR must be followed by a datapath cap in the same bundle,
// and jumps out of a running loop are not supported.
module instruction_dispatcher
  import dsp_pkg::*;
#(
  parameter int IMEM_AW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 imem_re,
  output logic [IMEM_AW-1:0]   imem_raddr,
  input  logic [BUNDLE_W-1:0]  imem_rdata,
  output packet_t              pkt,
  input  logic                 br_taken,
  input  pos_t                 br_target,
  output logic                 trap_valid,
  output logic [7:0]           trap_num,
  output logic                 ev_loop_back,
  output logic                 ev_bundle_swap,
  output logic                 ev_redirect,
  output logic                 ev_bubble
);
  localparam int WIN = 256;            // bits a packet can span: 4 heads + 15 tail bytes
  localparam int LVL = 2;

  typedef enum logic [1:0] {S_FETCH, S_WAIT, S_RUN} state_e;
  typedef enum logic [1:0] {RK_NONE, RK_PF, RK_REDIR} rkind_e;

  state_e                state_q;
  pos_t                  tgt_q;
  logic [BUNDLE_W-1:0]   cur_q, pf_q;
  logic [BADDR_W-1:0]    cur_addr_q, pf_addr_q;
  logic                  pf_valid_q;
  logic [CAP_SR_W-1:0]   cap_sr_q;
  logic [BUNDLE_W-1:0]   pk_sr_q;
  logic [PIDX_W:0]       idx_q;
  logic [PTR_W:0]        ptr_q;
  rkind_e                rk_q;
  logic [BADDR_W-1:0]    rd_addr_q;
  packet_t               pkt_q;

  // loop stack, level 0 outer
  logic [LVL-1:0]             lp_act_q;
  logic [LVL-1:0][15:0]       lp_cnt_q;
  logic [LVL-1:0][7:0]        lp_m_q;
  logic [LVL-1:0][8:0]        lp_rem_q;
  pos_t [LVL-1:0]             lp_pos_q;
  logic [LVL-1:0][BUNDLE_W-1:0] lp_bun_q;

  assign pkt = pkt_q;

  // ---------------------------------------------------------------- helpers
  function automatic logic [CAP_SR_W-1:0] align_caps(input logic [BUNDLE_W-1:0] b,
                                                     input logic [PIDX_W-1:0] idx);
    return b[BUNDLE_W-1 -: CAP_SR_W] << (idx * CAP_W);
  endfunction

  function automatic logic [31:0] tail_imm(input logic [63:0] w, input logic [1:0] tsz);
    unique case (tsz)
      2'd0: return 32'd0;
      2'd1: return {{24{w[7]}},  w[7:0]};
      2'd2: return {{16{w[15]}}, w[15:0]};
      default: return w[31:0];
    endcase
  endfunction

  function automatic int tsz_bytes(input logic [1:0] tsz);
    return (tsz == 2'd3) ? 4 : int'(tsz);
  endfunction

  // Split a datapath packet into its field instructions; also return its size.
  function automatic void decode_pkt(input logic [CAP_W-1:0] cap, input logic [WIN-1:0] w,
                                     output fu_ins_t [NFU-1:0] ins, output int bits,
                                     output int tail_sum);
    int nh, hp, tp;
    logic [HEAD_W-1:0] h;
    nh = 0;
    for (int f = 0; f < NFU; f++) nh += int'(cap[6+f]);
    hp = 0;
    tp = nh * HEAD_W;
    tail_sum = 0;
    for (int f = 0; f < NFU; f++) begin
      ins[f] = '0;
      if (cap[6+f]) begin
        h = w[hp +: HEAD_W];
        ins[f].valid = 1'b1;
        ins[f].op    = op_e'(h[19:14]);
        ins[f].rd    = h[13:10];
        ins[f].ra    = h[9:6];
        ins[f].rb    = h[5:2];
        ins[f].imm   = tail_imm(w[tp +: 64], h[1:0]);
        hp += HEAD_W;
        tp += 8 * tsz_bytes(h[1:0]);
        tail_sum += tsz_bytes(h[1:0]);
      end
    end
    bits = nh * HEAD_W + 8 * int'(cap[3:0]);
  endfunction

  // ------------------------------------------------------------ decode/issue
  logic [CAP_W-1:0]   c0, c1;
  cap_kind_e          k0, k1;
  ctl_op_e            cop;
  logic [63:0]        ctail;
  logic [WIN-1:0]     w0, w1;
  fu_ins_t [NFU-1:0]  ins0, ins1;
  int                 bits0, bits1, tsum0, tsum1;
  logic               pf_ready;

  assign c0 = cap_sr_q[CAP_SR_W-1 -: CAP_W];
  assign c1 = cap_sr_q[CAP_SR_W-1-CAP_W -: CAP_W];
  assign k0 = cap_kind_e'(c0[11:10]);
  assign k1 = cap_kind_e'(c1[11:10]);
  assign cop = ctl_op_e'(c0[9:7]);
  assign ctail = pk_sr_q[63:0];
  assign w0 = pk_sr_q[WIN-1:0];
  assign w1 = WIN'(pk_sr_q[WIN+120-1:0] >> (8 * c0[3:0]));
  assign pf_ready = pf_valid_q && (pf_addr_q == cur_addr_q + 1'b1);

  always_comb begin
    decode_pkt(c0, w0, ins0, bits0, tsum0);
    decode_pkt(c1, w1, ins1, bits1, tsum1);
  end

  // Next-state logic.
  state_e               state_d;
  pos_t                 tgt_d;
  logic [BUNDLE_W-1:0]  cur_d, pf_d;
  logic [BADDR_W-1:0]   cur_addr_d, pf_addr_d;
  logic                 pf_valid_d;
  logic [CAP_SR_W-1:0]  cap_sr_d;
  logic [BUNDLE_W-1:0]  pk_sr_d;
  logic [PIDX_W:0]      idx_d;
  logic [PTR_W:0]       ptr_d;
  rkind_e               rk_d;
  logic [BADDR_W-1:0]   rd_addr_d;
  packet_t              pkt_d;
  logic [LVL-1:0]       lp_act_d;
  logic [LVL-1:0][15:0] lp_cnt_d;
  logic [LVL-1:0][7:0]  lp_m_d;
  logic [LVL-1:0][8:0]  lp_rem_d;
  pos_t [LVL-1:0]       lp_pos_d;
  logic [LVL-1:0][BUNDLE_W-1:0] lp_bun_d;
  logic                 trap_d;
  logic [7:0]           trap_num_d;
  logic                 ev_lb, ev_bs, ev_rd;

  always_comb begin
    logic        redirect, consumed, do_lb, lb_done;
    pos_t        rtgt;
    int          ncaps, nbits, lb_lvl, push;
    logic [1:0]  knext;

    state_d = state_q;   tgt_d = tgt_q;
    cur_d = cur_q;       cur_addr_d = cur_addr_q;
    pf_d = pf_q;         pf_addr_d = pf_addr_q;   pf_valid_d = pf_valid_q;
    cap_sr_d = cap_sr_q; pk_sr_d = pk_sr_q;
    idx_d = idx_q;       ptr_d = ptr_q;
    rk_d = RK_NONE;      rd_addr_d = rd_addr_q;
    lp_act_d = lp_act_q; lp_cnt_d = lp_cnt_q; lp_m_d = lp_m_q;
    lp_rem_d = lp_rem_q; lp_pos_d = lp_pos_q; lp_bun_d = lp_bun_q;
    pkt_d = '0;
    trap_d = 1'b0;       trap_num_d = trap_num;
    imem_re = 1'b0;      imem_raddr = '0;
    redirect = 1'b0;     rtgt = '0;
    consumed = 1'b0;     ncaps = 0; nbits = 0;
    do_lb = 1'b0;        lb_lvl = 0; lb_done = 1'b0; push = 0;
    knext = 2'b00;
    ev_lb = 1'b0; ev_bs = 1'b0; ev_rd = 1'b0;

    // Returning read data.
    if (rk_q == RK_PF) begin
      pf_d = imem_rdata; pf_addr_d = rd_addr_q; pf_valid_d = 1'b1;
    end

    if (pkt_q.valid && pkt_q.br_en && br_taken) begin
      // A branch resolved in execute: drop whatever is decoded now.
      redirect = 1'b1;
      rtgt = br_target;
    end else begin
      unique case (state_q)
        S_FETCH: begin
          imem_re = 1'b1; imem_raddr = IMEM_AW'(tgt_q.bundle);
          rk_d = RK_REDIR; rd_addr_d = tgt_q.bundle;
          state_d = S_WAIT;
        end
        S_WAIT: begin
          if (rk_q == RK_REDIR && rd_addr_q == tgt_q.bundle) begin
            cur_d = imem_rdata; cur_addr_d = tgt_q.bundle;
            cap_sr_d = align_caps(imem_rdata, tgt_q.idx);
            pk_sr_d  = imem_rdata >> tgt_q.ptr;
            idx_d = (PIDX_W+1)'(tgt_q.idx); ptr_d = (PTR_W+1)'(tgt_q.ptr);
            state_d = S_RUN;
          end
        end
        default: begin  // S_RUN
          if (k0 == CAP_PKT) begin
            pkt_d.valid = 1'b1; pkt_d.ring_off = c0[5:4]; pkt_d.ins = ins0;
            consumed = 1'b1; ncaps = 1; nbits = bits0;
          end else if (k0 == CAP_CTL) begin
            unique case (cop)
              CTL_RPT, CTL_BNEZ, CTL_JR: begin
                pkt_d.valid = 1'b1; pkt_d.ring_off = c1[5:4]; pkt_d.ins = ins1;
                consumed = 1'b1; ncaps = 2; nbits = 8 * int'(c0[3:0]) + bits1;
                if (cop == CTL_BNEZ) begin
                  pkt_d.br_en = 1'b1; pkt_d.br_reg = ctail[35:32];
                  pkt_d.br_target = pos_t'(ctail[POS_W-1:0]);
                end else if (cop == CTL_JR) begin
                  pkt_d.br_en = 1'b1; pkt_d.br_is_jr = 1'b1; pkt_d.br_reg = ctail[3:0];
                end
              end
              default: begin  // J, JAL, TRAP: one empty cycle
                redirect = 1'b1;
                if (cop == CTL_TRAP) begin
                  rtgt = '0; rtgt.bundle = BADDR_W'(ctail[7:0]);
                  trap_d = 1'b1; trap_num_d = ctail[7:0];
                end else begin
                  rtgt = pos_t'(ctail[POS_W-1:0]);
                end
                if (cop != CTL_J) begin
                  pkt_d.link_we  = 1'b1;
                  pkt_d.link_val = 32'({cur_addr_q, PIDX_W'(idx_q + 1'b1),
                                        PTR_W'(ptr_q + 8 * c0[3:0])});
                end
              end
            endcase
          end else begin
            // End of bundle reached without the look-ahead swap: swap now.
            if (pf_ready) begin
              cur_d = pf_q; cur_addr_d = pf_addr_q; pf_valid_d = 1'b0;
              cap_sr_d = align_caps(pf_q, '0); pk_sr_d = pf_q;
              idx_d = '0; ptr_d = '0;
              ev_bs = 1'b1;
            end
          end

          if (consumed) begin
            // shift past the issued caps and packet bits
            cap_sr_d = cap_sr_q << (ncaps * CAP_W);
            pk_sr_d  = pk_sr_q >> nbits;
            idx_d = idx_q + (PIDX_W+1)'(ncaps);
            ptr_d = ptr_q + (PTR_W+1)'(nbits);
            knext = (ncaps == 1) ? cap_sr_q[CAP_SR_W-1-CAP_W -: 2]
                                 : cap_sr_q[CAP_SR_W-1-2*CAP_W -: 2];
            // loop bookkeeping: every issued cap counts in each open body
            for (int l = 0; l < LVL; l++)
              if (lp_act_q[l]) lp_rem_d[l] = lp_rem_q[l] - 9'(ncaps);
            if (k0 == CAP_CTL && cop == CTL_RPT) begin
              // open a level for the body that starts with the cap after RPT
              push = lp_act_q[0] ? 1 : 0;
              lp_act_d[push] = 1'b1;
              lp_cnt_d[push] = (ctail[15:0] == 16'd0) ? 16'd1 : ctail[15:0];
              lp_m_d[push]   = ctail[23:16];
              lp_rem_d[push] = 9'(ctail[23:16]) - 9'd1;
              lp_pos_d[push] = '{bundle: cur_addr_q, idx: PIDX_W'(idx_q + 1'b1),
                                 ptr: PTR_W'(ptr_q + 8 * c0[3:0])};
              lp_bun_d[push] = cur_q;
            end
            // end of a pass: innermost level first
            for (int l = LVL-1; l >= 0; l--) begin
              if (lp_act_d[l] && !lb_done && (l == LVL-1 || !lp_act_d[l+1])
                  && lp_rem_d[l] == 9'd0) begin
                if (lp_cnt_d[l] > 16'd1) begin
                  lp_cnt_d[l] = lp_cnt_d[l] - 16'd1;
                  lp_rem_d[l] = 9'(lp_m_d[l]);
                  for (int o = 0; o < l; o++)
                    lp_rem_d[o] = lp_rem_d[o] + 9'(lp_m_d[l]);
                  do_lb = 1'b1; lb_lvl = l; lb_done = 1'b1;
                end else begin
                  lp_act_d[l] = 1'b0;
                end
              end
            end
            if (do_lb) begin
              cur_d = lp_bun_d[lb_lvl]; cur_addr_d = lp_pos_d[lb_lvl].bundle;
              cap_sr_d = align_caps(lp_bun_d[lb_lvl], lp_pos_d[lb_lvl].idx);
              pk_sr_d  = lp_bun_d[lb_lvl] >> lp_pos_d[lb_lvl].ptr;
              idx_d = (PIDX_W+1)'(lp_pos_d[lb_lvl].idx);
              ptr_d = (PTR_W+1)'(lp_pos_d[lb_lvl].ptr);
              ev_lb = 1'b1;
              // a body that ran on into the next bundle: keep that bundle
              // as the prefetched one for the next pass
              if (cur_addr_q == lp_pos_d[lb_lvl].bundle + 1'b1) begin
                pf_d = cur_q; pf_addr_d = cur_addr_q; pf_valid_d = 1'b1;
              end
            end else if ((knext == CAP_END || knext == CAP_RSV) && pf_ready) begin
              cur_d = pf_q; cur_addr_d = pf_addr_q; pf_valid_d = 1'b0;
              cap_sr_d = align_caps(pf_q, '0); pk_sr_d = pf_q;
              idx_d = '0; ptr_d = '0;
              ev_bs = 1'b1;
            end
          end
        end
      endcase
    end

    if (redirect) begin
      ev_rd = 1'b1;
      tgt_d = rtgt;
      if (rtgt.bundle == cur_addr_q) begin
        cur_d = cur_q; cur_addr_d = cur_addr_q;
        cap_sr_d = align_caps(cur_q, rtgt.idx); pk_sr_d = cur_q >> rtgt.ptr;
        idx_d = (PIDX_W+1)'(rtgt.idx); ptr_d = (PTR_W+1)'(rtgt.ptr);
        state_d = S_RUN;
      end else if (pf_valid_q && pf_addr_q == rtgt.bundle) begin
        cur_d = pf_q; cur_addr_d = pf_addr_q; pf_valid_d = 1'b0;
        cap_sr_d = align_caps(pf_q, rtgt.idx); pk_sr_d = pf_q >> rtgt.ptr;
        idx_d = (PIDX_W+1)'(rtgt.idx); ptr_d = (PTR_W+1)'(rtgt.ptr);
        state_d = S_RUN;
      end else begin
        imem_re = 1'b1; imem_raddr = IMEM_AW'(rtgt.bundle);
        rk_d = RK_REDIR; rd_addr_d = rtgt.bundle;
        state_d = S_WAIT;
      end
    end

    // Prefetch the bundle after the current one when the port is free.
    if (!imem_re && state_d == S_RUN && state_q == S_RUN
        && !(pf_valid_d && pf_addr_d == cur_addr_d + 1'b1)
        && !(rk_q == RK_PF && rd_addr_q == cur_addr_d + 1'b1)) begin
      imem_re = 1'b1; imem_raddr = IMEM_AW'(cur_addr_d + 1'b1);
      rk_d = RK_PF; rd_addr_d = cur_addr_d + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_FETCH;  tgt_q <= '0;
      cur_q <= '0;  pf_q <= '0;  cur_addr_q <= '0;  pf_addr_q <= '0;
      pf_valid_q <= 1'b0;
      cap_sr_q <= '0;  pk_sr_q <= '0;  idx_q <= '0;  ptr_q <= '0;
      rk_q <= RK_NONE;  rd_addr_q <= '0;
      pkt_q <= '0;
      lp_act_q <= '0;  lp_cnt_q <= '0;  lp_m_q <= '0;  lp_rem_q <= '0;
      lp_pos_q <= '0;  lp_bun_q <= '0;
      trap_valid <= 1'b0;  trap_num <= '0;
      ev_loop_back <= 1'b0;  ev_bundle_swap <= 1'b0;  ev_redirect <= 1'b0;  ev_bubble <= 1'b0;
    end else begin
      state_q <= state_d;  tgt_q <= tgt_d;
      cur_q <= cur_d;  pf_q <= pf_d;  cur_addr_q <= cur_addr_d;  pf_addr_q <= pf_addr_d;
      pf_valid_q <= pf_valid_d;
      cap_sr_q <= cap_sr_d;  pk_sr_q <= pk_sr_d;  idx_q <= idx_d;  ptr_q <= ptr_d;
      rk_q <= rk_d;  rd_addr_q <= rd_addr_d;
      pkt_q <= pkt_d;
      lp_act_q <= lp_act_d;  lp_cnt_q <= lp_cnt_d;  lp_m_q <= lp_m_d;  lp_rem_q <= lp_rem_d;
      lp_pos_q <= lp_pos_d;  lp_bun_q <= lp_bun_d;
      trap_valid <= trap_d;  trap_num <= trap_num_d;
      ev_loop_back <= ev_lb;  ev_bundle_swap <= ev_bs;  ev_redirect <= ev_rd;
      ev_bubble <= !pkt_d.valid && state_q != S_FETCH;
    end
  end

  // Encoding rules the assembler must respect. A cap decoded in the cycle a
  // taken branch resolves is discarded, so it may hold anything (for
  // example the bundle after a subroutine's return).
  logic squash;
  assign squash = pkt_q.valid && pkt_q.br_en && br_taken;

  a_tail_len: assert property (@(posedge clk) disable iff (!rst_n)
      (state_q == S_RUN && k0 == CAP_PKT && !squash) |-> (tsum0 == int'(c0[3:0])))
    else $error("dispatcher: cap tail length differs from the sum of the head tail sizes");
  a_follow: assert property (@(posedge clk) disable iff (!rst_n)
      (state_q == S_RUN && !squash && k0 == CAP_CTL && (cop == CTL_RPT || cop == CTL_BNEZ || cop == CTL_JR))
      |-> (k1 == CAP_PKT))
    else $error("dispatcher: RPT/BNEZ/JR must be followed by a datapath packet in the same bundle");
  a_depth: assert property (@(posedge clk) disable iff (!rst_n)
      (state_q == S_RUN && k0 == CAP_CTL && cop == CTL_RPT && !squash)
      |-> !lp_act_q[LVL-1])
    else $error("dispatcher: more than two nested loops");
  a_br_field0: assert property (@(posedge clk) disable iff (!rst_n)
      (pkt_q.valid && pkt_q.br_en) |-> !pkt_q.ins[0].valid)
    else $error("dispatcher: the packet after BNEZ/JR must leave field 0 idle");
endmodule
