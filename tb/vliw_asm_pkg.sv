// vliw_asm_pkg: small assembler used by the testbenches to build
// instruction bundles in the hierarchical VLIW encoding of the DSP.
// A program is a list of 1024-bit bundles; caps are placed from bit 1023
// downward and packets (heads in field order, then tails) from bit 0
// upward, exactly as the dispatcher expects. Each instruction's immediate
// gets the shortest tail (0, 1, 2 or 4 bytes) that holds it. The helpers
// that add a dispatcher instruction together with the packet that follows
// it keep the two in one bundle, as the dispatcher requires.
package vliw_asm_pkg;
  import dsp_pkg::*;

  typedef struct {
    bit   v;
    op_e  op;
    int   rd, ra, rb;
    int   imm;
  } ai_t;

  function automatic ai_t I(op_e op, int rd = 0, int ra = 0, int rb = 0, int imm = 0);
    ai_t x;
    x.v = 1; x.op = op; x.rd = rd; x.ra = ra; x.rb = rb; x.imm = imm;
    return x;
  endfunction

  function automatic ai_t NOP();
    ai_t x;
    x.v = 0; x.op = OP_NOP; x.rd = 0; x.ra = 0; x.rb = 0; x.imm = 0;
    return x;
  endfunction

  function automatic int tsz_of(int imm);
    if (imm == 0) return 0;
    if (imm >= -128 && imm <= 127) return 1;
    if (imm >= -32768 && imm <= 32767) return 2;
    return 3;
  endfunction

  function automatic int tbytes(int tsz);
    return (tsz == 3) ? 4 : tsz;
  endfunction

  class program_t;
    logic [BUNDLE_W-1:0] bun [$];
    int ncap;     // caps in the open bundle
    int pptr;     // next free packet bit in the open bundle
    int packets;  // datapath packets written

    function new();
      bun.push_back('0);
      ncap = 0; pptr = 0; packets = 0;
    endfunction

    function int cur();
      return bun.size() - 1;
    endfunction

    // position of the next cap written
    function pos_t here();
      pos_t p;
      p.bundle = BADDR_W'(cur()); p.idx = PIDX_W'(ncap); p.ptr = PTR_W'(pptr);
      return p;
    endfunction

    function void new_bundle();
      bun.push_back('0);
      ncap = 0; pptr = 0;
    endfunction

    function bit fits(int caps, int bits);
      return (ncap + caps <= MAX_PKTS) && (pptr + bits <= BUNDLE_W - CAP_W * (ncap + caps) - 2);
    endfunction

    function void put_bits(logic [63:0] v, int n);
      logic [BUNDLE_W-1:0] b;
      b = bun[cur()];
      for (int k = 0; k < n; k++) b[pptr + k] = v[k];
      bun[cur()] = b;
      pptr += n;
    endfunction

    function void put_cap(logic [11:0] c);
      logic [BUNDLE_W-1:0] b;
      b = bun[cur()];
      b[BUNDLE_W - 1 - CAP_W * ncap -: CAP_W] = c;
      bun[cur()] = b;
      ncap++;
    endfunction

    function int pkt_bits(ai_t i[4]);
      int n;
      n = 0;
      foreach (i[f]) if (i[f].v) n += HEAD_W + 8 * tbytes(tsz_of(i[f].imm));
      return n;
    endfunction

    function void emit_pkt(int ring, ai_t i[4]);
      int tl;
      logic [11:0] c;
      tl = 0;
      c = '0;
      c[11:10] = CAP_PKT;
      c[5:4] = 2'(ring);
      foreach (i[f]) if (i[f].v) begin
        c[6+f] = 1'b1;
        tl += tbytes(tsz_of(i[f].imm));
      end
      if (tl > 15) $fatal(1, "packet tails exceed 15 bytes");
      c[3:0] = 4'(tl);
      put_cap(c);
      foreach (i[f]) if (i[f].v)
        put_bits({44'd0, 6'(i[f].op), 4'(i[f].rd), 4'(i[f].ra), 4'(i[f].rb), 2'(tsz_of(i[f].imm))}, HEAD_W);
      foreach (i[f]) if (i[f].v)
        put_bits(64'(i[f].imm), 8 * tbytes(tsz_of(i[f].imm)));
      packets++;
    endfunction

    // a datapath packet: ring offset and the four fields
    function pos_t pkt(int ring, ai_t i0, ai_t i1, ai_t i2, ai_t i3);
      ai_t i[4];
      i = '{i0, i1, i2, i3};
      if (!fits(1, pkt_bits(i))) new_bundle();
      pkt = here();
      emit_pkt(ring, i);
    endfunction

    function void ctl_only(ctl_op_e op, logic [63:0] tail, int nbytes);
      logic [11:0] c;
      c = '0;
      c[11:10] = CAP_CTL;
      c[9:7] = op;
      c[3:0] = 4'(nbytes);
      put_cap(c);
      put_bits(tail, 8 * nbytes);
    endfunction

    // dispatcher instruction followed by the packet issued with it
    function pos_t ctl_pkt(ctl_op_e op, logic [63:0] tail, int nbytes,
                           int ring, ai_t i0, ai_t i1, ai_t i2, ai_t i3);
      ai_t i[4];
      i = '{i0, i1, i2, i3};
      if (!fits(2, 8 * nbytes + pkt_bits(i))) new_bundle();
      ctl_pkt = here();
      ctl_only(op, tail, nbytes);
      emit_pkt(ring, i);
    endfunction

    function pos_t rpt(int n, int m, int ring, ai_t i0, ai_t i1, ai_t i2, ai_t i3);
      return ctl_pkt(CTL_RPT, {40'd0, 8'(m), 16'(n)}, 3, ring, i0, i1, i2, i3);
    endfunction

    function pos_t bnez(int r, pos_t tgt, int ring, ai_t i0, ai_t i1, ai_t i2, ai_t i3);
      return ctl_pkt(CTL_BNEZ, {28'd0, 4'(r), 2'b00, tgt}, 5, ring, i0, i1, i2, i3);
    endfunction

    function pos_t jr(int r, int ring, ai_t i0, ai_t i1, ai_t i2, ai_t i3);
      return ctl_pkt(CTL_JR, {60'd0, 4'(r)}, 1, ring, i0, i1, i2, i3);
    endfunction

    function pos_t jump(ctl_op_e op, pos_t tgt);
      if (!fits(1, 32)) new_bundle();
      jump = here();
      ctl_only(op, {34'd0, tgt}, 4);
    endfunction

    function pos_t trap(int num);
      if (!fits(1, 8)) new_bundle();
      trap = here();
      ctl_only(CTL_TRAP, 64'(num), 1);
    endfunction
  endclass
endpackage
