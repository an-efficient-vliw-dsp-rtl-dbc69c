// tb_instruction_dispatcher: runs the dispatcher on the instruction memory
// with a program built by the test assembler. Every datapath packet carries
// a tag (MOV32 r1,tag in field 1) and ring offset tag mod 4; the test
// checks that the tags come out in the order the control flow prescribes:
// straight-line packets across several bundle boundaries, an RPT loop, two
// nested RPT loops, two loops whose bodies span two bundles (one starting
// on the last packet of a bundle), JAL into a subroutine and JR back
// through the link in r7, a BNEZ count-down loop, a jump to a bundle that
// must be fetched, and TRAP. Field-0 registers needed
// by BNEZ/JR are modelled here as the datapath would hold them. One packet
// is checked field by field (heads and tails of all four fields). No empty
// cycle may appear before the first jump: RPT, loop-backs and bundle swaps
// must cost nothing.
module tb_instruction_dispatcher;
  import dsp_pkg::*;
  import vliw_asm_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  logic imem_re, imem_we = 0;
  logic [7:0] imem_raddr, imem_waddr = '0;
  logic [1023:0] imem_rdata, imem_wdata = '0;
  packet_t pkt;
  logic br_taken;
  pos_t br_target;
  logic trap_valid;
  logic [7:0] trap_num;
  logic ev_loop_back, ev_bundle_swap, ev_redirect, ev_bubble;

  inst_mem #(.BUNDLES(256), .BUNDLE_W(1024)) u_imem (
    .clk, .re(imem_re), .raddr(imem_raddr), .rdata(imem_rdata),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata));
  instruction_dispatcher #(.IMEM_AW(8)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int exp_tags [$];
  int got_tags [$];
  int n_lb = 0, n_bs = 0, n_rd = 0, bubbles_early = 0, started = 0, redirected = 0;
  logic [31:0] r0f [8];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // field-0 registers as the datapath would hold them
  assign br_taken  = pkt.valid && pkt.br_en && (pkt.br_is_jr || r0f[pkt.br_reg[2:0]] != 0);
  assign br_target = pkt.br_is_jr ? pos_t'(r0f[pkt.br_reg[2:0]][29:0]) : pkt.br_target;

  always @(posedge clk) if (rst_n) begin
    if (pkt.valid) begin
      started = 1;
      if (pkt.ins[0].valid && pkt.ins[0].op == OP_MOV32) r0f[pkt.ins[0].rd[2:0]] <= pkt.ins[0].imm;
      if (pkt.ins[0].valid && pkt.ins[0].op == OP_ADDI)
        r0f[pkt.ins[0].rd[2:0]] <= r0f[pkt.ins[0].ra[2:0]] + pkt.ins[0].imm;
      got_tags.push_back(int'(pkt.ins[1].imm));
      if (pkt.ring_off != 2'(pkt.ins[1].imm)) begin
        failures++; $display("FAIL: ring offset of tag %0d", pkt.ins[1].imm);
      end
      checks++;
      if (pkt.ins[1].imm == 2) begin
        check(pkt.ins[0].valid && pkt.ins[0].op == OP_ADDI && pkt.ins[0].rd == 1 && pkt.ins[0].ra == 2
              && pkt.ins[0].imm == -32'sd300, "field 0 of the full packet");
        check(pkt.ins[2].valid && pkt.ins[2].op == OP_MUL && pkt.ins[2].rd == 3 && pkt.ins[2].ra == 9
              && pkt.ins[2].rb == 10 && pkt.ins[2].imm == 0, "field 2 of the full packet");
        check(pkt.ins[3].valid && pkt.ins[3].op == OP_MOV32 && pkt.ins[3].rd == 5
              && pkt.ins[3].imm == 32'h1234_5678, "field 3 of the full packet");
      end
    end
    if (pkt.link_we) r0f[7] <= pkt.link_val;
    if (ev_redirect) redirected = 1;
    if (started && !redirected && !ev_redirect && !pkt.valid) bubbles_early++;
    if (ev_loop_back) n_lb++;
    if (ev_bundle_swap) n_bs++;
    if (ev_redirect) n_rd++;
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ai_t T(int tag);
    return I(OP_MOV32, 1, 0, 0, tag);
  endfunction
  function automatic ai_t BIG(int v);
    return I(OP_MOV32, 2, 0, 0, v);
  endfunction

  program_t p, far, handler;
  pos_t sub, lp, tgt;

  initial begin
    foreach (r0f[i]) r0f[i] = '0;
    p = new();
    // straight line, one fully populated packet
    void'(p.pkt(1, NOP(), T(1), NOP(), NOP()));                         exp_tags.push_back(1);
    void'(p.pkt(2, I(OP_ADDI, 1, 2, 0, -300), T(2), I(OP_MUL, 3, 9, 10), I(OP_MOV32, 5, 0, 0, 32'h1234_5678)));
    exp_tags.push_back(2);
    // RPT 3,2
    void'(p.rpt(3, 2, 10 % 4, NOP(), T(10), NOP(), NOP()));
    void'(p.pkt(11 % 4, NOP(), T(11), NOP(), NOP()));
    repeat (3) begin exp_tags.push_back(10); exp_tags.push_back(11); end
    // nested: outer RPT 2,4 {20, RPT 2,1 {21}, 22}
    void'(p.rpt(2, 4, 20 % 4, NOP(), T(20), NOP(), NOP()));
    void'(p.rpt(2, 1, 21 % 4, NOP(), T(21), NOP(), NOP()));
    void'(p.pkt(22 % 4, NOP(), T(22), NOP(), NOP()));
    repeat (2) begin exp_tags.push_back(20); exp_tags.push_back(21); exp_tags.push_back(21); exp_tags.push_back(22); end
    // long straight line over several bundles
    for (int k = 30; k < 50; k++) begin
      void'(p.pkt(k % 4, NOP(), T(k), BIG(32'h7000_0000 + k), BIG(32'h6000_0000 + k)));
      exp_tags.push_back(k);
    end
    // loop whose body crosses a bundle boundary
    // filler packets (tag 0) so that the next loop body crosses into the next bundle
    while (p.fits(7, 24 + 6 * 132)) void'(p.pkt(0, NOP(), T(0), BIG(32'h5000_0000), BIG(32'h5000_0001)));
    lp = p.rpt(2, 8, 60 % 4, NOP(), T(60), BIG(32'h5000_0000), BIG(32'h4000_0000));
    for (int k = 61; k < 68; k++) tgt = p.pkt(k % 4, NOP(), T(k), BIG(32'h5000_0000 + k), BIG(32'h4000_0000 + k));
    check(tgt.bundle != lp.bundle, "loop body spans two bundles");
    // a loop whose first bundle holds only the RPT packet: the second bundle
    // must still be ready when the next pass reaches it
    while (p.fits(3, 24 + 2 * 132)) void'(p.pkt(0, NOP(), T(0), BIG(32'h5000_0000), BIG(32'h5000_0001)));
    lp = p.rpt(3, 2, 62 % 4, NOP(), T(62), BIG(32'h5000_0000), BIG(32'h4000_0000));
    tgt = p.pkt(63 % 4, NOP(), T(63), BIG(32'h5000_0063), BIG(32'h4000_0063));
    check(tgt.bundle == lp.bundle + 1 && tgt.idx == 0, "second loop starts on the last packet of a bundle");
    // JAL to a subroutine two bundles ahead, then continue
    sub.bundle = BADDR_W'(p.cur() + 2); sub.idx = '0; sub.ptr = '0;
    void'(p.jump(CTL_JAL, sub));
    void'(p.pkt(70 % 4, NOP(), T(70), NOP(), NOP()));
    // BNEZ count-down: r3 = 2; L: r3 -= 1; BNEZ r3, L with the next packet
    void'(p.pkt(90 % 4, I(OP_MOV32, 3, 0, 0, 2), T(90), NOP(), NOP()));
    lp = p.pkt(91 % 4, I(OP_ADDI, 3, 3, 0, -1), T(91), NOP(), NOP());
    void'(p.bnez(3, lp, 92 % 4, NOP(), T(92), NOP(), NOP()));
    // jump far away
    tgt.bundle = 15'd100; tgt.idx = '0; tgt.ptr = '0;
    void'(p.jump(CTL_J, tgt));
    // subroutine
    p.new_bundle();
    p.new_bundle();
    void'(p.pkt(80 % 4, NOP(), T(80), NOP(), NOP()));
    void'(p.jr(7, 81 % 4, NOP(), T(81), NOP(), NOP()));
    // bundle 100: last packet and TRAP
    far = new();
    void'(far.pkt(100 % 4, NOP(), T(100), NOP(), NOP()));
    void'(far.trap(9));
    // bundle 9: the trap handler, a jump to itself
    handler = new();
    tgt.bundle = 15'd9;
    void'(handler.jump(CTL_J, tgt));

    // expected tags after the filler packets
    repeat (2) for (int k = 60; k < 68; k++) exp_tags.push_back(k);
    repeat (3) begin exp_tags.push_back(62); exp_tags.push_back(63); end
    exp_tags.push_back(80); exp_tags.push_back(81);
    exp_tags.push_back(70); exp_tags.push_back(90);
    exp_tags.push_back(91); exp_tags.push_back(92); exp_tags.push_back(91); exp_tags.push_back(92);
    exp_tags.push_back(100);

    for (int b = 0; b < p.bun.size(); b++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 8'(b); imem_wdata = p.bun[b];
    end
    @(negedge clk);
    imem_we = 1; imem_waddr = 8'd9; imem_wdata = handler.bun[0];
    @(negedge clk);
    imem_we = 1; imem_waddr = 8'd100; imem_wdata = far.bun[0];
    for (int b = 101; b < 103; b++) begin
      @(negedge clk);
      imem_waddr = 8'(b); imem_wdata = '0;
    end
    @(negedge clk);
    imem_we = 0;
    rst_n = 1;
    wait (trap_valid);
    check(trap_num == 8'd9, "trap number");
    repeat (3) @(negedge clk);
    // filler packets carry tag 0: drop them from the comparison
    begin
      int g [$];
      foreach (got_tags[i]) if (got_tags[i] != 0) g.push_back(got_tags[i]);
      check(g.size() == exp_tags.size(), $sformatf("%0d tagged packets, expected %0d", g.size(), exp_tags.size()));
      for (int i = 0; i < exp_tags.size() && i < g.size(); i++)
        check(g[i] == exp_tags[i], $sformatf("packet %0d tag %0d, expected %0d", i, g[i], exp_tags[i]));
    end
    check(bubbles_early == 0, $sformatf("%0d empty cycles before the first jump", bubbles_early));
    check(n_lb > 0 && n_bs > 0 && n_rd > 0, "loop-back, bundle swap and redirect all seen");
    $display("bundles %0d, loop-backs %0d, bundle swaps %0d, redirects %0d", p.bun.size(), n_lb, n_bs, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
