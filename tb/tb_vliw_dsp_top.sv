// tb_vliw_dsp_top: end-to-end test of the VLIW DSP at its default sizes.
// Program 1 is the software-pipelined 64-tap FIR filter: the two
// load/store fields fetch coefficient and input pairs with LW_D into the
// ring registers while the two ALU/MAC fields accumulate with MAC_V; ring
// offsets 0 and 2 alternate so each loaded pair reaches the ALU/MAC field of
// the next packet. Each pass of the outer loop produces two outputs and
// takes 35 packets (RPT costs no cycle), so NOUT outputs must take
// 3 + 35*NOUT/2 cycles. Program 2 then runs a BNEZ count-down loop, a jump,
// a complex multiply and a 32-bit multiply on the enhanced field, and ends
// with TRAP. Results are compared with a reference computed here: 40-bit
// accumulation and saturation to 32 bits. The test also counts loop-backs,
// bundle swaps, redirects, taken branches, saturations, multiplier
// borrowing and non-zero ring offsets, and fails if any never happened.
module tb_vliw_dsp_top;
  import dsp_pkg::*;
  import vliw_asm_pkg::*;

  localparam int NOUT  = 1024;
  localparam int TAPS  = 64;
  localparam int COEF  = 16'h0100;
  localparam int XA    = 16'h0200;
  localparam int YA    = 16'h1000;
  localparam int MAXCYC = 40000;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  logic imem_we = 0;
  logic [7:0] imem_waddr = '0;
  logic [BUNDLE_W-1:0] imem_wdata = '0;
  logic dmem_host_en = 0, dmem_host_we = 0;
  logic [HADDR_W-1:0] dmem_host_addr = '0;
  logic [15:0] dmem_host_wdata = '0, dmem_host_rdata;
  logic trap_valid, cycle_issue, ev_loop_back, ev_bundle_swap, ev_redirect, ev_bubble, ev_branch_taken;
  logic [7:0] trap_num;

  vliw_dsp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_lb = 0, n_bs = 0, n_rd = 0, n_bt = 0, n_borrow = 0, n_ring = 0, n_issue = 0;
  int cyc = 0;
  int first_issue = -1, fir_issue = 0, fir_cycles = 0, fir_bubbles = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (first_issue >= 0 && n_rd == 0 && !ev_redirect) begin
      fir_cycles++;
      if (cycle_issue) fir_issue++;
      else fir_bubbles++;
    end else if (first_issue < 0 && cycle_issue) begin
      fir_cycles++;
      fir_issue++;
    end
    if (ev_loop_back)    n_lb++;
    if (ev_bundle_swap)  n_bs++;
    if (ev_redirect)     n_rd++;
    if (ev_branch_taken) n_bt++;
    if (dut.b2_en)       n_borrow++;
    if (cycle_issue) begin
      n_issue++;
      if (first_issue < 0) first_issue = cyc;
      if (dut.pkt.ring_off != 2'd0) n_ring++;
    end
  end

  initial begin : watchdog
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [15:0] c [TAPS];
  logic signed [15:0] x [NOUT + TAPS];
  program_t prog, idle;
  pos_t lp, p2;
  int n_sat = 0;

  function automatic logic [31:0] ref_y(int n, output bit sat);
    logic signed [39:0] a0, a1, s;
    a0 = 0; a1 = 0;
    for (int k = 0; k < TAPS; k += 2) begin
      a0 += 40'(c[k] * x[n + k]);
      a1 += 40'(c[k + 1] * x[n + k + 1]);
    end
    s = a0 + a1;
    sat = (s > 40'sh7FFFFFFF) || (s < -40'sh80000000);
    return sat32(s);
  endfunction

  initial begin
    logic [31:0] y, e;
    bit sat;
    logic [39:0] r;
    // ---------------- data
    for (int k = 0; k < TAPS; k++) c[k] = 16'($urandom);
    for (int k = 0; k < NOUT + TAPS; k++) x[k] = 16'($urandom);
    // a stretch of full-scale inputs so that some outputs saturate
    for (int k = 40; k < 140; k++) x[k] = (c[k % TAPS] < 0) ? -16'sd32768 : 16'sd32767;

    // ---------------- program 1: FIR (64 taps, NOUT outputs)
    prog = new();
    void'(prog.pkt(0, I(OP_MOV32, 0, 0, 0, COEF), I(OP_MOV32, 0, 0, 0, COEF),
                      I(OP_MOV32, 0, 0, 0, 0),    I(OP_MOV32, 0, 0, 0, 0)));
    void'(prog.pkt(0, I(OP_MOV32, 1, 0, 0, XA), I(OP_MOV32, 1, 0, 0, XA + 1), NOP(), NOP()));
    void'(prog.pkt(0, I(OP_MOV32, 2, 0, 0, YA), I(OP_MOV32, 2, 0, 0, YA + 2), NOP(), NOP()));
    void'(prog.rpt(NOUT / 2, 8, 0, I(OP_LW_D, 8, 0, 9, 2), I(OP_LW_D, 8, 0, 9, 2),
                   I(OP_MOV32, 1, 0, 0, 0), I(OP_MOV32, 1, 0, 0, 0)));
    void'(prog.rpt(15, 2, 2, I(OP_LW_D, 8, 0, 9, 2), I(OP_LW_D, 8, 0, 9, 2),
                   I(OP_MAC_V, 0, 8, 9), I(OP_MAC_V, 0, 8, 9)));
    void'(prog.pkt(0, I(OP_LW_D, 8, 0, 9, 2), I(OP_LW_D, 8, 0, 9, 2),
                      I(OP_MAC_V, 0, 8, 9), I(OP_MAC_V, 0, 8, 9)));
    void'(prog.pkt(2, I(OP_LW_D, 8, 0, 9, 2), I(OP_LW_D, 8, 0, 9, 2),
                      I(OP_MAC_V, 0, 8, 9), I(OP_MAC_V, 0, 8, 9)));
    void'(prog.pkt(0, I(OP_MOV32, 0, 0, 0, COEF), I(OP_MOV32, 0, 0, 0, COEF),
                      I(OP_MAC_V, 0, 8, 9), I(OP_MAC_V, 0, 8, 9)));
    void'(prog.pkt(0, I(OP_ADDI, 1, 1, 0, -62), I(OP_ADDI, 1, 1, 0, -62),
                      I(OP_ADD, 8, 0, 1), I(OP_ADD, 8, 0, 1)));
    void'(prog.pkt(2, I(OP_SW, 8, 2, 0, 4), I(OP_SW, 8, 2, 0, 4),
                      I(OP_MOV32, 0, 0, 0, 0), I(OP_MOV32, 0, 0, 0, 0)));
    // ---------------- program 2: jump to a fresh bundle, BNEZ loop, CMUL, MUL32
    p2.bundle = BADDR_W'(prog.cur() + 2); p2.idx = '0; p2.ptr = '0;
    void'(prog.jump(CTL_J, p2));
    prog.new_bundle();
    void'(prog.pkt(0, I(OP_MOV32, 3, 0, 0, 77), NOP(), NOP(), NOP()));   // skipped
    prog.new_bundle();
    void'(prog.pkt(0, I(OP_MOV32, 3, 0, 0, 3), NOP(), NOP(), I(OP_MOV32, 4, 0, 0, 0)));
    void'(prog.pkt(2, I(OP_MOV32, 8, 0, 0, 32'h0003_0004), I(OP_MOV32, 8, 0, 0, 32'h1234_5678),
                      NOP(), I(OP_MOV32, 5, 0, 0, 0)));
    void'(prog.pkt(2, I(OP_MOV32, 9, 0, 0, 32'h0005_FFFE), I(OP_MOV32, 9, 0, 0, -32'sd987654), NOP(), NOP()));
    lp = prog.pkt(0, I(OP_ADDI, 3, 3, 0, -1), NOP(), I(OP_CMUL, 2, 8, 9), I(OP_ADDI, 4, 4, 0, 1));
    void'(prog.bnez(3, lp, 0, NOP(), NOP(), I(OP_MUL32, 4, 8, 9), I(OP_ADDI, 5, 5, 0, 1)));
    void'(prog.trap(200));

    // ---------------- load memories
    rst_n = 0;
    for (int b = 0; b < prog.bun.size(); b++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 8'(b); imem_wdata = prog.bun[b];
    end
    // bundle 200: the trap vector, a jump to itself
    idle = new();
    p2.bundle = 200; p2.idx = '0; p2.ptr = '0;
    void'(idle.jump(CTL_J, p2));
    @(negedge clk);
    imem_we = 1; imem_waddr = 8'd200; imem_wdata = idle.bun[0];
    @(negedge clk);
    imem_we = 0;
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk);
      dmem_host_en = 1; dmem_host_we = 1; dmem_host_addr = HADDR_W'(COEF + k); dmem_host_wdata = c[k];
    end
    for (int k = 0; k < NOUT + TAPS; k++) begin
      @(negedge clk);
      dmem_host_en = 1; dmem_host_we = 1; dmem_host_addr = HADDR_W'(XA + k); dmem_host_wdata = x[k];
    end
    @(negedge clk);
    dmem_host_en = 0; dmem_host_we = 0;
    $display("program: %0d bundles, %0d packets", prog.bun.size(), prog.packets);

    // ---------------- run
    @(negedge clk);
    rst_n = 1;
    wait (trap_valid);
    @(negedge clk);
    check(trap_num == 8'd200, "trap number");

    // FIR outputs
    for (int n = 0; n < NOUT; n++) begin
      dmem_host_en = 1; dmem_host_addr = HADDR_W'(YA + 2 * n);
      #1; y[31:16] = dmem_host_rdata;
      dmem_host_addr = HADDR_W'(YA + 2 * n + 1);
      #1; y[15:0] = dmem_host_rdata;
      e = ref_y(n, sat);
      if (sat) n_sat++;
      check(y == e, $sformatf("y[%0d] = %h, expected %h", n, y, e));
    end
    dmem_host_en = 0;

    // Program 2 results (field 0 private r3, field 3 private r4/r5, field 2 r2/r3)
    check(dut.u_rf.g_blk[0].u_local.regs[3] == 32'd0, "BNEZ counter reached zero");
    check(dut.u_rf.g_blk[3].u_local.regs[4] == 40'd3, "loop body ran 3 times");
    check(dut.u_rf.g_blk[3].u_local.regs[5] == 40'd3, "packet issued with BNEZ ran 3 times");
    // CMUL: a = 3 + 4j, b = 5 - 2j -> re = 15 + 8 = 23, im = -6 + 20 = 14
    check(dut.u_rf.g_blk[2].u_local.regs[2] == 40'd23, "CMUL real part");
    check(dut.u_rf.g_blk[2].u_local.regs[3] == 40'd14, "CMUL imaginary part");
    r = 40'(64'sh0003_0004 * 64'sh0005_FFFE);   // a, b as 32-bit numbers
    check(dut.u_rf.g_blk[2].u_local.regs[4] == r, $sformatf("MUL32 = %h, expected %h",
          dut.u_rf.g_blk[2].u_local.regs[4], r));

    // FIR timing: 3 set-up packets + 35 per two outputs, with no empty
    // cycle until the jump that leaves the filter
    $display("FIR: %0d packets in %0d cycles, %0d empty cycles", fir_issue, fir_cycles, fir_bubbles);
    check(fir_issue == 3 + 35 * NOUT / 2, $sformatf("FIR packet count %0d", fir_issue));
    check(fir_bubbles == 0, "FIR loop lost cycles");
    check(n_issue == 3 + 35 * NOUT / 2 + 9, $sformatf("total packet count %0d", n_issue));

    // Every mechanism must have happened.
    check(n_lb > 0, "loop-back never happened");
    check(n_bs > 0, "bundle swap never happened");
    check(n_rd > 0, "redirect never happened");
    check(n_bt > 0, "taken branch never happened");
    check(n_sat > 0, "no output saturated");
    check(n_borrow > 0, "multiplier borrowing never happened");
    check(n_ring > 0, "non-zero ring offset never used");
    $display("events: loop-backs %0d, bundle swaps %0d, redirects %0d, taken branches %0d, saturations %0d, borrows %0d",
             n_lb, n_bs, n_rd, n_bt, n_sat, n_borrow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
