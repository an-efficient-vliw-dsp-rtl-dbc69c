// tb_fft256: 256-point radix-2 decimation-in-time FFT on the full processor
// at its default sizes. Complex samples are 16-bit {re, im} pairs, one per
// 32-bit word (real part at the lower half-word address); the input is
// stored in bit-reversed order, the transform is computed in place, and
// twiddle factors W^m = cos(2 pi m/256) - j sin(2 pi m/256), m < 128, are
// held in Q15.
//
// One butterfly takes five packets, using one shared ring block for all of
// its data (the ring offset moves it between the fields):
//   off 0  field 0  LW_D r8,r11,(r0)+2      x[a], x[b]  (r0/r1 point at a/b)
//   off 3  field 1  LW   r9,(r0)+2G         twiddle     (field 1's r0)
//   off 2  field 2  CMUL_16V r10,r11,r9     t = x[b] * W (borrows field 3's
//                                           multipliers)
//   off 2  field 2  BF2 r12,r8,r10          x[a] + t, x[a] - t
//   off 0  field 0  SW_D (r2)+2,r12,r13     stored in place (r2/r3)
// Each stage runs an outer RPT over its G groups (four pointer-adjust
// packets and the inner RPT) and an inner RPT over the half butterflies of a
// group; both loops end on the same packet. Four set-up packets start each
// stage, so the whole transform issues 8*4 + 4*255 + 5*1024 = 6172 packets
// with no empty cycle, which the test checks.
//
// The result is compared bit for bit with an integer model of the same
// arithmetic (products truncated to Q15, 16-bit lane sums that wrap; the
// input amplitude keeps every sum in range) and, within a small tolerance
// for the truncation, with a floating-point DFT of the input.
module tb_fft256;
  import dsp_pkg::*;
  import vliw_asm_pkg::*;

  localparam int N      = 256;
  localparam int D      = 16'h0200;   // data, 2 half-words per point
  localparam int T      = 16'h0600;   // twiddles, 2 half-words each
  localparam int AMP    = 100;        // |re|, |im| of the input
  localparam int EXPECT_ISSUE = 8 * 4 + 4 * 255 + 5 * 1024;
  localparam int MAXCYC = 12000;
  localparam real PI    = 3.14159265358979;
  // Products are truncated to Q15 and the twiddle for angle 0 is 32767/32768,
  // so every stage can lose up to one unit per butterfly on the path to a
  // bin: at most 1 + 2 + ... + 128 = 255 units after eight stages.
  localparam real TOL   = 256.0;

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
  real max_err = 0.0;
  int n_issue = 0, n_bubble = 0, n_lb = 0, n_borrow = 0, started = 0, done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && !done) begin
    if (cycle_issue) begin
      started = 1;
      n_issue++;
    end else if (started && !trap_valid) n_bubble++;
    if (ev_loop_back) n_lb++;
    if (dut.b2_en) n_borrow++;
    if (trap_valid) done = 1;
  end

  initial begin : watchdog
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitrev8(int n);
    int r;
    r = 0;
    for (int i = 0; i < 8; i++) if (n[i]) r |= 1 << (7 - i);
    return r;
  endfunction

  function automatic int q15(real v);
    return (v >= 0.0) ? $rtoi(v * 32767.0 + 0.5) : -$rtoi(-v * 32767.0 + 0.5);
  endfunction

  // Q15 complex product with the truncation of the datapath: bits [30:15]
  function automatic logic [31:0] cmul16(logic [31:0] a, logic [31:0] w);
    longint re, im;
    logic [63:0] ur, ui;
    re = longint'($signed(a[31:16])) * longint'($signed(w[31:16]))
       - longint'($signed(a[15:0]))  * longint'($signed(w[15:0]));
    im = longint'($signed(a[31:16])) * longint'($signed(w[15:0]))
       + longint'($signed(a[15:0]))  * longint'($signed(w[31:16]));
    ur = re; ui = im;
    return {ur[30:15], ui[30:15]};
  endfunction

  logic [31:0] xin [N];
  logic [31:0] ref_x [N];
  logic [31:0] tw [N/2];
  program_t prog, handler;
  pos_t self_pos;

  task automatic host_wr(int a, logic [15:0] v);
    @(negedge clk);
    dmem_host_en = 1; dmem_host_we = 1; dmem_host_addr = HADDR_W'(a); dmem_host_wdata = v;
  endtask

  initial begin
    // input and twiddles
    for (int n = 0; n < N; n++) begin
      int re, im;
      re = int'($urandom_range(2 * AMP)) - AMP;
      im = int'($urandom_range(2 * AMP)) - AMP;
      xin[n] = {16'(re), 16'(im)};
    end
    for (int m = 0; m < N / 2; m++)
      tw[m] = {16'(q15($cos(2.0 * PI * m / N))),
               16'(q15(-$sin(2.0 * PI * m / N)))};

    // integer model of the in-place transform
    for (int n = 0; n < N; n++) ref_x[bitrev8(n)] = xin[n];
    for (int s = 0; s < 8; s++) begin
      int half;
      half = 1 << s;
      for (int g = 0; g < N; g += 2 * half)
        for (int k = 0; k < half; k++) begin
          logic [31:0] a, t;
          a = ref_x[g + k];
          t = cmul16(ref_x[g + k + half], tw[k * (N / 2 / half)]);
          ref_x[g + k]        = {16'(a[31:16] + t[31:16]), 16'(a[15:0] + t[15:0])};
          ref_x[g + k + half] = {16'(a[31:16] - t[31:16]), 16'(a[15:0] - t[15:0])};
        end
    end

    // program
    prog = new();
    for (int s = 0; s < 8; s++) begin
      int half, g;
      half = 1 << s;
      g = N / 2 / half;
      void'(prog.pkt(0, I(OP_MOV32, 0, 0, 0, D - 2 * half), NOP(), NOP(), NOP()));
      void'(prog.pkt(0, I(OP_MOV32, 1, 0, 0, D),            NOP(), NOP(), NOP()));
      void'(prog.pkt(0, I(OP_MOV32, 2, 0, 0, D - 2 * half), NOP(), NOP(), NOP()));
      void'(prog.pkt(0, I(OP_MOV32, 3, 0, 0, D),            NOP(), NOP(), NOP()));
      void'(prog.rpt(g, 10, 0, I(OP_ADDI, 0, 0, 0, 2 * half), I(OP_MOV32, 0, 0, 0, T), NOP(), NOP()));
      void'(prog.pkt(0, I(OP_ADDI, 1, 1, 0, 2 * half), NOP(), NOP(), NOP()));
      void'(prog.pkt(0, I(OP_ADDI, 2, 2, 0, 2 * half), NOP(), NOP(), NOP()));
      void'(prog.pkt(0, I(OP_ADDI, 3, 3, 0, 2 * half), NOP(), NOP(), NOP()));
      void'(prog.rpt(half, 5, 0, I(OP_LW_D, 8, 0, 11, 2), NOP(), NOP(), NOP()));
      void'(prog.pkt(3, NOP(), I(OP_LW, 9, 0, 0, 2 * g), NOP(), NOP()));
      void'(prog.pkt(2, NOP(), NOP(), I(OP_CMUL_16V, 10, 11, 9), NOP()));
      void'(prog.pkt(2, NOP(), NOP(), I(OP_BF2, 12, 8, 10), NOP()));
      void'(prog.pkt(0, I(OP_SW_D, 12, 2, 13, 2), NOP(), NOP(), NOP()));
    end
    void'(prog.trap(200));
    // bundle 200: the trap handler, a jump to itself
    handler = new();
    self_pos = '0;
    self_pos.bundle = 15'd200;
    void'(handler.jump(CTL_J, self_pos));

    for (int b = 0; b < prog.bun.size(); b++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 8'(b); imem_wdata = prog.bun[b];
    end
    @(negedge clk);
    imem_waddr = 8'd200; imem_wdata = handler.bun[0];
    @(negedge clk);
    imem_we = 0;
    for (int n = 0; n < N; n++) begin
      host_wr(D + 2 * bitrev8(n),     xin[n][31:16]);
      host_wr(D + 2 * bitrev8(n) + 1, xin[n][15:0]);
    end
    for (int m = 0; m < N / 2; m++) begin
      host_wr(T + 2 * m,     tw[m][31:16]);
      host_wr(T + 2 * m + 1, tw[m][15:0]);
    end
    @(negedge clk);
    dmem_host_en = 0; dmem_host_we = 0;
    rst_n = 1;

    wait (trap_valid);
    repeat (3) @(negedge clk);
    check(trap_num == 8'd200, "trap number");

    // read back and compare
    dmem_host_en = 1;
    for (int k = 0; k < N; k++) begin
      logic [31:0] got;
      logic signed [15:0] gr, gi;
      real dr, di, er, ei;
      dmem_host_addr = HADDR_W'(D + 2 * k);     #1 got[31:16] = dmem_host_rdata;
      dmem_host_addr = HADDR_W'(D + 2 * k + 1); #1 got[15:0]  = dmem_host_rdata;
      check(got == ref_x[k], $sformatf("X[%0d] = %h, model %h", k, got, ref_x[k]));
      dr = 0.0; di = 0.0;
      for (int n = 0; n < N; n++) begin
        real c, sn, xr, xi;
        logic signed [15:0] vr, vi;
        vr = xin[n][31:16];
        vi = xin[n][15:0];
        c  = $cos(2.0 * PI * ((k * n) % N) / N);
        sn = $sin(2.0 * PI * ((k * n) % N) / N);
        xr = $itor(vr);
        xi = $itor(vi);
        dr += xr * c + xi * sn;
        di += xi * c - xr * sn;
      end
      gr = got[31:16];
      gi = got[15:0];
      er = $itor(gr) - dr;
      ei = $itor(gi) - di;
      if (er < 0.0) er = -er;
      if (ei < 0.0) ei = -ei;
      if (er > max_err) max_err = er;
      if (ei > max_err) max_err = ei;
      check(er <= TOL && ei <= TOL,
            $sformatf("X[%0d] = (%0d, %0d), DFT (%f, %f)", k, gr, gi, dr, di));
      @(negedge clk);
    end
    dmem_host_en = 0;

    check(n_issue == EXPECT_ISSUE, $sformatf("%0d packets issued, expected %0d", n_issue, EXPECT_ISSUE));
    check(n_bubble == 0, $sformatf("%0d empty cycles", n_bubble));
    check(n_borrow == 1024, $sformatf("%0d multiplier borrows, expected 1024", n_borrow));
    check(n_lb == 8 * 127, $sformatf("%0d loop-backs", n_lb));
    $display("FFT: %0d bundles, %0d packets, %0d empty cycles, %0d loop-backs, %0d borrows, largest error against the DFT %f",
             prog.bun.size(), n_issue, n_bubble, n_lb, n_borrow, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
