// tb_me_sad: motion-estimation kernel on the full processor at its default
// sizes: the sum of absolute differences between a 16x16 block and one
// candidate position inside a 48x48 search window. Pixels are 8-bit values
// held one per half-word; the block is stored row after row (stride 16), the
// window with stride 48, and the candidate offset (dx, dy) is random.
//
// Each of fields 0 and 1 loads a pixel pair of the block and of the
// candidate with one LW_D (two pointers, r0 block and r1 window); fields 2
// and 3 take the lane differences (SUB_V), their magnitudes (ABS_V) and add
// them to a private accumulator (ADD_V). Loads are software-pipelined
// against the arithmetic by alternating between ring blocks 0/1 and 2/3:
//   off 2  f0,f1 LW_D -> B2,B3    f2,f3 SUB_V r2,r8,r9 from B0,B1
//          f2,f3 ABS_V r2,r2
//          f2,f3 ADD_V r3,r3,r2
//   off 0  f0,f1 LW_D -> B0,B1    f2,f3 SUB_V r2,r8,r9 from B2,B3
//          f2,f3 ABS_V r2,r2
//          f2,f3 ADD_V r3,r3,r2
// Eight pixels per six cycles. A row is an outer RPT pass: one loading
// packet, two passes of the six-packet inner RPT, and two ADDI packets that
// move the pointers to the next row. The two accumulators are merged at the
// end and stored as one word, {even-pixel sum, odd-pixel sum}. The stored
// lanes, their total and the cycle count are checked.
module tb_me_sad;
  import dsp_pkg::*;
  import vliw_asm_pkg::*;

  localparam int B      = 16;        // block size
  localparam int W      = 48;        // window size
  localparam int CB     = 16'h1000;  // block
  localparam int RW     = 16'h2000;  // window
  localparam int RES    = 16'h0100;  // result word
  localparam int EXPECT_ISSUE = 3 + B * (1 + 12 + 2) + 3;
  localparam int MAXCYC = 20000;

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
  int n_issue = 0, n_bubble = 0, n_lb = 0, started = 0, done = 0;

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
    if (trap_valid) done = 1;
  end

  initial begin : watchdog
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int blk [B*B];
  int win [W*W];
  int dx, dy, rb, sad_even, sad_odd;
  logic [15:0] got_hi, got_lo;
  program_t prog, handler;
  pos_t self_pos;

  task automatic host_wr(int a, logic [15:0] v);
    @(negedge clk);
    dmem_host_en = 1; dmem_host_we = 1; dmem_host_addr = HADDR_W'(a); dmem_host_wdata = v;
  endtask

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  initial begin
    for (int i = 0; i < B * B; i++) blk[i] = int'($urandom_range(255));
    for (int i = 0; i < W * W; i++) win[i] = int'($urandom_range(255));
    dx = int'($urandom_range(W - B));
    dy = int'($urandom_range(W - B));
    rb = RW + dy * W + dx;

    // model
    sad_even = 0; sad_odd = 0;
    for (int y = 0; y < B; y++)
      for (int x = 0; x < B; x++) begin
        int d;
        d = iabs(blk[y * B + x] - win[(y + dy) * W + x + dx]);
        if (x % 2 == 0) sad_even += d; else sad_odd += d;
      end

    // program
    prog = new();
    void'(prog.pkt(0, I(OP_MOV32, 0, 0, 0, CB), I(OP_MOV32, 0, 0, 0, CB + 2), NOP(), NOP()));
    void'(prog.pkt(0, I(OP_MOV32, 1, 0, 0, rb), I(OP_MOV32, 1, 0, 0, rb + 2), NOP(), NOP()));
    void'(prog.pkt(2, I(OP_MOV32, 2, 0, 0, RES), NOP(), I(OP_SUB_V, 3, 3, 3), I(OP_SUB_V, 3, 3, 3)));
    void'(prog.rpt(B, 10, 0, I(OP_LW_D, 8, 0, 9, 4), I(OP_LW_D, 8, 0, 9, 4), NOP(), NOP()));
    void'(prog.rpt(B / 8, 6, 2, I(OP_LW_D, 8, 0, 9, 4), I(OP_LW_D, 8, 0, 9, 4),
                   I(OP_SUB_V, 2, 8, 9), I(OP_SUB_V, 2, 8, 9)));
    void'(prog.pkt(0, NOP(), NOP(), I(OP_ABS_V, 2, 2), I(OP_ABS_V, 2, 2)));
    void'(prog.pkt(0, NOP(), NOP(), I(OP_ADD_V, 3, 3, 2), I(OP_ADD_V, 3, 3, 2)));
    void'(prog.pkt(0, I(OP_LW_D, 8, 0, 9, 4), I(OP_LW_D, 8, 0, 9, 4),
                   I(OP_SUB_V, 2, 8, 9), I(OP_SUB_V, 2, 8, 9)));
    void'(prog.pkt(0, NOP(), NOP(), I(OP_ABS_V, 2, 2), I(OP_ABS_V, 2, 2)));
    void'(prog.pkt(0, NOP(), NOP(), I(OP_ADD_V, 3, 3, 2), I(OP_ADD_V, 3, 3, 2)));
    // the pointers ran 20 half-words into the row: back to the next row
    void'(prog.pkt(0, I(OP_ADDI, 0, 0, 0, B - 20), I(OP_ADDI, 0, 0, 0, B - 20), NOP(), NOP()));
    void'(prog.pkt(0, I(OP_ADDI, 1, 1, 0, W - 20), I(OP_ADDI, 1, 1, 0, W - 20), NOP(), NOP()));
    // merge the accumulators (sums stay below 2^15, so ABS_V is a move)
    void'(prog.pkt(3, NOP(), NOP(), NOP(), I(OP_ABS_V, 12, 3)));
    void'(prog.pkt(0, NOP(), NOP(), I(OP_ADD_V, 12, 3, 12), NOP()));
    void'(prog.pkt(2, I(OP_SW, 12, 2, 0, 0), NOP(), NOP(), NOP()));
    void'(prog.trap(200));
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
    for (int i = 0; i < B * B; i++) host_wr(CB + i, 16'(blk[i]));
    for (int i = 0; i < W * W; i++) host_wr(RW + i, 16'(win[i]));
    @(negedge clk);
    dmem_host_en = 0; dmem_host_we = 0;
    rst_n = 1;

    wait (trap_valid);
    repeat (3) @(negedge clk);
    check(trap_num == 8'd200, "trap number");
    dmem_host_en = 1;
    dmem_host_addr = HADDR_W'(RES);     #1 got_hi = dmem_host_rdata;
    dmem_host_addr = HADDR_W'(RES + 1); #1 got_lo = dmem_host_rdata;
    @(negedge clk);
    dmem_host_en = 0;
    check(int'(got_hi) == sad_even, $sformatf("even-pixel SAD %0d, model %0d", got_hi, sad_even));
    check(int'(got_lo) == sad_odd,  $sformatf("odd-pixel SAD %0d, model %0d", got_lo, sad_odd));
    check(int'(got_hi) + int'(got_lo) == sad_even + sad_odd, "total SAD");

    check(n_issue == EXPECT_ISSUE, $sformatf("%0d packets issued, expected %0d", n_issue, EXPECT_ISSUE));
    check(n_bubble == 0, $sformatf("%0d empty cycles", n_bubble));
    check(n_lb == B * (B / 8 - 1) + (B - 1), $sformatf("%0d loop-backs", n_lb));
    $display("SAD: candidate (%0d, %0d), SAD %0d, %0d bundles, %0d packets for %0d pixels, %0d empty cycles",
             dx, dy, int'(got_hi) + int'(got_lo), prog.bun.size(), n_issue, B * B, n_bubble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
