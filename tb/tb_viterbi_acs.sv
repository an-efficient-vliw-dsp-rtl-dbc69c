// tb_viterbi_acs: add-compare-select kernel of a Viterbi decoder on the full
// processor at its default sizes: 64 states, 16 trellis steps. Path metrics
// are 16-bit, one state per half-word; each step reads the old metrics and
// writes the new ones to the other of two arrays. A radix-2 butterfly on
// states j and j+32 produces states 2j and 2j+1:
//   pm'[2j]   = max(pm[j] + bm, pm[j+32] - bm)
//   pm'[2j+1] = max(pm[j] - bm, pm[j+32] + bm)
// with a branch metric bm per butterfly (random here, from a table the
// testbench writes as {bm, -bm} pairs).
//
// Five packets per butterfly; the SIMD lanes hold the two new states:
//   off 0  f0 LH_V r8,(r0)+1    B0.r8  = {pm[j], pm[j]}     (r0 = r1 = &pm[j])
//          f1 LH_V r8,(r0)+1    B1.r8  = {pm[j+32], pm[j+32]}
//   off 0  f0 LW r10,(r2)+2     B0.r10 = {bm, -bm}
//          f1 LW r10,(r2)+2     B1.r10 = {bm, -bm}
//   off 2  f2 ADD_V r2,r8,r10   private r2 = {pm[j]+bm, pm[j]-bm}
//          f3 SUB_V r9,r8,r10   B1.r9 = {pm[j+32]-bm, pm[j+32]+bm}
//   off 3  f2 MAX_V r11,r2,r9   B1.r11 = {pm'[2j], pm'[2j+1]}
//   off 0  f1 SW (r4)+2,r11     stored at new + 2j
// Field 2 keeps one sum in its private accumulator so that the compare can
// reach the other sum in the next ring block. Each step has three set-up
// packets and an RPT over its 32 butterflies: 1 + 16 * (3 + 5 * 32) = 2609
// cycles, no empty cycle. The final metrics and the packet count are
// checked against a model.
module tb_viterbi_acs;
  import dsp_pkg::*;
  import vliw_asm_pkg::*;

  localparam int S      = 64;        // states
  localparam int STEPS  = 16;        // trellis depth
  localparam int PA     = 16'h0100;  // path metrics, two arrays
  localparam int PB     = 16'h0200;
  localparam int BMT    = 16'h0400;  // branch metric table
  localparam int EXPECT_ISSUE = 1 + STEPS * (3 + 5 * S / 2);
  localparam int MAXCYC = 6000;

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

  logic signed [15:0] pm [S];
  logic signed [15:0] pm_n [S];
  logic signed [15:0] bm [STEPS][S/2];
  program_t prog, handler;
  pos_t self_pos;

  task automatic host_wr(int a, logic [15:0] v);
    @(negedge clk);
    dmem_host_en = 1; dmem_host_we = 1; dmem_host_addr = HADDR_W'(a); dmem_host_wdata = v;
  endtask

  function automatic logic signed [15:0] max16(logic signed [15:0] a, logic signed [15:0] b);
    return (a > b) ? a : b;
  endfunction

  initial begin
    // initial metrics and branch metrics
    for (int s = 0; s < S; s++) pm[s] = 16'(int'($urandom_range(40)));
    for (int t = 0; t < STEPS; t++)
      for (int j = 0; j < S / 2; j++) bm[t][j] = 16'(int'($urandom_range(30)) - 15);

    // program: steps alternate between the two metric arrays
    prog = new();
    void'(prog.pkt(0, I(OP_MOV32, 2, 0, 0, BMT), I(OP_MOV32, 2, 0, 0, BMT), NOP(), NOP()));
    for (int t = 0; t < STEPS; t++) begin
      int src, dst;
      src = (t % 2 == 0) ? PA : PB;
      dst = (t % 2 == 0) ? PB : PA;
      void'(prog.pkt(0, I(OP_MOV32, 0, 0, 0, src), I(OP_MOV32, 0, 0, 0, src + S / 2), NOP(), NOP()));
      void'(prog.pkt(0, I(OP_MOV32, 1, 0, 0, src), I(OP_MOV32, 1, 0, 0, src + S / 2), NOP(), NOP()));
      void'(prog.pkt(0, NOP(), I(OP_MOV32, 4, 0, 0, dst), NOP(), NOP()));
      void'(prog.rpt(S / 2, 5, 0, I(OP_LH_V, 8, 0, 0, 1), I(OP_LH_V, 8, 0, 0, 1), NOP(), NOP()));
      void'(prog.pkt(0, I(OP_LW, 10, 2, 0, 2), I(OP_LW, 10, 2, 0, 2), NOP(), NOP()));
      void'(prog.pkt(2, NOP(), NOP(), I(OP_ADD_V, 2, 8, 10), I(OP_SUB_V, 9, 8, 10)));
      void'(prog.pkt(3, NOP(), NOP(), I(OP_MAX_V, 11, 2, 9), NOP()));
      void'(prog.pkt(0, NOP(), I(OP_SW, 11, 4, 0, 2), NOP(), NOP()));
    end
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
    for (int s = 0; s < S; s++) host_wr(PA + s, pm[s]);
    for (int t = 0; t < STEPS; t++)
      for (int j = 0; j < S / 2; j++) begin
        host_wr(BMT + t * S + 2 * j,     bm[t][j]);
        host_wr(BMT + t * S + 2 * j + 1, 16'(-bm[t][j]));
      end
    @(negedge clk);
    dmem_host_en = 0; dmem_host_we = 0;
    rst_n = 1;

    // model
    for (int t = 0; t < STEPS; t++) begin
      for (int j = 0; j < S / 2; j++) begin
        pm_n[2 * j]     = max16(pm[j] + bm[t][j], pm[j + S / 2] - bm[t][j]);
        pm_n[2 * j + 1] = max16(pm[j] - bm[t][j], pm[j + S / 2] + bm[t][j]);
      end
      pm = pm_n;
    end

    wait (trap_valid);
    repeat (3) @(negedge clk);
    check(trap_num == 8'd200, "trap number");
    dmem_host_en = 1;
    for (int s = 0; s < S; s++) begin
      // an even number of steps leaves the result in the first array
      dmem_host_addr = HADDR_W'(PA + s);
      #1 check($signed(dmem_host_rdata) == pm[s],
               $sformatf("state %0d metric %0d, model %0d", s, $signed(dmem_host_rdata), pm[s]));
      @(negedge clk);
    end
    dmem_host_en = 0;

    check(n_issue == EXPECT_ISSUE, $sformatf("%0d packets issued, expected %0d", n_issue, EXPECT_ISSUE));
    check(n_bubble == 0, $sformatf("%0d empty cycles", n_bubble));
    check(n_lb == STEPS * (S / 2 - 1), $sformatf("%0d loop-backs", n_lb));
    $display("ACS: %0d bundles, %0d packets for %0d ACS operations, %0d empty cycles",
             prog.bun.size(), n_issue, STEPS * S, n_bubble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
