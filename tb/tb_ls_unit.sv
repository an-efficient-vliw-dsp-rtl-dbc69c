// tb_ls_unit: runs a directed sequence of load/store unit instructions
// against a behavioural register file (eight private and eight ring
// registers) and a half-word memory held in the testbench, and compares
// registers and memory with hand-computed values: moves, ADDI, XOR, word
// and half-word loads and stores with post-increment, the double forms that
// use the address pair ra/ra+1, the half-word vector forms, and the
// dispatcher's register read (BNEZ/JR) and link write into r7.
module tb_ls_unit;
  import dsp_pkg::*;
  logic clk = 0;
  fu_ins_t ins;
  logic aux_rd_en = 0, aux_wr_en = 0;
  logic [3:0] aux_rd_idx = '0;
  logic [31:0] aux_rd_data, aux_wr_data = '0;
  rf_rreq_t loc_rd, ring_rd;
  rf_wreq_t loc_wr, ring_wr;
  rf_rsp_t  loc_rsp, ring_rsp;
  mem_req_t [1:0] mem_req;
  logic [1:0][31:0] mem_rdata;

  logic [31:0] loc [8];
  logic [31:0] rng [8];
  logic [15:0] mem [1024];
  int checks = 0, failures = 0;

  ls_unit dut (.*);

  always #5 clk = ~clk;

  // behavioural register file and memory
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      loc_rsp.rdata[p]  = sext32(loc[loc_rd.raddr[p]]);
      ring_rsp.rdata[p] = sext32(rng[ring_rd.raddr[p]]);
      mem_rdata[p] = mem_req[p].word ? {mem[10'(mem_req[p].addr)], mem[10'(mem_req[p].addr + 1)]}
                                     : {16'h0, mem[10'(mem_req[p].addr)]};
    end
  end
  always @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (loc_wr.we[p])  loc[loc_wr.waddr[p]]  <= loc_wr.wdata[p][31:0];
      if (ring_wr.we[p]) rng[ring_wr.waddr[p]] <= ring_wr.wdata[p][31:0];
      if (mem_req[p].en && mem_req[p].we) begin
        if (mem_req[p].word) begin
          mem[10'(mem_req[p].addr)]     <= mem_req[p].wdata[31:16];
          mem[10'(mem_req[p].addr + 1)] <= mem_req[p].wdata[15:0];
        end else mem[10'(mem_req[p].addr)] <= mem_req[p].wdata[15:0];
      end
    end
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exec(op_e op, int rd, int ra, int rb, int imm);
    @(negedge clk);
    ins = '0;
    ins.valid = 1'b1; ins.op = op; ins.rd = 4'(rd); ins.ra = 4'(ra); ins.rb = 4'(rb); ins.imm = 32'(imm);
    @(posedge clk);
    #1 ins = '0;
  endtask

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s = %h, expected %h", what, got, exp);
    end
  endtask

  initial begin
    ins = '0;
    foreach (loc[i]) loc[i] = '0;
    foreach (rng[i]) rng[i] = '0;
    foreach (mem[i]) mem[i] = 16'(i * 3);
    mem[100] = 16'h1234; mem[101] = 16'h8765; mem[200] = 16'hABCD; mem[201] = 16'h0001;
    exec(OP_MOV32, 0, 0, 0, 100);
    exec(OP_MOV32, 1, 0, 0, 200);
    expect_eq(loc[0], 100, "MOV32 r0");
    exec(OP_ADDI, 2, 0, 0, -5);
    expect_eq(loc[2], 95, "ADDI");
    exec(OP_XOR, 3, 0, 1, 0);
    expect_eq(loc[3], 100 ^ 200, "XOR");
    exec(OP_LW, 8, 0, 0, 2);
    expect_eq(rng[0], 32'h1234_8765, "LW data");
    expect_eq(loc[0], 102, "LW post-increment");
    exec(OP_LH, 9, 1, 0, 1);
    expect_eq(rng[1], 32'hFFFF_ABCD, "LH sign-extended");
    expect_eq(loc[1], 201, "LH post-increment");
    exec(OP_MOV32, 0, 0, 0, 100);
    exec(OP_MOV32, 1, 0, 0, 200);
    exec(OP_LW_D, 10, 0, 11, 4);
    expect_eq(rng[2], 32'h1234_8765, "LW_D first");
    expect_eq(rng[3], 32'hABCD_0001, "LW_D second");
    expect_eq(loc[0], 104, "LW_D ri update");
    expect_eq(loc[1], 204, "LW_D ri+1 update");
    exec(OP_SW, 8, 0, 0, -4);
    expect_eq({mem[104], mem[105]}, 32'h1234_8765, "SW");
    expect_eq(loc[0], 100, "SW post-decrement");
    exec(OP_MOV32, 12, 0, 0, 32'h5555_AAAA);
    exec(OP_MOV32, 13, 0, 0, 32'h0F0F_7070);
    exec(OP_SW_D, 12, 0, 13, 2);
    expect_eq({mem[100], mem[101]}, 32'h5555_AAAA, "SW_D first");
    expect_eq({mem[204], mem[205]}, 32'h0F0F_7070, "SW_D second");
    expect_eq(loc[0], 102, "SW_D ri update");
    expect_eq(loc[1], 206, "SW_D ri+1 update");
    exec(OP_MOV32, 0, 0, 0, 100);
    exec(OP_MOV32, 1, 0, 0, 204);
    exec(OP_LH_D, 14, 0, 15, 0);
    expect_eq(rng[6], 32'h0000_5555, "LH_D first");
    expect_eq(rng[7], 32'h0000_0F0F, "LH_D second");
    exec(OP_LH_V, 12, 0, 0, 1);
    expect_eq(rng[4], 32'h5555_0F0F, "LH_V gather");
    expect_eq(loc[0], 101, "LH_V ri update");
    exec(OP_MOV32, 13, 0, 0, 32'hBEEF_CAFE);
    exec(OP_SH_V, 13, 0, 0, 0);
    expect_eq({16'h0, mem[101]}, 32'h0000_BEEF, "SH_V high half");
    expect_eq({16'h0, mem[205]}, 32'h0000_CAFE, "SH_V low half");
    exec(OP_SH, 9, 1, 0, 2);
    expect_eq({16'h0, mem[205]}, 32'h0000_ABCD, "SH");
    expect_eq(loc[1], 207, "SH post-increment");
    exec(OP_SH_D, 12, 0, 13, 0);
    expect_eq({16'h0, mem[101]}, 32'h0000_0F0F, "SH_D first");
    expect_eq({16'h0, mem[207]}, 32'h0000_CAFE, "SH_D second");
    // dispatcher access through an idle field
    @(negedge clk);
    ins = '0; aux_rd_en = 1; aux_rd_idx = 4'd3; #1;
    expect_eq(aux_rd_data, 100 ^ 200, "branch register read");
    aux_rd_en = 0; aux_wr_en = 1; aux_wr_data = 32'h0ABC_0123;
    @(posedge clk); #1 aux_wr_en = 0;
    expect_eq(loc[7], 32'h0ABC_0123, "link write into r7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
