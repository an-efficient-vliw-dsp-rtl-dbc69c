// tb_alu_mac_unit: checks the SIMD ALU/MAC unit. An enhanced unit and its
// partner are connected as in the processor (the enhanced one borrows the
// partner's two multipliers), each with a behavioural register file held in
// the testbench. Random operands are placed in ring registers r8/r9 and
// accumulators r2/r3, every opcode is executed many times on the enhanced
// unit and the results are compared with a reference written here with
// plain 64-bit integer arithmetic. Also checked: saturation of a 40-bit
// result written to a 32-bit ring register, and that the partner still
// runs its own non-multiplying work while lending its multipliers.
module tb_alu_mac_unit;
  import dsp_pkg::*;
  logic clk = 0;
  fu_ins_t insE, insP;
  rf_rreq_t lrE, rrE, lrP, rrP;
  rf_wreq_t lwE, rwE, lwP, rwP;
  rf_rsp_t  lsE, rsE, lsP, rsP;
  logic bE, bP;
  mop_t [1:0] baE, bbE, baP, bbP;
  mprod_t [1:0] pE, pP;

  logic [39:0] locE [8], locP [8];
  logic [31:0] rngE [8], rngP [8];
  int checks = 0, failures = 0;

  alu_mac_unit #(.ENHANCED(1'b1)) dutE (
    .clk, .ins(insE), .loc_rd(lrE), .loc_wr(lwE), .loc_rsp(lsE), .ring_rd(rrE), .ring_wr(rwE), .ring_rsp(rsE),
    .bor_en(bE), .bor_a(baE), .bor_b(bbE), .bor_p(pP), .lend_en(bP), .lend_a(baP), .lend_b(bbP), .lend_p(pE));
  alu_mac_unit #(.ENHANCED(1'b0)) dutP (
    .clk, .ins(insP), .loc_rd(lrP), .loc_wr(lwP), .loc_rsp(lsP), .ring_rd(rrP), .ring_wr(rwP), .ring_rsp(rsP),
    .bor_en(bP), .bor_a(baP), .bor_b(bbP), .bor_p(pE), .lend_en(bE), .lend_a(baE), .lend_b(bbE), .lend_p(pP));

  always #5 clk = ~clk;

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      lsE.rdata[p] = locE[lrE.raddr[p]];
      rsE.rdata[p] = sext32(rngE[rrE.raddr[p]]);
      lsP.rdata[p] = locP[lrP.raddr[p]];
      rsP.rdata[p] = sext32(rngP[rrP.raddr[p]]);
    end
  end
  always @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (lwE.we[p]) locE[lwE.waddr[p]] <= lwE.wdata[p];
      if (rwE.we[p]) rngE[rwE.waddr[p]] <= rwE.wdata[p][31:0];
      if (lwP.we[p]) locP[lwP.waddr[p]] <= lwP.wdata[p];
      if (rwP.we[p]) rngP[rwP.waddr[p]] <= rwP.wdata[p][31:0];
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint h(logic [31:0] v, bit hi);
    return hi ? longint'($signed(v[31:16])) : longint'($signed(v[15:0]));
  endfunction
  function automatic logic [15:0] q15(longint p);
    return 16'(p >>> 15);
  endfunction
  function automatic logic [39:0] s32(logic [31:0] v);
    return {{8{v[31]}}, v};
  endfunction

  // reference: returns results for rd and rd+1 and whether rd+1 is written
  task automatic ref_op(input op_e op, input logic [31:0] a, input logic [31:0] b,
                        input logic [39:0] d0, input logic [39:0] d1, input logic [31:0] imm,
                        output logic [39:0] r0, output logic [39:0] r1, output bit w1);
    longint la, lb, re, im, p;
    la = longint'($signed(a)); lb = longint'($signed(b));
    w1 = 0; r1 = 'x; r0 = 'x;
    re = h(a,1) * h(b,1) - h(a,0) * h(b,0);
    im = h(a,1) * h(b,0) + h(a,0) * h(b,1);
    case (op)
      OP_ADDI:  r0 = 40'(la + longint'($signed(imm)));
      OP_XOR:   r0 = s32(a) ^ s32(b);
      OP_MOV32: r0 = s32(imm);
      OP_ADD:   r0 = 40'(la + lb);
      OP_SUB:   r0 = 40'(la - lb);
      OP_AND:   r0 = s32(a) & s32(b);
      OP_OR:    r0 = s32(a) | s32(b);
      OP_SLL:   r0 = s32(a) << b[5:0];
      OP_SRL:   r0 = s32(a) >> b[5:0];
      OP_SRA:   r0 = 40'(la >>> b[5:0]);
      OP_MUL:   r0 = 40'(h(a, imm[1]) * h(b, imm[0]));
      OP_MAC:   r0 = 40'(longint'($signed(d0)) + h(a, imm[1]) * h(b, imm[0]));
      OP_BF2:   begin r0 = s32({16'(a[31:16] + b[31:16]), 16'(a[15:0] + b[15:0])});
                      r1 = s32({16'(a[31:16] - b[31:16]), 16'(a[15:0] - b[15:0])}); w1 = 1; end
      OP_MUL_V: begin r0 = 40'(h(a,1) * h(b,1)); r1 = 40'(h(a,0) * h(b,0)); w1 = 1; end
      OP_MUL_16V: r0 = s32({q15(h(a,1) * h(b,1)), q15(h(a,0) * h(b,0))});
      OP_MAC_V: begin r0 = 40'(longint'($signed(d0)) + h(a,1) * h(b,1));
                      r1 = 40'(longint'($signed(d1)) + h(a,0) * h(b,0)); w1 = 1; end
      OP_ADD_V: r0 = s32({16'(a[31:16] + b[31:16]), 16'(a[15:0] + b[15:0])});
      OP_SUB_V: r0 = s32({16'(a[31:16] - b[31:16]), 16'(a[15:0] - b[15:0])});
      OP_ABS_V: r0 = s32({16'(h(a,1) < 0 ? -h(a,1) : h(a,1)), 16'(h(a,0) < 0 ? -h(a,0) : h(a,0))});
      OP_SRA_V: r0 = s32({16'(h(a,1) >>> b[3:0]), 16'(h(a,0) >>> b[3:0])});
      OP_MIN_V: r0 = s32({16'(h(a,1) < h(b,1) ? h(a,1) : h(b,1)), 16'(h(a,0) < h(b,0) ? h(a,0) : h(b,0))});
      OP_MAX_V: r0 = s32({16'(h(a,1) > h(b,1) ? h(a,1) : h(b,1)), 16'(h(a,0) > h(b,0) ? h(a,0) : h(b,0))});
      OP_PACK:  r0 = s32({a[15:0], b[15:0]});
      OP_CMUL:  begin r0 = 40'(re); r1 = 40'(im); w1 = 1; end
      OP_CMUL_16V: r0 = s32({q15(re), q15(im)});
      OP_CMAC:  begin r0 = 40'(longint'($signed(d0)) + re); r1 = 40'(longint'($signed(d1)) + im); w1 = 1; end
      OP_MUL32: begin p = la * lb; r0 = 40'(p); end
      OP_MAC32: begin p = la * lb; r0 = 40'(longint'($signed(d0)) + p); end
      default: ;
    endcase
  endtask

  op_e ops [28] = '{OP_ADDI, OP_XOR, OP_MOV32, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_SLL, OP_SRL, OP_SRA,
                    OP_MUL, OP_MAC, OP_BF2, OP_MUL_V, OP_MUL_16V, OP_MAC_V, OP_ADD_V, OP_SUB_V,
                    OP_ABS_V, OP_SRA_V, OP_MIN_V, OP_MAX_V, OP_PACK, OP_CMUL, OP_CMUL_16V, OP_CMAC,
                    OP_MUL32, OP_MAC32};

  initial begin
    logic [31:0] a, b, imm;
    logic [39:0] d0, d1, r0, r1;
    bit w1;
    insE = '0; insP = '0;
    foreach (locE[i]) begin locE[i] = '0; locP[i] = '0; rngE[i] = '0; rngP[i] = '0; end
    for (int it = 0; it < 40; it++) begin
      foreach (ops[k]) begin
        @(negedge clk);
        a = $urandom; b = $urandom; imm = $urandom;
        if (it % 4 == 0) b[5:0] = 6'($urandom_range(0, 39));
        d0 = {8'($urandom), 32'($urandom)}; d1 = {8'($urandom), 32'($urandom)};
        rngE[0] = a; rngE[1] = b; locE[2] = d0; locE[3] = d1;
        insE = '0; insE.valid = 1; insE.op = ops[k]; insE.rd = 4'd2; insE.ra = 4'd8; insE.rb = 4'd9; insE.imm = imm;
        ref_op(ops[k], a, b, d0, d1, imm, r0, r1, w1);
        @(posedge clk); #1;
        insE = '0;
        checks++;
        if (locE[2] !== r0) begin failures++; $display("FAIL: %s rd = %h, expected %h (a %h b %h)", ops[k].name(), locE[2], r0, a, b); end
        checks++;
        if (locE[3] !== (w1 ? r1 : d1)) begin failures++; $display("FAIL: %s rd+1 = %h, expected %h", ops[k].name(), locE[3], w1 ? r1 : d1); end
      end
    end
    // saturation into a 32-bit ring register
    @(negedge clk);
    locE[4] = 40'h00_7FFF_FFF0; locE[5] = 40'h00_0000_0100;
    insE = '0; insE.valid = 1; insE.op = OP_ADD; insE.rd = 4'd10; insE.ra = 4'd4; insE.rb = 4'd5;
    @(posedge clk); #1 insE = '0;
    checks++;
    if (rngE[2] !== 32'h7FFF_FFFF) begin failures++; $display("FAIL: positive saturation %h", rngE[2]); end
    @(negedge clk);
    locE[4] = 40'hFF_0000_0000;
    insE = '0; insE.valid = 1; insE.op = OP_ADD; insE.rd = 4'd10; insE.ra = 4'd4; insE.rb = 4'd4;
    @(posedge clk); #1 insE = '0;
    checks++;
    if (rngE[2] !== 32'h8000_0000) begin failures++; $display("FAIL: negative saturation %h", rngE[2]); end
    // partner keeps working (no multiply) while lending its multipliers
    @(negedge clk);
    rngE[0] = 32'h0002_0003; rngE[1] = 32'h0004_0005;
    rngP[0] = 32'd1000; rngP[1] = 32'd234;
    insE = '0; insE.valid = 1; insE.op = OP_CMUL; insE.rd = 4'd6; insE.ra = 4'd8; insE.rb = 4'd9;
    insP = '0; insP.valid = 1; insP.op = OP_SUB;  insP.rd = 4'd1; insP.ra = 4'd8; insP.rb = 4'd9;
    @(posedge clk); #1 insE = '0; insP = '0;
    checks += 3;
    if (locE[6] !== 40'(8 - 15)) begin failures++; $display("FAIL: CMUL re %h", locE[6]); end
    if (locE[7] !== 40'(10 + 12)) begin failures++; $display("FAIL: CMUL im %h", locE[7]); end
    if (locP[1] !== 40'd766) begin failures++; $display("FAIL: partner SUB %h", locP[1]); end
    // partner multiplies on its own when not lending
    @(negedge clk);
    insP = '0; insP.valid = 1; insP.op = OP_MUL_V; insP.rd = 4'd4; insP.ra = 4'd8; insP.rb = 4'd9;
    rngP[0] = 32'hFFFF_0007; rngP[1] = 32'h0003_0009;
    @(posedge clk); #1 insP = '0;
    checks += 2;
    if (locP[4] !== 40'hFF_FFFF_FFFD) begin failures++; $display("FAIL: partner MUL_V hi %h", locP[4]); end
    if (locP[5] !== 40'd63) begin failures++; $display("FAIL: partner MUL_V lo %h", locP[5]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
