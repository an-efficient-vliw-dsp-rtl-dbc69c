// alu_mac_unit: SIMD ALU/MAC functional unit (fields 2 and 3).
// Works on 40-bit values: r0-r7 are the unit's private 40-bit accumulators,
// r8-r15 the 32-bit ring registers it is mapped to (read sign-extended;
// a 40-bit result written to one of them is saturated to 32 bits). Each
// unit owns two 16-bit multipliers (17x17 signed here, so that the unsigned
// low halves of a 32-bit multiply also fit). With a = ra, b = rb, H/L the
// upper/lower 16-bit halves:
//   MUL/MAC rd,ra,rb   rd <- (rd +) a.x*b.y, x/y chosen by imm[1]/imm[0] (1 = Hi)
//   ADD SUB AND OR SLL SRL SRA, ADDI XOR MOV32 on 40 bits
//   BF2 rd,ra,rb       rd <- {aH+bH, aL+bL}, rd+1 <- {aH-bH, aL-bL}
//   MUL_V / MAC_V      rd <- (rd +) aH*bH, rd+1 <- (rd+1 +) aL*bL
//   MUL_16V            rd <- {(aH*bH)[30:15], (aL*bL)[30:15]}
//   ADD_V SUB_V ABS_V SRA_V MIN_V MAX_V on the two 16-bit lanes, PACK rd <- {aL, bL}
// The ENHANCED instance additionally runs the single-cycle complex and
// 32-bit forms, which need four products: it borrows the partner unit's
// two multipliers through bor_*/lend_* (the partner must then issue nothing
// that multiplies; an assertion checks that):
//   CMUL / CMAC        rd <- (rd +) aH*bH - aL*bL, rd+1 <- (rd+1 +) aH*bL + aL*bH
//   CMUL_16V           rd <- {re[30:15], im[30:15]}
//   MUL32 / MAC32      rd <- (rd +) low 40 bits of a[31:0]*b[31:0]
// rd must be even where rd+1 is written. The instruction list and the
// multiplier sharing follow the architecture; the integer (not fractional)
// products, Q15 extraction, lane arithmetic that wraps, the Hi/Lo selector
// bits and which field is enhanced are this design's choices. Everything
// is combinational; the register file writes the results at the clock edge.
module alu_mac_unit
  import dsp_pkg::*;
#(
  parameter bit ENHANCED = 1'b1
) (
  input  logic             clk,
  input  fu_ins_t          ins,
  output rf_rreq_t         loc_rd,
  output rf_wreq_t         loc_wr,
  input  rf_rsp_t          loc_rsp,
  output rf_rreq_t         ring_rd,
  output rf_wreq_t         ring_wr,
  input  rf_rsp_t          ring_rsp,
  // borrowing the partner's multipliers (enhanced unit)
  output logic             bor_en,
  output mop_t [1:0]       bor_a,
  output mop_t [1:0]       bor_b,
  input  mprod_t [1:0]     bor_p,
  // lending this unit's multipliers to the partner
  input  logic             lend_en,
  input  mop_t [1:0]       lend_a,
  input  mop_t [1:0]       lend_b,
  output mprod_t [1:0]     lend_p
);
  logic [3:0]           rd_en, wr_en;
  logic [3:0][3:0]      rd_idx, wr_idx;
  logic [3:0][ACCW-1:0] rd_data, wr_data;
  logic                 conflict;
  logic [ACCW-1:0]      a, b, d0, d1;
  logic [15:0]          aH, aL, bH, bL;
  logic [3:0]           rd1;
  mop_t [1:0]           ma, mb;     // own multiplier operands for own ops
  mprod_t [1:0]         mp;         // own multiplier products
  logic                 uses_mul, enh_op;

  assign a  = rd_data[0];
  assign b  = rd_data[1];
  assign d0 = rd_data[2];
  assign d1 = rd_data[3];
  assign aH = a[31:16];
  assign aL = a[15:0];
  assign bH = b[31:16];
  assign bL = b[15:0];
  assign rd1 = {ins.rd[3:1], 1'b1};

  function automatic mop_t s17(input logic [15:0] h);
    return mop_t'({h[15], h});
  endfunction
  function automatic mop_t u17(input logic [15:0] h);
    return mop_t'({1'b0, h});
  endfunction
  function automatic logic [ACCW-1:0] sx(input mprod_t p);
    return ACCW'(p);
  endfunction
  // value written to register idx: 40 bits kept in accumulators, 32-bit
  // ring registers saturate
  function automatic logic [ACCW-1:0] fit(input logic [3:0] idx, input logic [ACCW-1:0] v);
    return idx[3] ? sext32(sat32(v)) : v;
  endfunction
  function automatic logic [15:0] lane_abs(input logic [15:0] x);
    return x[15] ? 16'(-x) : x;
  endfunction

  // multipliers: lent to the partner when it asks, otherwise used here
  always_comb begin
    mop_t oa, ob;
    for (int m = 0; m < 2; m++) begin
      oa        = lend_en ? lend_a[m] : ma[m];
      ob        = lend_en ? lend_b[m] : mb[m];
      mp[m]     = mprod_t'(oa) * mprod_t'(ob);
      lend_p[m] = mp[m];
    end
  end

  always_comb begin
    logic signed [ACCW-1:0] sa;
    logic signed [ACCW-1:0] re, im, p32;
    logic [ACCW-1:0] r0, r1;
    logic        w0, w1;
    rd_en  = '0;  wr_en = '0;  wr_data = '0;
    rd_idx = '{4'(rd1), ins.rd, ins.rb, ins.ra};
    wr_idx = '{4'(0), 4'(0), rd1, ins.rd};
    ma = '0; mb = '0;
    bor_en = 1'b0; bor_a = '0; bor_b = '0;
    uses_mul = 1'b0; enh_op = 1'b0;
    sa = a;
    r0 = '0; r1 = '0; w0 = 1'b0; w1 = 1'b0;
    re = '0; im = '0; p32 = '0;
    if (ins.valid) begin
      unique case (ins.op)
        OP_ADDI:  begin rd_en[0] = 1; w0 = 1; r0 = a + ACCW'(signed'(ins.imm)); end
        OP_XOR:   begin rd_en[1:0] = 2'b11; w0 = 1; r0 = a ^ b; end
        OP_MOV32: begin w0 = 1; r0 = sext32(ins.imm); end
        OP_ADD:   begin rd_en[1:0] = 2'b11; w0 = 1; r0 = a + b; end
        OP_SUB:   begin rd_en[1:0] = 2'b11; w0 = 1; r0 = a - b; end
        OP_AND:   begin rd_en[1:0] = 2'b11; w0 = 1; r0 = a & b; end
        OP_OR:    begin rd_en[1:0] = 2'b11; w0 = 1; r0 = a | b; end
        OP_SLL:   begin rd_en[1:0] = 2'b11; w0 = 1; r0 = a << b[5:0]; end
        OP_SRL:   begin rd_en[1:0] = 2'b11; w0 = 1; r0 = a >> b[5:0]; end
        OP_SRA:   begin rd_en[1:0] = 2'b11; w0 = 1; r0 = sa >>> b[5:0]; end
        OP_MUL, OP_MAC: begin
          rd_en[1:0] = 2'b11; uses_mul = 1; w0 = 1;
          ma[0] = s17(ins.imm[1] ? aH : aL);
          mb[0] = s17(ins.imm[0] ? bH : bL);
          if (ins.op == OP_MAC) begin rd_en[2] = 1; r0 = d0 + sx(mp[0]); end
          else r0 = sx(mp[0]);
        end
        OP_MUL_V, OP_MAC_V, OP_MUL_16V: begin
          rd_en[1:0] = 2'b11; uses_mul = 1; w0 = 1;
          ma[0] = s17(aH); mb[0] = s17(bH);
          ma[1] = s17(aL); mb[1] = s17(bL);
          if (ins.op == OP_MUL_16V) begin
            r0 = sext32({mp[0][30:15], mp[1][30:15]});
          end else if (ins.op == OP_MAC_V) begin
            rd_en[3:2] = 2'b11; w1 = 1;
            r0 = d0 + sx(mp[0]); r1 = d1 + sx(mp[1]);
          end else begin
            w1 = 1; r0 = sx(mp[0]); r1 = sx(mp[1]);
          end
        end
        OP_BF2: begin
          rd_en[1:0] = 2'b11; w0 = 1; w1 = 1;
          r0 = sext32({16'(aH + bH), 16'(aL + bL)});
          r1 = sext32({16'(aH - bH), 16'(aL - bL)});
        end
        OP_ADD_V: begin rd_en[1:0] = 2'b11; w0 = 1; r0 = sext32({16'(aH + bH), 16'(aL + bL)}); end
        OP_SUB_V: begin rd_en[1:0] = 2'b11; w0 = 1; r0 = sext32({16'(aH - bH), 16'(aL - bL)}); end
        OP_ABS_V: begin rd_en[0] = 1; w0 = 1; r0 = sext32({lane_abs(aH), lane_abs(aL)}); end
        OP_SRA_V: begin
          rd_en[1:0] = 2'b11; w0 = 1;
          r0 = sext32({16'($signed(aH) >>> b[3:0]), 16'($signed(aL) >>> b[3:0])});
        end
        OP_MIN_V: begin
          rd_en[1:0] = 2'b11; w0 = 1;
          r0 = sext32({($signed(aH) < $signed(bH)) ? aH : bH, ($signed(aL) < $signed(bL)) ? aL : bL});
        end
        OP_MAX_V: begin
          rd_en[1:0] = 2'b11; w0 = 1;
          r0 = sext32({($signed(aH) > $signed(bH)) ? aH : bH, ($signed(aL) > $signed(bL)) ? aL : bL});
        end
        OP_PACK: begin rd_en[1:0] = 2'b11; w0 = 1; r0 = sext32({aL, bL}); end
        OP_CMUL, OP_CMUL_16V, OP_CMAC, OP_MUL32, OP_MAC32: begin
          enh_op = 1;
          if (ENHANCED) begin
            rd_en[1:0] = 2'b11; uses_mul = 1; bor_en = 1; w0 = 1;
            if (ins.op == OP_MUL32 || ins.op == OP_MAC32) begin
              ma[0] = s17(aH); mb[0] = s17(bH);      // hi x hi
              ma[1] = s17(aH); mb[1] = u17(bL);      // hi x lo
              bor_a[0] = u17(aL); bor_b[0] = s17(bH); // lo x hi
              bor_a[1] = u17(aL); bor_b[1] = u17(bL); // lo x lo
              p32 = (sx(mp[0]) << 32) + ((sx(mp[1]) + sx(bor_p[0])) << 16) + sx(bor_p[1]);
              if (ins.op == OP_MAC32) begin rd_en[2] = 1; r0 = d0 + p32; end
              else r0 = p32;
            end else begin
              ma[0] = s17(aH); mb[0] = s17(bH);
              ma[1] = s17(aL); mb[1] = s17(bL);
              bor_a[0] = s17(aH); bor_b[0] = s17(bL);
              bor_a[1] = s17(aL); bor_b[1] = s17(bH);
              re = sx(mp[0]) - sx(mp[1]);
              im = sx(bor_p[0]) + sx(bor_p[1]);
              if (ins.op == OP_CMUL_16V) r0 = sext32({re[30:15], im[30:15]});
              else if (ins.op == OP_CMAC) begin
                rd_en[3:2] = 2'b11; w1 = 1; r0 = d0 + re; r1 = d1 + im;
              end else begin
                w1 = 1; r0 = re; r1 = im;
              end
            end
          end
        end
        default: ;  // NOP and load/store opcodes do nothing here
      endcase
    end
    wr_en[0] = w0;  wr_data[0] = fit(ins.rd, r0);
    wr_en[1] = w1;  wr_data[1] = fit(rd1, r1);
  end

  fu_rf_access u_acc (
    .rd_en, .rd_idx, .rd_data, .wr_en, .wr_idx, .wr_data,
    .loc_rd, .loc_wr, .loc_rsp, .ring_rd, .ring_wr, .ring_rsp, .conflict
  );

  a_no_conflict: assert property (@(posedge clk) !conflict)
    else $error("alu_mac_unit: more than two ports of one register sub-block requested");
  a_lend_free: assert property (@(posedge clk) lend_en |-> !uses_mul)
    else $error("alu_mac_unit: multiply issued while the multipliers are lent to the partner");
  a_enh_only: assert property (@(posedge clk) (ENHANCED != 0) || !enh_op)
    else $error("alu_mac_unit: complex/32-bit multiply issued to a unit without the enhancement");
endmodule
