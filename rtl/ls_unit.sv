// ls_unit: control/load-store functional unit (fields 0 and 1).
// It executes one instruction word per cycle, combinationally: it reads its
// registers, drives up to two data-memory channels and hands the results to
// the register file, which writes them at the next clock edge. Memory
// operands use post-increment addressing (ri)+j: the access goes to the
// half-word address held in ri, then ri <- ri + j (j is the tail immediate).
//   LH/LW rd,(ra)+j        rd <- Mem[ra]                (LH sign-extends)
//   SH/SW (ra)+j,rd        Mem[ra] <- rd
//   LH_D/LW_D rd,rb,(ra)+j rd <- Mem[ra], rb <- Mem[ra+1], ra,ra+1 += j
//   SH_D/SW_D (ra)+j,rd,rb Mem[ra] <- rd, Mem[ra+1] <- rb, ra,ra+1 += j
//   LH_V rd,(ra)+j         rd <- {Mem16[ra], Mem16[ra+1]}, ra,ra+1 += j
//   SH_V (ra)+j,rd         Mem16[ra] <- rd.Hi, Mem16[ra+1] <- rd.Lo
//   ADDI rd,ra,j / XOR rd,ra,rb / MOV32 rd,j
// A double access uses the pair ra (even) and ra+1 of address registers,
// so the six register accesses of LW_D split over the private block
// (address registers) and the ring block (data). The double forms, the
// post-increment and the instruction list follow the architecture; the
// meaning given to the _V forms, sign extension of half-word loads and
// which field holds the store data are this design's choices.
// Field 0 also serves the dispatcher: 'aux_rd' reads a register for BNEZ
// or JR and 'aux_wr' writes the JAL/TRAP link into r7; both are used only
// when the field's own slot is idle.
module ls_unit
  import dsp_pkg::*;
(
  input  logic                 clk,
  input  fu_ins_t              ins,
  input  logic                 aux_rd_en,
  input  logic [3:0]           aux_rd_idx,
  output logic [31:0]          aux_rd_data,
  input  logic                 aux_wr_en,
  input  logic [31:0]          aux_wr_data,
  output rf_rreq_t             loc_rd,
  output rf_wreq_t             loc_wr,
  input  rf_rsp_t              loc_rsp,
  output rf_rreq_t             ring_rd,
  output rf_wreq_t             ring_wr,
  input  rf_rsp_t              ring_rsp,
  output mem_req_t [1:0]       mem_req,
  input  logic [1:0][31:0]     mem_rdata
);
  logic [3:0]           rd_en, wr_en;
  logic [3:0][3:0]      rd_idx, wr_idx;
  logic [3:0][ACCW-1:0] rd_data, wr_data;
  logic                 conflict;
  logic [3:0]           ra1;
  logic [31:0]          a0, a1, dd, db;
  logic [31:0]          imm;

  assign ra1 = {ins.ra[3:1], 1'b1};
  assign imm = ins.imm;
  // read slots: 0 = ra, 1 = ra+1, 2 = rd (store data), 3 = rb or aux
  assign a0 = rd_data[0][31:0];
  assign a1 = rd_data[1][31:0];
  assign dd = rd_data[2][31:0];
  assign db = rd_data[3][31:0];
  assign aux_rd_data = db;

  function automatic logic [31:0] sx16(input logic [15:0] h);
    return {{16{h[15]}}, h};
  endfunction

  always_comb begin
    rd_en  = '0;  rd_idx = '0;
    wr_en  = '0;  wr_idx = '0;  wr_data = '0;
    mem_req = '0;
    rd_idx[0] = ins.ra;
    rd_idx[1] = ra1;
    rd_idx[2] = ins.rd;
    rd_idx[3] = ins.valid ? ins.rb : aux_rd_idx;
    wr_idx[0] = ins.ra;
    wr_idx[1] = ra1;
    wr_idx[2] = ins.rd;
    wr_idx[3] = ins.rb;
    wr_data[0] = sext32(a0 + imm);
    wr_data[1] = sext32(a1 + imm);
    mem_req[0].addr  = a0[HADDR_W-1:0];
    mem_req[0].wdata = dd;
    mem_req[1].addr  = a1[HADDR_W-1:0];
    mem_req[1].wdata = db;
    if (!ins.valid) begin
      rd_en[3]   = aux_rd_en;
      wr_en[3]   = aux_wr_en;
      wr_idx[3]  = 4'd7;
      wr_data[3] = sext32(aux_wr_data);
    end else begin
      unique case (ins.op)
        OP_ADDI: begin
          rd_en[0] = 1'b1;
          wr_en[2] = 1'b1; wr_data[2] = sext32(a0 + imm);
        end
        OP_XOR: begin
          rd_en[0] = 1'b1; rd_en[3] = 1'b1;
          wr_en[2] = 1'b1; wr_data[2] = sext32(a0 ^ db);
        end
        OP_MOV32: begin
          wr_en[2] = 1'b1; wr_data[2] = sext32(imm);
        end
        OP_LH, OP_LW: begin
          rd_en[0] = 1'b1; wr_en[0] = 1'b1;
          mem_req[0].en = 1'b1; mem_req[0].word = (ins.op == OP_LW);
          wr_en[2] = 1'b1;
          wr_data[2] = sext32((ins.op == OP_LW) ? mem_rdata[0] : sx16(mem_rdata[0][15:0]));
        end
        OP_SH, OP_SW: begin
          rd_en[0] = 1'b1; rd_en[2] = 1'b1; wr_en[0] = 1'b1;
          mem_req[0].en = 1'b1; mem_req[0].we = 1'b1; mem_req[0].word = (ins.op == OP_SW);
        end
        OP_LH_D, OP_LW_D: begin
          rd_en[0] = 1'b1; rd_en[1] = 1'b1; wr_en[0] = 1'b1; wr_en[1] = 1'b1;
          for (int c = 0; c < 2; c++) begin
            mem_req[c].en = 1'b1; mem_req[c].word = (ins.op == OP_LW_D);
          end
          wr_en[2] = 1'b1; wr_en[3] = 1'b1;
          wr_data[2] = sext32((ins.op == OP_LW_D) ? mem_rdata[0] : sx16(mem_rdata[0][15:0]));
          wr_data[3] = sext32((ins.op == OP_LW_D) ? mem_rdata[1] : sx16(mem_rdata[1][15:0]));
        end
        OP_SH_D, OP_SW_D: begin
          rd_en = 4'b1111; wr_en[0] = 1'b1; wr_en[1] = 1'b1;
          for (int c = 0; c < 2; c++) begin
            mem_req[c].en = 1'b1; mem_req[c].we = 1'b1; mem_req[c].word = (ins.op == OP_SW_D);
          end
        end
        OP_LH_V: begin
          rd_en[0] = 1'b1; rd_en[1] = 1'b1; wr_en[0] = 1'b1; wr_en[1] = 1'b1;
          mem_req[0].en = 1'b1; mem_req[1].en = 1'b1;
          wr_en[2] = 1'b1;
          wr_data[2] = sext32({mem_rdata[0][15:0], mem_rdata[1][15:0]});
        end
        OP_SH_V: begin
          rd_en[0] = 1'b1; rd_en[1] = 1'b1; rd_en[2] = 1'b1;
          wr_en[0] = 1'b1; wr_en[1] = 1'b1;
          mem_req[0].en = 1'b1; mem_req[0].we = 1'b1; mem_req[0].wdata = {16'h0, dd[31:16]};
          mem_req[1].en = 1'b1; mem_req[1].we = 1'b1; mem_req[1].wdata = {16'h0, dd[15:0]};
        end
        default: ;  // NOP and ALU/MAC opcodes do nothing here
      endcase
    end
  end

  fu_rf_access u_acc (
    .rd_en, .rd_idx, .rd_data, .wr_en, .wr_idx, .wr_data,
    .loc_rd, .loc_wr, .loc_rsp, .ring_rd, .ring_wr, .ring_rsp, .conflict
  );

  a_no_conflict: assert property (@(posedge clk) !conflict)
    else $error("ls_unit: more than two ports of one register sub-block requested (op %s)", ins.op.name());
  a_aux_idle: assert property (@(posedge clk) (aux_rd_en || aux_wr_en) |-> !ins.valid)
    else $error("ls_unit: dispatcher register access while the field is busy");
endmodule
