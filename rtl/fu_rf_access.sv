// fu_rf_access: register-port allocator shared by the functional units.
// A unit names up to four source registers and up to four destination
// registers (r0-r15) per instruction. Registers r0-r7 live in the unit's
// private sub-block and r8-r15 in the shared ring block it is mapped to;
// each block has two read and two write ports. Slots are given, in slot
// order, the next free port of the block they address, and read data is
// returned per slot in the same cycle. An instruction needing more than two
// ports of one block is a programming error: 'conflict' then rises and an
// assertion reports it.
module fu_rf_access
  import dsp_pkg::*;
(
  input  logic [3:0]           rd_en,
  input  logic [3:0][3:0]      rd_idx,
  output logic [3:0][ACCW-1:0] rd_data,
  input  logic [3:0]           wr_en,
  input  logic [3:0][3:0]      wr_idx,
  input  logic [3:0][ACCW-1:0] wr_data,
  output rf_rreq_t             loc_rd,
  output rf_wreq_t             loc_wr,
  input  rf_rsp_t              loc_rsp,
  output rf_rreq_t             ring_rd,
  output rf_wreq_t             ring_wr,
  input  rf_rsp_t              ring_rsp,
  output logic                 conflict
);
  logic [3:0] rd_port;
  logic       rd_conflict, wr_conflict;

  assign conflict = rd_conflict | wr_conflict;

  always_comb begin
    int nl, nr;
    loc_rd      = '0;
    ring_rd     = '0;
    rd_conflict = 1'b0;
    rd_port     = '0;
    nl = 0; nr = 0;
    for (int s = 0; s < 4; s++) begin
      if (rd_en[s]) begin
        if (rd_idx[s][3]) begin
          if (nr > 1) rd_conflict = 1'b1;
          else begin
            ring_rd.raddr[nr] = rd_idx[s][2:0];
            rd_port[s] = nr[0];
          end
          nr++;
        end else begin
          if (nl > 1) rd_conflict = 1'b1;
          else begin
            loc_rd.raddr[nl] = rd_idx[s][2:0];
            rd_port[s] = nl[0];
          end
          nl++;
        end
      end
    end
  end

  always_comb begin
    for (int s = 0; s < 4; s++)
      rd_data[s] = rd_idx[s][3] ? ring_rsp.rdata[rd_port[s]] : loc_rsp.rdata[rd_port[s]];
  end

  always_comb begin
    int nl, nr;
    loc_wr      = '0;
    ring_wr     = '0;
    wr_conflict = 1'b0;
    nl = 0; nr = 0;
    for (int s = 0; s < 4; s++) begin
      if (wr_en[s]) begin
        if (wr_idx[s][3]) begin
          if (nr > 1) wr_conflict = 1'b1;
          else begin
            ring_wr.we[nr]    = 1'b1;
            ring_wr.waddr[nr] = wr_idx[s][2:0];
            ring_wr.wdata[nr] = wr_data[s];
          end
          nr++;
        end else begin
          if (nl > 1) wr_conflict = 1'b1;
          else begin
            loc_wr.we[nl]    = 1'b1;
            loc_wr.waddr[nl] = wr_idx[s][2:0];
            loc_wr.wdata[nl] = wr_data[s];
          end
          nl++;
        end
      end
    end
  end
endmodule
