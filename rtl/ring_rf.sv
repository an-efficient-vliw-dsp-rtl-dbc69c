// ring_rf: ring-structure register file of the four-way VLIW DSP.
// Instead of one 16-entry register file with ports for all four functional
// units, the storage is split into 2N = 8 sub-blocks that each have ports for
// a single unit: N private blocks (r0-r7 of each field: 8x32 for the
// control/load-store fields 0/1, 8x40 accumulators for the ALU/MAC fields
// 2/3) and N shared 8x32 ring blocks (r8-r15). A stateless N-by-N switch
// (ring_switch) maps field i's r8-r15 onto shared block (i + ring_off) mod N,
// where ring_off is the 2-bit offset of the executing packet. Each field
// drives one 2R/2W request to its private block and one to its mapped ring
// block; read data comes back in the same cycle, sign-extended to 40 bits.
// Writes into 32-bit blocks keep the low 32 bits (saturation, where wanted,
// is done by the writing unit).
module ring_rf
  import dsp_pkg::*;
#(
  parameter int N = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [$clog2(N)-1:0]  ring_off,
  input  rf_rreq_t [N-1:0]      loc_rd,
  input  rf_wreq_t [N-1:0]      loc_wr,
  output rf_rsp_t [N-1:0]       loc_rsp,
  input  rf_rreq_t [N-1:0]      ring_rd,
  input  rf_wreq_t [N-1:0]      ring_wr,
  output rf_rsp_t [N-1:0]       ring_rsp
);
  rf_rreq_t [N-1:0] blk_rd;
  rf_wreq_t [N-1:0] blk_wr;
  rf_rsp_t [N-1:0] blk_rsp;

  ring_switch #(.N(N)) u_switch (
    .off(ring_off), .fu_rd(ring_rd), .fu_wr(ring_wr), .blk_rd, .blk_wr,
    .blk_rsp(blk_rsp), .fu_rsp(ring_rsp)
  );

  for (genvar i = 0; i < N; i++) begin : g_blk
    // Private block: 32-bit for the lower half of the fields (LS), 40-bit above.
    localparam int LW = (i < N/2) ? DW : ACCW;
    logic [1:0][LW-1:0] l_rd, l_wd;
    logic [1:0][DW-1:0] s_rd, s_wd;

    for (genvar p = 0; p < 2; p++) begin : g_p
      assign l_wd[p] = loc_wr[i].wdata[p][LW-1:0];
      assign s_wd[p] = blk_wr[i].wdata[p][DW-1:0];
      assign loc_rsp[i].rdata[p] = ACCW'(signed'(l_rd[p]));
      assign blk_rsp[i].rdata[p] = sext32(s_rd[p]);
    end

    rf_subblock #(.DEPTH(REGS), .W(LW)) u_local (
      .clk, .rst_n, .raddr(loc_rd[i].raddr), .rdata(l_rd),
      .we(loc_wr[i].we), .waddr(loc_wr[i].waddr), .wdata(l_wd)
    );
    rf_subblock #(.DEPTH(REGS), .W(DW)) u_shared (
      .clk, .rst_n, .raddr(blk_rd[i].raddr), .rdata(s_rd),
      .we(blk_wr[i].we), .waddr(blk_wr[i].waddr), .wdata(s_wd)
    );
  end
endmodule
