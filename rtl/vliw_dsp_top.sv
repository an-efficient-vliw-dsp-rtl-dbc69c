// vliw_dsp_top: four-way VLIW DSP for baseband processing.
// Two tiers: the instruction dispatcher reads compressed 1024-bit bundles
// from the instruction memory, resolves loops and jumps, and issues one
// packet per cycle; the datapath executes it with four fields: 0 and 1 are
// control/load-store units, 2 and 3 SIMD ALU/MAC units (field 2 can borrow
// field 3's multipliers). All four share the ring-structure register file,
// whose ring mapping follows the 2-bit offset of the executing packet, and
// the two load/store units reach the data memory over two channels each.
//
// Pipeline (this design's choice): bundle fetch, cap decode and dispatch,
// then one execute stage in which registers are read, units and memory
// compute and results are written at the clock edge. A result is therefore
// visible to the very next packet, which is what the load-to-MAC schedule
// of a software-pipelined FIR loop relies on. BNEZ/JR read their register
// through field 0 while the following packet executes; a taken branch costs
// one empty cycle.
//
// Ports: clock and active-low reset (after reset the core starts at packet
// 0 of bundle 0), a bundle write port and a half-word data-memory port for
// the host, the TRAP strobe with its number, a strobe for every executed
// packet and the dispatcher's event strobes.
//
// rst_n is an asynchronous reset of all state. Lint tools may report it as
// used both asynchronously and synchronously: the synchronous use is only
// the 'disable iff' of the dispatcher's assertions, not logic.
module vliw_dsp_top
  import dsp_pkg::*;
#(
  parameter int IMEM_BUNDLES   = 256,
  parameter int DMEM_HALFWORDS = 16384
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              imem_we,
  input  logic [$clog2(IMEM_BUNDLES)-1:0]   imem_waddr,
  input  logic [BUNDLE_W-1:0]               imem_wdata,
  input  logic                              dmem_host_en,
  input  logic                              dmem_host_we,
  input  logic [HADDR_W-1:0]                dmem_host_addr,
  input  logic [15:0]                       dmem_host_wdata,
  output logic [15:0]                       dmem_host_rdata,
  output logic                              trap_valid,
  output logic [7:0]                        trap_num,
  output logic                              cycle_issue,
  output logic                              ev_loop_back,
  output logic                              ev_bundle_swap,
  output logic                              ev_redirect,
  output logic                              ev_bubble,
  output logic                              ev_branch_taken
);
  localparam int IAW = $clog2(IMEM_BUNDLES);

  logic                 imem_re;
  logic [IAW-1:0]       imem_raddr;
  logic [BUNDLE_W-1:0]  imem_rdata;
  packet_t              pkt;
  logic                 br_taken;
  pos_t                 br_target;
  logic [31:0]          br_reg_val;

  rf_rreq_t [NFU-1:0]   loc_rd, ring_rd;
  rf_wreq_t [NFU-1:0]   loc_wr, ring_wr;
  rf_rsp_t [NFU-1:0]    loc_rsp, ring_rsp;
  fu_ins_t [NFU-1:0]    ins;
  mem_req_t [3:0]       mreq;
  logic [3:0][31:0]     mrdata;

  logic                 b2_en, b3_en;
  mop_t [1:0]           b2_a, b2_b, b3_a, b3_b;
  mprod_t [1:0]         p2, p3;

  inst_mem #(.BUNDLES(IMEM_BUNDLES), .BUNDLE_W(BUNDLE_W)) u_imem (
    .clk, .re(imem_re), .raddr(imem_raddr), .rdata(imem_rdata),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  instruction_dispatcher #(.IMEM_AW(IAW)) u_disp (
    .clk, .rst_n, .imem_re, .imem_raddr, .imem_rdata, .pkt,
    .br_taken, .br_target, .trap_valid, .trap_num,
    .ev_loop_back, .ev_bundle_swap, .ev_redirect, .ev_bubble
  );

  always_comb begin
    for (int f = 0; f < NFU; f++) ins[f] = pkt.valid ? pkt.ins[f] : '0;
  end
  assign cycle_issue = pkt.valid;

  // Branch resolution through field 0.
  assign br_taken  = pkt.valid && pkt.br_en && (pkt.br_is_jr || br_reg_val != 32'd0);
  assign br_target = pkt.br_is_jr ? pos_t'(br_reg_val[POS_W-1:0]) : pkt.br_target;
  assign ev_branch_taken = br_taken;

  ring_rf #(.N(NFU)) u_rf (
    .clk, .rst_n, .ring_off(pkt.ring_off),
    .loc_rd, .loc_wr, .loc_rsp, .ring_rd, .ring_wr, .ring_rsp
  );

  ls_unit u_ls0 (
    .clk, .ins(ins[0]),
    .aux_rd_en(pkt.valid && pkt.br_en), .aux_rd_idx(pkt.br_reg), .aux_rd_data(br_reg_val),
    .aux_wr_en(pkt.link_we), .aux_wr_data(pkt.link_val),
    .loc_rd(loc_rd[0]), .loc_wr(loc_wr[0]), .loc_rsp(loc_rsp[0]),
    .ring_rd(ring_rd[0]), .ring_wr(ring_wr[0]), .ring_rsp(ring_rsp[0]),
    .mem_req(mreq[1:0]), .mem_rdata(mrdata[1:0])
  );

  logic [31:0] ls1_aux_unused;
  ls_unit u_ls1 (
    .clk, .ins(ins[1]),
    .aux_rd_en(1'b0), .aux_rd_idx(4'd0), .aux_rd_data(ls1_aux_unused),
    .aux_wr_en(1'b0), .aux_wr_data(32'd0),
    .loc_rd(loc_rd[1]), .loc_wr(loc_wr[1]), .loc_rsp(loc_rsp[1]),
    .ring_rd(ring_rd[1]), .ring_wr(ring_wr[1]), .ring_rsp(ring_rsp[1]),
    .mem_req(mreq[3:2]), .mem_rdata(mrdata[3:2])
  );

  alu_mac_unit #(.ENHANCED(1'b1)) u_alu2 (
    .clk, .ins(ins[2]),
    .loc_rd(loc_rd[2]), .loc_wr(loc_wr[2]), .loc_rsp(loc_rsp[2]),
    .ring_rd(ring_rd[2]), .ring_wr(ring_wr[2]), .ring_rsp(ring_rsp[2]),
    .bor_en(b2_en), .bor_a(b2_a), .bor_b(b2_b), .bor_p(p3),
    .lend_en(b3_en), .lend_a(b3_a), .lend_b(b3_b), .lend_p(p2)
  );

  alu_mac_unit #(.ENHANCED(1'b0)) u_alu3 (
    .clk, .ins(ins[3]),
    .loc_rd(loc_rd[3]), .loc_wr(loc_wr[3]), .loc_rsp(loc_rsp[3]),
    .ring_rd(ring_rd[3]), .ring_wr(ring_wr[3]), .ring_rsp(ring_rsp[3]),
    .bor_en(b3_en), .bor_a(b3_a), .bor_b(b3_b), .bor_p(p2),
    .lend_en(b2_en), .lend_a(b2_a), .lend_b(b2_b), .lend_p(p3)
  );

  data_mem #(.HALFWORDS(DMEM_HALFWORDS), .CHANNELS(4)) u_dmem (
    .clk, .req(mreq), .rdata(mrdata),
    .host_en(dmem_host_en), .host_we(dmem_host_we), .host_addr(dmem_host_addr),
    .host_wdata(dmem_host_wdata), .host_rdata(dmem_host_rdata)
  );
endmodule
