// ring_switch: the explicit N-by-N switch network between the functional
// units' ring ports and the N shared register sub-blocks. The ring offset of
// the executing packet rotates the mapping: field i reaches shared block
// (i + off) mod N, so block b serves field (b - off) mod N. The mapping has
// no state of its own; it follows the offset carried by every packet. The
// switch is purely combinational. The rotation direction is this design's
// choice.
module ring_switch
  import dsp_pkg::*;
#(
  parameter int N = 4
) (
  input  logic [$clog2(N)-1:0] off,
  input  rf_rreq_t [N-1:0]     fu_rd,
  input  rf_wreq_t [N-1:0]     fu_wr,
  output rf_rreq_t [N-1:0]     blk_rd,
  output rf_wreq_t [N-1:0]     blk_wr,
  input  rf_rsp_t [N-1:0]      blk_rsp,
  output rf_rsp_t [N-1:0]      fu_rsp
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      fu_rsp[i]                            = blk_rsp[(i + int'(off)) % N];
      blk_rd[(i + int'(off)) % N]          = fu_rd[i];
      blk_wr[(i + int'(off)) % N]          = fu_wr[i];
    end
  end
endmodule
