// inst_mem: instruction memory holding 1024-bit instruction bundles.
// The default of 256 bundles is one 32-Kbyte page, the size of the
// instruction memory built on chip; program positions also carry a 7-bit
// page number (up to 128 pages), which a larger BUNDLES setting would use
// as the upper address bits. The dispatcher reads a whole bundle per access:
// raddr is taken at the rising edge when re is high and the bundle appears
// on rdata from then on (one cycle latency).
// A separate write port loads programs. The bundle size and page size follow
// the architecture; the latency and the write port are this design's choices.
module inst_mem #(
  parameter int BUNDLES  = 256,
  parameter int BUNDLE_W = 1024
) (
  input  logic                        clk,
  input  logic                        re,
  input  logic [$clog2(BUNDLES)-1:0]  raddr,
  output logic [BUNDLE_W-1:0]         rdata,
  input  logic                        we,
  input  logic [$clog2(BUNDLES)-1:0]  waddr,
  input  logic [BUNDLE_W-1:0]         wdata
);
  logic [BUNDLE_W-1:0] mem [BUNDLES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
