// rf_subblock: one register sub-block of the ring-structure register file.
// DEPTH registers of W bits with two asynchronous read ports and two write
// ports (2R/2W), which is all the ports a single functional unit needs.
// Reads return the contents before the clock edge; writes take effect at
// the rising edge. Writes of both ports to the same register in one cycle
// let port 1 win, and reset clears every register (both are this design's
// choices). Eight entries and the 2R/2W port count follow the architecture;
// the width is 32 bits for data/address blocks and 40 for accumulators.
module rf_subblock #(
  parameter int DEPTH = 8,
  parameter int W     = 32
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [1:0][$clog2(DEPTH)-1:0]   raddr,
  output logic [1:0][W-1:0]               rdata,
  input  logic [1:0]                      we,
  input  logic [1:0][$clog2(DEPTH)-1:0]   waddr,
  input  logic [1:0][W-1:0]               wdata
);
  logic [DEPTH-1:0][W-1:0] regs;

  always_comb begin
    for (int p = 0; p < 2; p++) rdata[p] = regs[raddr[p]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '0;
    end else begin
      for (int p = 0; p < 2; p++)
        if (we[p]) regs[waddr[p]] <= wdata[p];
    end
  end
endmodule
