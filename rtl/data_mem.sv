// data_mem: half-word addressed data memory (32 Kbyte = 16384 x 16 bits).
// It serves four channels, two for each load/store unit, so that a double
// load or store completes in one cycle, plus a host port for loading and
// inspecting data. A word access at address a covers half-words a (high
// half) and a+1 (low half); words may start at odd addresses. Half-word
// reads return the half-word in rdata[15:0]. Reads are combinational, so a
// load's data is written to the register file in the cycle it executes;
// writes happen at the rising edge, the higher-numbered channel last (it
// wins a collision) and the host port before the channels. The size and
// half-word addressing follow the architecture; the byte order within a
// word, the port structure and the timing are this design's choices.
module data_mem
  import dsp_pkg::*;
#(
  parameter int HALFWORDS = 16384,
  parameter int CHANNELS  = 4
) (
  input  logic                          clk,
  input  mem_req_t [CHANNELS-1:0]       req,
  output logic [CHANNELS-1:0][31:0]     rdata,
  input  logic                          host_en,
  input  logic                          host_we,
  input  logic [HADDR_W-1:0]            host_addr,
  input  logic [15:0]                   host_wdata,
  output logic [15:0]                   host_rdata
);
  localparam int AW = $clog2(HALFWORDS);
  logic [15:0] mem [HALFWORDS];

  function automatic logic [AW-1:0] hi_a(input logic [HADDR_W-1:0] a);
    return AW'(a);
  endfunction
  function automatic logic [AW-1:0] lo_a(input logic [HADDR_W-1:0] a);
    return AW'(a + 1'b1);
  endfunction

  always_comb begin
    for (int c = 0; c < CHANNELS; c++)
      rdata[c] = req[c].word ? {mem[hi_a(req[c].addr)], mem[lo_a(req[c].addr)]}
                             : {16'h0, mem[hi_a(req[c].addr)]};
    host_rdata = mem[hi_a(host_addr)];
  end

  always_ff @(posedge clk) begin
    if (host_en && host_we) mem[hi_a(host_addr)] <= host_wdata;
    for (int c = 0; c < CHANNELS; c++) begin
      if (req[c].en && req[c].we) begin
        if (req[c].word) begin
          mem[hi_a(req[c].addr)] <= req[c].wdata[31:16];
          mem[lo_a(req[c].addr)] <= req[c].wdata[15:0];
        end else begin
          mem[hi_a(req[c].addr)] <= req[c].wdata[15:0];
        end
      end
    end
  end
endmodule
