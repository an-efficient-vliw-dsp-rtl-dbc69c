// tb_data_mem: random traffic on the four channels and the host port of the
// half-word addressed data memory, compared with a model array: word
// accesses at even and odd addresses (high half at the lower address),
// half-word accesses, combinational reads, and the higher channel winning
// a write collision. Full 32-Kbyte size.
module tb_data_mem;
  import dsp_pkg::*;
  localparam int HW = 16384;
  logic clk = 0;
  mem_req_t [3:0] req;
  logic [3:0][31:0] rdata;
  logic host_en = 0, host_we = 0;
  logic [HADDR_W-1:0] host_addr = '0;
  logic [15:0] host_wdata = '0, host_rdata;
  logic [15:0] model [HW];
  int checks = 0, failures = 0;

  data_mem #(.HALFWORDS(HW), .CHANNELS(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int collisions = 0;
    req = '0;
    // initialise a window through the host port
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      host_en = 1; host_we = 1; host_addr = HADDR_W'(i); host_wdata = 16'($urandom);
      model[i] = host_wdata;
    end
    @(negedge clk);
    host_en = 0; host_we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int c = 0; c < 4; c++) begin
        req[c].en = 1'b1;
        req[c].we = ($urandom_range(0, 2) == 0);
        req[c].word = 1'($urandom);
        req[c].addr = HADDR_W'($urandom_range(0, 62));
        req[c].wdata = $urandom;
      end
      #1;
      for (int c = 0; c < 4; c++) begin
        logic [31:0] e;
        e = req[c].word ? {model[req[c].addr], model[req[c].addr + 1]} : {16'h0, model[req[c].addr]};
        checks++;
        if (rdata[c] !== e) begin
          failures++;
          $display("FAIL: t=%0d ch %0d addr %0d got %h expected %h", t, c, req[c].addr, rdata[c], e);
        end
      end
      for (int c = 0; c < 4; c++)
        for (int d = c + 1; d < 4; d++)
          if (req[c].we && req[d].we && req[c].addr == req[d].addr) collisions++;
      @(posedge clk);
      for (int c = 0; c < 4; c++) if (req[c].we) begin
        if (req[c].word) begin
          model[req[c].addr] = req[c].wdata[31:16];
          model[req[c].addr + 1] = req[c].wdata[15:0];
        end else model[req[c].addr] = req[c].wdata[15:0];
      end
    end
    @(negedge clk);
    req = '0;
    for (int i = 0; i < 64; i++) begin
      host_en = 1; host_addr = HADDR_W'(i); #1;
      checks++;
      if (host_rdata !== model[i]) begin failures++; $display("FAIL: host read %0d", i); end
    end
    // top of memory
    @(negedge clk);
    host_en = 1; host_we = 1; host_addr = HADDR_W'(HW - 1); host_wdata = 16'h7E57;
    @(negedge clk);
    host_we = 0; req[0].en = 1; req[0].word = 0; req[0].addr = HADDR_W'(HW - 1); #1;
    checks++;
    if (rdata[0] !== 32'h0000_7E57) begin failures++; $display("FAIL: last half-word"); end
    checks++;
    if (collisions == 0) begin failures++; $display("FAIL: no collision exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
