// tb_inst_mem: writes random 1024-bit bundles into every location of the
// instruction memory and reads them back in random order, checking the one
// cycle read latency and that rdata holds while re is low.
module tb_inst_mem;
  localparam int BUNDLES = 256;
  logic clk = 0;
  logic re = 0, we = 0;
  logic [7:0] raddr = '0, waddr = '0;
  logic [1023:0] rdata, wdata = '0;
  logic [1023:0] model [BUNDLES];
  int checks = 0, failures = 0;

  inst_mem #(.BUNDLES(BUNDLES), .BUNDLE_W(1024)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < BUNDLES; b++) begin
      @(negedge clk);
      we = 1; waddr = 8'(b);
      for (int k = 0; k < 32; k++) wdata[32*k +: 32] = $urandom;
      model[b] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 600; t++) begin
      int a;
      a = $urandom_range(0, BUNDLES - 1);
      @(negedge clk);
      re = 1; raddr = 8'(a);
      @(negedge clk);
      re = 0; raddr = 8'(a + 1);
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL: bundle %0d", a); end
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL: bundle %0d not held", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
