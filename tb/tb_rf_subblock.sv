// tb_rf_subblock: checks the 2R/2W register sub-block against a model:
// reset clears all registers, both write ports store in the same cycle,
// port 1 wins a same-register collision, and both read ports return the
// contents before the clock edge. Random traffic for 400 cycles.
module tb_rf_subblock;
  localparam int W = 40;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  logic [1:0][2:0]   raddr, waddr;
  logic [1:0][W-1:0] rdata, wdata;
  logic [1:0]        we;
  logic [W-1:0]      model [8];
  int checks = 0, failures = 0;

  rf_subblock #(.DEPTH(8), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int collisions = 0;
    we = '0; raddr = '0; waddr = '0; wdata = '0;
    foreach (model[i]) model[i] = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      raddr[0] = 3'(i); #1;
      checks++; if (rdata[0] != '0) begin failures++; $display("FAIL: reset r%0d", i); end
    end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        we[p] = 1'($urandom);
        waddr[p] = 3'($urandom);
        wdata[p] = {8'($urandom), 32'($urandom)};
        raddr[p] = 3'($urandom);
      end
      #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (rdata[p] != model[raddr[p]]) begin
          failures++;
          $display("FAIL: t=%0d port %0d r%0d = %h, expected %h", t, p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      if (we[0] && we[1] && waddr[0] == waddr[1]) collisions++;
      @(posedge clk);
      if (we[0]) model[waddr[0]] = wdata[0];
      if (we[1]) model[waddr[1]] = wdata[1];
    end
    checks++;
    if (collisions == 0) begin failures++; $display("FAIL: no write collision exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
