// tb_ring_rf: drives the ring-structure register file from the four
// fields with random ring offsets and compares every read with a model of
// four private blocks (32-bit for fields 0/1, 40-bit for fields 2/3) and
// four shared 32-bit blocks reached at (field + offset) mod 4. It also
// checks that a value written by one field through the ring is read by
// another field under a different offset, which is how data moves between
// units.
module tb_ring_rf;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  logic [1:0] ring_off;
  rf_rreq_t [3:0] loc_rd, ring_rd;
  rf_wreq_t [3:0] loc_wr, ring_wr;
  rf_rsp_t  [3:0] loc_rsp, ring_rsp;
  logic [39:0] mloc [4][8];
  logic [31:0] mshr [4][8];
  int checks = 0, failures = 0;

  ring_rf #(.N(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [39:0] lval(int f, logic [39:0] v);
    return (f < 2) ? {{8{v[31]}}, v[31:0]} : v;
  endfunction

  initial begin
    loc_rd = '0; ring_rd = '0; loc_wr = '0; ring_wr = '0; ring_off = '0;
    for (int f = 0; f < 4; f++) for (int r = 0; r < 8; r++) begin mloc[f][r] = '0; mshr[f][r] = '0; end
    #12 rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      ring_off = 2'($urandom);
      for (int f = 0; f < 4; f++) for (int p = 0; p < 2; p++) begin
        loc_rd[f].raddr[p]  = 3'($urandom);
        ring_rd[f].raddr[p] = 3'($urandom);
        loc_wr[f].we[p]     = 1'($urandom);
        loc_wr[f].waddr[p]  = 3'($urandom);
        loc_wr[f].wdata[p]  = {8'($urandom), 32'($urandom)};
        ring_wr[f].we[p]    = 1'($urandom);
        ring_wr[f].waddr[p] = 3'($urandom);
        ring_wr[f].wdata[p] = {8'($urandom), 32'($urandom)};
      end
      // keep ring writes of different fields apart (each block has one owner per cycle anyway)
      #1;
      for (int f = 0; f < 4; f++) for (int p = 0; p < 2; p++) begin
        int b;
        b = (f + int'(ring_off)) % 4;
        checks += 2;
        if (loc_rsp[f].rdata[p] != lval(f, mloc[f][loc_rd[f].raddr[p]])) begin
          failures++; $display("FAIL: t=%0d field %0d private read", t, f);
        end
        if (ring_rsp[f].rdata[p] != {{8{mshr[b][ring_rd[f].raddr[p]][31]}}, mshr[b][ring_rd[f].raddr[p]]}) begin
          failures++; $display("FAIL: t=%0d field %0d ring read (block %0d)", t, f, b);
        end
      end
      @(posedge clk);
      for (int f = 0; f < 4; f++) for (int p = 0; p < 2; p++) begin
        int b;
        b = (f + int'(ring_off)) % 4;
        if (loc_wr[f].we[p])  mloc[f][loc_wr[f].waddr[p]] = lval(f, loc_wr[f].wdata[p]);
        if (ring_wr[f].we[p]) mshr[b][ring_wr[f].waddr[p]] = ring_wr[f].wdata[p][31:0];
      end
    end
    // directed: field 0 writes r9 at offset 2 (block 2); field 2 reads it at offset 0
    @(negedge clk);
    loc_wr = '0; ring_wr = '0;
    ring_off = 2'd2;
    ring_wr[0].we[0] = 1'b1; ring_wr[0].waddr[0] = 3'd1; ring_wr[0].wdata[0] = 40'h00_CAFE_F00D;
    @(negedge clk);
    ring_wr = '0;
    ring_off = 2'd0;
    ring_rd[2].raddr[1] = 3'd1;
    #1;
    checks++;
    if (ring_rsp[2].rdata[1] != 40'hFF_CAFE_F00D) begin
      failures++; $display("FAIL: transfer through ring got %h", ring_rsp[2].rdata[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
