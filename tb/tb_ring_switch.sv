// tb_ring_switch: for every ring offset, each field's request must reach
// shared block (field + offset) mod 4 and that block's read data must come
// back to the same field. Requests carry the field number so a misrouted
// one is seen.
module tb_ring_switch;
  import dsp_pkg::*;
  logic [1:0] off;
  rf_rreq_t [3:0] fu_rd, blk_rd;
  rf_wreq_t [3:0] fu_wr, blk_wr;
  rf_rsp_t  [3:0] blk_rsp, fu_rsp;
  int checks = 0, failures = 0;

  ring_switch #(.N(4)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int o = 0; o < 4; o++) begin
        off = 2'(o);
        for (int i = 0; i < 4; i++) begin
          fu_rd[i].raddr = {3'($urandom), 3'(i)};
          fu_wr[i].we = 2'($urandom);
          fu_wr[i].waddr = {3'(i), 3'($urandom)};
          fu_wr[i].wdata = {40'($urandom), 40'(i)};
          blk_rsp[i].rdata = {40'($urandom), 40'(100 + i)};
        end
        #1;
        for (int i = 0; i < 4; i++) begin
          int b;
          b = (i + o) % 4;
          checks += 3;
          if (blk_rd[b] != fu_rd[i]) begin failures++; $display("FAIL: off %0d read req field %0d", o, i); end
          if (blk_wr[b] != fu_wr[i]) begin failures++; $display("FAIL: off %0d write req field %0d", o, i); end
          if (fu_rsp[i] != blk_rsp[b]) begin failures++; $display("FAIL: off %0d rsp field %0d", o, i); end
        end
        #9;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
