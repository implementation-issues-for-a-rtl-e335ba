`timescale 1ns / 1ps
// Testbench for input_fifo: writes random 16-nibble packets (with random
// write stalls), checks FifoFull after the 16th nibble, the SOP bit and the
// 4-bit address taken from packet bits 1-4, then reads the packet back with
// random read stalls, checking every nibble and End Of Data.
module tb_input_fifo;
  import router_pkg::*;
  logic clk = 0, wr_rst, wr_inc, rd_rst, rd_inc;
  nibble_t wr_data, rd_data;
  logic full, eod, sop;
  node_addr_t addr;
  int checks = 0, failures = 0;
  nibble_t pkt [16];

  input_fifo #(.DEPTH(16), .WIDTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    wr_rst = 0; wr_inc = 0; rd_rst = 0; rd_inc = 0; wr_data = 0;
    for (int n = 0; n < 20; n++) begin
      @(negedge clk); wr_rst = 1; rd_rst = 1;
      @(negedge clk); wr_rst = 0; rd_rst = 0;
      foreach (pkt[i]) pkt[i] = 4'($urandom);
      pkt[0][0] = 1'b1;
      chk("empty after reset", !full && !eod);
      for (int i = 0; i < 16; ) begin
        wr_inc = ($urandom_range(0, 3) != 0);
        wr_data = wr_inc ? pkt[i] : 4'($urandom);
        @(negedge clk);
        if (wr_inc) begin
          i++;
          if (i < 16) chk("not full early", !full);
        end
      end
      wr_inc = 0;
      chk("full after 16", full);
      chk("sop", sop == 1'b1);
      chk("address", addr == {pkt[1][0], pkt[0][3:1]});
      // extra write while full must not disturb the packet
      wr_inc = 1; wr_data = ~pkt[15]; @(negedge clk); wr_inc = 0;
      for (int i = 0; i < 16; ) begin
        chk($sformatf("eod low at row %0d", i), !eod);
        chk($sformatf("row %0d data %h exp %h", i, rd_data, pkt[i]), rd_data == pkt[i]);
        rd_inc = ($urandom_range(0, 3) != 0);
        @(negedge clk);
        if (rd_inc) i++;
        rd_inc = 0;
      end
      chk("eod after 16 reads", eod);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
