`timescale 1ns / 1ps
// Testbench for fifo_ring_decoder: resets the one-hot bit, advances it with
// random gaps, and compares row_en and `last` with a counter model after
// every edge, including increments at the dummy stage and a reset racing an
// increment.
module tb_fifo_ring_decoder;
  localparam int ROWS = 16;
  logic clk = 0, rst, inc;
  logic [ROWS-1:0] row_en;
  logic last;
  int checks = 0, failures = 0;
  int pos;

  fifo_ring_decoder #(.ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check;
    logic [ROWS-1:0] exp_row;
    exp_row = (pos < ROWS) ? (ROWS'(1) << pos) : '0;
    checks++;
    if (row_en !== exp_row || last !== (pos == ROWS)) begin
      failures++;
      $display("FAIL pos=%0d row_en=%h last=%b", pos, row_en, last);
    end
  endtask

  initial begin
    rst = 1; inc = 0;
    @(posedge clk); #1; pos = 0; rst = 0;
    check();
    for (int i = 0; i < 200; i++) begin
      inc = $urandom_range(0, 1);
      rst = ($urandom_range(0, 19) == 0);
      @(posedge clk); #1;
      if (rst) pos = 0;
      else if (inc && pos < ROWS) pos++;
      check();
    end
    // walk straight to the end, then increment more
    rst = 1; inc = 1; @(posedge clk); #1; pos = 0; rst = 0; check();
    for (int i = 0; i < ROWS + 3; i++) begin
      @(posedge clk); #1; if (pos < ROWS) pos++; check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
