`timescale 1ns / 1ps
// Testbench for output_fsm with a behavioural fifo read side (EOD after 16
// read increments), a time-out model (timeout after LIMIT counted cycles)
// and a receiver whose ACK comes after a random delay or never. Checks that
// DAV rises after dir_rdy, that exactly 16 nibbles move on 16 consecutive
// cycles once ACK is up, that DAV drops at EOD and swap pulses once without
// timed_out; and that with no ACK the machine gives up after LIMIT cycles
// with swap and timed_out and no nibble moved.
module tb_output_fsm;
  localparam int LIMIT = 32;
  logic clk = 0, srst, dir_rdy, ack, eod, timeout;
  logic dav, inc_frd, swap, tc_inc, timed_out;
  int checks = 0, failures = 0;
  int rd_cnt, tc_cnt;

  output_fsm dut (.*);

  always #5 clk = ~clk;

  // fifo read side and time-out counter models
  always_ff @(posedge clk) begin
    if (srst || swap) rd_cnt <= 0;
    else if (inc_frd) rd_cnt <= rd_cnt + 1;
    if (!tc_inc) tc_cnt <= 0; else tc_cnt <= tc_cnt + 1;
  end
  assign eod     = (rd_cnt == 16);
  assign timeout = tc_inc && (tc_cnt >= LIMIT - 1);

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

  task automatic send(input int ack_delay);   // ack_delay < 0: never
    int cyc, moved, first, last, swaps, tos, dav_cycles;
    cyc = 0; moved = 0; first = -1; last = -1; swaps = 0; tos = 0; dav_cycles = 0;
    @(negedge clk); dir_rdy = 1;
    while (swaps == 0 && cyc < 200) begin
      ack = (ack_delay >= 0) && (cyc >= ack_delay + 1);
      #1;
      if (dav) dav_cycles++;
      if (dav && ack) begin
        moved++;
        if (first < 0) first = cyc;
        last = cyc;
        chk("inc_frd on each transfer", inc_frd);
      end else chk("no inc_frd without transfer", !inc_frd);
      if (swap) begin swaps++; if (timed_out) tos++; end
      @(negedge clk);
      if (swap) dir_rdy = 0;
      cyc++;
    end
    ack = 0;
    if (ack_delay >= 0) begin
      chk($sformatf("16 nibbles moved (%0d)", moved), moved == 16);
      chk("consecutive transfers", last - first == 15);
      chk("no time-out", tos == 0);
      chk("DAV from request to last nibble", dav_cycles == ack_delay + 1 + 15);
    end else begin
      chk("nothing moved", moved == 0);
      chk($sformatf("DAV held for LIMIT cycles (%0d)", dav_cycles), dav_cycles == LIMIT);
      chk("timed out", tos == 1);
    end
    chk("one swap", swaps == 1);
    repeat (2) @(negedge clk);
    chk("idle after swap", !dav && !swap);
  endtask

  initial begin
    srst = 1; dir_rdy = 0; ack = 0;
    @(negedge clk); @(negedge clk); srst = 0;
    @(negedge clk);
    chk("idle without dir_rdy", !dav && !swap && !tc_inc);
    for (int n = 0; n < 10; n++) send($urandom_range(0, 20));
    send(-1);
    send(0);
    send(-1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
