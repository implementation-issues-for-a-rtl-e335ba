`timescale 1ns / 1ps
// Testbench for input_fsm. Steps the machine through reset, a dropped
// nibble without Start Of Packet, SOP detection, loading with DAV gaps,
// FifoFull, the wait in FULL, End Of Data and the decoder reset, and checks
// ACK, inc_fwr, the resets and FA_RDY in every cycle against the expected
// state sequence. Also checks that CAM load mode refuses a new packet but
// finishes one already being loaded. A small model of the fifo's first row
// supplies the SOP flag: bit 0 of the nibble written while the write
// decoder stands at row 0.
module tb_input_fsm;
  import router_pkg::*;
  logic clk = 0;
  mode_t mode;
  logic dav, bit0, sop, full, eod, ack, wr_inc, wr_rst, rd_rst, rdy;
  int checks = 0, failures = 0;

  input_fsm dut (.*);

  always #5 clk = ~clk;

  // fifo row 0: SOP flag captured on the first write after a decoder reset
  logic row0 = 1'b1;
  initial sop = 1'b0;
  always @(posedge clk) begin
    if (wr_rst) row0 <= 1'b1;
    else if (wr_inc) begin
      if (row0) sop <= bit0;
      row0 <= 1'b0;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expect {ack, wr_inc, wr_rst, rd_rst, rdy} in the current cycle
  task automatic exp(input string where, input logic [4:0] e);
    #1;
    checks++;
    if ({ack, wr_inc, wr_rst, rd_rst, rdy} !== e) begin
      failures++;
      $display("FAIL %s: got %b exp %b", where, {ack, wr_inc, wr_rst, rd_rst, rdy}, e);
    end
  endtask

  task automatic load_packet(input mode_t m);
    // IDLE: idle pattern, then SOP
    mode = m; dav = 0; bit0 = 0; full = 0; eod = 0;
    exp("idle", 5'b10000);
    @(negedge clk); dav = 1; bit0 = 0;
    exp("idle, nibble written", 5'b11000);
    @(negedge clk); dav = 1; bit0 = 1;
    exp("no SOP: write decoder reset", 5'b00100);
    @(negedge clk);
    exp("idle, SOP written", 5'b11000);
    @(negedge clk);
    for (int i = 1; i < 16; ) begin
      dav = ($urandom_range(0, 3) != 0); bit0 = 1'($urandom);
      exp("load", {1'b1, dav, 3'b000});
      @(negedge clk);
      if (dav) i++;
    end
    full = 1; dav = 0;
    exp("full seen", 5'b00000);
    @(negedge clk);
  endtask

  initial begin
    mode = MODE_RESET; dav = 0; bit0 = 0; full = 0; eod = 0;
    @(negedge clk);
    exp("state reset", 5'b00110);
    mode = MODE_NORMAL;
    @(negedge clk);
    for (int n = 0; n < 3; n++) begin
      load_packet(MODE_NORMAL);
      for (int w = 0; w < 5; w++) begin
        dav = 1; bit0 = 1;
        exp("full waits", 5'b00001);
        @(negedge clk);
      end
      dav = 0; eod = 1;
      exp("full, eod", 5'b00001);
      @(negedge clk); eod = 1; full = 1;
      exp("reset decoders", 5'b00110);
      @(negedge clk); eod = 0; full = 0;
    end
    // CAM load mode: a new packet is refused
    mode = MODE_CAM_LOAD; dav = 1; bit0 = 1;
    exp("cam load mode refuses", 5'b00000);
    @(negedge clk);
    exp("still refused", 5'b00000);
    // ... but a packet already loading is finished
    mode = MODE_NORMAL;
    exp("normal again", 5'b11000);
    @(negedge clk); mode = MODE_CAM_LOAD;
    exp("cam load mode while loading", 5'b11000);
    @(negedge clk);
    // test mode accepts like normal mode
    mode = MODE_RESET; @(negedge clk); mode = MODE_TEST; @(negedge clk);
    load_packet(MODE_TEST);
    exp("full in test mode", 5'b00001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
