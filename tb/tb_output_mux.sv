`timescale 1ns / 1ps
// Testbench for output_mux: for every source/direction pair, latches the
// path on dir_rdy, then streams random nibbles from both fifos and checks
// that only the chosen port carries the chosen fifo's nibble and DAV, the
// other port idles at 0000, ACK comes from the chosen port, the path holds
// when src/dir change mid-packet, and swap releases it.
module tb_output_mux;
  import router_pkg::*;
  logic clk = 0, srst, src, dir, dir_rdy, swap, dav, north_ack, east_ack;
  nibble_t fa_data, fb_data, north_data, east_data;
  logic north_dav, east_dav, ack;
  int checks = 0, failures = 0;

  output_mux dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
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
    srst = 1; src = 0; dir = 0; dir_rdy = 0; swap = 0; dav = 0;
    north_ack = 0; east_ack = 0; fa_data = 0; fb_data = 0;
    @(negedge clk); srst = 0;
    for (int n = 0; n < 16; n++) begin
      logic s, d;
      nibble_t want;
      s = n[0]; d = n[1];
      src = s; dir = d; dir_rdy = 1;
      @(negedge clk);
      // change the inputs: the latched path must hold
      src = ~s; dir = ~d;
      for (int k = 0; k < 20; k++) begin
        dav = 1'($urandom); fa_data = 4'($urandom); fb_data = 4'($urandom);
        north_ack = 1'($urandom); east_ack = 1'($urandom);
        #1;
        want = s ? fb_data : fa_data;
        if (d == DIR_EAST) begin
          chk("east carries", east_dav == dav && east_data == (dav ? want : 4'h0));
          chk("north idle", !north_dav && north_data == 4'h0);
          chk("ack from east", ack == east_ack);
        end else begin
          chk("north carries", north_dav == dav && north_data == (dav ? want : 4'h0));
          chk("east idle", !east_dav && east_data == 4'h0);
          chk("ack from north", ack == north_ack);
        end
        @(negedge clk);
      end
      dav = 0; dir_rdy = 0; swap = 1;
      @(negedge clk); swap = 0;
      dav = 1; north_ack = 1; east_ack = 1; #1;
      chk("released after swap", !north_dav && !east_dav && !ack);
      dav = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
