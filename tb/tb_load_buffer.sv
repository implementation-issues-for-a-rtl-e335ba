`timescale 1ns / 1ps
// Testbench for load_buffer: writes random 8-bit entries in as four serial
// pairs (addr[1:0], addr[3:2], {loc[0],dir}, loc[2:1]) with idle cycles in
// between, and checks that the parallel output decodes to the same address,
// direction and location, and holds while shift is low. Entries follow one
// another without any reset, so the row select must recycle to row 0 by
// itself. Now and then an entry is cut off after one to three pairs and a
// state reset follows; the next entry must then land correctly again.
module tb_load_buffer;
  import router_pkg::*;
  logic clk = 0, srst, shift;
  logic [1:0] sd;
  logic [7:0] buf_q;
  load_entry_t e, got;
  int checks = 0, failures = 0;

  load_buffer #(.BITS(8), .SERIAL(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 0; sd = 0; srst = 1;
    @(negedge clk); srst = 0;
    for (int n = 0; n < 40; n++) begin
      logic [1:0] pairs [4];
      if (n % 7 == 6) begin
        // partial entry, then state reset
        repeat ($urandom_range(1, 3)) begin
          @(negedge clk); shift = 1; sd = 2'($urandom);
        end
        @(negedge clk); shift = 0; srst = 1;
        @(negedge clk); srst = 0;
      end
      e.addr = 4'($urandom); e.dir = 1'($urandom); e.loc = 3'($urandom);
      pairs[0] = e.addr[1:0];
      pairs[1] = e.addr[3:2];
      pairs[2] = {e.loc[0], e.dir};
      pairs[3] = e.loc[2:1];
      for (int k = 0; k < 4; k++) begin
        @(negedge clk); shift = 1; sd = pairs[k];
      end
      @(negedge clk); shift = 0; sd = 2'($urandom);
      repeat ($urandom_range(0, 2)) @(negedge clk);
      got = load_entry_t'(buf_q);
      checks++;
      if (got !== e) begin
        failures++;
        $display("FAIL got addr=%h dir=%b loc=%0d exp addr=%h dir=%b loc=%0d",
                 got.addr, got.dir, got.loc, e.addr, e.dir, e.loc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
