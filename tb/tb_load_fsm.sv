`timescale 1ns / 1ps
// Testbench for load_fsm: a cam_av strobe must give exactly four shift
// cycles (the strobe's and the three after), then CA_RDY until ca_ack, and
// idle afterwards. A second strobe while an entry waits must restart the
// four shifts (the buffer is overwritten), and state reset must clear it.
module tb_load_fsm;
  logic clk = 0, srst, cam_av, ca_ack, shift, ca_rdy;
  int checks = 0, failures = 0;

  load_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exp(input string where, input logic s, input logic r);
    #1;
    checks++;
    if (shift !== s || ca_rdy !== r) begin
      failures++;
      $display("FAIL %s: shift=%b ca_rdy=%b exp %b %b", where, shift, ca_rdy, s, r);
    end
  endtask

  task automatic strobe_and_shift(input logic waiting = 1'b0);
    cam_av = 1; exp("strobe shifts", 1, waiting);
    @(negedge clk); cam_av = 0;
    for (int k = 1; k < 4; k++) begin
      exp($sformatf("shift %0d", k), 1, 0);
      @(negedge clk);
    end
  endtask

  initial begin
    srst = 1; cam_av = 0; ca_ack = 0;
    @(negedge clk); srst = 0;
    exp("idle", 0, 0);
    for (int n = 0; n < 5; n++) begin
      strobe_and_shift();
      repeat ($urandom_range(1, 6)) begin
        exp("entry waits", 0, 1);
        @(negedge clk);
      end
      ca_ack = 1; exp("taken", 0, 1);
      @(negedge clk); ca_ack = 0;
      exp("idle after take", 0, 0);
      @(negedge clk);
    end
    // overwrite while waiting
    strobe_and_shift();
    exp("waiting", 0, 1);
    strobe_and_shift(1'b1);
    exp("reloaded entry waits", 0, 1);
    @(negedge clk); srst = 1; @(negedge clk); srst = 0;
    exp("state reset clears", 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
