`timescale 1ns / 1ps
// Testbench for timeout_counter: waits of random length; `timeout` must rise
// exactly in the LIMIT-th consecutive counted cycle and never earlier, and
// a gap in `inc` must restart the count.
module tb_timeout_counter;
  localparam int LIMIT = 32;
  logic clk = 0, inc, timeout;
  int checks = 0, failures = 0;
  int run;

  timeout_counter #(.LIMIT(LIMIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc = 0; run = 0;
    @(negedge clk); @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      inc = ($urandom_range(0, 40) != 0);
      #1;
      if (inc) run++; else run = 0;
      checks++;
      if (timeout !== (inc && run >= LIMIT)) begin
        failures++;
        $display("FAIL cycle %0d run=%0d timeout=%b", i, run, timeout);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
