`timescale 1ns / 1ps
// Testbench for arctic_input_demux: two 50 MHz clocks 180 degrees apart;
// the 16-bit line carries the upper half-word around Clk A's falling edge
// and the lower half-word around Clk B's. After each Clk B falling edge the
// 32-bit output must hold {upper, lower}, and it must not change at Clk A's
// edges.
module tb_arctic_input_demux;
  logic clk_a = 1, clk_b = 0;
  logic [15:0] d;
  logic [31:0] q;
  int checks = 0, failures = 0;

  arctic_input_demux #(.W(16)) dut (.*);

  always #10 clk_a = ~clk_a;
  always #10 clk_b = ~clk_b;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Clk A falls at 10 + 20n ns, Clk B at 20 + 20n ns
  initial begin
    logic [31:0] w, prev;
    d = 0;
    #5;
    for (int n = 0; n < 200; n++) begin
      w = $urandom;
      d = w[31:16];                 // 5 ns before Clk A falls
      #8;                           // 3 ns after Clk A fell
      if (n > 0) begin
        checks++;
        if (q !== prev) begin failures++; $display("FAIL output changed at Clk A edge"); end
      end
      d = w[15:0];                  // 7 ns before Clk B falls
      #8;                           // 1 ns after Clk B fell
      checks++;
      if (q !== w) begin
        failures++;
        $display("FAIL word %0d: q=%h exp %h", n, q, w);
      end
      prev = w;
      #4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
