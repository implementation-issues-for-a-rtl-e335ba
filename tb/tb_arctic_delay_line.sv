`timescale 1ns / 1ps
// Testbench for arctic_delay_line: random changes on the 16 lines, spaced
// further apart than the delay; each must reach the output no earlier and
// no later than 2500 ps (checked 1 ps before and 1 ps after).
module tb_arctic_delay_line;
  logic [15:0] d, q;
  int checks = 0, failures = 0;

  arctic_delay_line #(.W(16), .DELAY_PS(2500)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] old;
    d = 16'hffff;
    #3;
    d = 0;
    #3;
    for (int n = 0; n < 100; n++) begin
      old = d;
      d = 16'($urandom);
      #2499ps;
      checks++;
      if (q !== old) begin failures++; $display("FAIL early change %h", q); end
      #2ps;
      checks++;
      if (q !== d) begin failures++; $display("FAIL late: q=%h exp %h", q, d); end
      #(1ns * $urandom_range(1, 4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
