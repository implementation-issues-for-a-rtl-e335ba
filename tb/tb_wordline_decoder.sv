`timescale 1ns / 1ps
// Testbench for wordline_decoder: every location with the load strobe on
// and off; exactly the named word line must be high, and none when off.
module tb_wordline_decoder;
  logic en;
  logic [2:0] loc;
  logic [7:0] wl;
  int checks = 0, failures = 0;

  wordline_decoder #(.N(3)) dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int l = 0; l < 8; l++) begin
        en = e[0]; loc = l[2:0];
        #1;
        checks++;
        if (wl !== (e ? (8'd1 << l) : 8'd0)) begin
          failures++;
          $display("FAIL en=%0d loc=%0d wl=%b", e, l, wl);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
