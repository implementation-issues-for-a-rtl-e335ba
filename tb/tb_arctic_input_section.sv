`timescale 1ns / 1ps
// Testbench for arctic_input_section under the link's worst-case timing.
//
// Clocks: two 50 MHz phases 180 degrees apart. Falling edges alternate
// between Clk A and Clk B, and each one is a rising edge of the other
// phase. The spacing of consecutive falling edges is drawn at random from
// 8500 ps to 11500 ps (10 ns plus or minus 1.5 ns).
//
// Data: one 16-bit half-word per falling edge. At the input pads half-word
// k is valid only from 5750 ps to 1000 ps before edge k. The change to it
// happens at a random moment in the region left between two windows: from
// 1000 ps before edge k-1 to 5750 ps before edge k.
//
// Five input sections run side by side on the same pads, with different
// delay lines:
// * 2500 ps, the nominal delay;
// * 1675 ps, its best-case derating (x0.67);
// * 4350 ps, its worst-case derating (x1.74);
// * 1340 ps and 5290 ps, the two ends of the range the timing budget allows.
// For each section:
// * every 32-bit word must come out as {Clk A half, Clk B half};
// * at every falling edge the delayed data must meet the registers' 460 ps
//   setup and 340 ps hold times, measured on the delay line's output.
module tb_arctic_input_section;
  localparam int NEDGE = 400;
  localparam int ND    = 5;
  localparam int DELAYS [ND] = '{2500, 1675, 4350, 1340, 5290};

  logic clk_a = 1, clk_b = 1;
  logic [15:0] pad_data = '0;
  logic [31:0] data_out [ND];
  int checks = 0, failures = 0;
  logic [15:0] halves [NEDGE];
  int edge_ps [NEDGE];
  logic started = 0;

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  for (genvar i = 0; i < ND; i++) begin : g_sec
    logic [15:0] dly;
    real last_change, last_edge;

    arctic_input_section #(.W(16), .DELAY_PS(DELAYS[i])) dut (
      .clk_a, .clk_b, .pad_data, .data_out(data_out[i])
    );

    assign dly = dut.delayed;

    initial begin
      last_change = 0.0;
      last_edge   = -1.0;
    end

    // hold: the delayed data may change no sooner than 340 ps after an edge
    always @(dly) begin
      if (started && last_edge >= 0.0)
        chk($sformatf("hold time, delay %0d ps", DELAYS[i]), $realtime - last_edge >= 0.340);
      last_change = $realtime;
    end

    // setup: stable for 460 ps before each falling edge
    always @(negedge clk_a or negedge clk_b) begin
      if (started)
        chk($sformatf("setup time, delay %0d ps", DELAYS[i]), $realtime - last_change >= 0.460);
      last_edge = $realtime;
    end
  end

  initial begin
    #(NEDGE * 12);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // edge times and data
  initial begin
    edge_ps[0] = 10000;
    for (int k = 1; k < NEDGE; k++) edge_ps[k] = edge_ps[k-1] + $urandom_range(8500, 11500);
    for (int k = 0; k < NEDGE; k++) halves[k] = 16'($urandom);
  end

  // clock driver: edge k is a falling edge of Clk A (k even) or Clk B (k odd)
  // and a rising edge of the other phase
  initial begin
    int cur_ps;
    cur_ps = 0;
    #1;
    cur_ps = 1000;
    for (int k = 0; k < NEDGE; k++) begin
      #((edge_ps[k] - cur_ps) * 1ps);
      cur_ps = edge_ps[k];
      if (k % 2 == 0) begin clk_a = 0; clk_b = 1; end
      else            begin clk_b = 0; clk_a = 1; end
      if (k == 4) started = 1;
    end
  end

  // pad driver: half-word k appears between the window of edge k-1 and
  // the window of edge k
  initial begin
    int change_ps, cur_ps, lo, hi;
    cur_ps = 0;
    #1;
    cur_ps = 1000;
    pad_data = halves[0];
    for (int k = 1; k < NEDGE; k++) begin
      lo = edge_ps[k-1] - 1000;
      hi = edge_ps[k] - 5750;
      change_ps = $urandom_range(lo, hi);
      #((change_ps - cur_ps) * 1ps);
      cur_ps = change_ps;
      pad_data = halves[k];
    end
  end

  // word checker: after Clk B's falling edge k (odd) the output holds
  // {half k-1, half k}
  initial begin
    #1;
    for (int k = 1; k < NEDGE - 1; k += 2) begin
      @(negedge clk_b);
      #1;
      if (k >= 3)
        for (int i = 0; i < ND; i++)
          chk($sformatf("32-bit word, delay %0d ps", DELAYS[i]),
              data_out[i] == {halves[k-1], halves[k]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
