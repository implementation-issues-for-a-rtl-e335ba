// Local time-out counter of the output state machine.
//
// Counts the cycles in which `inc` is high and clears whenever `inc` is low,
// so it measures one uninterrupted wait for the receiver's ACK. `timeout` is
// high in the LIMIT-th consecutive counted cycle and stays high while counting
// continues. The limit is this design's choice (two packet periods).
`timescale 1ns / 1ps
module timeout_counter #(
  parameter int unsigned LIMIT = 32
) (
  input  logic clk,
  input  logic inc,
  output logic timeout
);

  localparam int unsigned CW = $clog2(LIMIT + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!inc)                   cnt <= '0;
    else if (cnt != CW'(LIMIT)) cnt <= cnt + 1'b1;
  end

  assign timeout = inc && (cnt >= CW'(LIMIT - 1));

endmodule
