// Behavioural model of the ARCTIC input-section data delay line (not
// synthesizable logic: in silicon this is an analog delay element).
//
// Every data line from the input pads is delayed by DELAY_PS picoseconds
// before it reaches the input registers, so that data launched with the same
// clock edge is still held long enough after the registers' falling clock
// edge. The timing budget puts the real delay between 1340 ps (register hold
// time) and 5290 ps (setup time); after derating for process, voltage and
// temperature (x0.67 best case, x1.74 worst case) the nominal value must lie
// between 2000 ps and 3040 ps. The default of 2500 ps is a value inside that
// range. Transport delay: every edge is passed on, none is swallowed.
//
// The delay is built as two stages of half the delay each, and each stage
// holds one pending change at a time. The pad data changes at most once
// every 4750 ps, so every change gets through for any delay up to 9500 ps.
// That covers the whole 1340-5290 ps range, including delays longer than the
// spacing of two changes.
`timescale 1ns / 1ps
module arctic_delay_line #(
  parameter int unsigned W        = 16,
  parameter int unsigned DELAY_PS = 2500
) (
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] mid;

  always @(d)   mid <= #(DELAY_PS * 1ps / 2) d;
  always @(mid) q   <= #(DELAY_PS * 1ps / 2) mid;

endmodule
