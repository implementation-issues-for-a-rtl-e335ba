// ARCTIC input registers: 16-bit link to 32-bit word on two clock phases.
//
// The link carries 16 data bits per half clock period, framed by two clocks
// 180 degrees apart (Clk A and Clk B). All flip-flops trigger on the falling
// edge. On the falling edge of Clk A the first 16-bit half-word is held in a
// register; on the following falling edge of Clk B the second half-word is
// taken straight off the (delayed) line and, together with the held first
// half-word, loaded into the 32-bit output register. The output therefore
// changes once per clock period, on Clk B's falling edge, with the Clk A
// half-word in bits 31:16 and the Clk B half-word in bits 15:0. Structure and
// edges follow the ARCTIC input section; the placing of the two halves in
// the 32-bit word is this design's choice.
`timescale 1ns / 1ps
module arctic_input_demux #(
  parameter int unsigned W = 16
) (
  input  logic           clk_a,
  input  logic           clk_b,
  input  logic [W-1:0]   d,
  output logic [2*W-1:0] q
);

  logic [W-1:0] first_half;

  always_ff @(negedge clk_a)
    first_half <= d;

  always_ff @(negedge clk_b)
    q <= {first_half, d};

endmodule
