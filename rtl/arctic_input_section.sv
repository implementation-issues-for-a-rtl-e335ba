// ARCTIC input section: delay line followed by the two-phase input registers.
//
// The 16 data lines from the input pads pass through the data delay line
// (arctic_delay_line, a behavioural model of an analog element) and are then
// demultiplexed into a 32-bit word by registers on the falling edges of the
// two link clocks (arctic_input_demux). A new 32-bit word appears after each
// falling edge of clk_b. The delay moves the data's valid window at the pads
// (5750 ps to 1000 ps before the latching edge) so that it covers the
// registers' setup (460 ps) and hold (340 ps) window around that edge. This
// follows the ARCTIC input-section block diagram.
`timescale 1ns / 1ps
module arctic_input_section #(
  parameter int unsigned W        = 16,
  parameter int unsigned DELAY_PS = 2500
) (
  input  logic           clk_a,
  input  logic           clk_b,
  input  logic [W-1:0]   pad_data,
  output logic [2*W-1:0] data_out
);

  logic [W-1:0] delayed;

  arctic_delay_line #(.W(W), .DELAY_PS(DELAY_PS)) u_delay (
    .d(pad_data), .q(delayed)
  );

  arctic_input_demux #(.W(W)) u_demux (
    .clk_a, .clk_b, .d(delayed), .q(data_out)
  );

endmodule
