// CAM/RAM load buffer: serial in, parallel out.
//
// New routing entries arrive from the network on SERIAL (2) serial data pins.
// The buffer is BITS/SERIAL (4) rows of SERIAL storage cells, the same kind
// of cells as an input fifo but with every cell brought out in parallel. A
// one-hot shift register beside the cells selects the row to be written:
// each cycle with `shift` high stores the pins' pair in the selected row and
// moves the enable bit on to the next row, and from the last row the bit is
// recycled to row 0, ready for the next entry. State reset (srst) puts the
// bit back on row 0.
//
// After four writes the buffer holds one 8-bit entry: 4-bit CAM address
// (bits 3:0), direction (bit 4) and CAM location (bits 7:5), where row k
// holds bits 2k+1:2k. The entry is offered in parallel to the address mux
// (address), the RAM write bus (direction) and the word line decoder
// (location). Entry size, pin count and the cells-plus-shift-register
// structure follow the router description; the bit order of the serial
// stream is this design's choice: send addr[1:0], addr[3:2], {loc[0], dir},
// loc[2:1].
`timescale 1ns / 1ps
module load_buffer
  import router_pkg::*;
#(
  parameter int unsigned BITS   = 8,
  parameter int unsigned SERIAL = 2
) (
  input  logic              clk,
  input  logic              srst,   // state reset: row select back to row 0
  input  logic              shift,  // write the pair into the selected row, advance
  input  logic [SERIAL-1:0] sd,
  output logic [BITS-1:0]   buf_q
);

  localparam int unsigned ROWS = BITS / SERIAL;

  logic [ROWS-1:0] row_en;  // one-hot row select

  always_ff @(posedge clk) begin
    if (srst)
      row_en <= ROWS'(1);
    else if (shift)
      row_en <= {row_en[ROWS-2:0], row_en[ROWS-1]};
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r++)
      if (shift && !srst && row_en[r])
        buf_q[r*SERIAL +: SERIAL] <= sd;
  end

endmodule
