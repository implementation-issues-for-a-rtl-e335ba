// Output multiplexer: connects one input fifo to one output port.
//
// When dir_rdy rises the source (fifo A = West, fifo B = South) and the
// direction (0 = North, 1 = East) are latched, and the path is held until
// `swap` ends the packet. Along the path go the selected fifo's read nibble
// and the output state machine's DAV to the chosen port, and that port's ACK
// back to the output state machine. The other port, and both ports while DAV
// is low, carry the idle pattern 0000 with DAV low. The latching follows the
// router description; the all-zero idle pattern is this design's choice.
`timescale 1ns / 1ps
module output_mux
  import router_pkg::*;
(
  input  logic    clk,
  input  logic    srst,
  input  logic    src,
  input  logic    dir,
  input  logic    dir_rdy,
  input  logic    swap,
  input  nibble_t fa_data,
  input  nibble_t fb_data,
  input  logic    dav,
  input  logic    north_ack,
  input  logic    east_ack,
  output nibble_t north_data,
  output logic    north_dav,
  output nibble_t east_data,
  output logic    east_dav,
  output logic    ack
);

  logic path_valid, path_src, path_dir;
  nibble_t d;
  logic    send;

  always_ff @(posedge clk) begin
    if (srst || swap) begin
      path_valid <= 1'b0;
    end else if (dir_rdy && !path_valid) begin
      path_valid <= 1'b1;
      path_src   <= src;
      path_dir   <= dir;
    end
  end

  assign d    = path_src ? fb_data : fa_data;
  assign send = path_valid && dav;

  assign north_dav  = send && (path_dir == DIR_NORTH);
  assign east_dav   = send && (path_dir == DIR_EAST);
  assign north_data = north_dav ? d : '0;
  assign east_data  = east_dav  ? d : '0;
  assign ack        = path_valid && (path_dir == DIR_EAST ? east_ack : north_ack);

endmodule
