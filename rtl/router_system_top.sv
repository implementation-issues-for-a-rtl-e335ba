// Top level: the CAM based packet router and, beside it, the ARCTIC input
// section, two independent designs with their own ports.
//
// The router (cam_router) moves 16-nibble packets from its West and South
// inputs to its North and East outputs, steering each by a CAM lookup of its
// 4-bit destination address; see cam_router for the ports and protocol. The
// ARCTIC input section (arctic_input_section) turns a 16-bit link clocked on
// two opposite clock phases into 32-bit words. They share no signals: the
// router runs on `clk`, the ARCTIC section on arctic_clk_a / arctic_clk_b.
// The ARCTIC pads, output unit and transmission line are analog and stay
// outside; arctic_pad_data is the pads' digital output.
`timescale 1ns / 1ps
module router_system_top
  import router_pkg::*;
(
  // CAM router
  input  logic        clk,
  input  logic [1:0]  mode,
  input  nibble_t     west_data,
  input  logic        west_dav,
  output logic        west_ack,
  input  nibble_t     south_data,
  input  logic        south_dav,
  output logic        south_ack,
  output nibble_t     north_data,
  output logic        north_dav,
  input  logic        north_ack,
  output nibble_t     east_data,
  output logic        east_dav,
  input  logic        east_ack,
  input  logic        cam_av,
  input  logic [1:0]  cam_sd,
  output logic        addr_err,
  output logic        dir_pin,
  output logic        cam_loc,
  // ARCTIC input section
  input  logic        arctic_clk_a,
  input  logic        arctic_clk_b,
  input  logic [15:0] arctic_pad_data,
  output logic [31:0] arctic_data
);

  cam_router u_router (
    .clk, .mode, .west_data, .west_dav, .west_ack, .south_data, .south_dav, .south_ack,
    .north_data, .north_dav, .north_ack, .east_data, .east_dav, .east_ack,
    .cam_av, .cam_sd, .addr_err, .dir_pin, .cam_loc
  );

  arctic_input_section u_arctic (
    .clk_a(arctic_clk_a), .clk_b(arctic_clk_b), .pad_data(arctic_pad_data),
    .data_out(arctic_data)
  );

endmodule
