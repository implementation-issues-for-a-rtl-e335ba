// Shared types and constants of the CAM based packet router.
//
// Packets are 16 nibbles (64 bits) long and move four bits per clock. Packet
// bit k is bit (k mod 4) of nibble k/4: bit 0 is the Start Of Packet flag and
// bits 1-4 are the 4-bit destination address of one of up to 16 switching
// nodes. Directions are one bit: 0 routes to the North output, 1 to East.
// The two global mode pins select one of four modes; their encoding is this
// design's own choice. The CAM/RAM load entry is 8 bits: 4-bit address,
// 1-bit direction, 3-bit CAM location.
`timescale 1ns / 1ps
package router_pkg;

  localparam int unsigned NIBBLE_W    = 4;   // data path width
  localparam int unsigned PKT_NIBBLES = 16;  // one packet fills a 16x4 fifo
  localparam int unsigned ADDR_W      = 4;   // node address width
  localparam int unsigned CAM_DEPTH   = 8;   // CAM/RAM locations
  localparam int unsigned LOC_W       = 3;   // log2(CAM_DEPTH)

  typedef logic [NIBBLE_W-1:0] nibble_t;
  typedef logic [ADDR_W-1:0]   node_addr_t;
  typedef logic [LOC_W-1:0]    cam_loc_t;

  typedef enum logic [1:0] {
    MODE_NORMAL   = 2'b00,  // packet transfers and slow CAM loading
    MODE_CAM_LOAD = 2'b01,  // packet inputs held, fast CAM loading
    MODE_RESET    = 2'b10,  // inputs off, all state machines reset
    MODE_TEST     = 2'b11   // CAM lookups from the load buffer, straight routing
  } mode_t;

  typedef enum logic {
    DIR_NORTH = 1'b0,
    DIR_EAST  = 1'b1
  } dir_t;

  // Source of the address presented to the CAM.
  typedef enum logic [1:0] {
    ASEL_FIFO_A = 2'b00,    // West input fifo
    ASEL_FIFO_B = 2'b01,    // South input fifo
    ASEL_LOAD   = 2'b10     // CAM/RAM load buffer
  } addr_sel_t;

  // Contents of the CAM/RAM load buffer once full (bit 7 .. bit 0).
  typedef struct packed {
    cam_loc_t   loc;        // location to overwrite
    logic       dir;        // new direction bit
    node_addr_t addr;       // new CAM tag
  } load_entry_t;

endpackage
