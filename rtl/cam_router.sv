// CAM based packet router: two inputs (West, South), two outputs (North, East).
//
// Packets of 16 four-bit nibbles arrive on an input port with a DAV/ACK
// handshake and fill that port's one-packet fifo; the first nibble carries
// the Start Of Packet flag (bit 0) and the packet's first bits the 4-bit
// destination node address. The address state machine picks a waiting fifo
// (the inputs take turns), puts its address through the 3-to-1 address mux
// onto the 8-entry CAM, and the direction RAM word selected by the matching
// CAM entry says North or East (no match: the default in location 0, and
// addr_err). The output mux then ties the fifo to that port and the output
// state machine sends the packet once the receiver answers DAV with ACK, or
// gives up after TIMEOUT cycles and lets the other input try.
//
// Routing entries arrive on a second, 2-bit serial port (cam_av strobe plus
// cam_sd) into the load buffer and are written into the CAM/RAM at the word
// line named in the entry, between packets or while a packet streams out.
//
// Handshake: a nibble moves on every rising clock edge at which DAV and ACK
// are both high. A sender keeps DAV high from its request to its last nibble;
// a receiver holds ACK high while its fifo can take data.
//
// Modes (pins `mode`): 00 normal; 01 CAM load (packet inputs held, entries
// loaded as fast as they come); 10 state reset (inputs off, all state
// machines reset: the chip's only reset, to be held for a cycle at start-up);
// 11 test (entries in the load buffer are looked up rather than written, the
// matching location appears serially on cam_loc and its direction on dir_pin;
// packets are routed straight, West to East and South to North).
//
// Block structure, signal names and modes follow the router's description;
// the single clock (the original uses two non-overlapping phases), the mode
// encoding and the time-out length are this design's choices. The CAM's
// MATCH flag and the output state machine's time-out flag stay internal
// (no pin carries them); they are kept for observation in simulation.
`timescale 1ns / 1ps
module cam_router
  import router_pkg::*;
#(
  parameter int unsigned TIMEOUT = 32
) (
  input  logic       clk,
  input  logic [1:0] mode,
  // input ports
  input  nibble_t    west_data,
  input  logic       west_dav,
  output logic       west_ack,
  input  nibble_t    south_data,
  input  logic       south_dav,
  output logic       south_ack,
  // output ports
  output nibble_t    north_data,
  output logic       north_dav,
  input  logic       north_ack,
  output nibble_t    east_data,
  output logic       east_dav,
  input  logic       east_ack,
  // CAM reload port
  input  logic       cam_av,
  input  logic [1:0] cam_sd,
  // status and test pins
  output logic       addr_err,
  output logic       dir_pin,
  output logic       cam_loc
);

  mode_t m;
  logic  srst;
  assign m    = mode_t'(mode);
  assign srst = (m == MODE_RESET);

  // ---- input side -------------------------------------------------------
  logic       fa_wr_inc, fa_wr_rst, fa_rd_rst, fa_rd_inc, fa_full, fa_eod, fa_sop, fa_rdy;
  logic       fb_wr_inc, fb_wr_rst, fb_rd_rst, fb_rd_inc, fb_full, fb_eod, fb_sop, fb_rdy;
  nibble_t    fa_rd_data, fb_rd_data;
  node_addr_t fa_addr, fb_addr;

  input_fsm u_in_fsm_a (
    .clk, .mode(m), .dav(west_dav), .sop(fa_sop), .full(fa_full), .eod(fa_eod),
    .ack(west_ack), .wr_inc(fa_wr_inc), .wr_rst(fa_wr_rst), .rd_rst(fa_rd_rst), .rdy(fa_rdy)
  );

  input_fsm u_in_fsm_b (
    .clk, .mode(m), .dav(south_dav), .sop(fb_sop), .full(fb_full), .eod(fb_eod),
    .ack(south_ack), .wr_inc(fb_wr_inc), .wr_rst(fb_wr_rst), .rd_rst(fb_rd_rst), .rdy(fb_rdy)
  );

  input_fifo #(.DEPTH(PKT_NIBBLES), .WIDTH(NIBBLE_W)) u_fifo_a (
    .clk, .wr_rst(fa_wr_rst), .wr_inc(fa_wr_inc), .wr_data(west_data),
    .rd_rst(fa_rd_rst), .rd_inc(fa_rd_inc), .rd_data(fa_rd_data),
    .full(fa_full), .eod(fa_eod), .sop(fa_sop), .addr(fa_addr)
  );

  input_fifo #(.DEPTH(PKT_NIBBLES), .WIDTH(NIBBLE_W)) u_fifo_b (
    .clk, .wr_rst(fb_wr_rst), .wr_inc(fb_wr_inc), .wr_data(south_data),
    .rd_rst(fb_rd_rst), .rd_inc(fb_rd_inc), .rd_data(fb_rd_data),
    .full(fb_full), .eod(fb_eod), .sop(fb_sop), .addr(fb_addr)
  );

  // ---- CAM reload path --------------------------------------------------
  logic        ld_shift, ca_rdy, ca_ack;
  logic [7:0]  ld_buf;
  load_entry_t ld_entry;

  load_fsm u_load_fsm (
    .clk, .srst, .cam_av, .ca_ack, .shift(ld_shift), .ca_rdy
  );

  load_buffer #(.BITS(8), .SERIAL(2)) u_load_buf (
    .clk, .srst, .shift(ld_shift), .sd(cam_sd), .buf_q(ld_buf)
  );

  assign ld_entry = load_entry_t'(ld_buf);

  // ---- address evaluation -----------------------------------------------
  addr_sel_t  asel;
  node_addr_t cam_addr;
  logic       eval_add, ld_cam, test_eval, src, force_en, force_dir;
  logic [CAM_DEPTH-1:0] wl;
  logic       dir, dir_rdy, cam_match, ld_done, swap;

  address_fsm u_addr_fsm (
    .clk, .mode(m), .fa_rdy, .fb_rdy, .ca_rdy, .dir_rdy, .ld_done, .swap,
    .sel(asel), .eval_add, .ld_cam, .test_eval, .ca_ack, .src, .force_en, .force_dir
  );

  address_mux u_addr_mux (
    .sel(asel), .fifo_a(fa_addr), .fifo_b(fb_addr), .load(ld_entry.addr), .addr(cam_addr)
  );

  wordline_decoder #(.N(LOC_W)) u_wl_dec (
    .en(ld_cam), .loc(ld_entry.loc), .wl
  );

  cam_ram #(.ENTRIES(CAM_DEPTH), .AW(ADDR_W)) u_cam_ram (
    .clk, .srst, .addr(cam_addr), .eval_add, .test_eval, .force_en, .force_dir,
    .wl, .wr_dir(ld_entry.dir), .swap, .dir, .dir_rdy, .match(cam_match), .addr_err,
    .ld_done, .test_dir(dir_pin), .cam_loc
  );

  // ---- output side ------------------------------------------------------
  logic out_dav, out_ack, inc_frd, tc_inc, timeout, timed_out, sel_eod;

  assign sel_eod   = src ? fb_eod : fa_eod;
  assign fa_rd_inc = inc_frd && !src;
  assign fb_rd_inc = inc_frd &&  src;

  output_fsm u_out_fsm (
    .clk, .srst, .dir_rdy, .ack(out_ack), .eod(sel_eod), .timeout,
    .dav(out_dav), .inc_frd, .swap, .tc_inc, .timed_out
  );

  timeout_counter #(.LIMIT(TIMEOUT)) u_timeout (
    .clk, .inc(tc_inc), .timeout
  );

  output_mux u_out_mux (
    .clk, .srst, .src, .dir, .dir_rdy, .swap, .fa_data(fa_rd_data), .fb_data(fb_rd_data),
    .dav(out_dav), .north_ack, .east_ack, .north_data, .north_dav, .east_data, .east_dav,
    .ack(out_ack)
  );

endmodule
