// CAM/RAM unit: the router's fully associative routing table.
//
// ENTRIES (8) words, each a AW-bit (4) CAM tag and a 1-bit direction in the
// RAM beside it (0 = North, 1 = East). On an evaluation every word compares
// its tag with the address on the bit lines at once; a word whose bits all
// agree keeps its match line high, and the match lines drive the RAM word
// lines directly to read the direction. If no word matches, location 0 holds
// the default direction, the packet goes that way and an address error is
// flagged. If several words match, the lowest location is used (loading the
// same address twice is the loader's mistake to avoid).
//
// Timing: eval_add in cycle t latches the direction, MATCH and addr_err at
// the clock edge ending t; dir_rdy is then high from t+1 and the direction
// stays latched through the whole packet until `swap`. A load (word line
// raised by the decoder while LD_CAM is high) writes the bit-line address
// into the tag and wr_dir into the RAM of that word at the same edge, and
// ld_done pulses in the next cycle. Loads do not disturb the latched
// direction, so a packet in flight keeps its route.
//
// Test mode: test_eval evaluates like eval_add but does not touch the routing
// latch; it drives the direction to the test_dir pin and shifts the 3-bit
// matching location out on cam_loc, LSB first, in the LW (3) following
// cycles (cam_loc is 0 otherwise). force_en makes an eval_add latch force_dir
// instead of the looked-up direction, for straight-through fifo testing.
//
// The precharge/evaluate discipline of the transistor-level array becomes one
// clocked evaluation here. The lowest-match rule, the serial order on cam_loc
// and the ld_done timing are this design's choices.
`timescale 1ns / 1ps
module cam_ram
  import router_pkg::*;
#(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned AW      = 4
) (
  input  logic               clk,
  input  logic               srst,       // state-reset mode
  input  logic [AW-1:0]      addr,       // bit lines from the address mux
  input  logic               eval_add,
  input  logic               test_eval,
  input  logic               force_en,
  input  logic               force_dir,
  input  logic [ENTRIES-1:0] wl,         // write word lines
  input  logic               wr_dir,     // RAM write bus
  input  logic               swap,
  output logic               dir,
  output logic               dir_rdy,
  output logic               match,
  output logic               addr_err,
  output logic               ld_done,
  output logic               test_dir,
  output logic               cam_loc
);

  localparam int unsigned LW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [AW-1:0]      tag [ENTRIES];
  logic               ram [ENTRIES];
  logic [ENTRIES-1:0] match_line;
  logic               any_match;
  logic [LW-1:0]      hit_loc;
  logic               rd_dir;
  logic [LW-1:0]      loc_sr;
  logic [LW:0]        loc_cnt;

  // Array write: tag from the bit lines, direction from the RAM write bus.
  always_ff @(posedge clk) begin
    for (int i = 0; i < ENTRIES; i++)
      if (wl[i]) begin
        tag[i] <= addr;
        ram[i] <= wr_dir;
      end
  end

  // Parallel compare and read.
  always_comb begin
    for (int i = 0; i < ENTRIES; i++)
      match_line[i] = (tag[i] == addr);
    any_match = |match_line;
    hit_loc   = '0;
    for (int i = ENTRIES-1; i >= 0; i--)
      if (match_line[i]) hit_loc = LW'(i);
    rd_dir = ram[hit_loc];
  end

  // Routing latch (held for the whole packet).
  always_ff @(posedge clk) begin
    if (srst) begin
      dir      <= 1'b0;
      dir_rdy  <= 1'b0;
      match    <= 1'b0;
      addr_err <= 1'b0;
    end else if (eval_add) begin
      dir      <= force_en ? force_dir : rd_dir;
      dir_rdy  <= 1'b1;
      if (!force_en) begin
        match    <= any_match;
        addr_err <= !any_match;
      end
    end else begin
      if (test_eval) begin
        match    <= any_match;
        addr_err <= !any_match;
      end
      if (swap) dir_rdy <= 1'b0;
    end
  end

  // Load completion and test outputs.
  always_ff @(posedge clk) begin
    if (srst) begin
      ld_done  <= 1'b0;
      test_dir <= 1'b0;
      loc_sr   <= '0;
      loc_cnt  <= '0;
    end else begin
      ld_done <= |wl;
      if (test_eval) begin
        test_dir <= rd_dir;
        loc_sr   <= hit_loc;
        loc_cnt  <= (LW+1)'(LW);
      end else if (loc_cnt != 0) begin
        loc_sr  <= loc_sr >> 1;
        loc_cnt <= loc_cnt - 1'b1;
      end
    end
  end

  assign cam_loc = (loc_cnt != 0) ? loc_sr[0] : 1'b0;

  // A word line may not be raised during an evaluation.
  a_no_eval_during_load : assert property (@(posedge clk) disable iff (srst)
    !((eval_add || test_eval) && (wl != '0)));

endmodule
