// One-packet input buffer of the router.
//
// A DEPTH x WIDTH memory (16 x 4 by default, exactly one packet) with one
// write bus and one read bus. Two fifo_ring_decoder instances select the row:
// the write decoder advances on wr_inc (the input state machine's inc_fwr) and
// raises `full` when all rows are written; the read decoder advances on rd_inc
// (inc_frd) and raises `eod` after the last row has been read. rd_data shows
// the row the read decoder points at, so a nibble is presented one cycle
// before the rd_inc that consumes it.
//
// The first five packet bits have a parallel output: bit 0 of row 0 is the
// Start Of Packet flag (`sop`), and packet bits 1-4 (bits 3:1 of row 0 and
// bit 0 of row 1) are captured in a register as the destination address
// offered to the CAM. Which packet bit is which address bit is this design's
// choice: packet bit 1 is address bit 0.
`timescale 1ns / 1ps
module input_fifo
  import router_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             wr_rst,
  input  logic             wr_inc,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_rst,
  input  logic             rd_inc,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             eod,
  output logic             sop,
  output node_addr_t       addr
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [DEPTH-1:0] wr_row, rd_row;
  logic             sop_q;
  node_addr_t       addr_q;

  fifo_ring_decoder #(.ROWS(DEPTH)) u_wr_dec (
    .clk, .rst(wr_rst), .inc(wr_inc), .row_en(wr_row), .last(full)
  );

  fifo_ring_decoder #(.ROWS(DEPTH)) u_rd_dec (
    .clk, .rst(rd_rst), .inc(rd_inc), .row_en(rd_row), .last(eod)
  );

  // Memory write: the row whose enable bit is set, unless already full.
  always_ff @(posedge clk) begin
    for (int r = 0; r < DEPTH; r++)
      if (wr_inc && !wr_rst && !full && wr_row[r])
        mem[r] <= wr_data;
  end

  // Parallel outputs of the first five bits.
  always_ff @(posedge clk) begin
    if (wr_inc && !wr_rst && !full) begin
      if (wr_row[0]) begin
        sop_q       <= wr_data[0];
        addr_q[2:0] <= wr_data[3:1];
      end
      if (wr_row[1])
        addr_q[3]   <= wr_data[0];
    end
  end

  // Read bus: wired selection of the enabled row.
  always_comb begin
    rd_data = '0;
    for (int r = 0; r < DEPTH; r++)
      if (rd_row[r]) rd_data = mem[r];
  end

  assign sop  = sop_q;
  assign addr = addr_q;

endmodule
