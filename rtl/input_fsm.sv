// Input state machine: controls one input fifo and its external handshake.
//
// Four states in two bits. IDLE: ACK is high (fifo empty and inputs enabled)
// and a nibble with DAV high is written into row 0; the machine moves to
// LOAD. LOAD: the fifo now shows that nibble's bit 0 as its Start Of Packet
// flag. Without SOP the nibble was not the start of a packet: the write
// decoder returns to row 0 and the machine goes back to IDLE, so anything
// before a Start Of Packet is dropped. With SOP, every cycle with DAV high
// writes the next nibble (inc_fwr); when the write decoder reports FifoFull,
// ACK drops and the machine enters FULL. FULL: the packet waits and `rdy`
// (FA_RDY / FB_RDY) asks the address state machine for routing; a timed-out
// send leaves the packet here for another try. When the read decoder reports
// End Of Data the packet has left, and RESET returns both fifo decoders to
// row 0 before the next IDLE. A nibble moves on each cycle where the
// sender's DAV and this ACK are both high.
//
// Inputs are refused in CAM load mode (a packet already being loaded is
// finished) and the machine sits in RESET in state-reset mode. The states
// and the inputs (DAV, FifoFull, the fifo's SOP flag, the mode) follow the
// router description; the split of inc_fwr into an increment and a reset
// line, and dropping a nibble without SOP by resetting the write decoder,
// are this design's choices.
`timescale 1ns / 1ps
module input_fsm
  import router_pkg::*;
(
  input  logic  clk,
  input  mode_t mode,
  input  logic  dav,      // sender's Data AVailable
  input  logic  sop,      // Start Of Packet flag of the fifo (bit 0 of row 0)
  input  logic  full,     // FifoFull from the write decoder
  input  logic  eod,      // End Of Data from this fifo's read decoder
  output logic  ack,      // Acknowledge Ready for Data, to the sender
  output logic  wr_inc,   // inc_fwr: write the nibble and advance
  output logic  wr_rst,   // return the write decoder to row 0
  output logic  rd_rst,   // return the read decoder to row 0
  output logic  rdy       // packet waiting for routing
);

  typedef enum logic [1:0] {
    S_IDLE  = 2'b00,
    S_LOAD  = 2'b01,
    S_FULL  = 2'b11,
    S_RESET = 2'b10
  } state_t;

  state_t state, next;
  logic   accepting;

  assign accepting = (mode == MODE_NORMAL) || (mode == MODE_TEST);

  always_comb begin
    next   = state;
    ack    = 1'b0;
    wr_inc = 1'b0;
    wr_rst = 1'b0;
    rd_rst = 1'b0;
    rdy    = 1'b0;
    unique case (state)
      S_IDLE: begin
        ack    = accepting;
        wr_inc = accepting && dav;
        if (wr_inc) next = S_LOAD;
      end
      S_LOAD: begin
        if (!sop) begin
          wr_rst = 1'b1;
          next   = S_IDLE;
        end else begin
          ack    = !full;
          wr_inc = dav && !full;
          if (full) next = S_FULL;
        end
      end
      S_FULL: begin
        rdy = 1'b1;
        if (eod) next = S_RESET;
      end
      S_RESET: begin
        wr_rst = 1'b1;
        rd_rst = 1'b1;
        next   = S_IDLE;
      end
      default: next = S_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (mode == MODE_RESET) state <= S_RESET;
    else                    state <= next;
  end

endmodule
