// Output state machine: sends the routed packet and hands over to the next.
//
// IDLE waits for dir_rdy (direction latched by the CAM/RAM). REQ raises DAV
// towards the chosen receiver and runs the time-out counter (tc_inc) until the
// receiver's ACK is seen; the nibble on the lines moves in that cycle and the
// fifo read decoder advances (inc_frd). SEND keeps DAV high and advances the
// read decoder on every cycle with ACK until the fifo reports End Of Data,
// when DAV drops. SWAP pulses `swap` for one cycle: it releases the latched
// direction and tells the address state machine to give the other input its
// turn. If the counter reaches its limit in REQ, DAV drops and SWAP follows at
// once with `timed_out` high; the packet stays in its fifo.
//
// A full packet takes 1 (REQ with ACK) + 15 (SEND) transfer cycles, then one
// cycle of SEND with EOD and one of SWAP. The states and their signals follow
// the router description; the exact cycle layout is this design's choice.
`timescale 1ns / 1ps
module output_fsm (
  input  logic clk,
  input  logic srst,
  input  logic dir_rdy,
  input  logic ack,
  input  logic eod,
  input  logic timeout,
  output logic dav,
  output logic inc_frd,
  output logic swap,
  output logic tc_inc,
  output logic timed_out
);

  typedef enum logic [1:0] {
    O_IDLE = 2'b00,
    O_REQ  = 2'b01,
    O_SEND = 2'b11,
    O_SWAP = 2'b10
  } state_t;

  state_t state, next;
  logic   to_q;

  always_comb begin
    next    = state;
    dav     = 1'b0;
    inc_frd = 1'b0;
    swap    = 1'b0;
    tc_inc  = 1'b0;
    unique case (state)
      O_IDLE: if (dir_rdy) next = O_REQ;
      O_REQ: begin
        dav     = 1'b1;
        tc_inc  = 1'b1;
        if (ack) begin
          inc_frd = 1'b1;
          next    = O_SEND;
        end else if (timeout) begin
          next    = O_SWAP;
        end
      end
      O_SEND: begin
        dav     = !eod;
        inc_frd = ack && !eod;
        if (eod) next = O_SWAP;
      end
      O_SWAP: begin
        swap = 1'b1;
        next = O_IDLE;
      end
      default: next = O_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (srst) begin
      state <= O_IDLE;
      to_q  <= 1'b0;
    end else begin
      state <= next;
      if (state == O_REQ) to_q <= !ack && timeout;
    end
  end

  assign timed_out = (state == O_SWAP) && to_q;

endmodule
