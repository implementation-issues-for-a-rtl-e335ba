// Load state machine: fills the CAM/RAM load buffer from the network.
//
// A one-cycle CAM Address Available strobe (cam_av) starts a load: `shift`
// writes the serial pair presented with the strobe into the buffer's current
// row and moves its row select on (IDLE), and the next three pairs follow on
// the following cycles (S1, S2, S3). The machine then
// sits in RDY with CA_RDY high until the address state machine takes the
// entry (ca_ack), which is the cycle the buffer is applied to the CAM.
// Nothing stops the network from loading again: a strobe in RDY starts a new
// entry and overwrites the waiting one, so the sender must pace its
// loads (one per packet period in normal mode, three to four in CAM load
// mode). Five states; the strobe form of cam_av is this design's choice.
`timescale 1ns / 1ps
module load_fsm
  import router_pkg::*;
(
  input  logic clk,
  input  logic srst,
  input  logic cam_av,   // CAM address available, from the network
  input  logic ca_ack,   // entry taken by the address state machine
  output logic shift,    // write one serial pair into the load buffer and advance
  output logic ca_rdy    // full entry waiting
);

  typedef enum logic [2:0] {
    L_IDLE = 3'd0,
    L_S1   = 3'd1,
    L_S2   = 3'd2,
    L_S3   = 3'd3,
    L_RDY  = 3'd4
  } state_t;

  state_t state, next;

  always_comb begin
    next   = state;
    shift  = 1'b0;
    ca_rdy = 1'b0;
    unique case (state)
      L_IDLE: begin
        shift = cam_av;
        if (cam_av) next = L_S1;
      end
      L_S1: begin shift = 1'b1; next = L_S2;  end
      L_S2: begin shift = 1'b1; next = L_S3;  end
      L_S3: begin shift = 1'b1; next = L_RDY; end
      L_RDY: begin
        ca_rdy = 1'b1;
        shift  = cam_av;
        if (cam_av)      next = L_S1;
        else if (ca_ack) next = L_IDLE;
      end
      default: next = L_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (srst) state <= L_IDLE;
    else      state <= next;
  end

endmodule
