// Address state machine: the router's coordinator.
//
// IDLE arbitrates between the two fifos' routing requests (FA_RDY, FB_RDY)
// and a full CAM load buffer (CA_RDY). A waiting packet goes first: the
// source is chosen (the input holding priority if both wait), its address
// is put on the CAM through the address mux and EVAL drives EVAL_ADD for one
// cycle. XMIT holds the source while the output state machine sends the
// packet; if a CAM entry arrives once dir_rdy is up, LOAD drives LD_CAM for
// one cycle with the load buffer on the mux and acknowledges the load state
// machine, and LWAIT waits for LD_DONE before going back to XMIT. SWAP from
// the output state machine (after a packet or a time-out) ends XMIT and hands
// priority to the other input, so the inputs take turns. With no packet
// waiting, a CAM entry is loaded from IDLE.
//
// Modes: CAM load mode serves only CA_RDY. In test mode a load-buffer entry
// is evaluated (test_eval) instead of written, and packets are routed
// straight through (force_dir: West to East, South to North). State-reset
// mode resets the machine. A SWAP seen while loading is remembered. Five
// states; the arbitration order is this design's choice.
`timescale 1ns / 1ps
module address_fsm
  import router_pkg::*;
(
  input  logic      clk,
  input  mode_t     mode,
  input  logic      fa_rdy,
  input  logic      fb_rdy,
  input  logic      ca_rdy,
  input  logic      dir_rdy,
  input  logic      ld_done,
  input  logic      swap,
  output addr_sel_t sel,
  output logic      eval_add,
  output logic      ld_cam,
  output logic      test_eval,
  output logic      ca_ack,
  output logic      src,        // 0 = fifo A (West), 1 = fifo B (South)
  output logic      force_en,
  output logic      force_dir
);

  typedef enum logic [2:0] {
    A_IDLE  = 3'd0,
    A_EVAL  = 3'd1,
    A_XMIT  = 3'd2,
    A_LOAD  = 3'd3,
    A_LWAIT = 3'd4
  } state_t;

  state_t state, next;
  logic   pri;        // input that wins when both wait
  logic   busy;       // a packet is in transmission
  logic   swap_pend;  // SWAP seen while loading
  logic   fifo_ok;
  logic   pick;

  assign fifo_ok   = (mode == MODE_NORMAL) || (mode == MODE_TEST);
  assign pick      = (fa_rdy && fb_rdy) ? pri : fb_rdy;
  assign force_en  = (mode == MODE_TEST);
  assign force_dir = (src == 1'b0) ? DIR_EAST : DIR_NORTH;

  always_comb begin
    next      = state;
    sel       = src ? ASEL_FIFO_B : ASEL_FIFO_A;
    eval_add  = 1'b0;
    ld_cam    = 1'b0;
    test_eval = 1'b0;
    ca_ack    = 1'b0;
    unique case (state)
      A_IDLE: begin
        if (fifo_ok && (fa_rdy || fb_rdy)) next = A_EVAL;
        else if (ca_rdy)                   next = A_LOAD;
      end
      A_EVAL: begin
        eval_add = 1'b1;
        next     = A_XMIT;
      end
      A_XMIT: begin
        if (swap || swap_pend)                        next = A_IDLE;
        else if (ca_rdy && dir_rdy && !force_en)      next = A_LOAD;
      end
      A_LOAD: begin
        sel    = ASEL_LOAD;
        ca_ack = 1'b1;
        if (mode == MODE_TEST) begin
          test_eval = 1'b1;
          next      = busy ? A_XMIT : A_IDLE;
        end else begin
          ld_cam = 1'b1;
          next   = A_LWAIT;
        end
      end
      A_LWAIT: begin
        sel = ASEL_LOAD;
        if (ld_done) next = busy ? A_XMIT : A_IDLE;
      end
      default: next = A_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (mode == MODE_RESET) begin
      state     <= A_IDLE;
      src       <= 1'b0;
      pri       <= 1'b0;
      busy      <= 1'b0;
      swap_pend <= 1'b0;
    end else begin
      state <= next;
      unique case (state)
        A_IDLE: begin
          if (fifo_ok && (fa_rdy || fb_rdy)) src <= pick;
          busy <= 1'b0;
        end
        A_EVAL: busy <= 1'b1;
        A_XMIT: begin
          if (swap || swap_pend) begin
            pri       <= !src;
            busy      <= 1'b0;
            swap_pend <= 1'b0;
          end
        end
        default: if (swap) swap_pend <= 1'b1;
      endcase
    end
  end

endmodule
