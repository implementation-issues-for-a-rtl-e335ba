`timescale 1ns / 1ps
// Testbench for cam_router: drives the router's pins from router_tb_env
// (state reset, fast CAM loading, random traffic with hits, misses, stalls
// and time-outs, a CAM rewrite during a packet, test mode) with 40 packets
// per input, and requires every mechanism to have happened at least once.
module tb_cam_router;
  import router_pkg::*;
  logic clk = 0;
  logic [1:0] mode;
  nibble_t west_data, south_data, north_data, east_data;
  logic west_dav, west_ack, south_dav, south_ack, north_dav, north_ack, east_dav, east_ack;
  logic cam_av, addr_err, dir_pin, cam_loc, done;
  logic [1:0] cam_sd;

  cam_router #(.TIMEOUT(32)) dut (.*);
  router_tb_env #(.TIMEOUT(32), .NPACKETS(40)) env (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    env.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures);
    $finish;
  end

  task automatic need(input string name, input int n);
    env.checks++;
    $display("COUNT %-28s %0d", name, n);
    if (n == 0) begin
      env.failures++;
      $display("FAIL mechanism never happened: %s", name);
    end
  endtask

  initial begin
    @(posedge done);
    need("state reset", env.n_state_reset);
    need("fast CAM load", env.n_fast_load);
    need("input refused (CAM load mode)", env.n_refused);
    need("routed North", env.n_north);
    need("routed East", env.n_east);
    need("CAM hit", env.n_hit);
    need("CAM miss (default route)", env.n_miss);
    need("ACK time-out", env.n_timeout);
    need("receiver stall mid-packet", env.n_stall);
    need("both inputs waiting", env.n_both_waiting);
    need("CAM load during a packet", env.n_load_in_flight);
    need("test-mode look-up", env.n_test_lookup);
    need("test-mode straight routing", env.n_test_straight);
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures);
    $finish;
  end
endmodule
