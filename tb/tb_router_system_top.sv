`timescale 1ns / 1ps
// End-to-end testbench of router_system_top at its default sizes.
//
// The CAM router's pins are driven by router_tb_env: state reset, the CAM
// table loaded back to back in CAM load mode while the senders are refused,
// 60 random packets per input with CAM hits and misses, receivers that stall
// and time out, a CAM entry rewritten while a packet with that address is
// on its way out, and test mode (look-ups from the load port, straight
// routing). At the same time the ARCTIC input section receives half-words
// at the link's worst-case pad timing on its two 50 MHz clock phases and
// every 32-bit word is checked. Each mechanism must happen at least once.
module tb_router_system_top;
  import router_pkg::*;
  logic clk = 0;
  logic [1:0] mode;
  nibble_t west_data, south_data, north_data, east_data;
  logic west_dav, west_ack, south_dav, south_ack, north_dav, north_ack, east_dav, east_ack;
  logic cam_av, addr_err, dir_pin, cam_loc, done;
  logic [1:0] cam_sd;
  logic arctic_clk_a = 1, arctic_clk_b = 0;
  logic [15:0] arctic_pad_data;
  logic [31:0] arctic_data;
  int a_checks = 0, a_failures = 0, a_words = 0;
  logic [15:0] halves [$];

  router_system_top dut (.*);
  router_tb_env #(.TIMEOUT(32), .NPACKETS(60)) env (.*);

  always #25 clk = ~clk;               // router: 20 MHz
  always #10 arctic_clk_a = ~arctic_clk_a;   // ARCTIC: 50 MHz, two phases
  always #10 arctic_clk_b = ~arctic_clk_b;

  initial begin
    #20000000;
    env.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", env.checks + a_checks, env.failures + a_failures);
    $finish;
  end

  // ARCTIC pad driver: half-word k latched at falling edge k (every 10 ns
  // from 10 ns), valid at the pad from 5750 ps to 1000 ps before it.
  initial begin
    int edge_ps, change_ps, cur_ps;
    cur_ps = 0;
    for (int k = 0; k < 2000; k++) halves.push_back(16'($urandom));
    arctic_pad_data = halves[0];
    for (int k = 0; k < 1999; k++) begin
      edge_ps   = 10000 + 10000 * k;
      change_ps = edge_ps - 1000 + $urandom_range(0, 5250);
      #((change_ps - cur_ps) * 1ps);
      cur_ps = change_ps;
      arctic_pad_data = halves[k + 1];
    end
  end

  initial begin
    @(negedge arctic_clk_b);
    @(negedge arctic_clk_b);
    for (int w = 1; w < 990; w++) begin
      #1;
      a_checks++;
      a_words++;
      if (arctic_data !== {halves[2*w], halves[2*w + 1]}) begin
        a_failures++;
        if (a_failures < 10) $display("FAIL ARCTIC word %0d: %h", w, arctic_data);
      end
      @(negedge arctic_clk_b);
    end
  end

  task automatic need(input string name, input int n);
    env.checks++;
    $display("COUNT %-30s %0d", name, n);
    if (n == 0) begin
      env.failures++;
      $display("FAIL mechanism never happened: %s", name);
    end
  endtask

  initial begin
    @(posedge done);
    wait (a_words >= 989);
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
    need("ARCTIC 32-bit words", a_words);
    $display("TB_RESULT checks=%0d failures=%0d", env.checks + a_checks, env.failures + a_failures);
    $finish;
  end
endmodule
