`timescale 1ns / 1ps
// Test environment for the CAM router's pins: two packet senders (West,
// South), two packet receivers (North, East), a CAM entry loader and a
// scoreboard. It runs the whole scenario and counts checks, failures and
// how often each mechanism of the router happened; the testbench around it
// instantiates the router and prints the result when `done` rises.
//
// Scenario: state reset; CAM load mode with entries loaded back to back
// (the eight entries of the CAM-RAM example table) and a check that the
// senders are refused meanwhile and that three or more loads fit in one
// packet period; normal traffic with random destinations (hits and misses),
// receivers that stall mid-packet and sometimes stay busy past the time-out;
// a CAM entry rewritten while a packet with that address is streaming out
// (the packet must keep its route, the next one take the new one); test
// mode with CAM look-ups from the load port (location on cam_loc, direction
// on dir_pin) and straight West->East / South->North routing.
//
// Reference model: a copy of the CAM table; a packet's port is the direction
// of the lowest matching location, or of location 0 with addr_err on a miss.
// Each source's packets must arrive whole and in order.
module router_tb_env
  import router_pkg::*;
#(
  parameter int TIMEOUT  = 32,
  parameter int NPACKETS = 40     // packets per input in the traffic phase
) (
  input  logic       clk,
  output logic [1:0] mode,
  output nibble_t    west_data,
  output logic       west_dav,
  input  logic       west_ack,
  output nibble_t    south_data,
  output logic       south_dav,
  input  logic       south_ack,
  input  nibble_t    north_data,
  input  logic       north_dav,
  output logic       north_ack,
  input  nibble_t    east_data,
  input  logic       east_dav,
  output logic       east_ack,
  output logic       cam_av,
  output logic [1:0] cam_sd,
  input  logic       addr_err,
  input  logic       dir_pin,
  input  logic       cam_loc,
  output logic       done
);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;
  // mechanism counters
  int n_state_reset, n_fast_load, n_refused, n_north, n_east, n_miss, n_hit;
  int n_timeout, n_stall, n_load_in_flight, n_test_lookup, n_test_straight, n_both_waiting;

  // reference CAM table
  logic [3:0] tab_tag [8];
  logic       tab_dir [8];

  function automatic int lookup(input logic [3:0] a);
    for (int i = 0; i < 8; i++) if (tab_tag[i] == a) return i;
    return -1;
  endfunction

  function automatic logic expected_dir(input logic [3:0] a);
    int h = lookup(a);
    return tab_dir[h < 0 ? 0 : h];
  endfunction

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- senders ----------------
  logic [63:0] tx_q [2][$];      // waiting to be sent
  logic [63:0] exp_q [2][$];     // sent, expected at an output
  logic [63:0] tx_pkt [2];
  int          tx_idx [2];
  logic        tx_active [2];
  logic        tx_enable;
  logic [1:0]  dav_v, ack_v;

  assign ack_v = {south_ack, west_ack};

  always @(negedge clk) begin
    for (int s = 0; s < 2; s++) begin
      if (!tx_active[s] && tx_enable && tx_q[s].size() > 0) begin
        tx_pkt[s] = tx_q[s].pop_front();
        tx_idx[s] = 0;
        tx_active[s] = 1;
      end
      dav_v[s] = tx_active[s];
    end
    west_dav   = dav_v[0];
    south_dav  = dav_v[1];
    west_data  = tx_active[0] ? tx_pkt[0][4*tx_idx[0] +: 4] : 4'h0;
    south_data = tx_active[1] ? tx_pkt[1][4*tx_idx[1] +: 4] : 4'h0;
  end

  always @(posedge clk) begin
    for (int s = 0; s < 2; s++)
      if (dav_v[s] && ack_v[s]) begin
        tx_idx[s]++;
        if (tx_idx[s] == 16) begin
          tx_active[s] = 0;
          exp_q[s].push_back(tx_pkt[s]);
        end
      end
    if (mode == MODE_CAM_LOAD && (dav_v != 0)) begin
      chk("inputs refused in CAM load mode", !(west_dav && west_ack) && !(south_dav && south_ack));
      n_refused++;
    end
    if (dut_both_full()) n_both_waiting++;
  end

  // both inputs hold a packet and ask for routing at once (seen from pins:
  // both senders have finished a packet that has not come out yet)
  function automatic logic dut_both_full();
    return exp_q[0].size() > 0 && exp_q[1].size() > 0;
  endfunction

  // ---------------- receivers ----------------
  logic        rx_ack [2];          // 0 = North, 1 = East
  logic [63:0] rx_pkt [2];
  int          rx_cnt [2];
  int          rx_wait [2];
  int          busy_for [2];
  int          ack_pct;            // chance of ACK per cycle, percent
  int          long_busy_pct;      // chance per packet of staying busy past the time-out
  logic        straight;           // test mode routing expected
  logic [1:0]  rx_dav;
  nibble_t     rx_data [2];
  int          rx_total;

  assign rx_dav     = {east_dav, north_dav};
  assign rx_data[0] = north_data;
  assign rx_data[1] = east_data;
  assign north_ack  = rx_ack[0];
  assign east_ack   = rx_ack[1];

  always @(negedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (busy_for[p] > 0) begin
        busy_for[p]--;
        rx_ack[p] = 0;
      end else begin
        rx_ack[p] = ($urandom_range(0, 99) < ack_pct);
        if (rx_dav[p] && rx_cnt[p] == 0 && rx_wait[p] == 0 &&
            $urandom_range(0, 99) < long_busy_pct) begin
          busy_for[p] = TIMEOUT + 8;
          rx_ack[p] = 0;
        end
      end
    end
  end

  task automatic receive_done(input int p);
    int s;
    logic [63:0] pk, e;
    logic [3:0] a;
    pk = rx_pkt[p];
    s  = int'(pk[5]);               // source id in packet bit 5
    a  = pk[4:1];
    rx_total++;
    chk("packet has SOP", pk[0]);
    if (exp_q[s].size() == 0) begin
      chk($sformatf("unexpected packet on port %0d", p), 0);
      return;
    end
    e = exp_q[s].pop_front();
    chk($sformatf("packet from %0d intact and in order (got %h exp %h)", s, pk, e), pk == e);
    if (straight)
      chk("test mode routes straight", p == (s == 0 ? 1 : 0));
    else begin
      chk($sformatf("addr %b routed to port %0d", a, p), p == int'(expected_dir(a)));
      chk("addr_err pin matches the look-up", addr_err == (lookup(a) < 0));
    end
    if (p == 0) n_north++; else n_east++;
  endtask

  always @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      // outputs are undefined until state reset has taken effect
      if (mode == MODE_RESET) begin
        rx_cnt[p]  = 0;
        rx_wait[p] = 0;
      end else if (rx_dav[p] && rx_ack[p]) begin
        if (rx_cnt[p] == 0) begin
          chk("first nibble carries SOP", rx_data[p][0]);
        end
        rx_pkt[p][4*rx_cnt[p] +: 4] = rx_data[p];
        rx_cnt[p]++;
        if (rx_wait[p] > 0 && rx_cnt[p] > 1) n_stall++;
        rx_wait[p] = 0;
        if (rx_cnt[p] == 16) begin
          receive_done(p);
          rx_cnt[p] = 0;
        end
      end else if (rx_dav[p]) begin
        rx_wait[p]++;
      end else begin
        if (rx_cnt[p] == 0 && rx_wait[p] >= TIMEOUT) n_timeout++;
        if (rx_cnt[p] == 0 && rx_wait[p] > 0)
          chk($sformatf("DAV withdrawn only after the time-out (%0d)", rx_wait[p]), rx_wait[p] == TIMEOUT);
        if (rx_cnt[p] != 0) chk("DAV held to the end of a packet", 0);
        rx_wait[p] = 0;
      end
    end
  end

  // ---------------- CAM loader ----------------
  task automatic cam_load(input int loc, input logic [3:0] a, input logic d);
    logic [1:0] pairs [4];
    pairs[0] = a[1:0];
    pairs[1] = a[3:2];
    pairs[2] = {loc[0], d};
    pairs[3] = 2'(loc >> 1);
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      cam_av = (k == 0);
      cam_sd = pairs[k];
    end
    @(negedge clk); cam_av = 0; cam_sd = 2'($urandom);
  endtask

  function automatic logic [63:0] make_packet(input int s, input logic [3:0] a, input int seq);
    logic [63:0] pk;
    pk = {$urandom, $urandom};
    pk[0]     = 1'b1;
    pk[4:1]   = a;
    pk[5]     = 1'(s);
    pk[21:6]  = 16'(seq);
    return pk;
  endfunction

  task automatic wait_drained(input int max_cycles);
    int c = 0;
    while ((tx_q[0].size() + tx_q[1].size() + exp_q[0].size() + exp_q[1].size() != 0 ||
            tx_active[0] || tx_active[1]) && c < max_cycles) begin
      @(negedge clk); c++;
    end
    chk("all packets delivered", c < max_cycles);
  endtask

  // addresses used in traffic: all 16, so both hits and misses occur
  initial begin
    int seq;
    int t0, t1;
    done = 0; mode = MODE_RESET; cam_av = 0; cam_sd = 0;
    tx_enable = 0; ack_pct = 100; long_busy_pct = 0; straight = 0;
    n_state_reset = 0; n_fast_load = 0; n_refused = 0; n_north = 0; n_east = 0;
    n_miss = 0; n_hit = 0; n_timeout = 0; n_stall = 0; n_load_in_flight = 0;
    n_test_lookup = 0; n_test_straight = 0; n_both_waiting = 0; rx_total = 0;
    for (int i = 0; i < 2; i++) begin
      tx_active[i] = 0; tx_idx[i] = 0; rx_cnt[i] = 0; rx_wait[i] = 0; busy_for[i] = 0; rx_ack[i] = 0;
    end
    dav_v = 0;
    tab_tag = '{4'b1011, 4'b0101, 4'b1000, 4'b1010, 4'b1111, 4'b0111, 4'b0000, 4'b0010};
    tab_dir = '{1'b1, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1};

    // ---- state reset
    repeat (3) @(negedge clk);
    n_state_reset++;
    chk("inputs off in state reset", !west_ack && !south_ack);

    // ---- CAM load mode: table loaded back to back, senders refused
    mode = MODE_CAM_LOAD;
    tx_enable = 1;
    for (int s = 0; s < 2; s++) tx_q[s].push_back(make_packet(s, 4'b1011, 0));
    t0 = cycle;
    for (int i = 0; i < 8; i++) begin
      cam_load(i, tab_tag[i], tab_dir[i]);
      n_fast_load++;
    end
    t1 = cycle;
    repeat (3) @(negedge clk);
    // 8 loads at 5 cycles each = 40 cycles: 3.2 loads per 16-cycle packet period
    chk($sformatf("fast CAM load rate (%0d cycles for 8)", t1 - t0), t1 - t0 <= 8 * 16 / 3);

    // ---- normal traffic
    mode = MODE_NORMAL;
    ack_pct = 80; long_busy_pct = 15;
    seq = 1;
    for (int n = 0; n < NPACKETS; n++)
      for (int s = 0; s < 2; s++) begin
        logic [3:0] a;
        a = 4'($urandom);
        if (lookup(a) < 0) n_miss++; else n_hit++;
        tx_q[s].push_back(make_packet(s, a, seq++));
      end
    wait_drained(NPACKETS * 400);
    long_busy_pct = 0; ack_pct = 100;

    // ---- CAM entry rewritten while a packet with that address streams out
    tx_q[0].push_back(make_packet(0, 4'b1011, seq++));        // location 0: East
    while (!east_dav || !east_ack) @(negedge clk);
    fork
      cam_load(0, 4'b1011, 1'b0);
    join_none
    repeat (8) @(negedge clk);
    // the streaming packet is still checked against the old direction
    chk("packet still streaming after the load", east_dav);
    if (east_dav) n_load_in_flight++;
    wait_drained(400);
    tab_dir[0] = 1'b0;                                         // now North
    t0 = n_north;
    tx_q[1].push_back(make_packet(1, 4'b1011, seq++));
    wait_drained(400);
    chk("new entry used by the next packet", n_north == t0 + 1);

    // ---- test mode: look-ups from the load port, straight routing
    mode = MODE_TEST;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      logic [2:0] loc_bits;
      cam_load(5, tab_tag[i], 1'b0);      // location and direction ignored in test mode
      // the look-up happens one cycle after the entry is complete; the
      // location follows on cam_loc for three cycles, LSB first
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        @(negedge clk);
        loc_bits[k] = cam_loc;
      end
      chk($sformatf("test look-up %b: loc %0d exp %0d", tab_tag[i], loc_bits, lookup(tab_tag[i])),
          int'(loc_bits) == lookup(tab_tag[i]));
      chk("test look-up direction on dir_pin", dir_pin == tab_dir[lookup(tab_tag[i])]);
      n_test_lookup++;
    end
    straight = 1;
    for (int n = 0; n < 4; n++)
      for (int s = 0; s < 2; s++) tx_q[s].push_back(make_packet(s, 4'($urandom), seq++));
    t0 = n_north + n_east;
    wait_drained(2000);
    n_test_straight = n_north + n_east - t0;
    straight = 0;

    done = 1;
  end

endmodule
