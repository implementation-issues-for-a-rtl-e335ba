`timescale 1ns / 1ps
// Network testbench: nine CAM routers wired as a 3x3 mesh, each router's
// East output feeding the West input of the next router in its row and its
// North output feeding the South input of the next router in its column.
// Packets enter at the mesh edge (West inputs of the first column, South
// inputs of the first row: six sources) and leave at the far edge (East
// outputs of the last column, North outputs of the last row: six exits).
//
// Node addresses: the East exit of row r is node r, the North exit of
// column c is node 4+c. Every router is loaded in CAM load mode, all nine
// at once through their serial load ports, with only the routes that differ
// from its default direction; location 0 and every unused location hold
// the reserved address 15 with the default direction. So most hops are CAM
// misses that take the default route (and raise addr_err), and the rest
// are explicit matches.
//
// Traffic: each source sends NPK packets to random reachable exits; the
// exits stall at random and now and then stay busy past the time-out, so
// routers inside the mesh also wait on full neighbours. Each packet carries
// its source and a sequence number; it must arrive whole at the exit its
// address names, and packets from one source to one exit in order. Counts:
// deliveries, packets that crossed five routers, default-route and matched
// hops, time-outs, and routers with both inputs waiting.
module tb_mesh_network;
  import router_pkg::*;

  localparam int R       = 3;
  localparam int C       = 3;
  localparam int NSRC    = R + C;
  localparam int NPK     = 30;      // packets per source
  localparam int TIMEOUT = 32;
  localparam logic [3:0] SPARE = 4'd15;   // reserved address for unused CAM locations

  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0] mode;

  // router outputs
  nibble_t e_data [R][C];
  logic    e_dav  [R][C];
  logic    e_ack  [R][C];
  nibble_t n_data [R][C];
  logic    n_dav  [R][C];
  logic    n_ack  [R][C];
  logic    aerr   [R][C];
  logic    dpin   [R][C];
  logic    cloc   [R][C];

  // sources 0..R-1: West input of row s; R..R+C-1: South input of column s-R
  nibble_t src_data [NSRC];
  logic    src_dav  [NSRC];
  logic    src_ack  [NSRC];
  // exits 0..R-1: East output of row x; R..R+C-1: North output of column x-R
  nibble_t x_data [NSRC];
  logic    x_dav  [NSRC];
  logic    x_ack  [NSRC];

  logic       cam_av [R*C];
  logic [1:0] cam_sd [R*C];

  int to_cnt   [R*C];
  int miss_cnt [R*C];
  int hit_cnt  [R*C];
  int both_cnt [R*C];

  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar c = 0; c < C; c++) begin : g_col
      nibble_t wd, sd;
      logic    wv, wa, sv, sa;
      logic    ev_d;

      if (c == 0) begin : g_wsrc
        assign wd = src_data[r];
        assign wv = src_dav[r];
        assign src_ack[r] = wa;
      end else begin : g_wlink
        assign wd = e_data[r][c-1];
        assign wv = e_dav[r][c-1];
        assign e_ack[r][c-1] = wa;
      end
      if (r == 0) begin : g_ssrc
        assign sd = src_data[R+c];
        assign sv = src_dav[R+c];
        assign src_ack[R+c] = sa;
      end else begin : g_slink
        assign sd = n_data[r-1][c];
        assign sv = n_dav[r-1][c];
        assign n_ack[r-1][c] = sa;
      end
      if (c == C-1) begin : g_eexit
        assign x_data[r] = e_data[r][c];
        assign x_dav[r]  = e_dav[r][c];
        assign e_ack[r][c] = x_ack[r];
      end
      if (r == R-1) begin : g_nexit
        assign x_data[R+c] = n_data[r][c];
        assign x_dav[R+c]  = n_dav[r][c];
        assign n_ack[r][c] = x_ack[R+c];
      end

      cam_router #(.TIMEOUT(TIMEOUT)) u_rt (
        .clk, .mode,
        .west_data(wd), .west_dav(wv), .west_ack(wa),
        .south_data(sd), .south_dav(sv), .south_ack(sa),
        .north_data(n_data[r][c]), .north_dav(n_dav[r][c]), .north_ack(n_ack[r][c]),
        .east_data(e_data[r][c]), .east_dav(e_dav[r][c]), .east_ack(e_ack[r][c]),
        .cam_av(cam_av[r*C+c]), .cam_sd(cam_sd[r*C+c]),
        .addr_err(aerr[r][c]), .dir_pin(dpin[r][c]), .cam_loc(cloc[r][c])
      );

      // mechanism counters of this router
      initial ev_d = 0;
      always @(posedge clk) begin
        if (mode == MODE_NORMAL) begin
          if (ev_d) begin
            if (aerr[r][c]) miss_cnt[r*C+c]++;
            else            hit_cnt[r*C+c]++;
          end
          if (u_rt.timed_out)           to_cnt[r*C+c]++;
          if (u_rt.fa_rdy && u_rt.fb_rdy) both_cnt[r*C+c]++;
        end
        ev_d = u_rt.eval_add;
      end
    end
  end

  // ---------------- checking ----------------
  int checks = 0, failures = 0;

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [3:0] exit_addr(input int x);
    return (x < R) ? 4'(x) : 4'(x - R + 4);
  endfunction

  // Direction router (r,c) must give exit x: 1 = East, 0 = North.
  function automatic logic route(input int r, input int c, input int x);
    if (x < R) return (x == r);          // East exit of row x: go East once in row x
    else       return (x - R != c);      // North exit of column x-R: go North once in it
  endfunction

  // exits a packet that passes router (r,c) can reach
  function automatic logic relevant(input int r, input int c, input int x);
    return (x < R) ? (x >= r) : (x - R >= c);
  endfunction

  function automatic logic reachable(input int s, input int x);
    return (s < R) ? relevant(s, 0, x) : relevant(0, s - R, x);
  endfunction

  function automatic int hops(input int s, input int x);
    int rs, cs;
    rs = (s < R) ? s : 0;
    cs = (s < R) ? 0 : s - R;
    return (x < R) ? (x - rs) + (C - 1 - cs) + 1 : (R - 1 - rs) + (x - R - cs) + 1;
  endfunction

  // ---------------- CAM tables ----------------
  logic [3:0] tab_tag [R*C][CAM_DEPTH];
  logic       tab_dir [R*C][CAM_DEPTH];

  task automatic build_tables();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        int n_east, n_north, k;
        logic dflt;
        n_east = 0; n_north = 0;
        for (int x = 0; x < NSRC; x++)
          if (relevant(r, c, x)) begin
            if (route(r, c, x)) n_east++;
            else                n_north++;
          end
        dflt = (n_east >= n_north);
        for (int l = 0; l < CAM_DEPTH; l++) begin
          tab_tag[r*C+c][l] = SPARE;
          tab_dir[r*C+c][l] = dflt;
        end
        k = 1;
        for (int x = 0; x < NSRC; x++)
          if (relevant(r, c, x) && route(r, c, x) != dflt) begin
            tab_tag[r*C+c][k] = exit_addr(x);
            tab_dir[r*C+c][k] = route(r, c, x);
            k++;
          end
      end
  endtask

  // one entry into every router at once: address, {loc[0],dir}, loc[2:1]
  task automatic load_all(input int loc);
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      for (int i = 0; i < R*C; i++) begin
        logic [3:0] a;
        a = tab_tag[i][loc];
        cam_av[i] = (k == 0);
        case (k)
          0: cam_sd[i] = a[1:0];
          1: cam_sd[i] = a[3:2];
          2: cam_sd[i] = {loc[0], tab_dir[i][loc]};
          default: cam_sd[i] = 2'(loc >> 1);
        endcase
      end
    end
    @(negedge clk);
    for (int i = 0; i < R*C; i++) begin
      cam_av[i] = 0;
      cam_sd[i] = 2'($urandom);
    end
  endtask

  // ---------------- sources ----------------
  logic [63:0] tx_q   [NSRC][$];
  logic [63:0] exp_q  [NSRC][NSRC][$];   // [source][exit]
  logic [63:0] tx_pkt [NSRC];
  int          tx_idx [NSRC];
  logic        tx_act [NSRC];
  logic        tx_en;

  always @(negedge clk) begin
    for (int s = 0; s < NSRC; s++) begin
      if (!tx_act[s] && tx_en && tx_q[s].size() > 0) begin
        tx_pkt[s] = tx_q[s].pop_front();
        tx_idx[s] = 0;
        tx_act[s] = 1;
      end
      src_dav[s]  = tx_act[s];
      src_data[s] = tx_act[s] ? tx_pkt[s][4*tx_idx[s] +: 4] : 4'h0;
    end
  end

  always @(posedge clk)
    for (int s = 0; s < NSRC; s++)
      if (src_dav[s] && src_ack[s]) begin
        tx_idx[s]++;
        if (tx_idx[s] == PKT_NIBBLES) tx_act[s] = 0;
      end

  // ---------------- exits ----------------
  logic [63:0] rx_pkt  [NSRC];
  int          rx_cnt  [NSRC];
  int          busy    [NSRC];
  int          rx_total, n_long;

  always @(negedge clk)
    for (int x = 0; x < NSRC; x++) begin
      if (busy[x] > 0) begin
        busy[x]--;
        x_ack[x] = 0;
      end else if (x_dav[x] && rx_cnt[x] == 0 && !x_ack[x] && $urandom_range(0, 99) < 3) begin
        busy[x] = TIMEOUT + 8;      // long enough for the sending router to give up
        x_ack[x] = 0;
      end else
        x_ack[x] = ($urandom_range(0, 99) < 80);
    end

  always @(posedge clk)
    for (int x = 0; x < NSRC; x++) begin
      if (x_dav[x] && x_ack[x]) begin
        if (rx_cnt[x] == 0) chk("first nibble carries SOP", x_data[x][0]);
        rx_pkt[x][4*rx_cnt[x] +: 4] = x_data[x];
        rx_cnt[x]++;
        if (rx_cnt[x] == PKT_NIBBLES) begin
          int s;
          rx_cnt[x] = 0;
          rx_total++;
          s = int'(rx_pkt[x][7:5]);
          chk("packet leaves at the exit its address names", rx_pkt[x][4:1] == exit_addr(x));
          if (s >= NSRC || exp_q[s][x].size() == 0) chk("packet was expected", 0);
          else begin
            chk("packet whole and in order", exp_q[s][x].pop_front() == rx_pkt[x]);
            if (hops(s, x) == R + C - 1) n_long++;
          end
        end
      end else if (rx_cnt[x] != 0 && !x_dav[x])
        chk("DAV held to the end of a packet", 0);
    end

  // ---------------- scenario ----------------
  function automatic int sum(input int a [R*C]);
    int t = 0;
    foreach (a[i]) t += a[i];
    return t;
  endfunction

  task automatic need(input string name, input int n);
    checks++;
    $display("COUNT %-36s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", name);
    end
  endtask

  initial begin
    int total, waited;
    mode = MODE_RESET;
    tx_en = 0; rx_total = 0; n_long = 0;
    for (int i = 0; i < R*C; i++) begin
      cam_av[i] = 0; cam_sd[i] = 0;
      to_cnt[i] = 0; miss_cnt[i] = 0; hit_cnt[i] = 0; both_cnt[i] = 0;
    end
    for (int s = 0; s < NSRC; s++) begin
      tx_act[s] = 0; tx_idx[s] = 0; rx_cnt[s] = 0; busy[s] = 0; x_ack[s] = 0;
      src_dav[s] = 0; src_data[s] = 0;
    end
    build_tables();
    repeat (3) @(negedge clk);

    // load all nine tables back to back in CAM load mode
    mode = MODE_CAM_LOAD;
    @(negedge clk);
    for (int l = 0; l < CAM_DEPTH; l++) load_all(l);
    repeat (4) @(negedge clk);
    mode = MODE_NORMAL;

    // traffic
    total = 0;
    for (int s = 0; s < NSRC; s++)
      for (int p = 0; p < NPK; p++) begin
        logic [63:0] pk;
        int x;
        do x = $urandom_range(0, NSRC - 1); while (!reachable(s, x));
        pk       = {$urandom, $urandom};
        pk[0]    = 1'b1;
        pk[4:1]  = exit_addr(x);
        pk[7:5]  = 3'(s);
        pk[23:8] = 16'(p);
        tx_q[s].push_back(pk);
        exp_q[s][x].push_back(pk);
        total++;
      end
    tx_en = 1;

    waited = 0;
    while (rx_total < total && waited < 200000) begin
      @(negedge clk);
      waited++;
    end
    chk("every packet delivered", rx_total == total);
    for (int s = 0; s < NSRC; s++)
      for (int x = 0; x < NSRC; x++)
        chk("nothing left undelivered", exp_q[s][x].size() == 0);
    repeat (10) @(negedge clk);

    need("packets delivered", rx_total);
    need("packets across five routers", n_long);
    need("hops on the default route (miss)", sum(miss_cnt));
    need("hops on a CAM entry (match)", sum(hit_cnt));
    need("ACK time-outs", sum(to_cnt));
    need("cycles with both inputs waiting", sum(both_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
