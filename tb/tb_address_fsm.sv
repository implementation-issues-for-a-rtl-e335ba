`timescale 1ns / 1ps
// Testbench for address_fsm, with behavioural stand-ins for the CAM (dir_rdy
// the cycle after EVAL_ADD until swap, LD_DONE the cycle after LD_CAM), the
// output state machine (swap a random number of cycles after dir_rdy) and
// the load state machine (CA_RDY until ca_ack). Checks: with both inputs
// always waiting the sources alternate A, B, A, B; a lone waiting input is
// served; EVAL_ADD carries the source's mux select; a CAM entry is written
// from idle and also while a packet is being sent (with dir_rdy up and the
// load buffer on the mux), a swap during that load is not lost; CAM load
// mode serves only CAM entries; test mode evaluates entries instead of
// writing them and forces West->East, South->North.
module tb_address_fsm;
  import router_pkg::*;
  logic clk = 0;
  mode_t mode;
  logic fa_rdy, fb_rdy, ca_rdy, dir_rdy, ld_done, swap;
  addr_sel_t sel;
  logic eval_add, ld_cam, test_eval, ca_ack, src, force_en, force_dir;
  int checks = 0, failures = 0;
  int swap_delay, xmit_cnt;
  int evals_a, evals_b, loads, loads_in_xmit, test_evals;
  logic last_src;
  int alternations, evals_total;

  address_fsm dut (.*);

  always #5 clk = ~clk;

  // CAM stand-in
  always_ff @(posedge clk) begin
    if (mode == MODE_RESET) begin dir_rdy <= 0; ld_done <= 0; end
    else begin
      ld_done <= ld_cam;
      if (eval_add) dir_rdy <= 1;
      else if (swap) dir_rdy <= 0;
    end
  end
  // output state machine stand-in: swap swap_delay cycles after dir_rdy
  always_ff @(posedge clk) begin
    if (!dir_rdy || swap) xmit_cnt <= 0;
    else xmit_cnt <= xmit_cnt + 1;
  end
  assign swap = dir_rdy && (xmit_cnt == swap_delay);

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // per-cycle checks and counts
  always @(negedge clk) if (mode != MODE_RESET) begin
    if (eval_add) begin
      chk("eval select matches source", sel == (src ? ASEL_FIFO_B : ASEL_FIFO_A));
      chk("eval only for a waiting input", src ? fb_rdy : fa_rdy);
      chk("force only in test mode", force_en == (mode == MODE_TEST));
      if (mode == MODE_TEST) chk("straight routing", force_dir == (src ? DIR_NORTH : DIR_EAST));
      if (evals_total > 0 && fa_rdy && fb_rdy && src != last_src) alternations++;
      last_src = src; evals_total++;
      if (src) evals_b++; else evals_a++;
    end
    if (ld_cam || test_eval) begin
      chk("load buffer on the mux", sel == ASEL_LOAD);
      chk("ca_ack with the load", ca_ack && ca_rdy);
      chk("never both", !(ld_cam && test_eval) && !eval_add);
      if (ld_cam) begin
        loads++;
        if (dir_rdy) loads_in_xmit++;
        chk("no write in test mode", mode != MODE_TEST);
      end
      if (test_eval) test_evals++;
    end
    if (mode == MODE_CAM_LOAD) chk("no eval in CAM load mode", !eval_add);
  end

  // load state machine stand-in
  always_ff @(posedge clk) if (ca_ack) ca_rdy <= 0;

  task automatic reset_all;
    mode = MODE_RESET; fa_rdy = 0; fb_rdy = 0; ca_rdy = 0; swap_delay = 5;
    @(negedge clk); @(negedge clk);
    evals_a = 0; evals_b = 0; loads = 0; loads_in_xmit = 0; test_evals = 0;
    alternations = 0; evals_total = 0;
  endtask

  initial begin
    reset_all();
    // 1: both inputs always waiting: strict alternation
    mode = MODE_NORMAL; fa_rdy = 1; fb_rdy = 1;
    repeat (200) @(negedge clk);
    chk($sformatf("alternation a=%0d b=%0d alt=%0d", evals_a, evals_b, alternations),
        evals_a > 10 && (evals_a - evals_b) inside {[-1:1]} && alternations == evals_total - 1);
    // 2: only B waits
    reset_all(); mode = MODE_NORMAL; fb_rdy = 1;
    repeat (60) @(negedge clk);
    chk("lone B served", evals_b > 2 && evals_a == 0);
    // 3: load from idle
    reset_all(); mode = MODE_NORMAL; @(negedge clk); ca_rdy = 1;
    repeat (6) @(negedge clk);
    chk("idle load", loads == 1 && loads_in_xmit == 0 && !ca_rdy);
    // 4: load while transmitting, swap during the load
    reset_all(); mode = MODE_NORMAL; fa_rdy = 1; swap_delay = 3;
    @(negedge clk); @(negedge clk);
    ca_rdy = 1;          // arrives while the packet is being set up
    repeat (3) @(negedge clk);
    fa_rdy = 0;
    repeat (20) @(negedge clk);
    chk($sformatf("load during transmission (%0d/%0d)", loads_in_xmit, loads), loads == 1 && loads_in_xmit == 1);
    chk("back to idle after late swap", dut.state == 3'd0 && !dir_rdy);
    // 5: CAM load mode
    reset_all(); mode = MODE_CAM_LOAD; fa_rdy = 1; fb_rdy = 1;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); ca_rdy = 1; repeat (5) @(negedge clk);
    end
    chk("CAM load mode: loads only", loads == 4 && evals_total == 0);
    // 6: test mode
    reset_all(); mode = MODE_TEST; @(negedge clk); ca_rdy = 1;
    repeat (4) @(negedge clk);
    chk("test mode evaluates the entry", test_evals == 1 && loads == 0);
    fa_rdy = 1; repeat (4) @(negedge clk); fa_rdy = 0;
    fb_rdy = 1; repeat (12) @(negedge clk); fb_rdy = 0;
    chk("test mode routes both inputs", evals_a >= 1 && evals_b >= 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
