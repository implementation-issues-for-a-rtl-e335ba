`timescale 1ns / 1ps
// Testbench for cam_ram. Loads the eight example entries of the CAM-RAM
// block diagram (location 0..7: 1011/1, 0101/1, 1000/0, 1010/1, 1111/0,
// 0111/0, 0000/1, 0010/1) through the word lines and checks the worked
// example: address 1011 matches the first location and routes East (1).
// Then evaluates all 16 addresses against a reference table (a miss must
// route by location 0 and flag addr_err), checks that the direction stays
// latched across a later load until swap, checks ld_done, the test-mode
// DIR output and the serial cam_loc output, and the forced direction.
module tb_cam_ram;
  logic clk = 0, srst, eval_add, test_eval, force_en, force_dir, wr_dir, swap;
  logic [3:0] addr;
  logic [7:0] wl;
  logic dir, dir_rdy, match, addr_err, ld_done, test_dir, cam_loc;
  int checks = 0, failures = 0;

  logic [3:0] ref_tag [8] = '{4'b1011, 4'b0101, 4'b1000, 4'b1010, 4'b1111, 4'b0111, 4'b0000, 4'b0010};
  logic       ref_dir [8] = '{1'b1, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1};

  cam_ram #(.ENTRIES(8), .AW(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
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

  task automatic load(input int loc, input logic [3:0] a, input logic d);
    @(negedge clk); addr = a; wr_dir = d; wl = 8'd1 << loc;
    @(negedge clk); wl = 0;
    chk("ld_done after write", ld_done);
    @(negedge clk);
    chk("ld_done is a pulse", !ld_done);
  endtask

  task automatic evaluate(input logic [3:0] a, output int hit);
    hit = -1;
    for (int i = 7; i >= 0; i--) if (ref_tag[i] == a) hit = i;
    @(negedge clk); addr = a; eval_add = 1;
    @(negedge clk); eval_add = 0;
    chk("dir_rdy after eval", dir_rdy);
    chk($sformatf("dir for %b", a), dir == ref_dir[hit < 0 ? 0 : hit]);
    chk($sformatf("match/addr_err for %b", a), match == (hit >= 0) && addr_err == (hit < 0));
  endtask

  initial begin
    int hit;
    logic [2:0] loc_bits;
    srst = 1; eval_add = 0; test_eval = 0; force_en = 0; force_dir = 0; wr_dir = 0;
    swap = 0; addr = 0; wl = 0;
    @(negedge clk); @(negedge clk); srst = 0;
    chk("dir_rdy low after reset", !dir_rdy);
    for (int i = 0; i < 8; i++) load(i, ref_tag[i], ref_dir[i]);

    // worked example of the block diagram
    evaluate(4'b1011, hit);
    chk("1011 hits location 0", hit == 0 && dir == 1'b1);
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    chk("swap clears dir_rdy", !dir_rdy);

    // all addresses; 0001, 0011, 0100, 0110, 1001, 1100, 1101, 1110 miss
    for (int a = 0; a < 16; a++) begin
      evaluate(4'(a), hit);
      @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    end

    // direction stays latched while a new entry is loaded during the packet
    evaluate(4'b1000, hit);           // North
    load(2, 4'b1000, 1'b1);           // same address, now East
    ref_dir[2] = 1'b1;
    chk("latched dir unchanged by load", dir == 1'b0 && dir_rdy);
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    evaluate(4'b1000, hit);
    chk("reloaded entry used next packet", dir == 1'b1);
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;

    // test mode: DIR pin and serial location
    @(negedge clk); addr = 4'b0111; test_eval = 1;
    @(negedge clk); test_eval = 0;
    chk("test eval leaves dir_rdy low", !dir_rdy);
    chk("test dir", test_dir == 1'b0);
    for (int k = 0; k < 3; k++) begin
      loc_bits[k] = cam_loc;
      @(negedge clk);
    end
    chk($sformatf("cam_loc serial %b exp 101", loc_bits), loc_bits == 3'd5);
    chk("cam_loc idle after", cam_loc == 1'b0);

    // forced direction
    @(negedge clk); addr = 4'b1011; eval_add = 1; force_en = 1; force_dir = 0;
    @(negedge clk); eval_add = 0; force_en = 0;
    chk("forced direction", dir == 1'b0 && dir_rdy);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
