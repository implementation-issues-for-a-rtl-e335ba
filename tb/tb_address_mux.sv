`timescale 1ns / 1ps
// Testbench for address_mux: random addresses on all three inputs, every
// select code; the output must equal the selected input (0 for the unused
// code).
module tb_address_mux;
  import router_pkg::*;
  addr_sel_t  sel;
  node_addr_t fifo_a, fifo_b, load, addr, exp_addr;
  int checks = 0, failures = 0;

  address_mux dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      fifo_a = 4'($urandom); fifo_b = 4'($urandom); load = 4'($urandom);
      sel = addr_sel_t'(2'(i % 4));
      #1;
      case (i % 4)
        0: exp_addr = fifo_a;
        1: exp_addr = fifo_b;
        2: exp_addr = load;
        default: exp_addr = '0;
      endcase
      checks++;
      if (addr !== exp_addr) begin
        failures++;
        $display("FAIL sel=%0d addr=%h exp=%h", i % 4, addr, exp_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
