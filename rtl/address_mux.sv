// 3-to-1 address multiplexer in front of the CAM.
//
// Presents to the CAM bit lines either the destination address of input fifo
// A (West), of input fifo B (South), or the new address held in the CAM/RAM
// load buffer, as selected by the address state machine. Combinational; an
// unused select code gives address 0.
`timescale 1ns / 1ps
module address_mux
  import router_pkg::*;
(
  input  addr_sel_t  sel,
  input  node_addr_t fifo_a,
  input  node_addr_t fifo_b,
  input  node_addr_t load,
  output node_addr_t addr
);

  always_comb begin
    unique case (sel)
      ASEL_FIFO_A: addr = fifo_a;
      ASEL_FIFO_B: addr = fifo_b;
      ASEL_LOAD:   addr = load;
      default:     addr = '0;
    endcase
  end

endmodule
