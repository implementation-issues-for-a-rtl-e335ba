// 3-to-8 word line decoder of the CAM/RAM block.
//
// While `en` (the LD_CAM load strobe) is high, exactly the word line named by
// the N-bit location from the load buffer is raised; otherwise all word lines
// are low. Purely combinational. The decoder itself is shown in the router's
// data path; its gating by the load strobe is this design's choice.
`timescale 1ns / 1ps
module wordline_decoder #(
  parameter int unsigned N = 3
) (
  input  logic              en,
  input  logic [N-1:0]      loc,
  output logic [(1<<N)-1:0] wl
);

  always_comb begin
    wl = '0;
    if (en) wl[loc] = 1'b1;
  end

endmodule
