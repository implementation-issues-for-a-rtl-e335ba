// Row decoder of an input fifo: a resettable one-hot shift register.
//
// One enable bit walks down ROWS row stages, one row per cycle in which `inc`
// is high, and selects the memory row to be written (write side) or read
// (read side). Behind the last row sits a dummy stage; when the bit reaches it
// `last` rises, which is the FifoFull flag of the write decoder or the End Of
// Data flag of the read decoder. The bit stays in the dummy stage until `rst`
// recycles it to row 0. `rst` wins over `inc`; both act on the rising clock
// edge. The structure (shift register plus dummy register) follows the
// router's fifo description; holding the bit in the dummy stage is this
// design's choice.
`timescale 1ns / 1ps
module fifo_ring_decoder #(
  parameter int unsigned ROWS = 16
) (
  input  logic            clk,
  input  logic            rst,     // synchronous: enable bit back to row 0
  input  logic            inc,     // advance one row
  output logic [ROWS-1:0] row_en,  // one-hot row enable
  output logic            last     // bit is in the dummy stage
);

  logic [ROWS:0] stage;  // stage[ROWS] is the dummy register

  always_ff @(posedge clk) begin
    if (rst)
      stage <= (ROWS+1)'(1);
    else if (inc && !stage[ROWS])
      stage <= stage << 1;
  end

  assign row_en = stage[ROWS-1:0];
  assign last   = stage[ROWS];

endmodule
