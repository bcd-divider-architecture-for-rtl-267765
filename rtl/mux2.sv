// 2:1 operand multiplexer of the Nikhilam divider.
//
// Chooses the operand the next division round works on: with sel = 0 it keeps
// d0 (the dividend, or the operand of a finished division), with sel = 1 it
// takes d1, the adder result fed back. In the source the select line is the
// adder's carry and starts at zero so that the dividend goes through; here it
// is driven by the decision box of the round. Width 8 bits = two BCD digits.
// Purely combinational.
module mux2
  import bcd_div_pkg::*;
(
  input  bcd2_t d0,
  input  bcd2_t d1,
  input  logic  sel,
  output bcd2_t y
);

  always_comb begin
    y = sel ? d1 : d0;
  end

endmodule
