// 4x4 unsigned multiplier of the Nikhilam divider.
//
// Multiplies the divisor's 10's complement by the upper digit of the current
// operand (the quotient digit of the round). The product is binary: with both
// inputs at most 9 it is at most 81, and the adder that follows turns it back
// into BCD. Written as a sum of four shifted partial products (array
// multiplier); the internal structure is this design's choice, the source
// only names the block. Purely combinational.
//   x, y : 4-bit unsigned operands
//   p    : 8-bit product x * y
module mult4x4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic [7:0] p
);

  logic [7:0] pp [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      pp[i] = y[i] ? (8'(x) << i) : 8'd0;
    end
    p = pp[0] + pp[1] + pp[2] + pp[3];
  end

endmodule
