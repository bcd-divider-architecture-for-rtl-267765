// Decision box of the Nikhilam divider: is another round needed?
//
// A round is taken ("YES" in the flow chart) in two cases:
//  * the operand still has a non-zero tens digit msd: the Nikhilam step
//    10*msd + l -> l + msd*c moves msd into the quotient;
//  * the tens digit is zero (corr = 1) and the units digit plus the
//    10's complement carries, which is exactly "remainder >= divisor"; the
//    round then adds one to the quotient and keeps the units digit of the sum,
//    i.e. remainder - divisor, formed without a subtraction.
// Otherwise ("NO") the units digit is the final remainder.
//   msd   : tens digit of the current operand
//   carry : decimal carry of the adder for this round
//   corr  : msd == 0, the round is a correction round (multiplier input 1)
//   more  : the round is taken
// Purely combinational. The source shows the condition as "Carry, Rem=a" and
// increments the quotient when r == a; the ">=" form here (via the carry) is
// this design's reading, it equals "r == a" for divisor 9.
module decision_box
  import bcd_div_pkg::*;
(
  input  bcd_digit_t msd,
  input  logic       carry,
  output logic       corr,
  output logic       more
);

  always_comb begin
    corr = (msd == 4'd0);
    more = !corr || carry;
  end

endmodule
