// One unrolled round of the Nikhilam BCD division loop.
//
// The source draws the divider as a loop: multiplexer -> multiplier -> adder
// -> decision box, with the adder result fed back through the multiplexer
// until the decision box says "NO". This module is one pass through that
// loop; the divider chains MAX_ROUNDS of them, so the whole division is
// combinational.
//
// With c = 10 - d and the operand v = 10*h + l:
//  * h != 0 (Nikhilam round): v' = l + h*c, quotient += h. Since
//    10*h + l = h*d + (l + h*c), the value v - q*d is unchanged.
//  * h == 0, l + c >= 10 (correction round, remainder >= divisor):
//    v' = (l + c) - 10 = l - d, quotient += 1.
//  * otherwise the round is not taken: v and the quotient pass unchanged,
//    and l is the remainder.
// The multiplier input is h, or 1 in a correction round, so one multiplier,
// one adder and one incrementer serve both kinds of round.
//   c      : 10's complement of the divisor
//   v_in   : operand entering the round, two BCD digits
//   q_in   : quotient so far
//   v_out  : operand after the round
//   q_out  : quotient after the round
//   taken  : the round changed the operand (decision box "YES")
//   corr   : the round is a correction round (operand tens digit zero)
// Purely combinational.
module nikhilam_round
  import bcd_div_pkg::*;
(
  input  bcd_digit_t c,
  input  bcd2_t      v_in,
  input  bcd_digit_t q_in,
  output bcd2_t      v_out,
  output bcd_digit_t q_out,
  output logic       taken,
  output logic       corr
);

  bcd_digit_t m;        // quotient digit of this round, multiplier input
  logic [7:0] prod;
  bcd2_t      sum;
  logic       carry;
  bcd2_t      fb;       // value fed back to the multiplexer

  always_comb begin
    m = corr ? 4'd1 : v_in.hi;
  end

  mult4x4 u_mult (
    .x (c),
    .y (m),
    .p (prod)
  );

  nikhilam_adder u_add (
    .prod  (prod),
    .lsd   (v_in.lo),
    .sum   (sum),
    .carry (carry)
  );

  decision_box u_dec (
    .msd   (v_in.hi),
    .carry (carry),
    .corr  (corr),
    .more  (taken)
  );

  // In a correction round the tens digit of the sum is the quotient
  // increment, not part of the new operand.
  always_comb begin
    fb.hi = corr ? 4'd0 : sum.hi;
    fb.lo = sum.lo;
  end

  mux2 u_mux (
    .d0  (v_in),
    .d1  (fb),
    .sel (taken),
    .y   (v_out)
  );

  incrementer u_inc (
    .q_in  (q_in),
    .inc   (m),
    .en    (taken),
    .q_out (q_out)
  );

endmodule
