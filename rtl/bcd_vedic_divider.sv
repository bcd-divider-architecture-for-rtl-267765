// Combinational BCD divider, two-digit dividend by one-digit divisor, using
// the Nikhilam ("all from 9 and the last from 10") method.
//
// Division by a digit d is turned into multiplications and additions by its
// distance from the base: c = 10 - d. The dividend 10*h + l is rewritten as
// h*d + (l + h*c): h goes to the quotient and l + h*c becomes the new operand.
// This repeats while the operand has a tens digit; a last operand l >= d is
// detected by l + c carrying past 10, which also yields l - d without a
// subtractor. The source draws this as a loop through one multiplier and one
// adder; here the loop is unrolled into ROUNDS copies of nikhilam_round, so a
// division is a single combinational path with no clock.
//
// Ports (a, b, q, r follow the source's simulation; err is this design's
// addition):
//   a   : divisor, one BCD digit, 1..9
//   b   : dividend, two BCD digits (b[7:4] tens, b[3:0] units)
//   q   : quotient, one BCD digit
//   r   : remainder, one BCD digit
//   err : the division is outside the 4-bit quotient range or the operands
//         are not legal: a = 0, a non-BCD digit, or b[7:4] >= a (quotient
//         would exceed 9). q and r are 0 when err is 1.
// The source does not say what the hardware does for such inputs; the err
// flag and zeroed outputs are this design's choice.
//
// ROUNDS defaults to MAX_ROUNDS = 9, the largest number of rounds any legal
// input needs (9 / 1: nine correction rounds). Fewer rounds give wrong
// results for some legal inputs.
module bcd_vedic_divider
  import bcd_div_pkg::*;
#(
  parameter int unsigned ROUNDS = MAX_ROUNDS
) (
  input  bcd_digit_t a,
  input  bcd2_t      b,
  output bcd_digit_t q,
  output bcd_digit_t r,
  output logic       err
);

  bcd_digit_t c;
  bcd2_t      v     [ROUNDS+1];
  bcd_digit_t qa    [ROUNDS+1];
  // Which rounds ran and of which kind. They drive no output; they are kept
  // as named signals so that a simulation can see how a division proceeded.
  logic       taken [ROUNDS];
  logic       corr  [ROUNDS];

  bcd_tens_complement u_comp (
    .a (a),
    .c (c)
  );

  // Round 0 sees the dividend and an empty quotient, so after it the
  // quotient is b[7:4], the source's initial "q = B[7:4]".
  always_comb begin
    v[0]  = b;
    qa[0] = 4'd0;
  end

  for (genvar k = 0; k < ROUNDS; k++) begin : g_round
    nikhilam_round u_round (
      .c     (c),
      .v_in  (v[k]),
      .q_in  (qa[k]),
      .v_out (v[k+1]),
      .q_out (qa[k+1]),
      .taken (taken[k]),
      .corr  (corr[k])
    );
  end

  always_comb begin
    err = (a == 4'd0) || (a > 4'd9) || (b.hi > 4'd9) || (b.lo > 4'd9)
          || (b.hi >= a);
    q   = err ? 4'd0 : qa[ROUNDS];
    r   = err ? 4'd0 : v[ROUNDS].lo;
  end

endmodule
