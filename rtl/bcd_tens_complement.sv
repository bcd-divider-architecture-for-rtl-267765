// 10's complement of a one-digit BCD divisor.
//
// The Nikhilam method divides by d through its distance from the base 10,
// c = 10 - d. As in the worked BCD example this is formed as the nine's
// complement (9 - d) followed by +1. Purely combinational.
//   a : BCD divisor digit, legal range 1..9
//   c : 10 - a; for a in 1..9 this is 1..9 and identical in binary and BCD.
// For a = 0 the result is 10 (4'b1010), the base itself; for non-BCD codes
// 10..15 it wraps modulo 16. The divider flags both cases as errors, so these
// values never reach a result.
module bcd_tens_complement
  import bcd_div_pkg::*;
(
  input  bcd_digit_t a,
  output bcd_digit_t c
);

  bcd_digit_t nines;

  always_comb begin
    nines = 4'd9 - a;
    c     = nines + 4'd1;
  end

endmodule
