// Incremental block of the Nikhilam divider: quotient accumulation.
//
// The quotient starts as the dividend's tens digit (first round) and grows by
// the quotient digit of every further round that is taken: the operand's tens
// digit in a Nikhilam round, 1 in a correction round. The source describes the
// block as "q = q + 1 if r == a, else q = q"; adding the round's digit instead
// of 1 is this design's generalisation so that rounds whose operand has a tens
// digit of 2 or more also give the right quotient.
//   q_in  : quotient so far (one BCD digit; legal quotients are 0..9)
//   inc   : amount to add
//   en    : 1 = add, 0 = hold
//   q_out : updated quotient, modulo 16 (only out-of-range divisions, which
//           the divider flags, can wrap)
// Purely combinational.
module incrementer
  import bcd_div_pkg::*;
(
  input  bcd_digit_t q_in,
  input  bcd_digit_t inc,
  input  logic       en,
  output bcd_digit_t q_out
);

  always_comb begin
    q_out = en ? (q_in + inc) : q_in;
  end

endmodule
