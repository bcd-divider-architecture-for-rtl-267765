// Adder of the Nikhilam divider: product + units digit, result in BCD.
//
// One division round replaces the operand 10*h + l by l + h*c, where c is the
// divisor's 10's complement. This block forms that sum from the binary product
// h*c and the BCD units digit l and returns it as two BCD digits. The upper
// digit being non-zero is the decimal carry out of the units position, the
// "carry" that steers the divider's multiplexer and decision box.
//   prod  : binary product, at most 81 for BCD inputs
//   lsd   : BCD units digit of the operand
//   sum   : prod + lsd as {tens, units} BCD; at most 90 for BCD inputs
//   carry : prod + lsd >= 10
// Binary-to-BCD conversion is a divide/modulo by the constant 10, which
// synthesis reduces to constant logic. Sums above 99 only occur for non-BCD
// inputs (flagged by the divider); their tens digit is kept modulo 16.
// Purely combinational.
module nikhilam_adder
  import bcd_div_pkg::*;
(
  input  logic [7:0] prod,
  input  bcd_digit_t lsd,
  output bcd2_t      sum,
  output logic       carry
);

  logic [7:0] bin;
  logic [7:0] tens;

  always_comb begin
    bin    = prod + 8'(lsd);
    tens   = bin / 8'd10;
    sum.hi = tens[3:0];
    sum.lo = 4'(bin % 8'd10);
    carry  = (tens != 8'd0);
  end

endmodule
