// Shared types and constants of the two-digit-by-one-digit BCD Nikhilam divider.
//
// A BCD digit is 4 bits holding 0..9. A two-digit BCD number is a packed struct
// of an upper (tens) and a lower (units) digit, so {hi, lo} has the same bit
// layout as the 8-bit BCD word b[7:0] with b[7:4] = tens and b[3:0] = units.
// MAX_ROUNDS is the number of unrolled division rounds the divider needs for
// its worst legal input (9 / 1 takes nine rounds that each add one to the
// quotient); it is derived from the algorithm, the source gives no such number.
package bcd_div_pkg;

  localparam int unsigned DIGIT_W = 4;

  typedef logic [DIGIT_W-1:0] bcd_digit_t;

  typedef struct packed {
    bcd_digit_t hi;  // tens digit
    bcd_digit_t lo;  // units digit
  } bcd2_t;

  localparam int unsigned MAX_ROUNDS = 9;

endpackage
