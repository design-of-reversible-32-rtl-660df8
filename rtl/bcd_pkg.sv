// Shared types and constants of the reversible BCD arithmetic units.
//
// Every unit works on packed BCD words (four bits per decimal digit, digit 0
// in bits [3:0]) and returns one 5-bit result per digit: bit 4 is the digit's
// decimal carry, bits [3:0] the corrected digit. The digit counts are the two
// word sizes the units are built for: 32 bits (8 digits) and 64 bits
// (16 digits).
package bcd_pkg;

  typedef logic [3:0] bcd_digit_t;   // one BCD digit
  typedef logic [4:0] digit_res_t;   // {carry, digit} result of one digit

  localparam int unsigned DIGITS_32 = 8;
  localparam int unsigned DIGITS_64 = 16;

  localparam bcd_digit_t NINE = 4'd9;   // minuend of the nine's complement
  localparam digit_res_t SIX  = 5'd6;   // decimal correction constant

endpackage
