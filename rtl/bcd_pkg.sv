// Shared types for the partitioned decimal (BCD) multipliers.
//
// Every operand and product in this design is a vector of binary-coded
// decimal digits, least significant digit at index 0, four bits per digit
// (8421 code, values 0..9). The package holds that digit type and the
// operand size of the main configuration, a 16 x 16-digit multiplication,
// which is the size the partitioning schemes are built for.
package bcd_pkg;

  // One BCD digit, 8421 code. Values 10..15 never occur on a legal operand.
  typedef logic [3:0] bcd_digit_t;

  // Digits per operand of the main configuration (16 x 16 digits -> 32).
  localparam int unsigned OPERAND_DIGITS = 16;

  // Radix of one digit position.
  localparam int unsigned RADIX = 10;

endpackage : bcd_pkg
