// One-digit decimal multiplier: the multiplication table at the bottom of
// every partitioning.
//
// Multiplies two BCD digits a and b (0..9) and returns their product, 0..81,
// as two BCD digits: hi (tens) and lo (units). The table is written as the
// binary product followed by a constant split into tens and units, which a
// synthesis tool turns into a 100-entry lookup of 8 output bits; the result
// is the plain "multiplication table" of the 1 x 1 case of the recursion.
// Digits above 9 are outside the interface; their result is not specified.
//
// Purely combinational, no clock.
module bcd_digit_mult
  import bcd_pkg::*;
(
  input  bcd_digit_t a,   // multiplicand digit, 0..9
  input  bcd_digit_t b,   // multiplier digit, 0..9
  output bcd_digit_t hi,  // tens digit of a*b
  output bcd_digit_t lo   // units digit of a*b
);

  logic [7:0] prod_bin;

  always_comb begin
    prod_bin = 8'(a) * 8'(b);
    hi       = 4'(prod_bin / 8'(RADIX));
    lo       = 4'(prod_bin % 8'(RADIX));
  end

endmodule : bcd_digit_mult
