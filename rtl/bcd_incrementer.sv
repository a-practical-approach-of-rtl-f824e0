// Decimal incrementer for the most significant product digits.
//
// Adds a small binary carry, inc, to an NDIG-digit BCD number a and returns
// the BCD result y and the carry out of the top digit. In a partitioned
// multiplier the top digits come from a single multiplier cell, so they
// need no multi-operand adder, only this increment by the carry that leaves
// the multi-operand adder below them.
//
// How it works: a ripple of digit additions; each stage adds the incoming
// carry to one digit and passes (digit + carry) div 10 upward. After the
// first digit the carry is 0 or 1 for any inc below 10.
//
// Timing: purely combinational.
module bcd_incrementer
  import bcd_pkg::*;
#(
  parameter int unsigned NDIG = 8,   // digits incremented
  parameter int unsigned CW   = 3    // width of the increment value
) (
  input  logic [NDIG-1:0][3:0] a,
  input  logic [CW-1:0]        inc,
  output logic [NDIG-1:0][3:0] y,
  output logic [CW-1:0]        cout
);

  localparam int unsigned SW = (CW > 4 ? CW : 4) + 1;

  logic [SW-1:0] s;
  logic [SW-1:0] c;

  always_comb begin
    c = SW'(inc);
    s = '0;
    for (int unsigned d = 0; d < NDIG; d++) begin
      s    = c + SW'(a[d]);
      y[d] = 4'(s % SW'(RADIX));
      c    = s / SW'(RADIX);
    end
    cout = CW'(c);
  end

endmodule : bcd_incrementer
