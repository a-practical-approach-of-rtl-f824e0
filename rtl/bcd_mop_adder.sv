// Multi-operand decimal adder.
//
// Adds NOPS BCD numbers of NDIG digits each and returns the NDIG-digit BCD
// sum plus the decimal carry out of the top digit. This is the adder that
// merges aligned multiplier-cell results in the partitioned multipliers, and
// also the partial-product adder inside a multiplier cell.
//
// How it works: each digit column is summed in binary (at most 9*NOPS plus
// the incoming column carry), then split into a units digit (sum mod 10)
// and a column carry (sum div 10) that moves one column up. The column carry
// is a small binary number, below NOPS, so no intermediate decimal
// correction is needed. Operand digits that are constant zero (positions a
// cell does not cover) are removed by synthesis, so the logic of a column
// grows with the number of operands that really overlap there, the adder
// "depth" of the partitioning.
//
// Interface: ops[o][d] is digit d of operand o. cout < NOPS.
// Timing: purely combinational.
module bcd_mop_adder
  import bcd_pkg::*;
#(
  parameter int unsigned NOPS = 4,    // number of operands
  parameter int unsigned NDIG = 16,   // digits per operand
  // width of the carry out, which is below NOPS
  parameter int unsigned CW   = $clog2(NOPS) + 1
) (
  input  logic [NOPS-1:0][NDIG-1:0][3:0] ops,
  output logic [NDIG-1:0][3:0]           sum,
  output logic [CW-1:0]                  cout
);

  // A column sum is at most 9*NOPS + (NOPS-1).
  localparam int unsigned SW = $clog2(RADIX * NOPS) + 1;

  logic [SW-1:0] col;
  logic [SW-1:0] carry;

  always_comb begin
    carry = '0;
    col   = '0;
    for (int unsigned d = 0; d < NDIG; d++) begin
      col = carry;
      for (int unsigned o = 0; o < NOPS; o++) begin
        col = col + SW'(ops[o][d]);
      end
      sum[d] = 4'(col % SW'(RADIX));
      carry  = col / SW'(RADIX);
    end
    cout = CW'(carry);
  end

endmodule : bcd_mop_adder
