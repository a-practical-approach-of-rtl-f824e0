// Multiplier cell: an NX x NY-digit decimal multiplier with a BCD result.
//
// The partitioned multipliers are built from these cells (2x2, 4x4, 8x8 in
// the symmetric schemes; 4x4, 4x8, 8x4 and 8x8 in the asymmetric one).
// Each cell multiplies its slice of the multiplicand x by its slice of the
// multiplier y and hands a non-redundant BCD product of NX+NY digits to the
// multi-operand adder of the enclosing multiplier.
//
// How it works: NX*NY one-digit multipliers form every digit product
// x[i]*y[j] as a tens and a units digit. The units digit belongs to column
// i+j and the tens digit to column i+j+1. For each multiplier digit y[j] the
// units digits form one operand and the tens digits another, so 2*NY
// aligned operands are summed by one multi-operand decimal adder. The cell's
// internal structure is this design's own choice: only the cell's size and
// its BCD output format are fixed by the partitioning it serves.
//
// Timing: purely combinational.
module bcd_cell_mult
  import bcd_pkg::*;
#(
  parameter int unsigned NX = 8,   // multiplicand digits
  parameter int unsigned NY = 8    // multiplier digits
) (
  input  logic [NX-1:0][3:0]    x,
  input  logic [NY-1:0][3:0]    y,
  output logic [NX+NY-1:0][3:0] p
);

  localparam int unsigned NP   = NX + NY;
  localparam int unsigned NOPS = 2 * NY;
  localparam int unsigned CW   = $clog2(NOPS) + 1;

  logic [NY-1:0][NX-1:0][3:0] pp_hi;   // tens digit of x[i]*y[j]
  logic [NY-1:0][NX-1:0][3:0] pp_lo;   // units digit of x[i]*y[j]
  logic [NOPS-1:0][NP-1:0][3:0] ops;
  logic [CW-1:0] cout_unused;          // always 0: x*y < 10**(NX+NY)

  for (genvar j = 0; j < NY; j++) begin : g_row
    for (genvar i = 0; i < NX; i++) begin : g_col
      bcd_digit_mult u_dm (
        .a (x[i]),
        .b (y[j]),
        .hi(pp_hi[j][i]),
        .lo(pp_lo[j][i])
      );
    end
  end

  // Align: units digits of row j start at column j, tens digits at j+1.
  always_comb begin
    ops = '0;
    for (int unsigned j = 0; j < NY; j++) begin
      for (int unsigned i = 0; i < NX; i++) begin
        ops[2*j][i+j]     = pp_lo[j][i];
        ops[2*j+1][i+j+1] = pp_hi[j][i];
      end
    end
  end

  bcd_mop_adder #(
    .NOPS(NOPS),
    .NDIG(NP)
  ) u_add (
    .ops (ops),
    .sum (p),
    .cout(cout_unused)
  );

endmodule : bcd_cell_mult
