// Partitioned parallel decimal multipliers, side by side.
//
// Four 16 x 16-digit BCD multipliers that differ only in how the operands
// are partitioned into multiplier cells. All four read the same operands
// and produce the same 32-digit product on their own output, so the
// schemes can be compared in area, delay and switching activity:
//   p_16_8   : four 8x8 cells          (symmetric, mult16-8)
//   p_16_4   : sixteen 4x4 cells       (symmetric, mult16-4)
//   p_16_2   : sixty-four 2x2 cells    (symmetric, mult16-2)
//   p_16_8_4 : 8x8, 8x4, 4x8 and 4x4   (asymmetric, mult16-8-4)
// An implementation that needs only one scheme keeps that instance alone.
//
// Timing: purely combinational; x and y are plain BCD (digit 0 is the
// least significant), the products are BCD.
module dec_mult16_top
  import bcd_pkg::*;
#(
  parameter int unsigned N = OPERAND_DIGITS   // operand digits, multiple of 8
) (
  input  logic [N-1:0][3:0]   x,
  input  logic [N-1:0][3:0]   y,
  output logic [2*N-1:0][3:0] p_16_8,
  output logic [2*N-1:0][3:0] p_16_4,
  output logic [2*N-1:0][3:0] p_16_2,
  output logic [2*N-1:0][3:0] p_16_8_4
);

  dec_mult_sym #(.N(N), .C(N/2)) u_m16_8 (.x(x), .y(y), .p(p_16_8));
  dec_mult_sym #(.N(N), .C(N/4)) u_m16_4 (.x(x), .y(y), .p(p_16_4));
  dec_mult_sym #(.N(N), .C(N/8)) u_m16_2 (.x(x), .y(y), .p(p_16_2));
  dec_mult_asym #(.N(N))         u_m16_8_4 (.x(x), .y(y), .p(p_16_8_4));

endmodule : dec_mult16_top
