// Symmetric partitioned decimal multiplier (mult16-8, mult16-4, mult16-2).
//
// Multiplies two N-digit BCD numbers by cutting both operands into K = N/C
// equal slices of C digits and using K*K C x C-digit multiplier cells, one
// per slice pair, as in the divide-and-conquer expansion
//   X*Y = 10^(2n) XH*YH + 10^n (XH*YL + XL*YH) + XL*YL
// applied until the cells are C digits wide. With the default N = 16:
//   C = 8 : four 8x8 cells       (mult16-8), adder depth 3
//   C = 4 : sixteen 4x4 cells    (mult16-4), adder depth 7
//   C = 2 : sixty-four 2x2 cells (mult16-2), adder depth 15
// Each cell works only on its own slices, so a change in one slice of an
// operand switches only the cells that use it.
//
// How the cell results are merged: the product of slice i of x and slice j
// of y is worth 10^(C*(i+j)). After alignment:
//   - digits 0..C-1 of the product are the low C digits of cell (0,0) and
//     need no further logic;
//   - digits C..2N-C-1 are the sum of all overlapping cell results, formed
//     by one multi-operand decimal adder;
//   - digits 2N-C..2N-1 are the high C digits of cell (K-1,K-1), incremented
//     by the carry out of the multi-operand adder.
// Adder depth here means the largest number of cell results that overlap
// in one column, 2K-1.
//
// Timing: purely combinational. N must be a multiple of C, and C < N.
module dec_mult_sym
  import bcd_pkg::*;
#(
  parameter int unsigned N = OPERAND_DIGITS,   // operand digits
  parameter int unsigned C = 8                 // cell size in digits
) (
  input  logic [N-1:0][3:0]   x,   // multiplicand, BCD
  input  logic [N-1:0][3:0]   y,   // multiplier, BCD
  output logic [2*N-1:0][3:0] p    // product, BCD
);

  localparam int unsigned K    = N / C;            // slices per operand
  localparam int unsigned NC   = K * K;            // number of cells
  localparam int unsigned MW   = 2 * N - 2 * C;    // middle digits
  localparam int unsigned CW   = $clog2(NC) + 1;   // middle carry width

  // Cell results, and the same results placed at their decimal weight.
  logic [NC-1:0][2*C-1:0][3:0] cell_p;
  logic [NC-1:0][2*N-1:0][3:0] placed;
  logic [NC-1:0][MW-1:0][3:0]  mid_ops;
  logic [MW-1:0][3:0]          mid_sum;
  logic [CW-1:0]               mid_carry;
  logic [C-1:0][3:0]           top_sum;
  logic [CW-1:0]               top_carry_unused;   // always 0

  for (genvar i = 0; i < K; i++) begin : g_xs
    for (genvar j = 0; j < K; j++) begin : g_ys
      bcd_cell_mult #(
        .NX(C),
        .NY(C)
      ) u_cell (
        .x(x[C*i +: C]),
        .y(y[C*j +: C]),
        .p(cell_p[i*K+j])
      );
    end
  end

  always_comb begin
    placed = '0;
    for (int unsigned i = 0; i < K; i++) begin
      for (int unsigned j = 0; j < K; j++) begin
        placed[i*K+j][C*(i+j) +: 2*C] = cell_p[i*K+j];
      end
    end
    for (int unsigned c = 0; c < NC; c++) begin
      mid_ops[c] = placed[c][C +: MW];
    end
  end

  bcd_mop_adder #(
    .NOPS(NC),
    .NDIG(MW),
    .CW  (CW)
  ) u_mid (
    .ops (mid_ops),
    .sum (mid_sum),
    .cout(mid_carry)
  );

  bcd_incrementer #(
    .NDIG(C),
    .CW  (CW)
  ) u_top (
    .a   (cell_p[NC-1][C +: C]),
    .inc (mid_carry),
    .y   (top_sum),
    .cout(top_carry_unused)
  );

  assign p[C-1:0]       = cell_p[0][C-1:0];
  assign p[C +: MW]     = mid_sum;
  assign p[2*N-1 -: C]  = top_sum;

endmodule : dec_mult_sym
