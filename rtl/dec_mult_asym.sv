// Asymmetric partitioned decimal multiplier (mult16-8-4).
//
// Multiplies two N-digit BCD numbers (N = 16 by default) with multiplier
// cells of different sizes. With H = N/2 and Q = N/4, the operands are cut
// into halves XH, XL, YH, YL, and the low halves further into quarters
// XLH, XLL, YLH, YLL. Nine cells cover the 16 x 16 digit products:
//   one   H x H cell  : XH  * YH                       (8x8)
//   two   H x Q cells : XH  * YLL, XH * YLH            (8x4)
//   two   Q x H cells : XLL * YH,  XLH * YH            (4x8)
//   four  Q x Q cells : XLL * YLL, XLL * YLH,
//                       XLH * YLL, XLH * YLH           (4x4)
// The counts and sizes of the cells follow the mult16-8-4 scheme; which
// operand halves get the large cell (here the high halves) is this design's
// choice.
//
// Merging follows the same pattern as the symmetric schemes:
//   - digits 0..Q-1 are the low digits of the XLL*YLL cell;
//   - digits Q..2N-H-1 are the multi-operand sum of all overlapping cell
//     results (at most 5 overlap in a column);
//   - digits 2N-H..2N-1 are the high H digits of the XH*YH cell,
//     incremented by the carry out of the multi-operand adder.
//
// Timing: purely combinational. N must be a multiple of 4.
module dec_mult_asym
  import bcd_pkg::*;
#(
  parameter int unsigned N = OPERAND_DIGITS   // operand digits
) (
  input  logic [N-1:0][3:0]   x,   // multiplicand, BCD
  input  logic [N-1:0][3:0]   y,   // multiplier, BCD
  output logic [2*N-1:0][3:0] p    // product, BCD
);

  localparam int unsigned H  = N / 2;
  localparam int unsigned Q  = N / 4;
  localparam int unsigned NC = 9;                 // number of cells
  localparam int unsigned MW = 2 * N - H - Q;     // middle digits
  localparam int unsigned CW = $clog2(NC) + 1;

  // Operand slices.
  logic [H-1:0][3:0] xh, yh;
  logic [Q-1:0][3:0] xlh, xll, ylh, yll;

  // Cell results.
  logic [2*H-1:0][3:0] p_hh;              // XH  * YH
  logic [H+Q-1:0][3:0] p_h_yll, p_h_ylh;  // XH  * YLL, XH * YLH
  logic [Q+H-1:0][3:0] p_xll_h, p_xlh_h;  // XLL * YH,  XLH * YH
  logic [2*Q-1:0][3:0] p_ll_ll, p_ll_lh, p_lh_ll, p_lh_lh;

  logic [NC-1:0][2*N-1:0][3:0] placed;
  logic [NC-1:0][MW-1:0][3:0]  mid_ops;
  logic [MW-1:0][3:0]          mid_sum;
  logic [CW-1:0]               mid_carry;
  logic [H-1:0][3:0]           top_sum;
  logic [CW-1:0]               top_carry_unused;   // always 0

  assign xh  = x[H +: H];
  assign yh  = y[H +: H];
  assign xlh = x[Q +: Q];
  assign xll = x[0 +: Q];
  assign ylh = y[Q +: Q];
  assign yll = y[0 +: Q];

  bcd_cell_mult #(.NX(H), .NY(H)) u_hh    (.x(xh),  .y(yh),  .p(p_hh));
  bcd_cell_mult #(.NX(H), .NY(Q)) u_h_yll (.x(xh),  .y(yll), .p(p_h_yll));
  bcd_cell_mult #(.NX(H), .NY(Q)) u_h_ylh (.x(xh),  .y(ylh), .p(p_h_ylh));
  bcd_cell_mult #(.NX(Q), .NY(H)) u_xll_h (.x(xll), .y(yh),  .p(p_xll_h));
  bcd_cell_mult #(.NX(Q), .NY(H)) u_xlh_h (.x(xlh), .y(yh),  .p(p_xlh_h));
  bcd_cell_mult #(.NX(Q), .NY(Q)) u_ll_ll (.x(xll), .y(yll), .p(p_ll_ll));
  bcd_cell_mult #(.NX(Q), .NY(Q)) u_ll_lh (.x(xll), .y(ylh), .p(p_ll_lh));
  bcd_cell_mult #(.NX(Q), .NY(Q)) u_lh_ll (.x(xlh), .y(yll), .p(p_lh_ll));
  bcd_cell_mult #(.NX(Q), .NY(Q)) u_lh_lh (.x(xlh), .y(ylh), .p(p_lh_lh));

  // Place every cell result at its decimal weight (sum of slice offsets).
  always_comb begin
    placed = '0;
    placed[0][2*H   +: 2*H] = p_hh;
    placed[1][H     +: H+Q] = p_h_yll;
    placed[2][H+Q   +: H+Q] = p_h_ylh;
    placed[3][H     +: Q+H] = p_xll_h;
    placed[4][Q+H   +: Q+H] = p_xlh_h;
    placed[5][0     +: 2*Q] = p_ll_ll;
    placed[6][Q     +: 2*Q] = p_ll_lh;
    placed[7][Q     +: 2*Q] = p_lh_ll;
    placed[8][2*Q   +: 2*Q] = p_lh_lh;
    for (int unsigned c = 0; c < NC; c++) begin
      mid_ops[c] = placed[c][Q +: MW];
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
    .NDIG(H),
    .CW  (CW)
  ) u_top (
    .a   (p_hh[H +: H]),
    .inc (mid_carry),
    .y   (top_sum),
    .cout(top_carry_unused)
  );

  assign p[Q-1:0]       = p_ll_ll[Q-1:0];
  assign p[Q +: MW]     = mid_sum;
  assign p[2*N-1 -: H]  = top_sum;

endmodule : dec_mult_asym
