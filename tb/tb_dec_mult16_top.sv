// End-to-end test of the four partitioned 16 x 16-digit multipliers at
// their default size. Every product of all four schemes is compared with
// the binary product of the operands. Besides plain products the test
// makes each mechanism of the design happen and counts it:
//   - carry:     the multi-operand adder of a scheme hands a non-zero carry
//                to the incrementer of the top digits;
//   - ripple:    that increment ripples past the lowest top digit;
//   - localized: only the low half of x changes, and no cell that reads
//                the high half of x changes its result (the switching
//                stays inside the cells whose slices changed).
// A mechanism that never happens counts as a failure.
module tb_dec_mult16_top;
  import tb_bcd_ref_pkg::*;

  localparam int unsigned N = 16;

  logic [N-1:0][3:0]   x, y;
  logic [2*N-1:0][3:0] p_16_8, p_16_4, p_16_2, p_16_8_4;
  int checks = 0, failures = 0;
  int carry_seen[4];
  int ripple_seen[4];
  int localized = 0;
  logic clk = 1'b0;

  dec_mult16_top dut (
    .x(x), .y(y),
    .p_16_8(p_16_8), .p_16_4(p_16_4), .p_16_2(p_16_2), .p_16_8_4(p_16_8_4)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void count(int k, int carry, logic [3:0] lowest_top_in);
    if (carry != 0) begin
      carry_seen[k]++;
      if (int'(lowest_top_in) + carry >= 10) ripple_seen[k]++;
    end
  endfunction

  task automatic apply(bcd128_t xv, bcd128_t yv);
    bcd128_t e;
    x = (N*4)'(xv);
    y = (N*4)'(yv);
    e = bin2bcd(bcd2bin(xv, N) * bcd2bin(yv, N), 2 * N);
    @(posedge clk);
    count(0, int'(dut.u_m16_8.mid_carry),   dut.u_m16_8.cell_p[3][8]);
    count(1, int'(dut.u_m16_4.mid_carry),   dut.u_m16_4.cell_p[15][4]);
    count(2, int'(dut.u_m16_2.mid_carry),   dut.u_m16_2.cell_p[63][2]);
    count(3, int'(dut.u_m16_8_4.mid_carry), dut.u_m16_8_4.p_hh[8]);
    checks += 4;
    if (128'(p_16_8)   != e) begin failures++; $display("FAIL 16-8   %h*%h=%h exp %h", x, y, p_16_8, e); end
    if (128'(p_16_4)   != e) begin failures++; $display("FAIL 16-4   %h*%h=%h exp %h", x, y, p_16_4, e); end
    if (128'(p_16_2)   != e) begin failures++; $display("FAIL 16-2   %h*%h=%h exp %h", x, y, p_16_2, e); end
    if (128'(p_16_8_4) != e) begin failures++; $display("FAIL 16-8-4 %h*%h=%h exp %h", x, y, p_16_8_4, e); end
  endtask

  // Change only the low half of x and check that the 16-8 cells fed by the
  // high half of x (cells (1,0) and (1,1)) and the asymmetric cells fed by
  // XH keep their results.
  task automatic localize_step();
    logic [1:0][15:0][3:0] hi8_before;
    logic [15:0][3:0]      hh_before;
    logic [1:0][11:0][3:0] h4_before;
    bcd128_t xv;
    hi8_before = {dut.u_m16_8.cell_p[3], dut.u_m16_8.cell_p[2]};
    hh_before  = dut.u_m16_8_4.p_hh;
    h4_before  = {dut.u_m16_8_4.p_h_ylh, dut.u_m16_8_4.p_h_yll};
    xv = 128'(x);
    xv[31:0] = rand_bcd(8, 0)[31:0];
    apply(xv, 128'(y));
    checks++;
    if ({dut.u_m16_8.cell_p[3], dut.u_m16_8.cell_p[2]} != hi8_before
        || dut.u_m16_8_4.p_hh != hh_before
        || {dut.u_m16_8_4.p_h_ylh, dut.u_m16_8_4.p_h_yll} != h4_before) begin
      failures++;
      $display("FAIL cells on XH switched although only XL changed");
    end else begin
      localized++;
    end
  endtask

  initial begin
    foreach (carry_seen[k]) begin carry_seen[k] = 0; ripple_seen[k] = 0; end
    apply(128'h6, 128'h3);                          // 6 x 3 = 18
    apply('0, '0);
    apply(rand_bcd(N, 1), rand_bcd(N, 1));          // largest product
    for (int t = 0; t < 3000; t++) begin
      apply(rand_bcd(N, t % 4), rand_bcd(N, (t / 4) % 4));
      if (t % 10 == 0) localize_step();
    end
    for (int k = 0; k < 4; k++) begin
      $display("scheme %0d: increment-with-carry %0d, carry ripple %0d", k,
               carry_seen[k], ripple_seen[k]);
      checks += 2;
      if (carry_seen[k] == 0)  begin failures++; $display("FAIL scheme %0d: no carry", k); end
      if (ripple_seen[k] == 0) begin failures++; $display("FAIL scheme %0d: no ripple", k); end
    end
    $display("localized-switching steps: %0d", localized);
    checks++;
    if (localized == 0) begin failures++; $display("FAIL no localized step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_dec_mult16_top
