// Test of the asymmetric partitioned multiplier (one 8x8, two 8x4, two 4x8
// and four 4x4 cells) at 16 digits. Operands include 6 x 3 = 18, zeros, all
// nines, random and carry-heavy values; products are compared with the
// binary product. The testbench counts non-zero carries from the
// multi-operand adder into the top-digit incrementer and fails if there
// are none.
module tb_dec_mult_asym;
  import tb_bcd_ref_pkg::*;

  localparam int unsigned N = 16;

  logic [N-1:0][3:0]   x, y;
  logic [2*N-1:0][3:0] p;
  int checks = 0, failures = 0;
  int carry_seen = 0;
  logic clk = 1'b0;

  dec_mult_asym dut (.x(x), .y(y), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(bcd128_t xv, bcd128_t yv);
    bcd128_t e;
    x = (N*4)'(xv);
    y = (N*4)'(yv);
    e = bin2bcd(bcd2bin(xv, N) * bcd2bin(yv, N), 2 * N);
    @(posedge clk);
    if (dut.mid_carry != 0) carry_seen++;
    checks++;
    if (128'(p) != e) begin failures++; $display("FAIL %h*%h=%h exp %h", x, y, p, e); end
  endtask

  initial begin
    apply(128'h6, 128'h3);
    apply('0, '0);
    apply(rand_bcd(N, 1), rand_bcd(N, 1));
    for (int t = 0; t < 4000; t++) apply(rand_bcd(N, t % 4), rand_bcd(N, (t / 4) % 4));
    checks++;
    if (carry_seen == 0) begin failures++; $display("FAIL no carry into incrementer"); end
    $display("increment-with-carry events: %0d", carry_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_dec_mult_asym
