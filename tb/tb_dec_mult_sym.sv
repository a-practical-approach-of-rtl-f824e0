// Test of the symmetric partitioned multiplier in its three 16-digit
// configurations: four 8x8 cells, sixteen 4x4 cells and sixty-four 2x2
// cells. Operands include the small example 6 x 3 = 18, zeros, all nines
// (the largest product, which exercises the carry from the multi-operand
// adder into the top-digit incrementer) and random and carry-heavy values.
// Every product is compared with the binary product of the operands. The
// testbench also counts how often the multi-operand adder passes a non-zero
// carry to the incrementer, and fails if that never happens.
module tb_dec_mult_sym;
  import tb_bcd_ref_pkg::*;

  localparam int unsigned N = 16;

  logic [N-1:0][3:0]   x, y;
  logic [2*N-1:0][3:0] p8, p4, p2;
  int checks = 0, failures = 0;
  int carry_seen = 0;
  logic clk = 1'b0;

  dec_mult_sym                   dut8 (.x(x), .y(y), .p(p8));
  dec_mult_sym #(.N(N), .C(4))   dut4 (.x(x), .y(y), .p(p4));
  dec_mult_sym #(.N(N), .C(2))   dut2 (.x(x), .y(y), .p(p2));

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
    if (dut8.mid_carry != 0) carry_seen++;
    checks += 3;
    if (128'(p8) != e) begin failures++; $display("FAIL 16-8 %h*%h=%h exp %h", x, y, p8, e); end
    if (128'(p4) != e) begin failures++; $display("FAIL 16-4 %h*%h=%h exp %h", x, y, p4, e); end
    if (128'(p2) != e) begin failures++; $display("FAIL 16-2 %h*%h=%h exp %h", x, y, p2, e); end
  endtask

  initial begin
    apply(128'h6, 128'h3);
    apply('0, '0);
    apply(rand_bcd(N, 1), rand_bcd(N, 1));
    apply(rand_bcd(N, 1), 128'h1);
    for (int t = 0; t < 3000; t++) apply(rand_bcd(N, t % 4), rand_bcd(N, (t / 4) % 4));
    checks++;
    if (carry_seen == 0) begin failures++; $display("FAIL no carry into incrementer"); end
    $display("increment-with-carry events: %0d", carry_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_dec_mult_sym
