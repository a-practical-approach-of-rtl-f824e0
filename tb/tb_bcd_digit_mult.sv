// Exhaustive test of the one-digit decimal multiplier: all 100 digit pairs
// are applied and both product digits compared with a*b split into tens and
// units by the testbench.
module tb_bcd_digit_mult;
  import bcd_pkg::*;

  bcd_digit_t a, b, hi, lo;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  bcd_digit_mult dut (.a(a), .b(b), .hi(hi), .lo(lo));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10; i++) begin
      for (int j = 0; j < 10; j++) begin
        a = 4'(i);
        b = 4'(j);
        @(posedge clk);
        checks++;
        if (int'(hi) != (i * j) / 10 || int'(lo) != (i * j) % 10) begin
          failures++;
          $display("FAIL %0d*%0d -> %0d%0d", i, j, hi, lo);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_bcd_digit_mult
