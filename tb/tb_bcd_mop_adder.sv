// Test of the multi-operand decimal adder with 5 operands of 12 digits.
// Random, all-nines and carry-chain operands are summed; the testbench
// adds the operands in binary and compares sum digits and carry out.
module tb_bcd_mop_adder;
  import tb_bcd_ref_pkg::*;

  localparam int unsigned NOPS = 5;
  localparam int unsigned NDIG = 12;
  localparam int unsigned CW   = $clog2(NOPS) + 1;

  logic [NOPS-1:0][NDIG-1:0][3:0] ops;
  logic [NDIG-1:0][3:0]           sum;
  logic [CW-1:0]                  cout;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  bcd_mop_adder #(.NOPS(NOPS), .NDIG(NDIG)) dut (.ops(ops), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    bin128_t total = '0;
    bin128_t got;
    for (int o = 0; o < NOPS; o++) total += bcd2bin(128'(ops[o]), NDIG);
    @(posedge clk);
    got = bcd2bin(128'(sum), NDIG) + 128'(cout) * (128'd10 ** NDIG);
    checks++;
    if (got != total) begin
      failures++;
      $display("FAIL sum=%h cout=%0d expected %0d", sum, cout, total);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int o = 0; o < NOPS; o++) ops[o] = (NDIG*4)'(rand_bcd(NDIG, t % 4));
      check();
    end
    ops = '0;
    check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_bcd_mop_adder
