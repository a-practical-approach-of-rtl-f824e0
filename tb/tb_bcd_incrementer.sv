// Test of the decimal incrementer: 8 digits plus a 4-bit increment. Random
// digits, long runs of nines (carry through every digit) and the largest
// increment are applied; the result is compared with a + inc computed in
// binary.
module tb_bcd_incrementer;
  import tb_bcd_ref_pkg::*;

  localparam int unsigned NDIG = 8;
  localparam int unsigned CW   = 4;

  logic [NDIG-1:0][3:0] a, y;
  logic [CW-1:0]        inc, cout;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  bcd_incrementer #(.NDIG(NDIG), .CW(CW)) dut (.a(a), .inc(inc), .y(y), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    bin128_t exp_v, got;
    exp_v = bcd2bin(128'(a), NDIG) + 128'(inc);
    @(posedge clk);
    got = bcd2bin(128'(y), NDIG) + 128'(cout) * (128'd10 ** NDIG);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL a=%h inc=%0d -> y=%h cout=%0d", a, inc, y, cout);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      a   = (NDIG*4)'(rand_bcd(NDIG, t % 3));
      inc = CW'($urandom);
      check();
    end
    a = (NDIG*4)'(rand_bcd(NDIG, 1)); inc = '1; check();
    a = '0; inc = '0; check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_bcd_incrementer
