// Test of the multiplier cell in the three shapes the asymmetric scheme
// uses besides 8x8: 4x4, 8x4 and 4x8 (and a 2x2 cell). Products are
// compared with the binary product of the operands.
module tb_bcd_cell_mult;
  import tb_bcd_ref_pkg::*;

  logic [3:0][3:0]  x44, y44;  logic [7:0][3:0]  p44;
  logic [7:0][3:0]  x84;       logic [3:0][3:0]  y84;  logic [11:0][3:0] p84;
  logic [3:0][3:0]  x48;       logic [7:0][3:0]  y48;  logic [11:0][3:0] p48;
  logic [1:0][3:0]  x22, y22;  logic [3:0][3:0]  p22;
  logic [7:0][3:0]  x88, y88;  logic [15:0][3:0] p88;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  bcd_cell_mult #(.NX(4), .NY(4)) dut44 (.x(x44), .y(y44), .p(p44));
  bcd_cell_mult #(.NX(8), .NY(4)) dut84 (.x(x84), .y(y84), .p(p84));
  bcd_cell_mult #(.NX(4), .NY(8)) dut48 (.x(x48), .y(y48), .p(p48));
  bcd_cell_mult #(.NX(2), .NY(2)) dut22 (.x(x22), .y(y22), .p(p22));
  bcd_cell_mult                   dut88 (.x(x88), .y(y88), .p(p88));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void cmp(string tag, bcd128_t x, int nx, bcd128_t y, int ny,
                              bcd128_t p);
    bin128_t e = bcd2bin(x, nx) * bcd2bin(y, ny);
    checks++;
    if (bcd2bin(p, nx + ny) != e || p != bin2bcd(e, 32)) begin
      failures++;
      $display("FAIL %s x=%h y=%h p=%h", tag, x, y, p);
    end
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      x44 = 16'(rand_bcd(4, t % 4)); y44 = 16'(rand_bcd(4, (t / 4) % 4));
      x84 = 32'(rand_bcd(8, t % 4)); y84 = 16'(rand_bcd(4, (t / 4) % 4));
      x48 = 16'(rand_bcd(4, t % 4)); y48 = 32'(rand_bcd(8, (t / 4) % 4));
      x22 = 8'(rand_bcd(2, t % 4));  y22 = 8'(rand_bcd(2, (t / 4) % 4));
      x88 = 32'(rand_bcd(8, t % 4)); y88 = 32'(rand_bcd(8, (t / 4) % 4));
      @(posedge clk);
      cmp("4x4", 128'(x44), 4, 128'(y44), 4, 128'(p44));
      cmp("8x4", 128'(x84), 8, 128'(y84), 4, 128'(p84));
      cmp("4x8", 128'(x48), 4, 128'(y48), 8, 128'(p48));
      cmp("2x2", 128'(x22), 2, 128'(y22), 2, 128'(p22));
      cmp("8x8", 128'(x88), 8, 128'(y88), 8, 128'(p88));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_bcd_cell_mult
