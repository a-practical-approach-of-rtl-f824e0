// Reference arithmetic for the decimal multiplier testbenches.
//
// Works on BCD vectors of up to 32 digits held in 128 bits (digit d in bits
// 4d+3..4d) and converts them to and from plain binary, so expected sums and
// products are computed with ordinary binary arithmetic, independently of
// the column-wise decimal logic under test.
package tb_bcd_ref_pkg;

  typedef logic [127:0] bcd128_t;
  typedef logic [127:0] bin128_t;

  // BCD (first n digits) to binary.
  function automatic bin128_t bcd2bin(bcd128_t v, int n);
    bin128_t r = '0;
    for (int d = n - 1; d >= 0; d--) begin
      r = r * 128'd10 + 128'(v[4*d +: 4]);
    end
    return r;
  endfunction

  // Binary to BCD, n digits (higher digits are dropped).
  function automatic bcd128_t bin2bcd(bin128_t v, int n);
    bcd128_t r = '0;
    for (int d = 0; d < n; d++) begin
      r[4*d +: 4] = 4'(v % 128'd10);
      v = v / 128'd10;
    end
    return r;
  endfunction

  // Random BCD number of n digits. mode 0: uniform digits, 1: all nines,
  // 2: mostly nines and zeros (long carry chains), 3: sparse non-zero digits.
  function automatic bcd128_t rand_bcd(int n, int mode);
    bcd128_t r = '0;
    for (int d = 0; d < n; d++) begin
      case (mode)
        1:       r[4*d +: 4] = 4'd9;
        2:       r[4*d +: 4] = ($urandom % 4 != 0) ? 4'd9 : 4'd0;
        3:       r[4*d +: 4] = ($urandom % 4 == 0) ? 4'($urandom % 10) : 4'd0;
        default: r[4*d +: 4] = 4'($urandom % 10);
      endcase
    end
    return r;
  endfunction

endpackage : tb_bcd_ref_pkg
