// tb_bcd_pkg: reference arithmetic for the multiplier testbenches. Converts
// between BCD vectors and binary integers with plain integer arithmetic, so the
// expected results do not depend on any of the design's digit encodings.
package tb_bcd_pkg;

  // Binary value of a BCD vector of up to 64 digits.
  function automatic logic [255:0] bcd_to_bin(logic [255:0] bcd, int digits);
    logic [255:0] v;
    v = '0;
    for (int i = digits - 1; i >= 0; i--) v = v * 10 + 256'(bcd[4*i +: 4]);
    return v;
  endfunction

  // BCD vector (up to 64 digits) of a binary value.
  function automatic logic [255:0] bin_to_bcd(logic [255:0] v, int digits);
    logic [255:0] r;
    r = '0;
    for (int i = 0; i < digits; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  // Random BCD vector of the given digit count; digit_mode 0: uniform digits,
  // 1: all nines, 2: digits drawn from {0, 9}, 3: digits drawn from {4, 5}.
  function automatic logic [255:0] rand_bcd(int digits, int digit_mode);
    logic [255:0] r;
    r = '0;
    for (int i = 0; i < digits; i++) begin
      case (digit_mode)
        1:       r[4*i +: 4] = 4'd9;
        2:       r[4*i +: 4] = (($urandom % 2) != 0) ? 4'd9 : 4'd0;
        3:       r[4*i +: 4] = (($urandom % 2) != 0) ? 4'd5 : 4'd4;
        default: r[4*i +: 4] = 4'($urandom % 10);
      endcase
    end
    return r;
  endfunction

endpackage
