// dec_mult_pkg: digit encodings shared by the parallel decimal multiplier.
//
// Four digit formats travel through the datapath:
//   * BCD            - plain 4-bit digit in [0,9] (operands and product).
//   * SMSD  (smsd_t) - sign-magnitude signed digit in [-6,6]: one sign bit and a
//                      3-bit magnitude. Negating it costs one XOR on the sign bit.
//                      A "negative zero" (sign 1, magnitude 0) is legal and means 0.
//   * TCSD  (tcsd_t) - two's-complement signed digit in [-7,7], 4 bits, bit 3
//                      weighs -8.
//   * sd_carry_t     - signed carry in {-1,0,1} held as one posibit (value = bit)
//                      and one negabit (value = bit - 1): value = pos + neg - 1.
// The SMSD, TCSD and posibit/negabit carry formats follow the multiplier's
// description; the exact bit layout (sign on top, two's complement TCSD) is this
// design's choice.
package dec_mult_pkg;

  typedef struct packed {
    logic       s;  // 1: negative
    logic [2:0] m;  // magnitude 0..6
  } smsd_t;

  typedef logic signed [3:0] tcsd_t;

  typedef struct packed {
    logic pos;  // posibit
    logic neg;  // negabit
  } sd_carry_t;

  localparam sd_carry_t CARRY_ZERO = '{pos: 1'b0, neg: 1'b1};

  // Arithmetic value of a signed carry.
  function automatic logic signed [2:0] carry_value(sd_carry_t c);
    return $signed({2'b00, c.pos}) + $signed({2'b00, c.neg}) - 3'sd1;
  endfunction

  // Encode a value in {-1,0,1} as a signed carry.
  function automatic sd_carry_t carry_encode(logic signed [2:0] v);
    sd_carry_t c;
    c.pos = (v > 0);
    c.neg = (v >= 0);
    return c;
  endfunction

  // Encode a value in [-7,7] as an SMSD digit (zero gets sign 0).
  function automatic smsd_t smsd_encode(logic signed [4:0] v);
    smsd_t d;
    d.s = (v < 0);
    d.m = d.s ? 3'(-v) : v[2:0];
    return d;
  endfunction

  // Transfer of k*x in the SMSD multiples (k = 1..5, x = 0..9):
  // floor((k*x + 6) / 10), so that k*x - 10*transfer lies in [-6,3].
  function automatic logic [2:0] smsd_xfer(logic [2:0] k, logic [3:0] x);
    logic [5:0] prod;
    prod = {3'b000, k} * {2'b00, x};
    return 3'((prod + 6'd6) / 6'd10);
  endfunction

endpackage
