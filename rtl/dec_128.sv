// dec_128: 32 x 32 digit BCD multiplier (128-bit BCD operands, 256-bit BCD
// product) built from four 16 x 16 digit multipliers and three BCD adders.
//
// With A = Ah*10^16 + Al and B = Bh*10^16 + Bl (16-digit halves),
//     A*B = Ah*Bh*10^32 + (Ah*Bl + Al*Bh)*10^16 + Al*Bl.
// The four sub-products come from dec_16_multi instances. Adder 1 forms the
// cross sum M = Ah*Bl + Al*Bh (32 digits plus a carry). Adder 2 adds M to the
// 32-digit window at weights 10^16..10^47, which holds the upper half of Al*Bl
// next to the lower half of Ah*Bh (they do not overlap, so they are simply
// concatenated). Adder 3 adds the carry of M and the carry of adder 2 into the
// upper half of Ah*Bh. The lowest 16 digits of Al*Bl pass straight through; the
// final carry out is always 0 because the product is below 10^64.
// The composition of four 16-digit multipliers and three adders follows the
// design's extended version; the operand split and the adder chaining are this
// design's choice.
//
// Interface: a, b are 32 BCD digits (digit i in bits 4i+3:4i); c is 64 BCD
// digits. Purely combinational.
module dec_128 (
  input  logic [127:0] a,
  input  logic [127:0] b,
  output logic [255:0] c
);

  logic [127:0] m_ll, m_lh, m_hl, m_hh;  // Al*Bl, Al*Bh, Ah*Bl, Ah*Bh
  logic [127:0] m_cross, mid;
  logic         m_cross_c, mid_c, top_c;

  dec_16_multi u_x1 (.a(a[63:0]),   .b(b[63:0]),   .p(m_ll));
  dec_16_multi u_x2 (.a(a[63:0]),   .b(b[127:64]), .p(m_lh));
  dec_16_multi u_x3 (.a(a[127:64]), .b(b[63:0]),   .p(m_hl));
  dec_16_multi u_x4 (.a(a[127:64]), .b(b[127:64]), .p(m_hh));

  bcd_adder #(.DIGITS(32)) u_add1 (
    .a    (m_lh),
    .b    (m_hl),
    .cin  (1'b0),
    .s    (m_cross),
    .cout (m_cross_c)
  );

  bcd_adder #(.DIGITS(32)) u_add2 (
    .a    ({m_hh[63:0], m_ll[127:64]}),
    .b    (m_cross),
    .cin  (1'b0),
    .s    (mid),
    .cout (mid_c)
  );

  bcd_adder #(.DIGITS(16)) u_add3 (
    .a    (m_hh[127:64]),
    .b    ({63'd0, m_cross_c}),
    .cin  (mid_c),
    .s    (c[255:192]),
    .cout (top_c)
  );

  assign c[63:0]    = m_ll[63:0];
  assign c[191:64]  = mid;

  // top_c is always 0 for BCD operands (the product has at most 64 digits);
  // it is left unconnected on purpose.

endmodule
