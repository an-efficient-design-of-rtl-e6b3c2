// smsd_adder_4in1: carry-free digit slice that adds two sign-magnitude signed
// digits P, Q in [-6,6] and a signed carry-in Cin in {-1,0,1}, producing a
// two's-complement signed digit S in [-7,7] and a signed carry-out Cout.
//
// Stage I applies each sign to its magnitude: a negative sign inverts the three
// magnitude bits, which then count as negabits (a negabit with logic level x is
// worth x - 1, so an inverted bit ~m_j at weight 2^j is worth -m_j * 2^j). The
// bit collection is therefore worth pb + qb - 7*(sp + sq) = P + Q, where pb and
// qb are the (possibly inverted) magnitudes and the constant depends only on the
// sign combination. Stage I also decides the transfer from P and Q alone (so no
// carry ripples across slices):
//     Cout = +1 if P+Q >= 7,  -1 if P+Q <= -7,  else 0
// leaving an interim digit Z = P+Q-10*Cout in [-6,6]. Stage II is one 4-bit
// addition S = Z + Cin, the same for all four sign combinations of P and Q.
// The two-stage split, the sign application by inversion into negabits and the
// posibit/negabit carry follow the multiplier's description of its 4-in-1
// adder; the transfer thresholds and the rest of the bit-level preprocessing
// (here word-level arithmetic) are this design's choice.
//
// Interface: p, q SMSD digits; cin/cout signed carries (posibit + negabit, value
// pos + neg - 1); s a 4-bit two's-complement digit. Combinational.
module smsd_adder_4in1
  import dec_mult_pkg::*;
(
  input  smsd_t     p,
  input  smsd_t     q,
  input  sd_carry_t cin,
  output tcsd_t     s,
  output sd_carry_t cout
);

  logic [2:0]        pb, qb; // magnitudes after sign application
  logic signed [4:0] bias;   // -7 per negabit collection
  logic signed [4:0] w;      // P + Q, -12..12
  logic signed [2:0] t;      // transfer, -1..1
  logic signed [4:0] z_ext;
  tcsd_t             z;      // interim digit, -6..6

  // Stage I: sign application and transfer decision.
  assign pb   = p.m ^ {3{p.s}};
  assign qb   = q.m ^ {3{q.s}};
  assign bias = (p.s ? -5'sd7 : 5'sd0) + (q.s ? -5'sd7 : 5'sd0);
  assign w    = $signed({2'b00, pb}) + $signed({2'b00, qb}) + bias;
  always_comb begin
    if (w >= 5'sd7)       t = 3'sd1;
    else if (w <= -5'sd7) t = -3'sd1;
    else                  t = 3'sd0;
  end
  assign z_ext = w - 5'sd10 * 5'(t);
  assign z     = z_ext[3:0];
  assign cout  = carry_encode(t);

  // Stage II: one 4-bit adder for all sign cases.
  assign s = z + tcsd_t'(carry_value(cin));

endmodule
