// tcsd_adder: carry-free digit slice that adds two two's-complement signed
// digits A, B in [-7,7] and a signed carry-in Cin in {-1,0,1}, producing a TCSD
// digit S in [-7,7] and a signed carry-out Cout.
//
// The transfer depends on A and B only:
//     Cout = +1 if A+B >= 7,  -1 if A+B <= -7,  else 0
// so the interim digit A+B-10*Cout lies in [-6,6] and absorbing Cin keeps S in
// [-7,7]. Used by reduction levels II and III (and the first step of the final
// converter). The multiplier's description names an improved fast TCSD adder
// here without giving its insides; this slice is the simplest one with that
// function.
//
// Interface: a, b, s 4-bit two's complement; cin/cout signed carries (posibit +
// negabit, value pos + neg - 1). Combinational.
module tcsd_adder
  import dec_mult_pkg::*;
(
  input  tcsd_t     a,
  input  tcsd_t     b,
  input  sd_carry_t cin,
  output tcsd_t     s,
  output sd_carry_t cout
);

  logic signed [4:0] w;      // A + B, -14..14
  logic signed [2:0] t;
  logic signed [4:0] z_ext;
  tcsd_t             z;

  assign w = 5'(a) + 5'(b);
  always_comb begin
    if (w >= 5'sd7)       t = 3'sd1;
    else if (w <= -5'sd7) t = -3'sd1;
    else                  t = 3'sd0;
  end
  assign z_ext = w - 5'sd10 * 5'(t);
  assign z     = z_ext[3:0];
  assign cout  = carry_encode(t);

  assign s = z + tcsd_t'(carry_value(cin));

endmodule
