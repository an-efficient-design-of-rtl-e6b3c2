// depth_reduction: folds the 17th partial product into the first row so that the
// reduction tree starts with 16 rows instead of 17.
//
// With multiplier digits recoded into [-5,5], a top digit of 1 (present when
// Y15 > 4) adds a 17th partial product X*10^16. Its digits from position 17 up
// land where the first row (Y0'*X, digits 0..16) is empty, so only position 16
// would be 17 deep: there the top digit H of Y0'*X meets X0. This block merges
// the two on the fly:
//     v  = H + g*X0            (g = Y15>4, v in [-5,14])
//     c  = (v >= 7)            (transfer into position 17)
//     S  = v - 10*c            (SMSD digit in [-5,6], position 16)
//     S' = rec(g*X1) + c       (SMSD digit in [-6,4], position 17)
// where rec(x) = x - 10*(x >= 4) is the residue the multiples generator uses for
// 1X; the transfer of X1 is carried by the next digit of 1X as usual. H is the top
// digit of the selected multiple: the transfer floor((k*X15+6)/10) of k = |Y0'|,
// signed by Y0'. The S' path is a recoder, a +1 and a 2:1 mux driven by c, as in
// the block's diagram; the rule for c and S is this design's own.
//
// Interface: BCD digits x0, x1, x15; y_top = (Y15 > 4); y0_mag/y0_neg the one-hot
// magnitude and sign of Y0'; outputs S (s) and S' (s_p). Combinational.
module depth_reduction
  import dec_mult_pkg::*;
(
  input  logic [3:0] x0,
  input  logic [3:0] x1,
  input  logic [3:0] x15,
  input  logic       y_top,
  input  logic [4:0] y0_mag,
  input  logic       y0_neg,
  output smsd_t      s,
  output smsd_t      s_p
);

  logic [3:0]        x0_g, x1_g;
  logic [2:0]        h_mag;
  logic signed [5:0] h, v;
  logic signed [4:0] s_val;
  logic              c;
  logic signed [4:0] rec, rec_p1;

  assign x0_g = y_top ? x0 : 4'd0;
  assign x1_g = y_top ? x1 : 4'd0;

  // Top digit of |Y0'| * X: one-hot selection of the five candidate transfers.
  always_comb begin
    h_mag = '0;
    for (int k = 1; k <= 5; k++) begin
      if (y0_mag[k-1]) h_mag = h_mag | smsd_xfer(3'(k), x15);
    end
  end
  assign h = y0_neg ? -$signed({3'b000, h_mag}) : $signed({3'b000, h_mag});

  assign v     = h + $signed({2'b00, x0_g});
  assign c     = (v >= 6'sd7);
  assign s_val = 5'(c ? v - 6'sd10 : v);
  assign s     = smsd_encode(s_val);

  assign rec    = (x1_g >= 4'd4) ? $signed({1'b0, x1_g}) - 5'sd10 : $signed({1'b0, x1_g});
  assign rec_p1 = rec + 5'sd1;
  assign s_p    = smsd_encode(c ? rec_p1 : rec);

endmodule
