// onehot_mux5: builds one signed partial product row by selecting one of the
// five SMSD multiples 1X..5X with a one-hot magnitude and applying the
// multiplier digit's sign.
//
// Selection is an AND-OR over the one-hot lines, digit by digit (nothing is
// selected for a zero multiplier digit, giving 0). Negation needs only one XOR per
// digit, on the SMSD sign bit, instead of one per bit as with BCD or two's
// complement multiples: that saving is the reason the multiples are kept in
// sign-magnitude form. Mux and XOR are drawn as separate boxes in the block
// diagram; here they share one module, one instance per partial product.
//
// Interface: mult[k-1] is k*X (N+1 SMSD digits), sel is one-hot (bit m-1 for
// magnitude m), neg the sign of the multiplier digit, pp the selected, signed
// row. Combinational.
module onehot_mux5
  import dec_mult_pkg::*;
#(
  parameter int N = 16
) (
  input  smsd_t [4:0][N:0] mult,
  input  logic  [4:0]      sel,
  input  logic             neg,
  output smsd_t [N:0]      pp
);

  for (genvar i = 0; i <= N; i++) begin : g_digit
    always_comb begin
      smsd_t d;
      d = '0;
      for (int k = 0; k < 5; k++) begin
        d = d | (mult[k][i] & {4{sel[k]}});
      end
      pp[i].m = d.m;
      pp[i].s = d.s ^ neg;
    end
  end

endmodule
