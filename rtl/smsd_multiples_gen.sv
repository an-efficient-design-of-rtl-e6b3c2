// smsd_multiples_gen: carry-free generation of the multiples 1X..5X of a BCD
// multiplicand, each as N+1 sign-magnitude signed digits (SMSD) in [-6,6].
//
// For each multiple k and each BCD digit x_i the product k*x_i (0..45) is split
// into a transfer t_i and a residue r_i:
//     t_i = floor((k*x_i + 6) / 10),   r_i = k*x_i - 10*t_i   (r_i in [-6,3])
// and output digit i is r_i + t_(i-1); the top digit N is t_(N-1). Because each
// digit depends only on x_i and x_(i-1), no carry ripples. For every k in 1..5
// the digits stay in [-6,6]: the residues of even multiples are even (max 2), and
// the transfer of 5X is at most 5 while its residue is 0 or -5.
// Producing [-6,6] SMSD multiples (one sign bit per digit, so negation later costs
// one XOR per digit) follows the multiplier's description; the split rule above is
// this design's choice, as the description does not give one.
//
// Interface: x is N BCD digits; mult[k-1][i] is digit i of k*X. Combinational.
// The top digit of every multiple is a transfer and never negative, so its sign
// bit is constant 0; it is kept so that all digits share one format.
module smsd_multiples_gen
  import dec_mult_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [4*N-1:0]          x,
  output smsd_t [4:0][N:0]        mult
);

  for (genvar k = 1; k <= 5; k++) begin : g_mult
    logic [N-1:0][2:0]        t;  // transfers, 0..5
    logic signed [N-1:0][4:0] r;  // residues, -6..3

    for (genvar i = 0; i < N; i++) begin : g_split
      logic [5:0] prod;
      assign prod = 6'(k) * {2'b00, x[4*i +: 4]};
      assign t[i] = smsd_xfer(3'(k), x[4*i +: 4]);
      assign r[i] = 5'($signed({1'b0, prod}) - $signed({1'b0, 6'd10 * {3'b000, t[i]}}));
    end

    assign mult[k-1][0] = smsd_encode(r[0]);
    for (genvar i = 1; i < N; i++) begin : g_digit
      assign mult[k-1][i] = smsd_encode(r[i] + $signed({2'b00, t[i-1]}));
    end
    assign mult[k-1][N] = smsd_encode($signed({2'b00, t[N-1]}));
  end

endmodule
