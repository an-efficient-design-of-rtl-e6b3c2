// sd_recoder: recodes the N BCD digits of the multiplier Y into N+1 signed digits
// in [-5,5], each delivered as a sign bit and a one-hot magnitude.
//
// Each digit y_i >= 5 emits a transfer c_i = 1 and keeps y_i - 10 (in [-5,-1]);
// smaller digits keep y_i and emit no transfer. Signed digit i is
// (y_i - 10*c_i) + c_(i-1), which lies in [-5,5]; the extra top digit N is c_(N-1),
// i.e. 1 exactly when Y15 > 4. Only digits 0..N-1 need the one-hot form
// (5 lines each, magnitudes 1..5, all zero for a zero digit) and a sign; the top
// digit is a single line, giving the 16x5+1 one-hot lines and 16 sign lines of the
// multiplier's block diagram. The recoding rule itself is this design's choice.
//
// Interface: y is N BCD digits; onehot[i][m-1] is set when |digit i| = m;
// sign[i] is set when digit i is negative; y_top is digit N. Combinational.
module sd_recoder #(
  parameter int N = 16
) (
  input  logic [4*N-1:0]   y,
  output logic [N-1:0][4:0] onehot,
  output logic [N-1:0]     sign,
  output logic             y_top
);

  logic [N-1:0] c;  // transfer out of each digit

  for (genvar i = 0; i < N; i++) begin : g_digit
    logic signed [4:0] v;  // signed digit value, -5..5
    logic [2:0]        mag;
    assign c[i] = (y[4*i +: 4] >= 4'd5);
    assign v    = $signed({1'b0, y[4*i +: 4]}) - (c[i] ? 5'sd10 : 5'sd0)
                + ((i > 0) ? $signed({4'b0, c[(i > 0) ? i-1 : 0]}) : 5'sd0);
    assign sign[i] = v[4];
    assign mag     = v[4] ? 3'(-v) : v[2:0];
    for (genvar m = 1; m <= 5; m++) begin : g_onehot
      assign onehot[i][m-1] = (mag == 3'(m));
    end
  end

  assign y_top = c[N-1];

endmodule
