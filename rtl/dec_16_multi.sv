// dec_16_multi: parallel N x N digit BCD multiplier (N = 16), P = X * Y.
//
// The multiplier Y is recoded into signed digits in [-5,5] (sd_recoder), so only
// the multiples 1X..5X are needed; they are generated carry-free in
// sign-magnitude signed-digit form, digits in [-6,6] (smsd_multiples_gen). Each
// recoded digit picks its multiple through a one-hot mux and negates it with one
// XOR per digit (onehot_mux5), giving N partial products of N+1 digits, plus a
// 17th one, X*10^N, when the top recoded digit is 1 (Y15 > 4). depth_reduction
// merges that 17th row into the empty top of the first row, so the partial
// product matrix is only N rows deep:
//     row r, r = 0..N-1 : digits of Y_r' * X at weights 10^r .. 10^(r+N)
//     row 0 additionally: S at 10^N (replacing the top digit of Y_0'*X),
//                         S' at 10^(N+1), and digits 2..N-1 of 1X (gated by
//                         Y15 > 4) at 10^(N+2) .. 10^(2N-1)
// ppr_tree reduces the 16 rows to two TCSD rows in three carry-free levels and
// sd_to_bcd_converter adds them into the BCD product.
// Everything is computed modulo 10^(2N); the digit of 1X at 10^(2N) is never
// placed. The block structure follows the multiplier's description; where the
// description stops (recoding rules, carry thresholds, converter insides) the
// submodules document their own choices.
//
// Interface: a = X and b = Y, N BCD digits each (digit i in bits 4i+3:4i);
// p = 2N BCD digits. Purely combinational, no clock: the result is valid one
// propagation delay after the operands.
module dec_16_multi
  import dec_mult_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [4*N-1:0] a,
  input  logic [4*N-1:0] b,
  output logic [8*N-1:0] p
);

  localparam int W = 2 * N;

  smsd_t [4:0][N:0]       mult;
  logic  [N-1:0][4:0]     y_onehot;
  logic  [N-1:0]          y_sign;
  logic                   y_top;
  smsd_t [N-1:0][N:0]     pp;
  smsd_t                  s, s_p;
  smsd_t [N-1:0][W-1:0]   rows;
  tcsd_t [W-1:0]          sum_a, sum_b;

  smsd_multiples_gen #(.N(N)) u_mult (
    .x    (a),
    .mult (mult)
  );

  sd_recoder #(.N(N)) u_rec (
    .y      (b),
    .onehot (y_onehot),
    .sign   (y_sign),
    .y_top  (y_top)
  );

  for (genvar r = 0; r < N; r++) begin : g_pp
    onehot_mux5 #(.N(N)) u_mux (
      .mult (mult),
      .sel  (y_onehot[r]),
      .neg  (y_sign[r]),
      .pp   (pp[r])
    );
  end

  depth_reduction u_dr (
    .x0     (a[3:0]),
    .x1     (a[7:4]),
    .x15    (a[4*N-1 -: 4]),
    .y_top  (y_top),
    .y0_mag (y_onehot[0]),
    .y0_neg (y_sign[0]),
    .s      (s),
    .s_p    (s_p)
  );

  // Partial product matrix, 16 rows deep.
  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar i = 0; i < W; i++) begin : g_pos
      if (r == 0 && i == N) begin : g_s
        assign rows[r][i] = s;
      end else if (r == 0 && i == N + 1) begin : g_sp
        assign rows[r][i] = s_p;
      end else if (r == 0 && i > N + 1) begin : g_top
        assign rows[r][i] = mult[0][i-N] & {4{y_top}};
      end else if (i >= r && i <= r + N) begin : g_pp_digit
        assign rows[r][i] = pp[r][i-r];
      end else begin : g_zero
        assign rows[r][i] = '0;
      end
    end
  end

  ppr_tree #(.N(N)) u_tree (
    .rows  (rows),
    .sum_a (sum_a),
    .sum_b (sum_b)
  );

  sd_to_bcd_converter #(.N(N)) u_conv (
    .a (sum_a),
    .b (sum_b),
    .p (p)
  );

endmodule
