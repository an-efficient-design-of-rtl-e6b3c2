// tb_depth_reduction: exhaustive test of the 17 -> 16 depth reduction over all
// X0, X1, X15 digits, all recoded Y0' in [-5,5] and both values of Y15 > 4.
// Checks that S and S' are SMSD digits in [-6,6] and that
//     S + 10*S' = H + g*(X0 + 10*X1) - 100*g*(X1 >= 4)
// where H is the signed top digit of |Y0'|*X (transfer floor((k*X15+6)/10)) and
// the last term is the transfer of X1 that the 1X multiple places at 10^(N+2).
module tb_depth_reduction;
  import dec_mult_pkg::*;

  logic [3:0] x0, x1, x15;
  logic       y_top, y0_neg;
  logic [4:0] y0_mag;
  smsd_t      s, s_p;
  int checks = 0, failures = 0, n_carry = 0;

  depth_reduction dut (.x0(x0), .x1(x1), .x15(x15), .y_top(y_top), .y0_mag(y0_mag),
                       .y0_neg(y0_neg), .s(s), .s_p(s_p));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 2; g++)
      for (int y = -5; y <= 5; y++)
        for (int a0 = 0; a0 < 10; a0++)
          for (int a1 = 0; a1 < 10; a1++)
            for (int a15 = 0; a15 < 10; a15++) begin
              int k, h, sv, spv, lhs, rhs;
              k = (y < 0) ? -y : y;
              x0 = 4'(a0); x1 = 4'(a1); x15 = 4'(a15);
              y_top = 1'(g);
              y0_neg = (y < 0);
              y0_mag = (k == 0) ? 5'b0 : 5'(1 << (k - 1));
              #1;
              h = (k * a15 + 6) / 10;
              if (y < 0) h = -h;
              sv  = s.s ? -int'(s.m) : int'(s.m);
              spv = s_p.s ? -int'(s_p.m) : int'(s_p.m);
              lhs = sv + 10 * spv;
              rhs = h + g * (a0 + 10 * a1) - ((g == 1 && a1 >= 4) ? 100 : 0);
              checks++;
              if (lhs != rhs || s.m > 6 || s_p.m > 6) begin
                failures++;
                if (failures < 10) $display("MISMATCH g=%0d y=%0d x0=%0d x1=%0d x15=%0d: S=%0d S'=%0d", g, y, a0, a1, a15, sv, spv);
              end
              if (dut.c) n_carry++;
            end
    if (n_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
