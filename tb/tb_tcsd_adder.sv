// tb_tcsd_adder: exhaustive test of the TCSD + TCSD digit slice over all digits
// A, B in [-7,7] and every encoding of the carry-in. Checks
// S + 10*Cout = A + B + Cin, S in [-7,7], and that Cout does not depend on Cin.
module tb_tcsd_adder;
  import dec_mult_pkg::*;

  tcsd_t     a, b, s;
  sd_carry_t cin, cout;
  int checks = 0, failures = 0;

  tcsd_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int av = -7; av <= 7; av++)
      for (int bv = -7; bv <= 7; bv++) begin
        int co_ref;
        co_ref = 99;
        for (int ce = 0; ce < 4; ce++) begin
          int cv, sv, cov;
          a = 4'(av);
          b = 4'(bv);
          cin = 2'(ce);
          #1;
          cv  = int'(cin.pos) + int'(cin.neg) - 1;
          sv  = int'(s);
          cov = int'(cout.pos) + int'(cout.neg) - 1;
          if (co_ref == 99) co_ref = cov;
          checks++;
          if (sv + 10 * cov != av + bv + cv || sv < -7 || sv > 7 || cov != co_ref) begin
            failures++;
            if (failures < 10) $display("MISMATCH A=%0d B=%0d Cin=%0d: S=%0d Cout=%0d", av, bv, cv, sv, cov);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
