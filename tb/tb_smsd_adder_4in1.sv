// tb_smsd_adder_4in1: exhaustive test of the SMSD + SMSD -> TCSD digit slice over
// all digits P, Q in [-6,6] (zero with either sign) and every encoding of the
// carry-in in {-1,0,1}. Checks S + 10*Cout = P + Q + Cin, S in [-7,7], and that
// Cout does not depend on Cin (the slice is carry-free).
module tb_smsd_adder_4in1;
  import dec_mult_pkg::*;

  smsd_t     p, q;
  sd_carry_t cin, cout;
  tcsd_t     s;
  int checks = 0, failures = 0;

  smsd_adder_4in1 dut (.p(p), .q(q), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ps = 0; ps < 2; ps++)
      for (int pm = 0; pm <= 6; pm++)
        for (int qs = 0; qs < 2; qs++)
          for (int qm = 0; qm <= 6; qm++) begin
            int co_ref;
            co_ref = 99;
            for (int ce = 0; ce < 4; ce++) begin
              int pv, qv, cv, sv, cov;
              p.s = 1'(ps); p.m = 3'(pm);
              q.s = 1'(qs); q.m = 3'(qm);
              cin = 2'(ce);
              #1;
              pv  = (ps != 0) ? -pm : pm;
              qv  = (qs != 0) ? -qm : qm;
              cv  = int'(cin.pos) + int'(cin.neg) - 1;
              sv  = int'(s);
              cov = int'(cout.pos) + int'(cout.neg) - 1;
              if (co_ref == 99) co_ref = cov;
              checks++;
              if (sv + 10 * cov != pv + qv + cv || sv < -7 || sv > 7 || cov != co_ref) begin
                failures++;
                if (failures < 10) $display("MISMATCH P=%0d Q=%0d Cin=%0d: S=%0d Cout=%0d", pv, qv, cv, sv, cov);
              end
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
