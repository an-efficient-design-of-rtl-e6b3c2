// tb_onehot_mux5: drives random SMSD multiples, every one-hot select (and the
// all-zero select of a zero digit) with both signs, and checks each output digit
// against the selected input digit with its sign flipped when negated.
module tb_onehot_mux5;
  import dec_mult_pkg::*;

  localparam int N = 16;
  smsd_t [4:0][N:0] mult;
  logic  [4:0]      sel;
  logic             neg;
  smsd_t [N:0]      pp;
  int checks = 0, failures = 0;

  onehot_mux5 #(.N(N)) dut (.mult(mult), .sel(sel), .neg(neg), .pp(pp));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      for (int k = 0; k < 5; k++)
        for (int i = 0; i <= N; i++) begin
          mult[k][i].s = 1'($urandom);
          mult[k][i].m = 3'($urandom % 7);
        end
      for (int m = 0; m <= 5; m++) begin
        for (int n = 0; n < 2; n++) begin
          sel = (m == 0) ? 5'b0 : 5'(1 << (m - 1));
          neg = 1'(n);
          #1;
          for (int i = 0; i <= N; i++) begin
            int exp_v, got_v;
            exp_v = (m == 0) ? 0 : (mult[m-1][i].s ? -int'(mult[m-1][i].m) : int'(mult[m-1][i].m));
            if (neg) exp_v = -exp_v;
            got_v = pp[i].s ? -int'(pp[i].m) : int'(pp[i].m);
            checks++;
            if (got_v != exp_v || (m != 0 && pp[i].s != (mult[m-1][i].s ^ neg))) begin
              failures++;
              if (failures < 10) $display("MISMATCH m=%0d neg=%0d digit %0d: %0d vs %0d", m, n, i, got_v, exp_v);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
