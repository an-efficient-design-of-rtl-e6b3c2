// tb_smsd_multiples_gen: checks that every generated multiple k*X (k = 1..5)
// has the value k*X and digits in [-6,6], on random and corner-case operands.
module tb_smsd_multiples_gen;
  import dec_mult_pkg::*;
  import tb_bcd_pkg::*;

  localparam int N = 16;
  logic [4*N-1:0]   x;
  smsd_t [4:0][N:0] mult;
  int checks = 0, failures = 0;

  smsd_multiples_gen #(.N(N)) dut (.x(x), .mult(mult));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [4*N-1:0] xv);
    logic signed [127:0] val, w, expect_val;
    bit ok;
    x = xv;
    #1;
    for (int k = 1; k <= 5; k++) begin
      val = 0;
      w   = 1;
      ok  = 1;
      for (int i = 0; i <= N; i++) begin
        if (mult[k-1][i].m > 3'd6) ok = 0;
        val = val + (mult[k-1][i].s ? -w * mult[k-1][i].m : w * mult[k-1][i].m);
        w = w * 10;
      end
      expect_val = $signed(128'(bcd_to_bin(256'(xv), N))) * k;
      checks++;
      if (!ok || val != expect_val) begin
        failures++;
        if (failures < 10) $display("MISMATCH x=%h k=%0d", xv, k);
      end
    end
  endtask

  initial begin
    check_one('0);
    for (int d = 0; d < 10; d++) check_one({N{4'(d)}});
    for (int k = 0; k < 2000; k++) check_one(rand_bcd(N, k % 4)[4*N-1:0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
