// tb_sd_recoder: checks the multiplier recoder on random and corner-case BCD
// operands. Rebuilds Y from the signed digits (sign and one-hot magnitude) and the
// top digit and compares it with Y; also checks that every one-hot group has at
// most one line set and that zero digits carry no sign.
module tb_sd_recoder;
  import tb_bcd_pkg::*;

  localparam int N = 16;
  logic [4*N-1:0]    y;
  logic [N-1:0][4:0] onehot;
  logic [N-1:0]      sign;
  logic              y_top;
  int checks = 0, failures = 0;

  sd_recoder #(.N(N)) dut (.y(y), .onehot(onehot), .sign(sign), .y_top(y_top));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [4*N-1:0] yv);
    logic signed [127:0] val, w;
    int mag;
    bit ok;
    y = yv;
    #1;
    val = 0;
    w   = 1;
    ok  = 1;
    for (int i = 0; i < N; i++) begin
      mag = 0;
      if ($countones(onehot[i]) > 1) ok = 0;
      for (int m = 1; m <= 5; m++) if (onehot[i][m-1]) mag = m;
      if (mag == 0 && sign[i]) ok = 0;
      val = val + (sign[i] ? -w * mag : w * mag);
      w = w * 10;
    end
    val = val + (y_top ? w : 0);
    checks++;
    if (!ok || val != $signed(128'(bcd_to_bin(256'(yv), N)))) begin
      failures++;
      if (failures < 10) $display("MISMATCH y=%h onehot=%h sign=%h top=%b", yv, onehot, sign, y_top);
    end
  endtask

  initial begin
    check_one('0);
    check_one({N{4'd9}});
    check_one({N{4'd5}});
    check_one({N{4'd4}});
    for (int d = 0; d < 10; d++) check_one({N{4'(d)}});
    for (int k = 0; k < 3000; k++) check_one(rand_bcd(N, k % 4)[4*N-1:0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
