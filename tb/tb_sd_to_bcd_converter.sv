// tb_sd_to_bcd_converter: drives the final adder with random TCSD rows (digits in
// [-7,7], including all-negative and all-+7 rows) and checks that the BCD output
// equals (A + B) modulo 10^32 and holds only digits 0..9.
module tb_sd_to_bcd_converter;
  import dec_mult_pkg::*;
  import tb_bcd_pkg::*;

  localparam int N = 16;
  localparam int W = 2 * N;
  tcsd_t [W-1:0]  a, b;
  logic [8*N-1:0] p;
  int checks = 0, failures = 0;

  sd_to_bcd_converter #(.N(N)) dut (.a(a), .b(b), .p(p));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    logic signed [255:0] v, w;
    logic [255:0] expect_bcd;
    #1;
    v = 0;
    w = 1;
    for (int i = 0; i < W; i++) begin
      v = v + w * a[i] + w * b[i];
      w = w * 10;
    end
    v = v % w;
    if (v < 0) v = v + w;
    expect_bcd = bin_to_bcd(v, W);
    checks++;
    if (p !== expect_bcd[8*N-1:0]) begin
      failures++;
      if (failures < 10) $display("MISMATCH p=%h expected=%h", p, expect_bcd[8*N-1:0]);
    end
  endtask

  initial begin
    for (int i = 0; i < W; i++) begin a[i] = -4'sd7; b[i] = -4'sd7; end
    check_now();
    for (int i = 0; i < W; i++) begin a[i] = 4'sd7; b[i] = 4'sd7; end
    check_now();
    for (int i = 0; i < W; i++) begin a[i] = '0; b[i] = '0; end
    a[5] = -4'sd1;
    check_now();
    for (int it = 0; it < 3000; it++) begin
      for (int i = 0; i < W; i++) begin
        a[i] = 4'(int'($urandom % 15) - 7);
        b[i] = 4'(int'($urandom % 15) - 7);
        if (it % 4 == 1) b[i] = 0;
      end
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
