// tb_dec_16_multi: self-checking test of the 16 x 16 digit BCD multiplier at its
// default size. Drives random and corner-case operands, compares the product with
// a binary reference multiplication, and counts how often the mechanisms of the
// design are exercised: negative recoded multiplier digits, the folded 17th
// partial product (Y15 > 4), the transfer c of the depth reduction, and positive
// and negative carries in the first reduction level.
module tb_dec_16_multi;
  import tb_bcd_pkg::*;

  localparam int N = 16;

  logic [4*N-1:0] a, b;
  logic [8*N-1:0] p;
  int checks = 0, failures = 0;
  int n_neg_digit = 0, n_fold = 0, n_dr_carry = 0, n_cpos = 0, n_cneg = 0;

  dec_16_multi dut (.a(a), .b(b), .p(p));

  // Carry chains of the first reduction level, gathered for coverage counting.
  logic [N/2-1:0][2*N:0][1:0] lvl1_carry;
  for (genvar r = 0; r < N/2; r++) begin : g_probe
    assign lvl1_carry[r] = dut.u_tree.g_lvl1[r].c;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(logic [4*N-1:0] av, logic [4*N-1:0] bv);
    logic [255:0] expect_bcd;
    a = av;
    b = bv;
    #1;
    expect_bcd = bin_to_bcd(bcd_to_bin(256'(av), N) * bcd_to_bin(256'(bv), N), 2*N);
    checks++;
    if (p !== expect_bcd[8*N-1:0]) begin
      failures++;
      if (failures < 10) $display("MISMATCH a=%h b=%h p=%h expected=%h", av, bv, p, expect_bcd[8*N-1:0]);
    end
    if (|dut.y_sign) n_neg_digit++;
    if (dut.y_top) n_fold++;
    if (dut.u_dr.c) n_dr_carry++;
    for (int r = 0; r < N/2; r++)
      for (int i = 0; i < 2*N; i++) begin
        if (lvl1_carry[r][i+1] == 2'b11) n_cpos++;
        if (lvl1_carry[r][i+1] == 2'b00) n_cneg++;
      end
  endtask

  initial begin
    run_one('0, '0);
    run_one({N{4'd9}}, {N{4'd9}});
    run_one({N{4'd9}}, 64'h1);
    run_one(64'h1, {N{4'd9}});
    run_one({N{4'd5}}, {N{4'd5}});
    run_one({N{4'd4}}, {N{4'd5}});
    for (int m = 0; m < 4; m++)
      for (int k = 0; k < 500; k++)
        run_one(rand_bcd(N, (k % 3 == 0) ? m : 0)[4*N-1:0], rand_bcd(N, (k % 2 == 0) ? m : 0)[4*N-1:0]);
    $display("negative digits %0d, folded 17th row %0d, depth-reduction carries %0d, level I carries +%0d/-%0d",
             n_neg_digit, n_fold, n_dr_carry, n_cpos, n_cneg);
    if (n_neg_digit == 0) failures++;
    if (n_fold == 0) failures++;
    if (n_dr_carry == 0) failures++;
    if (n_cpos == 0) failures++;
    if (n_cneg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
