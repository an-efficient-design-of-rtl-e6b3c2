// tb_dec_128: end-to-end test of the 32 x 32 digit BCD multiplier at its default
// size (no parameter overrides). Compares every product with a binary reference
// and counts the mechanisms the design relies on, failing if one never occurs:
// negative recoded multiplier digits, the folded 17th partial product in each
// 16-digit multiplier, the transfer of the depth reduction, positive and negative
// carries in the first reduction level, borrows in the final converter, and the
// carries between the three BCD adders.
module tb_dec_128;
  import tb_bcd_pkg::*;

  localparam int D = 32;

  logic [127:0] a, b;
  logic [255:0] c;
  int checks = 0, failures = 0;
  int n_neg_digit = 0, n_fold = 0, n_dr_carry = 0, n_cpos = 0, n_cneg = 0;
  int n_borrow = 0, n_cross_c = 0, n_mid_c = 0;

  dec_128 dut (.a(a), .b(b), .c(c));

  logic [7:0][32:0][1:0] lvl1_carry;
  for (genvar r = 0; r < 8; r++) begin : g_probe
    assign lvl1_carry[r] = dut.u_x1.u_tree.g_lvl1[r].c;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(logic [127:0] av, logic [127:0] bv);
    logic [255:0] expect_bcd;
    a = av;
    b = bv;
    #1;
    expect_bcd = bin_to_bcd(bcd_to_bin(256'(av), D) * bcd_to_bin(256'(bv), D), 2*D);
    checks++;
    if (c !== expect_bcd) begin
      failures++;
      if (failures < 10) $display("MISMATCH a=%h b=%h c=%h expected=%h", av, bv, c, expect_bcd);
    end
    if (|dut.u_x1.y_sign) n_neg_digit++;
    if (dut.u_x1.y_top) n_fold++;
    if (dut.u_x1.u_dr.c) n_dr_carry++;
    if (|dut.u_x1.u_conv.borrow) n_borrow++;
    if (dut.m_cross_c) n_cross_c++;
    if (dut.mid_c) n_mid_c++;
    for (int r = 0; r < 8; r++)
      for (int i = 0; i < 32; i++) begin
        if (lvl1_carry[r][i+1] == 2'b11) n_cpos++;
        if (lvl1_carry[r][i+1] == 2'b00) n_cneg++;
      end
  endtask

  initial begin
    run_one('0, '0);
    run_one({D{4'd9}}, {D{4'd9}});
    run_one({D{4'd9}}, 128'h1);
    run_one({D{4'd5}}, {D{4'd5}});
    for (int m = 0; m < 4; m++)
      for (int k = 0; k < 250; k++)
        run_one(rand_bcd(D, (k % 3 == 0) ? m : 0)[127:0], rand_bcd(D, (k % 2 == 0) ? m : 0)[127:0]);
    $display("negative digits %0d, folded 17th row %0d, depth-reduction carries %0d",
             n_neg_digit, n_fold, n_dr_carry);
    $display("level I carries +%0d/-%0d, converter borrows %0d, adder carries %0d/%0d",
             n_cpos, n_cneg, n_borrow, n_cross_c, n_mid_c);
    if (n_neg_digit == 0) failures++;
    if (n_fold == 0) failures++;
    if (n_dr_carry == 0) failures++;
    if (n_cpos == 0) failures++;
    if (n_cneg == 0) failures++;
    if (n_borrow == 0) failures++;
    if (n_cross_c == 0) failures++;
    if (n_mid_c == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
