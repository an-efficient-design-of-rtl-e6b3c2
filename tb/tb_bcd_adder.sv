// tb_bcd_adder: checks the 32-digit BCD adder on random and corner-case operands
// (all nines, carry-in set) against binary addition.
module tb_bcd_adder;
  import tb_bcd_pkg::*;

  localparam int D = 32;
  logic [4*D-1:0] a, b, s;
  logic           cin, cout;
  int checks = 0, failures = 0;

  bcd_adder #(.DIGITS(D)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [4*D-1:0] av, logic [4*D-1:0] bv, logic cv);
    logic [255:0] expect_bcd;
    a = av; b = bv; cin = cv;
    #1;
    expect_bcd = bin_to_bcd(bcd_to_bin(256'(av), D) + bcd_to_bin(256'(bv), D) + 256'(cv), D + 1);
    checks++;
    if ({cout, s} !== {expect_bcd[4*D], expect_bcd[4*D-1:0]}) begin
      failures++;
      if (failures < 10) $display("MISMATCH a=%h b=%h cin=%b: %b %h", av, bv, cv, cout, s);
    end
  endtask

  initial begin
    check_one({D{4'd9}}, '0, 1'b1);
    check_one({D{4'd9}}, {D{4'd9}}, 1'b1);
    check_one('0, '0, 1'b0);
    for (int k = 0; k < 3000; k++)
      check_one(rand_bcd(D, k % 4)[4*D-1:0], rand_bcd(D, (k / 4) % 4)[4*D-1:0], 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
