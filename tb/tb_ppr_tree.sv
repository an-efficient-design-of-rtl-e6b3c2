// tb_ppr_tree: drives the 16-row reduction tree with random SMSD matrices
// (digits in [-6,6], zero with either sign, plus all-+6 and all--6 matrices)
// and checks that the two TCSD output rows have digits in [-7,7] and that their
// sum equals the sum of all rows modulo 10^32.
module tb_ppr_tree;
  import dec_mult_pkg::*;

  localparam int N = 16;
  localparam int W = 2 * N;
  smsd_t [N-1:0][W-1:0] rows;
  tcsd_t [W-1:0]        sum_a, sum_b;
  int checks = 0, failures = 0;

  ppr_tree #(.N(N)) dut (.rows(rows), .sum_a(sum_a), .sum_b(sum_b));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [255:0] mod_pow(logic signed [255:0] v, logic signed [255:0] m);
    logic signed [255:0] r;
    r = v % m;
    if (r < 0) r = r + m;
    return r;
  endfunction

  task automatic check_now();
    logic signed [255:0] in_sum, out_sum, w, m;
    bit ok;
    #1;
    in_sum = 0;
    out_sum = 0;
    ok = 1;
    w = 1;
    for (int i = 0; i < W; i++) begin
      for (int r = 0; r < N; r++)
        in_sum = in_sum + (rows[r][i].s ? -w * rows[r][i].m : w * rows[r][i].m);
      out_sum = out_sum + w * sum_a[i] + w * sum_b[i];
      if (sum_a[i] == -8 || sum_b[i] == -8) ok = 0;
      w = w * 10;
    end
    m = w;
    checks++;
    if (!ok || mod_pow(in_sum, m) != mod_pow(out_sum, m)) begin
      failures++;
      if (failures < 10) $display("MISMATCH in=%0d out=%0d", in_sum, out_sum);
    end
  endtask

  initial begin
    for (int v = 0; v < 2; v++) begin
      for (int r = 0; r < N; r++)
        for (int i = 0; i < W; i++) rows[r][i] = '{s: 1'(v), m: 3'd6};
      check_now();
    end
    for (int it = 0; it < 2000; it++) begin
      for (int r = 0; r < N; r++)
        for (int i = 0; i < W; i++) begin
          rows[r][i].s = 1'($urandom);
          rows[r][i].m = 3'($urandom % 7);
        end
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
