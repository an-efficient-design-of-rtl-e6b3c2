// ppr_tree: 16-deep partial product reduction tree. Reduces N rows of 2N SMSD
// digits (the aligned partial products) to two rows of TCSD digits.
//
// Every reduction step is a 2:1 carry-free row adder: a chain of digit slices in
// which each slice's carry-out enters the next slice's carry-in, with no
// propagation beyond one position. Level I pairs the SMSD rows with
// smsd_adder_4in1 slices and yields TCSD rows; the following levels pair TCSD
// rows with tcsd_adder slices. For N = 16 this is levels I..III (16 -> 8 -> 4 -> 2),
// the final 2:1 step being merged into the BCD converter. Rows are kept as
// binary-heap nodes: node j (2 <= j < N) holds the sum of nodes 2j and 2j+1,
// nodes N/2..N-1 come from the SMSD rows, and nodes 2 and 3 are the outputs.
// The digit-slice adders, their order of use and the 16-row start follow the
// multiplier's description; pairing rows in order and full-width rows at every
// level (instead of its irregular, trimmed digit placement) are this design's
// choice. Carries out of digit 2N-1 are dropped: the tree works modulo 10^(2N),
// exact for an N x N digit product.
//
// Interface: rows[r][i] is the SMSD digit of row r at weight 10^i; sum_a and
// sum_b are TCSD rows whose sum is the product modulo 10^(2N). N must be a power
// of two, at least 4. Combinational.
module ppr_tree
  import dec_mult_pkg::*;
#(
  parameter int N = 16
) (
  input  smsd_t [N-1:0][2*N-1:0] rows,
  output tcsd_t [2*N-1:0]        sum_a,
  output tcsd_t [2*N-1:0]        sum_b
);

  localparam int W = 2 * N;

  tcsd_t [N-1:2][W-1:0] node;

  // Level I: SMSD + SMSD -> TCSD.
  for (genvar r = 0; r < N/2; r++) begin : g_lvl1
    sd_carry_t [W:0] c;
    assign c[0] = CARRY_ZERO;
    for (genvar i = 0; i < W; i++) begin : g_slice
      smsd_adder_4in1 u_add (
        .p    (rows[2*r][i]),
        .q    (rows[2*r+1][i]),
        .cin  (c[i]),
        .s    (node[N/2 + r][i]),
        .cout (c[i+1])
      );
    end
  end

  // Levels II and beyond: TCSD + TCSD -> TCSD.
  for (genvar j = 2; j < N/2; j++) begin : g_upper
    sd_carry_t [W:0] c;
    assign c[0] = CARRY_ZERO;
    for (genvar i = 0; i < W; i++) begin : g_slice
      tcsd_adder u_add (
        .a    (node[2*j][i]),
        .b    (node[2*j+1][i]),
        .cin  (c[i]),
        .s    (node[j][i]),
        .cout (c[i+1])
      );
    end
  end

  assign sum_a = node[2];
  assign sum_b = node[3];

  initial begin
    assert (N >= 4 && (N & (N - 1)) == 0)
      else $error("ppr_tree: N must be a power of two, at least 4");
  end

endmodule
