// sd_to_bcd_converter: final adder of the multiplier. Adds the two TCSD rows
// left by the reduction tree and delivers the product in BCD.
//
// It merges the last 2:1 reduction with the conversion to BCD, as a hybrid adder
// with two TCSD inputs and a BCD output. First a row of tcsd_adder slices adds the
// two rows carry-free, leaving one signed-digit row d_i in [-7,7]. Then a borrow
// chain turns it into BCD: a negative digit (after its incoming borrow) generates
// a borrow, a zero digit passes an incoming borrow on, and each digit becomes
// d_i - b_i + 10*b_(i+1), in [0,9]. The merged adder follows the multiplier's
// description; its insides (slice row plus borrow chain, written as a ripple that
// synthesis can restructure) are this design's choice. The borrow out of the top
// digit is dropped: the result is the sum modulo 10^(2N), which is the product
// itself because an N x N digit product is below 10^(2N).
//
// Interface: a, b TCSD rows of 2N digits; p 2N BCD digits, digit i in
// p[4i+3:4i]. Combinational.
module sd_to_bcd_converter
  import dec_mult_pkg::*;
#(
  parameter int N = 16
) (
  input  tcsd_t [2*N-1:0] a,
  input  tcsd_t [2*N-1:0] b,
  output logic [8*N-1:0]  p
);

  localparam int W = 2 * N;

  sd_carry_t [W:0]   c;
  tcsd_t     [W-1:0] d;
  logic      [W:0]   borrow;

  // Carry-free addition of the two rows.
  assign c[0] = CARRY_ZERO;
  for (genvar i = 0; i < W; i++) begin : g_add
    tcsd_adder u_add (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (c[i]),
      .s    (d[i]),
      .cout (c[i+1])
    );
  end

  // Borrow chain from signed digits to BCD.
  assign borrow[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_conv
    logic signed [4:0] e;
    assign e           = 5'(d[i]) - $signed({4'b0000, borrow[i]});
    assign borrow[i+1] = e[4];
    assign p[4*i +: 4] = e[4] ? 4'(e + 5'sd10) : e[3:0];
  end

endmodule
