// bcd_adder: DIGITS-digit BCD adder with carry in and carry out, used to combine
// the sub-products of the 32-digit multiplier.
//
// Digit by digit, the 5-bit binary sum of two BCD digits and the incoming carry
// is corrected by +6 when it exceeds 9, which also produces the carry into the
// next digit (a ripple chain). Adders in this position are only drawn, not
// described, so width, carry structure and correction scheme are this design's
// choice.
//
// Interface: a, b, s are DIGITS BCD digits (digit i in bits 4i+3:4i); cin and
// cout are the decimal carries. Combinational.
module bcd_adder #(
  parameter int DIGITS = 32
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  input  logic                cin,
  output logic [4*DIGITS-1:0] s,
  output logic                cout
);

  logic [DIGITS:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    logic [4:0] bin;
    logic [4:0] corr;
    assign bin      = {1'b0, a[4*i +: 4]} + {1'b0, b[4*i +: 4]} + {4'b0, c[i]};
    assign c[i+1]   = (bin > 5'd9);
    assign corr     = c[i+1] ? bin + 5'd6 : bin;
    assign s[4*i +: 4] = corr[3:0];
  end
  assign cout = c[DIGITS];

endmodule
