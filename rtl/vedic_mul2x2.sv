// vedic_mul2x2: 2x2-bit unsigned multiplier, the basic building block of the
// 8x8 multiplier.
//
// Vertically and crosswise on two binary digits: the vertical products
// a0*b0 and a1*b1 give the outer columns, the two crosswise products a1*b0
// and a0*b1 are added in the middle column. That is four AND gates and two
// half adders: the first half adder sums the crosswise terms, the second
// adds its carry to a1*b1.
//
// Ports: a, b (2 bits each), p = a*b (4 bits). Purely combinational.
// The gate-level form (AND gates plus half adders) is this design's choice;
// the source only asks for a 2x2 multiplier.
module vedic_mul2x2
  import vedic_pkg::*;
(
  input  digit_t a,
  input  digit_t b,
  output pp_t    p
);

  logic v0, v1, c0, c1;  // vertical and crosswise bit products
  logic ha1_c;           // carry of the crosswise half adder

  always_comb begin
    v0 = a[0] & b[0];
    v1 = a[1] & b[1];
    c0 = a[1] & b[0];
    c1 = a[0] & b[1];
    ha1_c = c0 & c1;
    p[0]  = v0;
    p[1]  = c0 ^ c1;
    p[2]  = v1 ^ ha1_c;
    p[3]  = v1 & ha1_c;
  end

endmodule
