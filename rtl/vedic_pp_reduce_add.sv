// vedic_pp_reduce_add: reduction of the 16 partial products to 7 numbers,
// and the addition of those 7 numbers into the 16-bit product.
//
// Reduction. Every partial product is 4 bits wide and its weight is an even
// power of two from 2^0 to 2^12. Products whose weights differ by 2^4 or more
// occupy disjoint bit ranges, so they are "added" by writing them side by
// side, at no cost in gates. The 16 products are packed into seven numbers
// (pp[i][j] = a-digit i x b-digit j; in brackets the p1..p16 name and the
// weight of the product):
//
//   X1 (16 bit, LSB 2^0): pp[3][3] p1 2^12 | pp[3][1] p3 2^8 | pp[2][0] p8 2^4 | pp[0][0] p16 2^0
//   X2 (12 bit, LSB 2^2): pp[3][2] p2 2^10 | pp[3][0] p4 2^6 | pp[1][0] p12 2^2
//   X3 (12 bit, LSB 2^2): pp[2][3] p5 2^10 | pp[2][1] p7 2^6 | pp[0][1] p15 2^2
//   X4 ( 8 bit, LSB 2^4): pp[2][2] p6 2^8  | pp[1][1] p11 2^4
//   X5 ( 8 bit, LSB 2^4): pp[1][3] p9 2^8  | pp[0][2] p14 2^4
//   X6 ( 4 bit, LSB 2^6): pp[1][2] p10 2^6
//   X7 ( 4 bit, LSB 2^6): pp[0][3] p13 2^6
//
// Addition. The equal-weight pairs are added first:
//   q1 = X2 + X3   (13 bits, weight 2^2)
//   q2 = X4 + X5   ( 9 bits, weight 2^4)
//   q3 = X6 + X7   ( 5 bits, weight 2^6)
// then product = X1 + q1*2^2 + q2*2^4 + q3*2^6, as two aligned additions
// (X1 + q1 and q2 + q3) and a last one of those two. For real partial
// products the result always fits in 16 bits; bits above are dropped.
//
// Ports: pp (4x4 array of 4-bit partial products) in, product (16 bits) out.
// Combinational. The grouping into X1..X7 and the pairing into q1..q3 follow
// the source design. Adding X1 in the last stage, the shape of that last
// stage, and leaving every adder to synthesis as a '+' are this design's
// choices.
module vedic_pp_reduce_add
  import vedic_pkg::*;
(
  input  pp_mat_t  pp,
  output product_t product
);

  // weights (as shifts) of X2/X3, X4/X5 and X6/X7
  localparam int unsigned X23_SHIFT = 2;
  localparam int unsigned X45_SHIFT = 4;
  localparam int unsigned X67_SHIFT = 6;

  reduced_t    x;     // the seven numbers after the reduction
  logic [12:0] q1;    // X2 + X3, weight 2^2
  logic [8:0]  q2;    // X4 + X5, weight 2^4
  logic [4:0]  q3;    // X6 + X7, weight 2^6
  product_t    s_lo;  // X1 and q1 aligned and added
  product_t    s_hi;  // q2 and q3 aligned and added

  // reduction: concatenation of products with disjoint bit ranges
  always_comb begin
    x.x1 = {pp[3][3], pp[3][1], pp[2][0], pp[0][0]};
    x.x2 = {pp[3][2], pp[3][0], pp[1][0]};
    x.x3 = {pp[2][3], pp[2][1], pp[0][1]};
    x.x4 = {pp[2][2], pp[1][1]};
    x.x5 = {pp[1][3], pp[0][2]};
    x.x6 = pp[1][2];
    x.x7 = pp[0][3];
  end

  // addition of the seven numbers
  always_comb begin
    q1      = 13'(x.x2) + 13'(x.x3);
    q2      = 9'(x.x4) + 9'(x.x5);
    q3      = 5'(x.x6) + 5'(x.x7);
    s_lo    = x.x1 + (PW'(q1) << X23_SHIFT);
    s_hi    = (PW'(q2) << X45_SHIFT) + (PW'(q3) << X67_SHIFT);
    product = s_lo + s_hi;
  end

endmodule
