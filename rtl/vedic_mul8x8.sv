// vedic_mul8x8: unsigned 8x8 multiplier after the vertically-and-crosswise
// (Urdhava Tiryakbhyam) method, with 2x2 multipliers as partial product
// generators and a reduction of the 16 partial products to 7 numbers.
//
// Two combinational stages:
//   1. vedic_pp_gen        - 16 parallel 2x2 multipliers, one per digit pair
//   2. vedic_pp_reduce_add - packs the 16 products into seven numbers X1..X7
//                            by concatenation, forms q1 = X2+X3, q2 = X4+X5,
//                            q3 = X6+X7, then the aligned sum X1+q1+q2+q3
//
// Ports: a, b (8 bits, unsigned), product = a*b (16 bits). There are no
// registers and no clock: the product settles one combinational delay after
// the operands change. The structure follows the source design; unsigned
// operands and the purely combinational interface are this design's reading.
module vedic_mul8x8
  import vedic_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t product
);

  pp_mat_t  pp;

  vedic_pp_gen u_gen (
    .a  (a),
    .b  (b),
    .pp (pp)
  );

  vedic_pp_reduce_add u_reduce_add (
    .pp      (pp),
    .product (product)
  );

endmodule
