// vedic_pp_gen: partial product generator of the 8x8 multiplier.
//
// Splits a and b into four 2-bit digits each and multiplies every a-digit
// with every b-digit in its own 2x2 multiplier, so 16 multipliers work in
// parallel. pp[i][j] = a(2i+1,2i) * b(2j+1,2j), weight 2^(2(i+j)) in the
// final product (see vedic_pkg for the p1..p16 numbering).
//
// Ports: a, b (8 bits), pp (4x4 array of 4-bit products). Combinational.
// The 16-block structure follows the source design.
module vedic_pp_gen
  import vedic_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output pp_mat_t  pp
);

  for (genvar i = 0; i < DIGITS; i++) begin : g_a
    for (genvar j = 0; j < DIGITS; j++) begin : g_b
      vedic_mul2x2 u_mul (
        .a (a[2*i +: 2]),
        .b (b[2*j +: 2]),
        .p (pp[i][j])
      );
    end
  end

endmodule
