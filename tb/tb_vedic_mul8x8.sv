// tb_vedic_mul8x8: exhaustive end-to-end test of the 8x8 multiplier at its
// only size. Applies all 65536 operand pairs and compares the product with
// a*b computed in the testbench. Along the way it counts how often each
// mechanism of the design is exercised and fails if one never is:
//   - a 2x2 multiplier producing its largest value 3*3 = 9 (both half
//     adders active), seen on every one of the 16 blocks;
//   - the reduction packing four non-zero products into X1;
//   - a carry out of each pairwise sum q1 = X2+X3, q2 = X4+X5, q3 = X6+X7.
module tb_vedic_mul8x8;
  import vedic_pkg::*;

  operand_t a, b;
  product_t product;
  int       checks = 0;
  int       failures = 0;
  int       max_pp [4][4];
  int       pp [4][4];
  int       x1_full = 0, carry_q1 = 0, carry_q2 = 0, carry_q3 = 0;

  vedic_mul8x8 dut (.a(a), .b(b), .product(product));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (max_pp[i, j]) max_pp[i][j] = 0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = operand_t'(i);
        b = operand_t'(j);
        #1;
        checks++;
        if (int'(product) !== i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d x %0d = %0d, got %0d", i, j, i * j, product);
        end
        // partial products and reduced numbers, recomputed here
        for (int u = 0; u < 4; u++)
          for (int v = 0; v < 4; v++) begin
            pp[u][v] = ((i >> (2 * u)) % 4) * ((j >> (2 * v)) % 4);
            if (pp[u][v] == 9) max_pp[u][v]++;
          end
        if (pp[3][3] != 0 && pp[3][1] != 0 && pp[2][0] != 0 && pp[0][0] != 0)
          x1_full++;
        if (pp[3][2] * 256 + pp[3][0] * 16 + pp[1][0]
          + pp[2][3] * 256 + pp[2][1] * 16 + pp[0][1] > 4095) carry_q1++;
        if (pp[2][2] * 16 + pp[1][1] + pp[1][3] * 16 + pp[0][2] > 255) carry_q2++;
        if (pp[1][2] + pp[0][3] > 15) carry_q3++;
      end
    end
    $display("X1 fully packed=%0d carries out of q1=%0d q2=%0d q3=%0d",
             x1_full, carry_q1, carry_q2, carry_q3);
    foreach (max_pp[i, j])
      if (max_pp[i][j] == 0) begin
        failures++;
        $display("2x2 block [%0d][%0d] never produced 9", i, j);
      end
    if (x1_full == 0 || carry_q1 == 0 || carry_q2 == 0 || carry_q3 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
