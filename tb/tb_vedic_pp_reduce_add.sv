// tb_vedic_pp_reduce_add: self-checking test of the reduction and addition
// stage. Drives random 4-bit values on all 16 partial products (not only
// values a 2x2 multiplier can give) and checks the 16-bit result against
// the sum of pp[i][j] * 2^(2(i+j)) modulo 2^16. With arbitrary values, any
// product placed at the wrong weight in X1..X7 changes the sum. It also
// counts, from the inputs, how often each pairwise sum q1 = X2+X3,
// q2 = X4+X5 and q3 = X6+X7 carries out of its operand width (so that the
// extra sum bit matters), and fails if one never does.
module tb_vedic_pp_reduce_add;
  import vedic_pkg::*;

  pp_mat_t  pp;
  product_t product;
  int       checks = 0;
  int       failures = 0;
  int       carry_q1 = 0, carry_q2 = 0, carry_q3 = 0;

  vedic_pp_reduce_add dut (.pp(pp), .product(product));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned want;
  int unsigned     s23, s45, s67;

  initial begin
    for (int k = 0; k < 5000; k++) begin
      want = 0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          if (k == 0)      pp[i][j] = 4'h9;  // largest real partial product
          else if (k == 1) pp[i][j] = 4'hF;
          else if (k == 2) pp[i][j] = 4'h0;
          else             pp[i][j] = pp_t'($urandom);
          want += longint'(pp[i][j]) << (2 * (i + j));
        end
      #1;
      checks++;
      if (longint'(product) !== want % 65536) begin
        failures++;
        if (failures < 10) $display("FAIL got %0d expected %0d", product, want % 65536);
      end
      // pairwise sums, from the placement of the products in X2..X7
      s23 = 256 * (int'(pp[3][2]) + int'(pp[2][3])) + 16 * (int'(pp[3][0]) + int'(pp[2][1]))
          + int'(pp[1][0]) + int'(pp[0][1]);
      s45 = 16 * (int'(pp[2][2]) + int'(pp[1][3])) + int'(pp[1][1]) + int'(pp[0][2]);
      s67 = int'(pp[1][2]) + int'(pp[0][3]);
      if (s23 > 4095) carry_q1++;
      if (s45 > 255)  carry_q2++;
      if (s67 > 15)   carry_q3++;
    end
    $display("carries out of q1=%0d q2=%0d q3=%0d", carry_q1, carry_q2, carry_q3);
    if (carry_q1 == 0 || carry_q2 == 0 || carry_q3 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
