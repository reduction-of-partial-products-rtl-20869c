// tb_vedic_pp_gen: self-checking test of the partial product generator.
// Applies corner operands and random ones and checks each of the 16 outputs
// pp[i][j] against the product of a-digit i and b-digit j, extracted in the
// testbench by shifting and masking the integer operands.
module tb_vedic_pp_gen;
  import vedic_pkg::*;

  operand_t a, b;
  pp_mat_t  pp;
  int       checks = 0;
  int       failures = 0;

  vedic_pp_gen dut (.a(a), .b(b), .pp(pp));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int unsigned av, input int unsigned bv);
    int unsigned ai, bj;
    a = operand_t'(av);
    b = operand_t'(bv);
    #1;
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        ai = (av >> (2 * i)) % 4;
        bj = (bv >> (2 * j)) % 4;
        checks++;
        if (int'(pp[i][j]) !== int'(ai * bj)) begin
          failures++;
          $display("FAIL a=%0d b=%0d pp[%0d][%0d]=%0d expected %0d",
                   av, bv, i, j, pp[i][j], ai * bj);
        end
      end
    end
  endtask

  initial begin
    apply(0, 0);
    apply(255, 255);
    apply(8'hAA, 8'h55);
    apply(8'h1B, 8'hE4);
    for (int k = 0; k < 2000; k++) apply($urandom % 256, $urandom % 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
