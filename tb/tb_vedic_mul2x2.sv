// tb_vedic_mul2x2: exhaustive self-checking test of the 2x2 multiplier.
// All 16 operand pairs are applied and the 4-bit result is compared with
// the integer product. The block is combinational, so each check samples
// the output 1 ns after the inputs change.
module tb_vedic_mul2x2;
  import vedic_pkg::*;

  digit_t a, b;
  pp_t    p;
  int     checks = 0;
  int     failures = 0;

  vedic_mul2x2 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = digit_t'(i);
        b = digit_t'(j);
        #1;
        checks++;
        if (int'(p) !== i * j) begin
          failures++;
          $display("FAIL %0d x %0d: got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
