// tb_fp_negate: -x for random x, and zero stays the positive zero.
module tb_fp_negate;
  import fp_ref_pkg::*;
  import fp27_pkg::*;
  fp27_t a, y;
  int checks = 0, failures = 0;
  fp_negate dut (.a, .y);
  initial begin
    for (int k = 0; k < 3000; k++) begin
      a = rand_fp(1, 255);
      #1;
      checks++;
      if (to_real(y) != -to_real(a)) begin failures++; $display("FAIL: -(%g) = %g", to_real(a), to_real(y)); end
    end
    a = FP_ZERO; #1; checks++; if (y != FP_ZERO) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
