// tb_fp_shift: scaling by 2^shift for random shifts of both signs; results
// whose exponent leaves 1..255, and zero inputs, must give zero.
module tb_fp_shift;
  import fp_ref_pkg::*;
  import fp27_pkg::*;
  fp27_t a, y;
  logic signed [7:0] shift;
  int checks = 0, failures = 0;
  fp_shift dut (.a, .shift, .y);
  initial begin
    for (int k = 0; k < 5000; k++) begin
      real ex;
      int e;
      a = rand_fp(1, 255);
      if (k % 50 == 0) a = FP_ZERO;
      shift = 8'($urandom);
      e = int'(a.exp) + int'(shift);
      ex = (a.exp == 0 || e < 1 || e > 255) ? 0.0 : to_real(a) * pow2(int'(shift));
      #1;
      checks++;
      if (to_real(y) != ex) begin
        failures++;
        if (failures < 10) $display("FAIL: %g << %0d = %g, expected %g", to_real(a), shift, to_real(y), ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
