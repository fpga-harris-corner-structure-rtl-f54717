// tb_fp_compare: a >= b for random pairs (wide and narrow exponent ranges,
// equal values, opposite signs, zeros) against real comparison.
module tb_fp_compare;
  import fp_ref_pkg::*;
  import fp27_pkg::*;
  fp27_t a, b;
  logic a_ge_b;
  int checks = 0, failures = 0;
  fp_compare dut (.a, .b, .a_ge_b);
  initial begin
    for (int k = 0; k < 8000; k++) begin
      case (k % 5)
        0: begin a = rand_fp(1, 255); b = rand_fp(1, 255); end
        1: begin a = rand_fp(127, 128); b = rand_fp(127, 128); end
        2: begin a = rand_fp(127, 128); b = a; end
        3: begin a = rand_fp(127, 128); b = a; b.frac = a.frac + 18'd1; end
        default: begin a = (k % 2) ? FP_ZERO : rand_fp(120, 130); b = (k % 3) ? FP_ZERO : rand_fp(120, 130); end
      endcase
      #1;
      checks++;
      if (a_ge_b != (to_real(a) >= to_real(b))) begin
        failures++;
        if (failures < 10) $display("FAIL: %g >= %g gave %b", to_real(a), to_real(b), a_ge_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
