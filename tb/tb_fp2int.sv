// tb_fp2int: random floats from 2^-30 to 2^36 against truncation toward
// zero with clipping to +/-32767.
module tb_fp2int;
  import fp_ref_pkg::*;
  import fp27_pkg::*;
  fp27_t f;
  logic signed [15:0] i;
  int checks = 0, failures = 0;
  fp2int dut (.f, .i);
  initial begin
    for (int k = 0; k < 20000; k++) begin
      real v;
      int ex;
      f = rand_fp(97, 163);
      if (k == 0) f = FP_ZERO;
      v = to_real(f);
      if (v >= 32767.0) ex = 32767;
      else if (v <= -32767.0) ex = -32767;
      else ex = (v < 0.0) ? -int'($floor(-v)) : int'($floor(v));
      #1;
      checks++;
      if (int'(i) != ex) begin
        failures++;
        if (failures < 10) $display("FAIL: %g -> %0d, expected %0d", v, i, ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
