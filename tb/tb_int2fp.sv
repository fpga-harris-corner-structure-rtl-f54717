// tb_int2fp: every 16-bit integer converts exactly.
module tb_int2fp;
  import fp_ref_pkg::*;
  import fp27_pkg::*;
  logic signed [15:0] i;
  fp27_t f;
  int checks = 0, failures = 0;
  int2fp dut (.i, .f);
  initial begin
    for (int k = -32768; k < 32768; k++) begin
      i = 16'(k); #1;
      checks++;
      if (to_real(f) != real'(k) || (k == 0 && f != FP_ZERO)) begin
        failures++;
        if (failures < 10) $display("FAIL: %0d -> %g", k, to_real(f));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
