// tb_fp_mul: random products compared with real arithmetic (the result may
// be below the exact product by less than 2^-17 relative, from truncation),
// plus zero operands, underflow and overflow.
module tb_fp_mul;
  import fp_ref_pkg::*;
  import fp27_pkg::*;
  fp27_t a, b, p;
  int checks = 0, failures = 0;
  fp_mul dut (.a, .b, .p);
  task automatic check_close();
    real ex;
    ex = to_real(a) * to_real(b);
    #1;
    checks++;
    if (fabs(to_real(p) - ex) > fabs(ex) * pow2(-17) || (ex != 0.0 && p.sign != (ex < 0.0))) begin
      failures++;
      $display("FAIL: %g * %g = %g, expected %g", to_real(a), to_real(b), to_real(p), ex);
    end
  endtask
  initial begin
    a = '{1'b0, 8'd127, 18'h0}; b = '{1'b1, 8'd128, 18'h20000}; check_close();   // 1 * -3
    for (int i = 0; i < 5000; i++) begin a = rand_fp(64, 190); b = rand_fp(64, 190); check_close(); end
    a = FP_ZERO; b = rand_fp(100, 150); #1; checks++; if (p != FP_ZERO) failures++;
    a = rand_fp(100, 150); b = FP_ZERO; #1; checks++; if (p != FP_ZERO) failures++;
    a = '{1'b0, 8'd10, 18'h0}; b = '{1'b0, 8'd20, 18'h0}; #1; checks++; if (p != FP_ZERO) failures++;
    a = '{1'b0, 8'd250, 18'h0}; b = '{1'b1, 8'd200, 18'h0}; #1; checks++;
    if (p.exp != 8'd255 || !p.sign) begin failures++; $display("FAIL: overflow %h", p); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
