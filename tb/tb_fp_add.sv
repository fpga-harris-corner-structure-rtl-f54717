// tb_fp_add: streams a random operand pair every clock into the two-stage
// adder and checks each sum two edges later against real arithmetic (error
// below 2^-17 of the larger operand), including cancellations, operands of
// very different size and zero operands.
module tb_fp_add;
  import fp_ref_pkg::*;
  import fp27_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  fp27_t a, b, s;
  int checks = 0, failures = 0;
  fp_add dut (.clk, .a, .b, .s);
  fp27_t qa [$], qb [$];
  initial begin
    a = FP_ZERO; b = FP_ZERO;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (qa.size() == 2) begin
        fp27_t xa, xb;
        real ex, tol;
        xa = qa.pop_front();
        xb = qb.pop_front();
        ex = to_real(xa) + to_real(xb);
        tol = (fabs(to_real(xa)) > fabs(to_real(xb)) ? fabs(to_real(xa)) : fabs(to_real(xb))) * pow2(-17);
        checks++;
        if (fabs(to_real(s) - ex) > tol) begin
          failures++;
          if (failures < 10) $display("FAIL: %g + %g = %g, expected %g", to_real(xa), to_real(xb), to_real(s), ex);
        end
      end
      case (i % 6)
        0: begin a = rand_fp(120, 135); b = rand_fp(120, 135); end
        1: begin a = rand_fp(127, 127); b = a; b.sign = ~a.sign; end            // exact cancel
        2: begin a = rand_fp(127, 127); b = a; b.sign = ~a.sign; b.frac = a.frac ^ 18'h1; end
        3: begin a = rand_fp(100, 160); b = rand_fp(100, 160); end
        4: begin a = rand_fp(120, 135); b = FP_ZERO; end
        default: begin a = FP_ZERO; b = rand_fp(120, 135); end
      endcase
      qa.push_back(a); qb.push_back(b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
