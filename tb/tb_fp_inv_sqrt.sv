// tb_fp_inv_sqrt: streams a new positive input every clock and checks each
// output five cycles later (four edges after the one that takes the input)
// against 1/sqrt(x); one Newton step keeps the relative error below 0.2 %.
module tb_fp_inv_sqrt;
  import fp_ref_pkg::*;
  import fp27_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  fp27_t x, y;
  int checks = 0, failures = 0;
  fp_inv_sqrt dut (.clk, .x, .y);
  fp27_t hist [$];
  initial begin
    x = '{1'b0, 8'd127, 18'h0};
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // hist[0] was applied before the edge four edges ago
      if (hist.size() == 5) begin
        fp27_t xi;
        real ex;
        xi = hist.pop_front();
        ex = 1.0 / $sqrt(to_real(xi));
        checks++;
        if (fabs(to_real(y) - ex) > 0.002 * ex) begin
          failures++;
          if (failures < 10) $display("FAIL: invsqrt(%g) = %g, expected %g", to_real(xi), to_real(y), ex);
        end
      end
      x = rand_fp(90, 164);
      x.sign = 1'b0;
      if (i == 7) x = '{1'b0, 8'd129, 18'h0};   // 4 -> 0.5
      hist.push_back(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
