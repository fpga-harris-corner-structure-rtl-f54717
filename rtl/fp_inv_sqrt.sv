// fp_inv_sqrt: 27-bit floating-point 1/sqrt(x), five-stage pipeline.
//
// The classic fast inverse square root: an initial estimate
// y0 = MAGIC - (bits(x) >> 1), MAGIC = 49920718 (0x5F3759DF cut to the
// 27-bit format), refined by one Newton step y1 = y0 * (1.5 - (x/2) * y0^2).
// Pipeline: [y0, x/2] -> reg -> y0^2 -> reg -> (x/2) y0^2 -> reg ->
// fp_add 1.5 - ... (2 stages) -> y0 * (...) combinational at the output.
// y0 travels alongside in a delay line so that every stage works on the
// same input (streaming one input per clock). Latency: the result for the
// input applied before edge n is on y after edge n+4 (valid in the fifth
// cycle). Relative error of one Newton step is below 0.2 %. The method,
// magic number and stage count follow the original design; the delay-line
// alignment is this implementation's.
module fp_inv_sqrt
  import fp27_pkg::*;
(
  input  logic  clk,
  input  fp27_t x,
  output fp27_t y
);
  fp27_t y0, hx;
  always_comb begin
    y0 = fp27_t'(INV_SQRT_MAGIC - (27'(x) >> 1));
    hx = x;
    hx.exp = (x.exp == '0) ? '0 : x.exp - 8'd1;
  end

  fp27_t y0_1, hx_1, y0_2, hx_2, sq_2, y0_3, t_3, y0_4, y0_5;
  fp27_t sq, t, corr, neg_t;

  fp_mul u_sq (.a(y0_1), .b(y0_1), .p(sq));
  fp_mul u_t  (.a(hx_2), .b(sq_2), .p(t));
  always_comb begin
    neg_t = t_3;
    neg_t.sign = ~t_3.sign;
  end
  fp_add u_corr (.clk, .a(FP_ONE_HALF_3), .b(neg_t), .s(corr));
  fp_mul u_out (.a(y0_5), .b(corr), .p(y));

  always_ff @(posedge clk) begin
    y0_1 <= y0;   hx_1 <= hx;
    y0_2 <= y0_1; hx_2 <= hx_1; sq_2 <= sq;
    y0_3 <= y0_2; t_3 <= t;
    y0_4 <= y0_3;
    y0_5 <= y0_4;
  end
endmodule
