// fp_mul: 27-bit floating-point multiplier, combinational.
//
// Multiplies the 19-bit mantissas (hidden one included) exactly, keeps the
// top 18 fraction bits (truncation) and adds the exponents. A zero operand
// gives zero; an exponent below 1 underflows to zero; an exponent above 255
// saturates to the largest magnitude (the original design does not guard
// overflow; this saturation is this implementation's choice).
module fp_mul
  import fp27_pkg::*;
(
  input  fp27_t a,
  input  fp27_t b,
  output fp27_t p
);
  logic [37:0] mprod;
  logic signed [10:0] e;
  always_comb begin
    mprod = {1'b1, a.frac} * {1'b1, b.frac};
    p = FP_ZERO;
    if (mprod[37]) e = 11'(a.exp) + 11'(b.exp) - 11'sd126;
    else           e = 11'(a.exp) + 11'(b.exp) - 11'sd127;
    if (a.exp == '0 || b.exp == '0 || e < 11'sd1) begin
      p = FP_ZERO;
    end else if (e > 11'sd255) begin
      p = FP_MAX;
      p.sign = a.sign ^ b.sign;
    end else begin
      p.sign = a.sign ^ b.sign;
      p.exp  = e[7:0];
      p.frac = mprod[37] ? mprod[36:19] : mprod[35:18];
    end
  end
endmodule
