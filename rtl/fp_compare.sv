// fp_compare: a_ge_b = 1 when float a >= float b, combinational.
// Signs decide first; for equal signs the exponent-and-fraction magnitudes
// are compared, the order reversed for two negative numbers. Zeros of
// either sign compare equal.
module fp_compare
  import fp27_pkg::*;
(
  input  fp27_t a,
  input  fp27_t b,
  output logic  a_ge_b
);
  logic a_zero, b_zero, mag_ge, mag_eq;
  always_comb begin
    a_zero = (a.exp == '0);
    b_zero = (b.exp == '0);
    mag_ge = {a.exp, a.frac} >= {b.exp, b.frac};
    mag_eq = {a.exp, a.frac} == {b.exp, b.frac};
    if (a_zero && b_zero)               a_ge_b = 1'b1;
    else if (a_zero)                    a_ge_b = b.sign;
    else if (b_zero)                    a_ge_b = !a.sign;
    else if (!a.sign && b.sign)         a_ge_b = 1'b1;
    else if (a.sign && !b.sign)         a_ge_b = 1'b0;
    else if (!a.sign)                   a_ge_b = mag_ge;
    else                                a_ge_b = !mag_ge || mag_eq;
  end
endmodule
