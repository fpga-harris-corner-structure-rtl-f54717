// fp_negate: sign change of a 27-bit float (inverts the sign bit).
// Combinational. Zero maps to zero rather than to a negative zero.
module fp_negate
  import fp27_pkg::*;
(
  input  fp27_t a,
  output fp27_t y
);
  always_comb begin
    y = a;
    y.sign = (a.exp == '0) ? 1'b0 : ~a.sign;
  end
endmodule
