// fp_shift: multiplies a 27-bit float by 2^shift by adding the signed 8-bit
// shift to the exponent (a negative shift divides). Combinational. Zero
// stays zero; an exponent that would leave 1..255 gives zero, as the
// original design's notes call for (its own code leaves this out).
module fp_shift
  import fp27_pkg::*;
(
  input  fp27_t             a,
  input  logic signed [7:0] shift,
  output fp27_t             y
);
  logic signed [9:0] e;
  always_comb begin
    e = 10'(a.exp) + 10'(shift);
    y = a;
    if (a.exp == '0 || e < 10'sd1 || e > 10'sd255) y = FP_ZERO;
    else y.exp = e[7:0];
  end
endmodule
