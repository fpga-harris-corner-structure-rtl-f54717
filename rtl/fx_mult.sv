// fx_mult: signed Q6.21 x Q6.21 -> Q6.21 multiplier (combinational).
//
// The full 54-bit product is Q12.42; the result is product bits [47:21],
// i.e. the fraction is truncated toward minus infinity and integer bits
// above the Q6.21 range wrap. This is the slice the original design keeps.
// One instance maps to one 27x27 DSP multiplier.
module fx_mult
  import harris_pkg::*;
(
  input  fx_t a,
  input  fx_t b,
  output fx_t out
);
  logic signed [2*DW-1:0] prod;
  always_comb begin
    prod = a * b;
    out  = prod[FRAC+DW-1:FRAC];
  end
endmodule
