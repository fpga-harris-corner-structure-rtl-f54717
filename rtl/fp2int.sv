// fp2int: 27-bit float to 16-bit signed integer, combinational.
// Magnitudes below 1 give 0; magnitudes of 2^15 and above clip to +/-32767;
// in between, the mantissa is shifted left by (exp - 127) and its integer
// part taken (truncation toward zero), then negated for a negative input.
// The clipping limits follow the original design.
module fp2int
  import fp27_pkg::*;
(
  input  fp27_t              f,
  output logic signed [15:0] i
);
  logic [33:0] shifted;
  logic [15:0] mag;
  always_comb begin
    shifted = {15'b0, 1'b1, f.frac} << (f.exp - 8'd127);
    mag = shifted[33:18];
    if (f.exp < 8'd127)      i = '0;
    else if (f.exp > 8'd141) i = f.sign ? -16'sh7fff : 16'sh7fff;
    else                     i = f.sign ? -$signed(mag) : $signed(mag);
  end
endmodule
