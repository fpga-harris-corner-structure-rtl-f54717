// int2fp: 16-bit signed integer to 27-bit float, combinational.
// Takes the magnitude, finds its leading one to set the exponent
// (127 + bit position) and left-aligns the remaining bits into the fraction
// (exact: a 16-bit integer has at most 15 bits below its leading one).
// Zero gives the zero encoding.
module int2fp
  import fp27_pkg::*;
(
  input  logic signed [15:0] i,
  output fp27_t              f
);
  logic [15:0] mag;
  logic [3:0]  lead;
  logic [33:0] aligned;
  always_comb begin
    mag = i[15] ? 16'(-i) : 16'(i);
    lead = '0;
    for (int k = 0; k < 16; k++) if (mag[k]) lead = 4'(k);
    aligned = {18'b0, mag} << (5'd18 - 5'(lead));
    f = FP_ZERO;
    if (i != '0) begin
      f.sign = i[15];
      f.exp  = 8'd127 + 8'(lead);
      f.frac = aligned[17:0];
    end
  end
endmodule
