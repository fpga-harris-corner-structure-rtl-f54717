// conv3x3: 3x3 multiply-accumulate of a pixel window with a kernel.
//
// Nine fx_mult products (each truncated to Q6.21) are summed by a two-level
// tree of add3 units: one add3 per window row, then one add3 over the three
// row sums. Fully combinational; the caller registers the window.
// Interface: win[n] and kern[n], n = 3*row + col, row 0 on top.
module conv3x3
  import harris_pkg::*;
(
  input  fx_t win  [9],
  input  fx_t kern [9],
  output fx_t sum
);
  fx_t prod [9];
  fx_t row_sum [3];

  for (genvar n = 0; n < 9; n++) begin : g_mult
    fx_mult u_mult (.a(kern[n]), .b(win[n]), .out(prod[n]));
  end
  for (genvar r = 0; r < 3; r++) begin : g_row
    add3 u_row (.a(prod[3*r]), .b(prod[3*r+1]), .c(prod[3*r+2]), .out(row_sum[r]));
  end
  add3 u_total (.a(row_sum[0]), .b(row_sum[1]), .c(row_sum[2]), .out(sum));
endmodule
