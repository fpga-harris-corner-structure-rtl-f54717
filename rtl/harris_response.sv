// harris_response: Harris corner response from the smoothed structure tensor
//   M = [Sxx Sxy; Sxy Syy],  R = det(M) - k * trace(M)^2.
//
// To keep the products inside the Q6.21 range every tensor entry (and the
// trace) is divided by 4 with an arithmetic shift before it is multiplied,
// so the output is R/16. k = 0.04. Combinational; four fx_mult instances.
module harris_response
  import harris_pkg::*;
(
  input  fx_t sxx,
  input  fx_t syy,
  input  fx_t sxy,
  output fx_t r
);
  fx_t xx_q, yy_q, xy_q, tr_q;
  fx_t det_a, det_b, tr_sq, k_tr_sq;

  always_comb begin
    xx_q = sxx >>> 2;
    yy_q = syy >>> 2;
    xy_q = sxy >>> 2;
    tr_q = fx_t'(sxx + syy) >>> 2;
  end

  fx_mult u_det_a (.a(xx_q), .b(yy_q), .out(det_a));
  fx_mult u_det_b (.a(xy_q), .b(xy_q), .out(det_b));
  fx_mult u_tr_sq (.a(tr_q), .b(tr_q), .out(tr_sq));
  fx_mult u_k_tr  (.a(K_HARRIS), .b(tr_sq), .out(k_tr_sq));

  assign r = det_a - det_b - k_tr_sq;
endmodule
