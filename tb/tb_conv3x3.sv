// tb_conv3x3: the convolver with the three kernels of the detector (Gx, Gy,
// Gaussian) and with random kernels, against the reference in harris_ref_pkg.
// Also checks the sign convention on a horizontal and a vertical ramp.
module tb_conv3x3;
  import harris_ref_pkg::*;
  import harris_pkg::*;
  fx_t win [9], kern [9], sum;
  longint lw [9];
  int checks = 0, failures = 0;
  conv3x3 dut (.win, .kern, .sum);

  function automatic longint ref_conv_any(longint k [9], longint w [9]);
    longint s = 0;
    for (int r = 0; r < 3; r++)
      s = wrap27(s + wrap27(fxm(k[3*r], w[3*r]) + fxm(k[3*r+1], w[3*r+1]) + fxm(k[3*r+2], w[3*r+2])));
    return s;
  endfunction

  task automatic check(longint expected, string what);
    #1;
    checks++;
    if (longint'(sum) != expected) begin
      failures++;
      $display("FAIL: %s: %0d, expected %0d", what, sum, expected);
    end
  endtask

  initial begin
    longint lk [9];
    // ramp increasing to the right: positive Ix, zero Iy
    for (int n = 0; n < 9; n++) begin win[n] = fx_t'((n % 3) <<< 20); lw[n] = win[n]; end
    for (int n = 0; n < 9; n++) kern[n] = fx_t'(kern_tap(0, n));
    check(conv(0, lw), "Gx on x ramp");
    checks++; if (sum <= 0) begin failures++; $display("FAIL: Gx of x ramp not positive"); end
    for (int n = 0; n < 9; n++) kern[n] = fx_t'(kern_tap(1, n));
    check(0, "Gy on x ramp");
    for (int i = 0; i < 500; i++) begin
      for (int n = 0; n < 9; n++) begin win[n] = fx_t'($urandom_range(0, 1 << 22)) - fx_t'(1 << 21); lw[n] = win[n]; end
      for (int kind = 0; kind < 3; kind++) begin
        for (int n = 0; n < 9; n++) kern[n] = fx_t'(kern_tap(kind, n));
        check(conv(kind, lw), "detector kernel");
      end
      for (int n = 0; n < 9; n++) begin kern[n] = fx_t'($urandom); lk[n] = kern[n]; end
      for (int n = 0; n < 9; n++) begin win[n] = fx_t'($urandom); lw[n] = win[n]; end
      check(ref_conv_any(lk, lw), "random kernel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
