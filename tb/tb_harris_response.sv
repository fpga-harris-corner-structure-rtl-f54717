// tb_harris_response: Harris response against the reference formula
// R = (Sxx/4)(Syy/4) - (Sxy/4)^2 - 0.04((Sxx+Syy)/4)^2 and against the
// expected sign: positive for a corner-like tensor (two large eigenvalues),
// negative for an edge-like one (one large eigenvalue), ~0 for flat.
module tb_harris_response;
  import harris_ref_pkg::*;
  logic signed [26:0] sxx, syy, sxy, r;
  int checks = 0, failures = 0;
  harris_response dut (.sxx, .syy, .sxy, .r);
  task automatic check(longint a, longint b, longint c);
    sxx = 27'(a); syy = 27'(b); sxy = 27'(c); #1;
    checks++;
    if (longint'(r) != response(longint'(sxx), longint'(syy), longint'(sxy))) begin
      failures++;
      $display("FAIL: R(%0d,%0d,%0d) = %0d, expected %0d", sxx, syy, sxy, r, response(sxx, syy, sxy));
    end
  endtask
  initial begin
    check(4 <<< 21, 4 <<< 21, 0);            // corner
    checks++; if (r <= 0) begin failures++; $display("FAIL: corner not positive"); end
    check(4 <<< 21, 0, 0);                   // edge
    checks++; if (r >= 0) begin failures++; $display("FAIL: edge not negative"); end
    check(0, 0, 0);
    checks++; if (r != 0) begin failures++; $display("FAIL: flat not zero"); end
    // corner: R = 1*1 - 0 - 0.04*4 = 0.84 (to Q6.21 truncation)
    check(4 <<< 21, 4 <<< 21, 0);
    checks++; if (r < 27'sd1761600 || r > 27'sd1761610) begin failures++; $display("FAIL: corner value %0d", r); end
    for (int i = 0; i < 3000; i++) check(longint'($urandom), longint'($urandom), longint'($urandom));
    for (int i = 0; i < 3000; i++)
      check(longint'($urandom_range(0, 1 << 24)), longint'($urandom_range(0, 1 << 24)),
            longint'($urandom_range(0, 1 << 24)) - (1 << 23));
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
