// tb_fx_mult: random and corner-value check of the Q6.21 multiplier against
// a 64-bit integer model (product >> 21, wrapped to 27 bits).
module tb_fx_mult;
  import harris_ref_pkg::*;
  logic signed [26:0] a, b, out;
  int checks = 0, failures = 0;
  fx_mult dut (.a, .b, .out);
  task automatic check(longint x, longint y);
    a = 27'(x); b = 27'(y); #1;
    checks++;
    if (longint'(out) != fxm(longint'(a), longint'(b))) begin
      failures++;
      $display("FAIL: %0d * %0d -> %0d, expected %0d", a, b, out, fxm(a, b));
    end
  endtask
  initial begin
    check(64'sd2097152, 64'sd2097152);       // 1 * 1
    check(-64'sd2097152, 64'sd1048576);      // -1 * 0.5
    check(64'sd3, 64'sd1);                   // tiny positive truncates to 0
    check(-64'sd3, 64'sd1);                  // tiny negative truncates to -1 LSB
    check(64'sd771500, -64'sd1271986);
    for (int i = 0; i < 2000; i++) check(longint'($urandom), longint'($urandom));
    for (int i = 0; i < 2000; i++)
      check(longint'($urandom_range(0, 1 << 23)) - (1 << 22), longint'($urandom_range(0, 1 << 23)) - (1 << 22));
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
