// tb_add3: three-input adder against a 64-bit model wrapped to 27 bits.
module tb_add3;
  import harris_ref_pkg::*;
  logic signed [26:0] a, b, c, out;
  int checks = 0, failures = 0;
  add3 dut (.a, .b, .c, .out);
  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = 27'($urandom); b = 27'($urandom); c = 27'($urandom);
      if (i < 5) begin a = 27'(i); b = -27'sd7; c = 27'sd2; end
      #1;
      checks++;
      if (longint'(out) != wrap27(longint'(a) + longint'(b) + longint'(c))) begin
        failures++;
        $display("FAIL: %0d + %0d + %0d -> %0d", a, b, c, out);
      end
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
