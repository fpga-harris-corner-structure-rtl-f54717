// tb_mlab_20x32: fill all 20 words with random data, then random reads checked one
// edge later, with writes mixed in (to words not being read).
module tb_mlab_20x32;
  logic clk = 0, we = 0;
  logic [7:0] wa = 0, ra = 0, ra_d;
  logic [31:0] d = 0, q, model [20];
  int checks = 0, failures = 0;
  mlab_20x32 dut (.clock(clk), .wren(we), .writeaddr(wa), .readaddr(ra), .data(d), .q);
  always #5 clk = ~clk;
  initial begin
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); we = 1; wa = 8'(i); d = $urandom; model[i] = d;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (q != model[ra_d]) begin failures++; $display("FAIL: [%0d] = %h, expected %h", ra_d, q, model[ra_d]); end
      end
      ra = 8'($urandom_range(0, 19));
      we = (i % 3 == 0);
      do wa = 8'($urandom_range(0, 19)); while (wa == ra);
      d = $urandom;
      @(posedge clk);
      ra_d = ra;
      if (we) model[wa] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
