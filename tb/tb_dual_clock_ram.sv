// tb_dual_clock_ram: writes random words at random addresses and reads
// them back, checking the two-edge read latency (address registered, then
// data registered) and that a write-disabled cycle leaves memory unchanged.
module tb_dual_clock_ram;
  localparam int DEPTH = 1024, AW = 11;
  logic clk = 0, we = 0;
  logic [AW-1:0] wa = '0, ra = '0;
  logic signed [26:0] d = '0, q;
  logic signed [26:0] model [DEPTH];
  int checks = 0, failures = 0;
  dual_clock_ram dut (.clk1(clk), .clk2(clk), .we, .write_address(wa), .read_address(ra), .d, .q);
  always #5 clk = ~clk;

  // expected q: the word addressed two edges earlier
  logic [AW-1:0] ra_d1, ra_d2;
  logic valid_d1 = 0, valid_d2 = 0, rd_en = 0;
  always @(posedge clk) begin
    ra_d1 <= ra; ra_d2 <= ra_d1;
    valid_d1 <= rd_en; valid_d2 <= valid_d1;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = 27'($urandom);
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; wa = AW'(i); d = model[i];
    end
    @(negedge clk); we = 0; d = 27'h1234567;   // write disabled: no effect
    // random reads, checked against the pipeline
    rd_en = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (valid_d2) begin
        checks++;
        if (q !== model[ra_d2]) begin
          failures++;
          $display("FAIL: q = %h for address %0d, expected %h", q, ra_d2, model[ra_d2]);
        end
      end
      ra = AW'($urandom_range(0, DEPTH - 1));
      // occasional write to a random address outside the read pipeline
      // (a read and a write of one word on the same edge return the old word)
      if (i % 7 == 3) begin
        do wa = AW'($urandom_range(0, DEPTH - 1)); while (wa == ra || wa == ra_d1 || wa == ra_d2);
        d = 27'($urandom); we = 1;
      end else we = 0;
      @(posedge clk);
      if (we) model[wa] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
