// tb_window_addr_gen: collects every address the sequencer issues for a
// full pass and compares it with the windows computed directly from row and
// column counters; checks tap numbers, window indices, centre addresses,
// the last/done flags, the row-wrap count, the 9-clock window period and the
// restart when the enable drops. Runs at the default 30x30 and at 5x5.
module tb_window_addr_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL: %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  logic en30 = 0, en5 = 0;
  logic [10:0] a30, i30, c30, a5, i5, c5;
  logic [3:0] t30, t5;
  logic v30, l30, w30, d30, v5, l5, w5, d5;
  window_addr_gen dut30 (.clk, .rst, .en(en30), .rd_addr(a30), .tap(t30), .win_idx(i30),
                         .center_addr(c30), .valid(v30), .last(l30), .row_wrap(w30), .done(d30));
  window_addr_gen #(.ISIZE(5)) dut5 (.clk, .rst, .en(en5), .rd_addr(a5), .tap(t5), .win_idx(i5),
                         .center_addr(c5), .valid(v5), .last(l5), .row_wrap(w5), .done(d5));

  task automatic run(int isize, bit big);
    int w = isize + 2, wraps = 0, n = 0;
    @(negedge clk);
    if (big) en30 = 1; else en5 = 1;
    for (int r = 0; r < isize; r++)
      for (int c = 0; c < isize; c++)
        for (int k = 0; k < 9; k++) begin
          #1;
          expect_eq(big ? v30 : v5, 1, "valid");
          expect_eq(big ? a30 : a5, (r + k / 3) * w + c + k % 3, "address");
          expect_eq(big ? t30 : t5, k, "tap");
          expect_eq(big ? i30 : i5, r * isize + c, "window index");
          expect_eq(big ? c30 : c5, (r + 1) * w + c + 1, "centre");
          expect_eq(big ? l30 : l5, (r == isize - 1 && c == isize - 1 && k == 8), "last");
          if (big ? w30 : w5) wraps++;
          n++;
          @(negedge clk);
        end
    #1;
    expect_eq(big ? v30 : v5, 0, "valid after last");
    expect_eq(big ? d30 : d5, 1, "done");
    expect_eq(wraps, isize, "row wraps");
    expect_eq(n, 9 * isize * isize, "cycles");
    @(negedge clk);
    if (big) en30 = 0; else en5 = 0;
    @(negedge clk);
    #1;
    expect_eq(big ? a30 : a5, 0, "address after restart");
    expect_eq(big ? d30 : d5, 0, "done after restart");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    run(5, 0);
    run(30, 1);
    run(5, 0);   // second pass after restart
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
