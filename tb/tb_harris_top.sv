// tb_harris_top: end-to-end test of the Harris detector at its default size
// (30x30 image, 32x32 padded). A behavioural shared SRAM stands in for the
// host memory; the testbench plays the host: it writes a padded image,
// raises the start flag after a delay (so the detector must poll), waits for
// the flag to be cleared and compares all ISIZE^2 responses with the
// bit-accurate reference in harris_ref_pkg. Two detections are run, each
// after a reset: a random image and a bright square whose corners must give
// the largest responses. Also checked: one R write every 9 clocks, the total
// detection time, and that polling, loading, both passes, row wraps of the
// window sequencer and the done handshake each occurred. Finally the
// floating-point library and the two test memories beside the detector are
// exercised through the top-level ports.
module tb_harris_top;
  import harris_ref_pkg::*;
  import fp_ref_pkg::*;

  localparam int ISIZE = 30;
  localparam int W = ISIZE + 2;
  localparam int AW = 11;

  logic clk = 1'b0, rst = 1'b1;
  logic [AW-1:0] sram_address;
  logic sram_write;
  logic [31:0] sram_writedata, sram_readdata;
  logic [3:0] phase;
  logic [15:0] hex_value = 16'h0;
  logic [6:0] hex0, hex1, hex2, hex3;

  int checks = 0, failures = 0;
  int n_poll = 0, n_load = 0, n_der = 0, n_sum = 0, n_wrap = 0, n_rwrite = 0, n_done = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic [26:0] fp_a = '0, fp_b = '0;
  logic signed [7:0] fp_shift_amt = '0;
  logic signed [15:0] fp_int_in = '0;
  logic [26:0] fp_mul_out, fp_add_out, fp_inv_sqrt_out, fp_from_int_out, fp_shift_out, fp_neg_out;
  logic signed [15:0] fp_to_int_out;
  logic fp_a_ge_b;
  logic m10k_we = 0, mlab_wren = 0;
  logic [7:0] m10k_write_address = 0, m10k_read_address = 0, mlab_writeaddr = 0, mlab_readaddr = 0;
  logic [31:0] m10k_d = 0, m10k_q;
  logic signed [31:0] mlab_data = 0, mlab_q;

  harris_top dut (
    .clk, .rst, .sram_address, .sram_write, .sram_writedata, .sram_readdata,
    .phase, .hex_value, .hex0, .hex1, .hex2, .hex3,
    .fp_a, .fp_b, .fp_shift_amt, .fp_int_in, .fp_mul_out, .fp_add_out, .fp_inv_sqrt_out,
    .fp_from_int_out, .fp_to_int_out, .fp_shift_out, .fp_neg_out, .fp_a_ge_b,
    .m10k_we, .m10k_write_address, .m10k_read_address, .m10k_d, .m10k_q,
    .mlab_wren, .mlab_writeaddr, .mlab_readaddr, .mlab_data, .mlab_q);

  task automatic expect_real(string what, real got, real exp, real tol);
    checks++;
    if (fabs(got - exp) > tol) begin
      failures++;
      $display("FAIL: %s = %g, expected %g", what, got, exp);
    end
  endtask

  shared_sram_model #(.AW(AW)) u_sram (
    .clk, .address(sram_address), .write(sram_write), .writedata(sram_writedata),
    .readdata(sram_readdata));

  // mechanism counters
  int last_rwrite_cyc = -1;
  always @(posedge clk) if (!rst) begin
    case (phase)
      4'd1: n_poll++;
      4'd2: n_load++;
      4'd4: n_der++;
      4'd6: n_sum++;
      default: ;
    endcase
    if (dut.u_ctrl.u_gen.valid && dut.u_ctrl.u_gen.row_wrap) n_wrap++;
    if (sram_write && sram_address != '0) begin
      n_rwrite++;
      if (last_rwrite_cyc >= 0) begin
        checks++;
        if (cyc - last_rwrite_cyc != 9) begin
          failures++;
          $display("FAIL: R writes %0d clocks apart, expected 9", cyc - last_rwrite_cyc);
        end
      end
      last_rwrite_cyc = cyc;
    end
    if (sram_write && sram_address == '0 && sram_writedata == '0) n_done++;
  end

  longint img [W*W];

  task automatic run_detection(input int delay);
    longint ixx [W*W], iyy [W*W], ixy [W*W];
    longint w [9], wa [9], wb [9], wc [9];
    longint gx, gy, r_exp, r_got;
    int t_start, t_end, bad = 0;
    last_rwrite_cyc = -1;
    // reference
    foreach (ixx[i]) begin ixx[i] = 0; iyy[i] = 0; ixy[i] = 0; end
    for (int r = 0; r < ISIZE; r++)
      for (int c = 0; c < ISIZE; c++) begin
        for (int n = 0; n < 9; n++) w[n] = img[(r + n/3) * W + c + n%3];
        gx = conv(0, w);
        gy = conv(1, w);
        ixx[(r+1)*W + c+1] = fxm(gx, gx);
        iyy[(r+1)*W + c+1] = fxm(gy, gy);
        ixy[(r+1)*W + c+1] = fxm(gx, gy);
      end
    // host writes the image, then after a delay the flag
    rst = 1'b1;
    u_sram.mem[0] = 32'd0;
    for (int i = 0; i < W*W; i++) u_sram.mem[i+1] = 32'(img[i]) & 32'h07ff_ffff;
    for (int i = W*W+1; i < 2**AW; i++) u_sram.mem[i] = 32'hdead_beef;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (delay) @(posedge clk);
    u_sram.mem[0] = 32'd1;
    t_start = cyc;
    while (u_sram.mem[0] != 0) begin
      @(posedge clk);
      if (cyc - t_start > 40000) break;
    end
    t_end = cyc;
    checks++;
    if (u_sram.mem[0] != 0) begin failures++; $display("FAIL: done flag never cleared"); end
    // detection time: load (W*W words) plus two passes of 9 clocks/window
    checks++;
    if ((t_end - t_start) < W*W + 18*ISIZE*ISIZE || (t_end - t_start) > W*W + 18*ISIZE*ISIZE + 20) begin
      failures++;
      $display("FAIL: detection took %0d clocks", t_end - t_start);
    end else
      $display("detection took %0d clocks (%0d + %0d)", t_end - t_start, W*W + 18*ISIZE*ISIZE,
               t_end - t_start - (W*W + 18*ISIZE*ISIZE));
    for (int r = 0; r < ISIZE; r++)
      for (int c = 0; c < ISIZE; c++) begin
        for (int n = 0; n < 9; n++) begin
          wa[n] = ixx[(r + n/3) * W + c + n%3];
          wb[n] = iyy[(r + n/3) * W + c + n%3];
          wc[n] = ixy[(r + n/3) * W + c + n%3];
        end
        r_exp = response(conv(2, wa), conv(2, wb), conv(2, wc));
        r_got = longint'(u_sram.mem[r*ISIZE + c + 1]);
        checks++;
        if (r_got != (r_exp & 64'h07ff_ffff)) begin
          failures++;
          if (bad++ < 10) $display("FAIL: R(%0d,%0d) = %h, expected %h", r, c, r_got, r_exp & 64'h07ff_ffff);
        end
      end
  endtask

  function automatic longint rsigned(int v);
    return wrap27(longint'(v));
  endfunction

  initial begin
    // run 1: random image in [0,1), zero border
    foreach (img[i]) img[i] = 0;
    for (int r = 1; r <= ISIZE; r++)
      for (int c = 1; c <= ISIZE; c++) img[r*W + c] = longint'($urandom_range(0, 255)) <<< 13;
    run_detection(25);

    // run 2: bright square on dark ground; corners give the largest R
    foreach (img[i]) img[i] = 0;
    for (int r = 10; r < 20; r++)
      for (int c = 10; c < 22; c++) img[r*W + c] = longint'(1) <<< 21;
    run_detection(3);
    begin
      longint best = -(64'sd1 <<< 40);
      int br = -1, bc = -1;
      for (int r = 0; r < ISIZE; r++)
        for (int c = 0; c < ISIZE; c++) begin
          longint v;
          v = wrap27(longint'(u_sram.mem[r*ISIZE + c + 1] & 32'h07ff_ffff));
          if (v > best) begin best = v; br = r; bc = c; end
        end
      // padded (r,c) = output (r-1,c-1); the square spans output rows 9..18, cols 9..20
      checks++;
      if (!((br == 9 || br == 18) && (bc == 9 || bc == 20))) begin
        failures++;
        $display("FAIL: strongest response at (%0d,%0d), not at a corner of the square", br, bc);
      end else $display("strongest response at corner (%0d,%0d)", br, bc);
    end

    // every mechanism must have been exercised
    $display("poll=%0d load=%0d der=%0d sum=%0d row_wraps=%0d r_writes=%0d done=%0d",
             n_poll, n_load, n_der, n_sum, n_wrap, n_rwrite, n_done);
    checks++; if (n_poll < 25) begin failures++; $display("FAIL: n_poll < 25"); end
    checks++; if (n_load != 2 * W * W) begin failures++; $display("FAIL: n_load != 2 * W * W"); end
    checks++; if (n_der < 2 * 9 * ISIZE * ISIZE) begin failures++; $display("FAIL: n_der < 2 * 9 * ISIZE * ISIZE"); end
    checks++; if (n_sum < 2 * 9 * ISIZE * ISIZE) begin failures++; $display("FAIL: n_sum < 2 * 9 * ISIZE * ISIZE"); end
    checks++; if (n_wrap != 2 * 2 * ISIZE) begin failures++; $display("FAIL: n_wrap != 2 * 2 * ISIZE"); end
    checks++; if (n_rwrite != 2 * ISIZE * ISIZE) begin failures++; $display("FAIL: n_rwrite != 2 * ISIZE * ISIZE"); end
    checks++; if (n_done != 2) begin failures++; $display("FAIL: n_done != 2"); end
    // displays
    hex_value = 16'h1234;
    #1;
    checks++; if ({hex3, hex2, hex1, hex0} != {~7'b0000110, ~7'b1011011, ~7'b1001111, ~7'b1100110}) begin failures++; $display("FAIL: {hex3, hex2, hex1, hex0} != {~7'b0000110, ~7'b1011011, ~7'b1001111, ~7'b1100110}"); end
    // floating-point library: a = 6.25, b = -2.5
    @(negedge clk);
    fp_a = {1'b0, 8'd129, 18'h24000};
    fp_b = {1'b1, 8'd128, 18'h10000};
    fp_shift_amt = -8'sd2;
    fp_int_in = -16'sd1234;
    #1;
    expect_real("fp a", to_real(fp_a), 6.25, 0.0);
    expect_real("fp mul", to_real(fp_mul_out), -15.625, 0.0);
    expect_real("fp from int", to_real(fp_from_int_out), -1234.0, 0.0);
    expect_real("fp to int", real'(fp_to_int_out), 6.0, 0.0);
    expect_real("fp shift", to_real(fp_shift_out), 1.5625, 0.0);
    expect_real("fp neg", to_real(fp_neg_out), -6.25, 0.0);
    expect_real("fp a>=b", real'(fp_a_ge_b), 1.0, 0.0);
    repeat (2) @(negedge clk);
    expect_real("fp add", to_real(fp_add_out), 3.75, 0.0);
    repeat (3) @(negedge clk);
    expect_real("fp inv sqrt", to_real(fp_inv_sqrt_out), 0.4, 0.001);
    // test memories: write then read back
    m10k_we = 1; m10k_write_address = 8'd200; m10k_d = 32'hcafe_f00d;
    mlab_wren = 1; mlab_writeaddr = 8'd19; mlab_data = -32'sd77;
    @(negedge clk);
    m10k_we = 0; mlab_wren = 0; m10k_read_address = 8'd200; mlab_readaddr = 8'd19;
    @(negedge clk);
    checks++; if (m10k_q != 32'hcafe_f00d) begin failures++; $display("FAIL: m10k readback"); end
    checks++; if (mlab_q != -32'sd77) begin failures++; $display("FAIL: mlab readback"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
