// tb_harris_ctrl: the sequencer alone at ISIZE = 4 (6x6 padded image), with
// the RAMs and the datapath replaced by testbench stand-ins. The stand-in
// "derivative" and "response" functions are position-sensitive sums of the
// window taps, so the final results in the shared SRAM are only right if
// every window was read in the right order, captured into the right tap,
// written to the right centre / index address, the tensor border was
// cleared during the load and the handshake words were used as specified.
// Also checks the detection time and that the start flag is polled.
module tb_harris_ctrl;
  import harris_pkg::*;
  localparam int ISIZE = 4, W = ISIZE + 2, AW = 11;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [AW-1:0] sram_address, rd_addr, wr_addr;
  logic sram_write, we_img, we_tensor, we_r, clear_tensor, sum_phase;
  logic [31:0] sram_writedata, sram_readdata;
  fx_t q_img, q_xx, q_yy, q_xy, r_value;
  fx_t win0 [9], win1 [9], win2 [9];
  state_t phase;

  harris_ctrl #(.ISIZE(ISIZE)) dut (.*);
  shared_sram_model #(.AW(AW)) u_sram (.clk, .address(sram_address), .write(sram_write),
    .writedata(sram_writedata), .readdata(sram_readdata));

  // stand-in RAMs with two edges of read latency
  fx_t m_img [W*W], m_xx [W*W], m_yy [W*W], m_xy [W*W];
  logic [AW-1:0] ra_d;
  fx_t d_xx, d_yy, d_xy;
  function automatic fx_t wsum(fx_t w [9]);
    fx_t s = 0;
    for (int n = 0; n < 9; n++) s += fx_t'(n + 1) * w[n];
    return s;
  endfunction
  always_comb begin
    d_xx = clear_tensor ? '0 : wsum(win0);
    d_yy = clear_tensor ? '0 : win1[4] - win1[0];
    d_xy = clear_tensor ? '0 : win0[8] + 27'sd5;
    r_value = wsum(win0) + 27'sd3 * wsum(win1) - win2[2];
  end
  always @(posedge clk) begin
    ra_d <= rd_addr;
    q_img <= m_img[ra_d]; q_xx <= m_xx[ra_d]; q_yy <= m_yy[ra_d]; q_xy <= m_xy[ra_d];
    if (we_img) m_img[wr_addr] <= fx_t'(sram_readdata[26:0]);
    if (we_tensor) begin m_xx[wr_addr] <= d_xx; m_yy[wr_addr] <= d_yy; m_xy[wr_addr] <= d_xy; end
  end
  initial foreach (m_xx[i]) begin m_xx[i] = 27'sd99; m_yy[i] = 27'sd98; m_xy[i] = 27'sd97; m_img[i] = 0; end

  int n_sum_wrong = 0;
  always @(posedge clk) if (!rst) begin
    if (sum_phase != (phase == ST_SUM)) n_sum_wrong++;
  end

  initial begin
    longint img [W*W], exx [W*W], eyy [W*W], exy [W*W];
    longint w [9], wa [9], wb [9], wc [9], s, e;
    int t0, t1;
    foreach (img[i]) img[i] = (i % W == 0 || i % W == W-1 || i < W || i >= W*(W-1)) ? 0 : $urandom_range(1, 1000);
    u_sram.mem[0] = 0;
    for (int i = 0; i < W*W; i++) u_sram.mem[i+1] = 32'(img[i]);
    // reference with the same stand-in functions
    foreach (exx[i]) begin exx[i] = 0; eyy[i] = 0; exy[i] = 0; end
    for (int r = 0; r < ISIZE; r++)
      for (int c = 0; c < ISIZE; c++) begin
        for (int n = 0; n < 9; n++) w[n] = img[(r + n/3)*W + c + n%3];
        s = 0; for (int n = 0; n < 9; n++) s += (n + 1) * w[n];
        exx[(r+1)*W + c+1] = s;
        eyy[(r+1)*W + c+1] = w[4] - w[0];
        exy[(r+1)*W + c+1] = w[8] + 5;
      end
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (phase != ST_POLL || sram_write) begin failures++; $display("FAIL: not polling"); end
    u_sram.mem[0] = 1;
    t0 = cyc;
    while (u_sram.mem[0] != 0 && cyc - t0 < 5000) @(posedge clk);
    t1 = cyc;
    checks++;
    if (u_sram.mem[0] != 0) begin failures++; $display("FAIL: flag not cleared"); end
    checks++;
    if (t1 - t0 < W*W + 18*ISIZE*ISIZE || t1 - t0 > W*W + 18*ISIZE*ISIZE + 20) begin
      failures++; $display("FAIL: took %0d clocks", t1 - t0);
    end
    for (int r = 0; r < ISIZE; r++)
      for (int c = 0; c < ISIZE; c++) begin
        for (int n = 0; n < 9; n++) begin
          wa[n] = exx[(r + n/3)*W + c + n%3];
          wb[n] = eyy[(r + n/3)*W + c + n%3];
          wc[n] = exy[(r + n/3)*W + c + n%3];
        end
        e = 0;
        for (int n = 0; n < 9; n++) e += (n + 1) * wa[n] + 3 * (n + 1) * wb[n];
        e -= wc[2];
        checks++;
        if (u_sram.mem[r*ISIZE + c + 1] != (32'(e) & 32'h07ff_ffff)) begin
          failures++;
          $display("FAIL: result %0d,%0d = %0d, expected %0d", r, c, u_sram.mem[r*ISIZE + c + 1], e);
        end
      end
    // image untouched beyond the result words
    checks++;
    if (u_sram.mem[ISIZE*ISIZE + 1 + 5] != 32'(img[ISIZE*ISIZE + 5])) begin failures++; $display("FAIL: image overwritten"); end
    repeat (20) @(posedge clk);
    checks++;
    if (phase != ST_IDLE || u_sram.mem[0] != 0) begin failures++; $display("FAIL: not idle"); end
    checks++;
    if (n_sum_wrong != 0) begin failures++; $display("FAIL: kernel select wrong"); end
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
