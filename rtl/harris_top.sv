// harris_top: FPGA fabric side of the Harris corner detector.
//
// A host processor places a zero-padded (ISIZE+2)x(ISIZE+2) grey image in a
// shared on-chip SRAM (words 1..(ISIZE+2)^2, Q6.21 in bits 26:0) and sets
// word 0 to 1. The detector copies the image into its own block RAM,
// computes Gaussian-derivative gradients Ix, Iy on every 3x3 window, stores
// Ix^2, Iy^2 and IxIy, smooths them with a 3x3 Gaussian and evaluates the
// Harris response R = det(M) - 0.04 trace(M)^2 (scaled by 1/16) for each of
// the ISIZE x ISIZE pixels. R goes to shared words 1..ISIZE^2 in raster order
// and word 0 is cleared when all are written.
//
// Structure (as in the original design): five dual_clock_ram instances
// (image, Ixx, Iyy, Ixy, R) share one read and one write address, three
// conv3x3 units work in parallel (Gx/Gy on the image in the first pass,
// the Gaussian on the three tensor planes in the second), three fx_mult
// units form the tensor products and harris_response evaluates R; the whole
// datapath between the window registers and the RAM write is combinational.
// harris_ctrl sequences everything. The shared SRAM, the host and the video
// subsystem are outside this module; the SRAM slave port is brought out.
// Four hex_digit decoders drive the 7-segment displays from hex_value.
//
// Beside the detector, and unconnected to it, sit the other hardware of the
// same source: the 27-bit floating-point library (multiply, two-stage add,
// five-stage inverse square root, int/float conversions, shift, negate,
// compare), each with its ports brought out under an fp_
// prefix, and the two test memories (256x32 block RAM, 20x32 LUT RAM).
//
// Clock/reset: one clock (50 MHz on the board), synchronous active-high
// reset (driven by a host PIO on the board). SRAM read latency: 1 clock.
module harris_top
  import harris_pkg::*;
  import fp27_pkg::*;
#(
  parameter int unsigned ISIZE = 30,
  parameter int unsigned AW    = 11
) (
  input  logic          clk,
  input  logic          rst,
  // shared SRAM slave port (FPGA side)
  output logic [AW-1:0] sram_address,
  output logic          sram_write,
  output logic [31:0]   sram_writedata,
  input  logic [31:0]   sram_readdata,
  // status
  output logic [3:0]    phase,
  // seven-segment displays
  input  logic [15:0]   hex_value,
  output logic [6:0]    hex0,
  output logic [6:0]    hex1,
  output logic [6:0]    hex2,
  output logic [6:0]    hex3,
  // floating-point library (27-bit floats: sign, 8-bit exponent, 18-bit fraction)
  input  logic [26:0]   fp_a,
  input  logic [26:0]   fp_b,
  input  logic signed [7:0]  fp_shift_amt,
  input  logic signed [15:0] fp_int_in,
  output logic [26:0]   fp_mul_out,       // fp_a * fp_b, combinational
  output logic [26:0]   fp_add_out,       // fp_a + fp_b, 2-clock latency
  output logic [26:0]   fp_inv_sqrt_out,  // 1/sqrt(fp_a), 5-stage pipeline
  output logic [26:0]   fp_from_int_out,  // float(fp_int_in)
  output logic signed [15:0] fp_to_int_out,    // int(fp_a), clipped
  output logic [26:0]   fp_shift_out,     // fp_a * 2^fp_shift_amt
  output logic [26:0]   fp_neg_out,       // -fp_a
  output logic          fp_a_ge_b,        // fp_a >= fp_b
  // test memories
  input  logic          m10k_we,
  input  logic [7:0]    m10k_write_address,
  input  logic [7:0]    m10k_read_address,
  input  logic [31:0]   m10k_d,
  output logic [31:0]   m10k_q,
  input  logic          mlab_wren,
  input  logic [7:0]    mlab_writeaddr,
  input  logic [7:0]    mlab_readaddr,
  input  logic signed [31:0] mlab_data,
  output logic signed [31:0] mlab_q
);
  localparam int unsigned DEPTH = (ISIZE + 2) * (ISIZE + 2);

  logic [AW-1:0] rd_addr, wr_addr;
  logic we_img, we_tensor, we_r, clear_tensor, sum_phase;
  fx_t q_img, q_xx, q_yy, q_xy, q_r;
  fx_t d_xx, d_yy, d_xy;
  fx_t win0 [9], win1 [9], win2 [9];
  fx_t kern0 [9], kern1 [9];
  fx_t conv_x, conv_y, conv_xy;
  fx_t prod_xx, prod_yy, prod_xy;
  fx_t r_value;
  state_t st;

  assign phase = st;

  harris_ctrl #(.ISIZE(ISIZE), .AW(AW)) u_ctrl (
    .clk, .rst,
    .sram_address, .sram_write, .sram_writedata, .sram_readdata,
    .rd_addr, .wr_addr, .we_img, .we_tensor, .we_r, .clear_tensor, .sum_phase,
    .q_img, .q_xx, .q_yy, .q_xy, .r_value,
    .win0, .win1, .win2, .phase(st)
  );

  // ---- memories ----
  dual_clock_ram #(.WIDTH(DW), .DEPTH(DEPTH), .AW(AW)) u_ram_img (
    .clk1(clk), .clk2(clk), .we(we_img), .write_address(wr_addr),
    .read_address(rd_addr), .d(fx_t'(sram_readdata[DW-1:0])), .q(q_img));
  dual_clock_ram #(.WIDTH(DW), .DEPTH(DEPTH), .AW(AW)) u_ram_xx (
    .clk1(clk), .clk2(clk), .we(we_tensor), .write_address(wr_addr),
    .read_address(rd_addr), .d(d_xx), .q(q_xx));
  dual_clock_ram #(.WIDTH(DW), .DEPTH(DEPTH), .AW(AW)) u_ram_yy (
    .clk1(clk), .clk2(clk), .we(we_tensor), .write_address(wr_addr),
    .read_address(rd_addr), .d(d_yy), .q(q_yy));
  dual_clock_ram #(.WIDTH(DW), .DEPTH(DEPTH), .AW(AW)) u_ram_xy (
    .clk1(clk), .clk2(clk), .we(we_tensor), .write_address(wr_addr),
    .read_address(rd_addr), .d(d_xy), .q(q_xy));
  dual_clock_ram #(.WIDTH(DW), .DEPTH(DEPTH), .AW(AW)) u_ram_r (
    .clk1(clk), .clk2(clk), .we(we_r), .write_address(wr_addr),
    .read_address(rd_addr), .d(r_value), .q(q_r));

  // ---- convolvers: first pass Gx, Gy on the image; second pass W on the
  //      three tensor planes ----
  always_comb begin
    for (int n = 0; n < 9; n++) begin
      kern0[n] = sum_phase ? KERNEL_W[n] : KERNEL_GX[n];
      kern1[n] = sum_phase ? KERNEL_W[n] : KERNEL_GY[n];
    end
  end

  conv3x3 u_conv_x  (.win(win0), .kern(kern0),    .sum(conv_x));
  conv3x3 u_conv_y  (.win(win1), .kern(kern1),    .sum(conv_y));
  conv3x3 u_conv_xy (.win(win2), .kern(KERNEL_W), .sum(conv_xy));

  // ---- tensor products (first pass) ----
  fx_mult u_mul_xx (.a(conv_x), .b(conv_x), .out(prod_xx));
  fx_mult u_mul_yy (.a(conv_y), .b(conv_y), .out(prod_yy));
  fx_mult u_mul_xy (.a(conv_x), .b(conv_y), .out(prod_xy));

  assign d_xx = clear_tensor ? '0 : prod_xx;
  assign d_yy = clear_tensor ? '0 : prod_yy;
  assign d_xy = clear_tensor ? '0 : prod_xy;

  // ---- response (second pass) ----
  harris_response u_resp (.sxx(conv_x), .syy(conv_y), .sxy(conv_xy), .r(r_value));

  // ---- displays ----
  hex_digit u_hex0 (.hex(hex_value[3:0]),   .seg(hex0));
  hex_digit u_hex1 (.hex(hex_value[7:4]),   .seg(hex1));
  hex_digit u_hex2 (.hex(hex_value[11:8]),  .seg(hex2));
  hex_digit u_hex3 (.hex(hex_value[15:12]), .seg(hex3));

  // ---- floating-point library ----
  fp27_t fa, fb, f_mul, f_add, f_isq, f_from_int, f_shift, f_neg;
  assign fa = fp27_t'(fp_a);
  assign fb = fp27_t'(fp_b);
  fp_mul      u_fp_mul  (.a(fa), .b(fb), .p(f_mul));
  fp_add      u_fp_add  (.clk, .a(fa), .b(fb), .s(f_add));
  fp_inv_sqrt u_fp_isq  (.clk, .x(fa), .y(f_isq));
  int2fp      u_int2fp  (.i(fp_int_in), .f(f_from_int));
  fp2int      u_fp2int  (.f(fa), .i(fp_to_int_out));
  fp_shift    u_fp_shift(.a(fa), .shift(fp_shift_amt), .y(f_shift));
  fp_negate   u_fp_neg  (.a(fa), .y(f_neg));
  fp_compare  u_fp_cmp  (.a(fa), .b(fb), .a_ge_b(fp_a_ge_b));
  assign fp_mul_out      = f_mul;
  assign fp_add_out      = f_add;
  assign fp_inv_sqrt_out = f_isq;
  assign fp_from_int_out = f_from_int;
  assign fp_shift_out    = f_shift;
  assign fp_neg_out      = f_neg;

  // ---- test memories ----
  m10k_256x32 u_m10k (.clk, .we(m10k_we), .write_address(m10k_write_address),
                      .read_address(m10k_read_address), .d(m10k_d), .q(m10k_q));
  mlab_20x32  u_mlab (.clock(clk), .wren(mlab_wren), .writeaddr(mlab_writeaddr),
                      .readaddr(mlab_readaddr), .data(mlab_data), .q(mlab_q));
endmodule
