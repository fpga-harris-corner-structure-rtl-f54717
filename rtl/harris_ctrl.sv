// harris_ctrl: sequencer and window registers of the Harris corner detector.
//
// One detection runs in four phases, driven by a handshake word at address 0
// of the SRAM shared with the host processor:
//   1. POLL  - read word 0 until the host writes 1 there (start flag).
//   2. LOAD  - copy the (ISIZE+2)^2-word zero-padded image from shared words
//              1..(ISIZE+2)^2 into the image RAM (bits 26:0 are the Q6.21
//              pixel), one word per clock, while writing 0 into the three
//              tensor RAMs so that their one-pixel border reads as zero.
//   3. DER   - slide a 3x3 window over the image (window_addr_gen, 9 clocks
//              per window); the datapath forms Ix, Iy with the Gx, Gy kernels
//              and the products Ix^2, Iy^2, IxIy, which are written at the
//              window centre of the three tensor RAMs.
//   4. SUM   - slide the window over the three tensor RAMs; the datapath
//              smooths each with the Gaussian W and computes the response R,
//              which is written to R RAM word n and to shared SRAM word n+1,
//              n = 0..ISIZE^2-1 in raster order.
// Finally word 0 of the shared SRAM is cleared (done flag for the host) and
// the controller idles until the next reset.
//
// Timing: the shared SRAM has one clock of read latency (registered
// address in the SRAM), the on-chip RAMs two (dual_clock_ram). Window words
// come back three edges after their address is issued and are captured into
// win0/win1/win2[tap]; the cycle after tap 8 is captured the window is
// complete, the datapath output is valid and the write strobe is raised.
// A detection takes about (ISIZE+2)^2 + 2*9*ISIZE^2 clocks after the flag.
//
// The phase order, the 9-clock window, the handshake and the address maps
// follow the original design; the one-word-per-clock load pipeline and the
// exact drain cycles are this implementation's.
module harris_ctrl
  import harris_pkg::*;
#(
  parameter int unsigned ISIZE = 30,
  parameter int unsigned AW    = 11
) (
  input  logic          clk,
  input  logic          rst,
  // shared SRAM (host handshake, image in, R out); 1-clock read latency
  output logic [AW-1:0] sram_address,
  output logic          sram_write,
  output logic [31:0]   sram_writedata,
  input  logic [31:0]   sram_readdata,
  // on-chip RAM control, shared by all five RAMs
  output logic [AW-1:0] rd_addr,
  output logic [AW-1:0] wr_addr,
  output logic          we_img,
  output logic          we_tensor,
  output logic          we_r,
  output logic          clear_tensor,  // tensor RAMs take 0 instead of products
  output logic          sum_phase,     // kernels: 0 = Gx/Gy, 1 = Gaussian W
  // RAM read data
  input  fx_t           q_img,
  input  fx_t           q_xx,
  input  fx_t           q_yy,
  input  fx_t           q_xy,
  // datapath result in the sum phase
  input  fx_t           r_value,
  // windows for the three convolvers
  output fx_t           win0 [9],
  output fx_t           win1 [9],
  output fx_t           win2 [9],
  // status
  output state_t        phase
);
  localparam int unsigned NWORDS = (ISIZE + 2) * (ISIZE + 2);

  typedef struct packed {
    logic          valid;
    logic          last;
    logic [3:0]    tap;
    logic [AW-1:0] idx;
    logic [AW-1:0] center;
  } tap_info_t;

  state_t state;
  tap_info_t gen, p1, p2, p3;
  logic gen_en, gen_done, gen_row_wrap;  // row_wrap: observation only
  logic load_v;
  logic [AW-1:0] load_addr;
  logic win_ready;

  assign phase  = state;
  assign gen_en = (state == ST_DER) || (state == ST_SUM);

  window_addr_gen #(.ISIZE(ISIZE), .AW(AW)) u_gen (
    .clk, .rst, .en(gen_en),
    .rd_addr, .tap(gen.tap), .win_idx(gen.idx), .center_addr(gen.center),
    .valid(gen.valid), .last(gen.last), .row_wrap(gen_row_wrap), .done(gen_done)
  );

  // ---- address/tap pipeline matching the RAM read latency ----
  always_ff @(posedge clk) begin
    if (rst) begin
      p1 <= '0; p2 <= '0; p3 <= '0;
    end else begin
      p1 <= gen;
      p2 <= p1;
      p3 <= p2;
    end
  end

  // ---- window capture ----
  always_ff @(posedge clk) begin
    if (p2.valid) begin
      if (state == ST_SUM) begin
        win0[p2.tap] <= q_xx;
        win1[p2.tap] <= q_yy;
      end else begin
        win0[p2.tap] <= q_img;
        win1[p2.tap] <= q_img;
      end
      win2[p2.tap] <= q_xy;
    end
  end

  assign win_ready = p3.valid && (p3.tap == 4'd8);

  // ---- RAM write side ----
  always_comb begin
    we_img       = 1'b0;
    we_tensor    = 1'b0;
    we_r         = 1'b0;
    clear_tensor = 1'b0;
    wr_addr      = '0;
    sum_phase    = (state == ST_SUM);
    if (load_v) begin
      we_img       = 1'b1;
      we_tensor    = 1'b1;
      clear_tensor = 1'b1;
      wr_addr      = load_addr;
    end else if (win_ready && state == ST_DER) begin
      we_tensor = 1'b1;
      wr_addr   = p3.center;
    end else if (win_ready && state == ST_SUM) begin
      we_r    = 1'b1;
      wr_addr = p3.idx;
    end
  end

  // ---- sequencer ----
  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= ST_POLL_PREP;
      sram_address   <= '0;
      sram_write     <= 1'b0;
      sram_writedata <= '0;
      load_v         <= 1'b0;
      load_addr      <= '0;
    end else begin
      load_v     <= (state == ST_LOAD);
      load_addr  <= sram_address - 1'b1;
      sram_write <= 1'b0;
      unique case (state)
        ST_POLL_PREP: begin
          sram_address <= '0;
          state        <= ST_POLL;
        end
        ST_POLL: begin
          if (sram_readdata == 32'd1) begin
            sram_address <= AW'(1);
            state        <= ST_LOAD;
          end
        end
        ST_LOAD: begin
          if (sram_address == AW'(NWORDS)) state <= ST_LOAD_DRAIN;
          else sram_address <= sram_address + 1'b1;
        end
        ST_LOAD_DRAIN: state <= ST_DER;
        ST_DER: if (win_ready && p3.last) state <= ST_DER_DRAIN;
        ST_DER_DRAIN: state <= ST_SUM;
        ST_SUM: begin
          if (win_ready) begin
            sram_write     <= 1'b1;
            sram_address   <= p3.idx + 1'b1;
            sram_writedata <= {5'b0, r_value};
            if (p3.last) state <= ST_SUM_DRAIN;
          end
        end
        ST_SUM_DRAIN: begin
          sram_write     <= 1'b1;
          sram_address   <= '0;
          sram_writedata <= '0;
          state          <= ST_DONE;
        end
        ST_DONE: state <= ST_IDLE;
        ST_IDLE: state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  // the generator must not run past its last window
  assert property (@(posedge clk) disable iff (rst) gen_done |-> !gen.valid);
endmodule
