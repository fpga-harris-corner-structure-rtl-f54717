// harris_pkg: shared types and constants of the Harris corner detector.
//
// All datapath values are signed Q6.21 fixed point in 27 bits (one sign bit,
// five integer bits, 21 fraction bits), the number format of the original
// design, chosen so that one 27x27 multiply fits one FPGA DSP block.
// The 3x3 kernels are samples of a unit-variance Gaussian g(x,y) =
// exp(-(x^2+y^2)/2) on the offsets -1..1: the window W = g, and the two
// derivative-of-Gaussian kernels Gx = x*g and Gy = y*g (x = column offset,
// y = row offset). Kernel taps are indexed n = 3*row + col, row 0 on top.
// The Harris constant k is 0.04 in Q6.21.
package harris_pkg;

  localparam int unsigned DW   = 27;   // data width
  localparam int unsigned FRAC = 21;   // fraction bits

  typedef logic signed [DW-1:0] fx_t;
  typedef fx_t kernel_t [9];

  // Gaussian samples in Q6.21: round(v * 2^21)
  localparam fx_t G_ONE  = 27'sd2097152;   // exp(0)    = 1.0
  localparam fx_t G_EDGE = 27'sd1271986;   // exp(-1/2) = 0.60653
  localparam fx_t G_DIAG = 27'sd771500;    // exp(-1)   = 0.36788
  localparam fx_t K_HARRIS = 27'sd83886;   // 0.04

  localparam kernel_t KERNEL_GX = '{-G_DIAG, '0, G_DIAG,
                                    -G_EDGE, '0, G_EDGE,
                                    -G_DIAG, '0, G_DIAG};
  localparam kernel_t KERNEL_GY = '{-G_DIAG, -G_EDGE, -G_DIAG,
                                    '0, '0, '0,
                                    G_DIAG, G_EDGE, G_DIAG};
  localparam kernel_t KERNEL_W  = '{G_DIAG, G_EDGE, G_DIAG,
                                    G_EDGE, G_ONE,  G_EDGE,
                                    G_DIAG, G_EDGE, G_DIAG};

  // Controller phases
  typedef enum logic [3:0] {
    ST_POLL_PREP,   // wait one cycle for the SRAM read of the flag word
    ST_POLL,        // poll shared SRAM word 0 for the start flag (== 1)
    ST_LOAD,        // copy padded image from shared SRAM words 1..N
    ST_LOAD_DRAIN,  // let the last loaded words land
    ST_DER,         // derivative pass: Ix, Iy -> Ix^2, Iy^2, IxIy
    ST_DER_DRAIN,
    ST_SUM,         // tensor pass: Gaussian sums -> response R
    ST_SUM_DRAIN,
    ST_DONE,        // clear word 0 of the shared SRAM
    ST_IDLE
  } state_t;

endpackage
