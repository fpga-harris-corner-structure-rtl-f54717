// fp27_pkg: 27-bit floating-point format of the floating-point library.
//
// Like IEEE single precision with the fraction cut to 18 bits, so that a
// mantissa product fits one 27x27 DSP multiplier:
//   bit 26 sign, bits 25:18 exponent (bias 127), bits 17:0 fraction,
//   value = (-1)^sign * 2^(exp-127) * (1 + frac/2^18).
// An exponent of 0 means zero; there are no denormals, infinities or NaNs.
package fp27_pkg;
  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [17:0] frac;
  } fp27_t;

  localparam fp27_t FP_ZERO = '0;
  localparam fp27_t FP_ONE_HALF_3 = '{sign: 1'b0, exp: 8'd127, frac: 18'h20000};  // 1.5
  // largest magnitude, used where a result overflows
  localparam fp27_t FP_MAX = '{sign: 1'b0, exp: 8'd255, frac: '1};
  // 0x5F3759DF of the 32-bit fast inverse square root, cut to 27 bits
  localparam logic [26:0] INV_SQRT_MAGIC = 27'd49920718;
endpackage
