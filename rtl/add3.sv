// add3: three-input Q6.21 adder (combinational), out = a + b + c with
// two's-complement wrap at 27 bits. Used to build the 9-input adder tree of
// a 3x3 convolution as two levels of three-input adds.
module add3
  import harris_pkg::*;
(
  input  fx_t a,
  input  fx_t b,
  input  fx_t c,
  output fx_t out
);
  assign out = a + b + c;
endmodule
