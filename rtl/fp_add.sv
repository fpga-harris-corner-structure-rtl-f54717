// fp_add: 27-bit floating-point adder, two-stage pipeline.
//
// Stage 1 orders the operands by magnitude, shifts the smaller mantissa
// right by the exponent difference (19 guard bits) and adds or subtracts;
// the raw sum, the larger exponent and the result sign are registered.
// Stage 2 finds the leading one, renormalises (truncating) and registers
// the result. A zero operand passes the other one through; an exact
// cancellation or an underflow gives zero, an overflow the largest
// magnitude. Latency: the sum of inputs applied before edge n is on s after
// edge n+1. The two-stage split follows the original design.
module fp_add
  import fp27_pkg::*;
(
  input  logic  clk,
  input  fp27_t a,
  input  fp27_t b,
  output fp27_t s
);
  // ---- stage 1 ----
  fp27_t op_hi, op_lo;
  logic [7:0]  ediff;
  logic [37:0] m_hi, m_lo;
  logic [38:0] raw;
  logic        a_larger;

  always_comb begin
    a_larger = {a.exp, a.frac} >= {b.exp, b.frac};
    op_hi   = a_larger ? a : b;
    op_lo = a_larger ? b : a;
    ediff = op_hi.exp - op_lo.exp;
    m_hi  = {1'b1, op_hi.frac, 19'b0};
    m_lo = (ediff > 8'd37) ? '0 : ({1'b1, op_lo.frac, 19'b0} >> ediff);
    if (op_hi.sign != op_lo.sign) raw = {1'b0, m_hi} - {1'b0, m_lo};
    else                        raw = {1'b0, m_hi} + {1'b0, m_lo};
  end

  logic [38:0] raw_q;
  logic [7:0]  exp_q;
  logic        sign_q, a_zero_q, b_zero_q;
  fp27_t       a_q, b_q;
  always_ff @(posedge clk) begin
    raw_q    <= raw;
    exp_q    <= op_hi.exp;
    sign_q   <= op_hi.sign;
    a_zero_q <= (a.exp == '0);
    b_zero_q <= (b.exp == '0);
    a_q      <= a;
    b_q      <= b;
  end

  // ---- stage 2 ----
  logic [5:0] lead;          // position of the leading one of raw_q
  logic [38:0] norm;
  logic signed [9:0] e;
  fp27_t result;
  always_comb begin
    lead = '0;
    for (int i = 0; i < 39; i++) if (raw_q[i]) lead = 6'(i);
    norm = raw_q << (6'd38 - lead);
    e = 10'(exp_q) + 10'(lead) - 10'sd37;
    result = FP_ZERO;
    if (a_zero_q && b_zero_q) result = FP_ZERO;
    else if (a_zero_q)        result = b_q;
    else if (b_zero_q)        result = a_q;
    else if (raw_q == '0 || e < 10'sd1) result = FP_ZERO;
    else if (e > 10'sd255) begin
      result = FP_MAX;
      result.sign = sign_q;
    end else begin
      result.sign = sign_q;
      result.exp  = e[7:0];
      result.frac = norm[37:20];
    end
  end
  always_ff @(posedge clk) s <= result;
endmodule
