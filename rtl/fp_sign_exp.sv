// Sign computation, exponent addition and operand classification of a
// floating point multiplier.
//
// sign    = sign_a XOR sign_b.
// exp_sum = exp_a + exp_b - bias, bias = 2^(E-1) - 1, as a signed E+2 bit value
//           so that both overflow (>= 2^E - 1) and underflow (<= 0) of the
//           later exponent update stay visible.
// cls     = class of the product decided from the operands alone: NaN if an
//           operand is NaN or zero meets infinity, infinity if an operand is
//           infinite, zero if an operand is zero, otherwise normal.
// The multiplier handles normal operands; an operand whose exponent field is
// zero (zero or subnormal) counts as zero. Special-value rules are IEEE-754 and,
// like the treatment of subnormals, are this implementation's choice.
// Purely combinational.
module fp_sign_exp
  import fp_mult_pkg::*;
#(
  parameter int E = 11
) (
  input  logic              sign_a,
  input  logic              sign_b,
  input  logic [E-1:0]      exp_a,
  input  logic [E-1:0]      exp_b,
  input  logic              frac_a_zero,
  input  logic              frac_b_zero,
  output logic              sign,
  output logic signed [E+1:0] exp_sum,
  output fp_class_e         cls
);

  localparam logic signed [E+1:0] BIAS = (E+2)'((1 << (E - 1)) - 1);

  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    a_zero = (exp_a == '0);
    b_zero = (exp_b == '0);
    a_inf  = (exp_a == '1) &&  frac_a_zero;
    b_inf  = (exp_b == '1) &&  frac_b_zero;
    a_nan  = (exp_a == '1) && !frac_a_zero;
    b_nan  = (exp_b == '1) && !frac_b_zero;

    sign    = sign_a ^ sign_b;
    exp_sum = $signed({2'b00, exp_a}) + $signed({2'b00, exp_b}) - BIAS;

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) cls = CLS_NAN;
    else if (a_inf || b_inf)                                     cls = CLS_INF;
    else if (a_zero || b_zero)                                   cls = CLS_ZERO;
    else                                                         cls = CLS_NORMAL;
  end

endmodule
