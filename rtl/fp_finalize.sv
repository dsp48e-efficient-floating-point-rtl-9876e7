// Exponent update and final processing of a floating point multiplier.
//
// Packs {sign, exponent, fraction} of the product. For a normal class the
// signed exponent is range checked: at or above 2^E - 1 the result is an
// infinity of the product's sign, at or below 0 it is a zero of that sign (no
// subnormal results: the multiplier targets normal numbers). The classes from
// the operand check override it: zero gives a signed zero, infinity a signed
// infinity, NaN the quiet NaN with sign 0 and only the top fraction bit set.
// The overflow and underflow rules are this implementation's choice.
// Purely combinational.
module fp_finalize
  import fp_mult_pkg::*;
#(
  parameter int E = 11,
  parameter int F = 52
) (
  input  logic                sign,
  input  logic signed [E+1:0] exp_in,
  input  logic [F-1:0]        frac,
  input  fp_class_e           cls,
  output logic [E+F:0]        result
);

  localparam logic signed [E+1:0] EXP_MAX = (E+2)'((1 << E) - 1);

  always_comb begin
    unique case (cls)
      CLS_NAN:  result = {1'b0, {E{1'b1}}, 1'b1, {(F-1){1'b0}}};
      CLS_INF:  result = {sign, {E{1'b1}}, {F{1'b0}}};
      CLS_ZERO: result = {sign, {(E+F){1'b0}}};
      default: begin
        if (exp_in >= EXP_MAX)  result = {sign, {E{1'b1}}, {F{1'b0}}};
        else if (exp_in <= 0)   result = {sign, {(E+F){1'b0}}};
        else                    result = {sign, exp_in[E-1:0], frac};
      end
    endcase
  end

endmodule
