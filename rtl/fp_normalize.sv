// Normalization of a rounded significand product.
//
// rnd is the rounded product window of fp_round: value rnd / 2^(M-1), which lies
// in [1, 4]. The stage picks the fraction field and the exponent increment from
// its top bits:
//   rnd[M+1] set (value exactly 4 after rounding up) -> fraction 0, exponent +2
//   rnd[M]   set (value in [2, 4))                    -> rnd[M-1:1], exponent +1
//   otherwise (value in [1, 2))                       -> rnd[M-2:0], exponent +0
// When the window was rounded at bit 1 its bit 0 is not a result bit and is
// dropped by the second case. The exponent is signed, E+2 bits.
// Purely combinational.
module fp_normalize #(
  parameter int M = 53,
  parameter int E = 11
) (
  input  logic [M+1:0]        rnd,
  input  logic signed [E+1:0] exp_in,
  output logic [M-2:0]        frac,
  output logic signed [E+1:0] exp_out
);

  always_comb begin
    if (rnd[M+1]) begin
      frac    = '0;
      exp_out = exp_in + 2;
    end else if (rnd[M]) begin
      frac    = rnd[M-1:1];
      exp_out = exp_in + 1;
    end else begin
      frac    = rnd[M-2:0];
      exp_out = exp_in;
    end
  end

endmodule
