// Round-to-nearest of a significand product (ULP generation and ULP addition).
//
// prod is the 2M-bit product of two M-bit significands 1.f, so its value lies
// in [1, 4) with the binary point below bit 2M-2. The kept window is
// prod[2M-1:M-1] (M+1 bits). The rounding position depends on the top bit:
// if prod[2M-1] is set the result keeps bits [2M-1:M] and the ULP sits at
// bit 1 of the window, otherwise it keeps [2M-2:M-1] and the ULP sits at bit 0.
// From the round bit (last kept bit), the guard bit (first dropped bit) and the
// sticky bit (OR of all lower bits) the ULP is added when guard AND (sticky OR
// round): round to nearest, ties to even. The sum has M+2 bits because
// rounding can carry into a new top bit; the normalization stage that follows
// removes the extra bits. Rounding before normalization follows the original
// architecture; ties-to-even is this implementation's reading of "round to
// nearest". Purely combinational.
module fp_round #(
  parameter int M = 53
) (
  input  logic [2*M-1:0] prod,
  output logic [M+1:0]   rnd
);

  logic [M:0] win;
  logic       hi, rbit, gbit, sticky, ulp;

  always_comb begin
    win = prod[2*M-1:M-1];
    hi  = prod[2*M-1];
    if (hi) begin
      rbit   = prod[M];
      gbit   = prod[M-1];
      sticky = |prod[M-2:0];
    end else begin
      rbit   = prod[M-1];
      gbit   = prod[M-2];
      sticky = |prod[M-3:0];
    end
    ulp = gbit & (sticky | rbit);
    rnd = {1'b0, win} + ((M+2)'(ulp) << hi);
  end

endmodule
