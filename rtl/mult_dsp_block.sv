// W x W unsigned multiplier built around one DSP48E slice (m24x24 and its
// 19..23-bit variants).
//
// p = a * b, three cycles after a and b, one product per cycle. The product is
// split by the multiplier bits at position 17:
//     a * b = a * b[16:0] + ((a * b[W-1:17]) << 17).
// The DSP slice (dsp48e_mac) forms a * b[16:0] through its two input register
// stages while a small two-stage multiplier (booth_mult, registers R0 and R1)
// forms a * b[W-1:17]; shifted left by 17 bits it enters the DSP post-adder in
// the third cycle, so both halves arrive together. The small multiplier uses
// radix-4 Booth recoding for W >= 22 and plain partial products for narrower
// operands (19..21 bits). Valid for 18 <= W <= 24. The split and the latency
// follow the original architecture; the Booth/plain threshold at 22 bits is this
// implementation's choice.
module mult_dsp_block #(
  parameter int W = 24
) (
  input  logic           clk,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  localparam int WL = 17;          // multiplier bits handled by the DSP slice
  localparam int WH = W - WL;      // multiplier bits handled by the small unit

  logic [W+WH-1:0] hi_prod;        // a * b[W-1:17], after R1
  logic [47:0]     dsp_p;

  booth_mult #(.WA(W), .WB(WH), .BOOTH(W >= 22)) u_small (
    .clk (clk),
    .a   (a),
    .b   (b[W-1:WL]),
    .p   (hi_prod)
  );

  dsp48e_mac #(.WA(24), .WB(WL), .WC(48)) u_dsp (
    .clk (clk),
    .a   (24'(a)),
    .b   (b[WL-1:0]),
    .c   (48'(hi_prod) << WL),
    .p   (dsp_p)
  );

  assign p = dsp_p[2*W-1:0];

  initial begin
    assert (W >= 18 && W <= 24)
      else $error("mult_dsp_block: W=%0d outside 18..24", W);
  end

endmodule
