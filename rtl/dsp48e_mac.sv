// Multiply-add slice with the pipeline of a Xilinx DSP48E, as the m24x24
// multiplier uses it.
//
// p = a * b + c, all unsigned. a and b pass two input register stages, the
// product of the second stage is added to c, and the sum is registered at the
// output: p appears three cycles after a and b and one cycle after c. The C
// operand has no input register, so a value computed elsewhere in the fabric
// can enter the post-adder in the cycle it is ready. Written as portable RTL;
// a Xilinx synthesis tool maps it onto one DSP48E slice (25x18 signed
// multiplier used as 24x17 unsigned, 48-bit post-adder). The register
// placement follows the original architecture; the absence of a C register is
// this implementation's choice.
module dsp48e_mac #(
  parameter int WA = 24,
  parameter int WB = 17,
  parameter int WC = 48
) (
  input  logic          clk,
  input  logic [WA-1:0] a,
  input  logic [WB-1:0] b,
  input  logic [WC-1:0] c,
  output logic [WC-1:0] p
);

  logic [WA-1:0] a1_q, a2_q;
  logic [WB-1:0] b1_q, b2_q;

  always_ff @(posedge clk) begin
    a1_q <= a;
    b1_q <= b;
    a2_q <= a1_q;
    b2_q <= b1_q;
    p    <= WC'(a2_q) * WC'(b2_q) + c;
  end

endmodule
