// W x W unsigned multiplier by two-partition Karatsuba on three DSP
// multipliers (m39x39 and m38x38 of the quadruple precision multiplier).
//
// p = a * b, five cycles after a and b, one product per cycle. The operands
// are cut into a low part of LO = ceil(W/2) bits and a high part of
// HI = W - LO bits (39 -> 20 + 19, 38 -> 19 + 19):
//     p = {m11, m00} + ((m10 - (m11 + m00)) << LO),
// m11 = a1*b1 (HI x HI), m00 = a0*b0 (LO x LO), m10 = (a1+a0)*(b1+b0)
// ((LO+1) x (LO+1)); for W = 39 these are 19x19, 20x20 and 21x21, for W = 38
// 19x19, 19x19 and 20x20. The operand sums are combinational in front of the
// multipliers' input registers; the products arrive in cycle 3. Cycle 4
// registers m10, the negated sum -(m11 + m00) and the concatenation
// {m11, m00}; in cycle 5 a 3:2 counter row and a final adder sum the three
// terms (modulo 2^(2W), which holds the exact product). The structure follows
// the original architecture; the latency of 5 is this implementation's
// reading of its register placement. Valid for 36 <= W <= 46.
module karatsuba2_mult #(
  parameter int W = 39
) (
  input  logic           clk,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  localparam int LO = (W + 1) / 2;
  localparam int HI = W - LO;
  localparam int WM = LO + 1;
  localparam int PW = 2 * W;

  logic [LO-1:0] a0, b0;
  logic [HI-1:0] a1, b1;
  logic [WM-1:0] as, bs;
  assign {a1, a0} = a;
  assign {b1, b0} = b;
  assign as = WM'(a1) + WM'(a0);
  assign bs = WM'(b1) + WM'(b0);

  logic [2*WM-1:0] m10;
  logic [2*HI-1:0] m11;
  logic [2*LO-1:0] m00;

  mult_dsp_block #(.W(WM)) u_m10 (.clk(clk), .a(bs), .b(as), .p(m10));
  mult_dsp_block #(.W(HI)) u_m11 (.clk(clk), .a(b1), .b(a1), .p(m11));
  mult_dsp_block #(.W(LO)) u_m00 (.clk(clk), .a(b0), .b(a0), .p(m00));

  logic [2:0][PW-1:0] terms_q;
  logic [PW-1:0]      cs_sum, cs_carry;

  always_ff @(posedge clk) begin
    terms_q[0] <= PW'(m10) << LO;
    terms_q[1] <= -((PW'(m11) + PW'(m00)) << LO);
    terms_q[2] <= {m11, m00};
  end

  csa_tree #(.N(3), .W(PW)) u_comp (.ops(terms_q), .sum(cs_sum), .carry(cs_carry));

  always_ff @(posedge clk) p <= cs_sum + cs_carry;

  initial begin
    assert (W >= 36 && W <= 46)
      else $error("karatsuba2_mult: W=%0d outside 36..46", W);
  end

endmodule
