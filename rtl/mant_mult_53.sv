// 53x53 unsigned significand multiplier for double precision (3 DSP slices).
//
// p = a * b, six cycles after a and b, one product per cycle. With a and b cut
// at bit 46 the product is
//     a[45:0]*b[45:0] + ((a[45:0]*b[52:46] + a[52:46]*b[45:0]) << 46)
//                     + ((a[52:46]*b[52:46]) << 92).
// The 46x46 part uses two-partition Karatsuba on 23-bit halves a1:a0, b1:b0:
//     {m11, m00} + ((m10 - m11 - m00) << 23),
// m11 = a1*b1 and m00 = a0*b0 on 23x23 DSP multipliers, m10 = (a1+a0)*(b1+b0)
// on a 24x24 one, so three DSP slices replace four. The two 46x7 and the 7x7
// products come from two-stage radix-4 Booth multipliers; the 46x7 products
// are added, then the 7x7 product is added 46 bits higher, which lands the
// small-multiplier term in cycle 4, together with the DSP products. In cycle 4
// the five terms {m11,m00}, m10<<23, -m11<<23, -m00<<23 and the small term<<46
// are compressed by 4:2/3:2 counters to two vectors that a two-stage adder
// sums in cycles 5 and 6. Negated terms are two's complement modulo 2^106; the
// exact product is below 2^106, so the modular sum is exact.
// Timeline: cycle 1 Karatsuba operand/sum registers, cycles 2-4 DSP
// multipliers, cycles 5-6 compression and final adder. The decomposition and
// the 6-cycle latency follow the original architecture; the placement of the
// small-multiplier adders is this implementation's reading of it.
module mant_mult_53 (
  input  logic         clk,
  input  logic [52:0]  a,
  input  logic [52:0]  b,
  output logic [105:0] p
);

  localparam int PW = 106;

  // ---- Karatsuba 46x46 ----
  logic [22:0] a0_q, a1_q, b0_q, b1_q;
  logic [23:0] as_q, bs_q;
  logic [45:0] m11, m00;
  logic [47:0] m10;

  always_ff @(posedge clk) begin
    a0_q <= a[22:0];
    a1_q <= a[45:23];
    b0_q <= b[22:0];
    b1_q <= b[45:23];
    as_q <= {1'b0, a[45:23]} + {1'b0, a[22:0]};
    bs_q <= {1'b0, b[45:23]} + {1'b0, b[22:0]};
  end

  mult_dsp_block #(.W(24)) u_m10 (.clk(clk), .a(bs_q), .b(as_q), .p(m10));
  mult_dsp_block #(.W(23)) u_m11 (.clk(clk), .a(b1_q), .b(a1_q), .p(m11));
  mult_dsp_block #(.W(23)) u_m00 (.clk(clk), .a(b0_q), .b(a0_q), .p(m00));

  // ---- 46x7 and 7x7 Booth multipliers ----
  logic [52:0] m46x7_a, m46x7_b;
  logic [13:0] m7x7, m7x7_q;
  logic [53:0] sum46_q;
  logic [59:0] small_q;

  booth_mult #(.WA(46), .WB(7)) u_m46x7_a (.clk(clk), .a(a[45:0]),  .b(b[52:46]), .p(m46x7_a));
  booth_mult #(.WA(46), .WB(7)) u_m46x7_b (.clk(clk), .a(b[45:0]),  .b(a[52:46]), .p(m46x7_b));
  booth_mult #(.WA(7),  .WB(7)) u_m7x7    (.clk(clk), .a(a[52:46]), .b(b[52:46]), .p(m7x7));

  always_ff @(posedge clk) begin
    sum46_q <= {1'b0, m46x7_a} + {1'b0, m46x7_b};            // cycle 3
    m7x7_q  <= m7x7;
    small_q <= 60'(sum46_q) + (60'(m7x7_q) << 46);          // cycle 4
  end

  // ---- compression and final adder ----
  logic [4:0][PW-1:0] terms;
  logic [PW-1:0]      cs_sum, cs_carry;

  assign terms[0] = PW'({m11, m00});
  assign terms[1] = PW'(m10) << 23;
  assign terms[2] = -(PW'(m11) << 23);
  assign terms[3] = -(PW'(m00) << 23);
  assign terms[4] = PW'(small_q) << 46;

  csa_tree #(.N(5), .W(PW)) u_comp (.ops(terms), .sum(cs_sum), .carry(cs_carry));

  add_pipe2 #(.W(PW)) u_add (.clk(clk), .a(cs_sum), .b(cs_carry), .y(p));

endmodule
