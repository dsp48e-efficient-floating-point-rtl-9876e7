// 66x66 unsigned significand multiplier for double extended precision
// (6 DSP slices).
//
// p = a * b, seven cycles after a and b, one product per cycle. The operands
// are cut into 22-bit parts a2:a1:a0 and b2:b1:b0 and multiplied by
// three-partition Karatsuba:
//     p = {m22, m11, m00} + ((m21 - m22 - m11) << 66)
//                         + ((m20 - m22 - m00) << 44)
//                         + ((m10 - m11 - m00) << 22),
// mij = (ai+aj)*(bi+bj) and mii = ai*bi. The three mii come from 22x22 DSP
// multipliers fed straight from the inputs (cycle 3); the three mij from 23x23
// DSP multipliers fed from registered operand sums (cycle 4). Cycle 4 registers
// the pair sums (m22+m11, m11+m00, m22+m00), cycle 5 the three differences;
// then a 4:2 compressor reduces the four terms to two vectors, summed by a
// two-stage adder in cycles 6 and 7. Six multipliers replace the nine of the
// schoolbook method. The decomposition and the 7-cycle latency follow the
// original architecture; the exact register placement is this implementation's
// reading of it.
module mant_mult_66 (
  input  logic         clk,
  input  logic [65:0]  a,
  input  logic [65:0]  b,
  output logic [131:0] p
);

  localparam int PW = 132;

  logic [21:0] a0, a1, a2, b0, b1, b2;
  assign {a2, a1, a0} = a;
  assign {b2, b1, b0} = b;

  // operand sums, registered
  logic [22:0] a21_q, a10_q, a20_q, b21_q, b10_q, b20_q;
  always_ff @(posedge clk) begin
    a21_q <= {1'b0, a2} + {1'b0, a1};
    a10_q <= {1'b0, a1} + {1'b0, a0};
    a20_q <= {1'b0, a2} + {1'b0, a0};
    b21_q <= {1'b0, b2} + {1'b0, b1};
    b10_q <= {1'b0, b1} + {1'b0, b0};
    b20_q <= {1'b0, b2} + {1'b0, b0};
  end

  logic [43:0] m22, m11, m00;
  logic [45:0] m21, m10, m20;

  mult_dsp_block #(.W(22)) u_m22 (.clk(clk), .a(a2), .b(b2), .p(m22));
  mult_dsp_block #(.W(22)) u_m11 (.clk(clk), .a(a1), .b(b1), .p(m11));
  mult_dsp_block #(.W(22)) u_m00 (.clk(clk), .a(a0), .b(b0), .p(m00));
  mult_dsp_block #(.W(23)) u_m21 (.clk(clk), .a(a21_q), .b(b21_q), .p(m21));
  mult_dsp_block #(.W(23)) u_m10 (.clk(clk), .a(a10_q), .b(b10_q), .p(m10));
  mult_dsp_block #(.W(23)) u_m20 (.clk(clk), .a(a20_q), .b(b20_q), .p(m20));

  logic [44:0]    s21_q, s10_q, s20_q;
  logic [45:0]    d21_q, d10_q, d20_q;
  logic [PW-1:0]  cat1_q, cat2_q;

  always_ff @(posedge clk) begin
    // cycle 4
    s21_q  <= {1'b0, m22} + {1'b0, m11};
    s10_q  <= {1'b0, m11} + {1'b0, m00};
    s20_q  <= {1'b0, m22} + {1'b0, m00};
    cat1_q <= {m22, m11, m00};
    // cycle 5
    d21_q  <= m21 - 46'(s21_q);
    d10_q  <= m10 - 46'(s10_q);
    d20_q  <= m20 - 46'(s20_q);
    cat2_q <= cat1_q;
  end

  logic [3:0][PW-1:0] terms;
  logic [PW-1:0]      cs_sum, cs_carry;

  assign terms[0] = cat2_q;
  assign terms[1] = PW'(d21_q) << 66;
  assign terms[2] = PW'(d20_q) << 44;
  assign terms[3] = PW'(d10_q) << 22;

  csa_tree #(.N(4), .W(PW)) u_comp (.ops(terms), .sum(cs_sum), .carry(cs_carry));

  add_pipe2 #(.W(PW)) u_add (.clk(clk), .a(cs_sum), .b(cs_carry), .y(p));

endmodule
