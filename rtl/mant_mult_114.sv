// 114x114 unsigned significand multiplier for quadruple precision
// (18 DSP slices).
//
// p = a * b, eleven cycles after a and b, one product per cycle. The operands
// are cut into 38-bit parts a2:a1:a0, b2:b1:b0 and multiplied by
// three-partition Karatsuba:
//     p = {m22, m11, m00} + ((m10 - m11 - m00) << 38)
//                         + ((m20 - m22 - m00) << 76)
//                         + ((m21 - m22 - m11) << 114),
// mii = ai*bi on 38x38 units and mij = (ai+aj)*(bi+bj) on 39x39 units, each
// itself a two-partition Karatsuba multiplier of three DSP slices
// (karatsuba2_mult), so 6 x 3 = 18 slices in all. The large terms are then
// combined by a chain of plain adders rather than a compressor.
// Timeline: the 38x38 units take the operand parts straight from the inputs
// (products in cycle 5); the part sums are registered in cycle 1, so the
// 39x39 products arrive in cycle 6, when the pair sums (m22+m11, m11+m00,
// m22+m00) are registered. Cycle 7: the three differences d21, d10, d20;
// cycle 8: t1 = d10 + (d20 << 38); cycle 9: t2 = t1 + (d21 << 76);
// cycles 10-11: two-stage adder p = {m22,m11,m00} + (t2 << 38).
// The decomposition, the register placement and the 11-cycle latency follow
// the original architecture; the order in which the three differences are
// added is this implementation's reading of it.
module mant_mult_114 (
  input  logic         clk,
  input  logic [113:0] a,
  input  logic [113:0] b,
  output logic [227:0] p
);

  localparam int PW = 228;

  logic [37:0] a0, a1, a2, b0, b1, b2;
  assign {a2, a1, a0} = a;
  assign {b2, b1, b0} = b;

  // part sums, registered
  logic [38:0] a21_q, a10_q, a20_q, b21_q, b10_q, b20_q;
  always_ff @(posedge clk) begin
    a21_q <= {1'b0, a2} + {1'b0, a1};
    a10_q <= {1'b0, a1} + {1'b0, a0};
    a20_q <= {1'b0, a2} + {1'b0, a0};
    b21_q <= {1'b0, b2} + {1'b0, b1};
    b10_q <= {1'b0, b1} + {1'b0, b0};
    b20_q <= {1'b0, b2} + {1'b0, b0};
  end

  logic [75:0] m22, m11, m00;
  logic [77:0] m21, m10, m20;

  karatsuba2_mult #(.W(38)) u_m22 (.clk(clk), .a(a2),    .b(b2),    .p(m22));
  karatsuba2_mult #(.W(38)) u_m11 (.clk(clk), .a(a1),    .b(b1),    .p(m11));
  karatsuba2_mult #(.W(38)) u_m00 (.clk(clk), .a(a0),    .b(b0),    .p(m00));
  karatsuba2_mult #(.W(39)) u_m21 (.clk(clk), .a(a21_q), .b(b21_q), .p(m21));
  karatsuba2_mult #(.W(39)) u_m10 (.clk(clk), .a(a10_q), .b(b10_q), .p(m10));
  karatsuba2_mult #(.W(39)) u_m20 (.clk(clk), .a(a20_q), .b(b20_q), .p(m20));

  logic [76:0]   s21_q, s10_q, s20_q;
  logic [77:0]   d21_q, d10_q, d20_q, d21_qq;
  logic [115:0]  t1_q;
  logic [189:0]  t2_q;
  logic [PW-1:0] cat1_q, cat2_q, cat3_q, cat4_q;

  always_ff @(posedge clk) begin
    // cycle 6
    s21_q  <= {1'b0, m22} + {1'b0, m11};
    s10_q  <= {1'b0, m11} + {1'b0, m00};
    s20_q  <= {1'b0, m22} + {1'b0, m00};
    cat1_q <= {m22, m11, m00};
    // cycle 7
    d21_q  <= m21 - 78'(s21_q);
    d10_q  <= m10 - 78'(s10_q);
    d20_q  <= m20 - 78'(s20_q);
    cat2_q <= cat1_q;
    // cycle 8
    t1_q   <= 116'(d10_q) + (116'(d20_q) << 38);
    d21_qq <= d21_q;
    cat3_q <= cat2_q;
    // cycle 9
    t2_q   <= 190'(t1_q) + (190'(d21_qq) << 76);
    cat4_q <= cat3_q;
  end

  // cycles 10 and 11
  add_pipe2 #(.W(PW)) u_add (.clk(clk), .a(cat4_q), .b(PW'(t2_q) << 38), .y(p));

endmodule
