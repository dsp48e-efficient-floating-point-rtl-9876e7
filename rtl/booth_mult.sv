// Small unsigned multiplier with two pipeline stages (m24x7, m46x7, m7x7).
//
// p = a * b, two cycles after a and b. With BOOTH = 1 the multiplier b is
// recoded in radix-4 modified Booth digits {-2,-1,0,+1,+2}; b is unsigned, so
// it is extended with zero bits on top and gives floor(WB/2)+1 digits. Each
// digit selects 0, a, 2a, -a or -2a, formed as a two's complement value of the
// full product width and shifted by two bits per digit. With BOOTH = 0 each bit
// of b selects a or 0 (plain AND partial products), which suits very narrow b.
// The partial products are reduced to a sum and a carry vector by a tree of
// 4:2 / 3:2 counters; the two vectors are registered (R0), then added by the
// final adder and registered again (R1). All arithmetic is modulo 2^(WA+WB),
// which holds the exact product. Booth recoding, the counter tree and the two
// stages follow the original architecture; the digit layout is this implementation's own.
module booth_mult #(
  parameter int WA    = 24,
  parameter int WB    = 7,
  parameter bit BOOTH = 1'b1
) (
  input  logic             clk,
  input  logic [WA-1:0]    a,
  input  logic [WB-1:0]    b,
  output logic [WA+WB-1:0] p
);

  localparam int PW  = WA + WB;
  localparam int ND  = WB / 2 + 1;            // Booth digits
  localparam int NPP = BOOTH ? ND : WB;       // partial products

  logic [NPP-1:0][PW-1:0] pp;
  logic [PW-1:0]          s_c, c_c;
  logic [PW-1:0]          s_q, c_q;

  if (BOOTH) begin : g_booth
    // b extended by zero bits: bit -1 is 0, and enough zeros on top.
    logic [2*ND:0] bx;
    assign bx = {{(2*ND+1-WB-1){1'b0}}, b, 1'b0};

    for (genvar i = 0; i < ND; i++) begin : g_pp
      logic [2:0]    trip;
      logic [PW-1:0] mag;
      assign trip = bx[2*i +: 3];
      always_comb begin
        unique case (trip)
          3'b001, 3'b010: mag = PW'(a);
          3'b011:         mag = PW'(a) << 1;
          3'b100:         mag = -(PW'(a) << 1);
          3'b101, 3'b110: mag = -PW'(a);
          default:        mag = '0;
        endcase
      end
      assign pp[i] = mag << (2 * i);
    end
  end else begin : g_and
    for (genvar i = 0; i < WB; i++) begin : g_pp
      assign pp[i] = b[i] ? (PW'(a) << i) : '0;
    end
  end

  csa_tree #(.N(NPP), .W(PW)) u_tree (
    .ops   (pp),
    .sum   (s_c),
    .carry (c_c)
  );

  always_ff @(posedge clk) begin
    s_q <= s_c;          // R0
    c_q <= c_c;
    p   <= s_q + c_q;    // R1
  end

endmodule
