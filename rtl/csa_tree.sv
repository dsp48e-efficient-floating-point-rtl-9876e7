// Multi-operand carry-save compressor.
//
// Reduces N operands of W bits to two vectors, sum and carry, whose sum equals
// the sum of the operands modulo 2^W. The tree is built from levels of 4:2
// compressors; a remainder of three operands in a level goes through a 3:2
// counter (full-adder row) and a remainder of one or two passes straight to the
// next level. A 4:2 compressor is two chained 3:2 counters per bit position
// whose intermediate carry moves one bit to the left. Carries out of the top bit
// are dropped, so operands may be two's complement values (negated terms of a
// Karatsuba sum). Bit 0 of carry is always zero when a counter level exists.
// Purely combinational; the use of 4:2 and 3:2 counters follows
// the design, the tree shape is this implementation's choice.
module csa_tree #(
  parameter int N = 5,      // number of operands
  parameter int W = 106     // operand and result width
) (
  input  logic [N-1:0][W-1:0] ops,
  output logic [W-1:0]        sum,
  output logic [W-1:0]        carry
);

  // Operand count after one level of reduction.
  function automatic int next_n(int n);
    if (n <= 2) return n;
    return 2 * (n / 4) + ((n % 4 == 3) ? 2 : (n % 4));
  endfunction

  function automatic int n_at(int l);
    int n = N;
    for (int i = 0; i < l; i++) n = next_n(n);
    return n;
  endfunction

  function automatic int num_levels();
    int n = N;
    int l = 0;
    while (n > 2) begin
      n = next_n(n);
      l++;
    end
    return l;
  endfunction

  localparam int LEVELS = num_levels();

  // Each level holds its live operands in the low rows of a packed array;
  // the unused rows are tied to zero.
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int NI = n_at(l);
    localparam int NO = n_at(l + 1);
    localparam int NG = NI / 4;
    localparam int R  = NI % 4;

    logic [N-1:0][W-1:0] cur, nxt;
    if (l == 0) begin : g_first
      assign cur = ops;
    end else begin : g_next
      assign cur = g_lvl[l-1].nxt;
    end

    for (genvar g = 0; g < NG; g++) begin : g_c42
      logic [W-1:0] x1, x2, x3, x4, s1, cin;
      assign x1  = cur[4*g];
      assign x2  = cur[4*g+1];
      assign x3  = cur[4*g+2];
      assign x4  = cur[4*g+3];
      // first 3:2 counter; its carry moves one bit up into the second
      assign s1  = x1 ^ x2 ^ x3;
      assign cin = ((x1 & x2) | (x1 & x3) | (x2 & x3)) << 1;
      // second 3:2 counter
      assign nxt[2*g]   = s1 ^ x4 ^ cin;
      assign nxt[2*g+1] = ((s1 & x4) | (s1 & cin) | (x4 & cin)) << 1;
    end

    if (R == 3) begin : g_c32
      logic [W-1:0] y1, y2, y3;
      assign y1 = cur[4*NG];
      assign y2 = cur[4*NG+1];
      assign y3 = cur[4*NG+2];
      assign nxt[2*NG]   = y1 ^ y2 ^ y3;
      assign nxt[2*NG+1] = ((y1 & y2) | (y1 & y3) | (y2 & y3)) << 1;
    end else begin : g_pass
      for (genvar r = 0; r < R; r++) begin : g_r
        assign nxt[2*NG+r] = cur[4*NG+r];
      end
    end

    for (genvar z = NO; z < N; z++) begin : g_zero
      assign nxt[z] = '0;
    end
  end

  if (LEVELS == 0) begin : g_none
    assign sum   = ops[0];
    assign carry = (N >= 2) ? ops[N-1] : '0;
  end else begin : g_out
    assign sum   = g_lvl[LEVELS-1].nxt[0];
    assign carry = g_lvl[LEVELS-1].nxt[1];
  end

endmodule
