// Two-stage pipelined adder.
//
// y = a + b modulo 2^W, two clock cycles after a and b are presented. Stage 1
// adds the lower L = W/2 bits and registers that partial sum, its carry-out and
// the upper halves of both operands; stage 2 adds the upper halves with the
// carry. This is the final two-operand adder that follows the compressors of
// the large significand multipliers, split in two so that a carry never runs
// over more than half the product width in one cycle. The split point is this
// implementation's choice. Throughput: one addition per cycle. No reset: the
// datapath carries no state that outlives the pipeline.
module add_pipe2 #(
  parameter int W = 132
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  localparam int L = W / 2;
  localparam int H = W - L;

  logic [L:0]   lo_q;      // lower sum with carry-out
  logic [H-1:0] ahi_q, bhi_q;

  always_ff @(posedge clk) begin
    lo_q  <= {1'b0, a[L-1:0]} + {1'b0, b[L-1:0]};
    ahi_q <= a[W-1:L];
    bhi_q <= b[W-1:L];
    y     <= {ahi_q + bhi_q + H'(lo_q[L]), lo_q[L-1:0]};
  end

endmodule
