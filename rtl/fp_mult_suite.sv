// Set of four pipelined floating point multipliers: single (32-bit), double
// (64-bit), double extended (80-bit) and quadruple (128-bit) precision, side by
// side.
//
// Each unit is an fp_mult instance with its own ports; they share only clk and
// rst_n. Every unit accepts one operand pair per cycle and returns the
// product, rounded to nearest, after a fixed latency:
//   SP  5 cycles, 1 DSP slice      DP  9 cycles, 3 DSP slices
//   DEP 10 cycles, 6 DSP slices    QP 14 cycles, 18 DSP slices
// The significand multipliers are built from 24x24-class DSP multipliers with
// Karatsuba decompositions (two-partition for DP, three-partition for DEP,
// three- over two-partition for QP). Operands must be normal numbers, zero,
// infinity or NaN; subnormal operands count as zero and results too small for
// a normal number are flushed to zero. xx_in_valid / xx_out_valid mark the
// operands and the matching result of each unit.
module fp_mult_suite
  import fp_mult_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  // single precision
  input  logic           sp_in_valid,
  input  logic [31:0]    sp_in1,
  input  logic [31:0]    sp_in2,
  output logic           sp_out_valid,
  output logic [31:0]    sp_result,
  // double precision
  input  logic           dp_in_valid,
  input  logic [63:0]    dp_in1,
  input  logic [63:0]    dp_in2,
  output logic           dp_out_valid,
  output logic [63:0]    dp_result,
  // double extended precision
  input  logic           dep_in_valid,
  input  logic [79:0]    dep_in1,
  input  logic [79:0]    dep_in2,
  output logic           dep_out_valid,
  output logic [79:0]    dep_result,
  // quadruple precision
  input  logic           qp_in_valid,
  input  logic [127:0]   qp_in1,
  input  logic [127:0]   qp_in2,
  output logic           qp_out_valid,
  output logic [127:0]   qp_result
);

  fp_mult #(.E(SP_E), .F(SP_F)) u_sp (
    .clk, .rst_n, .in_valid(sp_in_valid), .in1(sp_in1), .in2(sp_in2),
    .out_valid(sp_out_valid), .result(sp_result));

  fp_mult #(.E(DP_E), .F(DP_F)) u_dp (
    .clk, .rst_n, .in_valid(dp_in_valid), .in1(dp_in1), .in2(dp_in2),
    .out_valid(dp_out_valid), .result(dp_result));

  fp_mult #(.E(DEP_E), .F(DEP_F)) u_dep (
    .clk, .rst_n, .in_valid(dep_in_valid), .in1(dep_in1), .in2(dep_in2),
    .out_valid(dep_out_valid), .result(dep_result));

  fp_mult #(.E(QP_E), .F(QP_F)) u_qp (
    .clk, .rst_n, .in_valid(qp_in_valid), .in1(qp_in1), .in2(qp_in2),
    .out_valid(qp_out_valid), .result(qp_result));

endmodule
