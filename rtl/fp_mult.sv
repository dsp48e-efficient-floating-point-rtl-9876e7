// Pipelined floating point multiplier for normal operands, one format per
// instance (E exponent bits, F fraction bits; the default is double precision).
//
// Datapath, in the order of the operations:
//   1. sign XOR, exponent addition ea+eb-bias and operand classification
//      (fp_sign_exp), combinational on the inputs, then delayed alongside
//      the significand multiplier;
//   2. significand multiplier of the format, on 1.f operands zero-extended to
//      its width: mult_dsp_block (24x24, SP), mant_mult_53 (DP),
//      mant_mult_66 (DEP) or mant_mult_114 (QP);
//      Where the multiplier is wider than the significand (DEP 66 for 65,
//      QP 114 for 113) the top product bits are zero and unused.
//   3. rounding to nearest (fp_round): ULP generation and addition;
//   4. normalization (fp_normalize): fraction select and exponent +0/+1/+2;
//   5. exponent update and final processing (fp_finalize): overflow to
//      infinity, underflow to zero, special values, packing.
// Steps 3-5 take POST_LAT cycles: 3 (a register after each step) for DP, DEP
// and QP, 2 for SP, where steps 4 and 5 share the second cycle. Total latency
// MANT_LAT + POST_LAT = 5 (SP), 9 (DP), 10 (DEP), 14 (QP) cycles; a new operand
// pair is accepted every cycle. in_valid travels beside the data through a
// shift register cleared by rst_n (active low, synchronous) and comes out as
// out_valid; the datapath itself has no reset. The latencies and the order of
// the steps follow the original architecture; the valid bit, reset and the
// special-value rules are this implementation's additions.
module fp_mult
  import fp_mult_pkg::*;
#(
  parameter int E = DP_E,
  parameter int F = DP_F
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [E+F:0] in1,
  input  logic [E+F:0] in2,
  output logic         out_valid,
  output logic [E+F:0] result
);

  localparam int M        = F + 1;               // significand width
  localparam int MW       = mant_width(F);       // multiplier width
  localparam int MANT_LAT = mant_latency(F);
  localparam int POST_LAT = post_latency(F);
  localparam int LAT      = MANT_LAT + POST_LAT;

  typedef struct packed {
    logic                sign;
    logic signed [E+1:0] exp;
    fp_class_e           cls;
  } side_t;

  // ---- step 1: sign, exponent, class ----
  side_t side_in;
  fp_sign_exp #(.E(E)) u_se (
    .sign_a      (in1[E+F]),
    .sign_b      (in2[E+F]),
    .exp_a       (in1[E+F-1:F]),
    .exp_b       (in2[E+F-1:F]),
    .frac_a_zero (in1[F-1:0] == '0),
    .frac_b_zero (in2[F-1:0] == '0),
    .sign        (side_in.sign),
    .exp_sum     (side_in.exp),
    .cls         (side_in.cls)
  );

  side_t side_q [MANT_LAT];
  always_ff @(posedge clk) begin
    side_q[0] <= side_in;
    for (int i = 1; i < MANT_LAT; i++) side_q[i] <= side_q[i-1];
  end

  // ---- step 2: significand multiplier ----
  logic [MW-1:0]   ma, mb;
  logic [2*MW-1:0] mprod;
  assign ma = MW'({1'b1, in1[F-1:0]});
  assign mb = MW'({1'b1, in2[F-1:0]});

  if (F == SP_F) begin : g_sp
    mult_dsp_block #(.W(24)) u_mant (.clk(clk), .a(ma), .b(mb), .p(mprod));
  end else if (F == DP_F) begin : g_dp
    mant_mult_53 u_mant (.clk(clk), .a(ma), .b(mb), .p(mprod));
  end else if (F == DEP_F) begin : g_dep
    mant_mult_66 u_mant (.clk(clk), .a(ma), .b(mb), .p(mprod));
  end else begin : g_qp
    mant_mult_114 u_mant (.clk(clk), .a(ma), .b(mb), .p(mprod));
  end

  // ---- step 3: rounding ----
  logic [M+1:0] rnd_c, rnd_q;
  side_t        side_r;
  fp_round #(.M(M)) u_round (.prod(mprod[2*M-1:0]), .rnd(rnd_c));

  always_ff @(posedge clk) begin
    rnd_q  <= rnd_c;
    side_r <= side_q[MANT_LAT-1];
  end

  // ---- step 4: normalization ----
  logic [F-1:0]        frac_c;
  logic signed [E+1:0] exp_c;
  fp_normalize #(.M(M), .E(E)) u_norm (
    .rnd (rnd_q), .exp_in (side_r.exp), .frac (frac_c), .exp_out (exp_c)
  );

  // ---- step 5: exponent update and final processing ----
  logic [F-1:0]        frac_f;
  logic signed [E+1:0] exp_f;
  logic                sign_f;
  fp_class_e           cls_f;
  logic [E+F:0]        result_c;

  if (POST_LAT == 3) begin : g_post3
    always_ff @(posedge clk) begin
      frac_f <= frac_c;
      exp_f  <= exp_c;
      sign_f <= side_r.sign;
      cls_f  <= side_r.cls;
    end
  end else begin : g_post2
    assign frac_f = frac_c;
    assign exp_f  = exp_c;
    assign sign_f = side_r.sign;
    assign cls_f  = side_r.cls;
  end

  fp_finalize #(.E(E), .F(F)) u_fin (
    .sign (sign_f), .exp_in (exp_f), .frac (frac_f), .cls (cls_f), .result (result_c)
  );

  always_ff @(posedge clk) result <= result_c;

  // ---- valid pipeline ----
  logic [LAT-1:0] vld_q;
  always_ff @(posedge clk) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[LAT-2:0], in_valid};
  end
  assign out_valid = vld_q[LAT-1];

endmodule
