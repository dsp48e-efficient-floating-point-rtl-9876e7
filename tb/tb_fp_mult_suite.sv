// End-to-end testbench for fp_mult_suite at its default configuration.
//
// All four multipliers (SP, DP, DEP, QP) run at once, each fed and checked by
// an fp_lane_check: random and directed operands, pipeline bubbles, exact
// latency check (5, 9, 10 and 14 cycles) and bit-exact comparison with an
// independent reference model (for DP also with IEEE double arithmetic).
// For every unit the testbench then requires that each mechanism of the
// datapath happened at least once: special operand handling, normalization
// shift, ULP round-up, exact tie, rounding carry-out, exponent overflow,
// exponent underflow and a pipeline bubble. It prints how often each did.
// A watchdog ends a hung run with a failure.
module tb_fp_mult_suite;
  localparam int NOPS = 4000;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (4 * NOPS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  logic         sp_iv, sp_ov, dp_iv, dp_ov, dep_iv, dep_ov, qp_iv, qp_ov;
  logic [31:0]  sp_a, sp_b, sp_r;
  logic [63:0]  dp_a, dp_b, dp_r;
  logic [79:0]  dep_a, dep_b, dep_r;
  logic [127:0] qp_a, qp_b, qp_r;

  fp_mult_suite u_dut (
    .clk, .rst_n,
    .sp_in_valid(sp_iv),   .sp_in1(sp_a),   .sp_in2(sp_b),   .sp_out_valid(sp_ov),   .sp_result(sp_r),
    .dp_in_valid(dp_iv),   .dp_in1(dp_a),   .dp_in2(dp_b),   .dp_out_valid(dp_ov),   .dp_result(dp_r),
    .dep_in_valid(dep_iv), .dep_in1(dep_a), .dep_in2(dep_b), .dep_out_valid(dep_ov), .dep_result(dep_r),
    .qp_in_valid(qp_iv),   .qp_in1(qp_a),   .qp_in2(qp_b),   .qp_out_valid(qp_ov),   .qp_result(qp_r)
  );

  int   c[4], f[4], ev[4][8];
  logic dn[4];

  fp_lane_check #(.E(8), .F(23), .LAT(5), .NOPS(NOPS)) k_sp (.clk, .rst_n, .in_valid(sp_iv),
    .in1(sp_a), .in2(sp_b), .out_valid(sp_ov), .result(sp_r),
    .checks(c[0]), .failures(f[0]), .done(dn[0]), .ev_cnt(ev[0]));
  fp_lane_check #(.E(11), .F(52), .LAT(9), .NOPS(NOPS)) k_dp (.clk, .rst_n, .in_valid(dp_iv),
    .in1(dp_a), .in2(dp_b), .out_valid(dp_ov), .result(dp_r),
    .checks(c[1]), .failures(f[1]), .done(dn[1]), .ev_cnt(ev[1]));
  fp_lane_check #(.E(15), .F(64), .LAT(10), .NOPS(NOPS)) k_dep (.clk, .rst_n, .in_valid(dep_iv),
    .in1(dep_a), .in2(dep_b), .out_valid(dep_ov), .result(dep_r),
    .checks(c[2]), .failures(f[2]), .done(dn[2]), .ev_cnt(ev[2]));
  fp_lane_check #(.E(15), .F(112), .LAT(14), .NOPS(NOPS)) k_qp (.clk, .rst_n, .in_valid(qp_iv),
    .in1(qp_a), .in2(qp_b), .out_valid(qp_ov), .result(qp_r),
    .checks(c[3]), .failures(f[3]), .done(dn[3]), .ev_cnt(ev[3]));

  string unit_name [4] = '{"SP", "DP", "DEP", "QP"};
  string ev_name   [8] = '{"special operand", "normalization shift", "round up", "tie",
                           "rounding carry-out", "overflow", "underflow", "bubble"};

  initial begin : finish
    repeat (5) @(posedge clk);
    wait (dn[0] && dn[1] && dn[2] && dn[3]);
    repeat (2) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      checks   += c[i];
      failures += f[i];
      for (int k = 0; k < 8; k++) begin
        $display("%-3s %-20s %0d", unit_name[i], ev_name[k], ev[i][k]);
        checks++;
        if (ev[i][k] == 0) begin
          failures++;
          $display("%s: mechanism '%s' never happened", unit_name[i], ev_name[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
