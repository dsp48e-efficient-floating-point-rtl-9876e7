// Self-checking testbench for fp_mult.
//
// One fp_mult instance per format (double precision at the defaults, then
// single, double extended and quadruple precision), each driven and checked
// by an fp_lane_check against an independent reference model with the
// format's latency (9, 5, 10 and 14 cycles). A watchdog ends a hung run with
// a failure.
module tb_fp_mult;
  localparam int NOPS = 3000;
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

  int   c[4], f[4], ev[4][8];
  logic dn[4];

  // double precision, module defaults
  logic v_d, ov_d; logic [63:0] a_d, b_d, r_d;
  fp_mult u_dp (.clk, .rst_n, .in_valid(v_d), .in1(a_d), .in2(b_d), .out_valid(ov_d), .result(r_d));
  fp_lane_check #(.E(11), .F(52), .LAT(9), .NOPS(NOPS)) k_dp (.clk, .rst_n, .in_valid(v_d), .in1(a_d),
    .in2(b_d), .out_valid(ov_d), .result(r_d), .checks(c[0]), .failures(f[0]), .done(dn[0]), .ev_cnt(ev[0]));

  logic v_s, ov_s; logic [31:0] a_s, b_s, r_s;
  fp_mult #(.E(8), .F(23)) u_sp (.clk, .rst_n, .in_valid(v_s), .in1(a_s), .in2(b_s), .out_valid(ov_s), .result(r_s));
  fp_lane_check #(.E(8), .F(23), .LAT(5), .NOPS(NOPS)) k_sp (.clk, .rst_n, .in_valid(v_s), .in1(a_s),
    .in2(b_s), .out_valid(ov_s), .result(r_s), .checks(c[1]), .failures(f[1]), .done(dn[1]), .ev_cnt(ev[1]));

  logic v_e, ov_e; logic [79:0] a_e, b_e, r_e;
  fp_mult #(.E(15), .F(64)) u_dep (.clk, .rst_n, .in_valid(v_e), .in1(a_e), .in2(b_e), .out_valid(ov_e), .result(r_e));
  fp_lane_check #(.E(15), .F(64), .LAT(10), .NOPS(NOPS)) k_dep (.clk, .rst_n, .in_valid(v_e), .in1(a_e),
    .in2(b_e), .out_valid(ov_e), .result(r_e), .checks(c[2]), .failures(f[2]), .done(dn[2]), .ev_cnt(ev[2]));

  logic v_q, ov_q; logic [127:0] a_q, b_q, r_q;
  fp_mult #(.E(15), .F(112)) u_qp (.clk, .rst_n, .in_valid(v_q), .in1(a_q), .in2(b_q), .out_valid(ov_q), .result(r_q));
  fp_lane_check #(.E(15), .F(112), .LAT(14), .NOPS(NOPS)) k_qp (.clk, .rst_n, .in_valid(v_q), .in1(a_q),
    .in2(b_q), .out_valid(ov_q), .result(r_q), .checks(c[3]), .failures(f[3]), .done(dn[3]), .ev_cnt(ev[3]));

  initial begin : finish
    repeat (5) @(posedge clk);
    wait (dn[0] && dn[1] && dn[2] && dn[3]);
    repeat (2) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      checks   += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
