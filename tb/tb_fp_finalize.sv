// Self-checking testbench for fp_finalize.
//
// Applies every class (normal, zero, infinity, NaN) with exponents inside the
// normal range, at its edges (1 and 2^E-2), just outside (0 and 2^E-1) and far
// outside, and checks the packed word against the expected encoding written
// out field by field. Double precision (default) and single precision.
// A watchdog ends a hung run with a failure.
module tb_fp_finalize;
  import fp_mult_pkg::*;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic               s_d, s_s;
  logic signed [12:0] e_d;
  logic signed [9:0]  e_s;
  logic [51:0]        f_d;
  logic [22:0]        f_s;
  fp_class_e          c_d, c_s;
  logic [63:0]        r_d;
  logic [31:0]        r_s;

  fp_finalize                    u_d (.sign(s_d), .exp_in(e_d), .frac(f_d), .cls(c_d), .result(r_d));
  fp_finalize #(.E(8), .F(23))   u_s (.sign(s_s), .exp_in(e_s), .frac(f_s), .cls(c_s), .result(r_s));

  function automatic logic [127:0] expect_word(int E, int F, logic s, int e,
                                               logic [127:0] f, fp_class_e c);
    logic [127:0] inf  = (128'(s) << (E + F)) | (128'((1 << E) - 1) << F);
    logic [127:0] zero = 128'(s) << (E + F);
    if (c == CLS_NAN)  return (128'((1 << E) - 1) << F) | (128'd1 << (F - 1));
    if (c == CLS_INF)  return inf;
    if (c == CLS_ZERO) return zero;
    if (e >= (1 << E) - 1) return inf;
    if (e < 1) return zero;
    return (128'(s) << (E + F)) | (128'(e) << F) | f;
  endfunction

  function automatic int pick_exp(int E, int n);
    case (n % 8)
      0: return 0;
      1: return 1;
      2: return (1 << E) - 2;
      3: return (1 << E) - 1;
      4: return -int'($urandom % 100) - 1;
      5: return (1 << E) + int'($urandom % 100);
      default: return 1 + int'($urandom % ((1 << E) - 2));
    endcase
  endfunction

  initial begin : stim
    logic [127:0] ex;
    for (int n = 0; n < 4000; n++) begin
      s_d = 1'($urandom); e_d = 13'(pick_exp(11, n)); f_d = {$urandom, $urandom};
      c_d = fp_class_e'(($urandom % 5 == 0) ? $urandom % 4 : 0);
      s_s = 1'($urandom); e_s = 10'(pick_exp(8, n));  f_s = 23'($urandom);
      c_s = fp_class_e'(($urandom % 5 == 0) ? $urandom % 4 : 0);
      #1;
      ex = expect_word(11, 52, s_d, int'(e_d), 128'(f_d), c_d);
      checks++;
      if (128'(r_d) !== ex) begin
        failures++;
        if (failures < 10) $display("DP mismatch: e=%0d cls=%0d got %h expected %h", e_d, c_d, r_d, ex);
      end
      ex = expect_word(8, 23, s_s, int'(e_s), 128'(f_s), c_s);
      checks++;
      if (128'(r_s) !== ex) begin
        failures++;
        if (failures < 10) $display("SP mismatch: e=%0d cls=%0d got %h expected %h", e_s, c_s, r_s, ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
