// Self-checking testbench for fp_sign_exp.
//
// Random signs, exponents (including 0 and all ones) and fraction-zero flags;
// checks the sign XOR, the unbiased exponent sum ea + eb - bias computed with
// integers, and the class decided by the IEEE-754 rules for zero, infinity
// and NaN operands. Double (default) and single precision.
// A watchdog ends a hung run with a failure.
module tb_fp_sign_exp;
  import fp_mult_pkg::*;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic sa, sb, za, zb, s_d, s_s;
  logic [10:0] ea_d, eb_d;
  logic [7:0]  ea_s, eb_s;
  logic signed [12:0] x_d;
  logic signed [9:0]  x_s;
  fp_class_e c_d, c_s;

  fp_sign_exp             u_d (.sign_a(sa), .sign_b(sb), .exp_a(ea_d), .exp_b(eb_d),
                               .frac_a_zero(za), .frac_b_zero(zb), .sign(s_d), .exp_sum(x_d), .cls(c_d));
  fp_sign_exp #(.E(8))    u_s (.sign_a(sa), .sign_b(sb), .exp_a(ea_s), .exp_b(eb_s),
                               .frac_a_zero(za), .frac_b_zero(zb), .sign(s_s), .exp_sum(x_s), .cls(c_s));

  function automatic fp_class_e expect_cls(int E, int ea, int eb, logic fza, logic fzb);
    int  mx = (1 << E) - 1;
    bit  na = (ea == mx) && !fza, nb = (eb == mx) && !fzb;
    bit  ia = (ea == mx) && fza,  ib = (eb == mx) && fzb;
    bit  ya = (ea == 0), yb = (eb == 0);
    if (na || nb || (ia && yb) || (ib && ya)) return CLS_NAN;
    if (ia || ib) return CLS_INF;
    if (ya || yb) return CLS_ZERO;
    return CLS_NORMAL;
  endfunction

  function automatic int pick(int E);
    case ($urandom % 6)
      0: return 0;
      1: return (1 << E) - 1;
      default: return int'($urandom % (1 << E));
    endcase
  endfunction

  task automatic check(string name, int E, int ea, int eb, logic s, int x, fp_class_e c);
    int        ex = ea + eb - ((1 << (E - 1)) - 1);
    fp_class_e ec = expect_cls(E, ea, eb, za, zb);
    checks++;
    if (s !== (sa ^ sb) || x != ex || c != ec) begin
      failures++;
      if (failures < 10) $display("%s mismatch: ea=%0d eb=%0d got (%0d,%0d,%0d) expected (%0d,%0d,%0d)",
                                  name, ea, eb, s, x, c, sa ^ sb, ex, ec);
    end
  endtask

  initial begin : stim
    for (int n = 0; n < 4000; n++) begin
      sa = 1'($urandom); sb = 1'($urandom); za = 1'($urandom); zb = 1'($urandom);
      ea_d = 11'(pick(11)); eb_d = 11'(pick(11));
      ea_s = 8'(pick(8));   eb_s = 8'(pick(8));
      #1;
      check("DP", 11, int'(ea_d), int'(eb_d), s_d, int'(x_d), c_d);
      check("SP", 8,  int'(ea_s), int'(eb_s), s_s, int'(x_s), c_s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
