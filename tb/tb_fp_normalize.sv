// Self-checking testbench for fp_normalize.
//
// Drives rounded significands covering the three ranges [1,2), [2,4) and the
// single value 4, with random signed exponents, and checks the fraction and
// exponent against values computed here by integer arithmetic on the value
// rnd / 2^(M-1): the exponent grows by floor(log2(value)) and the fraction is
// (value / 2^floor(log2(value)) - 1) in M-1 bits. M = 53 (default) and 24.
// A watchdog ends a hung run with a failure.
module tb_fp_normalize;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [54:0] r53;  logic signed [12:0] e53, eo53; logic [51:0] f53;
  logic [25:0] r24;  logic signed [9:0]  e24, eo24; logic [22:0] f24;

  fp_normalize                u53 (.rnd(r53), .exp_in(e53), .frac(f53), .exp_out(eo53));
  fp_normalize #(.M(24), .E(8)) u24 (.rnd(r24), .exp_in(e24), .frac(f24), .exp_out(eo24));

  task automatic check(string name, int m, logic [127:0] r, int ein, int eout,
                       logic [127:0] f);
    int           lg = (r >= (128'd1 << (m + 1))) ? 2 : (r >= (128'd1 << m)) ? 1 : 0;
    logic [127:0] ef = (r / (128'd1 << lg)) % (128'd1 << (m - 1));
    checks++;
    if (eout != ein + lg || f !== ef) begin
      failures++;
      if (failures < 10)
        $display("%s mismatch: rnd %h exp %0d -> got (%0d,%h) expected (%0d,%h)",
                 name, r, ein, eout, f, ein + lg, ef);
    end
  endtask

  function automatic logic [127:0] pick(int m, int n);
    logic [127:0] r = {$urandom, $urandom, $urandom, $urandom};
    case (n % 3)
      0: return (r % (128'd1 << (m - 1))) | (128'd1 << (m - 1));   // [1,2)
      1: return (r % (128'd1 << m)) | (128'd1 << m);               // [2,4)
      default: return 128'd1 << (m + 1);                           // 4
    endcase
  endfunction

  initial begin : stim
    for (int n = 0; n < 3000; n++) begin
      r53 = 55'(pick(53, n));  e53 = 13'(int'($urandom % 4000) - 1000);
      r24 = 26'(pick(24, n));  e24 = 10'(int'($urandom % 500) - 150);
      #1;
      check("M53", 53, 128'(r53), int'(e53), int'(eo53), 128'(f53));
      check("M24", 24, 128'(r24), int'(e24), int'(eo24), 128'(f24));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
