// Self-checking testbench for mant_mult_66.
//
// Drives a new operand pair every cycle (random values mixed with corner
// values: zero, all ones, one), computes the expected product with the
// simulator's own wide '*' and compares each output exactly LAT cycles later,
// so a wrong latency fails as surely as a wrong product. Latency 7.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_mant_mult_66;
  localparam int NVEC = 2000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (NVEC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [255:0] rnd256();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  // operand generator: corner values for the first vectors and sometimes later
  function automatic logic [255:0] pick(int n, int w);
    logic [255:0] ones = (256'd1 << w) - 1;
    int unsigned  s = $urandom % 16;
    if (n < 4 || s == 0) begin
      case ($urandom % 4)
        0: return '0;
        1: return ones;
        2: return 256'd1;
        default: return ones ^ (256'd1 << ($urandom % w));
      endcase
    end
    return rnd256() & ones;
  endfunction

  // ---- m66: mant_mult_66  ----
  localparam int m66_WA = 66, m66_WB = 66, m66_LAT = 7;
  logic [66-1:0] m66_a;
  logic [66-1:0] m66_b;
  logic [66+66-1:0] m66_p;
  logic [66+66-1:0] m66_exp [NVEC];
  mant_mult_66  u_m66 (.clk(clk), .a(m66_a), .b(m66_b), .p(m66_p));

  initial begin : stim
    for (int n = 0; n < NVEC; n++) begin
      @(negedge clk);
      if (n >= m66_LAT) begin
        checks++;
        if (m66_p !== m66_exp[n-m66_LAT]) begin
          failures++;
          if (failures < 10) $display("m66 mismatch at vector %0d: got %h expected %h", n-m66_LAT, m66_p, m66_exp[n-m66_LAT]);
        end
      end
      m66_a = 66'(pick(n, m66_WA));
      m66_b = 66'(pick(n, m66_WB));
      m66_exp[n] = (66+66)'(m66_a) * (66+66)'(m66_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
