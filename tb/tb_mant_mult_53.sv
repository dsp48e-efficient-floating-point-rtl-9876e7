// Self-checking testbench for mant_mult_53.
//
// Drives a new operand pair every cycle (random values mixed with corner
// values: zero, all ones, one), computes the expected product with the
// simulator's own wide '*' and compares each output exactly LAT cycles later,
// so a wrong latency fails as surely as a wrong product. Latency 6.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_mant_mult_53;
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

  // ---- m53: mant_mult_53  ----
  localparam int m53_WA = 53, m53_WB = 53, m53_LAT = 6;
  logic [53-1:0] m53_a;
  logic [53-1:0] m53_b;
  logic [53+53-1:0] m53_p;
  logic [53+53-1:0] m53_exp [NVEC];
  mant_mult_53  u_m53 (.clk(clk), .a(m53_a), .b(m53_b), .p(m53_p));

  initial begin : stim
    for (int n = 0; n < NVEC; n++) begin
      @(negedge clk);
      if (n >= m53_LAT) begin
        checks++;
        if (m53_p !== m53_exp[n-m53_LAT]) begin
          failures++;
          if (failures < 10) $display("m53 mismatch at vector %0d: got %h expected %h", n-m53_LAT, m53_p, m53_exp[n-m53_LAT]);
        end
      end
      m53_a = 53'(pick(n, m53_WA));
      m53_b = 53'(pick(n, m53_WB));
      m53_exp[n] = (53+53)'(m53_a) * (53+53)'(m53_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
