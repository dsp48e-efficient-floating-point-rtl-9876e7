// Self-checking testbench for mant_mult_114.
//
// Drives a new operand pair every cycle (random values mixed with corner
// values: zero, all ones, one), computes the expected product with the
// simulator's own wide '*' and compares each output exactly LAT cycles later,
// so a wrong latency fails as surely as a wrong product. Latency 11.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_mant_mult_114;
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

  // ---- m114: mant_mult_114  ----
  localparam int m114_WA = 114, m114_WB = 114, m114_LAT = 11;
  logic [114-1:0] m114_a;
  logic [114-1:0] m114_b;
  logic [114+114-1:0] m114_p;
  logic [114+114-1:0] m114_exp [NVEC];
  mant_mult_114  u_m114 (.clk(clk), .a(m114_a), .b(m114_b), .p(m114_p));

  initial begin : stim
    for (int n = 0; n < NVEC; n++) begin
      @(negedge clk);
      if (n >= m114_LAT) begin
        checks++;
        if (m114_p !== m114_exp[n-m114_LAT]) begin
          failures++;
          if (failures < 10) $display("m114 mismatch at vector %0d: got %h expected %h", n-m114_LAT, m114_p, m114_exp[n-m114_LAT]);
        end
      end
      m114_a = 114'(pick(n, m114_WA));
      m114_b = 114'(pick(n, m114_WB));
      m114_exp[n] = (114+114)'(m114_a) * (114+114)'(m114_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
