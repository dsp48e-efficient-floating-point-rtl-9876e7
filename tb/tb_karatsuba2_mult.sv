// Self-checking testbench for karatsuba2_mult.
//
// Drives a new operand pair every cycle (random values mixed with corner
// values: zero, all ones, one), computes the expected product with the
// simulator's own wide '*' and compares each output exactly LAT cycles later,
// so a wrong latency fails as surely as a wrong product. Covers both widths used (39x39 default, 38x38).
// A watchdog ends the run with a failure if it does not finish in time.
module tb_karatsuba2_mult;
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

  // ---- m39: karatsuba2_mult  ----
  localparam int m39_WA = 39, m39_WB = 39, m39_LAT = 5;
  logic [39-1:0] m39_a;
  logic [39-1:0] m39_b;
  logic [39+39-1:0] m39_p;
  logic [39+39-1:0] m39_exp [NVEC];
  karatsuba2_mult  u_m39 (.clk(clk), .a(m39_a), .b(m39_b), .p(m39_p));

  // ---- m38: karatsuba2_mult #(.W(38)) ----
  localparam int m38_WA = 38, m38_WB = 38, m38_LAT = 5;
  logic [38-1:0] m38_a;
  logic [38-1:0] m38_b;
  logic [38+38-1:0] m38_p;
  logic [38+38-1:0] m38_exp [NVEC];
  karatsuba2_mult #(.W(38)) u_m38 (.clk(clk), .a(m38_a), .b(m38_b), .p(m38_p));

  initial begin : stim
    for (int n = 0; n < NVEC; n++) begin
      @(negedge clk);
      if (n >= m39_LAT) begin
        checks++;
        if (m39_p !== m39_exp[n-m39_LAT]) begin
          failures++;
          if (failures < 10) $display("m39 mismatch at vector %0d: got %h expected %h", n-m39_LAT, m39_p, m39_exp[n-m39_LAT]);
        end
      end
      m39_a = 39'(pick(n, m39_WA));
      m39_b = 39'(pick(n, m39_WB));
      m39_exp[n] = (39+39)'(m39_a) * (39+39)'(m39_b);
      if (n >= m38_LAT) begin
        checks++;
        if (m38_p !== m38_exp[n-m38_LAT]) begin
          failures++;
          if (failures < 10) $display("m38 mismatch at vector %0d: got %h expected %h", n-m38_LAT, m38_p, m38_exp[n-m38_LAT]);
        end
      end
      m38_a = 38'(pick(n, m38_WA));
      m38_b = 38'(pick(n, m38_WB));
      m38_exp[n] = (38+38)'(m38_a) * (38+38)'(m38_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
