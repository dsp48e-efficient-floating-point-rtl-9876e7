// Self-checking testbench for booth_mult.
//
// Drives a new operand pair every cycle (random values mixed with corner
// values: zero, all ones, one), computes the expected product with the
// simulator's own wide '*' and compares each output exactly LAT cycles later,
// so a wrong latency fails as surely as a wrong product. Covers the Booth configurations used (24x7, 46x7, 7x7, 23x6)
// and the plain partial-product one (21x4).
// A watchdog ends the run with a failure if it does not finish in time.
module tb_booth_mult;
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

  // ---- m24x7: booth_mult  ----
  localparam int m24x7_WA = 24, m24x7_WB = 7, m24x7_LAT = 2;
  logic [24-1:0] m24x7_a;
  logic [7-1:0] m24x7_b;
  logic [24+7-1:0] m24x7_p;
  logic [24+7-1:0] m24x7_exp [NVEC];
  booth_mult  u_m24x7 (.clk(clk), .a(m24x7_a), .b(m24x7_b), .p(m24x7_p));

  // ---- m46x7: booth_mult #(.WA(46), .WB(7)) ----
  localparam int m46x7_WA = 46, m46x7_WB = 7, m46x7_LAT = 2;
  logic [46-1:0] m46x7_a;
  logic [7-1:0] m46x7_b;
  logic [46+7-1:0] m46x7_p;
  logic [46+7-1:0] m46x7_exp [NVEC];
  booth_mult #(.WA(46), .WB(7)) u_m46x7 (.clk(clk), .a(m46x7_a), .b(m46x7_b), .p(m46x7_p));

  // ---- m7x7: booth_mult #(.WA(7), .WB(7)) ----
  localparam int m7x7_WA = 7, m7x7_WB = 7, m7x7_LAT = 2;
  logic [7-1:0] m7x7_a;
  logic [7-1:0] m7x7_b;
  logic [7+7-1:0] m7x7_p;
  logic [7+7-1:0] m7x7_exp [NVEC];
  booth_mult #(.WA(7), .WB(7)) u_m7x7 (.clk(clk), .a(m7x7_a), .b(m7x7_b), .p(m7x7_p));

  // ---- m23x6: booth_mult #(.WA(23), .WB(6)) ----
  localparam int m23x6_WA = 23, m23x6_WB = 6, m23x6_LAT = 2;
  logic [23-1:0] m23x6_a;
  logic [6-1:0] m23x6_b;
  logic [23+6-1:0] m23x6_p;
  logic [23+6-1:0] m23x6_exp [NVEC];
  booth_mult #(.WA(23), .WB(6)) u_m23x6 (.clk(clk), .a(m23x6_a), .b(m23x6_b), .p(m23x6_p));

  // ---- m21x4p: booth_mult #(.WA(21), .WB(4), .BOOTH(1'b0)) ----
  localparam int m21x4p_WA = 21, m21x4p_WB = 4, m21x4p_LAT = 2;
  logic [21-1:0] m21x4p_a;
  logic [4-1:0] m21x4p_b;
  logic [21+4-1:0] m21x4p_p;
  logic [21+4-1:0] m21x4p_exp [NVEC];
  booth_mult #(.WA(21), .WB(4), .BOOTH(1'b0)) u_m21x4p (.clk(clk), .a(m21x4p_a), .b(m21x4p_b), .p(m21x4p_p));

  initial begin : stim
    for (int n = 0; n < NVEC; n++) begin
      @(negedge clk);
      if (n >= m24x7_LAT) begin
        checks++;
        if (m24x7_p !== m24x7_exp[n-m24x7_LAT]) begin
          failures++;
          if (failures < 10) $display("m24x7 mismatch at vector %0d: got %h expected %h", n-m24x7_LAT, m24x7_p, m24x7_exp[n-m24x7_LAT]);
        end
      end
      m24x7_a = 24'(pick(n, m24x7_WA));
      m24x7_b = 7'(pick(n, m24x7_WB));
      m24x7_exp[n] = (24+7)'(m24x7_a) * (24+7)'(m24x7_b);
      if (n >= m46x7_LAT) begin
        checks++;
        if (m46x7_p !== m46x7_exp[n-m46x7_LAT]) begin
          failures++;
          if (failures < 10) $display("m46x7 mismatch at vector %0d: got %h expected %h", n-m46x7_LAT, m46x7_p, m46x7_exp[n-m46x7_LAT]);
        end
      end
      m46x7_a = 46'(pick(n, m46x7_WA));
      m46x7_b = 7'(pick(n, m46x7_WB));
      m46x7_exp[n] = (46+7)'(m46x7_a) * (46+7)'(m46x7_b);
      if (n >= m7x7_LAT) begin
        checks++;
        if (m7x7_p !== m7x7_exp[n-m7x7_LAT]) begin
          failures++;
          if (failures < 10) $display("m7x7 mismatch at vector %0d: got %h expected %h", n-m7x7_LAT, m7x7_p, m7x7_exp[n-m7x7_LAT]);
        end
      end
      m7x7_a = 7'(pick(n, m7x7_WA));
      m7x7_b = 7'(pick(n, m7x7_WB));
      m7x7_exp[n] = (7+7)'(m7x7_a) * (7+7)'(m7x7_b);
      if (n >= m23x6_LAT) begin
        checks++;
        if (m23x6_p !== m23x6_exp[n-m23x6_LAT]) begin
          failures++;
          if (failures < 10) $display("m23x6 mismatch at vector %0d: got %h expected %h", n-m23x6_LAT, m23x6_p, m23x6_exp[n-m23x6_LAT]);
        end
      end
      m23x6_a = 23'(pick(n, m23x6_WA));
      m23x6_b = 6'(pick(n, m23x6_WB));
      m23x6_exp[n] = (23+6)'(m23x6_a) * (23+6)'(m23x6_b);
      if (n >= m21x4p_LAT) begin
        checks++;
        if (m21x4p_p !== m21x4p_exp[n-m21x4p_LAT]) begin
          failures++;
          if (failures < 10) $display("m21x4p mismatch at vector %0d: got %h expected %h", n-m21x4p_LAT, m21x4p_p, m21x4p_exp[n-m21x4p_LAT]);
        end
      end
      m21x4p_a = 21'(pick(n, m21x4p_WA));
      m21x4p_b = 4'(pick(n, m21x4p_WB));
      m21x4p_exp[n] = (21+4)'(m21x4p_a) * (21+4)'(m21x4p_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
