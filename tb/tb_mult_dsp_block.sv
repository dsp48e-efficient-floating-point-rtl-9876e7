// Self-checking testbench for mult_dsp_block.
//
// Drives a new operand pair every cycle (random values mixed with corner
// values: zero, all ones, one), computes the expected product with the
// simulator's own wide '*' and compares each output exactly LAT cycles later,
// so a wrong latency fails as surely as a wrong product. Covers the 24x24 default and every width the larger
// multipliers instantiate (19 to 23 bits).
// A watchdog ends the run with a failure if it does not finish in time.
module tb_mult_dsp_block;
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

  // ---- m24: mult_dsp_block  ----
  localparam int m24_WA = 24, m24_WB = 24, m24_LAT = 3;
  logic [24-1:0] m24_a;
  logic [24-1:0] m24_b;
  logic [24+24-1:0] m24_p;
  logic [24+24-1:0] m24_exp [NVEC];
  mult_dsp_block  u_m24 (.clk(clk), .a(m24_a), .b(m24_b), .p(m24_p));

  // ---- m23: mult_dsp_block #(.W(23)) ----
  localparam int m23_WA = 23, m23_WB = 23, m23_LAT = 3;
  logic [23-1:0] m23_a;
  logic [23-1:0] m23_b;
  logic [23+23-1:0] m23_p;
  logic [23+23-1:0] m23_exp [NVEC];
  mult_dsp_block #(.W(23)) u_m23 (.clk(clk), .a(m23_a), .b(m23_b), .p(m23_p));

  // ---- m22: mult_dsp_block #(.W(22)) ----
  localparam int m22_WA = 22, m22_WB = 22, m22_LAT = 3;
  logic [22-1:0] m22_a;
  logic [22-1:0] m22_b;
  logic [22+22-1:0] m22_p;
  logic [22+22-1:0] m22_exp [NVEC];
  mult_dsp_block #(.W(22)) u_m22 (.clk(clk), .a(m22_a), .b(m22_b), .p(m22_p));

  // ---- m21: mult_dsp_block #(.W(21)) ----
  localparam int m21_WA = 21, m21_WB = 21, m21_LAT = 3;
  logic [21-1:0] m21_a;
  logic [21-1:0] m21_b;
  logic [21+21-1:0] m21_p;
  logic [21+21-1:0] m21_exp [NVEC];
  mult_dsp_block #(.W(21)) u_m21 (.clk(clk), .a(m21_a), .b(m21_b), .p(m21_p));

  // ---- m20: mult_dsp_block #(.W(20)) ----
  localparam int m20_WA = 20, m20_WB = 20, m20_LAT = 3;
  logic [20-1:0] m20_a;
  logic [20-1:0] m20_b;
  logic [20+20-1:0] m20_p;
  logic [20+20-1:0] m20_exp [NVEC];
  mult_dsp_block #(.W(20)) u_m20 (.clk(clk), .a(m20_a), .b(m20_b), .p(m20_p));

  // ---- m19: mult_dsp_block #(.W(19)) ----
  localparam int m19_WA = 19, m19_WB = 19, m19_LAT = 3;
  logic [19-1:0] m19_a;
  logic [19-1:0] m19_b;
  logic [19+19-1:0] m19_p;
  logic [19+19-1:0] m19_exp [NVEC];
  mult_dsp_block #(.W(19)) u_m19 (.clk(clk), .a(m19_a), .b(m19_b), .p(m19_p));

  initial begin : stim
    for (int n = 0; n < NVEC; n++) begin
      @(negedge clk);
      if (n >= m24_LAT) begin
        checks++;
        if (m24_p !== m24_exp[n-m24_LAT]) begin
          failures++;
          if (failures < 10) $display("m24 mismatch at vector %0d: got %h expected %h", n-m24_LAT, m24_p, m24_exp[n-m24_LAT]);
        end
      end
      m24_a = 24'(pick(n, m24_WA));
      m24_b = 24'(pick(n, m24_WB));
      m24_exp[n] = (24+24)'(m24_a) * (24+24)'(m24_b);
      if (n >= m23_LAT) begin
        checks++;
        if (m23_p !== m23_exp[n-m23_LAT]) begin
          failures++;
          if (failures < 10) $display("m23 mismatch at vector %0d: got %h expected %h", n-m23_LAT, m23_p, m23_exp[n-m23_LAT]);
        end
      end
      m23_a = 23'(pick(n, m23_WA));
      m23_b = 23'(pick(n, m23_WB));
      m23_exp[n] = (23+23)'(m23_a) * (23+23)'(m23_b);
      if (n >= m22_LAT) begin
        checks++;
        if (m22_p !== m22_exp[n-m22_LAT]) begin
          failures++;
          if (failures < 10) $display("m22 mismatch at vector %0d: got %h expected %h", n-m22_LAT, m22_p, m22_exp[n-m22_LAT]);
        end
      end
      m22_a = 22'(pick(n, m22_WA));
      m22_b = 22'(pick(n, m22_WB));
      m22_exp[n] = (22+22)'(m22_a) * (22+22)'(m22_b);
      if (n >= m21_LAT) begin
        checks++;
        if (m21_p !== m21_exp[n-m21_LAT]) begin
          failures++;
          if (failures < 10) $display("m21 mismatch at vector %0d: got %h expected %h", n-m21_LAT, m21_p, m21_exp[n-m21_LAT]);
        end
      end
      m21_a = 21'(pick(n, m21_WA));
      m21_b = 21'(pick(n, m21_WB));
      m21_exp[n] = (21+21)'(m21_a) * (21+21)'(m21_b);
      if (n >= m20_LAT) begin
        checks++;
        if (m20_p !== m20_exp[n-m20_LAT]) begin
          failures++;
          if (failures < 10) $display("m20 mismatch at vector %0d: got %h expected %h", n-m20_LAT, m20_p, m20_exp[n-m20_LAT]);
        end
      end
      m20_a = 20'(pick(n, m20_WA));
      m20_b = 20'(pick(n, m20_WB));
      m20_exp[n] = (20+20)'(m20_a) * (20+20)'(m20_b);
      if (n >= m19_LAT) begin
        checks++;
        if (m19_p !== m19_exp[n-m19_LAT]) begin
          failures++;
          if (failures < 10) $display("m19 mismatch at vector %0d: got %h expected %h", n-m19_LAT, m19_p, m19_exp[n-m19_LAT]);
        end
      end
      m19_a = 19'(pick(n, m19_WA));
      m19_b = 19'(pick(n, m19_WB));
      m19_exp[n] = (19+19)'(m19_a) * (19+19)'(m19_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
