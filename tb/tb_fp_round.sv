// Self-checking testbench for fp_round.
//
// Feeds significand products (random products of two significands, exact
// ties, and windows of all ones that carry out when rounded) and compares the
// result bits with round-to-nearest-even computed here by integer division:
// q = prod / 2^k and remainder r, with k = M when the product is at least 2
// and k = M-1 otherwise; q is incremented when r > 2^(k-1), or r equals it
// and q is odd. When k = M the lowest output bit is not a result bit and is
// not compared. Covers M = 53 (default), 24, 65 and 113. A watchdog ends a
// hung run with a failure.
module tb_fp_round;
  int checks = 0, failures = 0;
  int ties = 0, ups = 0, carries = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [105:0] p53;  logic [54:0]  r53;
  logic [47:0]  p24;  logic [25:0]  r24;
  logic [129:0] p65;  logic [66:0]  r65;
  logic [225:0] p113; logic [114:0] r113;

  fp_round              u53  (.prod(p53),  .rnd(r53));
  fp_round #(.M(24))    u24  (.prod(p24),  .rnd(r24));
  fp_round #(.M(65))    u65  (.prod(p65),  .rnd(r65));
  fp_round #(.M(113))   u113 (.prod(p113), .rnd(r113));

  function automatic logic [255:0] rnd256();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic logic [255:0] make_prod(int m, int n);
    logic [255:0] sa = (rnd256() & ((256'd1 << (m - 1)) - 1)) | (256'd1 << (m - 1));
    logic [255:0] sb = (rnd256() & ((256'd1 << (m - 1)) - 1)) | (256'd1 << (m - 1));
    logic [255:0] pr = sa * sb;
    int           k  = pr[2*m-1] ? m : m - 1;
    case (n % 4)
      1: pr = ((pr >> k) << k) | (256'd1 << (k - 1));             // exact tie
      2: pr = ((256'd1 << (2*m - 1 - (n % 8 == 2 ? 0 : 1))) - 1);  // all ones
      default: ;
    endcase
    return pr;
  endfunction

  task automatic check(string name, int m, logic [255:0] pr, logic [255:0] got);
    int           k    = pr[2*m-1] ? m : m - 1;
    logic [255:0] q    = pr >> k;
    logic [255:0] r    = pr & ((256'd1 << k) - 1);
    logic [255:0] half = 256'd1 << (k - 1);
    logic [255:0] g;
    if (r == half) ties++;
    if (r > half || (r == half && q[0])) begin
      q = q + 1;
      ups++;
      if (q[m]) carries++;
    end
    g = (k == m) ? (got >> 1) : got;
    checks++;
    if (g !== q) begin
      failures++;
      if (failures < 10) $display("%s mismatch: prod %h got %h expected %h", name, pr, g, q);
    end
  endtask

  initial begin : stim
    for (int n = 0; n < 4000; n++) begin
      p53  = 106'(make_prod(53, n));
      p24  = 48'(make_prod(24, n));
      p65  = 130'(make_prod(65, n));
      p113 = 226'(make_prod(113, n));
      #1;
      check("M53",  53,  256'(p53),  256'(r53));
      check("M24",  24,  256'(p24),  256'(r24));
      check("M65",  65,  256'(p65),  256'(r65));
      check("M113", 113, 256'(p113), 256'(r113));
    end
    if (ties == 0 || ups == 0 || carries == 0) begin
      failures++;
      $display("a rounding case was never exercised: ties=%0d ups=%0d carries=%0d", ties, ups, carries);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
