// Self-checking testbench for dsp48e_mac.
//
// a and b change every cycle and c every cycle too; since c enters one cycle
// before the output register and a, b three cycles before it, the expected
// p at cycle n is a[n-3] * b[n-3] + c[n-1] (modulo 2^48). Checking against that
// schedule tests both input latencies. Includes maximum operands. A watchdog
// ends a hung run with a failure.
module tb_dsp48e_mac;
  localparam int NVEC = 3000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] a, av [NVEC];
  logic [16:0] b, bv [NVEC];
  logic [47:0] c, cv [NVEC];
  logic [47:0] p, e;

  dsp48e_mac u_dut (.clk(clk), .a(a), .b(b), .c(c), .p(p));

  initial begin : stim
    for (int n = 0; n < NVEC; n++) begin
      @(negedge clk);
      if (n >= 3) begin
        e = 48'(av[n-3]) * 48'(bv[n-3]) + cv[n-1];
        checks++;
        if (p !== e) begin
          failures++;
          if (failures < 10) $display("mismatch at %0d: got %h expected %h", n, p, e);
        end
      end
      if (n % 9 == 0) begin
        a = '1; b = '1; c = 48'({$urandom, $urandom});
      end else begin
        a = 24'($urandom); b = 17'($urandom); c = 48'({$urandom, $urandom});
      end
      av[n] = a; bv[n] = b; cv[n] = c;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
