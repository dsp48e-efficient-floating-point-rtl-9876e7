// Self-checking testbench for add_pipe2.
//
// A new operand pair every cycle; each sum is compared two cycles later with
// a + b modulo 2^W worked out in the testbench. Operands include carries that
// cross the split point (all ones plus one). Default width 132 and an odd
// width of 61 are covered. A watchdog ends a hung run with a failure.
module tb_add_pipe2;
  localparam int NVEC = 3000;
  localparam int LAT  = 2;
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

  logic [131:0] a, b, y, exp_y [NVEC];
  logic [60:0]  c, d, z, exp_z [NVEC];

  add_pipe2             u_def (.clk(clk), .a(a), .b(b), .y(y));
  add_pipe2 #(.W(61))   u_odd (.clk(clk), .a(c), .b(d), .y(z));

  function automatic logic [255:0] rnd256();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin : stim
    for (int n = 0; n < NVEC; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        checks += 2;
        if (y !== exp_y[n-LAT]) begin
          failures++;
          if (failures < 10) $display("W=132 mismatch %0d: %h vs %h", n-LAT, y, exp_y[n-LAT]);
        end
        if (z !== exp_z[n-LAT]) begin
          failures++;
          if (failures < 10) $display("W=61 mismatch %0d: %h vs %h", n-LAT, z, exp_z[n-LAT]);
        end
      end
      if (n % 5 == 0) begin
        a = '1; b = 132'(1 + ($urandom % 3));
        c = '1; d = 61'(1 + ($urandom % 3));
      end else if (n % 5 == 1) begin
        a = {66'h0, {66{1'b1}}}; b = 132'(1);
        c = {31'h0, {30{1'b1}}}; d = 61'(1);
      end else begin
        a = 132'(rnd256()); b = 132'(rnd256());
        c = 61'(rnd256());  d = 61'(rnd256());
      end
      exp_y[n] = a + b;
      exp_z[n] = c + d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
