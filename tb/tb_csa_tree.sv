// Self-checking testbench for csa_tree.
//
// The compressor is combinational: for random and corner operand sets it
// checks that sum + carry equals the arithmetic sum of the operands modulo
// 2^W, for the default (5 x 106 bits) and for 2, 3, 4, 7 and 9 operands, which
// exercise every remainder case of a level (pass-through, 3:2 row, 4:2 rows).
// A watchdog ends the run with a failure if it hangs.
module tb_csa_tree;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [255:0] rnd256();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  logic [4:0][105:0] o5;  logic [105:0] s5, c5;
  logic [1:0][30:0]  o2;  logic [30:0]  s2, c2;
  logic [2:0][40:0]  o3;  logic [40:0]  s3, c3;
  logic [3:0][64:0]  o4;  logic [64:0]  s4, c4;
  logic [6:0][33:0]  o7;  logic [33:0]  s7, c7;
  logic [8:0][50:0]  o9;  logic [50:0]  s9, c9;

  csa_tree                   u5 (.ops(o5), .sum(s5), .carry(c5));
  csa_tree #(.N(2), .W(31))  u2 (.ops(o2), .sum(s2), .carry(c2));
  csa_tree #(.N(3), .W(41))  u3 (.ops(o3), .sum(s3), .carry(c3));
  csa_tree #(.N(4), .W(65))  u4 (.ops(o4), .sum(s4), .carry(c4));
  csa_tree #(.N(7), .W(34))  u7 (.ops(o7), .sum(s7), .carry(c7));
  csa_tree #(.N(9), .W(51))  u9 (.ops(o9), .sum(s9), .carry(c9));

  // all ones in every operand on some vectors, to force long carries
  function automatic logic [255:0] opnd(int n);
    return (n % 7 == 0) ? '1 : rnd256();
  endfunction

  task automatic check(string name, logic [255:0] got, logic [255:0] exp, int w);
    logic [255:0] m = (256'd1 << w) - 1;
    checks++;
    if ((got & m) !== (exp & m)) begin
      failures++;
      if (failures < 10) $display("%s mismatch: got %h expected %h", name, got & m, exp & m);
    end
  endtask

  initial begin : stim
    logic [255:0] ref5, ref2, ref3, ref4, ref7, ref9;
    for (int n = 0; n < 3000; n++) begin
      ref5 = 0; ref2 = 0; ref3 = 0; ref4 = 0; ref7 = 0; ref9 = 0;
      for (int i = 0; i < 5; i++) begin o5[i] = 106'(opnd(n)); ref5 += 256'(o5[i]); end
      for (int i = 0; i < 2; i++) begin o2[i] = 31'(opnd(n));  ref2 += 256'(o2[i]); end
      for (int i = 0; i < 3; i++) begin o3[i] = 41'(opnd(n));  ref3 += 256'(o3[i]); end
      for (int i = 0; i < 4; i++) begin o4[i] = 65'(opnd(n));  ref4 += 256'(o4[i]); end
      for (int i = 0; i < 7; i++) begin o7[i] = 34'(opnd(n));  ref7 += 256'(o7[i]); end
      for (int i = 0; i < 9; i++) begin o9[i] = 51'(opnd(n));  ref9 += 256'(o9[i]); end
      #1;
      check("N5", 256'(s5) + 256'(c5), ref5, 106);
      check("N2", 256'(s2) + 256'(c2), ref2, 31);
      check("N3", 256'(s3) + 256'(c3), ref3, 41);
      check("N4", 256'(s4) + 256'(c4), ref4, 65);
      check("N7", 256'(s7) + 256'(c7), ref7, 34);
      check("N9", 256'(s9) + 256'(c9), ref9, 51);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
