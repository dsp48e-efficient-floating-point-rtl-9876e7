// Stimulus generator and checker for one floating point multiplier unit.
//
// Issues NOPS operand pairs to a multiplier of format (E, F) and checks every
// result against fp_ref_pkg::fp_mul_ref. Operands come from a mix of random
// values near and far from the bias, zeros, infinities, NaNs, fractions of all
// ones or one half (exact ties), and pairs whose product lies just below a
// power of two (rounding carry-out). in_valid is dropped on about one cycle in
// eight to create pipeline bubbles. Each issued operation records its issue
// cycle; when out_valid returns it, the checker requires exactly LAT cycles to
// have passed and a result equal to the reference. For double precision each
// normal result is also checked against the simulator's own IEEE double
// multiplication. The events of every operation are counted per kind in
// ev_cnt (index: 0 special, 1 normalization shift, 2 round up, 3 tie,
// 4 rounding carry-out, 5 overflow, 6 underflow, 7 bubble cycle).
module fp_lane_check
  import fp_ref_pkg::*;
#(
  parameter int E    = 11,
  parameter int F    = 52,
  parameter int LAT  = 9,
  parameter int NOPS = 2000
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              in_valid,
  output logic [E+F:0]      in1,
  output logic [E+F:0]      in2,
  input  logic              out_valid,
  input  logic [E+F:0]      result,
  output int                checks,
  output int                failures,
  output logic              done,
  output int                ev_cnt [8]
);

  // operations in flight: operands, expected result, issue cycle
  logic [E+F:0] qx[$], qy[$], qr[$];
  longint       qc[$];
  longint cyc = 0;
  int     issued = 0, retired = 0;

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    in_valid = 1'b0; in1 = '0; in2 = '0;
    foreach (ev_cnt[i]) ev_cnt[i] = 0;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // issue on the falling edge, so the DUT samples stable values
  always @(negedge clk) begin
    if (!rst_n || issued >= NOPS) begin
      in_valid <= 1'b0;
    end else if ($urandom % 8 == 0) begin
      in_valid <= 1'b0;
      ev_cnt[7] <= ev_cnt[7] + 1;
    end else begin
      logic [E+F:0] x, y, r;
      fp_events_t   ev;
      x = (E+F+1)'(rand_operand(E, F));
      y = ($urandom % 10 == 0) ? (E+F+1)'(near_recip(E, F, 128'(x)))
                               : (E+F+1)'(rand_operand(E, F));
      r = (E+F+1)'(fp_mul_ref(E, F, 128'(x), 128'(y), ev));
      qx.push_back(x);
      qy.push_back(y);
      qr.push_back(r);
      qc.push_back(cyc);
      in_valid <= 1'b1;
      in1 <= x;
      in2 <= y;
      issued <= issued + 1;
      ev_cnt[0] <= ev_cnt[0] + int'(ev.special);
      ev_cnt[1] <= ev_cnt[1] + int'(ev.norm_shift);
      ev_cnt[2] <= ev_cnt[2] + int'(ev.round_up);
      ev_cnt[3] <= ev_cnt[3] + int'(ev.tie);
      ev_cnt[4] <= ev_cnt[4] + int'(ev.carry_out);
      ev_cnt[5] <= ev_cnt[5] + int'(ev.overflow);
      ev_cnt[6] <= ev_cnt[6] + int'(ev.underflow);
    end
  end

  // operands issued at negedge of cycle c are sampled at posedge c+1 and
  // their result is visible after posedge c+LAT, i.e. at cycle value c+LAT
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (qx.size() == 0) begin
        failures <= failures + 1;
        $display("E=%0d F=%0d: result without an operation in flight", E, F);
      end else begin
        logic [E+F:0] ox, oy, orr;
        longint       oc;
        int           bad;
        ox  = qx.pop_front();
        oy  = qy.pop_front();
        orr = qr.pop_front();
        oc  = qc.pop_front();
        bad = 0;
        if (cyc - oc != longint'(LAT)) begin
          bad++;
          if (failures < 10) $display("E=%0d F=%0d: latency %0d, expected %0d", E, F, cyc - oc, LAT);
        end
        if (result !== orr) begin
          bad++;
          if (failures < 10) $display("E=%0d F=%0d: %h * %h = %h, expected %h", E, F, ox, oy, result, orr);
        end
        if (E == 11 && F == 52 && orr[62:52] != '0 && orr[62:52] != '1
            && ox[62:52] != '1 && oy[62:52] != '1 && ox[62:52] != '0 && oy[62:52] != '0) begin
          logic [63:0] rr;
          rr = $realtobits($bitstoreal(64'(ox)) * $bitstoreal(64'(oy)));
          if (64'(result) !== rr) begin
            bad++;
            if (failures < 10) $display("DP: %h * %h = %h, IEEE double gives %h", ox, oy, result, rr);
          end
        end
        checks   <= checks + 1;
        failures <= failures + bad;
        retired  <= retired + 1;
        if (retired + 1 == NOPS) done <= 1'b1;
      end
    end
  end

endmodule
