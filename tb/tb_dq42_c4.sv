// tb_dq42_c4: exhaustive check of dual-quality compressor variant 4.
//
// Exact mode (all 32 inputs): a1+a2+a3+a4+cin == sum + 2*(carry+cout).
// Approximate mode (all 32 inputs): outputs equal the reference rules and do
// not depend on cin. The number of the 16 combinations of a1..a4 whose
// approximate value sum + 2*(carry+cout) differs from a1+a2+a3+a4 must be
// 5, i.e. the error rate of 31.25 % quoted for this variant. The mode is
// toggled between consecutive vectors to check that it switches at once.
module tb_dq42_c4;
  import dq42_ref_pkg::*;
  logic exact_mode, a1, a2, a3, a4, cin, sum, carry, cout;
  int checks = 0, failures = 0;
  int wrong = 0, err_dist = 0, err_dist_c1 = 0;
  comp_t r;

  dq42_c4 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {a1, a2, a3, a4, cin} = 5'(v);
      exact_mode = 1'b1;
      #1;
      checks++;
      if (int'(a1) + int'(a2) + int'(a3) + int'(a4) + int'(cin)
          != int'(sum) + 2 * (int'(carry) + int'(cout))) begin
        failures++;
        $display("FAIL exact v=%b -> s=%0d c=%0d co=%0d", v[4:0], sum, carry, cout);
      end
      exact_mode = 1'b0;
      #1;
      r = comp_approx(4, a1, a2, a3, a4);
      checks++;
      if ({sum, carry, cout} != {r.sum, r.carry, r.cout}) begin
        failures++;
        $display("FAIL approx v=%b -> s=%0d c=%0d co=%0d exp %0d%0d%0d",
                 v[4:0], sum, carry, cout, r.sum, r.carry, r.cout);
      end
      if (!cin) begin
        int exp_v, got_v, c1_v;
        comp_t r1;
        exp_v = int'(a1) + int'(a2) + int'(a3) + int'(a4);
        got_v = int'(sum) + 2 * (int'(carry) + int'(cout));
        r1    = comp_approx(1, a1, a2, a3, a4);
        c1_v  = int'(r1.sum) + 2 * int'(r1.carry);
        if (got_v != exp_v) wrong++;
        err_dist    += (got_v > exp_v) ? got_v - exp_v : exp_v - got_v;
        err_dist_c1 += (c1_v > exp_v) ? c1_v - exp_v : exp_v - c1_v;
      end
    end
    checks++;
    if (wrong != 5) begin
      failures++;
      $display("FAIL error count %0d of 16, expected 5", wrong);
    end

    $display("variant 4: %0d of 16 approximate results wrong, summed error distance %0d",
             wrong, err_dist);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
