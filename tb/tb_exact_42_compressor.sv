// tb_exact_42_compressor: exhaustive check of the exact 4:2 compressor over
// all 32 input combinations. Checks the weighted identity
// a1+a2+a3+a4+cin == sum + 2*(carry+cout), that cout does not depend on cin
// (it is formed from a1..a3 only), and each output against the count-based
// reference.
module tb_exact_42_compressor;
  import dq42_ref_pkg::*;
  logic a1, a2, a3, a4, cin, sum, carry, cout;
  int checks = 0, failures = 0;
  comp_t r;

  exact_42_compressor dut (.*);

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
      #1;
      r = comp_exact(a1, a2, a3, a4, cin);
      checks++;
      if (int'(a1) + int'(a2) + int'(a3) + int'(a4) + int'(cin)
          != int'(sum) + 2 * (int'(carry) + int'(cout))) begin
        failures++;
        $display("FAIL weight v=%b -> s=%0d c=%0d co=%0d", v[4:0], sum, carry, cout);
      end
      checks++;
      if ({sum, carry, cout} != {r.sum, r.carry, r.cout}) begin
        failures++;
        $display("FAIL outputs v=%b", v[4:0]);
      end
      checks++;
      if (cout != ((int'(a1) + int'(a2) + int'(a3)) >= 2)) begin
        failures++;
        $display("FAIL cout v=%b", v[4:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
