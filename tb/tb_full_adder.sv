// tb_full_adder: exhaustive check of the full adder (8 input combinations):
// s + 2*co must equal a + b + ci.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if (int'(s) + 2 * int'(co) != int'(a) + int'(b) + int'(ci)) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d -> s=%0d co=%0d", a, b, ci, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
