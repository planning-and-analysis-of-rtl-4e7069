// tb_dadda_dq42_16x16: random check of the 16x16 Dadda DQ4:2 multiplier.
//
// Five instances (variants 1..4 and mixed) see the same operands: corner
// operands (zero, one, all ones, single bits) and then 20000 random pairs. In
// exact mode each product must equal a*b; in approximate mode each must equal
// the reference model, which also sets the column of the mixed arrangement's
// switch from variant 1 to variant 4 at the middle of the product. Every
// variant must give an inexact product at least once.
module tb_dadda_dq42_16x16;
  import dq42_pkg::*;
  import dq42_ref_pkg::*;

  localparam int N = 16;
  logic           exact_mode;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p [5];
  int checks = 0, failures = 0;
  int approx_diff [5];

  dadda_dq42_16x16 #(.VARIANT(DQ_C1))    u1 (.exact_mode(exact_mode), .a(a), .b(b), .p(p[0]));
  dadda_dq42_16x16 #(.VARIANT(DQ_C2))    u2 (.exact_mode(exact_mode), .a(a), .b(b), .p(p[1]));
  dadda_dq42_16x16 #(.VARIANT(DQ_C3))    u3 (.exact_mode(exact_mode), .a(a), .b(b), .p(p[2]));
  dadda_dq42_16x16 #(.VARIANT(DQ_C4))    u4 (.exact_mode(exact_mode), .a(a), .b(b), .p(p[3]));
  dadda_dq42_16x16 #(.VARIANT(DQ_MIXED)) u5 (.exact_mode(exact_mode), .a(a), .b(b), .p(p[4]));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pair(logic [N-1:0] x, logic [N-1:0] y);
    logic [2*N-1:0] exact_p, exp_p;
    a = x;
    b = y;
    exact_p = (2*N)'(x) * (2*N)'(y);
    exact_mode = 1'b1;
    #1;
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (p[k] != exact_p) begin
        failures++;
        if (failures < 10) $display("FAIL exact v%0d %h*%h -> %h", k + 1, x, y, p[k]);
      end
    end
    exact_mode = 1'b0;
    #1;
    for (int k = 0; k < 5; k++) begin
      exp_p = (2*N)'(mul16(k + 1, 1'b0, 0, 16, x, y));
      checks++;
      if (p[k] != exp_p) begin
        failures++;
        if (failures < 10)
          $display("FAIL approx v%0d %h*%h -> %h, expected %h", k + 1, x, y, p[k], exp_p);
      end
      if (p[k] != exact_p) approx_diff[k]++;
    end
  endtask

  initial begin
    for (int k = 0; k < 5; k++) approx_diff[k] = 0;
    check_pair('0, '0);
    check_pair('1, '1);
    check_pair('1, N'(1));
    check_pair(N'(1), '1);
    for (int i = 0; i < N; i++) check_pair(N'(1) << i, '1);
    for (int i = 0; i < 20000; i++) check_pair(N'({$urandom, $urandom}), N'({$urandom, $urandom}));
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (approx_diff[k] == 0) begin
        failures++;
        $display("FAIL variant %0d never approximated", k + 1);
      end
      $display("variant %0d: %0d products inexact", k + 1, approx_diff[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
