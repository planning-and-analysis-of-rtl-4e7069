// tb_dadda_dq42_8x8: exhaustive check of the 8x8 Dadda DQ4:2 multiplier.
//
// Five instances (variants 1..4 and mixed) see the same operands. For all
// 65536 operand pairs, in exact mode each product must equal a*b, and in
// approximate mode each must equal the column-by-column reference model.
// Approximate mode must actually differ from the exact product for some
// operands in every variant, and the mixed multiplier must differ from both
// pure variants it is made of. Mean error distances are printed; the most
// accurate compressor (variant 4) must give a smaller mean error than the
// least accurate one (variant 1), and variant 2, whose compressor keeps cout,
// a smaller mean error than variant 1 at the same compressor error rate.
module tb_dadda_dq42_8x8;
  import dq42_pkg::*;
  import dq42_ref_pkg::*;

  logic        exact_mode;
  logic [7:0]  a, b;
  logic [15:0] p [5];
  int checks = 0, failures = 0;
  int approx_diff [5];
  longint err_sum [5];
  int mixed_ne_c1 = 0, mixed_ne_c4 = 0;

  dadda_dq42_8x8 #(.VARIANT(DQ_C1))    u1 (.exact_mode(exact_mode), .a(a), .b(b), .p(p[0]));
  dadda_dq42_8x8 #(.VARIANT(DQ_C2))    u2 (.exact_mode(exact_mode), .a(a), .b(b), .p(p[1]));
  dadda_dq42_8x8 #(.VARIANT(DQ_C3))    u3 (.exact_mode(exact_mode), .a(a), .b(b), .p(p[2]));
  dadda_dq42_8x8 #(.VARIANT(DQ_C4))    u4 (.exact_mode(exact_mode), .a(a), .b(b), .p(p[3]));
  dadda_dq42_8x8 #(.VARIANT(DQ_MIXED)) u5 (.exact_mode(exact_mode), .a(a), .b(b), .p(p[4]));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5; k++) begin approx_diff[k] = 0; err_sum[k] = 0; end
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        int unsigned exp_p;
        int err_d;
        a = 8'(x);
        b = 8'(y);
        exact_mode = 1'b1;
        #1;
        for (int k = 0; k < 5; k++) begin
          checks++;
          if (int'(p[k]) != x * y) begin
            failures++;
            if (failures < 10) $display("FAIL exact v%0d %0d*%0d -> %0d", k + 1, x, y, p[k]);
          end
        end
        exact_mode = 1'b0;
        #1;
        for (int k = 0; k < 5; k++) begin
          exp_p = mul8(k + 1, 1'b0, 0, 8, a, b);
          checks++;
          if (int'(p[k]) != exp_p) begin
            failures++;
            if (failures < 10)
              $display("FAIL approx v%0d %0d*%0d -> %0d, expected %0d", k + 1, x, y, p[k], exp_p);
          end
          if (int'(p[k]) != x * y) approx_diff[k]++;
          err_d = int'(p[k]) - x * y;
          if (err_d < 0) err_d = -err_d;
          err_sum[k] += longint'(err_d);
        end
        if (p[4] != p[0]) mixed_ne_c1++;
        if (p[4] != p[3]) mixed_ne_c4++;
      end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (approx_diff[k] == 0) begin
        failures++;
        $display("FAIL variant %0d never approximated", k + 1);
      end
      $display("variant %0d: %0d of 65536 products inexact, mean error distance %0.2f",
               k + 1, approx_diff[k], real'(err_sum[k]) / 65536.0);
    end
    checks++;
    if (mixed_ne_c1 == 0 || mixed_ne_c4 == 0) begin
      failures++;
      $display("FAIL mixed multiplier equals a pure variant");
    end
    checks++;
    if (!(err_sum[3] < err_sum[0])) begin
      failures++;
      $display("FAIL variant 4 not more accurate than variant 1");
    end
    checks++;
    if (!(err_sum[1] < err_sum[0])) begin
      failures++;
      $display("FAIL variant 2 not more accurate than variant 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
