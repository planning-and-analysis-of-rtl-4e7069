// tb_dadda_dq42_top: end-to-end test of the five 32x32 multipliers.
//
// Drives one operation per clock for NOPS cycles with random 32-bit operands
// and a random exact_mode per operation, and checks every product two clock
// edges after its operands against a*b (exact mode) or the reference model
// (approximate mode). Operand patterns include zero and all ones. A
// synchronous clear is applied in the middle of the run: the outputs must
// read zero after it and the pipeline must then resume. Counted mechanisms,
// each of which must occur at least once: exact-mode operations,
// approximate-mode operations, a mode switch between back-to-back
// operations, the clear, and, for every multiplier, an approximate product
// that differs from the exact one.
module tb_dadda_dq42_top;
  import dq42_ref_pkg::*;

  localparam int NOPS = 20000;
  localparam int CLR_AT = 7000;

  logic        clk = 1'b0;
  logic        clr;
  logic        exact_mode;
  logic [31:0] ri1, ri2;
  logic [63:0] p_c1, p_c2, p_c3, p_c4, p_mixed;

  int checks = 0, failures = 0;
  int n_exact = 0, n_approx = 0, n_switch = 0, n_clr = 0;
  int n_inexact [5];

  // expected products of the operation presented before the previous edge
  logic [63:0] exp_q [5];
  logic        valid_q;

  dadda_dq42_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #((NOPS + 20) * 10 * 4);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] operand(int sel);
    case (sel % 8)
      0:       return '0;
      1:       return '1;
      default: return {$urandom};
    endcase
  endfunction

  task automatic compare(logic [63:0] exp [5]);
    logic [63:0] got [5];
    got = '{p_c1, p_c2, p_c3, p_c4, p_mixed};
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (got[k] !== exp[k]) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0t multiplier %0d: %h expected %h", $time, k + 1, got[k], exp[k]);
      end
    end
  endtask

  initial begin
    logic prev_mode;
    logic [63:0] exp [5];
    for (int k = 0; k < 5; k++) n_inexact[k] = 0;
    clr = 1'b1;
    exact_mode = 1'b1;
    ri1 = '0;
    ri2 = '0;
    valid_q = 1'b0;
    repeat (2) @(posedge clk);
    #1 clr = 1'b0;
    prev_mode = 1'b1;
    for (int op = 0; op < NOPS + 2; op++) begin
      // present the next operation
      if (op < NOPS) begin
        ri1 = operand($urandom);
        ri2 = operand($urandom);
        exact_mode = 1'($urandom_range(0, 1));
        if (op > 0 && exact_mode != prev_mode) n_switch++;
        prev_mode = exact_mode;
        if (exact_mode) n_exact++; else n_approx++;
        for (int k = 0; k < 5; k++) begin
          exp[k] = mul32(k + 1, exact_mode, ri1, ri2);
          if (!exact_mode && exp[k] != 64'(ri1) * 64'(ri2)) n_inexact[k]++;
        end
      end
      @(posedge clk);
      #1;
      // operands are registered at the edge that follows them and the
      // products at the next one: the operation presented in the previous
      // iteration is now at the outputs
      if (valid_q) compare(exp_q);
      exp_q   = exp;
      valid_q = (op < NOPS);
      if (op == CLR_AT) begin
        // clear: the operation in flight is dropped
        clr = 1'b1;
        @(posedge clk);
        #1;
        clr = 1'b0;
        n_clr++;
        checks++;
        if (p_c1 != 0 || p_c2 != 0 || p_c3 != 0 || p_c4 != 0 || p_mixed != 0) begin
          failures++;
          $display("FAIL outputs not cleared");
        end
        valid_q = 1'b0;
      end
    end
    $display("exact ops %0d, approximate ops %0d, mode switches %0d, clears %0d",
             n_exact, n_approx, n_switch, n_clr);
    $display("inexact approximate products: c1 %0d c2 %0d c3 %0d c4 %0d mixed %0d",
             n_inexact[0], n_inexact[1], n_inexact[2], n_inexact[3], n_inexact[4]);
    checks++;
    if (n_exact == 0 || n_approx == 0 || n_switch == 0 || n_clr == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (n_inexact[k] == 0) begin
        failures++;
        $display("FAIL multiplier %0d never inexact", k + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
