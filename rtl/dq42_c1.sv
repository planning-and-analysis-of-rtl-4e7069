// dq42_c1: dual-quality 4:2 compressor, variant 1 (DQ4:2C1).
//
// Same ports and weights as exact_42_compressor plus exact_mode. With
// exact_mode = 1 the outputs come from a full exact 4:2 compressor; with
// exact_mode = 0 they come from a small approximate part that ignores cin:
//   sum = a1, carry = a4, cout = 0 (not produced).
// Over the 16 combinations of a1..a4 the approximate value sum + 2*carry
// differs from a1+a2+a3+a4 in 10 cases (error rate 62.5 %).
// The compressor is specified with power gating: the exact-only part is
// switched off in approximate mode and tri-state buffers disconnect the
// approximate outputs in exact mode. Supply switching has no logic function,
// so here both parts are always computed and a multiplexer on each output
// stands for the tri-state buffers; the values seen at the outputs are the
// same. Switching exact_mode takes effect combinationally.
module dq42_c1 (
  input  logic exact_mode,
  input  logic a1,
  input  logic a2,
  input  logic a3,
  input  logic a4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic ex_sum, ex_carry, ex_cout;     // exact part
  logic ap_sum, ap_carry, ap_cout;     // approximate part

  exact_42_compressor u_exact (
    .a1(a1), .a2(a2), .a3(a3), .a4(a4), .cin(cin),
    .sum(ex_sum), .carry(ex_carry), .cout(ex_cout)
  );

  always_comb begin
    ap_sum   = a1;
    ap_carry = a4;
    ap_cout  = 1'b0;
  end

  always_comb begin
    sum   = exact_mode ? ex_sum   : ap_sum;
    carry = exact_mode ? ex_carry : ap_carry;
    cout  = exact_mode ? ex_cout  : ap_cout;
  end
endmodule
