// dq42_c4: dual-quality 4:2 compressor, variant 4 (DQ4:2C4).
//
// Same ports and weights as exact_42_compressor plus exact_mode. With
// exact_mode = 1 the outputs come from a full exact 4:2 compressor; with
// exact_mode = 0 they come from a small approximate part that ignores cin:
//   sum = NAND(XNOR(a1,a2), XNOR(a3,a4)) = (a1^a2) | (a3^a4),
//   carry = (a1 & a2) | (a3 & a4), cout = 0 (not produced).
// The more accurate carry costs an OR gate that is used in approximate mode
// only. Error rate 31.25 % (5 of 16 combinations of a1..a4): only the four
// cases with one bit set in each pair and the all-ones case are wrong.
// The published design gives this variant's error rate and says that its approximate
// carry is more accurate than variant 3's; the carry formula above is the one
// that meets that and the 31.25 % error rate (the lowest reachable with this
// sum and no cout), and is this design's reconstruction.
// The compressor is specified with power gating: the exact-only part is
// switched off in approximate mode and tri-state buffers disconnect the
// approximate outputs in exact mode. Supply switching has no logic function,
// so here both parts are always computed and a multiplexer on each output
// stands for the tri-state buffers; the values seen at the outputs are the
// same. Switching exact_mode takes effect combinationally.
module dq42_c4 (
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
    ap_sum   = ~(~(a1 ^ a2) & ~(a3 ^ a4));
    ap_carry = (a1 & a2) | (a3 & a4);
    ap_cout  = 1'b0;
  end

  always_comb begin
    sum   = exact_mode ? ex_sum   : ap_sum;
    carry = exact_mode ? ex_carry : ap_carry;
    cout  = exact_mode ? ex_cout  : ap_cout;
  end
endmodule
