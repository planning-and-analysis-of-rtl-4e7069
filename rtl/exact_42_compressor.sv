// exact_42_compressor: the conventional (exact) 4:2 compressor.
//
// Adds four bits a1..a4 of one column and a carry-in cin from the column
// below. sum has the weight of the inputs; carry and cout have twice that
// weight, so a1+a2+a3+a4+cin == sum + 2*(carry + cout) always holds.
// It is built, as is usual, from two full adders in series: the first adds
// a1, a2, a3 and produces cout (which does not depend on cin, so a row of
// these compressors has no rippling carry); the second adds that partial sum,
// a4 and cin and produces sum and carry:
//   sum   = a1^a2^a3^a4^cin
//   carry = (a1^a2^a3^a4) ? cin : a4
//   cout  = (a1^a2) ? a3 : a1
// Purely combinational.
module exact_42_compressor (
  input  logic a1,
  input  logic a2,
  input  logic a3,
  input  logic a4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa1 (.a(a1), .b(a2), .ci(a3),  .s(s1),  .co(cout));
  full_adder u_fa2 (.a(s1), .b(a4), .ci(cin), .s(sum), .co(carry));
endmodule
