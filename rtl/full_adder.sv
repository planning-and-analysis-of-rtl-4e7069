// full_adder: one-bit full adder, the cell of the exact 4:2 compressor.
//
// s = a ^ b ^ ci, co = majority(a, b, ci). The carry is written in the
// multiplexer form (a ^ b) ? ci : a, the same form as the compressor
// equations it serves. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  always_comb begin
    p  = a ^ b;
    s  = p ^ ci;
    co = p ? ci : a;
  end
endmodule
