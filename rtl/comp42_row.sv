// comp42_row: one row of 4:2 compressors across a W-column carry-save word.
//
// Reduces four rows r0..r3 (already aligned to their product columns) to two,
// s and c, with r0+r1+r2+r3 == s + c (mod 2^W) in exact mode. Column j holds
// one compressor: a1..a4 = r0[j]..r3[j], cin = cout of column j-1 (0 for
// column 0); its sum goes to s[j] and its carry to c[j+1]. Because cout does
// not depend on cin there is no carry ripple along the row: the delay is that
// of one compressor. The cout and carry of the top column fall off the word;
// in exact mode they are zero whenever the true sum fits in W bits. c[0] is
// always 0, since no column lies below column 0.
//
// FULL_MASK marks the columns in which all four inputs can carry a
// partial-product bit. Only those columns get the multiplier's dual-quality
// variant; the partly empty columns at the ends of the row get an exact
// compressor, so that padding zeros are never fed to an approximate cell.
// That split, and the column index COL_OFFSET + j used by the mixed
// arrangement, are choices of this implementation. Combinational.
module comp42_row
  import dq42_pkg::*;
#(
  parameter int          W         = 16,
  parameter dq_variant_e VARIANT   = DQ_C1,
  parameter int          COL_OFFSET = 0,
  parameter int          MIX_SPLIT = 8,
  parameter logic [W-1:0] FULL_MASK = '1
) (
  input  logic         exact_mode,
  input  logic [W-1:0] r0,
  input  logic [W-1:0] r1,
  input  logic [W-1:0] r2,
  input  logic [W-1:0] r3,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W:0] cin;     // cin[j] enters column j; cin[W] is dropped
  logic [W:0] carry;   // carry[j+1] is the carry of column j; carry[W] is dropped

  assign cin[0]   = 1'b0;
  assign carry[0] = 1'b0;

  for (genvar j = 0; j < W; j++) begin : g_col
    localparam dq_variant_e V =
      FULL_MASK[j] ? column_variant(VARIANT, COL_OFFSET + j, MIX_SPLIT) : DQ_EXACT;
    dq42_compressor #(.VARIANT(V)) u_cmp (
      .exact_mode(exact_mode),
      .a1(r0[j]), .a2(r1[j]), .a3(r2[j]), .a4(r3[j]),
      .cin(cin[j]),
      .sum(s[j]), .carry(carry[j+1]), .cout(cin[j+1])
    );
  end

  assign c = carry[W-1:0];

  // The top column's outputs leave the W-bit word.
  logic unused_top;
  assign unused_top = cin[W] ^ carry[W];
endmodule
